// kernel_stream_mem: the ISP's kernel stream memory.
//
// Holds the 16x16 kernel of the current operation as signed 8-bit values:
// filter coefficients for the linear processor, a membership mask (non-zero
// = member of the window) for the order processor. It is loaded one kernel
// row (16 bytes, one HBDM word) per cycle: row_we writes row_in into row
// row_sel. kern[row][col] uses the same row/column orientation as the
// pixel stream memory window. mask[row][col] is the non-zero flag.
// The row-wise loading is this design's choice; the published design only says the
// memory stores kernel data for the image processing tasks.
module kernel_stream_mem
  import mlsoc_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           row_we,
  input  logic [3:0]                     row_sel,
  input  logic [WIN-1:0][PIX_W-1:0]      row_in,
  output logic [WIN-1:0][WIN-1:0][PIX_W-1:0] kern,
  output logic [WIN-1:0][WIN-1:0]        mask
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      kern <= '0;
    else if (row_we) kern[row_sel] <= row_in;
  end

  always_comb
    for (int r = 0; r < WIN; r++)
      for (int c = 0; c < WIN; c++)
        mask[r][c] = (kern[r][c] != '0);

endmodule
