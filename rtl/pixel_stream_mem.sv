// pixel_stream_mem: the ISP's pixel stream memory, a 16x16 window register.
//
// Windows are processed in raster order, so consecutive windows on a row
// differ by one column. Each cycle with shift set, the memory takes the 16
// new pixels of the next column (col_in[r] is window row r) and drops the
// oldest column. Column WIN-1 is always the newest, column 0 the oldest.
// The whole window is visible on win[row][col] at all times, so the
// processors see 256 pixels per cycle while the HBDM supplies only 16.
// Follows the published design's description; the column ordering is this design's.
module pixel_stream_mem
  import mlsoc_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          shift,
  input  pix_t [WIN-1:0]                col_in,
  output pix_t [WIN-1:0][WIN-1:0]       win
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
    end else if (shift) begin
      for (int r = 0; r < WIN; r++) begin
        for (int c = 0; c < WIN-1; c++) win[r][c] <= win[r][c+1];
        win[r][WIN-1] <= col_in[r];
      end
    end
  end

endmodule
