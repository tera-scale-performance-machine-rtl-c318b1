// isp_input_if: ISP input interface, fetches one window column per cycle.
//
// The image (width W) is stored in one HBDM memory in slices of 16 rows:
// image row y lives in bank (y mod 16) and slice (y div 16), and pixel
// (x, y) sits at address base + (y div 16)*W + x of that bank. A 16x16
// window whose top row is y covers rows y..y+15, which fall in 16 different
// banks whatever y is, so the column x of the window is read in one cycle
// with a different address per bank:
//     row_b  = y + ((b - y) mod 16)
//     addr_b = base + (row_b div 16)*W + x
// One cycle later the 16 returned bytes are rotated so that col_out[r] is
// image row y+r. This layout follows the published design's memory utilisation
// scheme; the exact address formula is this design's reading of it.
//
// Interface: rd_valid with y/x/base/width issues a read (mem_req, combin-
// ational); col_valid/col_out come one cycle later, matching the HBDM's
// read latency.
module isp_input_if
  import mlsoc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rd_valid,
  input  logic [8:0]         y,
  input  logic [8:0]         x,
  input  logic [AW-1:0]      base,
  input  logic [8:0]         width,
  output mem_req_t           mem_req,
  input  mem_word_t          mem_rdata,
  output logic               col_valid,
  output pix_t [WIN-1:0]     col_out
);

  logic [3:0] rot_q;

  always_comb begin
    logic [8:0]  row_b;
    logic [3:0]  dlt;
    mem_req       = MEM_IDLE;
    mem_req.en    = rd_valid;
    mem_req.we    = 1'b0;
    for (int b = 0; b < NBANK; b++) begin
      dlt   = 4'(b) - y[3:0];
      row_b = y + 9'(dlt);
      mem_req.addr[b] = AW'(32'(base) + 32'(row_b[8:4]) * 32'(width) + 32'(x));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_valid <= 1'b0;
      rot_q     <= '0;
    end else begin
      col_valid <= rd_valid;
      if (rd_valid) rot_q <= y[3:0];
    end
  end

  always_comb
    for (int r = 0; r < WIN; r++)
      col_out[r] = mem_rdata[4'(r) + rot_q];

endmodule
