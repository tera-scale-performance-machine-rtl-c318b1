// hbdm: high-bandwidth dual memory of the dual stream processor.
//
// Two independent memories (0 and 1), each made of NBANK byte-wide banks
// of DEPTH entries: 2 x 16 x 2048 bytes = 64 KB, as in the published design. Every
// bank has its own address, so one request reads 16 bytes from 16 different
// rows (one window column for the image stream processor) or, with equal
// addresses, one linear 128-bit word. Because the two memories are separate
// the whole of one can be copied into the other in 2048 cycles.
//
// Interface: one mem_req_t per memory (en, we, per-bank enable be, per-bank
// address, 16 bytes of write data). Reads return on rdata one cycle after
// the request (synchronous SRAM). A read enables all banks; a write only the
// banks whose be bit is set. Bank read data holds its value when not read.
// Each bank is a plain single-port array; the SRAM macro itself is not
// modelled.
module hbdm
  import mlsoc_pkg::*;
#(
  parameter int DEPTH = BANK_DEPTH
) (
  input  logic                 clk,
  input  mem_req_t  [1:0]      req,
  output mem_word_t [1:0]      rdata
);

  for (genvar m = 0; m < 2; m++) begin : g_mem
    for (genvar b = 0; b < NBANK; b++) begin : g_bank
      logic [PIX_W-1:0] ram [DEPTH];
      logic [$clog2(DEPTH)-1:0] a;
      assign a = req[m].addr[b][$clog2(DEPTH)-1:0];
      always_ff @(posedge clk) begin
        if (req[m].en) begin
          if (req[m].we) begin
            if (req[m].be[b]) ram[a] <= req[m].wdata[b];
          end else begin
            rdata[m][b] <= ram[a];
          end
        end
      end
    end
  end

endmodule
