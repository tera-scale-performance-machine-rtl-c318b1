// tb_hbdm: self-checking test of the high-bandwidth dual memory.
// Writes random bytes through per-bank addresses and byte enables into both
// memories, keeps a reference model, and reads back with a different
// address in every bank; checks one-cycle read latency, that byte enables
// are honoured and that the two memories are independent.
module tb_hbdm;
  import mlsoc_pkg::*;
  localparam int DEPTH = 2048;
  logic clk = 0;
  always #5 clk = ~clk;
  mem_req_t  [1:0] req;
  mem_word_t [1:0] rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [2][NBANK][DEPTH];

  hbdm dut (.clk, .req, .rdata);

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = '0;
    // fill both memories with known content (copy-like: 2048 word writes each)
    for (int a = 0; a < DEPTH; a++) begin
      for (int m = 0; m < 2; m++) begin
        req[m].en = 1; req[m].we = 1; req[m].be = '1;
        for (int b = 0; b < NBANK; b++) begin
          req[m].addr[b]  = AW'(a);
          req[m].wdata[b] = 8'($urandom);
          model[m][b][a]  = req[m].wdata[b];
        end
      end
      @(posedge clk); #1;
    end
    // random partial writes with per-bank addresses
    for (int t = 0; t < 2000; t++) begin
      for (int m = 0; m < 2; m++) begin
        req[m].en = 1; req[m].we = 1; req[m].be = 16'($urandom);
        for (int b = 0; b < NBANK; b++) begin
          req[m].addr[b]  = AW'($urandom);
          req[m].wdata[b] = 8'($urandom);
          if (req[m].be[b]) model[m][b][req[m].addr[b]] = req[m].wdata[b];
        end
      end
      @(posedge clk); #1;
    end
    // random reads, compare one cycle later
    for (int t = 0; t < 2000; t++) begin
      logic [1:0][NBANK-1:0][AW-1:0] ra;
      for (int m = 0; m < 2; m++) begin
        req[m].en = 1; req[m].we = 0;
        for (int b = 0; b < NBANK; b++) begin ra[m][b] = AW'($urandom); req[m].addr[b] = ra[m][b]; end
      end
      @(posedge clk); #1;
      req[0].en = 0; req[1].en = 0;
      for (int m = 0; m < 2; m++)
        for (int b = 0; b < NBANK; b++) begin
          checks++;
          if (rdata[m][b] !== model[m][b][ra[m][b]]) begin
            failures++;
            if (failures < 5) $display("mismatch mem%0d bank%0d addr%0d got %h exp %h", m, b, ra[m][b], rdata[m][b], model[m][b][ra[m][b]]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
