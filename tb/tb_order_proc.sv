// tb_order_proc: self-checking test of the ISP order processor.
// Streams random windows with random masks (full 16x16, small square
// kernels, random sparse) and random ranks (max, min, median, any), sorts
// the member pixels in the testbench and checks the output value and the
// 40-cycle latency.
module tb_order_proc;
  import mlsoc_pkg::*;
  localparam int LAT = 40;
  logic clk = 0, rst_n = 0, in_valid = 0;
  always #5 clk = ~clk;
  pix_t [WIN-1:0][WIN-1:0] win;
  logic [WIN-1:0][WIN-1:0] mask;
  logic [8:0] rank;
  logic out_valid;
  pix_t out_pix;
  int checks = 0, failures = 0, cyc = 0;
  int exp_q [$], exp_t [$];

  order_proc #(.LATENCY(LAT)) dut (.clk, .rst_n, .en(1'b1), .in_valid, .win, .mask, .rank,
    .out_valid, .out_pix);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && rst_n) begin
      checks += 2;
      if (exp_q.size() == 0) begin failures++; $display("unexpected at %0d", cyc); end
      else begin
        int e, t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        if (out_pix !== 8'(e)) begin failures++; if (failures < 6) $display("got %0d exp %0d", out_pix, e); end
        if (cyc - t != LAT) begin failures++; $display("lat %0d at %0d", cyc - t, cyc); end
      end
    end
  end

  initial begin
    win = '0; mask = '1; rank = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int vals [$];
      int kind, ks;
      vals.delete();
      @(negedge clk);
      in_valid = $urandom_range(0, 3) != 0;
      kind = $urandom_range(0, 2);
      ks = $urandom_range(1, 16);
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          // narrow value range on some windows to force many equal pixels
          win[r][c] = (t % 3 == 0) ? 8'($urandom_range(100, 104)) : 8'($urandom);
          mask[r][c] = kind == 0 ? 1'b1 : kind == 1 ? (r < ks && c >= 16 - ks) : 1'($urandom);
        end
      mask[0][15] = 1'b1;
      for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) if (mask[r][c]) vals.push_back(win[r][c]);
      vals.rsort();
      case ($urandom_range(0, 3))
        0: rank = 1;
        1: rank = 9'(vals.size());
        2: rank = 9'((vals.size() + 1) / 2);
        default: rank = 9'($urandom_range(1, vals.size()));
      endcase
      if (in_valid) begin exp_q.push_back(vals[rank - 1]); exp_t.push_back(cyc); end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("left %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
