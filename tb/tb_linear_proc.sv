// tb_linear_proc: self-checking test of the ISP linear processor.
// Streams random windows, kernels and operations (convolution with divisor
// and offset, absolute convolution, masked mean, masked variance) with
// random gaps, computes each expected pixel in the testbench and checks
// the outputs in order and that each appears exactly 40 cycles after its
// window.
module tb_linear_proc;
  import mlsoc_pkg::*;
  localparam int LAT = 40;
  logic clk = 0, rst_n = 0, in_valid = 0;
  always #5 clk = ~clk;
  pix_t [WIN-1:0][WIN-1:0] win;
  logic [WIN-1:0][WIN-1:0][PIX_W-1:0] kern;
  logic [WIN-1:0][WIN-1:0] mask;
  linop_e op;
  logic [15:0] divisor;
  logic signed [8:0] offset;
  logic out_valid;
  pix_t out_pix;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_q [$];
  int exp_t [$];
  int n_ops [4];

  linear_proc #(.LATENCY(LAT)) dut (.clk, .rst_n, .en(1'b1), .in_valid, .win, .kern, .mask,
    .op, .divisor, .offset, .out_valid, .out_pix);

  always_comb
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) mask[r][c] = kern[r][c] != 0;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid && rst_n) begin
      checks += 2;
      if (exp_q.size() == 0) failures++;
      else begin
        int e, t;
        e = exp_q.pop_front(); t = exp_t.pop_front();
        if (out_pix !== 8'(e)) begin failures++; if (failures < 6) $display("pix got %0d exp %0d", out_pix, e); end
        if (cyc - t != LAT) begin failures++; if (failures < 6) $display("latency %0d", cyc - t); end
      end
    end
  end

  function automatic int model();
    longint spk = 0, sp = 0, sp2 = 0, n = 0, q, r;
    for (int rr = 0; rr < WIN; rr++)
      for (int c = 0; c < WIN; c++) begin
        spk += longint'(win[rr][c]) * longint'($signed(kern[rr][c]));
        if (kern[rr][c] != 0) begin sp += win[rr][c]; sp2 += win[rr][c] * win[rr][c]; n++; end
      end
    case (op)
      LIN_CONV, LIN_ABS: begin
        q = (spk < 0 ? -spk : spk) / (divisor == 0 ? 1 : divisor);
        if (spk < 0 && op == LIN_CONV) q = -q;
      end
      LIN_MEAN: q = sp / (n == 0 ? 1 : n);
      default:  q = (n * sp2 - sp * sp) / (n == 0 ? 1 : n * n);
    endcase
    r = q + offset;
    return r < 0 ? 0 : r > 255 ? 255 : int'(r);
  endfunction

  initial begin
    win = '0; kern = '0; op = LIN_CONV; divisor = 1; offset = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      in_valid = $urandom_range(0, 3) != 0;
      op = linop_e'($urandom_range(0, 3));
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          win[r][c]  = (t % 2) ? 8'($urandom) : 8'($urandom_range(0, 31));
          kern[r][c] = (r < 8 || $urandom_range(0, 1)) ? 8'($urandom_range(0, 20) - 10) : 8'd0;
        end
      divisor = 16'($urandom_range(0, 600));
      offset  = 9'($urandom_range(0, 100) - 50);
      if (in_valid) begin exp_q.push_back(model()); exp_t.push_back(cyc); n_ops[op]++; end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("left %0d", exp_q.size()); end
    for (int i = 0; i < 4; i++) begin checks++; if (n_ops[i] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
