// tb_fsp: self-checking test of the feature stream processor wrapper.
// Runs a K-NN ranking and then a K-means clustering through the FSP's
// single instruction port on a shared HBDM and checks: the K-NN results
// against a brute-force ranking, the K-means labels of two well-separated
// 1-D clusters, that only the started processor is busy, and that a
// non-FSP opcode completes at once.
module tb_fsp;
  import mlsoc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  instr_t instr;
  logic busy, done;
  mem_req_t [1:0] dreq, treq, req;
  mem_word_t [1:0] rdata;
  logic tbmode = 1;
  int checks = 0, failures = 0;

  hbdm mem (.clk, .req, .rdata);
  fsp dut (.clk, .rst_n, .start, .instr, .busy, .done, .mem_req(dreq), .mem_rdata(rdata));
  assign req = tbmode ? treq : dreq;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int m, input int a, input mem_word_t w);
    @(negedge clk);
    treq = '0; treq[m].en = 1; treq[m].we = 1; treq[m].be = '1; treq[m].wdata = w;
    for (int b = 0; b < NBANK; b++) treq[m].addr[b] = AW'(a);
    @(negedge clk); treq = '0;
  endtask
  task automatic rd(input int m, input int a, output mem_word_t w);
    @(negedge clk);
    treq = '0; treq[m].en = 1;
    for (int b = 0; b < NBANK; b++) treq[m].addr[b] = AW'(a);
    @(negedge clk); treq = '0; w = rdata[m];
  endtask
  task automatic run(input instr_t ins, output int ncyc);
    tbmode = 0;
    @(negedge clk); instr = ins; start = 1;
    @(negedge clk); start = 0; ncyc = 1;
    while (!done) begin
      @(negedge clk); ncyc++;
    end
    tbmode = 1;
  endtask

  initial begin
    mem_word_t w, q;
    instr_t ins;
    int nc, d [40];
    treq = '0; instr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // K-NN: 40 16-D vectors, vector v differs from the query by (39-v) in lane 0
    for (int b = 0; b < 16; b++) q[b] = 8'(100 + b);
    wr(0, 0, q);
    for (int v = 0; v < 40; v++) begin
      w = q; w[0] = 8'(100 + 39 - v);
      wr(0, 10 + v, w);
      d[v] = 39 - v;
    end
    ins = '0; ins.op = OP_KNN; ins.src = 0; ins.dst = 1; ins.sub = 0; ins.a0 = 0; ins.a1 = 10;
    ins.count = 40; ins.a2 = 0; ins.rank = 10;
    run(ins, nc);
    for (int i = 0; i < 10; i += 2) begin
      rd(1, i / 2, w);
      for (int h = 0; h < 2; h++) begin
        checks += 2;
        if (w[h*8 +: 4] !== 32'(i + h)) failures++;
        if (w[h*8 + 4 +: 4] !== 32'(39 - i - h)) failures++;
      end
    end
    // K-means: 64 1-D values, low half near 20, high half near 220
    for (int wi = 0; wi < 4; wi++) begin
      for (int b = 0; b < 16; b++) w[b] = (b % 2) ? 8'(210 + $urandom_range(0, 20)) : 8'(10 + $urandom_range(0, 20));
      wr(0, 100 + wi, w);
    end
    w = '0; w[0] = 8'd90; w[1] = 8'd140;
    wr(0, 200, w);
    ins = '0; ins.op = OP_KMEANS; ins.src = 0; ins.dst = 1; ins.sub = 0; ins.a0 = 200;
    ins.a1 = 100; ins.count = 4; ins.a2 = 300; ins.rank = 2; ins.iters = 3;
    fork
      run(ins, nc);
      begin
        repeat (5) @(posedge clk);
        checks++;
        if (dut.u_sup.busy || !dut.u_unsup.busy) failures++;
      end
    join
    for (int wi = 0; wi < 4; wi++) begin
      rd(1, 300 + wi, w);
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (w[b] !== 8'(b % 2)) failures++;
      end
    end
    // an ISP opcode is not for the FSP and completes at once
    ins = '0; ins.op = OP_LINEAR;
    run(ins, nc);
    checks++;
    if (nc > 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
