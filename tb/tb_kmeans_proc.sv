// tb_kmeans_proc: self-checking test of the bandwidth-adaptive K-means
// processor. Runs every mode (1, 2, 4, 8, 16 dimensions) with random
// cluster counts, iteration counts and distance types on clustered random
// data, runs the same algorithm in the testbench (nearest centroid with the
// lowest index on ties, truncating mean update, empty clusters kept) and
// compares every written label; also checks the run time, which sets the
// 16/D vectors per cycle rate.
module tb_kmeans_proc;
  import mlsoc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  instr_t instr;
  logic busy, done;
  mem_req_t [1:0] dreq, treq, req;
  mem_word_t [1:0] rdata;
  logic tbmode = 1;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  hbdm mem (.clk, .req, .rdata);
  kmeans_proc dut (.clk, .rst_n, .start, .instr, .busy, .done, .mem_req(dreq), .mem_rdata(rdata));
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

  initial begin
    treq = '0; instr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 10; run++) begin
      automatic int lg = run % 5;
      automatic int D = 1 << lg, G = 16 >> lg;
      automatic int KN = $urandom_range(1, 16);
      automatic int IT = $urandom_range(0, 4);
      automatic int NW = $urandom_range(10, 60);
      automatic int eu = run / 5;
      automatic int cent [16][16];
      automatic int x [1024][16];
      automatic int lab [1024];
      automatic int nv = NW * G;
      automatic int t0, t1;
      automatic mem_word_t w;
      // initial centroid table: byte k*D+d
      for (int k = 0; k < 16; k++) for (int d = 0; d < 16; d++) cent[k][d] = $urandom_range(0, 255);
      for (int j = 0; j < 16; j++) begin
        for (int b = 0; b < 16; b++) begin
          automatic int i = j * 16 + b;
          w[b] = (i / D < 16) ? 8'(cent[i / D][i % D]) : 8'($urandom);
        end
        wr(0, 50 + j, w);
      end
      // feature vectors around a few random centres
      for (int v = 0; v < nv; v++) begin
        automatic int c = $urandom_range(0, 3);
        for (int d = 0; d < D; d++) x[v][d] = (c * 60 + $urandom_range(0, 40) + d * 7) % 256;
      end
      for (int wi = 0; wi < NW; wi++) begin
        for (int b = 0; b < 16; b++) w[b] = 8'(x[wi * G + b / D][b % D]);
        wr(0, 200 + wi, w);
      end
      // reference model
      for (int p = 0; p <= IT; p++) begin
        automatic longint s [16][16];
        automatic int n [16];
        for (int k = 0; k < 16; k++) begin n[k] = 0; for (int d = 0; d < 16; d++) s[k][d] = 0; end
        for (int v = 0; v < nv; v++) begin
          automatic longint best = -1;
          for (int k = 0; k < KN; k++) begin
            automatic longint dsum = 0;
            for (int d = 0; d < D; d++) begin
              automatic int df = x[v][d] - cent[k][d];
              dsum += eu ? df * df : (df < 0 ? -df : df);
            end
            if (best < 0 || dsum < best) begin best = dsum; lab[v] = k; end
          end
          n[lab[v]]++;
          for (int d = 0; d < D; d++) s[lab[v]][d] += x[v][d];
        end
        if (p < IT)
          for (int k = 0; k < 16; k++)
            if (n[k] != 0) for (int d = 0; d < D; d++) cent[k][d] = int'(s[k][d] / n[k]);
      end
      tbmode = 0;
      @(negedge clk);
      instr = '0; instr.op = OP_KMEANS; instr.src = 0; instr.dst = 1; instr.sub = 3'(lg);
      instr.euclid = 1'(eu); instr.a0 = 50; instr.a1 = 200; instr.a2 = 900; instr.count = 16'(NW);
      instr.rank = 9'(KN); instr.iters = 6'(IT);
      start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      wait (done); t1 = cyc;
      @(negedge clk); tbmode = 1;
      checks++;
      if (t1 - t0 > 17 + (IT + 1) * (NW + 1) + IT * 16 + 3) begin
        failures++; $display("run %0d slow: %0d cycles", run, t1 - t0);
      end
      for (int v = 0; v < nv; v += 16) begin
        rd(1, 900 + v / 16, w);
        for (int b = 0; b < 16 && v + b < nv; b++) begin
          checks++;
          if (w[b] !== 8'(lab[v + b])) begin
            failures++;
            if (failures < 6) $display("run %0d D%0d vec %0d: %0d vs %0d", run, D, v + b, w[b], lab[v + b]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
