// tb_knn_proc: self-checking test of the supervised learning processor.
// For several runs with random fold counts F (16..128 dimensions), vector
// counts, distance type and result count R, it fills an HBDM memory with a
// query and training vectors, runs the processor, checks the run time
// (1/F vectors per cycle) and compares the R written results with a
// reference ranking computed in the testbench (stable for ties).
module tb_knn_proc;
  import mlsoc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  instr_t instr;
  logic busy, done;
  mem_req_t [1:0] dreq, treq, req;
  mem_word_t [1:0] rdata;
  logic tbmode = 1;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  hbdm mem (.clk, .req, .rdata);
  knn_proc dut (.clk, .rst_n, .start, .instr, .busy, .done, .mem_req(dreq), .mem_rdata(rdata));
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
    for (int run = 0; run < 6; run++) begin
      int F, N, R, eu, t0, t1;
      mem_word_t q [8];
      longint dd [$]; int ii [$];
      dd.delete(); ii.delete();
      F  = (run < 2) ? (run == 0 ? 1 : 8) : $urandom_range(1, 8);
      N  = $urandom_range(20, 180);
      R  = (run == 1) ? 128 : $urandom_range(1, 40);
      eu = run % 2;
      for (int f = 0; f < F; f++) begin
        for (int b = 0; b < NBANK; b++) q[f][b] = 8'($urandom);
        wr(0, 10 + f, q[f]);
      end
      for (int v = 0; v < N; v++) begin
        longint d;
        d = 0;
        for (int f = 0; f < F; f++) begin
          mem_word_t w;
          for (int b = 0; b < NBANK; b++) begin
            int df;
            w[b] = (v % 7 == 3) ? q[f][b] : 8'($urandom_range(0, 255));
            df = int'(w[b]) - int'(q[f][b]);
            d += eu ? df * df : (df < 0 ? -df : df);
          end
          wr(0, 100 + v * F + f, w);
        end
        begin
          int p; p = 0;
          while (p < dd.size() && dd[p] <= d) p++;
          dd.insert(p, d); ii.insert(p, v);
        end
      end
      tbmode = 0;
      @(negedge clk);
      instr = '0; instr.op = OP_KNN; instr.src = 0; instr.dst = 1; instr.sub = 3'(F - 1);
      instr.euclid = 1'(eu); instr.a0 = 10; instr.a1 = 100; instr.a2 = 7; instr.count = 16'(N);
      instr.rank = 9'(R);
      start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      wait (done); t1 = cyc;
      @(negedge clk); tbmode = 1;
      // cycles: F query reads + N*F streaming + drain + ceil(R/2) writes
      checks++;
      $display("run %0d cycles %0d", run, t1-t0);
      if ((t1 - t0) > F + N * F + 3 + (R + 1) / 2) begin
        failures++; $display("slow: %0d cycles", (t1 - t0));
      end
      for (int i = 0; i < R && i < N; i += 2) begin
        mem_word_t w;
        rd(1, 7 + i / 2, w);
        for (int h = 0; h < 2 && i + h < R && i + h < N; h++) begin
          checks += 2;
          if (w[h*8 +: 4] !== 32'(dd[i + h])) begin failures++; if (failures < 5) $display("dist %0d: %0d vs %0d", i+h, w[h*8 +: 4], dd[i+h]); end
          if (w[h*8 + 4 +: 4] !== 32'(ii[i + h])) begin failures++; if (failures < 8) $display("run %0d F%0d idx %0d: %0d vs %0d (d %0d)", run, F, i+h, w[h*8+4 +: 4], ii[i+h], dd[i+h]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
