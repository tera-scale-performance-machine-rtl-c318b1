// tb_isp: self-checking test of the image stream processor.
// Stores a random image in HBDM memory 0 in the 16-row slice layout and
// runs, through the ISP's instruction interface: kernel loads, a 3x3
// convolution (offset, clamping), a 5x5 absolute-value edge filter, a 5x5
// median, a 16x16 variance and a 16x16 dilation (max). Each result image
// in memory 1 is compared pixel by pixel with a reference computed in the
// testbench, and each pass must take W*(H-k+1) cycles plus the 40-cycle
// pipeline latency and a few cycles of overhead. Also checks that the
// arbiter freezes the unused processor.
module tb_isp;
  import mlsoc_pkg::*;
  localparam int W = 30, H = 22;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  instr_t instr;
  logic busy, done;
  mem_req_t [1:0] dreq, treq, req;
  mem_word_t [1:0] rdata;
  logic tbmode = 1;
  int checks = 0, failures = 0, cyc = 0;
  int img [H][W];
  int kern [16][16];
  always @(posedge clk) cyc <= cyc + 1;

  hbdm mem (.clk, .req, .rdata);
  isp dut (.clk, .rst_n, .start, .instr, .busy, .done, .mem_req(dreq), .mem_rdata(rdata));
  assign req = tbmode ? treq : dreq;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wr(input int m, input int a, input mem_word_t w, input logic [15:0] be);
    @(negedge clk);
    treq = '0; treq[m].en = 1; treq[m].we = 1; treq[m].be = be; treq[m].wdata = w;
    for (int b = 0; b < NBANK; b++) treq[m].addr[b] = AW'(a);
    @(negedge clk); treq = '0;
  endtask
  task automatic rd(input int m, input int a, output mem_word_t w);
    @(negedge clk);
    treq = '0; treq[m].en = 1;
    for (int b = 0; b < NBANK; b++) treq[m].addr[b] = AW'(a);
    @(negedge clk); treq = '0; w = rdata[m];
  endtask

  task automatic run(input instr_t ins, output int cycles);
    int t0;
    tbmode = 0;
    @(negedge clk);
    instr = ins; start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    wait (done); cycles = cyc - t0;
    @(negedge clk); tbmode = 1;
  endtask

  // kernel of size k: rows 0..k-1, columns 16-k..15
  task automatic load_kernel(input int k, input int kind);
    mem_word_t w;
    instr_t ins;
    int cyc_k;
    for (int r = 0; r < 16; r++) for (int c = 0; c < 16; c++) kern[r][c] = 0;
    for (int r = 0; r < k; r++)
      for (int c = 16 - k; c < 16; c++)
        kern[r][c] = kind == 0 ? $urandom_range(0, 8) - 4 : 1;
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 16; c++) w[c] = 8'(kern[r][c]);
      wr(0, 1500 + r, w, '1);
    end
    ins = '0; ins.op = OP_KLOAD; ins.src = 0; ins.a0 = 1500;
    run(ins, cyc_k);
  endtask

  function automatic int expect_px(input int op, input int k, input int ox, input int oy,
                                   input int dv, input int off, input int rank);
    longint spk = 0, sp = 0, sp2 = 0, n = 0, q, r;
    int vals [$];
    for (int i = 0; i < k; i++)
      for (int j = 0; j < k; j++) begin
        int p, kv;
        p  = img[oy + i][ox + j];
        kv = kern[i][16 - k + j];
        spk += p * kv;
        if (kv != 0) begin sp += p; sp2 += p * p; n++; vals.push_back(p); end
      end
    vals.rsort();
    case (op)
      0: begin q = (spk < 0 ? -spk : spk) / dv; if (spk < 0) q = -q; end
      1: q = (spk < 0 ? -spk : spk) / dv;
      3: q = (n * sp2 - sp * sp) / (n * n);
      default: return vals[rank - 1];
    endcase
    r = q + off;
    return r < 0 ? 0 : r > 255 ? 255 : int'(r);
  endfunction

  task automatic pass(input opcode_e opc, input int sub, input int k, input int dv,
                      input int off, input int rank);
    instr_t ins;
    int cycles, no;
    ins = '0; ins.op = opc; ins.src = 0; ins.dst = 1; ins.sub = 3'(sub); ins.a0 = 0; ins.a1 = 0;
    ins.width = 9'(W); ins.height = 9'(H); ins.ksize = 5'(k); ins.divisor = 16'(dv);
    ins.offset = 9'(off); ins.rank = 9'(rank);
    run(ins, cycles);
    checks++;
    if (cycles > W * (H - k + 1) + 40 + 4) begin failures++; $display("slow %0d", cycles); end
    no = 0;
    for (int oy = 0; oy <= H - k; oy++)
      for (int ox = 0; ox <= W - k; ox++) begin
        mem_word_t w;
        int e;
        rd(1, no / 16, w);
        e = expect_px(opc == OP_ORDER ? 4 : sub, k, ox, oy, dv, off, rank);
        checks++;
        if (w[no % 16] !== 8'(e)) begin
          failures++;
          if (failures < 6) $display("op %0d k%0d (%0d,%0d): %0d vs %0d", opc, k, ox, oy, w[no % 16], e);
        end
        no++;
      end
  endtask

  // the order processor must stay frozen during a linear pass
  int ord_moves = 0;
  always @(posedge clk) if (busy && instr.op == OP_LINEAR && dut.u_ord.vv[1]) ord_moves++;

  initial begin
    treq = '0; instr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 255);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        mem_word_t w;
        w = '0; w[y % 16] = 8'(img[y][x]);
        wr(0, (y / 16) * W + x, w, 16'(1) << (y % 16));
      end
    load_kernel(3, 0);  pass(OP_LINEAR, LIN_CONV, 3, 1, 128, 0);
    load_kernel(5, 0);  pass(OP_LINEAR, LIN_ABS, 5, 3, 0, 0);
    load_kernel(5, 1);  pass(OP_ORDER, 0, 5, 1, 0, 13);
    load_kernel(16, 1); pass(OP_LINEAR, LIN_VAR, 16, 1, 0, 0);
    pass(OP_ORDER, 0, 16, 1, 0, 1);
    checks++;
    if (ord_moves != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
