// tb_mlsoc_dsp: end-to-end test of the dual stream processor at its
// default size, following the image segmentation example: a 160x120 image
// is loaded into the HBDM through the host port, filtered by the ISP, and
// the filtered image is clustered by the FSP's K-means (1-D vectors, 16 per
// cycle, 4 clusters, 32 iterations), with labels written back to the HBDM.
// Three programs run from the instruction memory:
//   A: KLOAD 5x5 mask, LINEAR mean 5x5, HALT
//   B: ORDER median 5x5, KMEANS (32 iterations), KNN (Euclidean, 16-D
//      vectors, 1131 candidates ranked into the 128-entry sorter), HALT
//   C: COPY memory 0 to memory 1 (2048 words), HALT
// Every result is read back through the host port and compared with a
// reference computed here. It also counts how often each mechanism
// happened (kernel load, linear pass, order pass, frozen processor, LMB
// hand-over to ISP and FSP, K-means centroid update, K-NN sorter overflow,
// copy) and fails any that never did, and checks cycle budgets.
module tb_mlsoc_dsp;
  import mlsoc_pkg::*;
  localparam int W = 160, H = 120, K5 = 5;
  localparam int OW = W - K5 + 1, OH = H - K5 + 1, NO = OW * OH, NWO = NO / 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_imem_we = 0, host_mem_en = 0, host_mem_we = 0, host_mem_sel = 0, start = 0;
  logic [IMEM_AW-1:0] host_imem_addr = '0, start_pc = '0;
  instr_t host_imem_wdata = '0;
  logic [AW-1:0] host_mem_addr = '0;
  mem_word_t host_mem_wdata = '0, host_mem_rdata;
  logic busy, done, isp_busy, fsp_busy;
  logic [31:0] cycles;
  logic [1:0] lmb_conflict;
  int checks = 0, failures = 0;
  int img [H][W];
  int med [NO];
  int lab [NO];

  mlsoc_dsp dut (.clk, .rst_n, .host_imem_we, .host_imem_addr, .host_imem_wdata,
    .host_mem_en, .host_mem_we, .host_mem_sel, .host_mem_addr, .host_mem_wdata, .host_mem_rdata,
    .start, .start_pc, .busy, .done, .cycles, .isp_busy, .fsp_busy, .lmb_conflict);

  initial begin
    #20000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_kload = 0, n_lin = 0, n_ord = 0, n_frozen = 0, n_own_isp = 0, n_own_fsp = 0;
  int n_update = 0, n_drop = 0, n_copy = 0, n_conflict = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.isp_start && dut.cur_instr.op == OP_KLOAD)  n_kload++;
    if (dut.isp_start && dut.cur_instr.op == OP_LINEAR) n_lin++;
    if (dut.isp_start && dut.cur_instr.op == OP_ORDER)  n_ord++;
    if (dut.u_isp.busy && !dut.u_isp.en_ord && dut.u_isp.en_lin) n_frozen++;
    if (dut.u_ctrl.owner[0] == OWN_ISP || dut.u_ctrl.owner[1] == OWN_ISP) n_own_isp++;
    if (dut.u_ctrl.owner[0] == OWN_FSP || dut.u_ctrl.owner[1] == OWN_FSP) n_own_fsp++;
    if (dut.u_fsp.u_unsup.state == 3'd4) n_update++;
    if (dut.u_fsp.u_sup.u_sort.lt[0] && !dut.u_fsp.u_sup.u_sort.keep &&
        dut.u_fsp.u_sup.u_sort.dis_out[127] != '1) n_drop++;
    if (dut.u_ctrl.state == 3'd3) n_copy++;
    if (lmb_conflict != 0) n_conflict++;
  end

  // ---------------- host helpers ----------------
  task automatic hwr(input int m, input int a, input mem_word_t w);
    @(negedge clk);
    host_mem_en = 1; host_mem_we = 1; host_mem_sel = 1'(m); host_mem_addr = AW'(a); host_mem_wdata = w;
    @(negedge clk); host_mem_en = 0; host_mem_we = 0;
  endtask
  task automatic hrd(input int m, input int a, output mem_word_t w);
    @(negedge clk);
    host_mem_en = 1; host_mem_we = 0; host_mem_sel = 1'(m); host_mem_addr = AW'(a);
    @(negedge clk); host_mem_en = 0; w = host_mem_rdata;
  endtask
  task automatic put(input int a, input instr_t ins);
    @(negedge clk); host_imem_we = 1; host_imem_addr = IMEM_AW'(a); host_imem_wdata = ins;
    @(negedge clk); host_imem_we = 0;
  endtask
  task automatic go(input int pc, output int nc);
    @(negedge clk); start = 1; start_pc = IMEM_AW'(pc);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    nc = int'(cycles);
  endtask

  function automatic int window_vals(input int ox, input int oy, ref int v [25]);
    int s = 0;
    for (int i = 0; i < K5; i++) for (int j = 0; j < K5; j++) begin v[i*K5+j] = img[oy+i][ox+j]; s += v[i*K5+j]; end
    return s;
  endfunction

  initial begin
    instr_t ins;
    mem_word_t w;
    int nc, v [25];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // image: smooth regions plus noise
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = ((x / 40 + y / 30) % 4) * 60 + 20 + $urandom_range(0, 30);
    // slice layout: word s*W + x of memory 0 holds rows 16s..16s+15 of column x
    for (int s = 0; s < (H + 15) / 16; s++)
      for (int x = 0; x < W; x++) begin
        for (int b = 0; b < 16; b++) w[b] = (s * 16 + b < H) ? 8'(img[s * 16 + b][x]) : 8'd0;
        hwr(0, s * W + x, w);
      end
    // 5x5 mask kernel at memory 0, words 2000..2015 (rows 0..4, columns 11..15)
    for (int r = 0; r < 16; r++) begin
      for (int c = 0; c < 16; c++) w[c] = (r < K5 && c >= 16 - K5) ? 8'd1 : 8'd0;
      hwr(0, 2000 + r, w);
    end
    // initial centroids (memory 1, word 2000) and K-NN query (memory 1, word 2020)
    w = '0; w[0] = 8'd40; w[1] = 8'd100; w[2] = 8'd160; w[3] = 8'd220;
    hwr(1, 2000, w);
    for (int b = 0; b < 16; b++) w[b] = 8'(100 + 5 * b);
    hwr(1, 2020, w);

    // ---------------- program A: mean filter ----------------
    ins = '0; ins.op = OP_KLOAD; ins.src = 0; ins.a0 = 2000;                 put(0, ins);
    ins = '0; ins.op = OP_LINEAR; ins.sub = LIN_MEAN; ins.src = 0; ins.dst = 1;
    ins.a0 = 0; ins.a1 = 0; ins.width = W; ins.height = H; ins.ksize = K5;   put(1, ins);
    ins = '0; ins.op = OP_HALT;                                              put(2, ins);
    go(0, nc);
    $display("program A: %0d cycles", nc);
    checks++;
    if (nc > 16 + W * OH + 40 + 20) failures++;
    for (int n = 0; n < NO; n += 16) begin
      hrd(1, n / 16, w);
      for (int b = 0; b < 16; b++) begin
        int s;
        s = window_vals((n + b) % OW, (n + b) / OW, v);
        checks++;
        if (w[b] !== 8'(s / 25)) failures++;
      end
    end

    // ---------------- program B: median, K-means, K-NN ----------------
    ins = '0; ins.op = OP_ORDER; ins.src = 0; ins.dst = 1; ins.a0 = 0; ins.a1 = 0;
    ins.width = W; ins.height = H; ins.ksize = K5; ins.rank = 13;            put(10, ins);
    ins = '0; ins.op = OP_KMEANS; ins.src = 1; ins.dst = 0; ins.sub = 0; ins.a0 = 2000;
    ins.a1 = 0; ins.count = NWO; ins.a2 = 0; ins.rank = 4; ins.iters = 32;   put(11, ins);
    ins = '0; ins.op = OP_KNN; ins.src = 1; ins.dst = 0; ins.sub = 0; ins.euclid = 1;
    ins.a0 = 2020; ins.a1 = 0; ins.count = NWO; ins.a2 = 1500; ins.rank = 16; put(12, ins);
    ins = '0; ins.op = OP_HALT;                                              put(13, ins);
    go(10, nc);
    $display("program B: %0d cycles", nc);
    // budget: median pass + 33 K-means passes + 32 updates + K-NN
    checks++;
    if (nc > (W * OH + 60) + (17 + 33 * (NWO + 1) + 32 * 16 + 10) + (NWO + 20) + 20) failures++;
    // reference median
    for (int n = 0; n < NO; n++) begin
      int q [$];
      void'(window_vals(n % OW, n / OW, v));
      q = {};
      for (int i = 0; i < 25; i++) q.push_back(v[i]);
      q.sort();
      med[n] = q[12];
    end
    for (int n = 0; n < NO; n += 16) begin
      hrd(1, n / 16, w);
      for (int b = 0; b < 16; b++) begin checks++; if (w[b] !== 8'(med[n + b])) failures++; end
    end
    // reference K-means (Manhattan, 1-D, truncating mean)
    begin
      int c [4];
      c = '{40, 100, 160, 220};
      for (int p = 0; p <= 32; p++) begin
        longint s [4]; int cnt [4];
        s = '{0, 0, 0, 0}; cnt = '{0, 0, 0, 0};
        for (int n = 0; n < NO; n++) begin
          int best, bd;
          best = 0; bd = 1 << 30;
          for (int k = 0; k < 4; k++) begin
            int dd;
            dd = med[n] - c[k]; if (dd < 0) dd = -dd;
            if (dd < bd) begin bd = dd; best = k; end
          end
          lab[n] = best; s[best] += med[n]; cnt[best]++;
        end
        if (p < 32) for (int k = 0; k < 4; k++) if (cnt[k] != 0) c[k] = int'(s[k] / cnt[k]);
      end
    end
    for (int n = 0; n < NO; n += 16) begin
      hrd(0, n / 16, w);
      for (int b = 0; b < 16; b++) begin checks++; if (w[b] !== 8'(lab[n + b])) failures++; end
    end
    // reference K-NN (squared Euclidean over 16-D words, stable ranking)
    begin
      longint dd [$]; int ii [$];
      for (int vv = 0; vv < NWO; vv++) begin
        longint d; int p;
        d = 0;
        for (int b = 0; b < 16; b++) begin
          int df;
          df = med[vv * 16 + b] - (100 + 5 * b);
          d += df * df;
        end
        p = 0;
        while (p < dd.size() && dd[p] <= d) p++;
        dd.insert(p, d); ii.insert(p, vv);
      end
      for (int i = 0; i < 16; i += 2) begin
        hrd(0, 1500 + i / 2, w);
        for (int h = 0; h < 2; h++) begin
          checks += 2;
          if (w[h*8 +: 4] !== 32'(dd[i + h])) failures++;
          if (w[h*8 + 4 +: 4] !== 32'(ii[i + h])) failures++;
        end
      end
    end

    // ---------------- program C: copy a whole memory ----------------
    ins = '0; ins.op = OP_COPY; ins.src = 0; ins.dst = 1; ins.a0 = 0; ins.a1 = 0; ins.count = 2048;
    put(20, ins);
    ins = '0; ins.op = OP_HALT; put(21, ins);
    go(20, nc);
    $display("program C: %0d cycles", nc);
    checks++;
    if (nc > 2048 + 8) failures++;
    for (int n = 0; n < NO; n += 16 * 37) begin
      hrd(1, n / 16, w);
      for (int b = 0; b < 16; b++) begin checks++; if (w[b] !== 8'(lab[n + b])) failures++; end
    end

    $display("mechanisms: kload=%0d linear=%0d order=%0d frozen=%0d own_isp=%0d own_fsp=%0d update=%0d sorter_drop=%0d copy=%0d conflict=%0d",
             n_kload, n_lin, n_ord, n_frozen, n_own_isp, n_own_fsp, n_update, n_drop, n_copy, n_conflict);
    checks += 10;
    if (n_kload == 0) failures++;
    if (n_lin == 0) failures++;
    if (n_ord == 0) failures++;
    if (n_frozen == 0) failures++;
    if (n_own_isp == 0) failures++;
    if (n_own_fsp == 0) failures++;
    if (n_update == 0) failures++;
    if (n_drop == 0) failures++;
    if (n_copy == 0) failures++;
    if (n_conflict != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
