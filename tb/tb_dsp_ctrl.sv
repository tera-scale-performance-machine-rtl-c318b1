// tb_dsp_ctrl: self-checking test of the control unit and instruction
// memory. The testbench plays host and both stream processors:
//  - writes HBDM memory 0 through the host port and reads it back;
//  - runs COPY (2048 words, memory 0 to 1) + HALT and checks the copy and
//    that it took 2048 cycles plus a small fixed overhead;
//  - runs NOP, LINEAR, KNN, KMEANS, ORDER, HALT and checks that each
//    processor instruction starts the right processor with the instruction
//    on cur_instr, hands it memories src and dst on the LMB, and that the
//    program waits for that processor's done.
module tb_dsp_ctrl;
  import mlsoc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic host_imem_we = 0, host_mem_en = 0, host_mem_we = 0, host_mem_sel = 0, start = 0;
  logic [IMEM_AW-1:0] host_imem_addr = '0, start_pc = '0;
  instr_t host_imem_wdata = '0;
  logic [AW-1:0] host_mem_addr = '0;
  mem_word_t host_mem_wdata = '0, host_mem_rdata;
  logic busy, done, isp_start, fsp_start;
  logic isp_done = 0, fsp_done = 0;
  logic [31:0] cycles;
  instr_t cur_instr;
  owner_e [1:0] owner;
  mem_req_t [1:0] mem_req;
  mem_word_t [1:0] mem_rdata;
  int checks = 0, failures = 0;
  mem_word_t model [2048];
  int n_isp = 0, n_fsp = 0;

  dsp_ctrl dut (.clk, .rst_n, .host_imem_we, .host_imem_addr, .host_imem_wdata,
    .host_mem_en, .host_mem_we, .host_mem_sel, .host_mem_addr, .host_mem_wdata, .host_mem_rdata,
    .start, .start_pc, .busy, .done, .cycles, .cur_instr, .isp_start, .isp_done,
    .fsp_start, .fsp_done, .owner, .mem_req, .mem_rdata);
  hbdm mem (.clk, .req(mem_req), .rdata(mem_rdata));

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // stand-in stream processors: finish 7 cycles after their start
  always @(posedge clk) begin
    if (isp_start && rst_n) begin
      n_isp++;
      fork begin
        repeat (6) @(posedge clk);
        checks += 3;
        if (!(cur_instr.op inside {OP_KLOAD, OP_LINEAR, OP_ORDER})) failures++;
        if (owner[cur_instr.src] != OWN_ISP || owner[cur_instr.dst] != OWN_ISP) begin failures++; $display("isp owner %p", owner); end
        if (!busy) failures++;
        @(negedge clk); isp_done = 1; @(negedge clk); isp_done = 0;
      end join_none
    end
    if (fsp_start && rst_n) begin
      n_fsp++;
      fork begin
        repeat (6) @(posedge clk);
        checks += 2;
        if (!(cur_instr.op inside {OP_KNN, OP_KMEANS})) failures++;
        if (owner[cur_instr.src] != OWN_FSP || owner[cur_instr.dst] != OWN_FSP) begin failures++; $display("fsp owner %p", owner); end
        @(negedge clk); fsp_done = 1; @(negedge clk); fsp_done = 0;
      end join_none
    end
  end

  task automatic put(input int a, input opcode_e op, input int src, input int dst, input int cnt);
    @(negedge clk);
    host_imem_we = 1; host_imem_addr = IMEM_AW'(a);
    host_imem_wdata = '0; host_imem_wdata.op = op; host_imem_wdata.src = 1'(src);
    host_imem_wdata.dst = 1'(dst); host_imem_wdata.count = 16'(cnt);
    @(negedge clk); host_imem_we = 0;
  endtask

  task automatic go(input int pc, output int ncyc);
    int t;
    @(negedge clk); start = 1; start_pc = IMEM_AW'(pc);
    @(negedge clk); start = 0;
    t = 0;
    while (!done) begin @(negedge clk); t++; end
    ncyc = t;
  endtask

  initial begin
    int nc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // host writes memory 0
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      for (int b = 0; b < 16; b++) model[a][b] = 8'($urandom);
      host_mem_en = 1; host_mem_we = 1; host_mem_sel = 0; host_mem_addr = AW'(a);
      host_mem_wdata = model[a];
    end
    @(negedge clk); host_mem_en = 0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); host_mem_en = 1; host_mem_we = 0; host_mem_sel = 0; host_mem_addr = AW'(a * 31);
      @(negedge clk); host_mem_en = 0;
      checks++;
      if (host_mem_rdata !== model[a * 31]) begin failures++; $display("host rd %0d", a); end
    end
    // program 1: copy the whole of memory 0 to memory 1
    put(0, OP_COPY, 0, 1, 2048);
    put(1, OP_HALT, 0, 0, 0);
    go(0, nc);
    $display("copy program: %0d cycles", nc);
    checks++;
    if (nc < 2048 || nc > 2048 + 6) failures++;
    for (int a = 0; a < 2048; a += 7) begin
      @(negedge clk); host_mem_en = 1; host_mem_we = 0; host_mem_sel = 1; host_mem_addr = AW'(a);
      @(negedge clk); host_mem_en = 0;
      checks++;
      if (host_mem_rdata !== model[a]) begin failures++; $display("copy %0d", a); end
    end
    // program 2: processor instructions
    put(10, OP_NOP, 0, 0, 0);
    put(11, OP_LINEAR, 0, 1, 0);
    put(12, OP_KNN, 1, 0, 0);
    put(13, OP_KMEANS, 0, 1, 0);
    put(14, OP_ORDER, 1, 0, 0);
    put(15, OP_HALT, 0, 0, 0);
    go(10, nc);
    $display("program 2: %0d cycles", nc);
    checks += 3;
    if (n_isp != 2 || n_fsp != 2) failures++;
    if (nc < 4 * 8) failures++;          // waited for every done
    if (owner[0] != OWN_CTRL || owner[1] != OWN_CTRL) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
