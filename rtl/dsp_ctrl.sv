// dsp_ctrl: control unit and instruction memory of the dual stream
// processor.
//
// The host (the RISC, through the LMB-AHB interface) writes a program of
// 128-bit instructions (instr_t) into the instruction memory and may read
// or write the HBDM directly while the DSP is idle. start with start_pc
// runs the program: the control unit fetches one instruction per step,
// decodes it and
//  - OP_NOP: goes on; OP_HALT: stops and pulses done;
//  - OP_COPY: copies count words from memory src (a0..) to memory dst
//    (a1..) itself, one word per cycle (2048 words in 2048 cycles);
//  - OP_KLOAD/LINEAR/ORDER: gives memories src and dst to the ISP on the
//    LMB and starts it; OP_KNN/KMEANS: the same for the FSP; it waits for
//    the processor's done.
// Instructions run one at a time. The instruction set and encoding are this
// design's; the published design only says the control unit analyses the
// instructions and drives the two stream processors.
// Host memory port: linear word access, all banks at the same address,
// read data on host_mem_rdata one cycle after the request. cycles counts
// the clock cycles of the last program run.
module dsp_ctrl
  import mlsoc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // host side
  input  logic                 host_imem_we,
  input  logic [IMEM_AW-1:0]   host_imem_addr,
  input  instr_t               host_imem_wdata,
  input  logic                 host_mem_en,
  input  logic                 host_mem_we,
  input  logic                 host_mem_sel,
  input  logic [AW-1:0]        host_mem_addr,
  input  mem_word_t            host_mem_wdata,
  output mem_word_t            host_mem_rdata,
  input  logic                 start,
  input  logic [IMEM_AW-1:0]   start_pc,
  output logic                 busy,
  output logic                 done,
  output logic [31:0]          cycles,
  // processors
  output instr_t               cur_instr,
  output logic                 isp_start,
  input  logic                 isp_done,
  output logic                 fsp_start,
  input  logic                 fsp_done,
  // LMB
  output owner_e   [1:0]       owner,
  output mem_req_t [1:0]       mem_req,
  input  mem_word_t [1:0]      mem_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_EXEC, S_COPY, S_WAIT} state_e;
  state_e state;

  instr_t imem [IMEM_DEPTH];
  logic [IMEM_AW-1:0] pc;
  instr_t ins;
  logic [15:0] cp_cnt;
  logic        cp_v;
  logic [AW-1:0] cp_wa;
  logic        host_sel_q;

  assign busy      = state != S_IDLE;
  assign cur_instr = ins;

  always_ff @(posedge clk)
    if (host_imem_we && state == S_IDLE) imem[host_imem_addr] <= host_imem_wdata;

  // ---------------- LMB ownership ----------------
  always_comb begin
    owner = '{default: OWN_CTRL};
    if (state == S_WAIT) begin
      unique case (ins.op)
        OP_KLOAD, OP_LINEAR, OP_ORDER: begin owner[ins.src] = OWN_ISP; owner[ins.dst] = OWN_ISP; end
        OP_KNN, OP_KMEANS:             begin owner[ins.src] = OWN_FSP; owner[ins.dst] = OWN_FSP; end
        default: ;
      endcase
    end
  end

  // ---------------- own memory traffic: host access and copy ----------------
  always_comb begin
    mem_req = '{default: MEM_IDLE};
    if (state == S_IDLE && host_mem_en) begin
      mem_req[host_mem_sel].en    = 1'b1;
      mem_req[host_mem_sel].we    = host_mem_we;
      mem_req[host_mem_sel].be    = '1;
      mem_req[host_mem_sel].wdata = host_mem_wdata;
      for (int b = 0; b < NBANK; b++) mem_req[host_mem_sel].addr[b] = host_mem_addr;
    end
    if (state == S_COPY && cp_cnt < ins.count) begin
      mem_req[ins.src].en = 1'b1;
      for (int b = 0; b < NBANK; b++) mem_req[ins.src].addr[b] = ins.a0 + AW'(cp_cnt);
    end
    if (cp_v) begin
      mem_req[ins.dst].en    = 1'b1;
      mem_req[ins.dst].we    = 1'b1;
      mem_req[ins.dst].be    = '1;
      mem_req[ins.dst].wdata = mem_rdata[ins.src];
      for (int b = 0; b < NBANK; b++) mem_req[ins.dst].addr[b] = cp_wa;
    end
  end
  assign host_mem_rdata = mem_rdata[host_sel_q];

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pc <= '0; ins <= '0; cp_cnt <= '0; cp_v <= 1'b0; cp_wa <= '0;
      isp_start <= 1'b0; fsp_start <= 1'b0; done <= 1'b0; cycles <= '0; host_sel_q <= 1'b0;
    end else begin
      done      <= 1'b0;
      isp_start <= 1'b0;
      fsp_start <= 1'b0;
      if (host_mem_en) host_sel_q <= host_mem_sel;
      cp_v  <= state == S_COPY && cp_cnt < ins.count;
      cp_wa <= ins.a1 + AW'(cp_cnt);
      if (state != S_IDLE) cycles <= cycles + 32'd1;
      unique case (state)
        S_IDLE: if (start) begin
          pc <= start_pc; cycles <= '0; state <= S_FETCH;
        end
        S_FETCH: begin
          ins   <= imem[pc];
          pc    <= pc + IMEM_AW'(1);
          state <= S_EXEC;
        end
        S_EXEC: begin
          cp_cnt <= '0;
          unique case (ins.op)
            OP_HALT: begin state <= S_IDLE; done <= 1'b1; end
            OP_COPY: state <= S_COPY;
            OP_KLOAD, OP_LINEAR, OP_ORDER: begin isp_start <= 1'b1; state <= S_WAIT; end
            OP_KNN, OP_KMEANS:             begin fsp_start <= 1'b1; state <= S_WAIT; end
            default: state <= S_FETCH;
          endcase
        end
        S_COPY: begin
          if (cp_cnt < ins.count) cp_cnt <= cp_cnt + 16'd1;
          else if (!cp_v) state <= S_FETCH;
        end
        S_WAIT: if (isp_done || fsp_done) state <= S_FETCH;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
