// isp: image stream processor.
//
// Holds the arbiter, the input interface, the pixel and kernel stream
// memories, the linear and order processors and the output interface.
// An instruction (instr_t) is accepted with start while idle:
//  OP_KLOAD  : reads 16 linear words from memory src at a0.. into the kernel
//              stream memory (word i = kernel row i).
//  OP_LINEAR : window pass with the linear processor (sub = linop_e).
//  OP_ORDER  : window pass with the order processor (rank = instr.rank).
// A window pass scans the image stored in memory src at slice base a0
// (width W = instr.width, height H = instr.height) row by row. Every cycle
// one 16-pixel window column is read (16 pixels/cycle from the HBDM) and
// shifted into the pixel stream memory, which presents all 256 window
// pixels to the processors. With kernel size k (instr.ksize, 1..16) the
// kernel occupies window rows 0..k-1 and columns 16-k..15, so window
// column 15 is the newest image column x and an output is produced once
// x >= k-1: (W-k+1)*(H-k+1) outputs, one per cycle, 40 cycles after their
// window. The output interface writes output n to memory dst, linear
// layout: address a1 + n/16, bank n mod 16, so the result can be read back
// as a feature stream of 16 one-byte vectors per word.
// The arbiter enables only the processor the instruction uses; the other
// one is frozen (inactive). done pulses for one cycle at the end.
// The scan order and kernel placement are this design's choices.
module isp
  import mlsoc_pkg::*;
#(
  parameter int LATENCY = 40
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  instr_t               instr,
  output logic                 busy,
  output logic                 done,
  output mem_req_t  [1:0]      mem_req,
  input  mem_word_t [1:0]      mem_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_KLOAD, S_SCAN, S_DRAIN} state_e;
  state_e  state;
  instr_t  ins;

  logic [8:0]  x, y;
  logic [4:0]  kcnt;
  logic        klo_v;
  logic [3:0]  klo_row;
  logic [15:0] n_out, n_total;
  logic        rd_valid;
  logic [8:0]  x_d1;
  logic        win_valid;

  // ---------------- arbiter ----------------
  logic en_lin, en_ord;
  assign en_lin = busy && ins.op == OP_LINEAR;
  assign en_ord = busy && ins.op == OP_ORDER;
  assign busy   = state != S_IDLE;

  // ---------------- input interface ----------------
  mem_req_t  in_req;
  logic      col_valid;
  pix_t [WIN-1:0] col;
  assign rd_valid = state == S_SCAN;

  isp_input_if u_in (
    .clk, .rst_n, .rd_valid, .y, .x, .base(ins.a0), .width(ins.width),
    .mem_req(in_req), .mem_rdata(mem_rdata[ins.src]), .col_valid, .col_out(col));

  // ---------------- stream memories ----------------
  pix_t [WIN-1:0][WIN-1:0]            win;
  logic [WIN-1:0][WIN-1:0][PIX_W-1:0] kern;
  logic [WIN-1:0][WIN-1:0]            kmask;

  pixel_stream_mem u_psm (.clk, .rst_n, .shift(col_valid), .col_in(col), .win);
  kernel_stream_mem u_ksm (.clk, .rst_n, .row_we(klo_v), .row_sel(klo_row),
                           .row_in(mem_rdata[ins.src]), .kern, .mask(kmask));

  // ---------------- processors ----------------
  logic lin_v, ord_v;
  pix_t lin_p, ord_p;
  linear_proc #(.LATENCY(LATENCY)) u_lin (
    .clk, .rst_n, .en(en_lin), .in_valid(win_valid && en_lin), .win, .kern, .mask(kmask),
    .op(linop_e'(ins.sub)), .divisor(ins.divisor), .offset(ins.offset),
    .out_valid(lin_v), .out_pix(lin_p));
  order_proc #(.LATENCY(LATENCY)) u_ord (
    .clk, .rst_n, .en(en_ord), .in_valid(win_valid && en_ord), .win, .mask(kmask),
    .rank(ins.rank), .out_valid(ord_v), .out_pix(ord_p));

  logic out_v;
  pix_t out_p;
  assign out_v = (en_lin && lin_v) || (en_ord && ord_v);
  assign out_p = en_lin ? lin_p : ord_p;

  // ---------------- output interface ----------------
  mem_req_t out_req;
  always_comb begin
    out_req       = MEM_IDLE;
    out_req.en    = out_v;
    out_req.we    = 1'b1;
    for (int b = 0; b < NBANK; b++) begin
      out_req.addr[b]  = ins.a1 + AW'(n_out >> 4);
      out_req.wdata[b] = out_p;
    end
    out_req.be[n_out[3:0]] = 1'b1;
  end

  always_comb begin
    mem_req = '{default: MEM_IDLE};
    if (state == S_KLOAD) begin
      mem_req[ins.src].en = 1'b1;
      for (int b = 0; b < NBANK; b++) mem_req[ins.src].addr[b] = ins.a0 + AW'(kcnt);
    end else begin
      mem_req[ins.src] = in_req;
      if (out_v) mem_req[ins.dst] = out_req;
    end
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ins <= '0; x <= '0; y <= '0; kcnt <= '0;
      klo_v <= 1'b0; klo_row <= '0; n_out <= '0; n_total <= '0;
      x_d1 <= '0; win_valid <= 1'b0; done <= 1'b0;
    end else begin
      done      <= 1'b0;
      klo_v     <= state == S_KLOAD;
      klo_row   <= kcnt[3:0];
      if (rd_valid) x_d1 <= x;
      win_valid <= col_valid && (x_d1 >= 9'(ins.ksize) - 9'd1);
      if (out_v) n_out <= n_out + 16'd1;
      unique case (state)
        S_IDLE: if (start) begin
          ins   <= instr;
          x     <= '0;
          y     <= '0;
          kcnt  <= '0;
          n_out <= '0;
          n_total <= 16'(instr.width - 9'(instr.ksize) + 9'd1) *
                     16'(instr.height - 9'(instr.ksize) + 9'd1);
          if (instr.op == OP_KLOAD) state <= S_KLOAD;
          else if (instr.op == OP_LINEAR || instr.op == OP_ORDER) state <= S_SCAN;
          else done <= 1'b1;
        end
        S_KLOAD: begin
          kcnt <= kcnt + 5'd1;
          if (kcnt == 5'd15) state <= S_DRAIN;
        end
        S_SCAN: begin
          if (x == ins.width - 9'd1) begin
            x <= '0;
            y <= y + 9'd1;
            if (y == ins.height - 9'(ins.ksize)) state <= S_DRAIN;
          end else begin
            x <= x + 9'd1;
          end
        end
        S_DRAIN: begin
          if (ins.op == OP_KLOAD) begin
            if (!klo_v) begin state <= S_IDLE; done <= 1'b1; end
          end else if (n_out + 16'(out_v) == n_total) begin
            state <= S_IDLE; done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // image passes read one memory and write the other
  a_src_ne_dst: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_SCAN) |-> (ins.src != ins.dst));

endmodule
