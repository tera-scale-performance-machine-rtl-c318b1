// knn_proc: supervised learning processor (K-nearest-neighbour ranking).
//
// Computes the Manhattan (sum |x-q|) or squared Euclidean (sum (x-q)^2)
// distance between a query vector and N training vectors stored in the
// HBDM, and ranks them with the automatic sorter (knn_sorter, K = 128 PEs).
// A vector of 16*F dimensions (F = 1..8 folds: 16 to 128 dimensions) is
// F consecutive 128-bit words, one 8-bit component per bank, so the
// processor reads one word per cycle and finishes 1/F vectors per cycle
// (1 vector/cycle at 16-D down to 0.125 at 128-D). Per word, 16 distance
// units and an adder tree give a partial distance that is accumulated over
// the folds; at the last fold (distance, vector index) enters the sorter.
//
// Instruction fields: src = data memory, dst = result memory, sub = F-1,
// euclid, a0 = query address (F words), a1 = first training vector,
// count = N, a2 = result address, rank = number of results R to write
// (<= K). Results are written sorted, two per word: bytes 0..3 distance,
// bytes 4..7 vector index (zero-extended), bytes 8..15 the next result.
// Timing: F query reads, N*F streaming reads, one cycle to drain,
// ceil(R/2) writes; done pulses one cycle at the end.
// The distance/fold scheme and sorter follow the published design; the memory
// layout of queries and results is this design's choice.
module knn_proc
  import mlsoc_pkg::*;
#(
  parameter int K = 128
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
  localparam int DW = 32;
  localparam int IW = 16;

  typedef enum logic [2:0] {S_IDLE, S_LOADQ, S_RUN, S_WAIT, S_DUMP} state_e;
  state_e state;
  instr_t ins;

  pix_t [7:0][NBANK-1:0] query;
  logic [3:0]  f_iss;            // fold of the word being issued
  logic [15:0] v_iss;            // vector of the word being issued
  logic [3:0]  q_iss;
  logic [7:0]  r_cnt;            // results written (word pairs)
  logic        rv;               // read data valid (training word)
  logic        qv;               // read data valid (query word)
  logic [3:0]  rf, qf;
  logic [15:0] rvec;
  logic [DW-1:0] acc;

  logic [2:0] fl;
  assign fl   = ins.sub;
  assign busy = state != S_IDLE;

  // ---------------- distance units ----------------
  mem_word_t  dat;
  logic [DW-1:0] part, total;
  assign dat = mem_rdata[ins.src];
  always_comb begin
    logic signed [8:0] df;
    part = '0;
    for (int l = 0; l < NBANK; l++) begin
      df = $signed({1'b0, dat[l]}) - $signed({1'b0, query[rf[2:0]][l]});
      if (df < 0) df = -df;
      part += ins.euclid ? DW'(df * df) : DW'(df);
    end
    total = (rf == 4'd0 ? '0 : acc) + part;
  end

  // ---------------- automatic sorter ----------------
  logic [DW-1:0] s_dis  [K];
  logic [IW-1:0] s_data [K];
  logic          s_clear, s_keep;
  assign s_clear = state == S_IDLE && start;
  assign s_keep  = !(rv && rf == 4'(fl));

  knn_sorter #(.K(K), .DW(DW), .IW(IW)) u_sort (
    .clk, .rst_n, .clear(s_clear), .keep(s_keep), .dis_in(total), .data_in(rvec),
    .dis_out(s_dis), .data_out(s_data));

  // ---------------- memory requests ----------------
  always_comb begin
    logic [AW-1:0] a;
    mem_req = '{default: MEM_IDLE};
    a = '0;
    unique case (state)
      S_LOADQ: begin
        mem_req[ins.src].en = 1'b1;
        a = ins.a0 + AW'(q_iss);
      end
      S_RUN: begin
        mem_req[ins.src].en = 1'b1;
        a = ins.a1 + AW'(32'(v_iss) * (32'(fl) + 1) + 32'(f_iss));
      end
      S_DUMP: begin
        mem_req[ins.dst].en = 1'b1;
        mem_req[ins.dst].we = 1'b1;
        a = ins.a2 + AW'(r_cnt);
        for (int h = 0; h < 2; h++) begin
          logic [7:0] i;
          i = {r_cnt[6:0], 1'b0} + 8'(h);
          if (9'(i) < ins.rank && 32'(i) < K) begin
            mem_req[ins.dst].be[h*8 +: 8] = '1;
            mem_req[ins.dst].wdata[h*8 +: 8] = {32'(s_data[i[$clog2(K)-1:0]]), s_dis[i[$clog2(K)-1:0]]};
          end
        end
      end
      default: ;
    endcase
    for (int b = 0; b < NBANK; b++) begin
      mem_req[0].addr[b] = a;
      mem_req[1].addr[b] = a;
    end
  end

  // ---------------- sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ins <= '0; query <= '0; f_iss <= '0; v_iss <= '0; q_iss <= '0;
      r_cnt <= '0; rv <= 1'b0; qv <= 1'b0; rf <= '0; qf <= '0; rvec <= '0; acc <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      rv   <= state == S_RUN;
      qv   <= state == S_LOADQ;
      rf   <= f_iss;
      qf   <= q_iss;
      rvec <= v_iss;
      if (qv) query[qf[2:0]] <= mem_rdata[ins.src];
      if (rv) acc <= total;
      unique case (state)
        S_IDLE: if (start) begin
          ins <= instr; q_iss <= '0; f_iss <= '0; v_iss <= '0; r_cnt <= '0;
          state <= S_LOADQ;
        end
        S_LOADQ: begin
          q_iss <= q_iss + 4'd1;
          if (q_iss == 4'(fl)) state <= (ins.count == 0) ? S_WAIT : S_RUN;
        end
        S_RUN: begin
          if (f_iss == 4'(fl)) begin
            f_iss <= '0;
            v_iss <= v_iss + 16'd1;
            if (v_iss == ins.count - 16'd1) state <= S_WAIT;
          end else begin
            f_iss <= f_iss + 4'd1;
          end
        end
        S_WAIT: begin
          if (ins.rank == 0) begin state <= S_IDLE; done <= 1'b1; end
          else state <= S_DUMP;
        end
        S_DUMP: begin
          r_cnt <= r_cnt + 8'd1;
          if ({r_cnt, 1'b0} + 9'd2 >= ins.rank) begin state <= S_IDLE; done <= 1'b1; end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
