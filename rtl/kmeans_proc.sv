// kmeans_proc: unsupervised learning processor, bandwidth-adaptive K-means.
//
// Feature vectors of D = 1, 2, 4, 8 or 16 dimensions (modes A..E, D =
// 2^instr.sub) are packed in 128-bit HBDM words, one 8-bit component per
// bank, G = 16/D vectors per word. One word is consumed per cycle, so the
// vector rate adapts to the dimension: 16, 8, 4, 2 or 1 vectors/cycle, all
// against up to 16 centroids in parallel:
//  - E-M distance set: 16 lanes x 16 centroids of |x - c| or (x - c)^2.
//  - M-S PE set: a 4-layer adder tree per centroid; the mode picks the
//    layer whose sums cover exactly D lanes, giving G distances per
//    centroid.
//  - Labeling engine: for each of the G vectors, the nearest of the first
//    KN centroids (lowest index on ties).
//  - Summation updating engine: per centroid, the component sums and the
//    member count of the vectors assigned to it.
// One pass streams all feature words. After each of the first ITERS passes
// the centroids are replaced by sum/count (truncating division, one
// centroid per cycle; a centroid with no members is kept). A final pass
// writes each vector's label (0..15), one byte per vector, linear layout.
//
// Instruction fields: src = data memory, dst = label memory, sub = log2 D,
// euclid, a0 = initial centroids (centroid k component d at byte k*D+d,
// 16 words are read), a1 = first feature word, count = feature words,
// rank = KN (1..16), iters = ITERS, a2 = label address.
// Timing per pass: count cycles + 1; update: 16 cycles; load: 17 cycles.
// The structure follows the published design's bandwidth adaptive mechanism; the
// memory layouts, label output and division rule are this design's.
module kmeans_proc
  import mlsoc_pkg::*;
#(
  parameter int KC = 16    // centroids processed in parallel
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
  localparam int L = NBANK;   // lanes

  typedef enum logic [2:0] {S_IDLE, S_LOADC, S_PASS, S_WAIT, S_UPD} state_e;
  state_e state;
  instr_t ins;

  pix_t [KC-1:0][L-1:0] cent;
  logic [31:0]          csum [KC][L];
  logic [15:0]          ccnt [KC];
  logic [15:0] w_iss;
  logic [15:0] w_dat;
  logic [4:0]  c_iss;
  logic [4:0]  ucnt;
  logic [5:0]  pass;
  logic        dv, cv;
  logic [3:0]  cw;

  logic [2:0] lgd;
  logic       last_pass;
  assign lgd       = (ins.sub > 3'd4) ? 3'd4 : ins.sub;
  assign last_pass = pass == ins.iters;
  assign busy      = state != S_IDLE;

  mem_word_t x;
  assign x = mem_rdata[ins.src];

  // ---------------- E-M distance set and M-S PE set ----------------
  logic [19:0] ms   [KC][5][L];   // layer j holds L>>j partial sums
  logic [19:0] cdist [KC][L];      // per centroid, per vector in the word
  always_comb begin
    logic signed [8:0] df;
    for (int k = 0; k < KC; k++) begin
      for (int l = 0; l < L; l++) begin
        df = $signed({1'b0, x[l]}) - $signed({1'b0, cent[k][4'(l & ((1 << lgd) - 1))]});
        if (df < 0) df = -df;
        ms[k][0][l] = ins.euclid ? 20'(df * df) : 20'(df);
      end
      for (int j = 1; j < 5; j++)
        for (int l = 0; l < L; l++)
          ms[k][j][l] = (l < (L >> j)) ? ms[k][j-1][2*l] + ms[k][j-1][2*l+1] : '0;
      for (int g = 0; g < L; g++) cdist[k][g] = ms[k][lgd][g];
    end
  end

  // ---------------- labeling engine ----------------
  logic [3:0] lab [L];
  always_comb begin
    logic [19:0] best;
    for (int g = 0; g < L; g++) begin
      best   = cdist[0][g];
      lab[g] = '0;
      for (int k = 1; k < KC; k++)
        if (9'(k) < ins.rank && cdist[k][g] < best) begin
          best   = cdist[k][g];
          lab[g] = 4'(k);
        end
    end
  end

  // ---------------- memory requests ----------------
  logic [4:0] gsz;                 // vectors per word
  assign gsz = 5'(16 >> lgd);
  always_comb begin
    logic [AW-1:0] a;
    logic [15:0]   v0;
    mem_req = '{default: MEM_IDLE};
    a  = '0;
    v0 = w_dat * 16'(gsz);
    if (state == S_LOADC) begin
      mem_req[ins.src].en = 1'b1;
      a = ins.a0 + AW'(c_iss);
    end else if (state == S_PASS) begin
      mem_req[ins.src].en = 1'b1;
      a = ins.a1 + AW'(w_iss);
    end
    for (int b = 0; b < NBANK; b++) mem_req[ins.src].addr[b] = a;
    // label write-back of the word read in the previous cycle
    if (dv && last_pass) begin
      mem_req[ins.dst].en = 1'b1;
      mem_req[ins.dst].we = 1'b1;
      for (int b = 0; b < NBANK; b++) mem_req[ins.dst].addr[b] = ins.a2 + AW'(v0 >> 4);
      for (int g = 0; g < L; g++)
        if (5'(g) < gsz) begin
          mem_req[ins.dst].be[v0[3:0] + 4'(g)]    = 1'b1;
          mem_req[ins.dst].wdata[v0[3:0] + 4'(g)] = 8'(lab[g]);
        end
    end
  end

  // ---------------- sequencing, summation updating engine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ins <= '0; cent <= '0; w_iss <= '0; w_dat <= '0; c_iss <= '0;
      ucnt <= '0; pass <= '0; dv <= 1'b0; cv <= 1'b0; cw <= '0; done <= 1'b0;
      for (int k = 0; k < KC; k++) begin
        ccnt[k] <= '0;
        for (int l = 0; l < L; l++) csum[k][l] <= '0;
      end
    end else begin
      done  <= 1'b0;
      dv    <= state == S_PASS;
      cv    <= state == S_LOADC;
      cw    <= c_iss[3:0];
      w_dat <= w_iss;
      // centroid load: byte j of the table is centroid j>>lgd, component j mod D
      if (cv) begin
        for (int b = 0; b < NBANK; b++) begin
          logic [7:0] j;
          j = {cw, 4'(b)};
          if ((32'(j) >> lgd) < KC) cent[4'(32'(j) >> lgd)][4'(j & 8'((1 << lgd) - 1))] <= x[b];
        end
      end
      // accumulate the members of each centroid
      if (dv && !last_pass) begin
        for (int k = 0; k < KC; k++) begin
          logic [31:0] s [L];
          logic [15:0] c;
          c = '0;
          for (int d = 0; d < L; d++) s[d] = csum[k][d];
          for (int l = 0; l < L; l++) begin
            if (lab[l >> lgd] == 4'(k)) begin
              s[l & ((1 << lgd) - 1)] += 32'(x[l]);
              if ((l & ((1 << lgd) - 1)) == 0) c += 16'd1;
            end
          end
          for (int d = 0; d < L; d++) csum[k][d] <= s[d];
          ccnt[k] <= ccnt[k] + c;
        end
      end
      unique case (state)
        S_IDLE: if (start) begin
          ins <= instr; c_iss <= '0; w_iss <= '0; pass <= '0;
          for (int k = 0; k < KC; k++) begin
            ccnt[k] <= '0;
            for (int l = 0; l < L; l++) csum[k][l] <= '0;
          end
          state <= S_LOADC;
        end
        S_LOADC: begin
          c_iss <= c_iss + 5'd1;
          if (c_iss == 5'd15) state <= S_PASS;
        end
        S_PASS: begin
          w_iss <= w_iss + 16'd1;
          if (w_iss == ins.count - 16'd1) state <= S_WAIT;
        end
        S_WAIT: begin
          w_iss <= '0;
          ucnt  <= '0;
          if (last_pass) begin state <= S_IDLE; done <= 1'b1; end
          else state <= S_UPD;
        end
        S_UPD: begin
          // new centroid = sum / count, one centroid per cycle
          for (int d = 0; d < L; d++)
            if (ccnt[ucnt[3:0]] != 0)
              cent[ucnt[3:0]][d] <= 8'(csum[ucnt[3:0]][d] / 32'(ccnt[ucnt[3:0]]));
          ccnt[ucnt[3:0]] <= '0;
          for (int d = 0; d < L; d++) csum[ucnt[3:0]][d] <= '0;
          ucnt <= ucnt + 5'd1;
          if (ucnt == 5'(KC - 1)) begin
            pass  <= pass + 6'd1;
            state <= S_PASS;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
