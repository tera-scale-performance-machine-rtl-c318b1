// linear_proc: the ISP linear processor, one output pixel per cycle.
//
// Four levels, as in the published design, each joined by a registered network:
//  1. Two 16x16 PE arrays: pixel x kernel coefficient (signed) and
//     pixel x pixel over the kernel mask; the masked pixels and the mask
//     are passed on as well.
//  2. Tree ALUs (adder_tree, one register per layer, 8 layers): sum(p*k),
//     sum(p^2), sum(p) and the member count n.
//  3. Dedicated engines: the pixel variance engine forms n*sum(p^2) -
//     sum(p)^2 and n^2; a mux selects the numerator/denominator of the
//     operation and the high-throughput divider (pipe_div, one division per
//     cycle, 16 stages) divides.
//  4. ALU: restores the sign, optionally takes the absolute value, adds the
//     offset and clamps to 0..255.
// The result then passes a delay line so that the total latency is LATENCY
// cycles (40 in the published design). Operations (linop_e): LIN_CONV (Laplacian,
// low-pass, Gaussian, Gabor, any 16x16 convolution), LIN_ABS (edge
// detector), LIN_MEAN and LIN_VAR. The correlation coefficient and face
// detection engines the published design names are not built; their function is not
// given. en low freezes the pipeline (processor inactive). The operation
// fields are sampled with in_valid and travel with the data.
module linear_proc
  import mlsoc_pkg::*;
#(
  parameter int LATENCY = 40
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               en,
  input  logic                               in_valid,
  input  pix_t [WIN-1:0][WIN-1:0]            win,
  input  logic [WIN-1:0][WIN-1:0][PIX_W-1:0] kern,
  input  logic [WIN-1:0][WIN-1:0]            mask,
  input  linop_e                             op,
  input  logic [15:0]                        divisor,
  input  logic signed [8:0]                  offset,
  output logic                               out_valid,
  output pix_t                               out_pix
);
  localparam int TREE_L = $clog2(NPIX);              // 8
  localparam int DIV_S  = 16;
  localparam int CORE   = 1 + TREE_L + 1 + DIV_S + 1; // 27
  localparam int PAD    = LATENCY - CORE;

  typedef struct packed {
    logic              v;
    linop_e            op;
    logic [15:0]       divisor;
    logic signed [8:0] offset;
  } side_t;

  // ---------------- level 1: PE arrays ----------------
  logic signed [16:0] pa [NPIX];
  logic signed [16:0] pb [NPIX];
  logic signed [9:0]  pc [NPIX];
  logic signed [1:0]  pn [NPIX];
  side_t s1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPIX; i++) begin pa[i] <= '0; pb[i] <= '0; pc[i] <= '0; pn[i] <= '0; end
      s1 <= '0;
    end else if (en) begin
      for (int i = 0; i < NPIX; i++) begin
        pa[i] <= $signed({1'b0, win[i/WIN][i%WIN]}) * $signed(kern[i/WIN][i%WIN]);
        pb[i] <= mask[i/WIN][i%WIN] ? $signed({1'b0, 16'(win[i/WIN][i%WIN] * win[i/WIN][i%WIN])}) : '0;
        pc[i] <= mask[i/WIN][i%WIN] ? $signed({2'b00, win[i/WIN][i%WIN]}) : '0;
        pn[i] <= mask[i/WIN][i%WIN] ? 2'sd1 : 2'sd0;
      end
      s1 <= '{v: in_valid, op: op, divisor: divisor, offset: offset};
    end
  end

  // ---------------- level 2: tree ALUs ----------------
  logic signed [27:0] sum_pk, sum_p2;
  logic signed [18:0] sum_p;
  logic signed [9:0]  sum_n;

  adder_tree #(.N(NPIX), .IW(17), .OW(28)) u_tree_pk (.clk, .rst_n, .en, .din(pa), .sum(sum_pk));
  adder_tree #(.N(NPIX), .IW(17), .OW(28)) u_tree_p2 (.clk, .rst_n, .en, .din(pb), .sum(sum_p2));
  adder_tree #(.N(NPIX), .IW(10), .OW(19)) u_tree_p  (.clk, .rst_n, .en, .din(pc), .sum(sum_p));
  adder_tree #(.N(NPIX), .IW(2),  .OW(10)) u_tree_n  (.clk, .rst_n, .en, .din(pn), .sum(sum_n));

  side_t s2_pipe [TREE_L];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TREE_L; i++) s2_pipe[i] <= '0;
    end else if (en) begin
      s2_pipe[0] <= s1;
      for (int i = 1; i < TREE_L; i++) s2_pipe[i] <= s2_pipe[i-1];
    end
  end
  side_t s2;
  assign s2 = s2_pipe[TREE_L-1];

  // ---------------- level 3: variance engine + divider ----------------
  logic [31:0] num3;
  logic [16:0] den3;
  typedef struct packed {
    logic              neg;
    logic              absv;
    logic signed [8:0] offset;
  } dside_t;
  dside_t ds3;
  logic   v3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      num3 <= '0; den3 <= '0; ds3 <= '0; v3 <= 1'b0;
    end else if (en) begin
      v3  <= s2.v;
      ds3 <= '{neg: 1'b0, absv: (s2.op == LIN_ABS), offset: s2.offset};
      unique case (s2.op)
        LIN_CONV, LIN_ABS: begin
          num3    <= 32'(sum_pk < 0 ? 28'(-sum_pk) : sum_pk);
          den3    <= (s2.divisor == 0) ? 17'd1 : 17'(s2.divisor);
          ds3.neg <= sum_pk < 0;
        end
        LIN_MEAN: begin
          num3 <= 32'(sum_p);
          den3 <= (sum_n == 0) ? 17'd1 : 17'(sum_n);
        end
        default: begin // LIN_VAR
          num3 <= 32'(64'(sum_n) * 64'(sum_p2) - 64'(sum_p) * 64'(sum_p));
          den3 <= (sum_n == 0) ? 17'd1 : 17'(sum_n * sum_n);
        end
      endcase
    end
  end

  logic        v4;
  logic [31:0] q4;
  dside_t      ds4;
  pipe_div #(.NW(32), .DW(17), .SBW($bits(dside_t))) u_div (
    .clk, .rst_n, .en, .in_valid(v3), .num(num3), .den(den3), .sb_in(ds3),
    .out_valid(v4), .quo(q4), .sb_out(ds4));

  // ---------------- level 4: ALU ----------------
  logic v5;
  pix_t p5;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v5 <= 1'b0; p5 <= '0;
    end else if (en) begin
      logic signed [33:0] r;
      r = ds4.neg ? -$signed({2'b00, q4}) : $signed({2'b00, q4});
      if (ds4.absv && r < 0) r = -r;
      r = r + 34'(ds4.offset);
      v5 <= v4;
      p5 <= (r < 0) ? 8'd0 : (r > 255) ? 8'd255 : r[7:0];
    end
  end

  // ---------------- latency padding ----------------
  logic v_d [PAD+1];
  pix_t p_d [PAD+1];
  assign v_d[0] = v5;
  assign p_d[0] = p5;
  for (genvar i = 0; i < PAD; i++) begin : g_pad
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  begin v_d[i+1] <= 1'b0; p_d[i+1] <= '0; end
      else if (en) begin v_d[i+1] <= v_d[i]; p_d[i+1] <= p_d[i]; end
    end
  end
  assign out_valid = v_d[PAD];
  assign out_pix   = p_d[PAD];

endmodule
