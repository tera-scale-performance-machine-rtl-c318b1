// order_proc: the ISP order processor, a rank-order filter over a 16x16
// window with an arbitrary membership mask, one output per cycle.
//
// The rank is found bit-serially, MSB first, by 8 bit-level PE stages.
// Stage s looks at bit b = 7-s of all 256 (possibly modified) pixels: the
// 256 bit logics feed a 9-layer adder that counts the member pixels with
// bit b set, and a comparator tests count >= rank. If so, result bit b is 1
// and every member whose bit b is 0 has its lower bits forced to 0; if not,
// result bit b is 0 and every member whose bit b is 1 has its lower bits
// forced to 1. Pixels forced this way keep counting on the correct side, so
// the rank never has to change. rank = 1 gives the maximum (dilation),
// rank = member count the minimum (erosion), (count+1)/2 the median.
// A pixel whose bits all match the result is tracked as "alive"; the first
// alive index then drives a 16-stage pipelined 256-to-1 multiplexer (one
// 16-to-1 stage per window row) that fetches the original pixel.
// The remaining stages up to LATENCY (40 in the published design) are a delay line.
// The bit-modification rule is this design's reading of "bit-wise
// operations" in the published design. en low freezes the pipeline.
module order_proc
  import mlsoc_pkg::*;
#(
  parameter int LATENCY = 40
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic                       in_valid,
  input  pix_t [WIN-1:0][WIN-1:0]    win,
  input  logic [WIN-1:0][WIN-1:0]    mask,
  input  logic [8:0]                 rank,
  output logic                       out_valid,
  output pix_t                       out_pix
);
  localparam int CORE = PIX_W + 1 + WIN;   // 25
  localparam int PAD  = LATENCY - CORE;

  typedef pix_t [NPIX-1:0] pixv_t;

  // ---------------- bit-level PE stages ----------------
  pixv_t             bv  [PIX_W+1];   // modified pixels
  pixv_t             ov  [PIX_W+1];   // original pixels
  logic [NPIX-1:0]   mk  [PIX_W+1];
  logic [NPIX-1:0]   al  [PIX_W+1];   // alive
  logic [8:0]        rk  [PIX_W+1];
  logic              vv  [PIX_W+1];

  assign bv[0] = pixv_t'(win);
  assign ov[0] = pixv_t'(win);
  assign mk[0] = mask;
  assign al[0] = mask;
  assign rk[0] = rank;
  assign vv[0] = in_valid;

  for (genvar s = 0; s < PIX_W; s++) begin : g_bpe
    localparam int B = PIX_W - 1 - s;
    logic [8:0]      cnt;
    logic            rbit;
    pixv_t           bv_nx;
    logic [NPIX-1:0] al_nx;
    always_comb begin
      cnt = '0;
      for (int i = 0; i < NPIX; i++) cnt += 9'(mk[s][i] & bv[s][i][B]);
      rbit  = (cnt >= rk[s]);
      bv_nx = bv[s];
      al_nx = al[s];
      for (int i = 0; i < NPIX; i++) begin
        if (bv[s][i][B] != rbit) begin
          for (int k = 0; k < B; k++) bv_nx[i][k] = bv[s][i][B];
          al_nx[i] = 1'b0;
        end
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        bv[s+1] <= '0; ov[s+1] <= '0; mk[s+1] <= '0; al[s+1] <= '0; rk[s+1] <= '0; vv[s+1] <= 1'b0;
      end else if (en) begin
        bv[s+1] <= bv_nx; ov[s+1] <= ov[s]; mk[s+1] <= mk[s]; al[s+1] <= al_nx;
        rk[s+1] <= rk[s]; vv[s+1] <= vv[s];
      end
    end
  end

  // ---------------- index of the ranked pixel ----------------
  logic [7:0] idx_q;
  pixv_t      pix_q;
  logic       v_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= '0; pix_q <= '0; v_q <= 1'b0;
    end else if (en) begin
      logic [7:0] idx;
      idx = '0;
      for (int i = NPIX-1; i >= 0; i--) if (al[PIX_W][i]) idx = 8'(i);
      idx_q <= idx;
      pix_q <= ov[PIX_W];
      v_q   <= vv[PIX_W];
    end
  end

  // ---------------- 16-stage pipelined 256-to-1 multiplexer ----------------
  logic [7:0] m_idx [WIN+1];
  pixv_t      m_pix [WIN+1];
  pix_t       m_sel [WIN+1];
  logic       m_v   [WIN+1];
  assign m_idx[0] = idx_q;
  assign m_pix[0] = pix_q;
  assign m_sel[0] = '0;
  assign m_v[0]   = v_q;

  for (genvar r = 0; r < WIN; r++) begin : g_mux
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        m_idx[r+1] <= '0; m_pix[r+1] <= '0; m_sel[r+1] <= '0; m_v[r+1] <= 1'b0;
      end else if (en) begin
        m_idx[r+1] <= m_idx[r];
        m_pix[r+1] <= m_pix[r];
        m_v[r+1]   <= m_v[r];
        m_sel[r+1] <= (m_idx[r][7:4] == 4'(r)) ? m_pix[r][{4'(r), m_idx[r][3:0]}] : m_sel[r];
      end
    end
  end

  // ---------------- latency padding ----------------
  logic v_d [PAD+1];
  pix_t p_d [PAD+1];
  assign v_d[0] = m_v[WIN];
  assign p_d[0] = m_sel[WIN];
  for (genvar i = 0; i < PAD; i++) begin : g_pad
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  begin v_d[i+1] <= 1'b0; p_d[i+1] <= '0; end
      else if (en) begin v_d[i+1] <= v_d[i]; p_d[i+1] <= p_d[i]; end
    end
  end
  assign out_valid = v_d[PAD];
  assign out_pix   = p_d[PAD];

endmodule
