// pipe_div: high-throughput unsigned divider, one division per cycle.
//
// Restoring division of an NW-bit numerator by a DW-bit divisor, producing
// two quotient bits per pipeline stage, so a new division can start every
// cycle and the quotient appears NW/2 cycles later. A sideband word (SBW
// bits) travels alongside each division. Division by zero returns all ones.
// The published design specifies one division per cycle; the radix-2, two bits per
// stage structure is this design's choice.
module pipe_div #(
  parameter int NW  = 32,
  parameter int DW  = 17,
  parameter int SBW = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  logic [NW-1:0]    num,
  input  logic [DW-1:0]    den,
  input  logic [SBW-1:0]   sb_in,
  output logic             out_valid,
  output logic [NW-1:0]    quo,
  output logic [SBW-1:0]   sb_out
);
  localparam int S = NW / 2;

  logic [NW-1:0]  n_q  [S+1];   // numerator bits still to consume / quotient bits
  logic [DW:0]    r_q  [S+1];   // partial remainder
  logic [DW-1:0]  d_q  [S+1];
  logic [SBW-1:0] sb_q [S+1];
  logic           v_q  [S+1];

  assign n_q[0]  = num;
  assign r_q[0]  = '0;
  assign d_q[0]  = den;
  assign sb_q[0] = sb_in;
  assign v_q[0]  = in_valid;

  for (genvar s = 0; s < S; s++) begin : g_stage
    logic [NW-1:0] n_nx;
    logic [DW:0]   r_nx;
    always_comb begin
      logic [DW+1:0] t;
      n_nx = n_q[s];
      r_nx = r_q[s];
      for (int k = 0; k < 2; k++) begin
        t    = {r_nx, n_nx[NW-1]};
        n_nx = {n_nx[NW-2:0], 1'b0};
        if (t >= {2'b00, d_q[s]}) begin
          t       = t - {2'b00, d_q[s]};
          n_nx[0] = 1'b1;
        end
        r_nx = t[DW:0];
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        n_q[s+1] <= '0; r_q[s+1] <= '0; d_q[s+1] <= '0; sb_q[s+1] <= '0; v_q[s+1] <= 1'b0;
      end else if (en) begin
        n_q[s+1] <= n_nx; r_q[s+1] <= r_nx; d_q[s+1] <= d_q[s];
        sb_q[s+1] <= sb_q[s]; v_q[s+1] <= v_q[s];
      end
    end
  end

  assign quo       = n_q[S];
  assign sb_out    = sb_q[S];
  assign out_valid = v_q[S];

endmodule
