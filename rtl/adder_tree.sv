// adder_tree: pipelined signed adder tree (the "tree ALU" of the linear
// processor and the adder trees of the FSP).
//
// N inputs of IW bits (sign-extended) are summed pairwise in log2(N)
// layers, with a register after every layer, so the sum appears log2(N)
// cycles after the inputs. en freezes the whole pipeline (inactive
// processor). N must be a power of two. A register per layer is this
// design's choice; the published design shows registers inside the tree but not
// how many.
module adder_tree #(
  parameter int N  = 256,
  parameter int IW = 16,
  parameter int OW = 24
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [IW-1:0]  din [N],
  output logic signed [OW-1:0]  sum
);
  localparam int L = $clog2(N);

  logic signed [OW-1:0] lvl [L+1][N];

  always_comb
    for (int i = 0; i < N; i++) lvl[0][i] = OW'(din[i]);

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar i = 0; i < (N >> l); i++) begin : g_add
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)  lvl[l][i] <= '0;
        else if (en) lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
      end
    end
    for (genvar i = (N >> l); i < N; i++) begin : g_unused
      assign lvl[l][i] = '0;
    end
  end

  assign sum = lvl[L][0];

endmodule
