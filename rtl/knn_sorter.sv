// knn_sorter: automatic sorting mechanism for K-nearest-neighbour ranking.
//
// K processing elements hold (distance, data) pairs in ascending distance
// order. A new pair on dis_in/data_in is broadcast to K comparators; each
// comparator i flags dis_in < dis_out[i]. PE i then
//   - takes its left neighbour's pair if comparator i-1 also fired (shift),
//   - takes the new pair if only comparator i fired (insertion point),
//   - keeps its pair otherwise.
// PE 1's left neighbour is the DEFAULT (empty) value. The pair that falls
// off PE K is dropped, so after any number of insertions the PEs hold the
// K smallest distances seen, sorted, with no separate sorting pass: the
// ranking can be read out at once on dis_out/data_out. Equal distances keep
// arrival order. clear empties all PEs (distance = all ones, data = 0);
// keep holds the contents (no insertion this cycle).
// Structure follows the published sorter; the empty value, the tie rule and
// the clear/keep priority are this design's choices.
module knn_sorter #(
  parameter int K  = 128,
  parameter int DW = 32,
  parameter int IW = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               keep,
  input  logic [DW-1:0]      dis_in,
  input  logic [IW-1:0]      data_in,
  output logic [DW-1:0]      dis_out  [K],
  output logic [IW-1:0]      data_out [K]
);
  localparam logic [DW-1:0] DEFAULT = '1;

  logic [K-1:0] lt;
  always_comb
    for (int i = 0; i < K; i++) lt[i] = dis_in < dis_out[i];

  for (genvar i = 0; i < K; i++) begin : g_pe
    logic left_lt;
    logic [DW-1:0] left_dis;
    logic [IW-1:0] left_data;
    if (i == 0) begin : g_first
      assign left_lt   = 1'b0;
      assign left_dis  = DEFAULT;
      assign left_data = '0;
    end else begin : g_rest
      assign left_lt   = lt[i-1];
      assign left_dis  = dis_out[i-1];
      assign left_data = data_out[i-1];
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dis_out[i]  <= DEFAULT;
        data_out[i] <= '0;
      end else if (clear) begin
        dis_out[i]  <= DEFAULT;
        data_out[i] <= '0;
      end else if (!keep) begin
        if (left_lt) begin
          dis_out[i]  <= left_dis;
          data_out[i] <= left_data;
        end else if (lt[i]) begin
          dis_out[i]  <= dis_in;
          data_out[i] <= data_in;
        end
      end
    end
  end

endmodule
