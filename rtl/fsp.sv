// fsp: feature stream processor.
//
// Holds the supervised learning processor (knn_proc, K-NN ranking) and the
// unsupervised learning processor (kmeans_proc, bandwidth-adaptive
// K-means), each behind its own LMB interface to the HBDM. start with an
// OP_KNN or OP_KMEANS instruction starts the matching processor; any other
// opcode completes at once. The two LMB interfaces are merged here: only
// the started processor issues requests, and read data is shared.
// busy is high while a processor runs; done pulses when it finishes.
module fsp
  import mlsoc_pkg::*;
#(
  parameter int KNN_K = 128,
  parameter int KM_KC = 16
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
  logic knn_busy, knn_done, km_busy, km_done, bad_done;
  mem_req_t [1:0] knn_req, km_req;

  knn_proc #(.K(KNN_K)) u_sup (
    .clk, .rst_n, .start(start && instr.op == OP_KNN), .instr,
    .busy(knn_busy), .done(knn_done), .mem_req(knn_req), .mem_rdata);

  kmeans_proc #(.KC(KM_KC)) u_unsup (
    .clk, .rst_n, .start(start && instr.op == OP_KMEANS), .instr,
    .busy(km_busy), .done(km_done), .mem_req(km_req), .mem_rdata);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bad_done <= 1'b0;
    else        bad_done <= start && instr.op != OP_KNN && instr.op != OP_KMEANS;
  end

  assign busy = knn_busy || km_busy;
  assign done = knn_done || km_done || bad_done;

  always_comb
    for (int m = 0; m < 2; m++) mem_req[m] = knn_busy ? knn_req[m] : km_req[m];

  a_one_active: assert property (@(posedge clk) disable iff (!rst_n) !(knn_busy && km_busy));

endmodule
