// tb_knn_sorter: self-checking test of the automatic K-NN sorter (K = 128).
// Inserts random (distance, tag) pairs with random keep cycles, including
// many equal distances, keeps a sorted reference list (stable for ties,
// truncated to K) and compares all K PEs every cycle; also checks clear.
module tb_knn_sorter;
  localparam int K = 128, DW = 32, IW = 16;
  logic clk = 0, rst_n = 0, clear = 0, keep = 1;
  always #5 clk = ~clk;
  logic [DW-1:0] dis_in;
  logic [IW-1:0] data_in;
  logic [DW-1:0] dis_out [K];
  logic [IW-1:0] data_out [K];
  longint ref_d [$];
  int     ref_t [$];
  int checks = 0, failures = 0, drops = 0;

  knn_sorter #(.K(K), .DW(DW), .IW(IW)) dut (.clk, .rst_n, .clear, .keep, .dis_in, .data_in,
    .dis_out, .data_out);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic compare();
    for (int i = 0; i < K; i++) begin
      checks++;
      if (i < ref_d.size()) begin
        if (dis_out[i] !== DW'(ref_d[i]) || data_out[i] !== IW'(ref_t[i])) failures++;
      end else if (dis_out[i] !== '1) failures++;
    end
  endtask

  initial begin
    dis_in = '0; data_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      @(negedge clk); clear = 1; keep = 1;
      @(negedge clk); clear = 0;
      ref_d.delete(); ref_t.delete();
      compare();
      for (int t = 0; t < 600; t++) begin
        @(negedge clk);
        keep    = $urandom_range(0, 4) == 0;
        dis_in  = (round == 0) ? DW'($urandom_range(0, 50)) : DW'($urandom);
        data_in = IW'(t);
        @(posedge clk); #1;
        if (!keep) begin
          int p;
          p = 0;
          while (p < ref_d.size() && ref_d[p] <= longint'(dis_in)) p++;
          ref_d.insert(p, longint'(dis_in)); ref_t.insert(p, int'(data_in));
          if (ref_d.size() > K) begin void'(ref_d.pop_back()); void'(ref_t.pop_back()); drops++; end
        end
        compare();
      end
    end
    checks++;
    if (drops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
