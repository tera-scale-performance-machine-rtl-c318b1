// tb_kernel_stream_mem: self-checking test of the kernel stream memory.
// Loads random rows (including zero bytes) in random order and checks the
// stored kernel and the derived non-zero mask.
module tb_kernel_stream_mem;
  import mlsoc_pkg::*;
  logic clk = 0, rst_n = 0, row_we = 0;
  always #5 clk = ~clk;
  logic [3:0] row_sel;
  logic [WIN-1:0][PIX_W-1:0] row_in;
  logic [WIN-1:0][WIN-1:0][PIX_W-1:0] kern, model;
  logic [WIN-1:0][WIN-1:0] mask;
  int checks = 0, failures = 0;

  kernel_stream_mem dut (.clk, .rst_n, .row_we, .row_sel, .row_in, .kern, .mask);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    model = '0; row_sel = '0; row_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      row_we  = $urandom_range(0, 1);
      row_sel = 4'($urandom);
      for (int c = 0; c < WIN; c++) row_in[c] = $urandom_range(0, 2) == 0 ? 8'd0 : 8'($urandom);
      @(posedge clk); #1;
      if (row_we) model[row_sel] = row_in;
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          checks += 2;
          if (kern[r][c] !== model[r][c]) failures++;
          if (mask[r][c] !== (model[r][c] != 0)) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
