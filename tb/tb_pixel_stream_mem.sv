// tb_pixel_stream_mem: self-checking test of the 16x16 window register.
// Shifts in random columns (with idle cycles in between) and checks the
// whole window against the last 16 columns kept by the testbench.
module tb_pixel_stream_mem;
  import mlsoc_pkg::*;
  logic clk = 0, rst_n = 0, shift = 0;
  always #5 clk = ~clk;
  pix_t [WIN-1:0] col_in;
  pix_t [WIN-1:0][WIN-1:0] win;
  pix_t [WIN-1:0] hist [$];
  int checks = 0, failures = 0;

  pixel_stream_mem dut (.clk, .rst_n, .shift, .col_in, .win);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    col_in = '0;
    for (int i = 0; i < WIN; i++) hist.push_back('0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      shift = $urandom_range(0, 3) != 0;
      for (int r = 0; r < WIN; r++) col_in[r] = 8'($urandom);
      @(posedge clk); #1;
      if (shift) begin hist.push_back(col_in); void'(hist.pop_front()); end
      for (int r = 0; r < WIN; r++)
        for (int c = 0; c < WIN; c++) begin
          checks++;
          if (win[r][c] !== hist[c][r]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
