// tb_isp_input_if: self-checking test of the ISP input interface.
// Stores a random W x H image in an HBDM memory in the 16-row slice layout,
// then requests random window columns (y, x) and checks that the returned
// column holds image rows y..y+15 of column x, in order, one cycle later.
module tb_isp_input_if;
  import mlsoc_pkg::*;
  localparam int W = 40, H = 64, BASE = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_valid;
  logic [8:0] y, x;
  mem_req_t req_if;
  mem_req_t [1:0] req;
  mem_word_t [1:0] rdata;
  logic col_valid;
  pix_t [WIN-1:0] col_out;
  pix_t img [H][W];
  int checks = 0, failures = 0;
  logic loading;
  mem_req_t ld;

  hbdm mem (.clk, .req, .rdata);
  isp_input_if dut (.clk, .rst_n, .rd_valid, .y, .x, .base(AW'(BASE)), .width(9'(W)),
                    .mem_req(req_if), .mem_rdata(rdata[0]), .col_valid, .col_out);
  assign req[0] = loading ? ld : req_if;
  assign req[1] = '0;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    loading = 1; ld = '0; rd_valid = 0; y = '0; x = '0;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 8'($urandom);
    // slice layout: row r -> bank r%16, address BASE + (r/16)*W + c
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        ld = '0; ld.en = 1; ld.we = 1;
        ld.be[r % 16] = 1'b1;
        ld.addr[r % 16] = AW'(BASE + (r / 16) * W + c);
        ld.wdata[r % 16] = img[r][c];
      end
    @(negedge clk); loading = 0; rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int ty, tx;
      @(negedge clk);
      ty = $urandom_range(0, H - 16); tx = $urandom_range(0, W - 1);
      rd_valid = 1; y = 9'(ty); x = 9'(tx);
      @(negedge clk);
      rd_valid = 0;
      checks++;
      if (!col_valid) failures++;
      for (int r = 0; r < WIN; r++) begin
        checks++;
        if (col_out[r] !== img[ty + r][tx]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
