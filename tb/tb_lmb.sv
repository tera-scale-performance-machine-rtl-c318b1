// tb_lmb: self-checking test of the local media bus routing.
// Drives random requests from the three masters and random ownership and
// checks that each memory receives exactly its owner's request and that a
// request from a non-owner raises the conflict flag.
module tb_lmb;
  import mlsoc_pkg::*;
  mem_req_t [2:0][1:0] mreq;
  owner_e   [1:0]      owner;
  mem_req_t [1:0]      sreq;
  logic     [1:0]      conflict;
  int checks = 0, failures = 0;

  lmb dut (.mreq, .owner, .sreq, .conflict);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int s = 0; s < 3; s++)
        for (int m = 0; m < 2; m++) begin
          for (int w = 0; w < $bits(mem_req_t); w += 32) mreq[s][m][w +: 32] = $urandom;
          if ($urandom_range(0, 1)) mreq[s][m].en = 1'b0;
        end
      owner[0] = owner_e'($urandom_range(0, 2));
      owner[1] = owner_e'($urandom_range(0, 2));
      #1;
      for (int m = 0; m < 2; m++) begin
        logic exp_c;
        exp_c = 0;
        for (int s = 0; s < 3; s++) if (s != int'(owner[m]) && mreq[s][m].en) exp_c = 1;
        checks++;
        if (sreq[m] !== mreq[owner[m]][m]) failures++;
        checks++;
        if (conflict[m] !== exp_c) failures++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
