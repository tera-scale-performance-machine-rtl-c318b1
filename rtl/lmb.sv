// lmb: the 256-bit local media bus of the dual stream processor.
//
// The bus joins the two 128-bit HBDM memories (256 bits together) to three
// masters: the control unit (which also carries host transfers from the
// LMB-AHB interface), the image stream processor and the feature stream
// processor. The control unit assigns an owner to each memory; the owner's
// request reaches that memory, all other requests to it are dropped. Read
// data of both memories is broadcast to all masters, so a processor can read
// one memory and write the other in the same cycle, which is how ISP and FSP
// stream data without touching the AHB.
//
// Interface: mreq[master][memory] requests, owner[memory] selection,
// sreq[memory] to the HBDM. Purely combinational. The ownership scheme is
// this design's choice; the published design only says that both processors reach
// the HBDM through the LMB.
module lmb
  import mlsoc_pkg::*;
(
  input  mem_req_t [2:0][1:0] mreq,
  input  owner_e   [1:0]      owner,
  output mem_req_t [1:0]      sreq,
  output logic     [1:0]      conflict   // a non-owner requested a memory
);

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      sreq[m]     = MEM_IDLE;
      conflict[m] = 1'b0;
      for (int s = 0; s < 3; s++) begin
        if (owner[m] == owner_e'(s)) sreq[m] = mreq[s][m];
        else if (mreq[s][m].en)      conflict[m] = 1'b1;
      end
    end
  end

endmodule
