// mlsoc_dsp: the dual stream processor (DSP) of the machine learning SoC.
//
// Two stream processors share a 64 KB high-bandwidth dual memory (HBDM)
// over a 256-bit local media bus (LMB), so image and feature data move
// between them without crossing the system AHB:
//  - the image stream processor (ISP) runs 16x16-window filters, linear
//    (convolution, variance) and rank-order (median, dilation, erosion),
//    reading 16 pixels and producing one pixel per cycle;
//  - the feature stream processor (FSP) runs K-NN ranking and
//    bandwidth-adaptive K-means on vectors read 128 bits per cycle;
//  - the control unit runs a program from its instruction memory, hands
//    the two HBDM memories to the processors and copies between them.
// The host side of the LMB-AHB interface is brought out as plain ports:
// instruction memory writes, linear HBDM reads/writes while idle, and
// start/busy/done. The RISC, AHB buses, DMA and external memory sit
// outside this module. lmb_conflict flags a request from a master that
// does not own the memory (should never happen).
module mlsoc_dsp
  import mlsoc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 host_imem_we,
  input  logic [IMEM_AW-1:0]   host_imem_addr,
  input  instr_t               host_imem_wdata,
  input  logic                 host_mem_en,
  input  logic                 host_mem_we,
  input  logic                 host_mem_sel,
  input  logic [AW-1:0]        host_mem_addr,
  input  mem_word_t            host_mem_wdata,
  output mem_word_t            host_mem_rdata,
  input  logic                 start,
  input  logic [IMEM_AW-1:0]   start_pc,
  output logic                 busy,
  output logic                 done,
  output logic [31:0]          cycles,
  output logic                 isp_busy,
  output logic                 fsp_busy,
  output logic [1:0]           lmb_conflict
);

  instr_t          cur_instr;
  logic            isp_start, isp_done, fsp_start, fsp_done;
  owner_e   [1:0]  owner;
  mem_req_t [2:0][1:0] mreq;
  mem_req_t [1:0]  sreq;
  mem_word_t [1:0] rdata;

  dsp_ctrl u_ctrl (
    .clk, .rst_n,
    .host_imem_we, .host_imem_addr, .host_imem_wdata,
    .host_mem_en, .host_mem_we, .host_mem_sel, .host_mem_addr, .host_mem_wdata, .host_mem_rdata,
    .start, .start_pc, .busy, .done, .cycles,
    .cur_instr, .isp_start, .isp_done, .fsp_start, .fsp_done,
    .owner, .mem_req(mreq[OWN_CTRL]), .mem_rdata(rdata));

  isp u_isp (
    .clk, .rst_n, .start(isp_start), .instr(cur_instr), .busy(isp_busy), .done(isp_done),
    .mem_req(mreq[OWN_ISP]), .mem_rdata(rdata));

  fsp u_fsp (
    .clk, .rst_n, .start(fsp_start), .instr(cur_instr), .busy(fsp_busy), .done(fsp_done),
    .mem_req(mreq[OWN_FSP]), .mem_rdata(rdata));

  lmb u_lmb (.mreq, .owner, .sreq, .conflict(lmb_conflict));

  hbdm u_hbdm (.clk, .req(sreq), .rdata);

endmodule
