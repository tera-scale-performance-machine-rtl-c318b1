// mlsoc_pkg: types and constants shared by the dual stream processor (DSP).
//
// The DSP keeps image and feature data in the high-bandwidth dual memory
// (HBDM): two memories, each of 16 byte-wide banks of 2048 entries. Every
// master on the local media bus (LMB) talks to one memory through a
// mem_req_t request and gets a 16-byte mem_word_t back one cycle later.
// Each bank has its own address, which is what lets the image stream
// processor read one column of a 16x16 window in a single cycle.
//
// The bank count, bank depth and pixel width follow the published design. The
// instruction word (instr_t) is this design's own: the published design says the
// control unit decodes instructions but does not give their format.
package mlsoc_pkg;

  localparam int NBANK      = 16;    // banks per memory
  localparam int BANK_DEPTH = 2048;  // bytes per bank
  localparam int AW         = 11;    // bank address width
  localparam int PIX_W      = 8;     // pixel / feature component width
  localparam int WIN        = 16;    // ISP window edge (16x16 pixels)
  localparam int NPIX       = WIN * WIN;
  localparam int IMEM_DEPTH = 64;    // instruction memory entries
  localparam int IMEM_AW    = 6;

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [NBANK-1:0][PIX_W-1:0] mem_word_t;   // one 128-bit HBDM word

  // Request of one LMB master to one HBDM memory. Reads return data on the
  // next cycle. Writes use the byte (bank) enables.
  typedef struct packed {
    logic                       en;
    logic                       we;
    logic [NBANK-1:0]           be;
    logic [NBANK-1:0][AW-1:0]   addr;
    mem_word_t                  wdata;
  } mem_req_t;

  localparam mem_req_t MEM_IDLE = '0;

  // LMB masters
  typedef enum logic [1:0] {OWN_CTRL = 2'd0, OWN_ISP = 2'd1, OWN_FSP = 2'd2} owner_e;

  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_HALT   = 4'd1,
    OP_COPY   = 4'd2,   // copy words from one HBDM memory to the other
    OP_KLOAD  = 4'd3,   // load the ISP kernel stream memory
    OP_LINEAR = 4'd4,   // ISP linear processor pass over an image
    OP_ORDER  = 4'd5,   // ISP order processor pass over an image
    OP_KNN    = 4'd6,   // FSP supervised processor: K-NN ranking
    OP_KMEANS = 4'd7    // FSP unsupervised processor: K-means clustering
  } opcode_e;

  // Linear processor operations (instr_t.sub for OP_LINEAR)
  typedef enum logic [2:0] {
    LIN_CONV = 3'd0,    // sum(p*k)/divisor + offset, clamped
    LIN_ABS  = 3'd1,    // |sum(p*k)/divisor| + offset, clamped (edge detection)
    LIN_MEAN = 3'd2,    // sum(p)/n over the kernel mask
    LIN_VAR  = 3'd3     // (n*sum(p^2) - sum(p)^2)/n^2 over the kernel mask
  } linop_e;

  // 128-bit DSP instruction.
  //  src/dst : HBDM memory read / written
  //  sub     : linear op (OP_LINEAR), log2 of vector dimension (OP_KMEANS),
  //            folds-1 of 16 dimensions (OP_KNN)
  //  a0      : source base (image, kernel, query, centroids, copy source)
  //  a1      : destination base (image result, copy destination) or
  //            training / feature vector base (OP_KNN, OP_KMEANS)
  //  a2      : result base (OP_KNN, OP_KMEANS)
  //  rank    : rank (OP_ORDER, 1 = largest), results to write (OP_KNN),
  //            number of clusters (OP_KMEANS)
  //  count   : words to copy (OP_COPY), training vectors (OP_KNN),
  //            feature words (OP_KMEANS)
  typedef struct packed {
    opcode_e            op;       // 4
    logic               src;      // 1
    logic               dst;      // 1
    logic [2:0]         sub;      // 3
    logic               euclid;   // 1
    logic [AW-1:0]      a0;       // 11
    logic [AW-1:0]      a1;       // 11
    logic [AW-1:0]      a2;       // 11
    logic [8:0]         width;    // 9
    logic [8:0]         height;   // 9
    logic [4:0]         ksize;    // 5
    logic [8:0]         rank;     // 9
    logic [15:0]        divisor;  // 16
    logic signed [8:0]  offset;   // 9
    logic [15:0]        count;    // 16
    logic [5:0]         iters;    // 6
    logic [5:0]         spare;    // 6
  } instr_t;

endpackage
