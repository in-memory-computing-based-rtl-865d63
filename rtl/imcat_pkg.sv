// imcat_pkg: constants and types shared by the in-memory attention accelerator.
//
// The accelerator maps transformer multi-head attention onto 64x64 SRAM
// crossbars (XBars) holding 8-bit weights, and onto a ternary CAM that
// compares locality-sensitive-hashing (LSH) signatures. The numbers here are
// the defaults of the design: a 512-wide model with 8 heads of 64 dimensions
// (the vanilla transformer), 64x64 XBars with one ADC per 8 lines, 8-bit
// operands, 1024-bit LSH signatures, 16 nearest keys kept per query, a
// sequence capacity of 4096 and 6 duplicated attention lanes per head.
// The feedforward width (2048) is the vanilla transformer's and the
// accumulator width (32 bits) is a choice of this design.
package imcat_pkg;

  parameter int unsigned XB        = 64;    // XBar tile size (rows and columns)
  parameter int unsigned DW        = 8;     // operand width (weights, activations)
  parameter int unsigned ADC_SHARE = 8;     // XBar lines converted by one ADC
  parameter int unsigned ACC_W     = 32;    // digital accumulator width
  parameter int unsigned D_MODEL   = 512;   // model width d
  parameter int unsigned N_HEADS   = 8;     // heads h
  parameter int unsigned D_K       = 64;    // head width d/h
  parameter int unsigned N_MAX     = 4096;  // sequence capacity of the K/V caches
  parameter int unsigned SIG_BITS  = 1024;  // LSH signature length
  parameter int unsigned TOP_M     = 16;    // keys attended to after the LSH search
  parameter int unsigned PAR       = 6;     // duplicated attention lanes per head
  parameter int unsigned D_FF      = 2048;  // feedforward hidden width

  typedef logic signed [DW-1:0]    data_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Which static-weight XBar a programming write goes to.
  typedef enum logic [2:0] {
    TGT_WQ   = 3'd0,  // query projection W^Q (per lane copy)
    TGT_WK   = 3'd1,  // key projection W^K
    TGT_WV   = 3'd2,  // value projection W^V
    TGT_WLQ  = 3'd3,  // query hashing W^Q R (per lane copy)
    TGT_WLK  = 3'd4,  // key hashing W^K R
    TGT_WMHA = 3'd5,  // output projection W^MHA
    TGT_FF1  = 3'd6,  // feedforward first layer
    TGT_FF2  = 3'd7   // feedforward second layer
  } wtarget_e;

  parameter int unsigned WROW_W  = 12;    // row index of a weight write
  parameter int unsigned WTILE_W = 6;     // input-tile index of a weight write

  // One row-of-a-tile weight write: XB weights of output row `row`, input
  // tile `tile`, of the crossbar selected by `tgt`.
  typedef struct packed {
    logic                       en;
    wtarget_e                   tgt;
    logic [WROW_W-1:0]          row;
    logic [WTILE_W-1:0]         tile;
    logic [XB-1:0][DW-1:0]      data;
  } wwrite_t;

  // Requantise an accumulator to an 8-bit operand: arithmetic shift right,
  // round half up, saturate.
  function automatic data_t requant(acc_t v, int unsigned sh);
    acc_t r;
    r = (sh == 0) ? v : ((v + (acc_t'(1) <<< (sh - 1))) >>> sh);
    if (r > acc_t'(127))       return data_t'(127);
    else if (r < acc_t'(-128)) return data_t'(-128);
    else                       return data_t'(r);
  endfunction

endpackage
