// lsh_hasher: locality-sensitive hashing of an input vector in one XBar pass.
//
// Signature bit b of a vector x is h_b = (sign(r_b . (W x)) + 1) / 2: which
// side of random hyperplane r_b the projected key (or query) lies on. Instead
// of projecting first and hashing afterwards, the crossbar holds the product
// W R directly (SIG_BITS rows of IN_DIM weights), so the signature is ready
// after a single MVM that runs in parallel with the other projections. A dot
// product of exactly zero counts as the positive side (bit 1).
//
// Interface and timing: weights are written row by row through wr_row_*
// (same as xbar_mvm). start captures x; done pulses ADC_SHARE + IN_DIM/64 + 1
// cycles later and sig is valid from then until the next start.
// The folded W R crossbar and the sign rule follow the design; the handling
// of a zero dot product is this design's choice.
module lsh_hasher #(
  parameter int unsigned IN_DIM    = 512,
  parameter int unsigned SIG_BITS  = 1024,
  parameter int unsigned XB        = 64,
  parameter int unsigned DW        = 8,
  parameter int unsigned ADC_SHARE = 8,
  parameter int unsigned ACC_W     = 32,
  localparam int unsigned TI  = IN_DIM / XB,
  localparam int unsigned TIW = (TI > 1) ? $clog2(TI) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             wr_row_en,
  input  logic [$clog2(SIG_BITS)-1:0]      wr_row_idx,
  input  logic [TIW-1:0]                   wr_row_tile,
  input  logic signed [XB-1:0][DW-1:0]     wr_row_data,
  input  logic                             start,
  input  logic signed [IN_DIM-1:0][DW-1:0] x,
  output logic                             busy,
  output logic                             done,
  output logic [SIG_BITS-1:0]              sig
);
  localparam int unsigned TO  = SIG_BITS / XB;
  localparam int unsigned TOW = (TO > 1) ? $clog2(TO) : 1;

  logic signed [SIG_BITS-1:0][ACC_W-1:0] proj;

  xbar_mvm #(
    .IN_DIM(IN_DIM), .OUT_DIM(SIG_BITS), .XB(XB), .DW(DW),
    .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W)
  ) u_xbar (
    .clk, .rst_n,
    .wr_row_en, .wr_row_idx, .wr_row_tile, .wr_row_data,
    .wr_col_en  (1'b0),
    .wr_col_idx ('0),
    .wr_col_tile(TOW'(0)),
    .wr_col_data('0),
    .start, .x,
    .out_en     ({SIG_BITS{1'b1}}),
    .busy, .done,
    .y          (proj)
  );

  always_comb
    for (int b = 0; b < int'(SIG_BITS); b++) sig[b] = ~proj[b][ACC_W-1];

endmodule
