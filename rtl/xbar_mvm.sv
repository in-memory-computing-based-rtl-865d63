// xbar_mvm: an OUT_DIM x IN_DIM matrix built from 64x64 XBar tiles.
//
// Every static-weight matrix of the accelerator (W^Q, W^K, W^V, the LSH
// hashing matrices, W^MHA, the feedforward layers) and both attention caches
// (K: one row per time step, V: one column per time step) are instances of
// this block. The matrix is cut into TO = OUT_DIM/64 rows of tiles and
// TI = IN_DIM/64 columns of tiles. All tiles multiply in parallel; the TI
// partial sums of each output are then added one input tile per cycle, so a
// wider input (for example a V cache holding more time steps) costs one extra
// cycle per 64 inputs.
//
// Interface and timing:
//   wr_row_*: write output row wr_row_idx of input tile wr_row_tile
//             (64 weights) - used for static weights and for K-cache rows k_t.
//   wr_col_*: write input column wr_col_idx of output tile wr_col_tile
//             (64 weights) - used for V-cache columns v_t.
//   start (ignored while busy): x and out_en are captured; done pulses
//   ADC_SHARE + TI + 1 cycles after the start cycle, with y valid from then
//   until the next start. Rows whose out_en bit is low are switched off and
//   read as zero.
// The tiling and the partial-sum addition follow the design; adding the
// partial sums serially, one tile per cycle, is this design's choice.
module xbar_mvm #(
  parameter int unsigned IN_DIM    = 512,
  parameter int unsigned OUT_DIM   = 64,
  parameter int unsigned XB        = 64,
  parameter int unsigned DW        = 8,
  parameter int unsigned ADC_SHARE = 8,
  parameter int unsigned ACC_W     = 32,
  localparam int unsigned TI  = IN_DIM / XB,
  localparam int unsigned TO  = OUT_DIM / XB,
  localparam int unsigned TIW = (TI > 1) ? $clog2(TI) : 1,
  localparam int unsigned TOW = (TO > 1) ? $clog2(TO) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              wr_row_en,
  input  logic [$clog2(OUT_DIM)-1:0]        wr_row_idx,
  input  logic [TIW-1:0]                    wr_row_tile,
  input  logic signed [XB-1:0][DW-1:0]      wr_row_data,
  input  logic                              wr_col_en,
  input  logic [$clog2(IN_DIM)-1:0]         wr_col_idx,
  input  logic [TOW-1:0]                    wr_col_tile,
  input  logic signed [XB-1:0][DW-1:0]      wr_col_data,
  input  logic                              start,
  input  logic signed [IN_DIM-1:0][DW-1:0]  x,
  input  logic [OUT_DIM-1:0]                out_en,
  output logic                              busy,
  output logic                              done,
  output logic signed [OUT_DIM-1:0][ACC_W-1:0] y
);
  localparam int unsigned XBW = $clog2(XB);

  logic signed [XB-1:0][ACC_W-1:0] part [TO][TI];
  logic [TO-1:0][TI-1:0] tdone;
  logic tile_start;
  logic accumulating;
  logic [TIW-1:0] ti;

  initial begin
    assert (IN_DIM % XB == 0 && OUT_DIM % XB == 0)
      else $error("matrix sizes must be multiples of the tile size");
  end

  assign tile_start = start && !busy;

  for (genvar o = 0; o < TO; o++) begin : g_to
    for (genvar i = 0; i < TI; i++) begin : g_ti
      logic row_hit, col_hit;
      assign row_hit = wr_row_en && (int'(wr_row_idx) / XB == o) && (int'(wr_row_tile) == i);
      assign col_hit = wr_col_en && (int'(wr_col_idx) / XB == i) && (int'(wr_col_tile) == o);
      xbar_tile #(
        .LINES(XB), .INS(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W)
      ) u_tile (
        .clk, .rst_n,
        .wr_row_en  (row_hit),
        .wr_row_idx (wr_row_idx[XBW-1:0]),
        .wr_row_data(wr_row_data),
        .wr_col_en  (col_hit),
        .wr_col_idx (wr_col_idx[XBW-1:0]),
        .wr_col_data(wr_col_data),
        .start      (tile_start),
        .x          (x[i*XB +: XB]),
        .line_en    (out_en[o*XB +: XB]),
        .busy       (),
        .done       (tdone[o][i]),
        .y          (part[o][i])
      );
    end
  end

  // All tiles run in lock step, so tile (0,0) stands for all of them.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      accumulating <= 1'b0;
      ti <= '0;
      y <= '0;
    end else begin
      done <= 1'b0;
      if (tile_start) busy <= 1'b1;
      if (tdone[0][0]) begin
        for (int o = 0; o < int'(TO); o++) y[o*XB +: XB] <= part[o][0];
        if (TI == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          accumulating <= 1'b1;
          ti <= TIW'(1);
        end
      end else if (accumulating) begin
        for (int o = 0; o < int'(TO); o++)
          for (int l = 0; l < int'(XB); l++)
            y[o*XB + l] <= y[o*XB + l] + part[o][ti][l];
        if (int'(ti) == TI - 1) begin
          accumulating <= 1'b0;
          busy <= 1'b0;
          done <= 1'b1;
        end
        ti <= ti + 1'b1;
      end
    end
  end

endmodule
