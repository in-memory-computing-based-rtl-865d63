// ffn_xbar: position-wise feedforward layer in two crossbar matrices.
//
// y = requant(W2 * relu(requant(W1 * x))), with W1 of D_FF x D_MODEL and W2
// of D_MODEL x D_FF, both built from 64x64 XBar tiles (xbar_mvm). The hidden
// vector is rectified and requantised to 8 bits before it drives the second
// crossbar; the output is requantised to 8 bits. Biases, the residual add and
// layer normalisation are left to the host.
//
// Interface and timing: weights are written with TGT_FF1 / TGT_FF2 writes on
// w. start (while busy is low) samples x; done pulses when y is valid,
// 2*ADC_SHARE + D_MODEL/64 + D_FF/64 + 4 cycles after the start cycle.
// Running the feedforward layer on crossbars follows the design; D_FF = 2048
// (the vanilla transformer's width), ReLU, and the requantisation shifts are
// this design's choices.
module ffn_xbar
  import imcat_pkg::*;
#(
  parameter int unsigned D_MODEL  = imcat_pkg::D_MODEL,
  parameter int unsigned D_FF     = imcat_pkg::D_FF,
  parameter int unsigned FF_SHIFT = 7
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  wwrite_t                           w,
  input  logic                              start,
  input  logic signed [D_MODEL-1:0][DW-1:0] x,
  output logic                              busy,
  output logic                              done,
  output logic signed [D_MODEL-1:0][DW-1:0] y
);
  localparam int unsigned T1  = D_MODEL / XB;
  localparam int unsigned T2  = D_FF / XB;
  localparam int unsigned T1W = (T1 > 1) ? $clog2(T1) : 1;
  localparam int unsigned T2W = (T2 > 1) ? $clog2(T2) : 1;

  logic go, d1, d2, start2;
  logic signed [D_FF-1:0][ACC_W-1:0] h_y;
  logic signed [D_FF-1:0][DW-1:0] h;
  logic signed [D_MODEL-1:0][ACC_W-1:0] o_y;

  assign go = start && !busy;

  xbar_mvm #(.IN_DIM(D_MODEL), .OUT_DIM(D_FF), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_w1 (
    .clk, .rst_n,
    .wr_row_en(w.en && w.tgt == TGT_FF1), .wr_row_idx(w.row[$clog2(D_FF)-1:0]),
    .wr_row_tile(w.tile[T1W-1:0]), .wr_row_data(w.data),
    .wr_col_en(1'b0), .wr_col_idx('0), .wr_col_tile('0), .wr_col_data('0),
    .start(go), .x, .out_en({D_FF{1'b1}}),
    .busy(), .done(d1), .y(h_y)
  );

  xbar_mvm #(.IN_DIM(D_FF), .OUT_DIM(D_MODEL), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_w2 (
    .clk, .rst_n,
    .wr_row_en(w.en && w.tgt == TGT_FF2), .wr_row_idx(w.row[$clog2(D_MODEL)-1:0]),
    .wr_row_tile(w.tile[T2W-1:0]), .wr_row_data(w.data),
    .wr_col_en(1'b0), .wr_col_idx('0), .wr_col_tile('0), .wr_col_data('0),
    .start(start2), .x(h), .out_en({D_MODEL{1'b1}}),
    .busy(), .done(d2), .y(o_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      start2 <= 1'b0;
      h      <= '0;
      y      <= '0;
    end else begin
      done   <= 1'b0;
      start2 <= 1'b0;
      if (go) busy <= 1'b1;
      if (d1) begin
        for (int i = 0; i < int'(D_FF); i++)
          h[i] <= h_y[i][ACC_W-1] ? '0 : requant(h_y[i], FF_SHIFT);
        start2 <= 1'b1;
      end
      if (d2) begin
        for (int i = 0; i < int'(D_MODEL); i++) y[i] <= requant(o_y[i], FF_SHIFT);
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
