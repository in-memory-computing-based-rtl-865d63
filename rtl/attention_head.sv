// attention_head: one attention head with P duplicated query lanes.
//
// The head owns the key and value projections W^K, W^V (D_K x D_MODEL each)
// and the key hashing crossbar W^K R (SIG_BITS x D_MODEL). Loading time step
// t runs all three in parallel on the input x_t; the requantised key k_t,
// value v_t and signature are then written, in the same cycle, into the K
// cache, V cache and CAM of every lane. Each lane holds a full copy of the
// caches and of the query crossbars, so P queries are attended in parallel
// (bidirectional attention over n steps then takes about n/P query rounds);
// the price is P times the cache writes and storage.
//
// Uses of the same hardware:
//   bidirectional self-attention: load t = 0..n-1, then query all steps,
//     P at a time, unmasked;
//   masked (decoder) self-attention: per step t load x_t, then query x_t on
//     one lane with q_masked = 1 and q_limit = t;
//   encoder-decoder attention: load the encoder outputs once, then query with
//     the decoder inputs, unmasked.
// Any of them may switch LSH key selection on (q_lsh).
//
// Interface and timing:
//   w/w_lane/w_bcast: weight writes. TGT_WK, TGT_WV, TGT_WLK go to the head's
//     own crossbars; TGT_WQ, TGT_WLQ go to lane w_lane, or to all lanes when
//     w_bcast is set (the lanes hold identical copies).
//   ld_start (while ld_busy is low) samples ld_x and ld_idx; the caches are
//     written ADC_SHARE + D_MODEL/64 + 2 cycles after the start cycle and
//     ld_done pulses one cycle later.
//   q_start (while q_busy is low) starts every lane whose q_lane_en bit is
//     set; q_done pulses when the last of them has finished, with q_out and
//     q_keys valid per lane. Loads and queries must not overlap.
// The shared projections, the broadcast cache writes and the lane duplication
// follow the design; keeping W^K and W^V single (not duplicated) and using
// the CAM with every bit cared for are this design's choices.
module attention_head
  import imcat_pkg::*;
#(
  parameter int unsigned D_MODEL     = imcat_pkg::D_MODEL,
  parameter int unsigned D_K         = imcat_pkg::D_K,
  parameter int unsigned N_MAX       = imcat_pkg::N_MAX,
  parameter int unsigned SIG_BITS    = imcat_pkg::SIG_BITS,
  parameter int unsigned TOP_M       = imcat_pkg::TOP_M,
  parameter int unsigned P           = imcat_pkg::PAR,
  parameter int unsigned PROJ_SHIFT  = 7,
  parameter int unsigned LOGIT_SHIFT = 6,
  localparam int unsigned IW = $clog2(N_MAX),
  localparam int unsigned LW = (P > 1) ? $clog2(P) : 1
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  input  wwrite_t                                    w,
  input  logic [LW-1:0]                              w_lane,
  input  logic                                       w_bcast,
  // load a time step
  input  logic                                       ld_start,
  input  logic signed [D_MODEL-1:0][DW-1:0]          ld_x,
  input  logic [IW-1:0]                              ld_idx,
  output logic                                       ld_busy,
  output logic                                       ld_done,
  // queries
  input  logic                                       q_start,
  input  logic [P-1:0]                               q_lane_en,
  input  logic signed [P-1:0][D_MODEL-1:0][DW-1:0]   q_x,
  input  logic [P-1:0][IW-1:0]                       q_limit,
  input  logic [IW:0]                                q_n,
  input  logic                                       q_masked,
  input  logic                                       q_lsh,
  output logic                                       q_busy,
  output logic                                       q_done,
  output logic signed [P-1:0][D_K-1:0][DW-1:0]       q_out,
  output logic [P-1:0][IW:0]                         q_keys
);
  localparam int unsigned TI  = D_MODEL / XB;
  localparam int unsigned TIW = (TI > 1) ? $clog2(TI) : 1;

  // ---------------- key, value and key-signature projections
  logic ld_go, k_done, v_done, s_done;
  logic signed [D_K-1:0][ACC_W-1:0] k_y, v_y;
  logic [SIG_BITS-1:0] k_sig;

  assign ld_go = ld_start && !ld_busy;

  xbar_mvm #(.IN_DIM(D_MODEL), .OUT_DIM(D_K), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_wk (
    .clk, .rst_n,
    .wr_row_en(w.en && w.tgt == TGT_WK), .wr_row_idx(w.row[$clog2(D_K)-1:0]),
    .wr_row_tile(w.tile[TIW-1:0]), .wr_row_data(w.data),
    .wr_col_en(1'b0), .wr_col_idx('0), .wr_col_tile(1'b0), .wr_col_data('0),
    .start(ld_go), .x(ld_x), .out_en({D_K{1'b1}}),
    .busy(), .done(k_done), .y(k_y)
  );

  xbar_mvm #(.IN_DIM(D_MODEL), .OUT_DIM(D_K), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_wv (
    .clk, .rst_n,
    .wr_row_en(w.en && w.tgt == TGT_WV), .wr_row_idx(w.row[$clog2(D_K)-1:0]),
    .wr_row_tile(w.tile[TIW-1:0]), .wr_row_data(w.data),
    .wr_col_en(1'b0), .wr_col_idx('0), .wr_col_tile(1'b0), .wr_col_data('0),
    .start(ld_go), .x(ld_x), .out_en({D_K{1'b1}}),
    .busy(), .done(v_done), .y(v_y)
  );

  lsh_hasher #(.IN_DIM(D_MODEL), .SIG_BITS(SIG_BITS), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_wlk (
    .clk, .rst_n,
    .wr_row_en(w.en && w.tgt == TGT_WLK), .wr_row_idx(w.row[$clog2(SIG_BITS)-1:0]),
    .wr_row_tile(w.tile[TIW-1:0]), .wr_row_data(w.data),
    .start(ld_go), .x(ld_x),
    .busy(), .done(s_done), .sig(k_sig)
  );

  // The three crossbars have the same shape and run in lock step.
  logic c_en;
  logic [IW-1:0] c_idx;
  logic signed [D_K-1:0][DW-1:0] c_k, c_v;
  logic [SIG_BITS-1:0] c_sig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_busy <= 1'b0;
      ld_done <= 1'b0;
      c_en    <= 1'b0;
      c_idx   <= '0;
      c_k     <= '0;
      c_v     <= '0;
      c_sig   <= '0;
    end else begin
      c_en    <= 1'b0;
      ld_done <= c_en;
      if (ld_go) begin
        ld_busy <= 1'b1;
        c_idx   <= ld_idx;
      end
      if (k_done) begin
        for (int d = 0; d < int'(D_K); d++) begin
          c_k[d] <= requant(k_y[d], PROJ_SHIFT);
          c_v[d] <= requant(v_y[d], PROJ_SHIFT);
        end
        c_sig <= k_sig;
        c_en  <= 1'b1;
      end
      if (c_en) ld_busy <= 1'b0;
    end
  end

  // ---------------- duplicated query lanes
  logic [P-1:0] lane_busy, lane_done, pending;
  logic q_go;

  assign q_go = q_start && !q_busy;

  for (genvar l = 0; l < P; l++) begin : g_lane
    wwrite_t lw;
    always_comb begin
      lw = w;
      lw.en = w.en && (w.tgt == TGT_WQ || w.tgt == TGT_WLQ) && (w_bcast || int'(w_lane) == l);
    end
    attention_lane #(
      .D_MODEL(D_MODEL), .D_K(D_K), .N_MAX(N_MAX), .SIG_BITS(SIG_BITS), .TOP_M(TOP_M),
      .PROJ_SHIFT(PROJ_SHIFT), .LOGIT_SHIFT(LOGIT_SHIFT)
    ) u_lane (
      .clk, .rst_n,
      .w(lw),
      .c_en, .c_idx, .c_k, .c_v, .c_sig, .c_care({SIG_BITS{1'b1}}),
      .q_start (q_go && q_lane_en[l]),
      .q_x     (q_x[l]),
      .q_n, .q_limit(q_limit[l]), .q_masked, .q_lsh,
      .busy    (lane_busy[l]),
      .q_done  (lane_done[l]),
      .q_out   (q_out[l]),
      .q_keys  (q_keys[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_busy  <= 1'b0;
      q_done  <= 1'b0;
      pending <= '0;
    end else begin
      q_done <= 1'b0;
      if (q_go) begin
        q_busy  <= 1'b1;
        pending <= q_lane_en;
        if (q_lane_en == '0) begin
          q_busy <= 1'b0;
          q_done <= 1'b1;
        end
      end else if (q_busy) begin
        pending <= pending & ~lane_done;
        if ((pending & ~lane_done) == '0) begin
          q_busy <= 1'b0;
          q_done <= 1'b1;
        end
      end
    end
  end

endmodule
