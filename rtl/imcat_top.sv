// imcat_top: in-memory multi-head attention and feedforward accelerator.
//
// N_HEADS attention heads (attention_head) receive the same input vectors.
// Each head projects keys and values into its crossbar caches and attends P
// queries in parallel on duplicated lanes. When every head has finished a
// query round, the head outputs of each active lane are concatenated into a
// D_MODEL vector and multiplied by the output projection W^MHA (D_MODEL x
// D_MODEL crossbar). The lanes share the single W^MHA crossbar and are
// projected one after another, each result leaving on the y_* stream. The
// feedforward layer (ffn_xbar) sits beside the attention block; layer
// normalisation and residual additions are left to the host, which moves
// data between the two.
//
// Interface and timing:
//   w + w_head/w_lane/w_bcast: one weight write per cycle. TGT_WQ..TGT_WLK go
//     to head w_head (lane w_lane, or all lanes with w_bcast); TGT_WMHA to
//     the output projection; TGT_FF1/TGT_FF2 to the feedforward layer.
//   ld_start/ld_x/ld_idx: cache time step ld_idx in every head; ld_done
//     pulses when all caches hold it.
//   q_start/q_lane_en/q_x/q_limit/q_n/q_masked/q_lsh: one query round (see
//     attention_head). For each enabled lane, lowest first, y_valid pulses
//     with y_lane and y = requant(W^MHA * concat(heads), MHA_SHIFT); q_done
//     pulses with the last one. q_keys reports head 0's attended key count.
//   ffn_start/ffn_x -> ffn_done/ffn_y: one feedforward evaluation.
// Loads, queries and feedforward runs may not overlap in time.
// The head structure, concatenation and W^MHA follow the design; sharing one
// W^MHA among the lanes and the requantisation shifts are this design's
// choices.
module imcat_top
  import imcat_pkg::*;
#(
  parameter int unsigned D_MODEL     = imcat_pkg::D_MODEL,
  parameter int unsigned N_HEADS     = imcat_pkg::N_HEADS,
  parameter int unsigned N_MAX       = imcat_pkg::N_MAX,
  parameter int unsigned SIG_BITS    = imcat_pkg::SIG_BITS,
  parameter int unsigned TOP_M       = imcat_pkg::TOP_M,
  parameter int unsigned P           = imcat_pkg::PAR,
  parameter int unsigned D_FF        = imcat_pkg::D_FF,
  parameter int unsigned PROJ_SHIFT  = 7,
  parameter int unsigned LOGIT_SHIFT = 6,
  parameter int unsigned MHA_SHIFT   = 7,
  parameter int unsigned FF_SHIFT    = 7,
  localparam int unsigned D_K = D_MODEL / N_HEADS,
  localparam int unsigned IW  = $clog2(N_MAX),
  localparam int unsigned LW  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned HW  = (N_HEADS > 1) ? $clog2(N_HEADS) : 1
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  wwrite_t                                   w,
  input  logic [HW-1:0]                             w_head,
  input  logic [LW-1:0]                             w_lane,
  input  logic                                      w_bcast,
  input  logic                                      ld_start,
  input  logic signed [D_MODEL-1:0][DW-1:0]         ld_x,
  input  logic [IW-1:0]                             ld_idx,
  output logic                                      ld_done,
  input  logic                                      q_start,
  input  logic [P-1:0]                              q_lane_en,
  input  logic signed [P-1:0][D_MODEL-1:0][DW-1:0]  q_x,
  input  logic [P-1:0][IW-1:0]                      q_limit,
  input  logic [IW:0]                               q_n,
  input  logic                                      q_masked,
  input  logic                                      q_lsh,
  output logic                                      q_busy,
  output logic                                      q_done,
  output logic [P-1:0][IW:0]                        q_keys,
  output logic                                      y_valid,
  output logic [LW-1:0]                             y_lane,
  output logic signed [D_MODEL-1:0][DW-1:0]         y,
  input  logic                                      ffn_start,
  input  logic signed [D_MODEL-1:0][DW-1:0]         ffn_x,
  output logic                                      ffn_busy,
  output logic                                      ffn_done,
  output logic signed [D_MODEL-1:0][DW-1:0]         ffn_y
);
  localparam int unsigned TI  = D_MODEL / XB;
  localparam int unsigned TIW = (TI > 1) ? $clog2(TI) : 1;

  logic [N_HEADS-1:0] h_ld_done, h_q_done;
  logic signed [N_HEADS-1:0][P-1:0][D_K-1:0][DW-1:0] h_out;
  logic [N_HEADS-1:0][P-1:0][IW:0] h_keys;
  logic q_go;

  typedef enum logic [1:0] {M_IDLE, M_HEADS, M_PROJ, M_WAIT} mstate_e;
  mstate_e mstate;

  assign q_go = q_start && mstate == M_IDLE;

  for (genvar h = 0; h < N_HEADS; h++) begin : g_head
    wwrite_t hw;
    always_comb begin
      hw = w;
      hw.en = w.en && int'(w_head) == h &&
              (w.tgt == TGT_WQ || w.tgt == TGT_WK || w.tgt == TGT_WV ||
               w.tgt == TGT_WLQ || w.tgt == TGT_WLK);
    end
    attention_head #(
      .D_MODEL(D_MODEL), .D_K(D_K), .N_MAX(N_MAX), .SIG_BITS(SIG_BITS), .TOP_M(TOP_M),
      .P(P), .PROJ_SHIFT(PROJ_SHIFT), .LOGIT_SHIFT(LOGIT_SHIFT)
    ) u_head (
      .clk, .rst_n,
      .w(hw), .w_lane, .w_bcast,
      .ld_start, .ld_x, .ld_idx, .ld_busy(), .ld_done(h_ld_done[h]),
      .q_start(q_go), .q_lane_en, .q_x, .q_limit, .q_n, .q_masked, .q_lsh,
      .q_busy(), .q_done(h_q_done[h]), .q_out(h_out[h]), .q_keys(h_keys[h])
    );
  end

  assign ld_done = h_ld_done[0];
  assign q_keys  = h_keys[0];

  // ---------------- output projection W^MHA, shared by the lanes
  logic mha_start, mha_done;
  logic signed [D_MODEL-1:0][DW-1:0] cat;
  logic signed [D_MODEL-1:0][ACC_W-1:0] mha_y;
  logic [N_HEADS-1:0] hpend;
  logic [P-1:0] lpend;
  logic [LW-1:0] lane;

  always_comb
    for (int h = 0; h < int'(N_HEADS); h++)
      cat[h*D_K +: D_K] = h_out[h][lane];

  xbar_mvm #(.IN_DIM(D_MODEL), .OUT_DIM(D_MODEL), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_wmha (
    .clk, .rst_n,
    .wr_row_en(w.en && w.tgt == TGT_WMHA), .wr_row_idx(w.row[$clog2(D_MODEL)-1:0]),
    .wr_row_tile(w.tile[TIW-1:0]), .wr_row_data(w.data),
    .wr_col_en(1'b0), .wr_col_idx('0), .wr_col_tile('0), .wr_col_data('0),
    .start(mha_start), .x(cat), .out_en({D_MODEL{1'b1}}),
    .busy(), .done(mha_done), .y(mha_y)
  );

  // lowest set bit of a lane mask
  function automatic logic [LW-1:0] first_lane(logic [P-1:0] m);
    for (int l = int'(P) - 1; l >= 0; l--) if (m[l]) first_lane = LW'(l);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mstate    <= M_IDLE;
      hpend     <= '0;
      lpend     <= '0;
      lane      <= '0;
      mha_start <= 1'b0;
      y_valid   <= 1'b0;
      y_lane    <= '0;
      y         <= '0;
      q_done    <= 1'b0;
    end else begin
      mha_start <= 1'b0;
      y_valid   <= 1'b0;
      q_done    <= 1'b0;
      unique case (mstate)
        M_IDLE: if (q_go) begin
          hpend  <= '1;
          lpend  <= q_lane_en;
          mstate <= M_HEADS;
        end
        M_HEADS: begin
          hpend <= hpend & ~h_q_done;
          if ((hpend & ~h_q_done) == '0) mstate <= M_PROJ;
        end
        M_PROJ: begin
          if (lpend == '0) begin
            q_done <= 1'b1;
            mstate <= M_IDLE;
          end else begin
            lane      <= first_lane(lpend);
            mha_start <= 1'b1;
            mstate    <= M_WAIT;
          end
        end
        M_WAIT: if (mha_done) begin
          for (int i = 0; i < int'(D_MODEL); i++) y[i] <= requant(mha_y[i], MHA_SHIFT);
          y_valid <= 1'b1;
          y_lane  <= lane;
          lpend[lane] <= 1'b0;
          mstate  <= M_PROJ;
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end

  assign q_busy = (mstate != M_IDLE);

  // ---------------- feedforward layer
  ffn_xbar #(.D_MODEL(D_MODEL), .D_FF(D_FF), .FF_SHIFT(FF_SHIFT)) u_ffn (
    .clk, .rst_n, .w,
    .start(ffn_start), .x(ffn_x),
    .busy(ffn_busy), .done(ffn_done), .y(ffn_y)
  );

endmodule
