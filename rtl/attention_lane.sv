// attention_lane: one query path of an attention head, from input vector to
// head output.
//
// A lane holds its own copy of the query projection W^Q (D_K x D_MODEL), of
// the query hashing crossbar W^Q R, of the key cache K (one row per time step)
// and value cache V (one column per time step), and of the signature CAM.
// Keys, values and key signatures are written into these caches from outside
// (by the head, which computes them once per time step). A query runs as:
//   1. project:  q = requant(W^Q x) and, with LSH on, the query signature;
//   2. select:   the candidate keys are those with index < q_n and, in
//                masked mode, index <= q_limit (causal masking: only rows
//                0..t of K are switched on). With LSH on, the CAM computes
//                Hamming distances and the TOP_M nearest candidates are kept;
//   3. score:    one K-cache MVM with only the selected rows switched on;
//   4. softmax:  the selected scores are streamed through softmax_lut
//                (1/sqrt(d_k) shift and table softmax);
//   5. weigh:    the weights form the input vector of the V-cache MVM; its
//                output, requantised, is the head output for this query.
// Requantisation (package function requant) shifts right by PROJ_SHIFT after
// the projection and by 7 after the V cache (weights are Q0.7), rounding and
// saturating to 8 bits.
//
// Interface and timing: q_start (while busy is low) samples q_x, q_n, q_limit,
// q_masked and q_lsh; q_done pulses once q_out is valid. A query costs about
// 2*(ADC_SHARE+1) + D_MODEL/64 + N_MAX/64 cycles of crossbar time, plus, with
// LSH, 2 + TOP_M cycles of CAM search and selection, plus 3c cycles of
// softmax for c attended keys. Cache writes (c_en) take one cycle and must
// not coincide with a running query. q_keys gives the number of keys the last
// query attended to.
// The dataflow follows the design; the requantisation shifts, the sequencing
// and the serial softmax stream are this design's choices.
module attention_lane
  import imcat_pkg::*;
#(
  parameter int unsigned D_MODEL     = imcat_pkg::D_MODEL,
  parameter int unsigned D_K         = imcat_pkg::D_K,
  parameter int unsigned N_MAX       = imcat_pkg::N_MAX,
  parameter int unsigned SIG_BITS    = imcat_pkg::SIG_BITS,
  parameter int unsigned TOP_M       = imcat_pkg::TOP_M,
  parameter int unsigned PROJ_SHIFT  = 7,
  parameter int unsigned LOGIT_SHIFT = 6,
  localparam int unsigned IW = $clog2(N_MAX)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // weight programming (only TGT_WQ and TGT_WLQ are taken)
  input  wwrite_t                           w,
  // cache write from the head
  input  logic                              c_en,
  input  logic [IW-1:0]                     c_idx,
  input  logic signed [D_K-1:0][DW-1:0]     c_k,
  input  logic signed [D_K-1:0][DW-1:0]     c_v,
  input  logic [SIG_BITS-1:0]               c_sig,
  input  logic [SIG_BITS-1:0]               c_care,
  // query
  input  logic                              q_start,
  input  logic signed [D_MODEL-1:0][DW-1:0] q_x,
  input  logic [IW:0]                       q_n,
  input  logic [IW-1:0]                     q_limit,
  input  logic                              q_masked,
  input  logic                              q_lsh,
  output logic                              busy,
  output logic                              q_done,
  output logic signed [D_K-1:0][DW-1:0]     q_out,
  output logic [IW:0]                       q_keys
);
  localparam int unsigned DIST_W = $clog2(SIG_BITS + 1) + 1;
  localparam int unsigned TIQ    = D_MODEL / XB;
  localparam int unsigned TIQW   = (TIQ > 1) ? $clog2(TIQ) : 1;
  localparam int unsigned TOVW   = 1;
  localparam int unsigned CW     = $clog2(TOP_M + 1);

  initial begin
    assert (D_K == XB) else $error("a head is one crossbar wide: D_K must equal XB");
  end

  typedef enum logic [2:0] {S_IDLE, S_PROJ, S_CAM, S_TOPK, S_K, S_STREAM, S_SM, S_V} state_e;
  state_e state;

  // ---------------- query projection and query hashing
  logic wq_done, wl_done, q_ready, h_ready;
  logic signed [D_K-1:0][ACC_W-1:0] wq_y;
  logic [SIG_BITS-1:0] q_sig;
  logic proj_start, lsh_start;

  xbar_mvm #(.IN_DIM(D_MODEL), .OUT_DIM(D_K), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_wq (
    .clk, .rst_n,
    .wr_row_en  (w.en && w.tgt == TGT_WQ),
    .wr_row_idx (w.row[$clog2(D_K)-1:0]),
    .wr_row_tile(w.tile[TIQW-1:0]),
    .wr_row_data(w.data),
    .wr_col_en  (1'b0), .wr_col_idx('0), .wr_col_tile(1'b0), .wr_col_data('0),
    .start      (proj_start), .x(q_x), .out_en({D_K{1'b1}}),
    .busy       (), .done(wq_done), .y(wq_y)
  );

  lsh_hasher #(.IN_DIM(D_MODEL), .SIG_BITS(SIG_BITS), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_wlq (
    .clk, .rst_n,
    .wr_row_en  (w.en && w.tgt == TGT_WLQ),
    .wr_row_idx (w.row[$clog2(SIG_BITS)-1:0]),
    .wr_row_tile(w.tile[TIQW-1:0]),
    .wr_row_data(w.data),
    .start      (lsh_start), .x(q_x),
    .busy       (), .done(wl_done), .sig(q_sig)
  );

  // ---------------- candidate mask, CAM and top-m selection
  logic [N_MAX-1:0] valid_q, key_mask;
  logic [N_MAX-1:0][DIST_W-1:0] hdist;
  logic cam_search, cam_done, tk_start, tk_done;
  logic [N_MAX-1:0] sel_mask;
  logic [TOP_M-1:0][IW-1:0] sel_idx;
  logic [CW-1:0] sel_cnt;

  lsh_cam #(.N(N_MAX), .SIG_BITS(SIG_BITS)) u_cam (
    .clk, .rst_n,
    .wr_en(c_en), .wr_idx(c_idx), .wr_data(c_sig), .wr_care(c_care),
    .search(cam_search), .key(q_sig), .valid(valid_q),
    .done(cam_done), .hdist
  );

  topk_select #(.N(N_MAX), .DIST_W(DIST_W), .M(TOP_M)) u_topk (
    .clk, .rst_n,
    .start(tk_start), .hdist, .cand(valid_q),
    .busy(), .done(tk_done), .sel_mask, .sel_idx, .sel_cnt
  );

  // ---------------- K and V attention caches
  logic signed [D_K-1:0][DW-1:0] q_vec;
  logic k_start, k_done, v_start, v_done;
  logic signed [N_MAX-1:0][ACC_W-1:0] scores;
  logic signed [N_MAX-1:0][DW-1:0] att;
  logic signed [D_K-1:0][ACC_W-1:0] v_y;

  xbar_mvm #(.IN_DIM(D_K), .OUT_DIM(N_MAX), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_kcache (
    .clk, .rst_n,
    .wr_row_en  (c_en), .wr_row_idx(c_idx), .wr_row_tile(1'b0), .wr_row_data(c_k),
    .wr_col_en  (1'b0), .wr_col_idx('0), .wr_col_tile('0), .wr_col_data('0),
    .start      (k_start), .x(q_vec), .out_en(key_mask),
    .busy       (), .done(k_done), .y(scores)
  );

  xbar_mvm #(.IN_DIM(N_MAX), .OUT_DIM(D_K), .XB(XB), .DW(DW), .ADC_SHARE(ADC_SHARE), .ACC_W(ACC_W))
  u_vcache (
    .clk, .rst_n,
    .wr_row_en  (1'b0), .wr_row_idx('0), .wr_row_tile('0), .wr_row_data('0),
    .wr_col_en  (c_en), .wr_col_idx(c_idx), .wr_col_tile(TOVW'(0)), .wr_col_data(c_v),
    .start      (v_start), .x(att), .out_en({D_K{1'b1}}),
    .busy       (), .done(v_done), .y(v_y)
  );

  // ---------------- softmax
  logic sm_valid, sm_last, so_valid, so_last;
  logic [IW-1:0] sm_idx, so_idx;
  logic signed [ACC_W-1:0] sm_score;
  logic [7:0] so_w;

  softmax_lut #(.N(N_MAX), .ACC_W(ACC_W), .SCALE_BITS(3), .LOGIT_SHIFT(LOGIT_SHIFT)) u_sm (
    .clk, .rst_n,
    .in_valid(sm_valid), .in_idx(sm_idx), .in_score(sm_score), .in_last(sm_last),
    .busy(),
    .out_valid(so_valid), .out_idx(so_idx), .out_w(so_w), .out_last(so_last)
  );

  // ---------------- sequencing
  logic lsh_q;
  logic [IW:0] n_keys, sptr;

  assign busy = (state != S_IDLE);
  assign proj_start = (state == S_IDLE) && q_start;
  assign lsh_start  = proj_start && q_lsh;
  assign cam_search = (state == S_PROJ) && lsh_q && (q_ready || wq_done) && (h_ready || wl_done);

  always_comb begin
    sm_valid = (state == S_STREAM);
    sm_last  = (state == S_STREAM) && (sptr + 1'b1 == n_keys);
    sm_idx   = lsh_q ? sel_idx[sptr[CW-1:0]] : sptr[IW-1:0];
    sm_score = scores[sm_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      lsh_q    <= 1'b0;
      q_ready  <= 1'b0;
      h_ready  <= 1'b0;
      valid_q  <= '0;
      key_mask <= '0;
      q_vec    <= '0;
      tk_start <= 1'b0;
      k_start  <= 1'b0;
      v_start  <= 1'b0;
      n_keys   <= '0;
      sptr     <= '0;
      att      <= '0;
      q_done   <= 1'b0;
      q_out    <= '0;
      q_keys   <= '0;
    end else begin
      q_done   <= 1'b0;
      tk_start <= 1'b0;
      k_start  <= 1'b0;
      v_start  <= 1'b0;
      unique case (state)
        S_IDLE: if (q_start) begin
          state   <= S_PROJ;
          lsh_q   <= q_lsh;
          q_ready <= 1'b0;
          h_ready <= !q_lsh;
          for (int e = 0; e < int'(N_MAX); e++)
            valid_q[e] <= ((IW+1)'(e) < q_n) && (!q_masked || IW'(e) <= q_limit);
          n_keys  <= q_masked ? (((IW+1)'(q_limit) + 1'b1 < q_n) ? (IW+1)'(q_limit) + 1'b1 : q_n) : q_n;
        end
        S_PROJ: begin
          if (wq_done) begin
            q_ready <= 1'b1;
            for (int d = 0; d < int'(D_K); d++) q_vec[d] <= requant(wq_y[d], PROJ_SHIFT);
          end
          if (wl_done) h_ready <= 1'b1;
          if ((q_ready || wq_done) && (h_ready || wl_done)) begin
            if (lsh_q) state <= S_CAM;
            else begin
              key_mask <= valid_q;
              k_start  <= 1'b1;
              state    <= S_K;
            end
          end
        end
        S_CAM: if (cam_done) begin
          tk_start <= 1'b1;
          state    <= S_TOPK;
        end
        S_TOPK: if (tk_done) begin
          key_mask <= sel_mask;
          n_keys   <= (IW+1)'(sel_cnt);
          k_start  <= 1'b1;
          state    <= S_K;
        end
        S_K: if (k_done) begin
          sptr  <= '0;
          att   <= '0;
          state <= S_STREAM;
        end
        S_STREAM: begin
          sptr <= sptr + 1'b1;
          if (sm_last) state <= S_SM;
        end
        S_SM: if (so_valid) begin
          att[so_idx] <= so_w;
          if (so_last) begin
            v_start <= 1'b1;
            state   <= S_V;
          end
        end
        S_V: if (v_done) begin
          for (int d = 0; d < int'(D_K); d++) q_out[d] <= requant(v_y[d], 7);
          q_keys <= n_keys;
          q_done <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
