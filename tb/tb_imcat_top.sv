// tb_imcat_top: end-to-end test of the multi-head attention accelerator.
// Reduced size: 128-wide model, 2 heads of 64, 64-entry caches, 64-bit
// signatures, M = 4, P = 2 lanes, 128-wide feedforward. Every result is
// compared with the reference model (imcat_ref_pkg), keys and values being
// recomputed here from the programmed weights. The run exercises, and
// counts, each mechanism of the design:
//   broadcast weight writes to duplicated lanes, time-step loads,
//   bidirectional rounds with both lanes busy, LSH-selected rounds, a round
//   where LSH finds fewer than M candidates, masked decoder steps,
//   encoder-decoder attention (keys from one sequence, queries from another),
//   the lane-serial W^MHA stream, and a feedforward evaluation.
// A mechanism that never happens counts as a failure.
module tb_imcat_top;
  import imcat_pkg::*;
  import imcat_ref_pkg::*;
  localparam int DM = 128, H = 2, DK = DM / H, N = 64, SIG = 64, M = 4, P = 2, DF = 128;
  localparam int IW = $clog2(N), LW = (P > 1) ? $clog2(P) : 1, HW = (H > 1) ? $clog2(H) : 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  wwrite_t w = '0;
  logic [HW-1:0] w_head = '0;
  logic [LW-1:0] w_lane = '0;
  logic w_bcast = 0;
  logic ld_start = 0, ld_done;
  logic signed [DM-1:0][DW-1:0] ld_x = '0;
  logic [IW-1:0] ld_idx = '0;
  logic q_start = 0, q_masked = 0, q_lsh = 0, q_busy, q_done;
  logic [P-1:0] q_lane_en = '0;
  logic signed [P-1:0][DM-1:0][DW-1:0] q_x = '0;
  logic [P-1:0][IW-1:0] q_limit = '0;
  logic [IW:0] q_n = '0;
  logic [P-1:0][IW:0] q_keys;
  logic y_valid;
  logic [LW-1:0] y_lane;
  logic signed [DM-1:0][DW-1:0] y;
  logic ffn_start = 0, ffn_busy, ffn_done;
  logic signed [DM-1:0][DW-1:0] ffn_x = '0, ffn_y;

  int checks = 0, failures = 0;
  int n_bcast = 0, n_load = 0, n_bidir = 0, n_lsh = 0, n_lsh_short = 0, n_masked = 0,
      n_encdec = 0, n_mha = 0, n_ffn = 0;

  typedef int mat_t [];
  mat_t wq [H], wk [H], wv [H], wlk [H], wlq [H];
  mat_t kf [H], vf [H];
  bit ks [H][];
  int wmha [], wf1 [], wf2 [];

  imcat_top #(.D_MODEL(DM), .N_HEADS(H), .N_MAX(N), .SIG_BITS(SIG), .TOP_M(M), .P(P), .D_FF(DF)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_w(input wtarget_e tgt, input int head, input int rows, input int cols,
                        input int lo, input int hi, input bit bc, output int m []);
    m = new[rows * cols];
    for (int r = 0; r < rows; r++)
      for (int t = 0; t < cols / XB; t++) begin
        @(negedge clk);
        w.en = 1; w.tgt = tgt; w.row = WROW_W'(r); w.tile = WTILE_W'(t);
        w_head = HW'(head); w_bcast = bc; w_lane = '0;
        for (int c = 0; c < XB; c++) begin
          m[r * cols + t * XB + c] = lo + int'($urandom_range(hi - lo));
          w.data[c] = DW'(m[r * cols + t * XB + c]);
        end
        n_bcast += int'(bc);
      end
    @(negedge clk) begin w.en = 0; w_bcast = 0; end
  endtask

  task automatic rand_x(output int x []);
    x = new[DM];
    foreach (x[c]) x[c] = int'($urandom_range(127)) - 64;
  endtask

  // cache time step t of x in every head (and in the reference)
  task automatic load_step(input int t, input int x []);
    longint yk [], yv [], ysg [];
    for (int c = 0; c < DM; c++) ld_x[c] = DW'(x[c]);
    for (int h = 0; h < H; h++) begin
      mvm(DK, DM, wk[h], x, yk);
      mvm(DK, DM, wv[h], x, yv);
      mvm(SIG, DM, wlk[h], x, ysg);
      for (int d = 0; d < DK; d++) begin
        kf[h][t * DK + d] = rq(yk[d], 7);
        vf[h][t * DK + d] = rq(yv[d], 7);
      end
      for (int b = 0; b < SIG; b++) ks[h][t * SIG + b] = (ysg[b] >= 0);
    end
    ld_idx = IW'(t);
    @(negedge clk) ld_start = 1;
    @(negedge clk) ld_start = 0;
    while (!ld_done) @(negedge clk);
    n_load++;
  endtask

  // one query round; returns after q_done, checking every y_valid beat
  task automatic round(input int n, input logic [P-1:0] en, input bit masked,
                       input int lim [P], input bit lsh, input int xs [P][]);
    int q [], out [], cat [], exp_y [P][];
    longint yq [], ys [], ym [];
    bit qs [], cand [], sel [];
    int nk [P], seen;
    for (int l = 0; l < P; l++) begin
      for (int c = 0; c < DM; c++) q_x[l][c] = DW'(xs[l][c]);
      q_limit[l] = IW'(lim[l]);
      cat = new[DM];
      for (int h = 0; h < H; h++) begin
        mvm(DK, DM, wq[h], xs[l], yq);
        q = new[DK];
        foreach (q[d]) q[d] = rq(yq[d], 7);
        mvm(SIG, DM, wlq[h], xs[l], ys);
        qs = new[SIG];
        foreach (qs[b]) qs[b] = (ys[b] >= 0);
        cand = new[n];
        foreach (cand[t]) cand[t] = !masked || t <= lim[l];
        if (lsh) nearest(n, SIG, qs, ks[h], cand, M, sel);
        else sel = cand;
        if (h == 0) begin
          nk[l] = 0;
          foreach (sel[t]) nk[l] += int'(sel[t]);
        end
        attend(DK, n, q, kf[h], vf[h], sel, 3, 6, out);
        for (int d = 0; d < DK; d++) cat[h * DK + d] = out[d];
      end
      mvm(DM, DM, wmha, cat, ym);
      exp_y[l] = new[DM];
      foreach (exp_y[l][i]) exp_y[l][i] = rq(ym[i], 7);
    end
    q_n = (IW+1)'(n); q_masked = masked; q_lsh = lsh; q_lane_en = en;
    @(negedge clk) q_start = 1;
    @(negedge clk) q_start = 0;
    seen = 0;
    while (!q_done) begin
      if (y_valid) begin
        checks++;
        if (!en[y_lane]) begin failures++; $display("output for idle lane %0d", y_lane); end
        for (int i = 0; i < DM; i++) begin
          checks++;
          if (int'($signed(y[i])) != exp_y[y_lane][i]) begin
            failures++;
            if (failures < 10) $display("lane %0d y[%0d] got %0d exp %0d", y_lane, i, $signed(y[i]), exp_y[y_lane][i]);
          end
        end
        seen++;
        n_mha++;
      end
      @(negedge clk);
    end
    checks++;
    if (seen != $countones(en)) begin failures++; $display("%0d outputs for %0d lanes", seen, $countones(en)); end
    for (int l = 0; l < P; l++) if (en[l]) begin
      checks++;
      if (int'(q_keys[l]) != nk[l]) begin failures++; $display("lane %0d keys %0d exp %0d", l, q_keys[l], nk[l]); end
      if (lsh && nk[l] < M) n_lsh_short++;
    end
    if (lsh) n_lsh++;
  endtask

  initial begin
    int n, xs [P][], lim [P], enc [][], x [];
    int xv [], hv [];
    longint hy [], oy [];
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- weights
    for (int h = 0; h < H; h++) begin
      load_w(TGT_WQ, h, DK, DM, -8, 8, 1, wq[h]);
      load_w(TGT_WK, h, DK, DM, -8, 8, 0, wk[h]);
      load_w(TGT_WV, h, DK, DM, -8, 8, 0, wv[h]);
      load_w(TGT_WLK, h, SIG, DM, -128, 127, 0, wlk[h]);
      load_w(TGT_WLQ, h, SIG, DM, -128, 127, 1, wlq[h]);
      kf[h] = new[N * DK];
      vf[h] = new[N * DK];
      ks[h] = new[N * SIG];
    end
    load_w(TGT_WMHA, 0, DM, DM, -8, 8, 0, wmha);
    load_w(TGT_FF1, 0, DF, DM, -8, 8, 0, wf1);
    load_w(TGT_FF2, 0, DM, DF, -8, 8, 0, wf2);

    // ---- encoder: bidirectional self-attention over n steps, P queries a round
    n = 24;
    enc = new[n];
    for (int t = 0; t < n; t++) begin rand_x(enc[t]); load_step(t, enc[t]); end
    lim = '{default: 0};
    for (int r = 0; r < 3; r++) begin
      for (int l = 0; l < P; l++) xs[l] = enc[r * P + l];
      round(n, '1, 0, lim, 0, xs);
      n_bidir++;
    end
    // ---- the same with LSH key selection
    for (int l = 0; l < P; l++) xs[l] = enc[6 + l];
    round(n, '1, 0, lim, 1, xs);
    // ---- LSH with a causal limit leaving fewer than M candidates
    lim[0] = 1; lim[1] = 2;
    round(n, '1, 1, lim, 1, xs);
    // ---- encoder-decoder: keys/values stay the encoder's, queries are new
    for (int r = 0; r < 2; r++) begin
      for (int l = 0; l < P; l++) rand_x(xs[l]);
      lim = '{default: 0};
      round(n, '1, 0, lim, 0, xs);
      n_encdec++;
    end
    // ---- decoder: masked self-attention, one step at a time on lane 0
    for (int t = 0; t < 5; t++) begin
      rand_x(x);
      load_step(t, x);
      xs[0] = x;
      rand_x(xs[1]);
      lim[0] = t; lim[1] = 0;
      round(t + 1, 1, 1, lim, 0, xs);
      n_masked++;
    end
    // ---- feedforward
    for (int v = 0; v < 2; v++) begin
      rand_x(xv);
      for (int c = 0; c < DM; c++) ffn_x[c] = DW'(xv[c]);
      mvm(DF, DM, wf1, xv, hy);
      hv = new[DF];
      foreach (hv[i]) hv[i] = (hy[i] < 0) ? 0 : rq(hy[i], 7);
      mvm(DM, DF, wf2, hv, oy);
      @(negedge clk) ffn_start = 1;
      @(negedge clk) ffn_start = 0;
      while (!ffn_done) @(negedge clk);
      for (int i = 0; i < DM; i++) begin
        checks++;
        if (int'($signed(ffn_y[i])) != rq(oy[i], 7)) failures++;
      end
      n_ffn++;
    end
    $display("events: bcast=%0d load=%0d bidir=%0d lsh=%0d lsh_short=%0d encdec=%0d masked=%0d mha=%0d ffn=%0d",
             n_bcast, n_load, n_bidir, n_lsh, n_lsh_short, n_encdec, n_masked, n_mha, n_ffn);
    if (n_bcast == 0) failures++;
    if (n_load == 0) failures++;
    if (n_bidir == 0) failures++;
    if (n_lsh == 0) failures++;
    if (n_lsh_short == 0) failures++;
    if (n_encdec == 0) failures++;
    if (n_masked == 0) failures++;
    if (n_mha == 0) failures++;
    if (n_ffn == 0) failures++;
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
