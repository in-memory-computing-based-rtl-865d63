// tb_attention_head: self-checking test of a head with two duplicated lanes.
// A 128-wide model, 64-dim head, 64-entry caches, 64-bit signatures, M = 4,
// P = 2. Programs W^K, W^V, W^K R, W^Q (broadcast to both lanes) and W^Q R
// (a different copy per lane, through w_lane), loads 40 time steps and
// checks the load latency, then runs query rounds: both lanes unmasked
// (bidirectional), one lane masked (decoder), both lanes with LSH. Each
// lane's output is compared with the reference model, the keys and values
// being recomputed here from the programmed weights.
module tb_attention_head;
  import imcat_pkg::*;
  import imcat_ref_pkg::*;
  localparam int DM = 128, DK = 64, N = 64, SIG = 64, M = 4, P = 2, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  wwrite_t w = '0;
  logic [0:0] w_lane = '0;
  logic w_bcast = 0;
  logic ld_start = 0, ld_busy, ld_done;
  logic signed [DM-1:0][DW-1:0] ld_x = '0;
  logic [IW-1:0] ld_idx = '0;
  logic q_start = 0, q_masked = 0, q_lsh = 0, q_busy, q_done;
  logic [P-1:0] q_lane_en = '0;
  logic signed [P-1:0][DM-1:0][DW-1:0] q_x = '0;
  logic [P-1:0][IW-1:0] q_limit = '0;
  logic [IW:0] q_n = '0;
  logic signed [P-1:0][DK-1:0][DW-1:0] q_out;
  logic [P-1:0][IW:0] q_keys;

  int checks = 0, failures = 0;
  int wq [], wk [], wv [], wlk [], wlq0 [], wlq1 [];
  int kf [], vf [];
  bit ks [];

  attention_head #(.D_MODEL(DM), .D_K(DK), .N_MAX(N), .SIG_BITS(SIG), .TOP_M(M), .P(P)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_w(input wtarget_e tgt, input int rows, input int lo, input int hi,
                        input bit bc, input int lane, ref int m []);
    m = new[rows * DM];
    for (int r = 0; r < rows; r++)
      for (int t = 0; t < DM / XB; t++) begin
        @(negedge clk);
        w.en = 1; w.tgt = tgt; w.row = WROW_W'(r); w.tile = WTILE_W'(t);
        w_bcast = bc; w_lane = 1'(lane);
        for (int c = 0; c < XB; c++) begin
          m[r * DM + t * XB + c] = lo + int'($urandom_range(hi - lo));
          w.data[c] = DW'(m[r * DM + t * XB + c]);
        end
      end
    @(negedge clk) begin w.en = 0; w_bcast = 0; end
  endtask

  task automatic rand_x(output int x []);
    x = new[DM];
    foreach (x[c]) x[c] = int'($urandom_range(127)) - 64;
  endtask

  task automatic round(input int n, input logic [P-1:0] en, input bit masked,
                       input int lim0, input int lim1, input bit lsh);
    int x [P][], q [], out [];
    longint y [], ys [];
    bit qs [], cand [], sel [];
    int lim [P];
    int expo [P][];
    int nk [P];
    lim[0] = lim0; lim[1] = lim1;
    for (int l = 0; l < P; l++) begin
      rand_x(x[l]);
      for (int c = 0; c < DM; c++) q_x[l][c] = DW'(x[l][c]);
      mvm(DK, DM, wq, x[l], y);
      q = new[DK];
      foreach (q[d]) q[d] = rq(y[d], 7);
      mvm(SIG, DM, (l == 0) ? wlq0 : wlq1, x[l], ys);
      qs = new[SIG];
      foreach (qs[b]) qs[b] = (ys[b] >= 0);
      cand = new[n];
      foreach (cand[t]) cand[t] = !masked || t <= lim[l];
      if (lsh) nearest(n, SIG, qs, ks, cand, M, sel);
      else sel = cand;
      nk[l] = 0;
      foreach (sel[t]) nk[l] += int'(sel[t]);
      attend(DK, n, q, kf, vf, sel, 3, 6, out);
      expo[l] = out;
      q_limit[l] = IW'(lim[l]);
    end
    q_n = (IW+1)'(n); q_masked = masked; q_lsh = lsh; q_lane_en = en;
    @(negedge clk) q_start = 1;
    @(negedge clk) q_start = 0;
    while (!q_done) @(negedge clk);
    for (int l = 0; l < P; l++) if (en[l]) begin
      checks++;
      if (int'(q_keys[l]) != nk[l]) begin failures++; $display("lane %0d keys %0d exp %0d", l, q_keys[l], nk[l]); end
      for (int d = 0; d < DK; d++) begin
        checks++;
        if (int'($signed(q_out[l][d])) != expo[l][d]) begin
          failures++;
          if (failures < 10) $display("lane %0d d=%0d got %0d exp %0d", l, d, $signed(q_out[l][d]), expo[l][d]);
        end
      end
    end
  endtask

  initial begin
    int n, lat, x [];
    longint yk [], yv [], ysg [];
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_w(TGT_WQ, DK, -8, 8, 1, 0, wq);
    load_w(TGT_WK, DK, -8, 8, 0, 0, wk);
    load_w(TGT_WV, DK, -8, 8, 0, 0, wv);
    load_w(TGT_WLK, SIG, -128, 127, 0, 0, wlk);
    load_w(TGT_WLQ, SIG, -128, 127, 0, 0, wlq0);
    load_w(TGT_WLQ, SIG, -128, 127, 0, 1, wlq1);
    n = 40;
    kf = new[n * DK];
    vf = new[n * DK];
    ks = new[n * SIG];
    for (int t = 0; t < n; t++) begin
      rand_x(x);
      for (int c = 0; c < DM; c++) ld_x[c] = DW'(x[c]);
      mvm(DK, DM, wk, x, yk);
      mvm(DK, DM, wv, x, yv);
      mvm(SIG, DM, wlk, x, ysg);
      for (int d = 0; d < DK; d++) begin kf[t * DK + d] = rq(yk[d], 7); vf[t * DK + d] = rq(yv[d], 7); end
      for (int b = 0; b < SIG; b++) ks[t * SIG + b] = (ysg[b] >= 0);
      ld_idx = IW'(t);
      @(negedge clk) ld_start = 1;
      @(negedge clk) ld_start = 0;
      lat = 1;
      while (!ld_done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 8 + DM / XB + 3) begin failures++; $display("load latency %0d", lat); end
    end
    round(n, 2'b11, 0, 0, 0, 0);
    round(n, 2'b01, 1, 17, 0, 0);
    round(n, 2'b11, 0, 0, 0, 1);
    round(n, 2'b11, 1, 5, 30, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
