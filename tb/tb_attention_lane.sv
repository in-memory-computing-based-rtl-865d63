// tb_attention_lane: self-checking end-to-end test of one query lane.
// A 128-wide model, 64-dim head, 128-entry caches, 64-bit signatures and
// M = 4. Programs W^Q and W^Q R, fills 100 cache entries with random keys,
// values and signatures, then runs queries unmasked, causally masked, with
// LSH selection, and with LSH plus a mask that leaves fewer than M keys. The
// output vector and the number of attended keys are compared with the
// reference model in imcat_ref_pkg.
module tb_attention_lane;
  import imcat_pkg::*;
  import imcat_ref_pkg::*;
  localparam int DM = 128, DK = 64, N = 128, SIG = 64, M = 4, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  wwrite_t w = '0;
  logic c_en = 0;
  logic [IW-1:0] c_idx = '0;
  logic signed [DK-1:0][DW-1:0] c_k = '0, c_v = '0;
  logic [SIG-1:0] c_sig = '0, c_care = '1;
  logic q_start = 0, q_masked = 0, q_lsh = 0, busy, q_done;
  logic signed [DM-1:0][DW-1:0] q_x = '0;
  logic [IW:0] q_n = '0;
  logic [IW-1:0] q_limit = '0;
  logic signed [DK-1:0][DW-1:0] q_out;
  logic [IW:0] q_keys;

  int checks = 0, failures = 0;
  int wq [], wl [], kf [], vf [];
  bit ks [];

  attention_lane #(.D_MODEL(DM), .D_K(DK), .N_MAX(N), .SIG_BITS(SIG), .TOP_M(M)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_w(input wtarget_e tgt, input int rows, input int lo, input int hi,
                         ref int m []);
    m = new[rows * DM];
    for (int r = 0; r < rows; r++)
      for (int t = 0; t < DM / XB; t++) begin
        @(negedge clk);
        w.en = 1; w.tgt = tgt; w.row = WROW_W'(r); w.tile = WTILE_W'(t);
        for (int c = 0; c < XB; c++) begin
          m[r * DM + t * XB + c] = lo + int'($urandom_range(hi - lo));
          w.data[c] = DW'(m[r * DM + t * XB + c]);
        end
      end
    @(negedge clk) w.en = 0;
  endtask

  task automatic query(input int n, input bit masked, input int limit, input bit lsh);
    int x [], q [], out [];
    longint y [], ys [];
    bit qs [], cand [], sel [];
    int nk;
    x = new[DM];
    for (int c = 0; c < DM; c++) begin x[c] = int'($urandom_range(127)) - 64; q_x[c] = DW'(x[c]); end
    mvm(DK, DM, wq, x, y);
    q = new[DK];
    foreach (q[d]) q[d] = rq(y[d], 7);
    mvm(SIG, DM, wl, x, ys);
    qs = new[SIG];
    foreach (qs[b]) qs[b] = (ys[b] >= 0);
    cand = new[n];
    foreach (cand[t]) cand[t] = !masked || t <= limit;
    if (lsh) nearest(n, SIG, qs, ks, cand, M, sel);
    else sel = cand;
    nk = 0;
    foreach (sel[t]) nk += int'(sel[t]);
    attend(DK, n, q, kf, vf, sel, 3, 6, out);
    q_n = (IW+1)'(n); q_masked = masked; q_limit = IW'(limit); q_lsh = lsh;
    @(negedge clk) q_start = 1;
    @(negedge clk) q_start = 0;
    while (!q_done) @(negedge clk);
    checks++;
    if (int'(q_keys) != nk) begin failures++; $display("keys %0d exp %0d", q_keys, nk); end
    for (int d = 0; d < DK; d++) begin
      checks++;
      if (int'($signed(q_out[d])) != out[d]) begin
        failures++;
        if (failures < 10) $display("lsh=%0b masked=%0b d=%0d got %0d exp %0d", lsh, masked, d,
                                    $signed(q_out[d]), out[d]);
      end
    end
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_w(TGT_WQ, DK, -8, 8, wq);
    load_w(TGT_WLQ, SIG, -128, 127, wl);
    n = 100;
    kf = new[n * DK];
    vf = new[n * DK];
    ks = new[n * SIG];
    for (int t = 0; t < n; t++) begin
      @(negedge clk);
      c_en = 1; c_idx = IW'(t);
      for (int d = 0; d < DK; d++) begin
        kf[t * DK + d] = int'($urandom_range(255)) - 128;
        vf[t * DK + d] = int'($urandom_range(200)) - 100;
        c_k[d] = DW'(kf[t * DK + d]);
        c_v[d] = DW'(vf[t * DK + d]);
      end
      for (int b = 0; b < SIG; b++) begin ks[t * SIG + b] = 1'($urandom); c_sig[b] = ks[t * SIG + b]; end
    end
    @(negedge clk) c_en = 0;
    query(n, 0, 0, 0);
    query(n, 1, 37, 0);
    query(n, 0, 0, 1);
    query(n, 1, 60, 1);
    query(n, 1, 2, 1);
    query(1, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
