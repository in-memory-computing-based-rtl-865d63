// tb_topk_select: self-checking test of the nearest-M selector.
// Random distances over 128 entries with random candidate masks; the picks
// must be the M smallest candidate distances in order (lower index first on
// ties), the mask must match the picks, and done must come M + 1 cycles after
// start, or c + 2 cycles when only c < M candidates exist.
module tb_topk_select;
  localparam int N = 128, DW_ = 6, M = 16, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [N-1:0][DW_-1:0] hdist = '0;
  logic [N-1:0] cand = '0;
  logic [N-1:0] sel_mask;
  logic [M-1:0][IW-1:0] sel_idx;
  logic [$clog2(M+1)-1:0] sel_cnt;

  int checks = 0, failures = 0;

  topk_select #(.N(N), .DIST_W(DW_), .M(M)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, ncand, want, exp_lat;
    bit taken [N];
    int ref_idx [M];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      ncand = 0;
      for (int i = 0; i < N; i++) begin
        hdist[i] = DW_'($urandom);
        cand[i]  = (r % 4 == 3) ? ($urandom_range(15) == 0) : 1'($urandom);
        ncand += int'(cand[i]);
        taken[i] = 0;
      end
      // reference: repeated minimum search
      want = (ncand < M) ? ncand : M;
      for (int k = 0; k < want; k++) begin
        int best;
        best = -1;
        for (int i = 0; i < N; i++)
          if (cand[i] && !taken[i] && (best < 0 || hdist[i] < hdist[best])) best = i;
        taken[best] = 1;
        ref_idx[k] = best;
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      exp_lat = (ncand >= M) ? M + 1 : ncand + 2;
      checks++;
      if (lat != exp_lat) begin failures++; $display("latency %0d exp %0d", lat, exp_lat); end
      checks++;
      if (int'(sel_cnt) != want) begin failures++; $display("count %0d exp %0d", sel_cnt, want); end
      for (int k = 0; k < want; k++) begin
        checks++;
        if (int'(sel_idx[k]) != ref_idx[k]) begin
          failures++;
          if (failures < 10) $display("pick %0d got %0d exp %0d", k, sel_idx[k], ref_idx[k]);
        end
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (sel_mask[i] != taken[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
