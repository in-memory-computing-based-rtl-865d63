// tb_lsh_cam: self-checking test of the signature TCAM.
// Writes 64 random 100-bit entries, some with don't-care bits, and runs
// searches with random keys and random valid masks. Each distance is compared
// with a Hamming distance counted bit by bit here; invalid entries must
// report the all-ones code. The search must complete in one cycle.
module tb_lsh_cam;
  localparam int N = 64, SIG = 100, DW_ = $clog2(SIG + 1) + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en = 0, search = 0, done;
  logic [$clog2(N)-1:0] wr_idx = '0;
  logic [SIG-1:0] wr_data = '0, wr_care = '0, key = '0;
  logic [N-1:0] valid = '0;
  logic [N-1:0][DW_-1:0] hdist;

  int checks = 0, failures = 0;
  logic [SIG-1:0] rd [N], rc [N];

  lsh_cam #(.N(N), .SIG_BITS(SIG)) dut (.*);

  function automatic logic [SIG-1:0] rnd();
    logic [SIG-1:0] v;
    for (int b = 0; b < SIG; b++) v[b] = 1'($urandom);
    return v;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 6'(i); wr_data = rnd();
      wr_care = (i % 4 == 0) ? rnd() : '1;
      rd[i] = wr_data; rc[i] = wr_care;
    end
    @(negedge clk) wr_en = 0;
    for (int s = 0; s < 8; s++) begin
      key = (s == 0) ? rd[5] : rnd();
      valid = {$urandom, $urandom};
      @(negedge clk) search = 1;
      @(negedge clk) search = 0;
      checks++;
      if (!done) begin failures++; $display("search not done after one cycle"); end
      for (int i = 0; i < N; i++) begin
        e = 0;
        for (int b = 0; b < SIG; b++) if (rc[i][b] && rd[i][b] != key[b]) e++;
        if (!valid[i]) e = (1 << DW_) - 1;
        checks++;
        if (int'(hdist[i]) != e) begin
          failures++;
          if (failures < 10) $display("entry %0d got %0d exp %0d", i, hdist[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
