// tb_lsh_hasher: self-checking test of the LSH hashing crossbar.
// Programs a 192-bit x 128-input W R matrix with random weights, hashes
// random vectors and checks every signature bit against the sign of a
// reference dot product (zero counts as 1), plus the start-to-done latency.
module tb_lsh_hasher;
  localparam int IN = 128, SIG = 192, XB = 64, DW = 8, AS = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_row_en = 0, start = 0, busy, done;
  logic [$clog2(SIG)-1:0] wr_row_idx = '0;
  logic [0:0] wr_row_tile = '0;
  logic signed [XB-1:0][DW-1:0] wr_row_data = '0;
  logic signed [IN-1:0][DW-1:0] x = '0;
  logic [SIG-1:0] sig;

  int checks = 0, failures = 0, ones = 0;
  int ref_m [SIG][IN];

  lsh_hasher #(.IN_DIM(IN), .SIG_BITS(SIG), .XB(XB), .DW(DW), .ADC_SHARE(AS)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < SIG; r++)
      for (int t = 0; t < IN / XB; t++) begin
        @(negedge clk);
        wr_row_en = 1; wr_row_idx = 8'(r); wr_row_tile = 1'(t);
        for (int c = 0; c < XB; c++) begin
          wr_row_data[c] = DW'($urandom);
          ref_m[r][t*XB + c] = int'($signed(wr_row_data[c]));
        end
      end
    @(negedge clk) wr_row_en = 0;
    for (int v = 0; v < 6; v++) begin
      for (int c = 0; c < IN; c++) x[c] = (v == 5) ? '0 : DW'($urandom);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != AS + IN / XB + 1) begin failures++; $display("latency %0d", lat); end
      for (int r = 0; r < SIG; r++) begin
        e = 0;
        for (int c = 0; c < IN; c++) e += ref_m[r][c] * int'($signed(x[c]));
        checks++;
        ones += int'(sig[r]);
        if (sig[r] != (e >= 0)) begin
          failures++;
          if (failures < 10) $display("bit %0d got %0b dot %0d", r, sig[r], e);
        end
      end
    end
    checks++;
    if (ones < SIG || ones > 5 * SIG) begin failures++; $display("signatures unbalanced: %0d ones", ones); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
