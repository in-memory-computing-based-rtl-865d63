// tb_xbar_tile: self-checking test of one 64x64 crossbar tile.
// Fills the tile with random weights through line writes, overwrites a few
// columns through column writes, then runs random MVMs with random line
// enables. Each result is compared with a dot product computed here, and the
// start-to-done latency is checked against ADC_SHARE + 1 cycles.
module tb_xbar_tile;
  localparam int L = 64, I = 64, DW = 8, AS = 8, AW = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_row_en = 0, wr_col_en = 0, start = 0, busy, done;
  logic [5:0] wr_row_idx = 0, wr_col_idx = 0;
  logic signed [I-1:0][DW-1:0] wr_row_data = '0, x = '0;
  logic signed [L-1:0][DW-1:0] wr_col_data = '0;
  logic [L-1:0] line_en = '0;
  logic signed [L-1:0][AW-1:0] y;

  int checks = 0, failures = 0;
  logic signed [DW-1:0] ref_m [L][I];

  xbar_tile #(.LINES(L), .INS(I), .DW(DW), .ADC_SHARE(AS), .ACC_W(AW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mvm();
    int lat;
    logic signed [AW-1:0] exp_y;
    for (int c = 0; c < I; c++) x[c] = DW'($urandom);
    line_en = {$urandom, $urandom};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != AS + 1) begin failures++; $display("latency %0d", lat); end
    for (int l = 0; l < L; l++) begin
      exp_y = 0;
      if (line_en[l]) for (int c = 0; c < I; c++) exp_y += AW'(ref_m[l][c]) * AW'($signed(x[c]));
      checks++;
      if (y[l] !== exp_y) begin
        failures++;
        if (failures < 10) $display("line %0d got %0d exp %0d", l, y[l], exp_y);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < L; l++) begin
      @(negedge clk);
      wr_row_en = 1; wr_row_idx = 6'(l);
      for (int c = 0; c < I; c++) begin wr_row_data[c] = DW'($urandom); ref_m[l][c] = $signed(wr_row_data[c]); end
    end
    @(negedge clk) wr_row_en = 0;
    repeat (4) run_mvm();
    for (int k = 0; k < 5; k++) begin
      @(negedge clk);
      wr_col_en = 1; wr_col_idx = 6'($urandom);
      for (int l = 0; l < L; l++) begin wr_col_data[l] = DW'($urandom); ref_m[l][wr_col_idx] = $signed(wr_col_data[l]); end
    end
    @(negedge clk) wr_col_en = 0;
    repeat (4) run_mvm();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
