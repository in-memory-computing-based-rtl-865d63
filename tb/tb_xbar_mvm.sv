// tb_xbar_mvm: self-checking test of a tiled crossbar matrix.
// Uses a 128 x 192 matrix (2 x 3 tiles). Writes rows into every input tile
// and some columns into every output tile, then runs MVMs with random output
// enables and checks every output against a reference product and the
// start-to-done latency against ADC_SHARE + IN_DIM/64 + 1 cycles.
module tb_xbar_mvm;
  localparam int IN = 192, OUT = 128, XB = 64, DW = 8, AS = 8, AW = 32;
  localparam int TI = IN / XB, TO = OUT / XB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_row_en = 0, wr_col_en = 0, start = 0, busy, done;
  logic [$clog2(OUT)-1:0] wr_row_idx = '0;
  logic [$clog2(TI)-1:0]  wr_row_tile = '0;
  logic [$clog2(IN)-1:0]  wr_col_idx = '0;
  logic [0:0]             wr_col_tile = '0;
  logic signed [XB-1:0][DW-1:0] wr_row_data = '0, wr_col_data = '0;
  logic signed [IN-1:0][DW-1:0] x = '0;
  logic [OUT-1:0] out_en = '0;
  logic signed [OUT-1:0][AW-1:0] y;

  int checks = 0, failures = 0;
  int ref_m [OUT][IN];

  xbar_mvm #(.IN_DIM(IN), .OUT_DIM(OUT), .XB(XB), .DW(DW), .ADC_SHARE(AS), .ACC_W(AW)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_mvm();
    int lat, e;
    for (int c = 0; c < IN; c++) x[c] = DW'($urandom);
    out_en = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != AS + TI + 1) begin failures++; $display("latency %0d", lat); end
    for (int o = 0; o < OUT; o++) begin
      e = 0;
      if (out_en[o]) for (int c = 0; c < IN; c++) e += ref_m[o][c] * int'($signed(x[c]));
      checks++;
      if (int'($signed(y[o])) != e) begin
        failures++;
        if (failures < 10) $display("out %0d got %0d exp %0d", o, $signed(y[o]), e);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int o = 0; o < OUT; o++)
      for (int t = 0; t < TI; t++) begin
        @(negedge clk);
        wr_row_en = 1; wr_row_idx = 7'(o); wr_row_tile = 2'(t);
        for (int c = 0; c < XB; c++) begin
          wr_row_data[c] = DW'($urandom);
          ref_m[o][t*XB + c] = int'($signed(wr_row_data[c]));
        end
      end
    @(negedge clk) wr_row_en = 0;
    repeat (3) run_mvm();
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      wr_col_en = 1; wr_col_idx = 8'($urandom_range(IN - 1)); wr_col_tile = 1'(k % TO);
      for (int l = 0; l < XB; l++) begin
        wr_col_data[l] = DW'($urandom);
        ref_m[wr_col_tile*XB + l][wr_col_idx] = int'($signed(wr_col_data[l]));
      end
    end
    @(negedge clk) wr_col_en = 0;
    repeat (3) run_mvm();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
