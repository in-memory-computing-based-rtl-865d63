// tb_ffn_xbar: self-checking test of the crossbar feedforward layer.
// A 128 -> 192 -> 128 layer with random small weights; each output is
// compared with requant(W2 * relu(requant(W1 x, 7)), 7) computed here, and
// the start-to-done latency with 2 * ADC_SHARE + D_MODEL/64 + D_FF/64 + 4.
module tb_ffn_xbar;
  import imcat_pkg::*;
  import imcat_ref_pkg::*;
  localparam int DM = 128, DF = 192;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  wwrite_t w = '0;
  logic start = 0, busy, done;
  logic signed [DM-1:0][DW-1:0] x = '0, y;

  int checks = 0, failures = 0, nonzero = 0;
  int w1 [], w2 [];

  ffn_xbar #(.D_MODEL(DM), .D_FF(DF)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_w(input wtarget_e tgt, input int rows, input int cols, ref int m []);
    m = new[rows * cols];
    for (int r = 0; r < rows; r++)
      for (int t = 0; t < cols / XB; t++) begin
        @(negedge clk);
        w.en = 1; w.tgt = tgt; w.row = WROW_W'(r); w.tile = WTILE_W'(t);
        for (int c = 0; c < XB; c++) begin
          m[r * cols + t * XB + c] = int'($urandom_range(16)) - 8;
          w.data[c] = DW'(m[r * cols + t * XB + c]);
        end
      end
    @(negedge clk) w.en = 0;
  endtask

  initial begin
    int xv [], h [], lat;
    longint hy [], oy [];
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_w(TGT_FF1, DF, DM, w1);
    load_w(TGT_FF2, DM, DF, w2);
    for (int v = 0; v < 4; v++) begin
      xv = new[DM];
      foreach (xv[c]) begin xv[c] = int'($urandom_range(127)) - 64; x[c] = DW'(xv[c]); end
      mvm(DF, DM, w1, xv, hy);
      h = new[DF];
      foreach (h[i]) h[i] = (hy[i] < 0) ? 0 : rq(hy[i], 7);
      mvm(DM, DF, w2, h, oy);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2 * ADC_SHARE + DM / XB + DF / XB + 4) begin failures++; $display("latency %0d", lat); end
      for (int i = 0; i < DM; i++) begin
        checks++;
        nonzero += int'(y[i] != 0);
        if (int'($signed(y[i])) != rq(oy[i], 7)) begin
          failures++;
          if (failures < 10) $display("y[%0d] got %0d exp %0d", i, $signed(y[i]), rq(oy[i], 7));
        end
      end
    end
    checks++;
    if (nonzero < DM) begin failures++; $display("outputs mostly zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
