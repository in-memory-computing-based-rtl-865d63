// tb_softmax_lut: self-checking test of the scaling and table softmax.
// Streams random score vectors of several lengths (with random indices) and
// compares each weight with round(127 * e_i / sum e) where
// e_i = round(255 * exp(-min((s_max - s_i) >> LOGIT_SHIFT, 255) / 16)) and
// s = score >>> 3, computed here with real arithmetic. It also checks that
// the weights leave in input order, that out_last marks the final one, that
// the first result comes c + 2 cycles after the last input, and that the
// weights sum to about 127.
module tb_softmax_lut;
  localparam int N = 64, AW = 32, SB = 3, LS = 6, IW = $clog2(N);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_last = 0, busy, out_valid, out_last;
  logic [IW-1:0] in_idx = '0, out_idx;
  logic signed [AW-1:0] in_score = '0;
  logic [7:0] out_w;

  int checks = 0, failures = 0;

  softmax_lut #(.N(N), .ACC_W(AW), .SCALE_BITS(SB), .LOGIT_SHIFT(LS)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [6] = '{1, 2, 7, 16, 33, 64};
    int sc [N], ix [N], ev [N];
    int c, smax, sum, k, got, tot, wait_c;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (lens[r]) begin
      c = lens[r];
      for (int i = 0; i < c; i++) begin
        sc[i] = int'($urandom_range(40000)) - 20000;
        ix[i] = int'($urandom_range(N - 1));
      end
      // reference
      smax = -2147483647;
      for (int i = 0; i < c; i++) if ((sc[i] >>> SB) > smax) smax = sc[i] >>> SB;
      sum = 0;
      for (int i = 0; i < c; i++) begin
        k = (smax - (sc[i] >>> SB)) >> LS;
        if (k > 255) k = 255;
        ev[i] = int'($rtoi(255.0 * $exp(-real'(k) / 16.0) + 0.5));
        sum += ev[i];
      end
      for (int i = 0; i < c; i++) begin
        @(negedge clk);
        in_valid = 1; in_idx = IW'(ix[i]); in_score = sc[i]; in_last = (i == c - 1);
      end
      @(negedge clk) begin in_valid = 0; in_last = 0; end
      wait_c = 1;
      while (!out_valid) begin @(negedge clk); wait_c++; end
      checks++;
      if (wait_c != c + 2) begin failures++; $display("first result after %0d cycles, exp %0d", wait_c, c + 2); end
      tot = 0;
      for (int i = 0; i < c; i++) begin
        got = int'(out_w);
        tot += got;
        checks++;
        if (!out_valid || int'(out_idx) != ix[i] || got != (ev[i] * 127 + sum / 2) / sum ||
            out_last != (i == c - 1)) begin
          failures++;
          if (failures < 10) $display("len %0d item %0d: idx %0d/%0d w %0d exp %0d", c, i,
                                      out_idx, ix[i], got, (ev[i] * 127 + sum / 2) / sum);
        end
        @(negedge clk);
      end
      checks++;
      if (tot < 127 - c || tot > 127 + c) begin failures++; $display("weights sum to %0d", tot); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
