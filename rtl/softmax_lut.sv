// softmax_lut: scaled-dot-product scaling and lookup-table softmax.
//
// Scores arrive as a stream of (index, raw dot product q.k) pairs. Scaling by
// 1/sqrt(d_k) is a right shift: with d_k = 2**(2b) it drops b low bits
// (b = SCALE_BITS = 3 for d_k = 64). The softmax then runs in three passes
// over an internal buffer:
//   1. load:  store s_i = score_i >>> SCALE_BITS and track the maximum s_max.
//   2. exp:   e_i = EXP_LUT[min((s_max - s_i) >> LOGIT_SHIFT, 255)] and
//             sum = sum of e_i. EXP_LUT[k] = round(255 * exp(-k/16)), so one
//             table step is 1/16 and the largest score always maps to 255.
//   3. norm:  w_i = round(127 * e_i / sum), an unsigned Q0.7 weight that
//             fits the 8-bit signed input of the V crossbar.
// Subtracting the maximum keeps every table index non-negative.
//
// Interface and timing: in_valid/in_idx/in_score/in_last deliver c pairs
// (c <= N), at most one per cycle, while busy is low or the load pass is
// running. The exp pass takes c cycles after in_last, then the c results
// leave on out_valid/out_idx/out_w in c consecutive cycles, out_last marking
// the final one; busy falls with out_last. The first result appears c + 2
// cycles after the cycle of the last input, the last one 2c + 1 cycles after.
// The shift-based scaling and the use of a lookup table follow the design;
// the table contents, LOGIT_SHIFT (how many score units make one table step)
// and the three-pass schedule are this design's choices.
module softmax_lut #(
  parameter int unsigned N           = 4096,
  parameter int unsigned ACC_W       = 32,
  parameter int unsigned SCALE_BITS  = 3,
  parameter int unsigned LOGIT_SHIFT = 6,
  localparam int unsigned IW = $clog2(N),
  localparam int unsigned SW = $clog2(N * 255 + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IW-1:0]           in_idx,
  input  logic signed [ACC_W-1:0] in_score,
  input  logic                    in_last,
  output logic                    busy,
  output logic                    out_valid,
  output logic [IW-1:0]           out_idx,
  output logic [7:0]              out_w,
  output logic                    out_last
);
  typedef enum logic [1:0] {S_LOAD, S_EXP, S_NORM} state_e;

  function automatic logic [255:0][7:0] gen_lut();
    logic [255:0][7:0] t;
    for (int k = 0; k < 256; k++) t[k] = 8'($rtoi(255.0 * $exp(-real'(k) / 16.0) + 0.5));
    return t;
  endfunction
  localparam logic [255:0][7:0] EXP_LUT = gen_lut();

  state_e state;
  logic signed [ACC_W-1:0] s_buf [N];
  logic [IW-1:0]           i_buf [N];
  logic [7:0]              e_buf [N];
  logic signed [ACC_W-1:0] s_max;
  logic [SW-1:0]           sum;
  logic [IW:0]             cnt, ptr;
  logic                    loading;

  logic signed [ACC_W-1:0] s_in;
  logic [ACC_W-1:0]        diff, k_raw;
  logic [7:0]              e_cur;
  logic [SW+7:0]           num;

  assign s_in  = in_score >>> SCALE_BITS;
  assign diff  = ACC_W'(s_max - s_buf[ptr[IW-1:0]]);
  assign k_raw = diff >> LOGIT_SHIFT;
  assign e_cur = EXP_LUT[(k_raw > 255) ? 8'd255 : k_raw[7:0]];
  assign num   = (SW+8)'(e_buf[ptr[IW-1:0]]) * (SW+8)'(127) + (SW+8)'(sum >> 1);

  assign busy = loading || state != S_LOAD;

  always_ff @(posedge clk) begin
    if (in_valid && state == S_LOAD) begin
      s_buf[loading ? cnt[IW-1:0] : '0] <= s_in;
      i_buf[loading ? cnt[IW-1:0] : '0] <= in_idx;
    end
    if (state == S_EXP) e_buf[ptr[IW-1:0]] <= e_cur;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      loading   <= 1'b0;
      s_max     <= '0;
      sum       <= '0;
      cnt       <= '0;
      ptr       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_w     <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          loading <= !in_last;
          cnt     <= loading ? cnt + 1'b1 : (IW+1)'(1);
          if (!loading || s_in > s_max) s_max <= s_in;
          if (in_last) begin
            state <= S_EXP;
            ptr   <= '0;
            sum   <= '0;
          end
        end
        S_EXP: begin
          sum <= sum + SW'(e_cur);
          ptr <= ptr + 1'b1;
          if (ptr + 1'b1 == cnt) begin
            state <= S_NORM;
            ptr   <= '0;
          end
        end
        S_NORM: begin
          out_valid <= 1'b1;
          out_idx   <= i_buf[ptr[IW-1:0]];
          out_w     <= 8'(num / (SW+8)'(sum));
          ptr       <= ptr + 1'b1;
          if (ptr + 1'b1 == cnt) begin
            out_last <= 1'b1;
            state    <= S_LOAD;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
