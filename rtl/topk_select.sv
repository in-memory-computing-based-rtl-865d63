// topk_select: picks the M candidate entries with the smallest Hamming distance.
//
// After the CAM search, attention is computed only for the M keys whose
// signatures lie closest to the query's. This block finds them one per cycle:
// each cycle a binary minimum tree over all N entries returns the nearest
// candidate not yet taken (the lower index wins a tie), which is then marked
// taken. It stops after M picks or when no candidate is left, so fewer than M
// keys are returned when the sequence is shorter than M.
//
// Interface and timing:
//   start: hdist and cand (candidate mask) are sampled. One entry is picked
//   per cycle. With at least M candidates done pulses M + 1 cycles after
//   the start cycle; with c < M candidates it pulses c + 2 cycles after it
//   (one more cycle to find the tree empty). sel_mask (one bit per entry), sel_idx (in pick order,
//   nearest first) and sel_cnt stay valid until the next start.
// Selecting the m nearest keys follows the design; the iterative minimum tree
// is this design's choice.
module topk_select #(
  parameter int unsigned N      = 4096,
  parameter int unsigned DIST_W = 12,
  parameter int unsigned M      = 16,
  localparam int unsigned IW    = $clog2(N),
  localparam int unsigned CW    = $clog2(M + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [N-1:0][DIST_W-1:0]   hdist,
  input  logic [N-1:0]               cand,
  output logic                       busy,
  output logic                       done,
  output logic [N-1:0]               sel_mask,
  output logic [M-1:0][IW-1:0]       sel_idx,
  output logic [CW-1:0]              sel_cnt
);
  logic [N-1:0][DIST_W-1:0] d_q;
  logic [N-1:0]             left;    // candidates not yet taken

  // Heap-ordered minimum tree: node k has children 2k and 2k+1, leaves N..2N-1.
  logic [DIST_W-1:0] t_val [2*N];
  logic [IW-1:0]     t_idx [2*N];
  logic              t_ok  [2*N];

  initial begin
    assert ((N & (N - 1)) == 0) else $error("N must be a power of two");
  end

  always_comb begin
    for (int e = 0; e < int'(N); e++) begin
      t_val[N + e] = d_q[e];
      t_idx[N + e] = IW'(e);
      t_ok [N + e] = left[e];
    end
    t_val[0] = '0;
    t_idx[0] = '0;
    t_ok [0] = 1'b0;
    for (int k = int'(N) - 1; k >= 1; k--) begin
      if (t_ok[2*k] && (!t_ok[2*k+1] || t_val[2*k] <= t_val[2*k+1])) begin
        t_val[k] = t_val[2*k];
        t_idx[k] = t_idx[2*k];
      end else begin
        t_val[k] = t_val[2*k+1];
        t_idx[k] = t_idx[2*k+1];
      end
      t_ok[k] = t_ok[2*k] || t_ok[2*k+1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      d_q      <= '0;
      left     <= '0;
      sel_mask <= '0;
      sel_idx  <= '0;
      sel_cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          d_q      <= hdist;
          left     <= cand;
          sel_mask <= '0;
          sel_idx  <= '0;
          sel_cnt  <= '0;
        end
      end else if (!t_ok[1] || int'(sel_cnt) == M) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        left[t_idx[1]]     <= 1'b0;
        sel_mask[t_idx[1]] <= 1'b1;
        sel_idx[sel_cnt]   <= t_idx[1];
        sel_cnt            <= sel_cnt + 1'b1;
        if (int'(sel_cnt) == M - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
