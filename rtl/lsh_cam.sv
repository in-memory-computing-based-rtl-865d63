// lsh_cam: ternary CAM of key signatures with a parallel Hamming-distance search.
//
// Each of the N entries holds a SIG_BITS-bit LSH signature of one cached key
// and a care mask: a bit whose care bit is 0 stores "don't care" and always
// matches. A search compares the query signature with every entry at once
// and returns, per entry (hdist), the number of mismatching cared-for bits (the
// Hamming distance). Entries whose valid bit is low in the search (not yet
// written, beyond the sequence, or masked out by causality) report the
// largest distance, 2**DIST_W - 1, which no real entry can reach.
//
// Interface and timing:
//   wr_en: store wr_data/wr_care at entry wr_idx; one cycle.
//   search: key and valid are sampled; done pulses in the next cycle with
//   hdist valid from then until the next search.
// The ternary storage and Hamming search follow the design; the one-cycle
// search and the distance code for invalid entries are this design's choices.
module lsh_cam #(
  parameter int unsigned N        = 4096,
  parameter int unsigned SIG_BITS = 1024,
  localparam int unsigned DIST_W  = $clog2(SIG_BITS + 1) + 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [$clog2(N)-1:0]        wr_idx,
  input  logic [SIG_BITS-1:0]         wr_data,
  input  logic [SIG_BITS-1:0]         wr_care,
  input  logic                        search,
  input  logic [SIG_BITS-1:0]         key,
  input  logic [N-1:0]                valid,
  output logic                        done,
  output logic [N-1:0][DIST_W-1:0]    hdist
);
  logic [SIG_BITS-1:0] data_mem [N];
  logic [SIG_BITS-1:0] care_mem [N];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      data_mem[wr_idx] <= wr_data;
      care_mem[wr_idx] <= wr_care;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      hdist <= '0;
    end else begin
      done <= search;
      if (search)
        for (int e = 0; e < int'(N); e++)
          hdist[e] <= valid[e] ? DIST_W'($countones((data_mem[e] ^ key) & care_mem[e]))
                              : {DIST_W{1'b1}};
    end
  end

endmodule
