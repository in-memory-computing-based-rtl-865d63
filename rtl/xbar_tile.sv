// xbar_tile: one 64x64 SRAM crossbar with 8-bit weights and shared ADC readout.
//
// The tile stores a matrix M of LINES x INS signed 8-bit weights and computes
// y = M * x, one output per line. In the matrix view used throughout this
// design a "line" is a matrix row, i.e. one output; an input is a matrix
// column. Lines whose line_en bit is low are switched off and read as zero:
// this is how causal masking and LSH key selection turn off rows of the K
// cache.
//
// Readout: one ADC serves ADC_SHARE neighbouring lines, so the LINES outputs
// are converted in ADC_SHARE steps. In step k every ADC j converts line
// j*ADC_SHARE + k. The ADCs are modelled as exact converters (their range and
// transfer function are not part of this design), so the outputs are the
// exact signed sums.
//
// Interface and timing:
//   wr_row_en: write a whole line (INS weights) at wr_row_idx; one cycle.
//   wr_col_en: write one input column (LINES weights) at wr_col_idx; one cycle.
//   start: x and line_en are captured; y is filled over the next ADC_SHARE
//   cycles and done pulses in the cycle after the last conversion, so done
//   follows start by ADC_SHARE cycles. start is ignored while busy.
//   Writes while busy are allowed and take effect on later conversions.
// The tile size, weight width and ADC sharing follow the design; the
// row/column write ports and the exact-ADC model are this design's choices.
module xbar_tile #(
  parameter int unsigned LINES     = 64,
  parameter int unsigned INS       = 64,
  parameter int unsigned DW        = 8,
  parameter int unsigned ADC_SHARE = 8,
  parameter int unsigned ACC_W     = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           wr_row_en,
  input  logic [$clog2(LINES)-1:0]       wr_row_idx,
  input  logic signed [INS-1:0][DW-1:0]  wr_row_data,
  input  logic                           wr_col_en,
  input  logic [$clog2(INS)-1:0]         wr_col_idx,
  input  logic signed [LINES-1:0][DW-1:0] wr_col_data,
  input  logic                           start,
  input  logic signed [INS-1:0][DW-1:0]  x,
  input  logic [LINES-1:0]               line_en,
  output logic                           busy,
  output logic                           done,
  output logic signed [LINES-1:0][ACC_W-1:0] y
);
  localparam int unsigned NADC = LINES / ADC_SHARE;
  localparam int unsigned SW   = (ADC_SHARE > 1) ? $clog2(ADC_SHARE) : 1;

  logic signed [INS-1:0][DW-1:0] mem [LINES];
  logic signed [INS-1:0][DW-1:0] x_q;
  logic [LINES-1:0] en_q;
  logic [SW-1:0]    step;

  initial begin
    assert (LINES % ADC_SHARE == 0) else $error("LINES must be a multiple of ADC_SHARE");
  end

  // SRAM array: line writes and column writes.
  always_ff @(posedge clk) begin
    if (wr_row_en) mem[wr_row_idx] <= wr_row_data;
    if (wr_col_en)
      for (int l = 0; l < LINES; l++) mem[l][wr_col_idx] <= wr_col_data[l];
  end

  // The lines converted in this step, as the ADCs see them: one flat loop
  // over all (ADC, input) pairs.
  logic signed [NADC-1:0][ACC_W-1:0] conv;
  always_comb begin
    conv = '0;
    for (int k = 0; k < int'(NADC * INS); k++) begin
      int unsigned j, c;
      j = k / INS;
      c = k % INS;
      conv[j] += ACC_W'($signed(mem[j * ADC_SHARE + int'(step)][c])) * ACC_W'($signed(x_q[c]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      step <= '0;
      x_q  <= '0;
      en_q <= '0;
      y    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          step <= '0;
          x_q  <= x;
          en_q <= line_en;
        end
      end else begin
        for (int j = 0; j < NADC; j++) begin
          int unsigned l;
          l = j * ADC_SHARE + int'(step);
          y[l] <= en_q[l] ? conv[j] : '0;
        end
        if (int'(step) == ADC_SHARE - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        step <= step + 1'b1;
      end
    end
  end

endmodule
