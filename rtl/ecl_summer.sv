// ecl_summer: adds the population counts of the offset delay lines.
//
// The lines start a fraction of a DSP apart. While one line crosses its fine bins, the
// others sit inside their large last bin. The sum therefore keeps the fine steps of
// whichever line is moving. It forms one equivalent coding line with NLINES times the
// codes of a single line. This is the publication's method. Summing in one registered
// adder is this design's choice.
// Latency: 1 clock cycle.
module ecl_summer #(
  parameter int unsigned NLINES = tdc_pkg::N_LINES,
  parameter int unsigned IN_W   = tdc_pkg::LINE_CODE_W,
  localparam int unsigned OUT_W = IN_W + $clog2(NLINES)
) (
  input  logic             clk,
  input  logic [IN_W-1:0]  line_code [NLINES],
  output logic [OUT_W-1:0] ecl_code
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) begin
    logic [OUT_W-1:0] sum;
    sum = '0;
    for (int i = 0; i < NLINES; i++) sum += OUT_W'(line_code[i]);
    ecl_code <= sum;
  end
endmodule
