// bin_sync: captures the asynchronous taps of one delay line and inverts them.
//
// Each tap goes through two levels of fabric flip-flops, clocked by the system clock.
// The first level samples the moving transition. The second gives a metastable first
// stage a full cycle to settle. The publication places both levels next to the DSPs. The
// taps read 0 once the trigger has passed them, so the second level is inverted: bit i
// of therm is 1 when the trigger had reached bin i at the sampling edge. The pattern
// is a thermometer code with some bins out of order.
// Timing: therm shows the taps sampled two clock edges earlier. No reset: the
// registers reload from the taps on every edge.
module bin_sync #(
  parameter int unsigned WIDTH = tdc_pkg::N_BINS
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] taps,   // asynchronous, active low
  output logic [WIDTH-1:0] therm   // synchronous, active high
);
  timeunit 1ps; timeprecision 1fs;

  logic [WIDTH-1:0] stage1, stage2;

  always_ff @(posedge clk) begin
    stage1 <= taps;
    stage2 <= stage1;
  end

  assign therm = ~stage2;
endmodule
