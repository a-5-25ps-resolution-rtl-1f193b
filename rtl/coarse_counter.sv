// coarse_counter: free-running count of system clock cycles.
//
// The fine code measures time within one clock period. The coarse count says which
// period it was. A tag's time is coarse * T_clk minus the fine code's delay, because
// the fine code measures from the trigger to the next clock edge. The publication names
// a coarse counter but does not describe it. The width, the wrap-around and the
// synchronous active-low reset to zero are this design's choices.
module coarse_counter #(
  parameter int unsigned WIDTH = tdc_pkg::COARSE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else        count <= count + WIDTH'(1);
  end
endmodule
