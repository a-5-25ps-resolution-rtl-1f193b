// dsp_delay_line: N_DSP DSP48E1 post-adders chained into one tapped delay line.
//
// Each DSP is set up the same way: X = 0, Y = all ones, Z = 0 and ALUMODE = add. The
// first DSP takes its carry from the fabric (CARRYINSEL = CARRYIN). That carry is the
// trigger, already offset by the line's CARRY4 chain. Every later DSP takes the carry
// cascade of the one before (CARRYINSEL = CARRYCASCIN). A rising trigger clears the
// bins one after another. Tap 48*d + k is bit k of the P output of DSP d.
// The outputs are asynchronous: no DSP pipeline register is used, as the publication
// requires, because the P register would also hold the carry. The capture flip-flops
// sit in the fabric (bin_sync). With the publication's 20 DSPs the line spans about
// 11 ns, which covers one 8.33 ns period of the 120 MHz clock.
//
// Interface: trig in, taps out (active low while the transition passes: a bin reads 0
// once the trigger has reached it), carry_out = carry cascade of the last DSP.
module dsp_delay_line
  import tdc_pkg::*;
#(
  parameter int unsigned NDSP           = N_DSP,
  parameter bit          LOOKAHEAD_SWAP = 1'b1
) (
  input  logic                     trig,
  output logic [NDSP*DSP_WIDTH-1:0] taps,
  output logic                     carry_out
);
  timeunit 1ps; timeprecision 1fs;

  // OPMODE = Z:000 (0), Y:10 (all ones), X:00 (0)
  localparam logic [6:0] OPMODE_ONES = 7'b000_10_00;
  localparam logic [3:0] ALUMODE_ADD = 4'b0000;
  localparam logic [2:0] CINSEL_FABRIC = 3'b000;
  localparam logic [2:0] CINSEL_CASC   = 3'b010;

  logic [NDSP:0] carry;
  assign carry[0]  = trig;
  assign carry_out = carry[NDSP];

  for (genvar d = 0; d < NDSP; d++) begin : g_dsp
    dsp48e1_adder #(.LOOKAHEAD_SWAP(LOOKAHEAD_SWAP)) u_dsp (
      .ab          ('0),
      .c           ('0),
      .opmode      (OPMODE_ONES),
      .alumode     (ALUMODE_ADD),
      .carryinsel  (d == 0 ? CINSEL_FABRIC : CINSEL_CASC),
      .carryin     (d == 0 ? carry[0] : 1'b0),
      .carrycascin (d == 0 ? 1'b0 : carry[d]),
      .p           (taps[d*DSP_WIDTH +: DSP_WIDTH]),
      .carrycascout(carry[d+1])
    );
  end
endmodule
