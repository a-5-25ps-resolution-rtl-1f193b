// pop_counter: number of set bins of a captured line.
//
// The publication's fix for out-of-order bins. The number of bins the trigger has passed
// only grows as the trigger-to-clock time grows, even when two neighbouring bins switch
// in the wrong order. So counting the ones gives a monotonic code with no missing
// values. Two pipeline stages, a choice of this design for a 120 MHz clock. Stage 1
// counts each group of GROUP bins (one DSP). Stage 2 adds the group counts.
// Latency: 2 clock cycles from therm to count.
module pop_counter #(
  parameter int unsigned WIDTH = tdc_pkg::N_BINS,
  parameter int unsigned GROUP = tdc_pkg::DSP_WIDTH,
  localparam int unsigned CODE_W = $clog2(WIDTH + 1)
) (
  input  logic              clk,
  input  logic [WIDTH-1:0]  therm,
  output logic [CODE_W-1:0] count
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NGRP = WIDTH / GROUP;
  localparam int unsigned GRP_W = $clog2(GROUP + 1);

  logic [GRP_W-1:0] grp_cnt [NGRP];

  always_ff @(posedge clk) begin
    for (int g = 0; g < NGRP; g++) begin
      logic [GRP_W-1:0] acc;
      acc = '0;
      for (int b = 0; b < GROUP; b++) acc += GRP_W'(therm[g*GROUP + b]);
      grp_cnt[g] <= acc;
    end
  end

  always_ff @(posedge clk) begin
    logic [CODE_W-1:0] sum;
    sum = '0;
    for (int g = 0; g < NGRP; g++) sum += CODE_W'(grp_cnt[g]);
    count <= sum;
  end

  initial assert (WIDTH % GROUP == 0) else $error("WIDTH must be a multiple of GROUP");
endmodule
