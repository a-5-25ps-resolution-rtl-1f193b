// priority_encoder: position of the most significant set bin of a captured line.
//
// This is the simple decoder that the publication tries first. It reports how far the
// transition got by the highest bin that reads 1. When the capture flip-flop of bin
// i+1 switches before that of bin i, the code for bin i can never appear. Those are
// the missing bins that the population counter (pop_counter) removes.
// The output is the index of the highest set bit plus one, so that k set bins in
// order give code k, the same scale as the population count; 0 means no bin is set.
// The +1 offset is this design's choice.
// Two pipeline stages, so that it meets a 120 MHz clock across 960 bins. Stage 1
// finds, per group of GROUP bins (one DSP), whether any bin is set and the highest one.
// Stage 2 picks the highest group that has a set bin.
// Latency: 2 clock cycles from therm to code.
module priority_encoder #(
  parameter int unsigned WIDTH = tdc_pkg::N_BINS,
  parameter int unsigned GROUP = tdc_pkg::DSP_WIDTH,
  localparam int unsigned CODE_W = $clog2(WIDTH + 1)
) (
  input  logic              clk,
  input  logic [WIDTH-1:0]  therm,
  output logic [CODE_W-1:0] code
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned NGRP = WIDTH / GROUP;
  localparam int unsigned POS_W = $clog2(GROUP);

  logic [NGRP-1:0]  grp_any;
  logic [POS_W-1:0] grp_pos [NGRP];

  always_ff @(posedge clk) begin
    for (int g = 0; g < NGRP; g++) begin
      grp_any[g] <= |therm[g*GROUP +: GROUP];
      grp_pos[g] <= '0;
      for (int b = 0; b < GROUP; b++)
        if (therm[g*GROUP + b]) grp_pos[g] <= POS_W'(b);
    end
  end

  always_ff @(posedge clk) begin
    code <= '0;
    for (int g = 0; g < NGRP; g++)
      if (grp_any[g]) code <= CODE_W'(g * GROUP) + CODE_W'(grp_pos[g]) + CODE_W'(1);
  end

  initial assert (WIDTH % GROUP == 0) else $error("WIDTH must be a multiple of GROUP");
endmodule
