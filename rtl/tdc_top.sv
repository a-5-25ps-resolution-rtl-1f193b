// tdc_top: time-to-digital converter that uses DSP48E1 adders as delay lines.
//
// One asynchronous trigger input (hit) is timed against the system clock (120 MHz in
// the publication). The trigger fans out to NLINES delay lines. Line i first passes
// C4_STEP*i CARRY4 blocks (offset_chain). With the default of 2 per step, each line
// starts about a quarter of a DSP later than the line before. It then ripples through NDSP chained DSP post-adders (dsp_delay_line),
// 48 bins each. Every line is captured by two flip-flop levels and inverted (bin_sync),
// then decoded by a population counter (pop_counter). The counts of all lines are
// summed (ecl_summer) into one equivalent coding line. Line 0 also has a priority
// encoder, the publication's first decoder, kept so that the three decoders can be
// compared. tag_builder spots each new trigger, takes the fine code that mode selects
// and pairs it with a coarse clock count. readout queues the tags for a byte-wide
// host link.
//
// The structure follows the publication: DSP set-up, line count and length, CARRY4
// offsets, two-level capture, population count and summing. The coarse counter, hit
// detection, tag format, mode select, pipelining and readout FIFO are this design's
// own choices. The delay line and CARRY4 are simulation models with delays. On a
// device they would be placed and constrained primitives.
//
// Fine code: the number of bins the trigger crossed before the clock edge that
// captured it. A larger code means an earlier trigger. Counting that edge as the first,
// tag_valid is high after the fifth edge (2 capture, 2 encode, 1 sum), 4 cycles later.
// The publication's second configuration, 8 lines, is NLINES = 8 with C4_STEP = 1. Its
// summed code still fits the 13-bit fine field of the tag.
module tdc_top
  import tdc_pkg::*;
#(
  parameter int unsigned NLINES = N_LINES,
  parameter int unsigned NDSP   = N_DSP,
  parameter int unsigned C4_STEP = C4_PER_STEP,   // CARRY4s added per line
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hit,        // asynchronous trigger (start) edge
  input  code_mode_e  mode,       // fine-code source, see tag_builder
  output logic        tag_valid,
  output tag_t        tag,
  output logic [7:0]  tx_data,    // byte stream to the host link
  output logic        tx_valid,
  input  logic        tx_ready,
  output logic [15:0] dropped     // tags lost to a full FIFO
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned WIDTH  = NDSP * DSP_WIDTH;
  localparam int unsigned LINE_W = $clog2(WIDTH + 1);
  localparam int unsigned ECL_W  = LINE_W + $clog2(NLINES);

  logic [WIDTH-1:0]  therm     [NLINES];
  logic [LINE_W-1:0] line_code [NLINES];
  logic [LINE_W-1:0] prio_code;
  logic [ECL_W-1:0]  ecl_code;
  logic [COARSE_W-1:0] coarse;

  for (genvar i = 0; i < NLINES; i++) begin : g_line
    logic             trig;
    logic [WIDTH-1:0] taps;
    logic             carry_out_unused;

    offset_chain #(.N_C4(C4_STEP * i)) u_offset (
      .trig_in (hit),
      .trig_out(trig)
    );
    dsp_delay_line #(.NDSP(NDSP)) u_line (
      .trig     (trig),
      .taps     (taps),
      .carry_out(carry_out_unused)
    );
    bin_sync #(.WIDTH(WIDTH)) u_sync (
      .clk  (clk),
      .taps (taps),
      .therm(therm[i])
    );
    pop_counter #(.WIDTH(WIDTH), .GROUP(DSP_WIDTH)) u_pop (
      .clk  (clk),
      .therm(therm[i]),
      .count(line_code[i])
    );
  end

  priority_encoder #(.WIDTH(WIDTH), .GROUP(DSP_WIDTH)) u_prio (
    .clk  (clk),
    .therm(therm[0]),
    .code (prio_code)
  );

  ecl_summer #(.NLINES(NLINES), .IN_W(LINE_W)) u_ecl (
    .clk      (clk),
    .line_code(line_code),
    .ecl_code (ecl_code)
  );

  coarse_counter #(.WIDTH(COARSE_W)) u_coarse (
    .clk  (clk),
    .rst_n(rst_n),
    .count(coarse)
  );

  tag_builder #(.ENC_LAT(2), .ECL_LAT(1), .LINE_W(LINE_W), .ECL_W(ECL_W)) u_tag (
    .clk      (clk),
    .rst_n    (rst_n),
    .mode     (mode),
    .first_bin(therm[0][0]),
    .coarse   (coarse),
    .prio_code(prio_code),
    .pop_code (line_code[0]),
    .ecl_code (ecl_code),
    .tag_valid(tag_valid),
    .tag      (tag)
  );

  readout #(.DEPTH(FIFO_DEPTH), .DROP_W(16)) u_readout (
    .clk      (clk),
    .rst_n    (rst_n),
    .tag_valid(tag_valid),
    .tag      (tag),
    .tx_data  (tx_data),
    .tx_valid (tx_valid),
    .tx_ready (tx_ready),
    .dropped  (dropped)
  );
endmodule
