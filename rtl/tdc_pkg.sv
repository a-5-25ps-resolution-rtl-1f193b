// tdc_pkg: types and constants shared by the DSP-based time-to-digital converter.
//
// The converter samples 4 parallel delay lines. Each line is 20 DSP48E1 post-adders
// chained by their carry cascade, so it has 20 x 48 = 960 bins. Before each line sits
// a chain of CARRY4 blocks: line i gets 2*i CARRY4s, which offsets it by about a quarter
// of one DSP. The line count, DSP count, DSP width and the 120 MHz clock come from the
// publication. The code widths follow from them. The coarse-counter width, the tag layout
// and the readout byte order are this design's own choices.
package tdc_pkg;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned N_LINES   = 4;    // parallel offset delay lines
  localparam int unsigned N_DSP     = 20;   // DSP48E1 blocks per delay line
  localparam int unsigned DSP_WIDTH = 48;   // post-adder width = bins per DSP
  localparam int unsigned N_BINS    = N_DSP * DSP_WIDTH;  // 960 bins per line
  localparam int unsigned C4_PER_STEP = 2;  // CARRY4 blocks added per line offset step

  // Code of one line: 0..N_BINS needs 10 bits. Sum of 4 lines: 0..3840 needs 12 bits.
  localparam int unsigned LINE_CODE_W = $clog2(N_BINS + 1);
  localparam int unsigned ECL_CODE_W  = $clog2(N_LINES * N_BINS + 1);

  localparam int unsigned COARSE_W = 19;    // coarse clock-cycle count in a tag
  localparam int unsigned TAG_W    = 32;    // tag = {coarse, fine code}
  localparam int unsigned FINE_W   = TAG_W - COARSE_W;  // 13 bits: holds the sum of up to 8 lines

  // How the fine code of a tag is formed; the three encodings the publication compares.
  typedef enum logic [1:0] {
    MODE_PRIO_SINGLE = 2'd0,  // priority encoder on delay line 0
    MODE_POP_SINGLE  = 2'd1,  // population count of delay line 0
    MODE_ECL         = 2'd2   // sum of the population counts of all lines
  } code_mode_e;

  typedef struct packed {
    logic [COARSE_W-1:0] coarse;  // clock cycle in which the trigger was sampled
    logic [FINE_W-1:0]   fine;    // bins between the trigger edge and that clock edge
  } tag_t;

  // Nominal delays of the behavioural models, in ps (publication's averages).
  localparam realtime DSP_SMALL_BIN_PS = 5.21;   // one of the 47 small bins
  localparam realtime DSP_DELAY_PS     = 553.0;  // carry-in to carry-cascade-out
  localparam realtime CARRY4_DELAY_PS  = 65.0;   // one CARRY4, CI to CO[3]
endpackage
