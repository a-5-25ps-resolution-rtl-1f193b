// tag_builder: detects a trigger and forms its time tag {coarse, fine}.
//
// A trigger shows up as the first bin of delay line 0 (no offset chain) changing from
// 0 to 1 in the captured code. That cycle's capture is the one to decode: it holds how
// far the transition got between the trigger edge and the sampling clock edge. The
// next cycles show the line saturated and carry no new information. The trigger must
// go low again, and line 0 clear, before the next trigger can be seen. Detecting the
// trigger from bin 0 is this design's choice. The publication does not say how
// measurements are framed.
//
// The fine code is chosen by mode, one of the three decoders the publication compares:
//   MODE_PRIO_SINGLE  priority encoder of line 0   (latency ENC_LAT)
//   MODE_POP_SINGLE   population count of line 0   (latency ENC_LAT)
//   MODE_ECL          sum of all lines' counts     (latency ENC_LAT + ECL_LAT)
// The hit flag and the coarse count are delayed so that they line up with the slowest
// code. Single-line codes are delayed to the same point. mode should stay fixed while
// triggers arrive: it is read when the tag leaves.
// Timing: tag_valid pulses for one cycle, ENC_LAT + ECL_LAT cycles after the capture
// that first shows the trigger.
module tag_builder
  import tdc_pkg::*;
#(
  parameter int unsigned ENC_LAT = 2,
  parameter int unsigned ECL_LAT = 1,
  parameter int unsigned LINE_W  = LINE_CODE_W,
  parameter int unsigned ECL_W   = ECL_CODE_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  code_mode_e        mode,
  input  logic              first_bin,   // therm[0] of line 0
  input  logic [COARSE_W-1:0] coarse,
  input  logic [LINE_W-1:0] prio_code,   // line 0, ENC_LAT after therm
  input  logic [LINE_W-1:0] pop_code,    // line 0, ENC_LAT after therm
  input  logic [ECL_W-1:0]  ecl_code,    // ENC_LAT + ECL_LAT after therm
  output logic              tag_valid,
  output tag_t              tag
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned LAT = ENC_LAT + ECL_LAT;

  logic first_bin_q;
  logic hit;
  logic [LAT-1:0] hit_pipe;
  logic [COARSE_W-1:0] coarse_pipe [LAT];
  logic [LINE_W-1:0] prio_pipe [ECL_LAT];
  logic [LINE_W-1:0] pop_pipe  [ECL_LAT];

  // first_bin_q resets to 1 so that no hit is reported before a 0 has been seen.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      first_bin_q <= 1'b1;
      hit_pipe    <= '0;
    end else begin
      first_bin_q <= first_bin;
      hit_pipe    <= {hit_pipe[LAT-2:0], hit};
    end
  end

  assign hit = first_bin & ~first_bin_q;

  always_ff @(posedge clk) begin
    coarse_pipe[0] <= coarse;
    for (int i = 1; i < LAT; i++) coarse_pipe[i] <= coarse_pipe[i-1];
    prio_pipe[0] <= prio_code;
    pop_pipe[0]  <= pop_code;
    for (int i = 1; i < ECL_LAT; i++) begin
      prio_pipe[i] <= prio_pipe[i-1];
      pop_pipe[i]  <= pop_pipe[i-1];
    end
  end

  assign tag_valid  = hit_pipe[LAT-1];
  assign tag.coarse = coarse_pipe[LAT-1];

  always_comb begin
    unique case (mode)
      MODE_PRIO_SINGLE: tag.fine = FINE_W'(prio_pipe[ECL_LAT-1]);
      MODE_POP_SINGLE:  tag.fine = FINE_W'(pop_pipe[ECL_LAT-1]);
      default:          tag.fine = FINE_W'(ecl_code);
    endcase
  end

  initial assert (LAT >= 2 && ECL_LAT >= 1) else $error("unsupported latencies");
  initial assert (ECL_W <= FINE_W) else $error("ECL code does not fit in the tag");
endmodule
