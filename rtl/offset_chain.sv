// offset_chain: a chain of N_C4 CARRY4 blocks that delays one delay line's trigger.
//
// To split the large last bin of every DSP, the delay lines are started at slightly
// different times. Line i is preceded by 2*i CARRY4 blocks, about 130 ps per step at
// the publication's 65 ps per CARRY4, close to a quarter of the 553 ps DSP. Each CARRY4 is
// set to propagate (S = 1111, DI = 0). Its CO[3] feeds the CI of the next. With N_C4 = 0
// the trigger passes unchanged.
// Its only effect is delay. A synthesis run that ignores the models' delays reduces
// the chain to a wire; on a device the CARRY4 primitives must be kept and placed.
module offset_chain #(
  parameter int unsigned N_C4 = 2
) (
  input  logic trig_in,
  output logic trig_out
);
  timeunit 1ps; timeprecision 1fs;

  logic [N_C4:0] chain;
  assign chain[0] = trig_in;

  for (genvar i = 0; i < N_C4; i++) begin : g_c4
    logic [3:0] o_unused, co;
    carry4 u_c4 (
      .ci    (chain[i]),
      .cyinit(1'b0),
      .di    (4'b0000),
      .s     (4'b1111),
      .o     (o_unused),
      .co    (co)
    );
    assign chain[i+1] = co[3];
  end

  assign trig_out = chain[N_C4];
endmodule
