// carry4: behavioural model of the 7-series CARRY4 fabric carry element, for simulation only.
//
// Logic, as in the vendor primitive: the carry into stage 0 is CI | CYINIT. Stage k
// passes the carry when S[k] = 1 and takes DI[k] otherwise. O[k] = S[k] ^ carry into k.
// The TDC uses the element only as a short delay: S = 1111, so CO[3] follows CI.
// Each stage adds STAGE_PS. The publication's average for a whole CARRY4 is 65 ps, so a
// stage gets a quarter of that; the even split is this model's assumption.
module carry4
  import tdc_pkg::*;
#(
  parameter realtime STAGE_PS = CARRY4_DELAY_PS / 4.0
) (
  input  logic       ci,
  input  logic       cyinit,
  input  logic [3:0] di,
  input  logic [3:0] s,
  output logic [3:0] o,
  output logic [3:0] co
);
  timeunit 1ps; timeprecision 1fs;

  logic [4:0] cy;     // cy[k] = carry into stage k
  logic [3:0] cy_nxt;

  assign cy[0] = ci | cyinit;
  for (genvar k = 0; k < 4; k++) begin : g_stage
    assign cy_nxt[k] = s[k] ? cy[k] : di[k];
    assign #(STAGE_PS) cy[k+1] = cy_nxt[k];
    assign o[k]  = s[k] ^ cy[k];
    assign co[k] = cy[k+1];
  end
endmodule
