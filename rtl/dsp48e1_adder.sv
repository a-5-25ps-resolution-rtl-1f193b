// dsp48e1_adder: behavioural model of the post-adder of one DSP48E1, for simulation only.
//
// The TDC uses the DSP48E1 adder as a 48-bin delay line. With every pipeline register
// bypassed, X = 0 and Z = 0 and Y = the hard-wired all-ones word, the result is
// all ones + carry-in. A rising carry-in turns P from all ones into all zeros. It also
// raises the carry-cascade output, which feeds the carry input of the next DSP.
// The moments at which the P bits flip form the bins of the converter.
//
// The model computes the adder result with no delay. It then delays each P bit and the
// carry-cascade output by its own propagation time, in one process that walks the bits
// in order (a transition must not come back within one DSP delay, 553 ps):
//   * bit k flips SMALL_BIN_PS * rank(k) after the carry input (47 small bins, 5.21 ps avg);
//   * CARRYCASCOUT follows DSP_DELAY_PS after the carry input (553 ps avg), so the last
//     bin of each DSP, from P[47] to the next DSP's P[0], is the large one (~308 ps).
// The publication reports "out-of-order" bins: the capture flip-flop of bin i+1 can see its
// transition before bin i does. The model reproduces this with the carry-lookahead
// groups of 4 bits. When LOOKAHEAD_SWAP is set, the middle two bits of each group
// switch arrival order (rank 0,2,1,3). A priority encoder then never reports the
// second bit of a group, while a population count still does.
//
// The mux and mode decoding below follows the DSP48E1 user guide for the settings
// the TDC needs:
//   X: OPMODE[1:0] 00 = 0, 11 = A:B      Y: OPMODE[3:2] 00 = 0, 10 = all ones, 11 = C
//   Z: OPMODE[6:4] 000 = 0, 011 = C      ALUMODE 0000 = Z+X+Y+CIN, 0011 = Z-(X+Y+CIN)
//   CARRYINSEL 000 = CARRYIN (fabric), 010 = CARRYCASCIN (previous DSP)
// Multiplier paths, P feedback, the pattern detector, SIMD and logic modes are not
// modelled: those settings select 0 or give a zero result. The delay figures are the
// publication's averages. The per-bit profile within a group is this model's assumption.
module dsp48e1_adder
  import tdc_pkg::*;
#(
  parameter realtime SMALL_BIN_PS   = DSP_SMALL_BIN_PS,
  parameter realtime DSP_DELAY      = DSP_DELAY_PS,
  parameter bit      LOOKAHEAD_SWAP = 1'b1
) (
  input  logic [47:0] ab,           // A:B concatenation (X mux input)
  input  logic [47:0] c,            // C port (Y or Z mux input)
  input  logic [6:0]  opmode,
  input  logic [3:0]  alumode,
  input  logic [2:0]  carryinsel,
  input  logic        carryin,      // carry from the general fabric
  input  logic        carrycascin,  // carry cascade from the previous DSP
  output logic [47:0] p,            // adder result, P register bypassed
  output logic        carrycascout  // carry cascade to the next DSP
);
  timeunit 1ps; timeprecision 1fs;

  logic [47:0] x_mux, y_mux, z_mux;
  logic        cin;
  logic [48:0] result;

  always_comb begin
    unique case (opmode[1:0])
      2'b11:   x_mux = ab;
      default: x_mux = '0;
    endcase
    unique case (opmode[3:2])
      2'b10:   y_mux = '1;
      2'b11:   y_mux = c;
      default: y_mux = '0;
    endcase
    unique case (opmode[6:4])
      3'b011:  z_mux = c;
      default: z_mux = '0;
    endcase
    unique case (carryinsel)
      3'b000:  cin = carryin;
      3'b010:  cin = carrycascin;
      default: cin = 1'b0;
    endcase
    unique case (alumode)
      4'b0000: result = {1'b0, z_mux} + {1'b0, x_mux} + {1'b0, y_mux} + 49'(cin);
      4'b0011: result = {1'b0, z_mux} - ({1'b0, x_mux} + {1'b0, y_mux} + 49'(cin));
      default: result = '0;
    endcase
  end

  // Propagation of each result bit. rank() gives the order in which the bits flip.
  function automatic int unsigned rank(int unsigned k);
    int unsigned pos = k % 4;
    if (LOOKAHEAD_SWAP && pos == 1) return k + 1;
    if (LOOKAHEAD_SWAP && pos == 2) return k - 1;
    return k;
  endfunction

  // The carry ripple: whenever the result changes, walk through the bits in arrival
  // order, one small bin apart, then pass the carry on. A change that arrives during a
  // walk is applied once that walk has ended.
  logic [48:0] walked;
  always begin
    walked = result;
    for (int unsigned n = 0; n < 48; n++) begin
      if (n != 0) #(SMALL_BIN_PS);
      p[rank(n)] = walked[rank(n)];   // rank() is its own inverse
    end
    #(DSP_DELAY - SMALL_BIN_PS * 47.0);
    carrycascout = walked[48];
    if (result == walked) @(result);
  end
endmodule
