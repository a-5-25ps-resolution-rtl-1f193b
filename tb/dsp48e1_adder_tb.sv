// dsp48e1_adder_tb: checks the DSP48E1 post-adder model.
// After a settling time (the model starts from random values):
// Part 1, arithmetic: with X = A:B, Y = C or all ones, Z = C or 0, the settled P and
// carry match sums worked out here, for add and subtract modes and both carry sources.
// Part 2, timing: in the TDC set-up (X = Z = 0, Y = ones) a rising fabric carry must
// clear P bit k after 5.21 ps times its rank. The rank order is 0,2,1,3 in each group
// of four. The carry cascade must rise after 553 ps. P is sampled half a bin before
// and after each expected moment.
module dsp48e1_adder_tb;
  timeunit 1ps; timeprecision 1fs;

  int checks = 0, failures = 0;
  logic [47:0] ab, c, p;
  logic [6:0]  opmode;
  logic [3:0]  alumode;
  logic [2:0]  carryinsel;
  logic        carryin, carrycascin, carrycascout;

  dsp48e1_adder dut (.*);

  localparam realtime BIN = 5.21;
  localparam realtime DSPD = 553.0;
  localparam int GROUP_RANK [4] = '{0, 2, 1, 3};

  function automatic realtime arrival(int k);
    return BIN * real'((k / 4) * 4 + GROUP_RANK[k % 4]);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [48:0] exp_r;
    // ---- arithmetic ----
    ab = '0; c = '0; opmode = '0; alumode = '0; carryinsel = '0; carryin = 0; carrycascin = 0;
    #2000;  // let the model's first ripple settle
    for (int n = 0; n < 200; n++) begin
      logic cin_bit;
      ab = 48'({$urandom, $urandom});
      c  = 48'({$urandom, $urandom});
      carryin = $urandom_range(0, 1);
      carrycascin = $urandom_range(0, 1);
      carryinsel = ($urandom_range(0, 1) == 1) ? 3'b010 : 3'b000;
      cin_bit = (carryinsel == 3'b010) ? carrycascin : carryin;
      unique case (n % 3)
        0: begin opmode = 7'b011_00_11; alumode = 4'b0000;  // C + A:B + cin
             exp_r = {1'b0, c} + {1'b0, ab} + 49'(cin_bit); end
        1: begin opmode = 7'b000_10_11; alumode = 4'b0000;  // ones + A:B + cin
             exp_r = {1'b0, 48'hFFFF_FFFF_FFFF} + {1'b0, ab} + 49'(cin_bit); end
        default: begin opmode = 7'b011_00_11; alumode = 4'b0011;  // C - (A:B + cin)
             exp_r = {1'b0, c} - ({1'b0, ab} + 49'(cin_bit)); end
      endcase
      #1000;
      check(p == exp_r[47:0], $sformatf("arith P %h exp %h", p, exp_r[47:0]));
      check(carrycascout == exp_r[48], "arith carry out");
    end

    // ---- delay-line timing ----
    ab = '0; c = '0; opmode = 7'b000_10_00; alumode = 4'b0000; carryinsel = 3'b000;
    carrycascin = 1'b0; carryin = 1'b0;
    #2000;
    check(p == '1 && carrycascout == 1'b0, "idle state all ones");
    for (int k = 0; k < 48; k++) begin
      carryin = 1'b0; #2000;
      carryin = 1'b1;
      #(arrival(k) + BIN / 2);
      // bits whose arrival is before now are cleared, the rest still set
      for (int j = 0; j < 48; j++)
        check(p[j] == (arrival(j) > arrival(k)), $sformatf("bit %0d after arrival of %0d", j, k));
    end
    carryin = 1'b0; #2000;
    carryin = 1'b1;
    #(DSPD - 1.0);
    check(carrycascout == 1'b0, "carry cascade not before 553 ps");
    #2.0;
    check(carrycascout == 1'b1, "carry cascade by 553 ps");
    carryin = 1'b0;
    #(DSPD + 1.0);
    check(carrycascout == 1'b0 && p == '1, "falling carry restores idle state");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
