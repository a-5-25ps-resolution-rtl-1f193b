// dsp_delay_line_tb: checks a chain of 20 DSP models as one delay line.
// After a rising trigger, at a random moment t, tap 48*d + k must read 0 exactly when
// d*553 ps + 5.21 ps * rank(k) < t, with rank order 0,2,1,3 in each group of four.
// The carry out of the last DSP must rise at 20*553 ps, and a falling trigger must
// set every tap back to 1.
module dsp_delay_line_tb;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int ND = 20;
  localparam int W = ND * 48;
  int checks = 0, failures = 0;
  logic trig = 1'b0;
  logic [W-1:0] taps;
  logic carry_out;

  dsp_delay_line #(.NDSP(ND)) dut (.trig(trig), .taps(taps), .carry_out(carry_out));

  localparam int GROUP_RANK [4] = '{0, 2, 1, 3};
  function automatic realtime arrival(int b);
    int d = b / 48, k = b % 48;
    return 553.0 * d + 5.21 * real'((k / 4) * 4 + GROUP_RANK[k % 4]);
  endfunction

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000;
    checks++; if (taps != '1) begin failures++; $display("FAIL idle taps"); end
    for (int n = 0; n < 300; n++) begin
      realtime t;
      int bad;
      t = real'($urandom_range(0, 12_000_000)) / 1000.0;  // 0..12 ns in fs steps
      trig = 1'b1;
      #(t);
      bad = 0;
      for (int b = 0; b < W; b++) begin
        automatic realtime a = arrival(b);
        if (a < t - 0.001 && taps[b] != 1'b0) bad++;
        if (a > t + 0.001 && taps[b] != 1'b1) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL t=%0.3f ps: %0d taps wrong", t, bad); end
      trig = 1'b0;
      #15_000;
      checks++; if (taps != '1) begin failures++; $display("FAIL taps not restored"); end
    end
    trig = 1'b1;
    #(553.0 * ND - 1.0);
    checks++; if (carry_out != 1'b0) begin failures++; $display("FAIL carry out early"); end
    #2.0;
    checks++; if (carry_out != 1'b1) begin failures++; $display("FAIL carry out late"); end
    checks++; if (taps != '0) begin failures++; $display("FAIL line not fully cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
