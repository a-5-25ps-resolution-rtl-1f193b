// tag_builder_tb: drives the first-bin signal and the three code inputs with the
// latencies of the real encoders (codes for capture n arrive 2 cycles later, the ECL
// code 3 cycles later). Each capture's codes are random and distinct. For each rising
// first_bin, one tag_valid pulse must appear exactly 3 cycles later. It must carry the
// coarse count of the detection cycle and the code that mode selects from that same
// capture. No tag may appear for a first_bin that stays high or before a 0 was seen
// after reset.
module tag_builder_tb;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  code_mode_e mode;
  logic first_bin;
  logic [COARSE_W-1:0] coarse;
  logic [9:0] prio_code, pop_code;
  logic [11:0] ecl_code;
  logic tag_valid;
  tag_t tag;

  tag_builder dut (.*);

  always #4166.667 clk = ~clk;

  // history of what was driven in each cycle, index = cycle number
  logic        fb_h   [int];
  int          prio_h [int], pop_h [int], ecl_h [int], coarse_h [int];
  int cyc = 0;
  int n_tags = 0, n_exp = 0;
  int mode_used [3] = '{0, 0, 0};

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_ECL;
    first_bin = 1'b1;  // high out of reset: must not count as a trigger
    prio_code = '0; pop_code = '0; ecl_code = '0; coarse = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // ---- drive cycle cyc ----
      if (cyc % 200 == 100) mode = code_mode_e'((int'(mode) + 1) % 3);
      first_bin = (cyc < 5) ? 1'b1 : ($urandom_range(0, 3) != 0 ? first_bin : ~first_bin);
      coarse = COARSE_W'($urandom);
      fb_h[cyc] = first_bin;
      coarse_h[cyc] = int'(coarse);
      // codes belonging to the capture shown at cycle cyc-2 (prio/pop) and cyc-3 (ecl)
      prio_code = 10'(((cyc - 2) * 7) % 1000);
      pop_code  = 10'(((cyc - 2) * 13) % 1000);
      ecl_code  = 12'(((cyc - 3) * 31) % 4000);
      prio_h[cyc-2] = int'(prio_code);
      pop_h[cyc-2]  = int'(pop_code);
      ecl_h[cyc-3]  = int'(ecl_code);
      #1;
      // ---- check the output of this cycle ----
      begin
        automatic bit exp_v = 0;
        automatic int d = cyc - 3;  // detection cycle whose tag is due now
        if (d >= 1 && fb_h.exists(d) && fb_h.exists(d-1)) exp_v = fb_h[d] && !fb_h[d-1];
        checks++;
        if (tag_valid != exp_v) begin failures++; $display("FAIL tag_valid %b exp %b cyc %0d", tag_valid, exp_v, cyc); end
        if (exp_v) begin
          int ef;
          n_tags++;
          unique case (mode)
            MODE_PRIO_SINGLE: ef = prio_h[d];
            MODE_POP_SINGLE:  ef = pop_h[d];
            default:          ef = ecl_h[d];
          endcase
          mode_used[int'(mode)]++;
          checks++;
          if (int'(tag.fine) != ef || int'(tag.coarse) != coarse_h[d]) begin
            failures++;
            $display("FAIL tag %0d/%0d exp %0d/%0d", tag.coarse, tag.fine, coarse_h[d], ef);
          end
        end
      end
      if (fb_h.exists(cyc-1) && first_bin && !fb_h[cyc-1]) n_exp++;
    end
    for (int m = 0; m < 3; m++) begin
      checks++;
      if (mode_used[m] == 0) begin failures++; $display("FAIL mode %0d never exercised", m); end
    end
    $display("tags %0d (expected triggers %0d), per mode %0d %0d %0d", n_tags, n_exp,
             mode_used[0], mode_used[1], mode_used[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
