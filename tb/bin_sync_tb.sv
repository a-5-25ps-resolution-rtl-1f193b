// bin_sync_tb: random taps each cycle; therm must be the inverse of the taps applied
// two clock edges earlier (two flip-flop levels).
module bin_sync_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int W = 960;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [W-1:0] taps, therm;
  logic [W-1:0] hist [$];

  bin_sync #(.WIDTH(W)) dut (.clk(clk), .taps(taps), .therm(therm));

  always #4166.667 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (hist.size() == 2) begin
        checks++;
        if (therm != ~hist[0]) begin failures++; $display("FAIL cycle %0d", n); end
        void'(hist.pop_front());
      end
      for (int w = 0; w < W / 32; w++) taps[w*32 +: 32] = $urandom;
      hist.push_back(taps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
