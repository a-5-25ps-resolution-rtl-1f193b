// pop_counter_tb: random vectors of varying density, all ones and all zeros. Two
// cycles later the count must equal the number of ones counted here bit by bit.
module pop_counter_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int W = 960;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [W-1:0] therm;
  logic [9:0] count;
  int exp_q [$];

  pop_counter #(.WIDTH(W), .GROUP(48)) dut (.clk(clk), .therm(therm), .count(count));

  always #4166.667 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      int ones;
      @(negedge clk);
      if (exp_q.size() == 2) begin
        automatic int e = exp_q.pop_front();
        checks++;
        if (int'(count) != e) begin failures++; $display("FAIL count %0d exp %0d", count, e); end
      end
      if (n == 3) therm = '1;
      else if (n == 4) therm = '0;
      else begin
        automatic int dens = $urandom_range(0, 100);
        for (int i = 0; i < W; i++) therm[i] = ($urandom_range(0, 99) < dens);
      end
      ones = 0;
      for (int i = 0; i < W; i++) if (therm[i]) ones++;
      exp_q.push_back(ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
