// coarse_counter_tb: a 6-bit counter must read 0 after reset, step by one each clock,
// wrap from 63 to 0, and go back to 0 on a second reset.
module coarse_counter_tb;
  timeunit 1ps; timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] count;

  coarse_counter #(.WIDTH(6)) dut (.clk(clk), .rst_n(rst_n), .count(count));

  always #4166.667 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    repeat (2) @(negedge clk);
    checks++; if (count != 0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;
    expv = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      expv = (expv + 1) % 64;
      checks++;
      if (int'(count) != expv) begin failures++; $display("FAIL count %0d exp %0d", count, expv); end
    end
    rst_n = 1'b0;
    @(negedge clk);
    checks++; if (count != 0) begin failures++; $display("FAIL second reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
