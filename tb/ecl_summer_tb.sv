// ecl_summer_tb: four random line codes (0..960) each cycle, including all at the
// maximum; one cycle later the output must be their sum.
module ecl_summer_tb;
  timeunit 1ps; timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [9:0]  line_code [4];
  logic [11:0] ecl_code;
  int exp_q [$];

  ecl_summer #(.NLINES(4), .IN_W(10)) dut (.clk(clk), .line_code(line_code), .ecl_code(ecl_code));

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
      int s;
      @(negedge clk);
      if (exp_q.size() == 1) begin
        automatic int e = exp_q.pop_front();
        checks++;
        if (int'(ecl_code) != e) begin failures++; $display("FAIL sum %0d exp %0d", ecl_code, e); end
      end
      s = 0;
      for (int i = 0; i < 4; i++) begin
        line_code[i] = (n == 5) ? 10'd960 : 10'($urandom_range(0, 960));
        s += int'(line_code[i]);
      end
      exp_q.push_back(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
