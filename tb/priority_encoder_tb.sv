// priority_encoder_tb: feeds thermometer codes with a few bins swapped, random sparse
// vectors and the empty vector. Two cycles later the code must be one plus the index
// of the highest set bin (0 for none), computed here by a plain scan.
module priority_encoder_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int W = 960;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [W-1:0] therm;
  logic [9:0] code;
  int exp_q [$];

  priority_encoder #(.WIDTH(W), .GROUP(48)) dut (.clk(clk), .therm(therm), .code(code));

  always #4166.667 clk = ~clk;

  function automatic int ref_code(logic [W-1:0] v);
    int r = 0;
    for (int i = 0; i < W; i++) if (v[i]) r = i + 1;
    return r;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      if (exp_q.size() == 2) begin
        automatic int e = exp_q.pop_front();
        checks++;
        if (int'(code) != e) begin failures++; $display("FAIL code %0d exp %0d", code, e); end
      end
      unique case (n % 4)
        0: therm = '0;
        1: begin  // random sparse
             therm = '0;
             for (int k = 0; k < 5; k++) therm[$urandom_range(0, W-1)] = 1'b1;
           end
        default: begin  // thermometer with a swapped pair near the top
             automatic int len = $urandom_range(1, W);
             therm = '0;
             for (int i = 0; i < len; i++) therm[i] = 1'b1;
             if (len >= 3 && n % 2 == 0) begin therm[len-2] = 1'b0; therm[len] = (len < W); end
           end
      endcase
      exp_q.push_back(ref_code(therm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
