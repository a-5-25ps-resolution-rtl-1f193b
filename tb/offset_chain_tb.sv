// offset_chain_tb: checks that a chain of 6 CARRY4s (the offset of line 3) delays the
// trigger by 6 * 65 = 390 ps, for rising and falling edges, and that the chain
// with no CARRY4 (line 0) passes the trigger through with no delay.
module offset_chain_tb;
  timeunit 1ps; timeprecision 1fs;

  int checks = 0, failures = 0;
  logic trig_in = 1'b0;
  logic trig_out6, trig_out0;

  offset_chain #(.N_C4(6)) dut6 (.trig_in(trig_in), .trig_out(trig_out6));
  offset_chain #(.N_C4(0)) dut0 (.trig_in(trig_in), .trig_out(trig_out0));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int n = 0; n < 20; n++) begin
      trig_in = 1'b1;
      #0.5;
      check(trig_out0 == 1'b1, "zero-length chain follows at once");
      check(trig_out6 == 1'b0, "rise not yet through");
      #(390.0 - 1.0);
      check(trig_out6 == 1'b0, "rise not before 390 ps");
      #1.0;
      check(trig_out6 == 1'b1, "rise through by 390 ps");
      #(500.0 + n);
      trig_in = 1'b0;
      #(390.0 - 0.5);
      check(trig_out6 == 1'b1, "fall not before 390 ps");
      #1.0;
      check(trig_out6 == 1'b0, "fall through by 390 ps");
      #700;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
