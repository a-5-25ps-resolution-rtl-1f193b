// carry4_tb: checks the CARRY4 model.
// Logic: for random S, DI, CI and CYINIT, the settled O and CO match a carry chain
// computed here (carry into stage 0 = CI | CYINIT; stage k passes it if S[k], else DI[k]).
// Timing: with S = 1111 a rising CI reaches CO[k] after (k+1) * 16.25 ps, i.e. 65 ps for CO[3].
module carry4_tb;
  timeunit 1ps; timeprecision 1fs;

  int checks = 0, failures = 0;
  logic ci, cyinit;
  logic [3:0] di, s, o, co;

  carry4 dut (.*);

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
    realtime t0;
    for (int n = 0; n < 300; n++) begin
      logic cy;
      logic [3:0] eo, eco;
      ci = 1'($urandom_range(0, 1)); cyinit = 1'($urandom_range(0, 1));
      di = 4'($urandom); s = 4'($urandom);
      #200;
      cy = ci | cyinit;
      for (int k = 0; k < 4; k++) begin
        eo[k] = s[k] ^ cy;
        cy = s[k] ? cy : di[k];
        eco[k] = cy;
      end
      check(o == eo, $sformatf("O %b exp %b", o, eo));
      check(co == eco, $sformatf("CO %b exp %b", co, eco));
    end
    s = 4'b1111; di = 4'b0000; cyinit = 1'b0; ci = 1'b0;
    #200;
    check(co == 4'b0000, "chain idle");
    ci = 1'b1;
    t0 = $realtime;
    for (int k = 0; k < 4; k++) begin
      #(t0 + 16.25 * (k + 1) - 0.5 - $realtime);
      check(co[k] == 1'b0, $sformatf("CO[%0d] not yet", k));
      #1.0;
      check(co[k] == 1'b1, $sformatf("CO[%0d] reached", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
