// readout_tb: random tags arrive in bursts while the host side is sometimes ready,
// sometimes stalled for long stretches. A reference queue of depth 16, kept here,
// decides which tags are stored and which are dropped. Every byte that leaves must
// be the next byte of the oldest stored tag, least significant byte first. The drop
// counter must match, and both the stall and the overflow case must occur.
module readout_tb;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int DEPTH = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tag_valid;
  tag_t tag;
  logic [7:0] tx_data;
  logic tx_valid, tx_ready;
  logic [15:0] dropped;

  readout #(.DEPTH(DEPTH)) dut (.*);

  always #4166.667 clk = ~clk;

  logic [31:0] model [$];
  int byte_i = 0, exp_drops = 0, n_bytes = 0, n_stall = 0;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tag_valid = 1'b0; tag = '0; tx_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit burst, stall;
      @(negedge clk);
      // next stimulus
      burst = ((cyc / 500) % 2) == 1;
      stall = ((cyc / 700) % 3) == 2;
      tag_valid = burst ? ($urandom_range(0, 2) == 0) : ($urandom_range(0, 15) == 0);
      tag = tag_t'($urandom);
      tx_ready = stall ? 1'b0 : ($urandom_range(0, 3) != 0);
      #1;
      // what happens at the coming edge, judged from values now on the wires
      checks++;
      if (tx_valid != (model.size() != 0)) begin failures++; $display("FAIL tx_valid"); end
      if (tx_valid && tx_ready) begin
        automatic logic [7:0] eb = model[0][byte_i*8 +: 8];
        checks++;
        if (tx_data != eb) begin failures++; $display("FAIL byte %h exp %h", tx_data, eb); end
        n_bytes++;
      end
      if (tx_valid && !tx_ready) n_stall++;
      if (tag_valid) begin
        if (model.size() < DEPTH) model.push_back(tag);
        else exp_drops++;
      end
      if (tx_valid && tx_ready) begin
        if (byte_i == 3) begin byte_i = 0; void'(model.pop_front()); end
        else byte_i++;
      end
    end
    @(negedge clk);
    checks++;
    if (int'(dropped) != exp_drops) begin failures++; $display("FAIL dropped %0d exp %0d", dropped, exp_drops); end
    checks++; if (exp_drops == 0) begin failures++; $display("FAIL overflow never happened"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL stall never happened"); end
    $display("bytes %0d, stalled cycles %0d, drops %0d", n_bytes, n_stall, exp_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
