// tdc_top_8line_tb: the converter in its eight-line configuration (NLINES = 8,
// C4_STEP = 1: line i starts i * 65 ps after line 0), with 20 DSPs per line and a
// 120 MHz clock. Random trigger edges as in a code-density test. For each one the
// expected summed code of all eight lines is worked out from the nominal delays
// (CARRY4 65 ps, DSP 553 ps, small bin 5.21 ps, rank order 0,2,1,3 in each group of
// four) and compared with the tag. The codes reach beyond 4095 and so need the 13-bit
// fine field. The single-line modes, the coarse count, the latency and the byte
// stream are checked as in the four-line test. So is every mechanism: each mode, an
// out-of-order capture, a large bin split by another line, a stall and an overflow.
module tdc_top_8line_tb;
  timeunit 1ps; timeprecision 1fs;
  import tdc_pkg::*;

  localparam int NL = 8, ND = 20, W = ND * 48;
  localparam realtime STEP_PS = 65.0;   // offset between neighbouring lines
  localparam realtime T = 8333.334;   // clock period as generated below
  localparam int GROUP_RANK [4] = '{0, 2, 1, 3};
  localparam int N_SINGLE = 100, N_ECL = 500, N_OVF = 40;   // triggers per phase

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, hit = 1'b0, tx_ready = 1'b1;
  code_mode_e mode = MODE_PRIO_SINGLE;
  logic tag_valid, tx_valid;
  tag_t tag;
  logic [7:0] tx_data;
  logic [15:0] dropped;

  tdc_top #(.NLINES(8), .C4_STEP(1)) dut (.*);

  always #4166.667 clk = ~clk;

  typedef struct {
    realtime t_edge;
    int      pop [NL];
    int      prio;
    int      ecl;
    bit      ambiguous;   // a bin switches within 10 fs of the clock edge
    bit      split;       // some line in its large bin while another is in fine bins
  } exp_t;

  exp_t    exp_q [$];
  realtime arr [NL][W];
  realtime t_ref = -1.0;
  int      coarse_off;
  bit      have_off = 0;
  bit      stall_phase = 0;
  int      n_mode [3] = '{0, 0, 0};
  int      n_big = 0;
  int      n_ooo = 0, n_split = 0, n_stall = 0, n_tags = 0, n_bytes = 0, exp_drops = 0;
  logic [31:0] model [$];
  int      byte_i = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  // nominal arrival of the transition at bin b of line l, relative to the trigger
  initial begin
    for (int l = 0; l < NL; l++)
      for (int b = 0; b < W; b++)
        arr[l][b] = STEP_PS * l + 553.0 * (b / 48)
                  + 5.21 * real'(((b % 48) / 4) * 4 + GROUP_RANK[b % 4]);
  end

  function automatic exp_t predict(realtime dt, realtime t_edge);
    exp_t e;
    bit in_large [NL];
    e.t_edge = t_edge; e.prio = 0; e.ecl = 0; e.ambiguous = 0; e.split = 0;
    for (int l = 0; l < NL; l++) begin
      realtime local_t;
      e.pop[l] = 0;
      for (int b = 0; b < W; b++) begin
        if (arr[l][b] < dt) begin
          e.pop[l]++;
          if (l == 0) e.prio = b + 1;
        end
        if (arr[l][b] > dt - 0.01 && arr[l][b] < dt + 0.01) e.ambiguous = 1;
      end
      e.ecl += e.pop[l];
      local_t = dt - STEP_PS * l;
      in_large[l] = local_t > 0 && (local_t - 553.0 * $floor(local_t / 553.0)) > 5.21 * 47;
    end
    for (int l = 0; l < NL; l++)
      for (int m = 0; m < NL; m++)
        if (in_large[l] && !in_large[m] && dt - STEP_PS * m > 0) e.split = 1;
    return e;
  endfunction

  initial begin
    #20_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- trigger generator: one phase per mode, then an overflow phase ----
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    t_ref = $realtime;
    for (int phase = 0; phase < 4; phase++) begin
      int n_hits;
      mode = (phase == 0) ? MODE_PRIO_SINGLE : (phase == 1) ? MODE_POP_SINGLE : MODE_ECL;
      stall_phase = (phase == 3);
      n_hits = (phase == 3) ? N_OVF : (phase == 2) ? N_ECL : N_SINGLE;
      for (int n = 0; n < n_hits; n++) begin
        realtime t_hit, t_edge;
        exp_t e;
        #(real'($urandom_range(30_000_000, 90_000_000)) / 1000.0);
        hit = 1'b1;
        t_hit = $realtime;
        @(posedge clk);
        t_edge = $realtime;
        e = predict(t_edge - t_hit, t_edge);
        exp_q.push_back(e);
        #20_000;
        hit = 1'b0;
      end
      #300_000;  // let the pipeline and the readout drain
      if (phase == 3) begin
        stall_phase = 0;
        #2_000_000;
      end
    end
    check(exp_q.size() == 0, "every trigger produced a tag");
    check(model.size() == 0, "readout drained");
    check(int'(dropped) == exp_drops, $sformatf("drop count %0d exp %0d", dropped, exp_drops));
    for (int m = 0; m < 3; m++) check(n_mode[m] > 0, $sformatf("mode %0d used", m));
    check(n_ooo > 0, "out-of-order capture seen by the priority encoder");
    check(n_split > 0, "large bin of one line split by another");
    check(n_big > 0, "summed code above 4095");
    check(n_stall > 0, "host link stalled");
    check(exp_drops > 0, "FIFO overflow");
    $display("codes above 4095: %0d", n_big);
    $display("tags %0d per mode %0d/%0d/%0d, out-of-order %0d, large-bin splits %0d, stalls %0d, drops %0d, bytes %0d",
             n_tags, n_mode[0], n_mode[1], n_mode[2], n_ooo, n_split, n_stall, exp_drops, n_bytes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitor: tags and the byte stream ----
  always @(negedge clk) begin
    if (rst_n) begin
      tx_ready = stall_phase ? 1'b0 : 1'($urandom_range(0, 3) != 0);
      #1;
      if (tag_valid) begin
        n_tags++;
        if (exp_q.size() == 0) check(1'b0, "tag without a trigger");
        else begin
          exp_t e;
          int ef, edge_no;
          e = exp_q.pop_front();
          check(($realtime - e.t_edge) > 4.5 * T - 2.0 && ($realtime - e.t_edge) < 4.5 * T + 2.0,
                "tag latency");
          unique case (mode)
            MODE_PRIO_SINGLE: ef = e.prio;
            MODE_POP_SINGLE:  ef = e.pop[0];
            default:          ef = e.ecl;
          endcase
          n_mode[int'(mode)]++;
          if (mode == MODE_PRIO_SINGLE && e.prio != e.pop[0]) n_ooo++;
          if (mode == MODE_ECL && e.split) n_split++;
          if (mode == MODE_ECL && e.ecl > 4095) n_big++;
          if (!e.ambiguous)
            check(int'(tag.fine) == ef, $sformatf("mode %0d fine %0d exp %0d", mode, tag.fine, ef));
          edge_no = int'($floor((e.t_edge - t_ref) / T + 0.5));
          if (!have_off) begin coarse_off = int'(tag.coarse) - edge_no; have_off = 1; end
          check(int'(tag.coarse) == ((edge_no + coarse_off) & ((1 << COARSE_W) - 1)), "coarse count");
        end
      end
      check(tx_valid == (model.size() != 0), "tx_valid follows FIFO contents");
      if (tx_valid && !tx_ready) n_stall++;
      if (tx_valid && tx_ready) begin
        check(tx_data == model[0][byte_i*8 +: 8], "byte stream");
        n_bytes++;
      end
      if (tag_valid) begin
        if (model.size() < 16) model.push_back(tag);
        else exp_drops++;
      end
      if (tx_valid && tx_ready) begin
        if (byte_i == 3) begin byte_i = 0; void'(model.pop_front()); end
        else byte_i++;
      end
    end
  end
endmodule
