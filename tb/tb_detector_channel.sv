// tb_detector_channel: self-checking test of one detector event pipeline.
//
// A SIMM model supplies triggers and serial ADC words. The time table is
// loaded with hist(t) = 0x4000 + 5*t; an event whose pulse reaches the SIMM
// at clock edge E, in a frame whose T0 was sampled at edge T, must give the
// time t = E - T + 2 (two synchroniser cycles). Checked: normal events, the
// 16-cycle trigger-to-word latency, back-to-back events at the 1.5 us
// lockout rate, ULD veto (above threshold only), pulse-height mode, test and
// software inputs, dead time, the time window, the ADC timeout, disable and
// back-pressure.
module tb_detector_channel;
  import das_pkg::*;
  localparam int TW = 20;

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  logic [TW-1:0] time_now; logic time_valid, t0 = 0;
  time_counter #(.TIME_W(TW)) u_cnt (.clk, .rst_n, .t0, .count(time_now), .in_window(time_valid));

  logic fire = 0, mute = 0; logic [11:0] amp = 0;
  logic trig, sdata; int locked;
  simm_model u_simm (.clk, .fire, .amp, .lld(12'd100), .mute_adc(mute), .trig, .sdata, .locked_out(locked));

  logic [2:0] test_lvl = 0; logic sw_trig = 0;
  det_cfg_t cfg;
  logic lut_we = 0; logic [TW-1:0] lut_addr = 0; logic [15:0] lut_wdata = 0;
  logic out_valid, out_ready = 1; event_word_t out_word;
  logic uld_veto, dead, out_of_gate, adc_timeout;

  detector_channel #(.TIME_W(TW)) dut (
    .clk, .rst_n, .time_now, .time_valid, .trig_in(trig), .sdata, .test_lvl,
    .sw_trig, .cfg, .lut_we, .lut_addr, .lut_wdata, .out_valid, .out_word,
    .out_ready, .uld_veto, .dead, .out_of_gate, .adc_timeout);

  // event flag counters and collected words
  int n_veto = 0, n_dead = 0, n_gate = 0, n_tmo = 0;
  event_word_t got[$]; int got_cyc[$];
  always @(posedge clk) if (rst_n) begin
    if (uld_veto) n_veto++;
    if (dead) n_dead++;
    if (out_of_gate) n_gate++;
    if (adc_timeout) n_tmo++;
    if (out_valid && out_ready) begin got.push_back(out_word); got_cyc.push_back(cyc); end
  end

  function automatic logic [15:0] lut_f(int t); return 16'(16'h4000 + 5 * t); endfunction

  int t0_edge;
  task automatic do_t0();
    @(negedge clk) t0 = 1; @(negedge clk) t0 = 0; t0_edge = cyc - 1;
  endtask
  // pulse into the SIMM; returns the edge at which it was sampled
  task automatic pulse(input logic [11:0] a, output int edge_no);
    @(negedge clk) begin fire = 1; amp = a; end
    edge_no = cyc;
    @(negedge clk) fire = 0;
  endtask
  task automatic idle(int n); repeat (n) @(negedge clk); endtask

  int e, e2, base;
  initial begin
    cfg = '{block_off: 16'h0123, uld: 8'hC0, lld: 12'd100, src: SRC_DETECTOR, ph_mode: 1'b0, enable: 1'b1};
    idle(3); rst_n = 1; idle(2);
    for (int t = 0; t < 1024; t++) begin
      @(negedge clk) begin lut_we = 1; lut_addr = TW'(t); lut_wdata = lut_f(t); end
    end
    @(negedge clk) lut_we = 0;

    // before any T0: outside the time window
    pulse(12'h800, e); idle(30);
    check(n_gate == 1 && got.size() == 0, "event before T0 dropped as out of window");

    do_t0(); idle(20);
    // 1. normal event and latency
    pulse(12'h800, e); idle(30);
    check(got.size() == 1, "normal event produces one word");
    if (got.size() == 1) begin
      check(got[0].block_off == 16'h0123, "block offset");
      check(got[0].hist_off == lut_f(e - t0_edge + 2), "histogram offset from time table");
      check(got_cyc[0] - e == 16, "trigger-to-word latency 16 cycles");
    end
    got.delete(); got_cyc.delete();

    // 2. events every 15 cycles (1.5 us lockout rate): none lost
    base = cyc;
    for (int k = 0; k < 6; k++) begin pulse(12'h400 + 12'(k), e); idle(13); end
    idle(30);
    check(got.size() == 6 && n_dead == 0 && locked == 0, "six events at the lockout rate all accepted");

    // 3. ULD: above threshold vetoed, at threshold accepted
    got.delete();
    pulse(12'hC10, e); idle(30);
    check(n_veto == 1 && got.size() == 0, "above ULD vetoed");
    pulse(12'hC0F, e); idle(30);
    check(n_veto == 1 && got.size() == 1, "at ULD accepted");

    // 4. pulse-height mode
    got.delete(); cfg.ph_mode = 1;
    pulse(12'h5A3, e); idle(30);
    check(got.size() == 1 && got[0].hist_off == 16'h005A, "pulse-height mode gives ADC value");
    cfg.ph_mode = 0;

    // 5. test signal 1 as input, no ADC word expected
    got.delete(); cfg.src = SRC_TEST1;
    @(negedge clk) test_lvl[1] = 1; e = cyc;
    idle(6); test_lvl[1] = 0; idle(20);
    check(got.size() == 1 && got[0].hist_off == lut_f(e - t0_edge + 1), "test input event with its time");
    pulse(12'h800, e2); idle(30);
    check(got.size() == 1, "detector ignored while test input selected");
    cfg.src = SRC_DETECTOR;

    // 6. software trigger, and a second one while busy is dead time
    got.delete();
    @(negedge clk) sw_trig = 1; e = cyc; @(negedge clk) sw_trig = 0;
    idle(1); @(negedge clk) sw_trig = 1; @(negedge clk) sw_trig = 0;
    idle(20);
    check(got.size() == 1 && got[0].hist_off == lut_f(e - t0_edge - 1), "software trigger event");
    check(n_dead == 1, "trigger while busy counted as dead");

    // 7. ADC word missing: timeout, no word
    got.delete(); mute = 1;
    pulse(12'h800, e); idle(50);
    check(n_tmo == 1 && got.size() == 0, "missing ADC word times out");
    mute = 0;

    // 8. back-pressure: word held until taken
    out_ready = 0;
    pulse(12'h700, e); idle(40);
    check(out_valid && got.size() == 0, "word held while not ready");
    out_ready = 1; idle(2);
    check(got.size() == 1 && !out_valid, "word taken when ready");

    // 9. disabled detector
    got.delete(); cfg.enable = 0;
    pulse(12'h800, e); idle(30);
    check(got.size() == 0, "disabled detector produces nothing");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

