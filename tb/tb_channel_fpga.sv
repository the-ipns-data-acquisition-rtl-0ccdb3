// tb_channel_fpga: one channel FPGA with its two detectors, each fed by a SIMM
// model. The detectors have different time tables (t + 0x100 and 0x8000 - t)
// and block offsets. Both fire on the same edge several times in a frame: each
// must produce its own word from the shared time counter, E - T + 2, even when
// one detector's word is held back by the MRC side. Detector 1 is in
// pulse-height mode and its pulses are larger, so its words carry its own ADC
// value (amplitude/16).
module tb_channel_fpga;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic t0 = 0, fire = 0; logic [11:0] amp = 0;
  logic [1:0] trig, sdata, sw_trig = 0, lut_we = 0, out_valid, out_ready = 2'b11;
  logic [1:0] uld_veto, dead, out_of_gate, adc_timeout;
  int locked [2];
  det_cfg_t cfg [2];
  event_word_t out_word [2];
  logic [19:0] lut_addr = 0; logic [15:0] lut_wdata = 0;

  logic [11:0] amp_d [2];
  assign amp_d[0] = amp;
  assign amp_d[1] = amp + 12'h123;
  for (genvar d = 0; d < 2; d++) begin : g_simm
    simm_model u_simm (.clk, .fire, .amp(amp_d[d]), .lld(12'd50), .mute_adc(1'b0),
                       .trig(trig[d]), .sdata(sdata[d]), .locked_out(locked[d]));
  end
  channel_fpga dut (.clk, .rst_n, .t0, .trig, .sdata, .test_lvl(3'b000), .sw_trig, .cfg,
    .lut_we, .lut_addr, .lut_wdata, .out_valid, .out_word, .out_ready,
    .uld_veto, .dead, .out_of_gate, .adc_timeout);

  function automatic logic [15:0] f(int d, int t);
    return d == 0 ? 16'(t + 16'h100) : 16'(16'h8000 - t);
  endfunction
  event_word_t got [2][$];
  always @(posedge clk) if (rst_n) for (int d = 0; d < 2; d++)
    if (out_valid[d] && out_ready[d]) got[d].push_back(out_word[d]);

  int t0_edge, e; int fires[$];
  initial begin
    cfg[0] = '{block_off: 16'd10, uld: 8'hFF, lld: 12'd50, src: SRC_DETECTOR, ph_mode: 1'b0, enable: 1'b1};
    cfg[1] = cfg[0]; cfg[1].block_off = 16'd11; cfg[1].ph_mode = 1'b1;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) for (int d = 0; d < 2; d++) begin
      @(negedge clk) begin lut_we = 2'(1 << d); lut_addr = 20'(t); lut_wdata = f(d, t); end
    end
    @(negedge clk) lut_we = 0;
    @(negedge clk) t0 = 1; @(negedge clk) t0 = 0; t0_edge = cyc - 1;
    for (int k = 0; k < 5; k++) begin
      repeat (20 + 7 * k) @(negedge clk);
      if (k == 2) out_ready[1] = 1'b0;
      @(negedge clk) begin fire = 1; amp = 12'h300 + 12'(k * 16); end
      fires.push_back(cyc); @(negedge clk) fire = 0;
      if (k == 2) begin repeat (40) @(negedge clk); out_ready[1] = 1'b1; end
    end
    repeat (40) @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      check(got[d].size() == 5, $sformatf("detector %0d: 5 words", d));
      for (int k = 0; k < 5 && k < got[d].size(); k++)
        check(got[d][k] == {16'(10 + d), d == 0 ? f(d, fires[k] - t0_edge + 2)
                                                 : 16'((12'h300 + 12'(k * 16) + 12'h123) >> 4)},
              $sformatf("detector %0d word %0d", d, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
