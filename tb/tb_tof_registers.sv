// tb_tof_registers: configuration writes to a module in slot 3. Checks reset
// values, each setting of two detectors, that writes to other slots are
// ignored, the one-cycle software trigger and the time-table write strobe.
module tb_tof_registers;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  cfg_req_t cfg = '0;
  det_cfg_t det_cfg [N_DET];
  logic [N_DET-1:0] lut_we, sw_trig;
  logic [TIME_W-1:0] lut_addr; logic [HIST_W-1:0] lut_wdata;
  tof_registers #(.SLOT(3)) dut (.clk, .rst_n, .cfg, .det_cfg, .lut_we, .lut_addr, .lut_wdata, .sw_trig);

  int n_sw [N_DET]; int n_lut = 0;
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < N_DET; d++) if (sw_trig[d]) n_sw[d]++;
    if (lut_we != 0) n_lut++;
  end

  task automatic wr(input int slot, input cfg_sel_e sel, input int det, input int idx, input int data);
    @(negedge clk) cfg = '{we: 1'b1, slot: SLOT_W'(slot), sel: sel, det: DET_W'(det), index: TIME_W'(idx), data: HIST_W'(data)};
    @(negedge clk) cfg = '0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    foreach (n_sw[d]) n_sw[d] = 0;
    check(det_cfg[0].enable == 0 && det_cfg[15].uld == 8'hFF && det_cfg[7].src == SRC_DETECTOR, "reset values");
    wr(3, CFG_BLOCK_OFF, 5, 0, 16'h0042);
    wr(3, CFG_ULD, 5, 0, 16'h00A0);
    wr(3, CFG_LLD, 5, 0, 16'h0ABC);
    wr(3, CFG_CTRL, 5, 0, 16'h000F);   // enable, ph_mode, src = TEST2
    wr(3, CFG_BLOCK_OFF, 12, 0, 16'h0007);
    wr(2, CFG_BLOCK_OFF, 6, 0, 16'h0099);  // other slot
    @(negedge clk);
    check(det_cfg[5].block_off == 16'h0042, "block offset");
    check(det_cfg[5].uld == 8'hA0, "ULD");
    check(det_cfg[5].lld == 12'hABC, "LLD code");
    check(det_cfg[5].enable && det_cfg[5].ph_mode && det_cfg[5].src == SRC_TEST2, "control bits");
    check(det_cfg[12].block_off == 16'h0007 && !det_cfg[12].enable, "second detector");
    check(det_cfg[6].block_off == 16'h0000, "write to other slot ignored");
    wr(3, CFG_SWTRIG, 9, 0, 0);
    @(negedge clk);
    check(n_sw[9] == 1 && n_sw[8] == 0, "software trigger one cycle on its detector");
    @(negedge clk) cfg = '{we: 1'b1, slot: 4'd3, sel: CFG_LUT, det: 4'd14, index: 20'hABCDE, data: 16'h1234};
    @(posedge clk); #1;
    check(lut_we == 16'(1 << 14) && lut_addr == 20'hABCDE && lut_wdata == 16'h1234, "time table write");
    @(negedge clk) cfg = '0;
    @(negedge clk) check(n_lut == 1 && lut_we == 0, "single write strobe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
