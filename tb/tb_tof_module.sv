// tb_tof_module: a whole TOF module with sixteen SIMM models, configured
// through its register port the way the IOC would. Detector d gets block
// offset 0x100+d, ULD 0xE0, LLD 100+d and time table f(d,t) = 4096*d + t.
// Random pulses over one frame are turned into the expected word list by an
// independent model of the SIMM (LLD, 15-cycle lockout, ADC = amplitude/16)
// and the ULD veto; after the next T0 the test holds the token, reads the
// frame and compares each detector's words in order. A second frame is
// vetoed and must read back empty.
module tb_tof_module;
  import das_pkg::*;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic t0 = 0, veto = 0, token_in = 0, rd = 0;
  cfg_req_t cfg = '0;
  logic [N_DET-1:0] simm_trig, simm_sdata, fire = '0;
  logic [11:0] amp [N_DET];
  logic [LLD_W-1:0] lld_code [N_DET];
  logic token_out, rd_ack; logic [31:0] rd_data; tof_status_t status;
  int locked [N_DET];

  for (genvar d = 0; d < N_DET; d++) begin : g_simm
    simm_model u_simm (.clk, .fire(fire[d]), .amp(amp[d]), .lld(lld_code[d]), .mute_adc(1'b0),
                       .trig(simm_trig[d]), .sdata(simm_sdata[d]), .locked_out(locked[d]));
  end
  tof_module #(.SLOT(2)) dut (.clk, .rst_n, .t0, .veto, .test_lvl(3'b000), .cfg,
    .simm_trig, .simm_sdata, .lld_code, .token_in, .token_out, .rd, .rd_ack, .rd_data, .status);

  task automatic wr(input cfg_sel_e sel, input int det, input int idx, input int data);
    @(negedge clk) cfg = '{we: 1'b1, slot: 4'd2, sel: sel, det: DET_W'(det), index: TIME_W'(idx), data: HIST_W'(data)};
  endtask
  function automatic logic [15:0] f(int d, int t); return 16'(4096 * d + t); endfunction

  logic [31:0] exp_q [N_DET][$];
  logic [31:0] got_q [N_DET][$];
  int last_fire [N_DET];
  int n_acc = 0, n_uld = 0, n_exp_uld = 0, t0_edge;

  always @(posedge clk) if (rst_n) begin
    if (status.accepted) n_acc++;
    if (status.uld_veto) n_uld++;
  end

  task automatic do_t0();
    @(negedge clk) begin t0 = 1; token_in = 0; end
    @(negedge clk) t0 = 0;
    t0_edge = cyc - 1;
    @(negedge clk) token_in = 1;
  endtask
  task automatic read_frame(output int nwords);
    int guard = 0;
    nwords = 0;
    while (!token_out && guard < 5000) begin
      @(negedge clk) rd = 1; @(negedge clk) rd = 0; guard++;
      if (rd_ack) begin
        int d; d = int'(rd_data[31:16]) - 16'h100;
        if (d >= 0 && d < N_DET) got_q[d].push_back(rd_data);
        else check(0, "word with unknown block offset");
        nwords++;
      end
    end
  endtask
  // random pulses for n cycles; expected words appended
  task automatic run_frame(int ncyc, bit expect_words);
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      for (int d = 0; d < N_DET; d++) begin
        fire[d] = ($urandom_range(0, 39) == 0);
        amp[d]  = 12'($urandom);
        if (fire[d] && amp[d] > 12'(100 + d) && (cyc - last_fire[d]) >= 15) begin
          last_fire[d] = cyc;
          if (amp[d][11:4] > 8'hE0) n_exp_uld++;
          else if (expect_words) exp_q[d].push_back({16'(16'h100 + d), f(d, cyc - t0_edge + 2)});
        end
      end
    end
    @(negedge clk) fire = '0;
    repeat (40) @(negedge clk);
  endtask

  int nw, total;
  initial begin
    foreach (amp[d]) begin amp[d] = 0; last_fire[d] = -100; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int d = 0; d < N_DET; d++) begin
      wr(CFG_BLOCK_OFF, d, 0, 16'h100 + d);
      wr(CFG_ULD, d, 0, 8'hE0);
      wr(CFG_LLD, d, 0, 100 + d);
      wr(CFG_CTRL, d, 0, 1);
      for (int t = 0; t < 1600; t++) wr(CFG_LUT, d, t, f(d, t));
    end
    @(negedge clk) cfg = '0;
    @(negedge clk);
    for (int d = 0; d < N_DET; d++) check(lld_code[d] == 12'(100 + d), $sformatf("LLD code %0d", d));

    do_t0();
    run_frame(1500, 1);
    do_t0();
    read_frame(nw);
    total = 0;
    for (int d = 0; d < N_DET; d++) begin
      total += exp_q[d].size();
      check(got_q[d] == exp_q[d], $sformatf("detector %0d: %0d words as expected", d, exp_q[d].size()));
    end
    check(nw == total && nw == n_acc && nw > 300, $sformatf("frame of %0d words read", nw));
    check(n_uld > 0 && n_uld <= n_exp_uld, "ULD vetoes seen (flags of one cycle are ORed)");
    check(token_out, "token passed on after the frame");

    // vetoed frame
    run_frame(300, 0);
    @(negedge clk) veto = 1; @(negedge clk) veto = 0;
    run_frame(300, 0);
    do_t0();
    read_frame(nw);
    check(nw == 0 && token_out, "vetoed frame reads back empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
