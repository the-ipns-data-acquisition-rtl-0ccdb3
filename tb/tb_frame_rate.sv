// tb_frame_rate: the time-averaged rate limit of one TOF module over one real
// 30 Hz frame (333,333 cycles of 100 ns), with every parameter at its default.
//
// 2088 pulses are spread evenly over the frame (one every 155 cycles, the
// detectors taking turns, 61.6k/s per module). Only the time table entries the
// pulses reach are loaded: pulse k on detector d is fired so that it is latched
// at time t_k, and entry t_k of that detector holds k. The first 2048 words
// fill one half of the ping-pong FIFO; the last 40 pulses must be reported as
// overflow. After the next T0 the test holds the token and reads the frame:
// exactly words 0..2047 in order, and the token must then be passed on.
module tb_frame_rate;
  import das_pkg::*;
  localparam int FRAME = 333_333;
  localparam int NEV = FIFO_DEPTH + 40;
  localparam int GAP = 155;

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic t0 = 0, token_in = 0, rd = 0;
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
  tof_module dut (.clk, .rst_n, .t0, .veto(1'b0), .test_lvl(3'b000), .cfg,
    .simm_trig, .simm_sdata, .lld_code, .token_in, .token_out, .rd, .rd_ack, .rd_data, .status);

  int n_acc = 0, n_ovf = 0;
  always @(posedge clk) if (rst_n) begin
    n_acc += int'(status.accepted);
    n_ovf += int'(status.overflow);
  end

  task automatic wr(input cfg_sel_e sel, input int det, input int idx, input int data);
    @(negedge clk) cfg = '{we: 1'b1, slot: 4'd0, sel: sel, det: DET_W'(det), index: TIME_W'(idx), data: HIST_W'(data)};
  endtask
  function automatic int t_of(int k); return 300 + k * GAP; endfunction

  int t0_edge, nw, bad, start;
  logic [31:0] w;
  initial begin
    foreach (amp[d]) amp[d] = 12'h400;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int d = 0; d < N_DET; d++) begin
      wr(CFG_BLOCK_OFF, d, 0, 16'h0200 + d);
      wr(CFG_LLD, d, 0, 100);
      wr(CFG_CTRL, d, 0, 1);
    end
    for (int k = 0; k < NEV; k++) wr(CFG_LUT, k % N_DET, t_of(k), k);
    @(negedge clk) cfg = '0;

    @(negedge clk) t0 = 1; @(negedge clk) t0 = 0;
    t0_edge = cyc - 1;
    // pulse k sampled by its SIMM at edge t0_edge + t_k - 2
    for (int k = 0; k < NEV; k++) begin
      while (cyc < t0_edge + t_of(k) - 2) @(negedge clk);
      fire[k % N_DET] = 1; @(negedge clk) fire = '0;
    end
    check(t_of(NEV - 1) + 40 < FRAME, "all pulses inside one 33.3 ms frame");
    while (cyc < t0_edge + FRAME - 1) @(negedge clk);
    check(n_acc == FIFO_DEPTH && n_ovf == NEV - FIFO_DEPTH,
          $sformatf("%0d accepted, %0d overflow", n_acc, n_ovf));

    // next T0: read the frame
    @(negedge clk) t0 = 1; @(negedge clk) t0 = 0;
    check(cyc - 1 - t0_edge == FRAME, "frame length 33.333 ms");
    @(negedge clk) token_in = 1;
    nw = 0; bad = 0; start = cyc;
    while (!token_out && cyc - start < 3 * FIFO_DEPTH) begin
      @(negedge clk) rd = 1;
      if (rd_ack) begin
        w = {16'h0200 + 16'(nw % N_DET), 16'(nw)};
        if (rd_data != w) bad++;
        nw++;
      end
    end
    @(negedge clk) rd = 0;
    check(nw == FIFO_DEPTH, $sformatf("%0d words read", nw));
    check(bad == 0, "words are the first 2048 events in order with their table values");
    check(token_out, "token passed after the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (FRAME + 100_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
