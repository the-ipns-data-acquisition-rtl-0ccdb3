// tb_mrc: module readout control with 4 detectors and 8-word FIFOs.
// Detector models offer queued words. Checked: round-robin order when all
// detectors have data, nothing taken in the T0 cycle, readout only while the
// token is held, one word per read with the ack one cycle later, token passed
// on when the frame is drained (and at once for an empty frame), the system
// veto discarding the frame, FIFO overflow, and unread words lost at T0.
module tb_mrc;
  import das_pkg::*;
  localparam int ND = 4, D = 8;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic t0 = 0, veto = 0, token_in = 0, rd = 0;
  logic [ND-1:0] det_valid, det_ready;
  event_word_t det_word [ND];
  logic token_out, rd_ack, accepted, overflow, vetoed, unread_lost;
  logic [31:0] rd_data;
  mrc #(.N_DET(ND), .FIFO_DEPTH(D)) dut (.clk, .rst_n, .t0, .veto, .det_valid, .det_word,
    .det_ready, .token_in, .token_out, .rd, .rd_ack, .rd_data, .accepted, .overflow,
    .vetoed, .unread_lost);

  event_word_t q [ND][$];
  always_comb for (int d = 0; d < ND; d++) begin
    det_valid[d] = q[d].size() > 0;
    det_word[d]  = det_valid[d] ? q[d][0] : '0;
  end
  logic [31:0] taken[$];
  int n_ovf = 0, n_veto = 0, n_lost = 0, n_t0_grant = 0;
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < ND; d++) if (det_ready[d]) begin taken.push_back(q[d][0]); q[d].pop_front(); end
    if (overflow) n_ovf++;
    if (vetoed) n_veto++;
    if (unread_lost) n_lost++;
    if (t0 && det_ready != 0) n_t0_grant++;
  end

  task automatic offer(int d, int n, logic [15:0] tag);
    for (int i = 0; i < n; i++) q[d].push_back({tag | 16'(d), 16'(i)});
  endtask
  task automatic do_t0(); @(negedge clk) t0 = 1; @(negedge clk) t0 = 0; endtask
  // read until token_out; collect words
  task automatic drain(output logic [31:0] words[$], output int reads);
    words = {}; reads = 0;
    while (!token_out && reads < 100) begin
      @(negedge clk) rd = 1; reads++;
      @(negedge clk) rd = 0;
      if (rd_ack) words.push_back(rd_data);
    end
  endtask

  logic [31:0] w[$]; int r;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    do_t0();
    // frame 1: 2 words from each detector, all at once
    for (int d = 0; d < ND; d++) offer(d, 2, 16'h1000);
    repeat (12) @(negedge clk);
    check(taken.size() == 8, "all 8 words taken");
    for (int k = 0; k < 8 && k < taken.size(); k++)
      check(taken[k] == {16'h1000 | 16'(k % ND), 16'(k / ND)}, $sformatf("round-robin order %0d", k));
    // reads without the token are not answered
    @(negedge clk) rd = 1; @(negedge clk) rd = 0;
    check(!rd_ack, "no answer without token");
    // T0 with a word pending: not taken in the T0 cycle
    @(negedge clk) begin t0 = 1; offer(2, 1, 16'h2000); end @(posedge clk); #1 check(det_ready == 0, "no grant during T0");
    @(negedge clk) t0 = 0; token_in = 1;
    drain(w, r);
    check(w.size() == 8, "frame 1 read: 8 words");
    for (int k = 0; k < 8 && k < w.size(); k++)
      check(w[k] == {16'h1000 | 16'(k % ND), 16'(k / ND)}, $sformatf("read order %0d", k));
    check(token_out, "token passed after the last word");
    // frame 2 (holding the word offered at T0) then veto in frame 3
    @(negedge clk) token_in = 0;
    @(negedge clk); check(!token_out, "token_out follows token_in");
    offer(0, 2, 16'h3000);
    repeat (4) @(negedge clk);
    @(negedge clk) veto = 1; @(negedge clk) veto = 0;
    offer(1, 3, 16'h4000);
    repeat (6) @(negedge clk);
    check(n_veto == 3 && q[1].size() == 0, "words after the veto discarded");
    check(taken.size() == 14, "T0-cycle word taken after the T0 cycle");
    do_t0(); token_in = 1;
    drain(w, r);
    check(w.size() == 0 && token_out, "vetoed frame is empty, token passed at once");
    // frame with more words than the FIFO holds
    @(negedge clk) token_in = 0;
    do_t0();
    offer(0, 6, 16'h5000); offer(3, 5, 16'h5000);
    repeat (15) @(negedge clk);
        check(n_ovf == 3, "3 words beyond depth 8 overflow");
    do_t0(); token_in = 1;
    // read only two words, then T0: the rest is lost
    repeat (2) begin @(negedge clk) rd = 1; @(negedge clk) rd = 0; end
    check(!token_out, "token held while words remain");
    @(negedge clk) token_in = 0;
    do_t0();
    check(n_lost == 1, "unread words at T0 reported");
    check(n_t0_grant == 0, "never granted in a T0 cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
