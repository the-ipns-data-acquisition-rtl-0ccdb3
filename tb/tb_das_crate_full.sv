// tb_das_crate_full: the end-to-end test of tb_das_crate on the crate at its
// default size: eleven TOF modules (176 detectors), 20-bit time counters with
// 2^20-entry time tables and 2K-word ping-pong FIFOs. Frames are 500 us long
// so that only the entries they reach are loaded; the time window (104.9 ms)
// is not reached, so the out-of-window case is left to tb_das_crate.
//
// Otherwise as tb_das_crate, which says:
// End-to-end test of a mainframe: ROC, NT TOF modules of 16
// detectors, SIMM models on every detector and a model of the IOC.
//
// The IOC model configures every detector (block offset 1 + 16*m + d, ULD
// 0xE0, LLD 100, time table f = 37*(16*m+d) + t), then on each T0 interrupt
// reads the data address every cycle until the token is back at the ROC, and
// histograms every word as the IOC software does: it increments channel
// `histogram offset` of histogram `block offset`, channel 0 of that
// histogram (its sum) and channel `block offset` of histogram 0. The same
// three increments are applied to the words an independent model of the
// front end and detector logic predicts, and the two histograms must agree.
//
// Frames: (1) random pulses on all detectors, plus a pulse-height detector,
// a detector on test input 0, software triggers (one landing in dead time),
// a SIMM that sends no ADC word and pulses after the time window closes;
// (2) random pulses while frame 1 is read; (3) one module flooded past its
// FIFO depth; (4) a system veto; (5) not read by the IOC, so lost at the next
// T0; (6) random pulses, read. Each mechanism is counted and must occur.
//
// T0 timing: t0_in first sampled at edge A0 reaches the modules at A0+2, so
// a SIMM pulse sampled at edge E is latched with time E - A0, a test input
// first sampled at edge A with A - A0 + 1, and a software trigger written at
// edge W with W - A0 - 2.
module tb_das_crate_full;
  import das_pkg::*;
  localparam int NT = MAX_TOF;     // TOF modules, as the crate's default
  localparam int TW = TIME_W;      // 20-bit time counter
  localparam int FD = FIFO_DEPTH;  // 2K-word ping-pong FIFO
  localparam int P  = 5000;        // T0 period in cycles (500 us)
  localparam int RATE = 500;   // mean cycles between pulses per detector: a frame is read within the next
  localparam bit FULL = 1;     // run only the phases that fit a full-size crate

  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- DUT
  logic t0_in = 0, veto_in = 0, rd = 0, irq_ack = 0;
  logic [2:0] test_in = 0;
  cfg_req_t cfg = '0;
  logic rd_ack, rd_done, irq; logic [31:0] rd_data;
  logic [N_DET-1:0] simm_trig [NT], simm_sdata [NT], fire [NT], mute [NT];
  logic [11:0] amp [NT][N_DET];
  logic [LLD_W-1:0] lld_code [NT][N_DET];
  tof_status_t status [NT];
  int locked [NT][N_DET];

  for (genvar m = 0; m < NT; m++) begin : g_m
    for (genvar d = 0; d < N_DET; d++) begin : g_d
      simm_model u_simm (.clk, .fire(fire[m][d]), .amp(amp[m][d]), .lld(lld_code[m][d]),
        .mute_adc(mute[m][d]), .trig(simm_trig[m][d]), .sdata(simm_sdata[m][d]),
        .locked_out(locked[m][d]));
    end
  end

  das_crate dut (
    .clk, .rst_n, .t0_in, .veto_in, .test_in, .cfg, .rd, .rd_ack, .rd_data, .rd_done,
    .irq, .irq_ack, .simm_trig, .simm_sdata, .lld_code, .status);

  // ---------------- mechanism counters
  int n_acc = 0, n_uld = 0, n_dead = 0, n_gate = 0, n_tmo = 0, n_ovf = 0, n_vet = 0, n_lost = 0;
  int n_irq = 0, n_done = 0;
  logic irq_q = 0, done_q = 0;
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < NT; m++) begin
      n_acc  += int'(status[m].accepted);
      n_uld  += int'(status[m].uld_veto);
      n_dead += int'(status[m].dead);
      n_gate += int'(status[m].out_of_gate);
      n_tmo  += int'(status[m].adc_timeout);
      n_ovf  += int'(status[m].overflow);
      n_vet  += int'(status[m].vetoed);
      n_lost += int'(status[m].unread_lost);
    end
    irq_q <= irq; done_q <= rd_done;
    if (irq && !irq_q) n_irq++;
    if (rd_done && !done_q) n_done++;
  end

  // ---------------- expected and measured histograms
  int unsigned h_exp [bit [31:0]];
  int unsigned h_got [bit [31:0]];
  function automatic void hist(ref int unsigned h [bit [31:0]], input logic [31:0] w);
    h[{w[31:16], w[15:0]}]++;   // the channel
    h[{w[31:16], 16'h0}]++;     // the histogram's sum channel
    h[{16'h0, w[31:16]}]++;     // the sum histogram
  endfunction

  function automatic logic [15:0] blk(int m, int d); return 16'(1 + 16 * m + d); endfunction
  function automatic logic [15:0] f(int m, int d, int t); return 16'(37 * (16 * m + d) + t); endfunction

  // ---------------- IOC model
  int frame = 0;              // number of T0s so far
  int a0_edge = 0;            // edge where the last T0 was first sampled
  bit skip_read [16];         // frames the IOC does not read
  int words_in [16][NT];      // words read per frame and module
  int n_ph = 0, n_test = 0, n_sw = 0;

  task automatic cfg_wr(int m, cfg_sel_e sel, int d, int idx, int data);
    @(negedge clk) cfg = '{we: 1'b1, slot: SLOT_W'(m), sel: sel, det: DET_W'(d), index: TIME_W'(idx), data: HIST_W'(data)};
  endtask

  // frame whose data the IOC reads: the one before the interrupt's T0
  initial begin : ioc
    forever begin
      int fr;
      @(posedge irq);
      fr = frame - 1;
      @(negedge clk) irq_ack = 1; @(negedge clk) irq_ack = 0;
      repeat (3) @(negedge clk);
      if (fr >= 1 && !skip_read[fr]) begin
        while (!rd_done) begin
          @(negedge clk) rd = 1;
          if (rd_ack) begin
            int m; m = (int'(rd_data[31:16]) - 1) / 16;
            if (m >= 0 && m < NT) words_in[fr][m]++;
            if (!(fr == 3 && m == 1)) hist(h_got, rd_data);
          end
        end
        @(negedge clk) rd = 0;
        if (rd_ack) check(0, "word after token returned");
      end
    end
  end

  task automatic do_t0();
    @(negedge clk) t0_in = 1;
    a0_edge = cyc;
    frame++;
    repeat (4) @(negedge clk);
    t0_in = 0;
  endtask

  // random pulses on detector (m,d) for the current frame; is_ph / expect
  int last_fire [NT][N_DET];
  function automatic void pulse_now(int m, int d, logic [11:0] a, bit expect_word);
    int t;
    fire[m][d] = 1; amp[m][d] = a;
    t = cyc - a0_edge;
    if (m == 0 && d == 3 && expect_word) n_ph++;
    if (a > 12'd100 && (cyc - last_fire[m][d]) >= 15) begin
      last_fire[m][d] = cyc;
      if (a[11:4] <= 8'hE0 && t <= (1 << TW) - 1 && expect_word && !mute[m][d]) begin
        if (m == 0 && d == 3) hist(h_exp, {blk(m, d), 8'h00, a[11:4]});
        else                  hist(h_exp, {blk(m, d), f(m, d, t)});
      end
    end
  endfunction

  // one frame of random pulses; mods selects the modules that get pulses
  task automatic random_frame(int ncyc, int rate, bit [15:0] mods, bit expect_word);
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      for (int m = 0; m < NT; m++) for (int d = 0; d < N_DET; d++) begin
        fire[m][d] = 0;
        if (mods[m] && !(m == 1 && d == 5) && $urandom_range(0, rate - 1) == 0) begin
          // keep clear of the end of the time window, and of the frame's end:
          // an event needs ~20 cycles to reach the FIFO, and one that has not
          // by the next T0 belongs to the next frame
          int t; t = cyc - a0_edge;
          if ((t < (1 << TW) - 12 || t > (1 << TW) + 4) && t < P - 40)
            pulse_now(m, d, 12'($urandom), expect_word);
        end
      end
    end
    @(negedge clk) for (int m = 0; m < NT; m++) fire[m] = '0;
  endtask

  int w;
  initial begin
    for (int m = 0; m < NT; m++) begin
      fire[m] = '0; mute[m] = '0;
      for (int d = 0; d < N_DET; d++) begin amp[m][d] = 0; last_fire[m][d] = -100; end
    end
    foreach (skip_read[i]) skip_read[i] = 0;
    foreach (words_in[i, m]) words_in[i][m] = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---- configuration by the IOC
    for (int m = 0; m < NT; m++) for (int d = 0; d < N_DET; d++) begin
      cfg_wr(m, CFG_BLOCK_OFF, d, 0, blk(m, d));
      cfg_wr(m, CFG_ULD, d, 0, 8'hE0);
      cfg_wr(m, CFG_LLD, d, 0, 100);
      cfg_wr(m, CFG_CTRL, d, 0, (m == 0 && d == 3) ? 3 : (m == 1 && d == 5) ? 5 : 1);
      for (int t = 0; t < P && t < (1 << TW); t++) cfg_wr(m, CFG_LUT, d, t, f(m, d, t));
    end
    @(negedge clk) cfg = '0;
    @(negedge clk);
    check(lld_code[NT-1][N_DET-1] == 12'd100, "LLD code reaches the DAC port");
    mute[NT-1][7] = 1;
    check(!rd_done, "no readout before the first T0");

    // ---- frame 1
    do_t0();
    fork
      random_frame(P - 10, RATE, '1, 1);
      begin
        // test input 0 drives module 1 detector 5
        for (int k = 0; k < 4; k++) begin
          repeat (97) @(negedge clk);
          test_in[0] = 1;
          hist(h_exp, {blk(1, 5), f(1, 5, cyc + 1 - a0_edge + 1)}); n_test++;
          repeat (10) @(negedge clk); test_in[0] = 0;
        end
        // two software triggers on module 2 detector 9, the second in dead time
        repeat (50) @(negedge clk);
        cfg = '{we: 1'b1, slot: SLOT_W'(2), sel: CFG_SWTRIG, det: DET_W'(9), index: '0, data: '0};
        hist(h_exp, {blk(2, 9), f(2, 9, cyc + 1 - a0_edge - 2)}); n_sw++;
        @(negedge clk) cfg = '0;
        @(negedge clk) cfg = '{we: 1'b1, slot: SLOT_W'(2), sel: CFG_SWTRIG, det: DET_W'(9), index: '0, data: '0};
        @(negedge clk) cfg = '0;
      end
    join
    if (!FULL) check(n_gate > 0, "pulses after the time window seen");

    // ---- frame 2: read frame 1 while collecting
    do_t0();
    random_frame(P - 10, RATE, '1, 1);

    // ---- frame 3: flood module 1 past the FIFO depth
    do_t0();
    for (int c = 0; c < 100 + 2 * FD; c++) begin
      @(negedge clk);
      for (int d = 0; d < N_DET; d++) begin
        fire[1][d] = 0;
        if (d != 5 && cyc - last_fire[1][d] >= 15) pulse_now(1, d, 12'h400, 0);
      end
    end
    @(negedge clk) fire[1] = '0;
    repeat (P - 120 - 2 * FD) @(negedge clk);

    // ---- frame 4: system veto
    do_t0();
    random_frame(200, RATE, '1, 1);   // counted, then discarded below
    @(negedge clk) veto_in = 1;
    repeat (3) @(negedge clk); veto_in = 0;
    random_frame(300, RATE, '1, 0);
    repeat (P - 520) @(negedge clk);

    // ---- frame 5: collected but never read
    h_exp.delete();        // frame 4 was vetoed, frame 5 is not read
    foreach (h_got[k]) h_exp[k] = h_got[k];
    do_t0();
    skip_read[5] = 1;
    random_frame(P - 10, RATE, '1, 0);

    // ---- frame 6: read, frame 7 reads it
    do_t0();
    random_frame(P - 10, RATE, '1, 1);
    do_t0();
    repeat (P) @(negedge clk);

    // ---- results
    check(words_in[3][1] == FD, $sformatf("flooded module delivers a full FIFO (%0d)", words_in[3][1]));
    check(words_in[4][0] == 0 && words_in[4][NT-1] == 0, "vetoed frame empty");
    check(h_got.size() == h_exp.size(), $sformatf("histogram cells %0d vs %0d", h_got.size(), h_exp.size()));
    w = 0;
    foreach (h_exp[k]) if (!h_got.exists(k) || h_got[k] != h_exp[k]) w++;
    check(w == 0, $sformatf("histogram contents (%0d cells differ)", w));
    check(n_acc > 0,  "mechanism: event accepted");
    check(n_uld > 0,  "mechanism: ULD veto");
    check(n_dead > 0, "mechanism: trigger in dead time");
    check(n_tmo > 0,  "mechanism: ADC timeout");
    check(n_ovf > 0,  "mechanism: FIFO overflow");
    check(n_vet > 0,  "mechanism: system veto");
    check(n_lost > 0, "mechanism: unread frame discarded at T0");
    check(n_irq == frame, "mechanism: one interrupt per T0");
    check(n_done >= 5, "mechanism: token returned to the ROC");
    check(n_test > 0 && n_sw > 0 && n_ph > 0, "mechanism: test input, software trigger, pulse-height mode");
    begin
      int lk; lk = 0;
      foreach (locked[m, d]) lk += locked[m][d];
      check(lk > 0, "mechanism: SIMM lockout");
    end
    $display("mechanisms: accepted=%0d uld=%0d dead=%0d gate=%0d timeout=%0d overflow=%0d veto=%0d lost=%0d irq=%0d done=%0d",
             n_acc, n_uld, n_dead, n_gate, n_tmo, n_ovf, n_vet, n_lost, n_irq, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000 + 40 * NT * N_DET * P) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
