// tb_roc_module: the ROC's signal distribution. An asynchronous T0 gives one
// local-bus pulse 2-3 cycles later, raises the interrupt until acknowledged,
// and restarts the token (low for two cycles, then high); readout_done
// follows the token's return. The veto gives one pulse per rising edge; the
// test inputs come out as synchronised levels.
module tb_roc_module;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic t0_in = 0, veto_in = 0, token_return = 0, irq_ack = 0;
  logic [2:0] test_in = 0, test_lvl;
  logic t0, veto, token_start, readout_done, irq;
  roc_module dut (.clk, .rst_n, .t0_in, .veto_in, .test_in, .t0, .veto, .test_lvl,
    .token_start, .token_return, .readout_done, .irq, .irq_ack);

  int n_t0 = 0, n_veto = 0, t0_at = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (t0) begin n_t0++; t0_at = cyc; end
    if (veto) n_veto++;
  end

  int start;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    check(!token_start && !irq && !readout_done, "idle after reset");
    #23 t0_in = 1; start = cyc;
    repeat (6) @(negedge clk);
    check(n_t0 == 1 && t0_at - start <= 3, "T0 pulse within 3 cycles");
    check(irq, "interrupt raised");
    check(token_start, "token started after T0");
    repeat (20) @(negedge clk);
    check(n_t0 == 1, "one pulse per T0 edge");
    t0_in = 0;
    token_return = 1; @(negedge clk);
    check(readout_done, "token returned: readout done");
    irq_ack = 1; @(negedge clk) irq_ack = 0;
    check(!irq, "interrupt acknowledged");
    // next T0: token drops then restarts, done drops
    #17 t0_in = 1;
    @(posedge t0); @(negedge clk); @(negedge clk);
    check(!token_start && !readout_done, "token withdrawn at T0");
    @(negedge clk); check(token_start, "token restarted");
    t0_in = 0;
    // veto and test lines
    veto_in = 1; repeat (4) @(negedge clk); veto_in = 0;
    repeat (3) @(negedge clk); veto_in = 1; repeat (2) @(negedge clk); veto_in = 0;
    repeat (4) @(negedge clk);
    check(n_veto == 2, "one veto pulse per edge");
    test_in = 3'b101; repeat (3) @(negedge clk);
    check(test_lvl == 3'b101, "test levels passed through");
    test_in = 3'b010; repeat (3) @(negedge clk);
    check(test_lvl == 3'b010, "test levels follow");
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
