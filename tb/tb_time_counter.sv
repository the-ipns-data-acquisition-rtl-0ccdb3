// tb_time_counter: checks the time-of-flight counter: idle before the first
// T0, count n at n cycles after the T0 edge, restart at the next T0, and stop
// at the all-ones value with the window closed (TIME_W reduced to 6 so the
// end of the window is reached quickly; a second instance at the default
// 20 bits checks the count reached within a 33.3 ms frame).
module tb_time_counter;
  logic clk = 0, rst_n = 0, t0 = 0;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [5:0] cnt; logic win;
  logic [19:0] cnt20; logic win20;
  time_counter #(.TIME_W(6)) dut (.clk, .rst_n, .t0, .count(cnt), .in_window(win));
  time_counter dut20 (.clk, .rst_n, .t0, .count(cnt20), .in_window(win20));

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    check(!win && cnt == 0, "idle before first T0");
    t0 = 1; @(negedge clk); t0 = 0;
    for (int n = 0; n < 40; n++) begin
      check(win && cnt == 6'(n), $sformatf("count %0d after T0", n));
      @(negedge clk);
    end
    t0 = 1; @(negedge clk); t0 = 0;
    check(win && cnt == 0, "restart at T0");
    repeat (63) @(negedge clk);
    check(win && cnt == 63, "last count in window");
    @(negedge clk);
    check(!win && cnt == 63, "window closed at saturation");
    repeat (10) @(negedge clk);
    check(!win && cnt == 63, "stays saturated");
    // 20-bit counter: one 30 Hz frame is 333,333 cycles, within 2^20
    t0 = 1; @(negedge clk); t0 = 0;
    repeat (333333) @(negedge clk);
    check(win20 && cnt20 == 20'd333333, "20-bit counter at the end of a 33.3 ms frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
