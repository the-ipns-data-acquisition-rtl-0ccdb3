// tb_time_lut: writes pseudo-random entries over the whole 2^20 address range
// of the time table (at spread addresses) and reads them back, checking the
// one-cycle read latency and that a write does not disturb other entries.
module tb_time_lut;
  logic clk = 0;
  always #50 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic we = 0; logic [19:0] waddr = 0, raddr = 0; logic [15:0] wdata = 0, rdata;
  time_lut dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  logic [19:0] addrs [64]; logic [15:0] vals [64];
  initial begin
    for (int i = 0; i < 64; i++) begin
      addrs[i] = 20'(i * 16411 + (i == 63 ? 20'hFFFFF : 0));
      vals[i]  = 16'($urandom);
    end
    addrs[63] = 20'hFFFFF; addrs[0] = 20'h0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) begin we = 1; waddr = addrs[i]; wdata = vals[i]; end
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) raddr = addrs[i];
      @(posedge clk); #1;
      check(rdata == vals[i], $sformatf("entry %h", addrs[i]));
    end
    // read latency: data of the new address only after the clock edge
    @(negedge clk) raddr = addrs[5];
    @(posedge clk); #1;
    @(negedge clk) raddr = addrs[6];
    #1 check(rdata == vals[5], "output holds until the next edge");
    @(posedge clk); #1 check(rdata == vals[6], "new entry one cycle later");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
