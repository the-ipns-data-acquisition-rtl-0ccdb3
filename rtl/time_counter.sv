// time_counter: time-of-flight counter of a channel FPGA.
//
// Counts cycles of the global 10 MHz clock (100 ns per count) from the last
// T0 pulse: the cycle after `t0` the count is 0, then 1, 2, ... The counter
// is idle (in_window = 0) from reset until the first T0. Instead of wrapping
// it stops at its all-ones value and drops in_window, so an event late in a
// long frame is not given a small, wrong time; with 20 bits the window is
// 104.9 ms, longer than the 33.3 ms frame of a 30 Hz source. Counting from T0
// at 10 MHz and the 20-bit width follow the IPNS system description; the saturation and the
// idle state before the first T0 are this design's choice.
module time_counter #(
  parameter int unsigned TIME_W = das_pkg::TIME_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              t0,
  output logic [TIME_W-1:0] count,
  output logic              in_window
);
  logic running;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      count   <= '0;
    end else if (t0) begin
      running <= 1'b1;
      count   <= '0;
    end else if (running) begin
      if (&count) running <= 1'b0;
      else        count   <= count + 1'b1;
    end
  end
  assign in_window = running;
endmodule
