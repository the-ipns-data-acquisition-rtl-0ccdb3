// simm_model: behavioural model of a single-element SIMM personality module,
// digital side only.
//
// A detector pulse is given as `fire` with its peak amplitude `amp` in LLD
// DAC steps (12 bits over 2.5 V, ~0.6 mV per step). If the amplitude is above
// the LLD code, the model raises its event trigger for TRIG_CYCLES cycles and,
// CONV_CYCLES cycles after the pulse, sends the 8-bit peak ADC value (the top
// 8 bits of the amplitude, ~10 mV per step) on sdata as a start bit '1' and
// 8 bits MSB first, one per 100 ns cycle. For LOCKOUT cycles after a trigger
// (15 cycles = 1.5 us) further pulses are ignored and counted in `locked_out`.
// With `mute_adc` set the model triggers but sends no ADC word.
module simm_model #(
  parameter int CONV_CYCLES = 3,
  parameter int TRIG_CYCLES = 4,
  parameter int LOCKOUT     = 15
) (
  input  logic        clk,
  input  logic        fire,
  input  logic [11:0] amp,
  input  logic [11:0] lld,
  input  logic        mute_adc,
  output logic        trig,
  output logic        sdata,
  output int          locked_out
);
  int         lock_cnt = 0;
  int         tcnt = 0;
  int         scnt = -1;
  logic [8:0] frame = '0;

  initial begin
    trig = 1'b0;
    sdata = 1'b0;
    locked_out = 0;
  end

  always @(posedge clk) begin
    if (lock_cnt > 0) lock_cnt <= lock_cnt - 1;
    if (tcnt > 0) begin
      tcnt <= tcnt - 1;
      if (tcnt == 1) trig <= 1'b0;
    end
    if (scnt > 0) scnt <= scnt - 1;
    else if (scnt == 0) begin
      sdata <= frame[8];
      frame <= {frame[7:0], 1'b0};
      if (frame[7:0] == 8'd0 && frame[8] == 1'b0) scnt <= -1;
    end
    if (fire && amp > lld) begin
      if (lock_cnt > 0) locked_out <= locked_out + 1;
      else begin
        trig     <= 1'b1;
        tcnt     <= TRIG_CYCLES;
        lock_cnt <= LOCKOUT - 1;
        if (!mute_adc) begin
          frame <= {1'b1, amp[11:4]};
          scnt  <= CONV_CYCLES;
        end
      end
    end
  end
endmodule
