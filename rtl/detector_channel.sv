// detector_channel: event pipeline of one single-element detector.
//
// Part of a channel FPGA. When the detector's event trigger (the SIMM's LLD
// comparator output) rises, the pipeline latches the time counter, looks the
// time up in the detector's own time_lut, and meanwhile receives the SIMM's
// 8-bit peak ADC value over a serial line. The value is compared with the
// upper level threshold: above it the event is vetoed locally; otherwise a
// 32-bit word {block offset, histogram offset} is offered to the module
// readout control (MRC) with a valid/ready handshake. With the pulse-height
// switch set, the histogram offset is the ADC value instead of the converted
// time.
//
// Timing (one cycle = 100 ns): the asynchronous trigger is synchronised (2
// cycles), the time latched in the cycle its edge is seen and the LUT read in
// the next. The ADC word arrives as a start bit '1' followed by 8 bits, MSB
// first, one bit per cycle, starting at the earliest in the cycle after the
// edge is seen; if no start bit arrives within ADC_TIMEOUT cycles the event
// is dropped. The pipeline takes a new trigger only when idle: triggers
// during an event are counted as dead time (the SIMM's 1.5 us ADC lockout
// normally keeps them from coming). Triggers outside the time counter's
// window are dropped.
//
// Following the IPNS system description: time latch, 16-bit LUT conversion, 8-bit serial ADC,
// ULD veto above threshold, pulse-height switch, block offset per detector,
// test signals and software-driven input as alternate detector inputs. This
// design's own choices: the serial frame format, the timeout, the
// valid/ready handshake, the zero-extended ADC value as pulse-height offset,
// and that test and software triggers carry no ADC value (taken as 0, so they
// pass the ULD).
module detector_channel
  import das_pkg::*;
#(
  parameter int unsigned TIME_W      = das_pkg::TIME_W,
  parameter int unsigned ADC_TIMEOUT = 31
) (
  input  logic              clk,
  input  logic              rst_n,
  // time base from the channel FPGA's counter
  input  logic [TIME_W-1:0] time_now,
  input  logic              time_valid,
  // detector side
  input  logic              trig_in,     // SIMM event trigger (asynchronous)
  input  logic              sdata,       // SIMM serial ADC data
  input  logic [N_TEST-1:0] test_lvl,    // test signals from the ROC
  input  logic              sw_trig,     // software-driven input, 1-cycle pulse
  input  det_cfg_t          cfg,
  // time lookup table load
  input  logic              lut_we,
  input  logic [TIME_W-1:0] lut_addr,
  input  logic [HIST_W-1:0] lut_wdata,
  // to the MRC
  output logic              out_valid,
  output event_word_t       out_word,
  input  logic              out_ready,
  // event flags
  output logic              uld_veto,
  output logic              dead,
  output logic              out_of_gate,
  output logic              adc_timeout
);
  typedef enum logic [1:0] {S_IDLE, S_ADC, S_DECIDE, S_OUT} state_e;
  state_e state;

  // ---- trigger source selection and edge detection
  logic raw_trig, trig_level, trig_rise, event_in;
  always_comb begin
    unique case (cfg.src)
      SRC_DETECTOR: raw_trig = trig_in;
      SRC_TEST0:    raw_trig = test_lvl[0];
      SRC_TEST1:    raw_trig = test_lvl[1];
      default:      raw_trig = test_lvl[2];
    endcase
  end
  sync_edge u_sync (.clk, .rst_n, .din(raw_trig), .level(trig_level), .rise(trig_rise));
  assign event_in = (trig_rise | sw_trig) & cfg.enable;

  // ---- time lookup
  logic [HIST_W-1:0] lut_q;
  time_lut #(.ADDR_W(TIME_W), .DATA_W(HIST_W)) u_lut (
    .clk, .we(lut_we), .waddr(lut_addr), .wdata(lut_wdata),
    .raddr(time_now), .rdata(lut_q)
  );

  // ---- serial ADC receiver and event state
  logic              lut_pending;  // LUT result arrives this cycle
  logic [HIST_W-1:0] hist_q;
  logic              rx_busy;
  logic [3:0]        rx_cnt;
  logic [ADC_W-1:0]  adc_q;
  logic              adc_done;
  logic [$clog2(ADC_TIMEOUT+1)-1:0] wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      lut_pending <= 1'b0;
      hist_q      <= '0;
      rx_busy     <= 1'b0;
      rx_cnt      <= '0;
      adc_q       <= '0;
      adc_done    <= 1'b0;
      wait_cnt    <= '0;
    end else begin
      lut_pending <= 1'b0;
      if (lut_pending) hist_q <= lut_q;
      unique case (state)
        S_IDLE: if (event_in && time_valid) begin
          // time_now is presented to the LUT this cycle: latched by its read
          lut_pending <= 1'b1;
          adc_q       <= '0;
          adc_done    <= !((cfg.src == SRC_DETECTOR) && trig_rise);
          rx_busy     <= 1'b0;
          rx_cnt      <= '0;
          wait_cnt    <= '0;
          state       <= S_ADC;
        end
        S_ADC: begin
          if (adc_done) begin
            if (!lut_pending) state <= S_DECIDE;
          end else if (rx_busy) begin
            adc_q  <= {adc_q[ADC_W-2:0], sdata};
            rx_cnt <= rx_cnt + 1'b1;
            if (rx_cnt == 4'(ADC_W - 1)) begin
              rx_busy  <= 1'b0;
              adc_done <= 1'b1;
            end
          end else if (sdata) begin
            rx_busy <= 1'b1;
          end else if (wait_cnt == ADC_TIMEOUT[$bits(wait_cnt)-1:0]) begin
            state <= S_IDLE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        S_DECIDE: begin
          if (adc_q > cfg.uld) state <= S_IDLE;
          else                 state <= S_OUT;
        end
        S_OUT: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign out_valid          = (state == S_OUT);
  assign out_word.block_off = cfg.block_off;
  assign out_word.hist_off  = cfg.ph_mode ? HIST_W'(adc_q) : hist_q;

  assign uld_veto    = (state == S_DECIDE) && (adc_q > cfg.uld);
  assign dead        = event_in && (state != S_IDLE);
  assign out_of_gate = event_in && (state == S_IDLE) && !time_valid;
  assign adc_timeout = (state == S_ADC) && !adc_done && !rx_busy && !sdata &&
                       (wait_cnt == ADC_TIMEOUT[$bits(wait_cnt)-1:0]);

  // trig_level is only used through its edge
  logic unused_level;
  assign unused_level = trig_level;
endmodule
