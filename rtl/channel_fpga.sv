// channel_fpga: the FPGA behind one SIMM personality module.
//
// A single-element SIMM carries two detectors, so one channel FPGA holds a
// time counter, restarted by every T0 and clocked by the global 10 MHz clock,
// and two detector_channel pipelines that share it. Each pipeline has its own
// time lookup table and its own settings, and hands its event words to the
// module readout control independently (valid/ready per detector). One
// counter per channel FPGA follows the IPNS system description; two detectors
// per FPGA follows from its sixteen detectors on eight SIMMs.
module channel_fpga
  import das_pkg::*;
#(
  parameter int unsigned TIME_W = das_pkg::TIME_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       t0,
  input  logic [DET_PER_CHANNEL-1:0] trig,
  input  logic [DET_PER_CHANNEL-1:0] sdata,
  input  logic [N_TEST-1:0]          test_lvl,
  input  logic [DET_PER_CHANNEL-1:0] sw_trig,
  input  det_cfg_t                   cfg      [DET_PER_CHANNEL],
  input  logic [DET_PER_CHANNEL-1:0] lut_we,
  input  logic [TIME_W-1:0]          lut_addr,
  input  logic [HIST_W-1:0]          lut_wdata,
  output logic [DET_PER_CHANNEL-1:0] out_valid,
  output event_word_t                out_word [DET_PER_CHANNEL],
  input  logic [DET_PER_CHANNEL-1:0] out_ready,
  output logic [DET_PER_CHANNEL-1:0] uld_veto,
  output logic [DET_PER_CHANNEL-1:0] dead,
  output logic [DET_PER_CHANNEL-1:0] out_of_gate,
  output logic [DET_PER_CHANNEL-1:0] adc_timeout
);
  logic [TIME_W-1:0] time_now;
  logic              time_valid;

  time_counter #(.TIME_W(TIME_W)) u_counter (
    .clk, .rst_n, .t0, .count(time_now), .in_window(time_valid)
  );

  for (genvar d = 0; d < DET_PER_CHANNEL; d++) begin : g_det
    detector_channel #(.TIME_W(TIME_W)) u_det (
      .clk, .rst_n,
      .time_now, .time_valid,
      .trig_in   (trig[d]),
      .sdata     (sdata[d]),
      .test_lvl,
      .sw_trig   (sw_trig[d]),
      .cfg       (cfg[d]),
      .lut_we    (lut_we[d]),
      .lut_addr,
      .lut_wdata,
      .out_valid (out_valid[d]),
      .out_word  (out_word[d]),
      .out_ready (out_ready[d]),
      .uld_veto  (uld_veto[d]),
      .dead      (dead[d]),
      .out_of_gate(out_of_gate[d]),
      .adc_timeout(adc_timeout[d])
    );
  end
endmodule
