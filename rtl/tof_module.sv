// tof_module: TOF histogramming module, single-element detector version.
//
// Sixteen detectors enter through eight SIMM personality modules; each SIMM
// pair of detectors is served by one channel_fpga (time counter, time
// lookup, serial ADC, ULD veto). The mrc collects the sixteen detectors'
// 32-bit event words into the ping-pong FIFO, swaps it at T0 and sends the
// previous frame to the IOC while this module holds the readout token.
// tof_registers holds what the IOC loads: per-detector block offsets,
// thresholds, LLD DAC codes (brought out on lld_code for the board's DAC),
// input source and pulse-height switch, and the time tables.
//
// Interface: t0, veto and test_lvl come from the ROC over the local bus (t0
// and veto are one-cycle pulses in the 10 MHz domain, test_lvl synchronised
// levels). simm_trig and simm_sdata are the SIMMs' trigger and serial ADC
// outputs. The token and read port are described in mrc. `status` gives
// one-cycle flags of what happened to events this cycle.
module tof_module
  import das_pkg::*;
#(
  parameter int unsigned SLOT       = 0,
  parameter int unsigned TIME_W     = das_pkg::TIME_W,
  parameter int unsigned FIFO_DEPTH = das_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              t0,
  input  logic              veto,
  input  logic [N_TEST-1:0] test_lvl,
  input  cfg_req_t          cfg,
  input  logic [N_DET-1:0]  simm_trig,
  input  logic [N_DET-1:0]  simm_sdata,
  output logic [LLD_W-1:0]  lld_code [N_DET],
  input  logic              token_in,
  output logic              token_out,
  input  logic              rd,
  output logic              rd_ack,
  output logic [WORD_W-1:0] rd_data,
  output tof_status_t       status
);
  det_cfg_t          det_cfg [N_DET];
  logic [N_DET-1:0]  lut_we, sw_trig;
  logic [TIME_W-1:0] lut_addr;
  logic [HIST_W-1:0] lut_wdata;

  tof_registers #(.SLOT(SLOT), .N_DET(N_DET), .TIME_W(TIME_W)) u_regs (
    .clk, .rst_n, .cfg, .det_cfg, .lut_we, .lut_addr, .lut_wdata, .sw_trig
  );

  for (genvar d = 0; d < N_DET; d++) begin : g_lld
    assign lld_code[d] = det_cfg[d].lld;
  end

  logic [N_DET-1:0] det_valid, det_ready, uld_veto, dead, out_of_gate, adc_timeout;
  event_word_t      det_word [N_DET];

  for (genvar c = 0; c < N_CHANNELS; c++) begin : g_ch
    localparam int unsigned B = c * DET_PER_CHANNEL;
    channel_fpga #(.TIME_W(TIME_W)) u_ch (
      .clk, .rst_n, .t0,
      .trig       (simm_trig[B +: DET_PER_CHANNEL]),
      .sdata      (simm_sdata[B +: DET_PER_CHANNEL]),
      .test_lvl,
      .sw_trig    (sw_trig[B +: DET_PER_CHANNEL]),
      .cfg        (det_cfg[B:B+DET_PER_CHANNEL-1]),
      .lut_we     (lut_we[B +: DET_PER_CHANNEL]),
      .lut_addr,
      .lut_wdata,
      .out_valid  (det_valid[B +: DET_PER_CHANNEL]),
      .out_word   (det_word[B:B+DET_PER_CHANNEL-1]),
      .out_ready  (det_ready[B +: DET_PER_CHANNEL]),
      .uld_veto   (uld_veto[B +: DET_PER_CHANNEL]),
      .dead       (dead[B +: DET_PER_CHANNEL]),
      .out_of_gate(out_of_gate[B +: DET_PER_CHANNEL]),
      .adc_timeout(adc_timeout[B +: DET_PER_CHANNEL])
    );
  end

  logic accepted, overflow, vetoed, unread_lost;
  mrc #(.N_DET(N_DET), .FIFO_DEPTH(FIFO_DEPTH)) u_mrc (
    .clk, .rst_n, .t0, .veto,
    .det_valid, .det_word, .det_ready,
    .token_in, .token_out,
    .rd, .rd_ack, .rd_data,
    .accepted, .overflow, .vetoed, .unread_lost
  );

  assign status = '{accepted: accepted, uld_veto: |uld_veto, dead: |dead,
                    out_of_gate: |out_of_gate, adc_timeout: |adc_timeout,
                    overflow: overflow, vetoed: vetoed, unread_lost: unread_lost};
endmodule
