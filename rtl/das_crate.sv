// das_crate: one VXI mainframe of the data acquisition system.
//
// A ROC module and N_TOF TOF histogramming modules (each 16 single-element
// detectors) share a local bus carrying T0, the system veto and the three
// test signals. Each T0 ends a frame: every TOF module swaps its ping-pong
// FIFO and the ROC interrupts the IOC. The IOC then reads one data address
// repeatedly. The readout token runs ROC -> TOF 0 -> TOF 1 -> ... -> TOF
// N_TOF-1 -> ROC; the module holding it answers each read with one word of
// the previous frame (rd_ack high one cycle after rd), then passes the token
// on when it has no more. When the token is back at the ROC, rd_done is
// high and the frame is complete. The IOC and the SIMMs' analog front ends
// and the LLD DACs are outside this design: their signals are ports.
//
// Each event word is {block offset[31:16], histogram offset[15:0]}; the IOC
// increments the histogram channel, the histogram's sum channel (word 0 of
// the histogram) and channel `block offset` of histogram 0.
//
// The IOC's configuration writes (cfg) select a module by cfg.slot, which is
// the module's position in the token chain.
module das_crate
  import das_pkg::*;
#(
  parameter int unsigned N_TOF      = das_pkg::MAX_TOF,
  parameter int unsigned TIME_W     = das_pkg::TIME_W,
  parameter int unsigned FIFO_DEPTH = das_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  // ROC front panel
  input  logic              t0_in,
  input  logic              veto_in,
  input  logic [N_TEST-1:0] test_in,
  // IOC side
  input  cfg_req_t          cfg,
  input  logic              rd,
  output logic              rd_ack,
  output logic [WORD_W-1:0] rd_data,
  output logic              rd_done,
  output logic              irq,
  input  logic              irq_ack,
  // SIMM front ends and LLD DACs
  input  logic [N_DET-1:0]  simm_trig  [N_TOF],
  input  logic [N_DET-1:0]  simm_sdata [N_TOF],
  output logic [LLD_W-1:0]  lld_code   [N_TOF][N_DET],
  // per-module event flags
  output tof_status_t       status     [N_TOF]
);
  logic              t0, veto;
  logic [N_TEST-1:0] test_lvl;
  logic [N_TOF:0]    token;
  logic [N_TOF-1:0]  ack;
  logic [WORD_W-1:0] data [N_TOF];

  roc_module u_roc (
    .clk, .rst_n, .t0_in, .veto_in, .test_in,
    .t0, .veto, .test_lvl,
    .token_start (token[0]),
    .token_return(token[N_TOF]),
    .readout_done(rd_done),
    .irq, .irq_ack
  );

  for (genvar m = 0; m < N_TOF; m++) begin : g_tof
    tof_module #(.SLOT(m), .TIME_W(TIME_W), .FIFO_DEPTH(FIFO_DEPTH)) u_tof (
      .clk, .rst_n, .t0, .veto, .test_lvl, .cfg,
      .simm_trig (simm_trig[m]),
      .simm_sdata(simm_sdata[m]),
      .lld_code  (lld_code[m]),
      .token_in  (token[m]),
      .token_out (token[m+1]),
      .rd,
      .rd_ack    (ack[m]),
      .rd_data   (data[m]),
      .status    (status[m])
    );
  end

  // Only the token holder drives a word; the others drive zero.
  always_comb begin
    rd_data = '0;
    for (int m = 0; m < N_TOF; m++) rd_data |= data[m];
  end
  assign rd_ack = |ack;

  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ack));
endmodule
