// roc_module: readout control (ROC) module of the mainframe.
//
// Gathers the crate's external control signals and puts them on the local
// bus for the TOF modules: the accelerator pulse T0 and the system veto are
// synchronised to the 10 MHz clock and turned into one-cycle pulses on their
// rising edges; the three test inputs are synchronised and passed on as
// levels (each detector may select one as its input).
//
// Each T0 raises the interrupt to the IOC (held until irq_ack) and restarts
// the readout: token_start, the token handed to the first TOF module, is low
// for the T0 cycle and the one after it, then high for the rest of the frame.
// When the token comes back from the last module (token_return), the frame
// has been read completely and readout_done goes high. The IOC polls this
// through the read port of the crate. T0 distribution, the interrupt, the
// veto, the test signals and the token origin and return follow the IPNS
// system description; the synchronisers, pulse widths and token timing are this
// design's choices.
module roc_module
  import das_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // front panel
  input  logic              t0_in,
  input  logic              veto_in,
  input  logic [N_TEST-1:0] test_in,
  // local bus to the TOF modules
  output logic              t0,
  output logic              veto,
  output logic [N_TEST-1:0] test_lvl,
  // readout token
  output logic              token_start,
  input  logic              token_return,
  output logic              readout_done,
  // IOC interrupt
  output logic              irq,
  input  logic              irq_ack
);
  logic t0_lvl, veto_lvl;
  logic [N_TEST-1:0] test_rise;

  sync_edge u_t0   (.clk, .rst_n, .din(t0_in),   .level(t0_lvl),   .rise(t0));
  sync_edge u_veto (.clk, .rst_n, .din(veto_in), .level(veto_lvl), .rise(veto));
  for (genvar i = 0; i < N_TEST; i++) begin : g_test
    sync_edge u_test (.clk, .rst_n, .din(test_in[i]), .level(test_lvl[i]), .rise(test_rise[i]));
  end

  logic t0_d, frame_started;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0_d          <= 1'b0;
      frame_started <= 1'b0;
      token_start   <= 1'b0;
      irq           <= 1'b0;
    end else begin
      t0_d <= t0;
      if (t0) begin
        token_start   <= 1'b0;
        frame_started <= 1'b1;
      end else if (t0_d) begin
        token_start   <= 1'b1;
      end
      if (t0)           irq <= 1'b1;
      else if (irq_ack) irq <= 1'b0;
    end
  end

  assign readout_done = token_start && token_return && frame_started;

  logic unused;
  assign unused = t0_lvl ^ veto_lvl ^ (^test_rise);
endmodule
