// tof_registers: the TOF module's IOC-loaded settings.
//
// Decodes the IOC's configuration writes addressed to this module's SLOT and
// keeps, for each of the N_DET detectors, the block offset (which histogram
// its events go to), the upper level threshold, the 12-bit code of its lower
// level discriminator DAC, the pulse-height switch, the input source
// (detector or one of the three test signals) and an enable. A CFG_SWTRIG
// write makes a one-cycle software trigger on the addressed detector. A
// CFG_LUT write stores data at entry `index` of that detector's time lookup
// table, one cycle later. All outputs are registered.
//
// The settings themselves come from the IPNS system description; their encoding in cfg_req_t
// and the reset values (detector disabled, block offset 0, ULD at full scale
// so nothing is vetoed, LLD 0, input from the detector, time mode) are this
// design's choices.
module tof_registers
  import das_pkg::*;
#(
  parameter int unsigned SLOT   = 0,
  parameter int unsigned N_DET  = das_pkg::N_DET,
  parameter int unsigned TIME_W = das_pkg::TIME_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_req_t          cfg,
  output det_cfg_t          det_cfg   [N_DET],
  output logic [N_DET-1:0]  lut_we,
  output logic [TIME_W-1:0] lut_addr,
  output logic [HIST_W-1:0] lut_wdata,
  output logic [N_DET-1:0]  sw_trig
);
  logic hit;
  assign hit = cfg.we && (cfg.slot == SLOT_W'(SLOT)) && (int'(cfg.det) < N_DET);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < N_DET; d++) begin
        det_cfg[d] <= '{block_off: '0, uld: '1, lld: '0, src: SRC_DETECTOR,
                        ph_mode: 1'b0, enable: 1'b0};
      end
      lut_we    <= '0;
      lut_addr  <= '0;
      lut_wdata <= '0;
      sw_trig   <= '0;
    end else begin
      lut_we  <= '0;
      sw_trig <= '0;
      if (hit) begin
        unique case (cfg.sel)
          CFG_BLOCK_OFF: det_cfg[cfg.det].block_off <= cfg.data;
          CFG_ULD:       det_cfg[cfg.det].uld       <= cfg.data[ADC_W-1:0];
          CFG_LLD:       det_cfg[cfg.det].lld       <= cfg.data[LLD_W-1:0];
          CFG_CTRL: begin
            det_cfg[cfg.det].enable  <= cfg.data[0];
            det_cfg[cfg.det].ph_mode <= cfg.data[1];
            det_cfg[cfg.det].src     <= input_src_e'(cfg.data[3:2]);
          end
          CFG_SWTRIG:    sw_trig[cfg.det] <= 1'b1;
          CFG_LUT: begin
            lut_we[cfg.det] <= 1'b1;
            lut_addr        <= cfg.index[TIME_W-1:0];
            lut_wdata       <= cfg.data;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
