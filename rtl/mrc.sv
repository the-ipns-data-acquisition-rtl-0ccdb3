// mrc: module readout control of a TOF module.
//
// Collects the event words of the module's N_DET detector pipelines and moves
// them into the fill side of the ping-pong buffer, one word per cycle, with a
// round-robin grant so that no detector is starved. At T0 the ping-pong
// buffer swaps: the frame just collected becomes readable. No word is taken
// in the T0 cycle itself (the detector keeps offering it). A system veto
// pulse empties the fill side and, until the next T0, words are still taken
// from the detectors but thrown away, so the vetoed frame yields no data.
//
// Readout: the module holds the readout token when token_in is high and it
// has not yet passed it on. While it holds the token, each IOC read strobe
// `rd` pops one word of the previous frame; the word appears on rd_data with
// rd_ack one cycle later (rd_data is zero otherwise, so the modules' buses
// can be ORed). Once its read side is empty, the module raises token_out,
// which stays high until the next T0. So the token is a level passed along
// the chain of modules; a module with nothing to send passes it in one
// cycle.
//
// Following the IPNS system description: the FIFO ping-pong swap at T0, the veto resetting the
// readout control, the token passed from module to module. This design's own:
// the round-robin order, the one-word-per-cycle transfer, the level token and
// the read/ack timing.
module mrc
  import das_pkg::*;
#(
  parameter int unsigned N_DET      = das_pkg::N_DET,
  parameter int unsigned FIFO_DEPTH = das_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              t0,
  input  logic              veto,
  // from the detector pipelines
  input  logic [N_DET-1:0]  det_valid,
  input  event_word_t       det_word [N_DET],
  output logic [N_DET-1:0]  det_ready,
  // readout token chain
  input  logic              token_in,
  output logic              token_out,
  // VXI data read
  input  logic              rd,
  output logic              rd_ack,
  output logic [WORD_W-1:0] rd_data,
  // event flags
  output logic              accepted,
  output logic              overflow,
  output logic              vetoed,
  output logic              unread_lost
);
  localparam int unsigned IW = (N_DET > 1) ? $clog2(N_DET) : 1;

  // ---- round-robin grant
  logic [IW-1:0] rr_ptr;
  logic [IW-1:0] gnt_idx;
  logic          gnt_any;
  always_comb begin
    gnt_any = 1'b0;
    gnt_idx = rr_ptr;
    for (int k = 0; k < N_DET; k++) begin
      int unsigned idx;
      idx = (int'(rr_ptr) + k) % N_DET;
      if (!gnt_any && det_valid[idx]) begin
        gnt_any = 1'b1;
        gnt_idx = IW'(idx);
      end
    end
    if (t0) gnt_any = 1'b0;
  end

  always_comb begin
    det_ready = '0;
    if (gnt_any) det_ready[gnt_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       rr_ptr <= '0;
    else if (gnt_any) rr_ptr <= (gnt_idx == IW'(N_DET-1)) ? '0 : gnt_idx + 1'b1;
  end

  // ---- veto: discard the rest of the frame
  logic inhibit;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    inhibit <= 1'b0;
    else if (t0)   inhibit <= 1'b0;
    else if (veto) inhibit <= 1'b1;
  end

  // ---- ping-pong frame buffer
  logic              pp_wr, pp_rd, pp_empty, pp_full, pp_ovf;
  logic [WORD_W-1:0] pp_rdata;
  logic [$clog2(FIFO_DEPTH):0] pp_count;
  assign pp_wr = gnt_any && !inhibit && !veto;

  pingpong_buffer #(.DEPTH(FIFO_DEPTH), .WIDTH(WORD_W)) u_pp (
    .clk, .rst_n,
    .swap       (t0),
    .clear_fill (veto),
    .wr_en      (pp_wr),
    .wr_data    (det_word[gnt_idx]),
    .rd_en      (pp_rd),
    .rd_data    (pp_rdata),
    .rd_empty   (pp_empty),
    .fill_full  (pp_full),
    .fill_count (pp_count),
    .overflow   (pp_ovf),
    .unread_lost(unread_lost)
  );

  // ---- token and read port
  logic done, have_token;
  assign have_token = token_in && !done;
  assign pp_rd      = rd && have_token && !pp_empty && !t0;
  assign token_out  = token_in && done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done    <= 1'b0;
      rd_ack  <= 1'b0;
      rd_data <= '0;
    end else begin
      rd_ack  <= pp_rd;
      rd_data <= pp_rd ? pp_rdata : '0;
      if (t0)                          done <= 1'b0;
      else if (have_token && pp_empty) done <= 1'b1;
    end
  end

  assign accepted = pp_wr && !pp_full;
  assign overflow = pp_ovf;
  assign vetoed   = gnt_any && (inhibit || veto);

  logic unused;
  assign unused = ^pp_count;

  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(det_ready));
  a_grant_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                  (det_ready & ~det_valid) == '0);
endmodule
