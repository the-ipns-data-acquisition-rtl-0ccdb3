// pingpong_buffer: the TOF module's two-frame event buffer.
//
// Two FIFOs of DEPTH 32-bit words. During a T0 frame one of them (the fill
// side) takes the new event words while the other (the read side) holds the
// previous frame for the IOC. `swap`, driven by T0, exchanges the roles in
// one cycle; whatever the IOC had not yet read from the old read side is
// discarded (unread_lost) so that the new fill side starts empty. `clear_fill`
// (system veto) empties the fill side only. A write to a full fill side is
// dropped and flagged as `overflow`: the 2K depth is what bounds the
// module's time-averaged event rate. Two FIFOs swapped at T0 and the 2K
// depth follow the IPNS system description; discarding unread words and the overflow flag
// are this design's choices.
module pingpong_buffer #(
  parameter int unsigned DEPTH = das_pkg::FIFO_DEPTH,
  parameter int unsigned WIDTH = das_pkg::WORD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             swap,
  input  logic             clear_fill,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_empty,
  output logic             fill_full,
  output logic [$clog2(DEPTH):0] fill_count,
  output logic             overflow,
  output logic             unread_lost
);
  logic             fill_sel;  // index of the FIFO being filled
  logic [1:0]       f_clear, f_wr, f_rd, f_empty, f_full;
  logic [WIDTH-1:0] f_rdata [2];
  logic [$clog2(DEPTH):0] f_count [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    fill_sel <= 1'b0;
    else if (swap) fill_sel <= ~fill_sel;
  end

  for (genvar i = 0; i < 2; i++) begin : g_fifo
    wire is_fill = (fill_sel == 1'(i));
    // On swap the read side becomes the fill side: it is emptied.
    assign f_clear[i] = is_fill ? (clear_fill && !swap) : swap;
    assign f_wr[i]    = is_fill && wr_en && !swap && !clear_fill;
    assign f_rd[i]    = !is_fill && rd_en && !swap;
    sync_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_fifo (
      .clk, .rst_n,
      .clear  (f_clear[i]),
      .wr_en  (f_wr[i]),
      .wr_data,
      .rd_en  (f_rd[i]),
      .rd_data(f_rdata[i]),
      .empty  (f_empty[i]),
      .full   (f_full[i]),
      .count  (f_count[i])
    );
  end

  assign rd_data     = f_rdata[~fill_sel];
  assign rd_empty    = f_empty[~fill_sel];
  assign fill_full   = f_full[fill_sel];
  assign fill_count  = f_count[fill_sel];
  assign overflow    = wr_en && !swap && !clear_fill && f_full[fill_sel];
  assign unread_lost = swap && !f_empty[~fill_sel];
endmodule
