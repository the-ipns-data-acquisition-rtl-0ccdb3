// sync_edge: two-flop synchroniser with a rising-edge detector.
//
// Brings an asynchronous front-panel or SIMM signal into the 10 MHz domain.
// `level` is the synchronised signal (two cycles of latency); `rise` is high
// for one cycle when it goes from 0 to 1. Reset clears all stages.
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic level,
  output logic rise
);
  logic s1, s2, s3;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {s1, s2, s3} <= '0;
    else        {s1, s2, s3} <= {din, s1, s2};
  end
  assign level = s2;
  assign rise  = s2 & ~s3;
endmodule
