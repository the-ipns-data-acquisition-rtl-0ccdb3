// time_lut: time-conversion lookup RAM of one detector.
//
// Maps the latched time-of-flight count (ADDR_W bits, 2^20 entries) to a
// 16-bit histogram offset. Because every detector has its own table, detectors
// at different flight paths and angles can be time focused onto the same
// histogram channels to the 100 ns clock precision. One write port (loaded by
// the IOC) and one synchronous read port: rdata is valid the cycle after
// raddr. Contents are not reset; the IOC must load every entry it uses.
module time_lut #(
  parameter int unsigned ADDR_W = das_pkg::TIME_W,
  parameter int unsigned DATA_W = das_pkg::HIST_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
