// Calibration table of one TDC channel: maps a bin count of the delay line to the time, in LSB
// (2.34375 ps), that the hit edge needed to travel that far, i.e. the time from the hit to the
// capturing clock edge.
//
// Because the taps of a carry chain are uneven, this table is what makes the converter linear.
// It is written by the host (for example from a code-density test: the midpoint of bin m is the
// cumulative width of bins 0..m-1 plus half of bin m). Until it is written, it holds a uniform
// ramp of TAP_LSB_X16/16 LSB per bin. One synchronous write port; one read port with a
// registered output (one clock of latency), as a block RAM would have.
`timescale 1ps / 1ps
module tdc_calib_lut #(
  parameter int unsigned DEPTH       = 256,
  parameter int unsigned CAL_W       = 11,
  parameter int unsigned TAP_LSB_X16 = 102,
  parameter int unsigned AW          = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [CAL_W-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [CAL_W-1:0] rdata
);
  logic [CAL_W-1:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = CAL_W'((i * TAP_LSB_X16 + 8) / 16);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
