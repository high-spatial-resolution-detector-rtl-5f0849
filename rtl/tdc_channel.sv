// One STOP channel of the tapped-delay-line TDC with Nutt interpolation.
//
// The TDC clock is the "stop" of the delay line: every clock edge captures the tap vector.
// A hit whose edge reached tap 0 since the previous capture is a new event; the number of ones
// in the capture tells how far the edge travelled before the clock edge. The calibration table
// turns that bin count into the elapsed time d in LSB, and the timestamp is the coarse count of
// the capturing edge times one clock period (1024 LSB) minus d. The delay line must be longer
// than one clock period so every hit is seen in exactly one capture.
//
// Pipeline (all registered): capture -> event detect + ones count -> table read -> subtract.
// ev_valid/ev_ts appear 4 clocks after the capturing edge. A new hit needs tap 0 to have been
// captured low, so pulses must stay high and low for at least one clock each: at most one hit
// per two clocks (4.8 ns, 208 Mhits/s). The structure (delay line, capture flip-flops,
// thermometer decoding, coarse counter, calibration) follows the described TDC; the one-count
// decoder, table calibration, 2.4 ns clock and hit detection rule are this design's choices.
// The sub-interpolation stage that gives the original converter its finer resolution is not
// included.
`timescale 1ps / 1ps
module tdc_channel
  import cdl_pkg::*;
#(
  parameter int unsigned N_TAPS      = 192,
  parameter int unsigned CAL_W       = 11,
  parameter int unsigned TAP_LSB_X16 = 102,
  parameter int unsigned BIN_W       = $clog2(N_TAPS + 1)
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic [N_TAPS-1:0]      taps,
  input  logic [TS_W-FINE_W-1:0] coarse,
  input  logic                   cal_we,
  input  logic [BIN_W-1:0]       cal_addr,
  input  logic [CAL_W-1:0]       cal_data,
  output logic                   ev_valid,
  output logic [TS_W-1:0]        ev_ts
);
  localparam int unsigned CW = TS_W - FINE_W;

  // stage 1: capture flip-flops
  logic [N_TAPS-1:0] samp;
  logic              prev0;
  logic [CW-1:0]     c1;
  // stage 2: event detect, decode
  logic              v2;
  logic [BIN_W-1:0]  nbins, b2;
  logic [CW-1:0]     c2;
  // stage 3: calibration read
  logic              v3;
  logic [CW-1:0]     c3;
  logic [CAL_W-1:0]  d3;

  always_ff @(posedge clk) begin
    samp  <= taps;
    c1    <= coarse;
    prev0 <= rst ? 1'b1 : samp[0];
  end

  thermo_decoder #(.N_TAPS(N_TAPS), .BIN_W(BIN_W)) u_dec (.code(samp), .nbins(nbins));

  always_ff @(posedge clk) begin
    if (rst) v2 <= 1'b0;
    else     v2 <= samp[0] & ~prev0;
    b2 <= nbins;
    c2 <= c1;
  end

  tdc_calib_lut #(.DEPTH(2 ** BIN_W), .CAL_W(CAL_W), .TAP_LSB_X16(TAP_LSB_X16)) u_cal (
    .clk(clk), .we(cal_we), .waddr(cal_addr), .wdata(cal_data), .raddr(b2), .rdata(d3)
  );

  always_ff @(posedge clk) begin
    if (rst) v3 <= 1'b0;
    else     v3 <= v2;
    c3 <= c2;
  end

  always_ff @(posedge clk) begin
    if (rst) ev_valid <= 1'b0;
    else     ev_valid <= v3;
    ev_ts <= {c3, FINE_W'(0)} - TS_W'(d3);
  end
endmodule
