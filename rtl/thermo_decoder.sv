// Thermometer-code decoder of the TDC: counts the ones in the captured tap vector.
//
// A clean capture is a run of ones from tap 0 up to the tap the hit edge had reached at the
// clock edge. Counting ones instead of locating the first zero gives the same number for a
// clean code and tolerates "bubbles" (isolated wrong bits caused by uneven tap delays and
// flip-flop skew). Purely combinational: code in, bin count out in the same cycle.
`timescale 1ps / 1ps
module thermo_decoder #(
  parameter int unsigned N_TAPS = 192,
  parameter int unsigned BIN_W  = $clog2(N_TAPS + 1)
) (
  input  logic [N_TAPS-1:0] code,
  output logic [BIN_W-1:0]  nbins
);
  always_comb begin
    nbins = '0;
    for (int unsigned i = 0; i < N_TAPS; i++) nbins = nbins + BIN_W'(code[i]);
  end
endmodule
