// Behavioural model (not synthesizable logic): tapped delay line of the TDC.
//
// In the FPGA the delay line is a placed carry chain; its tap delays depend on the silicon and
// the placement, so it is modelled here with explicit delays. The hit edge runs from tap 0 to
// tap N_TAPS-1; each tap is the D input of one capture flip-flop in tdc_channel. Tap delays
// repeat 6/22/10/22 ps (mean 15 ps), an uneven pattern like that of a carry chain whose bins
// differ by a factor of three or four; with 192 taps the line spans 2880 ps, more than one
// 2.4 ns TDC clock period. The delay values and the tap count are this model's choices.
//
// Interface: hit (CFD pulse) in, taps[N_TAPS-1:0] out. Timing: tap i follows hit after the sum
// of the first i+1 tap delays (pattern TAP_PS).
`timescale 1ps / 1ps
module tdl_delay_line #(
  parameter int unsigned N_TAPS = 192
) (
  input  logic              hit,
  output logic [N_TAPS-1:0] taps
);
  // Delay of tap i in ps (pattern 6/22/10/22).
  localparam int unsigned TAP_PS[4] = '{6, 22, 10, 22};

  assign #(TAP_PS[0]) taps[0] = hit;
  for (genvar i = 1; i < N_TAPS; i++) begin : g_tap
    localparam int unsigned D = TAP_PS[i % 4];
    assign #(D) taps[i] = taps[i-1];
  end
endmodule
