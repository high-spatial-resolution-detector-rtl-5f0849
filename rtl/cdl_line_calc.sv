// Position and time of one delay line of the cross-delay-line anode.
//
// The charge pulse of a particle travels to both ends of a delay line and is timed there as t1
// and t2. The position along the line, in time units, is x = t1 - t2 (negative when the hit is
// closer to the first end), and the event time is te = (t1 + t2)/2 - tp, where tp is the full
// propagation time of the line. The halving drops the least significant bit. x is kept in X_W
// signed bits, which is enough because a correlated pair satisfies |t1 - t2| < tp. Registered:
// results one clock after in_valid. The formulas follow the system description; the rounding
// and widths are this design's choices.
`timescale 1ps / 1ps
module cdl_line_calc #(
  parameter int unsigned TS_W = 56,
  parameter int unsigned X_W  = 24
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [TS_W-1:0]       t1,
  input  logic [TS_W-1:0]       t2,
  input  logic [23:0]           tp,
  output logic                  out_valid,
  output logic signed [X_W-1:0] x,
  output logic [TS_W-1:0]       te
);
  logic [TS_W:0] sum;
  logic [TS_W-1:0] dif;
  assign sum = {1'b0, t1} + {1'b0, t2};
  assign dif = t1 - t2;

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= in_valid;
    x  <= X_W'(dif);
    te <= sum[TS_W:1] - TS_W'(tp);
  end
endmodule
