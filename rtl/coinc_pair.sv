// Correlator of two timestamp streams (coincidence check of the FPGA-Master).
//
// Hits of side A and side B are queued in arrival order (DEPTH entries each). Whenever both
// queues hold a hit, the two oldest are compared: if lo < a - b < hi (signed, strict), they are
// taken as one physical event, output together and both removed; otherwise only the older of
// the two (smaller timestamp; A on a tie) is discarded and counted in discard_count. One
// decision per clock; the output is registered (p_valid one clock after the decision). A hit
// arriving at a full queue is lost and counted in overflow_count. Each hit carries a PAY_W-bit
// payload that travels with it. The compare-and-discard-the-oldest rule follows the system
// description; the queue depth and the tie rule are this design's choices.
`timescale 1ps / 1ps
module coinc_pair #(
  parameter int unsigned TS_W  = 56,
  parameter int unsigned PAY_W = 1,
  parameter int unsigned DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                a_valid,
  input  logic [TS_W-1:0]     a_ts,
  input  logic [PAY_W-1:0]    a_pay,
  input  logic                b_valid,
  input  logic [TS_W-1:0]     b_ts,
  input  logic [PAY_W-1:0]    b_pay,
  input  logic signed [31:0]  win_lo,
  input  logic signed [31:0]  win_hi,
  output logic                p_valid,
  output logic [TS_W-1:0]     p_a_ts,
  output logic [PAY_W-1:0]    p_a_pay,
  output logic [TS_W-1:0]     p_b_ts,
  output logic [PAY_W-1:0]    p_b_pay,
  output logic [15:0]         discard_count,
  output logic [15:0]         overflow_count
);
  localparam int unsigned EW = TS_W + PAY_W;

  logic          a_pop, b_pop, a_empty, b_empty, a_full, b_full;
  logic [EW-1:0] a_head, b_head;

  sync_fifo #(.W(EW), .DEPTH(DEPTH)) u_qa (
    .clk(clk), .rst(rst), .push(a_valid), .din({a_ts, a_pay}), .pop(a_pop),
    .dout(a_head), .empty(a_empty), .full(a_full)
  );
  sync_fifo #(.W(EW), .DEPTH(DEPTH)) u_qb (
    .clk(clk), .rst(rst), .push(b_valid), .din({b_ts, b_pay}), .pop(b_pop),
    .dout(b_head), .empty(b_empty), .full(b_full)
  );

  logic [TS_W-1:0]   ta, tb;
  logic signed [TS_W:0] diff;
  logic              both, in_win, a_older;

  always_comb begin
    ta      = a_head[EW-1:PAY_W];
    tb      = b_head[EW-1:PAY_W];
    diff    = $signed({1'b0, ta}) - $signed({1'b0, tb});
    both    = !a_empty && !b_empty;
    in_win  = (diff > (TS_W+1)'(win_lo)) && (diff < (TS_W+1)'(win_hi));
    a_older = (ta <= tb);
    a_pop   = both && (in_win || a_older);
    b_pop   = both && (in_win || !a_older);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid        <= 1'b0;
      discard_count  <= '0;
      overflow_count <= '0;
    end else begin
      p_valid <= both && in_win;
      if (both && !in_win) discard_count <= discard_count + 1'b1;
      if ((a_valid && a_full) || (b_valid && b_full)) overflow_count <= overflow_count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    p_a_ts  <= ta;
    p_a_pay <= a_head[PAY_W-1:0];
    p_b_ts  <= tb;
    p_b_pay <= b_head[PAY_W-1:0];
  end
endmodule
