// Per-channel input conditioning of the FPGA-Master: dead-time filter, then offset compensation.
//
// Events arrive one per clock at most, tagged with their channel. Dead-time: for each channel
// the time of the last accepted event is kept; a new event on that channel closer than
// cfg_dead[ch] to it is dropped (and counted in drop_count), otherwise it is accepted and
// becomes the new reference (non-paralysable dead time, used against reflections and ringing).
// A dead time of 0 disables the filter. Offset: cfg_offset[ch], a signed value, is added to the
// accepted time to line up channels whose cables or paths differ in length. Output is
// registered, one clock after the input. That the two functions exist and work per channel
// follows the system description; the filter rule, widths and order are this design's choices.
`timescale 1ps / 1ps
module chan_conditioner
  import cdl_pkg::*;
#(
  parameter int unsigned N_CH  = 9,
  parameter int unsigned DT_W  = 16,
  parameter int unsigned OFS_W = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic [CH_W-1:0]         in_ch,
  input  logic [XTS_W-1:0]        in_ts,
  input  logic [DT_W-1:0]         cfg_dead   [N_CH],
  input  logic signed [OFS_W-1:0] cfg_offset [N_CH],
  output logic                    out_valid,
  output logic [CH_W-1:0]         out_ch,
  output logic [XTS_W-1:0]        out_ts,
  output logic [15:0]             drop_count
);
  localparam int unsigned IW = (N_CH > 1) ? $clog2(N_CH) : 1;

  logic [XTS_W-1:0] last  [N_CH];
  logic [IW-1:0]    idx;         // array index; in_ch itself is wider than N_CH needs
  logic [N_CH-1:0]  seen;
  logic             ch_ok, too_close;
  logic [XTS_W-1:0] since;

  always_comb begin
    ch_ok     = (32'(in_ch) < N_CH);
    idx       = in_ch[IW-1:0];
    since     = ch_ok ? in_ts - last[idx] : '0;
    too_close = ch_ok && seen[idx] && (since < XTS_W'(cfg_dead[idx]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      seen       <= '0;
      out_valid  <= 1'b0;
      drop_count <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && ch_ok) begin
        if (too_close) begin
          drop_count <= drop_count + 1'b1;
        end else begin
          seen[idx] <= 1'b1;
          out_valid   <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && ch_ok && !too_close) last[idx] <= in_ts;
    out_ch <= in_ch;
    out_ts <= ch_ok ? in_ts + XTS_W'(cfg_offset[idx]) : in_ts;
  end
endmodule
