// Word packer of the FPGA-TDC: turns bundles of hits into the chronological 32-bit word stream.
//
// A bundle holds every hit captured in one TDC clock: a channel mask and one 52-bit timestamp
// per channel. Bundles arrive in capture order and are sent in that order; inside a bundle the
// hits go out in channel order. Each word is {coarse flag, 5-bit channel, 26-bit field}. A fine
// word (flag 0) carries timestamp bits 25:0. Before a fine word whose bits 51:26 differ from
// the last coarse field sent, a coarse word (flag 1) carrying bits 51:26 is sent, so the
// receiver can always rebuild the full timestamp. The first hit after reset is always preceded
// by a coarse word.
//
// Interface: bundle valid/ready in (b_ready pulses for one clock when the last hit of a bundle
// is sent), word valid/ready out; a word moves when w_valid and w_ready are both high. One word
// per clock at most. The channel field has room for 32 channels; with fewer, its upper bits
// stay 0 (with nine channels, bit 4 of it is constant). The 26-bit field and the fine/coarse header follow the system
// description; the exact header layout and the send-on-change rule are this design's choices.
`timescale 1ps / 1ps
module tdc_word_packer
  import cdl_pkg::*;
#(
  parameter int unsigned N_CH = 9
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 b_valid,
  input  logic [N_CH-1:0]      b_mask,
  input  logic [TS_W-1:0]      b_ts [N_CH],
  output logic                 b_ready,
  output logic                 w_valid,
  output logic [31:0]          w_data,
  input  logic                 w_ready
);
  logic [N_CH-1:0]    done;       // hits of the current bundle already sent
  logic [FIELD_W-1:0] last_hi;
  logic               hi_known;

  logic [N_CH-1:0]    pending;
  logic               found;
  localparam int unsigned IW = (N_CH > 1) ? $clog2(N_CH) : 1;

  logic [IW-1:0]      sel;
  logic [TS_W-1:0]    ts_sel;
  logic               need_coarse;
  logic [N_CH-1:0]    pending_after;
  link_word_t         word;

  always_comb begin
    pending = b_valid ? (b_mask & ~done) : '0;
    found   = 1'b0;
    sel     = '0;
    for (int i = N_CH - 1; i >= 0; i--) begin
      if (pending[i]) begin
        found = 1'b1;
        sel   = IW'(i);
      end
    end
    ts_sel      = b_ts[sel];
    need_coarse = !hi_known || (ts_sel[TS_W-1:FIELD_W] != last_hi);
    word.coarse = need_coarse;
    word.ch     = CH_W'(sel);
    word.field  = need_coarse ? ts_sel[TS_W-1:FIELD_W] : ts_sel[FIELD_W-1:0];
    pending_after = pending;
    pending_after[sel] = 1'b0;
  end

  assign w_valid = found;
  assign w_data  = word;
  // bundle released when its last fine word is accepted (or it carries no hit)
  assign b_ready = b_valid && (!found || (w_ready && !need_coarse && pending_after == '0));

  always_ff @(posedge clk) begin
    if (rst) begin
      done     <= '0;
      hi_known <= 1'b0;
      last_hi  <= '0;
    end else begin
      if (found && w_ready) begin
        if (need_coarse) begin
          last_hi  <= ts_sel[TS_W-1:FIELD_W];
          hi_known <= 1'b1;
        end else begin
          done[sel] <= 1'b1;
        end
      end
      if (b_ready) done <= '0;
    end
  end
endmodule
