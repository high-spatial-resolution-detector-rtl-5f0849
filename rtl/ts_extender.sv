// Timestamp extender of the FPGA-Master: rebuilds full timestamps from the link words and puts
// them into the 56-bit processing format.
//
// A coarse word stores timestamp bits 51:26 (the epoch). When a new epoch is smaller than the
// stored one, the 26-bit field has wrapped (about every 10.5 s) and a 4-bit extension counter is
// incremented. A fine word becomes the 56-bit value {extension, epoch, field}, which is then
// re-binned by shifting right by cfg_rebin bits (0 keeps the 2.34375 ps bin, 2 gives a
// 9.375 ps bin). Fine words seen before any coarse word use epoch 0. Output is registered:
// ev_valid follows a fine word by one clock. The 56-bit format with an extra counter and the
// re-binning follow the system description; the shift-based re-binning and the wrap rule are
// this design's choices.
`timescale 1ps / 1ps
module ts_extender
  import cdl_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             w_valid,
  input  logic [31:0]      w_data,
  input  logic [2:0]       cfg_rebin,
  output logic             ev_valid,
  output logic [CH_W-1:0]  ev_ch,
  output logic [XTS_W-1:0] ev_ts
);
  link_word_t         w;
  logic [FIELD_W-1:0] epoch;
  logic [EXT_W-1:0]   ext;
  logic [XTS_W-1:0]   full;

  assign w    = link_word_t'(w_data);
  assign full = {ext, epoch, w.field};

  always_ff @(posedge clk) begin
    if (rst) begin
      epoch    <= '0;
      ext      <= '0;
      ev_valid <= 1'b0;
      ev_ch    <= '0;
      ev_ts    <= '0;
    end else begin
      ev_valid <= 1'b0;
      if (w_valid) begin
        if (w.coarse) begin
          if (w.field < epoch) ext <= ext + 1'b1;
          epoch <= w.field;
        end else begin
          ev_valid <= 1'b1;
          ev_ch    <= w.ch;
          ev_ts    <= full >> cfg_rebin;
        end
      end
    end
  end
endmodule
