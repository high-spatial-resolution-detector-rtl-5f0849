// GMII word transmitter of the FPGA-to-FPGA transceiver link.
//
// Each 32-bit word leaves as four bytes on txd, most significant byte first, one byte per
// 125 MHz clock with tx_en high, so the link carries 31.25 M words/s. Words waiting
// back to back follow each other without a gap; tx_en drops for at least one clock when no
// word is waiting, and the receiver realigns on every rising tx_en. The word is taken (w_ready
// high) in the clock that sends its first byte. The byte width, clock and resulting word rate
// follow the system description; the framing (no preamble, alignment on tx_en) is this
// design's choice.
`timescale 1ps / 1ps
module gmii_word_tx (
  input  logic        clk,
  input  logic        rst,
  input  logic        w_valid,
  input  logic [31:0] w_data,
  output logic        w_ready,
  output logic [7:0]  txd,
  output logic        tx_en
);
  logic [1:0]  idx;      // next byte of the held word to send (1..3), 0 = free
  logic [23:0] rest;     // remaining bytes of the held word

  assign w_ready = (idx == 2'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      idx   <= 2'd0;
      tx_en <= 1'b0;
      txd   <= '0;
      rest  <= '0;
    end else if (idx == 2'd0) begin
      tx_en <= w_valid;
      if (w_valid) begin
        txd  <= w_data[31:24];
        rest <= w_data[23:0];
        idx  <= 2'd1;
      end
    end else begin
      tx_en <= 1'b1;
      txd   <= rest[23:16];
      rest  <= {rest[15:0], 8'h00};
      idx   <= idx + 2'd1;   // 3 -> 0
    end
  end
endmodule
