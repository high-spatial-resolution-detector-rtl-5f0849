// GMII word receiver of the FPGA-Master: rebuilds 32-bit words from the link bytes.
//
// While rx_dv is high, bytes are shifted in most significant first; every fourth byte
// completes a word, which is output for one clock with w_valid (no back-pressure: at most one
// word every four clocks). The byte counter restarts whenever rx_dv is low, which is how word
// alignment is recovered. Latency: w_valid rises one clock after the fourth byte is present.
// Framing matches gmii_word_tx and is this design's choice.
`timescale 1ps / 1ps
module gmii_word_rx (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  rxd,
  input  logic        rx_dv,
  output logic        w_valid,
  output logic [31:0] w_data
);
  logic [1:0]  cnt;
  logic [23:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= 2'd0;
      acc     <= '0;
      w_valid <= 1'b0;
      w_data  <= '0;
    end else begin
      w_valid <= 1'b0;
      if (!rx_dv) begin
        cnt <= 2'd0;
      end else begin
        cnt <= cnt + 2'd1;
        acc <= {acc[15:0], rxd};
        if (cnt == 2'd3) begin
          w_valid <= 1'b1;
          w_data  <= {acc, rxd};
        end
      end
    end
  end
endmodule
