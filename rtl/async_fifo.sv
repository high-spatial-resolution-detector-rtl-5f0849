// Asynchronous FIFO with Gray-coded pointers, used to move hit bundles from the TDC clock
// domain to the 125 MHz link clock domain.
//
// Each side keeps a binary pointer one bit wider than the address and a Gray copy of it; the
// Gray pointer crosses to the other clock through two flip-flops. Full and empty are computed
// from the local pointer and the synchronised remote one, so both are conservative (full may
// clear and empty may clear a few clocks late, never early). Writing while full and reading
// while empty are ignored. Read data is the head entry, valid while rd_empty is low (first-word
// fall-through). Depth 2**AW. Each reset input is synchronous to its own clock.
`timescale 1ps / 1ps
module async_fifo #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 4
) (
  input  logic         wr_clk,
  input  logic         wr_rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,
  input  logic         rd_clk,
  input  logic         rd_rst,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_empty
);
  logic [W-1:0] mem [2 ** AW];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end
  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  // read side
  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];
  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end
endmodule
