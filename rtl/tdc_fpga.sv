// FPGA-TDC: the time-to-digital converter side of the system.
//
// N_CH STOP channels each have a tapped delay line and a tdc_channel; all share one free-running
// 42-bit coarse counter on the TDC clock (Nutt interpolation: coarse count x 1024 LSB minus the
// calibrated fine delay), giving 52-bit timestamps of 2.34375 ps that wrap after about 10.5 s.
// Every TDC clock in which at least one channel reports a hit writes one bundle (channel mask
// plus all timestamps) into an asynchronous FIFO; if the FIFO is full the bundle is lost and
// overflow_count is incremented. On the 125 MHz link clock, tdc_word_packer turns bundles into
// the 32-bit word stream and gmii_word_tx sends it as bytes: the link carries at most
// 31.25 M words/s, which is the limit on sustained hit rate; bursts up to the FIFO depth are
// absorbed.
//
// Calibration tables are written through cal_we/cal_ch/cal_addr/cal_data on the TDC clock.
// The channel count, delay-line TDC, coarse counter and GMII transceiver link follow the system
// description; the 2.4 ns clock, the bundle FIFO and its depth are this design's choices.
`timescale 1ps / 1ps
module tdc_fpga
  import cdl_pkg::*;
#(
  parameter int unsigned N_CH    = 9,
  parameter int unsigned N_TAPS  = 192,
  parameter int unsigned CAL_W   = 11,
  parameter int unsigned FIFO_AW = 4,
  parameter int unsigned BIN_W   = $clog2(N_TAPS + 1)
) (
  input  logic              clk_tdc,
  input  logic              rst_tdc,
  input  logic              clk_link,
  input  logic              rst_link,
  input  logic [N_CH-1:0]   hit,
  input  logic              cal_we,
  input  logic [CH_W-1:0]   cal_ch,
  input  logic [BIN_W-1:0]  cal_addr,
  input  logic [CAL_W-1:0]  cal_data,
  output logic [7:0]        txd,
  output logic              tx_en,
  output logic [15:0]       overflow_count
);
  localparam int unsigned CW = TS_W - FINE_W;
  localparam int unsigned BW = N_CH + N_CH * TS_W;

  logic [CW-1:0]   coarse;
  logic [N_CH-1:0] ev_valid;
  logic [TS_W-1:0] ev_ts [N_CH];

  always_ff @(posedge clk_tdc) begin
    if (rst_tdc) coarse <= '0;
    else         coarse <= coarse + 1'b1;
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [N_TAPS-1:0] taps;
    tdl_delay_line #(.N_TAPS(N_TAPS)) u_tdl (.hit(hit[c]), .taps(taps));
    tdc_channel #(.N_TAPS(N_TAPS), .CAL_W(CAL_W), .BIN_W(BIN_W)) u_ch (
      .clk(clk_tdc), .rst(rst_tdc), .taps(taps), .coarse(coarse),
      .cal_we(cal_we && (cal_ch == CH_W'(c))), .cal_addr(cal_addr), .cal_data(cal_data),
      .ev_valid(ev_valid[c]), .ev_ts(ev_ts[c])
    );
  end

  // bundle write
  logic [BW-1:0] wr_bundle, rd_bundle;
  logic          wr_full, rd_empty, rd_en;
  always_comb begin
    wr_bundle[N_CH-1:0] = ev_valid;
    for (int c = 0; c < N_CH; c++) wr_bundle[N_CH + c*TS_W +: TS_W] = ev_ts[c];
  end

  always_ff @(posedge clk_tdc) begin
    if (rst_tdc)                     overflow_count <= '0;
    else if (|ev_valid && wr_full)   overflow_count <= overflow_count + 1'b1;
  end

  async_fifo #(.W(BW), .AW(FIFO_AW)) u_fifo (
    .wr_clk(clk_tdc), .wr_rst(rst_tdc), .wr_en(|ev_valid), .wr_data(wr_bundle), .wr_full(wr_full),
    .rd_clk(clk_link), .rd_rst(rst_link), .rd_en(rd_en), .rd_data(rd_bundle), .rd_empty(rd_empty)
  );

  // link side
  logic [TS_W-1:0] b_ts [N_CH];
  always_comb begin
    for (int c = 0; c < N_CH; c++) b_ts[c] = rd_bundle[N_CH + c*TS_W +: TS_W];
  end

  logic        w_valid, w_ready;
  logic [31:0] w_data;
  tdc_word_packer #(.N_CH(N_CH)) u_pack (
    .clk(clk_link), .rst(rst_link), .b_valid(!rd_empty), .b_mask(rd_bundle[N_CH-1:0]), .b_ts(b_ts),
    .b_ready(rd_en), .w_valid(w_valid), .w_data(w_data), .w_ready(w_ready)
  );

  gmii_word_tx u_tx (
    .clk(clk_link), .rst(rst_link), .w_valid(w_valid), .w_data(w_data), .w_ready(w_ready),
    .txd(txd), .tx_en(tx_en)
  );
endmodule
