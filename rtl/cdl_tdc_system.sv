// Dual-FPGA acquisition system for a cross-delay-line (CDL) imaging detector.
//
// Nine STOP inputs receive the discriminator pulses of the detector (four ends of the two
// delay lines plus other signals). The TDC side (tdc_fpga) timestamps every pulse with a
// 2.34375 ps LSB and sends the timestamps over an 8-bit GMII link at 125 MHz; the processing
// side (master_fpga) extends them to 56 bits, filters and aligns each channel, correlates the
// ends of each delay line and the two lines with each other, computes x, y and time, refers
// times to an optional START channel and emits 64-bit records. The serial transceivers that
// carry the GMII bytes between the two boards are replaced by a direct connection.
//
// Clocks: clk_tdc (416.67 MHz, period 2.4 ns = 1024 LSB) for the converter; clk_link (125 MHz)
// for the link and all processing. Each reset is synchronous to its clock. The calibration
// tables are written on clk_tdc; all cfg_* settings are static while acquiring.
`timescale 1ps / 1ps
module cdl_tdc_system
  import cdl_pkg::*;
#(
  parameter int unsigned N_CH   = 9,
  parameter int unsigned N_TAPS = 192,
  parameter int unsigned CAL_W  = 11,
  parameter int unsigned DT_W   = 16,
  parameter int unsigned OFS_W  = 24,
  parameter int unsigned X_W    = 24,
  parameter int unsigned BIN_W  = $clog2(N_TAPS + 1)
) (
  input  logic                    clk_tdc,
  input  logic                    rst_tdc,
  input  logic                    clk_link,
  input  logic                    rst_link,
  input  logic [N_CH-1:0]         hit,
  // calibration table write (clk_tdc)
  input  logic                    cal_we,
  input  logic [CH_W-1:0]         cal_ch,
  input  logic [BIN_W-1:0]        cal_addr,
  input  logic [CAL_W-1:0]        cal_data,
  // processing settings (clk_link)
  input  logic [2:0]              cfg_rebin,
  input  logic [DT_W-1:0]         cfg_dead   [N_CH],
  input  logic signed [OFS_W-1:0] cfg_offset [N_CH],
  input  logic [CH_W-1:0]         cfg_ch_x1,
  input  logic [CH_W-1:0]         cfg_ch_x2,
  input  logic [CH_W-1:0]         cfg_ch_y1,
  input  logic [CH_W-1:0]         cfg_ch_y2,
  input  logic [23:0]             cfg_tp_x,
  input  logic [23:0]             cfg_tp_y,
  input  logic signed [31:0]      cfg_txy_lo,
  input  logic signed [31:0]      cfg_txy_hi,
  input  logic                    cfg_ref_en,
  input  logic [CH_W-1:0]         cfg_ref_ch,
  // outputs toward the Ethernet side (clk_link)
  output logic                    raw_valid,
  output logic [63:0]             raw_data,
  output logic                    rec_valid,
  output logic [63:0]             rec_data,
  input  logic                    rec_ready,
  // statistics
  output logic [15:0]             tdc_overflow_count,
  output logic [15:0]             dead_drop_count,
  output logic [15:0]             line_discard_count,
  output logic [15:0]             xy_discard_count,
  output logic [15:0]             rec_drop_count,
  output logic [15:0]             corr_overflow_count
);
  logic [7:0] gmii_d;
  logic       gmii_en;

  tdc_fpga #(.N_CH(N_CH), .N_TAPS(N_TAPS), .CAL_W(CAL_W), .BIN_W(BIN_W)) u_tdc (
    .clk_tdc(clk_tdc), .rst_tdc(rst_tdc), .clk_link(clk_link), .rst_link(rst_link), .hit(hit),
    .cal_we(cal_we), .cal_ch(cal_ch), .cal_addr(cal_addr), .cal_data(cal_data),
    .txd(gmii_d), .tx_en(gmii_en), .overflow_count(tdc_overflow_count)
  );

  master_fpga #(.N_CH(N_CH), .DT_W(DT_W), .OFS_W(OFS_W), .X_W(X_W)) u_master (
    .clk(clk_link), .rst(rst_link), .rxd(gmii_d), .rx_dv(gmii_en),
    .cfg_rebin(cfg_rebin), .cfg_dead(cfg_dead), .cfg_offset(cfg_offset),
    .cfg_ch_x1(cfg_ch_x1), .cfg_ch_x2(cfg_ch_x2), .cfg_ch_y1(cfg_ch_y1), .cfg_ch_y2(cfg_ch_y2),
    .cfg_tp_x(cfg_tp_x), .cfg_tp_y(cfg_tp_y), .cfg_txy_lo(cfg_txy_lo), .cfg_txy_hi(cfg_txy_hi),
    .cfg_ref_en(cfg_ref_en), .cfg_ref_ch(cfg_ref_ch),
    .raw_valid(raw_valid), .raw_data(raw_data), .rec_valid(rec_valid), .rec_data(rec_data), .rec_ready(rec_ready),
    .dead_drop_count(dead_drop_count), .line_discard_count(line_discard_count),
    .xy_discard_count(xy_discard_count), .rec_drop_count(rec_drop_count),
    .corr_overflow_count(corr_overflow_count)
  );
endmodule
