// FPGA-Master: turns the TDC word stream into image points and referenced times.
//
// Data path, all on the 125 MHz link clock:
//   gmii_word_rx -> ts_extender (56-bit, re-binned) -> raw copy out (one 64-bit record per hit)
//   -> chan_conditioner (per-channel dead time and offset) -> router:
//      channels cfg_ch_x1/x2 -> coinc_pair (|t1 - t2| < tp_x) -> cdl_line_calc -> (x, t_x)
//      channels cfg_ch_y1/y2 -> coinc_pair (|t3 - t4| < tp_y) -> cdl_line_calc -> (y, t_y)
//      (x, t_x) and (y, t_y) -> coinc_pair (txy_lo < t_x - t_y < txy_hi) -> image point with
//      time (t_x + t_y)/2 -> ref_subtract -> record_formatter
//      channel cfg_ref_ch (when cfg_ref_en) -> stored START reference
//      every other channel -> ref_subtract -> record_formatter as a single-channel record
// The four CDL channels, the correlation windows of the two lines and of the x/y pair, the
// reference channel and the re-binning are run-time settings. The chain of functions follows
// the system description; the use of the mean of t_x and t_y as the image time and the
// single-channel path are this design's choices.
`timescale 1ps / 1ps
module master_fpga
  import cdl_pkg::*;
#(
  parameter int unsigned N_CH  = 9,
  parameter int unsigned DT_W  = 16,
  parameter int unsigned OFS_W = 24,
  parameter int unsigned X_W   = 24
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [7:0]              rxd,
  input  logic                    rx_dv,
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
  output logic                    raw_valid,
  output logic [63:0]             raw_data,
  output logic                    rec_valid,
  output logic [63:0]             rec_data,
  input  logic                    rec_ready,
  output logic [15:0]             dead_drop_count,
  output logic [15:0]             line_discard_count,
  output logic [15:0]             xy_discard_count,
  output logic [15:0]             rec_drop_count,
  output logic [15:0]             corr_overflow_count
);
  // link and timestamp extension
  logic             w_valid;
  logic [31:0]      w_data;
  logic             e_valid;
  logic [CH_W-1:0]  e_ch;
  logic [XTS_W-1:0] e_ts;

  gmii_word_rx u_rx (.clk(clk), .rst(rst), .rxd(rxd), .rx_dv(rx_dv), .w_valid(w_valid), .w_data(w_data));
  ts_extender u_ext (.clk(clk), .rst(rst), .w_valid(w_valid), .w_data(w_data), .cfg_rebin(cfg_rebin),
                     .ev_valid(e_valid), .ev_ch(e_ch), .ev_ts(e_ts));

  assign raw_valid = e_valid;
  assign raw_data  = record_t'{hdr: {3'b000, e_ch}, payload: e_ts};

  // per-channel conditioning
  logic             c_valid;
  logic [CH_W-1:0]  c_ch;
  logic [XTS_W-1:0] c_ts;
  chan_conditioner #(.N_CH(N_CH), .DT_W(DT_W), .OFS_W(OFS_W)) u_cond (
    .clk(clk), .rst(rst), .in_valid(e_valid), .in_ch(e_ch), .in_ts(e_ts),
    .cfg_dead(cfg_dead), .cfg_offset(cfg_offset),
    .out_valid(c_valid), .out_ch(c_ch), .out_ts(c_ts), .drop_count(dead_drop_count)
  );

  // routing
  logic is_x1, is_x2, is_y1, is_y2, is_ref, is_aux;
  always_comb begin
    is_x1  = c_valid && (c_ch == cfg_ch_x1);
    is_x2  = c_valid && (c_ch == cfg_ch_x2);
    is_y1  = c_valid && (c_ch == cfg_ch_y1);
    is_y2  = c_valid && (c_ch == cfg_ch_y2);
    is_ref = c_valid && cfg_ref_en && (c_ch == cfg_ref_ch);
    is_aux = c_valid && !(is_x1 || is_x2 || is_y1 || is_y2 || is_ref);
  end

  // the two delay lines
  logic             px_valid, py_valid;
  logic [XTS_W-1:0] px_a, px_b, py_a, py_b;
  logic [15:0]      dx_count, dy_count, ox_count, oy_count;
  logic             px_pa, px_pb, py_pa, py_pb;   // line pairs carry no payload

  coinc_pair #(.TS_W(XTS_W), .PAY_W(1)) u_cx (
    .clk(clk), .rst(rst), .a_valid(is_x1), .a_ts(c_ts), .a_pay(1'b0), .b_valid(is_x2), .b_ts(c_ts), .b_pay(1'b0),
    .win_lo(-$signed({8'd0, cfg_tp_x})), .win_hi($signed({8'd0, cfg_tp_x})),
    .p_valid(px_valid), .p_a_ts(px_a), .p_a_pay(px_pa), .p_b_ts(px_b), .p_b_pay(px_pb),
    .discard_count(dx_count), .overflow_count(ox_count)
  );
  coinc_pair #(.TS_W(XTS_W), .PAY_W(1)) u_cy (
    .clk(clk), .rst(rst), .a_valid(is_y1), .a_ts(c_ts), .a_pay(1'b0), .b_valid(is_y2), .b_ts(c_ts), .b_pay(1'b0),
    .win_lo(-$signed({8'd0, cfg_tp_y})), .win_hi($signed({8'd0, cfg_tp_y})),
    .p_valid(py_valid), .p_a_ts(py_a), .p_a_pay(py_pa), .p_b_ts(py_b), .p_b_pay(py_pb),
    .discard_count(dy_count), .overflow_count(oy_count)
  );
  assign line_discard_count  = dx_count + dy_count;

  logic                  lx_valid, ly_valid;
  logic signed [X_W-1:0] lx, ly;
  logic [XTS_W-1:0]      ltx, lty;
  cdl_line_calc #(.TS_W(XTS_W), .X_W(X_W)) u_lx (
    .clk(clk), .rst(rst), .in_valid(px_valid), .t1(px_a), .t2(px_b), .tp(cfg_tp_x),
    .out_valid(lx_valid), .x(lx), .te(ltx)
  );
  cdl_line_calc #(.TS_W(XTS_W), .X_W(X_W)) u_ly (
    .clk(clk), .rst(rst), .in_valid(py_valid), .t1(py_a), .t2(py_b), .tp(cfg_tp_y),
    .out_valid(ly_valid), .x(ly), .te(lty)
  );

  // x/y correlation (Eq. 5)
  logic             pxy_valid;
  logic [XTS_W-1:0] pxy_tx, pxy_ty;
  logic [X_W-1:0]   pxy_x, pxy_y;
  logic [15:0]      oxy_count;
  coinc_pair #(.TS_W(XTS_W), .PAY_W(X_W)) u_cxy (
    .clk(clk), .rst(rst), .a_valid(lx_valid), .a_ts(ltx), .a_pay(lx), .b_valid(ly_valid), .b_ts(lty), .b_pay(ly),
    .win_lo(cfg_txy_lo), .win_hi(cfg_txy_hi),
    .p_valid(pxy_valid), .p_a_ts(pxy_tx), .p_a_pay(pxy_x), .p_b_ts(pxy_ty), .p_b_pay(pxy_y),
    .discard_count(xy_discard_count), .overflow_count(oxy_count)
  );
  assign corr_overflow_count = ox_count + oy_count + oxy_count;

  // image time and START reference
  logic [XTS_W:0]   tsum;
  logic             img_valid, aux_valid;
  logic [XTS_W-1:0] img_t, aux_t;
  logic [X_W-1:0]   img_x, img_y;
  logic [CH_W-1:0]  aux_ch;
  assign tsum = {1'b0, pxy_tx} + {1'b0, pxy_ty};

  ref_subtract #(.TS_W(XTS_W)) u_ref_img (
    .clk(clk), .rst(rst), .cfg_en(cfg_ref_en), .ref_valid(is_ref), .ref_ts(c_ts),
    .in_valid(pxy_valid), .in_ts(tsum[XTS_W:1]), .out_valid(img_valid), .out_ts(img_t)
  );
  ref_subtract #(.TS_W(XTS_W)) u_ref_aux (
    .clk(clk), .rst(rst), .cfg_en(cfg_ref_en), .ref_valid(is_ref), .ref_ts(c_ts),
    .in_valid(is_aux), .in_ts(c_ts), .out_valid(aux_valid), .out_ts(aux_t)
  );
  always_ff @(posedge clk) begin
    img_x  <= pxy_x;
    img_y  <= pxy_y;
    aux_ch <= c_ch;
  end

  record_formatter #(.X_W(X_W)) u_fmt (
    .clk(clk), .rst(rst),
    .img_valid(img_valid), .img_x(img_x), .img_y(img_y), .img_t(img_t),
    .aux_valid(aux_valid), .aux_ch(aux_ch), .aux_t(aux_t),
    .rec_valid(rec_valid), .rec_data(rec_data), .rec_ready(rec_ready), .drop_count(rec_drop_count)
  );
endmodule
