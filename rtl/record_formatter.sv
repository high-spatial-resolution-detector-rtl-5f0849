// Output record formatter of the FPGA-Master: 64-bit records (8-bit header, 56-bit payload)
// for the Gigabit Ethernet side.
//
// Image events (x, y, t) and single-channel events (ch, t) are queued separately (DEPTH each);
// an event arriving at a full queue is lost and counted in drop_count. Image events have
// priority and leave as two consecutive records: header 0x40 with {x, y} each sign-extended to
// 28 bits, then header 0x80 with t. A single-channel event is one record with header
// {3'b000, ch} and payload t. The output is a valid/ready stream; a record moves when both are
// high. The 56+8-bit record size follows the system description; the header codes and the
// two-record image format are this design's choices.
`timescale 1ps / 1ps
module record_formatter
  import cdl_pkg::*;
#(
  parameter int unsigned X_W   = 24,
  parameter int unsigned DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  img_valid,
  input  logic signed [X_W-1:0] img_x,
  input  logic signed [X_W-1:0] img_y,
  input  logic [XTS_W-1:0]      img_t,
  input  logic                  aux_valid,
  input  logic [CH_W-1:0]       aux_ch,
  input  logic [XTS_W-1:0]      aux_t,
  output logic                  rec_valid,
  output logic [63:0]           rec_data,
  input  logic                  rec_ready,
  output logic [15:0]           drop_count
);
  localparam int unsigned IW = 2 * X_W + XTS_W;
  localparam int unsigned AXW = CH_W + XTS_W;

  logic [IW-1:0]  i_head;
  logic [AXW-1:0] a_head;
  logic i_empty, i_full, a_empty, a_full, i_pop, a_pop;
  logic phase;   // 1: the time record of the head image event is next

  sync_fifo #(.W(IW), .DEPTH(DEPTH)) u_img (
    .clk(clk), .rst(rst), .push(img_valid), .din({img_x, img_y, img_t}), .pop(i_pop),
    .dout(i_head), .empty(i_empty), .full(i_full)
  );
  sync_fifo #(.W(AXW), .DEPTH(DEPTH)) u_aux (
    .clk(clk), .rst(rst), .push(aux_valid), .din({aux_ch, aux_t}), .pop(a_pop),
    .dout(a_head), .empty(a_empty), .full(a_full)
  );

  logic signed [X_W-1:0] hx, hy;
  record_t rec;
  always_comb begin
    hx = i_head[IW-1 -: X_W];
    hy = i_head[XTS_W +: X_W];
    if (!i_empty) begin
      if (!phase) rec = '{hdr: HDR_IMG_XY, payload: {28'(hx), 28'(hy)}};
      else        rec = '{hdr: HDR_IMG_T,  payload: i_head[XTS_W-1:0]};
    end else begin
      rec = '{hdr: {3'b000, a_head[AXW-1 -: CH_W]}, payload: a_head[XTS_W-1:0]};
    end
    rec_valid = !i_empty || !a_empty;
    rec_data  = rec;
    i_pop     = !i_empty && phase && rec_ready;
    a_pop     = i_empty && !a_empty && rec_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase      <= 1'b0;
      drop_count <= '0;
    end else begin
      if (!i_empty && rec_ready) phase <= !phase;
      if ((img_valid && i_full) || (aux_valid && a_full)) drop_count <= drop_count + 1'b1;
    end
  end
endmodule
