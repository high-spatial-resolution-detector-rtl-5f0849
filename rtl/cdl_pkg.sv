// Shared constants and types of the dual-FPGA cross-delay-line (CDL) acquisition system.
//
// Time unit: one LSB = 2.34375 ps, so one TDC clock period (2.4 ns, 416.67 MHz) is exactly
// 1024 LSB and the fine and coarse parts of a timestamp concatenate in plain binary. A TDC
// timestamp has 52 bits (26-bit fine field + 26-bit coarse field, about 10.5 s of range); the
// processing side extends it to 56 bits. Words between the two FPGAs are 32 bits: a 6-bit
// header (fine/coarse flag and channel) and a 26-bit field. Output records are 64 bits: an
// 8-bit header and a 56-bit payload. The 26-bit field, the 6-bit header, 56-bit timestamps,
// 8-bit record header and nine channels come from the system description; the LSB value
// (given there as 2.34 ps) and the header bit layout are this design's choices.
`timescale 1ps / 1ps
package cdl_pkg;
  localparam int unsigned CH_W     = 5;
  localparam int unsigned FIELD_W  = 26;
  localparam int unsigned FINE_W   = 10;
  localparam int unsigned TS_W     = 2 * FIELD_W;   // 52
  localparam int unsigned XTS_W    = 56;
  localparam int unsigned EXT_W    = XTS_W - TS_W;  // 4

  // One word on the FPGA-to-FPGA link.
  typedef struct packed {
    logic               coarse;  // 1: field holds timestamp bits 51:26, 0: bits 25:0
    logic [CH_W-1:0]    ch;
    logic [FIELD_W-1:0] field;
  } link_word_t;

  // Record headers toward the Ethernet side.
  localparam logic [7:0] HDR_IMG_XY = 8'h40;
  localparam logic [7:0] HDR_IMG_T  = 8'h80;
  // a single-channel record uses {3'b000, ch}

  typedef struct packed {
    logic [7:0]       hdr;
    logic [XTS_W-1:0] payload;
  } record_t;
endpackage
