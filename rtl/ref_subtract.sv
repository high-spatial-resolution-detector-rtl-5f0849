// START reference of the FPGA-Master: expresses times relative to the last hit of a chosen
// reference channel.
//
// The last two reference times are kept. When cfg_en is high, out_ts = in_ts - r, where r is
// the newer stored reference if in_ts is not earlier than it, else the older one: an event
// reaches this stage after its processing latency, by which time a reference hit that came
// after it may already be stored, and the older copy keeps such an event referred to the
// reference that preceded it. Results are two's complement. When cfg_en is low the time passes
// unchanged, i.e. stays referred to the start of the acquisition. Before the first reference
// hits the stored values are 0. Registered: out_valid one clock after in_valid; a reference and
// an event in the same clock use the previous references. Subtracting the last reference time
// follows the system description; keeping two and the reset value are this design's choices.
`timescale 1ps / 1ps
module ref_subtract #(
  parameter int unsigned TS_W = 56
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cfg_en,
  input  logic            ref_valid,
  input  logic [TS_W-1:0] ref_ts,
  input  logic            in_valid,
  input  logic [TS_W-1:0] in_ts,
  output logic            out_valid,
  output logic [TS_W-1:0] out_ts
);
  logic [TS_W-1:0] last_ref, prev_ref;

  always_ff @(posedge clk) begin
    if (rst) begin
      last_ref  <= '0;
      prev_ref  <= '0;
      out_valid <= 1'b0;
    end else begin
      if (ref_valid) begin
        last_ref <= ref_ts;
        prev_ref <= last_ref;
      end
      out_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (!cfg_en)              out_ts <= in_ts;
    else if (in_ts >= last_ref) out_ts <= in_ts - last_ref;
    else                        out_ts <= in_ts - prev_ref;
  end
endmodule
