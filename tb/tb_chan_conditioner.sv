// Testbench of the dead-time and offset stage: per-channel random dead times (one channel with
// none) and signed offsets; each channel gets increasing times with gaps sometimes shorter than
// its dead time (reflections). The expected survivors are worked out here from the last
// accepted time of each channel.
`timescale 1ps / 1ps
module tb_chan_conditioner;
  import cdl_pkg::*;
  localparam int NC = 9;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [CH_W-1:0] in_ch = '0;
  logic [XTS_W-1:0] in_ts = '0;
  logic [15:0] cfg_dead [NC];
  logic signed [23:0] cfg_offset [NC];
  logic out_valid;
  logic [CH_W-1:0] out_ch;
  logic [XTS_W-1:0] out_ts;
  logic [15:0] drop_count;
  int checks = 0, failures = 0, drops = 0;
  logic [XTS_W+CH_W-1:0] q[$];

  always #4000 clk = ~clk;
  chan_conditioner #(.N_CH(NC)) dut (.*);

  always @(posedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (q.size() == 0 || {out_ch, out_ts} != q[0]) begin
        failures++;
        $display("got %0d/%0d expected %h", out_ch, out_ts, (q.size() != 0) ? q[0] : '0);
      end
      if (q.size() != 0) void'(q.pop_front());
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint now [NC];
    longint last [NC];
    bit seen [NC];
    for (int c = 0; c < NC; c++) begin
      cfg_dead[c] = (c == 3) ? 16'd0 : 16'(200 + $urandom % 2000);
      cfg_offset[c] = 24'(int'($urandom % 20001) - 10000);
      now[c] = 1000000 + $urandom % 1000;
      seen[c] = 0;
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      int c;
      @(negedge clk);
      in_valid = ($urandom % 3) != 0;
      c = $urandom % NC;
      now[c] += ($urandom % 2) ? $urandom % 300 : $urandom % 5000;
      in_ch = 5'(c);
      in_ts = XTS_W'(now[c]);
      if (in_valid) begin
        if (seen[c] && now[c] - last[c] < longint'(cfg_dead[c])) drops++;
        else begin
          seen[c] = 1;
          last[c] = now[c];
          q.push_back({5'(c), XTS_W'(now[c] + longint'(cfg_offset[c]))});
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (q.size() != 0) failures++;
    if (drop_count != 16'(drops) || drops < 100) begin
      failures++;
      $display("drops %0d expected %0d", drop_count, drops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
