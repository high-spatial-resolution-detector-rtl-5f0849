// Testbench of the timestamp extender: a random word stream with coarse words whose field
// sometimes wraps to a smaller value; the expected 56-bit time {wrap count, epoch, field} is
// kept here and shifted by the re-binning setting, which changes during the run.
`timescale 1ps / 1ps
module tb_ts_extender;
  import cdl_pkg::*;
  logic clk = 0, rst = 1;
  logic w_valid = 0;
  logic [31:0] w_data = '0;
  logic [2:0] cfg_rebin = '0;
  logic ev_valid;
  logic [CH_W-1:0] ev_ch;
  logic [XTS_W-1:0] ev_ts;
  int checks = 0, failures = 0, wraps = 0;
  logic [XTS_W+CH_W-1:0] q[$];

  always #4000 clk = ~clk;
  ts_extender dut (.*);

  always @(posedge clk) begin
    if (!rst && ev_valid) begin
      checks++;
      if (q.size() == 0 || {ev_ch, ev_ts} != q[0]) begin
        failures++;
        $display("got %0d/%h expected %h", ev_ch, ev_ts, q.size() ? q[0] : 'x);
      end
      if (q.size()) void'(q.pop_front());
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [25:0] epoch = '0;
    logic [3:0] ext = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) cfg_rebin = 3'($urandom % 4);
      w_valid = ($urandom % 4) != 0;
      if ($urandom % 6 == 0) begin
        logic [25:0] e;
        e = ($urandom % 10 == 0) ? 26'($urandom % 16) : epoch + 26'($urandom % 3);
        w_data = {1'b1, 5'($urandom), e};
        if (w_valid) begin
          if (e < epoch) begin
            ext++;
            wraps++;
          end
          epoch = e;
        end
      end else begin
        logic [4:0] ch;
        logic [25:0] f;
        ch = 5'($urandom % 9);
        f = 26'($urandom);
        w_data = {1'b0, ch, f};
        if (w_valid) q.push_back({ch, ({ext, epoch, f} >> cfg_rebin)});
      end
    end
    @(negedge clk);
    w_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0 || wraps < 5) begin
      failures++;
      $display("left %0d wraps %0d", q.size(), wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
