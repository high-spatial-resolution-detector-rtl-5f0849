// Testbench of the word packer: random bundles (channel masks and 52-bit timestamps whose upper
// 26 bits change now and then) with a randomly stalling consumer. The expected word list is
// built here: per bundle, channels in ascending order, each fine word preceded by a coarse word
// whenever bits 51:26 differ from the last ones sent.
`timescale 1ps / 1ps
module tb_tdc_word_packer;
  import cdl_pkg::*;
  localparam int NC = 9;
  logic clk = 0, rst = 1;
  logic b_valid = 0, b_ready;
  logic [NC-1:0] b_mask;
  logic [TS_W-1:0] b_ts [NC];
  logic w_valid, w_ready;
  logic [31:0] w_data;
  int checks = 0, failures = 0, n_coarse = 0;
  logic [31:0] expq[$];

  always #5 clk = ~clk;
  tdc_word_packer #(.N_CH(NC)) dut (.*);

  always @(posedge clk) begin
    if (!rst && w_valid && w_ready) begin
      checks++;
      if (expq.size() == 0 || w_data != expq[0]) begin
        failures++;
        $display("word %h expected %h", w_data, expq.size() ? expq[0] : 32'hx);
      end
      if (expq.size()) void'(expq.pop_front());
      if (w_data[31]) n_coarse++;
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) w_ready <= ($urandom % 4) != 0;

  initial begin
    logic [25:0] hi, last_hi;
    bit known;
    known = 0;
    hi = 26'h100;
    for (int c = 0; c < NC; c++) b_ts[c] = '0;
    b_mask = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      if ($urandom % 5 == 0) hi = hi + 1;
      b_mask = NC'($urandom);
      if (b_mask == 0) b_mask = 1;
      for (int c = 0; c < NC; c++) begin
        logic [25:0] h;
        h = ($urandom % 8 == 0) ? hi - 1 : hi;   // occasional hit just before an epoch edge
        b_ts[c] = {h, 26'($urandom)};
        if (b_mask[c]) begin
          if (!known || h != last_hi) begin
            expq.push_back({1'b1, 5'(c), h});
            last_hi = h;
            known = 1;
          end
          expq.push_back({1'b0, 5'(c), b_ts[c][25:0]});
        end
      end
      b_valid = 1;
      @(posedge clk);
      while (!b_ready) @(posedge clk);
      @(negedge clk);
      b_valid = ($urandom % 3 == 0);
      if (b_valid) b_valid = 0;
    end
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("%0d words missing", expq.size());
    end
    checks++;
    if (n_coarse < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
