// Testbench of the GMII word receiver: bursts of bytes (four per word, most significant first)
// with rx_dv high must give back the words; a burst cut in the middle of a word must not
// disturb the alignment of the next burst.
`timescale 1ps / 1ps
module tb_gmii_word_rx;
  logic clk = 0, rst = 1;
  logic [7:0] rxd = '0;
  logic rx_dv = 0;
  logic w_valid;
  logic [31:0] w_data;
  int checks = 0, failures = 0;
  logic [31:0] wq[$];

  always #4000 clk = ~clk;
  gmii_word_rx dut (.*);

  always @(posedge clk) begin
    if (!rst && w_valid) begin
      checks++;
      if (wq.size() == 0 || w_data != wq[0]) begin
        failures++;
        $display("word %h expected %h", w_data, wq.size() ? wq[0] : 32'hx);
      end
      if (wq.size()) void'(wq.pop_front());
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int b = 0; b < 100; b++) begin
      int nw;
      nw = 1 + $urandom % 5;
      for (int n = 0; n < nw; n++) begin
        logic [31:0] w;
        bit cut;
        int nb;
        w = $urandom;
        cut = (n == nw - 1) && ($urandom % 4 == 0);
        nb = cut ? 1 + $urandom % 3 : 4;
        if (!cut) wq.push_back(w);
        for (int i = 0; i < nb; i++) begin
          @(negedge clk);
          rx_dv = 1;
          rxd = w[(3-i)*8 +: 8];
        end
      end
      @(negedge clk);
      rx_dv = 0;
      rxd = $urandom;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (wq.size() != 0) begin
      failures++;
      $display("%0d words missing", wq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
