// Testbench of the GMII word transmitter: words offered with random gaps must appear as four
// bytes, most significant first, with tx_en high; a back-to-back run of 64 words must take
// exactly 256 clocks after the first byte (one word per four 125 MHz clocks, 31.25 Mwords/s).
`timescale 1ps / 1ps
module tb_gmii_word_tx;
  logic clk = 0, rst = 1;
  logic w_valid = 0, w_ready;
  logic [31:0] w_data = '0;
  logic [7:0] txd;
  logic tx_en;
  int checks = 0, failures = 0;
  logic [7:0] bq[$];
  int nbytes = 0, first_cyc = -1, last_cyc = 0, cyc = 0;

  always #4000 clk = ~clk;
  gmii_word_tx dut (.*);

  always @(posedge clk) begin
    cyc++;
    if (!rst && tx_en) begin
      checks++;
      nbytes++;
      if (bq.size() == 0 || txd != bq[0]) begin
        failures++;
        $display("byte %h expected %h", txd, bq.size() ? bq[0] : 8'hx);
      end
      if (bq.size()) void'(bq.pop_front());
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [31:0] w);
    w_valid = 1;
    w_data = w;
    for (int i = 3; i >= 0; i--) bq.push_back(w[i*8 +: 8]);
    @(posedge clk);
    while (!w_ready) @(posedge clk);
    #1;
    w_valid = 0;
  endtask

  initial begin
    int c0;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      send($urandom);
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    // throughput: 64 words back to back
    c0 = cyc;
    for (int n = 0; n < 64; n++) send($urandom);
    while (bq.size() != 0) begin
      @(posedge clk);
      #1;
    end
    checks++;
    // first byte leaves one clock after the first word is offered: 1 + 64 * 4 clocks
    if (cyc - c0 != 257) begin
      failures++;
      $display("64 words took %0d clocks", cyc - c0);
    end
    checks++;
    if (tx_en !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
