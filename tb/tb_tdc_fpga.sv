// Testbench of the FPGA-TDC: delay-line models, channels, coarse counter, bundle FIFO, word
// packer and GMII transmitter together. Calibration tables of all channels are loaded with the
// bin midpoints of the model's taps. Random hits on the nine channels are decoded back from the
// GMII bytes here (coarse words set bits 51:26, fine words give bits 25:0) and must match the
// true hit times within 6 LSB, per channel and in order. A final burst on all channels at the
// maximum channel rate must overflow the FIFO and be counted.
`timescale 1ps / 1ps
module tb_tdc_fpga;
  import cdl_pkg::*;
  localparam int NC = 9, N = 192, BW = $clog2(N + 1);
  localparam int TP = 2400, LP = 8000;

  logic clk_tdc = 0, clk_link = 0, rst_tdc = 1, rst_link = 1;
  logic [NC-1:0] hit = '0;
  logic cal_we = 0;
  logic [4:0] cal_ch = '0;
  logic [BW-1:0] cal_addr = '0;
  logic [10:0] cal_data = '0;
  logic [7:0] txd;
  logic tx_en;
  logic [15:0] overflow_count;
  int checks = 0, failures = 0, n_coarse_words = 0;
  longint t_ref = -1;
  bit checking = 1;
  longint expq [NC][$];

  always #(TP/2) clk_tdc = ~clk_tdc;
  always #(LP/2) clk_link = ~clk_link;

  tdc_fpga #(.N_CH(NC), .N_TAPS(N)) dut (.*);

  // the coarse counter holds 0 during reset: the first edge after reset captures count 0
  always @(posedge clk_tdc) if (!rst_tdc && t_ref < 0) t_ref = $time;

  // GMII decoder
  int nb = 0;
  logic [31:0] w;
  logic [25:0] epoch = '0;
  always @(posedge clk_link) begin
    if (!tx_en) nb = 0;
    else begin
      w = {w[23:0], txd};
      nb++;
      if (nb == 4) begin
        nb = 0;
        if (w[31]) begin
          epoch = w[25:0];
          n_coarse_words++;
        end else if (checking) begin
          int c;
          longint got, e;
          c = int'(w[30:26]);
          got = longint'({epoch, w[25:0]});
          checks++;
          if (c >= NC || expq[c].size() == 0) begin
            failures++;
            $display("unexpected hit on channel %0d", c);
          end else begin
            e = expq[c].pop_front();
            if (got - e > 6 || e - got > 6) begin
              failures++;
              $display("ch %0d ts %0d expected %0d", c, got, e);
            end
          end
        end
      end
    end
  end

  function automatic int cum(int m);
    int d[4] = '{6, 22, 10, 22};
    int s = 0;
    for (int j = 0; j < m; j++) s += d[j % 4];
    return s;
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one pulse on channel c: 3 ns high
  task automatic pulse(int c);
    longint th;
    th = $time;
    // avoid tap 0 switching exactly on a clock edge
    if ((th + 6 - TP/2) % TP == 0) begin
      #1;
      th++;
    end
    expq[c].push_back(((th - t_ref) * 32) / 75);
    hit[c] = 1;
    #3000;
    hit[c] = 0;
  endtask

  initial begin
    @(negedge clk_tdc);
    for (int c = 0; c < NC; c++) begin
      for (int m = 0; m <= N; m++) begin
        cal_we = 1;
        cal_ch = 5'(c);
        cal_addr = BW'(m);
        cal_data = 11'(((cum(m) + cum(m + 1)) * 32 + 75) / 150);
        @(negedge clk_tdc);
      end
    end
    cal_we = 0;
    rst_tdc = 0;
    @(negedge clk_link);
    rst_link = 0;
    repeat (5) @(negedge clk_tdc);
    // normal rate: pulses on random channels, on average one per 100 ns
    for (int n = 0; n < 400; n++) begin
      int c;
      c = $urandom % NC;
      fork
        pulse(c);
      join_none
      #(20000 + $urandom % 160000);
    end
    #1000000;
    for (int c = 0; c < NC; c++) begin
      checks++;
      if (expq[c].size() != 0) begin
        failures++;
        $display("channel %0d: %0d hits not received", c, expq[c].size());
      end
    end
    checks += 2;
    if (overflow_count != 0) failures++;
    if (n_coarse_words < 1) failures++;
    // burst at the maximum channel rate on all channels: the link cannot keep up
    checking = 0;
    for (int n = 0; n < 100; n++) begin
      hit = '1;
      #(TP);
      hit = '0;
      #(TP);
    end
    #100000;
    checks++;
    if (overflow_count == 0) begin
      failures++;
      $display("no overflow counted");
    end
    $display("overflows %0d", overflow_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
