// Precision sweep of the whole system at its default sizes: one pulse is split to two STOP
// channels (4 and 5), the second copy delayed by a programmable amount from -19 ns to +19 ns,
// as in a bench test of a TDC with a power splitter and a passive delay line, and then by
// 123 ns, 250 ns and 499.9 ns to cover the 500 ns range over which linearity is specified. Each pulse pair
// has a random phase against the TDC clock. Both channels carry the bin-midpoint calibration
// worked out from the delay-line model. From the raw hit stream the testbench takes the
// interval t5 - t4 of every pair and, for each delay, checks that all pairs arrived, that the
// mean interval matches the delay within 5 ps, and that its standard deviation stays below
// 12 ps r.m.s. (the precision the converter is built for; with the 6/22/10/22 ps taps of the
// model about 8 ps is expected from quantisation alone).
`timescale 1ps / 1ps
module tb_tdc_precision;
  import cdl_pkg::*;
  localparam int NC = 9, N = 192, BW = $clog2(N + 1);
  localparam int TP = 2400, LP = 8000;
  localparam int NPAIR = 100;
  localparam int ND = 12;

  logic clk_tdc = 0, clk_link = 0, rst_tdc = 1, rst_link = 1;
  logic [NC-1:0] hit = '0;
  logic cal_we = 0;
  logic [4:0] cal_ch = '0;
  logic [BW-1:0] cal_addr = '0;
  logic [10:0] cal_data = '0;
  logic [2:0] cfg_rebin = '0;
  logic [15:0] cfg_dead [NC];
  logic signed [23:0] cfg_offset [NC];
  logic [4:0] cfg_ch_x1 = 0, cfg_ch_x2 = 1, cfg_ch_y1 = 2, cfg_ch_y2 = 3, cfg_ref_ch = 8;
  logic [23:0] cfg_tp_x = 24'd4000, cfg_tp_y = 24'd4000;
  logic signed [31:0] cfg_txy_lo = -32'sd300, cfg_txy_hi = 32'sd300;
  logic cfg_ref_en = 0;
  logic raw_valid, rec_valid, rec_ready = 1;
  logic [63:0] raw_data, rec_data;
  logic [15:0] tdc_overflow_count, dead_drop_count, line_discard_count, xy_discard_count;
  logic [15:0] rec_drop_count, corr_overflow_count;

  int checks = 0, failures = 0;
  longint q4[$], q5[$];   // raw times of channels 4 and 5 (LSB)
  int delays [ND] = '{-19000, -12500, -5000, -1234, 0, 777, 5000, 12500, 19000, 123457, 250000, 499900};

  always #(TP/2) clk_tdc = ~clk_tdc;
  always #(LP/2) clk_link = ~clk_link;

  cdl_tdc_system dut (.*);

  always @(posedge clk_link) begin
    if (!rst_link && raw_valid) begin
      if (raw_data[60:56] == 5'd4) q4.push_back(longint'(raw_data[55:0]));
      if (raw_data[60:56] == 5'd5) q5.push_back(longint'(raw_data[55:0]));
    end
  end

  function automatic int cum(int m);
    int d[4] = '{6, 22, 10, 22};
    int s = 0;
    for (int j = 0; j < m; j++) s += d[j % 4];
    return s;
  endfunction

  task automatic pulse_at(int c, longint t_ps);
    #(t_ps - $time);
    hit[c] = 1;
    #3000;
    hit[c] = 0;
  endtask

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint T;
    real s1, s2, dps, mean, sd, worst_sd;
    int n;
    worst_sd = 0.0;
    for (int c = 0; c < NC; c++) begin
      cfg_dead[c] = 16'd0;
      cfg_offset[c] = 24'sd0;
    end
    @(negedge clk_tdc);
    for (int c = 4; c <= 5; c++) begin
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
    #20000;
    for (int k = 0; k < ND; k++) begin
      for (int p = 0; p < NPAIR; p++) begin
        T = $time + 40000 + longint'($urandom % 7919);
        fork pulse_at(4, T + (delays[k] < 0 ? -delays[k] : 0)); join_none
        fork pulse_at(5, T + (delays[k] > 0 ? delays[k] : 0)); join_none
        #(T + 25000 + (delays[k] > 0 ? delays[k] : 0) - $time);
      end
      #2000000;
      checks += 3;
      n = 0;
      s1 = 0.0;
      s2 = 0.0;
      while (q4.size() > 0 && q5.size() > 0) begin
        dps = real'(q5.pop_front() - q4.pop_front()) * 2.34375;
        s1 += dps;
        s2 += dps * dps;
        n++;
      end
      if (n != NPAIR || q4.size() != 0 || q5.size() != 0) begin
        failures++;
        $display("delay %0d ps: %0d pairs, %0d/%0d left over", delays[k], n, q4.size(), q5.size());
        q4.delete();
        q5.delete();
      end
      mean = (n > 0) ? s1 / n : 0.0;
      sd = (n > 1) ? $sqrt((s2 - s1 * s1 / n) / (n - 1)) : 0.0;
      if (sd > worst_sd) worst_sd = sd;
      $display("delay %6d ps: mean %9.2f ps  error %6.2f ps  std %5.2f ps", delays[k], mean,
               mean - real'(delays[k]), sd);
      if (mean - real'(delays[k]) > 5.0 || real'(delays[k]) - mean > 5.0) begin
        failures++;
        $display("mean interval off by more than 5 ps");
      end
      if (sd > 12.0 || n < 2) begin
        failures++;
        $display("standard deviation above 12 ps");
      end
    end
    checks++;
    if (tdc_overflow_count != 0 || dead_drop_count != 0) failures++;
    $display("worst standard deviation %5.2f ps", worst_sd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
