// Count-rate test of the whole system at its default sizes in the imaging configuration.
// Particles hit the detector at a fixed rate; each gives four pulses at the ends of the two
// delay lines (positions random, tp about 9.4 ns per line). Phase 1 runs 5 M particles/s:
// 20 M timestamps/s fit the 31.25 M words/s of the TDC-to-master link, so every particle must
// give one correct image point (x and y within 12 LSB) and nothing may overflow. Phase 2 runs
// 10 M particles/s: 40 M timestamps/s exceed the link, so the TDC FIFO must overflow, and
// the image output can at best reach what the link carries (31.25 M / 4 = 7.8 M points/s).
// Hits are lost one bundle at a time, not one particle at a time, so the link also carries
// the surviving hits of incomplete particles and the real output is lower: if about 22 % of
// the hits were lost independently, 0.78^4 = 37 % of the particles (3.7 M/s) would remain. The
// test asks for 4 to 7.8 M points/s, every point inside the detector area.
`timescale 1ps / 1ps
module tb_imaging_rate;
  import cdl_pkg::*;
  localparam int NC = 9, N = 192, BW = $clog2(N + 1);
  localparam int TP = 2400, LP = 8000;
  localparam int TPX_PS = 9375, TPY_PS = 9844;   // 4000 and 4200 LSB
  localparam longint PH_PS = 40000000;           // length of each phase

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
  logic [23:0] cfg_tp_x = 24'd4000, cfg_tp_y = 24'd4200;
  logic signed [31:0] cfg_txy_lo = -32'sd300, cfg_txy_hi = 32'sd300;
  logic cfg_ref_en = 0;
  logic raw_valid, rec_valid, rec_ready = 1;
  logic [63:0] raw_data, rec_data;
  logic [15:0] tdc_overflow_count, dead_drop_count, line_discard_count, xy_discard_count;
  logic [15:0] rec_drop_count, corr_overflow_count;

  int checks = 0, failures = 0;
  int phase = 1;
  int n_img [3] = '{0, 0, 0};
  longint img_xq[$], img_yq[$];

  always #(TP/2) clk_tdc = ~clk_tdc;
  always #(LP/2) clk_link = ~clk_link;

  cdl_tdc_system dut (.*);

  function automatic longint sx28(logic [27:0] v);
    return longint'(signed'(v));
  endfunction
  function automatic bit near(longint a, longint b, longint tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  always @(posedge clk_link) begin
    if (!rst_link && rec_valid && rec_ready && rec_data[63:56] == HDR_IMG_XY) begin
      longint x, y, ex, ey;
      x = sx28(rec_data[55:28]);
      y = sx28(rec_data[27:0]);
      n_img[phase]++;
      checks++;
      if (phase == 1) begin
        if (img_xq.size() == 0) begin
          failures++;
          $display("unexpected image point");
        end else begin
          ex = img_xq.pop_front();
          ey = img_yq.pop_front();
          if (!near(x, ex, 12) || !near(y, ey, 12)) begin
            failures++;
            $display("image %0d %0d expected %0d %0d", x, y, ex, ey);
          end
        end
      end else if (!near(x, 0, 4000) || !near(y, 0, 4200)) begin
        failures++;
        $display("image %0d %0d outside the detector", x, y);
      end
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
    if ((t_ps + 6 - TP/2) % TP == 0) #1;   // keep tap 0 off the clock edge
    hit[c] = 1;
    #3000;
    hit[c] = 0;
  endtask

  task automatic particles(longint period_ps, bit expect_img);
    longint T, t_end;
    int px, py;
    t_end = $time + PH_PS;
    T = $time;
    while (T < t_end) begin
      px = int'($urandom % 16000) - 8000;   // ps, |px| < tp_x
      py = int'($urandom % 16000) - 8000;
      fork pulse_at(0, T + TPX_PS + px / 2); join_none
      fork pulse_at(1, T + TPX_PS - px / 2); join_none
      fork pulse_at(2, T + TPY_PS + py / 2); join_none
      fork pulse_at(3, T + TPY_PS - py / 2); join_none
      if (expect_img) begin
        img_xq.push_back((longint'(px) * 32) / 75);
        img_yq.push_back((longint'(py) * 32) / 75);
      end
      #(T + period_ps - 25000 - $time);
      T += period_ps;
    end
    #(T - $time);
  endtask

  initial begin
    #300000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate1, rate2;
    for (int c = 0; c < NC; c++) begin
      cfg_dead[c] = 16'd0;
      cfg_offset[c] = 24'sd0;
    end
    @(negedge clk_tdc);
    for (int c = 0; c < 4; c++) begin
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
    #50000;
    // phase 1: 5 M particles/s
    particles(200000, 1);
    #3000000;
    checks += 2;
    if (img_xq.size() != 0) begin
      failures++;
      $display("%0d image points missing at 5 M/s", img_xq.size());
    end
    if (tdc_overflow_count != 0 || corr_overflow_count != 0 || rec_drop_count != 0) begin
      failures++;
      $display("loss at 5 M/s");
    end
    rate1 = real'(n_img[1]) / (real'(PH_PS) * 1.0e-12) / 1.0e6;
    // phase 2: 10 M particles/s, beyond the link
    phase = 2;
    particles(100000, 0);
    phase = 0;
    #3000000;
    rate2 = real'(n_img[2]) / (real'(PH_PS) * 1.0e-12) / 1.0e6;
    checks += 2;
    if (tdc_overflow_count == 0) begin
      failures++;
      $display("no FIFO overflow at 10 M/s");
    end
    if (rate2 < 4.0 || rate2 > 7.82) begin
      failures++;
      $display("image rate %0.2f M/s at 10 M/s input", rate2);
    end
    $display("5 M/s in: %0.2f M points/s out; 10 M/s in: %0.2f M points/s out, %0d FIFO overflows, %0d line discards",
             rate1, rate2, tdc_overflow_count, line_discard_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
