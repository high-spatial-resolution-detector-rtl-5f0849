// Pump-probe timing run of the whole system at its default sizes. Channel 8 is the START
// reference and receives one pulse per storage-ring revolution (864 ns). The detector channel 4
// sees, in each revolution, a pump-related hit 123.456 ns after START with +/-20 ps of jitter,
// a second hit 10 ns later, and on some revolutions a background hit at a random time. The
// system runs with the 9.375 ps bin (re-binning shift 2) and reports each detector hit as a
// single-channel record referred to the last START. The testbench checks every record against
// the true interval (within 2 bins), that no hit is lost (both hits 10 ns apart are kept), that
// every time lies inside one revolution, and builds the time histogram over the revolution:
// the two peaks must hold one count per revolution each and the background stays flat.
`timescale 1ps / 1ps
module tb_pump_probe;
  import cdl_pkg::*;
  localparam int NC = 9, N = 192, BW = $clog2(N + 1);
  localparam int TP = 2400, LP = 8000;
  localparam longint REV = 864000;       // ps
  localparam longint PEAK = 123456;      // ps after START
  localparam longint PAIR = 10000;       // second hit, ps after the first
  localparam int NBIN = 92160;           // 864 ns / 9.375 ps
  localparam int NREV = 80;

  logic clk_tdc = 0, clk_link = 0, rst_tdc = 1, rst_link = 1;
  logic [NC-1:0] hit = '0;
  logic cal_we = 0;
  logic [4:0] cal_ch = '0;
  logic [BW-1:0] cal_addr = '0;
  logic [10:0] cal_data = '0;
  logic [2:0] cfg_rebin = 3'd2;
  logic [15:0] cfg_dead [NC];
  logic signed [23:0] cfg_offset [NC];
  logic [4:0] cfg_ch_x1 = 0, cfg_ch_x2 = 1, cfg_ch_y1 = 2, cfg_ch_y2 = 3, cfg_ref_ch = 8;
  logic [23:0] cfg_tp_x = 24'd1000, cfg_tp_y = 24'd1000;
  logic signed [31:0] cfg_txy_lo = -32'sd100, cfg_txy_hi = 32'sd100;
  logic cfg_ref_en = 1;
  logic raw_valid, rec_valid, rec_ready = 1;
  logic [63:0] raw_data, rec_data;
  logic [15:0] tdc_overflow_count, dead_drop_count, line_discard_count, xy_discard_count;
  logic [15:0] rec_drop_count, corr_overflow_count;

  int checks = 0, failures = 0;
  int hist [NBIN];
  int n_rec = 0, n_sent = 0, n_bg = 0;
  longint t_ref = -1;
  longint exp_q[$];   // expected bin of each detector hit

  always #(TP/2) clk_tdc = ~clk_tdc;
  always #(LP/2) clk_link = ~clk_link;

  cdl_tdc_system dut (.*);

  always @(posedge clk_tdc) if (!rst_tdc && t_ref < 0) t_ref = $time;

  function automatic longint lsb(longint t_ps);
    return ((t_ps - t_ref) * 32) / 75;
  endfunction

  always @(posedge clk_link) begin
    if (!rst_link && rec_valid && rec_ready) begin
      longint t, e;
      checks++;
      n_rec++;
      t = longint'(signed'(rec_data[55:0]));
      if (rec_data[63:56] != 8'd4 || exp_q.size() == 0) begin
        failures++;
        $display("unexpected record %h", rec_data);
      end else begin
        e = exp_q.pop_front();
        if (t < 0 || t >= NBIN) begin
          failures++;
          $display("time %0d outside the revolution", t);
        end else begin
          hist[t]++;
        end
        if (t - e > 2 || e - t > 2) begin
          failures++;
          $display("bin %0d expected %0d", t, e);
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

  task automatic pulse_at(int c, longint t_ps);
    #(t_ps - $time);
    hit[c] = 1;
    #3000;
    hit[c] = 0;
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint R, h, b;
    int pk, pk_n, pair_n, pk_exp;
    for (int c = 0; c < NC; c++) begin
      cfg_dead[c] = 16'd0;
      cfg_offset[c] = 24'sd0;
    end
    for (int i = 0; i < NBIN; i++) hist[i] = 0;
    @(negedge clk_tdc);
    for (int c = 4; c <= 8; c += 4) begin
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
    R = $time + 50000;
    for (int k = 0; k < NREV; k++) begin
      fork pulse_at(8, R); join_none
      h = R + PEAK + longint'($urandom % 41) - 20;
      fork pulse_at(4, h); join_none
      exp_q.push_back((lsb(h) >>> 2) - (lsb(R) >>> 2));
      fork pulse_at(4, h + PAIR); join_none
      exp_q.push_back((lsb(h + PAIR) >>> 2) - (lsb(R) >>> 2));
      n_sent += 2;
      if ($urandom % 2 == 0) begin
        b = R + 200000 + longint'($urandom % 600000);
        fork pulse_at(4, b); join_none
        exp_q.push_back((lsb(b) >>> 2) - (lsb(R) >>> 2));
        n_sent++;
        n_bg++;
      end
      // the forked pulses read R when they start, so advance it only after waiting
      #(R + REV - 10000 - $time);
      R += REV;
    end
    #2000000;
    // losses, histogram peak and the second hit of each pair
    pk_exp = int'((PEAK * 32 / 75) >>> 2);
    pk_n = 0;
    pair_n = 0;
    for (int i = pk_exp - 6; i <= pk_exp + 6; i++) pk_n += hist[i];
    for (int i = pk_exp + 1067 - 6; i <= pk_exp + 1067 + 6; i++) pair_n += hist[i];
    // fullest bin outside the two peaks: background only
    pk = 0;
    for (int i = 0; i < NBIN; i++)
      if ((i < pk_exp - 6 || i > pk_exp + 6) && (i < pk_exp + 1061 || i > pk_exp + 1073) &&
          hist[i] > hist[pk]) pk = i;
    checks += 4;
    if (n_rec != n_sent || exp_q.size() != 0) begin
      failures++;
      $display("%0d records for %0d hits", n_rec, n_sent);
    end
    if (hist[pk] > 2) begin
      failures++;
      $display("background bin %0d holds %0d counts", pk, hist[pk]);
    end
    if (pk_n != NREV || pair_n != NREV) begin
      failures++;
      $display("peak holds %0d, pair peak %0d, of %0d revolutions", pk_n, pair_n, NREV);
    end
    if (tdc_overflow_count != 0 || rec_drop_count != 0 || dead_drop_count != 0) failures++;
    $display("revolutions %0d hits %0d background %0d, pump peak near bin %0d holds %0d, second %0d",
             NREV, n_sent, n_bg, pk_exp, pk_n, pair_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
