// End-to-end testbench of the whole system at its default sizes (nine channels, 192 taps).
// A detector model produces, for each particle at time T and position (px, py), pulses at the
// four ends of the delay lines: t1,2 = T + tp_x +/- px/2 and t3,4 = T + tp_y +/- py/2 (ps).
// Some events also carry a reflection on channel 0, a lone pulse, a y line out of the x/y
// window, a pulse on a single channel (4..7) or a new START reference (channel 8). The run lasts
// past 157 us so timestamps cross a coarse-field boundary. Image and single-channel records are
// compared with the true values (x and y within 12 LSB, times within 8 LSB of 2.34375 ps).
// Each mechanism is counted and must occur: coarse-field crossing, dead-time drop, line
// discard, x/y discard, reference subtraction, single-channel path, FIFO overflow in a final
// burst on all channels, and re-binning (last phase, raw copy shifted by 2).
`timescale 1ps / 1ps
module tb_cdl_tdc_system;
  import cdl_pkg::*;
  localparam int NC = 9, N = 192, BW = $clog2(N + 1);
  localparam int TP = 2400, LP = 8000;
  localparam int TPX_PS = 9375, TPY_PS = 9844;   // 4000 and 4200 LSB

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
  logic cfg_ref_en = 1;
  logic raw_valid, rec_valid, rec_ready = 1;
  logic [63:0] raw_data, rec_data;
  logic [15:0] tdc_overflow_count, dead_drop_count, line_discard_count, xy_discard_count;
  logic [15:0] rec_drop_count, corr_overflow_count;

  int checks = 0, failures = 0;
  int n_cross = 0, n_refl = 0, n_lone = 0, n_xyout = 0, n_ref = 0, n_aux = 0, n_img = 0, n_rebin = 0;
  longint t_ref = -1;
  longint img_xq[$], img_yq[$], img_tq[$];   // expected x, y, t (LSB)
  longint aux_cq[$], aux_tq[$];               // expected channel, t (LSB)
  longint last_raw = 0;
  bit checking = 1;   // records of the final overload burst are not compared

  always #(TP/2) clk_tdc = ~clk_tdc;
  always #(LP/2) clk_link = ~clk_link;

  cdl_tdc_system dut (.*);

  always @(posedge clk_tdc) if (!rst_tdc && t_ref < 0) t_ref = $time;

  function automatic longint lsb(longint t_ps);
    return ((t_ps - t_ref) * 32) / 75;
  endfunction
  function automatic longint sx28(logic [27:0] v);
    return longint'(signed'(v));
  endfunction
  function automatic bit near(longint a, longint b, longint tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  // raw copy: count the coarse-field crossing
  always @(posedge clk_link) begin
    if (!rst_link && raw_valid && cfg_rebin == 0) begin
      if (last_raw < (longint'(1) << 26) && longint'(raw_data[55:0]) >= (longint'(1) << 26)) n_cross++;
      last_raw = longint'(raw_data[55:0]);
    end
  end

  // records
  logic [63:0] pending_xy;
  bit have_xy = 0;
  always @(posedge clk_link) begin
    if (!rst_link && rec_valid && rec_ready && checking) begin
      if (rec_data[63:56] == HDR_IMG_XY) begin
        pending_xy = rec_data;
        have_xy = 1;
      end else if (rec_data[63:56] == HDR_IMG_T) begin
        checks++;
        if (!have_xy || img_tq.size() == 0) begin
          failures++;
          $display("unexpected image record");
        end else begin
          longint e[3];
          e[0] = img_xq.pop_front();
          e[1] = img_yq.pop_front();
          e[2] = img_tq.pop_front();
          if (!near(sx28(pending_xy[55:28]), e[0], 12) || !near(sx28(pending_xy[27:0]), e[1], 12) ||
              !near(longint'(signed'(rec_data[55:0])), e[2], 8)) begin
            failures++;
            $display("image x %0d y %0d t %0d expected %0d %0d %0d", sx28(pending_xy[55:28]),
                     sx28(pending_xy[27:0]), longint'(signed'(rec_data[55:0])), e[0], e[1], e[2]);
          end
        end
        have_xy = 0;
      end else begin
        checks++;
        if (aux_tq.size() == 0) begin
          failures++;
          $display("unexpected channel record %h", rec_data);
        end else begin
          longint e[2];
          e[0] = aux_cq.pop_front();
          e[1] = aux_tq.pop_front();
          if (longint'(rec_data[60:56]) != e[0] || !near(longint'(signed'(rec_data[55:0])), e[1], 8)) begin
            failures++;
            $display("channel record %h expected ch %0d t %0d", rec_data, e[0], e[1]);
          end
        end
      end
    end
  end

  always @(negedge clk_link) rec_ready <= ($urandom % 4) != 0;

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

  initial begin
    #400000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint T, R, Rl;
    int px, py;
    for (int c = 0; c < NC; c++) begin
      cfg_dead[c] = 16'd0;
      cfg_offset[c] = 24'sd0;
    end
    cfg_dead[0] = 16'd5000;
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
    R = -1;
    Rl = 0;
    T = $time + 20000;
    while (T < 170000000) begin
      int kind;
      kind = $urandom % 6;
      T += 1200000 + $urandom % 600000;
      px = int'($urandom % 16000) - 8000;   // ps, |px| < tp_x
      py = int'($urandom % 16000) - 8000;
      if (kind == 0) begin
        R = T - 200000;
        Rl = lsb(R);
        n_ref++;
        fork pulse_at(8, R); join_none
      end
      fork pulse_at(0, T + TPX_PS + px / 2); join_none
      fork pulse_at(1, T + TPX_PS - px / 2); join_none
      if (kind == 3) begin
        fork pulse_at(2, T + 2344 + TPY_PS + py / 2); join_none
        fork pulse_at(3, T + 2344 + TPY_PS - py / 2); join_none
        n_xyout++;
      end else begin
        fork pulse_at(2, T + TPY_PS + py / 2); join_none
        fork pulse_at(3, T + TPY_PS - py / 2); join_none
        img_xq.push_back((longint'(px) * 32) / 75);
        img_yq.push_back((longint'(py) * 32) / 75);
        img_tq.push_back(lsb(T) - Rl);
        n_img++;
      end
      if (kind == 1) begin
        fork pulse_at(0, T + TPX_PS + px / 2 + 8000); join_none
        n_refl++;
      end
      if (kind == 2) begin
        fork pulse_at(2, T + 60000); join_none
        n_lone++;
      end
      if (kind >= 4) begin
        int c;
        c = 4 + $urandom % 4;
        fork pulse_at(c, T + 30000); join_none
        aux_cq.push_back(longint'(c));
        aux_tq.push_back(lsb(T + 30000) - Rl);
        n_aux++;
      end
      #(T + 100000 - $time);
    end
    #2000000;
    checks += 3;
    if (img_tq.size() != 0 || aux_tq.size() != 0) begin
      failures++;
      $display("missing %0d image and %0d channel records", img_tq.size(), aux_tq.size());
    end
    if (tdc_overflow_count != 0 || rec_drop_count != 0 || corr_overflow_count != 0) failures++;
    if (dead_drop_count != 16'(n_refl)) begin
      failures++;
      $display("dead-time drops %0d expected %0d", dead_drop_count, n_refl);
    end
    // re-binning: one single-channel hit with the raw copy shifted by 2
    cfg_ref_en = 0;
    @(negedge clk_link);
    cfg_rebin = 3'd2;
    T = $time + 100000;
    fork pulse_at(5, T); join_none
    aux_cq.push_back(5);
    aux_tq.push_back(lsb(T) >>> 2);
    #2000000;
    checks++;
    if (aux_tq.size() != 0) failures++;
    else n_rebin++;
    // burst on all channels at the maximum channel rate
    checking = 0;
    for (int n = 0; n < 100; n++) begin
      hit = '1;
      #(TP);
      hit = '0;
      #(TP);
    end
    #200000;
    // every mechanism must have happened
    checks += 8;
    if (n_cross == 0) begin failures++; $display("no coarse-field crossing"); end
    if (dead_drop_count == 0) begin failures++; $display("no dead-time drop"); end
    if (line_discard_count < 16'(n_lone) || n_lone == 0) begin failures++; $display("line discards %0d", line_discard_count); end
    if (xy_discard_count < 16'(n_xyout) || n_xyout == 0) begin failures++; $display("x/y discards %0d", xy_discard_count); end
    if (n_ref == 0) begin failures++; $display("no reference"); end
    if (n_aux == 0) begin failures++; $display("no single-channel hit"); end
    if (tdc_overflow_count == 0) begin failures++; $display("no FIFO overflow"); end
    if (n_rebin == 0) begin failures++; $display("re-binning not seen"); end
    $display("images %0d crossings %0d reflections %0d lone %0d xy-out %0d refs %0d channel %0d overflows %0d",
             n_img, n_cross, n_refl, n_lone, n_xyout, n_ref, n_aux, tdc_overflow_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
