// Testbench of the FPGA-Master, fed with GMII bytes built here. Channels 0/1 are the ends of
// the x line, 2/3 of the y line, 8 is the START reference, 4..7 are single channels. Each
// group of hits is a detector event at time T and position (px, py): t1 = T + tp_x + px/2,
// t2 = T + tp_x - px/2 (channel 1 is sent 100 LSB early and put back by its offset), likewise
// for y. Groups add a reflection on channel 0 (removed by its dead time), lone hits without a
// partner (discarded by the correlators), x/y pairs out of the window, single-channel hits and
// new reference hits. Expected image and single-channel records, with times referred to the
// last reference, are worked out here, as is the raw copy of every hit. A second phase
// re-bins by 4 and checks the raw copy.
`timescale 1ps / 1ps
module tb_master_fpga;
  import cdl_pkg::*;
  localparam int NC = 9;
  logic clk = 0, rst = 1;
  logic [7:0] rxd = '0;
  logic rx_dv = 0;
  logic [2:0] cfg_rebin = '0;
  logic [15:0] cfg_dead [NC];
  logic signed [23:0] cfg_offset [NC];
  logic [4:0] cfg_ch_x1 = 0, cfg_ch_x2 = 1, cfg_ch_y1 = 2, cfg_ch_y2 = 3, cfg_ref_ch = 8;
  logic [23:0] cfg_tp_x = 24'd4000, cfg_tp_y = 24'd4200;
  logic signed [31:0] cfg_txy_lo = -32'sd300, cfg_txy_hi = 32'sd300;
  logic cfg_ref_en = 1;
  logic raw_valid, rec_valid, rec_ready = 1;
  logic [63:0] raw_data, rec_data;
  logic [15:0] dead_drop_count, line_discard_count, xy_discard_count, rec_drop_count, corr_overflow_count;
  int checks = 0, failures = 0;
  int n_img = 0, n_aux = 0, n_refl = 0, n_lone = 0, n_xyout = 0;
  logic [63:0] rawq[$], imgq[$], auxq[$];

  always #4000 clk = ~clk;
  master_fpga #(.N_CH(NC)) dut (.*);

  always @(posedge clk) begin
    if (!rst && raw_valid) begin
      checks++;
      if (rawq.size() == 0 || raw_data != rawq[0]) begin
        failures++;
        $display("raw %h expected %h", raw_data, rawq.size() ? rawq[0] : 'x);
      end
      if (rawq.size()) void'(rawq.pop_front());
    end
    if (!rst && rec_valid && rec_ready) begin
      checks++;
      if (rec_data[63:62] != 2'b00) begin
        if (imgq.size() == 0 || rec_data != imgq[0]) begin
          failures++;
          $display("image record %h expected %h", rec_data, imgq.size() ? imgq[0] : 'x);
        end
        if (imgq.size()) void'(imgq.pop_front());
      end else begin
        if (auxq.size() == 0 || rec_data != auxq[0]) begin
          failures++;
          $display("channel record %h expected %h", rec_data, auxq.size() ? auxq[0] : 'x);
        end
        if (auxq.size()) void'(auxq.pop_front());
      end
    end
  end

  initial begin
    #500000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) rec_ready <= ($urandom % 4) != 0;

  // link encoder: words are sent as 4 bytes; coarse words when bits 51:26 change
  logic [25:0] sent_hi = '0;
  bit hi_known = 0;
  task automatic send_word(logic [31:0] w);
    for (int i = 3; i >= 0; i--) begin
      @(negedge clk);
      rx_dv = 1;
      rxd = w[i*8 +: 8];
    end
    if ($urandom % 2) begin
      @(negedge clk);
      rx_dv = 0;
    end
  endtask
  task automatic send_hit(int ch, longint ts);
    logic [51:0] t = 52'(ts);
    if (!hi_known || t[51:26] != sent_hi) begin
      send_word({1'b1, 5'(ch), t[51:26]});
      sent_hi = t[51:26];
      hi_known = 1;
    end
    send_word({1'b0, 5'(ch), t[25:0]});
    rawq.push_back({3'b000, 5'(ch), 56'(ts) >> cfg_rebin});
  endtask

  // hits of one group, sent in time order
  longint gt[$];
  int gc[$];
  task automatic add(int ch, longint ts);
    int i = 0;
    while (i < gt.size() && gt[i] <= ts) i++;
    gt.insert(i, ts);
    gc.insert(i, ch);
  endtask
  task automatic flush();
    while (gt.size()) send_hit(gc.pop_front(), gt.pop_front());
    @(negedge clk);
    rx_dv = 0;
  endtask

  initial begin
    longint T, R;
    int px, py;
    for (int c = 0; c < NC; c++) begin
      cfg_dead[c] = 16'd0;
      cfg_offset[c] = 24'sd0;
    end
    cfg_dead[0] = 16'd500;
    cfg_offset[1] = 24'sd100;
    T = (longint'(5) << 26) - 3000000;   // the run crosses a 26-bit boundary
    R = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int g = 0; g < 150; g++) begin
      int kind;
      kind = $urandom % 6;
      T += 40000 + $urandom % 20000;
      if (kind == 0) begin
        R = T - 20000;
        add(8, R);
      end
      px = 2 * (int'($urandom % 3800) - 1900);
      py = 2 * (int'($urandom % 4000) - 2000);
      add(0, T + 4000 + px / 2);
      add(1, T + 4000 - px / 2 - 100);
      if (kind == 3) begin
        // y line 1000 LSB late: outside the x/y window
        add(2, T + 1000 + 4200 + py / 2);
        add(3, T + 1000 + 4200 - py / 2);
        n_xyout++;
      end else begin
        add(2, T + 4200 + py / 2);
        add(3, T + 4200 - py / 2);
        imgq.push_back({HDR_IMG_XY, 28'(px), 28'(py)});
        imgq.push_back({HDR_IMG_T, 56'(T - R)});
        n_img++;
      end
      if (kind == 1) begin
        add(0, T + 4000 + px / 2 + 300);   // reflection inside the 500 LSB dead time
        n_refl++;
      end
      if (kind == 2) begin
        add(2 + $urandom % 2, T + 25000);   // lone hit of the y line
        n_lone++;
      end
      if (kind == 4 || kind == 5) begin
        int c;
        c = 4 + $urandom % 4;
        add(c, T + 10000);
        auxq.push_back({3'b000, 5'(c), 56'(T + 10000 - R)});
        n_aux++;
      end
      flush();
    end
    // drain: an extra event pushes the last lone hits out of the correlator queues
    repeat (200) @(negedge clk);
    checks += 6;
    if (imgq.size() != 0 || auxq.size() != 0) begin
      failures++;
      $display("missing: %0d image, %0d channel records", imgq.size(), auxq.size());
    end
    if (dead_drop_count != 16'(n_refl)) failures++;
    if (xy_discard_count < 16'(n_xyout)) failures++;
    if (line_discard_count < 16'(n_lone)) failures++;
    if (rec_drop_count != 0 || corr_overflow_count != 0) failures++;
    if (n_refl == 0 || n_lone == 0 || n_xyout == 0 || n_aux == 0) failures++;
    // second phase: re-binning by 4 on single channels, reference off
    cfg_ref_en = 0;
    cfg_rebin = 3'd2;
    for (int g = 0; g < 50; g++) begin
      int c;
      T += 1000 + $urandom % 5000;
      c = 4 + $urandom % 4;
      send_hit(c, T);
      auxq.push_back({3'b000, 5'(c), 56'(T) >> 2});
    end
    @(negedge clk);
    rx_dv = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (rawq.size() != 0 || auxq.size() != 0) failures++;
    $display("images %0d reflections %0d lone %0d xy-out %0d channel %0d", n_img, n_refl, n_lone, n_xyout, n_aux);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
