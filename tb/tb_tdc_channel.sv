// Testbench of one TDC channel driven by the delay-line model. The calibration table is loaded
// with the bin midpoints worked out here from the tap delays; each hit's timestamp must match
// its true time (in 2.34375 ps LSB, relative to the edge that captured coarse count 0) within
// 6 LSB, and must appear exactly 4 clocks after the capturing edge.
`timescale 1ps / 1ps
module tb_tdc_channel;
  import cdl_pkg::*;
  localparam int N = 192;
  localparam int PERIOD = 2400;
  localparam int BW = $clog2(N + 1);

  logic clk = 0, rst = 1, hit = 0;
  logic [N-1:0] taps;
  logic [TS_W-FINE_W-1:0] coarse;
  logic cal_we = 0;
  logic [BW-1:0] cal_addr = '0;
  logic [10:0] cal_data = '0;
  logic ev_valid;
  logic [TS_W-1:0] ev_ts;
  int checks = 0, failures = 0;
  longint edge_n = 0;
  longint t_ref = -1;

  always #(PERIOD/2) clk = ~clk;
  always_ff @(posedge clk) coarse <= rst ? '0 : coarse + 1'b1;
  always @(posedge clk) begin
    edge_n++;
    if (!rst && coarse == 0 && t_ref < 0) t_ref = $time;
  end

  tdl_delay_line #(.N_TAPS(N)) u_tdl (.hit(hit), .taps(taps));
  tdc_channel #(.N_TAPS(N)) dut (
    .clk(clk), .rst(rst), .taps(taps), .coarse(coarse), .cal_we(cal_we), .cal_addr(cal_addr),
    .cal_data(cal_data), .ev_valid(ev_valid), .ev_ts(ev_ts)
  );

  // cumulative delay to reach tap i-1 (D[0] = 0)
  function automatic int cum(int m);
    int d[4] = '{6, 22, 10, 22};
    int s = 0;
    for (int j = 0; j < m; j++) s += d[j % 4];
    return s;
  endfunction

  longint exp_ts[$];
  longint exp_edge[$];

  always @(posedge clk) begin
    if (ev_valid) begin
      longint e, g;
      checks += 2;
      if (exp_ts.size() == 0) begin
        failures++;
        $display("unexpected event");
      end else begin
        e = exp_ts.pop_front();
        g = exp_edge.pop_front();
        if (longint'(ev_ts) - e > 6 || e - longint'(ev_ts) > 6) begin
          failures++;
          $display("ts %0d expected %0d", ev_ts, e);
        end
        if (edge_n != g + 4) begin
          failures++;
          $display("latency: edge %0d capture %0d", edge_n, g);
        end
      end
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint th, tfirst, k;
    // load calibration: m ones means the edge travelled between cum(m) and cum(m+1) ps
    @(negedge clk);
    for (int m = 0; m <= N; m++) begin
      cal_we = 1;
      cal_addr = BW'(m);
      cal_data = 11'(((cum(m) + cum(m + 1)) * 32 + 75) / 150);
      @(negedge clk);
    end
    cal_we = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      #(($urandom % 4000) + 1);
      th = $time;
      // tap 0 rises 6 ps after the hit; it is captured by the first edge after that
      tfirst = th + 6;
      if ((tfirst - PERIOD/2) % PERIOD == 0) begin
        #1;
        th++;
        tfirst++;
      end
      k = (tfirst - PERIOD/2 + PERIOD - 1) / PERIOD;   // clock edges are at PERIOD/2 + i*PERIOD
      exp_edge.push_back(k + 1);
      exp_ts.push_back(((th - t_ref) * 32) / 75);
      hit = 1;
      #(PERIOD + 200);
      hit = 0;
      #(PERIOD + 200);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (exp_ts.size() != 0) begin
      failures++;
      $display("%0d hits not reported", exp_ts.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
