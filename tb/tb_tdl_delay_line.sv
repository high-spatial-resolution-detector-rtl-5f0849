// Testbench of the delay-line model: a hit edge must reach tap i after the sum of the first
// i+1 tap delays (6/22/10/22 ps repeating), and the falling edge must follow the same way.
`timescale 1ps / 1ps
module tb_tdl_delay_line;
  localparam int N = 192;
  logic         hit;
  logic [N-1:0] taps;
  int checks = 0, failures = 0;

  tdl_delay_line #(.N_TAPS(N)) dut (.hit(hit), .taps(taps));

  function automatic int arrival(int i);   // time for the edge to reach tap i
    int d[4] = '{6, 22, 10, 22};
    int s = 0;
    for (int j = 0; j <= i; j++) s += d[j % 4];
    return s;
  endfunction

  function automatic int ones_expected(int elapsed);
    int n = 0;
    for (int i = 0; i < N; i++) if (arrival(i) <= elapsed) n++;
    return n;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, e;
    hit = 0;
    #5000;   // the line settles from its power-up state
    if (taps !== '0) failures++;
    checks++;
    for (int k = 0; k < 40; k++) begin
      hit = 1;
      t0 = int'($time);
      do e = 1 + ($urandom % 2900); while (ones_expected(e) != ones_expected(e - 1));
      #(e);
      checks++;
      if ($countones(taps) != ones_expected(e)) begin
        failures++;
        $display("rise: elapsed %0d ones %0d expected %0d", e, $countones(taps), ones_expected(e));
      end
      // a clean capture is a run of ones from tap 0
      checks++;
      if (taps != ((N)'(1) << $countones(taps)) - 1 && $countones(taps) != N) failures++;
      #(4000 - e);
      hit = 0;
      #(e);
      checks++;
      if ($countones(taps) != N - ones_expected(e)) begin
        failures++;
        $display("fall: elapsed %0d ones %0d", e, $countones(taps));
      end
      #(4000 - e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
