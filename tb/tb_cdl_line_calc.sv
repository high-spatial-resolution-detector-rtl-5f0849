// Testbench of the delay-line calculation: for random event times T, positions p with |p| < tp
// and propagation times tp, the line ends see t1 = T + tp + p/2 and t2 = T + tp - p/2 (p even);
// the block must return x = p and te = T one clock later.
`timescale 1ps / 1ps
module tb_cdl_line_calc;
  localparam int W = 56;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [W-1:0] t1 = '0, t2 = '0;
  logic [23:0] tp = '0;
  logic out_valid;
  logic signed [23:0] x;
  logic [W-1:0] te;
  int checks = 0, failures = 0;

  always #4000 clk = ~clk;
  cdl_line_calc #(.TS_W(W), .X_W(24)) dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      longint T;
      int tpv;
      int p;
      T = {$urandom, $urandom} & 64'h00FF_FFFF_FFFF_FFFF;
      tpv = 1000 + $urandom % 100000;
      p = 2 * (int'($urandom % tpv) - tpv / 2);
      if (T < 64'd1000000) T += 1000000;
      tp = 24'(tpv);
      t1 = W'(T + tpv + p / 2);
      t2 = W'(T + tpv - p / 2);
      in_valid = 1;
      @(negedge clk);
      checks += 3;
      if (!out_valid) failures++;
      if (x != 24'(p)) begin
        failures++;
        $display("x %0d expected %0d", x, p);
      end
      if (te != W'(T)) begin
        failures++;
        $display("te %0d expected %0d", te, T);
      end
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
