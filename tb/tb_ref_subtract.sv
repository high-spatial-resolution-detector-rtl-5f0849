// Testbench of the START reference: with the reference disabled times pass unchanged; enabled,
// the newer of the last two reference times is subtracted when the event is not earlier than
// it, else the older one (both 0 before the first references); results may be negative.
`timescale 1ps / 1ps
module tb_ref_subtract;
  localparam int W = 56;
  logic clk = 0, rst = 1;
  logic cfg_en = 0, ref_valid = 0, in_valid = 0;
  logic [W-1:0] ref_ts = '0, in_ts = '0;
  logic out_valid;
  logic [W-1:0] out_ts;
  int checks = 0, failures = 0;

  always #4000 clk = ~clk;
  ref_subtract #(.TS_W(W)) dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] last = '0, prev = '0, expv;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      if (n == 500) cfg_en = 0;
      if (n == 100) cfg_en = 1;
      ref_valid = ($urandom % 5) == 0 && n > 150;
      ref_ts = {$urandom, $urandom};
      in_valid = ($urandom % 2) == 0;
      in_ts = {$urandom, $urandom};
      expv = !cfg_en ? in_ts : (in_ts >= last) ? in_ts - last : in_ts - prev;
      @(negedge clk);
      checks++;
      if (out_valid != in_valid || (in_valid && out_ts != expv)) begin
        failures++;
        $display("n %0d got %h expected %h", n, out_ts, expv);
      end
      if (ref_valid) begin
        prev = last;
        last = ref_ts;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
