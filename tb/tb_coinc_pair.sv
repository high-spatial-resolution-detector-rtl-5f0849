// Testbench of the correlator: two random streams of increasing times, some pairs inside the
// window and many stray hits. A reference model here keeps its own queues and applies the rule
// "pair if lo < a - b < hi, else drop the older"; pairs (with payloads) and the discard count
// must match. An asymmetric window is used so the sign of a - b matters.
`timescale 1ps / 1ps
module tb_coinc_pair;
  localparam int W = 56, PW = 8;
  logic clk = 0, rst = 1;
  logic a_valid = 0, b_valid = 0;
  logic [W-1:0] a_ts = '0, b_ts = '0;
  logic [PW-1:0] a_pay = '0, b_pay = '0;
  logic signed [31:0] win_lo = -32'sd300, win_hi = 32'sd500;
  logic p_valid;
  logic [W-1:0] p_a_ts, p_b_ts;
  logic [PW-1:0] p_a_pay, p_b_pay;
  logic [15:0] discard_count, overflow_count;
  int checks = 0, failures = 0, pairs = 0, discards = 0;
  logic [W+PW-1:0] qa[$], qb[$];
  logic [2*(W+PW)-1:0] exp_q[$];

  always #4000 clk = ~clk;
  coinc_pair #(.TS_W(W), .PAY_W(PW), .DEPTH(8)) dut (.*);

  // reference model: one decision per clock on the queue contents at the clock edge
  always @(posedge clk) begin
    if (!rst) begin
      if (p_valid) begin
        checks++;
        if (exp_q.size() == 0 || {p_a_ts, p_a_pay, p_b_ts, p_b_pay} != exp_q[0]) begin
          failures++;
          $display("pair %0d/%0d %0d/%0d unexpected, expected %0d/%0d", p_a_ts, p_b_ts, p_a_pay, p_b_pay, exp_q[0][2*(W+PW)-1 -: W], exp_q[0][W+PW-1 -: W]);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
      end
      if (qa.size() && qb.size()) begin
        longint d;
        d = longint'(qa[0][W+PW-1:PW]) - longint'(qb[0][W+PW-1:PW]);
        if (d > longint'(win_lo) && d < longint'(win_hi)) begin
          exp_q.push_back({qa[0], qb[0]});
          void'(qa.pop_front());
          void'(qb.pop_front());
          pairs++;
        end else begin
          discards++;
          if (qa[0][W+PW-1:PW] <= qb[0][W+PW-1:PW]) void'(qa.pop_front());
          else void'(qb.pop_front());
        end
      end
      if (a_valid) qa.push_back({a_ts, a_pay});
      if (b_valid) qb.push_back({b_ts, b_pay});
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t = 100000;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      a_valid = 0;
      b_valid = 0;
      // keep the queues from overflowing: offer only when the model's queues have room
      if (qa.size() < 6 && qb.size() < 6) begin
        case ($urandom % 4)
          0: begin  // a pair, sometimes just outside the window
            t += 1000 + $urandom % 3000;
            a_valid = 1;
            b_valid = 1;
            a_ts = W'(t);
            b_ts = W'(t - (longint'($urandom % 1000) - 400));
          end
          1: begin
            t += 200 + $urandom % 2000;
            a_valid = 1;
            a_ts = W'(t);
          end
          2: begin
            t += 200 + $urandom % 2000;
            b_valid = 1;
            b_ts = W'(t);
          end
          default: ;
        endcase
        a_pay = PW'($urandom);
        b_pay = PW'($urandom);
      end
    end
    @(negedge clk);
    a_valid = 0;
    b_valid = 0;
    repeat (20) @(negedge clk);
    checks += 3;
    if (exp_q.size() != 0) failures++;
    if (discard_count != 16'(discards)) begin
      failures++;
      $display("discards %0d expected %0d", discard_count, discards);
    end
    if (pairs < 30 || discards < 30 || overflow_count != 0) failures++;
    $display("pairs %0d discards %0d", pairs, discards);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
