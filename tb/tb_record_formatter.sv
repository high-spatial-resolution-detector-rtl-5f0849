// Testbench of the record formatter: random image and single-channel events, a randomly
// stalling consumer. Image events must leave as two records (0x40 {x, y}, then 0x80 t) and
// always before waiting single-channel records; each stream keeps its order; a burst beyond the
// queue depth must be counted as dropped.
`timescale 1ps / 1ps
module tb_record_formatter;
  import cdl_pkg::*;
  logic clk = 0, rst = 1;
  logic img_valid = 0, aux_valid = 0;
  logic signed [23:0] img_x = '0, img_y = '0;
  logic [55:0] img_t = '0, aux_t = '0;
  logic [4:0] aux_ch = '0;
  logic rec_valid, rec_ready = 0;
  logic [63:0] rec_data;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;
  logic [63:0] iq[$], aq[$];

  always #4000 clk = ~clk;
  record_formatter #(.X_W(24), .DEPTH(16)) dut (.*);

  always @(posedge clk) begin
    if (!rst && rec_valid && rec_ready) begin
      checks++;
      if (iq.size() != 0) begin
        if (rec_data != iq[0]) begin
          failures++;
          $display("image record %h expected %h", rec_data, iq[0]);
        end
        void'(iq.pop_front());
      end else if (aq.size() != 0) begin
        if (rec_data != aq[0]) begin
          failures++;
          $display("channel record %h expected %h", rec_data, aq[0]);
        end
        void'(aq.pop_front());
      end else begin
        failures++;
        $display("unexpected record %h", rec_data);
      end
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // records of events accepted at a clock edge are visible to the checker from the next edge
  task automatic offer(bit iv, bit av);
    img_valid = iv;
    aux_valid = av;
    img_x = 24'($urandom);
    img_y = 24'($urandom);
    img_t = {$urandom, $urandom};
    aux_ch = 5'($urandom % 9);
    aux_t = {$urandom, $urandom};
    @(negedge clk);
    if (iv) begin
      iq.push_back({8'h40, {4{img_x[23]}}, img_x, {4{img_y[23]}}, img_y});
      iq.push_back({8'h80, img_t});
    end
    if (av) aq.push_back({3'b000, aux_ch, aux_t});
    img_valid = 0;
    aux_valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      forever begin
        @(negedge clk);
        rec_ready = ($urandom % 3) != 0;
      end
    join_none
    for (int n = 0; n < 600; n++) begin
      // keep below the queue depth so nothing is dropped in this phase
      if (iq.size() < 20 && aq.size() < 10) offer(($urandom % 3) == 0, ($urandom % 2) == 0);
      else @(negedge clk);
    end
    while (iq.size() || aq.size()) @(negedge clk);
    checks++;
    if (drop_count != 0) failures++;
    // overflow: 20 single-channel events with the consumer stopped
    disable fork;
    rec_ready = 0;
    @(negedge clk);
    for (int n = 0; n < 20; n++) begin
      aux_valid = 1;
      aux_ch = 5'(n);
      aux_t = 56'(n);
      if (n < 16) aq.push_back({3'b000, 5'(n), 56'(n)});
      @(negedge clk);
    end
    aux_valid = 0;
    checks++;
    if (drop_count != 4) begin
      failures++;
      $display("drop count %0d", drop_count);
    end
    rec_ready = 1;
    while (aq.size()) @(negedge clk);
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
