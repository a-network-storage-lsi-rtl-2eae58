// tb_command_queue: random pushes and pops against a reference queue,
// filling it completely and pushing and popping in the same clock.
module tb_command_queue;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;
  logic push = 0, pop = 0, full, out_valid;
  logic [15:0] in_data = 0, out_data;
  logic [2:0] level;
  command_queue #(.WIDTH(16), .DEPTH(4)) dut (.*);

  int checks = 0, failures = 0, n_full = 0, n_both = 0;
  logic [15:0] q[$];
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      // the queue's rule: no push while full unless the head is popped
      push = $urandom_range(0, 1); pop = $urandom_range(0, 2) == 0; in_data = 16'($urandom);
      if (q.size() == 4 && !pop) push = 0;
      #1;
      checks++;
      if (out_valid != (q.size() > 0) || full != (q.size() == 4) || level != 3'(q.size()) ||
          (q.size() > 0 && out_data != q[0])) begin
        failures++;
        $display("FAIL: size %0d valid %0d full %0d level %0d", q.size(), out_valid, full, level);
      end
      @(posedge clk);
      if (full) n_full++;
      if (push && pop && q.size() > 0) n_both++;
      begin
        bit was_full;
        was_full = (q.size() == 4);
        if (pop && q.size() > 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(in_data);
      end
    end
    checks++;
    if (n_full == 0 || n_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
