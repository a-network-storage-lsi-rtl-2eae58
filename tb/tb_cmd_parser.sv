// tb_cmd_parser: feeds command payloads of the right and wrong lengths and
// contents and checks the parsed fields and the accept/reject decision.
module tb_cmd_parser;
  timeunit 1ns; timeprecision 1ps;
  import soe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;
  logic in_valid = 0, in_first = 0, in_last = 0, in_bad = 0;
  logic [7:0] in_data = 0;
  logic done, ok;
  soe_cmd_t cmd;
  cmd_parser dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send n bytes taken from the 10-byte image b (longer payloads repeat the last byte)
  task automatic feed(input logic [79:0] b, input int n, input bit bad);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1; in_first = (i == 0); in_last = (i == n - 1); in_bad = bad && (i == n - 1);
      in_data = (i < 10) ? b[79 - 8*i -: 8] : 8'hEE;
      if ($urandom_range(0, 3) == 0 && i != n - 1) begin
        // a gap in the stream
        @(negedge clk); in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0; in_first = 0; in_last = 0; in_bad = 0;
  endtask

  task automatic one(input logic [7:0] op, input logic [15:0] cnt, input int n, input bit bad,
                     input bit want_ok);
    logic [79:0] b;
    int t;
    b = {op, 8'($urandom), cnt, 32'($urandom), 8'hE0, 8'($urandom)};
    fork
      feed(b, n, bad);
      begin
        t = 0;
        while (!done && t < 200) begin @(posedge clk); t++; end
      end
    join
    check(t < 200, "done seen");
    check(ok == want_ok, $sformatf("op %02x count %0d len %0d bad %0d: ok=%0d", op, cnt, n, bad, ok));
    if (want_ok) check(cmd == soe_cmd_t'(b), "fields");
    else check(cmd.op == OP_INVALID, "rejected command marked invalid");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    one(8'h01, 16'd4, 10, 0, 1);
    one(8'h02, 16'd128, 10, 0, 1);
    one(8'h03, 16'd0, 10, 0, 1);
    one(8'h01, 16'd0, 10, 0, 0);       // read of nothing
    one(8'h07, 16'd1, 10, 0, 0);       // unknown operation
    one(8'h01, 16'd1, 9, 0, 0);        // short
    one(8'h01, 16'd1, 11, 0, 0);       // long
    one(8'h01, 16'd1, 30, 0, 0);       // much longer
    one(8'h02, 16'd3, 10, 1, 0);       // frame ended early
    for (int i = 0; i < 30; i++) one(8'h01, 16'($urandom_range(1, 300)), 10, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
