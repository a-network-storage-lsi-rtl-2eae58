// tb_state_memory: writes, reads and clears the per-connection state and
// compares with a reference array kept in the testbench.
module tb_state_memory;
  timeunit 1ns; timeprecision 1ps;
  import soe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;
  logic [1:0] rd_conn = 0, wr_conn = 0, clr_conn = 0;
  logic wr_en = 0, clr_en = 0;
  conn_state_t rd_state, wr_state = '0;
  state_memory #(.NCONN(4)) dut (.*);

  int checks = 0, failures = 0;
  conn_state_t ref_m [4];
  initial begin
    for (int i = 0; i < 4; i++) ref_m[i] = '{mode: MODE_CMD, remain: '0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_conn = 2'($urandom); clr_en = ($urandom_range(0, 4) == 0);
      clr_conn = 2'($urandom); rd_conn = 2'($urandom);
      wr_state = '{mode: cpe_mode_e'($urandom_range(0, 1)), remain: 17'($urandom)};
      #1;
      checks++;
      if (rd_state != ref_m[rd_conn]) begin
        failures++; $display("FAIL: read %0d got %p want %p", rd_conn, rd_state, ref_m[rd_conn]);
      end
      @(posedge clk);
      if (wr_en) ref_m[wr_conn] = wr_state;
      if (clr_en) ref_m[clr_conn] = '{mode: MODE_CMD, remain: '0};
    end
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
