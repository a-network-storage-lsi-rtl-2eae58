// tb_pio_engine: register writes and reads through the PIO engine.  A small
// register file in the testbench latches DD on the rising edge of DIOW- and
// drives DD while DIOR- is low.  The setup, strobe and recovery lengths are
// measured in clocks and compared with the parameters.
module tb_pio_engine;
  timeunit 1ns; timeprecision 1ps;
  import soe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;
  logic req = 0, we = 0, done, busy, cs0_n, cs1_n, dior_n, diow_n, dd_oe;
  ata_addr_t addr = '0;
  logic [15:0] wdata = 0, rdata, dd_out, dd_in;
  logic [2:0] da;
  pio_engine dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // device side: 16 registers, index {cs1_n, da}
  logic [15:0] regs [16];
  logic pw = 1;
  initial foreach (regs[i]) regs[i] = 16'(i * 16'h1111);
  always @(posedge clk) begin
    pw <= diow_n;
    if (!pw && diow_n && dd_oe) regs[{cs1_n, da}] <= dd_out;   // rising edge of DIOW-
  end
  assign dd_in = !dior_n ? regs[{cs1_n, da}] : 16'hDEAD;

  // measure the phases of a cycle
  int t_setup, t_act, t_total;
  task automatic cycle(input bit w, input ata_addr_t a, input logic [15:0] d);
    int t = 0, first_sel = -1, first_str = -1, last_str = -1;
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    @(negedge clk); req = 0;
    while (!done && t < 100) begin
      if ((!cs0_n || !cs1_n) && first_sel < 0) first_sel = t;
      if ((!dior_n || !diow_n) && first_str < 0) first_str = t;
      if (!dior_n || !diow_n) last_str = t;
      @(negedge clk); t++;
    end
    t_setup = first_str - first_sel; t_act = last_str - first_str + 1; t_total = t + 1;
  endtask

  initial begin
    ata_addr_t a;
    logic [15:0] v;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      a = '{cs1: 1'b0, cs0: 1'b1, da: 3'($urandom)};
      v = 16'($urandom);
      cycle(1, a, v);
      check(regs[{1'b1, a.da}] == v, $sformatf("write reg %0d", a.da));
      check(t_setup == 4 && t_act == 9, $sformatf("write timing setup %0d strobe %0d", t_setup, t_act));
      cycle(0, a, 16'h0);
      check(rdata == v, $sformatf("read reg %0d: %h want %h", a.da, rdata, v));
      check(t_total >= 16, $sformatf("cycle of %0d clocks", t_total));
    end
    cycle(0, ATA_ALTSTAT, 16'h0);
    check(rdata == regs[{1'b0, 3'd6}], "alternate status through CS1-");
    check(cs0_n && cs1_n && dior_n && diow_n && !dd_oe && !busy, "idle after cycles");
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
