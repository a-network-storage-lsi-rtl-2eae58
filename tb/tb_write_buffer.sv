// tb_write_buffer: packets of bytes are written, some committed and some
// rewound (as for a refused packet), then the committed data is read back as
// 16-bit words (even byte low) and compared.  The whole 64 KB is filled once:
// the next byte must be refused and flagged.  clear must empty the buffer.
module tb_write_buffer;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;
  logic wr_en = 0, commit = 0, rewind = 0, rd_en = 0, clear = 0, overflow;
  logic [7:0] wr_data = 0;
  logic [15:0] rd_data;
  logic [16:0] committed;
  write_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned ref_b[$];

  // one packet; the last byte carries commit or rewind
  task automatic packet(input int n, input bit keep);
    byte unsigned p[$];
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_en = 1; wr_data = 8'($urandom); p.push_back(wr_data);
      commit = keep && (i == n - 1); rewind = !keep && (i == n - 1);
    end
    @(negedge clk);
    wr_en = 0; commit = 0; rewind = 0;
    if (keep) foreach (p[i]) ref_b.push_back(p[i]);
  endtask

  task automatic read_back(input int nwords, input string what);
    int bad = 0;
    for (int w = 0; w < nwords; w++) begin
      @(negedge clk);
      rd_en = 0;
      if (rd_data != {ref_b[2*w+1], ref_b[2*w]}) bad++;
      rd_en = 1;
    end
    @(negedge clk); rd_en = 0;
    check(bad == 0, $sformatf("%s: %0d words, %0d wrong", what, nwords, bad));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    packet(1024, 1);
    packet(700, 0);          // refused: must leave no trace
    packet(1024, 1);
    packet(3, 0);
    packet(512, 1);
    check(committed == 17'(ref_b.size()), $sformatf("committed %0d", committed));
    read_back(ref_b.size() / 2, "mixed packets");
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ref_b.delete();
    check(committed == 0, "cleared");
    // fill all 64 KB
    for (int k = 0; k < 64; k++) packet(1024, 1);
    check(committed == 17'd65536 && !overflow, "64 KB held");
    @(negedge clk); wr_en = 1; wr_data = 8'h77; @(negedge clk); wr_en = 0;
    check(overflow, "byte beyond 64 KB refused");
    read_back(32768, "full buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
