// tb_read_fifo: words go in, bytes come out; a rewind resends from the oldest
// unreleased byte, a release frees space, a skip drops bytes.  Every byte
// read is compared with a reference stream; levels and room are checked.
module tb_read_fifo;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;
  logic clear = 0, wr_en = 0, rd_en = 0, rel_valid = 0, rewind = 0, skip_valid = 0;
  logic [15:0] wr_data = 0;
  logic [11:0] free_words, avail, level, rel_bytes = 0, skip_bytes = 0;
  logic [7:0]  rd_data;
  read_fifo dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned stream[$];    // every byte written, in order
  int base = 0, rdp = 0;      // reference pointers into stream

  task automatic put(input int nwords);
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk);
      wr_en = 1; wr_data = 16'($urandom);
      stream.push_back(wr_data[7:0]); stream.push_back(wr_data[15:8]);
    end
    @(negedge clk); wr_en = 0;
  endtask

  task automatic get(input int n, input string what);
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rd_en = 0;
      if (rd_data != stream[rdp]) bad++;
      rd_en = 1; rdp++;
    end
    @(negedge clk); rd_en = 0;
    check(bad == 0, $sformatf("%s: %0d bytes, %0d wrong", what, n, bad));
  endtask

  task automatic release_b(input int n);
    @(negedge clk); rel_valid = 1; rel_bytes = 12'(n); base += n;
    @(negedge clk); rel_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(free_words == 1024, "empty: 1024 words of room");
    put(1024);
    check(free_words == 0 && level == 2048 && avail == 2048, "full at 2 KB");
    get(1024, "first half");
    check(free_words == 0, "sending frees nothing");
    // rewind: everything from the base again
    @(negedge clk); rewind = 1; @(negedge clk); rewind = 0; rdp = base;
    get(1536, "after rewind");
    release_b(512);
    check(free_words == 256 && level == 1536, "release frees 512 bytes");
    put(256);
    get(1024, "wrap around");
    release_b(1536);
    @(negedge clk); rewind = 1; @(negedge clk); rewind = 0; rdp = base;
    check(avail == 512, "rewind to base");
    // skip drops bytes without sending them
    @(negedge clk); skip_valid = 1; skip_bytes = 12'd512; @(negedge clk); skip_valid = 0;
    rdp += 512;
    release_b(512);
    check(avail == 0 && level == 0 && free_words == 1024, "skip and release empty the FIFO");
    put(300);
    get(600, "after skip");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
