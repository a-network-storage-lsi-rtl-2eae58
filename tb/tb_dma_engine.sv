// tb_dma_engine: Ultra DMA bursts in both directions against a device modelled
// in the testbench.  Reading: the device sends words with DSTROBE edges and
// must pause while HDMARDY- is negated (the testbench withdraws 'room' now
// and then).  Writing: the device takes a word on each HSTROBE edge and
// pauses the host with DDMARDY-.  Word order, word count, the CRC sent at the
// end (computed here bit by bit) and the write rate of one word per two
// clocks are checked.  Two more transfers are each split by the device,
// which ends the first burst early by negating DMARQ; the host must close it
// with that burst's CRC and move the rest in a second burst.  The device
// model changes its outputs with non-blocking assignments, like a register
// clocked on the same edge.
module tb_dma_engine;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;
  logic start = 0, to_dev = 0, done, busy, wr_valid, room = 1, rd_en;
  logic [23:0] words = 0;
  logic [15:0] wr_data, rd_data, dd_out, dd_in = 0, crc;
  logic dmarq = 0, dmack_n, dior_n, diow_n, iordy = 1, dd_oe;
  dma_engine dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] crc16(input logic [15:0] w[$]);
    logic [15:0] c = 16'h4ABA;
    foreach (w[i]) for (int b = 15; b >= 0; b--) begin
      logic fb = c[15] ^ w[i][b];
      c = {c[14:0], 1'b0};
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  // host-side buffers
  logic [15:0] got[$];
  logic [15:0] src[$];
  int src_i = 0;
  always @(posedge clk) if (rst_n && wr_valid) got.push_back(wr_data);
  always @(posedge clk) if (rst_n && rd_en) src_i <= src_i + 1;
  assign rd_data = (src_i < src.size()) ? src[src_i] : 16'h0;

  logic [15:0] dev_got[$];
  logic [15:0] host_crc;
  int pauses = 0;

  task automatic dev_send(input logic [15:0] w[$], input bit term = 0);
    logic s;
    s = 1;
    dmarq <= 1;
    @(posedge clk iff (!dmack_n && !diow_n));
    foreach (w[i]) begin
      while (dior_n) begin @(posedge clk); end
      dd_in <= w[i];
      @(posedge clk);
      s = !s; iordy <= s;
      repeat (2) @(posedge clk);
    end
    if (term) begin                     // device ends the burst itself
      repeat (4) @(posedge clk);
      dmarq <= 0;
      @(posedge clk iff diow_n);
    end else begin
      @(posedge clk iff diow_n);
      dmarq <= 0;
    end
    @(posedge dmack_n); @(posedge clk);
    host_crc = dd_out;
    iordy <= 1;
  endtask

  task automatic dev_recv(input int n);
    logic ph;
    dmarq <= 1;
    @(posedge clk iff (!dmack_n && !diow_n));
    iordy <= 0; ph = dior_n;
    while (!diow_n) begin
      @(posedge clk);
      if (dior_n != ph) dev_got.push_back(dd_out);
      ph = dior_n;
      if (dev_got.size() == n / 2 && pauses == 0) begin
        // pause; words already on their way are still taken
        pauses++; iordy <= 1;
        repeat (10) begin
          @(posedge clk);
          if (dior_n != ph) dev_got.push_back(dd_out);
          ph = dior_n;
        end
        iordy <= 0;
      end
    end
    dmarq <= 0;
    @(posedge dmack_n); @(posedge clk);
    host_crc = dd_out;
    iordy <= 1;
  endtask

  // write burst the device ends after 'n' words: it first pauses the host,
  // takes the words already on their way, then negates DMARQ
  task automatic dev_recv_term(input int n);
    logic ph;
    dmarq <= 1;
    @(posedge clk iff (!dmack_n && !diow_n));
    iordy <= 0; ph = dior_n;
    while (dev_got.size() < n) begin
      @(posedge clk);
      if (dior_n != ph) dev_got.push_back(dd_out);
      ph = dior_n;
    end
    iordy <= 1;
    repeat (6) begin
      @(posedge clk);
      if (dior_n != ph) dev_got.push_back(dd_out);
      ph = dior_n;
    end
    dmarq <= 0;
    while (!diow_n) begin
      @(posedge clk);
      if (dior_n != ph) dev_got.push_back(dd_out);
      ph = dior_n;
    end
    @(posedge dmack_n); @(posedge clk);
    host_crc = dd_out;
  endtask

  int n_done = 0;
  always @(posedge clk) if (rst_n && done) n_done++;

  initial begin
    logic [15:0] w[$], w1[$], w2[$], g1[$];
    logic [15:0] c1;
    int k;
    int t0, t1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // read burst of 512 words with back-pressure
    for (int i = 0; i < 512; i++) w.push_back(16'($urandom));
    fork
      dev_send(w);
      begin
        @(negedge clk); start = 1; to_dev = 0; words = 24'd512; @(negedge clk); start = 0;
        repeat (300) @(negedge clk); room = 0; repeat (40) @(negedge clk); room = 1;
      end
    join
    @(posedge clk iff done);
    check(got == w, $sformatf("read burst: %0d words received", got.size()));
    check(host_crc == crc16(w), "read burst CRC");
    check(crc == crc16(w), "CRC output");
    // write burst of 768 words with one device pause
    src.delete();
    for (int i = 0; i < 768; i++) src.push_back(16'($urandom));
    @(negedge clk); start = 1; to_dev = 1; words = 24'd768; @(negedge clk); start = 0;
    fork dev_recv(768); join_none
    @(posedge clk iff !dmack_n); t0 = $time;
    @(posedge clk iff done); t1 = $time;
    check(dev_got == src, $sformatf("write burst: %0d words taken", dev_got.size()));
    check(host_crc == crc16(src), "write burst CRC");
    check(pauses == 1, "device paused the host");
    // 768 words at 2 clocks each, plus the pause and the ending
    check((t1 - t0) / 8 >= 2 * 768 && (t1 - t0) / 8 <= 2 * 768 + 40,
          $sformatf("write rate: %0d clocks for 768 words", (t1 - t0) / 8));
    check(!busy && dmack_n, "idle after bursts");
    // read in two bursts: the device ends the first after 100 words
    w.delete(); w1.delete(); w2.delete(); got.delete();
    for (int i = 0; i < 300; i++) w.push_back(16'($urandom));
    w1 = w[0:99]; w2 = w[100:299];
    @(negedge clk);
    k = n_done;
    fork
      begin dev_send(w1, 1); c1 = host_crc; repeat (10) @(posedge clk); dev_send(w2); end
      begin @(negedge clk); start = 1; to_dev = 0; words = 24'd300; @(negedge clk); start = 0; end
    join
    @(posedge clk iff done);
    @(negedge clk);
    check(got == w, $sformatf("device-ended read burst: %0d words in two bursts", got.size()));
    check(c1 == crc16(w1) && host_crc == crc16(w2), "one CRC per burst");
    check(n_done == k + 1, $sformatf("done only after the last burst (%0d)", n_done - k));
    // write in two bursts: the device ends the first after about 200 words
    src.delete(); dev_got.delete(); src_i = 0;
    for (int i = 0; i < 400; i++) src.push_back(16'($urandom));
    @(negedge clk); start = 1; to_dev = 1; words = 24'd400; @(negedge clk); start = 0;
    dev_recv_term(200);
    c1 = host_crc; k = dev_got.size(); g1 = dev_got;
    repeat (10) @(posedge clk);
    pauses = 1;
    dev_recv(400);
    @(posedge clk iff done);
    check(dev_got == src, $sformatf("device-ended write burst: %0d words, first burst %0d", dev_got.size(), k));
    check(c1 == crc16(g1) && host_crc == crc16(src[k:399]), "write CRC per burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
