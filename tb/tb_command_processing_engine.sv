// tb_command_processing_engine: checks the command processing engine at the
// payload level, with the real ATA controller and the disk model below it.
//
// Above the engine the bench stands in for the protocol engine and a remote
// host: it streams payloads into pl_* and reads the verdict, opens
// connections with connection events, takes each requested packet through
// dq_*/dp_* (26 clocks of header time, then one payload byte per clock) and
// acknowledges in-order packets like a LeanTCP host, with a cumulative ACK
// number.  A chosen packet can be lost to force a retransmission.  The
// retransmission timeout is shortened to keep the run short.  It checks:
// a 2-sector read returned as two 512-byte packets holding the disk's
// words (even byte first) and a reply {01h, 50h, 00h, 00h}; a write command
// that puts the connection into data mode, a competing write from a second
// connection refused while the buffer is taken, the write data accepted and
// the reply; the written sector read back; a malformed command answered with
// code 01h; a lost data packet resent after the timeout with the same
// sequence number; and sequence numbers counting from 1 per connection.
module tb_command_processing_engine;
  timeunit 1ns; timeprecision 1ps;
  import soe_pkg::*;
  typedef byte unsigned bq_t[$];

  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;

  // engine <-> bench
  logic pl_valid = 0, pl_first = 0, pl_last = 0, pl_bad = 0, vd_valid, vd_ok;
  logic [7:0] pl_data = 0, dp_data;
  logic [1:0] pl_conn = 0, ack_conn = 0, cev_conn = 0, dq_conn;
  logic ack_valid = 0, cev_valid = 0, cev_open = 0, tx_idle = 1;
  logic [15:0] ack_num = 0, dq_seq, dq_len;
  logic [3:0] conn_up = 0;
  logic dq_valid, dq_ready = 0, dp_ready = 0;
  logic ev_refused, ev_data_mode, ev_retx;
  // engine <-> ATA controller
  logic pio_req, pio_we, pio_done, dma_start, dma_to_dev, dma_done;
  ata_addr_t pio_addr;
  logic [15:0] pio_wdata, pio_rdata, dma_wr_data, dma_rd_data, dma_crc;
  logic [23:0] dma_words;
  logic dma_wr_valid, dma_room, dma_rd_en, intrq_out;
  // ATA bus
  logic ata_reset_n, dd_oe, cs0_n, cs1_n, dior_n, diow_n, iordy, dmarq, dmack_n, intrq;
  logic [15:0] dd_out, dd_in;
  logic [2:0] da;

  command_processing_engine #(.NCONN(4), .RTO_CYCLES(3000)) dut (
    .clk, .rst_n, .pl_valid, .pl_data, .pl_first, .pl_last, .pl_bad, .pl_conn,
    .vd_valid, .vd_ok, .ack_valid, .ack_conn, .ack_num, .cev_valid, .cev_open, .cev_conn,
    .conn_up, .tx_idle, .dq_valid, .dq_conn, .dq_seq, .dq_len, .dq_ready, .dp_data,
    .dp_ready, .pio_req, .pio_we, .pio_addr, .pio_wdata, .pio_done, .pio_rdata,
    .dma_start, .dma_to_dev, .dma_words, .dma_done, .dma_wr_valid, .dma_wr_data,
    .dma_room, .dma_rd_en, .dma_rd_data, .intrq(intrq_out),
    .ev_refused, .ev_data_mode, .ev_retx);

  ata_controller ata (.clk, .rst_n, .pio_req, .pio_we, .pio_addr, .pio_wdata, .pio_done,
    .pio_rdata, .dma_start, .dma_to_dev, .dma_words, .dma_done, .dma_wr_valid,
    .dma_wr_data, .dma_room, .dma_rd_en, .dma_rd_data, .dma_crc, .intrq_out,
    .ata_reset_n, .dd_out, .dd_oe, .dd_in, .da, .cs0_n, .cs1_n, .dior_n, .diow_n,
    .iordy, .dmarq, .dmack_n, .intrq);

  int n_cmds, n_win, n_wout, n_crc_ok, n_crc_bad;
  logic [7:0] last_cmd;
  ata_disk_model #(.SECTORS(16)) disk (.clk, .reset_n(ata_reset_n), .dd_from_host(dd_out),
    .dd_host_oe(dd_oe), .dd_to_host(dd_in), .da, .cs0_n, .cs1_n, .dior_n, .diow_n, .iordy,
    .dmarq, .dmack_n, .intrq, .n_cmds, .n_words_in(n_win), .n_words_out(n_wout),
    .n_crc_ok, .n_crc_bad, .last_cmd);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] pattern(input int lba, input int w);
    return 16'((lba * 16'h0101) ^ (w * 3) ^ 16'h5A00);
  endfunction

  // ---------------------------------------------------------------- host receive side
  bq_t rx [2];            // in-order payload bytes per connection
  logic [15:0] exp_seq [2];
  int  lose_seq = -1;     // packet sequence number to lose once (connection 0)
  int  n_pkts = 0, n_resent_ok = 0;
  logic [15:0] seen_max [2];

  initial begin
    logic [1:0] c;
    logic [15:0] s, len;
    bq_t p;
    forever begin
      @(negedge clk);
      if (rst_n && dq_valid) begin
        c = dq_conn; s = dq_seq; len = dq_len;
        dq_ready = 1; tx_idle = 0;
        @(negedge clk);
        dq_ready = 0;
        repeat (26) @(negedge clk);
        p.delete();
        for (int i = 0; i < int'(len); i++) begin
          dp_ready = 1;
          @(posedge clk);
          p.push_back(dp_data);
          @(negedge clk);
        end
        dp_ready = 0;
        repeat (12) @(negedge clk);
        tx_idle = 1;
        n_pkts++;
        if (c == 0 && int'(s) == lose_seq) begin
          lose_seq = -1;                       // lost on the wire
        end else begin
          if (s == exp_seq[c]) begin
            foreach (p[i]) rx[c].push_back(p[i]);
            exp_seq[c]++;
          end
          if (s < seen_max[c]) n_resent_ok++;
          if (s > seen_max[c]) seen_max[c] = s;
          ack_valid = 1; ack_conn = c; ack_num = exp_seq[c];
          @(negedge clk);
          ack_valid = 0;
        end
      end
    end
  end

  int n_refused = 0, n_datamode = 0, n_retx = 0;
  always @(posedge clk) if (rst_n) begin
    if (ev_refused) n_refused++;
    if (ev_data_mode) n_datamode++;
    if (ev_retx) n_retx++;
  end

  // ---------------------------------------------------------------- host send side
  task automatic payload(input logic [1:0] c, input bq_t b, output bit ok);
    @(negedge clk);
    foreach (b[i]) begin
      pl_valid = 1; pl_data = b[i]; pl_conn = c;
      pl_first = (i == 0); pl_last = (i == b.size() - 1);
      @(negedge clk);
    end
    pl_valid = 0; pl_first = 0; pl_last = 0;
    @(posedge clk iff vd_valid);
    ok = vd_ok;
    @(negedge clk);
  endtask

  task automatic send_until_ok(input logic [1:0] c, input bq_t b);
    bit ok;
    int tries = 0;
    do begin
      payload(c, b, ok);
      tries++;
      if (!ok) repeat (200) @(negedge clk);
    end while (!ok && tries < 200);
    check(ok, "payload accepted");
  endtask

  function automatic bq_t cmd(input soe_op_e op, input int count, input int lba,
                              input logic [7:0] code);
    bq_t q;
    q = '{8'(op), 8'h00, 8'(count >> 8), 8'(count), 8'(lba >> 24), 8'(lba >> 16),
          8'(lba >> 8), 8'(lba), 8'hE0, code};
    return q;
  endfunction

  task automatic wait_rx(input int c, input int n);
    int t = 0;
    while (rx[c].size() < n && t < 200000) begin @(negedge clk); t++; end
    check(t < 200000, $sformatf("connection %0d received %0d bytes", c, n));
  endtask

  task automatic expect_sectors(input int c, input int lba, input int n, input bq_t wr,
                                input string what);
    int bad = 0;
    wait_rx(c, n * 512 + 4);
    for (int i = 0; i < n * 256; i++) begin
      logic [15:0] w;
      w = (wr.size() != 0) ? {wr[2*i+1], wr[2*i]} : pattern(lba + i / 256, i % 256);
      if ({rx[c][2*i+1], rx[c][2*i]} != w) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d wrong words", what, bad));
    check(w4(rx[c], n*512) == 32'h01_50_00_00, {what, ": reply"});
    rx[c].delete();
  endtask

  function automatic logic [31:0] w4(input bq_t q, input int off);
    return (q.size() >= off + 4) ? {q[off], q[off+1], q[off+2], q[off+3]} : 32'hFFFF_FFFF;
  endfunction

  bq_t none, wdata, bq;
  bit ok;

  initial begin
    exp_seq = '{16'd1, 16'd1};
    seen_max = '{16'd0, 16'd0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // open connections 0 and 1
    for (int c = 0; c < 2; c++) begin
      cev_valid = 1; cev_open = 1; cev_conn = 2'(c); conn_up[c] = 1;
      @(negedge clk);
      cev_valid = 0;
      @(negedge clk);
    end

    // read 2 sectors, losing the second data packet once
    lose_seq = 2;
    send_until_ok(0, cmd(OP_READ, 2, 3, 8'hC8));
    expect_sectors(0, 3, 2, none, "READ 2 sectors");
    check(n_retx >= 1 && n_resent_ok >= 1, "lost packet resent after the timeout");

    // write 1 sector; a competing write from connection 1 is refused meanwhile
    for (int i = 0; i < 512; i++) wdata.push_back(8'($urandom));
    send_until_ok(0, cmd(OP_WRITE, 1, 5, 8'hCA));
    check(n_datamode == 1, "write command enters data mode");
    payload(1, cmd(OP_WRITE, 1, 7, 8'hCA), ok);
    check(!ok && n_refused >= 1, "second write refused while the buffer is taken");
    send_until_ok(0, wdata);
    wait_rx(0, 4);
    check(w4(rx[0], 0) == 32'h02_50_00_00, "write reply");
    rx[0].delete();
    check(n_win == 256 && n_crc_bad == 0, "disk received the sector with a good CRC");

    // read the sector back on connection 1
    send_until_ok(1, cmd(OP_READ, 1, 5, 8'hC8));
    expect_sectors(1, 5, 1, wdata, "read back");

    // malformed command
    bq = '{8'h01, 8'h02, 8'h03};
    send_until_ok(0, bq);
    wait_rx(0, 4);
    check(w4(rx[0], 0) == 32'h00_00_00_01, "malformed command reply");
    rx[0].delete();
    check(exp_seq[0] == 16'd6 && exp_seq[1] == 16'd3, "sequence numbers per connection");

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
