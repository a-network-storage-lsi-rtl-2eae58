// tb_soedc_top: end-to-end test of the SoEDC at its default parameters.
//
// A host model talks LeanTCP over GMII and an ATA disk model sits on the ATA
// pins.  The host opens two connections and runs: a command with no data, a
// malformed command, a 4-sector write (with a duplicated data packet and a
// competing write from the second connection that is refused until the write
// buffer is free), a 4-sector read during which one data packet is "lost" so
// that the chip must retransmit after its timeout, a 1-sector write on the
// second connection, 32-sector read and 16-sector write throughput runs
// checked against 55 MB/s and 49 MB/s, a bad-FCS frame, a foreign Eth-type
// frame, eight single-sector writes and reads at random addresses (the
// random-access workload, with the disk model's fixed command time in place
// of seeks), and closing both connections.  Read data is compared with the disk
// model's pattern and with what was written.  Every mechanism is counted and
// must have happened at least once.
module tb_soedc_top;
  timeunit 1ns; timeprecision 1ps;
  import soe_pkg::*;

  localparam logic [47:0] DEV_MAC  = 48'h02_00_00_00_00_AA;
  localparam logic [47:0] HOST_MAC = 48'h02_00_00_00_00_01;
  localparam logic [15:0] DEV_PORT = 16'h5E00;

  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;                     // 125 MHz

  logic [7:0]  gmii_rxd = 0, gmii_txd;
  logic        gmii_rx_dv = 0, gmii_rx_er = 0, gmii_tx_en, gmii_tx_er;
  logic        ata_reset_n, ata_dd_oe, ata_cs0_n, ata_cs1_n, ata_dior_n, ata_diow_n;
  logic        ata_iordy, ata_dmarq, ata_dmack_n, ata_intrq;
  logic [15:0] ata_dd_out, ata_dd_in, udma_crc;
  logic [2:0]  ata_da;
  logic [3:0]  conn_up;
  logic [7:0]  events;

  soedc_top dut (
    .clk, .rst_n, .my_mac(DEV_MAC), .my_port(DEV_PORT),
    .gmii_rxd, .gmii_rx_dv, .gmii_rx_er, .gmii_txd, .gmii_tx_en, .gmii_tx_er,
    .ata_reset_n, .ata_dd_out, .ata_dd_oe, .ata_dd_in, .ata_da, .ata_cs0_n, .ata_cs1_n,
    .ata_dior_n, .ata_diow_n, .ata_iordy, .ata_dmarq, .ata_dmack_n, .ata_intrq,
    .conn_up, .udma_crc, .events);

  int n_cmds, n_win, n_wout, n_crc_ok, n_crc_bad;
  logic [7:0] last_cmd;
  ata_disk_model #(.SECTORS(64)) disk (
    .clk, .reset_n(ata_reset_n), .dd_from_host(ata_dd_out), .dd_host_oe(ata_dd_oe),
    .dd_to_host(ata_dd_in), .da(ata_da), .cs0_n(ata_cs0_n), .cs1_n(ata_cs1_n),
    .dior_n(ata_dior_n), .diow_n(ata_diow_n), .iordy(ata_iordy), .dmarq(ata_dmarq),
    .dmack_n(ata_dmack_n), .intrq(ata_intrq), .n_cmds, .n_words_in(n_win),
    .n_words_out(n_wout), .n_crc_ok, .n_crc_bad, .last_cmd);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- events
  int ev_cnt [8];
  initial foreach (ev_cnt[i]) ev_cnt[i] = 0;
  always @(posedge clk) for (int i = 0; i < 8; i++) if (events[i]) ev_cnt[i]++;

  // ---------------------------------------------------------------- frames from the chip
  typedef byte unsigned bq_t [$];

  class Pkt;
    logic [15:0] ltype, seq, ack, dport, size;
    bq_t pl;
  endclass

  bq_t none;                // an empty payload
  Pkt dataq [2][$];
  Pkt ctrlq [$];
  int last_ack [2];
  int n_frames_out = 0, n_fcs_errors = 0;
  longint data_pkt_time [$];

  byte unsigned fr[$];
  always @(posedge clk) begin
    if (gmii_tx_en) fr.push_back(gmii_txd);
    else if (fr.size() > 0) begin
      logic [31:0] c;
      Pkt p;
      int ci;
      n_frames_out++;
      c = '1;
      for (int i = 8; i < fr.size(); i++) c = crc32_byte(c, fr[i]);
      if (c != CRC_RESIDUE || fr[7] != 8'hD5) n_fcs_errors++;
      p = new();
      p.size  = {fr[8+14], fr[8+15]};
      p.ltype = {fr[8+20], fr[8+21]};
      p.seq   = {fr[8+22], fr[8+23]};
      p.ack   = {fr[8+24], fr[8+25]};
      p.dport = {fr[8+16], fr[8+17]};
      for (int i = 0; i < p.size; i++) p.pl.push_back(fr[8+26+i]);
      ci = (p.dport == 16'h1001) ? 1 : 0;
      if ({fr[8+12], fr[8+13]} != ETHERTYPE_SOE || {fr[8], fr[9], fr[10], fr[11], fr[12], fr[13]} != HOST_MAC)
        n_fcs_errors++;
      if (p.ltype == LT_ACK || p.ltype == LT_DATA) last_ack[ci] = int'(p.ack);
      if (p.ltype == LT_DATA) begin dataq[ci].push_back(p); data_pkt_time.push_back($time); end
      else if (p.ltype != LT_ACK) ctrlq.push_back(p);
      fr.delete();
    end
  end

  // ---------------------------------------------------------------- frames to the chip
  task automatic send_raw(input bq_t b, input bit bad_fcs);
    logic [31:0] c;
    bq_t f;
    f = b;
    while (f.size() < 60) f.push_back(8'h00);
    c = '1;
    foreach (f[i]) c = crc32_byte(c, f[i]);
    c = ~c;
    if (bad_fcs) c ^= 32'h0000_0100;
    for (int i = 0; i < 4; i++) f.push_back(c[8*i +: 8]);
    for (int i = 0; i < 7; i++) begin @(posedge clk); gmii_rx_dv <= 1; gmii_rxd <= 8'h55; end
    @(posedge clk); gmii_rxd <= 8'hD5;
    foreach (f[i]) begin @(posedge clk); gmii_rxd <= f[i]; end
    @(posedge clk); gmii_rx_dv <= 0; gmii_rxd <= 0;
    repeat (11) @(posedge clk);
  endtask

  function automatic void put16(ref bq_t q, input logic [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction

  task automatic send_pkt(input int ci, input logic [15:0] ltype, input logic [15:0] seq,
                          input logic [15:0] ack, input bq_t pl,
                          input logic [15:0] etype = ETHERTYPE_SOE, input bit bad_fcs = 0);
    bq_t b;
    for (int i = 5; i >= 0; i--) b.push_back(DEV_MAC[8*i +: 8]);
    for (int i = 5; i >= 0; i--) b.push_back(HOST_MAC[8*i +: 8]);
    put16(b, etype); put16(b, 16'(pl.size())); put16(b, DEV_PORT);
    put16(b, 16'h1000 + 16'(ci)); put16(b, ltype); put16(b, seq); put16(b, ack);
    foreach (pl[i]) b.push_back(pl[i]);
    send_raw(b, bad_fcs);
  endtask

  // ---------------------------------------------------------------- host state
  logic [15:0] hseq [2];     // next sequence number the host sends
  logic [15:0] dexp [2];     // next sequence number expected from the chip

  function automatic bq_t mk_cmd(input soe_op_e op, input logic [15:0] cnt,
                                 input logic [31:0] lba, input logic [7:0] code);
    bq_t r;
    soe_cmd_t c;
    c = '{op: op, features: 8'h00, count: cnt, lba: lba, device: 8'hE0, command: code};
    for (int i = 0; i < CMD_BYTES; i++) r.push_back(c[8*(CMD_BYTES-1-i) +: 8]);
    return r;
  endfunction

  task automatic wait_ack(input int ci, input logic [15:0] a, input int limit, output bit got);
    int t = 0;
    got = 0;
    while (t < limit) begin
      @(posedge clk); t++;
      if (last_ack[ci] == int'(a)) begin got = 1; break; end
    end
  endtask

  // send one DATA packet and wait for its acknowledgement
  task automatic host_data(input int ci, input bq_t pl, output bit acked,
                           input int limit = 20000);
    send_pkt(ci, LT_DATA, hseq[ci], dexp[ci], pl);
    wait_ack(ci, hseq[ci] + 16'd1, limit, acked);
    if (acked) hseq[ci]++;
  endtask

  // take the next in-order DATA packet from the chip; drop_seq simulates one lost packet
  task automatic get_data(input int ci, output Pkt p, input int limit, input int drop_seq = -1);
    int t = 0;
    p = null;
    while (t < limit) begin
      if (dataq[ci].size() > 0) begin
        Pkt q;
        q = dataq[ci].pop_front();
        if (int'(q.seq) == drop_seq) begin drop_seq = -1; continue; end   // lost
        if (q.seq == dexp[ci]) begin
          dexp[ci]++;
          p = q;
          send_pkt(ci, LT_ACK, hseq[ci], dexp[ci], none);
          return;
        end
        continue;                       // out of order: ignored
      end
      @(posedge clk); t++;
    end
  endtask

  task automatic check_reply(input int ci, input soe_op_e op, input logic [7:0] code,
                             input logic [7:0] status, input string what);
    Pkt p;
    get_data(ci, p, 300000);
    check(p != null, {what, ": reply received"});
    if (p != null) begin
      check(p.size == 16'(REPLY_BYTES), {what, ": reply size"});
      check(p.pl[0] == op && p.pl[3] == code && p.pl[1] == status,
            $sformatf("%s: reply %02x %02x %02x %02x", what, p.pl[0], p.pl[1], p.pl[2], p.pl[3]));
    end
  endtask

  // expected disk contents
  logic [15:0] model [64*256];
  function automatic logic [15:0] pattern(input int lba, input int w);
    return 16'((lba * 16'h0101) ^ (w * 3) ^ 16'h5A00);
  endfunction

  task automatic do_read(input int ci, input int lba, input int cnt, input int drop_seq,
                         input string what);
    bit ok;
    Pkt p;
    int bad = 0;
    send_pkt(ci, LT_DATA, hseq[ci], dexp[ci], mk_cmd(OP_READ, 16'(cnt), 32'(lba), 8'hC8));
    wait_ack(ci, hseq[ci] + 16'd1, 20000, ok);
    check(ok, {what, ": command acknowledged"});
    hseq[ci]++;
    for (int s = 0; s < cnt; s++) begin
      get_data(ci, p, 400000, (s == 2) ? drop_seq : -1);
      if (p == null) begin bad++; break; end
      if (p.size != 16'(SECTOR_BYTES)) bad++;
      else for (int w = 0; w < 256; w++)
        if ({p.pl[2*w+1], p.pl[2*w]} != model[(lba+s)*256 + w]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d sectors of read data, %0d mismatches", what, cnt, bad));
    check_reply(ci, OP_READ, 8'h00, 8'h50, what);
  endtask

  task automatic send_write_data(input int ci, input int lba, input int cnt, input int seed,
                                 input bit dup, input string what, input bit pipe = 0);
    bit ok;
    bq_t pl;
    for (int s = 0; s < cnt; s += 2) begin
      pl.delete();
      for (int k = s; k < s + 2 && k < cnt; k++)
        for (int w = 0; w < 256; w++) begin
          logic [15:0] v = 16'((k + seed) * 16'h3131 + w * 7);
          model[(lba+k)*256 + w] = v;
          pl.push_back(v[7:0]); pl.push_back(v[15:8]);
        end
      if (pipe) begin
        // back to back, without waiting for each acknowledgement
        send_pkt(ci, LT_DATA, hseq[ci], dexp[ci], pl);
        hseq[ci]++;
        if (s + 2 >= cnt) begin
          wait_ack(ci, hseq[ci], 20000, ok);
          check(ok, $sformatf("%s: all data acknowledged", what));
        end
      end else begin
        host_data(ci, pl, ok);
        check(ok, $sformatf("%s: data packet %0d acknowledged", what, s/2));
      end
      if (dup && s == 0) begin
        // the same packet again (as if the ACK had been lost): dropped, re-ACKed
        hseq[ci]--;
        send_pkt(ci, LT_DATA, hseq[ci], dexp[ci], pl);
        hseq[ci]++;
        repeat (200) @(posedge clk);
      end
    end
  endtask

  // ---------------------------------------------------------------- test
  longint t0, t1;
  initial begin
    bit ok;
    int refused0;
    for (int s = 0; s < 64; s++) for (int w = 0; w < 256; w++) model[s*256+w] = pattern(s, w);
    last_ack[0] = -1; last_ack[1] = -1;
    repeat (10) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);

    // a frame with a bad FCS and a foreign frame are ignored
    send_pkt(0, LT_SYN, 16'd100, 16'd0, none, ETHERTYPE_SOE, 1);
    send_pkt(0, LT_SYN, 16'd100, 16'd0, none, 16'h0800);
    repeat (300) @(posedge clk);
    check(ctrlq.size() == 0 && conn_up == 0, "bad frames get no answer");

    // open two connections
    for (int ci = 0; ci < 2; ci++) begin
      Pkt p;
      send_pkt(ci, LT_SYN, 16'(100 + 400*ci), 16'd0, none);
      repeat (300) @(posedge clk);
      check(ctrlq.size() == 1, "SYNACK received");
      if (ctrlq.size() > 0) begin
        p = ctrlq.pop_front();
        check(p.ltype == LT_SYNACK && p.ack == 16'(101 + 400*ci), "SYNACK fields");
      end
      hseq[ci] = 16'(101 + 400*ci);
      dexp[ci] = 16'd1;
    end
    check(conn_up == 4'b0011, "two connections up");

    // command without data (FLUSH CACHE)
    host_data(0, mk_cmd(OP_NODATA, 16'd0, 32'd0, 8'hE7), ok);
    check(ok, "flush acknowledged");
    check_reply(0, OP_NODATA, 8'h00, 8'h50, "flush");
    check(last_cmd == 8'hE7, "flush reached the disk");

    // malformed command (5 bytes)
    host_data(0, {8'h01, 8'h00, 8'h00, 8'h01, 8'h00}, ok);
    check(ok, "malformed command acknowledged");
    check_reply(0, OP_INVALID, 8'h01, 8'h00, "malformed");

    // write 4 sectors at LBA 8 on connection 0
    host_data(0, mk_cmd(OP_WRITE, 16'd4, 32'd8, 8'hCA), ok);
    check(ok, "write command acknowledged");
    // connection 1 tries a write while the buffer is reserved: refused
    refused0 = ev_cnt[4];
    host_data(1, mk_cmd(OP_WRITE, 16'd1, 32'd20, 8'hCA), ok, 2000);
    check(!ok && ev_cnt[4] > refused0, "competing write refused");
    send_write_data(0, 8, 4, 1, 1, "write");
    check_reply(0, OP_WRITE, 8'h00, 8'h50, "write");
    // now connection 1 gets its turn
    host_data(1, mk_cmd(OP_WRITE, 16'd1, 32'd20, 8'hCA), ok);
    check(ok, "second write accepted after the first");
    send_write_data(1, 20, 1, 9, 0, "write conn1");
    check_reply(1, OP_WRITE, 8'h00, 8'h50, "write conn1");

    // read them back; one data packet is lost and must be resent
    do_read(0, 8, 4, int'(dexp[0]) + 2, "read with loss");
    do_read(1, 20, 1, -1, "read conn1");

    // throughput: 32-sector read and 16-sector write
    begin
      int n0;
      n0 = data_pkt_time.size();
      t0 = $time;
      do_read(0, 32, 32, -1, "long read");
      t1 = data_pkt_time[n0 + 31];
      $display("read: %0d bytes in %0d ns = %0d MB/s", 32*512, t1 - t0,
               (32*512*1000) / (t1 - t0));
      check((32*512*1000) / (t1 - t0) >= 55, "sequential read at least 55 MB/s");
      t0 = $time;
      host_data(0, mk_cmd(OP_WRITE, 16'd16, 32'd40, 8'hCA), ok);
      send_write_data(0, 40, 16, 5, 0, "long write", 1);
      check_reply(0, OP_WRITE, 8'h00, 8'h50, "long write");
      t1 = $time;
      $display("write: %0d bytes in %0d ns = %0d MB/s", 16*512, t1 - t0,
               (16*512*1000) / (t1 - t0));
      check((16*512*1000) / (t1 - t0) >= 49, "sequential write at least 49 MB/s");
      do_read(0, 40, 16, -1, "read back long write");
    end

    // random access: single-sector writes and reads at random addresses
    begin
      int lba;
      t0 = $time;
      for (int i = 0; i < 8; i++) begin
        if (i % 2 == 0) begin
          lba = $urandom % 64;
          host_data(0, mk_cmd(OP_WRITE, 16'd1, 32'(lba), 8'hCA), ok);
          check(ok, "random write command acknowledged");
          send_write_data(0, lba, 1, 100 + i, 0, "random write");
          check_reply(0, OP_WRITE, 8'h00, 8'h50, "random write");
        end else do_read(0, (i % 4 == 1) ? lba : $urandom % 64, 1, -1, "random read");
      end
      t1 = $time;
      $display("random access: 8 single-sector commands, %0d ns each", (t1 - t0) / 8);
    end

    // close both connections
    for (int ci = 0; ci < 2; ci++) begin
      Pkt p;
      send_pkt(ci, LT_FIN, hseq[ci], dexp[ci], none);
      repeat (300) @(posedge clk);
      check(ctrlq.size() == 1, "FINACK received");
      if (ctrlq.size() > 0) begin
        p = ctrlq.pop_front();
        check(p.ltype == LT_FINACK && p.ack == hseq[ci] + 16'd1, "FINACK fields");
      end
    end
    check(conn_up == 0, "connections closed");

    // mechanisms
    check(n_fcs_errors == 0, "all frames from the chip well formed");
    check(n_crc_bad == 0 && n_crc_ok > 0, "UDMA CRC matched at the disk");
    $display("frames out %0d, disk cmds %0d, words to disk %0d, from disk %0d",
             n_frames_out, n_cmds, n_win, n_wout);
    $display("events: good %0d badfcs %0d dropped %0d dup %0d refused %0d datamode %0d retx %0d open %0d",
             ev_cnt[0], ev_cnt[1], ev_cnt[2], ev_cnt[3], ev_cnt[4], ev_cnt[5], ev_cnt[6], ev_cnt[7]);
    for (int i = 0; i < 8; i++) check(ev_cnt[i] > 0, $sformatf("mechanism %0d happened", i));
    check(n_win > 0 && n_wout > 0, "UDMA in both directions");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
