// tb_retx_manager: the retransmission manager against a model of the read
// FIFO, the transmitter and a go-back-N host.
//  1. A 6-sector read on connection 2: the host loses the third data packet,
//     so after the timeout the manager must rewind and resend from it; every
//     sector must be released exactly once and the reply must follow.
//  2. A command without data on the same connection: the reply alone, with the
//     sequence number continuing from the read.
//  3. The connection closes in the middle of a read: the rest of the data is
//     discarded without being sent.
//  4. Reopening the connection restarts its numbering at 1.
module tb_retx_manager;
  timeunit 1ns; timeprecision 1ps;
  localparam int RTO = 300;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;

  logic       start = 0, reply_ready = 0, tx_idle = 1, cev_valid = 0, cev_open = 0, ack_valid = 0;
  logic [1:0] start_conn = 0, cev_conn = 0, ack_conn = 0, dq_conn;
  logic [15:0] start_ndata = 0, ack_num = 0, dq_seq, dq_len;
  logic [11:0] fifo_level, rel_bytes, skip_bytes;
  logic [3:0] conn_up = 4'b1111;
  logic dq_valid, dq_is_reply, dq_ready = 0, rel_valid, rewind, skip_valid, done, busy, ev_retx;

  retx_manager #(.NCONN(4), .FIFO_BYTES(2048), .RTO_CYCLES(RTO)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FIFO model: sectors arrive from the "disk" while there is room
  int lvl = 0, to_fill = 0, released = 0, skipped = 0, rewinds = 0, retx = 0, dones = 0;
  assign fifo_level = 12'(lvl);
  always @(posedge clk) begin
    if (rel_valid) begin lvl -= int'(rel_bytes); released += int'(rel_bytes); end
    if (skip_valid) skipped += int'(skip_bytes);
    if (rewind) rewinds++;
    if (ev_retx) retx++;
    if (done) dones++;
    if (to_fill > 0 && lvl + 512 <= 2048 && $urandom_range(0, 40) == 0) begin
      lvl += 512; to_fill--;
    end
  end

  // transmitter + host: take requests, "send" for 20 clocks, host acks in order
  int sent_seq [$];
  logic [15:0] host_exp = 1;
  int lose = -1;
  logic drop_all = 0;
  initial forever begin
    @(negedge clk);
    if (dq_valid && tx_idle) begin
      int s;
      logic rep;
      dq_ready = 1; s = int'(dq_seq); rep = dq_is_reply;
      check(dq_conn == start_conn, "packet for the active connection");
      check(dq_len == (rep ? 16'd4 : 16'd512), "packet length");
      @(negedge clk); dq_ready = 0; tx_idle = 0;
      sent_seq.push_back(s);
      repeat (20) @(negedge clk);
      tx_idle = 1;
      if (s == lose) lose = -1;                       // lost on the way
      else if (16'(s) == host_exp && !drop_all) begin
        host_exp++;
        ack_valid = 1; ack_conn = start_conn; ack_num = host_exp;
        @(negedge clk); ack_valid = 0;
      end
    end
  end

  task automatic run(input logic [1:0] c, input int nd, output int cycles);
    @(negedge clk);
    start = 1; start_conn = c; start_ndata = 16'(nd); to_fill = nd;
    @(negedge clk); start = 0;
    fork
      begin repeat (200) @(negedge clk); reply_ready = 1; end
    join_none
    cycles = 0;
    while (!done && cycles < 50000) begin @(posedge clk); cycles++; end
    @(negedge clk); reply_ready = 0;
  endtask

  initial begin
    int cyc;
    int exp_seq [$];
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1. read of 6 sectors, packet 3 lost once
    lose = 3;
    run(2'd2, 6, cyc);
    exp_seq = '{1, 2, 3, 4, 5, 3, 4, 5, 6, 7};
    check(cyc < 50000, "read completed");
    check(retx == 1 && rewinds == 1, $sformatf("one timeout and rewind (%0d %0d)", retx, rewinds));
    check(released == 6*512 && lvl == 0, $sformatf("each sector released once (%0d)", released));
    check(sent_seq.size() >= 9 && sent_seq[0:2] == exp_seq[0:2], "first packets in order");
    check(sent_seq[sent_seq.size()-1] == 7, "reply is packet 7");
    begin
      int n3 = 0;
      foreach (sent_seq[i]) if (sent_seq[i] == 3) n3++;
      check(n3 == 2, "packet 3 sent twice");
    end
    sent_seq.delete();

    // 2. no data: reply only, numbering continues at 8
    run(2'd2, 0, cyc);
    check(sent_seq.size() == 1 && sent_seq[0] == 8, "reply alone with sequence 8");
    check(retx == 1, "no timeout when acknowledged");
    sent_seq.delete();

    // 3. the connection closes during a read: rest discarded
    drop_all = 1;
    fork
      begin
        repeat (1500) @(negedge clk);
        conn_up[2] = 0; cev_valid = 1; cev_open = 0; cev_conn = 2;
        @(negedge clk); cev_valid = 0;
      end
    join_none
    released = 0; skipped = 0;
    run(2'd2, 8, cyc);
    check(cyc < 50000, "aborted read completed");
    check(released == 8*512 && lvl == 0, $sformatf("all data freed (%0d)", released));
    check(skipped > 0, "data discarded without sending");
    drop_all = 0;
    sent_seq.delete();

    // 4. reopen: numbering restarts at 1
    @(negedge clk); conn_up[2] = 1; cev_valid = 1; cev_open = 1; cev_conn = 2;
    @(negedge clk); cev_valid = 0;
    host_exp = 1;
    run(2'd2, 1, cyc);
    check(sent_seq.size() == 2 && sent_seq[0] == 1 && sent_seq[1] == 2, "numbering restarts at 1");
    check(dones == 4, "four commands completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
