// tb_protocol_engine: stream-level test of the LeanTCP protocol engine.
//
// The bench plays the MAC on both sides of the engine: it feeds whole frames
// (26-byte header plus payload, no FCS) into rx_* honouring rx_ready, and
// takes frames from tx_* with a randomly stalling tx_ready.  A small
// responder answers each payload with a verdict chosen by the test.  Expected
// frames are built independently from the header layout (MACs, Eth-type
// 88B5h, Size, D-port, S-port, TYPE, SEQ, ACK, 16 bits each after the MACs).
// It checks: SYN -> SYNACK with ACK = SEQ+1 and a connection-open event;
// an in-order DATA packet whose payload reaches pl_* intact and is
// acknowledged; a refused packet that is not acknowledged and its accepted
// resend; a duplicate that is re-acknowledged and not passed on; frames with
// the wrong destination MAC, Eth-type or port, and DATA from an unknown host,
// all dropped silently; ACK numbers forwarded to ack_*; a DATA packet sent on
// request with its payload pulled through dp_*; a second host on its own
// connection; FIN -> FINACK with the connection closed.
module tb_protocol_engine;
  timeunit 1ns; timeprecision 1ps;
  import soe_pkg::*;
  typedef byte unsigned bq_t[$];

  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;

  localparam logic [47:0] MY  = 48'h02_00_00_00_50_01;
  localparam logic [47:0] HA  = 48'h02_AA_00_00_00_0A;
  localparam logic [47:0] HB  = 48'h02_BB_00_00_00_0B;
  localparam logic [15:0] PORT = 16'd3260;

  logic [7:0] rx_data = 0, tx_data, pl_data, dp_data;
  logic rx_last = 0, rx_valid = 0, rx_ready, tx_last, tx_valid, tx_ready = 1;
  logic pl_valid, pl_first, pl_last, pl_bad, vd_valid = 0, vd_ok = 0;
  logic [1:0] pl_conn, ack_conn, cev_conn, dq_conn = 0;
  logic ack_valid, cev_valid, cev_open, dq_valid = 0, dq_ready, dp_ready;
  logic [15:0] ack_num, dq_seq = 0, dq_len = 0;
  logic [3:0] conn_up;
  logic ev_dropped, ev_dup;

  protocol_engine #(.NCONN(4)) dut (.clk, .rst_n, .my_mac(MY), .my_port(PORT), .*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- frames
  function automatic bq_t frame(input logic [47:0] dst, src, input logic [15:0] et,
                                input logic [15:0] dport, sport, typ, seq, ack,
                                input bq_t pay);
    bq_t f;
    logic [207:0] h;
    h = {dst, src, et, 16'(pay.size()), dport, sport, typ, seq, ack};
    for (int i = 25; i >= 0; i--) f.push_back(h[i*8 +: 8]);
    foreach (pay[i]) f.push_back(pay[i]);
    return f;
  endfunction

  // called at a negedge; returns at a negedge after the last byte was taken
  task automatic send(input bq_t f);
    foreach (f[i]) begin
      rx_valid = 1; rx_data = f[i]; rx_last = (i == f.size() - 1);
      while (!rx_ready) @(negedge clk);
      @(negedge clk);
    end
    rx_valid = 0; rx_last = 0;
  endtask

  // transmitted frames
  bq_t txq[$];
  bq_t cur_tx;
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      cur_tx.push_back(tx_data);
      if (tx_last) begin txq.push_back(cur_tx); cur_tx.delete(); end
    end
  end
  always @(negedge clk) tx_ready <= ($urandom % 4) != 0;

  task automatic expect_tx(input bq_t exp, input string what);
    int t = 0;
    while (txq.size() == 0 && t < 2000) begin @(negedge clk); t++; end
    if (txq.size() == 0) begin check(0, {what, ": no frame sent"}); return; end
    check(txq.pop_front() == exp, what);
  endtask

  task automatic expect_quiet(input string what);
    repeat (300) @(negedge clk);
    check(txq.size() == 0, what);
    txq.delete();
  endtask

  // payload capture and verdicts
  bq_t got;
  int  n_first = 0, n_bad = 0;
  logic [1:0] last_conn;
  bit  next_ok = 1;
  always @(posedge clk) if (rst_n && pl_valid) begin
    if (pl_first) n_first++;
    if (pl_bad) n_bad++;
    got.push_back(pl_data);
    last_conn <= pl_conn;
  end
  initial begin
    forever begin
      @(posedge clk iff (rst_n && pl_valid && pl_last));
      repeat (3) @(negedge clk);
      vd_valid = 1; vd_ok = next_ok;
      @(negedge clk);
      vd_valid = 0;
    end
  end

  // events
  int n_open = 0, n_close = 0, n_drop = 0, n_dup = 0, n_ack = 0;
  logic [1:0] open_conn;
  logic [15:0] last_ack;
  always @(posedge clk) if (rst_n) begin
    if (cev_valid && cev_open) begin n_open++; open_conn <= cev_conn; end
    if (cev_valid && !cev_open) n_close++;
    if (ev_dropped) n_drop++;
    if (ev_dup) n_dup++;
    if (ack_valid) begin n_ack++; last_ack <= ack_num; end
  end

  // requested DATA packet
  bq_t src;
  int  dp_i = 0;
  assign dp_data = (dp_i < src.size()) ? src[dp_i] : 8'h00;
  always @(posedge clk) if (rst_n && dp_ready) dp_i <= dp_i + 1;

  function automatic bq_t rnd(input int n);
    bq_t q;
    repeat (n) q.push_back(8'($urandom));
    return q;
  endfunction

  bq_t none, p1, p2;
  logic [1:0] ca, cb;
  int d0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // connection set-up
    send(frame(MY, HA, ETHERTYPE_SOE, PORT, 16'd100, LT_SYN, 16'd10, 16'd0, none));
    expect_tx(frame(HA, MY, ETHERTYPE_SOE, 16'd100, PORT, LT_SYNACK, 16'd0, 16'd11, none),
              "SYNACK to host A acknowledges SEQ+1");
    ca = open_conn;
    check(n_open == 1 && conn_up[ca], "connection A opened");

    // in-order DATA, accepted
    p1 = rnd(37); got.delete(); next_ok = 1;
    send(frame(MY, HA, ETHERTYPE_SOE, PORT, 16'd100, LT_DATA, 16'd11, 16'd1, p1));
    expect_tx(frame(HA, MY, ETHERTYPE_SOE, 16'd100, PORT, LT_ACK, 16'd0, 16'd12, none),
              "accepted DATA acknowledged");
    check(got == p1, "payload passed on intact");
    check(n_first == 1 && n_bad == 0 && last_conn == ca, "payload framing and connection id");
    check(n_ack == 1 && last_ack == 16'd1, "ACK number of DATA forwarded");

    // refused, then resent and accepted
    p2 = rnd(64); got.delete(); next_ok = 0;
    send(frame(MY, HA, ETHERTYPE_SOE, PORT, 16'd100, LT_DATA, 16'd12, 16'd1, p2));
    expect_quiet("refused DATA is not acknowledged");
    got.delete(); next_ok = 1;
    send(frame(MY, HA, ETHERTYPE_SOE, PORT, 16'd100, LT_DATA, 16'd12, 16'd1, p2));
    expect_tx(frame(HA, MY, ETHERTYPE_SOE, 16'd100, PORT, LT_ACK, 16'd0, 16'd13, none),
              "resent DATA acknowledged");
    check(got == p2, "resent payload passed on");

    // duplicate
    got.delete();
    send(frame(MY, HA, ETHERTYPE_SOE, PORT, 16'd100, LT_DATA, 16'd12, 16'd1, p2));
    expect_tx(frame(HA, MY, ETHERTYPE_SOE, 16'd100, PORT, LT_ACK, 16'd0, 16'd13, none),
              "duplicate re-acknowledged with the expected number");
    check(got.size() == 0 && n_dup == 1, "duplicate not passed on");

    // invalid frames
    d0 = n_drop;
    send(frame(HB, HA, ETHERTYPE_SOE, PORT, 16'd100, LT_DATA, 16'd13, 16'd1, p1));
    send(frame(MY, HA, 16'h0800, PORT, 16'd100, LT_DATA, 16'd13, 16'd1, p1));
    send(frame(MY, HA, ETHERTYPE_SOE, PORT + 16'd1, 16'd100, LT_DATA, 16'd13, 16'd1, p1));
    send(frame(MY, HB, ETHERTYPE_SOE, PORT, 16'd100, LT_DATA, 16'd1, 16'd1, p1));
    expect_quiet("invalid frames get no answer");
    check(n_drop - d0 == 4 && got.size() == 0, "four invalid frames dropped");

    // pure ACK forwarded
    send(frame(MY, HA, ETHERTYPE_SOE, PORT, 16'd100, LT_ACK, 16'd0, 16'd5, none));
    repeat (4) @(negedge clk);
    check(last_ack == 16'd5 && ack_conn == ca, "ACK number forwarded");

    // requested DATA packet
    src = rnd(20); dp_i = 0;
    dq_conn = ca; dq_seq = 16'd7; dq_len = 16'd20; dq_valid = 1;
    @(posedge clk iff dq_ready);
    @(negedge clk); dq_valid = 0;
    expect_tx(frame(HA, MY, ETHERTYPE_SOE, 16'd100, PORT, LT_DATA, 16'd7, 16'd13, src),
              "requested DATA packet with payload and current ACK");

    // second host
    send(frame(MY, HB, ETHERTYPE_SOE, PORT, 16'd200, LT_SYN, 16'd500, 16'd0, none));
    expect_tx(frame(HB, MY, ETHERTYPE_SOE, 16'd200, PORT, LT_SYNACK, 16'd0, 16'd501, none),
              "SYNACK to host B");
    cb = open_conn;
    check(cb != ca && conn_up[ca] && conn_up[cb], "host B on its own connection");

    // close A
    send(frame(MY, HA, ETHERTYPE_SOE, PORT, 16'd100, LT_FIN, 16'd13, 16'd0, none));
    expect_tx(frame(HA, MY, ETHERTYPE_SOE, 16'd100, PORT, LT_FINACK, 16'd0, 16'd14, none),
              "FINACK to host A");
    repeat (2) @(negedge clk);
    check(n_close == 1 && !conn_up[ca] && conn_up[cb], "connection A closed, B still up");

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
