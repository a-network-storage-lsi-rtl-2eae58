// tb_eth_mac: loop-back test of the Ethernet MAC.
//
// Frames of several lengths go into the transmit stream; the GMII output is
// checked (preamble, SFD, padding to 60 bytes, FCS computed here bit by bit,
// 12-clock gap, one byte per clock) and fed back into the receiver, whose
// output must be the same bytes (plus padding for short frames).  A frame
// with one bit flipped on the wire and a frame with GMII rx_er set must be
// dropped.
module tb_eth_mac;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;

  logic [7:0] txd, rxd, rx_data;
  logic [7:0] tx_data = 0;
  logic       tx_valid = 0, tx_last = 0;
  logic       tx_en, tx_er, rx_dv, rx_er, rx_last, rx_valid, rx_ready, tx_ready;
  logic       good, bad, corrupt = 0, force_er = 0;

  eth_mac dut (.clk, .rst_n, .gmii_rxd(rxd), .gmii_rx_dv(rx_dv), .gmii_rx_er(rx_er),
    .gmii_txd(txd), .gmii_tx_en(tx_en), .gmii_tx_er(tx_er),
    .rx_data, .rx_last, .rx_valid, .rx_ready, .tx_data, .tx_last, .tx_valid, .tx_ready,
    .rx_frame_good(good), .rx_frame_bad(bad));

  // wire: transmitter to receiver, optionally with one bit flipped
  int wire_pos = 0;
  always_comb begin
    rxd   = txd ^ ((corrupt && wire_pos == 30) ? 8'h10 : 8'h00);
    rx_dv = tx_en;
    rx_er = force_er && tx_en;
  end
  always @(posedge clk) wire_pos <= tx_en ? wire_pos + 1 : 0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bit-serial CRC-32 (IEEE 802.3), LSB of each byte first
  function automatic logic [31:0] crc_bits(input byte unsigned b[$]);
    logic [31:0] r = 32'hFFFF_FFFF;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic fb = r[0] ^ b[i][k];
      r = r >> 1;
      if (fb) r = r ^ 32'hEDB8_8320;
    end
    return ~r;
  endfunction

  // transmit stream source
  byte unsigned txq[$];
  // the handshake is sampled at the rising edge, the queue changes at the falling one
  logic take = 0;
  always @(posedge clk) take <= tx_valid && tx_ready;
  always @(negedge clk) begin
    if (take) void'(txq.pop_front());
    tx_valid = txq.size() > 0;
    tx_data  = tx_valid ? txq[0] : 8'h00;
    tx_last  = (txq.size() == 1);          // one frame is queued at a time
  end

  // monitor of the wire
  byte unsigned wq[$];
  byte unsigned tx_all[$];       // all frame bodies seen on the wire
  int           tx_off[$], tx_len[$];
  int frames_on_wire = 0, gap = 0, min_gap = 1000, wire_clocks = 0;
  always @(posedge clk) if (rst_n) begin
    if (tx_en) begin
      if (wq.size() == 0 && frames_on_wire > 0 && gap < min_gap) min_gap = gap;
      wq.push_back(txd); gap = 0;
    end else begin
      gap++;
      if (wq.size() > 0) begin
        byte unsigned body[$];
        logic [31:0] fcs;
        frames_on_wire++;
        body.delete();
        wire_clocks = wq.size();
        begin
          bit pre_ok;
          pre_ok = (wq[7] == 8'hD5);
          for (int i = 0; i < 7; i++) if (wq[i] != 8'h55) pre_ok = 0;
          check(pre_ok, "preamble and SFD");
        end
        for (int i = 8; i < wq.size() - 4; i++) body.push_back(wq[i]);
        fcs = {wq[wq.size()-1], wq[wq.size()-2], wq[wq.size()-3], wq[wq.size()-4]};
        check(fcs == crc_bits(body), "FCS");
        check(body.size() >= 60, "padded to 60 bytes");
        foreach (body[i]) tx_all.push_back(body[i]);
        tx_off.push_back(tx_all.size() - body.size()); tx_len.push_back(body.size());
        wq.delete();
      end
    end
  end

  // receive stream sink
  byte unsigned rx_all[$];       // all delivered bytes
  int           rx_off[$];       // start of each delivered frame in rx_all
  int           rx_len[$];
  int           cur_len = 0;
  assign rx_ready = 1'b1;
  always @(posedge clk) if (rst_n && rx_valid && rx_ready) begin
    rx_all.push_back(rx_data);
    cur_len++;
    if (rx_last) begin
      rx_off.push_back(rx_all.size() - cur_len); rx_len.push_back(cur_len); cur_len = 0;
    end
  end

  int n_good = 0, n_bad = 0;
  always @(posedge clk) if (rst_n) begin if (good) n_good++; if (bad) n_bad++; end

  task automatic send(input int len, input int seed);
    byte unsigned f[$];
    for (int i = 0; i < len; i++) f.push_back(8'(i * seed + 7));
    @(posedge clk);
    #1;
    foreach (f[i]) txq.push_back(f[i]);
    wait (txq.size() == 0);
    @(posedge clk);
  endtask

  // the first exp.size() bytes of a equal exp
  function automatic bit same(input byte unsigned a[$], input int off, input int len,
                              input byte unsigned e[$]);
    if (len < e.size()) return 0;
    foreach (e[i]) if (a[off + i] != e[i]) return 0;
    return 1;
  endfunction

  initial begin
    int lens [5] = '{20, 59, 60, 100, 1514};
    int t_start;
    byte unsigned exp_f[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (lens[n]) begin
      send(lens[n], n + 3);
      repeat (lens[n] + 100) @(posedge clk);
      check(rx_len.size() == n + 1, $sformatf("frame %0d delivered (%0d frames, good %0d bad %0d)", n, rx_len.size(), n_good, n_bad));
      if (rx_len.size() == n + 1) begin
        exp_f.delete();
        for (int i = 0; i < lens[n]; i++) exp_f.push_back(8'(i * (n + 3) + 7));
        check(rx_len[n] == ((lens[n] < 60) ? 60 : lens[n]), $sformatf("frame %0d length %0d", n, rx_len[n]));
        check(same(rx_all, rx_off[n], rx_len[n], exp_f), $sformatf("frame %0d bytes", n));
        check(same(tx_all, tx_off[n], tx_len[n], exp_f), $sformatf("frame %0d on the wire", n));
      end
    end
    // back-to-back frames keep the 12-clock gap
    fork send(70, 1); join
    fork send(70, 2); join
    repeat (40) @(posedge clk);
    check(min_gap >= 12, $sformatf("inter-frame gap %0d", min_gap));
    // corrupted frames are dropped
    corrupt = 1; send(80, 5); repeat (40) @(posedge clk); corrupt = 0;
    force_er = 1; send(80, 6); repeat (40) @(posedge clk); force_er = 0;
    check(rx_len.size() == 7, "bad frames not delivered");
    check(n_bad == 2 && n_good == 7, $sformatf("good %0d bad %0d", n_good, n_bad));
    // line rate: a 1000-byte frame keeps tx_en for 8+1000+4 clocks
    t_start = frames_on_wire;
    send(1000, 9);
    repeat (1100) @(posedge clk);
    check(tx_len.size() == t_start + 1 && tx_len[t_start] == 1000 && wire_clocks == 8 + 1000 + 4,
          "1000-byte frame, one byte per clock");
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
