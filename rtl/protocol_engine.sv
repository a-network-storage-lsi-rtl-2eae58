// protocol_engine: LeanTCP protocol engine of the SoEDC.
//
// LeanTCP is a reduced TCP carried directly in Ethernet frames: hosts are
// addressed by MAC address and port, there is no IP layer, no reordering and
// no flow control.  This block
//   * de-capsulates received frames: it collects the 26-byte header, checks
//     the destination MAC, the Eth-type, the destination port and the Size
//     field, and looks the sender up in the remote-host table;
//   * sets up and tears down connections (SYN -> SYNACK, FIN -> FINACK) and
//     keeps, per connection, the host's MAC, its port and the next sequence
//     number expected from it;
//   * accepts a DATA packet only in order (SEQ equal to the expected number);
//     its payload is streamed to the command processing engine together with
//     the connection identifier, and the engine's verdict decides whether the
//     packet is acknowledged.  A packet that is refused is simply not
//     acknowledged, so the host sends it again later; a duplicate or
//     out-of-order packet is dropped and answered with the current ACK;
//   * forwards the ACK number of every packet from a known host, which the
//     retransmission manager uses to free or resend outgoing packets;
//   * encapsulates outgoing packets: control replies it generates itself, and
//     DATA packets requested by the command processing engine, whose payload
//     it pulls byte by byte behind the header.
// The functions are those the design gives the protocol engine; the field
// widths, TYPE codes, sequence numbering (one number per packet) and the
// handshakes are this design's own.
//
// Timing: one byte per clock on both streams.  A header is evaluated one
// clock after its last byte.  Payload bytes go to pl_* in the clock they are
// taken from rx_*; pl_* has no back-pressure.  The verdict (vd_valid/vd_ok)
// may come any number of clocks after pl_last.  dq_ready pulses when a
// requested DATA packet starts; dp_ready then takes one payload byte per
// clock from dp_data, which must be valid in each such clock.
module protocol_engine #(
  parameter int NCONN = 4,
  localparam int CW = (NCONN > 1) ? $clog2(NCONN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [47:0]   my_mac,
  input  logic [15:0]   my_port,
  // frames from the MAC
  input  logic [7:0]    rx_data,
  input  logic          rx_last,
  input  logic          rx_valid,
  output logic          rx_ready,
  // frames to the MAC
  output logic [7:0]    tx_data,
  output logic          tx_last,
  output logic          tx_valid,
  input  logic          tx_ready,
  // payload to the command processing engine
  output logic          pl_valid,
  output logic [7:0]    pl_data,
  output logic          pl_first,
  output logic          pl_last,
  output logic          pl_bad,     // with pl_last: frame ended before Size bytes
  output logic [CW-1:0] pl_conn,
  input  logic          vd_valid,
  input  logic          vd_ok,
  // acknowledgements and connection events
  output logic          ack_valid,
  output logic [CW-1:0] ack_conn,
  output logic [15:0]   ack_num,
  output logic          cev_valid,
  output logic          cev_open,   // 1 opened, 0 closed
  output logic [CW-1:0] cev_conn,
  // DATA packets requested by the command processing engine
  input  logic          dq_valid,
  input  logic [CW-1:0] dq_conn,
  input  logic [15:0]   dq_seq,
  input  logic [15:0]   dq_len,
  output logic          dq_ready,
  input  logic [7:0]    dp_data,
  output logic          dp_ready,
  // status
  output logic [NCONN-1:0] conn_up,
  output logic          ev_dropped,   // pulse: invalid packet dropped
  output logic          ev_dup        // pulse: duplicate / out-of-order DATA
);
  import soe_pkg::*;

  // ------------------------------------------------------ remote-host table
  logic [47:0] t_mac  [NCONN];
  logic [15:0] t_port [NCONN];
  logic [15:0] t_exp  [NCONN];
  logic [NCONN-1:0] t_v;
  assign conn_up = t_v;

  // ------------------------------------------------------ pending control reply
  typedef struct packed {
    logic [47:0] mac;
    logic [15:0] port;
    logic [15:0] ltype;
    logic [15:0] seq;
    logic [15:0] ack;
  } ctrl_t;
  ctrl_t ctrl;
  logic  ctrl_pend, ctrl_take;

  // ------------------------------------------------------ receive side
  typedef enum logic [2:0] {R_HDR, R_EVAL, R_PAY, R_VERD, R_SKIP} rst_e;
  rst_e rs;
  lt_hdr_t      hdr;
  logic [4:0]   hcnt;
  logic         ended;        // the frame's last byte has been taken
  logic [15:0]  remain;
  logic [CW-1:0] cur;

  // lookup of the sender and a free entry (combinational, used in R_EVAL)
  logic          hit, free_found;
  logic [CW-1:0] hit_idx, free_idx;
  always_comb begin
    hit = 1'b0; hit_idx = '0; free_found = 1'b0; free_idx = '0;
    for (int i = NCONN-1; i >= 0; i--) begin
      if (t_v[i] && t_mac[i] == hdr.src_mac && t_port[i] == hdr.sport) begin
        hit = 1'b1; hit_idx = CW'(i);
      end
      if (!t_v[i]) begin free_found = 1'b1; free_idx = CW'(i); end
    end
  end

  wire hdr_ok = hdr.dst_mac == my_mac && hdr.eth_type == ETHERTYPE_SOE &&
                hdr.dport == my_port && hdr.size <= 16'(MAX_PAYLOAD) &&
                !(ended && hdr.size != 16'd0);

  assign rx_ready = !ended && (rs == R_HDR || rs == R_PAY || rs == R_SKIP);
  wire   rx_take  = rx_valid && rx_ready;

  assign pl_valid = (rs == R_PAY) && rx_valid;
  assign pl_data  = rx_data;
  assign pl_first = (remain == hdr.size);
  assign pl_last  = (remain == 16'd1) || rx_last;
  assign pl_bad   = rx_last && (remain != 16'd1);
  assign pl_conn  = cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= R_HDR; hdr <= '0; hcnt <= '0; ended <= 1'b0; remain <= '0; cur <= '0;
      t_v <= '0; ctrl_pend <= 1'b0; ctrl <= '0;
      ack_valid <= 1'b0; ack_conn <= '0; ack_num <= '0;
      cev_valid <= 1'b0; cev_open <= 1'b0; cev_conn <= '0;
      ev_dropped <= 1'b0; ev_dup <= 1'b0;
      for (int i = 0; i < NCONN; i++) begin
        t_mac[i] <= '0; t_port[i] <= '0; t_exp[i] <= '0;
      end
    end else begin
      ack_valid <= 1'b0; cev_valid <= 1'b0; ev_dropped <= 1'b0; ev_dup <= 1'b0;
      if (ctrl_take) ctrl_pend <= 1'b0;
      unique case (rs)
        R_HDR: if (rx_take) begin
          hdr  <= {hdr[$bits(lt_hdr_t)-9:0], rx_data};
          hcnt <= hcnt + 5'd1;
          if (rx_last) ended <= 1'b1;
          if (hcnt == 5'(HDR_BYTES - 1)) begin hcnt <= '0; rs <= R_EVAL; end
          else if (rx_last) begin hcnt <= '0; ended <= 1'b0; ev_dropped <= 1'b1; end
        end
        R_EVAL: if (!ctrl_pend) begin
          rs <= ended ? R_HDR : R_SKIP;
          ended <= 1'b0;
          if (!hdr_ok) ev_dropped <= 1'b1;
          else unique case (hdr.ltype)
            LT_SYN: begin
              if (hit || free_found) begin
                t_v[hit ? hit_idx : free_idx]    <= 1'b1;
                t_mac[hit ? hit_idx : free_idx]  <= hdr.src_mac;
                t_port[hit ? hit_idx : free_idx] <= hdr.sport;
                t_exp[hit ? hit_idx : free_idx]  <= hdr.seq + 16'd1;
                cev_valid <= 1'b1; cev_open <= 1'b1;
                cev_conn  <= hit ? hit_idx : free_idx;
                ctrl_pend <= 1'b1;
                ctrl <= '{mac: hdr.src_mac, port: hdr.sport, ltype: LT_SYNACK,
                          seq: 16'd0, ack: hdr.seq + 16'd1};
              end else ev_dropped <= 1'b1;   // table full: no answer
            end
            LT_FIN: begin
              if (hit) begin
                t_v[hit_idx] <= 1'b0;
                cev_valid <= 1'b1; cev_open <= 1'b0; cev_conn <= hit_idx;
              end
              ctrl_pend <= 1'b1;
              ctrl <= '{mac: hdr.src_mac, port: hdr.sport, ltype: LT_FINACK,
                        seq: 16'd0, ack: hdr.seq + 16'd1};
            end
            LT_ACK: begin
              if (hit) begin
                ack_valid <= 1'b1; ack_conn <= hit_idx; ack_num <= hdr.ack;
              end else ev_dropped <= 1'b1;
            end
            LT_DATA: begin
              if (!hit) ev_dropped <= 1'b1;
              else begin
                ack_valid <= 1'b1; ack_conn <= hit_idx; ack_num <= hdr.ack;
                if (hdr.seq == t_exp[hit_idx] && hdr.size != 16'd0) begin
                  rs <= R_PAY; ended <= ended; cur <= hit_idx; remain <= hdr.size;
                end else begin
                  ev_dup    <= 1'b1;
                  ctrl_pend <= 1'b1;
                  ctrl <= '{mac: hdr.src_mac, port: hdr.sport, ltype: LT_ACK,
                            seq: 16'd0, ack: t_exp[hit_idx]};
                end
              end
            end
            default: ev_dropped <= 1'b1;
          endcase
        end
        R_PAY: if (rx_take) begin
          remain <= remain - 16'd1;
          if (rx_last) ended <= 1'b1;
          if (pl_last) rs <= R_VERD;
        end
        R_VERD: if (vd_valid && !ctrl_pend) begin
          rs <= ended ? R_HDR : R_SKIP;
          ended <= 1'b0;
          if (vd_ok) begin
            t_exp[cur] <= t_exp[cur] + 16'd1;
            ctrl_pend  <= 1'b1;
            ctrl <= '{mac: t_mac[cur], port: t_port[cur], ltype: LT_ACK,
                      seq: 16'd0, ack: t_exp[cur] + 16'd1};
          end
        end
        R_SKIP: if (rx_take && rx_last) rs <= R_HDR;
        default: rs <= R_HDR;
      endcase
    end
  end

  // ------------------------------------------------------ transmit side
  typedef enum logic [1:0] {T_IDLE, T_HDR, T_PAY} tst_e;
  tst_e ts;
  lt_hdr_t     tsh;
  logic [4:0]  tcnt;
  logic [15:0] tleft;

  assign ctrl_take = (ts == T_IDLE) && ctrl_pend;
  assign dq_ready  = (ts == T_IDLE) && !ctrl_pend && dq_valid;
  assign tx_valid  = (ts != T_IDLE);
  assign tx_data   = (ts == T_PAY) ? dp_data : tsh.dst_mac[47:40];
  assign tx_last   = (ts == T_HDR && tcnt == 5'(HDR_BYTES - 1) && tleft == 16'd0) ||
                     (ts == T_PAY && tleft == 16'd1);
  assign dp_ready  = (ts == T_PAY) && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts <= T_IDLE; tsh <= '0; tcnt <= '0; tleft <= '0;
    end else begin
      unique case (ts)
        T_IDLE: begin
          tcnt <= '0;
          if (ctrl_take) begin
            tsh <= lt_hdr_t'{dst_mac: ctrl.mac, src_mac: my_mac, eth_type: ETHERTYPE_SOE,
                     size: 16'd0, dport: ctrl.port, sport: my_port,
                     ltype: ctrl.ltype, seq: ctrl.seq, ack: ctrl.ack};
            tleft <= '0; ts <= T_HDR;
          end else if (dq_ready) begin
            tsh <= lt_hdr_t'{dst_mac: t_mac[dq_conn], src_mac: my_mac, eth_type: ETHERTYPE_SOE,
                     size: dq_len, dport: t_port[dq_conn], sport: my_port,
                     ltype: LT_DATA, seq: dq_seq, ack: t_exp[dq_conn]};
            tleft <= dq_len; ts <= T_HDR;
          end
        end
        T_HDR: if (tx_ready) begin
          tsh  <= lt_hdr_t'(tsh << 8);
          tcnt <= tcnt + 5'd1;
          if (tcnt == 5'(HDR_BYTES - 1)) ts <= (tleft == 16'd0) ? T_IDLE : T_PAY;
        end
        T_PAY: if (tx_ready) begin
          tleft <= tleft - 16'd1;
          if (tleft == 16'd1) ts <= T_IDLE;
        end
        default: ts <= T_IDLE;
      endcase
    end
  end

endmodule
