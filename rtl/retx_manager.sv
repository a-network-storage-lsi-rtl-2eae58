// retx_manager: retransmission manager of the command processing engine.
//
// Owns the outgoing side of one command at a time.  A command that reads N
// sectors produces N DATA packets of one sector each, taken from the read
// FIFO, followed by one reply packet; any other command produces the reply
// packet only.  Packets carry consecutive sequence numbers that continue, per
// connection, from the previous command (a new connection starts at 1).
//   * A data packet is requested once the read FIFO holds its whole sector;
//     the reply once the executer has filled the reply register.
//   * An acknowledgement number A from the host (all packets below A
//     received) moves the oldest unacknowledged packet (una) to A and frees
//     the FIFO space of the data packets it covers.
//   * If nothing is acknowledged for RTO_CYCLES while packets are
//     outstanding, the FIFO's send pointer is rewound to the oldest
//     unacknowledged byte and sending restarts from una (go-back-N).  The
//     rewind waits for the transmitter to be idle.
//   * The command is complete (done pulse) when the reply is acknowledged.
//   * If the connection is closed (conn_up low), the remaining data is discarded as
//     it arrives and the command completes without sending.
// The design names this block and makes the protocol engine responsible for
// resending lost packets; the go-back-N scheme, the packet size and the
// timeout are this design's own.
module retx_manager #(
  parameter int NCONN       = 4,
  parameter int FIFO_BYTES  = 2048,
  parameter int RTO_CYCLES  = 125000,     // 1 ms at 125 MHz
  localparam int CW = (NCONN > 1) ? $clog2(NCONN) : 1,
  localparam int AW = $clog2(FIFO_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] start_conn,
  input  logic [15:0]   start_ndata,
  input  logic          reply_ready,
  input  logic          tx_idle,
  input  logic [AW:0]   fifo_level,
  input  logic [NCONN-1:0] conn_up,
  input  logic          cev_valid,
  input  logic          cev_open,
  input  logic [CW-1:0] cev_conn,
  input  logic          ack_valid,
  input  logic [CW-1:0] ack_conn,
  input  logic [15:0]   ack_num,
  output logic          dq_valid,
  output logic [CW-1:0] dq_conn,
  output logic [15:0]   dq_seq,
  output logic [15:0]   dq_len,
  output logic          dq_is_reply,
  input  logic          dq_ready,
  output logic          rel_valid,
  output logic [AW:0]   rel_bytes,
  output logic          rewind,
  output logic          skip_valid,
  output logic [AW:0]   skip_bytes,
  output logic          done,
  output logic          busy,
  output logic          ev_retx
);
  import soe_pkg::*;
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_ABORT_WAIT, S_ABORT} st_e;
  st_e st;

  logic [15:0] seq_next [NCONN];
  logic [15:0] s0, ndata, una, nxt, drop_i;
  logic [CW-1:0] conn;
  logic [$clog2(RTO_CYCLES+1)-1:0] timer;

  wire [15:0] nxt_i = nxt - s0;
  wire [15:0] una_i = una - s0;
  wire [15:0] out_n = nxt - una;                 // packets outstanding
  wire [31:0] need  = (32'(out_n) + 32'd1) * 32'(SECTOR_BYTES);
  wire        expire = (st == S_RUN) && out_n != 16'd0 &&
                       timer >= ($clog2(RTO_CYCLES+1))'(RTO_CYCLES);

  // acknowledgement check: 0 < A - una <= nxt - una
  wire [15:0] adv   = ack_num - una;
  wire        ack_ok = (st == S_RUN) && ack_valid && ack_conn == conn &&
                       adv != 16'd0 && adv <= out_n;
  wire [15:0] a_i   = ack_num - s0;
  wire [15:0] rel_n = ((a_i < ndata) ? a_i : ndata) - ((una_i < ndata) ? una_i : ndata);

  assign busy        = (st != S_IDLE);
  assign dq_conn     = conn;
  assign dq_seq      = nxt;
  assign dq_is_reply = (nxt_i == ndata);
  assign dq_len      = dq_is_reply ? 16'(REPLY_BYTES) : 16'(SECTOR_BYTES);
  assign dq_valid    = (st == S_RUN) && !(expire && tx_idle) &&
                       ((nxt_i < ndata && 32'(fifo_level) >= need) ||
                        (nxt_i == ndata && reply_ready));

  always_comb begin
    rel_valid = 1'b0; rel_bytes = '0; skip_valid = 1'b0; skip_bytes = '0;
    if (ack_ok && rel_n != 16'd0) begin
      rel_valid = 1'b1;
      rel_bytes = (AW+1)'(32'(rel_n) * 32'(SECTOR_BYTES));
    end
    if (st == S_ABORT && drop_i < ndata && 32'(fifo_level) >= 32'(SECTOR_BYTES)) begin
      rel_valid = 1'b1;  rel_bytes  = (AW+1)'(SECTOR_BYTES);
      skip_valid = 1'b1; skip_bytes = (AW+1)'(SECTOR_BYTES);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; s0 <= '0; ndata <= '0; una <= '0; nxt <= '0; drop_i <= '0;
      conn <= '0; timer <= '0; done <= 1'b0; rewind <= 1'b0; ev_retx <= 1'b0;
      for (int i = 0; i < NCONN; i++) seq_next[i] <= 16'd1;
    end else begin
      done <= 1'b0; rewind <= 1'b0; ev_retx <= 1'b0;
      if (cev_valid && cev_open) seq_next[cev_conn] <= 16'd1;
      unique case (st)
        S_IDLE: if (start) begin
          st <= S_RUN; conn <= start_conn; ndata <= start_ndata;
          s0 <= seq_next[start_conn]; una <= seq_next[start_conn];
          nxt <= seq_next[start_conn]; timer <= '0;
        end
        S_RUN: begin
          if (!conn_up[conn]) st <= S_ABORT_WAIT;
          else if (una_i == ndata + 16'd1) begin
            seq_next[conn] <= una; done <= 1'b1; st <= S_IDLE;
          end
          if (ack_ok) begin
            una <= ack_num; timer <= '0;
          end else if (expire) begin
            if (tx_idle) begin
              nxt <= una; rewind <= 1'b1; ev_retx <= 1'b1; timer <= '0;
            end
          end else if (out_n != 16'd0) timer <= timer + 1'b1;
          else timer <= '0;
          if (dq_valid && dq_ready) nxt <= nxt + 16'd1;
        end
        S_ABORT_WAIT: if (tx_idle) begin
          rewind <= 1'b1; st <= S_ABORT;
          drop_i <= (una_i < ndata) ? una_i : ndata;
        end
        S_ABORT: begin
          if (skip_valid) drop_i <= drop_i + 16'd1;
          else if (drop_i >= ndata && reply_ready) begin done <= 1'b1; st <= S_IDLE; end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
