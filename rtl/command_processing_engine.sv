// command_processing_engine: command processing engine of the SoEDC.
//
// Sits between the protocol engine and the ATA/ATAPI controller and holds the
// state memory, the parser, the command queue, the command executer, the
// retransmission manager, the 64 KB write buffer and the 2 KB read FIFO.
//
// Receive side: when a payload arrives, the entry of its connection is read
// from the state memory.  In command mode the payload goes to the parser; the
// parsed command is put in the command queue.  A write command also switches
// its connection to data mode and reserves the write buffer for the expected
// count*512 bytes.  In data mode payloads go to the write buffer; once all
// bytes have arrived the connection returns to command mode.  A payload is
// refused (verdict not ok, so the host resends it later) when the command
// queue is full, when a write command finds the write buffer reserved by
// another write, or when write data is malformed or more than expected.
//
// Transmit side: the retransmission manager asks the protocol engine for DATA
// packets; their payload comes from the read FIFO, or for the reply packet
// from the executer's 4-byte reply register.
//
// The sub-blocks and the two modes are the design's; the verdict handshake,
// the single reservation of the write buffer and the packet sizes are this
// design's own.
module command_processing_engine #(
  parameter int NCONN        = 4,
  parameter int WBUF_BYTES   = 65536,
  parameter int RFIFO_BYTES  = 2048,
  parameter int CQ_DEPTH     = 4,
  parameter int RTO_CYCLES   = 125000,
  localparam int CW  = (NCONN > 1) ? $clog2(NCONN) : 1,
  localparam int RAW = $clog2(RFIFO_BYTES),
  localparam int WAW = $clog2(WBUF_BYTES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the protocol engine
  input  logic          pl_valid,
  input  logic [7:0]    pl_data,
  input  logic          pl_first,
  input  logic          pl_last,
  input  logic          pl_bad,
  input  logic [CW-1:0] pl_conn,
  output logic          vd_valid,
  output logic          vd_ok,
  input  logic          ack_valid,
  input  logic [CW-1:0] ack_conn,
  input  logic [15:0]   ack_num,
  input  logic          cev_valid,
  input  logic          cev_open,
  input  logic [CW-1:0] cev_conn,
  input  logic [NCONN-1:0] conn_up,
  input  logic          tx_idle,
  // packets to the protocol engine
  output logic          dq_valid,
  output logic [CW-1:0] dq_conn,
  output logic [15:0]   dq_seq,
  output logic [15:0]   dq_len,
  input  logic          dq_ready,
  output logic [7:0]    dp_data,
  input  logic          dp_ready,
  // to the ATA/ATAPI controller
  output logic          pio_req,
  output logic          pio_we,
  output soe_pkg::ata_addr_t pio_addr,
  output logic [15:0]   pio_wdata,
  input  logic          pio_done,
  input  logic [15:0]   pio_rdata,
  output logic          dma_start,
  output logic          dma_to_dev,
  output logic [23:0]   dma_words,
  input  logic          dma_done,
  input  logic          dma_wr_valid,
  input  logic [15:0]   dma_wr_data,
  output logic          dma_room,
  input  logic          dma_rd_en,
  output logic [15:0]   dma_rd_data,
  input  logic          intrq,
  // events
  output logic          ev_refused,     // pulse: a payload was refused
  output logic          ev_data_mode,   // pulse: a connection entered data mode
  output logic          ev_retx         // pulse: retransmission timeout
);
  import soe_pkg::*;
  localparam int WBUF_SECTORS = WBUF_BYTES / SECTOR_BYTES;
  localparam int QW = CW + $bits(soe_cmd_t);

  // ------------------------------------------------------------ state memory
  conn_state_t st_rd, st_wr;
  logic        st_we;
  logic [CW-1:0] st_wconn;
  state_memory #(.NCONN(NCONN)) u_state (
    .clk, .rst_n, .rd_conn(pl_conn), .rd_state(st_rd),
    .wr_en(st_we), .wr_conn(st_wconn), .wr_state(st_wr),
    .clr_en(cev_valid), .clr_conn(cev_conn));

  // ------------------------------------------------------------ parser
  logic     p_done, p_ok;
  soe_cmd_t p_cmd;
  logic [CW-1:0] p_conn;
  wire to_parser = pl_valid && st_rd.mode == MODE_CMD;
  cmd_parser u_parser (
    .clk, .rst_n, .in_valid(to_parser), .in_data(pl_data), .in_first(pl_first),
    .in_last(pl_last), .in_bad(pl_bad), .done(p_done), .ok(p_ok), .cmd(p_cmd));

  // ------------------------------------------------------------ command queue
  logic          q_push, q_full, q_pop, q_valid;
  logic [QW-1:0] q_out;
  logic [$clog2(CQ_DEPTH):0] q_level;
  command_queue #(.WIDTH(QW), .DEPTH(CQ_DEPTH)) u_queue (
    .clk, .rst_n, .push(q_push), .in_data({p_conn, p_cmd}), .full(q_full),
    .pop(q_pop), .out_data(q_out), .out_valid(q_valid), .level(q_level));

  // ------------------------------------------------------------ write buffer
  logic          wb_wr, wb_commit, wb_rewind, wb_overflow, wb_release;
  logic [WAW:0]  wb_committed;
  logic          wb_reserved, wb_complete, wb_abort;
  logic [CW-1:0] wb_owner;
  logic [16:0]   plen;
  wire to_wbuf = pl_valid && st_rd.mode == MODE_DATA;
  assign wb_wr = to_wbuf;
  write_buffer #(.BYTES(WBUF_BYTES)) u_wbuf (
    .clk, .rst_n, .wr_en(wb_wr), .wr_data(pl_data), .commit(wb_commit),
    .rewind(wb_rewind), .committed(wb_committed), .overflow(wb_overflow),
    .rd_en(dma_rd_en), .rd_data(dma_rd_data), .clear(wb_release));

  // a data-mode payload ends: keep it if it is whole and not more than expected
  wire [16:0] new_len   = pl_first ? 17'd1 : plen + 17'd1;
  wire        data_end  = to_wbuf && pl_last;
  wire        data_good = data_end && !pl_bad && new_len <= st_rd.remain;
  assign wb_commit = data_good;
  assign wb_rewind = data_end && !data_good;

  // a parsed command is accepted if the queue has room and, for a write, the
  // write buffer is free
  wire is_wr   = p_cmd.op == OP_WRITE && p_cmd.count <= 16'(WBUF_SECTORS);
  wire p_accept = p_done && !q_full && !(is_wr && wb_reserved);
  assign q_push = p_accept;

  always_comb begin
    st_we = 1'b0; st_wconn = pl_conn; st_wr = st_rd;
    if (data_good) begin
      st_we = 1'b1;
      st_wr.remain = st_rd.remain - new_len;
      if (st_rd.remain == new_len) st_wr.mode = MODE_CMD;
    end else if (p_accept && is_wr) begin
      st_we = 1'b1; st_wconn = p_conn;
      st_wr = '{mode: MODE_DATA, remain: 17'(p_cmd.count) * 17'(SECTOR_BYTES)};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plen <= '0; p_conn <= '0; vd_valid <= 1'b0; vd_ok <= 1'b0;
      wb_reserved <= 1'b0; wb_complete <= 1'b0; wb_abort <= 1'b0; wb_owner <= '0;
      ev_refused <= 1'b0; ev_data_mode <= 1'b0;
    end else begin
      vd_valid <= 1'b0; ev_refused <= 1'b0; ev_data_mode <= 1'b0;
      if (to_wbuf) plen <= new_len;
      if (to_parser && pl_last) p_conn <= pl_conn;
      if (data_end) begin
        vd_valid <= 1'b1; vd_ok <= data_good; ev_refused <= !data_good;
        if (data_good && st_rd.remain == new_len) wb_complete <= 1'b1;
      end
      if (p_done) begin
        vd_valid <= 1'b1; vd_ok <= p_accept; ev_refused <= !p_accept;
        if (p_accept && is_wr) begin
          wb_reserved <= 1'b1; wb_owner <= p_conn; wb_complete <= 1'b0;
          wb_abort <= 1'b0; ev_data_mode <= 1'b1;
        end
      end
      if (cev_valid && wb_reserved && cev_conn == wb_owner && !wb_complete)
        wb_abort <= 1'b1;
      if (wb_release) begin
        wb_reserved <= 1'b0; wb_complete <= 1'b0; wb_abort <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ executer
  soe_reply_t    reply;
  logic          reply_ready, rt_start, rt_done, ex_busy, ex_release;
  logic [CW-1:0] rt_conn, ex_conn;
  logic [15:0]   rt_ndata;
  command_executer #(.NCONN(NCONN), .WBUF_SECTORS(WBUF_SECTORS)) u_exec (
    .clk, .rst_n, .q_valid, .q_conn(q_out[QW-1 -: CW]), .q_cmd(soe_cmd_t'(q_out[$bits(soe_cmd_t)-1:0])),
    .q_pop, .wbuf_complete(wb_complete), .wbuf_abort(wb_abort), .wbuf_release(ex_release),
    .pio_req, .pio_we, .pio_addr, .pio_wdata, .pio_done, .pio_rdata,
    .dma_start, .dma_to_dev, .dma_words, .dma_done, .intrq,
    .rt_start, .rt_conn, .rt_ndata, .rt_done, .reply, .reply_ready,
    .busy(ex_busy), .cur_conn(ex_conn));
  assign wb_release = ex_release;

  // ------------------------------------------------------------ read FIFO and retransmission
  logic [RAW:0] rf_free, rf_avail, rf_level, rel_bytes, skip_bytes;
  logic         rel_valid, rewind, skip_valid, rf_rd, dq_is_reply, rt_busy;
  logic [7:0]   rf_data;
  read_fifo #(.BYTES(RFIFO_BYTES)) u_rfifo (
    .clk, .rst_n, .clear(1'b0), .wr_en(dma_wr_valid), .wr_data(dma_wr_data),
    .free_words(rf_free), .rd_en(rf_rd), .rd_data(rf_data), .avail(rf_avail),
    .level(rf_level), .rel_valid, .rel_bytes, .rewind, .skip_valid, .skip_bytes);
  assign dma_room = rf_free >= (RAW+1)'(8);

  retx_manager #(.NCONN(NCONN), .FIFO_BYTES(RFIFO_BYTES), .RTO_CYCLES(RTO_CYCLES)) u_retx (
    .clk, .rst_n, .start(rt_start), .start_conn(rt_conn), .start_ndata(rt_ndata),
    .reply_ready, .tx_idle, .fifo_level(rf_level), .conn_up, .cev_valid, .cev_open,
    .cev_conn, .ack_valid, .ack_conn, .ack_num, .dq_valid, .dq_conn, .dq_seq, .dq_len,
    .dq_is_reply, .dq_ready, .rel_valid, .rel_bytes, .rewind, .skip_valid, .skip_bytes,
    .done(rt_done), .busy(rt_busy), .ev_retx);

  // payload source of the packet being sent
  logic       sending_reply;
  logic [1:0] rix;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin sending_reply <= 1'b0; rix <= '0; end
    else if (dq_valid && dq_ready) begin sending_reply <= dq_is_reply; rix <= '0; end
    else if (dp_ready && sending_reply) rix <= rix + 2'd1;
  end
  wire [31:0] reply_w = reply;
  assign dp_data = sending_reply ? reply_w[31 - 8*rix -: 8] : rf_data;
  assign rf_rd   = dp_ready && !sending_reply;

endmodule
