// soedc_top: Storage-over-Ethernet disk controller (SoEDC).
//
// A single-chip bridge that lets remote hosts use an ATA disk over gigabit
// Ethernet without a file server in between: the hosts run the file system
// and send raw block commands; the chip only carries them to the disk.  The
// chain, all on one 125 MHz clock, is
//   GMII <-> eth_mac <-> protocol_engine (LeanTCP) <->
//   command_processing_engine <-> ata_controller <-> ATA device.
// The Ethernet PHY and the ATA device are outside the chip; their signals are
// the ports of this module.  The ATA data bus is split into dd_in, dd_out and
// dd_oe; a bidirectional pad joins them outside.  my_mac and my_port are the
// station address and the LeanTCP port the chip answers on.
module soedc_top #(
  parameter int NCONN        = 4,
  parameter int WBUF_BYTES   = 65536,
  parameter int RFIFO_BYTES  = 2048,
  parameter int CQ_DEPTH     = 4,
  parameter int RX_BUF_BYTES = 4096,
  parameter int RTO_CYCLES   = 125000,
  parameter int PIO_T_SETUP   = 4,
  parameter int PIO_T_ACTIVE  = 9,
  parameter int PIO_T_RECOVER = 3,
  parameter int UDMA_STROBE_CLKS = 2
) (
  input  logic        clk,            // 125 MHz
  input  logic        rst_n,
  input  logic [47:0] my_mac,
  input  logic [15:0] my_port,
  // GMII to the Ethernet PHY
  input  logic [7:0]  gmii_rxd,
  input  logic        gmii_rx_dv,
  input  logic        gmii_rx_er,
  output logic [7:0]  gmii_txd,
  output logic        gmii_tx_en,
  output logic        gmii_tx_er,
  // ATA/ATAPI device
  output logic        ata_reset_n,
  output logic [15:0] ata_dd_out,
  output logic        ata_dd_oe,
  input  logic [15:0] ata_dd_in,
  output logic [2:0]  ata_da,
  output logic        ata_cs0_n,
  output logic        ata_cs1_n,
  output logic        ata_dior_n,
  output logic        ata_diow_n,
  input  logic        ata_iordy,
  input  logic        ata_dmarq,
  output logic        ata_dmack_n,
  input  logic        ata_intrq,
  // status
  output logic [NCONN-1:0] conn_up,
  output logic [15:0] udma_crc,
  output logic [7:0]  events       // one-clock event pulses, see below
);
  localparam int CW = (NCONN > 1) ? $clog2(NCONN) : 1;

  // MAC <-> protocol engine
  logic [7:0] rx_data, tx_data;
  logic       rx_last, rx_valid, rx_ready, tx_last, tx_valid, tx_ready;
  logic       rx_good, rx_bad;
  // protocol engine <-> command processing engine
  logic          pl_valid, pl_first, pl_last, pl_bad, vd_valid, vd_ok;
  logic [7:0]    pl_data, dp_data;
  logic [CW-1:0] pl_conn, ack_conn, cev_conn, dq_conn;
  logic          ack_valid, cev_valid, cev_open, dq_valid, dq_ready, dp_ready;
  logic [15:0]   ack_num, dq_seq, dq_len;
  logic          ev_dropped, ev_dup, ev_refused, ev_data_mode, ev_retx;
  // command processing engine <-> ATA controller
  logic               pio_req, pio_we, pio_done, dma_start, dma_to_dev, dma_done;
  soe_pkg::ata_addr_t pio_addr;
  logic [15:0]        pio_wdata, pio_rdata, dma_wr_data, dma_rd_data;
  logic [23:0]        dma_words;
  logic               dma_wr_valid, dma_room, dma_rd_en, intrq;

  eth_mac #(.RX_BUF_BYTES(RX_BUF_BYTES)) u_mac (
    .clk, .rst_n, .gmii_rxd, .gmii_rx_dv, .gmii_rx_er, .gmii_txd, .gmii_tx_en, .gmii_tx_er,
    .rx_data, .rx_last, .rx_valid, .rx_ready, .tx_data, .tx_last, .tx_valid, .tx_ready,
    .rx_frame_good(rx_good), .rx_frame_bad(rx_bad));

  protocol_engine #(.NCONN(NCONN)) u_pe (
    .clk, .rst_n, .my_mac, .my_port,
    .rx_data, .rx_last, .rx_valid, .rx_ready, .tx_data, .tx_last, .tx_valid, .tx_ready,
    .pl_valid, .pl_data, .pl_first, .pl_last, .pl_bad, .pl_conn, .vd_valid, .vd_ok,
    .ack_valid, .ack_conn, .ack_num, .cev_valid, .cev_open, .cev_conn,
    .dq_valid, .dq_conn, .dq_seq, .dq_len, .dq_ready, .dp_data, .dp_ready,
    .conn_up, .ev_dropped, .ev_dup);

  command_processing_engine #(
    .NCONN(NCONN), .WBUF_BYTES(WBUF_BYTES), .RFIFO_BYTES(RFIFO_BYTES),
    .CQ_DEPTH(CQ_DEPTH), .RTO_CYCLES(RTO_CYCLES)
  ) u_cpe (
    .clk, .rst_n, .pl_valid, .pl_data, .pl_first, .pl_last, .pl_bad, .pl_conn,
    .vd_valid, .vd_ok, .ack_valid, .ack_conn, .ack_num, .cev_valid, .cev_open, .cev_conn,
    .conn_up, .tx_idle(!tx_valid), .dq_valid, .dq_conn, .dq_seq, .dq_len, .dq_ready,
    .dp_data, .dp_ready,
    .pio_req, .pio_we, .pio_addr, .pio_wdata, .pio_done, .pio_rdata,
    .dma_start, .dma_to_dev, .dma_words, .dma_done, .dma_wr_valid, .dma_wr_data,
    .dma_room, .dma_rd_en, .dma_rd_data, .intrq,
    .ev_refused, .ev_data_mode, .ev_retx);

  ata_controller #(
    .T_SETUP(PIO_T_SETUP), .T_ACTIVE(PIO_T_ACTIVE), .T_RECOVER(PIO_T_RECOVER),
    .STROBE_CLKS(UDMA_STROBE_CLKS)
  ) u_ata (
    .clk, .rst_n, .pio_req, .pio_we, .pio_addr, .pio_wdata, .pio_done, .pio_rdata,
    .dma_start, .dma_to_dev, .dma_words, .dma_done, .dma_wr_valid, .dma_wr_data,
    .dma_room, .dma_rd_en, .dma_rd_data, .intrq_out(intrq), .dma_crc(udma_crc),
    .ata_reset_n, .dd_out(ata_dd_out), .dd_oe(ata_dd_oe), .dd_in(ata_dd_in),
    .da(ata_da), .cs0_n(ata_cs0_n), .cs1_n(ata_cs1_n), .dior_n(ata_dior_n),
    .diow_n(ata_diow_n), .iordy(ata_iordy), .dmarq(ata_dmarq), .dmack_n(ata_dmack_n),
    .intrq(ata_intrq));

  // events: 0 good frame, 1 bad frame dropped by the MAC, 2 invalid packet
  // dropped, 3 duplicate/out-of-order packet, 4 payload refused, 5 data mode
  // entered, 6 retransmission timeout, 7 connection opened
  assign events = {cev_valid && cev_open, ev_retx, ev_data_mode, ev_refused,
                   ev_dup, ev_dropped, rx_bad, rx_good};
endmodule
