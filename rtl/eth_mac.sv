// eth_mac: gigabit Ethernet MAC controller of the SoEDC.
//
// Joins the GMII receiver (preamble strip, FCS check, store-and-forward
// buffer that drops bad frames) and the GMII transmitter (preamble, padding,
// FCS, inter-frame gap).  Both sides run on the 125 MHz clock, one byte per
// clock, which is the 1 Gb/s line rate.  The client side is a pair of byte
// streams with valid/ready/last.  The design names this block; how it works
// inside is this design's own choice.
module eth_mac #(
  parameter int RX_BUF_BYTES = 4096,
  parameter int IFG_BYTES    = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  // GMII
  input  logic [7:0] gmii_rxd,
  input  logic       gmii_rx_dv,
  input  logic       gmii_rx_er,
  output logic [7:0] gmii_txd,
  output logic       gmii_tx_en,
  output logic       gmii_tx_er,
  // received frames (from destination MAC to end of payload/padding)
  output logic [7:0] rx_data,
  output logic       rx_last,
  output logic       rx_valid,
  input  logic       rx_ready,
  // frames to send (from destination MAC to end of payload)
  input  logic [7:0] tx_data,
  input  logic       tx_last,
  input  logic       tx_valid,
  output logic       tx_ready,
  output logic       rx_frame_good,
  output logic       rx_frame_bad
);
  eth_mac_rx #(.BUF_BYTES(RX_BUF_BYTES)) u_rx (
    .clk, .rst_n, .gmii_rxd, .gmii_rx_dv, .gmii_rx_er,
    .out_data(rx_data), .out_last(rx_last), .out_valid(rx_valid), .out_ready(rx_ready),
    .frame_good(rx_frame_good), .frame_bad(rx_frame_bad));

  eth_mac_tx #(.IFG_BYTES(IFG_BYTES)) u_tx (
    .clk, .rst_n, .in_data(tx_data), .in_last(tx_last), .in_valid(tx_valid),
    .in_ready(tx_ready), .gmii_txd, .gmii_tx_en, .gmii_tx_er);
endmodule
