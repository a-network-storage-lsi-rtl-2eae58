// ata_controller: ATA/ATAPI host controller of the SoEDC.
//
// Holds the PIO engine, used for task-file register cycles, and the DMA
// engine, used for Ultra DMA data transfers, and shares the ATA pins between
// them: while the DMA engine is busy it owns DIOR-, DIOW- and DD, otherwise
// the PIO engine does.  DMACK- comes only from the DMA engine, CS0-/CS1-/DA
// only from the PIO engine (negated while it is idle).  The device's reset
// line follows the chip reset.  The split into a PIO and a DMA engine is the
// design's; the pin sharing is the usual ATA host arrangement.
module ata_controller #(
  parameter int T_SETUP     = 4,
  parameter int T_ACTIVE    = 9,
  parameter int T_RECOVER   = 3,
  parameter int STROBE_CLKS = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // register cycles
  input  logic               pio_req,
  input  logic               pio_we,
  input  soe_pkg::ata_addr_t pio_addr,
  input  logic [15:0]        pio_wdata,
  output logic               pio_done,
  output logic [15:0]        pio_rdata,
  // data transfers
  input  logic               dma_start,
  input  logic               dma_to_dev,
  input  logic [23:0]        dma_words,
  output logic               dma_done,
  output logic               dma_wr_valid,
  output logic [15:0]        dma_wr_data,
  input  logic               dma_room,
  output logic               dma_rd_en,
  input  logic [15:0]        dma_rd_data,
  output logic               intrq_out,
  output logic [15:0]        dma_crc,      // Ultra DMA CRC of the last burst
  // ATA pins
  output logic               ata_reset_n,
  output logic [15:0]        dd_out,
  output logic               dd_oe,
  input  logic [15:0]        dd_in,
  output logic [2:0]         da,
  output logic               cs0_n,
  output logic               cs1_n,
  output logic               dior_n,
  output logic               diow_n,
  input  logic               iordy,
  input  logic               dmarq,
  output logic               dmack_n,
  input  logic               intrq
);
  logic        p_dior_n, p_diow_n, p_dd_oe, p_busy;
  logic [15:0] p_dd_out;
  logic        d_dior_n, d_diow_n, d_dd_oe, d_busy;
  logic [15:0] d_dd_out;
  logic        irq_s1, irq_s2;

  pio_engine #(.T_SETUP(T_SETUP), .T_ACTIVE(T_ACTIVE), .T_RECOVER(T_RECOVER)) u_pio (
    .clk, .rst_n, .req(pio_req), .we(pio_we), .addr(pio_addr), .wdata(pio_wdata),
    .done(pio_done), .rdata(pio_rdata), .busy(p_busy),
    .da, .cs0_n, .cs1_n, .dior_n(p_dior_n), .diow_n(p_diow_n),
    .dd_out(p_dd_out), .dd_oe(p_dd_oe), .dd_in);

  dma_engine #(.STROBE_CLKS(STROBE_CLKS)) u_dma (
    .clk, .rst_n, .start(dma_start), .to_dev(dma_to_dev), .words(dma_words),
    .done(dma_done), .busy(d_busy), .wr_valid(dma_wr_valid), .wr_data(dma_wr_data),
    .room(dma_room), .rd_en(dma_rd_en), .rd_data(dma_rd_data),
    .dmarq, .dmack_n, .dior_n(d_dior_n), .diow_n(d_diow_n), .iordy,
    .dd_out(d_dd_out), .dd_oe(d_dd_oe), .dd_in, .crc(dma_crc));

  assign dior_n = d_busy ? d_dior_n : p_dior_n;
  assign diow_n = d_busy ? d_diow_n : p_diow_n;
  assign dd_out = d_busy ? d_dd_out : p_dd_out;
  assign dd_oe  = d_busy ? d_dd_oe  : p_dd_oe;

  // INTRQ is asynchronous to the chip clock
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin irq_s1 <= 1'b0; irq_s2 <= 1'b0; ata_reset_n <= 1'b0; end
    else begin irq_s1 <= intrq; irq_s2 <= irq_s1; ata_reset_n <= 1'b1; end
  end
  assign intrq_out = irq_s2;

  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) !(p_busy && d_busy));
endmodule
