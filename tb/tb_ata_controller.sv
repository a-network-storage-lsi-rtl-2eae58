// tb_ata_controller: drives the ATA controller like the command executer does
// and checks the result on the disk model: the task file for READ DMA of
// 3 sectors, the Ultra DMA burst into the host, INTRQ, the Status read that
// clears it; then WRITE DMA of 2 sectors from a host buffer and a second read
// that must return the written words.  The disk model also checks the burst
// CRC.  PIO and DMA must never drive the bus at the same time.
module tb_ata_controller;
  timeunit 1ns; timeprecision 1ps;
  import soe_pkg::*;
  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;

  logic pio_req = 0, pio_we = 0, pio_done, dma_start = 0, dma_to_dev = 0, dma_done;
  ata_addr_t pio_addr = '0;
  logic [15:0] pio_wdata = 0, pio_rdata, dma_wr_data, dma_rd_data, dma_crc;
  logic [23:0] dma_words = 0;
  logic dma_wr_valid, dma_room = 1, dma_rd_en, intrq_out;
  logic ata_reset_n, dd_oe, cs0_n, cs1_n, dior_n, diow_n, iordy, dmarq, dmack_n, intrq;
  logic [15:0] dd_out, dd_in;
  logic [2:0] da;

  ata_controller dut (.*);

  int n_cmds, n_win, n_wout, n_crc_ok, n_crc_bad;
  logic [7:0] last_cmd;
  ata_disk_model #(.SECTORS(16)) disk (.clk, .reset_n(ata_reset_n), .dd_from_host(dd_out),
    .dd_host_oe(dd_oe), .dd_to_host(dd_in), .da, .cs0_n, .cs1_n, .dior_n, .diow_n, .iordy,
    .dmarq, .dmack_n, .intrq, .n_cmds, .n_words_in(n_win), .n_words_out(n_wout),
    .n_crc_ok, .n_crc_bad, .last_cmd);

  int checks = 0, failures = 0;
  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] got[$], src[$];
  int src_i = 0;
  always @(posedge clk) if (rst_n && dma_wr_valid) got.push_back(dma_wr_data);
  always @(posedge clk) if (rst_n && dma_rd_en) src_i <= src_i + 1;
  assign dma_rd_data = (src_i < src.size()) ? src[src_i] : 16'h0;

  task automatic reg_cycle(input bit w, input ata_addr_t a, input logic [15:0] d,
                           output logic [15:0] r);
    @(negedge clk); pio_req = 1; pio_we = w; pio_addr = a; pio_wdata = d;
    @(negedge clk); pio_req = 0;
    @(posedge clk iff pio_done);
    r = pio_rdata;
  endtask

  task automatic command(input logic [7:0] code, input int lba, input int cnt, input bit out);
    logic [15:0] r;
    reg_cycle(1, ATA_FEAT, 16'h0, r);
    reg_cycle(1, ATA_COUNT, 16'(cnt), r);
    reg_cycle(1, ATA_LBA_LO, 16'(lba & 255), r);
    reg_cycle(1, ATA_LBA_MID, 16'((lba >> 8) & 255), r);
    reg_cycle(1, ATA_LBA_HI, 16'((lba >> 16) & 255), r);
    reg_cycle(1, ATA_DEVICE, 16'hE0, r);
    reg_cycle(1, ATA_CMD, {8'h00, code}, r);
    @(negedge clk); dma_start = 1; dma_to_dev = out; dma_words = 24'(cnt * 256);
    @(negedge clk); dma_start = 0;
    @(posedge clk iff dma_done);
    @(posedge clk iff intrq_out);
    reg_cycle(0, ATA_CMD, 16'h0, r);
    check(r[7:0] == 8'h50, $sformatf("status %02x after %02x", r[7:0], code));
    repeat (4) @(posedge clk);
    check(!intrq_out, "status read clears INTRQ");
  endtask

  function automatic logic [15:0] pattern(input int lba, input int w);
    return 16'((lba * 16'h0101) ^ (w * 3) ^ 16'h5A00);
  endfunction

  always @(posedge clk) if (rst_n && dd_oe && !dmack_n && !(dut.u_dma.busy)) begin
    failures++; $display("FAIL: PIO drove DD during DMA");
  end

  initial begin
    int bad;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (3) @(posedge clk);
    check(ata_reset_n, "device reset released");
    command(8'hC8, 5, 3, 0);
    bad = 0;
    for (int i = 0; i < 768; i++) if (got[i] != pattern(5 + i / 256, i % 256)) bad++;
    check(got.size() == 768 && bad == 0, $sformatf("READ DMA: %0d words, %0d wrong", got.size(), bad));
    for (int i = 0; i < 512; i++) src.push_back(16'($urandom));
    command(8'hCA, 9, 2, 1);
    check(n_win == 512, "WRITE DMA: 512 words taken by the disk");
    got.delete();
    command(8'hC8, 9, 2, 0);
    check(got == src, "written sectors read back");
    check(n_crc_ok == 3 && n_crc_bad == 0, "burst CRCs match");
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
