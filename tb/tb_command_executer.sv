// tb_command_executer: checks the command executer against behavioural
// stand-ins for its neighbours.
//
// The bench answers PIO requests after a random delay (recording every
// register write, and returning a chosen Status and Error on reads), ends a
// DMA transfer after a random delay and then raises the device interrupt,
// and acknowledges each reply after a random delay like the retransmission
// manager.  For each command it checks, against values worked out from the
// command alone: the seven task-file writes in order (Features, Count, LBA
// low, mid, high, Device with LBA 27:24, Command); the DMA word count and
// direction; the number of sectors given to the retransmission manager; the
// reply {op, status, error, code}; that a write waits for its data; and that
// the write buffer is released after a write that held it, but not after
// one refused as too long.  Commands: READ
// DMA, a command without data, WRITE DMA, a malformed command, a write longer
// than the buffer, a write whose connection closes, and a read that ends
// with an error status.
module tb_command_executer;
  timeunit 1ns; timeprecision 1ps;
  import soe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #4 clk = !clk;

  logic q_valid = 0, q_pop, wbuf_complete = 0, wbuf_abort = 0, wbuf_release;
  logic [1:0] q_conn = 0, rt_conn, cur_conn;
  soe_cmd_t q_cmd = '0;
  logic pio_req, pio_we, pio_done = 0, dma_start, dma_to_dev, dma_done = 0, intrq = 0;
  ata_addr_t pio_addr;
  logic [15:0] pio_wdata, pio_rdata = 0, rt_ndata;
  logic [23:0] dma_words;
  logic rt_start, rt_done = 0, reply_ready, busy;
  soe_reply_t reply;

  command_executer #(.NCONN(4), .WBUF_SECTORS(128)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- PIO stand-in
  typedef struct packed {ata_addr_t a; logic [7:0] d;} wr_t;
  wr_t wrs[$];
  int  n_reads = 0;
  logic [7:0] dev_status = 8'h50, dev_error = 8'h00;
  initial begin
    forever begin
      @(posedge clk iff (rst_n && pio_req));
      if (pio_we) wrs.push_back('{a: pio_addr, d: pio_wdata[7:0]});
      else n_reads++;
      pio_rdata = (pio_addr == ATA_CMD) ? {8'h00, dev_status} :
                   (pio_addr == ATA_FEAT) ? {8'h00, dev_error} : 16'h0;
      repeat (2 + $urandom % 5) @(negedge clk);
      pio_done = 1;
      @(negedge clk);
      pio_done = 0;
    end
  end

  // ---------------------------------------------------------------- DMA stand-in
  int n_dma = 0;
  logic [23:0] last_words;
  logic last_dir;
  initial begin
    forever begin
      @(posedge clk iff (rst_n && dma_start));
      n_dma++; last_words = dma_words; last_dir = dma_to_dev;
      repeat (10 + $urandom % 20) @(negedge clk);
      dma_done = 1;
      @(negedge clk);
      dma_done = 0;
    end
  end

  // The stand-ins drive their outputs at the falling clock edge.
  // the device interrupt follows the end of every command on the bus
  always @(posedge clk) begin
    if (rst_n && pio_req && pio_we && pio_addr == ATA_CMD && q_cmd.op == OP_NODATA) intrq <= 1;
    if (rst_n && dma_done) intrq <= 1;
    if (rst_n && pio_req && !pio_we && pio_addr == ATA_CMD) intrq <= 0;
  end

  // ---------------------------------------------------------------- retransmission stand-in
  int n_rt = 0, n_rel = 0, n_ack = 0;
  logic [15:0] last_ndata;
  initial begin
    forever begin
      @(posedge clk iff (rst_n && reply_ready));
      repeat (5 + $urandom % 10) @(negedge clk);
      rt_done = 1;
      @(negedge clk);
      rt_done = 0;
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (rt_done) n_ack++;
    if (rt_start) begin n_rt++; last_ndata <= rt_ndata; end
    if (wbuf_release) n_rel++;
  end

  // ---------------------------------------------------------------- one command
  task automatic run(input soe_cmd_t c, input bit expect_tf, input logic [7:0] code,
                     input string what);
    int t;
    wr_t exp[$];
    int dma0, rel0, ack0;
    wrs.delete(); dma0 = n_dma; rel0 = n_rel; ack0 = n_ack;
    @(negedge clk);
    q_cmd = c; q_conn = 2'($urandom); q_valid = 1;
    @(posedge clk iff q_pop);
    @(negedge clk); q_valid = 0;
    if (c.op == OP_WRITE && code == 8'h00) begin
      repeat (40) @(negedge clk);
      check(wrs.size() == 0, {what, ": write waits for its data"});
      wbuf_complete = 1;
    end
    if (c.op == OP_WRITE && code == 8'h03) begin
      repeat (10) @(negedge clk);
      wbuf_abort = 1;
    end
    t = 0;
    while (n_ack == ack0 && t < 5000) begin @(negedge clk); t++; end
    wbuf_complete = 0; wbuf_abort = 0;
    check(t < 5000, {what, ": reply acknowledged"});
    check(reply == '{op: c.op, status: (expect_tf ? dev_status : 8'h00),
                     error: (expect_tf ? dev_error : 8'h00), code: code},
          $sformatf("%s: reply %h", what, reply));
    if (expect_tf) begin
      exp = '{'{a: ATA_FEAT, d: c.features}, '{a: ATA_COUNT, d: c.count[7:0]},
              '{a: ATA_LBA_LO, d: c.lba[7:0]}, '{a: ATA_LBA_MID, d: c.lba[15:8]},
              '{a: ATA_LBA_HI, d: c.lba[23:16]}, '{a: ATA_DEVICE, d: {c.device[7:4], c.lba[27:24]}},
              '{a: ATA_CMD, d: c.command}};
      check(wrs == exp, {what, ": task file written in order"});
    end else check(wrs.size() == 0, {what, ": disk not touched"});
    if (expect_tf && c.op != OP_NODATA)
      check(n_dma == dma0 + 1 && last_words == 24'(c.count) * 256 && last_dir == (c.op == OP_WRITE),
            {what, ": DMA length and direction"});
    else check(n_dma == dma0, {what, ": no DMA"});
    check(last_ndata == ((c.op == OP_READ) ? c.count : 16'd0), {what, ": sectors to send"});
    repeat (3) @(negedge clk);
    check(n_rel == rel0 + ((c.op == OP_WRITE && code != 8'h02) ? 1 : 0),
          {what, ": write buffer release"});
    check(!busy, {what, ": idle again"});
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    run('{op: OP_READ, features: 8'h00, count: 16'd3, lba: 32'h0ABC_DEF1, device: 8'hE0,
          command: 8'hC8}, 1, 8'h00, "READ DMA");
    run('{op: OP_NODATA, features: 8'h00, count: 16'd0, lba: 32'h0, device: 8'hE0,
          command: 8'hE7}, 1, 8'h00, "FLUSH CACHE");
    run('{op: OP_WRITE, features: 8'h00, count: 16'd128, lba: 32'h0012_3456, device: 8'hE0,
          command: 8'hCA}, 1, 8'h00, "WRITE DMA");
    run('{op: OP_INVALID, features: 8'h00, count: 16'd1, lba: 32'h0, device: 8'hE0,
          command: 8'hC8}, 0, 8'h01, "malformed");
    run('{op: OP_WRITE, features: 8'h00, count: 16'd129, lba: 32'h0, device: 8'hE0,
          command: 8'hCA}, 0, 8'h02, "too long");
    run('{op: OP_WRITE, features: 8'h00, count: 16'd4, lba: 32'h0, device: 8'hE0,
          command: 8'hCA}, 0, 8'h03, "connection closed");
    dev_status = 8'h51; dev_error = 8'h04;
    run('{op: OP_READ, features: 8'h5A, count: 16'd1, lba: 32'h0FFF_FFFF, device: 8'hE0,
          command: 8'hC8}, 1, 8'h00, "READ DMA with error");
    check(n_rt == 7, "retransmission manager started once per command");
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
