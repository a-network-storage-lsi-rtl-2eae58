// command_executer: command executer of the command processing engine.
//
// Takes one command at a time from the command queue and runs it on the disk
// through the ATA/ATAPI controller:
//   1. starts the retransmission manager for the command (sectors to send for
//      a read, none otherwise);
//   2. for a write, waits until the write buffer holds all of its data;
//   3. writes the task file with PIO cycles: Features, Sector Count, LBA low,
//      LBA mid, LBA high, Device (with LBA bits 27:24) and last Command;
//   4. for a read or a write, lets the DMA engine move count*256 words
//      between the disk and the read FIFO or write buffer;
//   5. waits for the device's interrupt, reads Status and Error with PIO
//      cycles and fills the reply register;
//   6. waits until the retransmission manager reports the reply
//      acknowledged, frees the write buffer after a write, and takes the
//      next command.
// A malformed command, or a write longer than the write buffer, is answered
// with an error reply without touching the disk.  The design states that the
// executer runs queued commands by controlling the ATA/ATAPI controller; the
// sequence above is the standard ATA DMA protocol, and the reply contents are
// this design's own.
module command_executer #(
  parameter int NCONN        = 4,
  parameter int WBUF_SECTORS = 128,
  localparam int CW = (NCONN > 1) ? $clog2(NCONN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // command queue
  input  logic              q_valid,
  input  logic [CW-1:0]     q_conn,
  input  soe_pkg::soe_cmd_t q_cmd,
  output logic              q_pop,
  // write buffer
  input  logic              wbuf_complete,
  input  logic              wbuf_abort,     // the writing connection closed
  output logic              wbuf_release,
  // PIO engine
  output logic              pio_req,
  output logic              pio_we,
  output soe_pkg::ata_addr_t pio_addr,
  output logic [15:0]       pio_wdata,
  input  logic              pio_done,
  input  logic [15:0]       pio_rdata,
  // DMA engine
  output logic              dma_start,
  output logic              dma_to_dev,
  output logic [23:0]       dma_words,
  input  logic              dma_done,
  input  logic              intrq,
  // retransmission manager
  output logic              rt_start,
  output logic [CW-1:0]     rt_conn,
  output logic [15:0]       rt_ndata,
  input  logic              rt_done,
  // reply
  output soe_pkg::soe_reply_t reply,
  output logic              reply_ready,
  output logic              busy,
  output logic [CW-1:0]     cur_conn
);
  import soe_pkg::*;
  typedef enum logic [3:0] {
    E_IDLE, E_WAIT_DATA, E_TF, E_DMA, E_IRQ, E_STAT, E_ERR, E_REPLY
  } st_e;
  st_e st;
  soe_cmd_t cmd;
  logic [2:0] step;
  logic       pio_busy;

  wire too_long = (cmd.op == OP_WRITE) && (cmd.count > 16'(WBUF_SECTORS));

  assign busy     = (st != E_IDLE);
  assign cur_conn = rt_conn;
  assign q_pop    = (st == E_IDLE) && q_valid;

  // task file register for each step of E_TF
  always_comb begin
    unique case (step)
      3'd0:    begin pio_addr = ATA_FEAT;    pio_wdata = {8'h00, cmd.features}; end
      3'd1:    begin pio_addr = ATA_COUNT;   pio_wdata = {8'h00, cmd.count[7:0]}; end
      3'd2:    begin pio_addr = ATA_LBA_LO;  pio_wdata = {8'h00, cmd.lba[7:0]}; end
      3'd3:    begin pio_addr = ATA_LBA_MID; pio_wdata = {8'h00, cmd.lba[15:8]}; end
      3'd4:    begin pio_addr = ATA_LBA_HI;  pio_wdata = {8'h00, cmd.lba[23:16]}; end
      3'd5:    begin pio_addr = ATA_DEVICE;  pio_wdata = {8'h00, cmd.device[7:4], cmd.lba[27:24]}; end
      default: begin pio_addr = ATA_CMD;     pio_wdata = {8'h00, cmd.command}; end
    endcase
    if (st == E_STAT) pio_addr = ATA_CMD;      // Status register
    if (st == E_ERR)  pio_addr = ATA_FEAT;     // Error register
  end
  assign pio_we  = (st == E_TF);
  assign pio_req = (st == E_TF || st == E_STAT || st == E_ERR) && !pio_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; cmd <= '0; step <= '0; pio_busy <= 1'b0;
      dma_start <= 1'b0; dma_to_dev <= 1'b0; dma_words <= '0;
      rt_start <= 1'b0; rt_conn <= '0; rt_ndata <= '0;
      reply <= '0; reply_ready <= 1'b0; wbuf_release <= 1'b0;
    end else begin
      dma_start <= 1'b0; rt_start <= 1'b0; wbuf_release <= 1'b0;
      if (pio_req)  pio_busy <= 1'b1;
      if (pio_done) pio_busy <= 1'b0;
      unique case (st)
        E_IDLE: if (q_valid) begin
          cmd <= q_cmd; rt_conn <= q_conn; step <= '0;
          rt_start <= 1'b1;
          rt_ndata <= (q_cmd.op == OP_READ) ? q_cmd.count : 16'd0;
          reply <= '{op: q_cmd.op, status: 8'h00, error: 8'h00, code: 8'h00};
          if (q_cmd.op == OP_INVALID) begin
            reply.code <= 8'h01; reply_ready <= 1'b1; st <= E_REPLY;
          end else if (q_cmd.op == OP_WRITE) st <= E_WAIT_DATA;
          else st <= E_TF;
        end
        E_WAIT_DATA: begin
          if (too_long) begin
            reply.code <= 8'h02; reply_ready <= 1'b1; st <= E_REPLY;
          end else if (wbuf_abort) begin
            reply.code <= 8'h03; reply_ready <= 1'b1; st <= E_REPLY;
          end else if (wbuf_complete) st <= E_TF;
        end
        E_TF: if (pio_done) begin
          step <= step + 3'd1;
          if (step == 3'd6) begin
            if (cmd.op == OP_NODATA) st <= E_IRQ;
            else begin
              st <= E_DMA; dma_start <= 1'b1;
              dma_to_dev <= (cmd.op == OP_WRITE);
              dma_words  <= {cmd.count, 8'h00};      // count * 256 words
            end
          end
        end
        E_DMA: if (dma_done) st <= E_IRQ;
        E_IRQ: if (intrq) st <= E_STAT;
        E_STAT: if (pio_done) begin reply.status <= pio_rdata[7:0]; st <= E_ERR; end
        E_ERR: if (pio_done) begin
          reply.error <= pio_rdata[7:0]; reply_ready <= 1'b1; st <= E_REPLY;
        end
        E_REPLY: if (rt_done) begin
          reply_ready <= 1'b0; st <= E_IDLE;
          if (cmd.op == OP_WRITE && !too_long) wbuf_release <= 1'b1;
        end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
