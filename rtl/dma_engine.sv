// dma_engine: Ultra DMA engine of the ATA/ATAPI controller.
//
// Moves 'words' 16-bit words between the disk and the chip's buffers using
// the Ultra DMA signalling, in which the ATA control lines take new meanings
// while DMACK- is asserted:
//   DIOW- -> STOP (host), DIOR- -> HDMARDY- (reading) or HSTROBE (writing),
//   IORDY -> DSTROBE (reading) or DDMARDY- (writing).
// Reading (to_dev = 0): after DMARQ the engine asserts DMACK-, negates STOP
// and asserts HDMARDY- while the read FIFO has room ('room').  Every edge of
// DSTROBE carries one word; DSTROBE and DD pass through a two-flop
// synchroniser and the word is taken when the synchronised strobe changes.
// Writing (to_dev = 1): once DDMARDY- is asserted the engine puts a word from
// the write buffer on DD and toggles HSTROBE STROBE_CLKS-1 clocks later, so a
// word leaves every STROBE_CLKS clocks (2 clocks = 16 ns = 125 MB/s at
// 125 MHz, close to UDMA mode 6, 133 MB/s; STROBE_CLKS must be at least 2,
// as the write buffer's read pointer is advanced in the clock after a word is
// put on DD).  The device pauses the host by
// negating DDMARDY-.
// After the last word the engine asserts STOP (and negates HDMARDY-), waits
// for DMARQ to fall, negates DMACK- and drives the CRC of the burst's words on
// DD for CRC_CLKS clocks; done pulses at the end.  The device may also end a
// burst early by negating DMARQ: the engine then asserts STOP, closes the
// burst with its CRC in the same way and waits for DMARQ again to move the
// remaining words in a new burst (a fresh CRC per burst).  The design names
// the DMA engine and its UDMA-133 reach; the timing, the synchroniser and the
// CRC bit order are this design's own, following the Ultra DMA protocol.
module dma_engine #(
  parameter int STROBE_CLKS = 2,
  parameter int CRC_CLKS    = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        to_dev,
  input  logic [23:0] words,
  output logic        done,
  output logic        busy,
  // read FIFO (words from the disk)
  output logic        wr_valid,
  output logic [15:0] wr_data,
  input  logic        room,
  // write buffer (words to the disk)
  output logic        rd_en,
  input  logic [15:0] rd_data,
  // ATA pins
  input  logic        dmarq,
  output logic        dmack_n,
  output logic        dior_n,      // HDMARDY- / HSTROBE
  output logic        diow_n,      // STOP
  input  logic        iordy,       // DSTROBE / DDMARDY-
  output logic [15:0] dd_out,
  output logic        dd_oe,
  input  logic [15:0] dd_in,
  output logic [15:0] crc
);
  import soe_pkg::*;
  typedef enum logic [2:0] {D_IDLE, D_WAIT_RQ, D_IN, D_OUT, D_END, D_CRC} st_e;
  st_e st;
  logic        dir_out;
  logic [23:0] total, cnt;
  logic [3:0]  ph;
  logic        rq_s1, rq_s2, io_s1, io_s2, io_s3;
  logic [15:0] dd_s1, dd_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_s1 <= 1'b0; rq_s2 <= 1'b0; io_s1 <= 1'b1; io_s2 <= 1'b1; io_s3 <= 1'b1;
      dd_s1 <= '0; dd_s2 <= '0;
    end else begin
      rq_s1 <= dmarq; rq_s2 <= rq_s1;
      io_s1 <= iordy; io_s2 <= io_s1; io_s3 <= io_s2;
      dd_s1 <= dd_in; dd_s2 <= dd_s1;
    end
  end

  assign busy = (st != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; dir_out <= 1'b0; total <= '0; cnt <= '0; ph <= '0;
      done <= 1'b0; wr_valid <= 1'b0; wr_data <= '0; rd_en <= 1'b0;
      dmack_n <= 1'b1; dior_n <= 1'b1; diow_n <= 1'b1; dd_out <= '0; dd_oe <= 1'b0;
      crc <= UDMA_CRC_INIT;
    end else begin
      done <= 1'b0; wr_valid <= 1'b0; rd_en <= 1'b0;
      unique case (st)
        D_IDLE: if (start) begin
          st <= D_WAIT_RQ; dir_out <= to_dev; total <= words; cnt <= '0;
          ph <= '0; crc <= UDMA_CRC_INIT;
        end
        D_WAIT_RQ: if (rq_s2) begin
          dmack_n <= 1'b0; diow_n <= 1'b0;          // STOP negated
          crc <= UDMA_CRC_INIT;
          st <= dir_out ? D_OUT : D_IN;
        end
        D_IN: begin
          dior_n <= !room;                          // HDMARDY-
          if (io_s2 != io_s3) begin
            wr_valid <= 1'b1; wr_data <= dd_s2;
            crc <= udma_crc_word(crc, dd_s2);
            cnt <= cnt + 24'd1;
            if (cnt + 24'd1 == total) begin
              st <= D_END; diow_n <= 1'b1; dior_n <= 1'b1;
            end
          end else if (!rq_s2) begin                // device ends the burst
            st <= D_END; diow_n <= 1'b1; dior_n <= 1'b1;
          end
        end
        D_OUT: begin
          if (ph == 4'd0) begin
            if (cnt == total || !rq_s2) begin st <= D_END; diow_n <= 1'b1; end
            else if (!io_s2) begin                  // DDMARDY- asserted
              dd_out <= rd_data; dd_oe <= 1'b1; ph <= 4'd1;
              rd_en  <= 1'b1;                       // advance to the next word
            end
          end else if (ph == 4'(STROBE_CLKS - 1)) begin
            dior_n <= !dior_n;                      // HSTROBE edge
            crc    <= udma_crc_word(crc, dd_out);
            cnt    <= cnt + 24'd1;
            ph     <= '0;
          end else ph <= ph + 4'd1;
        end
        D_END: if (!rq_s2) begin
          dmack_n <= 1'b1; dior_n <= 1'b1;
          dd_out <= crc; dd_oe <= 1'b1; ph <= '0; st <= D_CRC;
        end
        D_CRC: begin
          ph <= ph + 4'd1;
          if (ph == 4'(CRC_CLKS - 1)) begin
            dd_oe <= 1'b0; ph <= '0;
            if (cnt == total) begin st <= D_IDLE; done <= 1'b1; end
            else st <= D_WAIT_RQ;                   // more words: next burst
          end
        end
        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
