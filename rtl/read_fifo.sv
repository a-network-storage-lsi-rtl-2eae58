// read_fifo: 2 KB FIFO for data read from the disk.
//
// The DMA engine writes 16-bit words (bits 7:0 are the earlier byte); the
// transmit side reads bytes.  Besides the write pointer and the send pointer
// the FIFO keeps a base pointer at the oldest byte not yet acknowledged by the
// host: sending does not free space, an acknowledgement does (rel_valid with
// rel_bytes moves the base forward), and rewind moves the send pointer back to
// the base so that unacknowledged packets can be sent again.  skip_valid
// moves the send pointer forward without sending (used to discard data of a
// connection that has closed).  level is the number of bytes held from the
// base on, avail the number not yet sent, free_words the room for writes.
// The 2 KB size is the design's; keeping data until it is acknowledged is
// this design's way of giving the retransmission manager something to resend.
module read_fifo #(
  parameter int BYTES = 2048,      // power of two
  localparam int AW = $clog2(BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  // word side (DMA engine)
  input  logic        wr_en,
  input  logic [15:0] wr_data,
  output logic [AW:0] free_words,
  // byte side (transmitter)
  input  logic        rd_en,
  output logic [7:0]  rd_data,
  output logic [AW:0] avail,
  output logic [AW:0] level,
  // retransmission control
  input  logic        rel_valid,
  input  logic [AW:0] rel_bytes,
  input  logic        rewind,
  input  logic        skip_valid,
  input  logic [AW:0] skip_bytes
);
  logic [7:0]  mem [BYTES];
  logic [AW:0] wp, rp, bp;

  assign level      = wp - bp;
  assign avail      = wp - rp;
  assign free_words = ((AW+1)'(BYTES) - level) >> 1;
  assign rd_data    = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[wp[AW-1:0]]        <= wr_data[7:0];
      mem[wp[AW-1:0] + 1'b1] <= wr_data[15:8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; bp <= '0;
    end else if (clear) begin
      wp <= '0; rp <= '0; bp <= '0;
    end else begin
      if (wr_en) wp <= wp + (AW+1)'(2);
      if (rel_valid) bp <= bp + rel_bytes;
      if (rewind)          rp <= rel_valid ? bp + rel_bytes : bp;
      else if (skip_valid) rp <= rp + skip_bytes;
      else if (rd_en)      rp <= rp + 1'b1;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> free_words != '0);
endmodule
