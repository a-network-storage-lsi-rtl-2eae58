// write_buffer: 64 KB buffer for data on its way to the disk.
//
// In data mode the command processing engine writes the payload bytes of a
// write command here, one byte per clock, at a tentative write pointer.  When
// the payload turns out to be good the bytes are committed; when the packet is
// refused they are rewound, so a retransmitted packet lands in the same place.
// The DMA engine then reads the data as 16-bit ATA words, even byte in bits
// 7:0, through a read pointer that advances on rd_en; rd_data always shows the
// word at the read pointer.  clear empties the buffer for the next write
// command.  The storage is two byte-wide banks (even and odd addresses).
// The 64 KB size is the design's; the commit/rewind scheme and the word order
// are this design's own.
module write_buffer #(
  parameter int BYTES = 65536,     // power of two
  localparam int AW = $clog2(BYTES)
) (
  input  logic        clk,
  input  logic        rst_n,
  // byte side (network)
  input  logic        wr_en,
  input  logic [7:0]  wr_data,
  input  logic        commit,
  input  logic        rewind,
  output logic [AW:0] committed,     // bytes committed
  output logic        overflow,      // a byte was refused since the last clear
  // word side (DMA engine)
  input  logic        rd_en,
  output logic [15:0] rd_data,
  input  logic        clear
);
  logic [7:0]    bank_lo [BYTES/2];
  logic [7:0]    bank_hi [BYTES/2];
  logic [AW:0]   wp, cp;
  logic [AW-1:0] rp;                 // word index

  wire room = (wp != (AW+1)'(BYTES));

  always_ff @(posedge clk) begin
    if (wr_en && room) begin
      if (wp[0]) bank_hi[wp[AW-1:1]] <= wr_data;
      else       bank_lo[wp[AW-1:1]] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; cp <= '0; rp <= '0; overflow <= 1'b0;
    end else if (clear) begin
      wp <= '0; cp <= '0; rp <= '0; overflow <= 1'b0;
    end else begin
      if (wr_en) begin
        if (room) wp <= wp + 1'b1;
        else      overflow <= 1'b1;
      end
      if (commit)      cp <= wr_en && room ? wp + 1'b1 : wp;
      else if (rewind) wp <= cp;
      if (rd_en) rp <= rp + 1'b1;
    end
  end

  assign committed = cp;
  assign rd_data   = {bank_hi[rp[AW-2:0]], bank_lo[rp[AW-2:0]]};
endmodule
