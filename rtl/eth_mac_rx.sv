// eth_mac_rx: receive half of the gigabit Ethernet MAC.
//
// Takes GMII bytes (one per 125 MHz clock), strips the preamble and the start
// frame delimiter, checks the frame check sequence and hands on only frames
// whose FCS is right, without the FCS, as a byte stream.  Frames are stored
// whole before they are released (store and forward): bytes go into a ring
// buffer at a tentative write pointer that is committed when the FCS checks
// and rewound when it does not, when GMII flags an error, when the frame is
// shorter than MIN_BYTES or when the buffer runs full.  The four bytes last
// received are held back in a shift register, so the FCS never enters the
// buffer; the byte before it is written with its 'last' mark set.
//
// Output: out_data/out_last valid while out_valid; a byte is taken on
// out_valid && out_ready.  Latency from the last FCS byte to the first output
// byte is two clocks.  The MAC is named by the design; its insides are this
// design's own.
module eth_mac_rx #(
  parameter int BUF_BYTES = 4096,   // power of two
  parameter int MIN_BYTES = 18      // header plus FCS of the shortest frame kept
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] gmii_rxd,
  input  logic       gmii_rx_dv,
  input  logic       gmii_rx_er,
  output logic [7:0] out_data,
  output logic       out_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic       frame_good,    // pulse: a frame was accepted
  output logic       frame_bad      // pulse: a frame was dropped
);
  import soe_pkg::*;
  localparam int AW = $clog2(BUF_BYTES);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_DATA, S_DROP} st_e;
  st_e st;

  logic [8:0]    mem [BUF_BYTES];        // {last, data}
  logic [AW:0]   wr_ptr, commit_ptr, rd_ptr;
  logic [31:0]   crc;
  logic [7:0]    sh [4];                 // bytes held back (possible FCS)
  logic [2:0]    sh_cnt;
  logic [7:0]    pend;                   // next byte to be written
  logic          pend_v;
  logic [15:0]   nbytes;
  logic          err;

  wire full = (wr_ptr - commit_ptr) >= (AW+1)'(BUF_BYTES) ||
              (wr_ptr - rd_ptr) >= (AW+1)'(BUF_BYTES);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; wr_ptr <= '0; commit_ptr <= '0; crc <= '1;
      sh_cnt <= '0; pend_v <= 1'b0; pend <= '0; nbytes <= '0; err <= 1'b0;
      frame_good <= 1'b0; frame_bad <= 1'b0;
      for (int i = 0; i < 4; i++) sh[i] <= '0;
    end else begin
      frame_good <= 1'b0;
      frame_bad  <= 1'b0;
      unique case (st)
        S_IDLE: if (gmii_rx_dv) st <= (gmii_rxd == 8'h55) ? S_PRE : S_DROP;
        S_PRE: begin
          if (!gmii_rx_dv) st <= S_IDLE;
          else if (gmii_rxd == 8'hD5) begin
            st <= S_DATA; crc <= '1; sh_cnt <= '0; pend_v <= 1'b0;
            nbytes <= '0; err <= 1'b0; wr_ptr <= commit_ptr;
          end else if (gmii_rxd != 8'h55) st <= S_DROP;
        end
        S_DATA: begin
          if (gmii_rx_dv) begin
            crc    <= crc32_byte(crc, gmii_rxd);
            nbytes <= nbytes + 16'd1;
            if (gmii_rx_er) err <= 1'b1;
            sh[0] <= gmii_rxd; sh[1] <= sh[0]; sh[2] <= sh[1]; sh[3] <= sh[2];
            if (sh_cnt != 3'd4) sh_cnt <= sh_cnt + 3'd1;
            else begin
              // sh[3] leaves the hold-back register: it is frame data
              if (pend_v) begin
                if (full) err <= 1'b1;
                else begin
                  mem[wr_ptr[AW-1:0]] <= {1'b0, pend};
                  wr_ptr <= wr_ptr + 1'b1;
                end
              end
              pend   <= sh[3];
              pend_v <= 1'b1;
            end
          end else begin
            // end of frame: sh[] holds the FCS, pend is the last data byte
            if (!err && pend_v && !full && crc == CRC_RESIDUE &&
                nbytes >= 16'(MIN_BYTES)) begin
              mem[wr_ptr[AW-1:0]] <= {1'b1, pend};
              commit_ptr <= wr_ptr + 1'b1;
              wr_ptr     <= wr_ptr + 1'b1;
              frame_good <= 1'b1;
            end else begin
              wr_ptr    <= commit_ptr;
              frame_bad <= 1'b1;
            end
            st <= S_IDLE;
          end
        end
        S_DROP: if (!gmii_rx_dv) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // read side: only committed frames are visible
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_ptr <= '0;
    else if (out_valid && out_ready) rd_ptr <= rd_ptr + 1'b1;
  end

  assign out_valid = (rd_ptr != commit_ptr);
  assign {out_last, out_data} = mem[rd_ptr[AW-1:0]];

endmodule
