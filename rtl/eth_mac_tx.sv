// eth_mac_tx: transmit half of the gigabit Ethernet MAC.
//
// Sends a frame on GMII, one byte per clock: seven preamble bytes (55h), the
// start frame delimiter (D5h), the frame bytes taken from the input stream,
// zero padding up to 60 bytes, the FCS (complemented CRC-32, low byte first)
// and an inter-frame gap of IFG_BYTES idle clocks.  The stream source must
// present a byte on every clock once the first byte of a frame has been taken
// (in_ready is high for the whole data phase); an assertion checks this.
// The MAC is named by the design; its insides are this design's own.
module eth_mac_tx #(
  parameter int IFG_BYTES = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] in_data,
  input  logic       in_last,
  input  logic       in_valid,
  output logic       in_ready,
  output logic [7:0] gmii_txd,
  output logic       gmii_tx_en,
  output logic       gmii_tx_er
);
  import soe_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_DATA, S_PAD, S_FCS, S_IFG} st_e;
  st_e st;
  logic [3:0]  cnt;
  logic [15:0] nbytes;
  logic [31:0] crc;

  assign in_ready   = (st == S_DATA);
  assign gmii_tx_er = 1'b0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cnt <= '0; nbytes <= '0; crc <= '1;
      gmii_txd <= '0; gmii_tx_en <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: begin
          gmii_tx_en <= 1'b0; gmii_txd <= '0;
          if (in_valid) begin
            st <= S_PRE; cnt <= '0;
            gmii_tx_en <= 1'b1; gmii_txd <= 8'h55;
          end
        end
        S_PRE: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd6) begin
            gmii_txd <= 8'hD5;
            st <= S_DATA; nbytes <= '0; crc <= '1;
          end else gmii_txd <= 8'h55;
        end
        S_DATA: begin
          gmii_txd <= in_data;
          crc      <= crc32_byte(crc, in_data);
          nbytes   <= nbytes + 16'd1;
          if (in_last) begin
            cnt <= '0;
            st  <= (nbytes + 16'd1 < 16'd60) ? S_PAD : S_FCS;
          end
        end
        S_PAD: begin
          gmii_txd <= 8'h00;
          crc      <= crc32_byte(crc, 8'h00);
          nbytes   <= nbytes + 16'd1;
          if (nbytes + 16'd1 == 16'd60) st <= S_FCS;
        end
        S_FCS: begin
          gmii_txd <= ~crc[7:0];
          crc      <= {8'h00, crc[31:8]};
          cnt      <= cnt + 4'd1;
          if (cnt == 4'd3) begin st <= S_IFG; cnt <= '0; end
        end
        S_IFG: begin
          gmii_tx_en <= 1'b0; gmii_txd <= '0;
          cnt <= cnt + 4'd1;
          if (cnt == 4'(IFG_BYTES - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // the source keeps a frame going without gaps
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    in_ready |-> in_valid);

endmodule
