// soe_pkg: types and constants shared by the Storage-over-Ethernet disk
// controller (SoEDC).
//
// The LeanTCP header layout follows the protocol header drawing of the design:
// destination MAC, source MAC, Eth-type, Size, D-port, S-port, TYPE,
// SEQ-number and ACK-number, in that order, drawn on 32-bit rows.  The MAC
// addresses are the usual 48 bits; every other field takes half a row, i.e.
// 16 bits, so the header is 26 bytes long and is sent most significant byte
// first.  The Eth-type value, the TYPE codes, the command payload format and
// the reply format are this design's own choices.
package soe_pkg;

  // ---------------------------------------------------------------- LeanTCP
  localparam logic [15:0] ETHERTYPE_SOE = 16'h88B5;  // IEEE local experimental
  localparam int          HDR_BYTES     = 26;
  localparam int          MAX_PAYLOAD   = 1500;

  typedef enum logic [15:0] {
    LT_SYN    = 16'd1,   // host asks for a connection
    LT_SYNACK = 16'd2,   // device grants it
    LT_FIN    = 16'd3,   // host closes the connection
    LT_FINACK = 16'd4,   // device confirms the close
    LT_DATA   = 16'd5,   // carries a payload (command, write data, read data, reply)
    LT_ACK    = 16'd6    // acknowledgement only
  } lt_type_e;

  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [15:0] eth_type;
    logic [15:0] size;      // payload bytes after the header
    logic [15:0] dport;
    logic [15:0] sport;
    logic [15:0] ltype;
    logic [15:0] seq;       // packet sequence number
    logic [15:0] ack;       // next sequence number expected from the peer
  } lt_hdr_t;               // 208 bits = HDR_BYTES bytes

  // ---------------------------------------------------------------- commands
  localparam int SECTOR_BYTES = 512;
  localparam int CMD_BYTES    = 10;
  localparam int REPLY_BYTES  = 4;

  typedef enum logic [7:0] {
    OP_INVALID = 8'h00,     // malformed command: answered with an error reply
    OP_READ    = 8'h01,     // ATA data-in command using DMA (device -> host)
    OP_WRITE   = 8'h02,     // ATA data-out command using DMA (host -> device)
    OP_NODATA  = 8'h03      // ATA command without data transfer
  } soe_op_e;

  // Command payload, 10 bytes, first byte first: the host's driver supplies
  // the whole ATA task file, so any ATA command code can be issued.
  typedef struct packed {
    soe_op_e     op;
    logic [7:0]  features;
    logic [15:0] count;     // sectors; the low byte goes to the task file
    logic [31:0] lba;       // bits 27:0 used (28-bit LBA)
    logic [7:0]  device;
    logic [7:0]  command;   // ATA command code, e.g. C8h READ DMA, CAh WRITE DMA
  } soe_cmd_t;

  typedef struct packed {
    logic [7:0] op;
    logic [7:0] status;     // ATA status register after the command
    logic [7:0] error;      // ATA error register after the command
    logic [7:0] code;       // 00h done, 01h malformed command, 02h longer than the write buffer,
                            // 03h connection closed before the write data arrived
  } soe_reply_t;

  // ---------------------------------------------------------------- per-connection state
  typedef enum logic {MODE_CMD = 1'b0, MODE_DATA = 1'b1} cpe_mode_e;
  typedef struct packed {
    cpe_mode_e   mode;
    logic [16:0] remain;    // write-data bytes still expected in data mode
  } conn_state_t;

  // ---------------------------------------------------------------- ATA
  // PIO register address: {cs1 selected, cs0 selected, DA[2:0]}
  typedef struct packed {
    logic       cs1;
    logic       cs0;
    logic [2:0] da;
  } ata_addr_t;

  localparam ata_addr_t ATA_DATA    = '{cs1: 1'b0, cs0: 1'b1, da: 3'd0};
  localparam ata_addr_t ATA_FEAT    = '{cs1: 1'b0, cs0: 1'b1, da: 3'd1};  // error on read
  localparam ata_addr_t ATA_COUNT   = '{cs1: 1'b0, cs0: 1'b1, da: 3'd2};
  localparam ata_addr_t ATA_LBA_LO  = '{cs1: 1'b0, cs0: 1'b1, da: 3'd3};
  localparam ata_addr_t ATA_LBA_MID = '{cs1: 1'b0, cs0: 1'b1, da: 3'd4};
  localparam ata_addr_t ATA_LBA_HI  = '{cs1: 1'b0, cs0: 1'b1, da: 3'd5};
  localparam ata_addr_t ATA_DEVICE  = '{cs1: 1'b0, cs0: 1'b1, da: 3'd6};
  localparam ata_addr_t ATA_CMD     = '{cs1: 1'b0, cs0: 1'b1, da: 3'd7};  // status on read
  localparam ata_addr_t ATA_ALTSTAT = '{cs1: 1'b1, cs0: 1'b0, da: 3'd6};

  // ---------------------------------------------------------------- CRC-32
  // IEEE 802.3 CRC, reflected form (polynomial EDB88320h), one byte per call.
  // Start from FFFFFFFFh; the FCS is the complement sent low byte first.  Run
  // over a frame including its FCS the register ends at DEBB20E3h.
  localparam logic [31:0] CRC_RESIDUE = 32'hDEBB20E3;

  function automatic logic [31:0] crc32_byte(input logic [31:0] crc, input logic [7:0] d);
    logic [31:0] c;
    c = crc ^ {24'd0, d};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

  // Ultra DMA CRC: polynomial x^16+x^12+x^5+1, seeded with 4ABAh, one 16-bit
  // data word per call, bit 15 first.
  localparam logic [15:0] UDMA_CRC_INIT = 16'h4ABA;

  function automatic logic [15:0] udma_crc_word(input logic [15:0] crc, input logic [15:0] w);
    logic [15:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--)
      c = (c[15] ^ w[i]) ? ((c << 1) ^ 16'h1021) : (c << 1);
    return c;
  endfunction

endpackage
