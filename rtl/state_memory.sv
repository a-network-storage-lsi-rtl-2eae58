// state_memory: per-connection state of the command processing engine.
//
// One entry per LeanTCP connection identifier holds the operation mode
// (command mode or data mode) and, in data mode, the number of write-data
// bytes still expected.  The engine reads the entry of the connection whose
// payload arrives (combinational read) and writes it back when the payload is
// done.  Opening or closing a connection puts its entry back in command mode;
// that clear wins over a write to the same entry in the same clock.  The two
// modes are the design's; the byte count and the clear are this design's.
module state_memory #(
  parameter int NCONN = 4,
  localparam int CW = (NCONN > 1) ? $clog2(NCONN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CW-1:0]        rd_conn,
  output soe_pkg::conn_state_t rd_state,
  input  logic                 wr_en,
  input  logic [CW-1:0]        wr_conn,
  input  soe_pkg::conn_state_t wr_state,
  input  logic                 clr_en,
  input  logic [CW-1:0]        clr_conn
);
  import soe_pkg::*;
  conn_state_t mem [NCONN];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCONN; i++) mem[i] <= '{mode: MODE_CMD, remain: '0};
    end else begin
      if (wr_en) mem[wr_conn] <= wr_state;
      if (clr_en) mem[clr_conn] <= '{mode: MODE_CMD, remain: '0};
    end
  end

  assign rd_state = mem[rd_conn];
endmodule
