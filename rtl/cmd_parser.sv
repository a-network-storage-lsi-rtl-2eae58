// cmd_parser: parser of the command processing engine.
//
// In command mode every received payload is a command.  The parser collects
// the payload bytes (first byte first) into a soe_cmd_t and checks it when
// the last byte arrives: exactly CMD_BYTES bytes, a known operation, and a
// non-zero sector count for the data-moving operations.  One clock after the
// last byte, 'done' pulses with the command; a command that fails the check
// comes out with op = OP_INVALID so that the executer can answer it with an
// error reply.  The command format is this design's own; the design says only
// that payloads in command mode go to the parser for analysis.
module cmd_parser (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [7:0]        in_data,
  input  logic              in_first,
  input  logic              in_last,
  input  logic              in_bad,
  output logic              done,
  output logic              ok,
  output soe_pkg::soe_cmd_t cmd
);
  import soe_pkg::*;
  logic [CMD_BYTES*8-1:0] sh;
  logic [3:0]             n;       // bytes seen, saturating
  logic [CMD_BYTES*8-1:0] nsh;
  logic [3:0]             nn;
  soe_cmd_t               c;
  logic                   good;

  always_comb begin
    nsh  = in_first ? {{(CMD_BYTES*8-8){1'b0}}, in_data} : {sh[CMD_BYTES*8-9:0], in_data};
    nn   = in_first ? 4'd1 : ((n == 4'hF) ? n : n + 4'd1);
    c    = soe_cmd_t'(nsh);
    good = !in_bad && nn == 4'(CMD_BYTES) &&
           (c.op == OP_NODATA ||
            ((c.op == OP_READ || c.op == OP_WRITE) && c.count != 16'd0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; n <= '0; done <= 1'b0; ok <= 1'b0; cmd <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        sh <= nsh;
        n  <= nn;
        if (in_last) begin
          done <= 1'b1;
          ok   <= good;
          cmd  <= c;
          if (!good) cmd.op <= OP_INVALID;
        end
      end
    end
  end
endmodule
