// command_queue: queue of parsed commands waiting for the command executer.
//
// A plain synchronous FIFO of WIDTH-bit entries (connection identifier and
// command).  push writes in_data when not full; pop removes the head, which
// is always visible on out_data while out_valid.  A push and a pop may happen
// in the same clock.  The design says commands wait here until the executer
// is idle; the depth is this design's choice.
module command_queue #(
  parameter int WIDTH = 88,
  parameter int DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] in_data,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  output logic [$clog2(DEPTH):0] level
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;

  wire do_push = push && !full;
  wire do_pop  = pop && out_valid;

  assign full      = (level == ($clog2(DEPTH)+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign out_data  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; level <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_push) begin
        mem[wp] <= in_data;
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (do_pop) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      level <= level + {{$clog2(DEPTH){1'b0}}, do_push} - {{$clog2(DEPTH){1'b0}}, do_pop};
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full || pop);
endmodule
