// pu_stack: the return-address stack of a processing unit.
//
// A last-in first-out store of DEPTH entries (16 in the source description)
// that makes procedure calls possible: CALL pushes the return address and RET
// pops it. One push or one pop per cycle; the popped value is available
// combinationally on top while the stack is not empty, and the pointer moves
// at the clock edge. A push onto a full stack or a pop from an empty stack
// is refused (the stack is left unchanged) and reported on overflow or
// underflow in the same cycle; the unit turns that into a processing error.
// That error behaviour and the register implementation are this design's
// choices.
module pu_stack #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 9,
  localparam int unsigned PW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic             full,
  output logic             overflow,
  output logic             underflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp;   // number of entries held
  logic [PW-1:0]    sp_m1;

  assign sp_m1     = sp - PW'(1);

  assign empty     = (sp == '0);
  assign full      = (sp == PW'(DEPTH));
  assign overflow  = push && full;
  assign underflow = pop && empty;
  assign top       = empty ? '0 : mem[sp_m1[$clog2(DEPTH)-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      sp <= '0;
    end else if (push && !full) begin
      mem[sp[$clog2(DEPTH)-1:0]] <= din;
      sp <= sp + PW'(1);
    end else if (pop && !empty) begin
      sp <= sp - PW'(1);
    end
  end

  // The unit never pushes and pops in the same cycle.
  always_ff @(posedge clk)
    if (!rst) a_push_pop_exclusive: assert (!(push && pop));

endmodule
