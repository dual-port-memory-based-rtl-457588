// pu_alu: the arithmetic and logic unit of a processing unit.
//
// Purely combinational. It takes the opcode and the two 32-bit arguments read
// from data memory and produces the 32-bit result and the two comparison
// flags. Data are 32-bit two's complement fixed-point numbers. The operation
// set (addition, subtraction, multiplication, shifts, logic operations and
// comparison) follows the source description. The choices of this design
// are: MUL keeps the low 32 bits of the product and MULH the high 32 bits of
// the signed 64-bit product (so two Q1.31 numbers multiply to a Q1.31 result
// shifted right by one), shift counts come from the low 5 bits of argument B,
// and CMP produces zero = (a == b) and neg = (a < b, signed).
module pu_alu
  import dsp_pkg::*;
(
  input  opcode_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    zero,
  output logic    neg
);

  logic signed [63:0] prod;

  assign prod = $signed(a) * $signed(b);
  assign zero = (a == b);
  assign neg  = ($signed(a) < $signed(b));

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_MUL:  y = prod[31:0];
      OP_MULH: y = prod[63:32];
      OP_AND:  y = a & b;
      OP_OR:   y = a | b;
      OP_XOR:  y = a ^ b;
      OP_SHL:  y = a << b[4:0];
      OP_SHR:  y = a >> b[4:0];
      OP_SRA:  y = word_t'($signed(a) >>> b[4:0]);
      OP_MOV:  y = a;
      default: y = '0;
    endcase
  end

endmodule
