// alu: arithmetic logic unit.
//
// Operates on two W-bit operands (register A and register B) and performs
// the arithmetic or logic operation the ALU control selects: add, subtract,
// and, or, xor, nor and set-on-less-than (signed). Zero is high when the
// result is all zeros; a branch uses it after a subtraction. The operation
// list beyond "arithmetic or logic" is this design's choice.
//
// Interface: a, b, op in; y, zero out. Purely combinational.
module alu
  import risc8_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      op,
  output logic [W-1:0] y,
  output logic         zero
);
  always_comb begin
    unique case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_ADD: y = a + b;
      ALU_XOR: y = a ^ b;
      ALU_SUB: y = a - b;
      ALU_SLT: y = W'($signed(a) < $signed(b));
      ALU_NOR: y = ~(a | b);
      default: y = a + b;
    endcase
  end

  assign zero = (y == '0);

endmodule
