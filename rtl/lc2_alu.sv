// lc2_alu: the LC-2 arithmetic and logic unit.
//
// Three operations cover the arithmetic/logic instruction class: ADD
// (y = a + b, modulo 2^W), AND (bitwise) and NOT (y = ~a, b ignored). Any
// logic function can be built from AND and NOT, and subtraction from NOT and
// ADD. The operation set is the instruction set's; the structure (one adder,
// one AND array, one inverter and a select) is this design's choice.
// Purely combinational: y is valid in the same cycle as op, a and b.
module lc2_alu
  import lc2_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_AND: y = a & b;
      ALU_NOT: y = ~a;
      default: y = a + b;
    endcase
  end

endmodule
