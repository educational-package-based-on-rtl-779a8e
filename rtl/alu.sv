// alu: the 32-bit arithmetic-logic unit shared by all three processor
// versions. Operations, selected by the 4-bit ALU control code: and, or, add,
// subtract, set-on-less-than (signed), nor, and one-bit logical shifts of
// operand a left or right (the instruction set replaces MIPS' variable shift
// by a shift of exactly one bit). Zero is high when the result is zero; the
// branches use it after a subtract. No overflow detection, as in the
// document's processors. Purely combinational.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  aluctl_e     ctl,
  output logic [31:0] result,
  output logic        zero
);
  always_comb begin
    unique case (ctl)
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_SLT: result = {31'b0, $signed(a) < $signed(b)};
      ALU_NOR: result = ~(a | b);
      ALU_SLL: result = {a[30:0], 1'b0};
      ALU_SRL: result = {1'b0, a[31:1]};
      default: result = '0;
    endcase
  end
  assign zero = (result == 32'b0);
endmodule
