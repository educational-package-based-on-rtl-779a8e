// alu_control: turns the 2-bit ALUOp from the main control and the 6-bit
// funct field of the instruction into the 4-bit ALU operation code.
// ALUOp 00 (lw, sw, addi) gives add, 01 (beq, bne) gives subtract, 10
// (R-type) decodes funct: add, sub, and, or, nor, slt and the one-bit shifts
// sll (funct 1) and srl (funct 62). The codes follow the ALU-control table.
// An unknown funct, including the all-zero no-op word, gives AND, whose
// result is discarded because it can only target register $0 (this choice is
// the design's own). Purely combinational.
module alu_control
  import mips_pkg::*;
(
  input  aluop_e      aluop,
  input  logic [5:0]  funct,
  output aluctl_e     ctl
);
  always_comb begin
    unique case (aluop)
      ALUOP_ADD: ctl = ALU_ADD;
      ALUOP_SUB: ctl = ALU_SUB;
      default: begin
        unique case (funct)
          FN_ADD:  ctl = ALU_ADD;
          FN_SUB:  ctl = ALU_SUB;
          FN_AND:  ctl = ALU_AND;
          FN_OR:   ctl = ALU_OR;
          FN_NOR:  ctl = ALU_NOR;
          FN_SLT:  ctl = ALU_SLT;
          FN_SLL:  ctl = ALU_SLL;
          FN_SRL:  ctl = ALU_SRL;
          default: ctl = ALU_AND;
        endcase
      end
    endcase
  end
endmodule
