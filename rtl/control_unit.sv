// control_unit: main decoder of the single-cycle and pipelined processors.
// From the 6-bit opcode it produces the datapath controls of the control-unit
// table: RegDst, ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branche
// (beq), BranchNe (bne), ALUOp and Jump. addi, which the table omits, is
// decoded like lw without the memory read (add with the immediate, write rt).
// The table gives beq ALUOp0 = 0 while the ALU-control table gives beq
// ALUOp = 01; beq is decoded as 01 (subtract) so that Zero is an equality
// test. Don't-care entries are driven to 0 so an unknown opcode does nothing;
// `illegal` flags such an opcode. Purely combinational.
module control_unit
  import mips_pkg::*;
(
  input  logic [5:0] opcode,
  output logic       reg_dst,
  output logic       alu_src,
  output logic       mem_to_reg,
  output logic       reg_write,
  output logic       mem_read,
  output logic       mem_write,
  output logic       branch_eq,
  output logic       branch_ne,
  output aluop_e     aluop,
  output logic       jump,
  output logic       illegal
);
  always_comb begin
    reg_dst    = 1'b0;
    alu_src    = 1'b0;
    mem_to_reg = 1'b0;
    reg_write  = 1'b0;
    mem_read   = 1'b0;
    mem_write  = 1'b0;
    branch_eq  = 1'b0;
    branch_ne  = 1'b0;
    aluop      = ALUOP_ADD;
    jump       = 1'b0;
    illegal    = 1'b0;
    unique case (opcode)
      OP_RTYPE: begin reg_dst = 1'b1; reg_write = 1'b1; aluop = ALUOP_FUNCT; end
      OP_LW:    begin alu_src = 1'b1; mem_to_reg = 1'b1; reg_write = 1'b1; mem_read = 1'b1; end
      OP_SW:    begin alu_src = 1'b1; mem_write = 1'b1; end
      OP_ADDI:  begin alu_src = 1'b1; reg_write = 1'b1; end
      OP_BEQ:   begin branch_eq = 1'b1; aluop = ALUOP_SUB; end
      OP_BNE:   begin branch_ne = 1'b1; aluop = ALUOP_SUB; end
      OP_J:     jump = 1'b1;
      default:  illegal = 1'b1;
    endcase
  end
endmodule
