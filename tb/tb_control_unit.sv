// tb_control_unit: checks the decoder against the control-unit table for
// R-format, lw, sw, beq, bne, jump and addi, and that every other opcode is
// flagged illegal with no write enables.
module tb_control_unit;
  import mips_pkg::*;
  logic [5:0] opcode;
  logic reg_dst, alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch_eq, branch_ne, jump, illegal;
  aluop_e aluop;
  int checks = 0, failures = 0;
  control_unit dut (.*);
  // expected {RegDst, ALUSrc, MemtoReg, RegWrite, MemRead, MemWrite, Branche, BranchNe, ALUOp[1:0], Jmp}
  task automatic t(logic [5:0] op, logic [10:0] e, logic [10:0] care);
    logic [10:0] got;
    opcode = op; #1;
    got = {reg_dst, alu_src, mem_to_reg, reg_write, mem_read, mem_write, branch_eq, branch_ne, aluop, jump};
    checks++;
    if ((got & care) !== (e & care) || illegal) begin
      failures++; $display("FAIL op %0d got %b exp %b", op, got, e);
    end
  endtask
  initial begin
    t(6'd0,  11'b1_0_0_1_0_0_0_0_10_0, 11'b111_1111_1111);
    t(6'd35, 11'b0_1_1_1_1_0_0_0_00_0, 11'b111_1111_1111);
    t(6'd43, 11'b0_1_0_0_0_1_0_0_00_0, 11'b010_1111_1111);
    t(6'd4,  11'b0_0_0_0_0_0_1_0_01_0, 11'b010_1111_1111);
    t(6'd5,  11'b0_0_0_0_0_0_0_1_01_0, 11'b010_1111_1111);
    t(6'd2,  11'b0_0_0_0_0_0_0_0_00_1, 11'b000_1011_0001);
    t(6'd8,  11'b0_1_0_1_0_0_0_0_00_0, 11'b111_1111_1111);
    for (int op = 0; op < 64; op++) begin
      if (!(op inside {0, 2, 4, 5, 8, 35, 43})) begin
        opcode = 6'(op); #1;
        checks++;
        if (!illegal || reg_write || mem_write) begin failures++; $display("FAIL illegal op %0d", op); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
