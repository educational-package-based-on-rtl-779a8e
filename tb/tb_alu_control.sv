// tb_alu_control: checks every row of the ALU-control table: ALUOp 00 and
// 01 for any funct, and each R-type funct under ALUOp 10.
module tb_alu_control;
  import mips_pkg::*;
  aluop_e aluop;
  logic [5:0] funct;
  aluctl_e ctl;
  int checks = 0, failures = 0;
  alu_control dut (.aluop, .funct, .ctl);
  task automatic t(aluop_e o, logic [5:0] f, logic [3:0] e);
    aluop = o; funct = f; #1;
    checks++;
    if (ctl !== e) begin failures++; $display("FAIL aluop=%b funct=%0d got %b exp %b", o, f, ctl, e); end
  endtask
  initial begin
    for (int f = 0; f < 64; f++) begin
      t(ALUOP_ADD, 6'(f), 4'b0010);
      t(ALUOP_SUB, 6'(f), 4'b0110);
    end
    t(ALUOP_FUNCT, 6'b100000, 4'b0010);
    t(ALUOP_FUNCT, 6'b100010, 4'b0110);
    t(ALUOP_FUNCT, 6'b100100, 4'b0000);
    t(ALUOP_FUNCT, 6'b100101, 4'b0001);
    t(ALUOP_FUNCT, 6'b100111, 4'b1100);
    t(ALUOP_FUNCT, 6'b101010, 4'b0111);
    t(ALUOP_FUNCT, 6'b000001, 4'b0011);
    t(ALUOP_FUNCT, 6'b111110, 4'b0100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
