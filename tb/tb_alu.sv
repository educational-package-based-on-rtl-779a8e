// tb_alu: drives the ALU with random and corner operands for every
// operation and compares with a reference computed in the testbench,
// including the Zero flag and signed set-on-less-than.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y, exp;
  aluctl_e ctl;
  logic zero;
  int checks = 0, failures = 0;
  alu dut (.a, .b, .ctl, .result(y), .zero);
  aluctl_e ops[8] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT, ALU_NOR, ALU_SLL, ALU_SRL};
  function automatic logic [31:0] ref_of(aluctl_e c, logic [31:0] x, logic [31:0] z);
    case (c)
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_SLT: return (int'(x) < int'(z)) ? 1 : 0;
      ALU_NOR: return ~(x | z);
      ALU_SLL: return x * 2;
      ALU_SRL: return x / 2;
      default: return 0;
    endcase
  endfunction
  initial begin
    for (int n = 0; n < 400; n++) begin
      a = (n < 8) ? 32'h8000_0000 >> n : $urandom;
      b = (n % 5 == 0) ? a : $urandom;
      if (n % 7 == 0) b = 32'hFFFF_FFFF;
      ctl = ops[n % 8];
      #1;
      exp = ref_of(ctl, a, b);
      checks++;
      if (y !== exp) begin failures++; $display("FAIL op %0d a=%h b=%h y=%h exp=%h", ctl, a, b, y, exp); end
      checks++;
      if (zero !== (exp == 0)) begin failures++; $display("FAIL zero"); end
    end
    a = 5; b = 5; ctl = ALU_SUB; #1;
    checks++; if (!zero) begin failures++; $display("FAIL beq zero"); end
    a = -32'sd3; b = 5; ctl = ALU_SLT; #1;
    checks++; if (y !== 1) begin failures++; $display("FAIL signed slt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
