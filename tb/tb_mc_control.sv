// tb_mc_control: walks the state machine for every instruction class and
// checks the state sequence (state codes Common0=0 ... SW1=13), the number
// of cycles per class (R 4, lw 5, sw 4, beq/bne 3, j 3, addi 4), key control
// outputs in each state, holding while disabled, and that an unknown opcode
// returns to the fetch state.
module tb_mc_control;
  import mips_pkg::*;
  logic clk = 0, rst = 1, en = 1;
  always #5 clk = ~clk;
  logic [5:0] opcode = 0;
  logic pc_write, pc_write_cond, branch_ne, iord, mem_read, mem_write, mem_to_reg, ir_write;
  logic alu_src_a, reg_write, reg_dst, retire;
  logic [1:0] pc_source, alu_src_b;
  aluop_e aluop;
  logic [3:0] step;
  int checks = 0, failures = 0;
  mc_control dut (.*);
  task automatic chk(string w, int g, int e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  // runs one instruction from Common0, returns the state codes as hex digits
  task automatic walk(logic [5:0] op, output logic [31:0] seq, output int n);
    seq = 0; n = 0; opcode = op;
    do begin
      seq = {seq[27:0], step}; n++;
      if (step == 0) begin chk("fetch ir_write", ir_write, 1); chk("fetch pc_write", pc_write, 1); end
      if (step == 13) begin chk("sw mem_write", mem_write, 1); chk("sw iord", iord, 1); end
      if (step == 11) begin chk("lw mem_to_reg", mem_to_reg, 1); chk("lw reg_write", reg_write, 1); end
      if (step == 3) chk("R reg_dst", reg_dst, 1);
      if (step == 6) chk("bne flag", branch_ne, 1);
      if (step == 4) chk("jump source", pc_source, 2);
      @(posedge clk); #1;
    end while (step != 0 && n < 10);
  endtask
  initial begin
    logic [31:0] s; int n;
    @(posedge clk); #1 rst = 0;
    walk(OP_RTYPE, s, n); chk("R seq", s, 32'h0123); chk("R cycles", n, 4);
    walk(OP_LW,    s, n); chk("lw seq", s, 32'h019AB); chk("lw cycles", n, 5);
    walk(OP_SW,    s, n); chk("sw seq", s, 32'h01CD); chk("sw cycles", n, 4);
    walk(OP_BEQ,   s, n); chk("beq seq", s, 32'h015); chk("beq cycles", n, 3);
    walk(OP_BNE,   s, n); chk("bne seq", s, 32'h016); chk("bne cycles", n, 3);
    walk(OP_J,     s, n); chk("j seq", s, 32'h014); chk("j cycles", n, 3);
    walk(OP_ADDI,  s, n); chk("addi seq", s, 32'h0178); chk("addi cycles", n, 4);
    walk(6'h3F,    s, n); chk("illegal seq", s, 32'h01); chk("illegal back to fetch", n, 2);
    opcode = OP_LW; @(posedge clk); #1 chk("in common1", step, 1);
    en = 0; repeat (3) @(posedge clk); #1 chk("hold", step, 1);
    en = 1; @(posedge clk); #1 chk("resume", step, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
