// mips_unicycle: the single-cycle MIPS processor. Every instruction
// completes in one processor cycle: the PC addresses the instruction memory,
// the control unit decodes the opcode, the register file is read, the ALU
// computes, the data memory is read or written and the result is written
// back, all in the cycle in which `en` is high. The next PC is PC+4, the
// branch target PC+4+(sign-extended offset x 4) when (Branche and Zero) or
// (BranchNe and not Zero), or the jump target {PC+4[31:28], address x 4}.
// The branch-not-equal path (the extra gates on the PC-source selection) is
// the document's addition to the textbook datapath.
// Interface: the memories and the register file sit outside, in the
// wrapper; this module drives their processor ports. Writes (register and
// data memory) and the PC update happen on the rising edge when `en` is high.
// `evt` reports, for that cycle, the fetch, the register and memory accesses
// and the retiring instruction's type; `illegal` flags an unknown opcode.
module mips_unicycle
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  // instruction memory
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data memory
  output logic [31:0] dmem_addr,
  output logic        dmem_we,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // register file
  output logic [4:0]  rf_ra1,
  output logic [4:0]  rf_ra2,
  input  logic [31:0] rf_rd1,
  input  logic [31:0] rf_rd2,
  output logic        rf_we,
  output logic [4:0]  rf_wa,
  output logic [31:0] rf_wd,
  // program counter host access
  input  logic        pc_set,
  input  logic [31:0] pc_set_val,
  output logic [31:0] pc_cur,
  output logic [31:0] pc_nxt,
  // monitoring
  output evt_t        evt,
  output logic        illegal,
  output logic [5:0]  illegal_op
);
  logic [31:0] instr, pc, pc4, imm, br_target, j_target, next_pc;
  logic [31:0] alu_b, alu_y;
  logic        zero, pc_src;
  logic        reg_dst, alu_src, mem_to_reg, reg_write, mem_read, mem_write;
  logic        branch_eq, branch_ne, jump, bad_op;
  aluop_e      aluop;
  aluctl_e     alu_ctl;

  assign instr     = imem_rdata;
  assign imem_addr = pc;
  assign pc_cur    = pc;

  control_unit u_ctrl (
    .opcode(instr[31:26]), .reg_dst, .alu_src, .mem_to_reg, .reg_write,
    .mem_read, .mem_write, .branch_eq, .branch_ne, .aluop, .jump,
    .illegal(bad_op)
  );
  alu_control u_aluctl (.aluop, .funct(instr[5:0]), .ctl(alu_ctl));

  assign rf_ra1 = instr[25:21];
  assign rf_ra2 = instr[20:16];
  assign imm    = {{16{instr[15]}}, instr[15:0]};
  assign alu_b  = alu_src ? imm : rf_rd2;

  alu u_alu (.a(rf_rd1), .b(alu_b), .ctl(alu_ctl), .result(alu_y), .zero);

  assign dmem_addr  = alu_y;
  assign dmem_wdata = rf_rd2;
  assign dmem_we    = en & mem_write;

  assign rf_wa = reg_dst ? instr[15:11] : instr[20:16];
  assign rf_wd = mem_to_reg ? dmem_rdata : alu_y;
  assign rf_we = en & reg_write;

  assign pc4       = pc + 32'd4;
  assign br_target = pc4 + {imm[29:0], 2'b00};
  assign j_target  = {pc4[31:28], instr[25:0], 2'b00};
  assign pc_src    = (branch_eq & zero) | (branch_ne & ~zero);
  assign next_pc   = jump ? j_target : (pc_src ? br_target : pc4);

  pc_register u_pc (
    .clk, .rst, .en, .next_dp(next_pc), .host_set(pc_set),
    .host_val(pc_set_val), .pc, .pc_next(pc_nxt)
  );

  assign illegal_op = instr[31:26];
  assign illegal = en & (bad_op | is_illegal(instr));

  always_comb begin
    evt           = '0;
    evt.itype     = classify(instr);
    if (en) begin
      evt.cycle     = 1'b1;
      evt.imem_rd   = 1'b1;
      evt.imem_addr = pc[15:0];
      evt.dmem_rd   = mem_read;
      evt.dmem_wr   = mem_write;
      evt.dmem_addr = alu_y[15:0];
      evt.rf_rd1    = uses_rs(instr);
      evt.rf_ra1    = instr[25:21];
      evt.rf_rd2    = uses_rt(instr);
      evt.rf_ra2    = instr[20:16];
      evt.rf_wr     = reg_write;
      evt.rf_wa     = rf_wa;
      evt.retire    = 1'b1;
    end
  end
endmodule
