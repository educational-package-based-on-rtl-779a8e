// mips_multicycle: the multicycle MIPS processor. One memory holds both
// instructions and data, and a single ALU does all arithmetic, including
// PC+4 and the branch target. The datapath keeps its intermediate values in
// the instruction register (IR), the memory data register (MDR), the operand
// registers A and B and ALUOut; mc_control sequences 3 to 5 steps per
// instruction. Multiplexers: IorD picks the memory address (PC or ALUOut),
// ALUSrcA the upper ALU input (PC or A), ALUSrcB the lower one (B, 4, the
// sign-extended offset, or the offset x 4), PCSource the next PC (ALU
// result, ALUOut, or the jump address {PC[31:28], IR[25:0], 00}). The PC is
// written when PCWrite is set, or when PCWriteCond is set and the condition
// holds; the condition is Zero for beq and not Zero for bne, picked by the
// BranchNe multiplexer the document adds to the textbook datapath.
// Interface: the shared memory and the register file sit outside. All state
// changes on the rising edge while `en` is high. A host-set next PC replaces
// the next PC write. `evt` reports each memory, register and retire event.
module mips_multicycle
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  // shared memory
  output logic [31:0] mem_addr,
  output logic        mem_we,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
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
  output logic [3:0]  step,
  output evt_t        evt,
  output logic        illegal,
  output logic [5:0]  illegal_op
);
  logic [31:0] pc, ir, mdr, a_q, b_q, aluout, alu_a, alu_b, alu_y, imm, next_pc;
  logic        zero, cond, pc_en;
  logic        pc_write, pc_write_cond, branch_ne, iord, mem_read, mem_write;
  logic        mem_to_reg, ir_write, alu_src_a, reg_write, reg_dst, retire;
  logic [1:0]  pc_source, alu_src_b;
  aluop_e      aluop;
  aluctl_e     alu_ctl;

  mc_control u_ctrl (
    .clk, .rst, .en, .opcode(ir[31:26]), .pc_write, .pc_write_cond, .branch_ne,
    .iord, .mem_read, .mem_write, .mem_to_reg, .ir_write, .pc_source, .aluop,
    .alu_src_b, .alu_src_a, .reg_write, .reg_dst, .retire, .step
  );
  alu_control u_aluctl (.aluop, .funct(ir[5:0]), .ctl(alu_ctl));

  assign imm   = {{16{ir[15]}}, ir[15:0]};
  assign alu_a = alu_src_a ? a_q : pc;
  always_comb begin
    unique case (alu_src_b)
      2'b00:   alu_b = b_q;
      2'b01:   alu_b = 32'd4;
      2'b10:   alu_b = imm;
      default: alu_b = {imm[29:0], 2'b00};
    endcase
  end
  alu u_alu (.a(alu_a), .b(alu_b), .ctl(alu_ctl), .result(alu_y), .zero);

  always_comb begin
    unique case (pc_source)
      2'b00:   next_pc = alu_y;
      2'b01:   next_pc = aluout;
      default: next_pc = {pc[31:28], ir[25:0], 2'b00};
    endcase
  end
  assign cond  = branch_ne ? ~zero : zero;
  assign pc_en = en & (pc_write | (pc_write_cond & cond));

  pc_register u_pc (
    .clk, .rst, .en(pc_en), .next_dp(next_pc), .host_set(pc_set),
    .host_val(pc_set_val), .pc, .pc_next(pc_nxt)
  );
  assign pc_cur = pc;

  assign mem_addr  = iord ? aluout : pc;
  assign mem_wdata = b_q;
  assign mem_we    = en & mem_write;

  assign rf_ra1 = ir[25:21];
  assign rf_ra2 = ir[20:16];
  assign rf_wa  = reg_dst ? ir[15:11] : ir[20:16];
  assign rf_wd  = mem_to_reg ? mdr : aluout;
  assign rf_we  = en & reg_write;

  always_ff @(posedge clk) begin
    if (rst) begin
      ir <= '0; mdr <= '0; a_q <= '0; b_q <= '0; aluout <= '0;
    end else if (en) begin
      if (ir_write) ir <= mem_rdata;
      mdr    <= mem_rdata;
      a_q    <= rf_rd1;
      b_q    <= rf_rd2;
      aluout <= alu_y;
    end
  end

  assign illegal_op = ir[31:26];
  assign illegal = en & (step == 4'd1) & is_illegal(ir);

  always_comb begin
    evt       = '0;
    evt.itype = classify(ir);
    if (en) begin
      evt.cycle     = 1'b1;
      evt.dmem_rd   = mem_read;
      evt.dmem_wr   = mem_write;
      evt.dmem_addr = mem_addr[15:0];
      evt.rf_rd1    = (step == 4'd1) & uses_rs(ir);
      evt.rf_ra1    = ir[25:21];
      evt.rf_rd2    = (step == 4'd1) & uses_rt(ir);
      evt.rf_ra2    = ir[20:16];
      evt.rf_wr     = reg_write;
      evt.rf_wa     = rf_wa;
      evt.retire    = retire;
    end
  end
endmodule
