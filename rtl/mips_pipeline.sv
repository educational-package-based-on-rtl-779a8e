// mips_pipeline: the five-stage pipelined MIPS processor (IF, ID, EX, MEM,
// WB) separated by the IF/ID, ID/EX, EX/MEM and MEM/WB registers; the
// control signals are decoded in ID and travel with the instruction in WB,
// M and EX groups. Separate instruction and data memories avoid structural
// hazards.
// Branches: the sign extension, the x4 shift, the target adder and an
// equality comparator of the two register operands sit in ID, so a beq/bne
// (and a jump) is resolved there. The pipeline assumes not-taken; when the
// branch is taken the just-fetched instruction is flushed from IF/ID, a
// one-cycle bubble.
// Hazard-resolution mode (`hazard_en`, set by the user): the forwarding
// unit feeds the ALU from EX/MEM or MEM/WB, feeds a sw's store data from
// MEM/WB straight after a lw, and feeds the ID comparator from EX/MEM; the
// hazard detection unit stalls one cycle for a load-use dependence (but not
// for lw followed by sw) and for a branch whose operands are still being
// computed. With the mode off, none of this happens and dependent code
// reads stale registers, as an exercise in hazards. A register written in WB
// is seen by ID in the same cycle (register-file write-before-read bypass).
// All registers are cleared by reset to zero, which is the no-op word.
// Interface: memories and register file are outside; state changes on the
// rising edge while `en` is high. `evt` reports fetch, register, memory and
// retire events; the status outputs show stalls, flushes and forwards.
// Lint notes: the ALU's Zero output is left unconnected because branches are
// decided by the ID comparator; EX/MEM keeps the whole control word, whose EX
// fields are unused there (synthesis removes them).
module mips_pipeline
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        hazard_en,
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
  output logic [5:0]  illegal_op,
  output logic        st_load_use,    // load-use stall this cycle
  output logic        st_branch_wait, // branch-operand stall this cycle
  output logic        st_flush,       // IF/ID flushed this cycle
  output logic        st_fwd_ex,      // an ALU operand was forwarded
  output logic        st_fwd_mem,     // lw->sw store data forwarded
  output logic        st_fwd_id       // a branch operand was forwarded
);
  typedef struct packed {
    logic   reg_write;
    logic   mem_to_reg;
    logic   mem_read;
    logic   mem_write;
    logic   reg_dst;
    logic   alu_src;
    aluop_e aluop;
  } ctrl_t;

  // ---------------- IF ----------------
  logic [31:0] pc, pc4, next_pc;
  logic        stall, flush, take;
  logic [31:0] take_target;

  assign imem_addr = pc;
  assign pc4       = pc + 32'd4;
  assign next_pc   = take ? take_target : pc4;

  pc_register u_pc (
    .clk, .rst, .en(en & ~stall), .next_dp(next_pc), .host_set(pc_set),
    .host_val(pc_set_val), .pc, .pc_next(pc_nxt)
  );
  assign pc_cur = pc;

  // ---------------- IF/ID ----------------
  logic [31:0] ifid_instr, ifid_pc4;
  always_ff @(posedge clk) begin
    if (rst) begin
      ifid_instr <= '0;
      ifid_pc4   <= '0;
    end else if (en) begin
      if (flush) begin
        ifid_instr <= '0;
        ifid_pc4   <= '0;
      end else if (!stall) begin
        ifid_instr <= imem_rdata;
        ifid_pc4   <= pc4;
      end
    end
  end

  // ---------------- ID ----------------
  logic [4:0]  id_rs, id_rt, id_rd;
  logic [31:0] id_imm, id_a, id_b, id_ca, id_cb;
  logic        id_eq, id_beq, id_bne, id_jump, id_bad;
  ctrl_t       id_ctrl;
  itype_e      id_itype;

  // WB-stage signals used by the bypass (declared here, driven below)
  logic        memwb_reg_write, memwb_mem_to_reg;
  logic [4:0]  memwb_dst;
  logic [31:0] wb_data;
  logic [31:0] exmem_alu;
  logic        fwd_id_a, fwd_id_b;

  assign id_rs    = ifid_instr[25:21];
  assign id_rt    = ifid_instr[20:16];
  assign id_rd    = ifid_instr[15:11];
  assign id_imm   = {{16{ifid_instr[15]}}, ifid_instr[15:0]};
  assign id_itype = classify(ifid_instr);

  control_unit u_ctrl (
    .opcode(ifid_instr[31:26]), .reg_dst(id_ctrl.reg_dst), .alu_src(id_ctrl.alu_src),
    .mem_to_reg(id_ctrl.mem_to_reg), .reg_write(id_ctrl.reg_write),
    .mem_read(id_ctrl.mem_read), .mem_write(id_ctrl.mem_write),
    .branch_eq(id_beq), .branch_ne(id_bne), .aluop(id_ctrl.aluop),
    .jump(id_jump), .illegal(id_bad)
  );

  assign rf_ra1 = id_rs;
  assign rf_ra2 = id_rt;
  // register-file write-before-read bypass
  assign id_a = (memwb_reg_write && memwb_dst != 5'd0 && memwb_dst == id_rs) ? wb_data : rf_rd1;
  assign id_b = (memwb_reg_write && memwb_dst != 5'd0 && memwb_dst == id_rt) ? wb_data : rf_rd2;
  // equality test, with EX/MEM forwarding
  assign id_ca = fwd_id_a ? exmem_alu : id_a;
  assign id_cb = fwd_id_b ? exmem_alu : id_b;
  assign id_eq = (id_ca == id_cb);

  assign take        = (id_beq & id_eq) | (id_bne & ~id_eq) | id_jump;
  assign take_target = id_jump ? {ifid_pc4[31:28], ifid_instr[25:0], 2'b00}
                               : ifid_pc4 + {id_imm[29:0], 2'b00};

  // ---------------- ID/EX ----------------
  ctrl_t       idex_ctrl;
  logic [31:0] idex_a, idex_b, idex_imm;
  logic [4:0]  idex_rs, idex_rt, idex_rd;
  logic [5:0]  idex_funct;
  itype_e      idex_itype;

  always_ff @(posedge clk) begin
    if (rst) begin
      idex_ctrl <= '0; idex_a <= '0; idex_b <= '0; idex_imm <= '0;
      idex_rs <= '0; idex_rt <= '0; idex_rd <= '0; idex_funct <= '0;
      idex_itype <= IT_NONE;
    end else if (en) begin
      idex_ctrl  <= stall ? '0 : id_ctrl;     // bubble on a stall
      idex_a     <= id_a;
      idex_b     <= id_b;
      idex_imm   <= id_imm;
      idex_rs    <= stall ? 5'd0 : id_rs;
      idex_rt    <= stall ? 5'd0 : id_rt;
      idex_rd    <= stall ? 5'd0 : id_rd;
      idex_funct <= stall ? 6'd0 : ifid_instr[5:0];
      idex_itype <= stall ? IT_NONE : id_itype;
    end
  end

  // ---------------- EX ----------------
  logic [1:0]  fwd_a, fwd_b;
  logic        fwd_mem;
  logic [31:0] ex_fa, ex_fb, ex_alu_b, ex_alu_y;
  logic [4:0]  ex_dst;
  aluctl_e     ex_alu_ctl;

  always_comb begin
    unique case (fwd_a)
      2'b10:   ex_fa = exmem_alu;
      2'b01:   ex_fa = wb_data;
      default: ex_fa = idex_a;
    endcase
    unique case (fwd_b)
      2'b10:   ex_fb = exmem_alu;
      2'b01:   ex_fb = wb_data;
      default: ex_fb = idex_b;
    endcase
  end
  assign ex_alu_b = idex_ctrl.alu_src ? idex_imm : ex_fb;
  assign ex_dst   = idex_ctrl.reg_dst ? idex_rd : idex_rt;

  alu_control u_aluctl (.aluop(idex_ctrl.aluop), .funct(idex_funct), .ctl(ex_alu_ctl));
  alu u_alu (.a(ex_fa), .b(ex_alu_b), .ctl(ex_alu_ctl), .result(ex_alu_y), .zero());

  // ---------------- EX/MEM ----------------
  ctrl_t       exmem_ctrl;
  logic [31:0] exmem_b;
  logic [4:0]  exmem_dst, exmem_rt;
  itype_e      exmem_itype;

  always_ff @(posedge clk) begin
    if (rst) begin
      exmem_ctrl <= '0; exmem_alu <= '0; exmem_b <= '0; exmem_dst <= '0;
      exmem_rt <= '0; exmem_itype <= IT_NONE;
    end else if (en) begin
      exmem_ctrl  <= idex_ctrl;
      exmem_alu   <= ex_alu_y;
      exmem_b     <= ex_fb;
      exmem_dst   <= idex_ctrl.reg_write ? ex_dst : 5'd0;
      exmem_rt    <= idex_rt;
      exmem_itype <= idex_itype;
    end
  end

  // ---------------- MEM ----------------
  assign dmem_addr  = exmem_alu;
  assign dmem_wdata = fwd_mem ? wb_data : exmem_b;
  assign dmem_we    = en & exmem_ctrl.mem_write;

  // ---------------- MEM/WB ----------------
  logic [31:0] memwb_rdata, memwb_alu;
  itype_e      memwb_itype;

  always_ff @(posedge clk) begin
    if (rst) begin
      memwb_reg_write <= 1'b0; memwb_mem_to_reg <= 1'b0; memwb_dst <= '0;
      memwb_rdata <= '0; memwb_alu <= '0; memwb_itype <= IT_NONE;
    end else if (en) begin
      memwb_reg_write  <= exmem_ctrl.reg_write;
      memwb_mem_to_reg <= exmem_ctrl.mem_to_reg;
      memwb_dst        <= exmem_dst;
      memwb_rdata      <= dmem_rdata;
      memwb_alu        <= exmem_alu;
      memwb_itype      <= exmem_itype;
    end
  end

  // ---------------- WB ----------------
  assign wb_data = memwb_mem_to_reg ? memwb_rdata : memwb_alu;
  assign rf_we   = en & memwb_reg_write;
  assign rf_wa   = memwb_dst;
  assign rf_wd   = wb_data;

  // ---------------- hazard units ----------------
  forwarding_unit u_fwd (
    .enable(hazard_en), .idex_rs, .idex_rt,
    .exmem_reg_write(exmem_ctrl.reg_write), .exmem_mem_to_reg(exmem_ctrl.mem_to_reg),
    .exmem_rd(exmem_dst), .exmem_mem_write(exmem_ctrl.mem_write), .exmem_rt,
    .memwb_reg_write, .memwb_mem_to_reg, .memwb_rd(memwb_dst),
    .ifid_rs(id_rs), .ifid_rt(id_rt),
    .fwd_a, .fwd_b, .fwd_mem, .fwd_id_a, .fwd_id_b
  );

  logic load_use, branch_wait;
  hazard_detection_unit u_hdu (
    .enable(hazard_en), .ifid_rs(id_rs), .ifid_rt(id_rt),
    .id_uses_rs(uses_rs(ifid_instr)), .id_uses_rt(uses_rt(ifid_instr)),
    .id_is_store(id_ctrl.mem_write), .id_is_branch(id_beq | id_bne), .id_take(take),
    .idex_mem_read(idex_ctrl.mem_read), .idex_reg_write(idex_ctrl.reg_write),
    .idex_dst(idex_ctrl.reg_write ? ex_dst : 5'd0),
    .exmem_mem_read(exmem_ctrl.mem_read), .exmem_dst,
    .stall, .flush, .load_use, .branch_wait
  );

  // ---------------- monitoring ----------------
  assign illegal_op = ifid_instr[31:26];
  assign illegal        = en & ~stall & (id_bad | is_illegal(ifid_instr));
  assign st_load_use    = en & load_use;
  assign st_branch_wait = en & branch_wait;
  assign st_flush       = en & flush;
  assign st_fwd_ex      = en & (((fwd_a != 2'b00) & (idex_itype != IT_NONE)) |
                                ((fwd_b != 2'b00) & (idex_itype != IT_NONE)));
  assign st_fwd_mem     = en & fwd_mem;
  assign st_fwd_id      = en & ~stall & (id_beq | id_bne) & (fwd_id_a | fwd_id_b);

  always_comb begin
    evt       = '0;
    evt.itype = memwb_itype;
    if (en) begin
      evt.cycle     = 1'b1;
      evt.imem_rd   = 1'b1;
      evt.imem_addr = pc[15:0];
      evt.dmem_rd   = exmem_ctrl.mem_read;
      evt.dmem_wr   = exmem_ctrl.mem_write;
      evt.dmem_addr = exmem_alu[15:0];
      evt.rf_rd1    = ~stall & uses_rs(ifid_instr);
      evt.rf_ra1    = id_rs;
      evt.rf_rd2    = ~stall & uses_rt(ifid_instr);
      evt.rf_ra2    = id_rt;
      evt.rf_wr     = memwb_reg_write;
      evt.rf_wa     = memwb_dst;
      evt.retire    = (memwb_itype != IT_NONE);
    end
  end
endmodule
