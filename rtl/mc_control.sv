// mc_control: the finite-state control of the multicycle processor. Every
// instruction passes Common0 (fetch: IR <= Mem[PC], PC <= PC+4) and Common1
// (decode: A, B <= registers; ALUOut <= PC + offset x 4), then the states of
// its class: RType0/RType1 (execute, write rd), Addi0/Addi1 (add immediate,
// write rt), LW0/LW1/LW2 (address, memory read into MDR, write rt),
// SW0/SW1 (address, memory write), BEQ0 or BNEQ0 (compare, PC <= ALUOut if
// taken) and JMP0 (PC <= jump address). So R-type, addi and sw take 4
// cycles, lw 5, branches and jump 3. The state numbers (Common0 = 0 ...
// SW1 = 13) are the document's. The state advances on the rising edge when
// `en` is high; the Moore outputs are the eleven control signals of the
// multicycle datapath. `retire` is high in the last state of an instruction.
// An unknown opcode in Common1 returns to Common0 (the design's choice).
module mc_control
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  logic [5:0] opcode,
  output logic       pc_write,
  output logic       pc_write_cond,
  output logic       branch_ne,
  output logic       iord,
  output logic       mem_read,
  output logic       mem_write,
  output logic       mem_to_reg,
  output logic       ir_write,
  output logic [1:0] pc_source,
  output aluop_e     aluop,
  output logic [1:0] alu_src_b,
  output logic       alu_src_a,
  output logic       reg_write,
  output logic       reg_dst,
  output logic       retire,
  output logic [3:0] step
);
  typedef enum logic [3:0] {
    COMMON0 = 4'd0,  COMMON1 = 4'd1,  RTYPE0 = 4'd2,  RTYPE1 = 4'd3,
    JMP0    = 4'd4,  BEQ0    = 4'd5,  BNEQ0  = 4'd6,  ADDI0  = 4'd7,
    ADDI1   = 4'd8,  LW0     = 4'd9,  LW1    = 4'd10, LW2    = 4'd11,
    SW0     = 4'd12, SW1     = 4'd13
  } state_e;

  state_e state, next;
  assign step = state;

  always_ff @(posedge clk) begin
    if (rst)     state <= COMMON0;
    else if (en) state <= next;
  end

  always_comb begin
    next = COMMON0;
    unique case (state)
      COMMON0: next = COMMON1;
      COMMON1: begin
        unique case (opcode)
          OP_RTYPE: next = RTYPE0;
          OP_J:     next = JMP0;
          OP_BEQ:   next = BEQ0;
          OP_BNE:   next = BNEQ0;
          OP_ADDI:  next = ADDI0;
          OP_LW:    next = LW0;
          OP_SW:    next = SW0;
          default:  next = COMMON0;
        endcase
      end
      RTYPE0: next = RTYPE1;
      ADDI0:  next = ADDI1;
      LW0:    next = LW1;
      LW1:    next = LW2;
      SW0:    next = SW1;
      default: next = COMMON0;   // RTYPE1, ADDI1, LW2, SW1, BEQ0, BNEQ0, JMP0
    endcase
  end

  always_comb begin
    pc_write = 1'b0; pc_write_cond = 1'b0; branch_ne = 1'b0; iord = 1'b0;
    mem_read = 1'b0; mem_write = 1'b0; mem_to_reg = 1'b0; ir_write = 1'b0;
    pc_source = 2'b00; aluop = ALUOP_ADD; alu_src_b = 2'b00; alu_src_a = 1'b0;
    reg_write = 1'b0; reg_dst = 1'b0; retire = 1'b0;
    unique case (state)
      COMMON0: begin
        mem_read = 1'b1; ir_write = 1'b1; alu_src_b = 2'b01; pc_write = 1'b1;
      end
      COMMON1: alu_src_b = 2'b11;
      RTYPE0:  begin alu_src_a = 1'b1; aluop = ALUOP_FUNCT; end
      RTYPE1:  begin reg_dst = 1'b1; reg_write = 1'b1; retire = 1'b1; end
      ADDI0:   begin alu_src_a = 1'b1; alu_src_b = 2'b10; end
      ADDI1:   begin reg_write = 1'b1; retire = 1'b1; end
      LW0, SW0: begin alu_src_a = 1'b1; alu_src_b = 2'b10; end
      LW1:     begin mem_read = 1'b1; iord = 1'b1; end
      LW2:     begin reg_write = 1'b1; mem_to_reg = 1'b1; retire = 1'b1; end
      SW1:     begin mem_write = 1'b1; iord = 1'b1; retire = 1'b1; end
      BEQ0:    begin alu_src_a = 1'b1; aluop = ALUOP_SUB; pc_write_cond = 1'b1;
                     pc_source = 2'b01; retire = 1'b1; end
      BNEQ0:   begin alu_src_a = 1'b1; aluop = ALUOP_SUB; pc_write_cond = 1'b1;
                     branch_ne = 1'b1; pc_source = 2'b01; retire = 1'b1; end
      JMP0:    begin pc_write = 1'b1; pc_source = 2'b10; retire = 1'b1; end
      default: ;
    endcase
  end
endmodule
