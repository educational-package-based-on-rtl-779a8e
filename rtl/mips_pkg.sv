// mips_pkg: types and constants shared by the three MIPS processor versions
// (single-cycle, multicycle and pipelined) and their surrounding system.
// It holds the opcode and function-field encodings of the reduced MIPS
// instruction set, the 4-bit ALU control codes, the instruction-type
// classification used by the event counters, the per-cycle event record a
// processor reports, and the host-access request that the serial manager
// issues to a processor wrapper. The encodings of the instruction set and of
// the ALU control follow the instruction-set and ALU-control tables; the
// host-command byte codes, the host request layout and the event record are
// this design's own choices. Lint note: each module that imports the
// package uses only some of its constants, so unused-parameter notices for
// the others are expected; classify() needs only the opcode and function
// fields of the instruction word.
package mips_pkg;

  // The three processor versions.
  typedef enum logic [1:0] {
    V_UNICYCLE   = 2'd0,
    V_MULTICYCLE = 2'd1,
    V_PIPELINE   = 2'd2
  } version_e;

  // ---------------- instruction set ----------------
  localparam logic [5:0] OP_RTYPE = 6'd0;
  localparam logic [5:0] OP_J     = 6'd2;
  localparam logic [5:0] OP_BEQ   = 6'd4;
  localparam logic [5:0] OP_BNE   = 6'd5;
  localparam logic [5:0] OP_ADDI  = 6'd8;
  localparam logic [5:0] OP_LW    = 6'd35;
  localparam logic [5:0] OP_SW    = 6'd43;

  localparam logic [5:0] FN_NOP = 6'd0;   // all-zero word: executes as a no-op
  localparam logic [5:0] FN_SLL = 6'd1;   // one-bit shift left (not the MIPS shamt shift)
  localparam logic [5:0] FN_ADD = 6'd32;
  localparam logic [5:0] FN_SUB = 6'd34;
  localparam logic [5:0] FN_AND = 6'd36;
  localparam logic [5:0] FN_OR  = 6'd37;
  localparam logic [5:0] FN_NOR = 6'd39;
  localparam logic [5:0] FN_SLT = 6'd42;
  localparam logic [5:0] FN_SRL = 6'd62;  // one-bit shift right

  // ---------------- ALU ----------------
  typedef enum logic [1:0] {
    ALUOP_ADD    = 2'b00,   // lw, sw, addi
    ALUOP_SUB    = 2'b01,   // beq, bne
    ALUOP_FUNCT  = 2'b10    // R-type: decode the funct field
  } aluop_e;

  typedef enum logic [3:0] {
    ALU_AND = 4'b0000,
    ALU_OR  = 4'b0001,
    ALU_ADD = 4'b0010,
    ALU_SLL = 4'b0011,
    ALU_SRL = 4'b0100,
    ALU_SUB = 4'b0110,
    ALU_SLT = 4'b0111,
    ALU_NOR = 4'b1100
  } aluctl_e;

  // ---------------- instruction classes (event counters) ----------------
  localparam int N_ITYPES = 14;
  typedef enum logic [3:0] {
    IT_ADD  = 4'd0,  IT_SUB  = 4'd1,  IT_OR   = 4'd2,  IT_NOR = 4'd3,
    IT_AND  = 4'd4,  IT_SLT  = 4'd5,  IT_LW   = 4'd6,  IT_ADDI = 4'd7,
    IT_BEQ  = 4'd8,  IT_BNE  = 4'd9,  IT_SRL  = 4'd10, IT_SLL = 4'd11,
    IT_J    = 4'd12, IT_SW   = 4'd13, IT_NONE = 4'd15
  } itype_e;

  // Classify an instruction word; IT_NONE for a no-op or an unknown word.
  function automatic itype_e classify(input logic [31:0] instr);
    itype_e t;
    t = IT_NONE;
    unique case (instr[31:26])
      OP_RTYPE: begin
        unique case (instr[5:0])
          FN_ADD: t = IT_ADD;
          FN_SUB: t = IT_SUB;
          FN_AND: t = IT_AND;
          FN_OR:  t = IT_OR;
          FN_NOR: t = IT_NOR;
          FN_SLT: t = IT_SLT;
          FN_SLL: t = IT_SLL;
          FN_SRL: t = IT_SRL;
          default: t = IT_NONE;
        endcase
      end
      OP_J:    t = IT_J;
      OP_BEQ:  t = IT_BEQ;
      OP_BNE:  t = IT_BNE;
      OP_ADDI: t = IT_ADDI;
      OP_LW:   t = IT_LW;
      OP_SW:   t = IT_SW;
      default: t = IT_NONE;
    endcase
    return t;
  endfunction

  // True for a word the processors cannot execute (unknown opcode or funct).
  function automatic logic is_illegal(input logic [31:0] instr);
    return (classify(instr) == IT_NONE) && (instr != 32'h0);
  endfunction

  // Does the instruction read register rs / rt as a source operand?
  function automatic logic uses_rs(input logic [31:0] instr);
    itype_e t;
    t = classify(instr);
    return (t != IT_NONE) && (t != IT_J);
  endfunction
  function automatic logic uses_rt(input logic [31:0] instr);
    itype_e t;
    t = classify(instr);
    return t inside {IT_ADD, IT_SUB, IT_AND, IT_OR, IT_NOR, IT_SLT,
                     IT_BEQ, IT_BNE, IT_SW};
  endfunction

  // ---------------- per-cycle event record ----------------
  // Reported by every processor in each cycle it advances; consumed by the
  // event counters. Addresses are byte addresses.
  typedef struct packed {
    logic        cycle;      // a processor clock cycle was executed
    logic        imem_rd;    // instruction fetch read
    logic [15:0] imem_addr;
    logic        dmem_rd;    // data (or shared) memory read
    logic        dmem_wr;    // data (or shared) memory write
    logic [15:0] dmem_addr;
    logic        rf_rd1;     // register file read port 1 used
    logic [4:0]  rf_ra1;
    logic        rf_rd2;     // register file read port 2 used
    logic [4:0]  rf_ra2;
    logic        rf_wr;      // register file write
    logic [4:0]  rf_wa;
    logic        retire;     // an instruction completed this cycle
    itype_e      itype;
  } evt_t;

  // ---------------- host access (serial manager -> wrapper) ----------------
  typedef enum logic [2:0] {
    TGT_IMEM = 3'd0,   // instruction memory (shared memory in the multicycle)
    TGT_DMEM = 3'd1,   // data memory (shared memory in the multicycle)
    TGT_REG  = 3'd2,   // register file
    TGT_PC   = 3'd3,   // program counter: write sets next address, read gives {next,current}
    TGT_CNT  = 3'd4    // event counters: write sets a monitored address, read gives a count
  } host_tgt_e;

  typedef struct packed {
    logic        we;
    logic        re;
    host_tgt_e   tgt;
    logic [15:0] addr;
    logic [31:0] wdata;
  } host_req_t;

  // Serial command bytes. CMD_RUN (0x0B) is the run-mode code; the others are
  // this design's own numbering.
  typedef enum logic [7:0] {
    CMD_WR_IMEM = 8'h01, CMD_RD_IMEM = 8'h02,
    CMD_WR_DMEM = 8'h03, CMD_RD_DMEM = 8'h04,
    CMD_WR_REG  = 8'h05, CMD_RD_REG  = 8'h06,
    CMD_SET_PC  = 8'h07, CMD_RD_PC   = 8'h08,
    CMD_SET_CNT = 8'h09, CMD_RESET   = 8'h0A,
    CMD_RUN     = 8'h0B, CMD_RD_CNT  = 8'h0C,
    CMD_HAZARD  = 8'h0D, CMD_RD_TYPES = 8'h0E
  } cmd_e;

  // Control-manager request codes, CMRequest[1:0].
  localparam logic [1:0] CM_RESET  = 2'b01;
  localparam logic [1:0] CM_RUN    = 2'b10;
  localparam logic [1:0] CM_HAZARD = 2'b11;

  // Event-counter read map (host address of a TGT_CNT read).
  localparam logic [15:0] CNT_CLOCK = 16'h0000;  // clock counter
  localparam logic [15:0] CNT_ITYPE = 16'h0010;  // + instruction type (0..13)
  localparam logic [15:0] CNT_IMEM  = 16'h0020;  // + slot: instruction-memory reads
  localparam logic [15:0] CNT_RAMRD = 16'h0030;  // + slot: data-memory reads
  localparam logic [15:0] CNT_RAMWR = 16'h0038;  // + slot: data-memory writes
  localparam logic [15:0] CNT_REGRD = 16'h0040;  // + index into {t0..t7,s0..s7}: reads
  localparam logic [15:0] CNT_REGWR = 16'h0050;  // + index: writes

endpackage
