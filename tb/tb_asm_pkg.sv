// tb_asm_pkg: test-side helpers for the MIPS testbenches: an assembler for
// the reduced instruction set (R-type with the one-bit shifts, addi, lw, sw,
// beq, bne, j), the bubble-sort test program with its register set-up, and
// a reference model of that program which counts, independently of the RTL,
// how many instructions of each class it executes and how many cycles each
// processor version must take.
package tb_asm_pkg;
  // register numbers
  localparam int T0 = 8, T1 = 9, T2 = 10, T3 = 11, T4 = 12, T5 = 13, T6 = 14;
  localparam int S1 = 17, S2 = 18, S3 = 19, S4 = 20;

  function automatic logic [31:0] rtype(int funct, int rd, int rs, int rt);
    return {6'd0, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'(funct)};
  endfunction
  function automatic logic [31:0] itype(int op, int rt, int rs, int imm);
    return {6'(op), 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] add_ (int rd, int rs, int rt); return rtype(32, rd, rs, rt); endfunction
  function automatic logic [31:0] sub_ (int rd, int rs, int rt); return rtype(34, rd, rs, rt); endfunction
  function automatic logic [31:0] and_ (int rd, int rs, int rt); return rtype(36, rd, rs, rt); endfunction
  function automatic logic [31:0] or_  (int rd, int rs, int rt); return rtype(37, rd, rs, rt); endfunction
  function automatic logic [31:0] nor_ (int rd, int rs, int rt); return rtype(39, rd, rs, rt); endfunction
  function automatic logic [31:0] slt_ (int rd, int rs, int rt); return rtype(42, rd, rs, rt); endfunction
  function automatic logic [31:0] sll_ (int rd, int rs);         return rtype(1,  rd, rs, 0);  endfunction
  function automatic logic [31:0] srl_ (int rd, int rs);         return rtype(62, rd, rs, 0);  endfunction
  function automatic logic [31:0] addi_(int rt, int rs, int imm); return itype(8,  rt, rs, imm); endfunction
  function automatic logic [31:0] lw_  (int rt, int rs, int off); return itype(35, rt, rs, off); endfunction
  function automatic logic [31:0] sw_  (int rt, int rs, int off); return itype(43, rt, rs, off); endfunction
  function automatic logic [31:0] beq_ (int rs, int rt, int off); return itype(4,  rt, rs, off); endfunction
  function automatic logic [31:0] bne_ (int rs, int rt, int off); return itype(5,  rt, rs, off); endfunction
  function automatic logic [31:0] j_   (int word_addr);           return {6'd2, 26'(word_addr)}; endfunction
  localparam logic [31:0] NOP = 32'h0;

  localparam int SORT_N    = 7;
  localparam int SORT_LEN  = 21;   // program words
  localparam int HALT_LINE = 13;   // "halt": a jump to itself

  // The bubble-sort program. `inc_reg` is the register added to the address
  // each iteration: t3 when instructions and data live apart, t6 in the
  // multicycle's shared memory.
  function automatic logic [31:0] sort_word(int line, int inc_reg);
    unique case (line)
      0:  return NOP;
      1:  return and_(S2, S1, S2);     // clear swap flag
      2:  return and_(T2, S1, T2);     // clear address
      3:  return or_ (T2, T3, T2);     // address = first word
      4:  return lw_ (T0, T2, 0);
      5:  return lw_ (T1, T2, 4);
      6:  return slt_(T5, T0, T1);
      7:  return beq_(T4, T5, 7);      // to line 15 when a swap is needed
      8:  return add_(T2, inc_reg, T2);
      9:  return add_(S3, T4, S3);
      10: return bne_(S4, S3, -7);     // to line 4
      11: return and_(S3, S1, S3);
      12: return beq_(S2, T4, -12);    // to line 1 when a swap happened
      13: return j_(13);               // halt
      15: return sw_ (T1, T2, 0);
      16: return sw_ (T0, T2, 4);
      17: return or_ (S2, T4, S2);
      18: return j_(8);
      default: return NOP;
    endcase
  endfunction

  // Data set: same relative order as (1,2,4,6,5,7,3), which makes the program
  // execute 348 instructions.
  function automatic logic [31:0] sort_data(int i);
    int d[SORT_N] = '{17, 23, 40, 61, 52, 75, 33};
    return 32'(d[i]);
  endfunction

  // Reference model: class counts of the instructions executed up to and
  // including the first halt.
  typedef struct {
    int total, rtype, lw, sw, br, jmp, addi;
    int passes, swaps;
    int taken;          // taken branches + jumps
    int pipe_cycles;    // expected pipeline cycles with hazard resolution
  } sort_stats_t;

  function automatic sort_stats_t sort_model(int n);
    sort_stats_t s;
    int a[SORT_N];
    bit sw;
    s = '{default: 0};
    for (int i = 0; i < SORT_N; i++) a[i] = int'(sort_data(i));
    s.rtype = 1; // line 0 nop (R-type encoding)
    do begin
      s.passes++;
      sw = 0;
      s.rtype += 3;
      for (int i = 0; i < n - 1; i++) begin
        s.lw += 2; s.rtype += 1; s.br += 1;          // lines 4..7
        if (a[i] < a[i+1]) begin
          int t;
          t = a[i]; a[i] = a[i+1]; a[i+1] = t;
          s.swaps++; sw = 1;
          s.taken += 1;                               // beq taken
          s.sw += 2; s.rtype += 1; s.jmp += 1;        // lines 15..18
          s.taken += 1;                               // j 8
        end
        s.rtype += 2; s.br += 1;                      // lines 8..10
        if (i != n - 2) s.taken += 1;                 // bne taken
      end
      s.rtype += 1; s.br += 1;                        // lines 11, 12
      if (sw) s.taken += 1;                           // beq taken
    end while (sw);
    s.jmp += 1;                                       // halt
    s.taken += 1;
    s.total = s.rtype + s.lw + s.sw + s.br + s.jmp + s.addi;
    // pipeline: fill 4 + one bubble per taken branch/jump + per iteration a
    // load-use stall (lw t1 -> slt), a branch stall (slt -> beq) and a branch
    // stall (add s3 -> bne). Counted until the halt jump retires, so the
    // bubble after the halt itself does not count.
    s.pipe_cycles = s.total + 4 + (s.taken - 1) + 3 * (n - 1) * s.passes;
    return s;
  endfunction

  function automatic int multi_cycles(sort_stats_t s);
    return 4 * s.rtype + 5 * s.lw + 4 * s.sw + 3 * s.br + 3 * s.jmp + 4 * s.addi;
  endfunction

  // A short program that exercises every instruction and the lw->sw and
  // load-use cases. Data at byte address 0x100.
  localparam int ALU_LEN = 17;
  function automatic logic [31:0] alu_word(int line);
    unique case (line)
      0:  return addi_(T0, 0, 5);
      1:  return addi_(T1, 0, -3);
      2:  return sub_ (T2, T0, T1);      // 8
      3:  return nor_ (T3, T0, T1);      // 2
      4:  return sll_ (T4, T2);          // 16
      5:  return srl_ (T5, T1);          // 0x7FFFFFFE
      6:  return addi_(T6, 0, 16'h100);
      7:  return sw_  (T2, T6, 0);
      8:  return lw_  (15, T6, 0);       // t7 = 8
      9:  return sw_  (15, T6, 4);       // lw -> sw
      10: return lw_  (16, T6, 4);       // s0 = 8
      11: return add_ (21, 16, T4);      // s5 = 24, load-use
      12: return slt_ (22, T1, T0);      // s6 = 1
      13: return beq_ (22, 0, 1);        // not taken
      14: return bne_ (22, 0, 1);        // taken, skips 15
      15: return addi_(23, 0, 99);       // skipped
      16: return j_(16);                 // halt
      default: return NOP;
    endcase
  endfunction
endpackage
