// hazard_detection_unit: decides, for the pipelined processor, when the
// instruction in ID must wait one cycle (stall: the PC and IF/ID hold and a
// bubble enters ID/EX) and when the fetched instruction must be discarded
// (flush of IF/ID).
// Stalls, only while `enable` (the hazard-resolution mode) is high:
//  * load-use: a lw in EX writes a register the ID instruction reads, except
//    when the ID instruction is a sw that uses it only as store data (that
//    case is handled by MEM-stage forwarding instead);
//  * early branch: a beq/bne in ID compares registers in ID, so it waits
//    while the instruction in EX will write one of them, or while a lw in MEM
//    will.
// Flush, always: a taken branch or a jump, both resolved in ID, flushes the
// IF/ID register; the pipeline assumes branches are not taken and pays one
// bubble when they are. The load-use stall, the lw-sw exception and the
// single-bubble flush follow the document; the early-branch stall conditions
// are this design's completion. Combinational.
module hazard_detection_unit (
  input  logic       enable,
  // ID stage instruction
  input  logic [4:0] ifid_rs,
  input  logic [4:0] ifid_rt,
  input  logic       id_uses_rs,
  input  logic       id_uses_rt,
  input  logic       id_is_store,
  input  logic       id_is_branch,
  input  logic       id_take,          // branch taken or jump, decided in ID
  // EX stage
  input  logic       idex_mem_read,
  input  logic       idex_reg_write,
  input  logic [4:0] idex_dst,
  // MEM stage
  input  logic       exmem_mem_read,
  input  logic [4:0] exmem_dst,
  output logic       stall,
  output logic       flush,
  output logic       load_use,
  output logic       branch_wait
);
  logic hit_ex_rs, hit_ex_rt, hit_mem_rs, hit_mem_rt;
  assign hit_ex_rs  = id_uses_rs & (idex_dst != 5'd0) & (idex_dst == ifid_rs);
  assign hit_ex_rt  = id_uses_rt & (idex_dst != 5'd0) & (idex_dst == ifid_rt);
  assign hit_mem_rs = id_uses_rs & (exmem_dst != 5'd0) & (exmem_dst == ifid_rs);
  assign hit_mem_rt = id_uses_rt & (exmem_dst != 5'd0) & (exmem_dst == ifid_rt);

  assign load_use = enable & idex_mem_read &
                    (hit_ex_rs | (hit_ex_rt & ~id_is_store));
  assign branch_wait = enable & id_is_branch &
                       ((idex_reg_write & (hit_ex_rs | hit_ex_rt)) |
                        (exmem_mem_read & (hit_mem_rs | hit_mem_rt)));
  assign stall = load_use | branch_wait;
  assign flush = id_take & ~stall;
endmodule
