// forwarding_unit: selects, for the pipelined processor, where each operand
// is taken from so that an instruction sees results its predecessors have not
// yet written back.
//  * EX stage ALU inputs (fwd_a, fwd_b): 2'b10 = the EX/MEM ALU result,
//    2'b01 = the MEM/WB write-back value, 2'b00 = the value read in ID. The
//    EX/MEM source is used only when that instruction is not a load (a load's
//    data is not ready until MEM/WB).
//  * MEM stage store data (fwd_mem): a sw directly after a lw that loads the
//    sw's data register takes the loaded word from MEM/WB, so that pair runs
//    without a stall.
//  * ID stage equality test (fwd_id_a/b): a branch compares the EX/MEM ALU
//    result instead of the register read when that instruction writes the
//    register. (MEM/WB values reach ID through the register-file bypass.)
// Nothing is forwarded to or from register $0, and nothing at all when
// `enable` (the hazard-resolution mode set by the user) is low. The EX and
// MEM forwarding follow the forwarding figures and text; the ID forwarding
// for early branches is this design's completion of them. Combinational.
module forwarding_unit (
  input  logic       enable,
  // EX stage
  input  logic [4:0] idex_rs,
  input  logic [4:0] idex_rt,
  // MEM stage
  input  logic       exmem_reg_write,
  input  logic       exmem_mem_to_reg,
  input  logic [4:0] exmem_rd,
  input  logic       exmem_mem_write,
  input  logic [4:0] exmem_rt,
  // WB stage
  input  logic       memwb_reg_write,
  input  logic       memwb_mem_to_reg,
  input  logic [4:0] memwb_rd,
  // ID stage
  input  logic [4:0] ifid_rs,
  input  logic [4:0] ifid_rt,
  output logic [1:0] fwd_a,
  output logic [1:0] fwd_b,
  output logic       fwd_mem,
  output logic       fwd_id_a,
  output logic       fwd_id_b
);
  logic ex_ok, wb_ok;
  assign ex_ok = enable & exmem_reg_write & ~exmem_mem_to_reg & (exmem_rd != 5'd0);
  assign wb_ok = enable & memwb_reg_write & (memwb_rd != 5'd0);

  always_comb begin
    fwd_a = 2'b00;
    if (ex_ok && exmem_rd == idex_rs)      fwd_a = 2'b10;
    else if (wb_ok && memwb_rd == idex_rs) fwd_a = 2'b01;
    fwd_b = 2'b00;
    if (ex_ok && exmem_rd == idex_rt)      fwd_b = 2'b10;
    else if (wb_ok && memwb_rd == idex_rt) fwd_b = 2'b01;
  end

  assign fwd_mem  = wb_ok & memwb_mem_to_reg & exmem_mem_write & (memwb_rd == exmem_rt);
  assign fwd_id_a = ex_ok & (exmem_rd == ifid_rs);
  assign fwd_id_b = ex_ok & (exmem_rd == ifid_rt);
endmodule
