// tb_hazard_detection_unit: directed cases for the load-use stall, the
// lw->sw exception, the early-branch stalls (producer in EX, load in MEM),
// the flush of a taken branch or jump (suppressed while stalling, kept when
// the hazard mode is off), then random inputs against a reference.
module tb_hazard_detection_unit;
  logic enable, id_uses_rs, id_uses_rt, id_is_store, id_is_branch, id_take;
  logic idex_mem_read, idex_reg_write, exmem_mem_read;
  logic [4:0] ifid_rs, ifid_rt, idex_dst, exmem_dst;
  logic stall, flush, load_use, branch_wait;
  int checks = 0, failures = 0;
  hazard_detection_unit dut (.*);
  task automatic chk(string w, int g, int e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  task automatic clear;
    enable = 1; id_uses_rs = 1; id_uses_rt = 1; id_is_store = 0; id_is_branch = 0; id_take = 0;
    idex_mem_read = 0; idex_reg_write = 0; exmem_mem_read = 0;
    ifid_rs = 8; ifid_rt = 9; idex_dst = 0; exmem_dst = 0;
  endtask
  initial begin
    clear; #1 chk("quiet", {stall, flush}, 0);
    idex_mem_read = 1; idex_reg_write = 1; idex_dst = 9; #1 chk("load-use rt", load_use, 1); chk("stall", stall, 1);
    id_is_store = 1; #1 chk("lw->sw data no stall", stall, 0);
    idex_dst = 8; #1 chk("lw->sw address stalls", load_use, 1);
    clear; idex_reg_write = 1; idex_dst = 8; #1 chk("alu producer no stall", stall, 0);
    id_is_branch = 1; #1 chk("branch waits EX", branch_wait, 1);
    clear; id_is_branch = 1; exmem_mem_read = 1; exmem_dst = 9; #1 chk("branch waits load in MEM", branch_wait, 1);
    exmem_mem_read = 0; #1 chk("alu in MEM forwarded", stall, 0);
    id_take = 1; #1 chk("flush", flush, 1);
    exmem_mem_read = 1; #1 chk("no flush while stalling", flush, 0);
    enable = 0; #1 chk("mode off no stall", stall, 0); chk("mode off flush", flush, 1);
    clear; idex_mem_read = 1; idex_dst = 0; ifid_rs = 0; #1 chk("r0 no stall", stall, 0);
    for (int n = 0; n < 3000; n++) begin
      logic lu, bw, hers, hert, hmrs, hmrt;
      {enable, id_uses_rs, id_uses_rt, id_is_store, id_is_branch, id_take, idex_mem_read, idex_reg_write, exmem_mem_read} = 9'($urandom);
      ifid_rs = 5'($urandom % 3); ifid_rt = 5'($urandom % 3); idex_dst = 5'($urandom % 3); exmem_dst = 5'($urandom % 3);
      #1;
      hers = id_uses_rs && idex_dst != 0 && idex_dst == ifid_rs;
      hert = id_uses_rt && idex_dst != 0 && idex_dst == ifid_rt;
      hmrs = id_uses_rs && exmem_dst != 0 && exmem_dst == ifid_rs;
      hmrt = id_uses_rt && exmem_dst != 0 && exmem_dst == ifid_rt;
      lu = enable && idex_mem_read && (hers || (hert && !id_is_store));
      bw = enable && id_is_branch && ((idex_reg_write && (hers || hert)) || (exmem_mem_read && (hmrs || hmrt)));
      chk("rand", {load_use, branch_wait, stall, flush}, {lu, bw, lu || bw, id_take && !(lu || bw)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
