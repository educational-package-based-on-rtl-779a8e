// tb_forwarding_unit: directed cases for each forwarding path (EX/MEM and
// MEM/WB into EX, EX/MEM having priority, a load in EX/MEM not forwarded,
// register $0 never forwarded, lw->sw store data from MEM/WB, EX/MEM into the
// ID comparator, nothing when the hazard mode is off), then random inputs
// against a reference written from the forwarding rules.
module tb_forwarding_unit;
  logic enable;
  logic [4:0] idex_rs, idex_rt, exmem_rd, exmem_rt, memwb_rd, ifid_rs, ifid_rt;
  logic exmem_reg_write, exmem_mem_to_reg, exmem_mem_write, memwb_reg_write, memwb_mem_to_reg;
  logic [1:0] fwd_a, fwd_b;
  logic fwd_mem, fwd_id_a, fwd_id_b;
  int checks = 0, failures = 0;
  forwarding_unit dut (.*);
  task automatic chk(string w, int g, int e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  task automatic clear;
    enable = 1; idex_rs = 1; idex_rt = 2; exmem_rd = 0; exmem_rt = 0; memwb_rd = 0;
    ifid_rs = 3; ifid_rt = 4; exmem_reg_write = 0; exmem_mem_to_reg = 0; exmem_mem_write = 0;
    memwb_reg_write = 0; memwb_mem_to_reg = 0;
  endtask
  initial begin
    clear; #1 chk("none a", fwd_a, 0); chk("none b", fwd_b, 0);
    exmem_reg_write = 1; exmem_rd = 1; #1 chk("exmem a", fwd_a, 2); chk("b untouched", fwd_b, 0);
    memwb_reg_write = 1; memwb_rd = 1; #1 chk("exmem priority", fwd_a, 2);
    exmem_mem_to_reg = 1; #1 chk("load in exmem not forwarded", fwd_a, 1);
    clear; memwb_reg_write = 1; memwb_rd = 2; #1 chk("memwb b", fwd_b, 1);
    clear; exmem_reg_write = 1; exmem_rd = 0; idex_rs = 0; #1 chk("r0 not forwarded", fwd_a, 0);
    clear; memwb_reg_write = 1; memwb_mem_to_reg = 1; memwb_rd = 9; exmem_mem_write = 1; exmem_rt = 9;
    #1 chk("lw->sw", fwd_mem, 1);
    memwb_mem_to_reg = 0; #1 chk("lw->sw only after load", fwd_mem, 0);
    clear; exmem_reg_write = 1; exmem_rd = 3; #1 chk("id a", fwd_id_a, 1); chk("id b", fwd_id_b, 0);
    exmem_rd = 4; #1 chk("id b2", fwd_id_b, 1);
    enable = 0; #1 chk("mode off id", fwd_id_b, 0);
    exmem_rd = 1; #1 chk("mode off ex", fwd_a, 0);
    for (int n = 0; n < 2000; n++) begin
      logic exok, wbok;
      {enable, exmem_reg_write, exmem_mem_to_reg, exmem_mem_write, memwb_reg_write, memwb_mem_to_reg} = 6'($urandom);
      idex_rs = 5'($urandom % 4); idex_rt = 5'($urandom % 4); exmem_rd = 5'($urandom % 4);
      exmem_rt = 5'($urandom % 4); memwb_rd = 5'($urandom % 4); ifid_rs = 5'($urandom % 4); ifid_rt = 5'($urandom % 4);
      #1;
      exok = enable && exmem_reg_write && !exmem_mem_to_reg && exmem_rd != 0;
      wbok = enable && memwb_reg_write && memwb_rd != 0;
      chk("rand a", fwd_a, (exok && exmem_rd == idex_rs) ? 2 : (wbok && memwb_rd == idex_rs) ? 1 : 0);
      chk("rand b", fwd_b, (exok && exmem_rd == idex_rt) ? 2 : (wbok && memwb_rd == idex_rt) ? 1 : 0);
      chk("rand mem", fwd_mem, int'(wbok && memwb_mem_to_reg && exmem_mem_write && memwb_rd == exmem_rt));
      chk("rand id", {fwd_id_a, fwd_id_b}, {exok && exmem_rd == ifid_rs, exok && exmem_rd == ifid_rt});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
