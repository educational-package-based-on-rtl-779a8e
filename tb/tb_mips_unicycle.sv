// tb_mips_unicycle: runs the single-cycle processor with its memories and
// register file on (1) a program using every instruction, checking the
// register and memory results, and (2) the bubble-sort program, checking the
// sorted data, the per-class instruction counts and that it takes exactly
// one cycle per instruction (348 cycles for this data set).
module tb_mips_unicycle;
  import mips_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst = 1, en = 0;
  always #5 clk = ~clk;

  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we;
  logic [4:0]  rf_ra1, rf_ra2, rf_wa;
  logic [31:0] rf_rd1, rf_rd2, rf_wd, rf_douta, pc_cur, pc_nxt;
  logic        rf_we, illegal;
  logic [5:0]  illegal_op;
  evt_t        evt;
  // host side
  logic [15:0] ih_addr = 0, dh_addr = 0;
  logic [31:0] ih_wdata = 0, dh_wdata = 0, ih_rdata, dh_rdata, rf_dina = 0;
  logic        ih_we = 0, dh_we = 0, rf_ena = 0, rf_wea = 0;
  logic [4:0]  rf_addra = 0;

  dual_port_ram #(.DEPTH(1024)) u_imem (.clk, .p_addr(imem_addr), .p_we(1'b0), .p_wdata('0),
    .p_rdata(imem_rdata), .h_addr(ih_addr), .h_we(ih_we), .h_wdata(ih_wdata), .h_rdata(ih_rdata));
  dual_port_ram #(.DEPTH(256)) u_dmem (.clk, .p_addr(dmem_addr), .p_we(dmem_we), .p_wdata(dmem_wdata),
    .p_rdata(dmem_rdata), .h_addr(dh_addr), .h_we(dh_we), .h_wdata(dh_wdata), .h_rdata(dh_rdata));
  register_file u_rf (.clk, .rst, .read_reg1(rf_ra1), .read_reg2(rf_ra2), .read_data1(rf_rd1),
    .read_data2(rf_rd2), .reg_write(rf_we), .write_reg(rf_wa), .write_data(rf_wd),
    .ena(rf_ena), .wea(rf_wea), .addra(rf_addra), .dina(rf_dina), .douta(rf_douta));
  mips_unicycle dut (.clk, .rst, .en, .imem_addr, .imem_rdata, .dmem_addr, .dmem_we,
    .dmem_wdata, .dmem_rdata, .rf_ra1, .rf_ra2, .rf_rd1, .rf_rd2, .rf_we, .rf_wa, .rf_wd,
    .pc_set(1'b0), .pc_set_val('0), .pc_cur, .pc_nxt, .evt, .illegal, .illegal_op);

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr_imem(int w, logic [31:0] d);
    ih_addr = 16'(w); ih_wdata = d; ih_we = 1; @(posedge clk); #1 ih_we = 0;
  endtask
  task automatic wr_dmem(int w, logic [31:0] d);
    dh_addr = 16'(w); dh_wdata = d; dh_we = 1; @(posedge clk); #1 dh_we = 0;
  endtask
  task automatic wr_reg(int r, logic [31:0] d);
    rf_addra = 5'(r); rf_dina = d; rf_ena = 1; rf_wea = 1; @(posedge clk); #1 rf_ena = 0; rf_wea = 0;
  endtask
  function automatic logic [31:0] reg_of(int r);
    return (r == 0) ? 32'h0 : u_rf.regs[r];
  endfunction

  int jumps, cycles, n_lw, n_sw, n_br, n_r;

  // run until `njumps` jumps have retired; counts cycles and classes
  task automatic run_until_jumps(int njumps, int limit);
    jumps = 0; cycles = 0; n_lw = 0; n_sw = 0; n_br = 0; n_r = 0;
    #1 en = 1;
    while (jumps < njumps && cycles < limit) begin
      @(negedge clk);
      if (evt.retire) begin
        if (evt.itype == IT_J) jumps++;
        if (evt.itype == IT_LW) n_lw++;
        if (evt.itype == IT_SW) n_sw++;
        if (evt.itype inside {IT_BEQ, IT_BNE}) n_br++;
        if (evt.itype inside {IT_ADD, IT_SUB, IT_AND, IT_OR, IT_NOR, IT_SLT, IT_SLL, IT_SRL, IT_NONE}) n_r++;
      end
      @(posedge clk);
      cycles++;
    end
    #1 en = 0;
  endtask

  initial begin
    sort_stats_t st;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // ---- program 1: every instruction ----
    for (int i = 0; i < ALU_LEN; i++) wr_imem(i, alu_word(i));
    run_until_jumps(1, 100);
    check("t2 sub", reg_of(T2), 32'd8);
    check("t3 nor", reg_of(T3), 32'd2);
    check("t4 sll", reg_of(T4), 32'd16);
    check("t5 srl", reg_of(T5), 32'h7FFFFFFE);
    check("mem 0x100", u_dmem.mem[64], 32'd8);
    check("mem 0x104", u_dmem.mem[65], 32'd8);
    check("s0 lw", reg_of(16), 32'd8);
    check("s5 add", reg_of(21), 32'd24);
    check("s6 slt", reg_of(22), 32'd1);
    check("s7 skipped", reg_of(23), 32'd0);
    check("prog1 cycles", cycles, 32'd16);   // 16 instructions incl. halt (one skipped)
    check("no illegal", illegal, 1'b0);

    // ---- program 2: bubble sort ----
    #1 rst = 1; @(posedge clk); #1 rst = 0;
    for (int i = 0; i < SORT_LEN; i++) wr_imem(i, sort_word(i, T3));
    for (int i = 0; i < SORT_N; i++) wr_dmem(1 + i, sort_data(i));
    wr_reg(T3, 32'd4); wr_reg(T4, 32'd1); wr_reg(S4, 32'd6);
    st = sort_model(SORT_N);
    run_until_jumps(st.jmp, 5000);
    check("sort instructions = 348", st.total, 32'd348);
    check("sort cycles (CPI 1)", cycles, 32'(st.total));
    check("sort lw", n_lw, 32'(st.lw));
    check("sort sw", n_sw, 32'(st.sw));
    check("sort branches", n_br, 32'(st.br));
    check("sort rtype", n_r, 32'(st.rtype));
    for (int i = 0; i < SORT_N - 1; i++) begin
      checks++;
      if ($signed(u_dmem.mem[1 + i]) < $signed(u_dmem.mem[2 + i])) begin
        failures++; $display("FAIL not sorted at %0d", i);
      end
    end
    check("sorted first", u_dmem.mem[1], 32'd75);
    check("sorted last", u_dmem.mem[7], 32'd17);
    // ---- illegal opcode ----
    wr_imem(0, 32'hFC00_0000);
    #1 rst = 1; @(posedge clk); #1 rst = 0; en = 1; #1;
    check("illegal flagged", illegal, 1'b1);
    check("illegal opcode", 32'(illegal_op), 32'd63);
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
