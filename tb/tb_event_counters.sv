// tb_event_counters: feeds random event records and compares every counter
// with a reference model: clock counter, the 14 instruction-type counters,
// the instruction-address and data-address monitors (set through the
// configuration port, which also clears them), and the read/write counters
// of t0..t7 and s0..s7 (two reads of one register in a cycle count twice).
// Then checks that an 8-bit counter saturates at 255.
module tb_event_counters;
  import mips_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  evt_t evt;
  logic cfg_we = 0;
  logic [15:0] cfg_addr = 0, rd_addr = 0;
  logic [31:0] cfg_wdata = 0, rd_data;
  int checks = 0, failures = 0;
  int m_clk, m_it[14], m_im[4], m_rr[4], m_rw[4], m_reg_rd[16], m_reg_wr[16];
  logic [15:0] a_im[4], a_r[4];
  event_counters dut (.*);
  function automatic int sat(int v); return v > 255 ? 255 : v; endfunction
  task automatic chk(string w, int g, int e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  task automatic rd(string w, logic [15:0] a, int e);
    rd_addr = a; #1 chk(w, rd_data, e);
  endtask
  task automatic cfg(logic [15:0] a, logic [15:0] v);
    cfg_we = 1; cfg_addr = a; cfg_wdata = 32'(v); @(posedge clk); #1 cfg_we = 0;
  endtask
  task automatic check_all;
    rd("clock", CNT_CLOCK, m_clk);
    for (int i = 0; i < 14; i++) rd($sformatf("itype %0d", i), CNT_ITYPE + 16'(i), sat(m_it[i]));
    for (int i = 0; i < 4; i++) begin
      rd("imem", CNT_IMEM + 16'(i), sat(m_im[i]));
      rd("ram rd", CNT_RAMRD + 16'(i), sat(m_rr[i]));
      rd("ram wr", CNT_RAMWR + 16'(i), sat(m_rw[i]));
    end
    for (int k = 0; k < 16; k++) begin
      rd("reg rd", CNT_REGRD + 16'(k), sat(m_reg_rd[k]));
      rd("reg wr", CNT_REGWR + 16'(k), sat(m_reg_wr[k]));
    end
  endtask
  initial begin
    evt = '0;
    m_clk = 0;
    foreach (m_it[i]) m_it[i] = 0;
    for (int i = 0; i < 4; i++) begin m_im[i] = 0; m_rr[i] = 0; m_rw[i] = 0; a_im[i] = 0; a_r[i] = 0; end
    for (int k = 0; k < 16; k++) begin m_reg_rd[k] = 0; m_reg_wr[k] = 0; end
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4; i++) begin
      a_im[i] = 16'(4 * i); cfg(CNT_IMEM + 16'(i), a_im[i]);
      a_r[i] = 16'(4 * i + 0); cfg(CNT_RAMRD + 16'(i), a_r[i]);
    end
    for (int n = 0; n < 200; n++) begin
      evt = '0;
      evt.cycle = ($urandom % 4) != 0;
      evt.imem_rd = $urandom % 2; evt.imem_addr = 16'(4 * ($urandom % 6));
      evt.dmem_rd = $urandom % 2; evt.dmem_wr = $urandom % 2; evt.dmem_addr = 16'(4 * ($urandom % 6));
      evt.rf_rd1 = $urandom % 2; evt.rf_ra1 = 5'(6 + $urandom % 20);
      evt.rf_rd2 = $urandom % 2; evt.rf_ra2 = (n % 7 == 0) ? evt.rf_ra1 : 5'(6 + $urandom % 20);
      evt.rf_wr = $urandom % 2; evt.rf_wa = 5'(6 + $urandom % 20);
      evt.retire = $urandom % 2; evt.itype = itype_e'($urandom % 16);
      @(posedge clk); #1;
      if (evt.cycle) m_clk++;
      if (evt.retire && evt.itype < 14) m_it[evt.itype]++;
      for (int i = 0; i < 4; i++) begin
        if (evt.imem_rd && evt.imem_addr == a_im[i]) m_im[i]++;
        if (evt.dmem_rd && evt.dmem_addr == a_r[i]) m_rr[i]++;
        if (evt.dmem_wr && evt.dmem_addr == a_r[i]) m_rw[i]++;
      end
      for (int k = 0; k < 16; k++) begin
        if (evt.rf_rd1 && evt.rf_ra1 == 5'(8 + k)) m_reg_rd[k]++;
        if (evt.rf_rd2 && evt.rf_ra2 == 5'(8 + k)) m_reg_rd[k]++;
        if (evt.rf_wr && evt.rf_wa == 5'(8 + k)) m_reg_wr[k]++;
      end
      if (n == 99) begin
        evt = '0;
        a_r[2] = 16'h0004; cfg(CNT_RAMRD + 16'd2, a_r[2]); m_rr[2] = 0; m_rw[2] = 0;
        rd("cleared on set", CNT_RAMRD + 16'd2, 0);
      end
    end
    evt = '0; #1 check_all;
    evt.retire = 1; evt.itype = IT_LW;
    repeat (300) @(posedge clk); #1;
    evt = '0; rd("saturate", CNT_ITYPE + 16'(IT_LW), 255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
