// event_counters: the monitoring counters attached to every processor
// version. From the per-cycle event record `evt` it keeps:
//  * a clock counter (CLKW bits) counting executed processor cycles;
//  * fourteen instruction-type counters, one per instruction of the
//    instruction set, incremented when an instruction of that type retires;
//  * N_IMEM instruction-memory read counters, each watching one byte address
//    set by the host (not used by the multicycle version, N_IMEM = 0 there);
//  * N_RAM data-memory counter pairs (reads, writes), each watching one byte
//    address set by the host;
//  * read and write counters for the sixteen registers t0-t7 ($8-$15) and
//    s0-s7 ($16-$23); each register file read port used counts one read.
// All counters except the clock counter are CW bits wide (8 in the main
// configuration, 32 in the wide one) and saturate rather than wrap (the
// design's choice). Reset clears everything; setting a monitored address
// clears that slot's counters. Host access: cfg_we writes a monitored
// address (cfg_addr = CNT_IMEM+i or CNT_RAMRD+i, value in cfg_wdata);
// rd_addr selects a counter for rd_data, zero-extended to 32 bits
// (address map in mips_pkg). Counts update on the rising clock edge.
// Monitored addresses are 16 bits, so cfg_wdata[31:16] is unused.
module event_counters
  import mips_pkg::*;
#(
  parameter int unsigned CW     = 8,
  parameter int unsigned CLKW   = 16,
  parameter int unsigned N_IMEM = 4,
  parameter int unsigned N_RAM  = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  evt_t        evt,
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  logic [31:0] cfg_wdata,
  input  logic [15:0] rd_addr,
  output logic [31:0] rd_data
);
  localparam int unsigned NI = (N_IMEM == 0) ? 1 : N_IMEM;

  logic [CLKW-1:0] clk_cnt;
  logic [CW-1:0]   it_cnt  [N_ITYPES];
  logic [CW-1:0]   im_cnt  [NI];
  logic [15:0]     im_addr [NI];
  logic [CW-1:0]   rr_cnt  [N_RAM];
  logic [CW-1:0]   rw_cnt  [N_RAM];
  logic [15:0]     r_addr  [N_RAM];
  logic [CW-1:0]   reg_rd  [16];
  logic [CW-1:0]   reg_wr  [16];

  function automatic logic [CW-1:0] inc(input logic [CW-1:0] v, input logic c);
    return (c && v != '1) ? v + 1'b1 : v;
  endfunction
  function automatic logic [CW-1:0] inc2(input logic [CW-1:0] v, input logic c1, input logic c2);
    logic [CW:0] s;
    s = {1'b0, v} + (CW+1)'(c1) + (CW+1)'(c2);
    return s[CW] ? '1 : s[CW-1:0];
  endfunction
  // index into {t0..t7, s0..s7} for register numbers 8..23
  function automatic logic mon(input logic [4:0] r, input int k);
    return r == 5'(8 + k);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_cnt <= '0;
      for (int i = 0; i < N_ITYPES; i++) it_cnt[i] <= '0;
      for (int i = 0; i < NI; i++) begin im_cnt[i] <= '0; im_addr[i] <= '0; end
      for (int i = 0; i < N_RAM; i++) begin
        rr_cnt[i] <= '0; rw_cnt[i] <= '0; r_addr[i] <= '0;
      end
      for (int i = 0; i < 16; i++) begin reg_rd[i] <= '0; reg_wr[i] <= '0; end
    end else begin
      if (evt.cycle && clk_cnt != '1) clk_cnt <= clk_cnt + 1'b1;
      for (int i = 0; i < N_ITYPES; i++)
        it_cnt[i] <= inc(it_cnt[i], evt.retire && evt.itype == itype_e'(i));
      for (int i = 0; i < NI; i++) begin
        if (cfg_we && cfg_addr == CNT_IMEM + 16'(i) && N_IMEM != 0) begin
          im_addr[i] <= cfg_wdata[15:0];
          im_cnt[i]  <= '0;
        end else if (N_IMEM != 0) begin
          im_cnt[i] <= inc(im_cnt[i], evt.imem_rd && evt.imem_addr == im_addr[i]);
        end
      end
      for (int i = 0; i < N_RAM; i++) begin
        if (cfg_we && cfg_addr == CNT_RAMRD + 16'(i)) begin
          r_addr[i] <= cfg_wdata[15:0];
          rr_cnt[i] <= '0;
          rw_cnt[i] <= '0;
        end else begin
          rr_cnt[i] <= inc(rr_cnt[i], evt.dmem_rd && evt.dmem_addr == r_addr[i]);
          rw_cnt[i] <= inc(rw_cnt[i], evt.dmem_wr && evt.dmem_addr == r_addr[i]);
        end
      end
      for (int k = 0; k < 16; k++) begin
        reg_rd[k] <= inc2(reg_rd[k], evt.rf_rd1 && mon(evt.rf_ra1, k),
                                     evt.rf_rd2 && mon(evt.rf_ra2, k));
        reg_wr[k] <= inc(reg_wr[k], evt.rf_wr && mon(evt.rf_wa, k));
      end
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr == CNT_CLOCK)
      rd_data = 32'(clk_cnt);
    for (int i = 0; i < N_ITYPES; i++)
      if (rd_addr == CNT_ITYPE + 16'(i)) rd_data = 32'(it_cnt[i]);
    for (int i = 0; i < NI; i++)
      if (N_IMEM != 0 && rd_addr == CNT_IMEM + 16'(i)) rd_data = 32'(im_cnt[i]);
    for (int i = 0; i < N_RAM; i++) begin
      if (rd_addr == CNT_RAMRD + 16'(i)) rd_data = 32'(rr_cnt[i]);
      if (rd_addr == CNT_RAMWR + 16'(i)) rd_data = 32'(rw_cnt[i]);
    end
    for (int k = 0; k < 16; k++) begin
      if (rd_addr == CNT_REGRD + 16'(k)) rd_data = 32'(reg_rd[k]);
      if (rd_addr == CNT_REGWR + 16'(k)) rd_data = 32'(reg_wr[k]);
    end
  end
endmodule
