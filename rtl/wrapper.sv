// wrapper: one processor version together with its memories, its register
// file, its event counters and its error display, plus the decoding of host
// requests from the serial manager. VERSION selects the processor:
//  * V_UNICYCLE / V_PIPELINE: instruction memory (IMEM_WORDS x 32) and data
//    memory (DMEM_WORDS x 32), 4 instruction-address and 4 data-address
//    monitors;
//  * V_MULTICYCLE: one shared memory (MEM_WORDS x 32), reached by both the
//    instruction and the data host commands, with 8 address monitors.
// Host requests (one cycle, while the processor is stopped): memories take a
// byte address; the register file a register number; TGT_PC writes set the
// next PC and reads return {next PC[15:0], current PC[15:0]}; TGT_CNT writes
// set a monitored address and reads return a counter. host_rdata is
// combinational from host_req. `run` advances the processor one cycle per
// clock; `rst` clears the processor, the register file and the counters
// (memory contents are kept). `status` exposes per-cycle activity for
// test equipment or board LEDs (this design's addition):
//  * pipelined:    {illegal, load-use stall, branch stall, flush, EX forward,
//                   MEM forward, ID forward, retire};
//  * single-cycle: {illegal, data read, data write, register write, register
//                   read port 1, register read port 2, fetch, retire};
//  * multicycle:   {illegal, memory read, memory write, state code[3:0],
//                   retire}.
// Lint notes: hazard_en is a port of every version so that all wrappers have
// the same interface, and only the pipelined version uses it; only the low
// 16 bits of the program counter are reported to the host, since no memory
// here is larger than 64 KiB.
module wrapper
  import mips_pkg::*;
#(
  parameter version_e    VERSION    = V_UNICYCLE,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 256,
  parameter int unsigned MEM_WORDS  = 1536,
  parameter int unsigned CW         = 8,
  parameter int unsigned CLKW       = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        run,
  input  logic        hazard_en,
  input  host_req_t   host_req,
  output logic [31:0] host_rdata,
  output logic [7:0]  led,
  output logic [7:0]  status
);

  // register file
  logic [4:0]  rf_ra1, rf_ra2, rf_wa;
  logic [31:0] rf_rd1, rf_rd2, rf_wd, rf_douta;
  logic        rf_we, rf_ena;

  // data memory (processor side)
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic        dmem_we;
  // memories (host side)
  logic [31:0] h_imem_rdata, h_dmem_rdata;

  logic [31:0] pc_cur, pc_nxt;
  logic        pc_set;
  evt_t        evt;
  logic        illegal;
  logic [5:0]  illegal_op;
  logic [31:0] cnt_rdata;

  assign rf_ena = (host_req.tgt == TGT_REG) && (host_req.we || host_req.re);
  assign pc_set = host_req.we && host_req.tgt == TGT_PC;

  register_file u_rf (
    .clk, .rst, .read_reg1(rf_ra1), .read_reg2(rf_ra2), .read_data1(rf_rd1),
    .read_data2(rf_rd2), .reg_write(rf_we), .write_reg(rf_wa), .write_data(rf_wd),
    .ena(rf_ena), .wea(host_req.we), .addra(host_req.addr[4:0]),
    .dina(host_req.wdata), .douta(rf_douta)
  );

  generate
    if (VERSION == V_UNICYCLE || VERSION == V_PIPELINE) begin : g_harvard
      logic [31:0] imem_addr, imem_rdata;
      logic        h_imem_we, h_dmem_we;
      assign h_imem_we = host_req.we && host_req.tgt == TGT_IMEM;
      assign h_dmem_we = host_req.we && host_req.tgt == TGT_DMEM;

      dual_port_ram #(.DEPTH(IMEM_WORDS)) u_imem (
        .clk, .p_addr(imem_addr), .p_we(1'b0), .p_wdata('0), .p_rdata(imem_rdata),
        .h_addr({2'b00, host_req.addr[15:2]}), .h_we(h_imem_we),
        .h_wdata(host_req.wdata), .h_rdata(h_imem_rdata)
      );
      dual_port_ram #(.DEPTH(DMEM_WORDS)) u_dmem (
        .clk, .p_addr(dmem_addr), .p_we(dmem_we), .p_wdata(dmem_wdata),
        .p_rdata(dmem_rdata), .h_addr({2'b00, host_req.addr[15:2]}),
        .h_we(h_dmem_we), .h_wdata(host_req.wdata), .h_rdata(h_dmem_rdata)
      );

      if (VERSION == V_UNICYCLE) begin : g_uni
        mips_unicycle u_cpu (
          .clk, .rst, .en(run), .imem_addr, .imem_rdata, .dmem_addr, .dmem_we,
          .dmem_wdata, .dmem_rdata, .rf_ra1, .rf_ra2, .rf_rd1, .rf_rd2, .rf_we,
          .rf_wa, .rf_wd, .pc_set, .pc_set_val(host_req.wdata), .pc_cur, .pc_nxt,
          .evt, .illegal, .illegal_op
        );
        assign status = {illegal, evt.dmem_rd, evt.dmem_wr, evt.rf_wr, evt.rf_rd1,
                         evt.rf_rd2, evt.imem_rd, evt.retire};
      end else begin : g_pipe
        logic s_lu, s_bw, s_fl, s_fe, s_fm, s_fi;
        mips_pipeline u_cpu (
          .clk, .rst, .en(run), .hazard_en, .imem_addr, .imem_rdata, .dmem_addr,
          .dmem_we, .dmem_wdata, .dmem_rdata, .rf_ra1, .rf_ra2, .rf_rd1, .rf_rd2,
          .rf_we, .rf_wa, .rf_wd, .pc_set, .pc_set_val(host_req.wdata), .pc_cur,
          .pc_nxt, .evt, .illegal, .illegal_op, .st_load_use(s_lu),
          .st_branch_wait(s_bw), .st_flush(s_fl), .st_fwd_ex(s_fe),
          .st_fwd_mem(s_fm), .st_fwd_id(s_fi)
        );
        assign status = {illegal, s_lu, s_bw, s_fl, s_fe, s_fm, s_fi, evt.retire};
      end

      event_counters #(.CW(CW), .CLKW(CLKW), .N_IMEM(4), .N_RAM(4)) u_cnt (
        .clk, .rst, .evt, .cfg_we(host_req.we && host_req.tgt == TGT_CNT),
        .cfg_addr(host_req.addr), .cfg_wdata(host_req.wdata),
        .rd_addr(host_req.addr), .rd_data(cnt_rdata)
      );
    end else begin : g_shared
      logic [3:0] step;
      logic       h_mem_we;
      assign h_mem_we = host_req.we && (host_req.tgt == TGT_IMEM || host_req.tgt == TGT_DMEM);

      dual_port_ram #(.DEPTH(MEM_WORDS)) u_mem (
        .clk, .p_addr(dmem_addr), .p_we(dmem_we), .p_wdata(dmem_wdata),
        .p_rdata(dmem_rdata), .h_addr({2'b00, host_req.addr[15:2]}),
        .h_we(h_mem_we), .h_wdata(host_req.wdata), .h_rdata(h_imem_rdata)
      );
      assign h_dmem_rdata = h_imem_rdata;

      mips_multicycle u_cpu (
        .clk, .rst, .en(run), .mem_addr(dmem_addr), .mem_we(dmem_we),
        .mem_wdata(dmem_wdata), .mem_rdata(dmem_rdata), .rf_ra1, .rf_ra2, .rf_rd1,
        .rf_rd2, .rf_we, .rf_wa, .rf_wd, .pc_set, .pc_set_val(host_req.wdata),
        .pc_cur, .pc_nxt, .step, .evt, .illegal, .illegal_op
      );
      assign status = {illegal, evt.dmem_rd, evt.dmem_wr, step, evt.retire};

      event_counters #(.CW(CW), .CLKW(CLKW), .N_IMEM(0), .N_RAM(8)) u_cnt (
        .clk, .rst, .evt, .cfg_we(host_req.we && host_req.tgt == TGT_CNT),
        .cfg_addr(host_req.addr), .cfg_wdata(host_req.wdata),
        .rd_addr(host_req.addr), .rd_data(cnt_rdata)
      );
    end
  endgenerate

  error_display u_err (.clk, .rst, .illegal, .opcode(illegal_op), .led);

  always_comb begin
    unique case (host_req.tgt)
      TGT_IMEM: host_rdata = h_imem_rdata;
      TGT_DMEM: host_rdata = h_dmem_rdata;
      TGT_REG:  host_rdata = rf_douta;
      TGT_PC:   host_rdata = {pc_nxt[15:0], pc_cur[15:0]};
      default:  host_rdata = cnt_rdata;
    endcase
  end
endmodule
