// mips_system: the hardware side of the educational package for one
// processor version: the serial manager, which talks to the PC through the
// UART core's byte interface; the control manager, which runs or resets the
// processor on request; and the wrapper holding the processor, its memories,
// its register file, its event counters and the error LEDs. The UART core
// itself is not part of this design: its parallel byte interface (received
// byte with a load strobe, byte to send with an enable strobe, transmitter
// ready) forms this module's ports. A reset of the board (`rst`) or a RESET
// command clears the processor and its counters. Single clock, rising edge.
module mips_system
  import mips_pkg::*;
#(
  parameter version_e    VERSION    = V_UNICYCLE,
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 256,
  parameter int unsigned MEM_WORDS  = 1536,
  parameter int unsigned CW         = 8,
  parameter int unsigned CLKW       = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] rx_data,
  input  logic       rx_load,
  input  logic       tx_ready,
  output logic [7:0] tx_data,
  output logic       tx_enout,
  output logic [7:0] led,
  output logic [7:0] status,
  output logic       running
);
  logic        cm_interrupt, run, sys_reset, hazard_en, busy;
  logic [9:0]  cm_request;
  host_req_t   host_req;
  logic [31:0] host_rdata;

  serial_manager u_sm (
    .clk, .rst, .rx_data, .rx_load, .tx_ready, .tx_data, .tx_enout,
    .cm_interrupt, .cm_request, .host_req, .host_rdata
  );

  control_manager u_cm (
    .clk, .rst, .cm_interrupt, .cm_request, .run, .sys_reset, .hazard_en, .busy
  );

  wrapper #(
    .VERSION(VERSION), .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS),
    .MEM_WORDS(MEM_WORDS), .CW(CW), .CLKW(CLKW)
  ) u_wrap (
    .clk, .rst(rst | sys_reset), .run, .hazard_en, .host_req, .host_rdata,
    .led, .status
  );

  assign running = busy;
endmodule
