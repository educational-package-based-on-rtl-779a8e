// mips_edu_top: the three processor versions of the educational MIPS
// package side by side, each a complete system (serial manager, control
// manager, wrapper with processor, memories, register file, event counters
// and error LEDs) with its own UART byte interface, LEDs and status. On the
// board only one version is loaded at a time; here all three are
// instantiated so that they can be exercised and compared together. Port
// names carry u_ (single-cycle), m_ (multicycle) and p_ (pipelined)
// prefixes. Parameters: memory sizes (1024 x 32 instruction memory and
// 256 x 32 data memory for the single-cycle and pipelined versions, 1536 x 32
// shared memory for the multicycle) and the counter widths (8-bit event
// counters, 16-bit clock counter). Single clock, synchronous active-high
// reset.
module mips_edu_top
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 256,
  parameter int unsigned MEM_WORDS  = 1536,
  parameter int unsigned CW         = 8,
  parameter int unsigned CLKW       = 16
) (
  input  logic       clk,
  input  logic       rst,
  // single-cycle system
  input  logic [7:0] u_rx_data,
  input  logic       u_rx_load,
  input  logic       u_tx_ready,
  output logic [7:0] u_tx_data,
  output logic       u_tx_enout,
  output logic [7:0] u_led,
  output logic [7:0] u_status,
  output logic       u_running,
  // multicycle system
  input  logic [7:0] m_rx_data,
  input  logic       m_rx_load,
  input  logic       m_tx_ready,
  output logic [7:0] m_tx_data,
  output logic       m_tx_enout,
  output logic [7:0] m_led,
  output logic [7:0] m_status,
  output logic       m_running,
  // pipelined system
  input  logic [7:0] p_rx_data,
  input  logic       p_rx_load,
  input  logic       p_tx_ready,
  output logic [7:0] p_tx_data,
  output logic       p_tx_enout,
  output logic [7:0] p_led,
  output logic [7:0] p_status,
  output logic       p_running
);
  mips_system #(.VERSION(V_UNICYCLE), .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS),
                .MEM_WORDS(MEM_WORDS), .CW(CW), .CLKW(CLKW)) u_uni (
    .clk, .rst, .rx_data(u_rx_data), .rx_load(u_rx_load), .tx_ready(u_tx_ready),
    .tx_data(u_tx_data), .tx_enout(u_tx_enout), .led(u_led), .status(u_status),
    .running(u_running)
  );
  mips_system #(.VERSION(V_MULTICYCLE), .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS),
                .MEM_WORDS(MEM_WORDS), .CW(CW), .CLKW(CLKW)) u_multi (
    .clk, .rst, .rx_data(m_rx_data), .rx_load(m_rx_load), .tx_ready(m_tx_ready),
    .tx_data(m_tx_data), .tx_enout(m_tx_enout), .led(m_led), .status(m_status),
    .running(m_running)
  );
  mips_system #(.VERSION(V_PIPELINE), .IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS),
                .MEM_WORDS(MEM_WORDS), .CW(CW), .CLKW(CLKW)) u_pipe (
    .clk, .rst, .rx_data(p_rx_data), .rx_load(p_rx_load), .tx_ready(p_tx_ready),
    .tx_data(p_tx_data), .tx_enout(p_tx_enout), .led(p_led), .status(p_status),
    .running(p_running)
  );
endmodule
