// register_file: the 32 x 32-bit MIPS register file with the host-access
// multiplexers placed in front of it. The processor uses two asynchronous
// read ports and one write port, written on the rising clock edge when
// reg_write is high. When the host enable `ena` is high, the host's address
// `addra` replaces read address 1 and the write address, and `wea`/`dina`
// replace the processor's write enable and data, so the host can read
// (`douta`) or write any register through the same ports; the host and the
// processor are never active in the same cycle. Register $0 always reads as
// zero and ignores writes (MIPS convention; the design's own choice). Reset
// clears all registers. The port-sharing multiplexers follow the register
// file figure; the reset and $0 behaviour are this design's choices.
module register_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  // processor side
  input  logic [4:0]       read_reg1,
  input  logic [4:0]       read_reg2,
  output logic [WIDTH-1:0] read_data1,
  output logic [WIDTH-1:0] read_data2,
  input  logic             reg_write,
  input  logic [4:0]       write_reg,
  input  logic [WIDTH-1:0] write_data,
  // host (serial manager) side
  input  logic             ena,
  input  logic             wea,
  input  logic [4:0]       addra,
  input  logic [WIDTH-1:0] dina,
  output logic [WIDTH-1:0] douta
);
  logic [WIDTH-1:0] regs [NREGS];
  logic [4:0]       ra1, wa;
  logic             we;
  logic [WIDTH-1:0] wd;

  assign ra1 = ena ? addra : read_reg1;
  assign wa  = ena ? addra : write_reg;
  assign we  = ena ? wea   : reg_write;
  assign wd  = ena ? dina  : write_data;

  assign read_data1 = (ra1 == 5'd0) ? '0 : regs[ra1];
  assign read_data2 = (read_reg2 == 5'd0) ? '0 : regs[read_reg2];
  assign douta      = read_data1;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end
endmodule
