// dual_port_ram: a word-addressed memory with one processor port and one
// host port, used for the instruction memory (1024 words), the data memory
// (256 words) and the multicycle processor's shared memory (1536 words).
// Both ports read asynchronously, so a processor can fetch or load within
// its cycle as in the textbook datapaths, and both write on the rising clock
// edge. The processor port addresses with a byte address (bits [1:0] are
// ignored, which lint reports as unused bits); the host port with a word
// index. If both ports write the same
// word in one cycle the host wins. Addresses at or beyond DEPTH read 0 and
// are not written. Contents are not reset. The sizes and the two-port
// organisation follow the memory section; asynchronous reads and a single
// clock are this design's choice (the original used synchronous block RAMs
// clocked by an auxiliary clock at twice the processor rate).
module dual_port_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic        clk,
  // processor port
  input  logic [31:0] p_addr,
  input  logic        p_we,
  input  logic [31:0] p_wdata,
  output logic [31:0] p_rdata,
  // host port
  input  logic [15:0] h_addr,
  input  logic        h_we,
  input  logic [31:0] h_wdata,
  output logic [31:0] h_rdata
);
  logic [31:0] mem [DEPTH];
  logic [31:0] p_word;
  logic        p_ok, h_ok;

  assign p_word = {2'b00, p_addr[31:2]};
  assign p_ok   = p_word < DEPTH;
  assign h_ok   = 32'(h_addr) < DEPTH;

  assign p_rdata = p_ok ? mem[p_word[AW-1:0]] : '0;
  assign h_rdata = h_ok ? mem[h_addr[AW-1:0]] : '0;

  always_ff @(posedge clk) begin
    if (p_we && p_ok) mem[p_word[AW-1:0]] <= p_wdata;
    if (h_we && h_ok) mem[h_addr[AW-1:0]] <= h_wdata;
  end
endmodule
