// error_display: the error module. When the processor reports an
// instruction it cannot execute (unknown opcode or function field), the
// module latches the error and the offending opcode and shows them on the
// board LEDs: led[7] lights for an error, led[5:0] give the opcode, and
// led[6] lights if further errors occurred after the first. It keeps the
// first error until reset. The document says only that unrecognised
// opcodes are signalled on the LEDs; the LED layout is this design's choice.
module error_display (
  input  logic       clk,
  input  logic       rst,
  input  logic       illegal,
  input  logic [5:0] opcode,
  output logic [7:0] led
);
  logic       err, more;
  logic [5:0] code;
  always_ff @(posedge clk) begin
    if (rst) begin
      err  <= 1'b0;
      more <= 1'b0;
      code <= '0;
    end else if (illegal && !err) begin
      err  <= 1'b1;
      code <= opcode;
    end else if (illegal) begin
      more <= 1'b1;
    end
  end
  assign led = {err, more, code};
endmodule
