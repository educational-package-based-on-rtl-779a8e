// tb_error_display: LEDs dark after reset, the first illegal opcode latched
// and shown, a later one lighting led[6] only, cleared by reset.
module tb_error_display;
  logic clk = 0, rst = 1, illegal = 0;
  always #5 clk = ~clk;
  logic [5:0] opcode = 0;
  logic [7:0] led;
  int checks = 0, failures = 0;
  error_display dut (.*);
  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    @(posedge clk); #1 rst = 0;
    chk("dark", led, 0);
    opcode = 6'd63; @(posedge clk); #1 chk("no error without flag", led, 0);
    illegal = 1; opcode = 6'd17; @(posedge clk); #1 illegal = 0;
    chk("error shown", led, 8'h91);
    illegal = 1; opcode = 6'd3; @(posedge clk); #1 illegal = 0;
    chk("first kept, more lit", led, 8'hD1);
    rst = 1; @(posedge clk); #1 rst = 0;
    chk("cleared", led, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
