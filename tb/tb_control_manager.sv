// tb_control_manager: a RUN request of 0x006 must enable the processor for
// exactly 2 cycles, of 0x01E (field 7) for 8 cycles; a RESET during RUN stops
// the run and pulses the system reset for one cycle; the hazard-mode request
// sets and clears hazard_en; a RESET from IDLE pulses the reset.
module tb_control_manager;
  logic clk = 0, rst = 1, cm_interrupt = 0;
  always #5 clk = ~clk;
  logic [9:0] cm_request = 0;
  logic run, sys_reset, hazard_en, busy;
  int checks = 0, failures = 0, runs, resets;
  control_manager dut (.*);
  always @(posedge clk) begin
    if (run) runs++;
    if (sys_reset) resets++;
  end
  task automatic chk(string w, int g, int e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0d exp %0d", w, g, e); end
  endtask
  task automatic req(logic [9:0] r);
    cm_request = r; cm_interrupt = 1; @(posedge clk); #1 cm_interrupt = 0;
  endtask
  initial begin
    @(posedge clk); #1 rst = 0;
    runs = 0; req(10'h006); repeat (10) @(posedge clk); #1 chk("run 006 cycles", runs, 2);
    runs = 0; req({8'd7, 2'b10}); repeat (20) @(posedge clk); #1 chk("run 8 cycles", runs, 8);
    runs = 0; resets = 0; req({8'd100, 2'b10}); repeat (3) @(posedge clk); #1 req(10'h001);
    repeat (5) @(posedge clk); #1;
    chk("reset stops run", runs, 4);
    chk("reset pulse", resets, 1);
    chk("idle after reset", int'(busy), 0);
    req(10'b0000000111); chk("hazard on", int'(hazard_en), 1);
    req(10'b0000000011); chk("hazard off", int'(hazard_en), 0);
    resets = 0; req(10'h001); @(posedge clk); #1 chk("reset from idle", resets, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
