// tb_pc_register: reset to 0, loading the datapath's next address only when
// enabled, and a host-set next address replacing exactly one update.
module tb_pc_register;
  logic clk = 0, rst = 1, en = 0, host_set = 0;
  always #5 clk = ~clk;
  logic [31:0] next_dp = 0, host_val = 0, pc, pc_next;
  int checks = 0, failures = 0;
  pc_register dut (.*);
  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    @(posedge clk); #1 rst = 0;
    chk("reset", pc, 0);
    next_dp = 32'h40; @(posedge clk); #1 chk("hold when disabled", pc, 0);
    en = 1; @(posedge clk); #1 chk("load", pc, 32'h40);
    en = 0; host_set = 1; host_val = 32'h120; @(posedge clk); #1 host_set = 0;
    chk("next shows host", pc_next, 32'h120);
    chk("host not yet applied", pc, 32'h40);
    en = 1; @(posedge clk); #1 chk("host applied", pc, 32'h120);
    chk("pending consumed", pc_next, 32'h40);
    next_dp = 32'h124; @(posedge clk); #1 chk("normal again", pc, 32'h124);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
