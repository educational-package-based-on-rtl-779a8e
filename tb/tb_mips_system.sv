// tb_mips_system: one complete system (serial manager, control manager and
// wrapper) in its pipelined version, driven only through the serial byte
// interface. It loads the instruction test program, checks that RUN with a
// count byte of 1 runs exactly 2 cycles (the document's 0x006 request) by
// reading the clock counter, enables the hazard mode, runs the program to
// its halt and reads back results, then checks RESET and that `running` is
// high only while a RUN lasts.
module tb_mips_system;
  import mips_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] rx_data = 0, tx_data, led, status;
  logic rx_load = 0, tx_enout, running;
  logic [31:0] answer = 0;
  int nbytes = 0, run_cycles = 0;
  int checks = 0, failures = 0;
  mips_system #(.VERSION(V_PIPELINE)) dut (.clk, .rst, .rx_data, .rx_load, .tx_ready(1'b1),
    .tx_data, .tx_enout, .led, .status, .running);
  always @(posedge clk) begin
    if (!rst && tx_enout) begin answer <= {answer[23:0], tx_data}; nbytes <= nbytes + 1; end
    if (!rst && running) run_cycles <= run_cycles + 1;
  end
  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0h exp %0h", w, g, e); end
  endtask
  task automatic send(logic [7:0] b);
    rx_data = b; rx_load = 1; @(posedge clk); #1 rx_load = 0; @(posedge clk); #1;
  endtask
  task automatic wr(cmd_e c, logic [15:0] a, logic [31:0] d);
    send(c); send(a[15:8]); send(a[7:0]); send(d[31:24]); send(d[23:16]); send(d[15:8]); send(d[7:0]);
  endtask
  task automatic rd(cmd_e c, logic [15:0] a, output logic [31:0] d);
    int t = 0;
    nbytes = 0;
    send(c); send(a[15:8]); send(a[7:0]);
    while (nbytes < 4 && t < 100) begin @(posedge clk); t++; end
    #1 d = answer;
  endtask
  task automatic run(logic [7:0] n);
    int t = 0;
    send(CMD_RUN); send(n);
    while (running && t < 1000) begin @(posedge clk); t++; end
    repeat (2) @(posedge clk); #1;
  endtask
  initial begin
    logic [31:0] v;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < ALU_LEN; i++) wr(CMD_WR_IMEM, 16'(4 * i), alu_word(i));
    run_cycles = 0;
    run(8'd1);
    rd(CMD_RD_CNT, CNT_CLOCK, v); check("RUN 0x006 runs 2 cycles", v, 2);
    check("running high exactly 2 cycles", run_cycles, 2);
    rd(CMD_RD_REG, 16'(T0), v); check("t0 after 2 cycles not yet written", v, 0);
    send(CMD_RESET); repeat (2) @(posedge clk); #1;
    send(CMD_HAZARD); send(8'h01);
    run(8'd39);
    rd(CMD_RD_REG, 16'(T2), v); check("t2", v, 8);
    rd(CMD_RD_REG, 16'd21, v);  check("s5", v, 24);
    rd(CMD_RD_REG, 16'd22, v);  check("s6", v, 1);
    rd(CMD_RD_DMEM, 16'h104, v); check("lw->sw result", v, 8);
    rd(CMD_RD_CNT, CNT_CLOCK, v); check("clock after reset and run", v, 40);
    check("not running when idle", running, 0);
    send(CMD_RESET); repeat (2) @(posedge clk); #1;
    rd(CMD_RD_REG, 16'(T2), v); check("reset clears registers", v, 0);
    rd(CMD_RD_IMEM, 16'h8, v); check("reset keeps memory", v, alu_word(2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
