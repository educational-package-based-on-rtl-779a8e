// tb_wrapper: instantiates the wrapper in each of its three versions at full
// memory size and drives the host-request port directly (as the serial
// manager would): loads the instruction test program, runs it, and reads
// back registers, data memory, the program counter and counters. It checks
// host register and next-PC writes, that the multicycle version's
// instruction and data commands reach the same shared memory, that reset
// keeps memory but clears registers and counters, the version-specific
// status bits, and the error LEDs for an illegal word.
module tb_wrapper;
  import mips_pkg::*;
  import tb_asm_pkg::*;
  logic clk = 0, rst = 1, run = 0, hz = 1;
  always #5 clk = ~clk;
  host_req_t req [3];
  logic [31:0] rdata [3];
  logic [7:0] led [3], status [3];
  int checks = 0, failures = 0;
  int st_seen [3][8];

  wrapper #(.VERSION(V_UNICYCLE))   u0 (.clk, .rst, .run, .hazard_en(hz), .host_req(req[0]), .host_rdata(rdata[0]), .led(led[0]), .status(status[0]));
  wrapper #(.VERSION(V_MULTICYCLE)) u1 (.clk, .rst, .run, .hazard_en(hz), .host_req(req[1]), .host_rdata(rdata[1]), .led(led[1]), .status(status[1]));
  wrapper #(.VERSION(V_PIPELINE))   u2 (.clk, .rst, .run, .hazard_en(hz), .host_req(req[2]), .host_rdata(rdata[2]), .led(led[2]), .status(status[2]));

  always @(posedge clk)
    if (run) for (int s = 0; s < 3; s++) for (int b = 0; b < 8; b++) st_seen[s][b] += int'(status[s][b]);

  task automatic check(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %0h exp %0h", w, g, e); end
  endtask
  task automatic hw(int s, host_tgt_e t, logic [15:0] a, logic [31:0] d);
    req[s] = '{we: 1'b1, re: 1'b0, tgt: t, addr: a, wdata: d};
    @(posedge clk); #1 req[s] = '0;
  endtask
  task automatic hr(int s, host_tgt_e t, logic [15:0] a, output logic [31:0] d);
    req[s] = '{we: 1'b0, re: 1'b1, tgt: t, addr: a, wdata: 32'h0};
    #1 d = rdata[s];
    @(posedge clk); #1 req[s] = '0;
  endtask

  initial begin
    logic [31:0] v;
    string nm [3] = '{"single-cycle", "multicycle", "pipelined"};
    for (int s = 0; s < 3; s++) req[s] = '0;
    foreach (st_seen[s, b]) st_seen[s][b] = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int s = 0; s < 3; s++)
      for (int i = 0; i < ALU_LEN; i++) hw(s, TGT_IMEM, 16'(4 * i), alu_word(i));
    for (int s = 0; s < 3; s++) hw(s, TGT_CNT, CNT_RAMRD, 32'h100);
    run = 1; repeat (200) @(posedge clk); #1 run = 0;
    for (int s = 0; s < 3; s++) begin
      hr(s, TGT_REG, 16'(T2), v);  check({nm[s], " t2"}, v, 8);
      hr(s, TGT_REG, 16'(T5), v);  check({nm[s], " t5"}, v, 32'h7FFFFFFE);
      hr(s, TGT_REG, 16'd21, v);   check({nm[s], " s5"}, v, 24);
      hr(s, TGT_REG, 16'd23, v);   check({nm[s], " s7"}, v, 0);
      hr(s, TGT_DMEM, 16'h104, v); check({nm[s], " mem 0x104"}, v, 8);
      hr(s, TGT_CNT, CNT_RAMWR, v); check({nm[s], " writes to 0x100"}, v, 1);
      hr(s, TGT_CNT, CNT_RAMRD, v); check({nm[s], " reads of 0x100"}, v, 1);
      hr(s, TGT_CNT, CNT_ITYPE + 16'(IT_ADDI), v); check({nm[s], " addi count"}, v, 3);
      hr(s, TGT_CNT, CNT_CLOCK, v); check({nm[s], " clock"}, v, 200);
      hr(s, TGT_PC, 0, v);
      check({nm[s], " pc near halt"}, (v[15:0] == 16'h40 || v[15:0] == 16'h44), 1);
      check({nm[s], " retire seen"}, st_seen[s][0] > 0, 1);
    end
    // multicycle: the instruction command reads what the data command wrote
    hw(1, TGT_DMEM, 16'h200, 32'hCAFE);
    hr(1, TGT_IMEM, 16'h200, v); check("shared memory", v, 32'hCAFE);
    hw(0, TGT_IMEM, 16'h104, 32'h55);
    hr(0, TGT_IMEM, 16'h104, v); check("harvard: imem written", v, 32'h55);
    hr(0, TGT_DMEM, 16'h104, v); check("harvard: dmem separate", v, 8);
    // status bits
    check("single-cycle data write seen", st_seen[0][5] > 0, 1);
    check("multicycle state bits seen", st_seen[1][4] > 0, 1);
    check("pipelined load-use seen", st_seen[2][6] > 0, 1);
    check("pipelined lw->sw seen", st_seen[2][2] > 0, 1);
    // reset: memory kept, registers and counters cleared
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int s = 0; s < 3; s++) begin
      hr(s, TGT_IMEM, 16'h0, v);   check({nm[s], " memory kept"}, v, alu_word(0));
      hr(s, TGT_REG, 16'(T2), v);  check({nm[s], " register cleared"}, v, 0);
      hr(s, TGT_CNT, CNT_CLOCK, v); check({nm[s], " counter cleared"}, v, 0);
    end
    // host register write and next-PC set
    for (int s = 0; s < 3; s++) begin
      hw(s, TGT_REG, 16'd9, 32'h77);
      hr(s, TGT_REG, 16'd9, v);  check({nm[s], " host register write"}, v, 32'h77);
      hw(s, TGT_PC, 16'h0, 32'h20);
      hr(s, TGT_PC, 16'h0, v);   check({nm[s], " host next pc"}, v[31:16], 16'h20);
    end
    rst = 1; @(posedge clk); #1 rst = 0;
    // illegal word at address 0
    for (int s = 0; s < 3; s++) hw(s, TGT_IMEM, 16'h0, 32'hFC00_0000);
    run = 1; repeat (4) @(posedge clk); #1 run = 0;
    for (int s = 0; s < 3; s++) check({nm[s], " error leds"}, led[s], 8'hBF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
