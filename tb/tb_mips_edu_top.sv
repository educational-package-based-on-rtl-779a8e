// tb_mips_edu_top: end-to-end test of the whole package at its full size (no
// parameter overrides), driving each of the three systems only through its
// serial byte interface, as the host program would.
// For each processor version it
//  * loads the bubble-sort program, its data and registers (WR_IMEM, WR_DMEM,
//    WR_REG), sets a data-address monitor and, for the single-cycle and
//    pipelined versions, an instruction-address monitor (SET_CNT);
//  * runs exactly one cycle less than the program needs (RUN commands of at
//    most 256 cycles each), checks through RD_CNT that the final halt jump has
//    not yet executed, runs one more cycle and checks that it has: this pins
//    the cycle count of each version (348 single-cycle as in the document;
//    multicycle and pipelined from the reference model in tb_asm_pkg);
//  * reads the sorted data back (RD_DMEM), the clock counter, the jump,
//    load and store counters, the data-address monitor and the t0 write
//    counter, then all type counters at once with RD_TYPES (their sum must be
//    the executed count less the leading nop).
// It also checks SET_PC/RD_PC, RESET (counters and registers cleared, memory
// kept), the illegal-opcode display on each system's LEDs, and, on the
// pipelined system, the short instruction program with hazard resolution on
// (right result) and off (wrong result).
// Mechanism counts: the pipelined system's status bits are counted while it
// runs (load-use stall, branch stall, flush, EX forward, lw->sw forward, ID
// forward), together with RUN and RESET commands, hazard-mode switches,
// monitor settings and error displays; any mechanism that never happened is a
// failure.
module tb_mips_edu_top;
  import mips_pkg::*;
  import tb_asm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [7:0] rxd [3];
  logic       rxl [3];
  logic [7:0] txd [3];
  logic       txe [3];
  logic [7:0] led [3];
  logic [7:0] sts [3];
  logic       running [3];

  mips_edu_top dut (
    .clk, .rst,
    .u_rx_data(rxd[0]), .u_rx_load(rxl[0]), .u_tx_ready(1'b1), .u_tx_data(txd[0]), .u_tx_enout(txe[0]),
    .u_led(led[0]), .u_status(sts[0]), .u_running(running[0]),
    .m_rx_data(rxd[1]), .m_rx_load(rxl[1]), .m_tx_ready(1'b1), .m_tx_data(txd[1]), .m_tx_enout(txe[1]),
    .m_led(led[1]), .m_status(sts[1]), .m_running(running[1]),
    .p_rx_data(rxd[2]), .p_rx_load(rxl[2]), .p_tx_ready(1'b1), .p_tx_data(txd[2]), .p_tx_enout(txe[2]),
    .p_led(led[2]), .p_status(sts[2]), .p_running(running[2])
  );

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (%0h) expected %0d (%0h)", what, got, got, exp, exp);
    end
  endtask

  // ---- answers from the serial transmitters ----
  logic [31:0] answer [3];
  int          nbytes [3];
  always @(posedge clk) begin
    for (int s = 0; s < 3; s++)
      if (!rst && txe[s]) begin
        answer[s] <= {answer[s][23:0], txd[s]};
        nbytes[s] <= nbytes[s] + 1;
      end
  end

  // ---- mechanism counters ----
  int n_lu = 0, n_bw = 0, n_fl = 0, n_fe = 0, n_fm = 0, n_fi = 0;
  int n_run = 0, n_reset = 0, n_mode = 0, n_mon = 0, n_err = 0, n_retire = 0;
  always @(posedge clk) begin
    if (!rst && running[2]) begin
      n_lu <= n_lu + int'(sts[2][6]);
      n_bw <= n_bw + int'(sts[2][5]);
      n_fl <= n_fl + int'(sts[2][4]);
      n_fe <= n_fe + int'(sts[2][3]);
      n_fm <= n_fm + int'(sts[2][2]);
      n_fi <= n_fi + int'(sts[2][1]);
      n_retire <= n_retire + int'(sts[2][0]);
    end
  end

  // ---- byte-level host ----
  task automatic send(int s, logic [7:0] b);
    rxd[s] = b; rxl[s] = 1; @(posedge clk); #1 rxl[s] = 0;
    @(posedge clk); #1;
  endtask
  task automatic cmd_write(int s, cmd_e c, logic [15:0] a, logic [31:0] d);
    send(s, c); send(s, a[15:8]); send(s, a[7:0]);
    send(s, d[31:24]); send(s, d[23:16]); send(s, d[15:8]); send(s, d[7:0]);
    @(posedge clk); #1;
    if (c == CMD_SET_CNT) n_mon++;
  endtask
  task automatic cmd_read(int s, cmd_e c, logic [15:0] a, output logic [31:0] d);
    int t = 0;
    nbytes[s] = 0;
    send(s, c);
    if (c != CMD_RD_PC) begin send(s, a[15:8]); send(s, a[7:0]); end
    while (nbytes[s] < 4 && t < 100) begin @(posedge clk); t++; end
    #1 d = answer[s];
    if (nbytes[s] != 4) begin checks++; failures++; $display("FAIL no answer from system %0d", s); end
  endtask
  task automatic reset_sys(int s);
    send(s, CMD_RESET); repeat (3) @(posedge clk); #1;
    n_reset++;
  endtask
  task automatic hazard(int s, bit on);
    send(s, CMD_HAZARD); send(s, {7'b0, on}); repeat (2) @(posedge clk); #1;
    n_mode++;
  endtask
  // run exactly `n` cycles, in pieces of at most 256
  task automatic run_cycles(int s, int n);
    while (n > 0) begin
      int k, t;
      k = (n > 256) ? 256 : n;
      send(s, CMD_RUN); send(s, 8'(k - 1));
      t = 0;
      while (running[s] && t < 1000) begin @(posedge clk); t++; end
      repeat (2) @(posedge clk); #1;
      n -= k;
      n_run++;
    end
  endtask
  task automatic load_sort(int s);
    int data_word, first, inc;
    data_word = (s == 1) ? SORT_LEN : 1;
    inc = (s == 1) ? T6 : T3;
    for (int i = 0; i < SORT_LEN; i++) cmd_write(s, CMD_WR_IMEM, 16'(4 * i), sort_word(i, inc));
    for (int i = 0; i < SORT_N; i++) cmd_write(s, CMD_WR_DMEM, 16'(4 * (data_word + i)), sort_data(i));
    first = 4 * data_word;
    cmd_write(s, CMD_WR_REG, 16'(T3), 32'(first));
    cmd_write(s, CMD_WR_REG, 16'(T4), 32'd1);
    cmd_write(s, CMD_WR_REG, 16'(S4), 32'(SORT_N - 1));
    if (s == 1) cmd_write(s, CMD_WR_REG, 16'(T6), 32'd4);
    // monitors: first data word, and the instruction at line 4 (lw t0)
    cmd_write(s, CMD_SET_CNT, CNT_RAMRD, 32'(first));
    if (s != 1) cmd_write(s, CMD_SET_CNT, CNT_IMEM, 32'h10);
  endtask

  // expected reads/writes of the first data word during the sort
  int ref_rd0, ref_wr0;
  task automatic sort_ref;
    int a[SORT_N];
    bit sw;
    ref_rd0 = 0; ref_wr0 = 0;
    for (int i = 0; i < SORT_N; i++) a[i] = int'(sort_data(i));
    do begin
      sw = 0;
      for (int i = 0; i < SORT_N - 1; i++) begin
        if (i == 0) ref_rd0++;
        if (a[i] < a[i+1]) begin
          int t;
          t = a[i]; a[i] = a[i+1]; a[i+1] = t; sw = 1;
          if (i == 0) ref_wr0++;
        end
      end
    end while (sw);
  endtask

  string vname [3] = '{"single-cycle", "multicycle", "pipelined"};

  task automatic sort_on(int s);
    sort_stats_t st;
    int expc, data_word;
    logic [31:0] v, prev;
    st = sort_model(SORT_N);
    expc = (s == 0) ? st.total : (s == 1) ? multi_cycles(st) : st.pipe_cycles;
    data_word = (s == 1) ? SORT_LEN : 1;
    reset_sys(s);
    if (s == 2) hazard(2, 1);   // hazard resolution is off until the host enables it
    load_sort(s);
    run_cycles(s, expc - 1);
    cmd_read(s, CMD_RD_CNT, CNT_ITYPE + 16'(IT_J), v);
    check({vname[s], " jumps one cycle early"}, v, st.jmp - 1);
    run_cycles(s, 1);
    cmd_read(s, CMD_RD_CNT, CNT_ITYPE + 16'(IT_J), v);
    check({vname[s], " jumps at the expected cycle"}, v, st.jmp);
    cmd_read(s, CMD_RD_CNT, CNT_CLOCK, v);
    check({vname[s], " clock counter"}, v, expc);
    cmd_read(s, CMD_RD_CNT, CNT_ITYPE + 16'(IT_LW), v);
    check({vname[s], " lw counter"}, v, st.lw);
    cmd_read(s, CMD_RD_CNT, CNT_ITYPE + 16'(IT_SW), v);
    check({vname[s], " sw counter"}, v, st.sw);
    cmd_read(s, CMD_RD_CNT, CNT_ITYPE + 16'(IT_BEQ), v);
    begin
      logic [31:0] v2;
      cmd_read(s, CMD_RD_CNT, CNT_ITYPE + 16'(IT_BNE), v2);
      check({vname[s], " branch counters"}, v + v2, st.br);
    end
    cmd_read(s, CMD_RD_CNT, CNT_RAMRD, v);
    check({vname[s], " first word reads"}, v, ref_rd0);
    cmd_read(s, CMD_RD_CNT, CNT_RAMWR, v);
    check({vname[s], " first word writes"}, v, ref_wr0);
    cmd_read(s, CMD_RD_CNT, CNT_REGWR + 16'd0, v);
    check({vname[s], " t0 writes"}, v, st.lw / 2);
    // all instruction-type counters in one burst
    begin
      logic [31:0] w [N_ITYPES];
      int t = 0, sum = 0;
      nbytes[s] = 0;
      send(s, CMD_RD_TYPES);
      for (int i = 0; i < N_ITYPES; i++) begin
        while (nbytes[s] < 4 * (i + 1) && t < 2000) begin @(posedge clk); t++; end
        #1 w[i] = answer[s];
      end
      foreach (w[i]) sum += int'(w[i]);
      check({vname[s], " burst: lw"}, w[IT_LW], st.lw);
      check({vname[s], " burst: j"}, w[IT_J], st.jmp);
      check({vname[s], " burst: sw"}, w[IT_SW], st.sw);
      // every executed instruction except the leading nop has a type
      check({vname[s], " burst: all types"}, sum, st.total - 1);
    end
    if (s == 0) begin
      cmd_read(s, CMD_RD_CNT, CNT_IMEM, v);
      check("single-cycle fetches of line 4", v, st.lw / 2);
    end
    if (s == 2) begin
      cmd_read(s, CMD_RD_CNT, CNT_IMEM, v);
      checks++;
      if (v < 32'(st.lw / 2)) begin failures++; $display("FAIL pipelined fetches of line 4: %0d", v); end
    end
    for (int i = 0; i < SORT_N; i++) begin
      cmd_read(s, CMD_RD_DMEM, 16'(4 * (data_word + i)), v);
      if (i > 0) begin
        checks++;
        if ($signed(v) > $signed(prev)) begin failures++; $display("FAIL %s not sorted at %0d", vname[s], i); end
      end
      if (i == 0) check({vname[s], " largest first"}, v, 75);
      if (i == SORT_N - 1) check({vname[s], " smallest last"}, v, 17);
      prev = v;
    end
    cmd_read(s, CMD_RD_PC, 0, v);
    // the pipelined PC is the fetch address: the halt is in ID again and the
    // word after it is being fetched
    check({vname[s], " pc at halt"}, v[15:0], 4 * HALT_LINE + ((s == 2) ? 4 : 0));
  endtask

  task automatic illegal_on(int s);
    logic [31:0] v;
    reset_sys(s);
    check({vname[s], " leds dark after reset"}, led[s], 0);
    cmd_write(s, CMD_WR_IMEM, 16'h0, 32'hFC00_0000);
    run_cycles(s, 4);
    check({vname[s], " error led"}, led[s], 8'hBF);
    if (led[s][7]) n_err++;
    reset_sys(s);
    cmd_read(s, CMD_RD_IMEM, 16'h0, v);
    check({vname[s], " memory kept over reset"}, v, 32'hFC00_0000);
  endtask

  initial begin
    logic [31:0] v;
    for (int s = 0; s < 3; s++) begin rxd[s] = 0; rxl[s] = 0; nbytes[s] = 0; answer[s] = 0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    sort_ref;

    // ---- SET_PC / RD_PC / RESET on each system ----
    for (int s = 0; s < 3; s++) begin
      cmd_write(s, CMD_WR_REG, 16'd9, 32'h1234);
      send(s, CMD_SET_PC); send(s, 8'h00); send(s, 8'h40); @(posedge clk); #1;
      cmd_read(s, CMD_RD_PC, 0, v);
      check({vname[s], " next pc set"}, v[31:16], 16'h40);
      cmd_read(s, CMD_RD_REG, 16'd9, v);
      check({vname[s], " register written"}, v, 32'h1234);
      reset_sys(s);
      cmd_read(s, CMD_RD_REG, 16'd9, v);
      check({vname[s], " register cleared by reset"}, v, 0);
      cmd_read(s, CMD_RD_PC, 0, v);
      check({vname[s], " pc cleared by reset"}, v, {16'h4, 16'h0});
    end

    // ---- bubble sort on the three versions ----
    for (int s = 0; s < 3; s++) sort_on(s);

    // ---- pipelined: instruction program with hazard resolution off, then on ----
    for (int pass = 0; pass < 2; pass++) begin
      reset_sys(2);
      hazard(2, pass == 1);
      for (int i = 0; i < ALU_LEN; i++) cmd_write(2, CMD_WR_IMEM, 16'(4 * i), alu_word(i));
      run_cycles(2, 30);
      cmd_read(2, CMD_RD_REG, 16'(T2), v);
      if (pass == 0) begin
        checks++;
        if (v == 32'd8) begin failures++; $display("FAIL hazard mode off gave the right t2"); end
      end else begin
        check("hazard on t2", v, 8);
        cmd_read(2, CMD_RD_REG, 16'd21, v);
        check("hazard on s5", v, 24);
        cmd_read(2, CMD_RD_DMEM, 16'h104, v);
        check("hazard on lw->sw", v, 8);
      end
    end

    // ---- illegal opcodes ----
    for (int s = 0; s < 3; s++) illegal_on(s);

    // ---- every mechanism must have happened ----
    check("mechanism load-use stall seen", n_lu > 0, 1);
    check("mechanism branch stall seen", n_bw > 0, 1);
    check("mechanism flush seen", n_fl > 0, 1);
    check("mechanism EX forward seen", n_fe > 0, 1);
    check("mechanism lw->sw forward seen", n_fm > 0, 1);
    check("mechanism ID forward seen", n_fi > 0, 1);
    check("mechanism pipelined retire seen", n_retire > 0, 1);
    check("mechanism RUN seen", n_run > 0, 1);
    check("mechanism RESET seen", n_reset > 0, 1);
    check("mechanism hazard-mode switch seen", n_mode >= 2, 1);
    check("mechanism monitor setting seen", n_mon > 0, 1);
    check("mechanism error display seen", n_err == 3, 1);
    $display("mechanisms: load-use %0d, branch stall %0d, flush %0d, fwd EX %0d, fwd lw->sw %0d, fwd ID %0d, runs %0d, resets %0d, mode switches %0d, monitors %0d, errors %0d",
             n_lu, n_bw, n_fl, n_fe, n_fm, n_fi, n_run, n_reset, n_mode, n_mon, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
