// tb_serial_manager: sends every command as serial bytes (with idle gaps
// between bytes) and checks the resulting one-cycle host write/read requests
// (target, address, data), the 4-byte answers of reads (most significant
// first, with tx_ready toggling at random), the requests passed to the control
// manager for RUN, RESET and HAZARD, the fourteen-word answer of RD_TYPES,
// and that unknown command bytes are ignored. The host side is a model whose read data encodes target and
// address.
module tb_serial_manager;
  import mips_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [7:0] rx_data = 0, tx_data;
  logic rx_load = 0, tx_ready = 0, tx_enout, cm_interrupt;
  logic [9:0] cm_request;
  host_req_t host_req;
  logic [31:0] host_rdata;
  int checks = 0, failures = 0;
  serial_manager dut (.*);

  assign host_rdata = {8'hC0 | 8'(host_req.tgt), host_req.addr, 8'h5A};

  // captured activity
  host_req_t last_wr, last_rd;
  int n_wr = 0, n_rd = 0, n_cm = 0;
  logic [9:0] last_cm;
  byte rx_bytes[$];
  always @(posedge clk) begin
    if (!rst && host_req.we) begin last_wr <= host_req; n_wr <= n_wr + 1; end
    if (!rst && host_req.re) begin last_rd <= host_req; n_rd <= n_rd + 1; end
    if (!rst && cm_interrupt) begin last_cm <= cm_request; n_cm <= n_cm + 1; end
    if (tx_enout) rx_bytes.push_back(tx_data);
    tx_ready <= ($urandom % 3) != 0;
  end

  task automatic chk(string w, longint g, longint e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  task automatic send(byte b);
    rx_data = b; rx_load = 1; @(posedge clk); #1 rx_load = 0;
    repeat ($urandom % 4) @(posedge clk); #1;
  endtask
  task automatic send_cmd(byte c, byte args[]);
    send(c);
    foreach (args[i]) send(args[i]);
    repeat (3) @(posedge clk); #1;
  endtask
  task automatic read_cmd(byte c, byte a1, byte a0, logic [31:0] exp);
    int t = 0;
    rx_bytes.delete();
    send_cmd(c, '{a1, a0});
    while (rx_bytes.size() < 4 && t < 200) begin @(posedge clk); t++; end
    #1;
    chk("answer length", rx_bytes.size(), 4);
    if (rx_bytes.size() == 4)
      chk("answer", {rx_bytes[0], rx_bytes[1], rx_bytes[2], rx_bytes[3]}, exp);
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    // writes
    send_cmd(CMD_WR_IMEM, '{8'h00, 8'h08, 8'h12, 8'h34, 8'h56, 8'h78});
    chk("wr imem count", n_wr, 1); chk("wr imem tgt", last_wr.tgt, TGT_IMEM);
    chk("wr imem addr", last_wr.addr, 16'h0008); chk("wr imem data", last_wr.wdata, 32'h12345678);
    send_cmd(CMD_WR_DMEM, '{8'h01, 8'h00, 8'hDE, 8'hAD, 8'hBE, 8'hEF});
    chk("wr dmem tgt", last_wr.tgt, TGT_DMEM); chk("wr dmem addr", last_wr.addr, 16'h0100);
    chk("wr dmem data", last_wr.wdata, 32'hDEADBEEF);
    send_cmd(CMD_WR_REG, '{8'h00, 8'h09, 8'h00, 8'h00, 8'h00, 8'h2A});
    chk("wr reg", {last_wr.tgt, last_wr.addr, last_wr.wdata}, {TGT_REG, 16'd9, 32'd42});
    send_cmd(CMD_SET_CNT, '{8'h00, 8'h30, 8'h00, 8'h00, 8'h01, 8'h00});
    chk("set cnt", {last_wr.tgt, last_wr.addr, last_wr.wdata}, {TGT_CNT, 16'h30, 32'h100});
    send_cmd(CMD_SET_PC, '{8'h00, 8'h40});
    chk("set pc", {last_wr.tgt, last_wr.wdata}, {TGT_PC, 32'h40});
    chk("writes total", n_wr, 5);
    chk("no reads yet", n_rd, 0);
    // reads
    read_cmd(CMD_RD_IMEM, 8'h00, 8'h10, {8'hC0 | 8'(TGT_IMEM), 16'h0010, 8'h5A});
    read_cmd(CMD_RD_DMEM, 8'h01, 8'h04, {8'hC0 | 8'(TGT_DMEM), 16'h0104, 8'h5A});
    read_cmd(CMD_RD_REG,  8'h00, 8'h0A, {8'hC0 | 8'(TGT_REG),  16'h000A, 8'h5A});
    read_cmd(CMD_RD_CNT,  8'h00, 8'h11, {8'hC0 | 8'(TGT_CNT),  16'h0011, 8'h5A});
    begin
      int t = 0;
      rx_bytes.delete(); send_cmd(CMD_RD_PC, '{});
      while (rx_bytes.size() < 4 && t < 200) begin @(posedge clk); t++; end
      #1 chk("rd pc bytes", rx_bytes.size(), 4);
      chk("rd pc tgt", last_rd.tgt, TGT_PC);
    end
    chk("reads total", n_rd, 5);
    // burst read of the fourteen instruction-type counters
    begin
      int t = 0;
      rx_bytes.delete(); send_cmd(CMD_RD_TYPES, '{});
      while (rx_bytes.size() < 4 * N_ITYPES && t < 2000) begin @(posedge clk); t++; end
      repeat (20) @(posedge clk); #1;
      chk("types answer length", rx_bytes.size(), 4 * N_ITYPES);
      for (int i = 0; i < N_ITYPES && 4 * i + 3 < rx_bytes.size(); i++)
        chk($sformatf("types word %0d", i),
            {rx_bytes[4*i], rx_bytes[4*i+1], rx_bytes[4*i+2], rx_bytes[4*i+3]},
            {8'hC0 | 8'(TGT_CNT), CNT_ITYPE + 16'(i), 8'h5A});
      chk("types reads", n_rd, 5 + N_ITYPES);
    end
    // control manager
    send_cmd(CMD_RUN, '{8'h01});
    chk("run request", last_cm, 10'h006);
    send_cmd(CMD_RESET, '{});
    chk("reset request", last_cm, 10'h001);
    send_cmd(CMD_HAZARD, '{8'h01});
    chk("hazard on", last_cm, 10'b111);
    send_cmd(CMD_HAZARD, '{8'h00});
    chk("hazard off", last_cm, 10'b011);
    chk("cm count", n_cm, 4);
    // unknown command bytes ignored, then a normal command still works
    send(8'h00); send(8'h7F); send(8'hFF);
    send_cmd(CMD_WR_REG, '{8'h00, 8'h03, 8'h00, 8'h00, 8'h00, 8'h07});
    chk("after junk", {last_wr.addr, last_wr.wdata}, {16'd3, 32'd7});
    chk("writes after junk", n_wr, 6);
    chk("nothing spurious", n_rd + n_cm, 9 + N_ITYPES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
