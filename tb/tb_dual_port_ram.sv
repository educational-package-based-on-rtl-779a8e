// tb_dual_port_ram: random writes and reads through both ports against a
// reference array (processor port with byte addresses, host port with word
// indices), host priority on a same-word conflict, and out-of-range
// accesses reading zero. Run at the data-memory depth of 256 words.
module tb_dual_port_ram;
  localparam int D = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] p_addr, p_wdata, p_rdata, h_wdata, h_rdata;
  logic [15:0] h_addr;
  logic p_we = 0, h_we = 0;
  logic [31:0] model [D];
  bit valid [D];
  int checks = 0, failures = 0;
  dual_port_ram #(.DEPTH(D)) dut (.*);
  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    for (int i = 0; i < D; i++) begin
      h_addr = 16'(i); h_wdata = 32'(i * 7 + 1); h_we = 1; model[i] = h_wdata; @(posedge clk); #1;
    end
    h_we = 0;
    for (int n = 0; n < 500; n++) begin
      int pw, hw;
      pw = $urandom % D; hw = $urandom % D;
      if (n % 10 == 0) hw = pw;
      p_addr = 32'(pw * 4 + ($urandom % 4)); h_addr = 16'(hw);
      #1 chk("p read", p_rdata, model[pw]);
      chk("h read", h_rdata, model[hw]);
      p_we = $urandom % 2; h_we = $urandom % 2; p_wdata = $urandom; h_wdata = $urandom;
      @(posedge clk); #1;
      if (p_we) model[pw] = p_wdata;
      if (h_we) model[hw] = h_wdata;
      p_we = 0; h_we = 0;
    end
    p_addr = 32'(D * 4); h_addr = 16'(D); #1;
    chk("p out of range", p_rdata, 0);
    chk("h out of range", h_rdata, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
