// tb_register_file: random processor writes and reads against a reference
// array, host writes and reads through the multiplexed port (ena), $0
// staying zero, and reset clearing the registers.
module tb_register_file;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [4:0] ra1, ra2, wa, addra;
  logic [31:0] rd1, rd2, wd, dina, douta;
  logic we = 0, ena = 0, wea = 0;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  register_file dut (.clk, .rst, .read_reg1(ra1), .read_reg2(ra2), .read_data1(rd1), .read_data2(rd2),
    .reg_write(we), .write_reg(wa), .write_data(wd), .ena, .wea, .addra, .dina, .douta);
  task automatic chk(string w, logic [31:0] g, logic [31:0] e);
    checks++; if (g !== e) begin failures++; $display("FAIL %s got %h exp %h", w, g, e); end
  endtask
  initial begin
    ra1 = 0; ra2 = 0; wa = 0; wd = 0; addra = 0; dina = 0;
    foreach (model[i]) model[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 300; n++) begin
      if (n % 3 == 0) begin
        ena = 1; wea = ($urandom % 2); addra = 5'($urandom); dina = $urandom;
        #1 chk("host read", douta, model[addra]);
        if (wea && addra != 0) model[addra] = dina;
      end else begin
        ena = 0; wea = 0;
        we = ($urandom % 2); wa = 5'($urandom); wd = $urandom;
        ra1 = 5'($urandom); ra2 = 5'($urandom);
        #1 chk("rd1", rd1, model[ra1]);
        chk("rd2", rd2, model[ra2]);
        if (we && wa != 0) model[wa] = wd;
      end
      @(posedge clk); #1;
    end
    ena = 1; wea = 1; addra = 0; dina = 32'hDEAD; @(posedge clk); #1 wea = 0;
    chk("r0 zero", douta, 0);
    ena = 0; we = 0;
    rst = 1; @(posedge clk); #1 rst = 0;
    ra1 = 5; ra2 = 31; #1;
    chk("reset r5", rd1, 0); chk("reset r31", rd2, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
