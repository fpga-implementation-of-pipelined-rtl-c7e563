// tb_register_file: checks the eight general purpose registers: reset values i+1,
// both read ports, the debug port, that a write lands at the falling edge of its
// cycle (old value before, new value after, so a reader in the same cycle sees it
// before the next rising edge), and that cycles without we write nothing.
module tb_register_file;
  import risc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0;
  reg_addr_t waddr = '0, ra1 = '0, ra2 = '0, dra = '0;
  word_t wdata = '0, rd1, rd2, drd;
  word_t model [8];
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata),
                     .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
                     .dbg_raddr(dra), .dbg_rdata(drd));

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int i = 0; i < 8; i++) begin
      model[i] = word_t'(i + 1);
      dra = reg_addr_t'(i); #1;
      chk(drd == word_t'(i + 1), $sformatf("reset value R%0d=%h", i, drd));
    end
    for (int k = 0; k < 500; k++) begin
      @(posedge clk);
      #1;
      we    = 1'($urandom_range(0, 1));
      waddr = reg_addr_t'($urandom);
      wdata = word_t'($urandom);
      ra1   = waddr;
      ra2   = reg_addr_t'($urandom);
      #1;
      chk(rd1 == model[ra1], "read port 1 before the falling edge");
      chk(rd2 == model[ra2], "read port 2 before the falling edge");
      @(negedge clk);
      #1;
      if (we) model[waddr] = wdata;
      chk(rd1 == model[ra1], $sformatf("read port 1 after the falling edge we=%b", we));
      chk(rd2 == model[ra2], "read port 2 after the falling edge");
      dra = reg_addr_t'($urandom); #1;
      chk(drd == model[dra], "debug port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
