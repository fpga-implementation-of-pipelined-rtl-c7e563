// tb_data_memory: checks the data RAM against an array model: processor stores
// land at the falling edge of their cycle, cycles without a store change nothing,
// both read ports return the model's contents, host writes win over a processor
// store in the same cycle, and addresses wrap at DEPTH words.
module tb_data_memory;
  import risc_pkg::*;
  localparam int unsigned DEPTH = 256;
  logic clk = 1'b0, we = 1'b0, hwe = 1'b0;
  word_t addr = '0, wdata = '0, rdata, haddr = '0, hwdata = '0, hrdata;
  word_t model [DEPTH];
  int checks = 0, failures = 0;

  data_memory #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata),
    .rdata(rdata), .host_we(hwe), .host_addr(haddr), .host_wdata(hwdata),
    .host_rdata(hrdata));

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
    foreach (model[i]) model[i] = '0;
    for (int k = 0; k < 1000; k++) begin
      @(posedge clk);
      #1;
      we     = ($urandom_range(0, 2) != 0);
      hwe    = ($urandom_range(0, 5) == 0);
      addr   = word_t'($urandom_range(0, 511));
      wdata  = word_t'($urandom);
      haddr  = ($urandom_range(0, 1) != 0) ? addr : word_t'($urandom_range(0, 255));
      hwdata = word_t'($urandom);
      #1;
      chk(rdata == model[addr[7:0]], "read before the falling edge");
      @(negedge clk);
      #1;
      if (hwe) model[haddr[7:0]] = hwdata;
      else if (we) model[addr[7:0]] = wdata;
      chk(rdata == model[addr[7:0]], $sformatf("read after store we=%b hwe=%b", we, hwe));
      chk(hrdata == model[haddr[7:0]], "host read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
