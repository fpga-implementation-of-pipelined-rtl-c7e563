// tb_instruction_memory: loads a pattern through the load port at spread-out
// addresses over the full 64K-word space and reads it back combinationally; words
// never loaded read as zero (the no-operation).
module tb_instruction_memory;
  import risc_pkg::*;
  logic clk = 1'b0, lwe = 1'b0;
  word_t addr = '0, instr, laddr = '0, ldata = '0;
  int checks = 0, failures = 0;

  instruction_memory dut (.clk(clk), .addr(addr), .instr(instr),
                          .load_we(lwe), .load_addr(laddr), .load_data(ldata));

  always #5 clk = ~clk;

  function automatic word_t pat(word_t a);
    return (a * 16'd40503) ^ 16'h5A5A;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the processor's example: add $1,$2,$3 at 0 followed by no-operation words
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      lwe = 1'b1; laddr = word_t'(i * 128 + 1); ldata = pat(laddr);
    end
    @(negedge clk);
    lwe = 1'b1; laddr = 16'h0000; ldata = 16'h0990;
    @(negedge clk);
    lwe = 1'b0;
    for (int i = 0; i < 512; i++) begin
      addr = word_t'(i * 128 + 1); #1;
      checks++; if (instr !== pat(addr)) failures++;
      addr = word_t'(i * 128 + 2); #1;
      checks++; if (instr !== 16'h0000) failures++;
    end
    addr = 16'h0000; #1;
    checks++; if (instr !== 16'h0990) failures++;
    addr = 16'hFFFF; #1;
    checks++; if (instr !== pat(16'hFF81) && instr !== 16'h0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
