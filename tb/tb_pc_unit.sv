// tb_pc_unit: checks the program counter unit against a reference model: reset to
// 0, increment, redirect, interrupt vectoring with priority over a redirect, and
// the PC stack (push on interrupt, pop on return, stack_top, depth limit 3).
module tb_pc_unit;
  import risc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, take = 1'b0, redirect = 1'b0, pop = 1'b0;
  word_t vec = '0, ret_addr = '0, target = '0, pc, stack_top;
  logic [1:0] depth;
  word_t m_pc, m_stack [$];
  int checks = 0, failures = 0, pushes = 0, pops = 0, full_hits = 0;

  pc_unit #(.DEPTH(3)) dut (.clk(clk), .rst_n(rst_n), .int_take(take), .int_vector(vec),
    .ret_addr(ret_addr), .redirect(redirect), .target(target), .pop(pop), .pc(pc),
    .stack_top(stack_top), .depth(depth));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    m_pc = '0;
    for (int k = 0; k < 3000; k++) begin
      checks++;
      if (pc !== m_pc || depth !== 2'(m_stack.size()) ||
          (m_stack.size() != 0 && stack_top !== m_stack[$])) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d pc=%h/%h depth=%0d/%0d", k, pc, m_pc, depth, m_stack.size());
      end
      take     = ($urandom_range(0, 9) == 0);
      redirect = ($urandom_range(0, 4) == 0);
      pop      = !take && ($urandom_range(0, 7) == 0);
      vec      = word_t'($urandom);
      ret_addr = word_t'($urandom);
      target   = word_t'($urandom);
      @(posedge clk);
      if (take) begin
        m_pc = vec;
        if (m_stack.size() < 3) begin m_stack.push_back(ret_addr); pushes++; end
        else full_hits++;
      end else if (redirect) m_pc = target;
      else m_pc = m_pc + 1;
      if (pop && m_stack.size() != 0) begin void'(m_stack.pop_back()); pops++; end
      @(negedge clk);
    end
    $display("pushes %0d pops %0d pushes refused when full %0d", pushes, pops, full_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
