// tb_interrupt_controller: checks the three vectored priority interrupts against a
// reference model kept here: edge detection, the pending bits, selection of the
// highest eligible priority with its vector, preemption only by a higher priority,
// and the in-service bits set on accept and cleared on return. The stimulus is a
// random mix of irq edges, accepts (only while req is high) and returns.
module tb_interrupt_controller;
  import risc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, accept = 1'b0, ret = 1'b0;
  logic [2:0] irq = '0, insvc;
  logic req;
  logic [1:0] id;
  word_t vector;
  int checks = 0, failures = 0, preemptions = 0, accepts = 0;

  logic [2:0] m_irq_q = '0, m_pend = '0, m_isr = '0;

  interrupt_controller dut (.clk(clk), .rst_n(rst_n), .irq(irq), .accept(accept), .ret(ret),
                            .req(req), .id(id), .vector(vector), .in_service(insvc));

  always #5 clk = ~clk;

  function automatic int top_level(logic [2:0] m);
    for (int i = 0; i < 3; i++) if (m[i]) return i;
    return 3;
  endfunction

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lim, sel;
    logic m_req;
    word_t vec [3] = '{16'hFF00, 16'hFF40, 16'hFF80};
    #2 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      // reference request
      lim = top_level(m_isr);
      sel = 3;
      for (int i = 2; i >= 0; i--) if (m_pend[i] && i < lim) sel = i;
      m_req = (sel != 3);
      checks++;
      if (req !== m_req || (m_req && (id !== 2'(sel) || vector !== vec[sel])) || insvc !== m_isr) begin
        failures++;
        if (failures < 10)
          $display("FAIL k=%0d req=%b/%b id=%0d/%0d isr=%b/%b", k, req, m_req, id, sel, insvc, m_isr);
      end
      // stimulus for this cycle
      irq    = 3'($urandom);
      accept = m_req && ($urandom_range(0, 1) != 0);
      ret    = !accept && (m_isr != 0) && ($urandom_range(0, 3) == 0);
      if (accept) begin
        accepts++;
        if (m_isr != 0) preemptions++;
      end
      @(posedge clk);
      // reference update
      begin
        logic [2:0] set_i, clr_i;
        set_i = accept ? (3'b001 << sel) : 3'b000;
        clr_i = '0;
        if (ret) begin
          lim = top_level(m_isr);
          if (lim < 3) clr_i = 3'b001 << lim;
        end
        m_pend  = (m_pend & ~set_i) | (irq & ~m_irq_q);
        m_isr   = (m_isr & ~clr_i) | set_i;
        m_irq_q = irq;
      end
    end
    checks++;
    if (preemptions == 0) failures++;
    $display("accepts %0d, preemptions %0d", accepts, preemptions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
