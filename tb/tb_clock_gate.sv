// tb_clock_gate: checks the falling-edge clock gate. For a random enable pattern,
// set just after each rising edge and changed again at random while the clock is
// low, the gated clock must fall exactly in the cycles whose enable was high at the
// falling edge's start, stay high for the whole of every other cycle, ignore enable
// changes in the low phase, and never fall while the free-running clock is high.
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int falls = 0, expected_falls = 0, glitches = 0;
  logic en_cycle;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  always @(negedge gclk) begin
    falls++;
    if (clk) glitches++;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    falls = 0;
    for (int k = 0; k < 400; k++) begin
      @(posedge clk);
      #1 en = 1'($urandom_range(0, 1));
      en_cycle = en;
      if (en_cycle) expected_falls++;
      @(negedge clk);
      #1;
      checks++;
      if (gclk !== !en_cycle) begin
        failures++;
        $display("FAIL cycle %0d en=%b gclk=%b", k, en_cycle, gclk);
      end
      // a change of en while clk is low must not reach gclk until the next cycle
      #1 en = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if (gclk !== !en_cycle) begin
        failures++;
        $display("FAIL cycle %0d: en changed in the low phase leaked to gclk", k);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (falls != expected_falls) begin
      failures++;
      $display("FAIL falls=%0d expected=%0d", falls, expected_falls);
    end
    checks++;
    if (glitches != 0) failures++;
    $display("gated falling edges %0d of 400 cycles", falls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
