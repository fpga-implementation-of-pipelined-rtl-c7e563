// clock_gate: latch-based clock gate for blocks that load on the falling clock edge.
//
// The processor stops the clock of its data memory and of its general purpose
// registers in the cycles where they load nothing, to save clock power; both load on
// the falling edge of the clock. The gated clock is therefore held high while the
// block is idle: gclk = clk | ~en_l, where en_l is en captured by a latch that is
// transparent while clk is high. en may change right after a rising edge; it is
// frozen before the falling edge, so gclk has no glitch and falls only in cycles
// whose en was high. The gating cell itself (an OR with a latch, the falling-edge
// form of the AND gate) is this design's choice.
//
// Interface: clk is the free-running clock, en requests a falling edge in this cycle,
// gclk is the gated clock. The latch is intended (it is the gating cell).
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (clk) en_l = en;
  end

  assign gclk = clk | ~en_l;

endmodule
