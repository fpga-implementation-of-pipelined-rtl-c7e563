// register_file: the eight 16-bit general purpose registers R0..R7.
//
// Two combinational read ports serve the decode stage; one write port is loaded on
// the falling edge of a gated clock, so the processor's clock reaches the registers
// only in cycles that write one. Because the write happens in the middle of the
// cycle, an instruction being decoded in that same cycle already reads the new
// value before the decode stage's pipeline register closes at the next rising edge:
// the half-cycle write is what lets the pipeline run without a forwarding network.
// A third read port is for observation (debugging and tests).
//
// Reset (asynchronous, active low) loads Ri with i+1, the register contents shown
// before the processor's example instructions; R0 is an ordinary register. Both
// the reset values and R0 not being hard-wired to zero are this design's reading.
//
// Interface: clk, rst_n; we/waddr/wdata write port; raddr1/rdata1 and
// raddr2/rdata2 read ports; dbg_raddr/dbg_rdata observation port.
module register_file
  import risc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      we,
  input  reg_addr_t waddr,
  input  word_t     wdata,
  input  reg_addr_t raddr1,
  output word_t     rdata1,
  input  reg_addr_t raddr2,
  output word_t     rdata2,
  input  reg_addr_t dbg_raddr,
  output word_t     dbg_rdata
);

  word_t regs [NREGS];
  logic  gclk;

  clock_gate u_cg (.clk(clk), .en(we), .gclk(gclk));

  always_ff @(negedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= word_t'(i + 1);
    end else begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1    = regs[raddr1];
  assign rdata2    = regs[raddr2];
  assign dbg_rdata = regs[dbg_raddr];

endmodule
