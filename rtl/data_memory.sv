// data_memory: the processor's data RAM (Harvard architecture: separate from the
// instruction memory).
//
// Word-addressed, 16-bit words. The read is combinational (lw reads in the execute
// stage), the write happens on the falling edge of a gated clock that is stopped in
// every cycle without a store, as the processor gates the clock of its data memory.
// A second port lets a host preload or inspect the memory; a host write takes
// precedence over a processor store in the same cycle. Contents start at zero.
// The depth (DEPTH words, address bits above log2(DEPTH) ignored), the host port and
// the falling-edge write are this design's choices.
//
// Interface: clk; we/addr/wdata/rdata processor port; host_we/host_addr/host_wdata/
// host_rdata host port. Write requests (of either port) are set up after a rising
// edge and must hold until the falling edge, where they land; reads show the new
// value from then on.
module data_memory
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic  clk,
  input  logic  we,
  input  word_t addr,
  input  word_t wdata,
  output word_t rdata,
  input  logic  host_we,
  input  word_t host_addr,
  input  word_t host_wdata,
  output word_t host_rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t         mem [DEPTH];
  logic          gclk;
  logic [AW-1:0] waddr;
  word_t         wval;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  clock_gate u_cg (.clk(clk), .en(we | host_we), .gclk(gclk));

  always_comb begin
    if (host_we) begin
      waddr = host_addr[AW-1:0];
      wval  = host_wdata;
    end else begin
      waddr = addr[AW-1:0];
      wval  = wdata;
    end
  end

  always_ff @(negedge gclk) begin
    mem[waddr] <= wval;
  end

  assign rdata      = mem[addr[AW-1:0]];
  assign host_rdata = mem[host_addr[AW-1:0]];

endmodule
