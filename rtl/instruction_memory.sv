// instruction_memory: the processor's instruction store (Harvard architecture).
//
// DEPTH words of 16 bits, addressed by the program counter (one word per
// instruction, so the program counter counts in words). The read is combinational:
// the fetch stage presents the program counter on addr and the instruction word
// appears on instr in the same cycle, to be captured by the fetch/decode pipeline
// register. The default depth, 65536 words, fills the 16-bit address space. The
// memory behaves as a ROM for the processor; a load port (load_we, load_addr,
// load_data, written on the rising clock edge) lets a host place a program in it,
// the way an FPGA configuration would. The load port is this design's choice.
// Contents start at zero, which the processor executes as a no-operation.
module instruction_memory
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = 65536
) (
  input  logic  clk,
  input  word_t addr,
  output word_t instr,
  input  logic  load_we,
  input  word_t load_addr,
  input  word_t load_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr[AW-1:0]] <= load_data;
  end

  assign instr = mem[addr[AW-1:0]];

endmodule
