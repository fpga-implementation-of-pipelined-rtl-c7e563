// alu: 16-bit integer arithmetic logic unit of the RISC processor.
//
// Performs add, subtract, AND, OR and signed set-less-than on two 16-bit operands
// and produces the four flags that the flag register stores. The operation set is
// the integer instruction set of the processor (add, sub, and, or, slt, plus addi,
// slti, lw/sw address calculation and the beq compare, which reuse add, slt and
// sub). The flag meanings (zero, carry/borrow, negative, overflow) are this design's
// choice for the four-bit flag register; the zero flag is what beq tests.
//
// Interface: op selects the operation, a and b are the operands, y the result,
// flags the flags of this operation. Purely combinational, no clock.
module alu
  import risc_pkg::*;
(
  input  alu_op_e     op,
  input  word_t       a,
  input  word_t       b,
  output word_t       y,
  output flags_t      flags
);

  logic [XLEN:0] sum;   // a + b with carry out
  logic [XLEN:0] diff;  // a - b with borrow out
  logic          lt;    // signed a < b

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    lt   = $signed(a) < $signed(b);
    flags.c = 1'b0;
    flags.v = 1'b0;
    unique case (op)
      ALU_ADD: begin
        y       = sum[XLEN-1:0];
        flags.c = sum[XLEN];
        flags.v = (a[XLEN-1] == b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      ALU_SUB: begin
        y       = diff[XLEN-1:0];
        flags.c = diff[XLEN];
        flags.v = (a[XLEN-1] != b[XLEN-1]) && (y[XLEN-1] != a[XLEN-1]);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SLT: y = {{(XLEN-1){1'b0}}, lt};
      default: y = '0;
    endcase
    flags.z = (y == '0);
    flags.n = y[XLEN-1];
  end

endmodule
