// fpu: floating-point unit of the processor ("floating point mode").
//
// Executes the three floating-point instructions addfp, subfp and multfp on
// 16-bit binary16 operands held in the general purpose registers: op selects
// fp_addsub (add or subtract) or fp_mul. Alongside the result it produces flags in
// the processor's flag-register layout: z for a zero result of either sign, n for
// the sign bit, v when the result is infinity or NaN, c always 0 (this flag mapping
// is this design's choice). Combinational; the result is ready in the execute
// stage of the same cycle, like the integer ALU's.
module fpu
  import risc_pkg::*;
(
  input  fpu_op_e     op,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] y,
  output flags_t      flags
);

  logic [15:0] y_as, y_mul;

  fp_addsub u_addsub (.a(a), .b(b), .sub(op == FPU_SUB), .y(y_as));
  fp_mul    u_mul    (.a(a), .b(b), .y(y_mul));

  always_comb begin
    y       = (op == FPU_MUL) ? y_mul : y_as;
    flags.z = (y[14:0] == '0);
    flags.n = y[15];
    flags.c = 1'b0;
    flags.v = (y[14:10] == 5'd31);
  end

endmodule
