// tb_fpu: self-checking test of the binary16 FPU (add, subtract, multiply).
// The reference converts the operands to double precision, where sums and products
// of binary16 numbers are exact, and rounds the double result to binary16 (round to
// nearest even, results below 2^-14 to signed zero, subnormal inputs as zero,
// overflow to infinity, NaN as 16'h7E00).
module tb_fpu;
  import risc_pkg::*;
  import fp16_ref_pkg::*;

  fpu_op_e     op;
  logic [15:0] a, b, y;
  flags_t      flags;
  int checks = 0, failures = 0;

  fpu dut (.op(op), .a(a), .b(b), .y(y), .flags(flags));

  task automatic check_one(fpu_op_e o, logic [15:0] x, logic [15:0] z);
    logic [15:0] ey;
    ey = fp_ref(int'(o), x, z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== ey || flags.z !== (ey[14:0] == 0) || flags.n !== ey[15]) begin
      failures++;
      if (failures < 20)
        $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", o, x, z, y, ey);
    end
  endtask

  function automatic logic [15:0] rnd_half();
    logic [15:0] h;
    h = 16'($urandom);
    case ($urandom_range(0, 15))
      0: h[14:10] = 5'd0;
      1: h[14:10] = 5'd31;
      2: h[14:10] = 5'($urandom_range(1, 3));
      3: h[14:10] = 5'($urandom_range(27, 30));
      default: h[14:10] = 5'($urandom_range(1, 30));
    endcase
    return h;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] x;
    // worked values: 1.5 + 2.25 = 3.75, 1.5 * -2 = -3, 1 - 1 = +0
    check_one(FPU_ADD, 16'h3E00, 16'h4080);
    check_one(FPU_MUL, 16'h3E00, 16'hC000);
    check_one(FPU_SUB, 16'h3C00, 16'h3C00);
    checks++; if (y !== 16'h0000) failures++;
    check_one(FPU_ADD, 16'h3E00, 16'h4080);
    checks++; if (y !== 16'h4380) failures++;
    // ties, near-cancellation, overflow, underflow
    check_one(FPU_ADD, 16'h3C00, 16'h1000);
    check_one(FPU_ADD, 16'h3C01, 16'h1400);
    check_one(FPU_SUB, 16'h3C00, 16'h3BFF);
    check_one(FPU_ADD, 16'h7BFF, 16'h7BFF);
    check_one(FPU_MUL, 16'h0400, 16'h3800);
    check_one(FPU_MUL, 16'h7C00, 16'h0000);
    check_one(FPU_SUB, 16'h7C00, 16'h7C00);
    for (int k = 0; k < 20000; k++)
      check_one(fpu_op_e'($urandom_range(0, 2)), rnd_half(), rnd_half());
    // operands close in exponent (cancellation paths)
    for (int k = 0; k < 5000; k++) begin
      x = rnd_half();
      check_one(fpu_op_e'($urandom_range(0, 1)), x, {x[15:10] ^ 6'($urandom_range(0, 1)), 10'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
