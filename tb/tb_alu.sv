// tb_alu: self-checking test of the integer ALU. Random and corner operands for
// every operation are compared with a reference computed here from integer
// arithmetic, including the four flags.
module tb_alu;
  import risc_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  flags_t  flags;
  int checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y), .flags(flags));

  task automatic check_one(alu_op_e o, word_t x, word_t z);
    word_t  ey;
    flags_t ef;
    int     sa, sb, full;
    sa = int'($signed(x)); sb = int'($signed(z));
    ef = '0;
    case (o)
      ALU_ADD: begin
        full = int'(x) + int'(z); ey = word_t'(full);
        ef.c = full > 65535;
        ef.v = (sa + sb > 32767) || (sa + sb < -32768);
      end
      ALU_SUB: begin
        full = int'(x) - int'(z); ey = word_t'(full);
        ef.c = full < 0;
        ef.v = (sa - sb > 32767) || (sa - sb < -32768);
      end
      ALU_AND: ey = x & z;
      ALU_OR:  ey = x | z;
      default: ey = (sa < sb) ? 16'd1 : 16'd0;
    endcase
    ef.z = (ey == 0);
    ef.n = ey[15];
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== ey || flags !== ef) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h exp=%h flags=%b exp=%b", o, x, z, y, ey, flags, ef);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h1234};
    foreach (corner[i]) foreach (corner[j])
      for (int o = 0; o < 5; o++) check_one(alu_op_e'(o), corner[i], corner[j]);
    // values of the processor's worked examples: R2 = 3, R3 = 4
    check_one(ALU_ADD, 16'd3, 16'd4);
    check_one(ALU_OR,  16'd3, 16'd4);
    for (int k = 0; k < 3000; k++)
      check_one(alu_op_e'($urandom_range(0, 4)), word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
