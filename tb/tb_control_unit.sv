// tb_control_unit: checks the instruction decoder. First the instruction words of
// the processor's worked examples (add/sub/and/or $1,$2,$3, slti $1,$3,100,
// lw $3,0($0), add $4,$4,$3, addi $3,$3,1, beq $1,$0,...) are decoded and the
// register fields and operation checked; then every one of the 65536 words is
// compared with a reference decoder written here from the instruction table.
module tb_control_unit;
  import risc_pkg::*;
  word_t       instr;
  ctrl_t       ctrl;
  reg_addr_t   rs, rt;
  logic [6:0]  imm7;
  logic [12:0] t13;
  int checks = 0, failures = 0;

  control_unit dut (.instr(instr), .ctrl(ctrl), .rs(rs), .rt(rt), .imm7(imm7), .target13(t13));

  // reference: which instruction the word is
  typedef enum int {I_NOP, I_ADD, I_SUB, I_AND, I_OR, I_SLT, I_ADDFP, I_SUBFP, I_MULTFP,
                    I_JR, I_SLTI, I_ADDI, I_LW, I_SW, I_BEQ, I_J, I_RETI, I_ILLEGAL} kind_e;

  function automatic kind_e ref_kind(word_t w);
    if (w == 0) return I_NOP;
    case (w[15:13])
      3'd0: case (w[3:0])
        4'd0: return I_ADD;   4'd1: return I_SUB;   4'd2: return I_AND;
        4'd3: return I_OR;    4'd4: return I_SLT;   4'd5: return I_ADDFP;
        4'd6: return I_SUBFP; 4'd7: return I_MULTFP; 4'd8: return I_JR;
        default: return I_ILLEGAL;
      endcase
      3'd1: return I_SLTI;
      3'd2: return I_J;
      3'd3: return I_RETI;
      3'd4: return I_LW;
      3'd5: return I_SW;
      3'd6: return I_BEQ;
      default: return I_ADDI;
    endcase
  endfunction

  function automatic logic ctrl_ok(word_t w, ctrl_t c);
    kind_e k = ref_kind(w);
    logic rtype_arith = k inside {I_ADD, I_SUB, I_AND, I_OR, I_SLT, I_ADDFP, I_SUBFP, I_MULTFP};
    if (c.legal != (k != I_ILLEGAL)) return 0;
    if (c.reg_write != (rtype_arith || k inside {I_SLTI, I_ADDI, I_LW})) return 0;
    if (c.reg_write && c.dst != (rtype_arith ? w[6:4] : w[9:7])) return 0;
    if (c.mem_read != (k == I_LW) || c.mem_write != (k == I_SW)) return 0;
    if (c.branch != (k == I_BEQ) || c.jump != (k == I_J) || c.jump_reg != (k == I_JR)) return 0;
    if (c.reti != (k == I_RETI)) return 0;
    if (c.is_fp != (k inside {I_ADDFP, I_SUBFP, I_MULTFP})) return 0;
    if (c.use_imm != (k inside {I_SLTI, I_ADDI, I_LW, I_SW})) return 0;
    if (c.flags_we != (rtype_arith || k inside {I_SLTI, I_ADDI, I_BEQ})) return 0;
    case (k)
      I_ADD, I_ADDI, I_LW, I_SW: if (c.alu_op != ALU_ADD) return 0;
      I_SUB, I_BEQ:              if (c.alu_op != ALU_SUB) return 0;
      I_AND:                     if (c.alu_op != ALU_AND) return 0;
      I_OR:                      if (c.alu_op != ALU_OR)  return 0;
      I_SLT, I_SLTI:             if (c.alu_op != ALU_SLT) return 0;
      I_ADDFP:                   if (c.fpu_op != FPU_ADD) return 0;
      I_SUBFP:                   if (c.fpu_op != FPU_SUB) return 0;
      I_MULTFP:                  if (c.fpu_op != FPU_MUL) return 0;
      default: ;
    endcase
    return 1;
  endfunction

  task automatic example(word_t w, kind_e k, int exp_rs, int exp_rt, int exp_dst, int exp_imm);
    instr = w; #1;
    checks++;
    if (ref_kind(w) != k || !ctrl_ok(w, ctrl) || rs != reg_addr_t'(exp_rs) ||
        rt != reg_addr_t'(exp_rt) || (exp_dst >= 0 && ctrl.dst != reg_addr_t'(exp_dst)) ||
        (exp_imm >= 0 && imm7 != 7'(exp_imm))) begin
      failures++;
      $display("FAIL example %h", w);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    example(16'h0990, I_ADD, 2, 3, 1, -1);   // add $1,$2,$3
    example(16'h0991, I_SUB, 2, 3, 1, -1);   // sub $1,$2,$3
    example(16'h0992, I_AND, 2, 3, 1, -1);   // and $1,$2,$3
    example(16'h0993, I_OR,  2, 3, 1, -1);   // or  $1,$2,$3
    example(16'h2CE4, I_SLTI, 3, 1, 1, 100); // slti $1,$3,100
    example(16'h8180, I_LW, 0, 3, 3, 0);     // lw $3,0($0)
    example(16'h0E40, I_ADD, 3, 4, 4, -1);   // add $4,$4,$3
    example(16'hED81, I_ADDI, 3, 3, 3, 1);   // addi $3,$3,1
    example(16'hC400, I_BEQ, 1, 0, -1, 0);   // beq $1,$0,+0
    example(16'h0000, I_NOP, 0, 0, -1, -1);  // no-operation
    for (int w = 0; w < 65536; w++) begin
      instr = word_t'(w); #1;
      checks++;
      if (!ctrl_ok(instr, ctrl) || rs != instr[12:10] || rt != instr[9:7] ||
          imm7 != instr[6:0] || t13 != instr[12:0]) begin
        failures++;
        if (failures < 10) $display("FAIL word %h", instr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
