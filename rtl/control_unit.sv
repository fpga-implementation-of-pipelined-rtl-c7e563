// control_unit: instruction decoder of the decode stage.
//
// Turns a 16-bit instruction word into the control word (risc_pkg::ctrl_t) that
// travels down the pipeline with it: which register is written, where the ALU's
// second operand comes from, which ALU or FPU operation runs, whether memory is
// read or written, and whether the instruction redirects the program counter.
// The sixteen instructions are
//   R-type : add sub and or slt addfp subfp multfp jr   (rd = rs op rt; jr: PC = rs)
//   I-type : slti addi lw sw beq                         (rt = rs op imm7; lw/sw at
//                                                         rs+imm7; beq taken if rs==rt)
//   other  : j (PC = {PC+1[15:13], target13}), reti (return from interrupt), nop.
// The flag register is updated by the integer arithmetic/logic instructions,
// slti, addi, beq and the floating-point instructions. Unknown funct codes decode
// as illegal and do nothing. Field positions and opcodes: see risc_pkg.
//
// Interface: instr in, ctrl out, plus the register numbers rs and rt read in the
// decode stage and the raw immediate fields. Purely combinational.
module control_unit
  import risc_pkg::*;
(
  input  word_t     instr,
  output ctrl_t     ctrl,
  output reg_addr_t rs,
  output reg_addr_t rt,
  output logic [6:0]  imm7,
  output logic [12:0] target13
);

  opcode_e   opc;
  reg_addr_t rd;
  logic [3:0] fn;

  always_comb begin
    opc      = opcode_e'(instr[15:13]);
    rs       = instr[12:10];
    rt       = instr[9:7];
    rd       = instr[6:4];
    fn       = instr[3:0];
    imm7     = instr[6:0];
    target13 = instr[12:0];

    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    ctrl.fpu_op = FPU_ADD;

    if (instr == '0) begin
      ctrl.legal = 1'b1;  // nop
    end else begin
      case (opc)
        OP_RTYPE: begin
          ctrl.legal     = 1'b1;
          ctrl.reg_write = 1'b1;
          ctrl.flags_we  = 1'b1;
          ctrl.dst       = rd;
          case (fn)
            FN_ADD:    ctrl.alu_op = ALU_ADD;
            FN_SUB:    ctrl.alu_op = ALU_SUB;
            FN_AND:    ctrl.alu_op = ALU_AND;
            FN_OR:     ctrl.alu_op = ALU_OR;
            FN_SLT:    ctrl.alu_op = ALU_SLT;
            FN_ADDFP:  begin ctrl.is_fp = 1'b1; ctrl.fpu_op = FPU_ADD; end
            FN_SUBFP:  begin ctrl.is_fp = 1'b1; ctrl.fpu_op = FPU_SUB; end
            FN_MULTFP: begin ctrl.is_fp = 1'b1; ctrl.fpu_op = FPU_MUL; end
            FN_JR: begin
              ctrl.reg_write = 1'b0;
              ctrl.flags_we  = 1'b0;
              ctrl.jump_reg  = 1'b1;
            end
            default: begin
              ctrl.legal     = 1'b0;
              ctrl.reg_write = 1'b0;
              ctrl.flags_we  = 1'b0;
            end
          endcase
        end
        OP_SLTI: begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1; ctrl.flags_we = 1'b1;
          ctrl.dst = rt; ctrl.use_imm = 1'b1; ctrl.alu_op = ALU_SLT;
        end
        OP_ADDI: begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1; ctrl.flags_we = 1'b1;
          ctrl.dst = rt; ctrl.use_imm = 1'b1; ctrl.alu_op = ALU_ADD;
        end
        OP_LW: begin
          ctrl.legal = 1'b1; ctrl.reg_write = 1'b1; ctrl.mem_read = 1'b1;
          ctrl.dst = rt; ctrl.use_imm = 1'b1; ctrl.alu_op = ALU_ADD;
        end
        OP_SW: begin
          ctrl.legal = 1'b1; ctrl.mem_write = 1'b1;
          ctrl.use_imm = 1'b1; ctrl.alu_op = ALU_ADD;
        end
        OP_BEQ: begin
          ctrl.legal = 1'b1; ctrl.branch = 1'b1; ctrl.flags_we = 1'b1;
          ctrl.alu_op = ALU_SUB;
        end
        OP_J:    begin ctrl.legal = 1'b1; ctrl.jump = 1'b1; end
        OP_RETI: begin ctrl.legal = 1'b1; ctrl.reti = 1'b1; end
        default: ctrl = '0;
      endcase
    end
  end

endmodule
