// risc_pkg: shared types and constants of the 16-bit pipelined RISC processor.
//
// Instruction formats (16-bit words; field positions follow the instruction words
// printed with the processor's example programs, e.g. 16'h0990 = add $1,$2,$3 and
// 16'h2CE4 = slti $1,$3,100):
//   R-type : [15:13] opcode=000 | [12:10] rs | [9:7] rt | [6:4] rd | [3:0] funct
//   I-type : [15:13] opcode     | [12:10] rs | [9:7] rt | [6:0] imm7 (zero-extended; sign-extended for beq)
//   J-type : [15:13] opcode     | [12:0] target13
// The opcodes of slti, lw, beq and addi and the funct codes of add/sub/and/or come
// from those example words. The sw opcode, the slt/jr/floating-point funct codes, and
// the j and reti opcodes (which bring the instruction count to sixteen) are this
// design's own choice. The all-zero word is a no-operation.
package risc_pkg;

  localparam int unsigned XLEN  = 16;  // data and instruction width
  localparam int unsigned NREGS = 8;   // general purpose registers R0..R7
  localparam int unsigned RADDR = 3;   // register address width

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RADDR-1:0] reg_addr_t;

  typedef enum logic [2:0] {
    OP_RTYPE = 3'b000,
    OP_SLTI  = 3'b001,
    OP_J     = 3'b010,
    OP_RETI  = 3'b011,
    OP_LW    = 3'b100,
    OP_SW    = 3'b101,
    OP_BEQ   = 3'b110,
    OP_ADDI  = 3'b111
  } opcode_e;

  typedef enum logic [3:0] {
    FN_ADD    = 4'd0,
    FN_SUB    = 4'd1,
    FN_AND    = 4'd2,
    FN_OR     = 4'd3,
    FN_SLT    = 4'd4,
    FN_ADDFP  = 4'd5,
    FN_SUBFP  = 4'd6,
    FN_MULTFP = 4'd7,
    FN_JR     = 4'd8
  } funct_e;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_e;

  typedef enum logic [1:0] {
    FPU_ADD = 2'd0,
    FPU_SUB = 2'd1,
    FPU_MUL = 2'd2
  } fpu_op_e;

  // Flag register bits
  typedef struct packed {
    logic v;  // signed overflow
    logic n;  // negative (result bit 15)
    logic c;  // carry out of an add / borrow of a subtract
    logic z;  // result is zero
  } flags_t;

  // Decoded control word produced by the control unit in the decode stage.
  typedef struct packed {
    logic      legal;      // recognised instruction (nop included)
    logic      reg_write;  // writes register dst
    reg_addr_t dst;        // destination register
    logic      use_imm;    // ALU operand B is the extended imm7
    alu_op_e   alu_op;
    logic      is_fp;      // result comes from the FPU
    fpu_op_e   fpu_op;
    logic      mem_read;   // lw
    logic      mem_write;  // sw
    logic      branch;     // beq
    logic      jump;       // j
    logic      jump_reg;   // jr
    logic      reti;       // return from interrupt
    logic      flags_we;   // update the flag register
  } ctrl_t;

  // IEEE 754 binary16 constants used by the FPU
  localparam logic [15:0] FP16_QNAN = 16'h7E00;
  localparam logic [15:0] FP16_INF  = 16'h7C00;

endpackage
