// risc_cpu: pipelined 16-bit Harvard RISC processor with a floating-point unit.
//
// Three pipeline stages overlap the fetch, decode and execute of consecutive
// instructions, so one instruction completes per clock:
//   IF  the program counter unit addresses the instruction memory; the word is
//       captured in the IF/ID register at the rising edge.
//   ID  the control unit decodes it and the register file is read; operands and
//       control word are captured in the ID/EX register.
//   EX  the ALU or the FPU computes, lw/sw access the data memory, beq/j/jr/reti
//       decide the next PC, and the result is written to the register file at the
//       falling edge of this same cycle.
// Because registers (and the data memory) load on the falling edge, the instruction
// in ID reads a value written by the instruction just ahead of it before the ID/EX
// register closes: no forwarding and no load-use stall are needed. A taken branch
// or jump is resolved in EX and squashes the two younger instructions in IF and ID
// (two-cycle penalty). The register file and data memory get a gated clock that
// falls only in cycles that write them.
//
// The accumulator holds the last result written to a register and the 4-bit flag
// register (v, n, c, z) the flags of the last flag-setting instruction; both are
// updated at the end of EX. beq subtracts its operands in the ALU and is taken when
// the zero result flag of that subtraction is set.
//
// Interrupts: three vectored, priority-ordered interrupt lines (irq[0] highest).
// An interrupt is taken when its request is up and a valid instruction other than
// reti is in EX: that instruction completes, the address the program would have
// continued at is pushed onto the PC stack, the two younger instructions are
// squashed and fetching restarts at the vector. reti pops the PC stack.
//
// What follows the processor's description: Harvard organisation, 16-bit words,
// eight general purpose registers, the instruction set and its field layout, ALU,
// FPU (add, subtract, multiply), accumulator, 4-bit flag register, pipelining at
// one instruction per clock, falling-edge register loading, clock gating of data
// memory and registers, three vectored priority interrupts. This design's own
// choices: the three-stage split, the branch resolution stage, word addressing,
// binary16 floating point, the interrupt entry/return mechanism, the program load
// port and the debug ports.
//
// Interface: clk, rst_n (asynchronous, active low); irq[2:0]; instruction load port
// (im_load_we, im_load_addr, im_load_data); data-memory host port (dm_host_we,
// dm_host_addr, dm_host_wdata, dm_host_rdata); observation outputs pc, acc, flags,
// dbg_reg_addr/dbg_reg_data, retire and retire_pc (an instruction, at that
// address, completes EX this cycle),
// flush (a redirect squashed IF and ID), int_taken and int_id (an interrupt, of
// that number, is taken this cycle), pc_stack_depth, in_service.
module risc_cpu
  import risc_pkg::*;
#(
  parameter int unsigned IM_DEPTH = 65536,
  parameter int unsigned DM_DEPTH = 256,
  parameter word_t       VEC0     = 16'hFF00,
  parameter word_t       VEC1     = 16'hFF40,
  parameter word_t       VEC2     = 16'hFF80
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] irq,
  input  logic       im_load_we,
  input  word_t      im_load_addr,
  input  word_t      im_load_data,
  input  logic       dm_host_we,
  input  word_t      dm_host_addr,
  input  word_t      dm_host_wdata,
  output word_t      dm_host_rdata,
  output word_t      pc,
  output word_t      acc,
  output flags_t     flags,
  input  reg_addr_t  dbg_reg_addr,
  output word_t      dbg_reg_data,
  output logic       retire,
  output word_t      retire_pc,
  output logic       flush,
  output logic       int_taken,
  output logic [1:0] int_id,
  output logic [1:0] pc_stack_depth,
  output logic [2:0] in_service
);

  // ---------------------------------------------------------------- pipeline regs
  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t instr;
  } if_id_t;

  typedef struct packed {
    logic        valid;
    word_t       pc;
    ctrl_t       ctrl;
    word_t       rs_val;
    word_t       rt_val;
    logic [6:0]  imm7;
    logic [12:0] target13;
  } id_ex_t;

  if_id_t if_id;
  id_ex_t id_ex;

  // ---------------------------------------------------------------- IF
  word_t if_instr;

  // ---------------------------------------------------------------- ID
  ctrl_t       id_ctrl;
  reg_addr_t   id_rs, id_rt;
  logic [6:0]  id_imm7;
  logic [12:0] id_target13;
  word_t       id_rs_val, id_rt_val;

  // ---------------------------------------------------------------- EX
  word_t  ex_b, ex_alu_y, ex_fpu_y, ex_mem_rdata, ex_wb_data, ex_imm, ex_pc1;
  flags_t ex_alu_flags, ex_fpu_flags;
  logic   ex_taken, ex_reg_we, ex_mem_we;
  word_t  ex_target, ex_ret_addr;

  // interrupt / PC
  logic  irq_req;
  word_t irq_vector, stack_top;

  // ================================================================= fetch
  pc_unit #(.DEPTH(3)) u_pcu (
    .clk       (clk),
    .rst_n     (rst_n),
    .int_take  (int_taken),
    .int_vector(irq_vector),
    .ret_addr  (ex_ret_addr),
    .redirect  (ex_taken),
    .target    (ex_target),
    .pop       (id_ex.valid && id_ex.ctrl.reti),
    .pc        (pc),
    .stack_top (stack_top),
    .depth     (pc_stack_depth)
  );

  instruction_memory #(.DEPTH(IM_DEPTH)) u_im (
    .clk      (clk),
    .addr     (pc),
    .instr    (if_instr),
    .load_we  (im_load_we),
    .load_addr(im_load_addr),
    .load_data(im_load_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      if_id <= '0;
    end else if (flush) begin
      if_id <= '0;
    end else begin
      if_id.valid <= 1'b1;
      if_id.pc    <= pc;
      if_id.instr <= if_instr;
    end
  end

  // ================================================================= decode
  control_unit u_cu (
    .instr   (if_id.instr),
    .ctrl    (id_ctrl),
    .rs      (id_rs),
    .rt      (id_rt),
    .imm7    (id_imm7),
    .target13(id_target13)
  );

  register_file u_gpr (
    .clk      (clk),
    .rst_n    (rst_n),
    .we       (ex_reg_we),
    .waddr    (id_ex.ctrl.dst),
    .wdata    (ex_wb_data),
    .raddr1   (id_rs),
    .rdata1   (id_rs_val),
    .raddr2   (id_rt),
    .rdata2   (id_rt_val),
    .dbg_raddr(dbg_reg_addr),
    .dbg_rdata(dbg_reg_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_ex <= '0;
    end else if (flush || !if_id.valid) begin
      id_ex <= '0;
    end else begin
      id_ex.valid    <= 1'b1;
      id_ex.pc       <= if_id.pc;
      id_ex.ctrl     <= id_ctrl;
      id_ex.rs_val   <= id_rs_val;
      id_ex.rt_val   <= id_rt_val;
      id_ex.imm7     <= id_imm7;
      id_ex.target13 <= id_target13;
    end
  end

  // ================================================================= execute
  // beq offsets are signed; the immediates of addi, slti, lw and sw are 0..127
  // (slti $1,$3,100 is encoded with imm7 = 7'h64)
  assign ex_imm = id_ex.ctrl.branch ? {{(XLEN-7){id_ex.imm7[6]}}, id_ex.imm7}
                                    : {{(XLEN-7){1'b0}}, id_ex.imm7};
  assign ex_b   = id_ex.ctrl.use_imm ? ex_imm : id_ex.rt_val;
  assign ex_pc1 = id_ex.pc + 16'd1;

  alu u_alu (
    .op   (id_ex.ctrl.alu_op),
    .a    (id_ex.rs_val),
    .b    (ex_b),
    .y    (ex_alu_y),
    .flags(ex_alu_flags)
  );

  fpu u_fpu (
    .op   (id_ex.ctrl.fpu_op),
    .a    (id_ex.rs_val),
    .b    (id_ex.rt_val),
    .y    (ex_fpu_y),
    .flags(ex_fpu_flags)
  );

  assign ex_mem_we = id_ex.valid && id_ex.ctrl.mem_write;

  data_memory #(.DEPTH(DM_DEPTH)) u_dm (
    .clk       (clk),
    .we        (ex_mem_we),
    .addr      (ex_alu_y),
    .wdata     (id_ex.rt_val),
    .rdata     (ex_mem_rdata),
    .host_we   (dm_host_we),
    .host_addr (dm_host_addr),
    .host_wdata(dm_host_wdata),
    .host_rdata(dm_host_rdata)
  );

  always_comb begin
    if (id_ex.ctrl.mem_read)   ex_wb_data = ex_mem_rdata;
    else if (id_ex.ctrl.is_fp) ex_wb_data = ex_fpu_y;
    else                       ex_wb_data = ex_alu_y;

    ex_reg_we = id_ex.valid && id_ex.ctrl.reg_write;

    ex_taken  = 1'b0;
    ex_target = ex_pc1;
    if (id_ex.valid) begin
      if (id_ex.ctrl.branch && ex_alu_flags.z) begin
        ex_taken  = 1'b1;
        ex_target = ex_pc1 + ex_imm;
      end else if (id_ex.ctrl.jump) begin
        ex_taken  = 1'b1;
        ex_target = {ex_pc1[15:13], id_ex.target13};
      end else if (id_ex.ctrl.jump_reg) begin
        ex_taken  = 1'b1;
        ex_target = id_ex.rs_val;
      end else if (id_ex.ctrl.reti) begin
        ex_taken  = 1'b1;
        ex_target = stack_top;
      end
    end
    ex_ret_addr = ex_target;
  end

  // ================================================================= interrupts
  interrupt_controller #(.VEC0(VEC0), .VEC1(VEC1), .VEC2(VEC2)) u_intc (
    .clk       (clk),
    .rst_n     (rst_n),
    .irq       (irq),
    .accept    (int_taken),
    .ret       (id_ex.valid && id_ex.ctrl.reti),
    .req       (irq_req),
    .id        (int_id),
    .vector    (irq_vector),
    .in_service(in_service)
  );

  assign int_taken = irq_req && id_ex.valid && !id_ex.ctrl.reti;
  assign flush     = ex_taken || int_taken;
  assign retire    = id_ex.valid;
  assign retire_pc = id_ex.pc;

  // The priority scheme admits at most one handler per level, so the PC stack
  // never overflows; an interrupt is never taken together with a reti.
  a_stack_room: assert property (@(posedge clk) disable iff (!rst_n)
    int_taken |-> pc_stack_depth != 2'd3);
  a_no_take_on_reti: assert property (@(posedge clk) disable iff (!rst_n)
    int_taken |-> !(id_ex.valid && id_ex.ctrl.reti));

  // ================================================================= accumulator, flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      flags <= '0;
    end else if (id_ex.valid) begin
      if (id_ex.ctrl.reg_write) acc <= ex_wb_data;
      if (id_ex.ctrl.flags_we)  flags <= id_ex.ctrl.is_fp ? ex_fpu_flags : ex_alu_flags;
    end
  end

endmodule
