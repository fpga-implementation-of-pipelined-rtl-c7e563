// pc_unit: program counter unit (program counter, next-PC select, PC stack).
//
// pc is the address of the instruction being fetched. Each cycle the next-PC
// select picks, in priority order: the vector of an interrupt being taken
// (int_take), the target of a redirect from the execute stage (redirect: a taken
// beq, j, jr or reti), or pc + 1. Taking an interrupt pushes ret_addr, the address
// where the interrupted program resumes, onto a small PC stack; reti pops it and the
// popped address (stack_top) is what the execute stage uses as its redirect target.
// The stack holds DEPTH entries, one per interrupt priority level. The split into
// counter, select and stack and their exact behaviour are this design's reading of
// the PC, PC register, PC select and stack PC boxes of the processor's block diagram.
//
// Interface: clk, rst_n (asynchronous, active low, pc resets to 0); int_take,
// int_vector, ret_addr, redirect, target, pop in; pc, stack_top, depth out.
// All state changes on the rising clock edge.
module pc_unit
  import risc_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  int_take,
  input  word_t int_vector,
  input  word_t ret_addr,
  input  logic  redirect,
  input  word_t target,
  input  logic  pop,
  output word_t pc,
  output word_t stack_top,
  output logic [$clog2(DEPTH+1)-1:0] depth
);

  localparam int unsigned DW = $clog2(DEPTH+1);

  word_t stack [DEPTH];
  word_t pc_next;

  // next-PC select
  always_comb begin
    if (int_take)      pc_next = int_vector;
    else if (redirect) pc_next = target;
    else               pc_next = pc + 16'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= '0;
    else        pc <= pc_next;
  end

  // PC stack
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      depth <= '0;
      for (int i = 0; i < DEPTH; i++) stack[i] <= '0;
    end else if (int_take && pop) begin
      if (depth != '0) stack[depth - DW'(1)] <= ret_addr;
    end else if (int_take) begin
      if (depth != DW'(DEPTH)) begin
        stack[depth] <= ret_addr;
        depth        <= depth + DW'(1);
      end
    end else if (pop) begin
      if (depth != '0) depth <= depth - DW'(1);
    end
  end

  assign stack_top = (depth != '0) ? stack[depth - DW'(1)] : '0;

endmodule
