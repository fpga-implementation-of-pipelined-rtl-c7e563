// interrupt_controller: three vectored interrupts with fixed priority.
//
// irq[0] has the highest priority, irq[2] the lowest. A rising edge on an irq line
// sets its pending bit. The controller requests service (req) for the
// highest-priority pending interrupt whose priority is above every interrupt now in
// service, and gives its number (id) and its handler address (vector). When the
// processor takes it (accept, for one cycle) the pending bit is cleared and the
// in-service bit set; the handler's reti (ret, for one cycle) clears the in-service
// bit of the highest priority level that is in service. A higher-priority interrupt
// therefore preempts a lower one's handler, up to three levels deep. Edge
// triggering, the priority order, preemption and the vector addresses
// (parameters VEC0..VEC2) are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low), irq[2:0], accept, ret in;
// req, id, vector, in_service out. Registered state; req is combinational from it.
module interrupt_controller
  import risc_pkg::*;
#(
  parameter word_t VEC0 = 16'hFF00,
  parameter word_t VEC1 = 16'hFF40,
  parameter word_t VEC2 = 16'hFF80
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] irq,
  input  logic       accept,
  input  logic       ret,
  output logic       req,
  output logic [1:0] id,
  output word_t      vector,
  output logic [2:0] in_service
);

  logic [2:0] irq_q, pending, isr, eligible, set_isr, clr_isr, clr_pend;

  always_comb begin
    // levels strictly above the highest level in service
    eligible = '0;
    if (isr[0])      eligible = 3'b000;
    else if (isr[1]) eligible = pending & 3'b001;
    else if (isr[2]) eligible = pending & 3'b011;
    else             eligible = pending;

    req = |eligible;
    if (eligible[0])      id = 2'd0;
    else if (eligible[1]) id = 2'd1;
    else                  id = 2'd2;

    case (id)
      2'd0:    vector = VEC0;
      2'd1:    vector = VEC1;
      default: vector = VEC2;
    endcase

    set_isr  = (accept && req) ? (3'b001 << id) : 3'b000;
    clr_pend = set_isr;
    clr_isr  = '0;
    if (ret) begin
      if (isr[0])      clr_isr = 3'b001;
      else if (isr[1]) clr_isr = 3'b010;
      else             clr_isr = isr & 3'b100;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_q   <= '0;
      pending <= '0;
      isr     <= '0;
    end else begin
      irq_q   <= irq;
      pending <= (pending & ~clr_pend) | (irq & ~irq_q);
      isr     <= (isr & ~clr_isr) | set_isr;
    end
  end

  assign in_service = isr;

  // accept is only legal while a request is up; a return needs a level in service
  a_accept_needs_req: assert property (@(posedge clk) disable iff (!rst_n) accept |-> req);
  a_ret_needs_isr:    assert property (@(posedge clk) disable iff (!rst_n) ret |-> isr != '0);

endmodule
