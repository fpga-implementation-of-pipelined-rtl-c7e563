// tb_risc_cpu: end-to-end test of the pipelined processor at its default size.
//
// An instruction-set reference model kept in this testbench executes the same
// program one instruction at a time, in lockstep with the processor's retirements:
// every retiring address is compared with the model's program counter, and after
// each program the eight registers, the whole data memory, the accumulator and the
// flag register are compared with the model. Interrupts are requested at random;
// the model keeps its own pending/in-service bookkeeping and, when the processor
// takes an interrupt, checks that one was due and follows its own choice of vector.
//
// Programs run:
//   1. the processor's worked examples (add, sub, and, or, lw, slti), each from reset,
//      with the register values of the examples (Ri = i+1 after reset);
//   2. the summation loop of the processor's test code (lw, slti, beq, add, addi,
//      beq back), 100 iterations adding 0..99 to R4 (reset value 5);
//   3. a directed program for j, jr and the floating-point instructions;
//   4. random programs with forward branches, jumps, jr, loads/stores, integer and
//      floating-point operations, and interrupt handlers that end in reti.
// Each pipeline mechanism is counted (taken-branch squash, register value used by
// the very next instruction thanks to the falling-edge write, load result used by
// the next instruction, store, FP operation, interrupt entry, preemption of a
// handler, reti, gated-clock idle cycles, jump, jr) and one that never happened
// counts as a failure. The loop's cycle count is checked against one instruction
// per clock plus two squashed slots per taken branch.
module tb_risc_cpu;
  import risc_pkg::*;
  import fp16_ref_pkg::*;

  localparam word_t VEC [3] = '{16'hFF00, 16'hFF40, 16'hFF80};
  localparam int DMW = 256;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic [2:0] irq = '0;
  logic       im_we = 1'b0, dm_we = 1'b0;
  word_t      im_addr = '0, im_data = '0, dm_addr = '0, dm_wdata = '0, dm_rdata;
  word_t      pc, acc, dbg_data, retire_pc;
  flags_t     flags;
  reg_addr_t  dbg_addr = '0;
  logic       retire, flush, int_taken;
  logic [2:0] in_service;
  logic [1:0] int_id, pc_stack_depth;

  risc_cpu dut (
    .clk(clk), .rst_n(rst_n), .irq(irq),
    .im_load_we(im_we), .im_load_addr(im_addr), .im_load_data(im_data),
    .dm_host_we(dm_we), .dm_host_addr(dm_addr), .dm_host_wdata(dm_wdata),
    .dm_host_rdata(dm_rdata), .pc(pc), .acc(acc), .flags(flags),
    .dbg_reg_addr(dbg_addr), .dbg_reg_data(dbg_data),
    .retire(retire), .retire_pc(retire_pc), .flush(flush),
    .int_taken(int_taken), .int_id(int_id), .pc_stack_depth(pc_stack_depth),
    .in_service(in_service));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_squash = 0, n_raw_next = 0, n_load_use = 0, n_store = 0, n_fp = 0, n_int = 0;
  int n_preempt = 0, n_reti = 0, n_gated = 0, n_jump = 0, n_jr = 0, n_cycles = 0;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  // ------------------------------------------------------------------ assembler
  function automatic word_t r_ins(funct_e fn, int rd, int rs, int rt);
    return {OP_RTYPE, 3'(rs), 3'(rt), 3'(rd), fn};
  endfunction
  function automatic word_t i_ins(opcode_e op, int rt, int rs, int imm);
    return {op, 3'(rs), 3'(rt), 7'(imm)};
  endfunction
  function automatic word_t j_ins(int target);
    return {OP_J, 13'(target)};
  endfunction
  localparam word_t RETI = {OP_RETI, 13'd0};

  // ------------------------------------------------------------------ reference model
  word_t      prog [word_t];       // program image
  word_t      loaded [$];          // addresses written into the instruction memory
  word_t      m_r [8];
  word_t      m_dm [DMW];
  word_t      m_pc, m_acc;
  flags_t     m_flags;
  word_t      m_stack [$];
  logic [2:0] m_pend, m_isr, m_irq_q;
  int         last_dst;            // register written by the previous instruction
  logic       last_was_load;

  function automatic word_t fetch(word_t a);
    return prog.exists(a) ? prog[a] : 16'h0000;
  endfunction

  function automatic flags_t alu_flags(alu_op_e o, word_t x, word_t z, output word_t y);
    flags_t f = '0;
    int sa = int'($signed(x)), sb = int'($signed(z));
    case (o)
      ALU_ADD: begin
        y = x + z; f.c = (int'(x) + int'(z)) > 65535;
        f.v = (sa + sb > 32767) || (sa + sb < -32768);
      end
      ALU_SUB: begin
        y = x - z; f.c = int'(x) < int'(z);
        f.v = (sa - sb > 32767) || (sa - sb < -32768);
      end
      ALU_AND: y = x & z;
      ALU_OR:  y = x | z;
      default: y = (sa < sb) ? 16'd1 : 16'd0;
    endcase
    f.z = (y == 0);
    f.n = y[15];
    return f;
  endfunction

  // execute the instruction at m_pc; returns 1 when it was a taken control transfer
  function automatic logic iss_step();
    word_t w = fetch(m_pc), y, a, b, imm, nxt;
    int rs = w[12:10], rt = w[9:7], rd = w[6:4];
    int dst = -1;
    logic taken = 0, reads_rs = 0, reads_rt = 0, is_load = 0;
    flags_t f;
    // beq offsets are signed, the other immediates are 0..127
    imm = (w[15:13] == 3'd6) ? {{9{w[6]}}, w[6:0]} : {9'b0, w[6:0]};
    nxt = m_pc + 1;
    a = m_r[rs];
    b = m_r[rt];
    if (w != 0) begin
      case (w[15:13])
        3'd0: begin
          reads_rs = 1; reads_rt = 1;
          case (w[3:0])
            4'd0, 4'd1, 4'd2, 4'd3, 4'd4: begin
              f = alu_flags(alu_op_e'(w[2:0]), a, b, y);
              m_r[rd] = y; dst = rd; m_flags = f; m_acc = y;
            end
            4'd5, 4'd6, 4'd7: begin
              y = fp_ref(int'(w[3:0]) - 5, a, b);
              m_r[rd] = y; dst = rd; m_acc = y; n_fp++;
              m_flags = '{v: (y[14:10] == 5'd31), n: y[15], c: 1'b0, z: (y[14:0] == 0)};
            end
            4'd8: begin
              reads_rt = 0; nxt = a; taken = 1; n_jr++;
            end
            default: begin reads_rs = 0; reads_rt = 0; end
          endcase
        end
        3'd1: begin  // slti
          reads_rs = 1;
          f = alu_flags(ALU_SLT, a, imm, y);
          m_r[rt] = y; dst = rt; m_flags = f; m_acc = y;
        end
        3'd7: begin  // addi
          reads_rs = 1;
          f = alu_flags(ALU_ADD, a, imm, y);
          m_r[rt] = y; dst = rt; m_flags = f; m_acc = y;
        end
        3'd4: begin  // lw
          reads_rs = 1; is_load = 1;
          y = m_dm[8'(a + imm)];
          m_r[rt] = y; dst = rt; m_acc = y;
        end
        3'd5: begin  // sw
          reads_rs = 1; reads_rt = 1;
          m_dm[8'(a + imm)] = b; n_store++;
        end
        3'd6: begin  // beq
          reads_rs = 1; reads_rt = 1;
          f = alu_flags(ALU_SUB, a, b, y);
          m_flags = f;
          if (a == b) begin nxt = m_pc + 1 + imm; taken = 1; end
        end
        3'd2: begin  // j
          nxt = {nxt[15:13], w[12:0]}; taken = 1; n_jump++;
        end
        default: begin  // reti
          nxt = (m_stack.size() != 0) ? m_stack[$] : 16'h0000;
          if (m_stack.size() != 0) void'(m_stack.pop_back());
          for (int i = 0; i < 3; i++) if (m_isr[i]) begin m_isr[i] = 0; break; end
          taken = 1; n_reti++;
        end
      endcase
    end
    if (last_dst >= 0 && ((reads_rs && rs == last_dst) || (reads_rt && rt == last_dst))) begin
      n_raw_next++;
      if (last_was_load) n_load_use++;
    end
    if (dst < 0) n_gated++;
    last_dst = dst;
    last_was_load = is_load;
    m_pc = nxt;
    return taken;
  endfunction

  // ------------------------------------------------------------------ run control
  task automatic load_program(word_t dm_init [DMW]);
    rst_n = 1'b0;
    @(negedge clk);
    foreach (loaded[i]) begin
      im_we = 1'b1; im_addr = loaded[i]; im_data = '0;
      @(negedge clk);
    end
    loaded.delete();
    foreach (prog[a]) begin
      im_we = 1'b1; im_addr = a; im_data = prog[a];
      loaded.push_back(a);
      @(negedge clk);
    end
    im_we = 1'b0;
    // host writes are presented just after a rising edge and land at the falling edge
    for (int i = 0; i < DMW; i++) begin
      @(posedge clk);
      #1 dm_we = 1'b1; dm_addr = word_t'(i); dm_wdata = dm_init[i];
      m_dm[i] = dm_init[i];
    end
    @(posedge clk);
    #1 dm_we = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) m_r[i] = word_t'(i + 1);
    m_pc = '0; m_acc = '0; m_flags = '0;
    m_stack.delete();
    m_pend = '0; m_isr = '0; m_irq_q = '0; irq = '0;
    last_dst = -1; last_was_load = 0;
    rst_n = 1'b1;
  endtask

  // Run until the model reaches halt_pc (a jump to itself) with no interrupt
  // pending or in service and irq_cycles have passed. Returns the cycle count.
  task automatic run(word_t halt_pc, int irq_cycles, int irq_rate, int max_cycles,
                     output int cycles);
    int cyc = 0, lim, sel;
    logic [2:0] set_i, nirq;
    logic taken;
    cycles = 0;
    while (cyc < max_cycles) begin
      if (cyc > irq_cycles && m_pc == halt_pc && m_pend == 0 && m_isr == 0 &&
          retire && retire_pc == halt_pc) begin
        cycles = cyc;
        break;
      end
      // outputs of the cycle that ends at the next rising edge
      chk(in_service == m_isr, "in-service bits");
      chk(pc_stack_depth == 2'(m_stack.size()), "PC stack depth");
      set_i = '0;
      if (retire) begin
        chk(retire_pc == m_pc, $sformatf("retire pc %h, model %h", retire_pc, m_pc));
        taken = iss_step();
        if (taken) n_squash++;
        chk(flush == (taken || int_taken), "squash signal");
      end else begin
        n_gated++;
        chk(!flush, "squash without a retiring instruction");
      end
      if (int_taken) begin
        lim = 3;
        for (int i = 2; i >= 0; i--) if (m_isr[i]) lim = i;
        sel = 3;
        for (int i = 2; i >= 0; i--) if (m_pend[i] && i < lim) sel = i;
        chk(sel != 3 && retire, "interrupt taken when none was due");
        chk(int_id == 2'(sel), "number of the interrupt taken");
        if (sel != 3) begin
          n_int++;
          if (m_isr != 0) n_preempt++;
          m_stack.push_back(m_pc);
          m_pc = VEC[sel];
          set_i = 3'b001 << sel;
          last_dst = -1;
        end
      end
      // new interrupt requests
      nirq = irq;
      if (cyc < irq_cycles)
        for (int i = 0; i < 3; i++) if ($urandom_range(0, irq_rate) == 0) nirq[i] = ~nirq[i];
      if (cyc >= irq_cycles) nirq = '0;
      irq = nirq;
      m_pend  = (m_pend & ~set_i) | (irq & ~m_irq_q);
      m_isr   = m_isr | set_i;
      m_irq_q = irq;
      @(negedge clk);
      cyc++;
      n_cycles++;
    end
    if (cyc >= max_cycles)
      for (int i = -10; i < 6; i++) $display("  %h: %h", m_pc + word_t'(i), fetch(m_pc + word_t'(i)));
    chk(cyc < max_cycles, $sformatf("program did not reach its end: pc %h isr %b pending %b stack %0d",
                                    m_pc, m_isr, m_pend, m_stack.size()));
  endtask

  task automatic compare_state(string name);
    for (int i = 0; i < 8; i++) begin
      dbg_addr = reg_addr_t'(i); #1;
      chk(dbg_data == m_r[i], $sformatf("%s: R%0d = %h, model %h", name, i, dbg_data, m_r[i]));
    end
    for (int i = 0; i < DMW; i++) begin
      dm_addr = word_t'(i); #1;
      chk(dm_rdata == m_dm[i], $sformatf("%s: M[%0d] = %h, model %h", name, i, dm_rdata, m_dm[i]));
    end
    chk(acc == m_acc, $sformatf("%s: acc %h, model %h", name, acc, m_acc));
    chk(flags == m_flags, $sformatf("%s: flags %b, model %b", name, flags, m_flags));
  endtask

  // halt instruction at address h: jump to itself
  function automatic void put_halt(word_t h);
    prog[h] = j_ins(int'(h));
  endfunction

  function automatic word_t rand_plain();
    int k, a = $urandom_range(0, 7), b = $urandom_range(0, 7), c = $urandom_range(0, 7);
    int imm = $urandom_range(0, 127);
    k = $urandom_range(0, 9);
    case (k)
      0, 1: return r_ins(funct_e'($urandom_range(0, 4)), a, b, c);
      2:    return r_ins(funct_e'($urandom_range(5, 7)), a, b, c);
      3:    return i_ins(OP_ADDI, a, b, imm);
      4:    return i_ins(OP_SLTI, a, b, imm);
      5, 6: return i_ins(OP_LW, a, b, imm);
      7, 8: return i_ins(OP_SW, a, b, imm);
      default: return (c == 0) ? 16'h0000 : r_ins(FN_ADD, a, b, a);
    endcase
  endfunction

  // ------------------------------------------------------------------ tests
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t dmz [DMW];
    int    cyc;
    foreach (dmz[i]) dmz[i] = '0;
    #2 rst_n = 1'b0;
    @(negedge clk);

    // 1. worked examples, each from reset: R2 = 3, R3 = 4
    begin
      word_t ex_word [5] = '{16'h0990, 16'h0991, 16'h0992, 16'h0993, 16'h2CE4};
      word_t ex_r1   [5] = '{16'h0007, 16'hFFFF, 16'h0000, 16'h0007, 16'h0001};
      for (int e = 0; e < 5; e++) begin
        prog.delete();
        prog[0] = 16'h0000;
        prog[1] = ex_word[e];
        put_halt(2);
        load_program(dmz);
        run(2, 0, 1, 100, cyc);
        compare_state($sformatf("example %h", ex_word[e]));
        dbg_addr = 3'd1; #1;
        chk(dbg_data == ex_r1[e], $sformatf("example %h: R1 = %h", ex_word[e], dbg_data));
      end
      // lw $3,0($0): R0 = 1 after reset, so it reads M[1] = 16'h20
      prog.delete();
      prog[0] = 16'h0000;
      prog[1] = 16'h8180;
      put_halt(2);
      dmz[1] = 16'h0020;
      load_program(dmz);
      dmz[1] = 16'h0000;
      run(2, 0, 1, 100, cyc);
      compare_state("example lw");
      dbg_addr = 3'd3; #1;
      chk(dbg_data == 16'h0020, "example lw: R3");
    end

    // 2. the test-code loop: sum R3 = M[0] .. 99 into R4
    begin
      int n_loop_cycles, expect_cycles;
      prog.delete();
      prog[0] = r_ins(FN_SUB, 0, 0, 0);            // R0 = 0
      prog[1] = 16'h8180;                           // lw   $3,0($0)
      prog[2] = 16'h2CE4;                           // loop: slti $1,$3,100
      prog[3] = i_ins(OP_BEQ, 0, 1, 3);             // beq  $1,$0,skip
      prog[4] = 16'h0E40;                           // add  $4,$4,$3
      prog[5] = 16'hED81;                           // addi $3,$3,1
      prog[6] = i_ins(OP_BEQ, 0, 0, -5);            // beq  $0,$0,loop
      put_halt(7);                                  // skip:
      load_program(dmz);
      run(7, 0, 1, 5000, n_loop_cycles);
      compare_state("loop");
      dbg_addr = 3'd4; #1;
      chk(dbg_data == 16'd4955, $sformatf("loop: R4 = %0d, expected 5 + 0+1+..+99", dbg_data));
      // 2 + 100 * 5 + 2 instructions and then the halt retire, one per clock, after
      // the first one arrives in EX two edges after reset; 101 taken branches each
      // add two squashed slots
      expect_cycles = 1 + (2 + 100 * 5 + 2 + 1) + 2 * 101;
      $display("loop: %0d cycles, expected %0d", n_loop_cycles, expect_cycles);
      chk(n_loop_cycles == expect_cycles, "loop cycle count");
    end

    // 3. j, jr and floating point: 1.5 + 2.25, 1.5 - 2.25, 1.5 * -2
    begin
      prog.delete();
      dmz[0] = 16'h3E00; dmz[1] = 16'h4080; dmz[2] = 16'hC000;
      prog[0] = r_ins(FN_SUB, 0, 0, 0);
      prog[1] = i_ins(OP_LW, 1, 0, 0);
      prog[2] = i_ins(OP_LW, 2, 0, 1);
      prog[3] = i_ins(OP_LW, 3, 0, 2);
      prog[4] = r_ins(FN_ADDFP, 4, 1, 2);
      prog[5] = r_ins(FN_SUBFP, 5, 1, 2);
      prog[6] = r_ins(FN_MULTFP, 6, 1, 3);
      prog[7] = j_ins(20);
      prog[8] = i_ins(OP_ADDI, 4, 4, 1);            // skipped
      prog[20] = i_ins(OP_ADDI, 7, 0, 30);
      prog[21] = r_ins(FN_JR, 0, 7, 0);
      prog[22] = i_ins(OP_ADDI, 5, 5, 1);           // skipped
      prog[30] = i_ins(OP_SW, 4, 0, 10);
      put_halt(31);
      load_program(dmz);
      dmz[0] = 0; dmz[1] = 0; dmz[2] = 0;
      run(31, 0, 1, 200, cyc);
      compare_state("fp/jump");
      dbg_addr = 3'd4; #1; chk(dbg_data == 16'h4380, "1.5 + 2.25 = 3.75");
      dbg_addr = 3'd5; #1; chk(dbg_data == 16'hBA00, "1.5 - 2.25 = -0.75");
      dbg_addr = 3'd6; #1; chk(dbg_data == 16'hC200, "1.5 * -2 = -3");
    end

    // 4. random programs with interrupts
    for (int p = 0; p < 40; p++) begin
      int n, pos, t, q, kind, gap, tgt;
      int blk_start [$], blk_end [$];
      word_t w;
      n = 150;
      pos = 0;
      blk_start.delete();
      blk_end.delete();
      prog.delete();
      while (pos < n) begin
        kind = $urandom_range(0, 19);
        case (kind)
          0: begin  // forward beq
            prog[pos] = i_ins(OP_BEQ, $urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 5));
            pos++;
          end
          1: begin  // forward j
            prog[pos] = j_ins(pos + $urandom_range(1, 6));
            pos++;
          end
          2: begin  // jr to a forward address built in R7
            gap = $urandom_range(0, 3);
            q = 0;
            t = pos + q + 3 + gap;
            while (t / 63 != q) begin q = t / 63; t = pos + q + 3 + gap; end
            blk_start.push_back(pos);
            blk_end.push_back(pos + q + 2);
            prog[pos] = r_ins(FN_SUB, 7, 7, 7); pos++;
            for (int i = 0; i < q; i++) begin prog[pos] = i_ins(OP_ADDI, 7, 7, 63); pos++; end
            prog[pos] = i_ins(OP_ADDI, 7, 7, t % 63); pos++;
            prog[pos] = r_ins(FN_JR, 0, 7, 0); pos++;
            while (pos < t) begin prog[pos] = rand_plain(); pos++; end
          end
          default: begin
            prog[pos] = rand_plain();
            pos++;
          end
        endcase
      end
      // a branch or jump must not land inside a jr block, past the R7 reset
      for (int i = 0; i < pos; i++) begin
        w = prog[word_t'(i)];
        if (w[15:13] == 3'd6 || w[15:13] == 3'd2) begin
          tgt = (w[15:13] == 3'd6) ? i + 1 + int'(w[6:0]) : int'(w[12:0]);
          foreach (blk_start[b])
            if (tgt > blk_start[b] && tgt <= blk_end[b]) tgt = blk_start[b];
          if (w[15:13] == 3'd6) w[6:0] = 7'(tgt - i - 1);
          else w[12:0] = 13'(tgt);
          prog[word_t'(i)] = w;
        end
      end
      put_halt(word_t'(pos));
      for (int i = 1; i <= 8; i++) prog[word_t'(pos + i)] = j_ins(pos);
      for (int v = 0; v < 3; v++) begin
        // handlers leave R7 alone: the main program builds jr targets in it
        for (int i = 0; i < 6; i++) begin
          w = rand_plain();
          if (w[15:13] == 3'd0 && w[6:4] == 3'd7) w[6:4] = 3'd6;
          if (w[15:13] inside {3'd1, 3'd4, 3'd7} && w[9:7] == 3'd7) w[9:7] = 3'd6;
          prog[VEC[v] + word_t'(i)] = w;
        end
        prog[VEC[v] + 6] = RETI;
      end
      foreach (dmz[i]) dmz[i] = word_t'($urandom);
      load_program(dmz);
      run(word_t'(pos), 300, 12, 20000, cyc);
      $display("random program %0d: %0d instructions, %0d cycles", p, pos, cyc);
      compare_state($sformatf("random program %0d", p));
    end

    $display("cycles %0d: squashes %0d, next-instruction register reads %0d, load-use %0d, stores %0d",
             n_cycles, n_squash, n_raw_next, n_load_use, n_store);
    $display("fp ops %0d, interrupts %0d, preemptions %0d, reti %0d, gated cycles %0d, j %0d, jr %0d",
             n_fp, n_int, n_preempt, n_reti, n_gated, n_jump, n_jr);
    chk(n_squash > 0, "taken-branch squash never happened");
    chk(n_raw_next > 0, "falling-edge write used by the next instruction never happened");
    chk(n_load_use > 0, "load result used by the next instruction never happened");
    chk(n_store > 0, "no store");
    chk(n_fp > 0, "no floating-point operation");
    chk(n_int > 0, "no interrupt taken");
    chk(n_preempt > 0, "no interrupt preempted a handler");
    chk(n_reti > 0, "no reti");
    chk(n_gated > 0, "register clock never gated");
    chk(n_jump > 0 && n_jr > 0, "j or jr never executed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
