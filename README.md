# A pipelined 16-bit Harvard RISC processor with a half-precision FPU

This is a small load/store processor with 16-bit words. It has separate instruction
and data memories, eight general purpose registers, an integer ALU, a floating-point
unit for add, subtract and multiply, an accumulator, a 4-bit flag register and three
vectored interrupts with fixed priority. Sixteen instructions, all one word long,
each complete in one clock once the pipeline is full.

The main idea is how the pipeline avoids hazard hardware. Pipeline registers change
on the rising clock edge. The register file and the data memory load on the falling
edge, in the middle of the cycle in which an instruction executes. The next
instruction is being decoded in that same cycle, so it reads the new value before
its own pipeline register closes. There is no forwarding network and no load-use
stall. The only lost cycles are the two slots squashed behind a taken branch or
jump. The register file and data memory also get a gated clock that only falls in
cycles that write them.

The processor follows a published description of a 16-bit pipelined RISC processor
with a floating-point mode, which was built for a Xilinx Spartan-3A board. That
description gives the block diagram, the instruction list, example instruction words
and a test program. Much of the detail here is this implementation's own, and the
section "Own choices and departures" lists it.

## Instruction set

Every instruction is one 16-bit word. The field positions come from the example
instruction words of the original description. For example, `16'h0990` is
`add $1,$2,$3` and `16'h2CE4` is `slti $1,$3,100`.

```
R-type  [15:13]=000  [12:10] rs  [9:7] rt  [6:4] rd  [3:0] funct
I-type  [15:13]=op   [12:10] rs  [9:7] rt  [6:0] imm7
J-type  [15:13]=010  [12:0] target
```

| instruction | encoding | effect |
|---|---|---|
| `add/sub/and/or rd,rs,rt` | R, funct 0/1/2/3 | rd = rs op rt |
| `slt rd,rs,rt` | R, funct 4 | rd = (rs < rt), signed |
| `addfp/subfp/multfp rd,rs,rt` | R, funct 5/6/7 | rd = rs op rt in binary16 |
| `jr rs` | R, funct 8 | PC = rs |
| `slti rt,rs,imm` | op 001 | rt = (rs < imm), signed compare, imm 0..127 |
| `j target` | op 010 | PC = {PC+1[15:13], target} |
| `reti` | op 011 | return from interrupt (pops the PC stack) |
| `lw rt,imm(rs)` | op 100 | rt = M[rs+imm] |
| `sw rt,imm(rs)` | op 101 | M[rs+imm] = rt |
| `beq rs,rt,off` | op 110 | if rs == rt: PC = PC+1+off, off is -64..63 |
| `addi rt,rs,imm` | op 111 | rt = rs + imm, imm 0..127 |
| `nop` | `16'h0000` | nothing |

Addresses count words. The immediates of `addi`, `slti`, `lw` and `sw` are
zero-extended. This is what makes `16'h2CE4` mean `slti $1,$3,100`. Only the `beq`
offset is signed.

The flag register holds `{v, n, c, z}`. The integer instructions (`add sub and or slt
slti addi`), `beq` (the flags of rs - rt) and the floating-point instructions update
it. `c` is the carry out of an add or the borrow of a subtract. `v` is signed
overflow, or for FP an infinite or NaN result. The accumulator holds the last value
written to any register.

## Pipeline and timing

```
            rising edge            rising edge             rising edge
   IF  | PC -> instruction memory | IF/ID
   ID  |                          | decode, read registers | ID/EX
   EX  |                          |                        | ALU / FPU / data memory,
       |                          |                        | branch decision;
       |                          |                        | falling edge: write register
       |                          |                        | and data memory
```

* **IF**: `pc_unit` drives the instruction memory, which reads combinationally. The
  word is captured in IF/ID.
* **ID**: `control_unit` decodes the word into a `ctrl_t` control word. The register
  file is read combinationally, and operands and control go into ID/EX.
* **EX**: the ALU and FPU both compute, and the control word selects the result.
  `lw`/`sw` use the ALU sum as their address. The result is written at the falling
  edge. `beq` subtracts its operands and is taken on a zero result. `j`, `jr` and
  `reti` are always taken.

**Hazards.** An instruction in ID may read a register that the instruction in EX is
writing. The write happens at the falling edge, half a cycle before ID/EX samples, so
the read returns the new value. This holds for a `lw` result too, because the data
memory is read combinationally in EX. The same falling-edge timing makes a `sw`
followed by a `lw` of the same word correct.

**Control transfers.** A taken branch or jump is known in EX. By then the two
following words are already in IF and ID. Both are squashed and fetch restarts at the
target, so a taken transfer costs two cycles and a not-taken `beq` costs none. For
example, the summation loop below runs 100 iterations of five instructions. It
retires 505 instructions in 708 clocks after reset: 505, plus 2 × 101 squashed slots,
plus one cycle to fill the pipeline. The testbench checks this count.

```
      sub  $0,$0,$0        ; R0 = 0 (R0 resets to 1, see below)
      lw   $3,0($0)        ; start value from M[0]
loop: slti $1,$3,100
      beq  $1,$0,skip      ; offset +3
      add  $4,$4,$3
      addi $3,$3,1
      beq  $0,$0,loop      ; offset -5
skip: j    skip
```

**Clock gating.** `clock_gate` computes `gclk = clk | ~en_l`. `en_l` is the enable,
held by a latch that is transparent while `clk` is high. The gated clock falls only
in cycles whose enable was high, and it cannot glitch. The enable may change after
the rising edge, and the latch freezes it before the falling edge. The register file
and the data memory each have one gate. On synthesis this gate is the intended latch
in each of these modules.

## Interrupts

There are three lines, `irq[0]` (highest priority) to `irq[2]`. A rising edge sets a
line's pending bit. `interrupt_controller` requests the highest-priority pending
interrupt that outranks every interrupt already in service. A higher-priority line
can therefore preempt a lower one's handler, up to three levels deep.

The processor takes a request in a cycle where EX holds a valid instruction that is
not a `reti`. That instruction completes normally. `pc_unit` pushes the address
where the program would have continued onto its 3-entry PC stack. That address is
the branch target if the instruction was a taken transfer, and PC+1 otherwise. IF
and ID are squashed and fetch continues at the vector. `reti` pops the stack and
clears the highest in-service level. Handlers must save any registers they use
themselves, because there is no automatic context save. The flag register and the
accumulator are not saved either.

The vectors are parameters `VEC0..VEC2`, with defaults `16'hFF00`, `16'hFF40` and
`16'hFF80`.

## Floating point

`fpu` runs `fp_addsub` and `fp_mul` side by side on IEEE 754 binary16 values (1 sign,
5 exponent, 10 fraction bits), and the opcode selects which result is used.

The adder aligns the smaller operand inside a 42-bit window. That window is wide
enough for the largest exponent difference, so the sum is exact and is rounded only
once. The multiplier forms the exact 22-bit product of the significands. Both round
to nearest, ties to even, with these special cases:

* Subnormal inputs read as zero.
* A rounded result below 2^-14 becomes a zero with the right sign.
* Overflow gives infinity.
* A NaN input, infinity minus infinity, or zero times infinity gives `16'h7E00`.

Both units are combinational and finish within the EX cycle.

## Memories, reset and the outside ports

* **Instruction memory**: 65536 words, which is the whole 16-bit address space. It
  works as a ROM, with a load port (`im_load_*`, written on the rising edge) for
  placing a program. Unwritten words are zero, which is `nop`.
* **Data memory**: `DM_DEPTH` = 256 words, and addresses wrap modulo the depth. The
  host port `dm_host_*` can write and read it. Set up a host write just after a rising
  edge and hold it until the falling edge. A host write wins over a `sw` in the same
  cycle.
* **Reset** (`rst_n`, asynchronous, active low) does the following:
  * PC = 0 and the pipeline is empty.
  * The flags, the accumulator and the interrupt state are cleared.
  * Register Ri = i + 1, which is the register state shown in the original worked
    examples. R0 is an ordinary register, not a constant zero.
* **Observation ports**: `pc`, `acc`, `flags`, `dbg_reg_addr`/`dbg_reg_data` (a third
  register read port), `retire`/`retire_pc` (the instruction completing EX),
  `flush`, `int_taken`/`int_id`, `pc_stack_depth` and `in_service`.

## Files

| file | content |
|---|---|
| `rtl/risc_pkg.sv` | widths, opcodes, funct codes, `ctrl_t`, `flags_t` |
| `rtl/risc_cpu.sv` | top level: pipeline registers, EX datapath, accumulator, flags, interrupt entry |
| `rtl/pc_unit.sv` | PC register, next-PC select, PC stack |
| `rtl/instruction_memory.sv` | instruction ROM with load port |
| `rtl/control_unit.sv` | decoder |
| `rtl/register_file.sv` | R0..R7, falling-edge write, gated clock |
| `rtl/alu.sv` | integer ALU and flags |
| `rtl/fpu.sv`, `rtl/fp_addsub.sv`, `rtl/fp_mul.sv` | binary16 unit |
| `rtl/data_memory.sv` | data RAM, falling-edge write, gated clock, host port |
| `rtl/interrupt_controller.sv` | priority, pending and in-service logic |
| `rtl/clock_gate.sv` | latch-based gate for falling-edge loads |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/fp16_ref_pkg.sv` | binary16 reference arithmetic, computed through `real` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. With
Verilator 5, run from the repository root:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/risc_pkg.sv tb/fp16_ref_pkg.sv tb/tb_risc_cpu.sv --top-module tb_risc_cpu
./obj_dir/Vtb_risc_cpu
```

Use the same command with another `tb_<name>` for a single block.

`tb_risc_cpu` runs the processor at its default size. It contains an
instruction-level model of the processor that executes each instruction as the
processor retires it. The model compares every retired address, and at the end of
each program all registers, all of data memory, the accumulator and the flags. The
programs are:

* the worked single-instruction examples;
* the summation loop, with its cycle count checked;
* a directed program for `j`, `jr` and FP (1.5 + 2.25 = 3.75, 1.5 − 2.25 = −0.75,
  1.5 × −2 = −3);
* 40 random programs with forward branches, jumps, `jr`, loads and stores, FP
  operations and randomly timed, nested interrupts.

The testbench also counts each mechanism: squashes, use of a register in the very
next instruction, load-use, stores, FP operations, interrupt entries, preemptions,
`reti`, gated cycles, `j` and `jr`. A mechanism that never happened counts as a
failure. The whole run takes a few seconds.

To write your own program, place words with `im_load_*` while `rst_n` is low, and
preload data with `dm_host_*`. The `r_ins`, `i_ins` and `j_ins` functions in
`tb_risc_cpu.sv` are a minimal assembler.

## Own choices and departures

These parts follow the original description:

* the Harvard organisation, 16-bit words and the eight registers;
* the instruction list and the field layout of the example words;
* the ALU, FPU (add, subtract, multiply), accumulator and 4-bit flag register;
* one instruction per clock through pipelining;
* loading registers on the falling edge of the clock;
* clock gating of the data memory and registers;
* three priority-ordered vectored interrupts;
* the 64K-word instruction memory.

These parts are this implementation's own:

* **Pipeline depth.** The three-stage split and resolving branches in EX.
* **Encodings.** The `sw` opcode, the `slt`/FP/`jr` funct codes, and `j` and `reti`
  as the 15th and 16th instructions. The original lists 14 instructions while
  speaking of 16.
* **Addressing and immediates.** Word addressing, zero-extended immediates, and the
  branch offset rule PC+1+off. The original test program's branch words do not fit
  any single offset rule, so the loop above is re-encoded.
* **beq.** It compares two registers, as the original test program uses it. The
  original's instruction table instead calls it "branch if accumulator is zero".
* **Flags and accumulator.** The meaning of the four flag bits and the role of the
  accumulator.
* **Floating-point format.** binary16 with flush-to-zero. The original does not name
  a format.
* **Interrupts.** Edge triggering, nesting, the entry and return mechanism, and the
  vector addresses.
* **Memory size and ports.** The data memory size, the load and host ports, and the
  debug ports.
* **Reset values.** Ri = i+1, read from the examples' register tables.

The original also describes reduced 8-bit versions of the instruction memory, the ALU
and the load/store path, made to fit a board's switches and LEDs. They are test
set-ups, not part of this processor, and are not included. Its clock-rate result
(about 73 MHz on a Spartan-3A) has not been reproduced. The half-cycle write path
(ALU or FPU, then memory, then register write, all within half a clock) is the
critical path of this organisation.
