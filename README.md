# 64-bit five-stage RISC core with clock-gated execution units

This is a scalar 64-bit processor core for embedded, power-limited systems. It
runs an in-order five-stage pipeline (Fetch, Decode, Execute, Memory,
Write-Back) and aims at one instruction per clock. Its power-saving idea sits in
the Execute stage. There are three separate execution units: a 64-operation
ALU, a barrel shifter rotator and a universal shift rotator. Each has its own
clock, passed through an integrated clock gating (ICG) cell. The decoder
already knows which unit an instruction needs. A small control block opens
only that unit's clock gate, so the other two units, with their wide 64-bit
registers, do not switch at all in that cycle.

The published design gives the block structure, the widths and sizes, the
unit list and the clock-gating scheme. It gives no instruction set, no hazard
rules and no interface timing. Those parts are this RTL's own choices; they
are marked as such below and in each file's header comment.

## Block map

```
            +-------+   +-----------------------+   +--------------------------+   +--------+   +----+
  main_ --->| Fetch |-->| Decode                |-->| Execute                  |-->| Memory |-->| WB |
  memory    |  PC   |   | decoder, regfile read |   |  ALU      (gclk_alu)     |   | data   |   | RF |
  (instr)   +-------+   | forwarding muxes      |   |  barrel   (gclk_bs)      |   | memory |   |write
                        | clock-gate decision   |   |  rotator  (gclk_ur)      |   +--------+   +----+
                        +-----------------------+   |  out mux -> DataOut      |
                                                    |  addr adder, branch cmp  |
                                                    +--------------------------+
        pipeline_controller: forwarding selects, load-use stall, branch flush
        icg_control + 3 x icg_cell: at most one unit clock open per cycle
```

| Module | Role |
|---|---|
| `risc_pkg` | widths, instruction format, opcode/ALU/shift enums, decoded-control struct |
| `risc_64bit_top` | the core: pipeline registers and wiring |
| `fetch_unit` | program counter: increment, stall, branch redirect, halt |
| `decoder` | instruction word to `ctrl_t` control bundle |
| `register_file` | 64 x 64-bit, two gated read ports, one write port, write-first |
| `pipeline_controller` | forwarding, load-use interlock, flush (no state machine) |
| `icg_control` | one-hot clock enables for the three units |
| `icg_cell` | latch + AND clock gate |
| `alu64` | 64 operations; operand registers and MAC accumulator on the gated clock |
| `barrel_shifter` | 6-stage logarithmic shifter/rotator; operand registers on its gated clock |
| `universal_rotator` | rotate-and-mask shifter, byte swap, sign/zero extension; operand registers on its gated clock |
| `output_select_mux` | picks the result of the unit the instruction in Execute used |
| `data_out_reg` | 64-bit DATA_OUT register after the output mux |
| `main_memory` | 1024 x 64-bit word array for program and data |

## Clock gating of the execution units

This is the part that differs most from a textbook pipeline. Read it before
changing anything in Decode or Execute.

**Where the gated state is.** Each execution unit begins with its own operand
registers: the operation code, operand A and operand B or the shift amount.
These registers run on the unit's gated clock. Everything after them in the
unit is combinational and ends at the unit's result output (`alu_out`,
`barrel_out`, `rotate_out`). The ALU also has a 64-bit multiply-accumulate
accumulator on its gated clock. All other registers run on the free clock,
including the ordinary ID/EX register, which holds a second copy of the
operands for branches, addresses and store data.

When a unit's gate stays closed, its operand registers do not change. So no
node inside the unit toggles, however the rest of the pipeline moves. This is
the point of the scheme: the wide adders, the multiplier and the shifter
stages stay still while another unit works.

**Who decides.** `icg_control` looks at the decoder output for the instruction
in Decode. The instruction must be valid, not held by a load-use stall and not
squashed by a taken branch. If so, and it uses the ALU, `alu_en` is high. If it
uses the barrel shifter, `bs_en` is high. If it uses the universal rotator,
`ur_en` is high. At most one enable is ever high; an assertion in the top
checks this. Bubbles, loads, stores, branches, NOPs and HALT open no gate.
Load and store addresses come from a separate adder, so the ALU stays frozen
for memory instructions.

**Timing.** The decision for an instruction is made during its Decode cycle.
`icg_cell` latches its enable while the clock is low, and its output is
`clk & latched_enable`. So the decision acts on exactly the rising edge that
moves the instruction into Execute. At that edge the chosen unit loads its
operands (already forwarded, see below), and the other units see no edge. In
Execute the unit's result settles from its registers, and the output mux picks
it by the `unit` field in ID/EX. A change of the enable while the clock is high
cannot shorten a pulse or add one.

**The accumulator.** The unit has no clock edge at the end of Execute. So a
MAC, MSU, ACCCLR or ACCWR computes its new accumulator value during Execute,
and the accumulator register takes it at the ALU's next gated edge. Until
then the operand registers still hold that operation, so the value waiting to
be written stays the same. The next ALU instruction, and the `acc` output, see
the new value.

**Simulation note.** The gated clocks are derived from `clk` through
continuous assignments in the same time step. Standard scheduling makes the
unit registers sample the values from before the edge. This was checked in
Verilator: the end-to-end test counts the pulses of every gated clock and
compares them with the number of instructions that used each unit. In a
gate-level flow the three `icg_cell` instances map onto library ICG cells, and
the latch in `icg_cell` is intended.

## Pipeline and hazards

| Stage | Work | Register after it |
|---|---|---|
| Fetch | read `memory[pc]` | `if_id_instr`, `if_id_pc`, `if_id_valid` |
| Decode | decode; read two registers (enables from the decoder); forwarding; load-use check; clock-gate decision | `id_ex_ctrl`, `id_ex_pc`, `id_ex_opA`, `id_ex_opB`, `id_ex_valid`, and the operand registers of the enabled unit |
| Execute | unit compute; output mux; address adder; branch compare; DATA_OUT load | `ex_mem_ctrl`, `ex_mem_result`, `ex_mem_addr`, `ex_mem_opB`, `ex_mem_valid` |
| Memory | data memory read/write | `mem_wb_data`, `mem_wb_rd`, `mem_wb_we`, `mem_wb_valid` |
| Write-Back | register file write | — |

All hazard handling is combinational in `pipeline_controller`. There is no
state machine.

- **Forwarding into Decode.** The operands must be correct when they are
  written into the unit operand registers, at the end of Decode. So the
  forwarding multiplexers sit in Decode, not in Execute. Each source register
  can take the result of the instruction in Execute (`FWD_EX`), straight from
  the output mux. Or it can take the value of the instruction in Memory
  (`FWD_MEM`): its unit result or, for a load, the word read from memory.
  Execute has priority because it holds the younger instruction. A value in
  Write-Back needs no multiplexer: the register file returns the value being
  written in the same cycle (write-first).
- **Load-use interlock.** If a load is in Execute and the instruction in
  Decode reads the load's destination, Fetch and Decode hold for one cycle and
  a bubble enters Execute. No unit clock opens in that cycle. The loaded word
  then arrives by `FWD_MEM`.
- **Branches.** Branches and jumps resolve in Execute. A taken branch
  redirects the PC and flushes the two younger instructions. The flush wins
  over a stall in the same cycle, and a flushed instruction opens no unit
  clock.
- **Cycle count.** A program that executes *N* instructions and then HALT
  takes *N* + 5 + (load-use stalls) + 2 x (taken branches) cycles from reset
  release until `halted`. The testbench checks this exactly.
- **Longest path.** The Execute-to-Decode forwarding path runs from a unit's
  operand registers through the unit, the output mux and the Decode forwarding
  mux into the operand registers. This is one unit delay plus two
  multiplexers, the same depth as forwarding into Execute would give.

## Instruction set (this design's own)

All instructions are 64 bits long. Addresses count 64-bit words.

```
 63    58 57   52 51   46 45   40 39   34 33                       0
+--------+-------+-------+-------+-------+--------------------------+
| opcode | func  |  rd   |  rs1  |  rs2  |  imm (signed, 34 bits)   |
+--------+-------+-------+-------+-------+--------------------------+
```

| opcode | name | effect | unit |
|---|---|---|---|
| 0 | NOP | — | none |
| 1 / 2 | ALU / ALUI | rd = alu(func, rs1, rs2 / imm) | ALU |
| 3 / 4 | SHF / SHFI | rd = barrel(func, rs1, rs2[5:0] / imm[5:0]) | barrel shifter |
| 5 / 6 | ROT / ROTI | rd = universal(func, rs1, rs2[5:0] / imm[5:0]) | universal rotator |
| 7 | LD | rd = mem[rs1 + imm] | none (address adder) |
| 8 | ST | mem[rs1 + imm] = rs2 | none |
| 9–12 | BEQ, BNE, BLT, BGE | if (rs1 ? rs2) pc = pc + imm (signed compares) | none |
| 13 | JMP | pc = pc + imm | none |
| 63 | HALT | stop fetching; `halted` rises when the pipeline is empty | none |

Other opcodes act as NOPs. There is no hardwired zero register; all 64
registers reset to zero. A constant is loaded with `ALUI` and `func` = PASSB.

**ALU operations** (`alu_op_e`, 6-bit `func`):
- Arithmetic: add, subtract, negate, increment, decrement.
- Logic: and, or, xor, nor, nand, xnor, and-not, or-not, not, pass A, pass B.
- Comparisons returning 0 or 1, plus min/max (signed and unsigned), absolute
  value, absolute difference and averages.
- Multiplication: the low 64 bits, and the signed, unsigned and
  signed-by-unsigned high halves.
- Multiply-accumulate on the internal accumulator: MAC, MSU, ACCCLR, ACCRD
  and ACCWR.
- 32-bit add, subtract and multiply, sign-extended.
- Saturating signed and unsigned add and subtract.
- Bit operations: population count, leading and trailing zeros and ones,
  parity, is-zero, sign, carry, borrow and overflow flags, OR and AND
  reductions, clear lowest set bit, isolate lowest set bit.

The multiplier is a single-cycle 64 x 64 product inside the ALU; there is no
separate array multiplier.

**Shift operations** (`shf_op_e`):
- The barrel shifter does SLL, SRL, SRA, ROL and ROR by 0–63 places.
- The universal rotator also does these five shifts and rotations, and adds:
  - BSWAP, which reverses the eight bytes;
  - sign extension from 8, 16 and 32 bits;
  - zero extension from 8, 16 and 32 bits.
- Codes a unit does not implement give 0.

## Interface of `risc_64bit_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | asynchronous reset, active high |
| `load_en`, `load_addr`, `data_input` | in | 1, 10, 64 | write a word into memory; use it while `rst` is high |
| `data_output` | out | 64 | DATA_OUT register: the last ALU/shifter/rotator result, loaded at the end of Execute |
| `data_valid` | out | 1 | one-cycle pulse after each DATA_OUT update |
| `halted` | out | 1 | HALT decoded and every older instruction finished |
| `pc` | out | 10 | current fetch address |

To run a program, do the following:

1. Hold `rst` high.
2. Write the program and its data with `load_en`. Program from word 0; the
   tests put data at words 512 and up.
3. Release `rst`.
4. Wait for `halted`.

The memory is not reset. Load every word the program may fetch or read.

## Sizes

| Item | Value |
|---|---|
| Data width | 64 |
| Registers | 64 x 64-bit (6-bit addresses) |
| Memory | 1024 x 64-bit words, one array for program and data |
| ALU operations | 64 |
| Shift amount | 0–63 |

The register file and the memory are plain flip-flop arrays, so they account
for almost all of the core's state: 4,096 + 65,536 bits. The design was
presented as closed at 100 MHz in a 90 nm library. That figure belongs to a
gate-level flow and is not checked here.

## How far to trust it, and where it departs

Verified in simulation:
- Every block has a self-checking testbench. Each compares against values
  computed independently in the testbench.
- The ALU test covers all 64 operations against 128-bit reference
  arithmetic.
- The shifter tests cover every amount of every operation.
- The ICG test disturbs the enable in both clock phases.
- The end-to-end test runs a directed program and twelve random programs of
  about 300 instructions through the core. The random programs have dense
  register dependencies, loads, stores and branches. An instruction-level
  model in the testbench predicts:
  - all registers, the data memory and the DATA_OUT sequence;
  - the number of pulses each gated clock receives;
  - the exact cycle count.
- The random programs mix multiply-accumulate, accumulator read and write
  with other operations, so the deferred accumulator write is exercised at
  every distance.
- The hazard test checks that forwarding from Execute wins over Memory, and
  the ICG-control test checks that a stalled or flushed instruction opens no
  unit clock.

Choices not fixed by the published description:
- The instruction encoding, the ALU operation list and the branch
  instructions.
- Word addressing, and one shared program/data memory with asynchronous
  reads.
- The forwarding, stall and flush policy, and forwarding in Decode.
- Operand registers inside each unit as the gated state, and the
  deferred accumulator write.
- The load port and HALT.
- The read enables that force unused read buses to zero.
- Asynchronous active-high reset everywhere.

Where the published material disagrees with itself:
- The overview drawing labels the register file "32x64", while the text says
  64 entries of 64 bits. The RTL has 64 entries.
- The same drawing labels the ALU's gate enable like the shifter's (BS_EN).
  Here it is called `alu_en`.

Not modelled:
- The physical implementation (90 nm cells, clock-tree synthesis, layout,
  power).
- Clock gating of anything other than the three execution units. The
  description says the control drives "every ICG cell" but names only these.

## Simulating

Verilator 5 is enough. Name the package file first; `-y rtl` finds the
modules by file name. For example, the
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    --top-module tb_risc_64bit_top rtl/risc_pkg.sv tb/tb_risc_64bit_top.sv -o sim
./obj_dir/sim
```

Any unit test works the same way: use `tb/tb_<module>.sv` with
`--top-module tb_<module>`. Every testbench prints one line,
`TB_RESULT checks=N failures=M`, and stops by itself. A watchdog ends a hung
run with a failure.

To write a program in a testbench, use `risc_pkg::mk_instr(opcode, func, rd,
rs1, rs2, imm)`. Then load the words through the load port, as
`tb_risc_64bit_top` does.

When you change the instruction set, edit these places together:
- `risc_pkg` for the format and enums;
- `decoder` for the control bundle;
- the reference model in `tb_risc_64bit_top`.

When you add an execution unit, add:
- a `unit_e` value;
- an enable in `icg_control`;
- an `icg_cell` instance;
- a mux input in `output_select_mux`.
