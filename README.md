# EISC: a 32-bit core with 16-bit extendable instructions

Embedded chips pay for every byte of program memory, and the bus to that
memory limits how fast they run. The Extendable Instruction Set Computer (EISC) tackles both with a
32-bit load/store machine whose instructions are all 16 bits long. Most
offsets and constants in real code are short. An EISC instruction therefore
carries only a short offset or constant (3 to 9 bits). When a longer one is
needed, one or more `LERI` instructions ("load extension register immediate")
come first. Each `LERI` shifts 14 more bits into a 32-bit **extension register
`%ER`** and sets the **extension flag E**. The next instruction sees E set and
glues `%ER` onto its short field. Any instruction other than `LERI` clears E.

This repository holds synthesizable SystemVerilog for an EISC
microcontroller:

- a five-stage pipelined core with sixteen general registers plus a stack
  pointer;
- condition flags, fourteen branch conditions, and a multiplier with
  `%ML`/`%MH` result registers;
- register-list push/pop;
- on-chip program and data memories.

The E-flag and `%ER` are resolved in the decode stage ("virtualised"), so
extension never costs a pipeline stall.

## How far this follows the EISC architecture

The architecture fixes these parts of the design:

- the `LERI` format and behaviour;
- the index-register load/store format, including its eight access types and
  its effective-address rule;
- sixteen general registers, a separate stack pointer, load/store-only memory
  access and two-operand arithmetic;
- a 7-bit stack-pointer offset and stack adjust, an 8-bit load-immediate
  constant and a 9-bit branch offset;
- C/S/Z/V flags with fourteen branch conditions, and `%ML`/`%MH` for multiply
  results;
- register-list push/pop of eight registers;
- hardware interlocks instead of compiler-inserted NOPs;
- a five-stage pipeline;
- the idea of resolving the E-flag at decode.

Everything else is this design's own choice. That covers:

- the opcode layout outside the two fixed formats;
- the extension rule for formats other than index load/store;
- flag rules, the names of the fourteen conditions, the link register;
- forwarding, branch handling, memory sizes and timing, byte order and reset
  values.

The following are **not** included:

- the coprocessors (a system coprocessor 0 for cache/pipeline/memory control,
  floating point, multimedia), whose instructions and functions are not
  defined;
- a cache;
- divide;
- superscalar configurations.

A coprocessor opcode can be added in the unused register-op codes 30 and 31.

## Instruction formats

Bits are listed from 15 down to 0. `r` fields name R0..R15.

| bits 15..0 | instruction | notes |
|---|---|---|
| `00 o o rrrr o fff xxxx` | index load/store | op = {b13,b12,b7}; `rrrr` data register; `fff` offset in units of the access size; `xxxx` index register |
| `01 cccccccccccccc` | `LERI c` | feeds 14 bits into `%ER`, sets E |
| `10 00 s rrrr fffffff` | `LD/ST r,(SP+4*f)` | word access; `s`=1 store |
| `10 01 rrrr iiiiiiii` | `LDI r,imm8` | |
| `10 1 cccc fffffffff` | `Bcc pc+2*f` | cond 0..13; 14 = `BRA`; 15 = `JAL` (R15 = pc+2) |
| `11 0 ooo iiiiii rrrr` | immediate op | ADDI CMPI ANDI ORI XORI TSTI LSLI LSRI |
| `11 1 ooooo ssss dddd` | register op | `d = d op s` (see `eisc_pkg`) |

The index load/store op codes are:

| op | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| access | LDB | LDS | LD | LDBU | STB | STS | ST | LDSU |

- LDB and LDS sign-extend a byte or halfword.
- LDBU and LDSU zero-extend.
- STB, STS and ST store 8, 16 and 32 bits.

The register ops are:

- MOV, ADD, ADC, SUB, SBC, AND, OR, XOR, CMP, TST;
- LSL, LSR, ASR, NOT, NEG;
- MUL and MULU, which write the 64-bit product to `%MH:%ML`;
- MFML and MFMH, which read those registers;
- JR and JALR, which jump to the register `s`;
- MFSP, MTSP, and ADDSP, which adds a 7-bit constant times 4 to `%SP`;
- PUSHL, PUSHH, POPL and POPH, which push or pop a list of R0-R7 or R8-R15
  (bit 7..0 mask);
- NOP and HALT.

Three-operand arithmetic is written as `MOV` followed by the two-operand
form.

## The extension rule

`LERI c` does `%ER = E ? (%ER << 14) | c : sign_extend(c)`, then `E = 1`.
Two `LERI`s give 28 bits and three give the full 32. Every other instruction
uses E as shown below and then clears it.

| format | E = 0 | E = 1 |
|---|---|---|
| index load/store, byte | `zext(f)` | `(%ER<<3) + f` |
| index load/store, half/word | `zext(f) << size` | `(%ER<<4) + (f << size)` |
| stack load/store | `f*4` | `(%ER<<9) + f*4` |
| `LDI` | `sext(imm8)` | `{%ER, imm8}` |
| branches | `sext(f)*2` | `{%ER, f}*2` |
| immediate op | `sext(imm6)` | `{%ER, imm6}` |
| `ADDSP` | `sext(imm7)*4` | `{%ER, imm7}*4` |

- **Index load/store.** This is the rule the architecture defines, word
  accesses included. For a word, the 3-bit offset is scaled to 0..28 bytes and
  `%ER<<4` is added, not concatenated.
- **The other formats.** Their rules extend the same idea and are this
  design's own choice.
- **Where it is built.** All of this is in `eisc_ext_unit`.

## The pipeline and the decode-time E-flag

| stage | work |
|---|---|
| IF | asynchronous fetch of one halfword, PC += 2 |
| ID | extension unit, decoder, push/pop sequencer, register read, load-use interlock |
| EX | ALU, multiplier, condition test, branch/jump resolution; flags written at the end of the cycle |
| MEM | data memory request (synchronous) |
| WB | load data extension (`eisc_lsu`), register write |

**Why the E-flag lives in decode.** Almost every EISC instruction touches E:
`LERI` sets it, and every other instruction reads it and clears it. Suppose E
were treated like an ordinary register written at commit. Then each
instruction would wait until its predecessor committed. The architecture study
puts that at three or more stall cycles per instruction in a five-stage
pipeline.

The way out is that an instruction's effect on E is known from its opcode
alone:

- `LERI` sets E;
- every other instruction clears it unconditionally;
- `%ER` depends only on the `LERI` constants.

So `eisc_ext_unit` keeps E and `%ER` in ID and updates them when the decoded
instruction is accepted. Every instruction leaves decode already carrying its
final 32-bit operand, and nothing downstream sees E. An instruction squashed
in ID by a taken branch does not update E. The branch itself cleared E when it
was decoded, so the branch target always starts with E = 0.

In a superscalar or out-of-order machine this would become a renamed "virtual
flag". In this in-order scalar core, one copy at decode is exact.

**Other hazards.**

- **Forwarding.** ALU results are forwarded from MEM and WB into EX. The
  register file also writes through to the read ports in the same cycle.
- **Load-use interlock.** Data memory answers one cycle after the request. A
  load followed directly by an instruction that reads its result therefore
  stalls ID for one cycle. This is the only data interlock.
- **Branches and register jumps.** These resolve in EX and are predicted not
  taken. A taken one squashes the two younger instructions.
- **Multiply.** `MUL` writes `%ML/%MH` at the end of EX, so an `MFML` right
  behind it reads the new value.
- **HALT.** Fetch stops once HALT is decoded. `halted` rises after HALT leaves
  WB.

**Timing.** With N instructions up to and including HALT, execution takes
exactly

```
cycles = N + (push/pop micro-ops - push/pop instructions)
           + load-use stalls + 2 * taken branches/jumps + 4
```

The end-to-end testbench checks this on every program.

## Register-list push and pop

`PUSHL/PUSHH/POPL/POPH mask` save or restore any subset of R0-R7 or R8-R15.
While the instruction sits in ID, `eisc_pushpop` issues one single-word
micro-op per cycle: one per selected register, lowest register first, then a
final `%SP` adjustment. The addresses depend on n, the number of selected
registers, and k, a register's position in the list:

- **PUSH** stores register k at `%SP - 4n + 4k`, then sets `%SP -= 4n`.
- **POP** loads register k from `%SP + 4k`, then sets `%SP += 4n`.

`%SP` changes only in the last micro-op, so the memory micro-ops need no
interlock on it. A list of n registers occupies decode for n+1 cycles.

## Top level and memories

`eisc_top` connects `eisc_core`, `eisc_imem` and `eisc_dmem`.

- **Program memory** (`IMEM_DEPTH` = 4096 halfwords) is written through
  `prog_we/prog_addr/prog_data`, normally while `rst_n` is low.
- **Data memory** (`DMEM_DEPTH` = 4096 words) can be inspected through
  `dbg_addr/dbg_rdata`. Addresses wrap modulo its size, and the byte order is
  little-endian.
- **Stack.** `%SP` resets to the top of data memory.
- **Start and status.** The core starts at address 0. It exposes `halted`, the
  flags, and event counters: cycles, retired operations, load-use stalls,
  forwarded operands, taken redirects, E-extended operands, `LERI`s, push/pop
  micro-ops and multiplies.

## Files

| file | contents |
|---|---|
| `rtl/eisc_pkg.sv` | opcode enums, flag and control-word types, format summary |
| `rtl/eisc_ext_unit.sv` | `%ER`, E-flag, operand extension |
| `rtl/eisc_decoder.sv` | instruction decode |
| `rtl/eisc_pushpop.sv` | register-list sequencer |
| `rtl/eisc_regfile.sv` | R0..R15 + `%SP` |
| `rtl/eisc_alu.sv`, `rtl/eisc_cond.sv`, `rtl/eisc_mul.sv` | execute units |
| `rtl/eisc_lsu.sv` | byte-lane steering and load extension |
| `rtl/eisc_core.sv` | the pipeline |
| `rtl/eisc_imem.sv`, `rtl/eisc_dmem.sv` | memories |
| `rtl/eisc_top.sv` | the microcontroller |
| `tb/eisc_tb_pkg.sv` | assembler functions, instruction-level reference model, random program generator |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification and simulation

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Unit testbenches.** Each one compares its block with an independent
  model. Examples are 64-bit integer arithmetic for the ALU, shift-and-add for
  the multiplier, operand-pair relations for the branch conditions, and a
  byte-array model for the lanes.
- **`tb_eisc_core`** runs the core with testbench memories. It checks exact
  cycle costs: one instruction per cycle, zero for `LERI` chains, +1 for
  load-use, +2 for a taken branch, n+1 cycles for an n-register push. It
  checks that a `LERI` squashed behind a taken branch leaves E clear. It then
  runs 60 random programs against the reference model `eisc_iss`.
- **`tb_eisc_top`** runs the whole microcontroller at its default sizes. The
  programs are the dependency-study fragment, a `LERI` straight-line program,
  a directed program and 40 random 300-instruction programs. After each
  program it compares:
  - all registers, `%ML/%MH` and the flags;
  - all 16 KiB of data memory;
  - the cycle count formula above.

  It also requires that the interlock, forwarding, taken branches, extended
  operands, `LERI`, push/pop and multiply each occurred.

The random programs mix every instruction class. They use only forward
branches and never put `LERI` directly before a branch. The reference model
follows the instruction definitions above and knows nothing of the pipeline.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/eisc_pkg.sv tb/eisc_tb_pkg.sv rtl/eisc_*.sv tb/tb_eisc_top.sv \
  --top-module tb_eisc_top
./obj_dir/Vtb_eisc_top
```

Every testbench finishes in well under a second.

## Known limits

- **No toolchain.** No compiler targets this opcode layout, so programs are
  built with the encoder functions in `tb/eisc_tb_pkg.sv`.
- **Word offsets with `%ER`.** For word accesses the index load/store rule
  adds `%ER<<4`, as the architecture defines it. Long word offsets therefore
  need `%ER` to hold the offset divided by 16, not by 32.
- **No traps or interrupts.** There are no misalignment traps, interrupts or
  exceptions. Halfword and word accesses ignore the low address bits.
- **Multiply timing.** The multiplier is a single-cycle 32x32 array, which
  sets the EX-stage critical path. A multi-cycle multiplier would need an EX
  stall that the pipeline does not have.
