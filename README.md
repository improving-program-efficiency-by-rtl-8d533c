# IRF fetch front end: packing instructions into registers

Compilers keep the most-used data values in a register file rather than
fetching them from memory each time. No such level exists for instructions.
This design adds one: an **Instruction Register File (IRF)**. The compiler
picks the 31 instructions a program executes most often (entry 0 is always a
nop) and places them in a 32-entry IRF. The program in memory then names
them by 5-bit index. One 32-bit word fetched from the instruction store can
stand for up to five instructions. Fetch energy, code size and instruction
store traffic all go down.

This RTL implements the fetch stage and the first half of the decode stage
of a MIPS-like pipeline built around that idea. Its output is a stream of
ordinary MIPS instructions, one per cycle, for the rest of the pipeline.
The rest of the pipeline is not part of this RTL: register file, ALU, data
memory and branch resolution live in the back end. The design follows the
IRF organisation published by Hines, Green, Tyson and Whalley ("Improving
Program Efficiency by Packing Instructions into Registers", 2005). Where that
description stops, this design makes its own choices. Each choice is marked
below.

## Two instruction sets

* **RISA** ("register ISA") is what sits in the IRF. Each entry is a plain
  MIPS instruction, with two extras:
  * The entry's 16-bit immediate field is its *default immediate*. A packed
    word can override it.
  * Three flags say which of the rs, rt and rd fields hold *positional*
    register specifiers instead of register numbers (see below). The flags
    are this design's encoding.
* **MISA** ("memory ISA") is what sits in the instruction store. Every MISA
  word is 32 bits and has one of these forms:

| form | layout (bit 31 on the left) | stands for |
|---|---|---|
| T-format | `opcode[6] inst1[5] inst2[5] inst3[5] inst4/param[5] s[1] inst5/param[5]` | 2 to 5 IRF entries |
| loose R | `opcode[6] rs/shamt[5] rt[5] rd[5] funct[6] inst[5]` | itself, then IRF[inst] if inst != 0 |
| loose I | `opcode[6] rs[5] rt[5] imm[11] inst[5]` | itself, then IRF[inst] if inst != 0 |
| lui | `opcode[6] imm_hi[5] rt[5] imm_lo[16]` | itself: rt = imm21 << 11 |
| J | unchanged MIPS `j`/`jal` | itself |

The loose formats pay for their 5-bit `inst` field in two ways:

* R-type loses the shamt field. Immediate shifts (sll, srl, sra) put their
  shift amount in the rs field.
* I-type immediates shrink from 16 to 11 bits. They are zero-extended for
  andi/ori/xori and sign-extended otherwise.

`lui` gets a 21-bit immediate instead of a packed instruction. lui then
fills bits 31..11 of the register, and an 11-bit immediate supplies the rest
of a 32-bit constant. Where the 21 bits sit in the word (the rs field, then
the low 16 bits) is this design's choice.

## The T-format in detail

The opcode says how many IRF references the word holds and which of them
take a *parameter*. Slots are lettered A to E in issue order. Unused fields
are padded with 0, the nop entry.

| name | opcode | instructions | parameter slots |
|---|---|---|---|
| tight5 / tight4 / tight3 / tight2 | 0x18 / 0x19 / 0x1A / 0x1B | 5 / 4 / 3 / 2 | none |
| param4_A, _B, _C, _D | 0x1C, 0x1D, 0x1E, 0x1F | 4 | one slot, parameter in field 5 |
| param3_A, _B, _C | 0x34, 0x35, 0x36 | 3 | one slot, parameter in field 5 |
| param3_AB, _AC, _BC | 0x37, 0x3C, 0x3D | 3 | two slots: field 4 to the first, field 5 to the second |
| param2_A, _B | 0x3E, 0x3F | 2 | one slot, parameter in field 5 |
| param2_AB | 0x2C | 2 | A from field 4, B from field 5 |

The opcode numbers are this design's own. They reuse MIPS-I opcodes that
the supported subset leaves free; the constants are in `rtl/irf_pkg.sv`.

The `s` bit qualifies field 5:

* `s = 1`: field 5 is a parameter.
* `s = 0`: field 5 is the fifth IRF index (tight5).

If a format's field-5 parameter slot has `s = 0`, that slot falls back to
its default immediate. The original description prints the s field but does
not explain it, so this reading is this design's.

**What a parameter does.** The parameter's meaning depends on the slot's
instruction:

* **Branch:** the 5-bit parameter is a signed word displacement. The target
  is the address of the MISA word + 4 + 4 × displacement.
* **Any other I-type instruction:** the parameter indexes the 32-entry
  **Immediate Table**. The table value replaces the default immediate.
* **No parameter:** the instruction uses its default immediate.

**Worked example.** The IRF holds:

* 1: `addiu r5,r3,1`
* 2: `beq r5,r0,0`
* 3: `addu r5,r5,r4`
* 4: `andi r3,r3,63`

Immediate Table entry 3 holds 32. The five-instruction sequence
`lw r3,8(r29); andi r3,r3,63; addiu r5,r3,32; addu r5,r5,r4; beq r5,r0,L`
then becomes two words:

```
lw r3, 8(r29) {4}          loose I: lw, then IRF[4] with its default 63
param3_AC {1,3,2} {3,-5}   IRF[1] with IMM[3]=32, IRF[3], IRF[2] with displacement -5
                           = 0x3C | 00001 | 00011 | 00010 | 00011 | 1 | 11011
```

A word may only hold instructions of one basic block. A branch is therefore
always the last instruction in its word.

## Positional register specifiers

Many code sequences are the same apart from register allocation. Take
`r2 = M[r29+4]; r2 = r2+r5; M[r29+4] = r2` and the same sequence with r3. A
*positional* specifier names a register by where it last appeared in the
instruction stream. Both sequences then become the same instructions, and
the IRF needs only one copy:

```
r[x] = M[r[29]+4]      (plain)
s[0] = s[0] + r[5]     s[0]: the register most recently written
M[u[2]+4] = s[0]       u[2]: the third most recent source register read
```

`pos_resolver` keeps two short histories of register numbers. Both are
updated when an instruction is handed to the back end:

* **s[i]** is the destination of the i-th most recent instruction that wrote
  a register.
* **u[i]** is the i-th most recent source register. An instruction that
  reads rs and rt records rs first, then rt, so u[0] = rt and u[1] = rs.

After `lw r2,4(r29); addu r2,r2,r5` the use history is u = {r5, r2, r29, ...}.
u[2] is therefore r29, as the example requires.

A positional field is encoded as `{kind, index[3:0]}`: kind 0 reads s,
kind 1 reads u. The entry's flags say which fields are positional. All of an
instruction's fields are resolved against the history as it stood before
that instruction. So `s[0] = s[0] + r5` reads and writes the same register.
The history depth is 4 (parameter `POS_DEPTH`).

The field encoding, the depth and the rs-before-rt order are this design's
choices. They were picked to reproduce the example above.

Positional specifiers are resolved from register *numbers* at issue time, not
from data values. The back end sees only ordinary register numbers.

## Datapath and timing

```
 IF                       | first half of ID
 PC -> instruction store -> IF/ID -> misa_decoder -> IRF (5 read ports) -> risa_param x5 --+
                                        |          -> Immediate Table (2 ports) ------------+
                                        +-- word itself -> mux (entry 0) ------------------+-> inst_buffer (5)
 inst_buffer -> pos_resolver -> back end (out_valid / out / out_ready)
```

* **Buffer load.** A decoded MISA word enters the five-entry instruction
  buffer in one cycle. The buffer then issues one instruction per cycle,
  oldest slot first.
* **Fetch stall.** A new word is loaded only when the buffer becomes empty,
  possibly in the same edge as its last issue. Until then IF/ID and the PC
  hold. A word of N instructions therefore costs one store access and N
  issue cycles. Single-instruction words stream at one per cycle with no
  bubbles.
* **Latency.** A word fetched at PC in cycle t is in IF/ID in cycle t+1, in
  the buffer in t+2, and offered to the back end in t+2.
* **Redirect.** The back end pulses `redirect` with a new PC for a taken
  branch or a jump. This empties IF/ID and the buffer. The first instruction
  from the new PC is offered 3 cycles after the pulse.
* **Exceptions inside a packed word.** `word_pc` and `done_mask` report the
  word being issued and which of its slots have completed. To restart, the
  back end pulses `restart` with `restart_pc` and `restart_mask`. The word is
  fetched again and its completed slots are skipped, so no instruction
  executes twice. The original description asks for "a bitmask of completed
  instructions"; the port protocol is this design's.

## What the back end must do

* Accept instructions with `out_valid && out_ready`. `out` is an
  `irf_pkg::risa_t`:
  * the address of the source MISA word, and the slot within it;
  * the instruction in standard MIPS encoding;
  * `imm`, the final 32-bit operand, already extended (for lui, already
    shifted into place);
  * `from_irf`, set when the instruction came from the IRF.
* Take I-type operands from `imm`, not from the low 16 bits of the word.
  A 21-bit lui does not fit a MIPS word.
* Compute branch targets as `out.pc + 4 + (imm << 2)`. There is no branch
  delay slot.
* Hold `out_ready` low while it redirects. The positional history must not
  record wrong-path instructions.

## Loading the tables and context switches

The IRF, the Immediate Table and the instruction store each have a plain
write port on the top module. IRF entry 0 ignores writes and always reads as
a nop.

The original scheme gives each process a routine that reloads its IRF and
Immediate Table on a context switch. The tables are never saved, because
they do not change while the process runs. The positional histories do
change, so they are exposed: `pos_state_s/u` read them out, and
`pos_restore` with `pos_restore_s/u` loads them back. After loading the
tables, redirect to the program start. That discards anything fetched with
the old contents.

## Modules

| file | role |
|---|---|
| `rtl/irf_pkg.sv` | types (`irf_entry_t`, `risa_t`), opcodes, T-format shape table, extension and register-use helpers |
| `rtl/irf_frontend.sv` | top: wires everything as in the diagram |
| `rtl/fetch_stage.sv` | PC and IF/ID register, stall, redirect |
| `rtl/imem.sv` | instruction store (stand-in for a ROM or L1 instruction cache) |
| `rtl/misa_decoder.sv` | classifies a MISA word, rebuilds loose/lui/J words, gives IRF indices and parameter sources |
| `rtl/irf.sv` | 32-entry IRF, five read ports, one write port, entry 0 fixed nop |
| `rtl/imm_table.sv` | 32 x 16-bit Immediate Table, two read ports |
| `rtl/risa_param.sv` | applies default immediate, Immediate Table value or branch displacement to one slot |
| `rtl/inst_buffer.sv` | five-entry buffer, one issue per cycle, completed-slot mask and restart skip |
| `rtl/pos_resolver.sv` | positional register histories and resolution |

Top parameters:

| parameter | default | source |
|---|---|---|
| `IRF_ENTRIES` | 32 | original design |
| `IMM_ENTRIES` | 32 | original design |
| `IMEM_WORDS` | 1024 | this design's choice |
| `POS_DEPTH` | 4 | this design's choice |
| `RESET_PC` | 0 | this design's choice |

The T-format fields are 5 bits wide, so neither table can usefully exceed 32
entries.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/irf_pkg.sv \
          tb/tb_irf_frontend.sv --top-module tb_irf_frontend
./obj_dir/Vtb_irf_frontend
```

`tb_irf_example` runs the two-word worked example above exactly as
written. It uses the same IRF and Immediate Table contents. It checks the
issued stream, that the five packed instructions issue in five consecutive
cycles from two store accesses, and the resulting registers.

Replace the name to run a unit testbench: `tb_imem`, `tb_fetch_stage`,
`tb_irf`, `tb_imm_table`, `tb_misa_decoder`, `tb_risa_param`,
`tb_inst_buffer` or `tb_pos_resolver`.

`tb_irf_frontend` runs the top at its default parameters. It loads the
tables and a packed loop kernel modelled on the worked example: a loop of
load, mask, add a table constant, add, positional store, count down and
branch back, plus straight-line code. Between them the words use
tight2/3/5, param4_A, param4_D, param2_B, param3_AC, loose R and I packs, a
21-bit lui and a jump. The testbench contains an instruction-level model of
the back end. This model executes the issued stream and raises one exception
inside a packed word. The testbench checks four things:

* every issued instruction against the one expected for its word and slot;
* the final registers, memory and instruction count against a plain,
  unpacked version of the same program;
* back-to-back issue and the 3-cycle redirect and restart latency;
* that each mechanism occurred at least once.

## How far to trust it

* **Tests.** Every module has a self-checking testbench with directed and
  random cases. Each testbench was also shown to fail against a deliberately
  broken copy of its module.
* **Not built: the back end.** The register file, execute, memory and
  write-back stages are outside this RTL. The testbench models them at
  instruction level only.
* **Not built: a cache.** The instruction store is a plain array. The cache
  effects behind part of the original execution-time gains are not
  modelled.
* **No energy figures.** There is no energy model. The original work reports
  that an IRF access costs far less than an instruction-cache access.
* **Not built: the compiler side.** Profiling, the choice of IRF contents
  and the packing algorithm are software. The testbench's programs are
  packed by hand.
* **Own choices.** The following are this design's own readings of an
  incomplete description and may differ from the original hardware:
  * the T-format opcode numbers;
  * the meaning of the s bit;
  * field 5 as the home of a single parameter;
  * the lui immediate placement;
  * the positional encoding and history depth;
  * all handshakes.
* **Larger IRFs.** IRFs larger than 32 entries need wider reference fields
  and different pack formats. The original work studies these only as a
  sensitivity experiment, and they are not built.
