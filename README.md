# AXThumb front end: coalescing 16-bit instructions at decode

A processor that runs 16-bit Thumb code fetches 32 bits per cycle but decodes
only one 16-bit instruction per cycle, so half of its fetch bandwidth is idle.
Thumb code also needs more instructions than 32-bit ARM code for the same work,
because a 16-bit encoding has no room for folded shifts, negative immediates, an
S bit, high registers, a third operand or a condition.

This RTL puts the idle bandwidth to work. A small set of *augmenting extension*
(AX) instructions is added to Thumb in one unused 16-bit opcode. An AX
instruction does nothing on its own. It carries the bits that the next Thumb
instruction lacks. The decode stage handles the AX instruction in the same cycle
as the Thumb instruction in front of it, and merges its bits into the ARM
translation of the Thumb instruction behind it. The pair

    setshift lsl #2
    sub      r1, r2

leaves the decode stage as the single ARM instruction `subs r1, r1, r2, lsl #2`.
It takes one cycle and 32 bits of code, like the ARM instruction, while the code
stays 16-bit. The same mechanism gives Thumb predicated execution. After a
`setpred` instruction, the instructions of an if/else are stored as interleaved
(then, else) pairs. The decode stage issues one instruction of each pair per
cycle and drops the other.

The front end built here holds instruction fetch, the instruction fetch queue,
the three-entry instruction buffer, the AX processor with its status register,
the pair-select multiplexer and the Thumb-to-ARM decompressor. The ARM
decoder and the execute, memory and write-back stages behind it are not part of
this RTL. The front end hands them one 32-bit ARM instruction per cycle.

## Files

| file | contents |
|---|---|
| `rtl/ax_pkg.sv` | AX opcodes, status register struct, buffer states, condition test |
| `rtl/fetch_unit.sv` | 32-bit fetch and the 8-word instruction fetch queue |
| `rtl/instr_buffer.sv` | ib1..ib3, shift by 1 or 2, deposit of fetched words |
| `rtl/ax_processor.sv` | AX detection in ib2, status register, consume count, predication |
| `rtl/axthumb_decompressor.sv` | Thumb + status → ARM instruction |
| `rtl/axthumb_frontend.sv` | top: everything above wired together, plus the ARM-state bypass |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ax_workload_mix` |

## AX instructions and the status register

Every AX instruction has `101110` in bits [15:10], an opcode that Thumb leaves
unused. Bits [9:7] say which AX instruction it is, and bits [6:0] carry its
operands. The opcode numbers are this design's choice. The field positions
follow the AX encoding.

| [9:7] | instruction | operands in [6:0] | effect on the next Thumb instruction |
|---|---|---|---|
| 0 | `setimm #c` | [6:0] signed constant | the constant replaces the immediate or register operand |
| 1 | `setshift type, amt` | [6:4] type, [3:0] amount | the shift is folded into the register operand; on an 8-bit immediate the amount is the ARM rotate field |
| 2 | `setsbit` | unused | the S bit of the ARM instruction is set |
| 3 | `setpred cond, #n` | [6:3] condition, [2:0] pair count (0 = 8) | the next *n* pairs are predicated |
| 4 | `setsource Rh` | [6:3] register | replaces the source or base register |
| 5 | `setdest Rh` | [6:3] register | replaces the destination register |
| 6 | `setallhigh` | unused | the push/pop/ldmia/stmia list names r8..r15 |
| 7 | `setthird Rx` | [6:3] register | becomes the second source, making a three-address instruction |

Shift types are 0 LSL, 1 LSR, 2 ASR, 3 ROR and 4 "rotate immediate". Registers in
AX operands are 4 bits wide, so they can name r8..r15.

The status register is 28 bits wide (`ax_status_t`):

| bits | field | meaning |
|---|---|---|
| 27 | `en` | an augmentation is pending for the next Thumb instruction |
| 26:24 | `op` | which AX instruction wrote the status |
| 23:20 | `ctr` | predicated pairs still to come; non-zero means predication mode |
| 19:16 | `rg` | register operand, or the `setpred` condition |
| 15:9 | `imm` | `setimm` constant |
| 8:5 | `shamt` | `setshift` amount |
| 4:2 | `shtype` | `setshift` type |
| 1 | `sbit` | `setsbit` |
| 0 | `allhigh` | `setallhigh` |

The register can be read (`status_out`) and written (`status_restore_*`). An
operating system saves and restores it on a context switch, so an augmentation
or a predicated block may span an interrupt.

## The decode cycle

In every cycle, ib1 holds a Thumb instruction. It goes through the decompressor
together with the status as it stood at the start of the cycle. At the same
time, the AX processor looks at ib2:

* **ib2 holds an AX instruction.** The AX processor writes the AX operands into
  the status register at the end of the cycle, and both entries are consumed.
  The AX instruction has cost nothing.
* **ib2 holds a Thumb instruction, or nothing.** Only ib1 is consumed. The
  pending augmentation is cleared, because an AX instruction augments exactly
  one instruction.
* **Predication mode (`ctr` ≠ 0).** ib1 and ib2 hold one (then, else) pair. The
  `setpred` condition is tested on the N, Z, C and V flags. The multiplexer
  passes ib1 when the condition holds and ib2 when it does not. Both entries are
  consumed and `ctr` counts down. The pair waits when it is not yet complete in
  the buffer, or when the pipeline reports the flags as not yet current
  (`flags_valid` = 0).

An instruction can be augmented by at most one AX instruction. A second AX
instruction could not be absorbed for free, so allowing it would gain nothing.

## Why the buffer has three entries

The AX instruction must already be in ib2 while the Thumb instruction in front
of it is in ib1. Fetch adds a whole word (two instructions) only when two
entries are free. With a two-entry buffer, the word holding an AX instruction
often arrives only once ib1 has drained, and the AX instruction then costs a
cycle. With three entries (48 bits), a word can be added behind a single
remaining instruction. The buffer then holds at least two instructions in every
cycle, except after a taken branch. The state of the buffer is reported as one
of six states:

| state | ib1 | ib2 | ib3 |
|---|---|---|---|
| S1 | – | – | – |
| S2 | T | – | – |
| S3 | T | T | – |
| S4 | T | A | – |
| S5 | T | T | T |
| S6 | T | A | T |

(T = Thumb, A = AX.) Each cycle, 0, 1 or 2 entries leave from the ib1 end and
the rest shift down. A fetched word then lands in (ib1, ib2) or (ib2, ib3).

ib1 must always hold a Thumb instruction, because only ib2 is inspected for AX
instructions. In straight-line code this holds by construction: after a Thumb +
AX pair is consumed, the instruction after the AX instruction is Thumb. Code
generation has to keep these rules:

* The instruction at a branch target is Thumb.
* The instruction right after a predicated block is Thumb.
* When a branch targets the upper halfword of a word, the instruction after the
  target is also Thumb. That target arrives alone in ib1, so the next
  instruction is not in ib2 while the target is decoded.

The AX design leaves these rules entirely to the compiler. In this RTL a
broken rule does not give wrong results. An AX instruction found in ib1 is still
written into the status register, so the next instruction is still augmented,
but that cycle issues nothing (`ev_ax_alone`). Simply dropping such an AX
instruction, or issuing it as a no-op, would be wrong: the instruction after it
was written to be augmented.

## Interface and timing of `axthumb_frontend`

* **Instruction memory.** The front end drives `imem_req` with a word address
  in `imem_addr`. The memory answers in the same cycle with `imem_rvalid` and
  `imem_rdata`. If `imem_rvalid` is low, the request is a miss and the front end
  asks for the same address again in the next cycle. The lower halfword of a
  word is the earlier instruction.
* **Output.** `out_valid`, `out_arm` and `out_pc` carry at most one ARM
  instruction per cycle. With them come `out_thumb_instr` (the Thumb
  instruction it came from), `out_augmented` (an AX instruction was merged in)
  and `out_undef` (no translation exists).
* **`id_stall`.** Holds the decode stage.
* **`redirect_valid`, `redirect_pc`, `redirect_thumb`.** A taken branch or a
  change of state. A redirect flushes the queue, the buffer and the status
  register, and restarts fetch. It also suppresses any issue in that cycle.
* **`flags_nzcv`, `flags_valid`.** The condition flags used to choose the member
  of each predicated pair.
* **ARM state.** When `redirect_thumb` = 0, the word at the head of the queue
  goes straight out as an ARM instruction, one per cycle, bypassing the buffer.
* **Latency.** A word returned in cycle *t* is in the queue at *t*+1 and in the
  buffer at *t*+2. The first instruction after a redirect therefore issues
  three cycles after the redirect. After that, one instruction issues every
  cycle, and AX instructions and dropped predicated instructions add no cycles.
* **Observation outputs.** `buf_state`, `ifq_full` and the `ev_*` event strobes
  are for observation only.

Parameters are `IFQ_DEPTH` (8), `RESET_PC` (0) and `RESET_THUMB` (1).

## Thumb-to-ARM translation

The decompressor covers the ARMv4T Thumb formats: shifts, add/sub, 8-bit
immediate ops, the ALU group, high-register ops and BX, PC-, SP- and
register-relative loads and stores (word, byte, halfword, signed),
address generation, SP adjust, push/pop, ldmia/stmia, conditional and
unconditional branches, and SWI. The two halves of the Thumb BL are not
translated; they and all unallocated encodings come out as the ARM undefined
instruction with `out_undef` set. Branch offsets are passed on in halfword
units. The ARM decoder is expected to scale them in Thumb state, as a
Thumb-capable ARM core does.

The paired examples that define each AX instruction are honoured, with one
exception: the S bit. A Thumb instruction that sets the flags still sets them
after coalescing, because later Thumb code may test them. So `setdest r8` +
`add r0,#5` gives `adds`, where the AX design writes a plain `add`. Some of
the examples:

* `setimm -4` + `str r0,[r3]` gives `str r0,[r3,#-4]`.
* `setsource r9` + `ldr r5,[r0,#100]` gives `ldr r5,[r9,#100]`.
* `setallhigh` + `push {r0-r3}` gives `push {r8-r11}`.
* `setthird r3` + `add r1,r2` gives `add r1,r2,r3`.
* `setdest r8` + `add r0,#5` gives `adds r8,r8,#5`.
* `setshift #4` + `mov r1,#255` gives `movs r1,#255 ror 8`.

Beyond those examples, which formats each AX instruction applies to is this
design's choice. The full list is at the top of `axthumb_decompressor.sv`. A
negative `setimm` constant turns ADD into SUB, CMP into CMN, MOV into MVN and
AND into BIC, and gives a down offset on loads and stores. The other ALU
operations take the constant zero-extended.

## Departures and own choices

These points are not fixed by the AX design this RTL implements. They were
chosen here:

* **Opcode numbers.** The numbers of the eight AX instructions and of the shift
  types.
* **The 3-bit status field.** The published status layout has a 3-bit field at
  [26:24] labelled for `setpred`, next to a 4-bit counter. A 4-bit condition
  does not fit in it. Here the field holds the opcode of the AX instruction that
  wrote the status, which is needed to tell `setsource`, `setdest` and
  `setthird` apart. The `setpred` condition is kept in the register-operand
  field, which `setpred` does not use otherwise.
* **Pair count.** A `setpred` count field of 0 means 8 pairs.
* **S bit.** Coalesced instructions keep the flag setting of the Thumb
  instruction, as described above.
* **Formats.** Which Thumb formats each AX instruction applies to, beyond the
  published examples, and how a negative `setimm` constant is handled.
* **Flags for predication.** The pair choice uses the ARM condition test on
  flags supplied by the pipeline. A pair waits while `flags_valid` is low. A
  flag-setting instruction right before `setpred` therefore costs cycles unless
  the pipeline can forward its flags.
* **Fetch queue stage.** The fetch queue adds one cycle between fetch and the
  buffer, so a redirect costs three cycles.
* **Upper-halfword branch targets** are supported. Only that halfword of the
  first word is used.
* **AX instruction in ib1.** It is handled instead of being illegal, as
  described above.
* **Not included.** The ARM decoder, the execute stages and the instruction
  cache are outside this RTL.

## Verification

Each module has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_axthumb_decompressor` works in three steps.
  * It checks 36 Thumb instructions, with and without each AX kind, against ARM
    encodings worked out by hand.
  * It then sweeps all 65536 16-bit encodings against a reference translation.
    The reference is written separately, format by format, in the testbench.
  * It also sweeps whole formats under each AX kind. That covers every
    push/pop/ldmia/stmia encoding with `setallhigh` and every load/store
    immediate form with `setsource` and with `setimm`.
* `tb_instr_buffer` runs random consume/deposit traffic against a queue model,
  and checks that every state S1..S6 occurs.
* `tb_fetch_unit` runs random misses, pops and redirects to any halfword, and
  checks the word order, the fill to exactly 8 words and one word per cycle at
  full rate.
* `tb_ax_processor` has a directed part and a random part.
  * The directed part covers every AX kind, status clearing, `setpred` with both
    outcomes and the 8-pair count, waits, an AX instruction in ib1, hold, flush
    and restore.
  * The random part runs 4000 cycles of random buffer contents, flags, holds,
    flushes and restores. Every cycle it compares the decisions and the whole
    status register with a reference model.
* `tb_axthumb_frontend` is end to end, at the default parameters. It generates
  random AXThumb programs with plain, augmented and predicated code and with
  forward branches over junk. It checks every issued ARM instruction against a
  stream computed while the program is generated.
  * Run A keeps the code rules and has a perfect memory. It checks that no cycle
    goes without an issued instruction, except the three after a redirect.
  * Run B adds misses, stalls, late flags and rule-breaking AX placement. It
    also adds context switches. Each one saves the status register while an
    augmentation or a predicated block is pending. It then flushes the front end
    and restores the status before the interrupted code resumes.
  * Both runs end with a switch to ARM state.
  * The testbench counts each mechanism and fails if one never occurs.

* `tb_ax_workload_mix` covers seven embedded benchmarks, which gave 11
  measured program variants (rtr, crc, two adpcm, three pegwit, frag, two reed
  and drr). Each variant is characterized by how often it uses each of the eight
  AX instructions. For every variant the testbench generates a straight-line
  program: half of its items are AX + Thumb pairs, drawn with that variant's AX
  usage, and `setpred` blocks appear where the variant uses them. It checks
  every issued ARM instruction, and it checks that the cycle count equals the
  count of issued instructions. That proves AX instructions and dropped
  predicated instructions take no cycles.

What is not verified: the benchmark programs themselves. They need a whole
processor and their binaries are not available, so the instruction-count and
cycle-count reductions reported for the AX design are not reproduced here.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ax_pkg.sv tb/tb_axthumb_frontend.sv --top-module tb_axthumb_frontend
    ./obj_dir/Vtb_axthumb_frontend

Replace the testbench name to run any of the others. All run in well under a
second.
