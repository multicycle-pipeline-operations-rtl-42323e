# A five-stage MIPS pipeline with multicycle floating-point units

Floating-point add, multiply and divide cannot finish in the one or two
cycles that integer instructions need, so they do not fit the classic
IF-ID-EX-ME-WB pipeline. This design is the textbook answer: keep the
five-stage integer pipeline, and add beside it a floating-point pipeline
with its own register file, functional units of different lengths, and its
own writeback stage, **WF**.

| unit | stages | latency | initiation interval | instructions |
|------|--------|---------|---------------------|--------------|
| FP adder | A1 A2 A3 A4 | 4 | 1 (fully pipelined) | `add.s`, `sub.s` |
| FP multiplier | M1 … M6 | 6 | 1 (fully pipelined) | `mul.s` |
| FP divider | one stage used 25 times | 25 | 25 (unpipelined) | `div.s` |

```
integer   IF ID EX ME WB
lwc1      IF ID EX ME WF
add.s     IF ID A1 A2 A3 A4 WF
mul.s     IF ID M1 M2 M3 M4 M5 M6 WF
div.s     IF ID DIV(x25) WF
```

Instructions leave ID in program order but finish out of order. That
creates three new problems, and most of the logic exists to solve them:

* two results can want the single FP register write port (WF) in the same
  cycle (a *WF structural hazard*);
* a reader may have to wait many cycles for its operand (*RAW*), and a
  short operation can overtake a long one writing the same register (*WAW*);
* the divider is busy for 25 cycles (a *functional-unit structural hazard*).

All of them are handled the same way, apart from one WAW case where an
older write is cancelled instead: the instruction is held in ID (IF holds
too) and a bubble goes forward. Nothing after ID ever stalls, so
the functional units have no enable inputs and results emerge at fixed
times.

## The WF reservation chain (`fp_wf_ctrl`)

This is the part that takes the most thought. Beside M1..M6 runs a chain
of seven latches that carry, for every FP result in flight, a write
enable `we`, the destination `fd` and the WF multiplexer select `xw`.
Entry *k* holds the instruction that reaches WF in *k* cycles:

| entry k | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|
| latch | ID/M1 | M1/M2 | M2/M3 | M3/M4 | M4/M5 | M5/M6 | M6/WF (= WF) |
| enters here | `mul.s` (xw=2) | | `add.s`/`sub.s` (xw=1) | | `lwc1` (xw=0) | | finished `div.s` (xw=3) |

An instruction leaving ID enters the chain at its own distance from WF:
a multiply 6 cycles after ID, an add 4, a load 2 (its data arrive from
the ME/WB latch). Because the chain moves one entry per cycle, an
occupied entry is a reservation of a future WF cycle, so the chain *is*
the reservation register for the write port. Only two collisions are
possible, and each is one AND term of the ID stall:

* an add in ID while entry 5 is occupied (typically by a multiply now in
  M2, issued two cycles earlier: both would reach WF together);
* a load in ID while entry 3 is occupied.

The WF multiplexer picks load data (0), adder (1), multiplier (2) or
divider (3) with the `xw` of entry 0, and the FP register file is written
with entry 0's `we`/`fd`.

The divider does not reserve a slot when it starts; it works the other way
round: when its result is ready it asks for WF (`wf_req`) and is granted
the next cycle only if entry 1 is empty. Instructions already in the
chain therefore always win, and a divide can wait. This keeps the ID
check to the two terms above.

## FP operand interlocks (`fp_scoreboard`) and the WF bypass

Each FP register has a ready state: an instruction that writes a register
marks it pending when it leaves ID; the WF write clears it. An instruction
in ID may read a register if

* no write is pending, or
* its single pending write is in WF **this** cycle (the register file
  writes before it is read), or
* its single pending write reaches WF **next** cycle: the operand is then
  taken from the WF value by the multiplexers in front of the units
  (the WF bypass), in the cycle the consumer is in A1/M1/DIV.

Otherwise ID stalls.

WAW needs a separate look. If a register is written twice with no read in
between, the first result is useless, and the only danger is that it
lands last. An add or load whose destination has one pending write in a
chain entry *above* its own insertion point (a multiply issued just before
an add, say) therefore **cancels** that write: the entry's `we` is cleared
as the new instruction leaves ID, so the older result passes WF without
being written. A read in between is impossible here, because such a reader
would still be held by the RAW interlock, and so would the second writer
behind it. In the other cases (the older write lands earlier but more
than one cycle ahead, or it is a divide) the source test above is applied
to the destination and the second writer waits. `WAW_SUPPRESS = 0` turns
cancellation off, so every WAW case waits.

Because of the bypass, a register can have two writes pending for one
cycle, which a single ready bit cannot represent. The scoreboard therefore
keeps a 2-bit count per register (ready = 0 pending, single = 1 pending).
A cancelled write is not counted down; the new write simply takes its
place, so the count stays at 1.
This matters in the loop below, where `mul.s f2,f2,f1` issues while the
previous `mul.s f2` is one cycle from WF:

```
LOOP: addi  $t0,$t0,-1
      mul.s $f2,$f2,$f1      # loop-carried through f2
      bne   $t0,$0,LOOP
      lwc1  $f1,4($t1)       # branch delay slot
```

Each multiply leaves ID exactly 6 cycles after the previous one (it gets
its operand from the WF bypass), so the loop runs at 4 instructions per 6
cycles, 2/3 instruction per cycle. The end-to-end testbench checks this.

WAR hazards cannot happen: operands are read in ID, in program order.

## Optional in-order completion (`IN_ORDER_WF`)

Out-of-order completion makes FP exceptions imprecise: when a multiply
faults, a later add may already have written its result. The simplest
cure is to let results reach WF only in program order. Setting the
parameter `IN_ORDER_WF = 1` on `mips_fp_top` adds one more ID stall term,
again read straight off the chain: an FP instruction waits while any
entry above its own insertion point is occupied (entries 5–6 for an add,
3–6 for a load) or while a divide is in flight and is not being granted
WF this cycle. A multiply followed by an independent add then writes WF
in cycles 8 and 9 instead of 8 and 7. Only FP results are ordered, and the
pipeline has no exception sources or handler; the option gives the
timing, not a trap mechanism. The default, 0, is the out-of-order
pipeline described everywhere else here.

## The functional units

All three work on IEEE-754 binary32 with round-to-nearest-even. To keep
them small: subnormal inputs count as zero and results below the normal
range become zero; a NaN input gives the quiet NaN `0x7fc00000`;
overflow gives infinity; `inf-inf`, `0*inf`, `0/0`, `inf/inf` give the
quiet NaN. No exception flags are produced.

* `fp_adder` — A1 unpacks and orders the operands by magnitude, A2 aligns
  the smaller significand (guard, round and sticky bits kept) and adds,
  A3 normalises with a leading-zero count, A4 rounds and packs.
* `fp_multiplier` — M1 unpacks and adds exponents, M2 forms two 24x12
  partial products, M3 adds them, M4 normalises, M5 rounds, M6 packs.
* `fp_divider` — restoring division, one quotient bit per cycle. Cycle 1
  pre-normalises so the quotient lies in [1, 2) and yields its leading 1,
  cycles 2–24 the other 23 bits, cycle 25 a guard bit, a sticky bit from
  the remainder, rounding and packing. It raises `ready_next_cycle`
  toward ID when a divide issued now could start next cycle; ID holds a
  `div.s` while it is 0. Two back-to-back divides therefore write WF 25
  cycles apart, the second starting in the cycle the first is in WF.

Only the stage counts, latencies and initiation intervals are fixed by the
organisation; what each stage computes is this design's choice.

## The integer pipeline

* The PC is a 30-bit word address (byte address `{PC, 2'b00}`); the
  instruction and data memories are ideal single-cycle arrays of 1024
  words.
* `beq`/`bne` compare the register-file outputs in ID and redirect the PC
  there; one **delay slot** follows every branch and jump. `j` takes its
  target from PC bits 29:26 and instruction bits 25:0.
* EX operands are bypassed from the ME latch (ALU result) and from WB
  (`int_hazard_unit`). The branch comparator in ID has no bypass: a
  branch waits while EX or ME still has to write one of its operands.
  A load followed by a user of its result costs one stall.
* Register files write in the first half of the cycle in effect: a value
  being written is returned to a same-cycle read.

## Instructions

Integer: `add addu sub subu and or xor nor slt sll srl addi addiu slti andi
ori xori lui lw sw beq bne j`. Floating point, single precision (COP1,
fmt = S): `add.s sub.s mul.s div.s`, and `lwc1`. Encodings are the MIPS-I
ones (see `mips_fp_pkg`): FP sources fs = bits 15:11 and ft = 20:16, FP
destination fd = 10:6 (ft for `lwc1`). No overflow traps, no `jal`/`jr`.

## Where this departs from a full classroom FP MIPS

* Only single precision; doubles would need register pairs.
* No FP stores (`swc1`), no moves between the integer and FP register
  files, no FP compares or conversions, though the adder is the natural
  home for the latter two.
* No exceptions: the units raise no flags and there is no handler. In-order
  completion is available as an option (above); early exception detection,
  separate precise and imprecise opcodes, and a test-for-exception
  instruction are not built.
* A WAW write is cancelled only while it is still in the chain above the
  new writer; a divide's pending write is never cancelled, and the second
  writer waits instead.
* The divider's route to WF (request/grant, `xw = 3`) is this design's.
* Cheaper unit organisations — an unpipelined adder, a partially pipelined
  adder with two stages of initiation interval 2, duplicated or pipelined
  dividers — are not provided.

## Modules

| file | role |
|------|------|
| `rtl/mips_fp_pkg.sv` | opcodes, `dec_t` decode struct and `decode()`, `xw_e`, `fwd_e`, ALU ops |
| `rtl/mips_fp_top.sv` | the pipeline: stages, latches, PC, stall OR, WF multiplexer, FP bypass |
| `rtl/fp_wf_ctrl.sv` | WF reservation chain, WF stall, divider grant |
| `rtl/fp_scoreboard.sv` | pending-write counts per FP register |
| `rtl/fp_adder.sv`, `fp_multiplier.sv`, `fp_divider.sv` | functional units |
| `rtl/fp_regfile.sv`, `int_regfile.sv` | register files (third read port for observation) |
| `rtl/int_alu.sv`, `int_hazard_unit.sv` | EX ALU, integer bypass and stalls |
| `rtl/imem.sv`, `dmem.sv` | memories |

The top's ports: `prog_*` writes instruction memory (hold `rst_n` low
while loading); `dbg_*` read an integer register, an FP register and a
data word; `ev_*` pulse for each cycle in which an interlock, bypass,
divider wait or FP write happens, for performance counting; `wf_slots_o`
shows the reservation chain.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/mips_fp_pkg.sv tb/tb_util_pkg.sv rtl/*.sv tb/tb_mips_fp_top.sv \
  --top-module tb_mips_fp_top -o sim && ./obj_dir/sim
```

Replace the testbench file and top name for the others.
`tb/tb_util_pkg.sv` holds a small assembler (`a_adds(fd,fs,ft)`,
`a_lwc1(ft,off,rs)`, …) and a binary32 reference that computes in double
precision and rounds by bit manipulation, independent of the RTL.

* `tb_mips_fp_top` — a program at the default sizes that exercises every
  interlock, bypass and WAW cancellation (each must occur at least once), checks all
  register results, exactly one WF-stall cycle for `mul.s / addi /
  add.s`, and 6-cycle iterations of the loop above.
* `tb_pipeline_diagrams` — short sequences checked cycle by cycle: four
  adds with the last dependent (WF at cycles 6, 7, 8, 12 after the first
  fetch), multiply/add WF conflict (8, 9), two divides (27, 52), an add
  that overtakes the multiply before it (multiply WF at 8, add at 7) with
  no WAR hazard, and an add that overtakes a divide (27, 7). A second
  copy built with `IN_ORDER_WF = 1` runs the same program and must give
  8, 9 and 27, 31 for those two. A multiply and an add to the same
  register must leave one write, the add's, at 7 (in the in-order copy,
  two writes, at 8 and 12).
* One testbench per block (`tb_fp_adder`, `tb_fp_multiplier`,
  `tb_fp_divider`, `tb_fp_wf_ctrl`, `tb_fp_scoreboard`, `tb_fp_regfile`,
  `tb_int_regfile`, `tb_int_alu`, `tb_int_hazard_unit`, `tb_imem`,
  `tb_dmem`). The arithmetic units are checked on thousands of random
  operands at full throughput with exact latency, plus special values.

All of them pass. Assertions check the protocol rules (no issue into a
reserved WF slot, no divide started while busy, no write without a
pending write).

## Changing it

* Memory sizes: `IMEM_WORDS`, `DMEM_WORDS` on `mips_fp_top`; in-order FP
  completion: `IN_ORDER_WF`; WAW cancellation: `WAW_SUPPRESS`.
* A different unit latency means a different insertion entry in
  `fp_wf_ctrl` (entry = cycles from leaving ID to WF, minus one) and a
  matching stall term for the entry above it.
* New FP instructions: extend `dec_t`/`decode()` in the package, route the
  operands from the bypass multiplexers in the top, and add a WF
  multiplexer input.
