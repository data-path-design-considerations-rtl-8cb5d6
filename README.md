# SPUR CPU data path: a four-stage pipeline with double internal forwarding

SPUR is a Berkeley RISC multiprocessor workstation CPU. Its execution unit
splits the work of an instruction into four pipeline stages:

    Ifetch   ->   Exec   ->   Mem Acc   ->   Write

A result is computed in Exec but written to the register file only two stages
later, in Write. Until then it waits in two temporary registers, DST1 and
DST2, that act as a short queue. Two instructions that follow a producer
would otherwise read a stale register. Both get the new value by *double
internal forwarding*: the operand buses are driven from DST1 or DST2 instead
of from the register file. Three more ideas surround this core:

- Every register is 40 bits: an 8-bit tag above a 32-bit data word.
- The register file is windowed. Its 138 rows form 10 global registers and 8
  overlapping windows, so a procedure call only moves a window pointer.
- The whole chip runs on a four-phase non-overlapping clock.

This repository holds synthesizable SystemVerilog for the lower data path. It
also covers the parts of the chip around it that can be built from a
functional description:

- the upper (instruction-address) data path
- the on-chip instruction buffer
- the clock generator

Each block has a self-checking testbench. `spur_cpu` is the top level.

## Contents

- [Pipeline and timing model](#pipeline-and-timing-model)
- [Double internal forwarding](#double-internal-forwarding)
- [The windowed register file](#the-windowed-register-file)
- [Functional units](#functional-units)
- [PSWs, memory interface, branch conditions](#psws-memory-interface-branch-conditions)
- [Upper data path and instruction buffer](#upper-data-path-and-instruction-buffer)
- [Four-phase clock](#four-phase-clock)
- [Top level and its ports](#top-level-and-its-ports)
- [What is not here](#what-is-not-here)
- [Departures and choices, in one place](#departures-and-choices-in-one-place)
- [Simulating](#simulating)
- [How far to trust it](#how-far-to-trust-it)

## Pipeline and timing model

On the chip, each pipeline cycle is four clock phases, phi1 to phi4. Each
unit does its part of a stage in a fixed phase:

- the register file is read in phi1 and written in phi3;
- functional units take their inputs at phi2 and drive their result bus at
  phi4.

The RTL folds those four phases into a single clock edge: one `clk` edge
with `hold` low is one pipeline cycle. Inside the data path, each stage does
the following.

| stage | what happens (module) |
|-------|------------------------|
| Ifetch | The decoded instruction `ctrl_i` arrives. RA/RB latch the window-decoded source rows (`regfile`). The destination enters the RD shift register (`rd_shift`). The IF logic compares the sources with the two older destinations (`if_logic`). |
| Exec | busA/busB come from the register file or from DST1/DST2 (`fwd_mux`). The immediate may replace busB. One functional unit drives busD (`exec_unit`), and DST1 captures busD (`dst_mbr`). For loads and stores, the ALU sum goes out on busS into MAR (`bus_interface`), and a store puts busB into MBR. Branch conditions are evaluated (`branch_cond`). |
| Mem Acc | DST2 takes DST1, or the memory data on busL for a load. A store drives busL from MBR. |
| Write | DST2 is written into the register row named by the RD entry. |

Two timing facts matter for anyone changing the code:

1. **The register file reads before it writes within a cycle.** The read
   during Exec is combinational from the latched RA/RB rows. The write
   happens at the clock edge that ends the Write cycle. So an instruction in
   Exec that reads the row being written in that same cycle sees the old
   value. This matches the chip, where the phi3 write comes after the phi1
   read. It is why forwarding from DST2 is still needed.
2. **Memory completes within Mem Acc.** The design assumes a cache hit. A
   longer access is modelled by holding the whole pipeline: `stall` on the
   top, or `hold` on the data path. Hold freezes every register and blocks
   the register-file write.

A value is therefore seen by the next two instructions through forwarding,
and by every later instruction through the register file.

**Load followed by a use.** Suppose the instruction right after a load reads
the loaded register. That value is still on its way from memory. The chip
does not define the result of this sequence, and neither does this design:
the reader gets DST1, which holds the load's address. The compiler (or the
control unit) must put one instruction in between.

## Double internal forwarding

This is the part of the design that most needs explaining.

Call the instruction in Ifetch I3, the one in Exec I2 and the one in Mem Acc
I1. In the next cycle, I3 reaches Exec and needs its operands. By then:

- I2's result sits in DST1, having just been computed;
- I1's result sits in DST2, waiting to be written.

Neither is in the register file yet. Four conditions are therefore checked
during Ifetch:

| select | condition |
|--------|-----------|
| DST1 -> busA | RS1 of I3 = RD of I2 |
| DST1 -> busB | RS2 of I3 = RD of I2 |
| DST2 -> busA | RS1 of I3 = RD of I1 |
| DST2 -> busB | RS2 of I3 = RD of I1 |

**Where the compare addresses come from.** The RD shift register carries each
instruction's destination down the pipeline. Its Exec and Mem Acc entries are
exactly RD of I2 and RD of I1. Each entry holds three things:

- a valid bit, because not every instruction writes a register;
- the 5-bit address;
- the window the instruction was issued in.

**How the compare works.** `if_logic` has four 5-bit equality comparators
(`addr_cmp`: XOR per bit, then NOR). Each result is gated by the entry's valid
bit and by an `if_enable` bit from the control unit. The four results are
registered, so the selects are stable for the whole Exec cycle. The compare
runs in parallel with register-file decoding. It does not add to the read
path.

**What happens on the bus.** `fwd_mux` is a two-level chain:

    bitline -> (DST2 select) -> (DST1 select) -> bus

When both conditions hold for the same bus, DST1 wins. I2 is younger than
I1, so its value is the current one. The same structure exists once for busA
and once for busB.

**The compare uses logical addresses, not windows.** Only the 5-bit logical
address is compared, as on the chip. The control unit must make sure that
forwarding never crosses a change of the window pointer. It can clear
`if_enable`, or put two instructions without destinations after a call or
return. The end-to-end testbench does the latter.

## The windowed register file

There are 138 physical rows of 40 bits. There are two read ports (busA,
busB) and one write port. A program sees 32 logical registers, addressed
with 5 bits:

| logical | name | physical |
|---------|------|----------|
| 0-9 | globals | rows 0-9, shared by all windows |
| 10-15 | overlap with child | shared with the next window's parent overlap |
| 16-25 | locals | private to the window |
| 26-31 | overlap with parent | shared with the previous window's child overlap |

Each of the 8 windows owns 16 rows (10 locals and 6 overlap rows), and
10 + 8 x 16 = 138.

**How windows share rows.** The overlap registers of window w, as seen from
window w, are the same rows as the parent-overlap registers of window w-1, as
seen from window w-1. So a call *decrements* the current window pointer
(CWP). Arguments the caller put in registers 10-15 then appear to the callee
in 26-31, without copying. The two addresses of a shared row differ only in
bit 4, which keeps the decoder small.

`window_decoder` turns (address, CWP) into a row:

- globals: row = address;
- otherwise, find the owning window and an offset within it:
  - owner = CWP + 1 for addresses 26-31, otherwise CWP;
  - offset = address - 16 for locals (0-9), address - 10 + 10 for the child
    overlap, and address - 26 + 10 for the parent overlap (both 10-15), so
    each window's locals come first and its six shared rows last;
- row = 10 + 16 x owner + offset.

Window numbers wrap modulo 8. The windows form a ring. Saving windows to
memory on overflow is a trap routine's job, and that is not part of this
RTL.

`regfile` holds:

- three decoders: two for reads, one for the write;
- the RA/RB row latches, loaded in Ifetch;
- the memory array.

The write window is the window of the writing instruction, carried with its
RD entry. It is not the current pointer at write time. The two are the same
whenever no call or return is between them.

The array has no reset. Clear it by writing it, or let the testbench
initialise it.

## Functional units

All units work on busA2/busB2. These are the bus buffers after forwarding;
busB2 can be the instruction's immediate instead of busB. Each unit drives
busD when selected.

**ALU** (`alu`, `cla8`). A 32-bit adder built from three sections.

1. **Input section.** It forms bit generate g = A & B' and propagate
   p = A ^ B'. B' is B inverted for subtract. The same section also produces
   the AND, OR and XOR results. Equal is the AND of all p: with B inverted,
   that holds exactly when A = B.
2. **Carry lookahead.** Four 8-bit blocks (`cla8`) are chained through their
   carries C8, C16, C24. Inside a block, prefix propagate and generate are
   built bit by bit: P[i] = p[i] & P[i-1] and G[i] = g[i] | p[i] & G[i-1].
   The carry into bit i is G[i-1] | P[i-1] & cin.
3. **Sum.** sum = p ^ carry.

Subtract inverts B and sets the carry-in. The ALU also gives:

- carry-out;
- sign;
- signed overflow.

The ALU's 32-bit result also goes to busS, which is the address output.

**Shifter** (`shifter`). It does three shifts:

- logical left by 1, 2 or 3;
- logical right by 1;
- arithmetic right by 1.

It works on the data word only.

For ALU and shifter results, the tag of the result is the tag of operand A.
That tag is held in the TAGA register path.

**Byte extractor / inserter** (`byte_ext_ins`). byte_sel picks a byte:

- 0-3 pick data bytes, with 0 the least significant;
- 4-7 pick the tag.

Extract puts the chosen byte of busA2 in the low byte of busD, zero-filled.
Insert replaces the chosen byte of busA2 with the low byte of busB2.

`exec_unit` wraps the three units, the immediate select and the busD
multiplexer. It also has a fifth source, the selected PSW.

## PSWs, memory interface, branch conditions

- **`psw_regs`: user and kernel PSW.** These are two 40-bit registers. They
  are written from busD by an instruction with `psw_we`, and read back onto
  busD. Their fields are not defined here.
- **`bus_interface`: memory address and strobes.** MAR takes the ALU sum when
  a load or store is in Exec. `mem_rd`/`mem_wr` are high for the following
  cycle, which is Mem Acc. During that cycle, store data is MBR on
  `mem_wdata`.
- **`branch_cond`: compare and branch.** It uses the ALU flags of A - B for:
  - EQ, NE;
  - signed LT, LE, GT, GE (from sign xor overflow);
  - unsigned LTU, LEU, GTU, GEU (from the carry);
  - NEVER, ALWAYS.

## Upper data path and instruction buffer

**`upper_dp`** holds the instruction-address side. Addresses are 30-bit word
addresses.

- IfetPC, ExecPC and MemPC follow the instructions down the pipe.
- An adder forms the branch target ExecPC + displacement, at the same time as
  the ALU does the compare.
- The next fetch address is chosen in this order:
  1. TrapPC on a trap;
  2. the target on a taken branch;
  3. CallPC on a jump or call;
  4. otherwise IfetPC + 1.
- The instruction already fetched behind a branch is not cancelled.
- CallPC, TrapPC, SWP (the saved-window pointer) and CWP can be loaded from
  busS.
- CWP steps down on call and up on return.

**`instr_buffer`** is a 512-byte direct-mapped instruction cache.

- It holds 128 words in 16 sub-blocks of 8 words.
- Each sub-block has one tag, and each word has its own valid bit.
- The lookup at IfetPC is combinational (`hit`, `instr`).
- Refill writes one word per clock.
- `inv_all` clears all valid bits.

The refill sequence itself belongs to the instruction-unit controller, which
is not included. The top exposes the refill port, and a miss should raise
`stall` until the word is in.

## Four-phase clock

`clkgen4` divides a master clock into four non-overlapping phases. With the
defaults and a 5 ns master clock:

- each phase is 25 ns (5 ticks);
- each gap is 10 ns (2 ticks);
- the cycle is 140 ns.

`cycle_end` marks the last tick of a cycle. The top advances the pipeline on
it, using `hold = stall | !cycle_end`. A `$onehot0` assertion checks that no
two phases overlap. A 100 ns cycle needs PHASE_TICKS + GAP_TICKS = 5, for
example PHASE_TICKS=4 and GAP_TICKS=1.

## Top level and its ports

`spur_cpu` instantiates the clock generator, instruction buffer, upper data
path and lower data path (`spur_ldp`). `spur_ldp` in turn contains every
other block. The top has no parameters.

| group | ports |
|-------|-------|
| clock, reset, stall | `clk` (master clock), `rst_n` (async, active low), `stall` |
| clock outputs | `phi1..phi4`, `cycle_end` |
| decoded instruction | `ctrl_i` (type `spur_pkg::ctrl_t`: rs1, rs2, rd, rd_we, use_imm, imm, fu, alu_op, shift_op, shamt, byte_sel, is_load, is_store, psw_we, psw_sel, if_enable, is_branch, cond), presented during the instruction's Ifetch cycle |
| PC commands, for the instruction in Exec | `reset_pc`, `pc_jump`, `pc_trap`, `pc_call`, `pc_ret`, `pc_callpc_we`, `pc_trappc_we`, `pc_swp_we`, `pc_cwp_we` |
| PC state | `ifet_pc`, `exec_pc`, `mem_pc`, `swp`, `call_pc`, `trap_pc`, `branch_target`, `cwp`, `branch_taken` |
| instruction buffer | `ib_inv`, `ib_fill_en`, `ib_fill_addr`, `ib_fill_data`, `ib_hit`, `ib_instr` |
| memory | `mem_addr`, `mem_rd`, `mem_wr`, `mem_wdata`, `mem_rdata` |
| observation | `bus_d`, `upsw`, `kpsw`, `fwd` ({DST1->A, DST1->B, DST2->A, DST2->B}), `rf_write` |

The encodings in `spur_pkg` are this design's own. This applies to the ALU
operations, shift kinds, functional-unit select and branch conditions.

## What is not here

- **The control unit.** It turns opcodes into `ctrl_t` and the PC commands.
  The instruction set is defined elsewhere, so the decoded form is a port.
- **The instruction-unit controller.** This is the pair of state machines
  that refills the buffer.
- **Trap logic.** Which events trap is not specified, so the trap request is
  the `pc_trap` input.
- **Pads.**
- **Circuit-level detail.** Precharged buses, domino decoders, 6T cells and
  transistor sizing are represented by their logic function. The RTL says
  nothing about the delays they were designed for.

## Departures and choices, in one place

The following follow the chip's design:

- the pipeline stages, DST1/DST2/MBR transfers and the forwarding conditions;
- the priority of DST1;
- register and tag widths;
- the register count, window count and logical numbering;
- read-before-write;
- the carry-lookahead structure and the Equal signal;
- the shifter's shift set;
- the buffer size and organisation;
- the phase timing.

The following are this design's choices:

- one clock edge per pipeline cycle, instead of four phases;
- the window carried with RD for the write;
- the order of rows inside a window;
- a call decrements CWP (this follows from how the overlap rows pair up);
- the operation encodings and the condition set;
- byte numbering, and the tag taken from operand A;
- PSW width and access through busD;
- the next-PC priority and the uncancelled slot after a branch;
- per-word valid bits and one-word refill in the instruction buffer;
- separate read and write strobes on the memory side;
- reset values (all zero; the arrays are not reset);
- DST1 holding the address during a load, which makes load-then-use return
  the address.

## Simulating

The testbenches use `--timescale 1ns/1ps` timing: the master clock is 5 ns.
Build and run the end-to-end test with plain Verilator 5 from the
repository root:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      -y rtl -y tb rtl/spur_pkg.sv tb/tb_ref_pkg.sv tb/tb_spur_cpu.sv \
      --top-module tb_spur_cpu
    obj_dir/Vtb_spur_cpu

Every testbench ends with a line such as

    TB_RESULT checks=4039 failures=0

To run a block's test, replace `tb_spur_cpu` with `tb_<block>`.
`tb_ref_pkg` holds the reference models the testbenches check against. These
are written independently of the RTL:

- a table-free row mapping;
- an ALU using `+`/`-`;
- a whole-instruction model.

**`tb_spur_cpu`** runs the top at its default sizes. Stages advance on
`cycle_end`, so the test runs on the real 140 ns cycle. The test does the
following.

- It issues 1500 random instructions from a small register pool, so
  dependences are frequent. The mix includes:
  - ALU, shifter, byte and PSW operations;
  - loads and stores to a model memory;
  - compare-and-branch, jumps, traps;
  - calls and returns;
  - random stalls;
  - instruction-buffer fills and lookups.
- It checks every result against a reference model of the whole machine.
- It checks the cycle time.
- It counts each mechanism and fails if any never occurred:
  - each of the four forwarding paths, and both selects at once;
  - loads, stores and stalls;
  - taken and untaken branches, jumps, traps;
  - calls and returns;
  - accesses to overlap registers;
  - PSW writes;
  - buffer hits and misses.

**`tb_spur_ldp`** drives the lower data path alone, with 4000 instructions.

## How far to trust it

- Every block passes its own testbench.
- Each testbench has been shown to fail against a deliberately broken copy
  of its block.
- The 8-bit lookahead block is tested exhaustively. The ALU, shifter and
  byte unit are tested against independent arithmetic.
- The pipeline is tested end to end against an instruction-level model.

That establishes that the RTL does what this README says. Where this README
describes a choice rather than the chip (see the list above), the real chip
may differ. The instruction encoding especially is not the chip's.
