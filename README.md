# LOON: a processor built on line associative registers

LOON is a pipelined processor in which **every register is a cache line**.
It has no conventional register file and no data cache. Each register is a
*line associative register* (LAR): a 2048-bit line of data tagged with the
64-bit memory address it belongs to. Data LARs also carry a 2-bit **type**
tag (unsigned, signed, float) and a 2-bit **size** tag (8, 16, 32 or 64-bit
elements).

Because a register knows its own address, a LOAD simply names a memory
block and the register becomes that block. Writing back to memory is the
hardware's job, done lazily in the background. Because a register knows its
own element type and size, one ADD instruction can:

- add a row of bytes to a row of 32-bit words;
- convert both rows on the way;
- work on a whole 2048-bit line as a vector, or on one element at the
  register's byte offset as a scalar.

This repository holds synthesizable SystemVerilog for the processor
(`rtl/`) and self-checking testbenches for every block and for the whole
core (`tb/`).

The design follows a published description of the LOON architecture, which
implements an instruction set called LARK. The parts that description leaves
open are this design's own choices; they are listed under
[Where this design makes its own choices](#where-this-design-makes-its-own-choices).
The main ones are the instruction encoding, the register and line counts,
the boot sequence and the hazard rules.

## The LAR and its address

| bits of a data LAR | meaning |
|---|---|
| 2048 data bits | one memory block of 256 bytes |
| address [63:8] | the block: the only bits used for associative matching |
| address [7:0] | byte offset inside the line: where a scalar lives |
| type [1:0] | 00 reserved, 01 unsigned, 10 signed, 11 float |
| size [1:0] | 00 8-bit, 01 16-bit, 10 32-bit, 11 64-bit elements |

Two LARs "alias" when their addresses name the same block. Aliasing is the
central problem of the architecture. If two registers hold the same block and
one is written, the other must see the write.

There are two register banks, and they solve aliasing differently.

- **Instruction LARs (ILARs)** use the *one-to-one* method. There are 256
  ILARs, each holding 32 instructions of 64 bits. A block filled into one
  ILAR is also written into every other valid ILAR tagged with the same
  block, so all copies stay identical (`ilar_bank`). ILARs are only filled
  from memory, never written by the program.
- **Data LARs (DLARs)** use the *single-copy* method, described next.

## DLARs: the single-copy register file

This is the part of the design that takes the most care to understand.

A DLAR is split in two (`dlar_meta_bank` and `dlar_line_bank`):

- **Meta data bank.** One entry per DLAR (256 of them). Each entry holds the
  address, type, size, a valid bit and a *pointer* to a physical line.
- **Line data bank.** 512 physical lines. Each line has:
  - a reference count: how many DLARs point at it;
  - a dirty bit;
  - a pending bit: a memory load into it is in flight;
  - a block-address tag.

Aliased DLARs point at the same physical line, so a write through one is
seen by all of them, and there is only ever one copy.

**Address compare.** The meta bank has one associative comparator. It
returns the line of the first valid DLAR whose block matches an address.

**LOAD rd, [rs1 + imm], type, size.** The address is the scalar of `rs1`
plus a sign-extended immediate.

- On a **hit**, some DLAR already holds the block. `rd` is simply re-pointed
  at that line, and no memory traffic happens.
- On a **miss**, `rd` takes a free line. The line is tagged with the block,
  and the data load queue is asked to fill it. The line is pending until
  the data arrives.
- In both cases the new line's reference count goes up and the old line's
  count goes down, in the same cycle.
- The new type and size come from the instruction.

**STORE rd, [rs1 + imm].** This moves `rd` to a new address and keeps its
type and size. The data follows the register:

- `rd`'s line is copied into a fresh line tagged with the new block, or
- into the line of a DLAR that already holds that block, which then sees
  the stored data at once.

A STORE does not write memory. Memory is updated later by the write-back
unit.

**When a line is free.** A line can be reused when all three hold:

1. no DLAR points at it;
2. it is not pending;
3. it has nothing left to write back.

**Orphans and priority writes.** A dirty line whose last reference goes away
is an *orphan*. It still holds data that memory does not. The line bank
raises a **priority write** request for the lowest-numbered orphan. The
write-back unit serves priority writes before its normal walk. The orphan
becomes free once it has been written.

If the program makes orphans faster than memory can take them, no line is
free. A LOAD miss or STORE then stalls until one is. The top-level
testbench forces this.

**Reset.** Every DLAR starts invalid. Each points at line 0, at address 0,
as a 64-bit unsigned register. Line 0 holds all 256 references and reads as
zeros, so an unloaded DLAR is a usable zero register.

**Lazy write-back** (`mwu`). The memory write-back unit runs forever:

- It walks the DLAR meta bank, one DLAR at a time.
- For each valid DLAR it reads the line the DLAR points at.
- If that line is dirty, it writes the line to the DLAR's block through the
  memory bus guard and marks it clean.

A program cannot tell when a given line reaches memory. That is a property
of the architecture: it has no "flush" instruction.

## The pipeline

Six stages, one instruction per clock when nothing stalls (`loon_top`):

| stage | work |
|---|---|
| IF/ID | PC[12:5] selects an ILAR and PC[4:0] an instruction in it; the decoder (`ldu`) builds the control bundle |
| MDF | meta data of `rd`, `rs1`, `rs2` is read (address, tags, line pointer) |
| LDF | lines of `rs1`, `rs2` are read; the scalar of `rs1` is extracted (`branch_unit`); SELECT resolves; LOAD, STORE and FETCH act here |
| SH/CD | scalars are shifted to byte 0 (`shift_unit`); both sources are converted to the destination's size (`leph`) |
| EX | carry-break ALU, arithmetic shift unit, multiplier or divider |
| WB | a scalar result is merged into the destination line at its offset (`wb_shift_mask`); the line is written and marked dirty |

**Operation width comes from the destination register.** The size and type
of the destination DLAR decide the operation. Each source is converted from
its own tags. A vector ADD into a 32-bit DLAR from a byte DLAR and a 32-bit
DLAR therefore adds 64 zero-extended bytes to 64 words.

**No interlocks.** The pipeline has no forwarding and does not check register
dependences. Code must keep these distances:

- Leave three instructions between an instruction and a later one that reads
  its result. The result is written in WB; operands are read in LDF.
- Leave one instruction between a LOAD or STORE and a later instruction that
  names the same DLAR. The meta data changes in LDF and is read one stage
  earlier.

**Stalls.** The pipeline does stall:

- in IF, when the ILAR is not filled or is pending;
- in LDF, when a source or destination line is pending (a LOAD is still
  filling it);
- in LDF, when a LOAD misses and the data load queue is busy;
- in LDF, when a STORE would copy into a line the load queue is still
  filling;
- in LDF, when a FETCH finds the fetch queue busy;
- in LDF, when no line is free;
- in EX, while the multiplier or divider works. This freezes everything
  behind it.

**SELECT rs1, SEL1, SEL2** is the only branch. It goes to SEL1 when the
scalar of `rs1` is non-zero and to SEL2 when it is zero. It resolves in LDF,
and the two younger instructions already fetched are squashed.

**HALT** stops fetching when it reaches LDF. The `halted` output rises when
HALT leaves WB.

**Boot.** After reset the core fetches one block from `boot_addr` into ILAR 0
and starts at PC 0. The program then uses FETCH to bring in the rest of its
code.

## Instruction encoding

The instruction set fixes the operations but not the bit layout, so this
layout is this design's own (`rtl/loon_pkg.sv`):

```
[63:58] opcode   [57] vector   [56:49] rd   [48:41] rs1   [40:33] rs2
[32:31] type     [30:29] size  [28:25] FETCH block count - 1
[23:0]  signed immediate (LOAD / STORE / FETCH address offset)
[25:13] SEL1 and [12:0] SEL2 (SELECT only)
```

| opcode | operation |
|---|---|
| 0 | NOP |
| 1-5 | ADD, SUB, AND, OR, XOR |
| 6-8 | SLL, SRL, SRA |
| 9-11 | MUL, DIV, REM |
| 12 | LOAD |
| 13 | STORE |
| 14 | FETCH |
| 15 | SELECT |
| 16 | HALT |

- `type` and `size` are the tags a LOAD gives its destination.
- FETCH `rd` names the first ILAR; blocks go to consecutive ILARs from
  consecutive 256-byte addresses, up to 16 blocks.
- The `vector` bit chooses whole-line operation; without it the operation
  is scalar, using the element at each DLAR's byte offset.

## The memory system

Five small state machines sit between the pipeline and a single line-wide
RAM port. The RAM port moves one 2048-bit line per access:

- `mem_read` or `mem_write` is held with the address (and the write data)
  until the RAM answers;
- the answer is a one-cycle `mem_rrdy` or `mem_wrdy`.

**Memory bus guard** (`mbg`). It serves one request at a time, with fixed
priority:

1. data reads (from the DLQ);
2. instruction reads (from the ILQ);
3. writes (from the MWU).

It has seven states: idle, then a serve state and a done state for each
requester. A requester confirms it has taken a done signal by dropping its
request. An assertion checks that read and write are never both active.

**Data load queue** (`dlq`). Takes one LOAD miss at a time. It:

1. requests the block and marks the target line pending;
2. when the data arrives, asks for the line bank's single write port.

The WB stage has priority on that port. While WB writes, the DLQ keeps its
request up and retries each cycle. This is the "WB pre-empts DLQ" case.

**Fetch queue** (`fq`). Takes one FETCH of 1-16 blocks. It:

1. marks the target ILARs pending, one per cycle;
2. hands the blocks one at a time to the instruction load queue, advancing
   the ILAR number by 1 and the address by 256 each time.

**Instruction load queue** (`ilq`). Reads one block through the bus guard.
It writes the block into the ILAR bank (which also refreshes aliases), then
signals the fetch queue.

**Memory write-back unit** (`mwu`). Described above. It has four states:
read meta, read line, check, wait for write.

## Polymorphic conversion (LEPH)

`leph` converts a whole line from one element size to another in one step.
Each output byte is a multiplexer that picks one of three things:

- an input byte;
- zero;
- the sign byte of an input element.

For output byte `j`, let `Bo` be the output element's bytes and `Bi` the
input element's bytes. Then the element is `k = j / Bo` and the byte within
it is `m = j % Bo`:

- **narrowing** (`Bi >= Bo`): the output byte is input byte `k*Bi + m`. This
  is truncation; there is no saturation.
- **widening** (`Bi < Bo`): the output byte is input byte `k*Bi + m` while
  `m < Bi`. Above that it is the sign byte of input element `k` when the
  source is signed, and zero otherwise.
- Bytes past the end of the line are zero. A narrowed line is therefore
  padded with zeros.

Widening keeps as many elements as fit. Converting bytes to 32-bit words
takes the first 64 bytes of the line.

Two shift units come before the converters. A scalar operand is first
moved from its byte offset to byte 0; a vector operand passes unchanged.

## Execution units

**Carry-break ALU** (`cb_alu`). The ALU is built from 256 8-bit slices. Three
control lines cut the carry chain between slices:

- CB0 is set for 8-bit words;
- CB1 for 8- and 16-bit words;
- CB2 for 8-, 16- and 32-bit words.

Within each group of eight slices:

| slice in group | its carry-in is cut by |
|---|---|
| 0 | always cut |
| 1, 3, 5, 7 | CB0 |
| 2, 6 | CB1 |
| 4 | CB2 |

A cut carry-in becomes the subtract bit, so SUB works as "add the inverse
plus one" in every lane. Operations are ADD, SUB, AND, OR and XOR.

**Arithmetic shift unit** (`asu`). Shifts every element by its own amount,
taken from the matching element of the second operand. The amount is the
low log2(width) bits. The opcode is 4 bits: `01ss` SLL, `10ss` SRA, `11ss`
SRL, where `ss` is the size. The shift goes through six levels (1, 2, 4, 8,
16, 32 bits). At each level and byte, a multiplexer chooses one of:

- zero;
- the previous bits;
- the next bits;
- the repeated top bit;
- passthrough.

Levels at or above the element width are never enabled.

**Multiplier** (`vmul`). A k-byte product is the sum of k² byte products
`a_i * b_j`, each placed at byte `i + j`. Each 64-bit slice has eight 8×8
multipliers and a 128-bit accumulator. In cycle `t` it adds all products
with `i + j = t` (an anti-diagonal). A k-byte word is therefore done after
2k−1 cycles:

| word size | cycles |
|---|---|
| 8-bit | 1 |
| 16-bit | 3 |
| 32-bit | 7 |
| 64-bit | 15 |

The result is the low half of each product.

**Divider** (`vdiv`). Shift-and-subtract, on all elements of the line in
parallel. Its steps:

1. take the magnitudes of signed operands and note the result sign;
2. find the leading one of dividend and divisor and align the divisor;
3. run one subtract-and-shift per remaining quotient bit;
4. negate the results where needed.

An n-bit divide takes at most n+3 cycles. When dividend and divisor have
opposite signs, both the quotient and the remainder are negative. Division
by zero gives quotient 0 and the dividend's magnitude as remainder.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `LINE_W` | 2048 | bits per LAR line (from the architecture) |
| `NUM_ILAR` | 256 | instruction LARs (from the architecture) |
| `NUM_DLAR` | 256 | data LARs (own choice: 8-bit register fields) |
| `NUM_LINES` | 512 | physical data lines (own choice: one per DLAR plus as many spare) |

The instruction slot field and PC layout assume `LINE_W = 2048`: 32
instructions per ILAR. Smaller `NUM_ILAR`, `NUM_DLAR` and `NUM_LINES` work;
the register fields of the encoding are then truncated.

## Where this design makes its own choices

The architecture describes the following only by function, or not at all.
This design fills them in as stated:

- **Instruction encoding.** See above. The operations are the
  architecture's; the layout is not.
- **Register and line counts.** 256 DLARs and 512 physical lines.
- **Hazards.** No interlock beyond the listed stalls; the required
  instruction distances follow from that.
- **Branches.** SELECT resolves in LDF and squashes two instructions. SEL1
  is taken on non-zero.
- **Memory addresses.** The address of LOAD, STORE and FETCH is the scalar
  of `rs1` plus the immediate.
- **Boot.** Fetch one block from `boot_addr` into ILAR 0, start at PC 0.
- **Priority writes.** Orphaned dirty lines become priority writes, and
  lines carry their own block tag so that they can be written after no
  DLAR names them.
- **STORE into a filling line.** A STORE waits rather than copy into a line
  the load queue is still filling.
- **Divider sign rule.** The remainder takes the quotient's sign. Division
  by zero is defined as above.
- **Multiplier schedule.** Partial products are summed one anti-diagonal
  per cycle. This meets the stated cycle counts, but the exact pairing of
  products per cycle is this design's.

Not implemented:

- **Floating-point.** There is no floating-point conversion or arithmetic.
  The type tag 11 is carried but treated as an integer.
- **Instruction compression.** The architecture leaves compression of
  instruction blocks as an open question.
- **I/O.** There is no mechanism to force data out to memory.
- **Self-modifying code.** ILARs are not refreshed when memory under them
  changes through a DLAR.

## Files

- `rtl/loon_pkg.sv`: types, tags, opcodes and the control and event structs.
- `rtl/loon_top.sv`: the pipeline and the wiring of everything below it.
- Instruction side: `ilar_bank`, `ldu`.
- DLAR banks: `dlar_meta_bank`, `dlar_line_bank`.
- Memory system: `mbg`, `dlq`, `fq`, `ilq`, `mwu`.
- Datapath: `shift_unit`, `leph`, `cb_alu`, `asu`, `vmul`, `vdiv`,
  `wb_shift_mask`, `branch_unit`.
- `tb/tb_<block>.sv`: one self-checking testbench per block.
- `tb/lar_ram_model.sv`: a behavioural line-wide RAM with adjustable
  latency.
- `tb/tb_check.svh`: check and finish macros.

The top-level testbenches share `tb/loon_top_prog.svh`. It builds a program
in RAM, runs it, waits for the write-back unit to flush, and then compares
RAM with results computed in the testbench. The program covers:

- FETCH, including an aliasing one;
- LOAD hits and misses;
- scalar and vector ALU, shift, MUL, DIV and REM;
- both SELECT outcomes, with wrong-path traps;
- a mixed byte/word vector ADD;
- STOREs into fresh and aliased lines, and a STORE burst.

It counts every stall and memory-system event and fails on any that never
happened.

- `tb_loon_top` uses 16 DLARs, 24 lines, 16 ILARs and a slow RAM, so the
  STORE burst also runs out of free lines.
- `tb_loon_top_full` runs the same program with every parameter at its
  default.

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  --top-module tb_loon_top rtl/loon_pkg.sv $(ls rtl/*.sv | grep -v loon_pkg) \
  tb/lar_ram_model.sv tb/tb_loon_top.sv
./obj_dir/Vtb_loon_top
```

Replace `tb_loon_top` with any other testbench name. The testbenches include
`tb/tb_check.svh` by a path relative to the repository root, so run from
there.

The full-size core builds in well under a minute and runs its program in
about 0.1 s of simulation time.

The `events` output of `loon_top` gives a one-cycle flag for each stall,
branch outcome, LOAD/STORE kind, WB pre-emption, FETCH, priority write and
retired instruction. It is the easiest way to watch the machine.
