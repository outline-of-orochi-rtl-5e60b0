# OROCHI: an ARM thread hidden in the empty slots of a VLIW core

A VLIW media processor rarely fills all of its instruction slots. Compilers
leave holes, and the machine usually has more functional units than a packet
has slots. OROCHI uses those holes. A single core runs two threads at once:

- a VLIW thread. Packets of up to eight operations are in the style of the
  Fujitsu FR-V 550.
- a conventional ARMv4 thread, for the operating system and control code.

Every ARM instruction is broken into simple internal operations, and each
takes exactly one cycle. These operations are dropped into free slots of the
lines waiting in the instruction queue. The back end is a plain in-order VLIW
pipeline. It has no idea that two instruction sets are involved: it issues one
queue line per cycle.

This repository is a synthesizable SystemVerilog model of that core. It
includes the ARM-to-internal translation, the slot insertion and line issue,
and the functional units. Caches are not part of it: the core has instruction
and data memory ports.

## The machine at a glance

```
 ARM fetch (2 instr/cycle) --> translator 0 --+                 +--> 4 integer units (slots 0-3)
                           \-> translator 1 --+--> instruction   |     slots 0-1 also reach the data cache
       free list of temporaries --^           |    queue --------+--> 4 media units   (slots 4-7)
                                              |    (6 lines x    +--> 2 branch units  (slots 8-9)
 VLIW fetch (8 ops) --> VLIW decoder ---------+     10 slots)         register file: one 64-entry bank per thread
                                                   issue unit: whole head line, or stall on a cache miss
```

| module | role |
|---|---|
| `orochi_pkg` | internal instruction record `uop_t`, slot map, condition check, ALU and shifter functions |
| `fetch_unit` | PC and fetch for one thread. It is used twice: 64 bits wide for ARM, 256 bits wide for VLIW. |
| `vliw_decoder` | unpacks a packet and places each operation in a slot that can run it |
| `arm_translator` | decomposes one ARM instruction. It emits up to four internal instructions per cycle. |
| `temp_free_list` | hands out scratch registers (r16-r63 of the ARM bank) and takes them back |
| `inst_queue` | lines of ten slots. It takes VLIW lines and inserts ARM internal instructions. |
| `issue_unit` | line issue, stall on a miss, flags, branch redirect, flush, retire |
| `register_file` | two banks of 64 x 32 bits, 30 read ports and 10 write ports |
| `int_alu`, `media_alu`, `branch_unit` | the functional units |
| `orochi_top` | the core |

## Internal instructions

Everything in the queue is a `uop_t`. It holds:

- its type;
- a 4-bit sub-operation;
- an ARM-style condition code and a set-flags bit;
- a destination and three sources;
- an optional 32-bit immediate;
- the address of the instruction it came from;
- for ARM, a `last` marker and the number of scratch registers to free when
  the instruction retires.

There are eight types:

| type | does | runs in slots |
|---|---|---|
| E | three-operand ALU operation (ARM data-processing opcodes) | 0-7 |
| S | shift or rotate (LSL, LSR, ASR, ROR, RRX) | 0-7 |
| M | 32 x 8-bit partial product. It picks one byte of the multiplier and returns the lower word or the upper word with carry. | 4-7 |
| m | multiply support: accumulate, absolute value, 64-bit negate (low word, high word), move | 4-7 |
| a | address add or subtract. It may write the base register. | 0-3 |
| L | load or store, word or byte | 0-1 |
| B | branch, PC-relative or to a register, optional link | 8-9 |
| s | select one of two registers by a condition | 0-7 |

Both instruction sets use ARM's condition codes and NZCV flags. Each thread
has its own flags. A slot whose condition fails is simply not executed.

## How ARM instructions are decomposed

Every pattern is built so that each step finishes in one cycle:

| ARM instruction | internal instructions | count |
|---|---|---|
| data processing, immediate or plain register | E | 1 |
| data processing with shifted register (by immediate or register) | S E | 2 |
| MUL, MLA | [M m] x4 | 8 |
| UMULL, UMLAL | [M m] x8, m | 17 |
| SMULL | m m, [M m] x8, E, m m m | 22 |
| LDR/STR(B), post-indexed | L a | 2 |
| LDR/STR(B), pre-indexed | a L | 2 |
| LDR/STR(B), post-indexed, shifted register offset | L S a | 3 |
| LDR/STR(B), pre-indexed, shifted register offset | S a L | 3 |
| LDM/STM of N registers | a a, [a L] x N, a | 2N+3 |
| B, BL | B | 1 |

Notes on the patterns:

- **Multiply.** Each M multiplies the multiplicand by one byte of the
  multiplier, shifted into place. The m after each M adds it to a running sum
  in a scratch register. For the 64-bit products, the lower and upper words are
  accumulated separately, and the M for the upper word adds the carry out of
  the lower word.
- **Signed multiply.** SMULL first takes the absolute value of both operands
  (m m) and multiplies the magnitudes. One E works out the sign of the product.
  Three m then negate the 64-bit result if needed and move it into place.
  This gives 22 internal instructions.
- **Load/store with offset but no writeback.** These also use "a L". The
  address goes into a scratch register instead of the base.
- **LDM/STM.**
  - The first a computes the start address for all four addressing modes.
  - The second a computes the written-back base value into a scratch register.
  - Each "a L" pair steps the address and moves one register, in ascending
    register order.
  - The final a writes the base back. It writes nothing when writeback is off,
    or when an LDM loads the base register itself.
- **r15.** Reads of r15 return the instruction address + 8, as on ARM. Any
  write to r15 is a branch. This covers data processing into pc, LDR pc and
  LDM with pc in the list.
- **Not supported.** These are translated into a single no-operation E:
  - halfword and signed-byte transfers;
  - SWP, MRS/MSR, SWI and coprocessor instructions;
  - SMLAL.

The translator works on one instruction at a time. It emits four internal
instructions per cycle, so long instructions take several cycles: SMULL takes
6, and LDM of 16 registers takes 9. It fetches all the scratch registers the
instruction needs in one go, from the ring-shaped free list. ARM instructions
retire in order, so the registers come back in the order they were handed out.

Two translators run side by side. The ARM fetch delivers two consecutive
instructions per cycle, and they go to the two translators. The translators'
output groups leave in program order:

- the older group goes first;
- the younger group goes in the same cycle, once the older instruction is on
  its last group.

So two short ARM instructions can enter the queue in one cycle.

## Inserting into the queue: serial insertion

The queue holds six lines of ten slots. A decoded VLIW packet enters at the
tail as a new line.

ARM internal instructions are then placed one by one. Each goes into the first
free slot that can run it, in a line *strictly after* the line of the ARM
internal instruction before it. If no such line has room, a new line is opened
at the tail.

So there is never more than one ARM internal instruction in a line. Each one
issues at least a cycle after its predecessor and sees its result from the
register file. Insertion therefore needs no dependency check and no
forwarding. It only needs a free-slot detector per slot.

A translator group is taken whole or not at all. The second group of a cycle
is taken only together with the first.

Faster alternatives are possible:

- letting several ARM operations of different instructions overlap in one line;
- completing them out of order behind a reorder buffer.

They need dependency checks or a reorder buffer and are not built.

## Issue, stalls and control flow

The head line issues as a unit. All enabled slots read their operands,
execute and write back in the same cycle.

The only stall is a data cache miss. An enabled load or store in slot 0 or 1
whose port is not ready holds the whole line, including the operations of the
other thread. A load whose condition failed does not wait.

Branches are resolved when their line issues. There is no prediction.

- **VLIW branch.** A taken VLIW branch redirects VLIW fetch. It removes the
  queued VLIW operations of later packets. The ARM operations in those lines
  stay.
- **ARM branch.** A taken ARM branch, or a write to r15, is remembered until
  the `last` internal instruction of that ARM instruction issues. Only then
  does the ARM front end restart. This step:
  - removes all queued ARM operations;
  - empties both translators;
  - returns all scratch registers.

## The VLIW operation format

FR-V encodings are not used. Each 32-bit operation has this format:

```
[31] valid  [30:28] type  [27:24] sub-op  [23:20] condition  [19] set flags
[18:13] dst  [12:7] src1  [6] immediate  [5:0] src2 or signed 6-bit immediate
```

Per type:

- **S** shifts src1 by src2 or by the 6-bit immediate.
- **L** uses the address src1 + simm6. A store writes the value of dst.
- **B** jumps to pc + 32*simm6 (a packet is 32 bytes) or to src1. The link
  goes into dst.

Every operation also reads its dst register as a third source.

The decoder places loads and stores first (slots 0-1). Then it places M, m,
a and B operations, then E, S and s operations in the slots left over. A
packet with at most two loads/stores, four integer, four media and two branch
operations always fits. A packet whose operations cannot all be placed raises
`vliw_overflow`.

## Where this model departs from the original proposal, or fills gaps

- **Insertion method.** The proposal lists three insertion methods and has not
  picked one. The serial method is built.
- **Queue depth.** The proposal gives no depth. Six lines is the number its
  drawings show.
- **SMULL length.** The published pattern lists 20 internal instructions, but
  its count is 22. This model uses 22, with the two absolute values added at
  the start.
- **Register files and formats.** Each thread bank has 64 entries, the
  FR-V 550 register count. The porting, the scratch-register count, the slot
  map, the operation formats and the branch and flush timing are this model's
  own choices.
- **Media units.** The four media units only run the integer work: E, S, s and
  the multiply steps M and m. The floating-point and SIMD media operations of
  FR-V 550 are not modelled, and neither are its pre-load instructions.
- **Flags.** Logical operations keep C. The shifter's carry-out is not
  modelled. Multiplies with S set N and Z (32-bit forms only). The S bit of
  long multiplies is ignored.
- **Planned but not built:**
  - the fetch arbitration that would guarantee quality of service to the
    media thread;
  - a cache hit/miss predictor.
  Each thread has its own fetch unit, and misses simply stall.
- **Caches and exceptions.** Caches are external. There are no interrupts and
  no exceptions.

## Interface and timing of the core

- **Instruction memory.** `arm_imem_addr` and `vliw_imem_addr` are answered in
  the same cycle. ARM gets two words, at addr and addr+4. VLIW gets eight words,
  operation 0 in the lowest word.
- **Data memory.** There is one port for each of slots 0 and 1.
  - `dmem_req[p].req` is high while the head line has an active access there.
  - The memory raises `dmem_ready[p]` when the access can complete. For a load,
    it also drives `dmem_rdata[p]` in that cycle.
  - The access takes effect in the cycle `dmem_req[p].commit` is high.
- **Reset and start-up.** Reset is synchronous and active high. After reset
  the threads start at `ARM_PC0` and `VLIW_PC0` once `arm_run` and `vliw_run`
  are raised.

## Testbenches and simulation

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

The end-to-end bench `orochi_top_tb` runs an ARM program and a VLIW loop at the
same time, at the default parameters. The data cache misses at random.

- **What the ARM program covers:** every decomposition pattern, all LDM/STM
  modes, conditional execution, BL, a return through r15 and an LDM that loads
  pc.
- **How it checks:** two small instruction-set simulators in the bench run the
  same programs. The bench compares both register banks and both data areas
  at the end.
- **Mechanism counts:** it counts each mechanism, and a count of zero is a
  failure. The mechanisms are line stalls on misses, ARM operations sharing a
  line with VLIW operations, multi-cycle decomposition, two translator groups
  in one cycle, ARM and VLIW flushes, condition-failed slots and a full queue.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert rtl/orochi_pkg.sv rtl/*.sv tb/orochi_top_tb.sv \
          --top-module orochi_top_tb -Wno-fatal
./obj_dir/Vorochi_top_tb
```

For a unit bench, give the package, the module and its bench, for example
`rtl/orochi_pkg.sv rtl/inst_queue.sv tb/inst_queue_tb.sv --top-module inst_queue_tb`.
