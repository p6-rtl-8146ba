# P6-style out-of-order core: Tomasulo's algorithm with a re-order buffer

This is a small, single-issue, out-of-order processor core in synthesizable
SystemVerilog. It is organised the way the Intel P6 family (Pentium Pro) and
its contemporaries were. Instructions wait in reservation stations until
their operands are ready, and they execute out of program order. Every
result first goes into a **re-order buffer (ROB)**. Results reach the
architectural register file and memory only when the instruction reaches the
head of the ROB and retires, in program order.

Because of this, the committed state is always *precise*. When anything goes
wrong, the core waits until the offending instruction reaches the ROB head.
It then clears every speculative structure and restarts fetch. "Anything"
means a page fault, a load that read memory too early, a taken branch or an
external interrupt.
No checkpoints or repair are needed: a zero in each structure already means
"empty" or "the value is in the register file".

The reservation-station mix follows the classic teaching configuration:
- one ALU station
- one load station
- one store station
- two stations for three-cycle floating-point units

With this mix the core reproduces the well-known P6 walk-through cycle by
cycle (see *Timing* below).

## Pipeline: F, D, S, X, C, R

| stage | what happens | module |
|---|---|---|
| F fetch | Reads the word at the PC into a one-entry fetch register. Fetch is always sequential: branches are predicted not taken. | `fetch_unit` |
| D dispatch | Needs a free ROB entry, a free station of the right class and, for loads and stores, an LSQ slot; stalls if any is missing. Reads the operands, allocates the entries and renames the destination register. | `dispatch_unit`, `map_table`, `regfile`, `rob`, `lsq` |
| S issue | A station whose two operands are present sends its instruction to its unit. The station is free again in the next cycle. | `rs_entry` |
| X execute | One cycle for ALU, load and store; three cycles for the FP multiplier. | `alu_unit`, `load_unit`, `store_unit`, `fp_mul` |
| C complete | One result per cycle wins the common data bus (CDB). It is written into its ROB entry and caught by any station waiting on its tag. | `cdb_arbiter`, `rob`, `rs_entry`, `map_table` |
| R retire | The ROB head, if complete, writes the register file (or, for a store, the D$) and frees its entries. | `retire_unit`, `dcache` |

`p6_top` wires these together. The shared types are in `p6_pkg`.

## Tags, and the map table's "+" bit

This is the part that differs most from plain Tomasulo, and it is the part
to understand first.

**Tags are ROB numbers.** The ROB has 7 entries, numbered 1 to 7. Tag 0 is
reserved and means "no tag". An instruction's tag is the number of its ROB
entry. The tag does not name a reservation station. This means a station can
be freed as soon as its instruction starts executing. The result's home is
the ROB entry, not the station.

**The map table holds a tag and a ready bit for every architectural
register.** The ready bit is the "ready-in-ROB" bit, written "+" below.

| map entry | meaning | where dispatch gets the operand |
|---|---|---|
| `0` | no instruction in flight writes this register | register file |
| `ROB#n` | instruction *n* will write it but has not completed | the station waits for tag *n* on the CDB |
| `ROB#n+` | instruction *n* has completed; its value sits in ROB entry *n* | ROB entry *n* |

The map table changes in these ways:

- **Dispatch** sets the destination register to the new ROB# and clears "+".
- **Complete** sets "+" on the register that still holds the broadcast tag.
  If a younger instruction has already renamed the register, nothing
  changes.
- **Retire** clears the entry to 0, but only if it still holds the retiring
  tag.
- **A flush** clears everything.

If two of these hit the same register in one cycle, the dispatch write wins.

**The CDB catch at dispatch.** A source register's producer may be on the
CDB in the very cycle the consumer dispatches. The consumer then takes the
value from the CDB directly. Without this the consumer would wait for a
broadcast that has already happened.

## Reservation stations and functional units

| # | station | operations | X cycles | result path |
|---|---|---|---|---|
| 0 | ALU | ADD, SUB, ADDI, BNE | 1 | CDB |
| 1 | LD | LDF | 1 | CDB |
| 2 | ST | STF | 1 | own ROB port (no register result) |
| 3 | FP1 | MULF | 3 (pipelined) | CDB |
| 4 | FP2 | MULF | 3 (pipelined) | CDB |

A station holds these fields:
- `op`
- `T`, the destination ROB#
- `T1`/`T2`, the ROB#s it still waits for (0 = the value is present)
- `V1`/`V2`, the operand values
- an immediate and an LSQ slot number

Each cycle, the station compares `T1`/`T2` with the CDB tag and copies the
CDB value on a match. A station may issue in the same cycle that its last
operand is on the CDB: the value is forwarded straight into the issue
packet.

A MULF goes to FP1 when FP1 is free, otherwise to FP2.

Each unit ends in a completion register that holds its result until the CDB
arbiter grants it. The arbiter uses fixed priority: FP1, FP2, LD, ALU. While
a unit's result waits, that unit stops accepting new work.

`fp_mul` is an IEEE-754 single-precision multiplier with three stages:
1. X1 multiplies the significands.
2. X2 normalises.
3. X3 rounds to nearest even and packs.

Subnormal inputs count as zero, and subnormal results are flushed to zero.
Overflow gives infinity. NaN, or infinity times zero, gives `0x7FC00000`.

## Retire and precise state

The retire stage looks only at the ROB head. If the head has not completed,
it waits, even when younger instructions have completed. A completed head is
handled in one of these ways:

| head | action |
|---|---|
| normal | Write V to the register file. Clear the map entry if it still holds this tag. A store writes the LSQ head to the D$. Free the ROB and LSQ entries. |
| page fault | Retire nothing. Clear ROB, stations, map table, LSQ and functional units. Report `os_fault` with the PC and address, and fetch the faulting instruction again. |
| load marked by the LSQ | Clear everything and fetch the load again. Nothing is reported. |
| taken BNE | Retire the branch, clear everything younger, and fetch from the target. |
| HALT | Retire and raise `halted`. |

An external interrupt (`irq`) comes before all of these. It is taken in the
first cycle that the ROB has a valid head, whether or not that head has
completed:
- nothing retires;
- everything is cleared;
- `irq_ack` pulses for one cycle, with `irq_pc` set to the head's PC;
- fetch restarts at `irq_pc`.

This is a precise interrupt: every older instruction has retired, and no
younger one has. The requester holds `irq` high until `irq_ack` and must
then drop it. With an empty ROB, for example after a HALT, the request
waits.

A clear leaves the ROB head and tail pointing at the entry that is fetched
again (or at the entry after a retired branch). The refetched word is loaded
into the fetch register in the clear cycle itself, so it dispatches in the
next cycle.

**The OS hand-off for a page fault.** The core refetches the faulting
instruction at once. The handler must therefore mark the page present
through `os_page_*` in the `os_fault` cycle or the one after. If it does
not, the instruction faults again; the fault repeats until the page is
present.

## Memory: LSQ and D$

Each load and store gets a slot in a 4-entry LSQ at dispatch, in program
order.

- **Store.** In X, the store writes its address and data into its slot. The
  D$ is written only when the store retires. Memory, like the register
  file, therefore holds committed state only.
- **Load.** In X, the load reads the D$. If an older store to the same word
  has already executed, the load takes the data of the youngest such store
  instead (forwarding).

Loads do not wait for older stores whose address is still unknown. That is
what lets the walk-through's second load run before the first store.
Correctness comes from an ordering check:
- When a store executes, it marks every younger load to the same word that
  has already executed, or is executing in the same cycle.
- When a marked load reaches the ROB head, it is cleared and fetched again,
  like a fault.

`dcache` stands in for the D$. It is a 256-word memory that always hits in
one cycle. It has one present bit per 64-byte page, which the OS port sets
and clears, and which produces the page faults. All pages are present after
reset.

## Instruction set

Each instruction is a 32-bit word:
`[31:28]` opcode, `[27:24]` rd, `[23:20]` ra, `[19:16]` rb, `[15:0]` a signed
immediate.

Addresses are byte addresses, and accesses are whole words.

There are 16 registers. Numbers 0 to 7 are r0 to r7 and numbers 8 to 15 are
f0 to f7. All 16 are ordinary 32-bit registers, and none is hard-wired to
zero.

| opcode | mnemonic | effect | slot 1 / slot 2 |
|---|---|---|---|
| 0 | HALT | stop (needs a ROB entry only) | – |
| 1 | ADD rd, ra, rb | rd = ra + rb | ra / rb |
| 2 | SUB rd, ra, rb | rd = ra − rb | ra / rb |
| 3 | ADDI rd, ra, imm | rd = ra + imm | ra / – |
| 4 | MULF rd, ra, rb | rd = ra × rb (binary32) | ra / rb |
| 5 | LDF rd, imm(rb) | rd = M[rb + imm] | – / rb |
| 6 | STF ra, imm(rb) | M[rb + imm] = ra | ra / rb |
| 7 | BNE ra, rb, imm | if ra ≠ rb, pc = pc + imm | ra / rb |

Unused opcodes decode as HALT.

## Timing

This is the classic example, with the register file starting at zero.
"D" is the dispatch cycle, counted from the first dispatch. The FP multiply
executes in cycles 5 to 7 (X 5–7). The last STF stalls in dispatch in cycles
7 and 8 because the single store station is still occupied.

| # | instruction | D | S | X | C | R |
|---|---|---|---|---|---|---|
| 1 | ldf X(r1), f1 | 1 | 2 | 3 | 4 | 5 |
| 2 | mulf f0, f1, f2 | 2 | 4 | 5–7 | 8 | 9 |
| 3 | stf f2, Z(r1) | 3 | 8 | 9 | 10 | 11 |
| 4 | addi r1, 4, r1 | 4 | 5 | 6 | 7 | 12 |
| 5 | ldf X(r1), f1 | 5 | 7 | 8 | 9 | 13 |
| 6 | mulf f0, f1, f2 | 6 | 9 | 10–12 | 13 | 14 |
| 7 | stf f2, Z(r1) | 9 | 13 | 14 | 15 | 16 |

Other events in this example:
- In cycle 8, ROB#2 is broadcast, but f2 is already renamed to ROB#6, so
  "+" is not set.
- Instruction 7 reads r1 as `ROB#4+`, which means it takes the value from
  the ROB.

If the first store's page is absent, the store completes with a fault in
cycle 10. Everything is cleared in cycle 11 and the store is dispatched
again as ROB#3 in cycle 12.

## Top-level interface (`p6_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `run` | in | while high, fetch runs from address 0 |
| `imem_we/addr/wdata` | in | host write of the instruction memory (while `run` is low) |
| `dmem_we/addr/wdata`, `dmem_rdata` | in/out | host access to the data memory (while the core is stopped) |
| `os_page_we/addr/present` | in | set or clear the present bit of the page holding `addr` |
| `os_fault`, `os_fault_pc`, `os_fault_addr` | out | one-cycle report of a page fault at the ROB head |
| `irq` | in | interrupt request; hold high until `irq_ack` |
| `irq_ack`, `irq_pc` | out | one-cycle pulse: the interrupt was taken; execution resumes at `irq_pc` |
| `halted` | out | a HALT has retired (sticky until reset) |
| `ret_valid`, `ret_pc`, `ret_rf_we`, `ret_rd`, `ret_value` | out | one line per retired instruction |
| `ret_st_we/addr/data` | out | the store written to memory in this retirement |
| `events` | out | per-cycle strobes: dispatch, the three dispatch stalls, operand read from ROB or CDB, station capture, CDB conflict, retire, retire stall, store commit, load forward, and the four kinds of clear |

## Parameters and sizes

| name | value | where |
|---|---|---|
| reservation stations | 5 (ALU, LD, ST, FP1, FP2) | `p6_pkg::NUM_RS` |
| FP latency | 3 X cycles | `fp_mul` structure |
| ROB entries | 7 (tags 1..7, 3-bit) | `p6_pkg::ROB_DEPTH` |
| LSQ slots | 4 (power of two) | `p6_pkg::LSQ_DEPTH` |
| registers | 16 × 32 bits | `p6_pkg::NUM_AREGS`, `XLEN` |
| instruction / data memory | 256 words each | `p6_top` `IMEM_WORDS`, `DMEM_WORDS` |
| page size | 64 bytes | `p6_top` `PAGE_BYTES` |

Only the reservation-station mix and the FP latency come from the P6
description. The other sizes are choices of this design.

The ROB depth of 7 is the size of the classic example. It also meets the
rule of thumb "ROB entries ≥ issue width × stages from dispatch to retire":
1 × 7 cycles for an FP multiply. It falls short of the rule once that is
doubled, and short of a typical L2 hit latency.

The `p6_pkg` sizes are package constants. The tag width follows from
`ROB_DEPTH`, and the LSQ age arithmetic assumes a power-of-two `LSQ_DEPTH`.

## Departures and additions

These parts are not in the P6 scheme as usually described. They were added
to make a complete, checkable core:

- **Instruction set and encoding.** Both are this design's own. So are the
  HALT instruction and the host ports.
- **BNE and the not-taken prediction.** A taken branch is repaired by the
  clear-at-retire mechanism. No branch predictor is built.
- **Memory ordering.** LSQ forwarding and the load/store order check are
  added. The P6 description does not cover memory ordering.
- **Page faults.** The page-present bits and the OS port stand in for
  address translation.
- **Interrupts.** The interrupt hand-shake (`irq` held until `irq_ack`) is
  this design's own. The P6 scheme only says that an interrupt is handled
  by the same clear.
- **Precise-state timing.** The clear happens one cycle later than in the
  usual slide version of the fault example. The fault is acted on at
  retire, one cycle after the faulting store completes. Every other event
  matches that example.
- **Store completion.** Stores complete through their own ROB port, not the
  CDB.
- **CDB priority.** The fixed priority order and the CDB catch at dispatch
  are choices of this design.

Not built:
- an interrupt controller or vectoring: the resume PC is reported and the
  core restarts there
- FP addition
- a real cache hierarchy: the D$ never misses
- superscalar width

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M`.

`tb_p6_top` runs the whole core at its default sizes. It contains a
reference interpreter of the instruction set, with its own binary32 multiply
computed through double precision. Every retirement (PC, register write,
store) and the final memory contents must match the interpreter. The test
runs these programs:
- the example above, with every dispatch, CDB and retire cycle checked
- the page-fault variant
- the example as a 16-element loop
- a program that fills the ROB
- 200 random programs with forward branches and heavy load/store aliasing
- random interrupt requests, in half of the random programs and in a second
  run of the loop. The first retirement after each `irq_ack` must be the
  instruction at `irq_pc`.

It counts how often each mechanism occurs (each stall, operand source,
station capture, CDB conflict, forward and kind of clear), and it fails if
any of them never occurs.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_p6_top rtl/p6_pkg.sv tb/tb_p6_top.sv -o sim
./obj_dir/sim
```

For another test, replace `tb_p6_top` with its name. Assertions in `rob`,
`rs_entry`, `lsq` and `p6_top` check these handshake rules:
- only a complete ROB head retires
- a busy station is never refilled
- only an existing LSQ entry is popped
- a D$ write at retire always comes from a store
