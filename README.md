# Reduction of Memory Instructions (RMI): address-reuse hardware

Compiled code often touches the same variable twice in a row. `++counter`
becomes

```
load  R6, off(R1)
add   R6, R6, 4
store off(R1), R6
```

and the store computes `R1 + off` again, although the load computed that
address two instructions earlier. RMI keeps addresses already generated
in a small table, the **Generated Address Cache (GAC)**. A later load or
store with the same base register and the same offset takes its address
from the GAC. It skips address generation, and in the most aggressive form
it never enters the pipeline. The four patterns are Load After Load, Load
After Store, Store After Store and Store After Load. The last one, the
read-modify-write of counters and accumulators, is the most common.

This repository gives synthesizable SystemVerilog for the idea on each
kind of processor. In-order machines have two variants, which differ in
who finds the store:

| realisation | processor | what happens to the repeated access | module |
|---|---|---|---|
| Case A | out-of-order superscalar | not issued at all; a forward queue sends it to the load/store buffer | `rmi_case_a` |
| Case B | out-of-order superscalar | a store after a load goes to a special reservation station with no execution unit | `rmi_case_b` |
| compiler-assisted | RISC, VLIW, in-order superscalar | the compiler deletes the store and marks the arithmetic instruction; hardware forwards its result with the cached address | `rmi_inorder` |
| predecode marking | RISC, VLIW, in-order superscalar | as above, but logic in the predecode stage finds the store, drops it and sets the marks | `rmi_predecode` (feeding `rmi_inorder`) |

`rmi_top` places them side by side. They share only clock and reset, and
each has its own ports, prefixed `a_`, `b_`, `i_` and `p_`. The
predecode unit and the in-order forwarding unit belong to the same
pipeline, but the core's decode and execute stages lie between them, so
they too are connected outside the top. The processor
around them is not part of this design: fetch, renaming, reservation
stations, execution units, reorder buffer, load and store buffers. The
ports are where that processor connects.

## The tables

**Dependence Lookup Table (DLT)**, `rmi_dlt`. This is a fully associative
table. Each entry holds {valid, base register, offset, Process Counter}. A
lookup compares the base register and offset of a decoded load or store
with every valid entry. The matching entry's index is its **Entry ID**,
and every other table is indexed by it. The Process Counter counts the
instructions that still depend on the entry. An entry with a non-zero
counter is never replaced. Replacement is LRU among the entries that are
free to go. An unused entry is taken before any used one. In Case B the
counter is one bit wide, the **Process Bit** (`CNT_W = 1`).

**Generated Address Cache**, `rmi_gac`. This holds one address and one
Valid Bit per Entry ID. When an entry is assigned, its slot's Valid Bit
is cleared. The execute stage writes the address when it has generated
it. Until then the slot is *pending*, and the DLT treats pending slots as
pinned.

**Load / Store Forward Control queues**, `rmi_lfc` and `rmi_sfc` (Case
A). These are FIFOs of eliminated accesses. An LFC entry is {Entry ID,
destination register}. An SFC entry is {Entry ID, Value, Result Valid}.
While Result Valid is low, Value holds the tag of the register that will
produce the data. The entry captures that value from the Common Data Bus
(CDB). The head entry leaves once the GAC Valid Bit of its slot is set.
For the SFC, the value must also be present.

**Special Store Reservation Station (SS RS)**, `rmi_ss_rs` (Case B). It
has one entry per Entry ID, holding {Address, Valid Bit, store present,
ROB ID, Value, Result Valid}. It behaves like a reservation station with
no functional unit. When the address, the store and its value are all
present, the store goes to the store buffer. If several entries are ready,
the lowest index goes first, one per cycle.

## Case A step by step

`rmi_case_a` sits after register renaming. It sees one load or store per
cycle, with the physical base register and the offset.

1. **Lookup hit.** The address was generated earlier, or is being
   generated now. The instruction is *eliminated*: `dec_elim` goes high
   and `dec_issue` stays low. It takes no reservation station, no
   execution unit and no ROB entry. A load is pushed into the LFC. A
   store is pushed into the SFC with its data or its producer's tag. The
   entry's Process Counter goes up by one.
2. **Lookup miss.** The instruction issues normally (`dec_issue`). If an
   entry can be assigned, the new entry's number comes out on
   `iss_tag_valid`/`iss_tag_id` and must travel with the instruction.
   When the instruction's address is generated, the core returns it on
   `agu_valid`/`agu_id`/`agu_addr`, and the GAC stores it.
3. **Hit that cannot be taken.** This happens when the queue is full or
   the counter is saturated. The instruction issues normally without an
   Entry ID, so the program stays correct and only the saving is lost.
4. When the LFC or SFC hands an access to its buffer, the counter goes
   down by one. The entry stays valid, so later instructions can reuse
   the address.

An entry therefore has three protections, and each has its own reason:

- **pending** (GAC): its address has not been written yet. Replacing the
  entry would let a late address write land in a reused slot.
- **Process Counter** (DLT): queued accesses still need its address.
- **valid** (DLT): the only bit a lookup looks at. It is cleared when the
  base register gets a new value (`inv_en`/`inv_reg`). The renamer raises
  this when it hands out that physical register again. Clearing it stops
  new matches at once. Accesses already holding the Entry ID keep the old,
  correct address.

Timing: the decode decision is combinational in the cycle of `dec_valid`.
The tables change at the next clock edge. An eliminated access reaches its
buffer one cycle after the later of two events: the GAC write, and (for a
store) the value's arrival on the CDB. The load and store buffers use a
plain valid/ready handshake, and an offered request is held until it is
accepted.

## Case B step by step

`rmi_case_b` handles the Store After Load pattern only, and it never
removes an instruction.

- Every **load** issues normally. It opens a fresh DLT entry and the SS RS
  entry with the same number, so it owns an Entry ID. The core writes the
  load's generated address into the SS RS entry through `agu_*`, which
  sets the Valid Bit. If an older entry has the same reference, that entry
  stops matching, so a store always pairs with the newest load.
- A **store** looks up the DLT. If a load-opened entry matches and its
  Process Bit is clear, the store sets the Process Bit. It then goes into
  that SS RS entry (`dec_to_ssrs`) with its ROB ID and its value or value
  tag. Otherwise the store issues normally (`dec_issue`).
- When the SS RS sends the store to the store buffer, it clears the
  Process Bit and closes the entry. A Case B address serves one store
  only. Case A keeps the address for reuse, which is the main difference
  between the two.
- Entries of loads that no store uses stay until LRU replaces them, once
  their address has arrived. They also stop matching when their base
  register is invalidated.

Case B keeps the store in the reorder buffer (`sb_rob`), so retirement
stays in order. Case A does not: an eliminated store has no ROB entry.

## Compiler-assisted realisation

On a RISC, VLIW or in-order machine the matching is done before the
instruction enters the pipeline: by the compiler, or in hardware by the
predecode logic of the next section. Either one assigns GAC slots and tags
instructions with a 2-bit mark, `rmi_pkg::rmi_mark_e`, plus a slot number.
`rmi_inorder` sits after the execute stage and acts on the mark:

- `MARK_GEN`: a load or store whose generated address is saved in the
  named slot.
- `MARK_STORE`: an arithmetic instruction that replaces a deleted store.
  Its result goes to the write buffer together with the slot's address.
- `MARK_LOAD`: a load that skipped address generation. The slot's address
  and the destination register go to the load buffer.

Both outputs are registered: the result appears one cycle after the
instruction and is held until the buffer accepts it. `ex_ready` stalls
the execute stage while an output is blocked. A mark that names an empty
slot cannot be served, and it raises `miss_o`. A correct compiler never
emits one.

## Finding the store in predecode

`rmi_predecode` does in hardware what the compiler does above. It sits
between fetch and decode, one instruction per cycle, and sees each
instruction as a class (`rmi_pkg::rmi_op_e`: load, store, arithmetic,
other) with `rd`, `rs1`, `rs2` and an offset. The rest of the instruction
travels along untouched.

It keeps a table with one entry per logical register:
`{valid, base register, offset, GAC slot}`. The entry says that the
register holds a value loaded from `offset(base)`, and that this address
is kept in the slot.

- A load `rd <- off(rs1)` fills the entry of `rd`. It leaves with
  `MARK_GEN` and a new slot; slots are handed out round robin.
- A load whose base and offset equal those of any valid entry needs no
  new address: it leaves with `MARK_LOAD` and that entry's slot, and
  `rmi_inorder` sends the cached address to the load buffer. This covers
  Load After Load, and Load After Store where the stored value was
  itself loaded from there. The entry of `rd` gets the same slot.
- An arithmetic instruction that reads and writes the same register
  (`add r6, r6, 4`) keeps the entry: the value has changed, but it still
  belongs to the same variable. Any other write to `rd` clears the entry.
- A write to register x clears every entry whose base is x. Reusing a slot
  clears the entry that held it.
- A store `off(rs1) <- rs2` is compared with the entry of `rs2`. If base
  and offset are equal, the value being stored came from that very
  location, and the address is already in the slot.

The producer has already gone past by the time the store is seen. To let
it still be marked, instructions wait in a small window (`WIN`, 4) before
they leave for decode. On a match, the youngest instruction in the window
that writes `rs2` must meet three conditions:

- it is an arithmetic instruction;
- it is not already marked;
- there is no load or store between it and the store.

If it meets them, it gets `MARK_STORE` with the slot, and the store is
dropped (`elim_o`): it is accepted but never leaves. The third condition
keeps memory order intact. The result is written one step earlier than
the store would have written it, and nothing can observe the difference.
If the producer has already left the window, the store goes on as usual.

An instruction leaves the window when the window is full or when no new
instruction arrives. Once offered to decode, it stays offered until taken.
The window adds up to `WIN` cycles of latency while it fills, and none
after that.

## Parameters

The method fixes no sizes. All defaults below are this design's choices
and are set in `rmi_pkg`.

| parameter | default | meaning |
|---|---|---|
| `DLT_ENTRIES` / `ENTRIES` | 8 | DLT, GAC and SS RS entries |
| `FWD_DEPTH` / `DEPTH` | 4 | LFC and SFC depth |
| `PCNT_W` / `CNT_W` | 3 | Case A Process Counter width (Case B: 1) |
| `PREG_W` / `REG_W` | 6 | physical register number (64 registers) |
| `LREG_W` | 5 | logical register number, in-order realisation |
| `OFF_W` | 16 | immediate offset |
| `ADDR_W`, `DATA_W` | 32 | address and data width |
| `ROB_W` | 5 | reorder-buffer index |
| `WIN` | 4 | predecode window depth |
| `PAY_W` | 16 | predecode: instruction bits carried along unchanged |

## Where this design goes beyond, or departs from, the method

- **Invalidation by base register** (`inv_en`/`inv_reg`). The method
  only says entries are held until the base register is modified. The
  port and its use by the renamer are this design's interpretation.
- **Pending slots.** The rule that keeps an entry from being replaced
  before its address arrives is added here.
- **Fall-back to normal issue.** When a queue is full or the counter is
  saturated, the instruction issues normally. This is added here.
- **Stores in Case A.** One description of the out-of-order case has the
  arithmetic instruction that produces the stored value carry a mark in
  its reservation station. Here the SFC picks the value up from the CDB by
  the producer's register tag instead, which has the same effect. The
  tag-and-capture mechanism is the one described for Case B.
- **Not handled:** squashing after a branch misprediction or an
  exception, memory ordering between forwarded and normally issued
  accesses, and more than one memory instruction decoded per cycle. These
  are left to the surrounding core.
- **Predecode details.** The method names the parts of the predecode
  logic: a per-register table, a comparator and the marking logic. The
  following are this design's own choices:
  - the window and its depth;
  - round-robin slot assignment;
  - repeated loads found by comparing with every table entry;
  - keeping an entry across a read-modify-write of the same register;
  - the no-memory-access-in-between rule.
- **No performance model.** The claimed saving of at least 10% of
  executed instructions depends on how often programs repeat addresses.
  Nothing here measures it.

## Files

| file | contents |
|---|---|
| `rtl/rmi_pkg.sv` | default sizes, mark and instruction-class encodings |
| `rtl/rmi_dlt.sv` | Dependence Lookup Table |
| `rtl/rmi_gac.sv` | Generated Address Cache |
| `rtl/rmi_lfc.sv`, `rtl/rmi_sfc.sv` | Load / Store Forward Control queues |
| `rtl/rmi_ss_rs.sv` | Special Store Reservation Station |
| `rtl/rmi_case_a.sv`, `rtl/rmi_case_b.sv` | the two out-of-order realisations |
| `rtl/rmi_inorder.sv` | in-order realisation: GAC after execute, forwarding of marked instructions |
| `rtl/rmi_predecode.sv` | predecode-stage store detection and marking |
| `rtl/rmi_top.sv` | all realisations side by side |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/rmi_inc_counter_tb.sv` | the counter-increment workload on every realisation |

## Verification and simulation

Each module has a self-checking testbench that runs a reference model or
a scoreboard next to the module. Each ends with the line
`TB_RESULT checks=N failures=M`. The block testbenches use small sizes
(4 entries, short queues), so tables fill up and entries get replaced
often.

`tb/rmi_top_tb.sv` runs the top at its default parameters. It plays the
core for Case A, Case B and the compiler-assisted unit with the same stream of counter
increments and lone accesses:

- twelve variables on four base registers, more than the table holds;
- random address-generation delays;
- store data that arrives late over the CDB;
- base-register changes;
- load and store buffers that stall in bursts.

It checks the address and data of every forwarded access. It also counts
each mechanism (elimination of loads and stores, fall-back issue, entry
replacement, CDB capture, invalidation, back-pressure, Process Bit
refusal, marked stores and loads, stores dropped in predecode) and
fails if any mechanism never happens.

In its second phase it runs a random program through the predecode unit.
The program mixes `load; add; store` sequences with unrelated loads,
stores and adds, some of which overwrite base registers. The testbench
plays the pipeline behind the predecode unit: it executes each instruction
that leaves, passes it with its mark to the in-order unit, and writes the
write-buffer output of marked adds to memory. At the end, registers and
memory must equal those of the same program run without any elimination.
`tb/rmi_predecode_tb.sv` makes the same comparison for the predecode unit
alone, with back-pressure from decode.

`tb/rmi_inc_counter_tb.sv` runs the plain counter increment,
`load r6, 8(r1); add r6, r6, 4; store 8(r1), r6`, eight times on one
counter through every realisation. It checks the exact outcome and the
data written. Counting address generations gives:

| realisation | address generations for 8 increments |
|---|---|
| no address reuse | 16 |
| Case A | 1 (the first load; every later load and store is eliminated) |
| Case B | 8 (the loads; every store goes through the SS RS) |
| predecode + in-order | 1 (the first load; later loads take the cached address, every store is dropped) |

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/rmi_pkg.sv \
    tb/rmi_top_tb.sv --top-module rmi_top_tb -Mdir obj_top
./obj_top/Vrmi_top_tb
```

Replace `rmi_top_tb` with any other `*_tb` to run that module's test.
Lint a module with `verilator --lint-only -Wall -Irtl -y rtl rtl/rmi_pkg.sv
rtl/<module>.sv`. Concurrent assertions check the handshake and table
rules: a held request stays valid, nothing is pushed into a full queue,
and addresses are written only to slots waiting for one. Under `--assert`
a violation stops the simulation.
