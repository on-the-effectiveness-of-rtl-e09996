# DTSVLIW: a dynamically trace scheduled VLIW machine in SystemVerilog

A VLIW machine is fast and simple because the compiler has already packed
independent operations into long instructions. Its weakness is that it cannot
run ordinary sequential binaries. The DTSVLIW (dynamically trace scheduled
VLIW) closes that gap in hardware:

1. A small in-order processor runs the ordinary code the first time round.
2. As it runs, every instruction it completes is fed to a scheduler. The
   scheduler packs the executed trace into blocks of long instructions.
3. Finished blocks go into a VLIW Cache.
4. The next time execution reaches the first instruction of a cached block,
   a VLIW Engine runs the block instead of the sequential code.

The scheduler only ever looks at the trace that actually ran, so it needs no
branch prediction and no compiler support. Each conditional branch in a block
records the direction it took when the block was built. If the branch goes the
other way later, the instructions that came after it in the trace are
discarded.

This repository holds synthesizable RTL for the machine: the Primary
Processor, the Scheduler Unit with its scheduling list, the VLIW Cache, the
VLIW Engine, the Fetch Unit that switches between the two engines, and the
shared register file and memories. Each part has a self-checking testbench,
and there are two end-to-end testbenches for the whole machine.

## Block diagram

```
            prog_* (loading)
                 |
           instr_mem ---> primary_proc ----(every executed instr)----> sched_unit
          (instr cache)   4-stage pipeline                           scheduling list
                 ^             |   ^                                        |
                 |        halt/restart                         blocks, one long
                 |             |   |                           instruction per cycle
                 |          fetch_unit <--- probe hit ---------- vliw_cache
                 |             |   ^                                  |
                 |        start|   | done (miss)               lookup / read
                 |             v   |                                  |
                 |          vliw_engine <-----------------------------+
                 |             |
      dts_regfile (32 int + icc + 256 rint + 256 rflg)  and  data_mem,
      shared by primary_proc and vliw_engine (never active together)
```

`dtsvliw_top` wires these parts together. The two engines share all machine
state, so switching between them moves no state. Its cost is the pipeline
stages emptied in one engine and refilled in the other.

## Instructions and the decoded format

- **Instruction set.** The machine runs a SPARC V7 integer subset:
  - `sethi`
  - `add`, `sub`, `and`, `or`, `xor`, with and without `cc`
  - `sll`, `srl`, `sra`
  - `ld`, `st` (word only)
  - `Bicc`
- **Flat registers.** There are 32 integer registers with no register windows.
- **No delay slots.** Branches have none.
- **Decoded form.** `sparc_decode` turns each word into a decoded instruction,
  `dts_pkg::dinstr_t`. That same format flows through the Primary Processor
  pipeline, the candidate and slot fields of the scheduling list, the VLIW
  Cache and the VLIW Engine. This is why the VLIW Engine needs no decode stage.
- **Register names.** Each register field names a *storage position*
  (`rid_t`):
  - an architectural integer register;
  - the condition codes;
  - one of 256 integer renaming registers;
  - one of 256 condition-code renaming registers.

  A renamed instruction therefore differs from the original only in its
  fields.
- **Nops and unconditional branches.** An unconditional branch (`ba`)
  decodes to a nop plus a `jump` flag, because a trace already fixes where it
  went. Nops are not scheduled.
- **Branch fields.** A conditional branch carries:
  - the direction it took when it was scheduled (`taken`);
  - the address of the other direction (`exit_pc`);
  - its tag.

## The scheduling list (sched_unit)

This is the heart of the design.

### Structure

The list has `HEIGHT` elements. Each element holds:

- one long instruction of `WIDTH` slots;
- one *candidate instruction*, which is the instruction currently trying to
  move up, plus the slot its copy occupies.

The list is circular and has four pointers:

- `head`: the first element of the block being built;
- `tail`: its last element;
- `alloc_ptr`: the next element to allocate;
- `save_ptr`: the next element to send to the VLIW Cache.

Every element is in one of three states: free, part of the current block, or
waiting to be saved.

### What happens in one cycle

All of the following happen in the same cycle, and every decision is taken on
the state at the start of the cycle.

1. **Insert.** The instruction the Primary Processor completed in the
   previous cycle is inserted. A copy goes into a free slot; this copy is the
   *companion instruction*. The instruction also becomes the element's
   candidate.
   - It goes into the tail element if it has no flow, output or resource
     dependency on what the tail will hold after this cycle's moves.
   - Otherwise it goes into a new element after the tail.
2. **Move up.** A candidate in element *i* moves to *i−1* when all of these
   hold:
   - *i* is not the head;
   - *i−1* has a free slot;
   - the candidate reads nothing written in *i−1*.

   The companion moves with it, so the slot in *i* is freed.
3. **Split.** A candidate that may move but has a conflict is split. The
   conflicts are:
   - it writes something that *i−1* also writes (output dependency);
   - it writes something that another instruction in *i* reads (anti
     dependency);
   - *i* contains a conditional branch (control dependency).

   The result that causes the conflict is renamed to the next free renaming
   register. For a control dependency, all its results are renamed. The
   companion left in *i* becomes a `COPY` instruction that moves the renaming
   register back to the original destination, and it stays there for good.
   The renamed candidate continues upwards.
4. **Install.** A candidate that cannot move is dropped. Its companion stays
   where it is.
5. **Branches.** A conditional branch never moves. It is installed where it
   is inserted, and it opens a new tag (see below).

### Keeping later operands right

Once an instruction has been renamed, later instructions of the block that
read its architectural destination must read the renaming register instead.
The copy that restores the architectural register may sit lower in the list
than they do. The scheduler keeps a small map, "architectural position → last
renaming register", for the current block. Incoming source operands go through
this map. When a candidate is renamed in the same cycle that a later one moves
past it, the later one's operands are forwarded as well.

### Memory ordering

All memory accesses are treated as touching the same location:

- a load cannot move above a store;
- a store cannot move above a load or a store.

Stores are never renamed. A store that would need a split is installed
instead.

### Closing and saving blocks

A block is closed when either:

- an incoming instruction needs a new element and the block already has
  `HEIGHT` elements; or
- the machine switches to the VLIW Engine (`flush_req`).

A closed block is sent to the VLIW Cache one long instruction per cycle,
oldest first. Meanwhile the instruction that opened the next block is already
filling the freed elements. Insertion stalls (`in_ready` low) only when a new
element is needed and that element still holds an unsaved long instruction.
The cache can also delay saving (`wr_hold`), for example while the VLIW Engine
is running the line that would be overwritten.

### Example

The vector-sum loop in `tb_dtsvliw_geom` is the classic example. Its
instructions are:

| # | Instruction |
|---|---|
| 5 | `ld [r10+r11], r8` |
| 6 | `add r9, r8, r9` |
| 7 | `add r10, 4, r10` |
| 8 | `subcc r10, 4x-1, r0` |
| 9 | `ble` |

- Instruction 7 moves up past instruction 5, which reads `r10`. This is an
  anti dependency, so instruction 7 is split: it writes a renaming register
  and leaves `COPY rN, r10` behind.
- Instruction 8 then reads the renaming register, so it can move up too.
- The load of the next iteration lands in the element of the `ble` and takes
  the `ble`'s tag.

## Tags and branch exits

Tags are how a block can contain instructions from beyond a conditional
branch, yet still be correct when that branch goes the other way.

### Assigning tags

- Inside a block, tags count up from 0.
- Every conditional branch takes the next tag.
- Every instruction inserted after a branch carries the newest tag, including
  instructions that later move above the branch.

The rules above guarantee that such an instruction only writes renaming
registers while it sits above the branch. Its architectural result is written
by the copy it left in the branch's element or below.

### Using tags at run time

In the VLIW Engine, each branch compares its outcome with the recorded
direction.

- **Same direction:** nothing happens.
- **Different direction:** the smallest tag among the mispredicted branches
  becomes the *kill tag*. Then:
  - in that long instruction, only the slots whose tag is below the kill tag
    write back;
  - the long instruction already fetched behind it is dropped;
  - the branch's `exit_pc` is looked up in the VLIW Cache in the same cycle.

  The next block therefore follows after a single bubble.

### Width and the cost of renaming

- Tags are `TAGW` = 9 bits. Several branches can share one element, so a
  block may hold one tag per instruction. `sched_unit` refuses to elaborate a
  geometry with `WIDTH*HEIGHT` ≥ 2^`TAGW`.
- Renaming registers are allocated from 0 in each block, and at most one per
  result per instruction. A block therefore never uses more than
  `WIDTH*HEIGHT` renaming registers of each kind, which is within the 256
  available for every geometry up to 16x16.

## VLIW Cache and block addressing (vliw_cache)

- **Addresses.** A block has one address: the address of its first scheduled
  instruction. It runs only when execution needs exactly that instruction.
- **Line contents.** A line stores:
  - that address (the tag);
  - the index of its last long instruction;
  - the address of the instruction that follows the block.

  Branch exits carry their own targets, so no other addresses are stored.
- **Organisation.** The cache is direct mapped, indexed by the word address.
- **Writing a line.** The first long instruction written invalidates the line.
  The last one writes the last index and the next address, and makes the line
  valid.
- **Ports.** There are three, all combinational:
  - lookup, for the engine's next block;
  - probe, for the Fetch Unit;
  - read, which returns one long instruction plus the line's last index and
    next address.
- **`LINES`.** It defaults to 8192. That is a 3072-KB cache divided into 8x8
  blocks of 6-byte instructions.

## VLIW Engine (vliw_engine)

- **Pipeline.** Every slot has a fetch, execute and write-back pipeline, and
  any slot executes any operation.
- **Stepping through a block.** A line index counts up from 0. When it
  reaches the line's last index, the next address is looked up in the same
  cycle, so chained blocks run back to back with no bubble.
- **Forwarding.** Results are bypassed from write back to execute, and loads
  see stores in write back. The latency is therefore one cycle.
- **Handing back.** When a lookup misses, the engine stops fetching and
  drains. It then reports the address the Primary Processor must continue
  from (`done`, `done_pc`).
- **Protecting the running line.** From the start request on, the engine
  names the line it is running (`lock_v`, `lock_line`). The cache does not
  overwrite that line, nor the line being looked up.

## Primary Processor and Fetch Unit

**`primary_proc`** is a four-stage in-order pipeline: fetch, decode, execute,
write back.

- Operands are read in execute, with a bypass from write back.
- Branches resolve in execute, so a taken branch costs two bubbles.
- Every instruction that completes execute goes to the Scheduler Unit, with
  its address, the address of the next instruction and, for a branch, the
  direction and the other-way address.
- It stalls while the scheduler cannot accept.
- An undecodable instruction completes as a nop and is reported on
  `ev_illegal`.

**`fetch_unit`** decides which engine runs.

- **To the VLIW Engine.** While the Primary Processor runs, the address in its
  execute stage is probed in the VLIW Cache. On a hit:
  1. that instruction is squashed;
  2. the Primary Processor halts;
  3. the scheduler closes its block, with the hit address as the next address;
  4. the VLIW Engine starts there.
- **Back to the Primary Processor.** When the VLIW Engine misses, the Primary
  Processor restarts at the missing address.
  - Probing is disarmed until the first instruction has completed execute.
  - That instruction opens a new block at the address where the previous block
    left off. This chains the blocks.

## Registers and memories

**`dts_regfile`** holds:

- 32 integer registers (r0 reads as zero);
- the condition codes;
- 256 integer renaming registers and 256 condition-code renaming registers.

It has `3+3·WIDTH` read ports and `2+2·WIDTH` write ports: three reads and
two writes for the Primary Processor, and the same for each slot (two
operands and store data; a value and the condition codes).

**`instr_mem` and `data_mem`** are perfect, always-hit caches.

- Reads are combinational; writes happen on the clock edge.
- The data memory has one port per slot plus one for the Primary Processor.
- A port can read and write different addresses in one cycle.
- `IM_WORDS` and `DM_WORDS` default to 1024 words each.

## Parameters of `dtsvliw_top`

| Parameter | Default | Meaning |
|---|---|---|
| `WIDTH` | 8 | instructions per long instruction |
| `HEIGHT` | 8 | long instructions per block |
| `LINES` | 8192 | VLIW Cache lines (one block each) |
| `IM_WORDS` | 1024 | instruction memory words |
| `DM_WORDS` | 1024 | data memory words |

Other sizes are fixed in `dts_pkg`: `NREN` = 256 renaming registers of each
kind, and `TAGW` = 9 tag bits. `WIDTH*HEIGHT` must stay below 512. The
geometries that have been simulated are 8x8 (the default), 4x4 and 16x16 in
`tb_dtsvliw_geom`, and 3x4 and 4x4 lists in the scheduler's own test.

### Observing the machine

The top brings out:

- the architectural registers and condition codes;
- the current engine (`vliw_mode`);
- the Primary Processor's execute-stage address;
- a one-cycle pulse (`ev_*`) for every mechanism: insertion into the tail or
  a new element, move, install, split, block full, scheduler stall, save, save
  hold, long instruction executed, block entered, chain, branch exit, and the
  two mode switches.

## Simulating

Each testbench is a top-level module with no ports. It prints one line:

```
TB_RESULT checks=<n> failures=<n>
```

followed by `$finish`. The package must come first on the command line:

```
verilator --binary --timing -j 0 -Wno-fatal --top-module tb_dtsvliw_top \
    rtl/dts_pkg.sv $(ls rtl/*.sv | grep -v dts_pkg) tb/tb_dtsvliw_top.sv
./obj_dir/Vtb_dtsvliw_top
```

Replace the top module and the testbench file to run another testbench:

| Testbench | What it checks |
|---|---|
| `tb_dtsvliw_top` | The whole machine at its default parameters (8x8, 8192 lines). It runs a fill loop and a summing loop with data-dependent branches, 799 instructions in about 510 cycles. Registers, condition codes and memory are compared with an instruction-set model inside the testbench. Every `ev_*` mechanism must happen at least once. Builds in seconds and runs instantly. |
| `tb_dtsvliw_geom` | Three machines side by side: 4x4, 8x8 and 16x16, all with a 3072-KB cache. They run the vector-sum example over 64 elements, and each result is checked. IPC on this short run is about 1.8, 1.9 and 1.2; it is dominated by the first pass through the loop. |
| `tb_sched_unit` | First, the vector-sum example on a 3x4 list, step by step: which instructions share an element, when the install happens, where the split happens, and which tag the next load carries. Second, a long random trace on a 4x4 list, with random gaps, block closes and save stalls. Every saved block is run in a reference model twice: once with the recorded branch directions, and once with one branch going the other way. Both runs are compared with sequential execution of the trace. |
| `tb_vliw_engine` | Hand-built blocks that cover chaining with no bubble, bypassing, a renamed result and its copy, a branch going the other way (tag kill and exactly one bubble), a miss with drain and hand back, and a restart. |
| `tb_vliw_cache` | Visibility of partly written blocks, conflicts, write hold, and random blocks against a model. |
| `tb_fetch_unit` | Mode switches and probe arming, directed and against a model. |
| `tb_primary_proc` | A Fibonacci program with random scheduler stalls, halt and restart. Checks the handed-over stream and the bubble after taken branches. |
| `tb_sparc_decode`, `tb_dts_regfile`, `tb_data_mem`, `tb_instr_mem` | Unit checks against independently computed values. |

## How far it can be trusted, and where it departs from the original design

**Verified.** All the testbenches above pass. Each unit test has been shown to
catch a deliberately injected bug in its module.

**Not verified.** The programs run end to end are small loops. No large
benchmark has been run.

Departures from the published machine:

- **Instruction set.** Only the SPARC V7 integer subset listed above is
  implemented. The following are all missing:
  - floating point, multiply and divide;
  - byte and half-word memory accesses;
  - register windows;
  - delay slots;
  - indirect jumps;
  - traps.
- **Exceptions.** There is no exception recovery. The original machine uses
  checkpointing to recover precise state when an instruction in a block
  faults. Nothing here faults, because memories are perfect and there are no
  traps.
- **Functional units.** Only untyped slots are implemented: every slot can do
  everything. The typed configurations, with separate integer, load/store and
  branch units, are not.
- **Decoded format.** The decoded instruction is much wider than the 6 bytes
  the cache sizing assumes, because it carries full 32-bit immediates and exit
  addresses. `LINES` still follows the 6-byte figure.
- **Memory dependencies.** Memory is treated as a single location, and stores
  are never renamed. This is stricter than necessary and lowers parallelism
  around stores.
- **Dependency timing.** Dependencies are judged on the list as it was at the
  start of the cycle. An instruction cannot move into a slot that is freed in
  that same cycle.
- **Branches in the tail.** An instruction may be inserted into the tail
  element even when the tail holds a branch. It then takes that branch's tag.
- **Caches.** The caches are perfect: the instruction and data memories never
  miss.
- **Timing.** All units have one-cycle latency.
