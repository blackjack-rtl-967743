# BlackJack: catching hard faults with redundant threads on one SMT core

A permanent defect that slips through manufacturing test, or that only
appears after some wear, corrupts data silently. One cheap way to catch it
in the field is to run every program twice and compare. Simultaneous and
Redundant Threading (SRT) already does this on one SMT core for transient
faults: a *leading* thread runs ahead, a *trailing* copy follows some
distance (the *slack*) behind, and every store is released to memory only
when both copies agree. For permanent faults this is not enough. The two
copies of an instruction tend to use the *same* hardware, so a broken
decoder lane or a broken ALU corrupts both the same way, and the comparison
passes.

BlackJack makes the two copies **spatially diverse**. In an out-of-order
core an instruction travels down one *frontend way* (fetch, decode, rename
lane) and, after the issue queue, down one *backend way* (register read,
execute, memory, writeback, commit). If the trailing copy uses a different
frontend way *and* a different backend way than the leading copy, a fault
in any one way shows up as a disagreement.

The trick is where the reordering happens. The trailing thread does not
fetch from the instruction cache. It fetches the leading thread's committed
instructions, reordered ahead of time by **safe-shuffle**. Safe-shuffle
only swaps instructions that the leading thread issued in the same cycle.
Those instructions were independent of each other, so swapping them cannot
break the program. All of this happens after leading commit, far from the
timing-critical issue logic.

This repository holds synthesizable SystemVerilog for everything BlackJack
adds to an SMT core. The core itself is not included: fetch, decode,
leading rename, issue queue, functional units, caches and the free list.
The top module, `blackjack_top`, has a port for each connection to the core.

## Data flow

```
 leading issue ──alloc──▶ dtq ◀──record── leading commit ──▶ lvq (load values)
                           │                             └──▶ store_checker (leading stores wait)
                  complete packets
                           ▼
                     safe_shuffle ──shuffled packets──▶ trail_fetch (queue, 1 packet/cycle, slack)
                                                             │
                 trail_rename (by leading physical reg) ◀────┤
                 trail_active_list + vidx_map (AL / LSQ) ◀───┘
                           │  to the core's dispatch, slot s = frontend way s
                           ▼
         core backend completes ──▶ trail_active_list ──in order──▶ trailing commit
                                                              ├─▶ commit_rename_check (dependences, freeing)
                                                              ├─▶ pc_order_check      (program order)
                                                              ├─▶ store_checker       (stores to memory)
                                                              └─▶ lvq                 (free entries)
```

| module | role |
|---|---|
| `bj_pkg` | shared types: DTQ record, shuffled slot, active-list entry, way classes |
| `dtq` | Dependence Trace Queue: issue-order record of committed leading instructions |
| `safe_shuffle` | the greedy reordering into spatially diverse trailing packets |
| `trail_fetch` | trailing fetch queue, one packet per cycle, slack gate |
| `trail_rename` | trailing renamer indexed by *leading physical* register |
| `vidx_map` | virtual-to-physical index for active list and LSQ |
| `trail_active_list` | trailing reorder buffer filled out of order, retired in order |
| `commit_rename_check` | second, program-order rename table: dependence check and register freeing |
| `pc_order_check` | committed PCs must follow each other |
| `lvq` | Load Value Queue, looked up by index, address checked |
| `store_checker` | store buffer: leading store waits for its trailing copy |
| `payload_ram` | separate issue-queue payload RAM per thread |
| `blackjack_top` | all of the above wired together |

## Packets and the DTQ

The leading thread issues up to four instructions per cycle. The
instructions issued in one cycle form a **packet**. When the leading thread
issues, it allocates one DTQ entry per instruction, in issue order, and
marks the last entry of the packet with an end-of-packet bit. Each
instruction carries its DTQ index down the pipeline. At leading commit the
instruction fills its entry with:

- the instruction word and PC;
- its logical registers and the leading physical registers (the leading
  rename map);
- its way class (ALU, MUL, MEM, FP ALU, FP MUL);
- the frontend way it used, and the backend way as an index within its class.

At the same time the DTQ hands out **virtual** active-list, load/store-queue
and load-value-queue indices in commit order, which is program order. They
record program order for the trailing thread without holding any trailing
resources yet.

A packet leaves the DTQ when all of its entries have committed or been
squashed. Squashed (wrong-path) entries are masked off, and a packet with
no live entry is dropped. So the trailing thread never sees a misspeculated
instruction.

## Safe-shuffle

This is the heart of the design (`rtl/safe_shuffle.sv`). Two fixed
policies of the core make placement predictable:

* **Fetch uses direct mapping.** Slot *s* of a fetched packet goes down
  frontend way *s*.
* **Select/map is oldest first.** Among co-issued instructions, the oldest
  of a class gets the first way of that class, the next one the second,
  and so on.

Take a trailing packet that issues whole and with nothing else. An
instruction in slot *s* then uses frontend way *s*. Its backend way is *n*,
the number of slots below *s* that hold the same class. The number of
NOPs of that class is included in *n*.

The greedy rule takes the input instructions one at a time and scans the
slots from 0 upward:

1. A slot is usable if it is empty, or holds a NOP of the instruction's
   own class.
2. A usable slot is **acceptable** if all of these hold:
   * *s* ≠ the leading frontend way;
   * *n* ≠ the leading backend way;
   * *n* is smaller than the number of ways of that class (4 ALU, 2 MUL,
     2 MEM, 2 FP ALU, 2 FP MUL).
3. The instruction takes the first acceptable slot. Any empty slot it
   passes becomes a NOP **marked with the instruction's class**. That NOP
   keeps the later slots of that class on their planned backend ways.
4. A later instruction of the same class may replace such a NOP. An
   instruction of another class may not, because that would shift the
   backend ways of the instructions already placed above it.
5. If an instruction finds no acceptable slot, the output packet ends
   there. The rest of the input packet starts a new output packet. This is
   a **split**.

Example with two ALU instructions:

* Instruction A used frontend 0 / backend 0.
* Instruction B used frontend 1 / backend 1.

A cannot take slot 0 (frontend 0), so it leaves an ALU NOP there and takes
slot 1, where it runs on backend 1. B then replaces the NOP in slot 0 and
runs on frontend 0 / backend 0. Both instructions have swapped both of
their ways.

Slots above the last real instruction are left empty: only one packet is
fetched per cycle, so nothing can slide into them.

**A gap in the rule, and the filler NOP.** For a class with only two ways,
an instruction can find no acceptable slot even in an empty packet. This
happens when its leading ways are frontend 0 / backend 1 or frontend 1 /
backend 0. Every slot it passes becomes a NOP of its own class, so slot *s*
always means backend way *s*, and both candidates are ruled out. The greedy
rule does not cover this case. Here a filler NOP of the **ALU** class is
put below the instruction. That NOP moves the frontend way without taking a
way of the instruction's class:

| leading ways (frontend / backend) | trailing packet | trailing ways |
|---|---|---|
| 0 / 1 | ALU NOP, instruction | 1 / 0 |
| 1 / 0 | own-class NOP, ALU NOP, instruction | 2 / 1 |

So two ways per class are always enough for full diversity. `out_fallback`
(the top's `ev_fallback`) reports that a filler was used. An ALU never needs
one, because it has four ways.

With the leading-thread model in the end-to-end testbench, every trailing
instruction uses another frontend way than its leading copy. It also gets
another backend way, if its packet issues whole and alone.

The shuffle is combinational: one output packet per cycle. An unsplit
packet passes through in the cycle it arrives.

## Trailing execution out of program order

The trailing thread arrives in leading **issue order**. Two pieces of
hardware let it run correctly anyway.

**Double renaming (`trail_rename`).** In issue order, several live ranges
of one logical register can overlap, so logical names no longer identify
producers. The leading physical names still do. The trailing renamer is
therefore a table indexed by *leading physical register*:

* a source reads the trailing register installed for its leading physical
  source;
* a destination installs a new trailing register, supplied by the core's
  free list, for its leading physical destination.

The table has 576 rows instead of 64. Instructions of one packet are
independent, so there is no bypass between slots. This renamer frees
nothing, because it does not see program order.

**Virtual allocation (`vidx_map`, `trail_active_list`).** The active list
and LSQ keep a reference pair: the head's virtual index and its physical
index. An instruction whose virtual index is *j* past the head's gets the
physical entry *j* past the physical head. If *j* is not smaller than the
structure, the fetched packet waits (`ev_alloc_stall`). Instructions fetched
early leave holes for older ones that arrive later. Commit retires complete
entries from the head strictly in program order.

**Loads** read their value from the LVQ by their virtual LVQ index, not in
FIFO order, and the LVQ compares the load address. Only the leading thread
touches the data cache.

## Checks at trailing commit

Three checks run on each committing trailing instruction.

* **Stores** (`store_checker`). A leading store waits in the 64-entry
  store buffer. It goes to memory only if the trailing store has the same
  address and data; otherwise `err_store`. Register values are never
  compared: a wrong value eventually reaches a store.
* **Dependences** (`commit_rename_check`). The issue order and rename maps
  were borrowed from the leading thread. A fault there would mislead both
  copies alike. A second rename table, indexed by logical register and
  updated in program order, gives the trailing register each source
  *should* have read. A difference raises `err_dep`. The destination then
  installs its own trailing register, and the mapping it replaces is freed
  (`tfree_*`). This is the only place trailing registers are freed.
* **Program order** (`pc_order_check`). The trailing thread copies whatever
  the leading thread committed. So a dropped, repeated or wrong instruction
  would be copied too. Each committed PC must be the previous PC + 4, or the
  previous branch's target if that branch was taken (`err_pc`). The outcome
  and target come from the trailing thread's own execution of the branch.

The LVQ address check raises `err_lvq`. Each `err_*` output pulses once
per detection; `err_any` stays set until reset.

## Connecting it to a core

All ports are plain signals or packed structs from `bj_pkg`. The core must
provide the following.

**Leading issue**

* Raise `lead_issue_valid` on lanes 0..n−1 for the instructions issued
  this cycle, and only while `lead_issue_ready` is high.
* Keep the returned `lead_issue_idx` with each instruction.
* Report wrong-path instructions that were already allocated on
  `lead_squash_*`.

**Leading commit**

* Program order, lanes 0..n−1.
* Give the `dtq_rec_t` record (the `v_*` fields are filled in here) and,
  for loads and stores, the address and the loaded value or store data.
* Commit only while `lead_commit_ready` is high. It drops when the LVQ or
  the store buffer is full.

**Trailing dispatch**

* Accept the packet on `tf_*` with `tf_ready`. Slot *s* is frontend way
  *s*; NOP slots must occupy their way through writeback.
* `tf_tsrc*` / `tf_tdst` are the trailing physical registers.
* `tf_al_idx` and `tf_lsq_idx` are the entries to use.
* Offer four free registers on `tpreg_new` with `tpreg_avail`. Those with
  `tf_need_preg` set are consumed when the packet is taken.
* Drive the trailing LSQ head (`lsq_head_v`, `lsq_head_p`).

**Trailing backend**

* Report completions on `tc_*`: branch outcome and target, store address
  and data.
* Look up load values on `tl_*`.
* Return `tfree_*` registers to the free list.
* `mem_*` carries the checked stores.

**`drain`** lifts the slack gate so the last packets can flow, for example
at program end.

The per-thread payload RAMs of the issue queue (`pl_*`) sit in the top so
that the leading and trailing copies never share a payload entry.

## Parameters

| parameter | default | from |
|---|---|---|
| `W` (fetch/issue/commit width, ways) | 4 | BlackJack configuration |
| `DTQ_DEPTH` | 1024 | BlackJack configuration |
| `SLACK` (instructions) | 256 | BlackJack configuration |
| `AL_SIZE` | 512 | BlackJack configuration |
| `LSQ_SIZE` | 64 | BlackJack configuration |
| `LVQ_DEPTH` | 128 | BlackJack configuration |
| `SB_DEPTH` (store buffer) | 64 | BlackJack configuration |
| `IQ_SIZE` (payload RAM entries) | 32 | BlackJack configuration |
| way counts per class | 4 / 2 / 2 / 2 / 2 | BlackJack configuration (2 MEM = 2 cache ports) |
| `TFQ_DEPTH` (fetch queue, packets) | 16 | this design |
| `NUM_LREGS` / `NUM_PREGS` | 64 / 576 | this design (32+32 logical; 64 + 512) |
| data/address width, instruction word | 64 / 32 bits | this design |
| virtual index width | 16 bits | this design |

`LVQ_DEPTH` must be a power of two. Register and width constants live in
`bj_pkg`.

## Design choices beyond the published scheme

* The DTQ squash path, and storing the PC in each DTQ entry.
* Virtual LVQ indices: loads look up the LVQ by index and check the address.
* The backend-way bound and the filler NOP of the ALU class in safe-shuffle.
* Slack is counted in real (non-NOP) instructions between leading commit
  and trailing fetch, and `drain` lifts it.
* Reset state: leading logical register *r* is leading physical register
  *r*, and trailing register 64 + *r*.
* Commit width 4 for the trailing thread. The dependence check chains
  sources through older instructions of the same commit group.
* A store that fails its check is not written to memory.
* Way classes: branches run on ALU ways, and integer divide shares the MUL
  ways.

## Left to the core, and not built

* **Issue queue and select logic.** They stay unmodified, as the scheme
  intends. Backend diversity holds when a trailing packet issues whole and
  alone. A real issue queue sometimes mixes a trailing packet with leading
  instructions or with another trailing packet. Those cases then lose some
  backend coverage, and nothing here detects that loss.
* **Branch outcome queue.** SRT-style designs pass leading branch outcomes
  to the trailing thread through one. Here the trailing thread fetches
  shuffled packets with no prediction at all, so nothing in this design
  consumes branch outcomes. The branches still execute, and
  `pc_order_check` verifies their outcomes.
* **Same physical register for both copies.** Both threads draw trailing and
  leading registers from one free list, so a pair can occasionally get the
  same register. The scheme accepts that small coverage loss, and so does
  this design.
* **Pipelining.** Shuffle is one combinational stage. It could be pipelined
  over the slack without any change in function.

## What is verified

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
compares against values computed independently in the testbench. Each was
also shown to fail against a deliberately broken copy of its module.

`tb_blackjack_top` runs the whole subsystem at its default sizes. It uses a
behavioural core model:

* a leading thread doing dataflow issue, with frontend and backend way
  assignment, wrong-path squashes and a shared free list;
* a trailing backend with random latencies and stalls.

A clean 3000-instruction program checks these properties:

* frontend diversity on every instruction;
* backend diversity on every instruction, for packets that issue whole and
  alone (the way is worked out from the slot positions);
* trailing sources equal to the trailing destinations of the true producers;
* LVQ values;
* in-order trailing commit;
* every store released once, in order, with the right address and data;
* no false error.

Four more runs each inject one fault, and each fault is caught by its own
check:

* a corrupted rename map in a DTQ record;
* a wrong trailing store value;
* a wrong committed PC;
* a wrong trailing load address.

The testbench also requires that splits, NOP insertion, filler NOPs, slack
stalls, trailing allocation stalls, leading commit stalls and squashes all
occur.

Not covered: the core itself, so timing interactions such as how often
trailing packets really issue whole and alone in a real issue queue are not
modelled here.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl +libext+.sv rtl/bj_pkg.sv \
    tb/tb_blackjack_top.sv --top-module tb_blackjack_top -o sim
./obj_dir/sim
```

Swap in any other `tb/tb_*.sv` and its top module name to run a block test.
Each test prints `TB_RESULT checks=<n> failures=<m>` and finishes by itself.
