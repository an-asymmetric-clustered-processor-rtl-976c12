# Asymmetric clustered integer back end, driven by value content

Most integer values a program computes are small, and most address
calculations only change the low bits of an address. This design exploits
that. It splits the integer execution core into two clusters:

- a **wide (slow) cluster**: 64-bit, two ALUs, conventional clock;
- a **narrow (fast) cluster**: 20-bit, one ALU, **twice the clock rate**.

A 20-bit adder and a 20-bit register file are small enough to run at double
speed. Instructions whose operands and results fit in 20 bits therefore run
in the fast cluster, and so do chains of dependent ones. Everything else runs
in the wide cluster. Which cluster an instruction belongs to is predicted
per PC, checked against what is already known about its operands, and
repaired by replaying in the wide cluster when the guess was wrong.

Addresses normally need 64 bits, but a load or store usually adds a small
offset to a base whose upper bits stay put. The design keeps those upper
44 bits in a tiny side file of **address registers**. A fast-cluster load or
store then only adds the low 20 bits. The same address-register number also
selects an entry of a small **level-0 TLB**, so the translation is ready with
the address.

The RTL covers the integer back end, from the moment a renamed instruction
is handed over until its result is written back. Fetch, decode, renaming,
the reorder buffer, caches, the level-1 TLB and the floating-point side are
outside; their signals are ports of the top module `asym_cluster_core`.

The design follows the paper "An Asymmetric Clustered Processor based on
Value Content". Where this RTL differs from that paper, or fills in what it leaves open, the difference is
listed under [Departures from the paper](#departures-from-the-paper).

## Two clusters on one clock

Both clusters run on the single clock `clk`, which is the fast clock. The top
generates `slow_ce`, which is high every second cycle. Every flip-flop of the
wide cluster only updates when `slow_ce` is high. This models two synchronous
clocks in a 2:1 ratio without a second clock domain. All cycle counts below
are **fast cycles** unless they say otherwise.

Anything that moves between the clusters passes through an `icc_pipe`
delay line of `ICC_LAT` fast cycles. The default is 4, which is 2 slow
cycles. Four kinds of traffic cross:

- values from fast to wide (`n2w`);
- values and type updates from wide to fast (`w2n`, one per wide lane);
- mis-predicted instruction payloads from fast to wide (replay);
- Addr-entry evictions, so that stale pointers are demoted a second time
  after all in-flight updates have landed (see below).

Each cluster has its own availability vector with one bit per physical
register (`avail_n`, `avail_w`). A bit is cleared when an instruction that
writes that register is dispatched. It is set when the value is present in
that cluster's register file. An issue-queue entry is ready when the bits of
its sources are set. This works like a tag broadcast, but is
easier to read.

## Value types and the three register files

Every physical register (128 of them) exists in both clusters:

| File | Width | Where | Holds |
|---|---|---|---|
| Long (`long_regfile`) | 64 b | wide cluster | every value, full width |
| Simple (`simple_regfile`) | 20 b | fast cluster | the low 20 bits |
| Register descriptor (`reg_descriptor`) | 2 b + 3 b | shared | type and Addr pointer |

The descriptor tells what the 20-bit copy means:

- **Simple**: the value is the sign extension of its low 20 bits (bits 63..19
  all equal). The Simple file holds the whole value.
- **Addr**: the low 20 bits are in the Simple file. The upper 44 bits are in
  the address-register entry selected by the pointer `PTR = value[19:17]`.
- **Long**: only the Long file has the value. The fast cluster cannot use it.

Writes from the fast cluster into the Long file are sign-extended, so a
Simple value reads the same from both files.

The descriptor is the single source of truth for the fast cluster. It is
written:

- by the fast cluster, for its own results (always Simple);
- on a fast-cluster mis-prediction (the destination becomes Long);
- by wide-cluster results after `ICC_LAT`, with the type they were
  classified as;
- by load returns, classified the same way;
- by a wide-cluster base check, which retypes a load or store's base
  register as Addr.

## Classifying a 64-bit value

`value_classifier` runs on every wide result and every load return:

1. If bits 63..19 are all equal, the value is **Simple**.
2. Otherwise its bits 19..17 select an address-register entry. If that entry
   is valid and holds the value's bits 63..20, the value is **Addr**.
3. Otherwise it is **Long**.

For Simple and Addr values the low 20 bits are sent to the fast cluster
together with the type. For Long only the type is sent. For loads, the data
cache returns to both clusters at the same time, so load values are written
to both files directly.

## Address registers — the hard part

`addr_regfile` holds 8 entries. Each entry has 44 upper address bits, a
valid bit, a use bit and an idle counter. It is direct-mapped: the entry for
an address is fixed by address bits 19..17. Entries are written in only one
way: when a load or store executes in the **wide** cluster, its base
register is checked against the file (the *base check*):

- **Match:** the entry's use bit is set.
- **Empty entry, or a valid entry that has never been used:** the entry is
  overwritten with the base's upper bits. It becomes valid with use clear.
- **Used entry with other upper bits:** nothing happens. The base stays
  Long.

After a match or a write, the base register is retyped Addr. The update
travels to the fast cluster, so the next load or store through that pointer
can run narrow. Lookups by the classifier and reads by fast-cluster loads
also set the use bit. On every slow cycle the idle counter of each used
entry counts up. A counter is cleared when its entry is touched. An entry
that stays untouched for `FREE_PERIOD` slow cycles is freed. The default is
256, twice the size of the reorder buffer.

**Why replacement is dangerous.** A register typed Addr does not hold its
upper bits itself. It points at an entry. If that entry is rewritten or
freed, the register would silently take on a different address. The design
guards against this in three layers:

1. **Demotion.** When entry *i* is replaced or freed, `evict[i]` pulses for
   one cycle. Every register descriptor that is Addr with `PTR == i` turns
   Long in that cycle (`demote_mask`). The Long file always has the full
   value, so nothing is lost; the register just stops being usable in the
   fast cluster.
2. **Late demotion.** A result classified Addr just before the eviction may
   still be in flight toward the descriptor. So the eviction pulse also goes
   through an `icc_pipe` and demotes once more after `ICC_LAT` cycles.
3. **Guard window.** For `GUARD` cycles after entry *i* changes (the top
   sets `ICC_LAT + 3 = 7`), `recent[i]` is high. A fast-cluster load or store
   that reads that entry in this window treats it as a mis-prediction and
   replays in the wide cluster, where the full 64-bit base is used. This
   covers an instruction that had already read its descriptor before the
   demotion.

A fast-cluster load or store whose Addr entry is invalid is also replayed.
So is one where adding the offset carries out of, or borrows into, bit 20:
the address then leaves the region described by the entry.

## The level-0 TLB

`l0_tlb` is direct-mapped by the same pointer field, so it has one entry per
address register. An address register covers a 1 MB region (20 low bits). A
page is 32 KB. The TLB entry therefore keeps the two page-number bits in
between (VA[16:15]) as a tag, plus the physical page number and 4 attribute
bits.

The fast cluster looks it up in the same cycle as its 20-bit address add. A
hit sends the request out with `pa_v` set and the physical address
attached. A miss sends the virtual address only.

Fills come from the level-1 TLB through `tlb_fill_*`. A fill is accepted
only if the entry's address register currently holds the fill's upper bits
and did not change within the guard window. An entry is invalidated
whenever its address register is replaced or freed. Wide-cluster loads and
stores do not use the level-0 TLB.

The TLB has as many entries as there are address registers. With 16
address registers the pointer is bits 19..16 and the tag is VA[15]. With 32
the pointer is bits 19..15, each region is exactly one page, and no tag is
needed. `tb_l0_tlb_sizes` runs 8, 16 and 32 entries on one synthetic
address stream. The stream jumps between 12 regions and drifts within them.
The three sizes translate 88%, 91% and 98% of its lookups. These figures
describe that stream only; they are not a benchmark result.

## Steering: prediction and correction

`cluster_predictor` is a table of 4096 one-bit entries, indexed by PC[13:2]
with no tag. 1 means narrow. It is read at fetch (`fetch_*`), and the result
comes one cycle later. The front end carries it with the instruction and
presents it at dispatch. It resets to all-wide. Each completing instruction
writes back whether it fitted the narrow cluster:

- **ALU ops:** sources and result all Simple, and not a multiply.
- **Loads and stores:** the base was Simple or became Addr.

There is one update port per completion lane (3).

The table size is the `PRED_ENTRIES` parameter of the top (any power of
two). `tb_predictor_sizes` runs 1K, 2K, 4K, 8K and 16K entries on one
synthetic stream of 3000 static instructions. On that stream, aliasing
lowers accuracy from 92% at 16K to 81% at 1K. The figures describe the
stream, not real programs.

At dispatch, `steer_unit` overrides a narrow prediction and sends the
instruction wide when any of these holds:

- a source that is already available is Long (the paper's rule);
- a non-memory op has an available Addr source (own rule: the narrow ALU
  cannot produce a 64-bit result);
- a second source that is already available is not Simple: an ALU
  operand or a store datum (own rule);
- the op is a multiply (own rule).

Sources that are not yet available cannot be checked. Those cases are
caught later, as mis-predictions.

## When the fast cluster is wrong: replay

The fast pipeline has three stages: issue, register read, execute. In
register read it sees the descriptors. It flags a **mis-prediction** when:

- a source is Long;
- a source of an ALU op is not Simple;
- the 20-bit result overflows, meaning it would differ from the 64-bit
  result;
- a multiply reaches the fast cluster;
- an Addr-based address carries or borrows out of 20 bits;
- the Addr entry is invalid or recently changed.

A mis-predicted instruction is not finished in the fast cluster:

1. Its destination descriptor is set to Long. The destination is marked
   available in the fast cluster, so local dependents issue, see Long and
   mis-predict too. The whole dependent chain moves over.
2. Its payload goes through the inter-cluster pipe into the wide cluster's
   `replay_buffer`, an 8-entry FIFO.
3. The buffer's head has priority over the issue queue on wide lane 0, as
   soon as its sources are available in the Long file.

To keep the buffer from overflowing, the top counts payloads buffered, in
the inter-cluster pipe, and leaving the fast cluster this cycle. It holds
fast-cluster issue (`hold`) when that total plus 2 reaches the buffer depth.
The 2 covers the instructions already past issue.

## Pipeline timing

| Event | When |
|---|---|
| Predictor result | 1 cycle after `fetch_valid` |
| Dispatch | 1 instruction per fast cycle when `disp_ready` |
| Fast cluster: select → result / request / replay out | 2 fast cycles |
| Fast result usable by a fast dependent | issues the cycle after the write |
| Fast result in the Long file | + `ICC_LAT` |
| Wide cluster: select → write-back | 2 slow cycles (register read, execute) |
| Wide result in the Simple file and descriptor | + `ICC_LAT` |
| Mis-prediction → payload in replay buffer | + `ICC_LAT` |

There is no bypass network in either cluster. A dependent waits until the
value is in its register file.

## Top-level interface

All ports are plain signals or packed structs from `acp_pkg`:

- `uop_t`: id, pc, op, destination and two sources with valid bits, 16-bit
  immediate. Physical register tags are 7 bits.
- `memreq_t`: id, store flag, destination, VA, PA with valid, store data.

| Port group | Direction | Use |
|---|---|---|
| `clk`, `rst_n` | in | fast clock, active-low asynchronous reset |
| `slow_ce` | out | slow-cycle enable, for the environment |
| `fetch_valid/pc`, `fetch_pred_narrow` | in / out | predictor lookup |
| `disp_valid/uop/pred_narrow`, `disp_ready` | in / out | renamed instruction |
| `nmem_valid/req`, `wmem_valid/req` | out | loads/stores from the fast / wide cluster |
| `ld_valid/tag/data` [2] | in | load returns from the data cache |
| `tlb_fill_valid/va/ppn/attr` | in | level-1 TLB fills of the level-0 TLB |
| `done_valid/id` [3] | out | completions for the reorder buffer (loads complete by their return) |
| `ev` | out | one-cycle event strobes (`acp_events_t`) for counting |

The environment must do its own renaming. It must not reuse a physical
register while an older instruction may still read it, nor within
`ICC_LAT` cycles after such a read. A wide-cluster base check sends a
late type update for the base register, and that update must not land on
the register's next value. Stores are reported done when their request is
issued.

Supported operations: add, sub, and, or, xor, three shifts, add-immediate,
multiply (wide only), load, store. The paper does not define an operation
set; this one is a small Alpha-like integer subset.

## Departures from the paper

- **Dispatch width.** One instruction per fast cycle (two per slow cycle)
  instead of four per cycle. The shared front end is outside this design.
- **No bypass network.** This adds latency to every dependent chain.
- **One descriptor copy.** The paper replicates the descriptor in each
  cluster. Here there is one copy, and wide-cluster writes to it are delayed
  by `ICC_LAT`, which gives the same timing as a remote copy.
- **One Addr file.** The paper keeps a copy of the address-register file
  in each cluster, both written from the wide cluster. Here one copy is
  shared. Fast-cluster reads see a wide-cluster write at once rather than
  after the inter-cluster latency; the guard window covers that gap.
- **Demotion and guard window.** The paper leaves open how registers
  pointing at a replaced Addr entry are handled. The three-layer scheme above
  is this design's own.
- **Who writes the Addr file.** The paper's write-back rule could be read as
  letting any result allocate an entry. Here only wide-cluster load/store
  base checks write entries, as the paper's description of the Addr file
  states. A result only becomes Addr by matching a valid entry.
- **Simple test.** Bits 63..19 must be equal (20-bit two's complement). The
  paper's phrasing ("upper 44 bits all 0 or all 1") would not sign-extend
  back correctly for values with bit 19 different from bit 20.
- **Free period.** Exactly 256 slow cycles, taken from "proportional to 2x
  the ROB size".
- **Extra steering rules.** A multiply always goes wide. So does an ALU op
  with an available Addr source, and any op whose available second source
  (ALU operand or store datum) is not Simple.
- **Port counts.** The Addr file has one lookup per classifier (4), one base
  check and one fast read. That is more read ports than the paper's.
- **Sizes fixed in the package.** Narrow width `NW` = 20 and Addr file
  size `NADDR` = 8 are constants in `acp_pkg`. Setting `NADDR` to 16 or 32
  gives the paper's 16- and 32-entry level-0 TLBs; the end-to-end
  testbench passes unchanged at both sizes. The paper evaluated 8-, 12- and
  16-bit widths only for symmetric clusters. Those widths are not
  supported here: the pointer and tag fields assume bit 19 is the top
  narrow bit. Predictor size, queue depth, replay depth, inter-cluster
  latency and free period are parameters of the top. A 0-cycle
  inter-cluster latency cannot be set.
- **Mis-prediction penalty.** The paper evaluates 0 and 2 cycles. Here the
  penalty is not a parameter; it follows from the pipeline (detection after
  2 fast cycles, `ICC_LAT`, then a free replay slot).
- **Physical address and attributes.** 44 physical address bits and 4
  attribute bits are assumptions; the paper gives neither.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>` and finishes. A watchdog stops it if it
hangs. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
    rtl/acp_pkg.sv tb/tb_asym_cluster_core.sv \
    --top-module tb_asym_cluster_core -Mdir obj_core -o sim
./obj_core/sim
```

Replace the testbench name for any other one. The package must be listed
first; the other modules are found through `-y rtl`.

| Testbench | What it exercises |
|---|---|
| `tb_asym_cluster_core` | End to end. A pointer-chasing integer loop with a model of renaming, the data cache (6-cycle load latency) and the level-1 TLB. It checks every memory request, every completion and the final register values. It also checks that each mechanism fires at least once: narrow steering, correction, mis-prediction and replay, address overflow, Addr typing, eviction, level-0 TLB hits and misses. `FREE_PERIOD` is shortened to 24 so that evictions occur. It prints the share of instructions completed in the fast cluster (about a third on this program, which is built to exercise every path rather than to be typical), narrow predictions corrected and replayed, and the share of loads/stores translated by the level-0 TLB. |
| `tb_acp_full` | The same program with every parameter at its default. |
| `tb_predictor_sizes` | Predictor at 1K to 16K entries on one instruction stream. It checks every prediction against a model and prints the accuracy. |
| `tb_l0_tlb_sizes` | Level-0 TLB at 8, 16 and 32 entries on one address stream. It checks every lookup and prints the fraction translated. |
| `tb_<block>` | One per block. Randomised stimulus against a reference model in the testbench: `tb_cluster_predictor`, `tb_steer_unit`, `tb_reg_descriptor`, `tb_simple_regfile`, `tb_long_regfile`, `tb_addr_regfile`, `tb_l0_tlb`, `tb_value_classifier`, `tb_narrow_alu`, `tb_wide_alu`, `tb_issue_queue`, `tb_replay_buffer`, `tb_icc_pipe`, `tb_fast_cluster`, `tb_slow_cluster`. |

The end-to-end testbench reads internal state through hierarchical
references (`dut.u_long.mem_q`, `dut.u_rd.vt_q`, ...) for its final checks.

## Files

`rtl/acp_pkg.sv` holds the widths, enums and structs. Every other file in
`rtl/` holds one module, and each begins with a comment on its function,
interface and timing. The hierarchy is:

```
asym_cluster_core
├─ cluster_predictor, steer_unit, reg_descriptor
├─ simple_regfile, long_regfile, addr_regfile, l0_tlb
├─ value_classifier ×4 (two wide lanes, two load ports)
├─ icc_pipe ×5 (n2w, replay, w2n ×2, evict)
├─ fast_cluster ─ issue_queue, narrow_alu
└─ slow_cluster ─ issue_queue, replay_buffer, wide_alu ×2
```
