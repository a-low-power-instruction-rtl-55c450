# History-based tag-comparison instruction cache

In a direct-mapped instruction cache the tag array is read and compared on
every fetch, in parallel with the data read. Once the data array is split
into word-wide subbanks, so that a fetch only activates one small subbank,
the tag access becomes a large share of the cache energy: roughly a third
of the total for 32-bit words and about half for 64-bit words.

This RTL removes most of those tag accesses. It relies on one fact about
programs: they spend their time in loops, so the same stretches of code are
fetched again and again. If a stretch of code was fetched before, and no
cache miss has happened since, every line of it is still in the cache. The
cache can then deliver the indexed line without reading or comparing the
tag. The front end keeps this history as **execution footprints**: two
extra bits in every branch target buffer (BTB) entry. A one-bit
**TCO (tag-comparison omit)** flag tells the cache when it may skip the
comparison.

The design is a complete single-issue fetch front end: PC and next-PC
selection, a 512-set 4-way BTB with footprints, a 2048-entry branch
prediction table, the TCO flag and a 32 KB direct-mapped cache with 32-byte
lines. These sizes are the defaults. The design is written in synthesizable
SystemVerilog.

## Dynamic basic-blocks and the two footprints

A *dynamic basic-block* is the run of instructions fetched between two
control-flow points: it starts at a branch target (or just after a branch
that was not taken) and ends at the next branch that the BTB knows about.
Each BTB entry describes the two blocks that can follow its branch:

| bit | meaning when 1 |
|-----|----------------|
| RCT (resident in cache, taken) | the block starting at this entry's target has been fetched in full since the last erase |
| RCN (resident in cache, not taken) | the fall-through block after this branch has been fetched in full since the last erase |

The footprints are used like this:

* **Use.** When a fetch hits in the BTB, the prediction chooses the next PC.
  The same prediction chooses a footprint: RCT if the branch is predicted
  taken, RCN if not. That footprint is copied into TCO. From the next fetch
  on, until the next BTB hit, the cache compares tags only when TCO is 0.
* **Set.** When the core reports that the branch went taken, RCT is set;
  when it went not taken, RCN is set. From that moment the block that
  follows is being fetched. Any miss during that block erases the
  footprint again, so a footprint that survives to the next visit proves
  the block is resident.
* **Erase.** Every line fill erases *all* footprints in the BTB and resets
  TCO, because the evicted line may belong to any block. Every BTB
  allocation does the same. A new entry splits a block, which is harmless,
  but the entry it evicts may have ended a block. Without that entry the
  block now runs on past its old end, into code that nobody has checked.

A block can run on past a branch that is not in the BTB. If that branch is
actually taken, the core reports it, the BTB allocates an entry for it, and
that allocation erases everything. So a block can never silently follow an
unrecorded taken branch.

## What this design adds to the method

The method says when footprints are set and erased. It says nothing of a
pipeline where branches are resolved some cycles after they are fetched.
This front end closes those gaps with the following rules. They are the
part of the RTL that needs the most care when changing it.

1. **Footprints are set at resolution, guarded by an epoch.** An 8-bit
   epoch counter is incremented on every fill and every BTB allocation.
   Each fetched instruction leaves with the current epoch in its prediction
   record, and the core echoes the record back with the resolution. A
   correctly predicted branch sets its footprint only if the epoch is
   unchanged, meaning nothing was erased while the branch was in flight.
   Otherwise a fill between fetch and resolution could be "forgiven" by a
   later set.
2. **A misprediction redirects the PC and resets TCO.** The footprint
   loaded at the mispredicted fetch described the wrong path. The footprint
   of the real direction is then set at once, without the epoch test,
   because its block only begins at the redirect. Any miss from there on
   erases it as usual.
3. **Erase happens when the line is written, not when the miss is
   detected.** The epoch only moves on when the line is written. A
   correctly predicted branch that resolves while the refill is still
   pending passes the epoch test and sets its footprint, although its block
   may hold the very line the refill is about to evict. Erasing at write
   time removes that footprint together with all the others.
4. **Every allocation counts as a replacement**, including allocation into
   an invalid way. The new entry starts with RCT=1, because its branch has
   just been taken and the fetch is being redirected to its target. RCN
   starts at 0.

The 8-bit epoch is safe as long as fewer than 256 erasures happen while a
single branch is in flight. Each erasure costs at least one refill, so no
realistic core comes near that.

## Fetch timing

* One instruction is delivered per cycle on a hit (`fetch_valid`). The
  cache, BTB and prediction table are all read combinationally from the PC
  in the same cycle.
* On a miss the cache pulses `stats.miss`, then holds `mem_req` with the
  line address until the next level returns the whole 32-byte line in one
  cycle (`mem_resp_valid`). The line is written and footprints are erased in
  that cycle, and the same PC is fetched again in the next cycle. With a
  memory latency of L cycles, counted from the first cycle `mem_req` is
  high, the instruction arrives L+2 cycles after the miss cycle.
* The core resolves branches on `res`, in program order. A resolution may
  arrive in any cycle. If it is a misprediction, the instruction the cache
  delivers in that same cycle is dropped, and the PC moves to the correct
  address at the next edge. A core that resolves one cycle after delivery,
  like the one in the end-to-end testbench, therefore never sees a
  wrong-path instruction. A core that resolves later receives wrong-path
  instructions until the redirect and must discard them itself.
* There is no stall input from the core. The core must accept every
  delivered instruction.

## Modules

| file | role |
|------|------|
| `rtl/hbtc_pkg.sv` | address/instruction types, prediction record `pred_info_t`, resolution `resolve_t`, event strobes `stats_t` |
| `rtl/hbtc_frontend.sv` | top: PC, incrementer, next-PC multiplexer, epoch, misprediction handling, wiring |
| `rtl/hbtc_btb.sv` | set-associative BTB with RCT/RCN bits in flip-flops (one-cycle flash erase), true LRU |
| `rtl/hbtc_tco.sv` | TCO flag: loads RCT or RCN by prediction, clear has priority |
| `rtl/hbtc_icache.sv` | direct-mapped cache with tag-comparison enable, word-wide data subbanks (one read per fetch) and refill FSM; optional interline omission |
| `rtl/hbtc_bpt.sv` | direct-mapped table of 2-bit saturating counters |

### Top-level ports (`hbtc_frontend`)

| port | dir | meaning |
|------|-----|---------|
| `fetch_valid`, `fetch_pc`, `fetch_instr` | out | delivered instruction |
| `fetch_pred` | out | prediction record: BTB hit, predicted taken, predicted next PC, epoch |
| `res` | in | branch resolution: `valid`, `pc`, `taken`, `target`, and the `pred` record of that branch, unchanged |
| `mem_req`, `mem_addr` | out | refill request (level, held until answered) and line address |
| `mem_resp_valid`, `mem_resp_data` | in | one-cycle line return |
| `tco` | out | the current TCO flag |
| `stats` | out | one-cycle strobes: access, tag compare, miss, fill, BTB replacement, redirect, TCO loaded with 1 from RCT / from RCN |

A misprediction is detected by comparing the actual next PC (target if
taken, otherwise PC+4) with the `next_pc` in the echoed record. So the core
only reports branches and jumps. Non-branch instructions never hit the BTB,
because its tag covers the full address.

### Parameters

| parameter | default | notes |
|-----------|---------|-------|
| `CACHE_BYTES` | 32768 | power of two |
| `LINE_BYTES` | 32 | power of two, at least 4 |
| `INTERLINE` | 0 | 1 also skips the comparison when a fetch stays in the line of the previous delivered fetch and no fill happened since |
| `BTB_SETS`, `BTB_WAYS` | 512, 4 | ways up to any power of two; LRU ages are log2(WAYS) bits |
| `BPT_ENTRIES` | 2048 | power of two |
| `RESET_PC` | 0 | first fetch address |

`INTERLINE=1` combines the footprint scheme with interline omission, the
older technique that skips the comparison for fetches within the same line.
The main configuration leaves it off.

## Choices not fixed by the method

* Prediction table: 2-bit saturating counters, reset to weakly not-taken,
  indexed by the word address. A fetch is predicted taken only when it hits
  in the BTB *and* its counter says taken.
* BTB: entries are allocated only for taken branches; true LRU replacement;
  set index from the word address; the target is stored as a word address.
* The cache refills a whole line in one transfer. Tag and data arrays have
  no reset, but valid bits do. When the comparison is skipped, neither the
  tag nor the valid bit is consulted.
* Not built: a return address stack. Returns are predicted through the BTB
  like any other jump. The processor core and the memory below the cache
  are outside this design and appear only as ports.

## Trust and limits

* Safety means that no omitted comparison ever returns a wrong line. It is
  checked end to end. The test programs place code on conflicting cache
  lines, and every delivered word names its own address, so a stale line
  is caught at once. Each safety rule has a test that fails when the rule
  is removed from the RTL:

  | rule removed | testbench that then fails |
  |--------------|---------------------------|
  | erase on fill | `tb_hbtc_frontend`, `tb_hbtc_epoch` |
  | erase on BTB allocation | `tb_hbtc_replace` |
  | epoch test on footprint set | `tb_hbtc_epoch` (first system) |
  | erase at line write instead of at miss detection | `tb_hbtc_epoch` (pending-refill system) |

* `tb_hbtc_stress` runs six random 48 KB programs, each on four front ends
  (`INTERLINE` 0 and 1; resolution 1 or 9 cycles after delivery), for
  200,000 cycles. That is about 3.9 million checked instructions in all. No stale
  instruction has been seen. Random programs rarely line up the exact timing
  that the epoch and write-time rules guard against, which is why those two
  rules have their own directed test.
* `tb_hbtc_compare` runs the test program for 60,000 cycles with a memory
  latency of 6 and counts tag comparisons. The counts are relative to a
  cache that compares on every access, misses included:

  | scheme | tag comparisons |
  |--------|-----------------|
  | compare always | 1.000 |
  | interline only (counted from the fetch stream) | 0.193 |
  | footprints (`INTERLINE=0`, the default) | 0.335 |
  | footprints + interline (`INTERLINE=1`) | 0.065 |

  These numbers depend entirely on the program. This one is deliberately
  hostile: three passes in four run through code that evicts two lines of
  the main loop. The benchmark-level savings claimed for the method were
  not reproduced here, because that needs a processor model and real
  programs.
* Energy is not modelled. `stats.tag_cmp` marks the cycles in which the tag
  array is read, and a power flow would use that as the tag array's read
  enable.
* The BTB and prediction table lookups are combinational reads of large
  arrays. A real implementation at speed would pipeline them, and the
  footprint rules above would then need the same in-flight care as the
  branch resolution.

## Simulation

Each testbench in `tb/` checks its own results and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_hbtc_bpt` | counter training against a reference table, saturation, aliasing |
| `tb_hbtc_tco` | RCT/RCN selection, hold, clear priority, random against a reference |
| `tb_hbtc_btb` | lookups, allocation/LRU against a recency-list reference, footprint set and erase rules |
| `tb_hbtc_icache` | hit/miss and data against a reference, miss penalty L+2, skipped comparison returns the indexed line, interline behaviour |
| `tb_hbtc_frontend` | whole front end at default sizes running a loop program: correct instruction stream, one fetch per cycle outside misses and redirects, every mechanism exercised, most comparisons skipped |
| `tb_hbtc_compare` | the same program on the main configuration and on `INTERLINE=1`; prints tag comparisons relative to comparing on every fetch |
| `tb_hbtc_stress` | random programs larger than the cache, 24 front ends side by side, every fetch checked |
| `tb_hbtc_replace` | a chain of taken jumps that keeps evicting BTB entries which end blocks; every fetch checked |
| `tb_hbtc_epoch` | late branch resolution: fills between fetch and resolution, and resolution during a pending refill |

`tb/hbtc_tb_prog_pkg.sv` defines the test programs as functions of the
address. Each word names its own address, and branches encode their trip
count and target. The programs are the loop program with a cache-conflict
region and a jump chain that overflows one BTB set; random programs drawn
from a hash of the address; and the small directed programs of the
replacement and epoch tests. `tb/hbtc_mem_model.sv` is the behavioural
memory. `tb/hbtc_tb_core.sv` is a behavioural core used by the compare,
stress, replace and epoch tests. It checks every delivered instruction and
resolves each branch a set number of cycles (`RES_DELAY`) after delivery,
in program order. Instructions delivered after a mispredicted branch, and
before its resolution, are wrong-path: the core drops them without
resolving them. To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hbtc_pkg.sv tb/hbtc_tb_prog_pkg.sv rtl/hbtc_*.sv tb/hbtc_mem_model.sv \
  tb/hbtc_tb_core.sv tb/tb_hbtc_frontend.sv --top-module tb_hbtc_frontend -Mdir obj -o sim
./obj/sim
```

Substitute the testbench name for the others. The unit testbenches need
only the package and their module. All of them finish in a few seconds.
