# A branch-prediction front end that does not need the whole global history

Big history-based predictors such as TAGE are accurate but slow. They also
assume that every branch outcome adds information to the global history.
This front end uses the fact that most branches are predictable to drop
that assumption in two places.

1. **Ahead prediction with a secondary tag.** The TAGE lookup for a branch
   starts five branches early, using the PC and history available then. A
   three-cycle predictor can therefore keep up with one branch per cycle.
   The five branches in between are unknown when the lookup starts. Earlier
   ahead predictors read out one prediction per possible outcome of those
   branches, 2^5 of them per table. Here every table entry carries a short
   *secondary tag* that names the path it was trained on. Each table still
   reads a single entry. The TAGE longest-match selection is then repeated
   once per secondary-tag value. That gives 32 prediction bits per lookup.
   When the branch is fetched, a hash of the actual path selects one of them.
2. **Pruned global history.** A prediction packet (the fetch group ending
   at a taken branch) that is known to be predictable does not push its
   bits into the 256-bit global history. The register then covers a much
   longer stretch of the program for the same size. Predictability is
   learned at retirement in small training tables. It is published to the
   fetch stage through separate *locked* tables, which change rarely, in
   batches. This keeps the history seen by other branches stable.

Everything is synthesizable SystemVerilog-2017. Shared types and sizes are in
`rtl/bp_pkg.sv`, and the top level is `bp_top`.

## Block map

```
bp_top
├── ahead_frontend            per-branch prediction, flush handling
│   ├── ahead_tage            3-cycle ahead TAGE, 21 history lengths in 30 banks
│   ├── pred_queue            133-entry queue of 32-bit prediction vectors
│   ├── missing_hist_hash     secondary tag of the fetched branch
│   ├── final_select          ahead prediction vs. single-cycle override
│   ├── sc_btb                1K-entry 4-way single-cycle BTB + counters
│   └── mc_btb                8K-entry 4-way BTB, 3-cycle latency
├── pruned_history            GHR / path history / backward counter
│   └── vpc_counter           global backward counter, forced updates
└── history_pruning_unit      which packets may skip the GHR
    ├── good_train_table  x2  training tables (PC path, CF path)
    ├── locked_table      x2  fetch-time lookup tables
    ├── divergence_sync   x2  batch copy training -> locked
    └── blacklist         x2  packets whose predictability is unstable
```

The out-of-order core is not part of this RTL. The signals it would drive
are ports of `bp_top`:

- `br_*`: the branch being fetched.
- `rs_*`: branch resolution, and misprediction flushes.
- `rt_*`: retirement of a prediction packet.

## Interface of `bp_top`

- **Fetch.** Present at most one branch per cycle with `br_valid`. Give its
  PC, its fall-through address, its kind (`br_cond`, `br_call`, `br_ret`,
  `br_jmp`) and `br_pkt_cond`, which says whether its packet already holds a
  conditional branch. The predictor answers in the same cycle:
  - `pred_dir` and `pred_src` give the direction and where it came from.
  - `pred_taken` and `pred_next` give the direction and address that fetch
    must follow.
  - `br_accept` means the branch was taken this cycle. When `stall` is high
    the branch must be presented again.
  - Four outputs must travel with the branch to its resolution: `br_ckpt`
    (history state plus queue pointers), `br_key` (the inputs of the
    lookup that predicted it), `br_stag` and `br_ahead_ok`/`br_ahead_dir`.
  - `br_skip` reports that the packet this branch ended left the global
    history unchanged.
- **Resolution.** Every branch comes back on `rs_*` with its carried state
  and its real outcome. This trains the TAGE tables and both BTBs. With
  `rs_mispred` set it is also a flush: the history and the queue return to
  the branch's checkpoint, and the branch is re-applied with its correct
  outcome. `rs_tage_pred` and `rs_long_hit` come back combinationally for
  the retirement bookkeeping.
- **Retirement.** For each retired packet, `rt_valid` carries:
  - its start PC and 8 path-history bits;
  - whether it held a misprediction;
  - whether a long-history table (132 or more history bits) provided a
    prediction in it;
  - its instruction count.
- **Mode.** `prune_en = 0` makes every taken packet update the history, as
  in a plain TAGE front end. `prune_en = 1` turns pruning on.
- **Reset.** After `rst_n` the TAGE tables are swept clear, one entry per
  cycle for 8192 cycles. `ready` stays low until then, and no fetch is
  accepted.

## Ahead TAGE and the secondary tag

This is the heart of the design and the part that is easiest to get wrong.

**Lookup.** The branch fetched now, B0, starts a lookup on behalf of B5,
the branch five fetches later. `ahead_tage` hashes B0's PC and the current
history into an index and a primary tag for each table:

- 6 short history lengths with 8-bit primary tags, sharing 10 banks;
- 15 long history lengths with 12-bit primary tags, sharing 20 banks;
- history lengths in a geometric series from 4 to 256 bits.

Every bank has 1K entries. A bank offset hashed from the VPC rotates the
history lengths of a group over its banks. One lookup therefore reads each
bank at most once, and a given history length is spread over all the banks
of its group rather than owning one.

Each entry is `{primary tag, secondary tag (5 b), counter (3 b), u (1 b)}`.
In cycle c the request is hashed and registered. In c+1 the tables are
read, and in c+2 the selections are made. The response appears in c+3 with
the queue entry id the request carried.

**Selection.** Selector *s*, for each s in 0..31, considers only the tables
whose entry matches the primary tag *and* holds secondary tag *s*. The
longest such table provides the direction; if there is none, the bimodal T0
does. The 32 results form the prediction vector.

**Resolving the vector.** When B5 is fetched, `missing_hist_hash` has seen
the next fetch addresses of B0..B4, and folds them into the 5-bit secondary
tag:

```
sel = 0
for each skipped branch, oldest first:
    sel = rotr1(sel ^ addr[6:2] ^ addr[11:7])
```

The same tag is used at training time. The predictor therefore learns
separately for each path that actually occurs after an ahead history. Most
ahead histories see only one to three such paths. Hashing addresses rather
than taken/not-taken bits lets indirect branches count, and keeps the tag
width independent of the ahead distance.

**Training.** Training happens at resolution. The branch brings back the
lookup inputs (`rs_key`) and its actual secondary tag, and the tables are
indexed exactly as at lookup time. Then the usual TAGE rules apply:

- The provider for that tag trains its counter (or T0's counter if there
  is no provider).
- When provider and alternate prediction differ, the u bit records whether
  the provider was right.
- A misprediction allocates an entry in a longer table, writing both tags.

A useful entry is never replaced. This holds even when it matches the
primary tag but belongs to another path. The allocation is then pushed to a
longer table ("promotion"). If every candidate is useful, their u bits are
cleared instead.

Among free candidates, a 16-bit LFSR picks the second free table instead of
the first, half of the time. Without it, several paths that share one index
can keep evicting each other from the same table in a fixed order, and a
branch with four such paths never settles.

## Prediction queue and flush recovery

`pred_queue` stores each 32-bit vector until its branch is fetched. Each
entry has a ready bit. Three pointers run around the 133 entries:

- **read:** the entry of the branch being fetched;
- **allocation:** the entry of the lookup just started, five entries ahead
  of the read pointer;
- **write:** the last entry filled by the predictor.

At reset the read pointer is 0 and the other two are 4. The first five
branches therefore find no ahead prediction and use the single-cycle
counter instead.

There are 133 entries because 128 branches can be in flight and 5 more are
ahead. An entry that a flush may return to is therefore never overwritten.

Each branch checkpoints the read and allocation pointers as they were
before its own fetch. When the branch is flushed, both pointers go back to
*checkpoint + 1*. The entries made before the branch survive, and so does
the lookup the branch itself started. Its successors' lookups, made on the
wrong path, are dropped.

The write pointer follows the allocation pointer. There is one exception
that this design adds: if the surviving lookup is still inside the
predictor, the write pointer stays one entry behind it, so the lookup can
still land. Lookups in flight at or after the new allocation point are
squashed in the TAGE pipeline.

The missing-history window is a 25-bit shift register of folded addresses.
It is checkpointed and restored in the same way. The flushed branch's
correct next address is then pushed on top of the restored window.

## Overrides, late predictions and the late flush

`final_select` picks the direction.

- **Override.** Normally the ahead prediction, selected by the secondary
  tag, decides. Each single-cycle BTB entry has a 3-bit override counter.
  It counts up when the entry's own 2-bit counter was right and the ahead
  prediction wrong, and down in the opposite case. When the counter is
  above 2, the single-cycle counter wins. This catches branches that many
  ahead histories lead to, which one PC-indexed counter predicts better.
- **Start-up.** With no ahead prediction, the single-cycle counter decides.
  With no BTB hit either, the branch is predicted not taken.

Fetch follows a taken prediction only if the single-cycle BTB has a target.
Otherwise it falls through. The 8K-entry multi-cycle BTB, looked up at the
same time, answers three cycles later. If it has the target of a branch
that was predicted taken but followed as not taken, a *late flush*
(`lf_valid`) redirects fetch to that target. The late flush uses the
branch's own checkpoints, like a backend flush but earlier.

**Late ahead predictions.** An ahead prediction is late if its queue entry
is allocated but not yet written when its branch arrives. The front end
then raises `stall` and the branch waits. With one branch per cycle, a
distance of five and a three-cycle predictor, this cannot happen on a
straight path: the lookup for B5 starts when B0 is fetched, and B5 comes at
least five cycles later. After a flush, the surviving entries were written
long ago. So the stall never fires in this configuration. The testbenches
count it but do not require it. The alternative for a late prediction is to
use the single-cycle prediction first and flush when the ahead prediction
arrives and disagrees. That alternative is **not** built.

## Pruned history

`pruned_history` keeps four things:

- the 256-bit GHR, to which 4 bits hashed from the branch PC and target are
  pushed per taken packet;
- a 27-bit path history, to which one bit is added per taken packet;
- the global backward counter;
- the start PC of the current packet.

A packet skips its GHR update when all of these hold:

- `prune_en` is set;
- the packet does not end in a call (calls always update);
- either the locked tables say the packet is predictable, or it ends in a
  return or direct jump and holds no conditional branch;
- the backward counter does not force the update.

The path history is always updated. It is the context used to recognise
predictable packets, and it must not drift because of the pruning itself.

**Virtual PC.** A skipped backward branch, for example a loop, can bring
fetch back to the same static branches with an unchanged history. Every
iteration would then look the same to TAGE. `vpc_counter` counts skipped
backward packets and clears on every history update. The tagged tables are
indexed with `VPC = PC + counter`, so each iteration gets its own entries;
T0 keeps the plain PC. When a skipped backward packet finds the counter at
its maximum of 7, the update is forced and the counter clears. The counter
is part of every checkpoint.

## Learning which packets are predictable

`history_pruning_unit` runs two identical paths:

| path | key | meaning |
|------|-----|---------|
| PC | packet start PC (48 b) | predictable in any context |
| CF | 8 path-history bits + PC (56 b) | predictable only after certain paths |

A packet trains the CF path only while its PC is not already eligible in
the PC path. Each path has four parts.

- **Training table** (`good_train_table`): 128 sets × 8 ways, each with a
  tag (41 or 49 bits) and a 12-bit saturating counter.
  - A retired packet is *good* if it had no misprediction and no
    long-history provider. A good packet adds +1, a bad one −180.
  - An increment that misses takes a way whose counter is 0. If there is
    none, every counter of the set drops by 1.
  - Every `DECAY_INSTR` retired instructions, all counters lose 8, swept
    one set per cycle.
  - An entry is *eligible* at 2024. That is about 2000 good packets in a
    row; a single bad one undoes 180 of them.
- **Locked table** (`locked_table`): the same geometry, with a tag and a
  valid bit per entry. This is what fetch looks up, combinationally, with
  the start PC and path history of the packet that is ending.
- **Divergence copy** (`divergence_sync`): scans both tables one set per
  cycle. It counts:
  - A, entries eligible in training but missing from locked (new skipping
    chances);
  - B, entries locked but no longer eligible (packets skipped although they
    stopped being predictable).

  Entries are paired by set and way. After a full pass (128 cycles), if
  A + 2·B > 185 the whole locked table is rewritten from the training
  table in a second 128-cycle pass. B weighs double because a wrongly
  skipped packet costs accuracy, while a missed skip only costs
  opportunity. Copying in rare batches keeps the set of skipped packets,
  and with it the meaning of the history, stable for long periods.
- **Blacklist** (`blacklist`): 8 fully associative entries, each with a
  3-bit counter. When a misprediction takes an eligible entry below the
  threshold, the packet's blacklist counter is bumped. Above `BL_THRESH`
  (3), that packet no longer trains the path. This stops packets that
  oscillate between predictable and not from churning the locked table.

## Sizes

| parameter | value | where |
|-----------|-------|-------|
| ahead distance / secondary tag | 5 / 5 bits (32 predictions) | `bp_pkg` |
| bimodal T0 | 8K × 2-bit | `bp_pkg.LOG_T0` |
| tagged part | 6 short + 15 long history lengths in 10 + 20 banks of 1K | `NTAB`, `NSHORT`, `NBANK_S`, `NBANK_L`, `LOG_TAB` |
| primary tags | 8 / 12 bits | `TAGW_SHORT`, `TAGW_LONG` |
| long-history boundary | 132 of 256 bits | `LONG_HIST_BITS` |
| prediction queue | 133 entries × 33 bits | `PQ_DEPTH` |
| single-cycle BTB | 1K entries, 4-way | `sc_btb` |
| multi-cycle BTB | 8K entries, 4-way, 3 cycles | `mc_btb` |
| GHR / path history | 256 / 27 bits, 4 bits per packet | `GHR_LEN`, `PHIST_LEN` |
| backward counter maximum | 7 | `pruned_history.VPC_MAX` |
| training / locked tables | 128 × 8 each, 12-bit counters | `history_pruning_unit` |
| eligibility / divergence thresholds | 2024 / 185 (weight 2) | `bp_top` |
| blacklist | 8 entries, 3-bit counters, threshold 3 | `bp_top.BL_THRESH` |
| decay period | 65536 retired instructions | `bp_top.DECAY_INSTR` |

The TAGE tables hold 606 Kbit (75.75 KB):
- T0: 8K × 2 bits;
- short banks: 10K × 17 bits;
- long banks: 20K × 21 bits.

The secondary tags account for 18.75 KB of that. The four pruning tables
total exactly 25.75 KB.

## Where this RTL makes its own choices

These points are design decisions rather than a transcription of the
original description:

- **Not described, chosen here:** the history lengths, the bank rotation,
  and all index, tag, history and secondary-tag hashes.
- **TAGE simplifications.** The u bits are single bits and never age.
  There is no use-alternate-on-new-entry counter. Allocation uses a random
  pick between the first two free tables.
- **Late ahead predictions stall** instead of being replaced by the
  single-cycle prediction (see above).
- **Late-flush rule.** The multi-cycle BTB late flush fires only for a
  branch that was predicted taken without a single-cycle target.
- **Assumed values:** blacklist threshold 3, decay period 65536
  instructions, blacklist round-robin replacement, and the value 1 for a
  new training entry.
- **Combined front end.** The two ideas are joined into one front end that
  shares one history. The pruned history and its VPC feed the ahead TAGE.
  A long-history provider, reported at resolution, marks the packet as
  *not good*.
- **One branch per cycle at most.**

## Simulation

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M`, and it has a watchdog. With Verilator 5:

```sh
verilator --binary --timing -Wno-fatal \
          rtl/bp_pkg.sv $(ls rtl/*.sv | grep -v bp_pkg) tb/tb_bp_top.sv \
          --top-module tb_bp_top -Mdir obj_tb_bp_top
./obj_tb_bp_top/Vtb_bp_top
```

| testbench | what it exercises |
|-----------|-------------------|
| `tb_bp_top` | End to end, with reduced pruning thresholds: a 16-branch program with loops, calls, returns, jumps, a noisy branch and a path-correlated branch; misprediction flushes with delayed resolution; retirement. It counts and requires each of: rule skips, locked skips, forced updates, PC and CF locked copies, blacklist blocks, decay, overrides, late flushes. It also checks every checkpoint against the live history, and requires branch 2, which depends on a branch inside the ahead predictor's blind window, to be predicted right at least 95% of the time after warm-up. |
| `tb_bp_top_full` | The same program at the default sizes, with no parameter changes. |
| `tb_ahead_frontend` | Front end alone, checked against a reference model of queue, hash, selection and flushes. |
| `tb_ahead_tage` | Full-size TAGE: 3-cycle latency, reset sweep, squash, and learning different directions for different secondary tags under one ahead history. |
| the others | One per block, each against a small reference model (queue pointers, hash, VPC sequence, counter arithmetic, divergence score, blacklist, ...). |

`tb_ahead_tage`, `tb_ahead_frontend` and the two `tb_bp_top*` benches each
run in well under a minute. The reset sweep of the full-size T0 alone takes
8192 cycles.

To change a size, edit the parameter on the module, or the constant in
`bp_pkg` for anything shared. Table sizes and widths are all derived from
these values.
