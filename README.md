# Hashed perceptron branch predictor, ahead pipelined

A perceptron branch predictor normally gives every bit of branch history its
own weight. Storage and the number of adders then grow linearly with the
history length. This design breaks that one-to-one link. Each weight is
selected by a *hash* of a whole group of branches, the way gshare selects a
counter. Three kinds of mapping feed one perceptron:

* a **bias table**, indexed by the branch address;
* **path tables**, each indexed by the address of one recent branch
  (`{mi,P}`). Optionally the index is two recent addresses XORed together
  (`{mi,PxP}`), or the previous address XORed with three older ones
  (`{mi,AxPxPxP}`);
* **global tables**, each indexed by the branch address XORed with its own
  L-bit segment of the speculative global history (`{mi,AxG}`).

There is no input vector. The perceptron output is the plain sum of one
weight per table, and the branch is predicted taken when the sum is >= 0.
Each global table works like a small gshare. That lets the predictor learn
some branches that a classic perceptron cannot (for example the XOR of two
earlier outcomes). It also covers a long history with few adders. The default
configuration has 16 tables of 2048 weights (32 KB): 1 bias table, 1 path
table and 14 global tables. Together they span 14 x 11 = 154 history bits
with a 16-input sum.

The predictor is **ahead pipelined**. Table reads for a branch start in the
cycle of the branch before it, so a prediction comes out in the same cycle
the branch is presented.

The notation `{mi,X,Y}` follows the usual perceptron taxonomy: *mi* means
each weight has its own index, *X* is what forms the index (A = branch
address, G = global history, P = path), and *Y* is the input vector (none
here).

## Files

| file | contents |
|------|----------|
| `rtl/hp_pkg.sv` | default sizes, the threshold formula, record-width helpers |
| `rtl/hp_predictor.sv` | top level: tables, index logic, pipeline, history, training |
| `rtl/hp_weight_table.sv` | one table of saturating weights, read as rows of two |
| `rtl/hp_index_gen.sv` | the hashed index of every table |
| `rtl/hp_adder_tree.sv` | sum of weights (no multipliers), optional doubling |
| `rtl/hp_ahead_stage.sv` | pipeline latch, late select and final adder |
| `rtl/hp_history.sv` | speculative global and path history, restore |
| `rtl/hp_train_ctrl.sv` | threshold training decision |
| `tb/*.sv` | self-checking testbenches (see *Verification*) |

## Index functions

Let `L = log2(weights per table)` (11 by default), `pc(k)` the address bits
`[L+1:2]` of the k-th previous branch, and `H[k]` the global history seen
by branch `b` (`H[0]` is the direction of branch `b-1`). Tables are
numbered `0` (bias), `1..NP` (path), `NP+1` (global table with the newest
history), then the older global tables. For branch `b`:

| table | mapping | index |
|-------|---------|-------|
| 0 | bias, ahead | `{pc(b-1)[L-2:0], H[0]}` |
| t = 1..NP | `{mi,P}` | `pc(b-t)` |
| | `{mi,PxP}` | `pc(b-2t+1) ^ (pc(b-2t) << 1)` |
| | `{mi,AxPxPxP}` | `pc(b-1) ^ (pc(b-3t+1) << 1) ^ (pc(b-3t) << 2) ^ (pc(b-3t-1) << 3)` |
| NP+1 | `{mi,AxG}`, ahead | `{H[L-1:1] ^ pc(b-1)[L-2:0], H[0]}` |
| NP+1+s, s >= 1 | `{mi,AxG}` | `H[s*L +: L] ^ pc(b-1)` |

The address of branch `b` itself is never used. All indices are computed
one branch early, from the previous branch's address, and that one cycle is
what lets the table read finish before the adder runs. Only two tables
would need the newest history bit, `H[0]`, which is still unknown at read
time: the bias table, and the global table whose segment contains `H[0]`.
Those two tables read *both* neighbouring weights (a row of two) and let
`H[0]` pick one later. The other tables already know their full index,
because their history segment starts at `H[L]` or later, or because they
use path addresses.

## Pipeline and timing

```
 cycle of branch b-1                       cycle of branch b
 ---------------------------------------   ---------------------------------
 pred(b-1) = sign(out(b-1))   <-- latch    sel = pred(b-1) (= ghr[0])
 indices for b from pc(b-1), ghr, path     out(b) = psum + pair_bias[sel]
 read all 16 tables (rows of 2 weights)                  + pair_recent[sel]
 psum = sum of the 14 fully indexed        pred(b) = (out(b) >= 0)
        weights                            ... and the reads for b+1 start
 ---- clock edge: latch psum, the two pairs, the indices; ghr <= {ghr, pred(b-1)}
```

* **Latency.** The table read and the wide sum happen one branch ahead. The
  cycle that needs the prediction does only a 2:1 select and a three-input
  add. Total depth is two cycles; the effective latency is one.
* **Cycles without a branch** (`br_valid` low). Nothing moves. The latch
  keeps the values read for the next branch until that branch arrives.
  This load enable does the job of a shadow latch.
* **Reset.** Every table clears itself, one row per cycle. `ready` rises
  after `2**(L-1)` cycles (1024 by default; `7 * 2**(L-3)` with
  `HEAD_TAIL`). Branches and updates are
  ignored until then.

## Training

When a branch resolves, `hp_train_ctrl` decides whether to train. It trains
when the prediction was wrong, or when `|out| <= theta`, with
`theta = floor(1.93*h + h/2)` and `h` the number of non-bias tables
(`h = 15`, so `theta = 36`). Every weight that took part then moves by +1
if the branch was taken and by -1 if not. Weights are 8-bit two's
complement and saturate at +127 and -128. There is one training write per
cycle. It is a read-modify-write in each table, using the indices stored in
the prediction's record. A prediction read in the same cycle sees the old
value.

## Prediction record, checkpoint and misprediction recovery

This part needs the most care when integrating the predictor.

Every prediction outputs `pred_meta`: 394 bits at the defaults. The core
stores it with the branch and hands it back on `upd_meta` when the branch
resolves. The field layout is the packed struct `meta_t` in
`hp_predictor.sv`, and `hp_pkg::meta_width()` gives its width:

| field | bits | use |
|-------|------|-----|
| `idx` | NT*L = 176 | index of every table, for training |
| `out`, `pred` | 13 + 1 | output and prediction, for the threshold test and mispredict detection |
| `pc`, `ghr`, `path` | 11 + 153 + 11 | hashed address and speculative history before the branch |
| `rec_psum` | 13 | checkpoint: partial sum read for the *following* branch |
| `rec_w_recent`, `rec_w_bias` | 8 + 8 | checkpoint: the two ahead weights that were **not** selected |

Why this checkpoint is enough: suppose branch `b` turns out mispredicted.
The first correct-path branch after `b` needs the same table rows that were
read during `b`'s cycle, because those reads did not depend on `b`'s
direction. It needs the *other* weight of each ahead pair, because `b`'s
direction is now the opposite. The record therefore keeps the partial sum
and only the weights that were not selected: 29 bits, apart from the
history copy. In the update cycle of a mispredicted branch
(`upd_mispredict`), the predictor does three things at once:

1. restores `ghr` and `path` from the record, then shifts in the actual
   direction and the branch's address;
2. loads the ahead latch from `rec_psum` and the two stored weights, and
   recomputes the indices from the record's address and history;
3. trains the tables with the record's indices.

The next branch on the correct path can be presented in the following
cycle. A branch presented in the recovery cycle itself is ignored. The
record's stored values are used even if training has changed the tables
since; this is accepted.

Updates must arrive in program order, and wrong-path records must be
dropped by the core. An assertion checks that each returned record is
self-consistent.

## Parameters (`hp_predictor`)

| parameter | default | meaning |
|-----------|---------|---------|
| `NT` | 16 | tables, bias table included |
| `NP` | 1 | path tables (at least one global table must remain) |
| `W` | 8 | bits per weight |
| `L` | 11 | log2(weights per table); storage = NT * 2**L * W bits |
| `PC_W`, `PC_SHIFT` | 32, 2 | address width; low address bits dropped |
| `PATH_MODE` | `PATH_P` | `PATH_P` = `{mi,P}`, `PATH_PXP` = `{mi,PxP}`, `PATH_AXPPP` = `{mi,AxPxPxP}` |
| `BOOST` | 0 | static weight boosting: doubles the bias weight and table 1 |
| `HEAD_TAIL` | 0 | head-splitting/tail-sharing: bias table 1.75 times larger, three oldest tables halved |

The output width is `W + clog2(NT) + 1` bits (13). Smaller published
budgets use fewer, smaller tables: 1 KB is `NT=8, L=7`, 8 KB is
`NT=8, L=10`, 16 KB is `NT=16, L=10`. Sizes above 32 KB are reached by
raising `L`. Those sizes would need a multi-cycle table read in a real
implementation, and this RTL does not model that.

## Where this design departs from, or goes beyond, its source

* The source compares configurations from 1 KB to 1 MB. The defaults here
  are its 32 KB point: 16 tables, two-cycle access. One path table is an
  assumption carried over from the 8-table study, where a single path
  weight was best from 32 KB upward.
* The source does not say where the newest history bit enters the index.
  Here it is the index LSB of the two ahead tables.
* With `{mi,PxP}`, path table `t` pairs branches `b-2t+1` and `b-2t`. The
  bias table keeps the address alone.
* The threshold uses `h` = number of non-bias tables. A plain reading of
  "number of tables" would give `theta = 38` instead of 36.
* The prediction record, the checkpoint carried in it, in-order updates,
  ignoring a branch in the recovery cycle, and the address bits used are
  all choices of this design. Of the recovery options the source
  discusses, this is the one that stores the unselected weights.
* Table reads are combinational array reads: one read port for prediction
  and one read-modify-write port for training. A real SRAM would need its
  timing and port count matched.
* The tables clear themselves after reset. The source says nothing about
  initial values.
* The improvements tuned for a second trace set are only partly built.
  Weight boosting (`BOOST`), 5-bit weights (`W=5`), the `{mi,AxPxPxP}`
  path hash and the resized head and tail tables (`HEAD_TAIL`) are there.
  For `{mi,AxPxPxP}`, only the name is given; the shifts by 1, 2 and 3
  extend the `{mi,PxP}` rule. With `HEAD_TAIL` the bias table has
  `7 * 2**(L-3)` rows of two weights. Its row is the L-bit address modulo
  that count, so every index carries one more bit and the record grows
  by `NT` bits. The three oldest tables drop their row MSB, which takes
  the index modulo their halved size. Clearing then takes `7 * 2**(L-3)`
  cycles. Not built: sign bits kept in separate larger tables, and a
  slight bias towards not taken. Their indexing, training and amounts
  are not specified.
* Not included: the processor around the predictor (fetch, BTB, return
  stack, which also decide when `br_valid` is high), and the small
  first-level predictor that slower competing designs need. This design
  needs no such predictor.

## Verification

Every module has a self-checking testbench. Each ends with one
`TB_RESULT checks=N failures=M` line and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_hp_weight_table` | a 12-row table: clearing time, random training against an integer model, both saturation limits, old value read during a write |
| `tb_hp_index_gen` | every table's index against the formulas above, for all three path hashes and with `HEAD_TAIL` |
| `tb_hp_adder_tree` | sums of 14 and 15 weights, extremes, doubled inputs |
| `tb_hp_ahead_stage` | load, hold, recovery, late select, boosting |
| `tb_hp_history` | push, hold and restore against an array model |
| `tb_hp_train_ctrl` | every output value against theta = 36 |
| `tb_hp_predictor` | end to end, small: 6 tables, 2-bit weights, `{mi,PxP}`, boosting; and 8 tables, 5-bit weights, `{mi,AxPxPxP}`, boosting, `HEAD_TAIL` |
| `tb_hp_predictor_full` | end to end with every default parameter, 30000 branches |
| `tb_hp_predictor_sizes` | end to end at 1 KB, 8 KB and 128 KB |

The end-to-end benches (`hp_tb_core.sv`) act as the processor. They run a
six-branch synthetic program: a loop branch, an always-taken branch, a
random branch, a branch equal to the XOR of two earlier random outcomes, an
alternating branch and a never-taken branch. Gaps between branches are
random, and resolution delays are 1 to 12 cycles. After a misprediction,
the bench fetches random wrong-path branches, flushes them when the
misprediction resolves, and resumes.

An independent behavioural model predicts every branch directly from the
index formulas and the training rule. Prediction, output, mispredict and
training flags are compared every cycle, so each prediction is checked in
the cycle its branch is presented. Each mechanism must occur at least once:
idle gaps, back-to-back predictions, a prediction in the cycle right after
a recovery, recoveries, squashes, both training causes, both pair-select
values, and saturation in the small bench. The clearing time after reset
must equal the row count of the largest table.

At full size, accuracy over the second half of the run is about 92%. The
random branch alone limits it to roughly that, so the XOR branch is being
learned. The full-size bench requires at least 85%.

The program is synthetic. Accuracy on real benchmark traces has not been
measured with this RTL.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/hp_pkg.sv tb/tb_hp_predictor_full.sv --top-module tb_hp_predictor_full
./obj_dir/Vtb_hp_predictor_full
```

Every bench runs in well under a second of simulation time.
