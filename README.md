# Selective value prediction for high-latency arithmetic (SHLA-VP)

Divides, multiplies and square roots are the slowest arithmetic instructions in
an x86 core. Every instruction that needs their result waits for them. Many of
these instructions produce the same few results over and over. This design
predicts those results. A small table, indexed by the instruction's PC, remembers
the last few results of each such instruction. When one of them has been seen
often enough, it is handed to the core as soon as the instruction is fetched.
Dependent instructions can then run speculatively. When the real result arrives
it is compared with the prediction:

- If they match, the speculated work stands and the slow instruction's own
  execution can be dropped.
- If they differ, the core is told to flush and pays a fixed recovery penalty.

The predictor is *selective*. Only seven instruction classes use it: `DIV`,
`IDIV`, `DIVSD`, `VDIVSD`, `MUL`, `IMUL` and `SQRTSD`. Every other instruction
bypasses it. This keeps the table small and keeps out results that are not worth
predicting. In a multicore processor each core has its own private predictor.
Nothing is shared between cores.

The default configuration is four cores. Each core has a 512-entry, 4-way table
that keeps 4 values per entry, and a wrong prediction costs 17 cycles.

## The predictor table

`rtl/shla_vp_table.sv` holds the table. The PC is split in two:

```
 PC (48 bits)  =  PC_TAG (41 bits)  |  SET (7 bits, least significant)
```

SET picks one of the 128 sets. PC_TAG is compared with the tag of each of the 4
ways in that set. One entry (way) holds:

| field | width | meaning |
|---|---|---|
| valid | 1 | the entry holds an instruction |
| PC_TAG | 41 | upper PC bits of that instruction |
| LRU | 2 | age of the way in its set (0 = most recently used) |
| V1..VH | 64 each | the last H distinct results of the instruction |
| C1..CH | 2 each | confidence counter of each value |
| vLRU1..vLRUH | 2 each | recency of each value (3 = most recently confirmed) |

The data of a set (tags, values, counters) is one memory word of 1252 bits with
the defaults. Valid bits and LRU ages are flip-flops, cleared by reset.

### Making a prediction (lookup)

A lookup reads the whole set and compares the tags. If a tag matches, the
*value selector* (`rtl/vp_value_select.sv`) picks one value. It takes the value
with the highest vLRU, the one confirmed most recently; on a tie the lowest
index wins. That value is predicted only if its confidence counter is at least
`CONF_THRESH` (2, the upper half of the 2-bit counter). A hit whose chosen value
is not yet confident gives no prediction.

The set is read at the clock edge that samples the request. The answer (`hit`,
`predict`, `value`) is valid one cycle later. The lookup uses only the PC, so the
core can issue it at fetch, before any operand is known.

### Learning from results (update)

This part determines how the predictor behaves. Once an instruction's real
result is known, the table is trained with it. This happens whether or not a
prediction was made. Training takes one cycle: the set is read
combinationally, and the new contents are written at the clock edge.

1. **Tag miss: allocate.** The first invalid way of the set is used. If every
   way is valid, the least recently used way is evicted. The new entry gets
   `V1 = result`, `C1 = 0`, `vLRU1 = 3`. All other values, counters and vLRU
   fields are cleared.
2. **Tag hit, result already stored.** That value's confidence counts up and
   saturates at 3. Its vLRU becomes 3, and every other vLRU counts down, stopping
   at 0.
3. **Tag hit, result not stored.** The value with the smallest vLRU (lowest
   index on a tie) is replaced by the result. Its confidence restarts at 0, its
   vLRU becomes 3, and every other vLRU counts down.
4. **Wrong prediction.** The confidence of the value that was predicted counts
   down, stopping at 0.
5. In every case the touched way becomes the most recently used of its set.
   Ways that were younger than it age by one. This is true LRU with a 2-bit age
   per way.

Some consequences:

- A value is first predicted on the 4th time it is seen. It is stored on the 1st
  occurrence with C = 0, and the 2nd and 3rd raise C to 2.
- An instruction that alternates between a few results keeps all of them, up to
  H. The selector always offers the most recent one, so alternating patterns
  cause mispredictions. A larger H does not help such patterns.
- Unused value slots hold 0 with C = 0 and vLRU = 0. They are the first to be
  replaced and are never predicted before their value has actually occurred, so
  no per-slot valid bit is needed.

A lookup and an update of the same set in the same cycle: the lookup sees the
set as it was before the update.

## Verifying a prediction and recovering

`rtl/vp_verify.sv` classifies each resolved targeted instruction into one of
three outcomes:

- no prediction;
- correct: the predicted value equals the result;
- wrong.

A wrong prediction pulses `flush_o` in the same cycle. The core must squash the
instructions that used the value. From the next cycle on, `stall_o` stays high
for exactly `PENALTY_LATENCY` = 17 cycles, the same as a branch misprediction on
the targeted core. A second wrong prediction during a penalty restarts it. After
a correct prediction the core may drop the instruction's own execution.

`rtl/vp_stats.sv` counts table reads, table writes and the three outcomes (32-bit
saturating counters, synchronous clear). The reads and writes feed a power model.
The accuracy is `correct / (correct + wrong)`.

## One core's predictor and the multicore top

`rtl/shla_vp_unit.sv` puts together the predictor of one core: class filter,
table, verifier and counters. `rtl/shla_vp_multicore.sv` (the top) instantiates
`NUM_CORES` of them. Each core's signals appear as one element of the port
arrays.

Protocol per core, as a sequence of cycles:

```
cycle t    : fe_valid_i=1, fe_pc_i, fe_op_i              (lookup; ignored if fe_op_i == OP_OTHER)
cycle t+1  : pred_rsp_valid_o=1, pred_valid_o, pred_value_o
...          the core keeps pred_valid/pred_value with the instruction
cycle r    : rs_valid_i=1, rs_pc_i, rs_op_i, rs_result_i,
             rs_predicted_i, rs_pred_value_i             (what it carried)
             -> outcome_o, flush_o in the same cycle; table trained at the edge
cycle r+1..: stall_o high for 17 cycles after a wrong prediction
```

`fe_op_i`/`rs_op_i` are an `op_class_e` from `shla_vp_pkg`. The core's decoder
must provide this 3-bit class: `OP_OTHER` or one of the seven targeted
instructions. `events_o` shows, each cycle, what the table did: lookup hit,
update hit, match, replace, allocate, evict. `stats_o` carries the five
counters.

Lookups and updates are independent ports. A core may have several predicted
instructions in flight, because each carries its own prediction back.

## Parameters

| parameter | default | notes |
|---|---|---|
| `NUM_CORES` | 4 | the evaluated processor has 4 cores; 1 to 32 were studied |
| `ENTRIES` | 512 | 128 to 2048 were studied; 512 is the chosen point |
| `ASSOC` | 4 | 1, 2, 4, 8 studied; `ENTRIES/ASSOC` must be a power of two |
| `H` | 4 | values per entry; 1 to 4 studied |
| `PC_W` | 48 | x86-64 virtual address width (this design's choice) |
| `VALUE_W` | 64 | result width (this design's choice) |
| `CONF_THRESH` | 2 | minimum confidence to predict (this design's choice) |
| `PENALTY_LATENCY` | 17 | cycles of recovery after a wrong prediction |

Each core's table holds 128 × 1252 = 160,256 bits of data at the defaults,
plus 128 × 4 valid bits and 128 × 4 × 2 LRU bits in flip-flops.

## What is outside this design, and what was chosen here

Outside the design:

- The x86 core: its fetch, decode, rename, issue, execution, flush and commit
  machinery.
- The caches.

The predictor only exchanges the signals described above with the core. Cache
sizes do not affect it.

This design's own choices, where the method itself does not fix the details:

- Which value the selector picks: the most recently confirmed one.
- The confidence threshold: 2.
- How confidence moves:
  - +1 when the result matches a stored value;
  - −1 for the value that was wrongly predicted;
  - 0 for a newly stored value.
- Updating vLRU on every match, not only after a correct prediction.
- The valid bit per entry.
- Read-before-write between lookup and update.
- The PC and value widths.
- The port protocol.
- The form of the penalty: a stall counter.
- DIV and IDIV produce a quotient and a remainder, but one 64-bit result is
  predicted per instruction.

Known differences from the description the design follows:

- Associativity 3 is not supported. It appears among the permitted settings,
  but gives a set count that is not a power of two.
- The entry layout gives 180 bits for H = 2, which agrees with the stated line
  size. For H = 3 it gives 248 bits, while 238 bits was quoted.
- The "block size" and "total size" settings only matter for area estimation.
  They have no counterpart in the RTL.
- There are no defences against speculative side channels or memory
  consistency violations.

## Files

| file | contents |
|---|---|
| `rtl/shla_vp_pkg.sv` | widths of C and vLRU, `op_class_e`, `vp_outcome_e`, event and counter structs |
| `rtl/vp_value_select.sv` | value selector with confidence test |
| `rtl/shla_vp_table.sv` | set-associative predictor table, lookup and training |
| `rtl/vp_verify.sv` | outcome classification, flush, 17-cycle penalty |
| `rtl/vp_stats.sv` | read/write and outcome counters |
| `rtl/shla_vp_unit.sv` | one core's predictor |
| `rtl/shla_vp_multicore.sv` | top: one private predictor per core |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_shla_vp_configs` for the other evaluated sizes |
| `tb/vp_cfg_runner.sv` | capacity/eviction/history test of one predictor size, used by `tb_shla_vp_configs` |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

- `tb_vp_value_select`: directed tie and threshold cases, plus 2000 random
  candidate sets, each checked against an independent reference.
- `tb_shla_vp_table`: a 16-entry table under 20,000 random cycles of lookups
  and updates, over more PCs than the table holds. A reference model in the
  testbench predicts every lookup answer and every update event. It also checks
  that a value is first predicted on its 4th occurrence. Predictions,
  low-confidence hits, matches, replacements and evictions must all occur.
- `tb_vp_verify`: the three outcomes, the flush pulse, and a stall of exactly 17
  cycles, including a restart.
- `tb_vp_stats`: random event streams, clear, and saturation (on a 4-bit
  instance).
- `tb_shla_vp_unit`: one predictor at its default size, driven like a core.
  Checks the bypass of untargeted instructions, first prediction on the 4th
  instance, outcomes, 17-cycle penalties and counters.
- `tb_shla_vp_multicore`: the top at its default parameters, with four cores
  running different streams:
  - steady results;
  - a PC shared with another core but giving different, switching results,
    which must not disturb the other core;
  - eight PCs fighting over one 4-way set;
  - a mix of bypassed instructions and a result cycling through five values.

  It checks every outcome and penalty and the counters. It fails if any of these
  never occurs: correct prediction, flush, stall, bypass, miss, allocation, LRU
  eviction, value replacement, low-confidence hit.

- `tb_shla_vp_configs`: the evaluated sizes other than the default: 128, 256,
  1024 and 2048 entries; 1, 2 and 8 ways; 1, 2 and 3 values per entry. For
  each, `tb/vp_cfg_runner.sv` checks three things:
  - every one of the ENTRIES trained PCs is predicted;
  - one more PC per set evicts exactly the least recently used one;
  - H alternating results are all retained, while H+1 keep displacing each
    other.

  It also checks a 32-core top keeping one value per entry and a 2-core top.
  Every core trains one shared PC with its own result and must predict exactly
  that result.

Run a testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl rtl/shla_vp_pkg.sv tb/tb_shla_vp_multicore.sv \
          --top-module tb_shla_vp_multicore -o sim
./obj_dir/sim
```

`tb_shla_vp_configs` also needs `-Itb`, so that Verilator can find the runner.

Verilator finds the other modules in `rtl/` through `-Irtl`. Each runs in well
under a second. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/shla_vp_pkg.sv rtl/<module>.sv`.
