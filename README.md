# Pattern-predicted filter cache for an instruction fetch path

A filter cache is a very small instruction cache (a few hundred bytes) placed
in front of the L1 instruction cache. When a fetch hits in it, the small array
answers for much less energy than the L1 would. When it misses, the fetch
loses a cycle before the L1 is read. A predictor decides, fetch by fetch,
whether to try the filter cache at all. A good predictor keeps most of the
energy saving and loses little performance.

This RTL implements a published pattern-based predictor for that choice. It
has no table of fetch addresses. Instead it uses what branch predictors use:
a short global history of recent filter-cache hits and misses indexes a table
of two-bit saturating counters. In hardware that is one 5-bit shift register
and one 32-entry table, and their size does not grow with the cache.

## What happens on a fetch

The fetch path (`fetch_unit`) has four parts:

| module | role |
|---|---|
| `pattern_predictor` | holds the prediction for the next fetch; contains `history_shift_register` and `pattern_history_table` |
| `filter_cache` | 512 B, direct mapped, 32 B lines |
| `l1_icache` | 8 KB, 32 B lines, 32-way set associative (8 sets) |
| `fetch_controller` | carries out the access flow below and moves lines between levels |

Every fetch is steered by the prediction made when the previous fetch
completed:

| prediction | line in filter cache? | what happens | latency (request accepted → `rsp_valid`) |
|---|---|---|---|
| hit | yes | filter cache answers | 1 cycle |
| hit | no (mispredicted hit) | filter cache misses, then L1 is read and its line copied into the filter cache | 1 + `L1_CYCLES` |
| miss | no | L1 read directly, line copied into the filter cache | `L1_CYCLES` |
| miss | yes (mispredicted miss) | L1 read anyway (energy and a cycle wasted), line rewritten into the filter cache | `L1_CYCLES` |

If the L1 misses as well, the controller requests the line from the next
memory level over the `mem_*` port. The line is written into both caches, and
`1 + memory latency` cycles are added. With the default `L1_CYCLES = 2`, a run
of correctly predicted hits streams one instruction per cycle.

Whether a fetch's line "was in the filter cache" is its **outcome**, and it
trains the predictor. For a predicted-miss fetch the filter cache data is not
read, but its tag array is compared at the start of the access so that the
outcome is known.

## The predictor

The predictor assumes that the next fetch is at `pc + 4`. When a fetch at
`pc` completes, the prediction for the next fetch is made as follows:

1. **Same line.** If `pc` and `pc + 4` fall in the same 32 B line, predict
   *hit*. The line has just been used, so it is in the filter cache. Most
   fetches take this path; the table is not touched.
2. **Line change.** Otherwise read the counter that the 5-bit history selects
   in the 32-entry table. Predict *hit* if the counter is **above** the
   threshold of 2. With 2-bit counters, that means only a saturated counter
   (3) predicts a hit. The comparison is strict, as the source scheme's flow
   chart states it. `THRESHOLD` is a parameter.

Training happens only for predictions of the second kind. When a fetch
completes whose prediction came from the table, two things happen:

* the counter that made the prediction (its index is saved in `pred_idx_q`)
  counts up if the outcome was a hit and down if it was a miss, saturating at
  0 and 3;
* the outcome is shifted into the history. The register shifts left, and
  bit 0 holds the newest outcome.

Both updates take effect at the same clock edge as the new prediction. The
new prediction already sees them: `history_shift_register` outputs
`hist_next`, and `pattern_history_table` has a same-cycle read-after-update
bypass. So the table index used on a line change includes the outcome that
has just arrived. A request can therefore be accepted in the cycle right
after a completion.

A mispredicted line change costs little on loops: the history captures the
pattern of line changes around a loop (hit, hit, ..., miss at the line that
conflicts) and learns it after a few iterations. The end-to-end test below
shows 96–99.97 % correct predictions on synthetic loop and branch streams.

After reset the prediction is *miss*, the history is all zeros and every
counter holds 2 (`CNT_INIT`), one step below a hit prediction.

## Caches

`filter_cache` is direct mapped with `SIZE_BYTES / 32` lines. A read is
combinational: a tag compare, plus selecting a word from the line. A fill
writes one whole line, the one transferred from the L1. Sizes of 256 B and
1024 B are obtained by setting `FC_BYTES` on the top. The predictor itself
does not depend on the filter-cache size.

`l1_icache` compares all 32 ways of a set in parallel and returns the whole
line, which the controller uses both to answer and to fill the filter cache.
Its victim is chosen round robin, with one pointer per set. Its access time
is modelled by the controller (`L1_CYCLES`), not inside the array.

Both caches clear only their valid bits (and the round-robin pointers) on
reset. They have no invalidate or write port: instruction memory is treated
as read-only.

## Interfaces

All signals are synchronous to `clk`. `rst_n` is an asynchronous,
active-low reset. Types come from `fc_pkg`: `addr_t` and `instr_t` are
32 bits, and `line_t` is 256 bits with word *i* in bits `[32i+31:32i]`.

* **Core side:** `req_valid`/`req_ready`/`req_pc` form a valid/ready request.
  `req_ready` is high only while the controller is idle, so at most one fetch
  is outstanding. `rsp_valid` pulses for one cycle with `rsp_instr`.
* **Memory side:** `mem_req` and `mem_addr` (line aligned) stay asserted
  until the memory answers with a one-cycle `mem_valid` and the whole line in
  `mem_line`. An assertion in `fetch_controller` flags a `mem_valid` that
  arrives without a request.
* **Status:** each completed fetch pulses `acc_done` together with
  * `acc_pc`;
  * `acc_pred_hit` and `acc_pred_src`: the prediction and whether it came
    from the same-line rule or from the table;
  * `acc_fc_hit`: the outcome;
  * `acc_src`: which level answered (`FROM_FC`, `FROM_L1`, `FROM_MEM`).

  `pred_hist` shows the history. Prediction accuracy and level usage can be
  counted from these signals outside the design.

## Parameters (`fetch_unit`)

| parameter | default | meaning |
|---|---|---|
| `FC_BYTES` | 512 | filter-cache capacity (256 and 1024 are the other sizes the scheme was evaluated at) |
| `L1_BYTES` | 8192 | L1 capacity |
| `L1_WAYS` | 32 | L1 associativity |
| `HIST_BITS` | 5 | history length; the table has 2^`HIST_BITS` entries (minimum 2) |
| `CNT_BITS` | 2 | counter width |
| `THRESHOLD` | 2 | hit predicted when counter > `THRESHOLD` |
| `CNT_INIT` | 2 | counter value after reset |
| `L1_CYCLES` | 2 | L1 access time in cycles (minimum 2) |

The line size (32 B) is `fc_pkg::LINE_BYTES` and is shared by both caches.

## What comes from the scheme and what is this design's own

Taken from the published scheme:
* the filter cache above an 8 KB, 32 B-line, 32-way L1;
* 512 B as the typical filter-cache size;
* the `pc + 4` assumption and the same-line rule;
* the 5-bit history with a 32-entry table of 2-bit counters and a threshold
  of 2, with the strict "greater than" comparison;
* the shift-left history;
* the access flow: a predicted hit reads the filter cache; otherwise, or on a
  filter-cache miss, the L1 is read and its line is moved into the filter
  cache; the history and table are then updated.

Chosen here, because the scheme leaves them open:
* the filter-cache organisation (direct mapped, 32 B lines);
* L1 round-robin replacement;
* all cycle counts (filter cache 1, L1 2) and the handshakes;
* learning the outcome of a predicted miss from the filter-cache tags;
* training only table-based predictions;
* the prediction bypass;
* all reset values;
* 32-bit addresses and instructions (an ARM-style fetch stream).

Not included:
* the next-fetch-prediction-table (NFPT) predictor that the scheme is
  compared with;
* the processor;
* the memory behind the L1;
* energy figures, which would come from a circuit-level cache model rather
  than from this RTL.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fc_pkg.sv tb/tb_fetch_unit.sv --top-module tb_fetch_unit
./obj_dir/Vtb_fetch_unit
```

The testbenches for the blocks compare each block with a reference model
written separately in the testbench. They use random stimulus and also check
the corner cases: counter saturation, the same-cycle bypass, conflict
replacement, round-robin eviction, all four prediction outcomes, and
back-to-back issue. `tb_fetch_controller` also checks every latency in the
table above.

`tb_fetch_unit` runs the whole fetch path at its default size against
`tb/next_level_memory.sv`, a behavioural memory model whose contents are a
hash of the address. The testbench acts as the core. It drives about 51,000
fetches through six phases:
1. small loops;
2. a loop that fits the filter cache;
3. a loop that exceeds it;
4. a loop calling a routine that conflicts with it;
5. sweeps larger than the L1;
6. branchy code.

A reference model of both caches and the predictor predicts, for every fetch,
the prediction, its source, the outcome, the answering level and the latency,
and the testbench checks all of them. It also counts each mechanism and fails
if one never occurs. The prediction accuracy it prints for each phase ranges
from 96.1 % (conflicting call) to 99.97 % (long sweep).

`tb_fc_size_sweep` runs one stream of about 248,000 fetches through three
copies of the fetch path with 256 B, 512 B and 1024 B filter caches. The
stream mixes loops of 96 B to 900 B, a conflicting call and short random
branches. The testbench checks every fetch and prints these results:

| filter cache | prediction accuracy | fetches served by the filter cache |
|---|---|---|
| 256 B | 98.56 % | 88.19 % |
| 512 B | 98.57 % | 93.42 % |
| 1024 B | 99.31 % | 98.05 % |

These figures describe synthetic code and the cycle model above; they are not
measurements of real programs.
