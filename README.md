# SPEC-T: a state-parallel limited-search convolutional decoder

A Viterbi decoder extends and compares every trellis state at every step. The
T-algorithm does less work: at each depth it keeps only the paths whose metric
is within a threshold T of the best metric and drops the rest. In hardware that
means fewer adders and survivor registers switching, so less power. The catch
is that "within T of the best" needs the best metric first, and a search over
all states inside the main loop would limit the clock rate.

This RTL implements the speculative T-algorithm (SPEC-T) in a state-parallel,
register-exchange decoder. The best metric is not searched in the loop. It is
*speculated*: the decoder assumes the best path follows the branch that matches
the hard decision of the input. Every V depths the speculation is corrected by
the real error, which a slower minimum search outside the loop measured V depths
earlier. The loop keeps the speed of a Viterbi add-compare-select (one depth per
clock). Only states with a path inside the band do any switching.

The default build is a rate-1/2, constraint-length-9 (256-state) decoder for
the code (561, 753) octal, with 3-bit soft inputs, 6-bit path metrics, a 55-bit
decision length, T = 27 and V = 7. The same RTL builds the K = 8 and K = 7
decoders through parameters.

## Metric convention: why everything hinges on a sign bit

Stored path metrics are *normalized*. A metric SM of a state means
`Γ − Γ̂_B − T`: the path's true cumulative metric minus the speculated best
metric minus the threshold. Then:

* a path is inside the retention band exactly when `SM < 0`, so the
  purge test is just the sign bit;
* a state that leads no survivor holds `SM = 0` by definition;
* at reset the start state (state 0) gets `−T` and all others `0`.

Each depth, the speculated best metric grows by `w`, and every stored metric
must shrink by it. Instead of sending `w` to all N units, the metric
normalization unit subtracts it once from each of the four distinct branch
metrics, `nbm_j = BM_j − w`. The MACS units add `nbm` to their predecessor's
metric. What `w` is:

| depth n            | w                    |
|--------------------|----------------------|
| `n mod V ≠ 0`      | `BM_B`               |
| `n mod V = 0`      | `BM_B + T + E`       |

`BM_B` is the metric of the hard-decision branch, the smallest branch metric.
`E` is the smallest stored metric at depth `n − V`. Because stored metrics carry
the `−T` offset, `T + E` is the true speculation error at that depth. Between
corrections `nbm ≥ 0`, so metrics only grow, and a path falls out as soon as it
is more than T worse than the optimistic guess. The correction pulls the band
back over the real best path.

## Blocks

One depth is processed per clock with `in_valid` high:

```
soft_in ─► BMU ─► MSU (w) ─► MNU (BM−w, reg) ─► N × MACS ─► SM regs ─┬─► REA ─► MVU ─► out_bit
                    ▲                                                 │
                    └────────── E ◄── PMSU (every V-th depth) ◄───────┘
```

| module          | role |
|-----------------|------|
| `spect_pkg`     | trellis helpers: predecessors, branch symbols, guard states |
| `spect_bmu`     | four branch metrics and `BM_B` from two soft values |
| `spect_msu`     | depth counter mod V and the speculation increment `w` |
| `spect_mnu`     | `BM_j − w`, registered (pipeline stage before the loop) |
| `spect_macs`    | modified ACS unit of one state |
| `spect_rea`     | register-exchange survivor memory with per-row enables |
| `spect_mvu1d`   | two-stage majority vote over the survivors' oldest bits |
| `spect_pmsu`    | time-multiplexed, pipelined minimum search |
| `spect_decoder` | top level, wiring of N MACS units and the rest |

### Modified ACS unit

Each state has two predecessors. An input's branch metric is added only if that
predecessor is a survivor (its sign bit is set). Otherwise 0 is added, so a
non-survivor input leaves its adder idle. The two candidates are compared, and
the smaller wins; on a tie input 0 wins. A negative winner is a survivor: the
unit outputs its metric, `en = 1` and the decision bit. A winner of 0 or more
gives `SM = 0` and `en = 0`. Sums saturate to the 6-bit range.

### Guard ring (no dead lock)

If every state were purged at some depth, all metrics would be 0 and no input
would ever be added again. Two states that form a cycle of the trellis, the
alternating bit patterns `0101…` and `1010…`, use a modified MACS:

* the input from the other guard state is always added;
* the purge is removed;
* `en` is fixed at 1.

These two states always carry a path, so decoding restarts on its own after
any burst. Their metrics can go positive (out of band). They still take part
in the minimum search and the vote.

### Register exchange array

Row s holds the information bits of the path ending in state s. On a depth, a
row with `en = 1` copies its chosen predecessor's row, shifts it and appends the
state's own information bit (the state's MSB). A row with `en = 0` holds its
value. This enable is the clock-gating condition: in silicon it would gate the
row's clock.

### Majority vote

Each row's oldest bit counts +1 (bit 1), −1 (bit 0), or 0 if the row is not a
survivor. Stage 1 adds groups of 8 rows (32 groups for 256 states) and clips
each group's sum to +1, 0 or −1. Stage 2 adds the 32 clipped votes. The output
is 1 if that total is positive. Both stages are registered.

A group's sum of 0 stays 0 rather than becoming −1. If it became −1, groups
without survivors, which are most of them, would outvote the few survivors.

### Path metric search

At every V-th depth the N new metrics are copied into a snapshot register. On
the next S = 2 clocks, one half (128 metrics) per clock goes through a 128-input
binary tree of compare-select elements. The tree has a register after every 3
levels and after the last one, so P = 3 stages. An accumulator takes the
minimum of the two halves. `E` is ready S + P = 5 clocks after the snapshot.
The MSU needs it S + P + 2 ≤ V clocks after the snapshot:

* 2 + 3 + 2 = 7 for K = 9, V = 7;
* 2 + 2 + 2 = 6 for K = 7, V = 6.

An initial assertion checks this. A concurrent assertion checks that no
correction ever uses a search that is still running. Before the first search,
`E = −T`, which means zero error.

## Interface and timing (`spect_decoder`)

| port       | dir | width | meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1     | clock; one depth per clock with `in_valid` |
| `rst_n`    | in  | 1     | asynchronous active-low reset; decoding starts in state 0 |
| `in_valid` | in  | 1     | `soft_in` holds a received symbol; may drop at any time |
| `soft_in`  | in  | 2×3   | soft code bits, `[1]` for G0, `[0]` for G1; 0 = sure '0', 7 = sure '1' |
| `out_valid`| out | 1     | `out_bit` holds a decision |
| `out_bit`  | out | 1     | decoded information bit |

The decision for information bit j comes out L + 2 clocks after its symbol was
accepted, when input is continuous. The first L − 1 symbols produce no output,
and after that each input produces one output. Timing:

| clock after a symbol is accepted | what happens |
|----------------------------------|--------------|
| the accepting edge               | the MNU registers the normalized metrics |
| next edge                        | the MACS results and the REA update are registered |
| two more edges                   | the majority vote stages |

To flush the last bits, feed L − 1 symbols of the zero tail.

Parameters and defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 9 | constraint length, N = 2^(K−1) states |
| `G0`, `G1` | `'o561`, `'o753` | generators |
| `SOFT_W` | 3 | soft input bits |
| `PM_W` | 6 | path metric bits |
| `L` | 55 | decision length (REA row length) |
| `T` | 27 | retention threshold |
| `V` | 7 | speed-mismatch factor (correction period) |
| `MV_N1` | 8 | first-stage group size of the vote |
| `PMSU_S` | 2 | number of search groups |
| `CS_PER_STAGE` | 3 | compare-select levels per register in the search tree |
| `GUARD_RING` | 1 | enable the dead-lock guard states |

The other evaluated configurations:

* K = 8: `G0='o247, G1='o371, L=46, T=26, V=7`
* K = 7: `G0='o133, G1='o171, L=40, T=26, V=6`

## Trellis numbering and branch metric

A state holds the last K − 1 information bits, with the newest bit in the MSB.
From state p, bit u leads to `(u << (K−2)) | (p >> 1)`. The encoder register is
`{u, p}`, and each code bit is the parity of that register ANDed with a
generator, whose MSB taps the newest bit. The decision bit of a MACS unit is
the predecessor's LSB.

The branch metric of a symbol is the sum of the distances of the two soft values
from their ideal levels: x for code bit 0, 7 − x for code bit 1. `BM_B` is the
sum of `min(x, 7 − x)`.

T only has a meaning on a given metric scale, and the scale used here is this
design's choice. A half-scale metric, with the same T, kept all 256 states
alive at 4 dB.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_spect_bmu`: all 64 input pairs.
* `tb_spect_msu`: w and corr against a depth counter, with pauses.
* `tb_spect_mnu`: registered `BM − w`, hold on invalid.
* `tb_spect_macs`: random inputs to a normal and a guard unit, including
  saturation and purge.
* `tb_spect_rea`: K = 4, L = 6 against a row model.
* `tb_spect_mvu1d`: N = 64, sparse and dense survivors, 2-clock latency.
* `tb_spect_pmsu`: default size, exact E and 5-clock latency, busy window.
* `tb_spect_decoder`: the top at its default parameters. `spect_dec_checker`
  encodes random bits, adds AWGN (BPSK, 4 dB) and quantizes with step 0.5. It
  runs a separately written bit-true model of the algorithm and compares:
  * all N path metrics and survivor flags at every depth;
  * every decoded bit;
  * latency and output count.

  The phases are a clean channel, 2000 noisy bits with random input stalls, a
  60-symbol burst of random symbols, and a clean recovery. The test requires
  each of these to happen at least once: a correction with non-zero error,
  gated rows, a stall, a guard state out of band, a depth where only the guard
  states survive, and completed searches.
* `tb_spect_workloads`: the K = 8 and K = 7 decoders under the same checker.

Results of those runs:

* The decoder matches the model at every depth and on every bit.
* The clean phases decode without errors.
* The decoder recovers on its own after the burst.

| config | 4 dB bit errors in 2000 | average survivors |
|--------|-------------------------|-------------------|
| K = 9  | 23                      | 142.6 of 256      |
| K = 8  | 12                      | 96.8 of 128       |
| K = 7  | 6                       | 60.4 of 64        |

A wider band lowers the error rate (with T = 60 and 8-bit metrics there were no
errors) but keeps more states alive. Treat T as a value to calibrate against the
metric scale and the quantizer in use.

To simulate with plain Verilator, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/spect_pkg.sv \
    tb/tb_spect_decoder.sv --top-module tb_spect_decoder -o sim
./obj_dir/sim
```

Use the same command with another `tb_*.sv` for the other tests. The full-size
run takes well under a second of CPU time.

## What is this design's own

The structure follows the SPEC-T decoder:

* BMU, MSU with `BM_B + T + E`, normalization, the MACS with input gating and
  sign-bit purge;
* the enabled register exchange, the two-stage vote with 8-row groups;
* the two-group pipelined search;
* the guard ring;
* all numeric parameters except `CS_PER_STAGE`.

Chosen here:

* the soft-value convention and the metric scale;
* the state numbering;
* the `in_valid` stall interface;
* the pipeline registers (after the MNU, in the vote, in the search tree every
  3 levels);
* the snapshot register of the search;
* saturation and tie-breaking;
* the choice of guard states and their initial metric 0;
* the three-valued clip in the vote;
* clearing of the REA at reset.

Not modelled:

* clock gating as a cell; it is an enable;
* the general q-stage vote; only the two-stage form is built;
* decoders with more than one decision bit per branch (t > 1);
* power and area.
