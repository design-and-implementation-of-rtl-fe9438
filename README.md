# Adaptive Viterbi decoder with threshold-limited survivors

A conventional Viterbi decoder extends and compares every state of the
trellis at every stage, so its add-compare-select (ACS) hardware and its
survivor memory grow as 2^(K-1) with the constraint length K. The adaptive
Viterbi algorithm (AVA) keeps only the paths that look promising. Two rules
decide which paths those are:

1. **Threshold.** A path is kept only if its metric is below `d_m + T`.
   `d_m` is the best metric of the previous stage and `T` is a configured
   threshold.
2. **Cap.** No more than `N_max` paths survive a stage.

The datapath is sized by `N_max`, not by the number of states. `N_max`
stored survivors become `2*N_max` candidate paths per stage, and only those
go through add, compare and threshold logic. Choosing the `N_max` best
candidates would normally need a sorter. This design has none: when too many
candidates pass the threshold, it lowers `T` by 2 and evaluates the stage
again, until the survivors fit.

This RTL implements that decoder for a rate-1/2, K=4 (8-state)
convolutional code with 3-bit soft-decision inputs. The hardware holds
`NMAX = 4` survivor slots by default, and the survivor depth is 20. The cap
`N_max` is set at run time with `cfg_nmax`, from 1 up to `NMAX`. Like `T`,
it is chosen before decoding starts.

## The code and the symbols

| item | value |
|---|---|
| code | rate 1/2, K = 4, generators 15 and 17 (octal) |
| trellis | 8 states; next state = `{state[1:0], bit}`; `state[0]` is the newest bit |
| input | two 3-bit soft symbols per stage, `r0` for coded bit c0 and `r1` for c1 |
| soft scale | 0 = confident '0' (BPSK +1) … 7 = confident '1' (BPSK −1) |

The code, the state numbering and the soft scale are all set in `rtl/ava_pkg.sv`:

- The generators are stored "in delay order": bit *i* taps the input that is *i* stages old. So (15,17) appears as `4'b1011` and `4'b1111`.
- `expected_sym()` returns the encoder output for a given state and input bit.
- `next_state()` returns the state that follows.

## One trellis stage

```
 r0,r1 ─► ava_ctrl (latch) ─► ava_bmg ─► ava_bm_norm ─┐
                                                      ▼
 ava_pm_array ──► ava_acs (2*NMAX candidates, merge) ──► ava_threshold ──► ava_purge ──► ava_pm_array
      │                                                   ▲   │ count          │ src
      └──► ava_min_metric ── d_m ──────────────────────────┘   ▼                ▼
                     └─ best slot ───────────────────► ava_ctrl (T loop)  ava_path_mem ─► out_bit
```

1. **Branch metrics** (`ava_bmg`). For each of the four possible
   expected pairs {c0,c1}, the metric is the sum of the per-symbol distances:
   `r` where a 0 is expected, `7 − r` where a 1 is expected.
2. **Normalization** (`ava_bm_norm`). The best of the four metrics is
   subtracted from all of them, so the cheapest branch of each stage costs 0.
   Every candidate loses the same amount, so this changes no decision.
3. **d_m** (`ava_min_metric`). This block finds the smallest metric among
   the stored survivors and the slot that holds it. On a tie, the lowest
   slot wins.
4. **Add** (`ava_acs`). Slot *j* is extended by bit *b* into candidate
   `c = 2j + b`. The candidate's metric is the parent's metric plus the branch
   metric that the branch's expected symbol selects.
5. **Compare-select** (`ava_acs`). Some states are missing from the stored
   set, so two candidates can land on the same state. All candidates are
   compared in pairs, and only the one with the lower metric stays alive. On
   a tie, the lower index stays alive.
6. **Threshold** (`ava_threshold`). Candidate *c* passes when it is alive
   and its metric is below `d_m + T`. The block outputs the per-candidate
   `path_valid` flags and their count.
7. **Iteration** (`ava_ctrl`). If the count is greater than `N_max`, the
   stage stays open, `T` drops by 2, and steps 6–7 repeat on the next clock.
   Otherwise the stage commits.
8. **Purge and pack** (`ava_purge`). The passing candidates are packed, in
   ascending index, into the slots of the next path metric array. At most
   `N_max` slots are filled.
   `d_m` is subtracted from each one's metric, and the remaining slots are
   marked invalid.
9. **Survivor memory** (`ava_path_mem`). Every slot copies the path of its
   parent slot and shifts in its own input bit. The oldest bit of the
   previous stage's best path is the decoded output.

## The threshold loop

This is the least obvious part of the design. `ava_ctrl` looks at the
survivor count of the open stage once per clock and does one of four things:

| survivors at `t_cur` | action |
|---|---|
| 1 … `N_max` | commit the stage |
| more than `N_max`, `t_cur > 2` | `t_cur −= 2`, evaluate again (`t_reduce`) |
| more than `N_max`, `t_cur ≤ 2` | commit, keeping the first `N_max` in candidate order (`trim`) |
| none (a step went too far) | `t_cur += 2` (`t_back`), then commit next cycle with trimming |

**Why the loop can start safely.** `T` is reloaded from `cfg_t` at every
stage, and raised to `T_MIN = 8` if it is smaller. With `T ≥ 8`, the first
evaluation always keeps at least one path:

- Both generators tap the current input bit.
- So the two children of any path carry complementary symbol pairs
  (00/11 or 01/10).
- For a complementary pair, the two branch metrics sum to 14. The better
  child therefore costs at most 7, and normalization only makes it smaller.
- The best parent has metric `d_m`, so its better child is below `d_m + 8`.

A count of zero can therefore only follow a step down. The threshold one
step higher had more than `N_max` survivors. After stepping back, those
survivors all lie within a band two metric units wide, so trimming by index
keeps paths of almost equal cost.

**Why the step back matters.** Consider a variant that stops lowering `T`
at 8 and trims there. It drops the correct path far more often. At
Eb/N0 = 4 dB, `cfg_t = 30`, it made 348 bit errors in 5000 bits; the
step-back rule made 103.

**Timing.** A stage takes `1 + (number of threshold steps)` clock cycles.
`in_ready` is high in the commit cycle, so a stage with no step leaves the
decoder accepting one symbol pair per clock. Assertions in `ava_ctrl` check
two invariants: the working threshold is never zero while a stage is open,
and a stage never has zero survivors after a step back.

**Why metrics stay small.** Every kept metric is below `d_m + T`, and the
purge subtracts `d_m` before storing it. Stored metrics therefore lie in
`[0, T)`:

- With `T ≤ 63` (a 6-bit `cfg_t`), a candidate is at most 63 + 14.
- That fits the 8-bit metric type.
- No separate overflow rescaling is needed.

**Choosing `T`.** A large `T` makes the loop run often, and each step costs
a cycle. It does not buy accuracy with `N_max = 4`. The numbers below come
from the behavioural model, with 20000 bits per point. Threshold steps per
stage are in parentheses:

| `cfg_t` | 3 dB | 4 dB | 5 dB | 6 dB |
|---|---|---|---|---|
| 10 | 8.0 % (0.16) | 4.9 % (0.09) | 2.8 % (0.05) | 0.35 % (0.01) |
| 14 | 7.2 % (0.69) | 3.5 % (0.43) | 0.64 % (0.22) | 0 (0.12) |
| 20 | 7.2 % (2.6) | 4.2 % (2.3) | 0.46 % (1.9) | 0 (1.6) |
| 30 | 9.4 % (6.9) | 3.1 % (6.6) | 0.74 % (6.3) | 0 (6.1) |
| 40 | 7.9 % (11.1) | 4.9 % (11.0) | 2.3 % (10.9) | 0 (10.7) |

A threshold in the low teens keeps most stages at one cycle. Errors come in
bursts, each one a stretch where the correct path was lost. Expect a few
tenths of a percent of spread between runs.

**Choosing `N_max`.** The cap matters much more than `T`. Same model, at
`cfg_t = 14` and 20000 bits per point:

| `cfg_nmax` | 3 dB | 4 dB | 5 dB | 6 dB |
|---|---|---|---|---|
| 1 | 51 % | 51 % | 46 % | 47 % |
| 2 | 30 % | 26 % | 12.5 % | 16 % |
| 3 | 13.6 % | 7.3 % | 2.6 % | 0 |
| 4 | 7.2 % | 3.5 % | 0.64 % | 0 |

With a single survivor, one wrong decision is permanent. The only way back
to the true state is from a state that differs from it in its oldest bit.
From such a state, with the (15,17) code, the wrong branch reproduces both
received symbols exactly and the right branch matches neither. A lone path
therefore always takes the wrong branch. Use `N_max = 1` or `2` only
for tests. For real decoding, build with a larger `NMAX` (see the note on
`NMAX = 8` under Verification).

## Survivor memory and output latency

Each slot holds a 20-bit shift register with the newest bit at position 0
(register exchange). At a commit, slot *j* takes `{path[src[j]/2][18:0],
src[j][0]}`, where `src[j]` is the candidate that filled the slot.

Output starts once `L` stages are stored. The bit of stage *n* leaves on
`out_bit` one clock after the commit of stage *n + L*, with `out_valid`
high for one cycle. To flush a message:

- Append K−1 = 3 zeros to end the encoder in state 0.
- Add `L` more stages of any symbols.

## Interface of `ava_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_t` | in | 6 | threshold `T`, reloaded at each stage (values below 8 act as 8); keep it stable while decoding |
| `cfg_nmax` | in | clog2(NMAX)+1 | survivor cap `N_max`, 1 … NMAX; 0 or a value above NMAX means NMAX; keep it stable while decoding |
| `in_valid` / `in_ready` | in / out | 1 | handshake for one symbol pair |
| `r0`, `r1` | in | 3 | soft symbols of coded bits c0, c1 |
| `out_valid`, `out_bit` | out | 1 | decoded bit |
| `path_valid` | out | 2·NMAX | which candidates pass the threshold in the current cycle |
| `n_surv` | out | clog2(2·NMAX)+1 | their count |
| `t_cur` | out | 6 | working threshold |
| `t_reduce` | out | 1 | the stage is re-evaluated with `T − 2` next cycle |
| `t_back` | out | 1 | the last step left no survivor; `T + 2` next cycle, then commit |
| `trim` | out | 1 | the stage commits with more than `N_max` passing; the first `N_max` are kept |

After reset, the path metric array holds one valid path: state 0 with
metric 0. This matches an encoder that starts from zero.

Parameters of the top:

- `NMAX` (default 4): the number of survivor slots, the largest usable `N_max`.
- `L` (default 20): the survivor depth.

K, the code, the symbol width and the metric widths are package constants.
With the defaults, synthesis gives about 700 word-level cells and 149
flip-flops.

## Sources of the design and choices made here

These parts follow the adaptive Viterbi architecture this design is built on:

- the threshold rule `metric < d_m + T`, with `d_m` taken from the previous stage;
- the cap `N_max`;
- `T` lowered by 2 per iteration and restored for each stage;
- `2*N_max` candidates, each with a path-valid flag;
- branch metrics selected by expected symbol;
- the block split into branch metric computation, best-branch search and
  normalization, ACS, threshold check, non-survivor purge, path metric
  register, path memory and output decoder;
- the 8-state trellis and the 3-bit soft quantizer.

These are this design's own choices:

- the code (K=4, 15/17 octal) and the state numbering;
- the soft distance measure;
- `NMAX = 4` and `L = 20`;
- `N_max` as a run-time input (`cfg_nmax`) rather than a build constant;
- all widths;
- the valid/ready handshake and the one-step-per-cycle timing;
- the lower bound `T_MIN = 8` on the starting threshold, the step back when a
  reduction leaves no survivor, and trimming by index;
- the tie rules (lowest index wins everywhere);
- slot packing in candidate order and rescaling by `d_m`;
- register exchange rather than trace-back;
- the reset state.

Known departures and gaps:

- **Branch metric normalization is not steered by the threshold.** The
  architecture this follows draws a feedback path from the threshold check
  to the branch metric normalization and gives it no function. Here the
  threshold acts on candidate path metrics, and normalization only removes
  the best branch metric.
- **The loop keeps at most `N_max`, not exactly the `N_max` cheapest.** A
  reduction of 2 can take the count from above `N_max` to well below it, so
  fewer than `N_max` paths may survive. When no threshold gives between 1 and
  `N_max` survivors, the trim keeps the first paths in index order, within a
  band 2 wide.
- **Only K=4 is built.** Other constraint lengths mean changing the package
  constants, the generators, the `next_state` rule and the `T_MIN` argument
  above.
- **Limits of the verification.** The testbench models the source bits,
  encoder, channel and quantizer in software. Nothing here was measured on
  an FPGA, and no power or area figures are claimed.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_ava_decoder` | The whole decoder at default parameters. Random messages are encoded (15,17), BPSK-modulated, given Gaussian noise and quantized to 3 bits. Every stage is compared with the behavioural model in `tb/ava_ref_pkg.sv`: cycle count, survivor count, trim flag, every decoded bit. Eight runs with `T` from 8 to 40, noise σ from 0 to 0.9 and `cfg_nmax` from 1 to 4 (and 0) make threshold reductions, reductions forced by a cap below `NMAX`, step-backs, trims, path merges and threshold purges all happen; the test fails if any of them never occurs. It also checks that no stage keeps more than `N_max` paths. Noiseless runs must decode without error, including one with `N_max = 1`; the σ = 0.5 run must stay below 5 % bit errors. |
| `tb_ava_bmg` | all 64 symbol pairs |
| `tb_ava_bm_norm` | random and corner metric sets |
| `tb_ava_min_metric` | random arrays with ties and empty slots |
| `tb_ava_acs` | random survivor sets, merges checked against an independently written encoder |
| `tb_ava_threshold` | metrics at and around `d_m + T` |
| `tb_ava_purge` | packing, the cap for every limit 1 … NMAX, rescaling |
| `tb_ava_pm_array` | reset contents, load and hold |
| `tb_ava_ctrl` | threshold sequence, step back, trim, handshake, back-to-back stages, with a random `cfg_nmax` per stage |
| `tb_ava_ber` | BER sweep, Eb/N0 = 1…7 dB with 3000 bits per point at `cfg_t = 30`; every decoded bit matches the model; the decoder must beat the raw channel from 4 dB and stay below 1e-2 at 7 dB |
| `tb_ava_path_mem` | register exchange at depth 6 against a queue model |

Results of `tb_ava_ber` (`NMAX = 4`, `cfg_t = 30`, 3000 bits per point,
hard-decision channel error rate for comparison):

| Eb/N0 (dB) | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|
| raw channel | 13.5 % | 10.6 % | 7.9 % | 5.6 % | 4.0 % | 2.3 % | 0.9 % |
| decoded | 27.9 % | 18.7 % | 4.8 % | 1.2 % | 0 | 0 | 0 |

Two observations:

- **Below about 3 dB, decoding loses.** The decoder does worse than the raw
  channel. Once the correct path falls out of the four survivors, errors come
  in bursts.
- **With all 8 states, it behaves like a full Viterbi decoder.** The same
  testbench with `NMAX = 8` runs no threshold steps. It gives 0.13 % at 3 dB
  and no errors from 4 dB up.

To run a testbench with Verilator (5.x), pass the packages first and let
`-y rtl` find the modules:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/ava_pkg.sv tb/ava_ref_pkg.sv tb/tb_ava_decoder.sv \
    --top-module tb_ava_decoder -o sim
./obj_dir/sim
```

Substitute another `tb/tb_ava_<block>.sv` and its top-module name to run a
unit test. The end-to-end run takes well under a second.
