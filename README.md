# List-NPML detection with periodic error-detection-code decisions

A noise-predictive maximum-likelihood (NPML) detector for a PR4
(partial response class 4, target 1 - D^2) magnetic recording read channel
normally keeps one survivor path per trellis state. Most of its residual
errors are short error events. Often the correct sequence is among the few
most likely paths, but not the best one. This design keeps a ranked list of
the **N best paths per state**. The write side appends a few error-detection
bits to every chunk of P data bits. After each chunk the read side lets that
code pick, among the Q best candidate paths, the most likely one that it
accepts. The detector itself needs no knowledge of which error events
dominate. Any error event the code can see, and for which the correct path
is still in the list, gets corrected.

Main configuration (the defaults of every module):

| parameter | value | meaning |
|---|---|---|
| `K` | 2 | trellis state = last K bits, 2^K = 4 states |
| `L` | 3 | noise-predictor taps p_1..p_L |
| `N` | 3 | paths kept per state |
| `Q` | 6 | best paths checked by the code at each decision |
| `P` | 198 | data bits per chunk (decision period) |
| `KIND`, `M`, `POLY` | `EDC_PARITY`, 3, – | three interleaved parity bits per chunk (1 check bit per 66 data bits) |

`KIND = EDC_CRC, M = 4, POLY = 16'h0001` selects the alternative code: a
cyclic code with generator x^4 + 1.

## Signal flow

```
write:  coded bits ──► edc_encoder ──► (P data + M check bits) ──► to modulator/medium
read:   PR4 samples y_n ──► whitening_filter ──z_n──► list_npml_detector ──► P data bits / chunk
        predictor taps p_i ──┴──► npml_gcoef ──g_i──┘
```

`lnpml_top` contains both sides. They have separate ports because the
recording channel lies between them. Also outside this RTL: the Reed-Solomon
ECC, the run-length-limited modulation code, the analog front end and ADC,
the PR4 equalizer, and the estimation of the predictor taps. The taps are an
input port.

## The list trellis (hardest part)

**Noise prediction and the branch metric.** The whitening filter forms
z_n = y_n - Σ p_i y_{n-i}. For the detector, the signal plus the predicted
noise then follow G(D) = (1 - D^2)(1 - P(D)) = 1 - g_1 D - … - g_{L+2} D^{L+2}.
`npml_gcoef` computes g_i = p_i - p_{i-2}, with p_0 = -1. The branch metric
for moving from state s_k, along its t-th path, with new symbol a_n, is

    c = ( z_n + Σ_{i=1..L+2} g_i a_{n-i} - a_n )^2

Symbols map bit 1 → +1 and bit 0 → -1. The first K past symbols come from
the state. The older L+2-K symbols come from **that path's own history**.
Two paths that end in the same state therefore get different branch metrics
for the same transition. This is why the list cannot be kept by a simple
extension of the Viterbi add-compare-select. `list_bmu` computes all
2^K · N · 2 metrics every sample.

**Keeping N paths per state.** Each state j = {b_n, …} has two predecessor
states, k = {j[K-2:0], x} for x = 0 and 1. Each predecessor brings N paths,
so state j has 2N candidate extensions. `list_acs` adds each candidate's own
branch metric to its path metric. It then ranks the 2N sums against each
other, with ties going to the lower candidate index, and keeps the N
smallest in order. For each kept path it records which predecessor it came
from (beta) and its rank there (r). The ranking uses all pairwise
comparisons, in a helper called `kbest_select`. The cost is (2N)^2/2
comparators per state, so a new sample is handled every clock.

**Survivors.** `path_memory` copies whole paths instead of storing the
beta/r pointers and tracing back at the decision. Every path (state j,
rank l) owns two registers:
* a history register of its last L+2 bits, which feeds the branch metrics;
* a codeword register of its last P+M bits.

At each step every path loads the registers of the path it extends, then
shifts in the new bit. At the end of a chunk, all S·N candidate codewords
are available at once for checking. Storage is S·N·(P+M+L+2) flip-flops:
2 472 for the defaults.

**Start-up.** At reset the only path is (state 0, rank 0), with metric 0 and
an all "-1" history. Every other path has an infinite metric, which is the
all-ones value of the saturating 24-bit path metric. The lists fill as
distinct paths reach each state.

## The periodic update step

After every P+M samples the detector stalls its input for one cycle.
`update_unit` then does the following in that cycle:

1. It sorts all S·N path metrics and takes the Q smallest, C_m1 … C_mq.
2. It recomputes the code on each of these Q candidate codewords
   (`edc_check`). A candidate passes if the code finds no error and its
   metric is finite.
3. It decides the passing candidate with the smallest metric. If none
   passes, it decides C_m1, the overall best path. The P data bits of the
   decided path go out on `dec_data`, bit 0 first.
4. If at least one candidate passed, every passing path keeps its metric
   and all other paths are set to infinity. If none passed, all metrics are
   kept.
5. All finite metrics are reduced by the metric of the decided path, so the
   accumulators stay bounded. No comparison changes.

The next chunk is decoded from the paths that survive. `dec_pass`,
`dec_rank` and `dec_npass` report whether any candidate passed, the decided
path's position in C_q (0 is the best metric) and how many passed.
Q ≤ S·N limits how far down the list the code may vouch for a path.

## The error detection codes

A codeword is the P-bit chunk followed by its M check bits. Bit 0 is the
first bit on the channel.
* **Interleaved parity** (default): bit i belongs to class i mod M. The
  check bits make every class sum to zero. Any single error event of up to
  M consecutive bits leaves an odd error count in at least one class, so
  the code detects it.
* **CRC**: the remainder of D(x)·x^M divided by x^M + POLY, highest degree
  first.

`edc_encoder` passes the data bits straight through. It then inserts the M
check bits, holding `in_ready` low while it does. `edc_check` runs the same
step function (`edc_step` in `lnpml_pkg`) over the full codeword and tests
for zero.

## Number formats and timing

| quantity | format |
|---|---|
| y_n, z_n | signed 10 bits, 5 fractional (±16) |
| p_i | signed 10 bits, 8 fractional (±2) |
| g_i | signed 11 bits, 8 fractional |
| branch metric | unsigned 16 bits, units of 1/64, truncated and saturated |
| path metric | unsigned 24 bits, saturating; all ones = infinite |

The whitening filter has no pipeline register, so z travels with y and a
detector stall also stops the filter's delay line. The detector takes one
sample per clock. The decision appears one clock after the update cycle, as
a one-cycle `dec_valid` pulse. Throughput is P+M samples per P+M+1 clocks.
Every module uses an asynchronous active-low reset.

## Where this design departs from, or fills in, the algorithm

* **Surviving paths.** The update keeps every path the code accepted, not
  only the decided one. The alternative would be to restart the next chunk
  from the decided path alone. Both readings appear in the description of
  the algorithm; this design follows the update rule.
* **First chunk.** It starts from a single path, not from N copies of it.
* **Survivor memory.** Register exchange replaces pointer trace-back. The
  decisions are the same.
* **Check bits.** They go at the end of each chunk. The original idea puts
  them at positions the modulation code leaves unconstrained, but that code
  is not specified here. The parity classes interleave (i mod 3).
* **Arithmetic.** The fixed-point formats, the saturation, the metric
  normalisation, the tie-breaking rule, the valid/ready handshakes and the
  one-cycle update stall are all this design's own choices.
* **N = 50.** The largest list size studied, N = 50, is reachable through
  the parameters. It has been simulated (`tb_workload_n50`, with Q = 12, a
  value chosen here) but not synthesized: selection cost grows as N^2.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`.

* Unit tests compare against references written independently: polynomial
  products for g_i, real-valued branch metrics, stable sorts for the list
  selection and the update, code definitions for the EDCs, and bit lists for
  the survivor memory.
* `tb_list_npml_detector` compares each decision with a behavioural model of
  the whole algorithm. It uses a PR4 channel with correlated noise, where the
  predictor tap g_3 reaches beyond the 4-state trellis.
* `tb_lnpml_top` runs encoder → channel model → detector at the default
  parameters. It checks exact decoding without noise and bounds the error
  rate. It requires each mechanism to occur at least once: encoder stall,
  detector stall, best-path decision, correction through a lower-ranked
  path, fallback when nothing passes, and several paths passing.
* `tb_workloads` runs the configurations that were studied side by side on
  the same kind of channel: N = 1 as the reference, N = 3 with parity and
  with CRC, P = 66/594/3960, and N = 10 with Q = 12 and P = 1188.

  `tb_workload_n50` adds N = 50 with Q = 12.

  On identical data and noise, N = 3 makes about 57 % fewer bit errors than
  N = 1 at the noise level of `tb_workloads`. At the somewhat higher noise of
  `tb_workload_n50` the reduction is about 7 % for N = 3 and 31 % for N = 50. The channel is a simple PR4 model with autoregressive noise, not a
  Lorentzian or tape channel, so the error rates are only indicative.

To run a test with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/lnpml_pkg.sv tb/tb_lnpml_top.sv --top-module tb_lnpml_top
./obj_dir/Vtb_lnpml_top
```

Replace `tb_lnpml_top` with any other testbench name. `tb_workloads` takes
about two minutes.
