# NII metric compression for sliding-window turbo decoders

A turbo decoder that works in sliding windows has to start the backward
recursion of every window from some set of state metrics. Next-iteration
initialization (NII) takes them from the previous iteration: at the end of each
window's backward recursion the K final backward metrics are saved, and the
same window starts from them one iteration later. For a 6144-bit LTE-advanced
code in 32-bit windows that is 192 window boundaries per decoding phase, two
phases, eight metrics of 12 bits each: 32,256 bits of storage if kept as they
are.

This design stores far less. For each boundary it keeps only

* **Δ**, the *range* of the eight metrics (largest minus smallest), saturated
  to 8 bits, and
* **IMAX** and **IMIN**, the 3-bit numbers of the state holding the largest and
  the smallest metric.

That is 14 bits per boundary and 5376 bits in total, six times less than
keeping the raw metrics. The reasoning behind it: a max-log-MAP decoder only
cares about differences between state metrics, and what matters most at the
start of a window is which state is the most reliable, which the least, and
how far apart they are. Ranges beyond 255 are saturated. The scheme rests
on the claim that clipping large ranges costs no error-rate performance; the
RTL tests here do not check that claim.

The RTL here covers the part that does this work: the compressor, the memory
that holds the compressed words, and the network that turns a word back into
eight starting metrics. The SISO decoder, the interleaver and the
deinterleaver around it are not included (see *What is not here*).

## Block structure

```
                 nii_top
 st_beta_i[8] -> nii_compressor --(reg)--> nii_memory --> nii_recovery -> ld_beta_o[8]
                   |- 4 x nii_max_min        384 x 14 bit
                   |- 3 x nii_max  (tree)
                   |- 3 x nii_min  (tree)
                   '- nii_sub_clip
```

| module           | what it is |
|------------------|------------|
| `nii_pkg`        | default sizes (K=8, d=12, d'=8, n=6144, w=32, 2 phases), the phase enum, the packed word type |
| `nii_max_min`    | one signed comparator `A > B` and two multiplexers: MAX(A,B) and MIN(A,B) |
| `nii_max`        | one comparator and one multiplexer: MAX(A,B) |
| `nii_min`        | one comparator and one multiplexer: MIN(A,B) |
| `nii_sub_clip`   | MAX − MIN, saturated to d' bits |
| `nii_compressor` | the comparator-sharing range finder over K metrics, with IMAX/IMIN |
| `nii_memory`     | simple dual-port RAM, one word per window and phase |
| `nii_recovery`   | multiplexer network that rebuilds K metrics from {Δ, IMAX, IMIN} |
| `nii_top`        | the three stages wired together, with a store port and a load port |

## The range finder: sharing comparators

Finding the maximum of 8 values takes 7 comparisons, and the minimum another
7. `nii_compressor` needs 10:

1. Four MAX-MIN modules sort the pairs (β0,β1), (β2,β3), (β4,β5), (β6,β7).
   One comparison per pair yields both the pair's larger and its smaller value.
2. The overall maximum can only be among the four pair maxima, and the overall
   minimum only among the four pair minima. A tree of three MAX modules and a
   separate tree of three MIN modules finish the search.
3. SUB/CLIP subtracts and saturates.

The code is written for any power-of-two K as a heap-ordered tree: node `n`
has children `2n` (operand A) and `2n+1` (operand B), leaves `K/2 .. K−1`
are the MAX-MIN outputs, node 1 is the root. For K = 8 the second level combines
pairs (0,1) with (2,3) and (4,5) with (6,7). In general it uses K/2 + 2(K/2 − 1)
comparators.

**Indexes come for free.** Every MAX, MIN and MAX-MIN module brings out its
comparator bit. Next to each value multiplexer sits an index multiplexer,
driven by the same bit, which passes on the state number of the value that was
chosen. IMAX and IMIN appear at the roots without any extra comparison.

**Ties.** Every comparator asks `A > B`. On equal inputs MAX takes B and MIN
takes A. B is always the higher-numbered side, so IMAX names the
*highest*-numbered of the tied maximum states and IMIN the *lowest*-numbered
of the tied minimum states. With all metrics equal: Δ = 0, IMAX = K−1,
IMIN = 0. The testbenches' reference models follow this rule, so a change to
the comparators shows up as failures there.

**Number format.** Metrics are d-bit two's complement and the comparisons are
signed. The difference of two d-bit numbers with max ≥ min always fits in d
unsigned bits; `nii_sub_clip` forms it in d+1 bits, then saturates to
2^d' − 1 and raises `clipped`.

The compressor is purely combinational: 3 comparator levels, then a subtractor.

## NII memory and addressing

`nii_memory` is a plain array: one write port and one read port on the same
clock, with a synchronous read (data on the next edge, with `rd_valid_o`).
A read of the address being written in the same cycle returns the old word.
Only the valid flag is reset. Default size: 2 × 6144/32 = 384 words of
8+3+3 = 14 bits. A compressed word is `{delta, imax, imin}`, with delta in the
top bits (`nii_pkg::nii_word_t`).

In `nii_top`, in-order phase words live at addresses `0 .. N/W−1` and
interleaved phase words at `N/W .. 2N/W−1`.

## Recovery

`nii_recovery` turns a stored word back into K starting metrics using
multiplexers only:

| state            | recovered metric |
|------------------|------------------|
| IMAX             | Δ                |
| IMIN             | 0                |
| every other one  | Δ / 2 (a wired shift) |

The outputs are d-bit values between 0 and 255, so their upper bits are always
0. Anchoring the minimum at 0 rather than at the decoder's own normalisation is
harmless: the max-log-MAP recursion depends only on metric differences. The
decoder can renormalise if it keeps state 0 at 0.

**This rule is this design's own choice.** What the design requires is that
recovery is a plain multiplexing network driven by Δ, IMAX and IMIN. Which
value the other states get is open, and "halfway" is one reasonable answer.
If your decoder wants another one (for example all others at 0, or at Δ),
only the `v_mid` line and the testbenches' reference models change.

## nii_top: interface and timing

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `st_valid_i` | in | 1 | store the metrics of one window |
| `st_phase_i` | in | `phase_e` | `PHASE_IN_ORDER` / `PHASE_INTERLEAVED` |
| `st_win_i` | in | ⌈log2(N/W)⌉ | window number |
| `st_beta_i` | in | K × d signed | final backward metrics |
| `st_clipped_o` | out | 1 | the range stored by the previous cycle's request was saturated |
| `ld_valid_i`, `ld_phase_i`, `ld_win_i` | in | | load the starting metrics of one window |
| `ld_valid_o` | out | 1 | `ld_beta_o` and the word outputs hold the answer |
| `ld_beta_o` | out | K × d signed | recovered starting metrics |
| `ld_delta_o`, `ld_imax_o`, `ld_imin_o` | out | d', log2 K, log2 K | the stored word, for observation |

* **Store:** request in cycle t. The compressed word is registered at the end
  of t and written at the end of t+1. One store per cycle.
* **Load:** request in cycle t, result in cycle t+1 (`ld_valid_o`). One load
  per cycle, and a load and a store can happen in the same cycle.
* A load must come at least two cycles after the store of the same window and
  phase. Earlier, it returns the word that was there before.
* Assertions flag window numbers ≥ N/W. The memory has its own assertions for
  addresses beyond its depth.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 8 | trellis states; power of two, ≥ 2 |
| `D` | 12 | state-metric width d |
| `DP` | 8 | stored range width d' (must be < D) |
| `N` | 6144 | code word length |
| `W` | 32 | window length |

The memory depth is 2·N/W and its word width DP + 2·log2 K.

## How far to trust it, and where it departs

Taken from the design description:
* storing the range and the two indexes instead of the metrics;
* the sizes: 8 states, 12-bit metrics, an 8-bit range, 6144/32, 5376 bits;
* the MAX-MIN / MAX / MIN / SUB-CLIP structure and the `A > B` comparators;
* generating the indexes from the comparison results;
* recovery by multiplexers.

Choices made here:
* the recovery values in the table above;
* the tie rule;
* signed comparison;
* saturation to 2^d' − 1;
* the general-K tree;
* the store register, the memory's timing and read-first behaviour, the address
  map and the handshake;
* the reset scheme.

The 5376-bit figure only works out with one word per boundary *for each of the
two decoding phases*. The memory is sized that way.

No error-rate simulation was done. Whether this recovery rule gives the error
rates claimed for the scheme cannot be judged from RTL tests. That needs a
full decoder.

## What is not here

* **SISO decoder** (max-log-MAP, forward/backward recursions): the producer of
  `st_beta_i` and the consumer of `ld_beta_o`. Its trellis, widths and schedule
  are not specified, so it is not written.
* **Interleaver / deinterleaver** between the two phases: the permutation is
  not specified.
* The earlier 3-bit static compression (six comparators per metric against
  ±16, ±32, ±64) is only a baseline and is not implemented.

## Verification

Each module has a self-checking testbench in `tb/`. Each computes its expected
values with independent integer code, not with the module's structure, and
prints `TB_RESULT checks=N failures=M`.

| testbench | what it does |
|-----------|--------------|
| `tb_nii_max_min`, `tb_nii_max`, `tb_nii_min` | extremes, ties, 2000 random pairs |
| `tb_nii_sub_clip` | ranges around 2^d' − 1, the widest range, random pairs |
| `tb_nii_compressor` | all-equal, one outlier in each position, normalised β0 = 0, narrow, full-width, many ties, near the limit; reference by linear scan; must see both saturated and unsaturated ranges |
| `tb_nii_sizes` | compressor plus recovery at K = 2, 4 and 16 with other widths (helper `nii_compressor_check`), against the same linear-scan reference; each size must saturate at least once |
| `tb_nii_recovery` | every (IMAX, IMIN) pair, including equal, with 6 ranges |
| `tb_nii_memory` | full 384-word fill, shuffled back-to-back read-back, read latency, read-during-write |
| `tb_nii_top` | default parameters, three decoder iterations over both phases and all 192 windows, with load of window c and store of window c−2 in the same cycle and random idle cycles; checks every recovered metric, the stored word, and the one-cycle latency of `ld_valid_o` and `st_clipped_o`; counts saturated and unsaturated ranges, loads in each phase, overlapped cycles and idle cycles, and fails if any of them never happens |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/nii_pkg.sv tb/tb_nii_top.sv \
          --top-module tb_nii_top -Mdir obj_top
./obj_top/Vtb_nii_top
```

Replace `tb_nii_top` with any other testbench name. Every testbench finishes
in well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/nii_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused package constants, and `rst_n` used
both as an asynchronous reset and in the assertions' `disable iff`.
