# Soft-decision BCH decoder for IEEE 802.15.6 body-area networks

The IEEE 802.15.6 standard protects its packets with the double-error-correcting
BCH(63,51) code and its shortened form BCH(31,19). A plain hard-decision decoder
keeps only the sign of each received sample. A soft-decision decoder also uses how
reliable each bit is, and gains about 1 dB. This RTL implements a Chase-II
soft-decision decoder. It is built for very low energy per decoded word:

* **One hard-decision kernel, reused.** The two least reliable bits (LRBs) give
  four test patterns. The kernel decodes them one per clock cycle.
* **Early termination.** Most words stop after the first pattern. Across the
  simulated SNR range a word takes 1.0 to 3.6 patterns on average.
* **Probabilistic sorting.** The second-least-reliable bit is searched only in
  the last two stages of the minimum tree. This is about half the area of an
  exact two-minimum sorter, and the correct bit is found most of the time.
* **A Peterson-rule kernel.** The kernel uses a closed-form error locator and a
  fully parallel Chien search, with no lookup table and no Berlekamp–Massey
  iterations.

Everything is SystemVerilog-2017 and synthesizable. Verilator and slang both
accept it without errors.

## Data flow

```
 in_rx (63 x 4-bit samples) ──► input register ──► hard decision y, reliabilities |r|
                                                      │                │
                                                      │        probabilistic sorter ──► idx1, idx2
                                                      ▼                │  (Mode, Counter)
                                          test pattern generator ◄─────┘ index
                                                      │ tp, flip
                                                      ▼
                    ┌─────────────────────── HDD kernel (one cycle) ──────────────────────┐
                    │ syndromes s1,s3,s1^3 → ELP (Peterson) → Chien search → error locator │
                    └───────────────────────────────────────────────────────────────────────┘
                          │ s1,s3,s1^3, roots found          │ error vector
                          ▼                                  ▼
                     controller  ◄── metric check ──  winner decision ──► out_codeword
```

| module | role |
|---|---|
| `sdd_top` | The whole decoder. It holds the input register and the output register. |
| `hard_decision_unit` | Sign → hard decision `y`. Magnitude → reliability `|r|` (3 bits, saturating). |
| `prob_sort_unit` | Two-least-reliable-bit finder (`pmvg` ×2, `connection_unit`, built from `mvg1`/`mvg1_tree`). |
| `test_pattern_generator` | Gray-ordered test patterns from one flip register. |
| `hdd_kernel` | `syndrome_unit` → `elp_unit` → `chien_search` → `error_loc_evaluator`. |
| `winner_decision_unit` | Soft metric and the best candidate so far. |
| `sdd_controller` | Pattern counter, syndrome classification and both early-termination rules. |
| `bch_pkg` | Field size, code constants, enums and GF(2^6) functions. |

## The hard-decision kernel (Peterson rule)

Elements of GF(2^6) are 6-bit vectors over α, with p(x) = 1 + x + x^6. The code
bit at position j is the coefficient of x^j.

1. **Syndromes.** `s1 = Σ y_j α^j` and `s3 = Σ y_j α^{3j}`. Each term is a constant,
   so both syndromes are XOR trees. The unit also outputs `s1^3`.
2. **Classification** (done in the controller):

   | condition | meaning | roots expected |
   |---|---|---|
   | s1 = 0, s3 = 0 | no error | 0 |
   | s1 = 0, s3 ≠ 0 | more than two errors, undecodable | – |
   | s1^3 = s3 | one error | 1 |
   | otherwise | two errors | 2 |

3. **Error locator.** `δ(x) = 1 + δ1 x + δ2 x²` with `δ1 = s1` and
   `δ2 = (s1³ + s3)/s1`. The division is a multiplication by `s1^62`, built from
   squarings and four multipliers.
4. **Chien search, fully parallel.** All 63 values `δ(α^i)` are computed in one
   cycle. There are 124 constant multiplications, and each one is an XOR network
   over the six coefficient bits.
5. **Error locations.** A zero at `α^i` marks bit `(63 − i) mod 63`, because the
   roots are the inverses of the error locators. The number of zeros found goes
   to the controller.

A pattern counts as a **valid candidate** only when its class is decodable and
the Chien search finds exactly the number of roots that the class predicts. A
two-error syndrome whose locator has no roots in the field is therefore
rejected. So is a root that falls in the removed part of a shortened word. The
kernel is a bounded-distance decoder: it corrects every pattern of up to two
errors and never claims to correct more.

## Chase-II schedule and early termination

A word is accepted (`in_valid`/`in_ready`). From then on, cycle *k* (k = 0..3)
decodes test pattern *k*:

| cycle | test pattern | bit flipped for the next cycle |
|---|---|---|
| 0 | y | idx1 |
| 1 | y ⊕ e(idx1) | idx2 |
| 2 | y ⊕ e(idx1) ⊕ e(idx2) | idx1 |
| 3 | y ⊕ e(idx2) | – |

Consecutive patterns differ in one bit (Gray order). The generator is therefore
one 63-bit flip register that toggles the bit named by the sorter's `index`
output. The sorter is combinational and works on the stored reliabilities, so
its result is ready before the first flip is needed.

The **soft metric** of a candidate `c = y ⊕ flip ⊕ err` is the sum of `|r_i|`
over the bits where `c` differs from `y`. For BPSK this ranks candidates the
same way as the squared Euclidean distance. The winner unit keeps the candidate
with the smallest metric; on a tie it keeps the earlier one. It raises
`metric_check` when the current candidate becomes the new best.

Decoding of a word ends after the cycle in which:

* **rule 1:** the current pattern is a valid candidate with fewer than two
  errors, or
* **rule 2:** it is the third pattern, and it beat the first two
  (`metric_check` in cycle 2), or
* the fourth pattern has been decoded.

If no pattern gives a valid candidate, the output is the hard decision `y`.

**Timing.** A word takes 1 to 4 cycles, one per test pattern. The next word is
accepted in the cycle the current one finishes, so back-to-back words leave no
idle cycle. `out_valid` pulses *k* cycles after the accepting clock edge, where
*k* = `out_num_tp`, the number of patterns used. Without early termination this
gives 51 information bits per 4 cycles, which is 6.375 Mb/s at 500 kHz. Early
termination raises the rate by the inverse of the average pattern count.

### Comparing the termination rules

The `ET1_EN` and `ET2_EN` parameters (both 1 by default) switch the two rules
off one at a time, to show what each contributes. `out_term` reports which rule
ended each word. `tb_sdd_et_modes` runs four decoders side by side on the same
noisy (63,51) words. Average test patterns per word:

| Eb/N0 | no rule | rule 1 | rule 2 | both |
|---|---|---|---|---|
| 0 dB | 4.00 | 3.90 | 3.73 | 3.63 |
| 2 dB | 4.00 | 3.59 | 3.77 | 3.35 |
| 4 dB | 4.00 | 2.31 | 3.96 | 2.27 |
| 6 dB | 4.00 | 1.27 | 3.99 | 1.26 |
| 8 dB | 4.00 | 1.01 | 4.00 | 1.01 |

Rule 1 does most of the work at high SNR. Rule 2 mostly helps at low SNR, where
many words would otherwise run all four patterns.

## Probabilistic sorting of the least reliable bits

The 63 reliabilities are padded to 64 and go through a 6-stage tree of `mvg1`
blocks. Each `mvg1` is one 3-bit comparator and one multiplexer. Its output `cp`
is 1 only when the right input is strictly smaller, so on a tie the lower index
wins. The chain of `cp` bits along the winning path is the index of the minimum.

An exact second minimum would have to track a runner-up at every node. Here it
is taken from the last two stages only:

* each half (`pmvg`, 32 inputs) compares the minima of its two quarters. The
  winner is the half's `min1`, and the loser is kept as the half's `min2`,
  together with its index.
* the `connection_unit` compares A.min1 with B.min1 to get `min1`. Then either
  `min(A.min2, B.min1)` (A won) or `min(A.min1, B.min2)` (B won) gives `min2`.

`min1` and `idx1` are always exact. `min2` is exact whenever the true second
minimum lies in the other half or in the sibling quarter of the winner. For
uniformly placed values this is about 75% of words. In the end-to-end test, the
value it returns differs from the true second minimum in about 9% of words,
mostly at low SNR. The published evaluation found a negligible loss in error
rate from this shortcut.

For the shortened code, reliabilities 31..62 and the padding input are forced
to the maximum. Ties always go to the lower index, so those positions are never
chosen.

## Shortened (31,19) mode

`in_mode = MODE_31_19` selects the shortened code. The word occupies bits 0..30.
The 32 removed information bits (30 < j ≤ 62) are known zeros. The input
register clears their samples, so they arrive as zeros. The sorter never selects
them, and the error evaluator drops roots that point there. Syndromes need no
change, because zero bits add nothing. The encoder convention assumed is
systematic: parity in bits 0..11 and information in bits 12 and up.

## Interface of `sdd_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | handshake; a word is taken when both are high at a rising edge |
| `in_mode` | in | 1 | `MODE_63_51` (0) or `MODE_31_19` (1) |
| `in_rx` | in | 252 | 63 samples, sample *i* in bits `[4i+3:4i]`, 4-bit two's complement (bit 0 sent as +, bit 1 as −) |
| `out_valid` | out | 1 | one-cycle pulse, no back-pressure |
| `out_codeword` | out | 63 | decided codeword, all 63 code bits (information in bits 12 and up) |
| `out_num_tp` | out | 3 | test patterns used for this word (1..4) |
| `out_term` | out | 2 | bit 0: ended by rule 1, bit 1: ended by rule 2, 0: all four patterns ran |

## How far this follows the published decoder

Taken from the published design:

* the block structure and its connections;
* the Peterson-rule kernel with a fully parallel (63-way) Chien search;
* one test pattern per cycle, in Gray order;
* both early-termination rules;
* the s = 2 probabilistic sorter with MVG1/PMVG/connection-unit structure;
* the 4-bit samples, 3-bit reliabilities and 63-bit datapath.

Choices made here where the published description is silent:

* the primitive polynomial 1 + x + x^6, the one that yields the standard's
  generator polynomial 1 + x³ + x⁴ + x⁵ + x⁸ + x¹⁰ + x¹²;
* two's-complement samples with saturation of −8;
* on ties, the comparator and the winner both prefer the earlier or lower
  candidate;
* rule 1 applies only to a pattern that decoded validly;
* output falls back to the hard decision when no pattern decodes;
* which positions are removed in shortened mode;
* the handshake, input and output registers, and the `out_num_tp` and
  `out_term` ports;
* asynchronous reset.

Other differences:

* The block diagram labels the syndrome, locator and index buses 5 bits wide.
  Elements of GF(2^6) and indices into 63 bits need 6, and 6 are used.
* The fabricated chip builds the Chien search from a custom pass-transistor XOR
  cell and shares XOR terms by hand. Here it is plain logic, and the sharing is
  left to synthesis.
* The chip has a pad-side I/O buffer whose organisation is not described. It is
  not modelled. The decoder takes and returns whole words in parallel.
* Level shifters, power gating and the choice of supply voltage are physical
  design matters and are not represented.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/bch_ref_pkg.sv` is an
independent behavioural model:

* log/antilog field arithmetic;
* a systematic encoder;
* an exhaustive weight-≤2 decoder;
* a Chase-II model with the same early-termination and LRB rules.

`tb_sdd_top` runs the full decoder at its only configuration. It encodes random
words, adds BPSK/AWGN noise, quantises to 4 bits with 2.5 steps per unit
amplitude, and decodes 2000 words at each of these points:

| code | Eb/N0 (dB) |
|---|---|
| (63,51) | 0, 3, 5, 8 |
| (31,19) | 0, 5 |

It compares every output bit-exactly with the model, including the number of
patterns used. It also checks:

* the latency;
* the back-to-back rate;
* that each mechanism occurred at least once: rules 1 and 2, all four patterns,
  undecodable patterns, one- and two-error corrections, hard-decision fallback,
  an inexact second minimum, shortened mode, input gaps.

Average test patterns measured in `tb_sdd_top`:

| code | 0 dB | 3 dB | 5 dB | 8 dB |
|---|---|---|---|---|
| (63,51) | 3.64 | 2.91 | 1.67 | 1.01 |
| (31,19) | 3.63 | – | 1.51 | – |

These follow the published trend (about 3.7 / 2.7 / 1.4 / 1.0 for the long
code). The gap at mid SNR comes from this quantisation and noise model.

Run one testbench with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/bch_pkg.sv tb/bch_ref_pkg.sv tb/tb_sdd_top.sv --top-module tb_sdd_top
./obj_dir/Vtb_sdd_top
```

Without the `+verilator+rand+reset` option, Verilator starts uninitialised
variables at zero. The design resets everything it reads, so that makes no
difference. The full-decoder simulation takes well under a second; compiling it
takes about a minute.

## Changing it

* `bch_pkg` holds the field, the code lengths, the sample and reliability widths
  and the metric width. The GF functions are elaboration-time constant
  functions, so a different primitive polynomial only needs `PRIM_POLY`.
* `prob_sort_unit #(.W(...))` builds a deeper tree for longer words. The
  `mvg1`, `pmvg` and `connection_unit` blocks are parameterised in tree depth
  and value width.
* The decoder is written for t = 2, with the closed-form Peterson locator.
  Another code needs a different locator unit.
