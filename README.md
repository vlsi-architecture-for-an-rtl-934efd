# Radix-4 turbo codec for LTE with shared-resource ACS units

In a log-MAP turbo decoder, the forward (alpha) and backward (beta) state
metric recursions are the costly part. They are recursive, so they cannot be
pipelined away, and each trellis step needs an add-compare-select (ACS) unit
per state. Radix-4 recursions merge two trellis steps per clock and double the
throughput, but a plain radix-4 ACS needs three max* operators per state.

This design uses one property of the 8-state LTE trellis. In a radix-4 step,
states come in pairs that read the same four source metrics. For the two
states of a pair, the first-level max* operators have operands with *the same
distance*. That distance is all the compare, the select and the correction
term depend on. So the first level is computed once and shared by both
states. This is the **Maximum Shared Resource (MSR)** radix-4 ACS. A state
pair costs four radix-2 ACS instead of six, and the whole 8-state radix-4
recursion costs 16 instead of 24.

Around this recursion unit the repository has a complete, working LTE-style
turbo codec:

* a rate-1/3 turbo encoder: two RSC encoders and a QPP interleaver;
* an iterative turbo decoder: a radix-4 MSR log-MAP SISO decoder that is used
  alternately as MAP decoder 1 and MAP decoder 2, with interleaving,
  de-interleaving, early stopping and hard-decision output.

All of it is synthesizable SystemVerilog. The codec is checked bit-exactly
against an independent reference model.

## 1. The trellis and why sharing works

The constituent code is the LTE RSC code:

* feedback polynomial 1+D²+D³;
* parity polynomial 1+D+D³.

A state is `{s1,s2,s3}`, with `s1` the newest register bit. For feedback bit
`a`:

```
u = a ^ s2 ^ s3        (systematic bit)
p = a ^ s1 ^ s3        (parity bit)
next state = {a, s1, s2}
```

With antipodal symbols (bit 1 → +1), a branch metric is
`G = u·(Ls+La) + p·Lp`. Two facts follow from the equations:

1. **Antipodal butterflies.** The two branches that leave one state carry
   `+G` and `−G`. So do the two branches that enter one state. Only two
   magnitudes exist per step: `G1 = Ls+La+Lp` when u = p, and
   `G2 = Ls+La−Lp` when u ≠ p.
2. **Shared radix-4 neighbourhoods.** Over two steps, state `{s1,s2,s3}`
   reaches `{a2,a1,s1}`. All four states with the same `s1` therefore share
   the same four successors.

Take the backward recursion and the pair `A = {s1,s2,0}`, `B = {s1,s2,1}`.
Group the four two-step paths by their middle state `M0 = {0,s1,s2}` or
`M1 = {1,s1,s2}`. The second-step branch metrics (`±c0`, `±c1`) depend only on
the middle state, so both A and B see the same first-level pair.
The first-step branch metric is `+t` for A and `−t` for B
(fact 1). Because `max*(x+t, y+t) = max*(x,y) + t` holds exactly for every
correction rule used here:

```
u0 = max*(β(0,0,s1) + c0, β(1,0,s1) − c0)     shared
u1 = max*(β(0,1,s1) + c1, β(1,1,s1) − c1)     shared
β'(A) = max*(u0 + t, u1 − t)
β'(B) = max*(u0 − t, u1 + t)
```

The forward recursion has the same structure:

* pairs are `{0,d2,d3}` and `{1,d2,d3}`;
* the first level uses the earlier step's branch metrics;
* the second level uses the later step's.

`state_metric_unit` computes this wiring from trellis functions in
`turbo_pkg` at elaboration time. Nothing is hand-entered.

Because the sharing is exact, a radix-4 MSR step gives exactly the same
result as two radix-2 steps. The testbenches rely on this and compare against
a plain radix-2 model.

## 2. Numbers

| quantity | width | format |
|---|---|---|
| channel LLR `Ls`, `Lp` | 6 bit | two's complement, units of 1/4 |
| a-priori / extrinsic LLR | 8 bit | same, saturated |
| branch metric `G1`, `G2` | 10 bit | doubled domain |
| state metric | 14 bit | doubled domain, modulo |

* **Doubled domain.** Branch metrics are twice the textbook
  `γ' = ½·u·(Ls+La) + ½·p·Lp`, so no halving is needed. State metrics and
  the max* correction are scaled to match. The LLR unit halves once at the
  end: `LLR = d/2` and `Le = (d − 2(Ls+La))/2`, where `d` is the difference
  of the two max* trees.
* **Modulo metrics.** State metrics are never normalised; they wrap around.
  Every decision uses a difference of two metrics, and differences stay
  correct while the metric spread is below 2¹³. Alpha starts at state 0
  (0 for state 0, −1024 for the others). Beta starts with all-equal metrics,
  because the trellis is not terminated.
* **max* correction.** `maxstar` computes `max(a,b) + f(|a−b|)`. The `ALG`
  parameter picks one of six rules. Below, `d` is the metric difference in
  doubled-domain LSBs, so the natural-log difference is x = d/8.

| `ALG` | correction added (LSBs) |
|---|---|
| `CORR_MAX_LOG` | 0 |
| `CORR_CONSTANT` | 3 for d < 16 (3/8 below x = 2) |
| `CORR_LINEAR` | max(0, ⌊(22−d)/4⌋) (ln 2 − x/4) |
| `CORR_MULTI_STEP` | 5 / 3 / 1 / 0 with breaks at d = 8, 16, 24 |
| `CORR_HYBRID` | linear for d < 12, then 1 up to d < 24 |
| `CORR_LOG_LUT` (default) | round(8·ln(1+e^(−d/8))): 6 at d = 0, 0 from d = 22 |

The five approximate rules are the classical constant, linear, max-log,
multi-step and hybrid log-MAP variants. Their breakpoints and constants are
this design's own choice. The table rule is the default because the ACS is
described with a look-up table for the log term.

## 3. Decoder organisation

### SISO decoder (`siso_map_decoder`)

One pass over a block of K bits has three phases:

| phase | cycles | work |
|---|---|---|
| LOAD | K | store K (Ls, La, Lp) triples in local buffers |
| FWD | K/2 | radix-4 alpha recursion; alpha at every even step goes to an alpha memory of K/2 × 8 metrics |
| BWD | K/2 | radix-4 beta recursion from the end; two LLR units give the bits 2j and 2j+1 of pair j each cycle |

During BWD, the odd-step metrics that a radix-4 recursion skips are rebuilt
by one bank of eight radix-2 ACS for alpha(2j+1), and one bank for
beta(2j+1). `done` pulses after the last pair. The time from the last input
to `done` is K cycles.

### Turbo iteration (`turbo_decoder`)

One SISO instance serves both MAP decoders, in turn. The channel values stay
in memories in natural order, and so does a single extrinsic memory:

* **Decoder 1.** Position k reads `Ls[k]`, `Le[k]` and `Lp1[k]`.
* **Decoder 2.** Position k reads `Ls[π(k)]`, `Le[π(k)]` and `Lp2[k]`.
  The `qpp_interleaver` generates `π(k) = (F1·k + F2·k²) mod K` with two
  modular adders per step and no multiplier.

The address used for each position goes into an address buffer while the
inputs are fed. When the SISO returns extrinsics for positions 2j and 2j+1,
they are written back to the buffered addresses. That one mechanism
interleaves the output of decoder 1 and de-interleaves the output of
decoder 2. After each decoder-2 pass, the hard decisions are written to the
decision memory in natural order.

**Stopping.** Decoding ends after `MAX_ITER` (8) iterations, or earlier
when a whole iteration after the first changes no hard decision. A receiver
cannot measure its error rate directly, so this "decisions are stable" test
stands in for "iterate until the errors are gone".

**Timing.** One block takes `K + iterations·2·(2K+1) + K` cycles:

* K cycles of input;
* 2K+1 cycles per half iteration;
* K cycles of output.

For K = 40 that is 404 cycles at two iterations and 1376 at eight.

**Handshake.** Both the encoder and the decoder accept input only while
`in_ready` is high. An assertion flags `in_valid` at any other time.

### Encoder (`turbo_encoder`)

The encoder loads K bits into a block buffer, then outputs one
(systematic, parity 1, parity 2) triple per cycle:

* RSC 1 encodes `E[i]`;
* RSC 2 encodes `E[π(i)]`, read through a second port of the buffer.

Both encoders start from state 0 for every block. No tail bits are added.
A block takes 2K cycles.

## 4. Module map

```
turbo_codec_top
├── turbo_encoder
│   ├── qpp_interleaver
│   └── rsc_encoder ×2
└── turbo_decoder
    ├── qpp_interleaver
    └── siso_map_decoder
        ├── branch_metric_unit ×2          (steps 2j, 2j+1)
        ├── state_metric_unit  (alpha, BACKWARD=0)
        │   └── msr_acs_radix4 ×4 → acs_radix2 ×4 → maxstar
        ├── state_metric_unit  (beta, BACKWARD=1)
        ├── acs_radix2 ×16                  (odd-step alpha/beta)
        └── llr_unit ×2 → maxstar ×14
turbo_pkg: widths, types, the correction enum, trellis functions
```

The encoder and the decoder in `turbo_codec_top` are independent; the channel
between them is left to the user. All parameters have defaults:

* `K = 40`, `F1 = 3`, `F2 = 10`: the smallest LTE block and its QPP
  coefficients;
* `MAX_ITER = 8`;
* `ALG = CORR_LOG_LUT`.

Other LTE sizes only need other `K`, `F1` and `F2` values (for example
6144 / 263 / 480). Memories grow linearly, and K must be even.

## 5. Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference models live in
`tb/tb_ref_pkg.sv` and are written from the code's equations, not from the
RTL:

* the RSC trellis as a shift register;
* the QPP permutation in closed form;
* max* with the exact table computed by `ln`/`exp`;
* a radix-2 log-MAP SISO;
* a full turbo decoder;
* a BPSK/AWGN channel with LLR quantisation.

What the testbenches cover:

* The MSR pair is compared with an unshared radix-4 ACS.
* The recursion units are compared with two radix-2 steps over 300 double
  steps, including wrap-around.
* The SISO and the decoder are compared bit-exactly on every extrinsic,
  decision and iteration count, together with their cycle counts.
* `tb_turbo_decoder` runs six decoders side by side, one per correction rule.
* `tb_turbo_codec_top` runs the whole codec at its default parameters. It
  encodes, passes the data through the channel model and decodes. It counts
  early stops, runs to the iteration limit, decoder-2 passes, corrected
  channel errors and active max* corrections, and fails if any of them never
  occurs.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/turbo_pkg.sv tb/tb_ref_pkg.sv tb/tb_turbo_codec_top.sv \
    --top-module tb_turbo_codec_top
./obj_dir/Vtb_turbo_codec_top
```

Replace the testbench name to run another one. `tb_turbo_decoder_lte_k6144`
decodes two blocks at the largest LTE size (K = 6144, F1 = 263, F2 = 480)
bit-exactly against the reference. There the modulo metrics wrap thousands of
times per block. Every testbench runs in seconds.

## 6. Choices and limits

These points are this design's own choices:

* LTE code polynomials and QPP coefficients, taken from the LTE standard.
* No trellis termination.
* Full-block forward-then-backward SISO schedule, with no sliding window.
* One time-shared SISO.
* Early stop on stable decisions.
* Unscaled extrinsic exchange.
* All word widths.
* The modulo metric arithmetic.
* The constants of the correction rules.

Limits:

* **Throughput.** About 0.1 bit per cycle at two iterations for K = 40, with
  one SISO. That is far from the LTE peak rates. Parallel SISOs, which LTE
  decoders need for 100 Mb/s and more, are not built.
* **FPGA resources.** The savings claimed for MSR (12–18 % fewer LUTs than
  earlier radix-4 ACS designs) and the Spartan-3E figures (364 slices,
  660 LUTs) have not been reproduced. The conventional radix-4 ACS used as
  the baseline is not part of this repository.
* **Wrap-around margin.** At K = 40 the state metrics rarely wrap, so the
  end-to-end test reports wrap-around without requiring it. The recursion
  unit tests exercise it deliberately.
