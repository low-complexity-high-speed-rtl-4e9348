# 4-D 8PSK TCM decoder, 11 bits per clock

This is a soft-decision decoder, written in SystemVerilog, for four-dimensional
8PSK trellis-coded modulation (TCM) at code rate Rm = 11/12. This is the
high-rate TCM scheme used for space data links. Each trellis stage carries 12
code bits in four consecutive 8PSK symbols: 11 information bits and one parity
bit from a 64-state rate-3/4 convolutional code. The decoder takes one stage
(four I/Q samples of 7 bits each) on every clock and returns 11 decoded bits
on every clock.

The hard part is the branch-metric computation. Every trellis branch is a
subset of 256 four-symbol points ("parallel transitions"), and the decoder
needs, for each of the 16 branch labels, the best of its 256 points. A direct
implementation costs 768 additions and 240 comparisons per stage. The
transition metrics unit (TMU) here needs 144 additions and 96 comparisons. It
does this by:

- folding the symbol signs into absolute values;
- sharing partial sums;
- splitting the selection into two comparison steps.

The Viterbi decoder behind the TMU is fully parallel. Each of its 64 states
chooses among 8 incoming branches with two comparator levels instead of three.

An encoder is included for loop-back testing. The repository also has
self-checking testbenches for every module and an end-to-end test that runs
the design at its default size.

## Bit numbering and the code

A stage is the word x11..x0:

| bits            | role                                                          |
|-----------------|---------------------------------------------------------------|
| x0              | parity bit from the convolutional encoder                     |
| x1, x2, x3      | coded information bits (the encoder's inputs)                 |
| x4..x11         | uncoded information bits                                      |
| {x11, x8, x4}   | also coded differentially (mod 8), see below                  |

On the ports, an 11-bit information word `info[k]` carries x(k+1).

**Convolutional code.** It is a 64-state rate-3/4 systematic feedback code,
defined by four parity-check polynomials (`tcm_pkg::H0..H3`, octal 103, 030,
066, 024). These values are this implementation's choice; before
interoperating with another modem, check them against the CCSDS 4D-8PSK-TCM
definition. The realisation is an observer form in which the parity bit x0 is
the last register stage. So x0 depends only on the state, and each state has 8
successors and 8 predecessors, one per input {x3,x2,x1}. A branch label is the
4-bit value {x3,x2,x1,x0}, so there are 16 distinct branch labels.

**4-D mapping.** All sums are mod 8, with W = 4x11 + 2x8 + x4:

    Z0 = W
    Z1 = W + 4x10 + 2x6 + x2
    Z2 = W + 4x9  + 2x5 + x1
    Z3 = W + 4(x10+x9+x7) + 2(x6+x5+x3) + (x2+x1+x0)

Symbol Z is sent at phase Z·π/4. The mapping is a bijection. The demapper
inverts it in closed form: W = Z0 first, then the weight-1, weight-2 and
weight-4 bits of Z1−W, Z2−W and Z3−W.

**Differential code.** Turning the whole constellation by 45° adds 1 to W and
changes nothing else. The encoder therefore accumulates {x11,x8,x4} as a 3-bit
number mod 8, and the decoder takes differences. A constant phase error that is
a multiple of 45° costs exactly one stage: the stage where the error appears.

## From 256 parallel transitions to one branch metric (`euclid_metric`, `tmu`)

Minimising the squared distance to a point is the same as maximising the
correlation d'_s = I·I_s + Q·Q_s. Because d'_(s+4) = −d'_s, four magnitudes
cover all eight points:

    C0 = |I|   C1 = |0.707(I+Q)|   C2 = |Q|   C3 = |0.707(Q−I)|

`euclid_metric` computes these four values with two constant multiplications.
It implements 0.707 as 181/256, rounded. It also keeps the sign of each d'_i,
because the rebuilt path needs it later.

**Sign folding.** In the mapping, the weight-4 bits x11, x10, x9 and x7 can
produce all 16 patterns of "+4" over the four symbols. So for each symbol the
better point of each pair {i, i+4} is always available, and choosing it costs
nothing. A label's 256 points therefore reduce to 16 candidates
k = {x8,x6,x5,x4}. Each candidate scores

    C0[Z0 mod 4] + C1[Z1 mod 4] + C2[Z2 mod 4] + C3[Z3 mod 4]

**Sharing and the two-step comparison.** The labels form four "big groups"
g = {x2,x1}; within a big group, x3 and x0 change only Z3. Within a big group,
the 16 candidates fall into four groups of four that share the same Z3 mod 4.
The TMU pipeline runs as follows; each step is one register stage:

| step | work                                                              | count          |
|------|-------------------------------------------------------------------|----------------|
| P1   | C0[a] + C1[b], for all a, b                                       | 16 additions   |
| P2   | + C2[c], for all a, b, c                                          | 64 additions   |
| P3   | comparison step 1: a 4-input maximum per group keeps one survivor | 16 × 3 compares |
| P4   | each label adds C3[(b + x0 + 2x3) mod 4] to its four group survivors | 64 additions |
| P5   | comparison step 2: a 4-input maximum per label gives the branch metric | 16 × 3 compares |

The P3 survivors are shared by the four labels of their big group.

P5 also rebuilds the winning path of each label, {Z3,Z2,Z1,Z0}, as hard
symbols, from:

- the two winner indices;
- the group-membership table;
- the delayed sign bits.

The group-membership and candidate-index tables (`MEMBER_TAB`, `CIDX_TAB` in
`tcm_pkg`) are computed at elaboration from the mapping functions. No numbers
are typed in.

Metrics are 7 bits (C ≤ 90) and branch metrics are 9 bits (≤ 360). A larger
metric is better throughout.

## Viterbi decoder (`acsu`, `smu_rx`, `max4_2level`)

**ACSU.** Every state t forms eight sums PM[p] + BM[{u, p[0]}], one per input
u, where p is the predecessor through u (`PRED_TAB`). It then selects the
largest with two comparator levels:

1. Four 2-input compare-selects (8 → 4).
2. `max4_2level`: all six pairwise comparisons in parallel, then a small
   look-up that names the winner and drives a 4:1 multiplexer.

A binary tree would need three comparator levels in this recursive loop.
Path metrics are 14 bits and wrap around. All comparisons look at the sign of
the difference, so no normalisation is needed. The spread of the metrics stays
below 6 × 360, far under 2^13. After reset the decoder assumes the encoder's
state 0: that state starts 1024 above the others.

**Survivor memory.** The survivor memory uses register exchange. Each state
holds the labels of its survivor over the last `SMU_DEPTH` = 48 stages. On each
stage, a state copies its predecessor's register and appends the new label.
The decision is the oldest label of state 0. A fixed output state avoids a
64-way maximum search; the depth of 48 (eight times the code memory) allows for
that. Both are this implementation's choices.

## Delay chain, demapper and differential decoder

The Viterbi decoder handles only 4-bit labels. The 16 candidate paths of every
stage (16 × 12 bits) wait in `delay_chain` until their stage is decided.
`delay_chain` is a circular buffer written as a memory array. A push stores one
stage. A pop releases the oldest stage and selects the path named by the
decided label. Stages leave in the order they entered, so the buffer follows
the Viterbi latency without a delay constant. Its depth is `SMU_DEPTH + 4`.

The selected path goes to `demapper`, which recovers x11..x0. Then
`diff_decoder` recovers {x11,x8,x4}.

## Interfaces and timing

Every block passes one stage per clock, qualified by a valid bit. There is no
back-pressure, and gaps in `in_valid` are allowed. Resets are asynchronous and
active-low.

Decoder latency is counted in pushes, because register exchange emits stage n
only when stage n + SMU_DEPTH − 1 is pushed. Once that later stage enters, the
result for stage n appears on `out_info` 10 clocks later:

| block                          | clocks |
|--------------------------------|--------|
| metrics                        | 1      |
| TMU                            | 5      |
| ACSU                           | 1      |
| survivor memory output         | 1      |
| delay chain read               | 1      |
| differential decoder           | 1      |

The last 47 stages of a burst therefore stay inside until more stages follow.
To flush them, send any 47 stages, for instance a tail of dummy data.

`tcm_codec` is the top level. It places the encoder (`tcm_encoder`: 11-bit word
in, four symbols and their I/Q samples out one clock later) next to the
decoder (`tcm_decoder`), each with its own ports, so that a channel model can
sit between them. `psk8_modulator` produces the ideal 7-bit samples at
amplitude `AMP` = 40. This amplitude leaves room for noise; the decoder itself
does not depend on scale.

## Parameters

| name                 | default     | where        | notes                                   |
|----------------------|-------------|--------------|-----------------------------------------|
| `IQ_W`               | 7           | `tcm_pkg`    | input sample width                      |
| `C_W`, `BM_W`, `PM_W`| 7, 9, 14    | `tcm_pkg`    | metric widths; derived from `IQ_W`      |
| `H0..H3`             | 103, 030, 066, 024 | `tcm_pkg` | parity-check polynomials (octal)     |
| `SMU_DEPTH`          | 48          | decoder      | survivor length in stages               |
| `DC_DEPTH`           | SMU_DEPTH+4 | decoder      | delay-chain stages; must be ≥ SMU_DEPTH+2 |
| `AMP`                | 40          | encoder      | constellation amplitude in LSBs         |

If you change `IQ_W`, re-derive `C_W` and `BM_W`, and make sure that
2^(PM_W−1) stays above 6 × (the largest branch metric).

## What is and is not covered

Built: the whole Rm = 11/12 decoder and encoder described above.

Not built:

- The other CCSDS rates (8/9, 9/10, 10/11), which use different bit-to-symbol
  mappings. The trellis, ACSU and survivor memory would carry over unchanged;
  the mapper, demapper and TMU candidate sets would not.
- The analogue 8PSK modulator and demodulator.
- Synchronisation.

Choices made in this implementation, beyond the architecture:

- the parity-check polynomials;
- the survivor depth and fixed output state;
- modulo path metrics;
- a single register after the metric unit and five register stages in the TMU;
- the circular-buffer delay chain;
- the mod-8 differential code on {x11,x8,x4};
- tie-breaking toward the lower index;
- the port formats.

Verification, all with Verilator:

- Every module has its own self-checking testbench against models written from
  the equations:
  - the TMU against an exhaustive 256-point search per label;
  - the ACSU against unwrapped integer path metrics;
  - the survivor memory against a trace-back model.
- `tb_tcm_codec` runs the full system at default sizes for 3000 stages:
  - It adds uniform noise and turns single symbols by ±30°, so their hard
    decisions are wrong.
  - Halfway through it rotates the whole constellation by 135°, and it later
    inserts gaps in the input.
  - It checks every decoded word, the 10-clock latency and one output per
    clock.
  - It requires that channel errors were corrected, that path metrics wrapped,
    that rotation was absorbed and that gaps occurred.
- `tb_ber_awgn` passes 20,000 stages through a Gaussian-noise channel at an
  Es/N0 of 13.2 dB (Eb/N0 8.8 dB). With 7-bit samples it sees no bit errors
  in 220,000 bits, and it fails above 1e-3. A run at Eb/N0 = 8.0 dB gave a
  BER of 3.7e-4.

Not verified:

- a full bit-error-rate curve, and other input widths;
- timing closure (the published figure is a 10.35 ns critical path on a
  Virtex-4, i.e. about 1.06 Gbit/s at 11 bits per clock).

## Files

`rtl/`:

- `tcm_pkg.sv`: types, code, mapping and tables
- `tcm_codec.sv`: top level
- `tcm_decoder.sv`: the decoder; it instantiates `euclid_metric`, `tmu`,
  `viterbi_decoder` (which holds `acsu` and `smu_rx`; both TMU and ACSU use
  `max4_2level`), `delay_chain`, `demapper` and `diff_decoder`, one file each
- `tcm_encoder.sv`: the encoder; it instantiates `diff_encoder`,
  `conv_encoder`, `mapper_4d` and `psk8_modulator`, one file each

`tb/`:

- `tb_<module>.sv`: one testbench per module
- `tcm_ref_pkg.sv`: the reference models the testbenches share

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. To build and
run the end-to-end test with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/tcm_pkg.sv tb/tcm_ref_pkg.sv tb/tb_tcm_codec.sv \
        --top-module tb_tcm_codec -Mdir obj_codec
    ./obj_codec/Vtb_tcm_codec

Run any other testbench by replacing `tb_tcm_codec`. The end-to-end test takes
a few seconds to build and well under a second to run.
