# Multi-bit distributed-arithmetic FIR and IIR filters

A filter output is a dot product of a few constant coefficients with a few
variable samples. Distributed arithmetic (DA) computes it without a
multiplier. It walks through the samples bit by bit, and for each bit position
it looks up, in a table indexed by that bit of every tap, the pre-computed sum
of the coefficients whose tap has a one there. Then it shift-accumulates those
partial sums. Classic DA handles one bit per clock, so the circuit clock must
run N times faster than the sample rate.

This RTL implements a variant that takes **BCF bits of every tap per clock**
(BCF is the *bits combination factor*). The table is addressed by a BCF-bit
group from each tap and returns the already-weighted sum of those BCF bit
positions. A sample of N bits therefore needs N/BCF clocks instead of N. A
second, small table corrects for the sign bit. Inside the loop every addition
is carry-save (a Wallace-style compressor), and a single carry-propagate adder
runs once per sample.

The architecture follows the paper *Efficient Hardware Implementation of
Digital Filters using Distributed Arithmetic (DA)*. It comes in three forms,
all in `rtl/`:

| module | filter | tables | compressor |
|---|---|---|---|
| `da_fir` | K-tap FIR | one DA table, one MSB table | 4:2 |
| `da_iir` | IIR, K feed-forward and L feedback taps (biquad: K=3, L=2) | one pair for x, one pair for y | 6:2 |
| `da_iir_single_rom` | the same IIR | one pair shared by all K+L taps | 4:2 |

`da_biquad_cascade` chains `da_iir` biquad sections into a higher-order
filter. `da_filter_top` places side by side a biquad in both IIR forms, the
3-tap FIR made of the biquad's feed-forward coefficients, and a two-section
(fourth-order) cascade. Each has its own ports. The
defaults are Q1.15 samples (N = 16), BCF = 2, and 16-bit Q2.14 coefficients.

## The arithmetic

Write a sample as an N-bit two's-complement integer
X = -2^(N-1) b[N-1] + sum_{i<N-1} 2^i b[i]. Then, for coefficients A_k,

    y = sum_k A_k X_k = sum_{i=0}^{N-1} 2^i S_i  -  2^N S_{N-1},
    S_i = sum_k A_k * b_k[i].

Group the bits into G = N/BCF groups of BCF bits, group g covering bits
g*BCF … g*BCF+BCF-1. The **DA table** (`da_lut_rom`) is addressed by the
concatenation of one group from each tap (tap k in address bits
k*BCF … k*BCF+BCF-1). It stores

    T(addr) = sum_{i=0}^{BCF-1} 2^i S_i  =  sum_k A_k * u_k,

where u_k is tap k's group read as an unsigned number. Summed over the groups
with weights 2^(g*BCF), these words give sum_i 2^i S_i. That is the right
result except for the sign bit, which this sum counts with weight +2^(N-1)
instead of -2^(N-1).

The **MSB table** (`da_msb_rom`) is addressed by the K sign bits and stores
minus twice their contribution at the scale of the top group:

    M(s) = -2^BCF * sum_k A_k * s_k.

In the last clock of a sample the MSB multiplexer adds M together with the top
group's table word. That turns +2^(N-1) S_{N-1} into -2^(N-1) S_{N-1}.

Small example: K = 3, N = 4, BCF = 2. The low group of every tap addresses T
in clock 0 and the high group in clock 1. In clock 1 the sign bits (bit 1 of
the high group) also address M. The result is T_0 + 4*T_1 + 4*M.

The tables are filled when the design is elaborated, from the coefficient
parameter, by the two formulas above. No external file is needed. A table has
2^(taps*BCF) words, so BCF is limited in practice (see *Sizes* below).

## The accumulation loop (the subtle part)

Each engine keeps its running sum as a **sum/carry pair** of W-bit vectors,
in two registers. In every compute clock, the compressor adds these operands:

* the table word(s), sign-extended and placed at bit position N-BCF;
* the MSB word(s), only in the last clock, placed at the same position;
* both fed-back vectors, each shifted right arithmetically by BCF.

Its output pair goes back into the registers. After G clocks the words of
group g carry the weight 2^(g*BCF) relative to bit 0, so the pair represents
the exact integer y. No bit that is shifted out of the bottom is ever
non-zero, because the first word enters exactly G-1 shifts above bit 0.

Shifting the two vectors of a carry-save pair separately is only correct if
each vector, on its own, is a correct signed number, with no wrap-around at
the top. Each row of full adders can push the vectors' sign-extension region
up by about a bit. The right shift pulls it down by BCF each clock, so for
BCF ≥ 2 the growth stays bounded. For BCF = 1 it can add up once per clock.
The accumulator therefore carries guard bits above the table words:

    W = (N - BCF) + R + guard,   guard = 5 (BCF >= 2)  or  N + 5 (BCF = 1)
    R = floor(log2 sum_k |A_k|) + BCF + 2          (table word width)

R follows the coefficients the engine is built with. The table words lie in
[-2^BCF·S, (2^BCF-1)·S], S = sum_k |A_k|, and R is the width that holds that
range (the sign bit, plus one bit for the doubled MSB word). For the default
biquad it is 16 bits for the feed-forward tables and 18 bits for the
feedback tables. The accumulator is sized from all coefficients that feed it.
The output ports are sized for any coefficients of width CW. The
testbenches also run full-scale coefficients (±32767, −32768) at BCF = 1, 2
and 4 to exercise the guard bits.

In the last compute clock the compressor's output pair is also captured into
two capture registers (the system-clock registers of the architecture). The
carry-propagate adder adds them, and one clock later the output register
holds the exact sum.

## Recursive filters

`da_iir` computes

    full[n] = sum_{k<K} a_k x[n-k] + sum_{l=1..L} b_l yq[n-l]
    yq[n]   = clip_N( floor(full[n] / 2^CFRAC) )

The feedback taps are the quantised outputs yq. They live in their own serial
delay line, whose first register holds yq[n-1] while y[n] is computed. After
the G compute clocks comes one **write-back clock**. In it the CPA result goes
through the quantiser `da_quantizer`, which drops CFRAC bits and saturates to
N bits. The result is then loaded into that first feedback register, and the
next sample is taken in the same clock. A recursive engine therefore needs
G+1 clocks per sample, the FIR engine G.

`da_iir_single_rom` is the same filter, but all K+L groups form one address,
{y groups, x groups}. That gives a table of 2^((K+L)·BCF) words; the biquad at
BCF = 2 needs 1024. In return the adder is a 4:2 compressor instead of a 6:2
one. Both engines give identical results; the end-to-end test checks this
clock by clock.

Default coefficients (Q2.14, for a second-order Butterworth low-pass at fs/10):
a0 = a2 = 1105, a1 = 2210, b1 = 18727, b2 = −6763. Note the sign convention
y = … + b1·y[n−1] + b2·y[n−2]. These values are this design's choice. Their
DC gain is exactly one, and a full-scale step overshoots, so the saturation
logic gets exercised.

## Cascaded sections

Higher-order recursive filters are usually built as a chain of second-order
sections, because they are less sensitive to coefficient rounding than one
high-order recursion. `da_biquad_cascade` chains SECTIONS biquads (default 2,
a 24 dB/octave low-pass). Section s takes its coefficients from
`A_COEFS[s*3*CW +: 3*CW]` and `B_COEFS[s*2*CW +: 2*CW]`, and its quantised
output drives section s+1.

The sections are joined with no buffer: `y_valid` of one section is `x_valid`
of the next. That is safe because every section has the same G+1-clock period.
When section s delivers a result, section s+1 has already finished the
previous sample and is either idle or in its write-back clock, where it can
take a new one. An assertion checks this. The cascade takes a sample every G+1
clocks, like one section. Its latency is SECTIONS·(G+2) − 1 clocks: 19 for
two sections at the defaults.

`y_sat` reports whether any section clipped the sample. Each section keeps the
flags of the samples inside it in a two-entry queue. At most two samples are
inside: one whose result is due and one just taken.

## Delay lines

`da_delay_line` is one long shift register cut into taps of N bits. Each
compute clock shifts every tap right by BCF: the lowest group goes to the
table address and also enters the top of the next tap. After G clocks every
tap holds what its predecessor held, so the delay line has advanced by one
sample as a side effect of reading it. A new sample is loaded in parallel into
tap 0. During the last clock, bit BCF−1 of each tap is the sample's sign bit,
and it addresses the MSB table.

## Interface and timing

All engines use one clock (`clk`, the circuit clock) and an asynchronous
active-low reset `rst_n`, which clears the delay lines, so the filter starts
from rest. The sample-rate events of the architecture are enables from
`da_controller`, not a second clock.

| signal | meaning |
|---|---|
| `x_in`, `x_valid`, `x_ready` | a sample is taken on a clock edge with `x_valid && x_ready` |
| `y_out` / `y_full` | exact sum, N + CW + ceil(log2(taps)) bits (Q1.15 × Q2.14 → 29 fractional bits) |
| `y_q`, `y_sat` | recursive engines: quantised output and "was clipped" |
| `y_valid` | one-clock pulse with the outputs |

Timing, with G = N/BCF:

* FIR: one sample every G clocks at most. `x_ready` is high when idle and in
  the last compute clock, so a continuous stream has no gaps.
* IIR: one sample every G+1 clocks at most.
* `y_valid` rises G+1 clocks after the edge that took the sample, for all
  engines. A cascade of S sections takes S·(G+2) − 1 clocks.

At the defaults (G = 8) that means 8 clocks per FIR sample and 9 per biquad
sample. With BCF = 1 the engines behave like classic bit-serial DA, at 16
clocks per sample.

## Sizes

| configuration | FIR / feed-forward table | single-table biquad | clocks per sample (FIR / IIR) |
|---|---|---|---|
| N=16, BCF=1 | 2^3 | 2^5 | 16 / 17 |
| N=16, BCF=2 (default) | 2^6 | 2^10 | 8 / 9 |
| N=16, BCF=4 | 2^12 | 2^20 | 4 / 5 |
| N=16, BCF=16 | 2^48 | 2^80 | 1 / 2 |

BCF must divide N; elaboration stops otherwise. Q2.22 samples (N = 24) at
BCF = 8 take 3 clocks per FIR sample with a 2^24-word feed-forward table;
this was simulated. Larger configurations are legal parameters but not
practical memories, and they were not simulated.

## Departures from the published architecture

* **One clock, with enables.** The architecture is drawn with a circuit clock
  and a separate, N/BCF-times slower system clock. Here the system-clock
  registers are enabled once per sample.
* **Write-back clock in the recursive engines** (G+1 instead of G clocks per
  sample). The output must be in the feedback delay line before the next
  sample starts. The FIR engine meets the G-clocks-per-sample figure.
* **Feedback delay line.** The original drawing shows a separate load register
  ahead of the tapped feedback registers. Taken literally, that would feed each
  output back one sample late. Here the quantised output is loaded straight
  into the first tapped register.
* **Output register** takes the CPA result one clock after capture, not at the
  next sample's system-clock edge, so the latency does not depend on when the
  next sample arrives.
* **Table depth** is 2^(taps·BCF), as the addressing requires. The paper's
  prose says "2^K deep", although its own address-bit counts agree with
  2^(taps·BCF).
* **Table width** is the paper's floor(log2 Σ|A_k|) + BCF plus two bits: the
  sign bit, and the extra bit of the doubled MSB word in this integer scaling.
  The accumulator has guard bits that the paper does not mention (see above).
* **Tables are ROMs** filled at elaboration. The paper allows RAM filled by
  software; there is no write port here. To change coefficients, change the
  parameters.
* **Quantiser** rounding (truncation) and saturation, the coefficient format
  (Q2.14), the default coefficients and the valid/ready handshake are this
  design's own choices. The paper does not specify them.
* **Cascades.** The paper suggests cascading biquads for steeper filters. Its
  memory-size curves for orders 4 to 10 grow like chains of sections. How the
  sections are joined, and the clip flag that travels with each sample, are
  this design's own.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=… failures=…`.

* `tb_da_filter_top`: the whole top at default sizes. It sends 400 samples
  to each engine, with full-scale steps, bursts and idle gaps. Every output,
  the latency and the sample spacing are compared with integer reference
  models, and the two biquad forms are compared with each other. It also
  counts back-to-back samples, samples taken from idle, negative samples,
  negative fed-back outputs, saturations and clipped cascade outputs, and
  fails if any of them never happened. The two-section cascade gets the
  biquads' stream and is checked against a two-stage reference.
* `tb_da_fir`, `tb_da_iir`, `tb_da_iir_single_rom`: the engines at
  BCF = 1, 2, 4 (and 8 for the FIR) and with other tap counts. The runs
  include full-scale coefficients. The shared stimulus and reference code is
  in `tb_fir_harness` and `tb_iir_harness`.
* `tb_da_biquad_cascade`: two sections at BCF = 2, five sections (tenth
  order, with a different coefficient set per section, one of them at full
  scale) at BCF = 4, and one section at BCF = 1 (harness
  `tb_cascade_harness`).
* `tb_throughput_configs`: Q1.15 at BCF = 4 and Q2.22 at BCF = 8, for the
  FIR and the two-table IIR, at the full sample rate.
* Unit tests for the delay line, both tables (every word against its formula),
  the 3:2/4:2/6:2 compressors, the accumulator, the quantiser and the
  sequencer (against a phase model).

Run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_da_filter_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/da_pkg.sv tb/tb_da_filter_top.sv
    ./obj_dir/Vtb_da_filter_top

Not verified: timing closure and resource use on an FPGA, and table sizes
above 2^24 words.

## Files

* `rtl/da_pkg.sv`: sizing functions (R, W, guard bits) and the sequencer state type.
* `rtl/da_controller.sv`: sequencer: compute clocks, MSB select, capture, write-back, handshake.
* `rtl/da_delay_line.sv`: serial tapped delay line.
* `rtl/da_lut_rom.sv`, `rtl/da_msb_rom.sv`: the DA table and the MSB-correction table.
* `rtl/csa_3to2.sv`, `rtl/compressor_4to2.sv`, `rtl/compressor_6to2.sv`: carry-save adders.
* `rtl/da_cs_accumulator.sv`: carry-save shift accumulator, capture registers, CPA, output register.
* `rtl/da_quantizer.sv`: truncate-and-saturate quantiser.
* `rtl/da_fir.sv`, `rtl/da_iir.sv`, `rtl/da_iir_single_rom.sv`: the three engines.
* `rtl/da_biquad_cascade.sv`: chain of biquad sections.
* `rtl/da_filter_top.sv`: the engines side by side.
