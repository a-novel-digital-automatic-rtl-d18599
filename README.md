# Log-free digital AGC for a WCDMA receiver

A WCDMA base-station receiver must hand its rake receiver baseband I/Q samples
of a nearly constant level, quantised to only 4 to 6 bits, even though the
wanted channel may arrive anywhere within a wide range of power (an adjacent
channel 63 dB stronger can set the analog gain). Classic digital AGCs take the
logarithm of the measured envelope, filter the error in dB and take an
antilog to get the gain. This design reaches the same behaviour, a gain that
slews at a constant number of dB per update, with nothing but two multipliers,
an accumulator and a comparator:

* the gain `G` is held in a register and changed only by multiplying it by
  `(1 + 2^-K)` or `(1 - 2^-K)`, which is a shift and an add;
* the decision to go up or down is the sign of `P_ref - P_m`, where `P_m` is
  the average power of the amplified signal over `M` samples.

Because each update scales the gain by a constant ratio, the loop moves in
equal dB steps without any log table. The cost is that the loop always hunts
by one step around its lock point.

The RTL is parameterised SystemVerilog (IEEE 1800-2017), synthesisable, with
a self-checking testbench per block.

## The loop

```
 in_i ─┐                                                    ┌─► out_i
       ├─► iq_mux ─► gain_multiplier ─┬─► output_truncation ─► iq_demux
 in_q ─┘      (I,Q in turn)   W = x·G │      (NO-bit slice)           └─► out_q
                                  ▲   │
                                  │   └─► power_squarer ─► power_averager ─► power_comparator
                                  │          W²             P_m (M samples)   u = sgn(P_ref - P_m)
                                  │                                                  │
                                  └──────────────── gain_accumulator ◄────────────────┘
                                                    G ← G ± ⌊G / 2^K⌋, clamped to [2^K, 2^P-1]
```

| Module | Role |
|---|---|
| `agc_pkg` | default sizes and the `ctrl_e` type for the loop decision (UP / DOWN / HOLD) |
| `iq_mux` | sends each complex sample down the datapath as an I word then a Q word |
| `gain_multiplier` | signed NI-bit word × unsigned P-bit gain → signed (NI+P)-bit `W` |
| `output_truncation` | keeps NO bits of `W`, clamps on overflow |
| `iq_demux` | re-pairs the output words, one `out_valid` pulse per sample |
| `power_squarer` | `W²` at full precision |
| `power_averager` | sum of `W²` over M complex samples, divided by M: `P_m` = mean of `I²+Q²` |
| `power_comparator` | `u = sgn(P_ref - P_m)` |
| `gain_accumulator` | the gain register with its shift-and-add update and its two limits |
| `digital_agc` | top: the loop above |

I and Q share one gain multiplier and one square multiplier, so the design
takes one complex sample every two clocks at most. In the system it was
sized for, the clock is 61.44 MHz (16× the 3.84 Mchip/s chip rate) and samples
arrive at 2× the chip rate, so there are 8 clocks per sample and ample slack.

## The gain accumulator and what K, P and M mean

The gain is an unsigned integer `G` in `[2^K, 2^P - 1]`. With `u = UP` it
becomes `G + (G >> K)`, with `u = DOWN` it becomes `G - (G >> K)`, and with
`u = HOLD` (power exactly on the reference) it stays.

* **K** sets the step: an ideal step is `20·log10(1 + 2^-K)` dB, 0.068 dB for
  K = 7. Because `G >> K` truncates, the real step is `⌊G/2^K⌋`: the gain
  climbs by +1 from 128 to 256, by +2 from 256 to 384, and so on, so the
  step in dB is saw-toothed between 0.068 dB and 0.034 dB rather than
  exactly constant. A plot of the gain against time is therefore a chain of
  straight segments.
* **2^K is the floor** of the gain. Below it, `G >> K` would be 0 and the
  gain could never rise again.
* **P** is the width of the register; the ceiling is `2^P - 1`. The gain
  span is `20·log10((2^P - 1) / 2^K)`, 18.1 dB for P = 10, K = 7. The
  published rule of thumb for the range, `6·(P - K + 1)` dB, gives 24 dB for
  the same values. It appears to count one extra bit.
* **M** is the number of complex samples per update. The fastest slew is
  `2^K · M / (8.68 · R)` seconds per dB for a complex sample rate R: with
  K = 7, M = 128 and R = 7.68 Msample/s, 0.25 ms per dB (about 4 dB/ms).

`2^K` acts as unity gain. The output is the slice
`W[K+NI-1 : K+NI-NO]`, `W[20:16]` by default. At the minimum gain it is
simply the top NO bits of the input (bits 13 to 9 of a 14-bit sample), and
each doubling of the gain moves the slice one bit further down the input
word. The bits below the slice are dropped (floor). When the bits above it
are not all copies of its sign, the word is clamped to +15 or −16 and
`out_clip` is raised for that pair.

The values P = 10, K = 7 and M = 128 are not stated as numbers in the
source of this design. They come from its published convergence curve for
the constant input `{I, Q} = {496, 929}`, which these values reproduce:

* the gain starts at 128;
* it reaches 256 after 128 updates, and its slope then changes;
* it locks near 720;
* the output ends at I = 5, Q = 10.

P = 10 is the smallest width whose ceiling exceeds 720. With it, the
published range rule gives 24 dB, the same width as the published
input-power sweep. Treat all three values as a well-supported reading, not
as given constants.

## Setting the reference

`p_ref` is the wanted mean of `I² + Q²` per complex sample, in units of the
full product `W`. One output LSB is `2^LSB` product units, where
`LSB = K + NI - NO` (16 by default). For a wanted RMS of `r` output LSBs on
each rail:

```
p_ref = 2 · r² · 2^(2·LSB)
```

The loop locks where `P_m` crosses `p_ref` and then toggles between the two
gains on either side. For example, the testbench uses
`p_ref = (496² + 929²) · 720² = 574 935 148 800`, which makes the constant
example lock between 716 and 721 with the output at {5, 10}. The published
system sets its reference 8 dB below the peak of the 5-bit output. How that
peak is defined affects the number. Under the most direct reading (a
full-scale ±16 pair), the example would lock near a gain of 560 instead.

## Interface and timing of `digital_agc`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (gain resets to 2^K) |
| `in_valid` / `in_ready` | in / out | 1 | a sample is taken on a clock edge with both high; `in_ready` drops for the cycle after |
| `in_i`, `in_q` | in | NI | signed input sample |
| `p_ref` | in | 2(NI+P) | power reference, see above |
| `out_valid` | out | 1 | one-cycle pulse per output pair |
| `out_i`, `out_q` | out | NO | signed output sample |
| `out_clip` | out | 1 | the pair was clamped |
| `gain` | out | P | current gain G |
| `pm_valid`, `pm` | out | 1, 2(NI+P) | power average of the last window |
| `at_min`, `at_max` | out | 1 | gain on its floor / ceiling |

* `out_valid` rises 4 clocks after the edge that accepts a sample.
* A window closes on its M-th Q word. `pm` is ready 2 clocks after that
  word's product, the decision 1 clock later, and the new gain 1 clock after
  that.
* Samples already in the multiplier when the gain changes are scaled by the
  old gain. This is harmless in a running loop. The testbench leaves a
  12-clock gap after each window so that its reference model can be exact.

Every stage is a single register. Valid and an I/Q tag travel with each word.
An assertion in `iq_demux` checks that I and Q words alternate, I first.
The handshake, the pipelining and the output clamp are choices of this
implementation; the source gives only the block structure and the
arithmetic.

## Departures and open points

* **Averager.** It is an integrate-and-dump mean over exactly the update
  window, and M must be a power of two so that the division is a shift. The
  source names an averager but gives no structure for it.
* **HOLD state.** Equal powers hold the gain (sgn(0) = 0). A two-state
  add/subtract control would instead always step.
* **Clamp.** The output clamp is an addition. Plain truncation would wrap
  strong samples to the opposite sign.
* **Clock speed.** Timing at 61.44 MHz has not been checked on any target.
  The published FPGA build used about 130 Virtex-II slices and the two
  hardware multipliers. This RTL also needs exactly two multipliers, one for
  the gain and one for the square.
* **Not included.** The ADC, digital down-converter, channel filter and rake
  receiver around the AGC are not part of this design.

## Verification

Each block has a testbench in `tb/` named `<module>_tb.sv`. It compares the
block with an independent integer model, checks the cycle timing, prints
`TB_RESULT checks=N failures=F` and stops itself with a watchdog.

`digital_agc_tb` runs the whole loop at the default sizes (about 280 000
clocks, under a second). An exact model checks every output pair, every
`P_m` and every gain value. It takes the loop through five phases:

1. the constant-input convergence example, from the minimum gain to lock at
   716/721 with output {5, 10}, reaching 256 after exactly 128 updates;
2. a reference equal to the measured power, so the gain holds;
3. a weak input, so the gain saturates at 1023;
4. a strong input, so the output clips and the gain falls to its floor of 128;
5. random input whose amplitude steps over 24 dB.

It counts each mechanism (raise, lower, hold, ceiling, floor, clip) and
fails if any of them never happened.

`agc_level_sweep_tb` repeats the input-power sweep at realistic pacing: one
sample every 8 clocks, as with 7.68 Msample/s data on a 61.44 MHz clock. The
input is noise-like, with a reference 8 dB below the 5-bit peak. The input
level steps over 24 dB in 3 dB steps. The test checks three things:

* **Slew.** From reset the gain reaches its ceiling after 332 updates, as the
  truncating-step model predicts. That takes 339 968 clocks, about 5.5 ms at
  61.44 MHz.
* **Regulation.** From −12 dB to +3 dB the output power stays within 0.02 dB
  of the target. Over the same range the plain top 5 input bits (no AGC)
  fall by 14 dB.
* **Ceiling.** Below that range the gain sits at its ceiling of 1023 and the
  output drops. At −15 dB it is 0.9 dB low, right at the edge of the 18 dB
  span.

The sweep takes about 5.5 million clocks, roughly 5 s of simulation.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/agc_pkg.sv \
    tb/digital_agc_tb.sv --top digital_agc_tb -Mdir obj_top
./obj_top/Vdigital_agc_tb
```

For a single block, name its testbench instead; `-y rtl` finds the
modules it uses. To change a size, override the parameters of `digital_agc`, or
edit the defaults in `agc_pkg`. NO must be smaller than NI, K smaller than
P, and M a power of two.
