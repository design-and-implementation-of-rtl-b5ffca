# GSM / DECT digital front-end for a sub-sampling SDR receiver

This RTL turns the 1-bit output of a band-pass sigma-delta modulator into
24-bit complex baseband samples, for either of two radio standards: GSM or
DECT. The analog side mixes each standard's band to a fixed intermediate
frequency (IF). The modulator samples that IF in the second Nyquist zone, at

    fs = 4 * IF / 3        GSM: IF 13 MHz     -> fs = 17.333 MHz
                           DECT: IF 55.296 MHz -> fs = 73.728 MHz

At this rate the wanted channel sits at 3fs/4. That choice makes everything
after the modulator cheap:

* **Mixing to baseband needs no multiplier.** The cosine and sine carriers
  become the sequences `[1 0 -1 0]` and `[0 1 0 -1]`, so a 4-phase
  multiplexer does the job.
* **The first decimation needs no multiplier either.** A comb (CIC) filter
  does it.
* **The rest runs on one multiplier per polyphase branch.** Each of the two
  remaining FIR stages decimates by 2. Its multiply-accumulate (MAC) engine
  does one product per clock and spends many clocks on each output.

The master clock is the modulator's sample clock: one bitstream bit enters
per clock. One datapath serves both standards, and the standard is chosen at
run time.

## Signal chain and rates

```
 in_bit ──► iq_downconv ──I──► cic_decimator ──► isinc_fir ──► channel_fir ──► i_out
 (1 bit/clk)  (fs/4 mux)  └Q──► cic_decimator ──► isinc_fir ──► channel_fir ──► q_out
                              N=5, /M            /2, 24|16 taps  /2, 48|32 taps
```

| stage | GSM | DECT |
|---|---|---|
| input (master clock) | 17.333 MS/s | 73.728 MS/s |
| comb: decimation M, differential delay R | M = 16, R = 1 | M = 8, R = 2 |
| comb output (4 × final rate) | 1083.3 kS/s, every 16 clocks | 9216 kS/s, every 8 clocks |
| inverse-sinc FIR, decimate by 2 | 24 taps, 82 kHz pass band | 16 taps, 574 kHz pass band |
| channel FIR, decimate by 2 | 48 taps, 82 kHz pass band, 82–100 kHz transition | 32 taps, 574 kHz pass band, 574–800 kHz transition |
| output | 270.833 kS/s (symbol rate), every **64** clocks | 2.304 MS/s (2 × symbol rate), every **32** clocks |

I and Q each have their own comb and FIR stages, and both run in lock step.
`out_valid` pulses once per output pair.

## Mixing: `iq_downconv`

A 2-bit phase counter drives two multiplexers. Bit 1 counts as +1 and bit 0
as −1. With x the input value, the four phases give:

| phase | I | Q |
|---|---|---|
| 0 | x | 0 |
| 1 | 0 | x |
| 2 | −x | 0 |
| 3 | 0 | −x |

The outputs are registered 4-bit signed words. The phase restarts at 0 after
a flush.

## Comb decimator: `cic_decimator`

The comb decimator implements `H(z) = ((1 − z^−RM) / (1 − z^−1))^5`. It has
two halves:

* **Integrators.** Five integrators run at the input rate. Each adder feeds
  the next one in the same clock.
* **Combs.** After the decimator come five combs `1 − z^−R`. They are
  evaluated in one clock, on every M-th input.

All registers are 24 bits wide. That equals N·log2(RM) + B_in = 5·4 + 4; RM is
16 for both standards, so one width serves both.

The registers use two's-complement wrap-around. The integrators overflow
freely, and the combs cancel the overflow exactly, so no saturation logic is
needed. The 1/M^N normalisation is not applied. The output therefore carries
the gain (RM)^5 = 2^20: a full-scale ±1 input gives ±2^20. That value fits in
24 bits with two bits to spare.

The first output appears one clock after input M−1, counted from reset or a
flush. After that, one output comes every M inputs.

## Polyphase MAC FIR stages: `poly_mac_fir`, `mac_fir_branch`

This is the part of the design that needs the most care.

### What it computes

Each FIR stage computes

    y[m] = Σ_{k=0}^{T−1} h[k] · x[2m − k]

The sum is split into two polyphase branches:

* **Direct branch.** It receives the even input samples x[0], x[2], … and
  holds the coefficients h[0], h[2], …. These are the odd-numbered ones if
  you count from h1.
* **Delayed branch.** It receives the odd samples x[1], x[3], …, which is
  the input delayed by one sample and decimated by 2. It holds h[1], h[3], ….

Each branch has a delay line and a single MAC unit. The arrival of x[2m]
starts both branches on output m. Each branch runs T/2 products, one per
clock, and both finish together. Their sums are then added, rounded by 15
bits (round half up) and saturated to 24 bits.

### Timing

`out_valid` is high T/2 + 2 clock edges after the edge that takes x[2m].
Because there is only one MAC per branch, each output costs T/2 + 2 clocks.
The budget per output is twice the input spacing:

| stage | needed | available (GSM) | needed | available (DECT) |
|---|---|---|---|---|
| inverse sinc | 14 | 32 | 10 | 16 |
| channel | 26 | 64 | 18 | 32 |

Each sum finishes well before the next x[2m] arrives. An assertion in
`mac_fir_branch` fires if a start comes while the branch is still busy,
which happens only if samples arrive faster than about every T/4 clocks.

### Delay lines

Each delay line is a circular buffer with one more slot than the branch has
taps. A sample written while a sum is running therefore replaces the one
sample the sum no longer reads. A sample written in the same clock as the
start pulse is included as the newest one.

### Coefficient ROM

The wrappers `isinc_fir` and `channel_fir` each hold both standards'
coefficient tables, and `std_sel` picks the table and the tap count. The
branches look up coefficients combinationally: branch index j asks for
h[2j] and h[2j+1].

## Coefficients: `dfe_coef_pkg`

The filter orders and band edges are fixed by the specification. The
coefficient values are this design's own, computed offline. They are stored
as 16-bit words with 15 fractional bits.

* **Inverse-sinc stage: weighted least squares.**
  * Pass-band target: 1/|H_comb(f)|. This undoes the comb's droop, which is
    0.41 dB at 82 kHz for GSM and 1.11 dB at 574 kHz for DECT.
  * Stop band: the band around half the stage's input rate, which would fold
    onto the channel after decimating by 2.
* **Channel stage: minimax fit** (Lawson's iteratively reweighted least
  squares).
  * Pass-band target: 1/(|H_comb|·|H_isinc|), so it also removes the small
    residual droop of the earlier stages.

The package header gives the exact grids, weights and formulas.

Measured on the quantised coefficients, across the whole chain:

| | pass-band ripple (p-p) | channel stop band | inverse-sinc stop band |
|---|---|---|---|
| GSM | 0.09 dB (spec 0.1 dB) | −22.9 dB from 100 kHz | −91 dB |
| DECT | 0.38 dB (spec 0.5 dB) | −33.8 dB from 800 kHz | −90 dB |

To use other filters, replace the four tables and keep the lengths. Each
table's DC gain is 32768/32768 = 1. The channel tables are slightly above 1,
because they compensate the residual droop.

## Switching standard: `dfe_top`

`std_sel` may change at any time. In the clock after a change, every stage
is flushed: counters, integrators, comb and FIR delay lines are cleared, and
the bitstream bit of that clock is dropped. From the next clock on, the chain
runs with the new M, R, tap counts and tables, and `std_active` shows the
new standard.

The first few outputs after a switch are the filters' start-up transient.
The master clock must also change to the other standard's rate. That clock
comes from outside the front-end.

## Ports of `dfe_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | master clock = modulator sample clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `std_sel` | in | 1 (`dfe_pkg::std_e`) | `STD_GSM` / `STD_DECT` |
| `in_valid` | in | 1 | bitstream bit valid (normally tied high) |
| `in_bit` | in | 1 | modulator output |
| `std_active` | out | 1 | standard currently running |
| `out_valid` | out | 1 | output sample strobe |
| `i_out`, `q_out` | out | 24 | signed baseband samples, scale 2^20 = input full scale |

## How far it can be trusted

Every block has a self-checking testbench. Each one compares the block
against an independent model, not against a copy of the RTL:

* **`tb_iq_downconv`:** the carrier sequences, with random gaps in the input
  and a flush.
* **`tb_cic_decimator`:** direct convolution with the comb's impulse
  response (a length-RM box convolved five times) in both standards. It
  checks output timing and full-scale inputs.
* **`tb_mac_fir_branch`, `tb_poly_mac_fir`:** sums of products from the
  testbench's own sample history. They use random coefficients, all lengths
  up to 48, writes during a running sum, forced saturation, and exact
  latency checks.
* **`tb_isinc_fir`, `tb_channel_fir`:** direct-form decimating FIRs at the
  real input rates, both tables, and DC gain.
* **`tb_dfe_top`** (full size, default parameters): a behavioural 4th-order
  band-pass sigma-delta modulator drives the chain with a tone. The
  testbench runs its own model of the whole chain and checks every I and Q
  sample bit for bit. It goes through GSM → DECT → GSM → DECT → GSM, which
  covers four switches and flushes. It checks the 64 / 32 clock output
  period, and it includes a run with a constant 1 at the input.
* **`tb_dfe_spectrum`** (full size): checks selectivity with one tone at a
  time.
  * In-channel tones come out within 0.2 dB of the ideal gain.
  * GSM interferers and blockers at 0.2–3.0 MHz offset are 25.8–67.6 dB down.
  * DECT blockers at 1.7–5.2 MHz offset are 39–50 dB down.

Not verified: timing closure on any device, and real modulator or radio
signals.

## Departures and own choices

These points are not fixed by the specification; here is what this RTL does:

* **Coefficients:** own values, described above.
* **Number formats:** coefficient width 16 bits; accumulator wide enough
  never to overflow; rounding and saturation after each FIR stage.
* **Bitstream coding:** bit 1 = +1, bit 0 = −1.
* **Run-time standard select and flush.** The specification treats GSM and
  DECT as two configurations with different clocks; this RTL builds both
  into one datapath and switches between them at run time.
* **I and Q each get their own MAC filters,** at the sample clock. The
  alternative of one dual-channel MAC shared by I and Q at twice the clock
  is not built.
* **Delay lines are clock-enabled registers.** An FPGA build may map them
  to distributed RAM instead.
* **Decimation phase:** the first sample after reset or a flush starts the
  first output of every stage.
* **Not included:** the analog front end (switches, band filters, LNAs,
  fixed oscillators, mixers), the sigma-delta modulator and the clock
  generator. The modulator exists only as a behavioural model inside the
  testbenches.

## Simulating

Files: `rtl/dfe_pkg.sv`, `rtl/dfe_coef_pkg.sv` (packages, compile first),
`iq_downconv`, `cic_decimator`, `mac_fir_branch`, `poly_mac_fir`,
`isinc_fir`, `channel_fir`, `dfe_top`. Each testbench in `tb/` prints one
line `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/dfe_pkg.sv rtl/dfe_coef_pkg.sv rtl/iq_downconv.sv rtl/cic_decimator.sv \
  rtl/mac_fir_branch.sv rtl/poly_mac_fir.sv rtl/isinc_fir.sv rtl/channel_fir.sv \
  rtl/dfe_top.sv tb/tb_dfe_top.sv --top-module tb_dfe_top
./obj_dir/Vtb_dfe_top
```

Swap the last file and top for another testbench, for example
`tb/tb_dfe_spectrum.sv`. Both top-level testbenches finish in well under a
second.

Sizes you can change:

* The standard-specific numbers (M, R, tap counts, widths) are in
  `dfe_pkg`.
* `cic_decimator` takes them as parameters.
* The FIR wrappers size their delay lines by `MAX_TAPS`.
