# Four-stage decimation filter for a 1-bit sigma-delta stream

A sigma-delta modulator produces a 1-bit stream at a high rate, with its
quantisation noise pushed to high frequencies. This filter removes that noise
and lowers the rate by 128, so the stream becomes 20-bit samples at the
signal's own rate. For example, a 2.048 MHz bit stream becomes 16 kHz audio.
The design aims for small area and low power. Most of the rate reduction is
done by multiplier-free sinc filters. Only the last two factors of two use
real FIR filters, and those run at low rates with shift-and-add constants.

```
 1 bit             14 bit          20 bit           20 bit           20 bit
 filter_in --> [sinc  /8 ] --> [sinc  /4 ] --> [HB1  /2 ] --> [HB2  /2 ] --> filter_out
 fs               4th order       3rd order       15 taps         51 taps       fs/128
               \___________ cic ____________/   halfband_decimator x 2
```

| Stage | Rate in (at fs = 2.048 MHz) | Structure | Decimation |
|---|---|---|---|
| sinc 1 | 2.048 MHz | CIC, 4th order | 8 |
| sinc 2 | 256 kHz | CIC, 3rd order | 4 |
| HB1 | 64 kHz | half-band FIR, 15 taps, wide transition | 2 |
| HB2 | 32 kHz | half-band FIR, 51 taps, sharp transition | 2 |

The design's structure follows the published design: the stage order, the
factors 8, 4, 2 and 2, the sinc orders 4 and 3, half-band filters, and CSD
coefficients. The published design gives no word widths, filter
coefficients, band edges, sample rates or handshakes. Every value of that kind
here is this design's own choice and is marked as such below.

## Sample-rate handling: one clock, strobes per stage

All stages share one clock, `clk`. Each stage acts only in cycles where its
`clk_enable` input is high. Each stage also sends a one-cycle `ce_out` pulse
with every new output, and that pulse drives the next stage's `clk_enable`. So
each stage does work only at its own sample rate, and no clock-domain crossing
is needed. At the top:

* Each clock cycle with `clk_enable` high delivers one input bit. Hold
  `clk_enable` low to stall.
* `filter_out` holds the latest output. `ce_out` pulses once per 128 accepted
  bits.
* `stage_ce[2:0]` brings out the strobes after sinc 1, after the sinc pair
  and after HB1. They exist only so the intermediate rates can be watched.

The reference design clocked the stages from separate clock pins. A design
with a real divided clock per stage can drive each stage's `clk_enable` high
and use that stage's own clock instead. The clocking in this RTL is a choice,
not a copy.

`reset` is asynchronous and active high, and clears every register.

## The sinc (CIC) stages

Each sinc stage computes H(z) = ((1 - z^-M) / (1 - z^-1))^L and keeps one
sample in M. That is an M-sample moving sum applied L times, built without
multipliers:

* `cic_integrator` is L accumulators in cascade, working at the input rate.
  Each accumulator is registered, so the response is delayed by L-1 samples.
* `cic_decimator` holds the integrators and a modulo-M counter. On the M-th
  input of each group, the counter passes the integrator value one clock
  later to the comb section.
* `cic_comb` is L first differences working at the low rate. One delay at the
  low rate equals M delays at the input rate, so the L differences give
  (1 - z^-M)^L. The result is registered. `ce_out` follows two clocks after
  the input that completes a group.

**Wrap-around is intended.** The accumulators are only IN_W + L*log2(M) bits
wide, and they overflow all the time. Two's complement arithmetic is modular,
and the final output always fits in that width. So the combs cancel the
overflows, and the output is exact.

| | in | out | DC gain |
|---|---|---|---|
| sinc 1 | 2 bits (+1 / -1) | 14 bits | 8^4 = 4096 |
| sinc 2 | 14 bits | 20 bits | 4^3 = 64 |

`cic` takes the input bit as +1 for a 1 and -1 for a 0. With a constant
all-ones input, the sinc pair therefore settles to exactly +2^18. The cascade
has zeros at every multiple of fs/32, which is 64 kHz at a 2.048 MHz input.
This is where the sinc stages put the aliasing bands of the later rate
reductions. Splitting the factor 32 into 8 × 4 keeps the first, fastest
section at order 4, with 14-bit adders.

Sinc filters droop: at 7 kHz the pair loses about 0.5 dB. The half-band
filters cannot correct this (next section), so the droop remains in the
output.

## The half-band stages

A half-band FIR low-pass of length 4K-1 has a cutoff at a quarter of its input
rate. Its centre tap is exactly 1/2, and every other tap is zero. Only K
distinct coefficients remain, at offsets ±1, ±3, … ±(2K-1) from the centre. The
output is:

    y = x[c]/2 + sum_k COEFS[k] * (x[c-(2k+1)] + x[c+(2k+1)])

`halfband_decimator` builds exactly this sum:

* a delay line of 4K-2 registers;
* one pre-adder per symmetric pair;
* one constant multiplier per distinct coefficient;
* a shift for the centre tap.

Only every second output is needed, so the sum is registered on the second
input of each pair (inputs 1, 3, 5, …). It is rounded half-up from 2^-18
units and saturated to 20 bits. `ce_out` follows one clock after that input.

**CSD constants.** `csd_const_mult` recodes its constant at elaboration into
canonical signed digits: digits -1, 0 and +1, with no two adjacent non-zero
digits. It then sums ±(x << i) for each non-zero digit, so no multiplier is
built. For example, 79676 takes 6 signed digits, where plain binary needs 10
set bits.

**Coefficients** (package `decim_pkg`, integers scaled by 2^18). Each set is
designed as follows. An equiripple type-II filter g of length 2K is designed
with a single passband 0..2·fp/fs. The half-band taps are then h[2n] = g[n]/2
with centre h[2K-1] = 1/2, rounded to 18 fractional bits:

| | input rate | passband | stopband | length | stopband after rounding | ripple |
|---|---|---|---|---|---|---|
| HB1 | 64 kHz | 0–7 kHz | 25–32 kHz | 15 (K = 4) | 82 dB | 0.0013 dB |
| HB2 | 32 kHz | 0–6.5 kHz | 9.5–16 kHz | 51 (K = 13) | 81 dB | 0.0014 dB |

HB1 is allowed a wide transition band, because anything it lets through
between 7 and 25 kHz is removed later by HB2. HB2 sets the final band edge.
The sum of |h| is 1.29 for HB1 and 1.64 for HB2. Saturation can therefore
act only on near-full-scale inputs with extreme sign patterns.

A half-band response always satisfies H(f) + H(fs/2 - f) = 1. A first stage
that both corrects the sinc droop and keeps the half-band form is therefore
impossible. This design keeps the half-band form and leaves the droop
uncorrected. A designer who needs the correction should replace HB1 with a
general symmetric FIR decimator.

## Files

| File | Contents |
|---|---|
| `rtl/decim_pkg.sv` | factors, orders, widths, half-band coefficients |
| `rtl/cic_integrator.sv`, `rtl/cic_comb.sv`, `rtl/cic_decimator.sv` | one sinc stage and its two halves |
| `rtl/cic.sv` | the two sinc stages, 1-bit input |
| `rtl/csd_const_mult.sv` | CSD shift-and-add constant multiplier |
| `rtl/halfband_decimator.sv` | half-band FIR, decimation by 2 |
| `rtl/decimation_filter.sv` | top: `cic` → HB1 → HB2 |
| `tb/decim_ref_pkg.sv` | reference arithmetic: direct convolutions in 64-bit integers |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the two below |

Parameters of the top: `CIC1_M`, `CIC1_L`, `CIC2_M`, `CIC2_L` and `OUT_W`.
The sinc widths follow from them. To change the half-band filters, edit
`HB1_*`/`HB2_*` in `decim_pkg`. `COEFS[k]` is the tap at offset ±(2k+1).

## Verification

Every testbench compares the hardware with definitions, not with a copy of
the structure. Sinc outputs are checked against a direct convolution with the
boxcar^L impulse response, and half-band outputs against a convolution with
the full 4K-1 tap vector. Each testbench prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_cic_integrator`, `tb_cic_comb`, `tb_cic_decimator`: closed-form checks,
  including forced wrap-around, idle cycles, the output rate and the exact
  latency, and the full-scale value M^L.
* `tb_cic`: the sinc pair, including the 2^18 full-scale value and both rates.
* `tb_hb1`, `tb_hb2`: both coefficient sets, with random data, an impulse (the
  impulse response reads back), a DC level, saturation in both directions,
  the rate and the one-clock latency.
* `tb_decimation_filter`: the whole chain at its default size. A behavioural
  first-order sigma-delta modulator codes a 1 kHz sine at half full scale into
  38,400 bits. Random stalls are inserted. All 300 outputs must match the
  reference chain bit for bit, each stage must decimate at its rate, and the
  recovered sine must peak within 2 % of 2^17. It runs in well under a second.
* `tb_frequency_response`: four 1-bit patterns of period 32 or 16 must give
  an exactly constant sinc-pair output, because all their harmonics fall on
  sinc zeros. Tones through HB1 and HB2 must pass within 0.01 dB in the
  passband and be at least 78 dB down in the stopband (measured: 81.8–87.9 dB).

With plain Verilator, for example:

    verilator --binary --timing -Wall -Wno-fatal --top-module tb_decimation_filter \
        -y rtl -y tb rtl/decim_pkg.sv tb/decim_ref_pkg.sv tb/tb_decimation_filter.sv
    ./obj_dir/Vtb_decimation_filter

`cic_decimator` and `halfband_decimator` also hold a concurrent assertion: an
output strobe is never high on two consecutive cycles. Build with `--assert`
to enable it. The simulator is two-state, so each testbench raises `reset` from 0 to 1,
which gives the asynchronous reset an edge.

## Limits and departures

* **Sinc droop is not compensated** (see the half-band section).
* **Clocking:** the stages use one clock with enables, not one clock per
  stage.
* **Numbers that are this design's own:** the input rate of 2.048 MHz (it
  matters only for the frequencies quoted), all word widths, the +1/-1 input
  coding, the half-band lengths, band edges and coefficients, rounding and
  saturation, reset polarity, and the `ce_out`/`stage_ce` strobes.
* **Not covered:** timing closure and power. The reference implementation
  reports a 10.24 MHz maximum clock in a 0.35 µm process. This RTL takes one
  input bit per clock. Its longest paths are the 4-deep comb ripple of
  sinc 1 and the HB2 adder tree, which sum once per 128 input clocks. If the
  clock must go much higher, both can be pipelined.
* **Not included:** the sigma-delta modulator itself. It is an analog front
  end, and the testbench models it only behaviourally.
