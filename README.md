# Half-rate CIC decimators for an fs/4 IF-sampling GSM/WCDMA receiver

An IF-sampling receiver that places its IF at an odd multiple of a quarter of the
ADC rate can move the signal to baseband with no multiplier at all: the I branch is
the ADC stream multiplied by 1, 0, -1, 0, … and the Q branch by 0, 1, 0, -1, ….
Half of every branch's samples are therefore zero. This design uses those zeros to
run every integrator of the following CIC decimators at **half the ADC rate**, fs/2,
instead of fs. Nothing at fs remains: the whole digital front end runs on one
fs/2 clock, which relaxes the critical path of the integrators (ripple-carry adders
are enough) and leaves slack that can be traded for a lower supply voltage.

The RTL implements the digital front end of a GSM/WCDMA dual-mode receiver with
fs = 99.84 MHz and an IF of 5/4 fs = 124.8 MHz:

| path  | ratio      | output rate | integrators | derivators | extras |
|-------|------------|-------------|-------------|------------|--------|
| WCDMA | 13         | 7.68 MHz    | 3 × 13 bit  | 3 × 8 bit  | even/odd output mux |
| GSM   | 46 2/25    | 2.1667 MHz  | 3 × 18 bit  | 3 × 14 bit | 3 derivator branches, selector, commutator, linear interpolator |

The input is the 2-bit code of a bandpass sigma-delta ADC, delivered two samples
per fs/2 clock.

## Block diagram

```
adc_even/adc_odd ─► iq_splitter ─┬─ I ─► int_cic_decimator  (WCDMA I) ─► wcdma_i
   (2 samples per clock)         ├─ Q ─► int_cic_decimator  (WCDMA Q) ─► wcdma_q
                                 ├─ I ─► frac_cic_decimator (GSM I)   ─► gsm_i
                                 └─ Q ─► frac_cic_decimator (GSM Q)   ─► gsm_q

int_cic_decimator:  halfrate_integrator ─► branch_sampler ─► comb_section
frac_cic_decimator: halfrate_integrator ─┬► branch_sampler ─► comb_section (D1) ─┐
                                         ├► branch_sampler ─► comb_section (D2) ─┼► pair_select ─► linear_interp
                                         └► branch_sampler ─► comb_section (D3) ─┘
                     decim_ctrl drives the samplers, the selector and the interpolator
```

`mode` selects which pair runs; the other pair's clock enable is low and it keeps
its state. The two pairs are separate hardware, not one decimator reprogrammed,
because sharing would cost more power than it saves.

## The half-rate integrator recursion

A CIC integrator cascade is `s_k(n) = s_{k-1}(n-1) + s_k(n-1)` with `s_0 = x`.
Put the non-zero input samples at odd instants, `x(2m) = 0`, `x(2m+1) = u[m]`, and
step the cascade twice per clock. With `S_k[m] = s_k(2m)`:

```
S_1[m+1] = S_1[m] + u[m]
S_2[m+1] = S_2[m] + 2·S_1[m]
S_k[m+1] = S_k[m] + 2·S_{k-1}[m] + S_{k-2}[m]        k >= 3
```

So the first integrator is unchanged, the second is one adder with a shifted
input, and every further one is a single three-input adder (a carry-save row in
front of a carry-propagate adder costs one extra full-adder delay per stage). The
extra logic does not grow with the ratio R, and is zero in the first two stages.

Only even-instant values live in registers. The value at an odd instant is one
addition away,

```
s_N(2m+1) = S_{N-1}[m] + S_N[m]
```

and is only needed once per output. `halfrate_integrator` therefore brings out two
taps, `S_N` and `S_{N-1}`, and each `branch_sampler` latches both on the clock the
controller names, adds them only if the instant is odd, and selects even or odd.
The adder and multiplexer then switch at the output rate, not the clock rate.
Because the output instant can be odd, any integer ratio works, primes included
(WCDMA uses 13), and the ratio can change at run time.

All integrator arithmetic wraps modulo 2^W. The derivators (combs) undo the wrap
as long as the filter's true output fits the derivator word. The word is reduced
from the integrator width to the derivator width once, between the two sections,
by dropping LSBs.

## Fractional decimation by 46 2/25

Decimation by a non-integer ratio is done by a CIC filter followed by a linear
interpolator. The interpolator is moved behind the decimation, so it runs at the
output rate. Output k lies at input instant

```
tau_k = 1 + k·(R + F/L),     R = 46, F = 2, L = 25
```

The line between the CIC outputs at `floor(tau_k)` and `floor(tau_k)+1` is
evaluated there. Three branches sample the integrators at three consecutive
instants `m-1, m, m+1`, where `m = round(tau_k)`. Each branch has its own comb.
Whatever the fraction, two of the three comb outputs bracket tau_k:

* fraction `f/L < 1/2`: the pair is (m, m+1), branches 1 and 2;
* fraction `f/L >= 1/2`: the pair is (m-1, m), branches 0 and 1.

`pair_select` is the 3-to-2 selector followed by the commutator. The centre branch
is always one of the pair. The commutator crosses the pair when needed, so the
earlier sample always reaches the interpolator's `early` input.
`linear_interp` computes `early + floor((late-early)·mu / 2^10)`.

`decim_ctrl` keeps tau_k exactly, as an integer position plus a numerator
`f < L`. Per output it adds F to f, carries into the position when f reaches L,
and moves the three sampling instants by `R + carry` plus any change of the
rounding correction. It also latches `sel_early` and `mu = floor(f·2^10 / L)` for
the interpolator. The ratio inputs are read once per output. A new ratio applies
from the output after the next one. f stays in units of the denominator it was
computed with.

Between consecutive outputs, a branch's sample instants are 45 to 48 input
instants apart (R-1 to R+2). Each comb differences consecutive samples of its own
branch. Its response is therefore that of a CIC whose differential delay moves by
a few instants from output to output, not that of an exact rate-46.08 CIC followed
by an exact interpolator. This is inherent to running the derivators at the
decimated rate with non-uniform sampling. Evaluate it against your spectral mask
before relying on it.

## Interfaces and timing

Everything is synchronous to `clk` = fs/2 (49.92 MHz at the table's fs). Reset
`rst_n` is asynchronous, active low, and clears every register.

* `dual_mode_decimator`: `adc_even` = x(2m), `adc_odd` = x(2m+1), both 2-bit two's
  complement, qualified by `adc_valid`. `mode` is `cic_pkg::rx_mode_e`
  (`MODE_GSM` = 0, `MODE_WCDMA` = 1). The ratio inputs are normally tied to
  46 / 2 / 25 and 13. Each path has a one-clock `*_valid` strobe; I and Q strobe
  together.
* `iq_splitter`: one register stage. Output `(-1)^m·x(2m)` (I) and `(-1)^m·x(2m+1)`
  (Q), 3 bits wide, because negating code -2 needs a third bit. The I samples sit
  at even instants. The decimators treat each input as x(2m+1), a constant
  one-instant shift.
* `int_cic_decimator`: `y_valid` comes 2 clocks after the clock on which the taps
  are sampled.
* `frac_cic_decimator`: `y_valid` comes 3 clocks after the clock on which its last
  branch samples. At 46 2/25 that is on average one output every 23.04 clocks.
* Constraints, checked by assertions: `r_int >= 4`, and `frac_num < frac_den`.

## Word lengths and headroom

The default widths are the receiver's: 18/14 bits for GSM, 13/8 bits for WCDMA.
With the order N = 3 they exactly cover an input of magnitude 1:
`1 + 3·log2(47) = 17.7 <= 18`, and `1 + 3·log2(13) = 12.1 <= 13`. The 2-bit code
also allows -2, which becomes +2 after the I/Q splitter. With a full-scale ±2
input held for a whole output period, the GSM and WCDMA outputs can wrap. Random
ADC codes, as in the testbenches, stay far from that bound. The RTL stays correct
modulo 2^DW in either case; the testbenches compare bit-exactly against a model
with the same wrap.

## What follows the receiver specification and what is this design's choice

From the specification: the fs/4 multiplying sequences; the half-rate integrator
recursion and its two taps; sampling at odd or even instants with the odd value
formed at the output rate; three derivator branches at consecutive instants, a
3-to-2 selector, a commutator and a linear interpolator; ratios 13 and 46 2/25;
the word lengths; truncation only between integrators and derivators; one fs/2
clock.

This design's own choices:

* CIC order 3. The specification lists three word lengths per section. Its worked
  derivation uses order 4, which the parameter `N` also supports and the
  integrator testbench checks.
* The exact rational phase accumulator, and the rule that the three branches sit
  around the rounded output instant.
* Interpolation weight of 10 bits, floor rounding, interpolator output as wide as
  the derivators.
* The `mode` enable, the two-sample ADC port, the register stages and latencies,
  and the reset behaviour.

Not in the RTL, because they lie outside this block or are not specified: the
analog front end, the ADC, the later GSM filter and decimate-by-4 stage, the
droop-correction filters, and the baseband processor.

## Files

`rtl/` holds one unit per file:

* `cic_pkg.sv`: constants and the mode type.
* `iq_splitter.sv`, `halfrate_integrator.sv`, `branch_sampler.sv`,
  `comb_section.sv`, `decim_ctrl.sv`, `pair_select.sv`, `linear_interp.sv`.
* `int_cic_decimator.sv`, `frac_cic_decimator.sv`.
* `dual_mode_decimator.sv`: the top.

`tb/` has one self-checking testbench `tb_<unit>.sv` per unit, plus
`cic_model_pkg.sv`. That package is a reference model which runs the integrators
at the full input rate on the zero-stuffed input, so it is independent of the
half-rate recursion it checks. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

`tb_dual_mode_decimator` runs the top at its default parameters through GSM,
WCDMA and GSM again, for 7000 clocks. It compares about 200 GSM and 300 WCDMA I/Q
outputs bit for bit. It also counts that each of these occurred at least once: both mode switches,
resumption after a switch, both pair selections, fractional carries, odd-instant
WCDMA samples, and a change of the WCDMA ratio from 13 to 12 while running.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cic_pkg.sv tb/cic_model_pkg.sv \
    tb/tb_dual_mode_decimator.sv --top-module tb_dual_mode_decimator -o sim
./obj_dir/sim
```

The other testbenches build the same way with their own top (`cic_model_pkg.sv`
is only needed by `tb_dual_mode_decimator`). Every testbench runs in well under a
second. Lint: `verilator --lint-only -Wall -Irtl rtl/cic_pkg.sv rtl/<unit>.sv`.
The remaining warnings are about unused package constants, the dropped LSBs in the
truncation, and `rst_n` appearing both in the asynchronous resets and in the
assertions' `disable iff`. None of them affects the circuit.
