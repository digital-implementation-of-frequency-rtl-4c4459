# Adaptive frequency and phase locked loop (FPLL)

A digital loop that locks onto a pure sine wave and reports, sample by
sample, its frequency, its phase and its amplitude. Unlike a classic PLL it
has no phase detector and loop filter: it is an oscillator built from two
integrators whose state is pulled towards the input, plus a third integrator
that slides the oscillator's frequency until the remaining error vanishes.
Once locked the oscillator's two states are the in-phase (I) copy of the
input and a quadrature (Q) copy 90 degrees ahead, so a CORDIC on (Q, I)
yields the input's phase and amplitude.

This is an implementation of the adaptive FPLL structure published in
"Digital Implementation of Frequency and Phase Locked Loops" (loop
structure, discretisation, number formats, block partitioning). The
converter interfaces, the lock criterion, the CORDIC details and all timing
are choices made here; each source file says which is which.

## The loop

With input `u` and oscillator frequency `w` (rad/s):

```
e  = u - xc                      tracking error
xs = integral( w * (K1*e - xc) ) Q state
xc = integral( w * (xs + K2*e) ) I state
w  = integral( 2*gw * e * xs )   frequency adaptation
```

Without the error terms the first two lines are a lossless oscillator at
`w`. `K1` and `K2` steer its state onto the input: the transfer function
from `u` to `xc` is

```
w (K2 s + K1 w) / (s^2 + K2 w s + (K1 + 1) w^2)
```

which equals exactly 1 at the input frequency when `w` is right, while
`xs/u` equals `j` there. The product `e * xs` has a non-zero average only
while `w` is wrong, with a sign that moves `w` towards the input, so the
third integrator drives `w` to the input's angular frequency. `gw` sets how
fast: the rate of change of `w` is proportional to `gw` and the signal power.

## From s to z: the algebraic loop

Each `integral()` is a bilinear (trapezoidal) integrator,
`y[n] = y[n-1] + (Ts/2) (x[n] + x[n-1])` (`bilinear_integrator`). Its output
depends on its present input, so `u -> e -> xs -> xc -> e` becomes a loop with
no register in it: `xc[n]` would depend on itself. It cannot be solved by
reordering, so a one-sample delay is placed in the feedback: `e` and the
`-xc` term of the Q integrator use `xc[n-1]`. The oscillator integrators
also use `w[n-1]`, so one update per sample is a straight combinational
path from registers to registers.

The delay changes the loop's dynamics, and this is the part most worth
understanding before using the design:

* **Frequency error.** The estimate settles a little below the input, by
  an amount that grows with `f/fs`: about 0.1 % at 1.3 kHz, 0.5 % at 7 kHz
  and 5.5 % at 70 kHz for `fs = 4 MHz`. The error is systematic (a double
  precision model of the same equations gives the same numbers), so
  raising `fs` is the remedy.
* **Phase and amplitude ripple.** Because the loop locks slightly off
  frequency, I and Q are not of exactly equal amplitude. The CORDIC phase
  then ripples at twice the input frequency (about +-0.09 rad at
  `fs/f = 80`) and the magnitude reads a few percent high.
* **Stability limit.** With `K1 = K2 = 10` the delayed oscillator loop
  becomes unstable above about `fs/35` (about 110 kHz at 4 MHz). The
  nominal input band of 1 Hz to 200 kHz with `fs = 20 x 200 kHz` therefore
  is not reached at the default gains; smaller `K` (3 or less) keeps
  200 kHz stable but with about 16 % frequency error. A higher `fs` keeps
  the full band with K = 10: with `CLK_DIV = 1` (fs = 40 MHz) 200 kHz is
  estimated 1.6 % low and 700 kHz 5.5 % low.

## Number formats

Every datapath word is 40 bits (`fpll_pkg`):

| format | range | used for |
|---|---|---|
| Q4.36 | +-8, LSB 1.5e-11 | input `u`, error `e`, `xs`, `xc`, `e*xs`, `w*Ts/2`, phase (rad), magnitude |
| Q24.16 | +-8.4e6, LSB 1.5e-5 | `w` (rad/s), frequency in Hz, `K1`, `K2`, `K1*e`, `K1*e - xc`, `xs + K2*e` |
| 40 bits, as many fraction bits as fit | | constants `Ts/2` and `gw*Ts`, computed at elaboration |

Every multiplier output is truncated (low bits dropped) to its format and,
unlike a plain truncation, saturated on overflow, so a large start-up error
clamps rather than flips sign. One exception to "40 bits everywhere": the
frequency integrator keeps 24 guard bits below its Q24.16 output (a 64-bit
accumulator). At the nominal `gw = 100` and `fs = 4 MHz` its per-sample
increment is around 1e-5 rad/s, below one Q24.16 LSB, and would otherwise be
lost entirely.

The inputs and outputs use full scale +-1.0 for the signal.

## Blocks

```
fpll_main                     top level
├── adc_interface             sample clock, ADC convert/capture, code -> Q4.36
├── fpll_core                 the loop, once per sample
│   ├── fx_adder              saturating add/subtract
│   ├── fx_multiplier         40x40 multiply, truncate + saturate to a format
│   ├── bilinear_integrator   trapezoidal integrator, gain as a port
│   ├── lock_detector         lock flag from the settling of w
│   └── cordic_main           phase and magnitude of (xs, xc)
│       ├── cordic_pre        fold left half plane into the right (uses negate)
│       ├── cordic_core       ITER pipelined cordic_rotate stages (use add_sub)
│       └── cordic_post       +-pi correction, CORDIC gain removal
└── dac_interface             I and Q to two offset-binary DACs
```

The split into ADC interface, core, DAC interface, adder, multiplier and a
CORDIC with pre, core, post, negate, rotate and add/sub stages follows the
original partitioning. The integrator, the lock detector and the package are
additions of this implementation.

## Timing and interfaces

* **Clock and sample rate.** `CLK_HZ` (default 40 MHz) divided by `CLK_DIV`
  (default 10) gives `fs = 4 MHz`, twenty times the 200 kHz top of the
  intended band. The core takes a sample on any clock with `sample_en`,
  but `Ts` is built into its constants, so the samples must arrive at the
  rate its `FS_HZ` parameter states.
* **ADC.** `adc_convst` pulses at the start of every sample period; the
  two's-complement `adc_data` (ADC_W = 12 bits) present at the next pulse is
  taken as that conversion's result. Conversion latency is one sample
  period.
* **Loop update.** The whole update (eight multiplications, three of them inside the integrators) is
  combinational between the sample registers and completes in one clock;
  the results (`omega`, `freq_hz`, and the I/Q values to the DACs) appear
  one clock after the sample is taken. Since new samples come only every
  `CLK_DIV` clocks, this path is a multicycle path for timing analysis in a
  real implementation.
* **DACs.** `dac_i`/`dac_q` (DAC_W = 12 bits, offset binary, mid code =
  0) change one clock after each loop update together with a `dac_wr`
  strobe.
* **Phase.** `cordic_main` is fully pipelined, one stage per clock, 32
  stages: `phase` and `magnitude` for a sample appear `CORDIC_ITER + 2`
  clocks after it was taken, flagged by `phase_valid`, which is asserted
  only while `locked`. Phase is `atan2(I, Q)` in radians, in (-pi, pi];
  for an input `A sin(theta)` it reads `theta`, and `magnitude` reads `A`.

## Lock detection

`lock_detector` averages `w` over windows of `2^LOG2_WIN` samples (default
1024), which removes the ripple at twice the input frequency that the
adaptation leaves on `w`. A window whose average differs from the previous
window's by at most `1/2^TOL_SHIFT` (default 1/128) counts as settled;
`LOCK_HITS` (default 4) settled windows in a row raise `locked`, and one
unsettled window clears it. Consequences:

* the flag reacts one window late: after a frequency step `phase_valid`
  may stay high for up to one window while the loop is re-acquiring, and
  the phase values then are not yet accurate;
* with a slow adaptation gain (the nominal `gw = 100`) `w` moves so slowly
  that it can look settled before it has converged. Lengthen the window or
  tighten the tolerance for such settings.

## Parameters

| parameter | default | origin |
|---|---|---|
| `K1`, `K2` | 10 | original loop gain `K = 10` |
| `GW` | 100 | original adaptation gain `gw` |
| `F0_HZ` | 1 Hz | original initial frequency |
| `XC0`, `XS0` | 1.0 | original initial oscillator states |
| `CLK_HZ` / `CLK_DIV` | 40 MHz / 10 | chosen here; gives the original `fs = 20 x 200 kHz` |
| `ADC_W`, `DAC_W` | 12 | chosen here |
| `LOG2_WIN`, `TOL_SHIFT`, `LOCK_HITS` | 10, 7, 4 | chosen here |
| `CORDIC_ITER` | 32 | chosen here |

`GW = 100` is a slow setting: from 1 Hz the loop needs about two seconds to
come within 8 % of a 1.25 Hz input, and it could never reach a kilohertz
input in practice. Acquisition time scales roughly inversely with `GW`;
values of `1e5 x f_in` to `1e9` make the loop acquire within a few
milliseconds at kilohertz inputs (see the tests). Very large values relative to
the input frequency, combined with the default start state `xc = xs = 1`,
drive `w` into saturation at start-up and the loop does not recover.

## Measured behaviour (simulation, fs = 4 MHz, K = 10)

| input | estimate | error |
|---|---|---|
| 700 Hz | 699.62 Hz | -0.05 % |
| 1.3 kHz | 1298.67 Hz | -0.10 % |
| 3.5 kHz | 3490.37 Hz | -0.28 % |
| 6.5 kHz | 6466.79 Hz | -0.51 % |
| 7 kHz | 6961.48 Hz | -0.55 % |
| 30 kHz | 29303.6 Hz | -2.3 % |
| 50 kHz | 48037.6 Hz | -3.9 % |
| 70 kHz | 66119.7 Hz | -5.5 % |
| 200 kHz, fs = 40 MHz | 196850.3 Hz | -1.6 % |
| 700 kHz, fs = 40 MHz | 661196.9 Hz | -5.5 % |

All are within the 8 % bound the original design states. As an FSK
demodulator (5.5 kHz = 1, 2.5 kHz = 0, 100 bit/s) the frequency output reads
5477.5 Hz and 2496.3 Hz and every bit slices correctly at mid-bit.

After coarse synthesis the top level is about 670 word-level cells and 4500
flip-flop bits, most of them the 32-stage CORDIC pipeline.

## Departures and limits

* Which branch of the loop carries the delay element, and whether the
  oscillator integrators use the previous or the present `w`, are choices
  made here; the delay placement is the one that breaks the algebraic loop
  with a single register.
* The frequency integrator has 24 guard bits (64-bit state) instead of 40.
* Saturation instead of wrap-around on overflow.
* The lock criterion, the ADC/DAC interfaces and the CORDIC structure
  (vectoring mode, quadrant fold, 32 pipelined stages) are this
  implementation's own.
* Above about `fs/35` the default loop is unstable (see above); the upper
  part of the 1 Hz - 200 kHz band needs a higher sample rate or lower `K`.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fpll_pkg.sv tb/tb_fpll_main.sv \
    --top-module tb_fpll_main -o sim && ./obj_dir/sim
```

Replace `tb_fpll_main` by any file in `tb/`:

| testbench | what it runs |
|---|---|
| `tb_fpll_main` | top level through the ADC/DAC ports, 50 kHz then a step to 30 kHz: acquisition, lock, loss of lock, re-lock, phase and magnitude, DAC codes |
| `tb_fpll_main_full` | top level at every default parameter, 1.25 Hz input for 2 s of signal (8 million samples, about two minutes) |
| `tb_fpll_core` | loop against a double-precision model of the same difference equations, every sample; CORDIC phase/magnitude and latency |
| `tb_fpll_table1` | eight loops in parallel, 700 Hz ... 70 kHz at fs = 4 MHz and 200 kHz, 700 kHz at fs = 40 MHz; estimates within 8 % |
| `tb_fpll_fsk` | FSK demodulation of an 8-bit pattern |
| `tb_<block>` | one per leaf block: adder, multiplier, integrator, lock detector, CORDIC stages, negate, add/sub, ADC and DAC interfaces |

The tests that need fast acquisition raise `GW`; all else stays at its
default unless the file header says otherwise.
