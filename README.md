# Real-time FDM QPSK receiver (1 Gb/s, 1 GS/s, 250 MHz FPGA clock)

In a frequency-division multiple-access passive optical network each user
gets its own RF sub-carrier. After the RF front end has mixed one user's
channel down to baseband, this receiver recovers that user's 1 Gb/s QPSK
stream (500 Mbaud) in real time. The converters deliver I and Q at 1 GS/s,
four times the 250 MHz logic clock, so every stage works on four samples
(two symbols) per clock. The receiver is blind: it gets no training sequence
and no transmitter clock. From the data alone it corrects

* the I/Q gain and phase imbalance of the front end,
* inter-symbol interference and carrier frequency offset, with a T/2
  fractionally spaced LMS equalizer,
* the sampling-clock offset between transmitter and receiver, by center-tap
  tracking: it shifts the equalizer coefficients and adds or removes one
  output symbol, instead of running a separate timing-recovery loop,

and it hands the symbols to a clock that a PLL derives from a FIFO's fill
level, so the output clock runs at the transmitter's rate.

## Data path

```
 adc_i, adc_q (1 GS/s, 10 bit)
      |
   deser            1:4, sample clock -> 4-sample words
      |  (capture on clk, 250 MHz)
   iq_comp          Q -= p*I ; Q *= g   (p, g adapted blindly)
      |
   lms_equalizer    F4 F2 F0: three 11-tap T/2 complex filters, shared taps
      |             qpsk_decision x3, LMS update, center_tap_tracker
      |  1, 2 or 3 symbols per clock
   symbol_fifo      pack into 4-symbol words, dual-clock FIFO (32 words)
      |  fill level                      |  rd_clk (PLL output)
   fifo_pll_ctrl  -> pll_ctrl -> [PLL] --+--> out_word (4 symbols per rd_clk)
```

`fdm_rx_top` wires these together. The PLL is a clocking primitive of the
FPGA, so it is not part of the RTL. The top exports its control word
(`pll_ctrl`) and takes its clock back (`rd_clk`).

| quantity | value |
|---|---|
| sample rate / resolution | 1 GS/s, 10 bit, I and Q |
| logic clock | 250 MHz, 4 samples per stream per clock |
| symbol rate / bit rate | 500 Mbaud QPSK, 1 Gb/s |
| equalizer | 11 taps, T/2 spacing, complex, 3 filter copies |
| output | 8-bit words of 4 symbols, nominal 125 MHz `rd_clk` |

## The parallel equalizer and center-tap tracking

This is the part that needs the most explanation.

**Delay line and filters.** `lms_equalizer` keeps the newest 15 complex
samples, `win[0]` being the newest. The sample words enter with element 0
oldest. A filter whose window starts at offset `d` computes

    y_d = sum_{n=0..10} c[n] * win[d + n]

This is convolution order: `c[0]` weighs the newest sample. Three filters
run every clock at offsets 4, 2 and 0 (F4, F2, F0) with the
*same* coefficients. Each clock brings four new samples, which is two
symbols. F2 and F0 produce those two symbols, one symbol (two samples) apart.

**LMS.** The decisions are decision directed. For F2 and F0, `e = decide(y)
- y`. Once per clock the coefficients get

    c[n] += round((e2*conj(win[2+n]) + e0*conj(win[n])) >> MU_SHIFT) - (c[n] >> LEAK_SHIFT)

The equalizer is a three-stage pipeline. Stage 1 registers every tap's
complex product, stage 2 registers the sums, scaled to 14 bits, and stage 3
takes the decisions, forms the errors and the gradient, and updates the
coefficients. The update therefore uses filter results that are two clocks
old: the LMS runs with a delay of two clocks. The small leakage term matters. The T/2 input is
band-limited, which leaves directions in coefficient space that the data
never corrects. Without leakage, energy slowly collects in a second lobe two
taps away from the main one, and the tracker below starts shifting back and
forth.

**Center-tap tracking.** Suppose the transmitter's clock is faster than the
receiver's. The symbol instants then slide towards older samples, and the
main tap drifts to higher indices. `center_tap_tracker` finds the tap with
the largest `re^2 + im^2`:

* peak index >= 7 (two taps, i.e. one symbol, right of tap 5): **left
  shift**, `c'[n] = c[n+2]`, the last two taps become 0. The same filter offset
  now yields the symbol one position further on. Continuity then needs an
  extra symbol, and the third filter F4 supplies it. In the clock after the
  shift F4, F2 and F0 are all output: **3 symbols**.
* peak index <= 3: **right shift**, `c'[n] = c[n-2]`. Now F2 would
  recompute the symbol F0 gave in the previous clock, so only F0 is output:
  **1 symbol**.

The LMS update is skipped for the two clocks after a shift, because the
results in the pipeline still refer to the unshifted taps. Then no new shift
is accepted for 8 clocks. Timing: `shift_*_evt` pulses in the clock after the
shift, and the 3- or 1-symbol output appears three clocks after that pulse.
`out_cnt` is 2 otherwise. Symbols are presented oldest first in
`out_sym[0..out_cnt-1]`.

With a sampling offset of `s`, the tracker shifts about every `1/(s *
500 MBd)`. At 200 ppm that is once per 5000 symbols, or 2500 clocks.

## Buffering and the recovered clock

`symbol_fifo` collects the 1/2/3 symbols of each clock into 4-symbol words,
symbol 0 in bits `[1:0]`. A clock adds at most three symbols to at most three
left over, so at most one word completes per clock. Words cross to `rd_clk`
through a Gray-pointer dual-clock FIFO of 32 words. Reading starts once the
FIFO is half full and then takes one word per `rd_clk`. `out_valid` marks a
word, and `underflow` marks a clock that found the FIFO empty. If a word
finds the FIFO full, it is dropped and counted in `overflow_cnt`.

`fifo_pll_ctrl` keeps the FIFO half full:
`integ += fill - 16; pll_ctrl = integ + ((fill - 16) << 11)`. A positive
`pll_ctrl` asks for a faster read clock. The unit is 2^-20 of the nominal
frequency, about 1 ppm, so the settled integrator reads the clock offset
(200 ppm gives about 210). The top brings the integrator out as
`clk_offset`, and the equalizer's peak-energy tap as `peak_tap`.

## I/Q compensation

`iq_comp` passes I through and corrects Q:
`q1 = q - p*i`, `q2 = g*q1` (coefficients Q2.14, p starting at 0, g at 1.0).
Once per clock it adds `sum(i*q1) >> 10` to p, which decorrelates I and Q.
It adds `sum(|i| - |q2|) >> 3` to g, which equalizes their mean magnitudes.
Latency is one clock.

## Timing summary

* `deser` loads a word at sample-clock phase 3 and holds it for four sample
  clocks. `clk` must be `clk_smp / 4` with its rising edge at phase 0, and
  `rst_n` must be released in step with `clk`.
* From the last sample of a word: capture on `clk` (1 clock), `iq_comp`
  (1), equalizer (delay line, products, sums: 3), output register (1), then the
  FIFO and its start threshold.
* `in_valid` of `iq_comp` and `lms_equalizer` acts as a clock enable. In the
  top it is always high after reset.

## Fixed point

| signal | format |
|---|---|
| samples | 10-bit signed integers, as converted |
| equalizer coefficients | 18 bit, 14 fraction bits (range +/-8) |
| filter accumulators | 33 bit, then `>> 14` and saturation to 14 bits |
| decision reference | +/-128 per quadrature (`A_REF`) |
| LMS step | gradient `>> 9`, leakage `>> 13` |

Input levels of about 100-150 per quadrature suit these defaults. The
equalizer also settles the overall gain.

## Where this design makes its own choices

The block structure, the rates, the eleven T/2 taps, the two parallel
filters with shared taps updated every clock, the third filter, and the
insert/remove rule of the center-tap tracking all follow the receiver this
RTL implements. The following are choices of this implementation and can be
changed:

* the I/Q compensation algorithm (correlation/magnitude based);
* the decision-directed LMS error, the two-clock update delay, the tap
  leakage, the step sizes and all word widths;
* the shift threshold (two taps, one symbol), the 2-tap shift and the hold-off;
* the QPSK bit mapping, 4-symbol FIFO words, FIFO depth, half-full start;
* the PI control law and the meaning of `pll_ctrl`.

Known limits:

* The design does not resolve the fourfold QPSK phase ambiguity of a blind
  receiver. The testbenches align with any quarter turn. A system needs
  differential coding or a frame marker.
* All three filters and the gradient use full multipliers. No effort went
  into matching a particular FPGA's DSP or LUT budget.
* The products are registered, but each eleven-term sum and the gradient
  sit in single pipeline stages. A 250 MHz FPGA build may need the adder
  trees split further, and the LMS delay and the post-shift skip would
  grow with them.
* The equalizer is written for four samples (two symbols) per clock.
  Another `PAR` stops elaboration with an error. A faster converter would
  need more filters per clock and a wider symbol count.

Concurrent assertions in the RTL check a few rules during simulation
(run verilator with `--assert`):

* every equalizer output cycle carries 1, 2 or 3 symbols;
* two shifts never fall on consecutive clocks;
* a FIFO read clock never shows both a word and an underflow;
* the write-side filling never exceeds the depth.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_deser` | word content and order, one strobe per 4 samples, alignment after reset |
| `tb_iq_comp` | exact per-clock arithmetic; convergence to p = 0.12, g = 1.25 for a 0.8 gain and 15 % leakage |
| `tb_fse_fir` | complex dot product against a 64-bit model, extremes included |
| `tb_qpsk_decision` | quadrant rule, zero and extremes |
| `tb_center_tap_tracker` | planted peak at every tap, thresholds, tie rule |
| `tb_lms_equalizer` | echo channel, 100 kHz CFO, +/-200 ppm SFO: shift direction, 3/1-symbol clocks three clocks after each shift, zero errors at a fixed lag across all shifts |
| `tb_symbol_fifo` | data order through packing and clock crossing, start at half full, underflow, overflow |
| `tb_fifo_pll_ctrl` | exact PI arithmetic; closed loop settles at half fill and the right offset |
| `tb_fdm_rx_top` | whole receiver at default parameters with the PLL model (see below) |
| `tb_cfo_tolerance` | whole receiver: 180 kHz carrier offset without noise (0 errors required), 100 kHz with Gaussian noise of about 9 dB SNR (no phase slip, error rate below 5e-3; about 2.5e-4 observed) |

`tb_fdm_rx_top` runs 32 000 clocks (128 us) at default parameters. Its
stimulus: an echo channel, 100 kHz carrier offset, Q gain 0.9 with 10 % I
leakage, noise, and +200 ppm then -200 ppm sampling offset. The PLL model
`tb/pll_model.sv` clocks the read side. The bench requires:

* left shifts only in the first half and right shifts only in the second;
* 3- and 1-symbol clocks;
* `pll_ctrl` averaging positive, then negative;
* no FIFO overflow or underflow;
* a symbol error rate below 1e-3 at one fixed lag over about 62 000 symbols.

The observed result is zero errors.

`tb/tb_chan_pkg.sv` holds the stimulus: a raised-cosine (roll-off 0.5)
QPSK transmitter, the channel impairments, and a symbol checker that
locks once onto lag and rotation.

Not covered: bit error rate against SNR (for example at 9 dB), optical budget
and RF carrier frequency. Those depend on the analog chain, which is not
modelled.

## Simulating

With Verilator 5 (`--timing` is needed for the clocks and the PLL model):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fdm_rx_pkg.sv tb/tb_chan_pkg.sv tb/tb_fdm_rx_top.sv --top-module tb_fdm_rx_top
./obj_dir/Vtb_fdm_rx_top
```

Block testbenches build the same way: list `rtl/fdm_rx_pkg.sv`, plus
`tb/tb_chan_pkg.sv` where the bench imports it, then the bench. `-y rtl`
finds the rest. Lint: `verilator --lint-only -Wall -y rtl rtl/fdm_rx_pkg.sv
rtl/fdm_rx_top.sv`.

## Files

* `rtl/fdm_rx_pkg.sv`: shared constants, the shift command enum and the symbol type
* `rtl/fdm_rx_top.sv`: the receiver
* `rtl/deser.sv`, `rtl/iq_comp.sv`, `rtl/fse_fir.sv`, `rtl/qpsk_decision.sv`,
  `rtl/center_tap_tracker.sv`, `rtl/lms_equalizer.sv`, `rtl/symbol_fifo.sv`,
  `rtl/fifo_pll_ctrl.sv`: the blocks above
* `tb/`: one testbench per block, the channel package, the PLL model
