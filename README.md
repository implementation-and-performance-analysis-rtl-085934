# Two-carrier digital IF transceiver for a reconfigurable base station

This is the FPGA logic of a base-station transceiver that sits between a baseband
modem and a pair of data converters. It handles two frequency assignments (FAs,
i.e. two carriers) at once, in both directions:

* **Downlink (up-conversion).** Each FA arrives as a baseband I/Q stream. Each
  stream is interpolated to the IF sample rate and shifted to its own offset
  frequency by a complex quadrature modulator. The two carriers are then added
  into a single I/Q pair for a two-channel DAC. The DAC chip does the last x4
  interpolation and the complex modulation to the 80 MHz analog IF. That chip is
  not part of this RTL.
* **Uplink (down-conversion and channelisation).** A single ADC band-pass samples
  the analog IF. The sample stream is split into two paths. Each path
  demodulates one FA to 0 Hz with its own NCO, then decimation filters remove
  the other carrier and the mixing images.

The same hardware serves several air interfaces by being rebuilt for each one:
HSDPA (W-CDMA based) and three bandwidth profiles of IEEE 802.16d WiMAX. The
build is chosen by one parameter, `PROFILE`. The carrier positions are
run-time inputs (NCO tuning words), so they can be moved without a rebuild.

## Frequency plan

| Profile | IF sample clock | Modem rate per FA | Downlink filter | Uplink filter | FA1 / FA2 NCO |
|---|---|---|---|---|---|
| `PROF_HSDPA` (default) | 61.44 MHz | 15.36 Msps (4 x 3.84) | x4 | /2 | 16.16 / 20.96 MHz |
| `PROF_WIMAX_7` | 64 MHz | 16 Msps (2 x 8) | x4 | /4 | 12 / 20 MHz |
| `PROF_WIMAX_35` | 64 MHz | 8 Msps | x8 | /8 | 12 / 20 MHz |
| `PROF_WIMAX_175` | 64 MHz | 4 Msps | x2 at 8 MHz, then x8 | /8, then /2 at 8 MHz | 12 / 20 MHz |

The DAC chip modulates by a further 61.44 MHz (HSDPA) or 64 MHz (WiMAX), so
the FAs land around 80 MHz. For HSDPA they land at 77.6 and 82.4 MHz. On the
uplink the ADC runs at the IF sample clock. The carriers alias down to the
same NCO offsets, which is why the receive NCOs use the same frequencies as
the transmit NCOs.

Modem rates in the 3.5 and 1.75 MHz rows are derived: the IF clock divided by
the total rate change. The 1.75 MHz profile has two filters in each
direction. Reading its table column as a cascade gives a x2 / /2 stage at
8 MHz (cutoff 1.2 MHz) and a x8 / /8 stage at 64 MHz (cutoff 2 MHz). The
64 MHz stage uses the same filter as the 3.5 MHz profile. This split of x16
into 2 x 8 is an interpretation, not a given.

## Datapath

```
 downlink                                   uplink
 FA1 I ─ fir_interp ┐                          ┌─ ddc_mixer(NCO1) ─ fir_decim ─ FA1 I
 FA1 Q ─ fir_interp ┴ dcqm(NCO1) ┐     ADC ────┤                  └ fir_decim ─ FA1 Q
 FA2 I ─ fir_interp ┐            ├ fa_combiner └─ ddc_mixer(NCO2) ─ fir_decim ─ FA2 I
 FA2 Q ─ fir_interp ┴ dcqm(NCO2) ┘  → DAC I,Q                     └ fir_decim ─ FA2 Q
```

* `dcqm` forms `s_i = I cos wt − Q sin wt` and `s_q = I sin wt + Q cos wt`.
  With both products, the DAC's own complex modulation leaves one sideband
  and the image cancels. `fa_combiner` adds the FA1 and FA2 results. The DAC
  words are therefore
  `S_I = Σ_f (I_f cos w_f t − Q_f sin w_f t) / 2` and
  `S_Q = Σ_f (I_f sin w_f t + Q_f cos w_f t) / 2`.
  The halving is this design's choice. It keeps two full-scale carriers from
  clipping.
* `ddc_mixer` multiplies the real ADC sample by `cos wt` and `−sin wt`, which
  is multiplication by `exp(−jwt)`.
* `nco` is a 32-bit phase accumulator (`f = ftw / 2^32 · f_clk`) feeding a
  1024-entry sine ROM. The cosine is read a quarter period ahead in the same
  ROM.

## The raised-cosine filters

Every filter, in every profile, is a 129-tap raised-cosine low-pass filter
with 16-bit coefficients. The receive side reuses the transmit side's filter
design for the same profile. No coefficient file is used. Each tap is
computed at elaboration time, in `dif_pkg::rc_coef`, from the pulse

    h(n) = sinc(x) · cos(π β x) / (1 − (2 β x)^2),   x = 2 fc n / fs,   n = −64 … 64

β is the roll-off: 0.22 for HSDPA and 0.115 for WiMAX. fc is the table's
cutoff, read as the 6 dB point 1/(2T). fs is the sample rate on the filter's
high-rate side. The taps are scaled so that they sum to the rate change R,
then rounded to Q1.15. For the decimators this means a DC gain of one after
the output shift of 15 + log2 R. For the interpolators it means each of the R
polyphase branches has a gain of about one.

* `fir_interp` is polyphase. Output `y[nL+p] = Σ_k h[p+kL] · x[n−k]`, and all
  ceil(129/L) products of one output (33 for x4) are evaluated in one cycle.
  It is driven by an output-rate enable `ce`. On every L-th enabled cycle it
  consumes `in_data` and pulses `in_take`, so the source is pulled rather
  than pushed. Cascading two interpolators works the same way: the first
  stage's `ce` is the second stage's `in_take`.
* `fir_decim` is direct form. It shifts in every input and evaluates all 129
  products on every M-th input. The output is registered, so `out_valid`
  comes one cycle after that input.

Both designs spend multipliers for speed rather than area. For the default
build, synthesis reports about 2,900 word-level cells and 10.8 k flip-flop
bits. The coefficient and sine tables are kept as memories.

## Interfaces and timing (top: `dif_transceiver`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | IF sample clock; asynchronous active-low reset |
| `tx_ftw1/2`, `rx_ftw1/2` | in | 32 | NCO tuning words `round(f/fs · 2^32)`; `dif_pkg::ftw_of(f_khz, fs_khz)` computes them |
| `tx_bb_i[2]`, `tx_bb_q[2]` | in | 16 | downlink baseband of FA1 (index 0) and FA2 (index 1), two's complement |
| `tx_bb_take` | out | 1 | the `tx_bb_*` words present in this cycle are consumed; once per 4, 8 or 16 clocks |
| `dac_i`, `dac_q` | out | 16 | combined DAC words, one pair per clock |
| `dac_valid` | out | 1 | high once filtered data reaches the DAC port |
| `adc_data` | in | 14 | ADC sample, one per clock |
| `rx_bb_i[2]`, `rx_bb_q[2]`, `rx_bb_valid` | out | 16, 1 | uplink baseband per FA; valid once per 2, 4, 8 or 16 clocks |

All blocks run on one clock, once per IF sample, and every arithmetic stage
is registered. Every product is rounded and saturated. A new tuning word
takes effect on the next clock and keeps the phase continuous. The NCOs and
filters start one clock after reset is released.

## What is assumed rather than given

The system description sets the architecture, the rates, the NCO
frequencies and the filter specifications. The following are this design's
own choices:

* Sample widths: 16-bit baseband and DAC words, 14-bit ADC samples, Q1.15
  NCO values.
* The NCO structure, which is an accumulator and a ROM.
* The pull-style modem interface.
* The combiner's halving.
* The mixer scaling: ADC full scale maps to 16-bit full scale.
* The reading of "cutoff" and the coefficient normalisation.
* Reset behaviour.

The profile table lists 64 MHz as the HSDPA filter rate, but the converters
are clocked at 61.44 MHz for HSDPA. This design uses 61.44 MHz.

Parts outside this RTL:

* The DAC, with its half-band interpolation and final modulation.
* The ADC and the PLL clocking.
* The multi-gigabit serial link to the modem. The top offers the parallel
  sample ports that such a link would feed.
* The board management controller and the power module.
* Reconfiguration itself. Each profile is a separate build.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

* `nco_tb` checks every output against real-valued cos/sin of a reference
  phase accumulator (±1 LSB). It includes a retune and gaps in `en`.
* `fir_interp_tb` and `fir_decim_tb` use an impulse and random data, with
  continuous and gapped enables. Outputs are compared bit-exactly with a
  reference convolution. That reference uses taps designed separately in
  `tb/rc_ref_pkg.sv`. The rate of `in_take` / `out_valid` is also checked.
* `dcqm_tb`, `fa_combiner_tb` and `ddc_mixer_tb` compare against exact
  integer arithmetic and include saturation corners.
* `dif_tx_tb` holds random symbols on both FAs and compares the DAC words
  with the equations for `S_I` and `S_Q` above, evaluated in real
  arithmetic. It includes a run-time retune of FA2. The worst error is about
  83 LSB.
* `dif_rx_tb` feeds two tones, one on each FA centre, with random amplitudes
  and phases. It checks each FA output against `2·A·exp(j·phase)`. This
  covers channel separation, mixing signs and filter gain.
* `dif_transceiver_tb` runs the default build end to end. It loops the DAC I
  word back to the ADC and checks that each receive FA recovers its own
  transmit symbol, scaled by 1/4 and rotated by a constant loop phase. It
  then swaps the receive NCOs at run time and checks that the FAs trade
  places. It counts modem pulls, receive outputs, checked symbols and
  verified retunes, and fails if any count is zero.
* `dif_profiles_tb` runs the same loopback for all four profiles side by
  side, including the rates x4/x4/x8/x16 and /2/4/8/16. The worst errors are
  9 to 23 LSB on symbols of about 3000 LSB.

To run one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/dif_pkg.sv tb/rc_ref_pkg.sv tb/dif_transceiver_tb.sv \
    --top dif_transceiver_tb --Mdir build -o sim
./build/sim
```

Replace the testbench name to run another test. Every test finishes in well
under a second. To build for another standard, set `PROFILE` on
`dif_transceiver` to `PROF_WIMAX_7`, `PROF_WIMAX_35` or `PROF_WIMAX_175`, and
set the tuning words to that profile's NCO frequencies.

## Limits

* The tests check waveforms and rates with held symbols and tones, not
  modulation quality. The transmit EVM of the real system (about −39 dB for
  HSDPA and −43 dB for WiMAX, measured at the analog IF) cannot be reproduced
  without the converters and a modem signal.
* The loopback errors above correspond to roughly −40 dB or better. They
  cover only the digital part.
* The raised-cosine coefficients follow from the stated specifications. They
  are not the original coefficient sets, which are not available.
