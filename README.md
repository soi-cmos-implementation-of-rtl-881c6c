# Multirate D/DDPSK demodulator with a 1-bit front end

This is the digital part of a low-power binary PSK receiver for links between
a Mars orbiter and a lander. It works without a carrier PLL and without a
reference oscillator. Its one clock is the 4 MHz clock that samples the IF
signal.

Three ideas carry the design:

* **Autocorrelation detection.** Each symbol is compared with the symbol
  before it, not with a local carrier. One differential stage (DPSK) turns
  an unknown carrier phase into nothing. It turns a Doppler frequency offset
  `dw` into a constant phase error `dw*T`. A second differential stage
  (DDPSK) compares two neighbouring first-stage results and removes that
  error as well. So the receiver tolerates the roughly ±10 kHz Doppler shift
  of an orbiting transmitter. The modulation select `m` picks one stage
  (DPSK, `m = 1`) or two stages (DDPSK, `m = 0`).
* **A 1-bit IF front end.** A hard-limiting comparator samples the IF signal
  at `fs = 4 fIF / (2n+1)`. That puts the carrier at a quarter of the
  sampling rate, or an alias of it, so one sample is an odd multiple of 90°.
  All later processing is on single bits. Each mixer is an XNOR gate, and
  each low-pass filter is an up/down counter.
* **Multirate by decimation.** Four data rates are supported: 100, 10, 1 and
  0.1 kbps. That is 40, 400, 4000 and 40000 samples per symbol. The
  one-symbol delay is always the same 40-flip-flop shift register. At the
  lower rates it is simply clocked 10, 100 or 1000 times slower. A symbol
  timing loop finds the rate from the spacing of symbol transitions. It
  selects the rate without any help from the transmitter, apart from a 1010
  preamble at each rate change.

All of it is written as synthesizable SystemVerilog. The exception is the
1-bit ADC model (`adc_1bit`), which stands in for an analog comparator. The
RF front end (SAW filter, LNA, mixer, IF filter) and the analog IF amplifier
are outside the RTL. With the default parameters the whole design is about
280 flip-flops.

## Signal path

```
vin ──► adc_1bit ──r_n──┬──────────────► ddpsk_baseband ──► J_n (data_o)
                        │                    ▲      ▲  │
                        │             rate   │      │  │
                        ▼                    │  sym_clr│
            symbol_timing_recovery ──────────┘      │  │
              ▲  (s_T selects r_n or J_n) ──T_clk──► reset_circuit
              └────────────────────────────────────────┘ J_n
```

| module | role |
|---|---|
| `psk_demod_top` | wires everything; brings out data, clock, rate, lock and probe signals |
| `adc_1bit` | behavioural model: comparator (sign of `vin`, 1 for ≥ 0) plus a sampling flip-flop |
| `ddpsk_baseband` | I/Q XNOR mixers, accumulators, second differential stage, adder, sign |
| `multirate_delay` | decimator chain (÷10, ÷10, ÷10) and the 40-stage one-symbol delay |
| `updown_accumulator` | per-symbol up/down counter (matched filter), dumped by the reset pulse |
| `symbol_diff_stage` | previous-symbol register, multiplier, DPSK/DDPSK select |
| `reset_circuit` | one-cycle pulse at every rising edge of the recovered clock |
| `symbol_timing_recovery` | the timing loop, built from the next six modules |
| `transition_detector` | input select `s_T`, delay τ = 2 samples, XOR/XNOR → pulses `z(k)` |
| `prefilter` | removes pulses narrower than 2 samples → `y(k)` |
| `pfd` | spacing between pulses, and the divider phase at each pulse |
| `freq_controller` | data rate from the pulse spacing |
| `phase_estimator` | phase error → increment/decrement commands |
| `freq_divider` | divide-by-N increment/decrement counter → `T_clk` |
| `ddpsk_pkg` | rate and mode enums, `symbol_len()` = 40·10^rate |

## The baseband detector

### First stage: correlating with the previous symbol

The receiver multiplies `r(k)` by `r(k-T)` (the I branch) and by `r(k-T-1)`
(the Q branch). `T` is one symbol. With 1-bit samples, "multiply" means
XNOR: the output is 1 when the two samples agree. At 100 kbps, `T` is 40
samples, which is ten whole carrier cycles. So `r(k)` and `r(k-T)` line up
in carrier phase, and their agreement measures the phase change between the
two symbols. `r(k-T-1)` is the delayed signal shifted by one more sample,
which is 90° of carrier. So the two branches are the cosine and sine parts
of the phase difference.

### Decimation in the delay unit (`multirate_delay`)

A chain of three modulo-10 counters makes strobes at fs, fs/10, fs/100 and
fs/1000. The detected rate picks one of them. The 40-deep shift register
moves only on the selected strobe. Its last stage therefore always holds the
sample from exactly `40·10^rate` samples ago. That is one symbol at the
selected rate, and still a whole number of carrier cycles.

The register is two bits wide. It carries `r(k)` and `r(k-1)` together, so
the 90° sample for the Q branch exists at every rate.

The mixers are evaluated only in strobe cycles. This is the decimator `L` in
front of the accumulators. So every rate produces exactly 40 products per
symbol, and the accumulators stay 8 bits wide at every rate. This is also
why power stays flat across data rates.

### Accumulators and the reset circuit

Each branch counts up for an XNOR output of 1 and down for 0. The counting
runs from one reset pulse to the next. `reset_circuit` makes that pulse, one
cycle long, on every rising edge of `T_clk`. The pulse copies the finished
sum to `I_n` or `Q_n` and starts the next symbol with the current sample.
With no noise, `|I_n| = 40`.

### Second stage and decision (`symbol_diff_stage`)

In DPSK mode, `x_n = I_n` and `y_n = Q_n`. In DDPSK mode,
`x_n = I_n·I_{n-1}` and `y_n = Q_n·Q_{n-1}`: this is `cos(φ_n − φ_{n-1})` in
quantized form, where `φ_n` is the phase difference measured by the first
stage. It does not depend on the offset `dw*T` that both terms share. The
bit is `J_n = (x_n + y_n ≥ 0)`.

### Bit convention

A 1 means "same phase as the reference". A transmitter that matches this
encodes twice:

* `c_n = a_n XNOR c_{n-1}`
* `d_n = c_n XNOR d_{n-1}`

It then sends `d_n` as the carrier phase (0° or 180°). For example, the
transmitted stream `1010 10001011 101010001011 …` decodes in DDPSK mode to
`11010110 101111010110 …`.

### Latency

`I_n` and `Q_n` appear 1 cycle after the reset pulse. `J_n` and `data_valid`
appear 3 cycles after it.

## Symbol timing recovery

The timing loop matters most for how the receiver behaves, and most of its
insides are this design's own.

### Transition pulses

`transition_detector` registers the selected input as `s(k)` and delays it
by τ = 2 samples to get `s_d(k)`. It then uses one of two gates:

* **Demodulated data (`s_T = 1`).** `z = s XOR s_d`: each change of level
  gives a pulse 2 samples wide.
* **PSK signal (`s_T = 0`).** `z = s XNOR s_d`. Two samples are 180° of
  carrier for every sampling factor `n`, so an unmodulated carrier always
  makes `s ≠ s_d`. A 180° phase step makes `s = s_d` for exactly two
  samples, which gives the same 2-sample pulse.

A Doppler offset makes the 1-bit sample pattern slip by one sample now and
then. Each slip leaves a 1-sample error pulse. `prefilter` keeps only pulses
at least 2 samples wide. It keeps them whole and delays them by one sample.

### Rate detection

`pfd` measures the number of samples between rising edges of `y`. A
transition can only happen on a symbol boundary, so a spacing is always a
whole number of symbols.

`freq_controller` takes a spacing below `5 · symbol_len(rate)` to mean that
rate or a faster one. So the thresholds are 200, 2000 and 20000 samples.
The limit of 5 assumes the transmitter never sends five equal symbols in a
row. The transmitter's framing ensures this: it inserts a `10` pair after
every 6 data bits.

* A faster rate is adopted after one spacing. A spacing that short cannot
  occur at the slower rate.
* A slower rate is adopted only after two spacings in a row agree. This is
  this design's rule, so that one long run of equal bits does not change
  the rate.

With the 1010 preamble, the rate is known after 2 or 3 symbols.

### Phase tracking

`freq_divider` counts modulo `N = 40·10^rate`. `T_clk` is high for the first
half of the count. At each transition `pfd` samples the count, and
`phase_estimator` compares it with `target`. `target` is the pipeline delay
from the boundary to the sample: 2 for the PSK input, 5 for the data input.
The difference is folded into (−N/2, N/2], and the correction is applied
one sample per cycle. An increment advances the counter by two. A decrement
holds it. So a single transition moves `T_clk` onto the boundary: this is a
first-order loop with full correction. `locked_o` is high when the last
error was within ±1 sample.

When the rate changes, the divider is loaded with the count it would have
had if the deciding transition had been on time.

### Data input as the timing source

The loop's target for the data input includes the detector's own 3-cycle
output delay. This stops the loop from chasing its own output. But a loop
driven by its own decisions can only hold the phase it has. It cannot
acquire a new one. Use `s_T = 1` after acquiring with `s_T = 0`, or drive
the timing circuit from an external data stream.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `TC_STAGES` | 40 | constant delay, in decimated samples (one 100 kbps symbol) |
| `M` | 10 | decimation between neighbouring rates |
| `TAU` | 2 | transition pulse width, and the prefilter's minimum width |
| `ACC_W` | 8 | accumulator width (holds ±40) |
| `VIN_W` | 12 | width of the stand-in analog input |
| `ddpsk_pkg::BASE_DIV` / `RATE_STEP` / `NUM_RATES` | 40 / 10 / 4 | rate plan |

The rate plan assumes `fs = 4 MHz`. The design has no other notion of
absolute time. The IF frequency is not a parameter. Any IF with
`fs = 4 fIF / (2n+1)` works, for example 1, 3, 15 or 25 MHz. Each sample
then advances the carrier by `(2n+1)·90°`. Modulo 360° that is only ever
90° or 270°, so the logic sees one of two sample patterns. The tests cover
both: the 1 MHz IF gives 90° and the 15 MHz IF gives 270°.

## Where this design fills in or departs from the description it follows

* **Second-stage multipliers.** The first-stage mixers are XNOR gates. The
  second stage multiplies the signed 8-bit symbol sums. A sign-only version
  would reduce these to gates too, but it loses the soft combining of I
  and Q.
* **Decimator `L`.** No value was given. It equals the delay unit's
  decimation, so every rate integrates 40 products per symbol.
* **Carrier phases at the lower rates.** At 10, 1 and 0.1 kbps the kept
  samples are 10, 100 or 1000 samples apart. That is always an even
  number, so the kept samples cover only two of the four carrier phases.
  The I/Q sum stays correct in the simulations, including with Doppler.
  Against noise, the lower rates lean on the Q branch more than the
  100 kbps rate does.
* **90° branch.** It is realised as one extra sample of delay. That sample
  is taken before the decimator rather than after the delay.
* **Divider.** It is one counter with a selectable modulus, not a cascade of
  ÷40 and ÷10 stages with a selector. The division ratios are the same.
* **PFD, frequency controller and phase estimator.** Only their names and
  roles were given. The spacing measurement, the 5-symbol threshold with
  two-spacing confirmation, and the full-correction phase step are this
  design's.
* **Lock time.** Measured silicon locked within 3–4 bits. Here the testbenches require the rate to be
  found and the loop locked within six symbols of the start of the
  preamble.
* **Framing.** The receiver does not strip the preamble or the inserted
  transition bits. They come out as data.
* **Reset.** Every register has an asynchronous active-low reset. After
  reset the rate is 100 kbps.
* **ADC.** Only the sign and the sampling flip-flop are modelled. The
  analog input is a signed number, and `vin = 0` counts as positive.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

`tb_psk_demod_top` runs the whole receiver at its default parameters, in
about 0.5 million sampling cycles. It simulates in under a second. A
transmitter model double-encodes bits onto a 1 MHz IF, with a ±10 kHz
Doppler offset in some segments. The segments cover:

* the example stream above;
* 100 → 10 → 100 → 1 → 0.1 kbps rate changes;
* both modulation modes;
* a switch of the timing input to the detected data;
* a 15 MHz subsampled IF (`n = 7`).

The testbench matches every decoded bit after the preamble against the
reference decoding. It also requires that each loop mechanism occurred at
least once:

* rate steps up and down;
* rejected narrow pulses;
* phase increments and decrements;
* both modes and both timing inputs;
* lock.

`tb_subsampled_dpsk` also runs at default parameters. It feeds a 15 MHz
IF at 100 kbps in DPSK mode, with a repeating 10-bit pattern sent without
differential encoding. With a single differential stage, each output bit
must equal the XNOR of two neighbouring transmitted bits. The test checks
every such bit, the detected rate, lock, and the 40-sample period of the
recovered clock.

To run a testbench with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
          -Irtl -Itb -y rtl -y tb \
          rtl/ddpsk_pkg.sv \
          tb/tb_psk_demod_top.sv --top-module tb_psk_demod_top -Mdir obj
./obj/Vtb_psk_demod_top
```

Replace the name with any other `tb_*` file to test a single block.

The tests do not cover bit errors under noise. The analog signal chain that
sets the real sensitivity is outside this RTL.
