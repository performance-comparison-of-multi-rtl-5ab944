# Multi-mode baseband modulator: AM, PM, FM, 4-ASK, QPSK and 4-QAM from one carrier

This is a baseband modulator for a software-defined radio. It produces six
modulated waveforms at the same time: three analog (AM, PM, FM) and three
digital (4-level ASK, called QASK here, QPSK and 4-QAM). Each mode has its own
input and its own output. The main idea is resource sharing. The six
modulators do not each get a carrier oscillator and a set of multipliers.
One direct digital synthesizer (DDS) makes the carrier. Three constant
multipliers and three inverters turn it into every amplitude and phase
version the modes need. Each mode is then little more than a multiplexer
that picks one of those versions, sample by sample.

The architecture, the gains, the clock and carrier frequencies and the
symbol-to-waveform tables follow a published FPGA design built in a
block-diagram DSP flow. That flow's vendor blocks have been rewritten here as
plain SystemVerilog. Where the published description leaves a detail open,
this RTL makes its own choice. Those choices are listed under
[Departures and choices](#departures-and-choices).

## Signal flow

```
             +--------------+  cos  +-----------+   A1cos  +-----+ ~A1cos
             | carrier DDS  |------>| A1 = 3    |--------->| INV |------->  QASK mux
             |  10 kHz      |   |   +-----------+          +-----+
             |  (CORDIC)    |   +-->| A2 = 1    |--A2cos-->| INV |--~A2cos> QASK, QPSK, QAM muxes
             |              |  sin  +-----------+          +-----+
             |              |------>| A3 = 1    |--A3sin-->| INV |--~A3sin> QPSK, QAM muxes, PM mux
             +--------------+       +-----------+    |     +-----+
                                                     +---> AM multiplier, PM mux, FM mux
             +--------------+  sin
             | FM tone DDS  |------------------------------------------->  FM mux
             |  20 kHz      |
             +--------------+
```

| Module | Role |
|---|---|
| `multi_mode_modulator` | top level: carrier front end and both sections |
| `dds` | phase accumulator plus pipelined CORDIC; used twice, for the carrier and for the FM tone |
| `const_gain` | constant multiplier A1, A2 or A3 (1 clock) |
| `bit_inverter` | bitwise complement, `~x = -x - 1` (1 clock) |
| `analog_modulator` | AM multiplier, PM mux, FM mux |
| `digital_modulator` | QASK, QPSK and QAM muxes |
| `sample_mux` | registered N-input mux (1 clock) |
| `sample_mult` | pipelined fixed-point multiplier with saturation (3 clocks) |
| `mmm_pkg` | widths, published constants, `phase_inc()` and the `carrier_set_t` bundle |

## What each mode does

All six modes use the carrier at 10 kHz. The three gains give levels of
1 and 3 on the cosine and 1 on the sine. Each inverter gives the negative
of its input, minus one LSB.

**AM.** `am_out = floor(am_in * A3sin / 2^14)`. The message multiplies the
carrier amplitude. There is no added carrier term, so this is
double-sideband AM with a suppressed carrier.

**PM.** A 2:1 mux driven by the sign of the PM message. While
`pm_in >= 0` it passes the carrier, and while `pm_in < 0` it passes the
inverted carrier. The phase therefore jumps by 180 degrees each time the
message changes sign.

**FM.** A 2:1 mux driven by the sign of the FM message. While `fm_in >= 0`
it passes the 20 kHz FM tone, and while `fm_in < 0` it passes the 10 kHz
carrier. In effect this is two-tone frequency switching controlled by the
message.

**QASK, QPSK, 4-QAM.** Each 2-bit symbol selects one of the six carrier
versions:

| symbol | QASK (4-ASK) | QPSK | 4-QAM |
|---|---|---|---|
| 00 | -3 cos (`~A1cos`) | +cos (`A2cos`) | +cos |
| 01 | -1 cos (`~A2cos`) | +sin (`A3sin`) | +sin |
| 10 | +1 cos (`A2cos`)  | -cos (`~A2cos`) | -cos |
| 11 | +3 cos (`A1cos`)  | -sin (`~A3sin`) | -sin |

The QASK levels are `A_i = 2i - 1 - M` for M = 4. QPSK uses the phases 0, 90,
180 and 270 degrees for symbols 00 to 11. With the two amplitude levels the
published derivation uses, 4-QAM comes out as the same four waveforms as
QPSK. The two muxes are therefore wired the same way. They are still
separate hardware, because each mode has its own input and output.

## Carrier generation

`dds` adds `PHASE_INC` to a 32-bit phase accumulator every clock:

```
f_out = PHASE_INC * f_clk / 2^32        PHASE_INC = round(f * 2^32 / f_clk)
```

The function `mmm_pkg::phase_inc(f, f_clk)` computes the increment. The
carrier uses 8589935, which gives 10 000.0002 Hz at 5 MHz. The FM tone uses
17179869, which gives 20 kHz. The frequency resolution is 5 MHz / 2^32,
about 1.2 mHz.

There is no sine table. The top 24 bits of the phase go to a CORDIC rotator
with `ITER` = 16 stages, one register each:

1. **Fold.** Angles in the second and third quadrant (top two phase bits
   differ) are moved by half a turn. This puts every angle in
   [-pi/2, pi/2), where CORDIC converges. The half turn is undone at the end
   by negating both outputs.
2. **Rotate.** The start vector `(39797, 0)` is 2^16 times the reciprocal of
   the CORDIC gain. Stage `i` rotates by `+-atan(2^-i)` toward zero residual
   angle. The angle constants are `round(atan(2^-i) / 2pi * 2^24)`.
3. **Round.** Two guard bits are dropped with rounding.

The cosine and sine come out with amplitude 16384 (1.0). They stay within
3 LSB of the ideal values. `data_tvalid` rises `ITER + 3 = 19` clocks after
reset is released. `phase_tdata_phase_out` reports the phase that the current
samples belong to.

## Number format and widths

| Signal | Format |
|---|---|
| carrier, tone, analog messages | 16-bit signed, 14 fractional bits (1.0 = 16384, range about +-2) |
| everything after the gains, all outputs | 18-bit signed, same scale (3 x 1.0 = 49152 fits) |
| digital messages | 2-bit symbol |
| phase | 32-bit unsigned, one turn = 2^32 |

`sample_mult` shifts the product right by 14, which rounds toward minus
infinity, and saturates it to 18 bits. The inverter is a true bitwise
complement, so `-x - 1` rather than `-x`, which matches the inverter block of
the original flow. The one-LSB offset is far below the carrier amplitude.

## Timing

A single 5 MHz clock runs everything, with a synchronous active-high `rst`.
Every block registers its output, and each block keeps its own latency:

| Block | Latency |
|---|---|
| DDS | 19 clocks to first valid sample |
| constant multiplier | 1 clock |
| inverter | 1 clock |
| mux | 1 clock |
| multiplier | 3 clocks |

From an input change to the output it takes 3 clocks for AM and 1 clock for
the other five modes. The paths are **not** delay-matched: an inverted
carrier reaches a mux one clock after the plain carrier it came from. The
original model behaves the same way, and at 500 samples per carrier period
the skew is 0.72 degrees. If you need exact alignment, add a register on the
plain paths.

The outputs follow their inputs every clock. The symbol rate and the message
bandwidth are set entirely by whoever drives the inputs. The published test
set-up uses a 5 Hz message of amplitude 1.0, one period per 1 000 000 clocks.

## Departures and choices

These follow the published design:

- one shared DDS
- three shared constant multipliers with A1 = 3, A2 = A3 = 1
- A1 and A2 on the cosine, A3 on the sine
- an inverter after each gain
- a 2:1 mux for PM (carrier or inverted carrier) and for FM (carrier or a
  second sine)
- a multiplier for AM
- the 4-way symbol tables above
- the 5 MHz clock and 10 kHz carrier
- the port names
- the block latencies, taken from the vendor blocks' default latencies

These are this design's own choices:

- **DDS insides.** A CORDIC rotator is used in place of the vendor DDS core.
  There is no back-pressure input; the carrier runs freely.
- **FM tone frequency.** 20 kHz, twice the carrier frequency. The original
  does not state it.
- **PM phase step.** The PM description mentions a 90 degree step, but the
  circuit uses an inverter, so the step is 180 degrees. The RTL follows the
  circuit.
- **Mux select from an analog message.** The mux uses the sign bit
  (`>= 0` selects input 1).
- **Symbol tables.** Where the block diagrams label the inverted outputs
  differently from the equations and constellation diagrams, the equations
  are followed.
- **Widths, number format, saturation and reset.** All of these are this
  design's own.
- **`carrier_valid`.** The top brings out the DDS valid flag so that a user
  knows when the pipeline has filled.
- **Not included.** The message sources, the float-to-fixed gateways, the
  JTAG co-simulation link and the board clock manager are test or vendor
  infrastructure. The messages arrive on the top's ports already in fixed
  point, and the clock is an input.
- **Modulation order.** Only M = 4 is built. Higher orders (8, 16) would need
  wider symbols, more gains (`m/2 + 1` constant multipliers) and wider muxes.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_dds` | latency 19, phase step every clock, sine/cosine within 3 LSB of real `sin`/`cos`, a 500-clock period |
| `tb_fm_tone` | the 20 kHz configuration: increment, accuracy, a 250-clock period |
| `tb_const_gain`, `tb_bit_inverter`, `tb_sample_mux`, `tb_sample_mult` | exact values and latencies with random data, saturation, reset |
| `tb_analog_modulator`, `tb_digital_modulator` | the mode tables above with random, distinct carrier inputs; every mux setting and every symbol occurs |
| `tb_multi_mode_modulator` | the whole design at default parameters for one full 5 Hz message period (1 000 000 clocks, about 7 million checks, about 7 s) |

`tb_multi_mode_modulator` drives all analog inputs from one 5 Hz sine and all
digital inputs from one symbol stream that changes every carrier period. It
compares all six outputs, every clock, against references computed with real
arithmetic and the latencies above. The largest error seen is 9 LSB, on the
x3 levels. It also requires every mechanism to occur: both PM phases, both FM
frequencies, both AM envelope signs, and every symbol of every keyed mode.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mmm_pkg.sv \
    tb/tb_multi_mode_modulator.sv --top-module tb_multi_mode_modulator -Mdir obj
./obj/Vtb_multi_mode_modulator
```

Swap in another `tb/tb_*.sv` and its module name to run the others. Lint the
RTL with `verilator --lint-only -Wall -Irtl -y rtl rtl/mmm_pkg.sv
rtl/multi_mode_modulator.sv`. The only remaining warnings are unused
parameters of the package and the unused DDS outputs (tone cosine, phase)
in the top.

## Changing it

- **Carrier or tone frequency.** Set `CARRIER_INC` or `FM_TONE_INC` on the
  top to `phase_inc(f, 5_000_000)`. For another clock, change `SYS_CLK_HZ`
  in `mmm_pkg`.
- **Levels.** Change `A1`, `A2` and `A3`. Keep `3 x 16384 x max|A|` inside
  18 bits, or widen `SAMPLE_W`.
- **DDS accuracy against latency.** `CARRIER_ITER` sets the number of CORDIC
  stages (4 to 18). Each stage adds one clock and about one bit of accuracy.
- **Symbol tables.** Edit the `ask_d` and `psk_d` assignments in
  `digital_modulator.sv`.
