# Multimode radio baseband with selectable digital predistortion

A wideband power amplifier (PA) compresses and distorts its input. Its
output spectrum then spreads into the neighbouring channels. Digital
predistortion (DPD) fixes this: it bends the baseband signal the opposite way
before it reaches the PA, so the cascade of predistorter and PA is close to
linear.

This RTL is the FPGA half of a test platform for that idea:

- The host loads a complex baseband waveform.
- The FPGA predistorts it with one of three engines and plays it in a loop
  into a dual DAC.
- The FPGA captures the PA output, through an IF feedback ADC, for the host
  to analyse.

The host does the heavy mathematics: fitting the predistorter and
calibrating the receiver. The FPGA does everything that must run at the
sample rate.

There is also a separate four-channel DDS, the digital core of a
phase-coherent frequency synthesizer. It runs on the same clock.

The three predistorters share one interface:

| mode (`dpd_mode`) | engine | what it models |
|---|---|---|
| 0 `DPD_BYPASS` | none | samples pass unchanged |
| 1 `DPD_LUT` | `lut_dpd` | complex gain picked by instantaneous input power |
| 2 `DPD_POLY` | `poly_dpd` | memoryless polynomial, order 9 |
| 3 `DPD_MP` | `mp_dpd` | memory polynomial: 5 delayed copies of the input, each through an order-9 polynomial |

## Number formats

The formats carry the design, so here they are first. They are defined in
`rtl/radio_pkg.sv`.

| quantity | width | format | notes |
|---|---|---|---|
| I/Q sample (`sample_t`) | 2×16 | Q1.15 | the DAC word |
| ADC sample | 12 | two's complement | |
| LUT gain (`gain_t`) | 2×18 | Q3.15 | 1 sign bit, 2 integer bits; also used for equalizer taps |
| polynomial coefficient / ratio (`coef_t`) | 2×24 | Q8.16 | sign plus 7 integer bits |
| alpha (output scale) | 18 | Q3.15 | |

Every engine ends the same way:

1. Multiply by `alpha`.
2. Round.
3. Saturate to Q1.15.

Saturation is deliberate. A predistorter that expands the peaks must clip
rather than wrap.

## Transmit path: one counter, two RAM pairs

```
host ──► TX I/Q RAM ──► DPD (all engines run, dpd_mode picks one) ──► predistorted I/Q RAM ──► DDR ──► DAC
              ▲                                                              ▲
              └───────────── address counter (same address) ─────────────────┘
```

While `tx_run` is set, `addr_counter` steps from 0 to `tx_last` and wraps.
The same address is used twice:

- It reads the source RAMs. Each sample then goes through the engines and is
  written back into the predistorted RAMs at that address, delayed to match
  the engine's latency.
- It reads the predistorted RAMs for the DAC.

So the DAC always plays the waveform predistorted on the **previous** pass.
Two consequences:

- A mode or coefficient change reaches the DAC one full record later.
- During the first pass the DAC plays whatever the predistorted RAMs held
  before.

`tx_passes` (status register) counts wraps, so the host can wait for two
wraps before it trusts the output.

`ddr_out` packs I and Q onto one 16-bit bus at the clock rate:

- While `clk` is high, the bus carries I.
- While `clk` is low, it carries Q.

I and Q are sampled on the rising edge. A negative-edge register holds Q, so
the bus never changes mid-half-cycle. The output is a clock-level
multiplexer. That is a behavioural description of an FPGA DDR output cell; a
real build would use the vendor primitive.

## LUT predistorter (`lut_dpd`)

```
power = I² + Q²                      (Q2.30, 32 bits)
index = power[31:16]                 (2^16 entries, evenly spaced in power)
G     = LUT[index]                   (complex, Q3.15)
p     = x · G, keep the top 18 bits  (Q5.13)
y     = sat16(round(p · alpha))
```

The table is a 2^16 × 36-bit RAM, written from the host.

Indexing by power rather than by magnitude has two effects:

- No square root is needed.
- Small amplitudes get coarse steps, where the PA is nearly linear anyway.

Latency is 4 clocks at one sample per clock.

## Polynomial predistorters: ratio (Horner) form

This is the least obvious part of the design. A memoryless polynomial of
order N is

    y = Σ_{i=1..N} a_i · x · |x|^(i-1)

Evaluated directly, it needs high powers of |x|. Its coefficients also span
many orders of magnitude, which is hard to hold in a fixed-point format.
`poly_branch` instead uses the nested form

    y = a1·x · (1 + (a2/a1)|x| · (1 + (a3/a2)|x| · ( … (1 + (aN/aN-1)|x|) … )))

which is the same polynomial. Each nesting level is one `poly_stage`:

    s_out = 1 + r · |x| · s_in

with `s_in = 1` for the innermost stage. Each stage has one register, so a
new sample enters every clock.

The host supplies `a1` and the N−1 neighbour ratios `r_k = a(k+1)/a(k)`:

- word 0 = a1;
- word k = a(k+1)/a(k);
- the innermost stage uses the last ratio.

The ratios have a much smaller range than the raw coefficients, which is why
Q8.16 is enough.

The catch: if some a_k is zero or tiny, its ratio is not defined or does not
fit in Q8.16. Such models must be refitted (or the order lowered) before
they can be loaded.

| module | what it does | latency |
|---|---|---|
| `cplx_mag` | I²+Q², then a restoring square root (floor) | 2 |
| `poly_branch` | ORDER−1 stages, then a final a1·x·s stage; delays x and \|x\| alongside | ORDER |
| `poly_dpd` | `cplx_mag` + one branch + alpha scaling | ORDER + 3 = 12 |
| `mp_dpd` | one `cplx_mag`, a 4-register delay line of (x, \|x\|), DEPTH = 5 branches with their own coefficients, a registered complex sum, alpha scaling | ORDER + 4 = 13 |

Notes on `mp_dpd`:

- Coefficient word `j*ORDER + k` belongs to branch j (delay j), position k.
  Position k has the same meaning as in `poly_dpd`.
- The delay line advances only on valid input samples. Gaps in the input
  therefore do not change which samples count as "previous".

At reset every engine holds a1 = 1 and all other coefficients 0, and
`alpha = 1`. An unprogrammed engine passes its input through.

## Feedback receiver

```
ADC (12 b) ──► IF RAM ──► mixer ──► low-pass FIR (I), low-pass FIR (Q) ──► complex equalizer ──► feedback I/Q RAMs ──► host
                              ▲
                             NCO
```

A capture runs in three steps:

1. The host writes `rx_last` and the NCO tuning word, then writes `rx_start`.
2. The receiver stores `rx_last+1` valid ADC samples in the IF RAM.
3. It replays them through the chain at one sample per clock.

`rx_busy` and `rx_done` in the status register follow the capture. Storing
first and processing afterwards means the ADC sample strobe and the
processing rate are independent.

- `nco`: a 32-bit phase accumulator with a 1024-entry sine/cosine table. The
  table is computed at elaboration as `round(32767·sin(2πk/1024))`.
- `iq_mixer`: computes `I = if·cos` and `Q = −if·sin`, rounded to Q1.15.
  With this sign, a tone above the NCO frequency becomes a positive
  (counter-clockwise) rotation.
- `fir_filter`: 32 taps with host-writable coefficients. The reset taps are a
  Hamming-windowed sinc with cut-off at fs/4 and unity DC gain. With the
  NCO at fs/4, the filter passes a 90 MHz-wide band (±45 MHz at
  245.76 MHz) within 0.05 dB. The mixing image, at 0.3 fs and above, is
  at least 43 dB down.
- `fb_equalizer`: an 8-tap complex FIR with Q3.15 taps; at reset tap 0 = 1.0
  and the rest are 0. The receiver has its own amplitude ripple across the
  band. The host estimates that ripple apart from the transmitter's, from
  several multi-tone captures solved by least squares, and loads the inverse
  response here. The FPGA only applies the taps.

## Synthesizer DDS (`dds4`)

The synthesizer makes two tones by mixing one LO with two DDS channel pairs
in quadrature (single-sideband) modulators:

- the modulator fed by cos(f1)/sin(f1) keeps the upper sideband, f0 + f1;
- the modulator fed by sin(f2)/cos(f2) keeps the lower sideband, f0 − f2.

The two tones are then phase-coherent, and their spacing is set digitally.

`dds4` supplies the four channels. Each channel has:

- a 32-bit tuning word;
- a 14-bit phase offset, for the 90° between the two channels of a pair and
  for fine phase trimming;
- a 10-bit amplitude word, for fine gain trimming.

`dds_sync` restarts all four accumulators together, so the channels keep a
known phase relation. Output = sin(phase)·amp, 10 bits, with a 4096-entry
table. The output follows the accumulator by two clocks and updates every
clock.

## Host port

The host port stands in for the JTAG link of the bench setup. It is a plain
synchronous port:

- a 20-bit address: a 4-bit region plus a 16-bit offset;
- 48-bit data;
- `host_we`/`host_re`;
- read data with `host_rvalid`, two clocks after `host_re`.

One access per clock: a read and a write in the same clock break the
protocol, and an assertion flags them in simulation.

| region | contents | data |
|---|---|---|
| 0 / 1 | TX I / TX Q RAM | [15:0] |
| 2 | LUT | {re[35:18], im[17:0]} |
| 3 | memoryless polynomial coefficients | {re[47:24], im[23:0]} |
| 4 | memory polynomial coefficients | same |
| 5 | control, below | |
| 6 / 7 | feedback I / Q RAM (read) | [15:0] |
| 8 | receiver FIR taps (shared by I and Q) | [15:0] |
| 9 | equalizer taps | {re, im} Q3.15 |

Control offsets:

| offset | register |
|---|---|
| 0 | {dpd_mode[2:1], tx_run[0]} |
| 1 | tx_last |
| 2 | alpha |
| 3 | rx_last |
| 4 | rx_start (write pulse) |
| 5 | NCO tuning word |
| 6 | status {rx_done[17], rx_busy[16], tx_passes[15:0]} |

## Top level and parameters

`radio_platform_top` parameters:

| parameter | default | meaning |
|---|---|---|
| ADDR_W | 16 | all waveform RAMs hold 2^ADDR_W samples (65536) |
| LUT_AWID | 16 | LUT entries 2^16 |
| ORDER | 9 | polynomial order |
| DEPTH | 5 | memory depth |
| FIR_TAPS | 32 | receiver FIR taps |
| EQ_TAPS | 8 | equalizer taps |
| DDS_CH | 4 | DDS channels |

At the defaults the design holds about 9.7 Mbit of memory. Almost all of it
is the LUT and six 64k-sample RAMs, which is block-RAM sized. The rest is
several hundred 18–24-bit multipliers, mostly in the memory polynomial:
5 branches × 9 stages × about 8 real products.

Everything runs on one clock (`clk`, the output of the FPGA PLL) with a
synchronous, active-high `rst`.

## Measured accuracy

Predistortion accuracy is the normalised mean square error between the DAC
output and a floating-point evaluation of the same model (`tb_dpd_workloads`).
The setup:

- full 65536-sample records;
- WCDMA-like multi-carrier signals: 3.84 MHz carriers, clipped to 7.2 dB
  (one carrier) or 7.4 dB (two and four carriers) peak-to-average;
- peak at half of full scale;
- order-9 gain-expanding coefficients.

| engine | signal | NMSE |
|---|---|---|
| LUT | 1 carrier | −67.2 dB |
| memoryless polynomial | 1 carrier | −82.6 dB |
| memory polynomial | 2 carriers, 10 MHz apart | −79.6 dB |
| memory polynomial | 4 carriers, 5 MHz apart | −79.7 dB |

The LUT figure is set by the 18-bit truncation after the gain multiply
(Q5.13, about 1.2·10⁻⁴ per step). Rounding there instead of truncating
would gain a few dB.

Receiver flatness (`tb_rx_calibration`) is checked with 30 tones, 3 MHz
apart, around an IF of fs/4, over full 65536-sample captures:

| capture | result |
|---|---|
| flat input | 0.04 dB peak to peak over the 90 MHz |
| a 0.15 echo three samples late in front of the ADC | 2.6 dB peak-to-peak ripple |
| same echo, equalizer loaded with the truncated inverse (taps 1, −0.15j at 3, −0.0225 at 6) | ripple drops to 0.1 dB |
| LO moved by ±3 MHz, the other two measurements of the ripple-separation method | tones shift by one spacing with the predicted levels |

Side-band suppression (`tb_synth_sideband`) uses both quadrature
modulators, modelled at complex baseband with about 0.3 dB gain and 3° phase
imbalance:

- Untrimmed, each modulator leaves about 30 dB between the wanted and the
  unwanted side band.
- Scaling the stronger path's DDS amplitude word down and offsetting the
  quadrature channel's phase raises this to 77.5 dB (upper-sideband
  modulator) and 67.8 dB (lower-sideband modulator).
- The phase trim resolution is set by the 4096-entry sine table (0.09°),
  not by the 14-bit offset word.

## How far to trust it, and where it departs from the original platform

All of the following are checked by self-checking testbenches:

- the engine arithmetic, against bit-exact models written in the testbench;
- the latencies;
- the DDR ordering;
- the receiver chain against floating-point references (tone phase rotation
  and amplitude);
- the DDS quadrature.

The end-to-end test drives everything through the host port alone.

Choices made here, where the original description says nothing:

- All widths apart from the 16-bit samples, 12-bit ADC, 18-bit LUT entries,
  2^16 LUT entries, order 9 and depth 5.
- The LUT index bits, Q8.16 coefficients, FIR and equalizer lengths, NCO and
  DDS sizes, and the register map.
- One clock domain. The original clocks the receiver from the ADC's clock and
  the transmitter from the converter board's clock. If the two are not
  synchronous, a clock-domain crossing is needed at the IF RAM.
- All three engines exist together and are switched at run time. The
  original reprogrammed the FPGA for the processing it needed.
- The receiver stores the IF samples first and demodulates them afterwards,
  in the order the original block diagram shows. The capture length and the
  start command are this design's.
- The equalizer sits in the FPGA receive chain. The original only says a
  post-distorting FIR was used.
- The DDS is RTL here. The original used a commercial DDS chip at 500 MHz.

Not in this RTL:

- the PLLs, converters, RF modulators and amplifiers;
- the host software that fits the DPD models and solves for the ripple.

No timing closure has been attempted. At a sample rate of about 250 MHz:

- each `poly_stage` chains two multiplies in one cycle;
- `cplx_mag` does a full 16-step square root in one cycle.

Both would need retiming for an FPGA at that rate.

## Simulating

Every block has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `tb_radio_platform_top` runs the whole design end to end: every DPD mode,
  mode switches while running, output saturation, three receiver captures,
  and the DDS. It uses a 256-sample record.
- `tb_radio_platform_full` runs the top at its default parameters: a 65536-
  sample memory-polynomial pass and a full-length capture.
- `tb_dpd_workloads` measures predistortion accuracy at full size (below).
- `tb_rx_calibration` runs the receiver ripple measurement at full size
  (below).
- `tb_synth_sideband` checks side-band suppression with the DDS trims
  (below).

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lut_dpd \
    -Irtl -y rtl -y tb +libext+.sv rtl/radio_pkg.sv tb/tb_lut_dpd.sv
./obj_dir/Vtb_lut_dpd
```

Replace `tb_lut_dpd` with any testbench name. The package has to be named
first on the command line, because the other modules are found through
`-y`. The simulator has two states, so everything that is read is reset or
initialised; `+verilator+rand+reset+2` randomises the rest, to check that
nothing depends on power-up values.

Times on one core:

- each block test: a few seconds;
- the end-to-end test: about 10 s;
- the full-size test: about 15 s;
- each of the three workload tests: under 20 s.
