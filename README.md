# 8-PAM digital receiver for a 200 kHz band at 75 MHz

This is the digital half of an airband-style receiver. An ADC samples a 75 MHz
intermediate-frequency signal directly, at 300 MHz, and everything after that happens in
logic: the 200 kHz wide receive band is mixed down, filtered and decimated, one channel is
picked out of it with a band-pass filter chosen by front-panel switches, that channel is
mixed to 0 Hz, and 8-level pulse-amplitude-modulated (8-PAM) symbols are decided and turned
back into a bit stream. Two channel plans are supported: 8 channels on a 25 kHz raster and
12 channels on an 8.33 kHz raster.

The RTL is SystemVerilog (IEEE 1800-2017), one module per file in `rtl/`, with a
self-checking testbench per module in `tb/`. The top is `digital_receiver`.

## Signal path

```
 adc_data (12 b, 300 MHz)
   |
   x  <-- lo_dds: 74.9 MHz, 3000-entry table (one period of the sampled LO)      mixer
   |      channel at 74.9 MHz + fc  ->  fc  (0..200 kHz)  and a sum term near 150 MHz
 LPF1     fir_direct: 272 taps, all in parallel, one sample per clock, Kaiser window,
   |      pass to 600 kHz: removes the sum term
 /375     decimator: 300 MHz -> 800 kHz
   |
 LPF2     lowpass_mac: 82 taps on a time-shared MAC, Kaiser window, pass 200 kHz
   |
 BPF      channel_filter: 20 band-pass filters in one table, selected by the switches
   |      25 kHz plan: 242 taps, pass +-10 kHz;  8.33 kHz plan: 369 taps, pass +-2.78 kHz
   x  <-- lo_dds: 96-entry table of one 8.333 kHz cycle, step = channel, phase = delay fix
   |      channel fc -> 0 Hz (plus a 2*fc term)
 average  pam8_demod: sum over each symbol (SPS samples), compare with 7 thresholds
   |
 3-bit block -> bit_serializer -> bit_out (MSB first)
```

`channel_decoder` turns the switches into the filter selection, the second oscillator's
frequency and phase, and the symbol window position; `seg7_display` shows the channel number.

### Frequency plan

The transmitter puts channel `fc` (0..200 kHz) at `74.9 MHz + fc`, so the 200 kHz band is
centred on 75 MHz. The first oscillator runs at exactly 74.9 MHz. At 300 MHz that tone
repeats every 3000 samples (749 cycles), so one 3000-entry table read in sequence is an
exact oscillator with no phase accumulator error.

After decimation every channel frequency is a multiple of 800 kHz / 96 = 8.333 kHz. The
25 kHz channel k sits at 3k of those steps and the 8.33 kHz channel k at k steps. The second
oscillator is therefore one 96-entry cosine table read with step `3k` or `k`.

| plan     | channels (switch code) | centres            | band-pass taps | pass / stop edges    |
|----------|------------------------|--------------------|----------------|----------------------|
| 25 kHz   | 1..8                   | 25, 50 .. 200 kHz  | 242            | +-10 / +-17 kHz      |
| 8.33 kHz | 1..12                  | 8.33 .. 100 kHz    | 369            | +-2.78 / +-7.37 kHz  |

Code 0, or a code beyond the plan, selects no channel. Then `chan_valid` is low, no symbols
come out, and the display shows two dashes.

## Filters and their coefficients

All filters are linear-phase FIRs. Their coefficients are not stored as data files. Each
module computes its taps when it is elaborated and holds them in an on-chip table (a memory
with initial contents). All taps are 18-bit Q1.17.

* **Low-pass (LPF1, LPF2).** A Kaiser-windowed sinc,
  `h[n] = 2fc * sinc(2fc(n - M)) * I0(beta*sqrt(1 - ((n-M)/M)^2)) / I0(beta)` with `M = (N-1)/2`.
  The cutoff `fc` is midway between the pass and stop edges, and `beta = 0.1102*(A - 8.7)`
  for the stop-band attenuation `A` (90 dB gives beta = 8.959). The taps are scaled to
  unity DC gain. The formulas are in `rx_pkg`.

  The lengths (272 and 82 taps) and the 90 dB beta are fixed, so the transition band comes
  out wider than the nominal edges. LPF1 is flat to within 0.1 dB up to 600 kHz, 37 dB down
  at 5 MHz, and about 87 dB down around the 150 MHz sum term. That last figure is set by the
  18-bit taps. LPF2 is 59 dB down at 250 kHz and 90 dB down from about 380 kHz. Nothing in
  the 200 kHz band is affected. However, LPF1 does not remove everything between 600 kHz and
  a few MHz, and whatever energy is left there (wideband ADC noise, for example) folds into
  the band when the signal is decimated by 375.
* **Band-pass (channel bank).** Every channel has its own equiripple filter, designed by
  the Parks-McClellan (Remez exchange) algorithm in `channel_filter.sv`. It uses three bands:
  a stop band up to `fc - stop edge`, a pass band `fc +- pass edge`, and a stop band from
  `fc + stop edge` to 400 kHz. The grid density is 20. The weights are 1 in the pass band
  and `dp/ds` in the stop bands, where `dp` and `ds` are the ripples for 1 dB in the pass
  band and 65 dB in the stop band. Each filter is then scaled to unity gain at its centre.
  The table holds 8 x 242 taps followed by 12 x 369 taps (6364 words). A channel change
  only moves the window that the MAC engine reads.

The exchange algorithm works on the barycentric form of the interpolating polynomial. It
keeps the interpolation weights as log-magnitude and sign so that the 186-point problem
stays in floating-point range. It stops when the peak weighted error is within 1e-6 of
the levelled error. It takes about half a second of simulator start-up for all 20
filters.

**How far to trust the filters.** `tb_channel_filter` measures, with tones:

| plan | centre gain | pass edge | stop edge | further out |
|------|-------------|-----------|-----------|-------------|
| 25 kHz (242 taps)  | 1.0000 | -1.5 dB at +-10 kHz  | -62.5 dB at +17 kHz; -62.0 dB at -22 kHz | -62.6 dB one channel away, -61.9 dB two channels away |
| 8.33 kHz (369 taps) | 1.0000 | -1.9 dB at +-2.78 kHz | -60.3 dB at +7.37 kHz | -84 dB one channel away, -62.5 dB two channels away |

Both plans meet the channel specification: no more than 6 dB down at the pass edge,
40 dB down at +-17 kHz, and 60 dB down at +-22 kHz or +-7.37 kHz. The 8.33 kHz plan meets
its stop-band figure only just. Neither length reaches the 1 dB pass-band ripple that the
weights aim for. The ripple is about +-0.8 dB with 242 taps and +-1 dB with 369 taps. The
lengths are kept as specified; a longer filter would not fit the 375-clock budget below.

### Where the multipliers go

LPF1 has to produce an output on every 300 MHz clock, so it is a fully parallel tapped
delay line: 272 multipliers and one sum (`fir_direct`). The sum is written as a single
expression, so a 300 MHz implementation would need that adder chain pipelined.

Everything after the decimator runs at 800 kHz. That leaves 375 clocks per sample, so
LPF2 and the channel bank each use `fir_mac`: a single multiply-accumulate unit that walks
the taps one per clock over a circular sample buffer. One output takes `ntaps + 2` clocks.
The 369-tap filter needs 371 of the 375 clocks. `fir_mac` asserts that no sample
arrives while it is busy, and the top asserts the same for both filters. As a result, the whole 800 kHz path uses two multipliers for the
filters. The tap count is latched with each sample, so switching between 242-tap and
369-tap filters never corrupts an output that is already in progress.

## Carrier phase and symbol timing

The mixing is real, not I/Q, so the second mixer only recovers the symbol amplitude when
its phase matches the carrier phase of the filtered channel. A phase error `phi` scales
every level by `cos(phi)`. This design has no carrier or timing recovery loop. Instead it
assumes the transmitter and receiver share the sample clock and time origin, and it
compensates the known, fixed delay of the filters:

* Delay from the ADC to the band-pass output, in 800 kHz samples:
  `D = 135.5/375 + 40.5 + (N_bpf - 1)/2`. This is about 161.4 for the 25 kHz plan and
  224.9 for the 8.33 kHz plan. `rx_pkg::delay_q8` gives it in 1/256 samples.
* The second oscillator reads its table at `step*m - step*D` for output sample `m`. The
  offset `-step*D` is held with 8 fractional bits (`lo_phase`), so the 96-entry table is
  effectively indexed at 1/256-entry resolution before truncation.
* Symbol windows start where `(m - round(D))` is a multiple of `SPS`, via `sym_offset`.

Both values come from `channel_decoder` and depend only on the switch setting. The
oscillator phase is computed from the sample count since reset rather than accumulated, so
both stay correct across channel and plan changes. If the filters are changed, `delay_q8`
must be updated to match. If the design is used with an unsynchronised transmitter, a
phase and timing recovery loop has to replace this compensation.

## Symbol decision

`pam8_demod` adds up the `SPS` samples of each symbol window. This integrate-and-dump both
averages out noise and suppresses the `2*fc` term left by the second mixer. The sum is
compared with the seven thresholds `(2j - 6) * LEVEL_UNIT * SPS`, for j = 0..6. The number
of thresholds exceeded is the 3-bit block:

| bits  | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|-------|-----|-----|-----|-----|-----|-----|-----|-----|
| level | -7  | -5  | -3  | -1  | +1  | +3  | +5  | +7  |

`sym_level` gives the same decision as a signed 4-bit level. A window that was already
under way at reset is dropped.

**Gain.** Each mixer multiplies by a Q1.11 cosine and by 4, and the filters have unity gain.
One amplitude unit at the ADC therefore becomes 4 units at the demodulator. The default
`LEVEL_UNIT = 512` corresponds to 128 ADC codes per unit, so symbols span +-896 codes of the
12-bit range. That leaves headroom for a second signal of the same strength plus noise.
There is no automatic gain control: a different input level needs a different `LEVEL_UNIT`.

**Symbol length.** The default `SPS = 50` samples at 800 kHz gives 16 ksymbol/s. This
suits the 25 kHz plan only if data changes no faster than every few symbol periods. For
the 8.33 kHz plan (+-2.78 kHz pass band), data has to change at about 1 kHz or slower. The
end-to-end test holds each value for 4 periods (25 kHz plan) or 16 periods (8.33 kHz plan).
Set `SPS` for the symbol rate actually used.

## Top-level interface (`digital_receiver`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | 300 MHz sample clock; synchronous active-high reset |
| `adc_valid`, `adc_data` | in | 1, 12 | ADC sample, signed; one per clock. The first valid sample after reset is sample 0 of the phase reference |
| `sw_channel` | in | 4 | channel number, binary (off,on,on,off = 6) |
| `sw_spacing` | in | 1 | 0 = 25 kHz plan, 1 = 8.33 kHz plan |
| `chan_valid` | out | 1 | a valid channel is selected |
| `sym_valid`, `sym_bits`, `sym_level` | out | 1, 3, 4 | one decision per symbol window |
| `bit_valid`, `bit_out` | out | 1, 1 | the same bits, serial, MSB first, for an audio DAC / codec |
| `hex_tens`, `hex_units` | out | 7, 7 | seven-segment digits, `{g..a}` active low, leading zero blank |

| parameter | default | meaning |
|-----------|---------|---------|
| `SPS` | 50 | 800 kHz samples per symbol |
| `LEVEL_UNIT` | 512 | demodulator value of one amplitude unit |

A decision comes out about 0.2 ms (25 kHz plan) or 0.28 ms (8.33 kHz plan) after the end of
its symbol at the ADC. That is the filter delay `D` at 800 kHz plus a few hundred clocks of
processing.

Sizes and rates shared by the modules (widths, tap counts, table lengths, corner
frequencies) are in `rx_pkg.sv`.

## Not included

* The ADC, the antenna and RF amplifier, the audio amplifier and loudspeaker.
* The board's audio codec, and the I2C set-up and serial audio interface that would drive
  it. The bit stream is brought out on `bit_valid`/`bit_out` for it.
* Automatic gain or audio level control.
* Carrier and symbol-timing recovery (see above).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Run one with
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv rtl/rx_pkg.sv \
          tb/tb_digital_receiver.sv --top-module tb_digital_receiver -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_digital_receiver` | Full design at default parameters for 5 M clocks (17 ms of signal), about 20 s of run time. A modelled transmitter sends two 8-PAM signals, at 150 kHz and 100 kHz, with noise. The receiver must decode the 150 kHz one on 25 kHz channel 6 and the 100 kHz one on 8.33 kHz channel 12 (a plan switch) and on 25 kHz channel 4 (a channel change). The first signal then moves to 200 kHz, the top of the band, and must be decoded on channel 8 (switch code 1000). The receiver must output nothing on channel 0. The serial stream and the display are checked too. |
| `tb_fir_direct` | LPF1 impulse response against an independent computation of the taps; DC gain; 150 MHz rejection; two-clock latency |
| `tb_lowpass_mac` | LPF2 DC gain, 100 kHz pass, 300 kHz rejection, 84-clock latency |
| `tb_channel_filter` | centre gain, the pass and stop edges of the channel specification, and neighbouring channels, in both plans; latency `ntaps + 2` |
| `tb_fir_mac` | MAC engine against a reference convolution, with run-time tap counts and saturation |
| `tb_lo_dds` | both oscillators against computed cosines, with steps and phase offsets |
| `tb_pam8_demod` | random symbols with a 2*fc ripple and noise, decisions right next to each threshold, clipping beyond +-7, the window cut by reset, enable, and a fixed 12-symbol example (`101 111 000 001 010 000 111 110 101 011 011 100` must give 3, 7, -7, -5, -3, -7, 7, 5, 3, -1, -1, 1) |
| `tb_mixer`, `tb_decimator`, `tb_channel_decoder`, `tb_bit_serializer`, `tb_seg7_display` | each against values worked out in the testbench |

The testbenches also pass with uninitialised state randomised (`--x-assign unique` when
building, `+verilator+rand+reset+2` when running). Their checks ignore outputs until reset
has been applied.

## Implementation notes

* The coefficient and oscillator tables are filled by `initial` blocks that call
  real-valued functions (`$cos`, `$sqrt`, a Bessel series). FPGA synthesis tools that
  evaluate such initial blocks infer ROMs from them. For a tool that cannot, precompute
  the same formulas into tables.
* `lo_dds` computes its phase with a `%` (modulo by a constant) every cycle. For the
  300 MHz oscillator, where step and offset are constant, a plain counter over the
  3000-entry table is equivalent and cheaper.
* `fir_mac` sample buffers start zeroed, as memory initial contents, and reset does not
  clear them. After a reset, the first `ntaps` outputs still contain old samples.
