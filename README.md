# Four-band QAM transceiver for a band-limited line

A copper line a few kilometres long acts like a steep low-pass filter. At
84 kHz it attenuates by about 20 dB, so a single wide-band signal at a few
hundred kbps gets heavy intersymbol interference (ISI). This design avoids
that by splitting a 217 kbps stream into four narrow sub-bands. Each band
carries 54.25 kbps and sees a line response that is nearly flat across it.
Each band is pulse-shaped with a square-root raised-cosine (SRRC) filter and
matched-filtered at the receiver, so the main cost of the line is a
different gain per band. Inside a band there is little ISI.

The RTL holds the complete digital part:
- a four-band transmitter that produces a test pattern;
- the serial interfaces to an 8-bit DAC (AD7303) and a 12-bit ADC (AD7476A);
- a channel-emulation filter;
- a four-band receiver that recovers the symbols.

Everything runs from one 13.89 MHz clock, made by dividing a 250 MHz
oscillator by 18.

## Band plan

The sample rate is 434 kS/s everywhere. One sample takes 32 system clocks.

| Band | Carrier   | Modulation | Upsampling L | Symbol rate   | Bit rate   |
|------|-----------|------------|--------------|---------------|------------|
| 1    | 0 Hz      | QPSK       | 16           | 27.125 kBd    | 54.25 kbps |
| 2    | 33.91 kHz | 16-QAM     | 32           | 13.5625 kBd   | 54.25 kbps |
| 3    | 54.25 kHz | 16-QAM     | 32           | 13.5625 kBd   | 54.25 kbps |
| 4    | 74.6 kHz  | 16-QAM     | 32           | 13.5625 kBd   | 54.25 kbps |

- Every band uses SRRC filters with roll-off 0.4 and 129 taps (order 128).
- The whole plan fits inside 84.1 kHz.
- The carrier frequencies are parameters of `fourband_tx` and `fourband_rx`.

## Signal chain

```
 transmit lane (tx_band, x4)                              receive lane (rx_band, x4)
 prng -> mapper -> upsampler -> srrc_fir (I)              nco(LAG) -> rx_mixer -> srrc_fir (I) -> sym_sampler -> qam_decision -> iq_mux -> line
                              -> srrc_fir (Q) -> tx_mixer                      -> srrc_fir (Q) /
                    nco -------------------------^
 fourband_tx: sum of 4 lanes -> dac_spi -> [AD7303 -> line -> AD7476A] -> adc_spi -> maxflat_fir -> 4 x rx_band : fourband_rx
```

- **Symbol source (`prng`)**
  - Each lane makes its own test pattern with y = 9x + 3 mod 2^W, starting from 0.
  - For 16-QAM (W = 4) the pattern is 0, 3, 14, 1, 12, 15, 10, 13, 8, 11, 6, 9, 4, 7, 2, 5.
  - For QPSK (W = 2) it is 0, 3, 2, 1.
  - A receiver can therefore check its output against a known sequence.
- **Mappers**
  - QPSK: bit 0 sets the sign of I and bit 1 sets the sign of Q (00 → (+1,+1), 11 → (−1,−1)).
  - 16-QAM is Gray coded:
    - bits [3:2] = 00, 01, 11, 10 give I = −3, −1, +1, +3;
    - bits [1:0] = 00, 01, 11, 10 give Q = +3, +1, −1, −3.
- **Upsampler and SRRC filters**
  - The upsampler puts the symbol on the first sample of its period and zeros on the other L−1 samples.
  - `srrc_fir` computes its 129 coefficients at elaboration time from the closed-form SRRC pulse: h[k] = p((k − 64)/L) / √L, quantised to Q1.15. The filter has unit energy, with peaks of 0.277 for L = 16 and 0.196 for L = 32.
  - `sym_fir` is the filter engine shared by all filters:
    - It adds mirrored taps of the symmetric filter first, so 65 multipliers serve 129 taps.
    - A pipelined `adder_tree` follows.
- **Carrier and mixers**
  - `nco` has a 16-bit phase accumulator and a 256-entry cosine table, also computed at elaboration time.
    - Values are Q1.14.
    - The step is round(F · 2^16 / 434 000). At 54.25 kHz the step is exactly 1/8 of a turn.
  - The transmitter sends s = I·cos − Q·sin.
  - The receiver forms a = S·cos and d = −S·sin. The matched filters then remove the terms at twice the carrier.
- **Channel emulation (`maxflat_fir`)**
  - This is a 41-tap maximally flat low-pass filter with 4-bit coefficients in sixteenths. The non-zero taps are −1, 0, 1, 2, 4, 5, 4, 2, 1, 0, −1.
  - It sits in front of the receiver and models the attenuation of a long line. Its gains are:

    | Frequency | Gain  |
    |-----------|-------|
    | DC        | 1.06  |
    | 33.9 kHz  | 1.00  |
    | 54.25 kHz | 0.67  |
    | 74.6 kHz  | 0.20  |
    | 84.1 kHz  | 0.06  |

  - It delays the signal by 20 samples.
- **Decision and line output**
  - `qam_decision` slices I and Q:
    - 16-QAM uses thresholds 0 and ±2·UNIT.
    - QPSK uses the sign only.
  - UNIT is the expected amplitude of level 1 at the slicer, worked out at elaboration time. It is 4096 (level 1 in Q.12) × the mixer gain × the channel-filter gain at the band's carrier. The mixer gain is ½ for a non-zero carrier.
  - `iq_mux` puts the decided bits on one line: the I bits during the first half of each symbol period and the Q bits during the second half.

## Fixed point

| Signal            | Format                                                                 |
|-------------------|------------------------------------------------------------------------|
| Samples           | 18-bit signed, 12 fraction bits (`fb_pkg::sample_t`)                   |
| Mapper levels     | 3-bit signed integers                                                  |
| SRRC coefficients | 16-bit Q1.15                                                           |
| Carrier           | 16-bit Q1.14                                                           |
| Results           | Mixer and filter outputs are rounded towards −∞ and saturated to 18 bits |

DAC code = 128 + (sample >>> 8), clipped to 0..255. A constellation level of 1 is therefore 16 DAC codes.

ADC sample = (code − 2048) << 4.

Constants and types shared by the modules are in `rtl/fb_pkg.sv`.

## Timing: the 32-clock frame

`sample_timer` counts slots 0..31. Both serial ports run in the same frame.

- **DAC (`dac_spi`)**
  1. SYNC falls at the end of slot 0.
  2. Sixteen SCLK pulses follow, during slots 2..17.
  3. The word is {control byte 0x00, code}, sent MSB first. Control 0x00 writes DAC A and updates it when SYNC rises.
  4. SYNC rises at the end of slot 17.
- **ADC (`adc_spi`)**
  - CS follows the same pattern.
  - The 16 bits are four leading zeros and then DB11..DB0.
  - The converted sample is valid after slot 17.

In both ports, SCLK is the system clock gated by a flag that changes only on the rising edge, so SCLK cannot glitch. The serial clock is 13.89 MHz, within the converters' 16 MHz limit.

In `fourband_top`, a sample leaves the transmitter in frame n and the ADC reads it back in frame n + 2 (`LINE_LAG` = 2).

Each receive lane has no carrier recovery. Instead its NCO runs a fixed number of samples behind the transmitter's: LAG = LINE_LAG + 20 (the channel filter). The symbol sampler skips OFFSET = LAG + 128 samples, which covers both 64-sample SRRC delays, and then keeps every L-th sample. With a different line or converter delay, change `LINE_LAG` in `fourband_rx`.

The pipeline latency of a filter is ceil(log2(taps/2)) + 4 clocks: 11 for the SRRC filters and 9 for the channel filter. Both are well inside the 32-clock frame.

## What the receiver delivers, and its limits

With the DAC looped back into the ADC through the channel filter, bands 2 and 3 are received without error. Band 4 is attenuated to about 0.2 and its inner constellation points move, so it shows a few percent bit errors. The end-to-end run measured 23 errors in 480 bits (4.8 %). For comparison, the reference floating-point simulation reported 3.96 % over 30 000 bits.

**The baseband QPSK lane only carries its I bit.** Its carrier is 0 Hz, so the transmitted Q·sin(0) term is always zero. The quadrature bit never reaches the line, and the receiver's Q decision is always 0. The RTL keeps the published band plan unchanged, and the testbenches check exactly this behaviour. A real system would either place band 1 on a non-zero carrier or use BPSK there with twice the symbol rate.

Other points to trust with care:
- The carrier phase is fixed by `LAG` rather than tracked. A real line with an unknown delay needs phase and timing recovery, which this design does not include.
- The DAC is 8 bits. The band-4 error rate depends partly on that quantisation and on the choice of 16 codes per level.

## Departures and choices

- **Frame length.** The clock is 250 MHz / 18 = 13.89 MHz. With 32 clocks per sample it gives exactly 434 kS/s. A 16-clock frame would give 868 kS/s, which does not match the band plan. The 16-bit serial transfer still takes 16 of the 32 clocks.
- **QPSK mapping.** The mapping table is followed: 11 → (−1, −1). An earlier introductory constellation drawing in the same description shows a different labelling.
- **Decision threshold.** It is scaled per band from the known channel gain instead of by automatic gain control.
- **Not included:**
  - the converter chips (behavioural models are in `tb/`);
  - the copper line;
  - the on-chip logic analyser used in the lab;
  - carrier tracking;
  - the single-band BPSK baseline that the four-band scheme was compared against.

## The add/subtract example

`addsub` is the small introductory circuit from the same material. It registers a + b when c = 1 and a − b when c = 0 (for example 10 and 7 give 17 and 3). It stands beside the transceiver in `fourband_top` with its own `as_*` ports and has no connection to it.

## Files

`rtl/` holds one module per file plus `fb_pkg.sv`:

| Module                                    | Role                                                    |
|-------------------------------------------|---------------------------------------------------------|
| `fourband_top`                            | top level                                               |
| `clk_div`, `sample_timer`                 | clock divider and frame counter                         |
| `fourband_tx`, `tx_band`                  | transmitter and one transmit lane                       |
| `fourband_rx`, `rx_band`                  | receiver and one receive lane                           |
| `prng`, `qpsk_mapper`, `qam16_mapper`     | symbol source and mappers                               |
| `upsampler`                               | zero-insertion upsampler                                |
| `sym_fir`, `adder_tree`                   | shared filter engine                                    |
| `srrc_fir`, `maxflat_fir`                 | pulse-shaping/matched filter and channel filter         |
| `nco`, `tx_mixer`, `rx_mixer`             | carrier generator and mixers                            |
| `sym_sampler`, `qam_decision`, `iq_mux`   | symbol sampling, slicing and line output                |
| `dac_spi`, `adc_spi`                      | converter serial interfaces                             |
| `addsub`                                  | add/subtract example                                    |

`tb/` holds a self-checking testbench `tb_<module>.sv` for every module. It also holds `ad7303_model.sv` and `ad7476a_model.sv`, which are behavioural models of the converters. Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

`tb_fourband_top` runs the full design at its default parameters:
1. It closes the loop DAC output → ADC input.
2. It sends 120 symbols per 16-QAM band.
3. It checks every received symbol, the symbol periods and the converter frame counts.
4. It checks that every mechanism ran: both line-mux halves, a PRNG wrap, and all four bands.

It runs in a few seconds.

## Simulating

For example:

```
verilator --binary --timing -Wno-fatal rtl/*.sv \
    tb/ad7303_model.sv tb/ad7476a_model.sv tb/tb_fourband_top.sv \
    --top-module tb_fourband_top
./obj_dir/Vtb_fourband_top
```

Any other testbench runs the same way with its own `--top-module`. Verilator ignores modules that the chosen top does not use.

To change the band plan:
1. Edit the `F*_HZ` parameters of `fourband_tx` and `fourband_rx`, keeping them equal.
2. The NCO step, the decision unit and the filter coefficients follow automatically.
3. If the delay between the DAC and the ADC changes, set `LINE_LAG` to match.
