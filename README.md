# Real-time sound localization with generalized cross correlation

This RTL finds the direction of a sound source from three microphones. It
measures how much later the sound reaches one microphone than another (time
difference of arrival, TDOA) and turns the three pair delays into an azimuth
over the full circle, -180 to +180 degrees. A new azimuth comes out every
10 ms. The delays are found by cross-correlating 3200-sample windows of
16 kHz audio over ±26 sample lags. A vectoring CORDIC turns the delays into
an angle.

The design follows a published sound-localization ASIC (0.13 µm CMOS, 12.5 MHz
processing clock) and the FPGA board logic around it. That description gives
the block structure, the sizes and the processing order. It does not give the
detailed arithmetic, the interfaces or the geometry of the microphone
array. Where this RTL had to choose, the choice is marked below and in the
opening comment of each file.

## Signal flow

```
 codec (TDM, 48 kHz) ──► comm_controller ──► sound_loc_chip ──► azimuth
     ▲   SPI setup         tdm_rx, 1-of-3          data_buffer          │
     └─────────────────    frame selection         energy_calc x3       ▼
                           spi_master              energy_comparator  uart_controller ──► PC
                                                   corr_coef_calc x6  angle_displayer ──► 180 LEDs
                                                   corr_normalizer x3
                                                   azimuth_calc (CORDIC)
                                                   sl_controller
```

`dslc_system` is the top level. It contains two halves:

* **`comm_controller`**: the board logic, an FPGA in the original system.
  It writes the codec's setting words over SPI. It receives the codec's
  serial TDM stream and splits out the three microphone channels. It hands
  every third 48 kHz frame to the chip as one parallel 16 kHz sample. It
  also sends each azimuth to a PC over a UART and lights the nearest LED on a
  ring of 180.
* **`sound_loc_chip`**: the localization ASIC. It has data buffering,
  short-term energy, cross correlation and azimuth calculation, sequenced by
  a small controller.

The microphones, the codec board, the LEDs and the PC are outside the RTL.
Their signals are ports of `dslc_system`.

## The chip, step by step

A frame is one 3200-sample window (200 ms of audio). A new frame starts every
160 samples (10 ms), so consecutive windows overlap by 95 %.

1. **Data buffering (`data_buffer`, `dual_port_sram`).** Each channel has a
   4096 × 16 dual-port SRAM used as a circular queue. Samples are written at
   a common write pointer. After the first 3200 samples, and then after every
   160 more, `frame_ready` announces a new window. On request the buffer
   streams that window, oldest sample first, from all three memories in
   parallel, one sample per clock. Writing continues during a read. The
   896 spare words give a window 896 sample periods (56 ms) before it is
   overwritten.
2. **Short-term energy (`energy_calc` × 3, `energy_comparator`).** The first
   read of a window sums the squares of samples 26 … 3199 (3174 samples) of
   each channel. The largest of the three energies is compared with the
   `threshold` input. If it is not strictly greater, the frame is dropped and
   the chip waits for the next window. This keeps silence from producing
   random directions.
3. **Cross correlation (`corr_coef_calc` × 6).** The second read of the same
   window feeds six calculators, one per ordered pair: 1&2, 1&3, 2&1, 2&3,
   3&1, 3&2. Each one computes

   C_xy(k) = Σ_{n=26}^{3199} x(n) · y(n−k),  k = 0 … 26

   for all 27 lags at once. The y samples run through a 26-stage delay line,
   and each lag has its own multiplier and 44-bit accumulator. That is
   162 multiply-accumulators in total, so a window is done in one pass of
   3200 clocks. The first 26 samples only fill the delay line. The
   calculator for the pair j&i supplies the negative lags of the pair i&j.
   After the pass, each calculator scans its 27 sums, one per clock, for the
   largest. Its result is the lag and the value of that peak.
4. **Azimuth (`azimuth_calc`, `cordic_atan2`).** For each microphone pair,
   the larger of its two ordered peaks decides the sign of the delay:

   d_ij = +lag(i&j) if peak(i&j) ≥ peak(j&i), otherwise −lag(j&i)

   d_ij > 0 means the sound reaches microphone i later than microphone j.
   See the next section for how the delays become an angle.
5. **Coefficient (`corr_normalizer` × 3).** In parallel with the azimuth,
   the winning peak of each pair is divided by the square root of the
   product of the two channel energies. This gives the normalized
   correlation coefficient R = C / √(Ex·Ey) of pairs 1-2, 1-3 and 2-3 as
   signed Q1.15 numbers on `coef`. A bit-serial square root (43 clocks)
   and a restoring divider (16 clocks) do it in 60 clocks with no
   multiplier beyond the one for Ex·Ey. The coefficient shows how similar
   the two channels are. The azimuth does not use it.

The controller (`sl_controller`) runs these steps in order. A window that is
announced while a frame is still running is kept, one deep, and started
next. If yet another window is announced before then, the older pending one
is dropped and counted. At 16 kHz this never happens: a frame takes about
6,500 clocks (0.52 ms) of the 125,000 clocks (10 ms) between windows. The
original design promises all processing within 8 ms.

## From three delays to an azimuth

This is the part the source leaves open, so it is this design's own
derivation.

The microphones are taken to sit at the corners of an equilateral triangle,
on a circle:

* microphone 1 at 0°,
* microphone 2 at +120°,
* microphone 3 at −120°.

Azimuth 0° points towards microphone 1, and positive angles turn towards
microphone 2.

For a distant source at azimuth θ, microphone m hears the sound at
t_m = −(r/c)·cos(θ − φ_m), up to a common offset. Summed over three
equally spaced microphones, these cosines cancel. Weighting the arrival
times with the microphone directions gives

```
cos θ ∝ −(d12 + d13)
sin θ ∝ −√3 · d23
```

All three pairs are used. That removes the front/back ambiguity a single
pair has and gives the full 360°. In hardware the two components are
formed in fixed point: x = −256·(d12 + d13) and y = −443·d23, where
443 = round(256·√3).

`cordic_atan2` then takes the angle of (x, y):

* If x < 0, the vector is first turned by 180°, so the 14 shift-and-add
  iterations only ever see angles below 90°.
* The angle is accumulated in 1/256 degree. The arctangent table holds
  atan(2⁻ⁱ)·256·180/π, rounded.
* The result is rounded to whole degrees. A zero vector gives 0°.

The accuracy is set by the integer-sample delays, not by the CORDIC. With a
circle of radius 14 samples, whole-sample delays resolve the direction to
roughly ±3°. Delays must stay within ±26 samples, so the microphone spacing
is limited to 26 samples. That is about 0.56 m at 16 kHz and 343 m/s, which
means a circle radius of up to about 0.32 m.

The correlation coefficient in the original formulation divides C(k) by the
square roots of both channels' energies. Here both energies are taken over
the same fixed 3174 samples for every lag, and both calculators of a pair
share them. So the denominator cannot move the peak. The peak is therefore
searched on the raw sums, and the division is done only once per pair, on
the winning peak, by `corr_normalizer`.

## Interfaces and timing

All chip logic runs on one clock (`clk`, 12.5 MHz). The reset `rst_n` is
active low and asynchronous. The TDM receiver runs on the codec bit clock
`bclk`.

| Module | In | Out | Latency |
|---|---|---|---|
| `dual_port_sram` | write port, read port | `rd_data` | 1 clock after `rd_en` |
| `data_buffer` | `smp_valid`, `smp_in[3]`; `rd_start`, `rd_same` | `frame_ready`; `rd_valid`, `rd_idx`, `rd_last`, `rd_data[3]` | stream starts 2 clocks after `rd_start`, 3200 clocks long |
| `energy_calc` | window stream | `energy` (43 bit), `done` | 1 clock after the last sample |
| `energy_comparator` | `energies[3]`, `threshold` | `max_energy`, `max_mic`, `detected` | 1 clock |
| `corr_coef_calc` | window stream, `x_in`, `y_in` | `result.lag`, `result.peak`, `done` | 28 clocks after the last sample |
| `azimuth_calc` | six peaks | `azimuth` (9-bit signed degrees), `d12`, `d13`, `d23` | 16 clocks |
| `corr_normalizer` | `corr`, `energy_x`, `energy_y` | `coef` (Q1.15), `done` | 60 clocks |
| `cordic_atan2` | `x_in`, `y_in` | `angle`, `angle_fine` (1/256°) | 15 clocks |
| `sound_loc_chip` | samples, `threshold` | `az_valid`, `azimuth`, delays, `coef[3]`, status counters | about 6,500 clocks per frame |

With `rd_same` high, `data_buffer` streams the window of the previous read
again, even if a newer window has been announced since. The correlation pass
relies on this.

Board-side interfaces (all choices of this design, since the original gives
none):

* **TDM.** Frames of 8 slots × 32 bits, MSB first, with `fsync` high on the
  first bit. Channels 1–3 are the upper 16 bits of slots 0–2. Bits are
  sampled on the rising edge of `bclk`. Each complete frame is passed to
  `clk` through a toggle and a two-flip-flop synchronizer. The channel
  words are held stable for a whole frame.
* **Rate change.** The codec sends 48 kHz; the chip stores 16 kHz. Every
  third frame is passed on. There is no anti-alias filter: the codec's own
  band limit is relied on.
* **SPI.** Four 16-bit setting words, MSB first. `clatch` is low for each
  word. Data changes while `cclk` is low. The words themselves are an input
  (`cfg_words`), because the codec settings are not published.
* **UART.** 8N1 at 115200 baud (`CLKS_PER_BIT` = 109 at 12.5 MHz). Each
  azimuth is sent as six ASCII characters, for example `-045\r\n`.
* **LED ring.** 180 LEDs, 2° apart. LED k sits at 2k degrees. The LED
  nearest to the azimuth is lit. `led_num` gives its number, 1–180.

## Sizes

The defaults of the parameters and of `sl_pkg` are the published numbers:

* 3 microphones;
* 16-bit samples;
* 3200-sample window, 160-sample hop;
* lags up to 26;
* 4096 × 16 memories;
* 180 LEDs.

The following are this design's own choices:

* accumulator widths (43-bit energy, 44-bit correlation), sized so that
  3174 full-scale terms cannot overflow;
* the CORDIC iteration count, 14;
* the TDM, SPI and UART formats.

After coarse synthesis the chip has about 9,400 flip-flop bits and
3 × 64 kbit of SRAM. Nearly all of the logic is the 162 multiply-accumulators.

## What differs from the original

* The SRAMs are written as arrays. The original used foundry macros. Pads,
  the 1.2 V / 3.3 V supply split and the package are not modelled.
* The original writes at 16 kHz and reads at 12.5 MHz. Here both sides use
  the 12.5 MHz clock, and the 16 kHz writes are strobes.
* The energy threshold value is not published. It is an input.
* The peak is found before the division by the energies, and only the
  peak value is normalized (see above).
* The array geometry, the microphone numbering and the delay-to-angle
  formula are this design's own. The original refers to an earlier TDOA
  method for them.
* The one-deep pending window, the drop counter and the other status
  counters are additions.
* How the FPGA reduces 48 kHz to 16 kHz is not stated. Plain frame
  selection is used.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the
module's outputs with values computed independently in the testbench and
prints `TB_RESULT checks=N failures=M`. Shared helpers are in
`tb/tb_sound_pkg.sv`:

* a repeatable white-noise generator;
* far-field microphone delays;
* a floating-point reference azimuth.

`tb/codec_tdm_model.sv` is a behavioural model of the codec's TDM output.

| Testbench | Covers |
|---|---|
| `tb_sound_loc_chip` | Full-size chip. Noise sources at the eight positions 0, ±45, ±90, ±135, 180°. Checks exact pair delays, azimuth within 1° of the reference and within 5° of the truth, results within 8 ms and exactly one hop apart, quiet windows skipped, windows dropped under a sample burst, memory wrap-around, pair coefficients above 0.94 for a single source. |
| `tb_dslc_system` | Whole system with every parameter at its default, in real time. 12.288 MHz codec bit clock, 48 kHz TDM, 16 kHz samples, 10 ms results, 115200 baud. Checks SPI setup, TDM to chip, localization, UART text, LED, the threshold, and dropping during a fast burst. About 25 s of simulation. |
| `tb_table1_workload` | The accuracy experiment: 8 positions × 10 measurements, success within ±5°. The source is a synthetic voiced, speech-like signal with exact fractional delays and per-microphone noise about 27 dB down. Two wall reflections (image sources from other directions, 0.35 and 0.25 of the direct amplitude, 1.3 m and 2.1 m longer paths) stand in for the room. All 80 measurements succeed. A real room has many more reflections, so this is still easier than the published measurement. |
| block testbenches | `tb_dual_port_sram`, `tb_data_buffer`, `tb_energy_calc`, `tb_energy_comparator`, `tb_corr_coef_calc`, `tb_corr_normalizer`, `tb_cordic_atan2`, `tb_azimuth_calc`, `tb_sl_controller`, `tb_tdm_rx`, `tb_spi_master`, `tb_uart_controller`, `tb_angle_displayer`, `tb_comm_controller` |

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sl_pkg.sv tb/tb_sound_pkg.sv tb/tb_sound_loc_chip.sv --top tb_sound_loc_chip
./obj_dir/Vtb_sound_loc_chip
```

Verilator finds the other modules through `-Irtl -Itb`, because every file
is named after its module. Verilator has two states, so every register that
is read is reset or written before use. Memory contents are not reset.

## Changing it

* **Array size.** The delay range is `ND` in `sl_pkg`. Raising it adds
  multiply-accumulators: ND + 1 per calculator, six calculators. `LAG_W`
  must hold ±ND.
* **Microphone layout.** The delay-to-vector formula in `azimuth_calc`
  assumes three microphones 120° apart. Another layout needs other
  coefficients there.
* **Window and hop.** Change `WINDOW` and `HOP` in `sl_pkg`. The memory must
  hold the window plus the samples that arrive while a frame is processed.
* **Board formats.** These are parameters of `tdm_rx`, `spi_master` and
  `uart_controller`.
