# Haxorus music visualizer

This design turns music into moving pictures. A stereo line-in signal is digitised by an AC'97 codec.
The FPGA plays it straight back out, measures its loudness and spectrum, and draws a 640x480 DVI picture from them:

- a shaded background;
- bouncing circles or squares;
- three waves whose height follows the energy in three frequency bands;
- three plots of those bands' spectra.

A person standing in front of a depth camera steers the picture. A host computer sends coarse depth frames over a serial line. The FPGA looks for hands in eight screen areas and treats any pair of active areas as a gesture. Gestures change the background, waves and shapes, or turn the audio volume up or down. A 10x10 grid of "dance areas" lights up wherever someone is close to the camera.

Everything is SystemVerilog in `rtl/`, with one module per file. Self-checking testbenches are in `tb/`. Three parts of the system are off-chip or vendor cores, and the RTL stops at their pins:

- the FFT core;
- the AC'97 codec;
- the Chrontel CH7301C DVI transmitter.

## Clocking and data flow

One clock drives everything: the 100 MHz system clock `clk`. The other rates are handled as follows:

- **AC-Link bit clock.** This 12.288 MHz clock comes from the codec. It is synchronised and its edges are detected, so it never clocks a flop.
- **Pixel clock.** The 50 MHz pixel clock is a clock enable, `pix_en`, high every second cycle. The graphics engine therefore has two system cycles per pixel.
- **Serial line.** The 500 kbit/s line is oversampled at 200 clocks per bit.

```
 line-in ─► codec ═AC-Link═► ac97_link ─► PCM L/R ─┬─► back to the codec (DAC, audio out)
                               ▲                   ├─► audio_ampl (loudness) ───────────┐
                        ac97_cmd (registers,       └─► fft_in_re ─► [FFT core] ─┐       │
                        volume) ◄── vol_up/down                                 ▼       │
                               ▲                     fft_out_* ─► fft_mag_est ─► bins ─►│
 serial ─► kinect_in ──────────┘ gestures, hand_areas, dance_areas ───────────────────►│
                                                                          graphics_engine
 dvi_sync ── X, Y, switch_buf ─────────────────────────────────────────────────► │
     └── de/hsync/vsync ─(3-cycle delay)─► dvi_out ◄── pixel_out ───────────────┘
 chrontel_i2c_init ── I2C ─► DVI transmitter ◄══ 12-bit DDR pixels ══ dvi_out
```

`haxorus_top` is the chip level. Its ports are plain signals:

- the AC-Link pins;
- the FFT core's streaming input and output;
- the serial input, and eight switches for the depth threshold;
- the DVI transmitter's data, sync and clock pins;
- the I2C pins, with SDA split into `sda_drive_low`/`sda_in` for an open-drain pad;
- `dvi_init_done` and the current volume attenuation, as status outputs.

## Audio: the AC-Link

`ac97_link` exchanges one 256-bit frame per 48 kHz sample period with the codec. Bits are sent MSB first. A frame has:

- a 16-bit slot 0, the tag;
- twelve 20-bit slots.

SYNC is high during the 16 bits of slot 0. What the slots carry:

| slot | out (to codec) | in (from codec) |
|---|---|---|
| 0 | tag: bit 15 frame valid, bits 14..11 slots 1..4 valid | bit 15 codec ready, bits 12/11 PCM valid |
| 1 | bit 19 read/‾write, bits 18:12 register address | address echo |
| 2 | write data in bits 19:4 | read data in bits 19:4 |
| 3, 4 | DAC left/right, sample in bits 19:4 | ADC left/right |
| 5..12 | zero | ignored |

**Bit timing.** The link drives `sdata_out` and `sync` a few system cycles after each rising bit-clock edge. It samples `sdata_in` after each falling edge. A bit clock lasts about 8 system cycles, so the delay from synchronising the clock stays well inside half a bit.

**Command interface.** `cmd_valid` is held together with `cmd_read`/`cmd_addr`/`cmd_data` until `cmd_ack`. The command goes into the next frame, and `cmd_ack` pulses when that frame starts.

**Receive side.** When a received frame ends, `codec_ready` is updated from tag bit 15. If the tag marks slots 3/4 valid, `pcm_in_l/r` are loaded and `pcm_in_valid` pulses: one sample pair per frame.

`ac97_cmd` writes the codec's registers. It starts once `codec_ready` is seen and then cycles through the list forever, one register per frame:

- master volume (0x02) and headphone volume (0x04), from the current attenuation;
- line-in volume (0x10) = 0x8808. **Mute is set.** This codec only delivers correct ADC samples with the line-in mixer path muted; the record path still takes line-in.
- PCM-out volume (0x18) at 0 dB;
- record select (0x1A) = line-in;
- record gain (0x1C) at 0 dB.

The `vol_up`/`vol_down` gesture pulses change the attenuation by one 1.5 dB step, within 0..31. The start value is 8. Because the list is rewritten continuously, a change reaches the codec within six frames.

In the top, each ADC sample pair is sent back to the DAC. The left sample is also the loudness input of the graphics engine. The mean of left and right is the FFT input, with `fft_in_valid` pulsing once per 48 kHz frame.

## Spectrum: magnitude estimate and bands

The FFT core is not part of this RTL. It is assumed to be configured as follows:

- 4096 points, 12-bit index;
- pipelined streaming;
- unscaled, natural order output;
- two's complement output of 16 + 12 + 1 = 29 bits.

It returns bins as `fft_out_valid/re/im/index`, and `fft_out_done` on the last bin. The last bin is what swaps the spectrum buffers.

`fft_mag_est` avoids the square root. It takes `|re|` and `|im|` and uses

    mag = 15/16 · max + 15/32 · min  =  (max − max>>4) + (min>>1 − min>>5)

This needs one comparator, four shifts and three adders, with one register stage: the magnitude, index and last flag appear one cycle after the bin. Against the true magnitude √(re²+im²) the estimate lies between about −6.3 % (when min = 0) and +4.8 % (when min/max ≈ 0.5). The estimate is below 1.41 · 2^28, so it fits the 29 input bits unsigned.

At 48 kHz, one bin is 48000/4096 ≈ 11.7 Hz. The three bands are:

| band | Hz | bins |
|---|---|---|
| bass | 60 – 250 | 5 … 20 |
| middle | 250 – 2,000 | 21 … 170 |
| high | 2,000 – 6,000 | 171 … 511 |

## Graphics engine

The engine does not hold a frame buffer. It answers each (X, Y) from `dvi_sync` with a pixel, computed fresh from nine *layers*. Each layer gives a colour and a "valid" bit. The memory this needs is small: 12 RAMs of 1024 x 10 bits.

### Pixel timing

A pixel lasts two system cycles, and X/Y change in the `pix_en` cycle.

- **Stage 1:** every layer registers X/Y and reads its memory (wave RAMs), or evaluates its arithmetic (circle test, shading).
- **Stage 2:** every layer registers its colour and valid bit.
- **Blender:** the blender registers the weighted average.

So `pixel_out` for (X, Y) appears **three cycles** after X/Y. The top delays `pix_en`, `de`, `hsync` and `vsync` by the same three cycles before `dvi_out`, so sync and data stay aligned at the pins. Every layer runs at the full clock. Nothing relies on the second cycle of a pixel being idle, so the only cost of a layer is pipeline depth, not throughput.

### Layers and blending

| # | layer | module | weight |
|---|---|---|---|
| 0 | background, always valid | `bg_ctrl` | 1 |
| 1 | bouncing shapes | `shape_gen` | 2 |
| 2–4 | music waves (bass, middle, high amplitude) | `wave_gen` | 4 |
| 5–7 | frequency plots of the three bands | `freq_wave_gen` | 3 |
| 8 | active hand / dance areas | `kinect_area_det` | 4 |

`color_blender` computes `Σ wᵢ·cᵢ / Σ wᵢ` for each of R, G and B, over the valid layers only. Because of this, every object is tinted by whatever lies under it, rather than painted over it. Weighting shapes above the background and waves above shapes keeps the objects apart. One divider per component is inferred as a combinational `/`. On an FPGA it would become a divider core or a pipelined divider. The weights are parameters.

### Double-buffered waves (`wave_gen`, `wave_ram`)

A wave has exactly one Y per X. It is therefore stored as a 1024-word, 10-bit RAM, addressed by X, whose data is Y. Each wave has two such RAMs, *front* and *back*.

- **Display.** Pixel (X, Y) is on the wave when |Y − front[X]| ≤ thickness. This is one port of the front RAM.
- **Motion.** Once per frame the wave moves one column to the left.
  - At `switch_buf`, the roles swap: the freshly written buffer becomes the front.
  - An update engine then copies `front[a+1]` into `back[a]` for a = 0…638, and writes one new Y into `back[639]`.
  - The copy is a read and a write per column, about 1,300 cycles, out of the roughly 840,000 cycles of a frame.
  - The displayed buffer is never written while it is on screen, so the wave never tears.
- **New column.** The new Y follows a phase register:
  - UP: Y falls by *speed* per column to `CENTER_Y − amplitude`.
  - DOWN: Y rises to `CENTER_Y + amplitude`.
  - For wave type 1 there is also CONST: Y is held for 16 columns before the next UP.
- **Inputs, once per frame.** The amplitude is the average magnitude of one frequency band (`band_avg` of the matching `freq_wave_gen`), limited to 200 pixels. The thickness is 1 + |audio|/2048 pixels, taken from the loudness sample. Both are sampled once per frame.
- **Random values and gestures.** Speed (1..8) and colour come from the random generator at the first frame and on a "randomize wave" gesture. A "wave type" gesture toggles the CONST phase.
- **After reset.** Both RAMs are filled with `CENTER_Y`, which takes 1024 cycles.

### Frequency plots (`freq_wave_gen`)

Each plot watches the magnitude stream for its band's bins. It writes each bin's height, `min(mag >> MAG_SHIFT, 400)`, into its back buffer and sums the heights. The last bin of a spectrum swaps the buffers, so a half-written spectrum is never shown. The same swap loads `band_avg` = sum / number of bins, which is the amplitude of the matching music wave.

Column X shows bin `BIN_LO + (X·SCALE >> 16)`, where `SCALE = ⌊(BIN_HI−BIN_LO)·65536/640⌋`. The band is thus stretched across the screen width, drawn as a line rising from Y = 470. The swap is driven by the FFT and not by the video frame, so these buffers swap at the spectrum rate, about 11.7 Hz, independently of `switch_buf`.

### Background, shapes, randomness

**`bg_ctrl`** starts from a random colour. Every four frames, each component steps one unit towards a random target. The strongest component is shaded horizontally, `c·(256 − X/4)/256`, and the second strongest vertically, in the same way with Y. Gestures can:

- draw a new colour;
- invert the colour;
- toggle a 32x32 checkerboard in the inverted colour.

**`shape_gen`** keeps four shapes, each with:

- centre and radius (8..71);
- colour;
- speed (1..4);
- one direction bit per axis.

Once per frame each shape moves by its speed. Touching the left or right wall flips its X direction, and touching the top or bottom wall flips its Y direction. A circle covers (X−cx)² + (Y−cy)² ≤ r², using two multipliers. A square covers |X−cx| ≤ r and |Y−cy| ≤ r. Gestures can give the shapes new random parameters, switch between circles and squares, or hide them.

**`lfsr_rng`** has eight 8-bit LFSRs with polynomial x⁸+x⁶+x⁵+x⁴+1. While reset is held, a counter runs. When reset is released, each LFSR is loaded with that count mixed with its own constant, so the start depends on how long the button was held. Every 2²⁴ cycles (0.17 s) they are reloaded from a free-running counter mixed with a neighbour, so the sequence does not simply repeat. A zero load is replaced by a constant, because the all-zero state would lock the LFSR.

**`kinect_area_det`** stretches the two area grids over the screen. It colours a pixel inside an active area: each hand area has its own colour, and dance areas are white. Hand areas take priority.

## Kinect gesture path

The host computer does the following for each frame:

- takes a 640x480 depth frame;
- keeps the 8 most significant of the 11 depth bits;
- sends one pixel in four, as 320x240 in raster order;
- ends the frame with a zero byte. Zero is never a valid depth.

At 500 kbit/s, one frame (76,801 bytes of 10 bits) takes about 1.5 s.

- **`uart_byte_rx`.** The line idles high. A low level starts a byte of 8 bits, LSB first, followed by a stop bit. Each bit is sampled in its middle, 200 clocks per bit. A valid byte gives a one-cycle `byte_valid`. A byte with a low stop bit is dropped, and the reader waits for the line to go high again.
- **`pixel_pos`.** Assigns x/y to each non-zero byte. The zero byte gives `frame_end` and resets the position.
- **`g_monitor`.** Watches one rectangle.
  - It counts the pixels inside the rectangle that are *closer* than the switch-set threshold.
  - When the count reaches `COUNT_THRESH`, the area becomes active.
  - It stays active until the first pixel of the same rectangle arrives in the next frame, which clears the count and the flag.
  - The result: an area's state always reflects the latest complete scan of that area.
- **`gesture_rec`.** Eight monitors cover the frame as a 4x2 grid, with area k at column k mod 4 and row k div 4. When the zero byte arrives and exactly two areas are active, that pair is the gesture. The 28 pairs (i<j) are numbered in lexicographic order (0,1), (0,2) … (6,7). Pairs 0–25 drive `gestures[25:0]`, pair 26 is volume up and pair 27 is volume down. All of them are one-cycle pulses.
- **`kinect_in`.** Adds a 10x10 grid of dance-area monitors, with a lower threshold of 100 pixels per 32x24 cell, which drives `dance_areas[99:0]`.

The commands the graphics engine uses (`haxorus_pkg`):

| bit | pair | command |
|---|---|---|
| 0, 1, 2 | (0,1) (0,2) (0,3) | background: randomize, invert, checker |
| 3, 4, 5 | (0,4) (0,5) (0,6) | randomize wave 1, 2, 3 |
| 6, 7, 8 | (0,7) (1,2) (1,3) | change type of wave 1, 2, 3 |
| 9, 10, 11 | (1,4) (1,5) (1,6) | shapes: randomize, change type, on/off |
| — | (5,7) (6,7) | volume up, volume down |

Bits 12–25 are produced but unused.

## Video output

**`dvi_sync`** counts X over 800 pixels (640 visible, then 16 front porch, 96 sync, 48 back porch) and Y over 525 lines (480, 10, 2, 33). Both syncs are active low. At 50 MHz this is a 119 Hz frame rate. The transmitter and monitor see the usual 640x480 shape at a doubled clock; this follows from the 50 MHz pixel clock and 100 MHz system clock the design uses. `switch_buf` pulses every 307,200 visible pixels, at the last visible pixel. That is the start of the blanking time in which the wave engines copy their buffers.

**`dvi_out`** drives the transmitter's 12-bit double-data-rate input. For each pixel:

- the first system cycle drives `{G[3:0], B}` with XCLK low;
- the second drives `{R, G[7:4]}` with XCLK high.

`de`/`hsync`/`vsync` are registered with the first half. XCLK-N is XCLK-P inverted. The transmitter's clock-delay register is expected to place its sampling point.

**`chrontel_i2c_init`** writes five registers after reset, at 100 kHz, to device 0x76:

- 0x49 = 0xC0 (power on DVI);
- 0x21 = 0x09;
- 0x33 = 0x08;
- 0x34 = 0x16;
- 0x36 = 0x60.

These are the transmitter's recommended settings for pixel clocks up to 65 MHz. Each write is START, address, register, data, STOP, and each bit is four quarter-periods. A missing acknowledge sets `ack_error`. `done` rises after the last STOP.

## What is specified and what is chosen

These points follow the source design:

- the AC-Link slot layout and SYNC width;
- line-in muted;
- the magnitude formula;
- the 12-bit FFT index and 11.7 Hz bins;
- the three frequency ranges;
- eight seeded LFSRs with reload;
- the background shading rule;
- the weighted averaging of valid layers;
- bouncing on wall hits and the circle inequality;
- 1024 x 10 double-buffered wave RAMs with a one-column shift per frame, and UP/DOWN/CONST phases;
- amplitude from a band average and width from loudness;
- the spectrum buffer swap on the FFT's last bin;
- 10-bit X/Y, and `switch_buf` every 307,200 pixels;
- the 100/50 MHz clock ratio, with one cycle to read and one to compute;
- the serial format and rate;
- the quarter-resolution 8-bit depth frames ended by a zero byte;
- the monitor semantics ("active until the area is scanned again");
- eight equal hand areas and two-area gestures;
- the fourteen gesture commands;
- the bus widths 100 / 8 / 26 / 24.

Choices made here, where the source is silent:

- all thresholds, weights, colours, speeds, sizes, radii and the drift rule;
- the 4x2 hand layout and the pair-to-command map;
- requiring *exactly* two active areas;
- the 320x240 subsampling geometry;
- the 10x10 dance grid and its threshold;
- the codec register values other than line-in;
- the Chrontel register list;
- the sync porches;
- the three-cycle pipeline;
- the LFSR polynomial;
- the stop-bit check;
- the mean of L and R as FFT input.

Departures from the source design:

- Dividers and multipliers are written as `/` and `*` rather than vendor cores. The blender's divide is combinational, which may limit the clock on an FPGA.
- The FFT core, the codec and the DVI transmitter are outside this RTL.
- The temporal pattern recogniser, which the source planned but did not finish, is not built.

## Verification

Each module has a testbench `tb/tb_<module>.sv`. Each one compares against values it works out itself, counts checks and failures, has a watchdog, and prints `TB_RESULT checks=… failures=…`. Latencies are checked where they are defined:

- the magnitude estimator: one cycle;
- the layers: two cycles;
- the blender: one cycle;
- the graphics engine: three cycles;
- `byte_valid`: one cycle wide.

The behavioural models used by the testbenches:

- `ac97_codec_model`: a codec with bit clock, register file and ADC/DAC counters;
- `i2c_slave_model`: the transmitter's I2C side;
- `fft_model`: a stand-in that emits a spectrum of known bins after every block of input samples. It is not a real FFT.

The two chip-level tests:

- `tb_haxorus_top` runs the whole chip with a faster serial line and I2C clock. It sends three Kinect frames and counts every mechanism:
  - codec writes with line-in muted;
  - ADC-to-DAC loopback;
  - FFT input equal to the L/R mean;
  - spectra and spectrum-buffer swaps;
  - video frames with 307,200 visible pixels at the pins;
  - wave-buffer swaps;
  - transmitter register writes;
  - lit dance areas;
  - a background gesture taking effect;
  - a volume gesture reaching the codec.

  It fails if any mechanism never happens.
- `tb_kinect_in_full` sends one full 320x240 depth frame through the Kinect path at 500 kbit/s with default parameters. It checks the hand and dance areas against its own pixel counts, and checks that the gesture pulse comes 153,601,905 cycles (1.54 s) after the first start bit, a few cycles before the zero byte's stop bit ends. The simulation takes about 2.5 minutes.
- `tb_haxorus_top_full` runs the chip with every parameter at its default, for ten video frames. It sends a short depth frame at 500 kbit/s, which produces a gesture, and it runs about 4,100 AC-Link frames.

Simulate with Verilator 5, for example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/haxorus_pkg.sv tb/tb_graphics_engine.sv --top-module tb_graphics_engine
    ./obj_dir/Vtb_graphics_engine

Run times with Verilator:

- most block tests: under a second;
- the graphics engine: about 1 s;
- each chip-level test: about 20 s.

Verilator's two-state simulation starts undefined flops at random values, so every state that is read is reset. The whole chip synthesises with Yosys to roughly 4,600 cells and 2,900 flip-flops, plus 12 wave RAMs (123 kbit).

Lint warnings that remain are deliberate, and each module's header explains its own:

- unused package constants, when the package is linted alone;
- the unused top bit of the AC-Link receive shift register;
- the low bit of the L+R sum;
- the bits that the background ramps and the wave thickness discard;
- the frequency plots' write-only RAM port;
- the wave engines' `busy` flag, which nothing needs;
- status outputs left open in the top: codec register read-back, frame start, I2C `ack_error`.
