# Guitar multi-effects processor in FPGA fabric

An electric guitar, buffered by an analog pre-amplifier, goes into the line input of
a WM8731 audio codec. This RTL takes the codec's 48 kHz, 16-bit samples and runs each
one through four effects in series, all in logic:

1. a **cabinet simulator**, a 500-tap FIR convolution with a loudspeaker impulse response;
2. an **equaliser**, four biquad IIR sections (bass / mid / treble plus one spare);
3. a **limiter**, hard clipping with an optional low-pass filter that softens it;
4. a **delay**, an echo that mixes in the signal from up to 8192 samples ago.

The result goes back to both DAC channels. An ARM processor sets every coefficient,
threshold and switch through 16-bit memory-mapped registers. It also moves the sliders
and switches of a VGA control panel, which this RTL draws.

```
 AUD_ADCDAT ─► deserializer ─► input FIFOs ─► FIR ─► biquad ×4 ─► limiter ─► delay ─► output FIFOs ─► serializer ─► AUD_DACDAT
                 (i2s_avalon_st)              (fir_cabinet) (biquad_chain) (limiter) (delay_effect)     (i2s_avalon_st)
                                                  ▲           ▲             ▲          ▲
 hps_* bus ─► avalon_mm_decoder ──────────────────┴───────────┴─────────────┴──────────┴──────► vga_ball ─► VGA_*
```

Everything runs on one 50 MHz clock. Each arrow in the audio path is an
Avalon-Streaming link: 16-bit data with a valid/ready handshake. The top level is
`effects_top`.

## The sample budget, and why the FIR looks the way it does

At 48 kHz and 50 MHz there are 50e6 / 48e3 ≈ 1041 clocks between two samples.
That budget shapes the whole design:

* **The cabinet FIR** is the only expensive block: 500 multiply-adds per sample.
  Instead of 500 multipliers it has one, shared over time.
  * The last 500 input samples sit in a circular history RAM. The 500 coefficients sit
    in a second RAM.
  * When a sample is accepted, it overwrites the oldest history word. The block then
    steps k = 0…499, reading h[k] and x[n−k] in the same clock.
  * The product is added to a 48-bit accumulator one clock later, so the RAM read
    is registered before the multiplier.
  * After a flush clock, the sum is scaled and clipped, then presented on the source.
  * Latency is **TAPS + 3 = 503 clocks**, about half the sample period. While busy,
    the FIR holds `sink_ready` low. The input FIFO covers that wait; it never fills,
    because a new sample arrives only every ~1041 clocks.
  * The processor can write and read coefficients at any time through a separate
    port with one clock of read latency. Writing during a convolution mixes old and
    new taps for that one sample.
* **The biquads, limiter and delay** are fully parallel. The biquad has five
  multipliers, and each stage registers its output once. So the chain after the
  FIR adds only 4 + 2 + 1 = 7 clocks and takes one sample per clock.

A sample therefore leaves the delay about 510 clocks after it left the input FIFO.
The serializer plays it in the next DAC frame.

## Codec framing (`i2s_avalon_st`, `audio_deserializer`, `audio_serializer`)

The codec is clock master. It drives BCLK, ADCLRCK and DACLRCK, and the FPGA treats
them as data:

* `edge_detect` passes each of them through a three-flop synchroniser. It gives
  one-clock strobes for the rising and falling edges.
* The format is **left-justified, 16-bit, MSB first**. LRCLK high marks the left
  channel. The first bit is sampled on the first BCLK rising edge after an LRCLK
  edge, and extra BCLKs in a half-frame are ignored.
* **Receive.** Every LRCLK edge restarts a bit counter. After 16 bits, the word goes
  into the left or right input FIFO (128 words each). The Avalon-ST source offers
  the left word once both FIFOs hold one, and pops both together. The chain is mono:
  the right input is read and discarded.
* **Transmit.** Each processed sample is written into both a left and a right output
  FIFO (128 words each).
  * On LRCLK rising (the start of a DAC frame), both FIFOs are read together. The
    left word starts shifting out at once, changing on BCLK falling edges so it is
    stable at the codec's rising edge.
  * The right word is held until LRCLK falls. Both channels of a frame therefore
    always carry the same sample.
  * An empty output FIFO plays silence. A full input FIFO drops the incoming word.

## Streaming handshake

Every block follows the same rule: a word moves when `valid && ready` is true at a
clock edge. A source keeps its data stable until it is taken; assertions in the
RTL check this. The one-register stages (biquad section, limiter stages, delay) use
`sink_ready = !source_valid || source_ready`. They run at full rate when nothing
stalls and hold their data when the next stage stalls.

## Number formats

| Quantity | Format | 1.0 is | Notes |
|---|---|---|---|
| audio samples | signed 16-bit | 32768 | as the codec delivers them |
| FIR taps h[k] | signed Q1.15 | 32767 | y = Σ h[k]·x[n−k] >>> 15. After power-up h = {0, 32767, 0, …}: a pass-through with one sample of delay |
| biquad and low-pass coefficients | signed Q4.12 | 4096 | already divided by a0. Gains up to ±8 are possible |
| delay MIX | signed, /2^16 | 65536 | the dry path is fixed at one half (·16384 >>> 15) |
| limiter thresholds | signed 16-bit sample values | — | compared as signed numbers |

All sums are formed at full width (48 bits), shifted right arithmetically (which
rounds towards −∞), and then **saturated** to 16 bits, never wrapped. A biquad feeds
back the saturated value, which keeps an overdriven filter from oscillating at full
scale.

## The effects

**Biquad chain** (`biquad_chain`, `biquad_section`). Four direct-form-I sections in
series. Each computes

y[n] = (b0·x[n] + b1·x[n−1] + b2·x[n−2] − a1·y[n−1] − a2·y[n−2]) >>> 12

with five multipliers in parallel. One BYPASS bit passes the input through all four
sections. While bypassed, the sections keep updating their state, so switching the EQ
back in starts from the recent history rather than from stale values. After reset,
every section is unit gain and BYPASS is set.

**Limiter** (`limiter`).
* Hard clip: samples above the positive threshold are replaced by it, and samples
  below the negative threshold by that. Reset values are ±1000, a strong distortion.
  Setting ±32767 turns the effect off.
* Soft clip: the same clipped signal also goes through a biquad section with its own
  five coefficients, which software loads with a low-pass response to round the
  corners off. With soft clip off, that section is bypassed. Latency is 2 clocks.

**Delay** (`delay_effect`). A circular buffer of DELAY_DEPTH = 8192 words, used as
one block RAM in read-before-write mode.
* For each sample, the word at the write pointer is read out as the "wet" sample and
  replaced by the new one. The pointer wraps at LENGTH, so the wet sample is exactly
  LENGTH samples old.
* Output = dry/2 + wet·MIX/65536, saturated.
* LENGTH is clamped to 1…8192. Changing it takes effect on the next wrap, with no
  buffer clear. The buffer keeps filling while BYPASS is set.
* Reset values: LENGTH 6000 (125 ms), MIX 30000, BYPASS 0.

## Register map

The processor sees 16-bit registers two bytes apart. Addresses are byte offsets on
the processor's lightweight bus; `avalon_mm_decoder` picks the block and passes down
the word offset (byte offset / 2).

| Byte address | Block | Word | Register |
|---|---|---|---|
| 0x0010–0x001f | limiter | 0 | positive threshold (reset 1000) |
| | | 1 | negative threshold (reset −1000) |
| | | 2 | bit 0: soft clip on (reset 0) |
| | | 3–7 | low-pass b0, b1, b2, a1, a2 (reset 4096, 0, 0, 0, 0) |
| 0x0020–0x002f | delay | 0 | BYPASS (non-zero = bypassed) |
| | | 1 | LENGTH in samples |
| | | 2 | MIX (signed) |
| 0x0100–0x013f | biquad chain | 0–4, 5–9, 10–14, 15–19 | sections 1–4: b0, b1, b2, a1, a2 |
| | | 20 | BYPASS (bit 0) |
| 0x1000–0x13ff | cabinet FIR | 0–499 | h[0]…h[499]. Readable: the read data arrives one clock after `hps_read` with `hps_readdatavalid` |
| 0x2000–0x200f | control panel | 0 | bypass switch picture (bit 0) |
| | | 1 | preset selector row |
| | | 2–7 | slider 1–6 knob rows |

Writes take effect at the clock edge where `hps_write` is seen. Only the FIR
coefficients can be read back.

## Control panel display (`vga_counters`, `vga_ball`, `image_rom`)

`vga_counters` produces 640×480 at 60 Hz timing from the 50 MHz clock. It counts
1600 half-pixel clocks per line and 525 lines, giving one pixel every two clocks.
`vga_ball` draws, in priority order:

* six white 36×17 slider knobs at fixed columns, on rows set by registers 2–7;
* a 13×13 preset selector at column 40;
* a 38×20 bypass switch at (373, 139), with an "on" and an "off" picture;
* a 640×480 background at one byte per pixel.

Pixels are RRRGGGBB-style bytes (red in bits 2:0, green in 5:3, blue in 7:6). They
are expanded to the top bits of the 8-bit VGA channels.

**The pictures are stand-ins.** The original artwork is not available. `image_rom`
fills each ROM at start-up with a computed pattern of the right size:
* the background is a grid of coloured tiles;
* the selector is a dark disc;
* the switch is a knob on the left or right half.

To show real artwork, replace the `initial` block of `image_rom` with a
`$readmemh` of the images.

## Resources

| Memory | Size |
|---|---|
| background ROM | 640×480×8 = 2.46 Mbit, the bulk of all memory |
| delay buffer | 8192×16 = 131 kbit |
| FIR history and coefficients | 2 × 500×16 |
| four audio FIFOs | 4 × 128×16 |
| sprites | under 20 kbit |

In total that is about 2.6 Mbit, which fits the ~4.4 Mbit of block RAM on a
Cyclone V 5CSEMA5 (DE1-SoC).

The design has 27 16×16 multipliers: FIR 1, EQ 20, soft-clip low-pass 5, delay mix 1.
The dry half-gain is a shift.

## How this RTL relates to the original design

These follow the original:
* the block order;
* the register windows and register meanings of the FIR, biquad chain, limiter
  thresholds, delay and panel;
* the 500 taps, 4×5 biquad coefficients and 128-word input FIFOs;
* the delay's dry gain and wet scaling;
* the panel geometry and reset positions;
* the codec format.

These are this design's own choices, or readings of points the original leaves open:

* **FIR coefficient address width.** The original FIR block diagram shows a 6-bit
  coefficient address. 500 coefficients in a 0x400-byte window need 9 bits, which is
  what is built.
* **Q formats** (Q1.15 taps, Q4.12 biquads) are inferred from the software presets
  (a FIR pass-through of 32767 and a 4096 unit gain). Saturation instead of
  wrap-around is added everywhere.
* **Soft-clip registers.** The original limiter register list names only the two
  thresholds. Registers 2–7 (soft-clip enable and the low-pass coefficients) are
  placed in the unused part of the limiter's window.
* **Output FIFOs and frame alignment.** Both output FIFOs are read at the start of
  each DAC frame, so left and right always play the same sample. The original read
  each channel's FIFO at its own half-frame. Output FIFO depth (128) is assumed equal
  to the input FIFOs.
* **No extra rate limiter.** The original interface code contained a counter that
  throttled its source; it is not described as part of the design and is not built.
  Flow control comes only from valid/ready.
* **Single clock domain.** The codec clocks are synchronised and sampled, rather
  than used as clocks.
* **Register widths.** Delay LENGTH is clamped to 1…DEPTH, and panel positions use
  10 bits of the written word.

Not in this RTL:
* the analog pre-amplifier;
* the codec itself (a behavioural model, `tb/wm8731_model.sv`, stands in for it in
  simulation);
* the codec's I2C configuration;
* the ARM processor and its drivers. The processor's bus is brought out as the
  `hps_*` ports of `effects_top`.

## Verification

Each block has a self-checking testbench in `tb/`, named `tb_<block>`. It compares
the block's outputs with values computed independently in the testbench and ends by
printing `TB_RESULT checks=N failures=M`.

* Arithmetic blocks are checked bit-exactly against reference models: FIR (500 taps,
  including latency and coefficient read-back), biquad, limiter and delay.
* The codec interface runs in loopback through `tb/wm8731_model.sv`. The test covers
  input overflow and output underflow.
* The VGA blocks are checked pixel by pixel over whole frames.

`tb_effects_top` runs the whole unit at its default sizes for about 33 ms of
simulated time (1588 samples).
* Random samples enter on the ADC pin. Every sample leaving the delay is compared
  with a bit-exact model of the whole chain.
* The DAC pin must then play exactly that stream, with both channels equal in every
  frame.
* The codec model runs its frames at 1024 system clocks, slightly faster than the
  ~1041 clocks of a true 48 kHz frame. Keeping up with it shows that the 500-tap FIR
  meets the real-time rate with margin.
* The run goes through FIR loading and read-back, EQ on and off, hard and soft
  clipping, echo with positive and negative mix, delay bypass, and moving a slider
  on screen. It counts each of these and fails if any never happened.

To run a testbench with plain Verilator (5.x), from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl \
    --top-module tb_effects_top rtl/fx_pkg.sv tb/tb_effects_top.sv
./obj_dir/Vtb_effects_top
```

Replace `tb_effects_top` with any other `tb_<block>`. The package `rtl/fx_pkg.sv`
must come first. `tb_effects_top` builds in about a minute and runs in a few
seconds. The whole unit elaborates with the default parameters `FIR_TAPS = 500`,
`DELAY_DEPTH = 8192` and `FIFO_DEPTH = 128`.

## Files

| File | Contents |
|---|---|
| `rtl/fx_pkg.sv` | sample and coefficient types, register windows, saturation function |
| `rtl/effects_top.sv` | top level: codec interface, effects chain, bus decoder, panel |
| `rtl/i2s_avalon_st.sv` | codec interface; uses `edge_detect`, `audio_deserializer`, `audio_serializer`, `sample_fifo` |
| `rtl/fir_cabinet.sv` | time-shared 500-tap FIR with coefficient RAM port |
| `rtl/biquad_chain.sv`, `rtl/biquad_section.sv` | four-section EQ and its section |
| `rtl/limiter.sv` | hard / soft clipper |
| `rtl/delay_effect.sv` | echo with circular buffer |
| `rtl/avalon_mm_decoder.sv` | register-window decoder |
| `rtl/vga_counters.sv`, `rtl/vga_ball.sv`, `rtl/image_rom.sv` | control panel display |
| `tb/tb_*.sv` | one testbench per block, plus `tb_effects_top` |
| `tb/wm8731_model.sv` | behavioural codec: serial ADC source and DAC capture |
