# Music visualizer: audio spectrum to NTSC video

This design turns live audio into moving pictures on an ordinary television.
Microphone samples go through a 1024-point FFT. The spectrum is folded into
eight frequency "buckets", and every frame one of four pictures is drawn from
the bucket levels into a half-resolution frame buffer:

- vertical bars;
- diagonal bars that shoot off bouncing balls;
- a radial fan of sectors;
- overlapping "lens" circles.

The frame buffer is read out as a CCIR-656 (BT.656) stream for an ADV7194
video encoder. A PS/2 keyboard drives an on-screen eight-band equalizer whose
gains scale the spectrum on its way to an inverse FFT.

The design is a reconstruction of a student lab-kit project (MIT 6.111, "Music
Visualizer"), written from that project's write-up. Everything runs in one
27 MHz clock domain with a synchronous, active-high reset. Slower events use
clock enables rather than derived clocks: the 48 kHz audio strobe, the 100 Hz
ball physics and the I2C bit timing.

## What is inside, and what is outside

Several parts are vendor cores or chips. They are not part of the RTL, and
their signals are ports of the top module `music_visualizer`:

| Outside part | Ports on `music_visualizer` |
|---|---|
| AC97 codec driver (8-bit samples, 48 kHz `ready`) | `ac97_ready`, `from_ac97_data`, `to_ac97_data` |
| 1024-point streaming FFT core | `fft_xn_re`, `fft_ce`, `fft_dv`, `fft_xk_re/im` (19 bit), `fft_xk_index` |
| inverse FFT and FIR low-pass filter | `mul_re`, `mul_im`, `ifft_enable` (the equalized bins) |
| ADV7194 video encoder | `tv_out_ycrcb[9:0]`, `tv_out_reset_b`, `tv_out_i2c_clock/data` |

The original project never got the inverse FFT working. Here the equalized
bins are produced and checked, but nothing in the design listens to them.

The RTL blocks, grouped by path:

```
 audio:     recorder ── tone_750hz, bucketizer          eq_multiplier ── coefficients
                 │ buckets                                     ▲
 picture:   visualizer_layer ── info_dist, tick_100hz, doer,   │
                 │            visualizer (bar_blob, diagonal_bar, ball, ball_physics,
                 │                        radial_segment, circle_lens),
                 │            vis_select, vis_address
                 ▼ write port
 video:     video_mem ──read──► rgb2ycrcb ─► equalizer (eq_bars, ycrcb_blob) ─► video_stream ─► encoder
                 ▲ read address: pos2addr(h_next, v_next)        ▲ keys
 control:   adv7194_init (i2c_tx)     ps2_ascii (ps2_rx) ─► key_decode
 test aids: bucket_gen (fake buckets), solid_fill (solid colour), debounce (playback button)
```

`avs_pkg` holds the shared constants and types:

- the 360x243 frame size and the 17-bit frame-buffer address;
- the `rgb565_t` and `ycrcb_t` pixel types;
- a few colours;
- the `dist2` squared-distance function used by every round shape.

## Audio front end

`recorder` detects each new sample as the rising edge of `ready`. On that
edge it:

- gives the sample to the FFT, whose clock enable is `ready` itself;
- advances the 750 Hz test tone by one step;
- loads the headphone output. While the enter button is up (`playback` = 1)
  the output is the top byte of the tone. While the button is held it is the
  microphone sample.

The tone is 64 samples per period at 48 kHz. Its half-wave table is computed
at elaboration from the rational approximation
`sin(pi*p/32) ~ 4p(32-p) / (1280 - p(32-p))`, scaled to 2^19 - 1.

`bucketizer` takes the top 8 bits [18:11] of the real and imaginary FFT
outputs and squares them. It sums `re^2 + im^2` over the 128 bins of each
bucket (bucket number = `xk_index[9:7]`) and outputs the sum shifted right by
7, which is the mean power. The FFT holds each output bin for several clocks
because it is clock-enabled. A bin is therefore counted only on the first
clock it appears, when its index differs from the last one seen. The result
and a one-clock `bkt_valid` come two clocks after that bin.

`eq_multiplier` multiplies the same signed top byte of every bin by the
committed equalizer gain (0..255) of the bin's bucket. The product is
registered, so `ifft_enable` is `fft_dv` delayed by one clock.

## From buckets to pixels

`info_dist` stores the latest value of each bucket as it arrives. Once per
frame, on `frame_done`, it replaces each displayed value by
(displayed + latest) / 2. Values therefore never change in the middle of a
frame, and single-frame spikes are damped.

`visualizer` computes all four pictures for one pixel (`row`, `col`)
combinationally. A bucket value is clipped to 255 and used as a length in
pixels:

| sel | Picture | Shapes, combined |
|---|---|---|
| 0 | bars | 30-pixel-wide bars standing on row 242 at x = 40, 80, ..., 320; ORed on black |
| 1 | diagonal bars and balls | segments of `h+v = X+242` within 5 pixels, cut to a disc of radius = level around (15i, 242), plus a white ball per bar; ORed on black |
| 2 | radial | eight 45-degree sectors of a disc of radius = level around the screen centre (180, 121); ANDed on white |
| 3 | lenses | eight circles with a coloured rim and a lightened inside (colour OR 0x7BEF), white outside; ANDed on white |

Each ball (`ball_physics`) rides on its bar at 3/4 of the bar's length. When
the level rises above 192 the ball is released with velocity (+3, -8) pixels
per tick. Gravity adds 1 to the vertical velocity on every 100 Hz tick
(`tick_100hz`, 270000 clocks). The ball returns to its bar after it leaves the
screen.

## The frame buffer and the video stream

This is the part with the tightest timing. The frame buffer (`video_mem`)
holds 360x243 RGB565 words: 87480 entries at address `row*360 + col`. It has
one write port and one read port, and reads take one clock.

`video_stream` produces the 525-line NTSC stream with 1716 words per line.
Each line holds:

1. 1440 words of active video in the order Cb Y Cr Y;
2. the EAV code `3FC 000 000 XY` (the 8-bit codes FF 00 00 XY moved to the top of the 10-bit word);
3. 268 words of blanking (200/040 hex);
4. the SAV code.

The code byte is XY = {1, F, V, H, V^H, F^H, F^V, F^V^H}, also shifted left by 2. Lines 19..261
(field 1) show the even frame rows and lines 282..524 (field 2) the odd rows,
each frame row stretched over two pixels horizontally. All other lines are
vertical blanking. The SAV at the end of a line carries the F and V bits of
the line that follows it.

Reading. The read address has to be presented one clock before its pixel is
needed. `video_stream` therefore provides `h_next`/`v_next`, the position of
the next word, and `pos2addr` turns them into `(v/2)*360 + h/2`. The RAM word
then arrives in the cycle whose position it belongs to. It passes through
`rgb2ycrcb` and the equalizer overlay to the registered output. A word leaves
the chip two clocks after its address was presented.

Writing. `row_done` pulses when a line's active part ends, on every line. On
that pulse `doer` picks frame row `vcount/2` and writes columns 0..359 on the
next 360 clocks. The row written is the one just displayed. The writes finish
during the blanking and the start of the next line, which shows a different
frame row, so the writer never races the reader. With `switch[6]` low,
`solid_fill` writes a switch-chosen colour instead, one address behind the
current read address.

Colour conversion (`rgb2ycrcb`) widens R, G and B to 8 bits and computes:

```
Y  = (306 R + 601 G + 117 B) >> 10
Cr = clamp(((720 (R - Y)) >>> 10) + 128)
Cb = clamp(((579 (B - Y)) >>> 10) + 128)
```

Each result is shifted left by 2 to fill the 10-bit port.

## Equalizer and keyboard

`ps2_rx` samples the keyboard clock and data through synchronisers. It
assembles 11-bit frames on the falling clock edge, checks the start, odd
parity and stop bits, and queues good bytes in an 8-entry FIFO. `ps2_ascii`
pops bytes continuously and translates make codes of scan-code set 2 to
ASCII. It drops a byte that has bit 7 set (the F0 break and E0 extended
prefixes) and the byte that follows one, so key releases produce nothing.
`key_decode` maps:

| Key | Action |
|---|---|
| W | up |
| A | left |
| S | down |
| D | right |
| Enter | enter |

`equalizer` keeps two banks of eight 8-bit gains, both reset to 255:

- left and right move the selected bucket, wrapping around;
- up and down change the selected working gain by 32, between 1 and 255;
- enter copies the working bank into the committed bank that
  `eq_multiplier` uses.

While `switch[7]` is high, the keys act, and the working bank is drawn over
the picture:

- eight 40-pixel-wide bars (`eq_bars`, `ycrcb_blob`) at x = 200 + 50i,
  standing on position row 320 with a height of gain/2;
- a bright border on the selected bar;
- blanks are all-zero, so the bars are simply ORed together.

## Encoder set-up

`adv7194_init` holds the encoder in reset for a few steps after reset and
then releases it. It then writes eight mode registers in one I2C transfer:
device 0x56, sub-address 0, values 00 47 40 00 00 09 01 00. These select:

- NTSC;
- normal (not square) pixels and a 720-pixel active line;
- interlaced output;
- composite and S-video outputs on;
- the pixel port enabled;
- SMPTE luma levels.

Whenever the colour-bar input changes it rewrites register 4, where bit 6
enables the encoder's test pattern. `i2c_tx` is a write-only byte
transmitter with a `load`/`ack` handshake per byte. Each bit takes four steps of a clock enable that fires every 27 clocks
(1 MHz), so SCL runs at 250 kHz.

## Switches and indicators

| Input | Use |
|---|---|
| `switch[1:0]` | picture select |
| `switch[2:0]` | solid-fill colour (R, G, B) when `switch[6]` = 0 |
| `switch[4]` | buckets from `bucket_gen` instead of the FFT |
| `switch[5]` | let `bucket_gen` rotate its pattern |
| `switch[6]` | frame buffer written by the visualizer (1) or the solid fill (0) |
| `switch[7]` | equalizer on: overlay and keys |
| `button_enter` | debounced (10 ms); up = test tone, held = microphone loop-back |
| `led` | inverted committed gain of bucket 0 |

The visualizer receives FFT bucket magnitudes divided by two, because its
bucket registers are 16 bits wide. The bucket generator's levels (0..255) are
doubled before that halving, so they cover the whole size range, ball
launches included.

## Where this design departs from, or fills in, the write-up

- Lens interiors are lightened with OR 0x7BEF. The write-up says "AND", but
  AND with that mask darkens a colour, and the stated aim was a lighter
  colour.
- For Cb the printed formula uses R, while the reference formula beside it
  uses B - Y. B - Y is used here.
- The frame buffer has 87480 words (360x243), as the text says. A block
  diagram labels it 64Kx16, which is too small for that frame.
- The equalizer products are 18 bits wide. The text says 17, the block
  diagram numbers the bus from bit 17, and the product needs at most 17 bits.
- The following are this design's own choices and are not given in the
  write-up:
  - field line numbers, blanking levels and the XY code encoding;
  - the encoder's I2C device address, and register bits for settings the
    write-up does not name (left at 0);
  - picture geometry, colours and ball physics constants;
  - the PS/2 receiver details;
  - the keyboard table (upper-case letters, digits, space, Enter, Backspace);
  - the bucket generator pattern;
  - the debounce time.
- With the button held, the headphones get the microphone samples. The
  original aimed to play the inverse-FFT output there, which was never built.

## Simulating

Every file in `rtl/` is one module or package, and `rtl/avs_pkg.sv` must be
read first. Each block has a self-checking testbench `tb/tb_<block>.sv`. It
prints `TB_RESULT checks=N failures=M` and stops; a watchdog ends a stuck run
as a failure. The I2C testbenches also use `tb/i2c_monitor.sv`, a passive bus
decoder. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_music_visualizer \
    -y rtl -y tb rtl/avs_pkg.sv tb/tb_music_visualizer.sv -o sim
./obj_dir/sim
```

What the two end-to-end testbenches do:

- **`tb_music_visualizer`** runs the whole design for seven frames, about
  6.3 million clocks, with a short tick, debounce and I2C step. Stand-ins
  provide the codec strobe, an FFT output stream and a PS/2 keyboard. The
  testbench decodes the encoder's I2C bus and the video stream, and:
  - keeps its own copy of everything written into the frame buffer;
  - checks every active video word against the converted pixel at that
    screen position;
  - checks the tone and loop-back samples, the equalizer products and the
    keyboard commit.

  It counts and requires each mechanism: timing codes, row and frame
  strobes, solid-fill and visualizer writes in all four pictures, FFT and
  generated buckets, key strokes, the overlay, products, the tone, the
  loop-back, and ball launches and returns.
- **`tb_music_visualizer_full`** is the same test with every parameter at
  its default (27 MHz timing throughout). At these settings balls take
  longer than the run to fall back, so only their launch is required.

Every testbench was also run against a deliberately broken copy of its block
and failed.
