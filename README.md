# Run-time reconfigurable video pipeline

A live 1080p video stream goes through a chain of filters, such as edge
detection, colour keying or text overlay. The chain can be rebuilt while the
system runs. No new FPGA design has to be compiled to do it.

The idea is to split the FPGA into two parts:

- **A fixed framework.** This holds the video input and output, a frame-buffer
  port, a 16x16 stream switch and a few helper blocks.
- **Eleven empty regions.** Each region can be loaded with one filter core
  from a library.

A processor connects regions, inputs and outputs in any order by writing the
switch registers. It then loads a core into each region that is used and sets
the core's parameters. On the FPGA, "loading a core" means partial
reconfiguration of that region. This RTL models it instead:

- each region contains all the cores that its size class can hold;
- a core-select register chooses which one is active.

Everything else runs the same way in both cases. All blocks exchange video as
AXI4-Stream beats, one pixel per clock.

## The stream format

Every video link carries one beat per clock with these fields (`vp_pkg::vbeat_t`):

| field  | bits | meaning                                   |
|--------|------|-------------------------------------------|
| `data` | 24   | pixel, `{r, g, b}` 8 bits each            |
| `user` | 1    | first pixel of a frame (start of frame)   |
| `last` | 1    | last pixel of a line (end of line)        |

Handshake rules:

- A beat moves when `valid && ready`.
- A producer holds its beat until it is taken. This rule is checked by
  assertions.
- There are no side channels. The frame size comes only from the two flags:
  - a core counts columns from the `last` flag;
  - a core counts rows from the `user` flag.

  As a result, every core works for any frame up to `MAX_WIDTH` pixels wide,
  and test benches run on small pictures.

## Framework (`vp_top`)

```
 HDMI in ──vid_in_axis──┐                    ┌──axis_vid_out── HDMI out
 frame buffer (read) ───┤                    ├── frame buffer (write)
 broadcaster out 0,1 ───┤   axis_switch      ├── broadcaster in
 Mux out 0,1 ───────────┤   16 x 16          ├── Mux in A (live), B (buffered)
 L0 M0 M1 M2 S0..S5 ────┘                    └── L0 M0 M1 M2 S0..S5 in
```

### Switch port map

| switch input | source               | switch output | sink                 |
|--------------|----------------------|---------------|----------------------|
| 0            | HDMI in              | 0             | HDMI out             |
| 1            | frame buffer (read)  | 1             | frame buffer (write) |
| 2, 3         | broadcaster outputs  | 2             | broadcaster input    |
| 4, 5         | Mux outputs          | 3, 4          | Mux A, Mux B         |
| 6 .. 15      | L0, M0-M2, S0-S5     | 5 .. 14       | L0, M0-M2, S0-S5     |
|              |                      | 15            | unused               |

### Region sizes

There are three sizes of basic region:

| size   | regions | cores it can hold                                     |
|--------|---------|-------------------------------------------------------|
| small  | S0-S5   | 12 cores                                              |
| medium | M0-M2   | the small set, plus Sobel and Kernel 3x3 (14 cores)   |
| large  | L0      | the medium set, plus Image Overlay (15 cores)         |

The eleventh region is the **Mux**, which holds the Green Screen core. It is
the only region with two inputs:

- input A is the live stream;
- input B is a stream that may wait, normally the frame buffer.

### What is outside the RTL

The following parts are vendor IP or hard silicon and are not built here:

- the HDMI decoder and encoder;
- the VDMA engine with its colour conversion and pixel packing;
- the DDR frame buffer;
- the processor with its configuration port.

Their streams and signals are ports of `vp_top`:

- `vin_*`: decoded input video (`de`, `vsync`, RGB);
- `vout_*`: output video with generated syncs;
- `vdma_s2mm_*` and `vdma_mm2s_*`: the two stream ends of the frame buffer;
- `s_axil_*`: the processor's AXI-Lite port.

One clock (`clk`) drives everything, and `rst_n` is a synchronous active-low
reset.

### Control map (`ctrl_bus`, byte addresses)

| address                      | what                                              |
|------------------------------|---------------------------------------------------|
| `0x0000`                     | switch control: write bit 1 = commit staged routes |
| `0x0040 + 4*m`               | route of switch output `m`: bits 3:0 input, bit 31 disable |
| `0x1000 + 0x100*slot + 4*r`  | core parameter `r` of region `slot` (write only)   |
| `0x2000 + 4*slot`            | core select of region `slot` (read/write)          |

The slot numbers are:

- 0 is L0;
- 1 to 3 are M0-M2;
- 4 to 9 are S0-S5;
- 10 is the Mux.

Core-select codes (`vp_pkg::core_id_t`):

| code | core      | code | core        |
|------|-----------|------|-------------|
| 0    | empty     | 9    | Erode       |
| 1    | Pass      | 10   | Dilate      |
| 2    | Threshold | 11   | Sobel       |
| 3    | Color Limiter | 12 | Kernel 3x3  |
| 4    | Draw Lines| 13   | ASCII text  |
| 5    | Invert    | 14   | Hiragana text |
| 6    | Grayscale | 15   | Image Overlay |
| 7    | Mirror    | 16   | Green Screen (Mux only) |
| 8    | Emboss    |      |             |

Loading behaves as follows:

- Loading a core holds the region in reset for one cycle, like a freshly
  configured region.
- Loading a core that does not fit the region's size leaves the region empty.
- An empty region accepts no beats.

### Example: capturing the input through the Color Limiter

This example captures the live input into the frame buffer through a Color
Limiter in S0, then shows the frame buffer on the output:

```
0x2010 <- 3          load Color Limiter into S0 (slot 4)
0x1400 <- 0xA0       S0 register 0: maximum red
0x0064 <- 0          switch output 9 (S0 in)    <- input 0 (HDMI in)
0x0044 <- 10         switch output 1 (FB write) <- input 10 (S0 out)
0x0040 <- 1          switch output 0 (HDMI out) <- input 1 (FB read)
0x0000 <- 2          commit
```

## Timing and flow control: the hard part

A live source cannot be stopped, but filters, the switch and the output must
all be allowed to apply backpressure. The design reconciles the two with the
rules below.

### Every block takes one pixel per clock at a fixed latency

Each core is a combinational stage followed by a shift register (`vid_pipe`).
The shift register pads the core to its latency:

| core | latency (cycles) |
|------|------------------|
| Pass | 2 |
| Threshold | 6 |
| Color Limiter | 3 |
| Draw Lines | 5 |
| Invert | 2 |
| Grayscale | 6 |
| Mirror | 4 |
| Emboss | 6 |
| Erode | 8 |
| Dilate | 8 |
| Sobel | 51 |
| Kernel 3x3 | 51 |
| ASCII | 11 |
| Hiragana | 11 |
| Image Overlay | 9 |
| Green Screen | 4 |

How the shift register behaves:

- It advances whenever its last stage is empty or being read.
- It never creates a bubble.
- Backpressure from the output stalls the core as a whole.

Latency is counted from the cycle a beat is accepted to the cycle it is first
valid at the output. Every unit test bench checks it.

The latencies of the other blocks are:

| block | latency |
|-------|---------|
| switch | 2 cycles per connection: an input buffer and an output register |
| broadcaster | 1 cycle |
| Mux frame aligner | 1 cycle |

The switch's input buffer has two entries and a registered `ready`. This keeps
a `ready` path from running combinationally through a long chain of regions.

### Neighbourhood filters run one line behind

These cores work on a 3x3 neighbourhood (`window3x3`):

- Emboss
- Erode
- Dilate
- Sobel
- Kernel 3x3

Each of them keeps two line buffers. It outputs the window centred one line
and one pixel behind the pixel now arriving, so one pixel comes out for every
pixel that goes in. The cost is that the picture shifts down and right by one
pixel. Output row 0 and column 0 are black. A missing neighbour at the top or
left edge is replaced by the centre pixel.

Mirror works the same way with a whole line. It writes line *r* into one
buffer while it reads line *r-1* backwards from the other. Its picture shifts
down one line, and the first line is black.

### The input cannot wait

`vid_in_axis` does three things:

1. It turns `de` and `vsync` into beats. It holds one pixel back so that the
   end-of-line flag can be set.
2. It marks the first pixel after a `vsync` as the start of frame.
3. It buffers the beats in a 32-entry FIFO. When the FIFO is full, a pixel is
   dropped and a sticky `vin_overflow` flag is set.

With the output locked to the input, nothing holds the stream back for long in
steady state.

### The output follows the stream

If no frame buffer is in the path, the output has to run on the input's pixel
timing. `axis_vid_out` therefore does not free-run. It works as follows:

1. **While unlocked**, it holds its raster at the first active pixel. It drops
   every beat that is not a start of frame.
2. **The first start of frame** is shown at once and starts the raster.
3. **While locked**, it takes one beat per active pixel.

Two things can go wrong while locked:

- **A missing beat** produces a black pixel and sets a sticky
  `vout_underflow` flag.
- **A start of frame in the wrong place**, or a first pixel that lacks one,
  drops the lock. The next frame then relocks.

The frame-buffer path uses the same mechanism. The test frame-buffer model
plays frames back to back, and the output locks to them.

One consequence shows up when routing is changed while video runs. The output
stays locked to the old stream's phase until it meets a misplaced start of
frame, and during that time it can stall the new chain by up to a blanking
interval. At 1080p this overflows the 32-entry input FIFO once. The picture
recovers at the next frame.

### The Mux aligns two frames

Two streams from different sources do not start their frames together. The
Mux's `stream_sync` handles this:

- While B is at a start of frame and A is not, B is held. A's beats pass
  unpaired, and Green Screen shows them unchanged.
- Once both frame starts meet, beats are taken in pairs and stay aligned.
- `mux_stall_cnt` counts the cycles in which B was held.

The result is fanned out to the two Mux outputs by an internal broadcaster.
Command register 8 is its enable mask and resets to both outputs.

### Route changes are atomic

Route writes go to a staging copy. A commit applies all staged routes in one
cycle. `route_commits` counts the commits.

## The core library

Parameters are command registers, written at `0x1000 + 0x100*slot + 4*r`.

| core | what it does | registers |
|------|--------------|-----------|
| Pass | copies the stream | none |
| Invert | `255 - x` on each channel | none |
| Grayscale | luma `(77R + 150G + 29B) >> 8` on all three channels | none |
| Threshold | white if luma >= threshold, else black | 0 threshold (reset 128) |
| Color Limiter | caps each channel | 0-2 maximum R, G, B (reset 255) |
| Draw Lines | paints two horizontal and two vertical bands | 0-1 rows, 2-3 columns, 4-7 widths (reset 0 = off), 8 colour |
| Mirror | left-right flip, one line late | none |
| Emboss | `centre - upper-left + 128`, clamped | none |
| Erode / Dilate | per-channel minimum / maximum over 3x3 | none |
| Sobel | `|Gx| + |Gy|` of the luma, clamped, as grey | none |
| Kernel 3x3 | `clamp(sum(k*p) >>> shift)` per channel | 0-8 signed 8-bit coefficients (reset identity), 9 shift |
| ASCII / Hiragana text | 8x8 glyphs scaled by 2^s at (x, y) | see below |
| Image Overlay | 128x128 picture at (x, y) | 0 x, 1 y, 2 enable, 3 write address, 4 write pixel (address auto-increments) |
| Green Screen (Mux) | foreground pixel inside [low, high] on all channels is replaced by the background | 0-2 low R, G, B; 3-5 high R, G, B (reset R 0-100, G 128-255, B 0-100) |

Some settings for Kernel 3x3:

| setting | kernel | shift |
|---------|--------|-------|
| blur    | `1 2 1 / 2 4 2 / 1 2 1` | 4 |
| sharpen | `0 -1 0 / -1 5 -1 / 0 -1 0` | 0 |

The two text cores share `text_overlay` and differ only in glyph-table size:
128 codes for ASCII and 96 for Hiragana. Their registers are:

| register | meaning |
|----------|---------|
| 0 | x |
| 1 | y |
| 2 | log2 scale (0-3) |
| 3 | colour |
| 4 | string length (0 hides the text) |
| 5 | write `{index[23:16], code[7:0]}` into the string |
| 6 | write `{code[23:16], row[10:8], bits[7:0]}` into the glyph table, bit 7 = leftmost pixel |

The picture in Image Overlay starts as a test pattern:

- red ramps with x;
- green ramps with y;
- blue is a 16-pixel checkerboard.

The processor can overwrite it through registers 3 and 4.

## How far to trust it, and where it departs from the original system

### Taken from the original system

These parts follow the original system:

- the block structure and region names;
- the 16x16 switch with its register programming and its two-cycle delay;
- the region size classes and which cores fit each;
- every core's latency;
- the one-pixel-per-clock rule;
- the Mux holding the buffered stream at its frame start;
- the need to carry the input's pixel timing to the output.

### Choices made in this design

These choices are this design's own:

- all register maps and core-select codes;
- the switch port numbering;
- the conflict rule when two switch outputs pick the same input (the
  lower-numbered output wins);
- the luma weights;
- how the 3x3 neighbourhood handles picture edges and its one-line shift;
- the Mirror's one-line shift;
- the glyph size and format;
- the Image Overlay's size and default picture;
- the output's locking rules;
- the input FIFO depth.

### Intentional departures

- **Partial reconfiguration becomes a core-select register.** Every region
  therefore contains its whole library. That is far larger than one region of
  the real device, and synthesis area figures for `prr_slot` mean nothing for
  the real regions.
- **There is no built-in font.** The text cores have no fixed ASCII or Hiragana
  bitmaps; glyphs are written at run time. A system using them must load a
  font first.
- **Each core's latency is padded.** The original cores' internal pipelines
  are unknown. Each core here computes in one stage and pads to its latency,
  so the latency matches but the timing of the arithmetic does not.
- **There is a single clock.** The original pipeline runs at 142 MHz, while a
  1080p60 raster with blanking needs 148.5 MHz. Here input, pipeline and
  output share one clock. With a separate pixel clock, the input and output
  would need clock-domain crossings, which are not built.

### Verification

Every block has a self-checking test bench in `tb/`:

- it compares outputs against a model computed in the test bench;
- it checks latency and throughput;
- it has a watchdog;
- it ends with a `TB_RESULT checks=N failures=M` line.

Two test benches exercise the full framework:

- **`tb_vp_top`** runs on a 16x8 raster. It plays the processor, the HDMI
  source, a frame-buffer model and an output monitor.
  1. It first runs the capture set-up shown in the example above.
  2. It then runs a green-screen chain:
     - mirror in M0;
     - broadcaster to the Mux and to the frame buffer;
     - frame-buffer background through Invert in S1 into Mux B;
     - Green Screen;
     - Draw Lines in L0;
     - HDMI out.

  Each phase has to deliver three complete output frames that match a
  reference picture. The test bench also counts commits, loads, parameter
  writes, Mux stalls, broadcaster copies, output relocks and keyed pixels, and
  fails if any of them never occurred.
- **`tb_vp_top_full`** runs the same two phases at the full 1920x1080 default
  size, one matching frame each. It takes about a minute and a half.
- **`tb_vp_top_edge`** builds the seven-stage edge detector on a 24x12 raster:
  Grayscale, blur kernel, Threshold, Erode, Dilate, Sobel, sharpen kernel.
  The Sobel and both kernels sit in the medium regions. The output has to
  match a stage-by-stage reference for two frames.
- **`tb_vp_top_green`** fills all eleven regions on a 24x12 raster and checks
  two frames against a stage-by-stage reference:
  - the background chain (Invert, text, lines from the frame buffer);
  - the live chain (Mirror, text, lines from HDMI);
  - Green Screen;
  - the final chain (Emboss, Color Limiter, text, Image Overlay).

## Files

### `rtl/`

Shared package:

- `vp_pkg`: types, core codes, region classes, luma.

Framework:

- `vp_top`
- `vid_in_axis`
- `axis_vid_out`
- `axis_switch`
- `axis_broadcaster`
- `ctrl_bus`

Regions:

- `prr_slot` (basic region)
- `prr_mux_slot` (Mux region)
- `stream_sync` (Mux frame aligner)

Core helpers:

- `vid_pipe` (latency shell)
- `pixel_counter`
- `window3x3`
- `text_overlay`

Cores:

- `pass_filter`
- `threshold`
- `color_limiter`
- `draw_lines`
- `invert`
- `grayscale`
- `mirror`
- `emboss`
- `erode`
- `dilate`
- `sobel`
- `kernel3x3`
- `ascii_overlay`
- `hiragana_overlay`
- `image_overlay`
- `green_screen`

### `tb/`

There is one `tb_<module>.sv` per block, plus `tb_vp_top_full.sv`,
`tb_vp_top_edge.sv` and `tb_vp_top_green.sv`.

## Simulating

Verilator 5 runs any test bench:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/vp_pkg.sv tb/tb_vp_top.sv --top-module tb_vp_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

To run another test bench, swap in its name.

The cores are parameterised:

- `MAX_WIDTH` sets the line-buffer size;
- `LAT` sets the latency.

`vp_top` takes the raster timing as parameters. It defaults to
1920x1080 with front porch / sync / back porch of 88/44/148 clocks
horizontally and 4/5/36 lines vertically.
