# Circular traffic-sign detector for PAL video

This is a streaming hardware pipeline that finds round red traffic signs in live
PAL video. It takes the BT.656 byte stream of a video decoder and produces a
short list of sign centres for every frame. It also sends the video back out to
an encoder, optionally marked up. The method has three steps:

1. **Colour.** Keep only the pixels that are red enough.
2. **Edges.** Run a Sobel operator on that binary mask.
3. **Radial symmetry.** Let every edge pixel vote for the point 16 pixels
   away along its gradient, where the centre of a circle of radius 16 through
   that pixel would be. The centre of a round sign collects many votes. Smooth
   the vote image, threshold it, and report the peaks.

The RTL follows the architecture of the thesis "Traffic Sign Detection Using
FPGA": the module split, the arithmetic, the memory layout and the cycle
budgets. Where that design leaves things open, the choices made here are marked
below and in the header comment of each file.

## Clocking and data rates

Everything except the I2C loader runs on one system clock, intended to be
200 MHz. The decoder's 27 MHz bytes enter as `bt656_valid` strobes, about one
strobe every 7.4 clocks. A luma sample (one pixel) arrives every 14.8 clocks.
That number drives the whole design:

- Every per-pixel stage accepts one pixel per cycle, so none of them limits the
  rate.
- One vote needs a read-modify-write of external SRAM: two 7-cycle accesses,
  14 cycles in all. That is just below 14.8, so an edge pixel can vote at full
  video rate without losing votes.

The I2C loader runs on its own 24.576 MHz clock (`clk_i2c`). It shares no
signals with the video path.

## Pipeline

```
bt656 ─► video_analyzer ─► rgb_conversion ─► color_threshold ─► sobel_edge_detector ─┐
   │          (timing)        (RGB + row/col)     (255 / 0 mask)    (gx, gy, edge)     │
   │                                                                                   ▼
   │                                  radial_symmetry: mag_calculation ─► 2 × divider ─► address_logic
   │                                                   ─► vote_sram_controller ◄─► external SRAM (O_n)
   │                                                   ─► vote_gaussian ─► detection_buffer ─► det_*
   └──────────────────────────────────► video_output ─► vout (BT.656 to the encoder)
clk_i2c: i2c_config ─► i2c_master ─► SCL/SDA (decoder and encoder registers)
```

### BT.656 timing (`video_analyzer`)

A BT.656 stream has no sync wires. Each line carries an EAV and an SAV code,
`FF 00 00 XY`, where `XY = {1, F, V, H, P3..P0}`:

- The analyser watches the last three bytes for `FF 00 00`.
- When it finds them, it latches F (field), V (vertical blanking) and H
  (0 = SAV, 1 = EAV) from the fourth byte.
- From these it derives `active_line`, `active_odd`/`active_even`, `hsync` and
  `vsync`, plus one-cycle `sav`/`eav` pulses.

The parity bits P3..P0 are not checked.

### Colour conversion and segmentation

**Conversion (`rgb_conversion`).** The active bytes after SAV come in the order
Cb Y Cr Y.

- A four-state machine sorts them into components.
- Both luma samples of a group use that group's Cb/Cr, so one line gives 720
  RGB pixels.
- The conversion is the BT.601 matrix in ×256 fixed point (298, 409, 208, 100,
  517), rounded and clipped.
- It is a 4-cycle pipeline.
- Lines are counted from the first active line after vertical blanking, which
  gives each pixel its field row (0..287) and column (0..719).

**Segmentation (`color_threshold`).** A pixel is red when all of these hold:

```
Ra ≤ R ≤ Rb,   G/R ≤ G'b,   B/R ≤ B'b
```

- The ratios are tested without a divider, as `256·G ≤ G'b_q8·R`.
- `dark_mode` selects the darker-scene set (Ra = 55, ratios 0.65 → 166/256)
  instead of the normal one (Ra = 75, ratios 0.45 → 115/256).
- The output is 255 for a red pixel and 0 otherwise, so the edge stage sees a
  binary image.
- Latency is 2 cycles.
- Only the red test is built.

### Edges (`sobel_edge_detector`)

This stage is the usual FPGA arrangement:

1. A two-line buffer (`line_buffer`) provides three vertically aligned pixels.
2. A 3×3 register window (`window_3x3`) holds the neighbourhood.
3. The Sobel masks are applied (`sobel_conv`).
4. `edge_magnitude` estimates the magnitude as `max(|Gx|,|Gy|) + min(|Gx|,|Gy|)/2`
   and compares it with `edge_thresh`.

Details:

- Latency is 4 cycles.
- Only interior window centres produce output.
- Coordinates are those of the window centre.
- `field_done` marks the last one.
- The gradients of non-edge pixels are forced to zero, so only edge pixels vote
  later.

**Sign convention.** `gy` is positive towards increasing row number. With that
convention, adding the normalised gradient to a pixel's position moves it
towards the centre of a bright disc. The mask here is bright: 255 inside the
sign.

### Radial-symmetry voting — the hard part

For an edge pixel p with gradient g, the positively affected pixel is

```
p+ = p + round_to_zero(16 · g / |g|)
```

The orientation-projection image O_n counts, for every pixel of the field, how
many edge pixels pointed at it. The chain that computes this is:

| step | block | what it does | cycles |
|---|---|---|---|
| 1 | `mag_calculation` | \|g\| with the same max+min/2 estimator; 16·gx and 16·gy by shifting; drops zero gradients | 2 |
| 2 | 2 × `divider` | 16·gx/\|g\| and 16·gy/\|g\|. Pipelined restoring division, one per cycle, truncating toward zero. Row/column travel as a tag. | 18 |
| 3 | `address_logic` | p+ row/column; drops votes outside the field; SRAM word `row·180 + col/4`, byte lane `col mod 4` | 2 |
| 4 | `vote_sram_controller` | read word, increment one byte (saturating at 255), write back | 7 + 7 |

Worked example: gx = 261 and gy = 229 give |g| = 375 and 16·g = (4176, 3664).
The offsets are then 11 columns and 9 rows.

**SRAM layout.** O_n is 288 × 720 bytes, too large for on-chip RAM. It lives in
the external 32-bit SRAM, four pixels per word: 51,840 words. The SRAM bus is
brought out of the top:

- `sram_en`/`sram_we`/`sram_addr`/`sram_wdata` are held for a whole 7-cycle
  access.
- `sram_rdata` is sampled in the last cycle of the access.
- Any synchronous SRAM with a read latency of up to 6 cycles works.

**Burst absorption.** An 8-entry FIFO in front of the controller absorbs bursts.
A vote that finds it full is dropped and reported on `vote_overflow`. At the
real video rate this cannot happen: a vote is never slower than a pixel.

**Every field votes.** The detector votes in every field. It reads O_n of
field k back during field k + 1 and shares the SRAM with that field's votes:

- The readout starts once `image_end` has passed the dividers.
- Between readout words, queued votes are served first.
- Each word is read and then written back as zero, so the next frame starts
  from an empty O_n without a separate clear pass.
- The four counts of each word stream out during the write.
- The pass takes 51,840 × 14 = 725,760 cycles, about 3.6 ms, well inside one
  field.
- The readout covers one O_n row in 180 × 14 cycles (12.6 µs). That is 25 µs
  even with a vote between every pair of words. A video line takes 64 µs, and
  the next field's active lines start only after the vertical blanking. So the
  readout stays ahead of the raster. A new vote (at most 16 rows below its
  pixel) only reaches words already read and cleared.

Because of this schedule, detections are one field (20 ms) old.

### Vote image and detections

**Vote image (`vote_gaussian`).** The vote image is F_n = min(O_n, 16): radial
strictness α = 1, and the normalising division by k_n = 16 left out. It is
convolved with the 3×3 Gaussian `[1 2 1; 2 4 2; 1 2 1]`, using a line buffer,
a window and shifts. A centre whose score S_n exceeds `shape_thresh` is a
candidate. The original design used a threshold of 50 for well-lit scenes, 40
for poorly lit ones and 35 for shadowed ones.

**Detection list (`detection_buffer`).** The offsets are truncated, and |g| is
an overestimate. As a result, the strongest responses of a real circle form a
small ring of 1–3 pixels around the true centre rather than a single peak. The
list handles this as follows:

- Each entry keeps the first candidate of a cluster.
- It also keeps the bounding box of all candidates within 16 rows and columns
  of that first candidate.
- The reported centre is the middle of the bounding box.
- At most 8 signs (`MAX_DET`) are kept per frame.
- The list is published when the readout ends, and `det_update` pulses on the
  first cycle of the new list.

### Video output (`video_output`)

The BT.656 stream goes back out one cycle late. Timing codes and blanking pass
unchanged. Active samples follow `view`:

| view | picture |
|---|---|
| 0 | camera |
| 1 | colour mask (white / black) |
| 2 | edge map (white / black) |
| 3 | camera inside a ±16-pixel square around each detection, white elsewhere |

The mask and edge bits go into one-line bit memories and are shown on the next
line. Those two views therefore lag the picture by about one line.

### Configuration of the video chips (`i2c_config`, `i2c_master`)

After `rst_i2c`, the loader walks an external table of `{7-bit device,
8-bit register, 8-bit value}` entries (`cfg_index` → `cfg_entry`). It writes
each entry as one I2C transaction:

```
START, address with R/W = 0, register, value, STOP
```

- A 384 kHz tick (24.576 MHz / 64) drives the bus, with two ticks per bit, so
  SCL runs at 192 kHz.
- The acknowledge is sampled at the end of the ninth clock.
- A missing acknowledge sets `cfg_error`.
- The pins are open drain: `*_oe = 1` pulls the line low.
- Clock stretching is honoured.
- The register values themselves are board-specific and are not part of this
  RTL.

## Top-level interface (`traffic_sign_detector`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | system clock (200 MHz intended), synchronous reset |
| `bt656_valid`, `bt656_in[7:0]` | in | decoder bytes |
| `dark_mode` | in | darker-scene colour thresholds |
| `edge_thresh[11:0]` | in | Sobel magnitude threshold (200 works for the binary mask) |
| `shape_thresh[9:0]` | in | S_n threshold (50 / 40 / 35) |
| `view[1:0]` | in | output picture |
| `sram_*` | out/in | O_n memory bus (18-bit word address, 32-bit data) |
| `vout_valid`, `vout_byte` | out | BT.656 to the encoder |
| `det_count`, `det_row[8]`, `det_col[8]`, `det_update` | out | detected centres (field row, column) |
| `vote_overflow` | out | a vote was dropped |
| `clk_i2c`, `rst_i2c`, `cfg_index`, `cfg_entry`, `cfg_done`, `cfg_error`, `scl_oe`, `sda_oe`, `scl_in`, `sda_in` | | start-up register load |

Parameters: `IMG_W = 720` and `IMG_H = 288` (one PAL field), `MAX_DET = 8`,
`CFG_ENTRIES = 16`.

Shared types are in `rtl/tsd_pkg.sv`: coordinates, the RGB struct and the
BT.656 timing struct.

## Where this differs from the original design

- **One clock.** The original used 50 MHz for line buffering, 200 MHz for
  conversion and SRAM, and a 350 MHz clock for the dividers. Here everything
  runs at 200 MHz, and the dividers are fully pipelined (one result per cycle,
  18 cycles latency).
- **Rounding.** Divider results truncate toward zero. This matches the
  original's worked example (4176/375 → 11), not its `round()` formula.
- **Vote image.** F_n is clipped at 16.
- **Kernel.** The Gaussian weights `[1 2 1; 2 4 2; 1 2 1]` are a power-of-two
  reading of σ = 0.85 on a 3×3 support.
- **Detection list.** The original kept its thresholded results in block RAM.
  Here a merged list of centres is kept instead.
- **Clearing O_n.** O_n is cleared by the readout itself. Counts saturate at
  255. Out-of-field votes are dropped. There is a vote FIFO with an overflow
  flag.
- **Schedule.** The original says detection catches up with the next field
  and runs 20 ms late. Interleaving the readout with the next field's votes,
  votes first, is this design's choice.
- **Output views.** Their encoding and the white level (Y = 235) are this
  design's.
- **Colour tests.** Only red-sign segmentation is built. The original mentions
  green and blue thresholds without giving them.
- **Radius.** Only radius 16 is searched, as in the original hardware.
- **Off-chip parts.** The external SRAM, the video decoder/encoder chips and the
  clock multiplier are not part of the RTL. The SRAM bus, BT.656 and I2C appear
  as top-level ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
against an independent model in the testbench and checks latencies where they
are part of the design:

| module | latency checked |
|---|---|
| `rgb_conversion` | 4 cycles |
| `color_threshold` | 2 cycles |
| `sobel_edge_detector` | 4 cycles |
| `mag_calculation` | 2 cycles |
| `divider` | 18 cycles |
| `address_logic` | 2 cycles |
| `vote_sram_controller` | 14 cycles per vote |
| `vote_gaussian` | 4 cycles |

`tb/sram_model.sv` (pipelined synchronous SRAM) and `tb/i2c_slave_model.sv`
(records write frames and acknowledges its own address) are simulation models.

`tb_traffic_sign_detector` runs the top at its default size:

- Two full 625-line PAL frames in BT.656 form, with bytes every 7–8 clocks.
- The picture contains a red disc of radius 16 and a dull-red patch that only
  the darker-scene thresholds accept. One line is sent at one byte per clock to
  overload the vote queue.

It checks:

- Pixel and mask counts per field.
- The detected centre (within 2 pixels).
- That votes are cast in every field, and that some votes are written while
  a readout is running.
- Views 0 and 3 byte by byte.
- Both readouts.
- The I2C load.

It also counts every mechanism and fails if one never occurs. It takes about
20 seconds with Verilator.

The synthetic disc has stepped left and right edges, because paired pixels
share a colour, and it peaks between 35 and 50. The end-to-end test therefore
uses the shadowed-scene threshold of 35. With real camera images, the original
work reports detection rates of about 85–92 % for well-lit scenes at threshold
50. That claim has not been re-measured here.

To run a testbench with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tsd_pkg.sv tb/tb_traffic_sign_detector.sv --top-module tb_traffic_sign_detector
./obj_dir/Vtb_traffic_sign_detector
```

Each testbench ends with `TB_RESULT checks=N failures=M` and has a cycle
watchdog. Smaller testbenches override `W`/`H` to keep runs short.

## Known limitations

- Detection quality depends on `edge_thresh`, `shape_thresh` and the colour
  thresholds. These are tuned per scene type; nothing here adapts them.
- Detections refer to field coordinates (rows 0..287). Rows are half-height
  relative to the full frame.
- Only one radius is searched. Signs much smaller or larger than about 32
  pixels across the field collect few votes.
- The video-output overlays for mask and edges are not compensated for their
  pipeline delay beyond the one-line memory.
