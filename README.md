# Streaming stereo: lookup-table rectification and SDPS matching

This design turns two raw camera streams into depth information while the
pixels are still arriving. It adds only a few scan lines of delay, not a frame.
It has two stages:

1. **Rectification.** Each camera stream is corrected for lens distortion and
   for misalignment between the cameras, in one pass. After correction, a scene
   point appears on the same scan line in both images.
2. **Correspondence.** Each pair of corrected lines is matched with Symmetric
   Dynamic Programming Stereo (SDPS). For every line this gives a disparity map
   and an occlusion (visibility) map. Both maps are in the *Cyclopean* view,
   seen from a virtual camera midway between the two, so they have 2W points
   per line.

The default parameters describe the reference configuration:

- 1024 × 768 pixels, 8-bit monochrome
- 64 buffered scan lines per camera
- disparities 0..40
- 65 × 65 distortion tables
- one clock at twice the pixel rate

## Top level: `stereo_top`

```
cam_l/cam_r ──► rectifier (left)  ──┐ rect_l/rect_r ──► sdps_matcher ──► disp_x/disp_d/disp_state
(cam_valid)     rectifier (right) ──┘ (rect_valid)      (disparity, occlusion map, right to left)
lut_*  ───────► displacement tables of either camera
```

| Port | Dir | Meaning |
|---|---|---|
| `cam_valid`, `cam_sof`, `cam_l`, `cam_r` | in | Raw pixel pair from synchronised cameras, at most every second clock. `cam_sof` marks the first pixel of a frame. |
| `lut_we`, `lut_cam`, `lut_axis`, `lut_waddr`, `lut_wdata` | in | Load one entry of a displacement table. `lut_cam`: camera (0 left, 1 right). `lut_axis`: 0 = X, 1 = Y. |
| `occ` | in | Occlusion penalty: the cost of a point seen by only one camera. |
| `rect_valid`, `rect_sof`, `rect_eol`, `rect_l`, `rect_r` | out | Corrected pixel pairs in raster order. |
| `disp_valid`, `disp_x`, `disp_d`, `disp_state`, `disp_last` | out | One map point per clock, from x = 2W−1 down to 0. `disp_state` is B = 00 (seen by both), MR = 01, ML = 11. `disp_last` marks x = 0. |
| `status[4:0]` | out | Sticky error flags: {rectifiers out of step, back-track overrun, matcher overrun, right rectifier overrun, left rectifier overrun}. |

### Input timing rules

Nothing in the design can stall the cameras, so the input must leave time in
three places:

- **Pixel rate:** at most one pixel pair every second clock.
- **Line blanking:** at least DMAX/2 + 2 idle pixel slots after each raw line,
  i.e. 22 slots at the defaults. The rectifiers put the same gap between
  corrected lines, and the matcher uses it to flush each line.
- **Frame blanking:** about SL/2 + 1 lines after the last raw line of a frame,
  which lets the rectifiers finish the frame.

If the input breaks these rules, the affected block sets its `status` bit.

A 1024 × 768 frame at 30 frames/s needs a clock of at least about 50 MHz
(2 × (1024 + 22) × 801 × 30).

## Rectification (`rectifier`)

Calibration gives, for each pixel of an ideal, perfectly aligned pinhole image,
a displacement to where that pixel actually lies in the raw image. A full table
would have one entry per pixel. Because the correction is smooth, a 65 × 65
grid per axis is enough, with one grid cell per 16 × 12 pixels. The rectifier
then works as a raster scanner over the ideal image. For each ideal pixel
(xi, yi):

1. **`pag`: displacement.** There is one instance per axis.
   - It reads the four grid entries A, B, C, D around the pixel in one cycle.
     `disp_lut` keeps two copies of each table, each with two read ports.
   - It interpolates them bilinearly (`bilerp`), using the pixel's position
     inside its grid cell.
   - Table entries are signed, with 4 fractional bits (1/16 pixel).
2. **`addr_gen`: neighbours.**
   - Adds the displacement to (xi, yi) and splits the result into an integral
     and a fractional part.
   - Forms the buffer addresses of the four raw neighbours.
   - Clamps any neighbour that falls outside the image or outside the buffered
     window to the nearest valid row or column. This copies valid pixels into
     the empty borders that misalignment leaves. If the border were dark
     instead, its sharp edge would produce false matches.
3. **`pix_shift_reg`: line buffer.**
   - A circular buffer of the last SL raw lines, with one write port and two
     read ports.
   - It reads neighbours A and B in one cycle and C and D in the next. This is
     why one corrected pixel takes two clocks.
4. **`intensity_calc`: intensity.** Runs the same bilinear interpolator on the
   four intensities with the 1/16-pixel fractions, rounded to the nearest
   integer.

`bilerp` evaluates A + (B−A)·xf + (C−A)·yf + (D+A−B−C)·xf·yf in two pipeline
stages.

From the start of an ideal pixel to its output takes 8 clocks.

#### When a row is started

Ideal row yi starts only once raw rows up to yi + SL/2 have been written, or
once the whole frame has arrived. This reserves:

- SL/2 rows for displacements pointing down;
- SL − SL/2 − 3 rows for displacements pointing up.

With good alignment, a smaller SL gives a proportionally shorter delay.

## Correspondence (`sdps_matcher`)

### The Cyclopean lattice

For left line gL and right line gR of width W:

- Cyclopean point x (0..2W−1) at disparity d pairs gL((x+d)/2) with
  gR((x−d)/2).
- Only points with x + d even exist.
- Each point is in one of three visibility states:
  - **B**: seen by both cameras;
  - **ML**: seen only by the left camera;
  - **MR**: seen only by the right camera.

Costs follow three recurrences:

```
C(x,d,B)  = |gL − gR| + min(C(x−2,d,B), C(x−2,d,MR), C(x−1,d−1,ML))
C(x,d,ML) = occ + min(C(x−1,d−1,ML), C(x−2,d,B))
C(x,d,MR) = occ + min(C(x−1,d+1,MR), C(x−1,d+1,B))
```

### The array

The array has DMAX/2 + 1 `disp_calc` blocks. Block j holds two cells, d = 2j
and d = 2j + 1, each with three cost registers. Each incoming pixel pair takes
two clocks:

- **Even phase:** all even cells update at x = 2k.
- **Odd phase:** all odd cells update at x = 2k + 1.

Because of the parity lattice, a cell needs one register per (d, state). When
a cell updates:

- its own registers still hold column x − 2;
- its neighbours' registers hold column x − 1.

### Pixel flow

Left pixels and right pixels travel through the blocks in opposite directions:

- **Left pixels** enter at the high-disparity end and move down.
- **Right pixels** pass a DMAX/2 + 1 slot delay line (`pix_delay`), then enter
  at disparity 0 and move up.

As a result, in column k, block j holds gL(k+j), gL(k+j+1) and gR(k−j). These
are exactly the pixels of its two lattice points.

After the W pixels of a line, the matcher inserts DMAX/2 + 1 flush slots. The
flush slots feed zeros, which stand for pixels outside the image.

### Predecessors and back-tracking

Each cell records which term won each minimum, in 4 bits:

| Field | Codes |
|---|---|
| ML | 0 = from B, 1 = from ML |
| B | 00 = B, 01 = MR, 11 = ML |
| MR | 0 = from B, 1 = from MR |

The disparity and column of a predecessor follow from the two states, so they
are not stored.

After each column pair, one word with every cell's record goes into
`pred_array`. This memory has two banks, so one line can be back-tracked while
the next line is written.

At the end of a line:

1. The best final state is the lowest cost at x = 2W−1. Only odd disparities
   exist in that column. Ties go to the lowest d, then B, MR, ML.
2. The costs are cleared.
3. `backtrack` walks the stored records from right to left. It emits one
   point per clock: x, d and state.

When the path steps two columns at once (to a B point), the skipped index gets
the disparity and state of the point it was reached from. The map therefore
has all 2W points.

### Latency

A line's map starts a few clocks after its last flush slot and takes 2W
clocks. At one pixel pair every second clock, that is one line time, so each
map is finished before the next line's map is due.

## Design choices and departures from the published method

- **Eq. 1 form.** The interpolator adds A, so it returns the interpolated
  value itself rather than its offset from A.
- **Disparity range.** Disparities run from 0 to DMAX inclusive, using
  DMAX/2 + 1 blocks. The right-pixel delay is DMAX/2 + 1 slots.
- **Predecessor width.** Each record uses the full 1 + 2 + 1 = 4 bits. It is
  not packed into fewer bits.
- **Line start.**
  - Costs start at 0 for every disparity and state.
  - Pixels outside the line count as intensity 0.
  - All 2W map points are output, including the edges where no true match
    exists.
- **Matching cost.** The mismatch measure is the absolute difference. `occ` is
  an input with no built-in value.
- **Number formats and rounding.**
  - Costs saturate at 20 bits.
  - Min ties go to B, then MR, then ML.
  - Fixed-point formats: 1/16 pixel for displacements, 8 fractional bits for
    positions inside a grid cell.
  - All rounding is half up.
- **Monocular points in the map.** Each ML or MR point in the map carries
  its own lattice disparity from the recurrences:
  - an ML run after a B point at d counts down d−1, d−2, …;
  - an MR point reports the disparity of the binocular point to its right.

  Some descriptions of SDPS instead label MR points with the disparity of the
  next binocular point to the left. Post-processing can relabel them either
  way.
- **Clocking.** There is a single clock, with a pixel strobe at most every
  second cycle. No divided pixel clock is used.
- **Predecessor store.** The predecessor store is an addressed two-bank
  memory, written forwards and read backwards. A shifting structure would give
  the same access order.
- **Table loading.** Tables are loaded at run time through a write port,
  rather than being compiled in.
- **Host interface.** The host link (PCIe, packing into 32-bit words) is not
  included. The camera receivers are not included either. The corrected
  pixels and map points leave as plain streams.

Parameters of `stereo_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `W`, `H` | 1024, 768 | Image size. |
| `SL` | 64 | Buffered raw lines per camera. |
| `PW` | 8 | Pixel width. |
| `CELL_W`, `CELL_H` | 16, 12 | Table grid spacing. The table is (W/CELL_W + 1) × (H/CELL_H + 1) entries. |
| `LW`, `DF` | 16, 4 | Table entry width and its fractional bits. |
| `DMAX` | 40 | Largest disparity. Use 64 or 100 for wider ranges. |
| `CW` | 20 | Cost register width. |
| `OW` | 8 | Width of `occ`. |

## Verification

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=… failures=…`. Two reference models, written
independently of the RTL, supply the expected values:

- **`rect_ref_pkg`:** bilinear interpolation by weighted sums.
- **`sdps_ref_pkg`:** a full-array SDPS matcher that fills the whole cost and
  predecessor arrays and back-tracks in software.

The end-to-end tests are:

- **`tb_stereo_top`: reduced size.** 64 × 48 images, 16 lines, disparities
  0..8, two frames.
  - Each camera has its own synthetic distortion.
  - Every corrected pixel and every map point is compared with the references.
  - It also counts that clamping, end-of-frame draining, line flushes, bank
    swaps and all three visibility states occurred.
- **`tb_stereo_full`: default parameters.** One full 1024 × 768 frame, about
  4.7 million checks. It runs in under a minute with Verilator.

- **`tb_stereo_workloads`: other configurations.** One full frame each,
  at five settings, run one after another:
  - 512-pixel lines with a 128-line buffer;
  - disparity ranges 0..64 and 0..100;
  - 12-bit pixels with an 8-line buffer;
  - 10-bit pixels with a 16-line buffer.

  Each run uses the `stereo_run` helper and does the same checks as the full
  test. Together they make about 21 million checks in roughly 1.5 minutes.

To run one test, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/stereo_pkg.sv \
    tb/rect_ref_pkg.sv tb/sdps_ref_pkg.sv tb/tb_stereo_top.sv --top-module tb_stereo_top
./obj_dir/Vtb_stereo_top
```

The simulator used has two-state logic only, so every register that is read
is reset.
