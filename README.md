# Bit-sliced median filter built from majority gates

A median filter replaces each sample by the middle value of the W samples
(W odd) in a window around it. It removes impulse noise ("salt and pepper")
while keeping edges sharp. Hardware median filters usually sort the window
or count ones with adder trees. This design does neither. It finds the median
one bit at a time, from the MSB down, and the only decision at each bit is a
**majority vote** over W bits. No adder, comparator or sorter is used. Each
bit position is a small stage made of W mask-and-set cells and one W-input
majority gate. N such stages, one per bit, are cascaded as a bit-pipelined
"bit-sliced" filter that delivers one median per clock.

The RTL holds two filters built on the same stages:

* `median_filter_2d`: the main system. It is a real-time 3x3 median filter
  for raster-scanned images. It has scan-line buffers, four selectable window
  shapes (square, cross, X, dot), arbitrary custom windows and a scan path
  for testing.
* `median_filter_1d`: the generic filter for a one-dimensional sequence,
  with a window of W samples.

`bsmf_top` places both side by side.

The structure follows the published design "Bit-sliced median filter design
based on majority gate". That work also designs the majority gate as a
transistor-level CMOS circuit. Here the gate is ordinary logic with the same
function. The section "Choices made here" lists the other decisions that the
published description leaves open.

## Selecting a median by majority votes

Each window element is in one of two states:

* **In the subset.** The element may still be the median. Its mask flag M is 1.
* **Out of the subset.** The element has been ruled out. Its mask flag is 0,
  and its setting flag S holds a fixed bit. That bit is used in place of the
  element's real bits from then on.

Every element starts in the subset (M = 1). Stage k takes the k-th most
significant bit B of every element and does three things:

1. **Vote.** Each element contributes C = B if M = 1, or C = S if M = 0. The
   majority of the W bits C is bit k of the median, written u.
2. **Mask.** An element in the subset whose bit B differs from u leaves the
   subset: M' = M AND (B == u).
3. **Set.** An element that leaves is frozen at ~u for all remaining bits. If
   it lost because its bit was 1 while the median has 0, it is larger than
   the median, so it becomes all ones from here on, a local maximum. The
   opposite case gives all zeros. In both cases S' = C holds: for an element
   leaving at this stage C = B = ~u, and for one already out C = S.

The substitution keeps the median at rank (W+1)/2 of all W elements at every
stage. So a plain majority is enough at every bit, and no count of the
remaining elements is ever needed. For binary values, majority and median are
the same thing.

Worked example (W = 9, N = 4). The window holds 6, 11, 13, 8, 5, 3, 7, 14, 2,
and the median is 7 = 0111.

| bit | C bits that vote (real bits / frozen bits) | ones | u | who leaves |
|-----|----------------------------------------------|------|---|------------|
| 3 | all nine real: 0 1 1 1 0 0 0 1 0 | 4 | 0 | 11, 13, 8, 14 leave, frozen at 1 |
| 2 | 6,5,3,7,2 give 1 1 0 1 0; four frozen 1s | 7 | 1 | 3, 2 leave, frozen at 0 |
| 1 | 6,5,7 give 1 0 1; four 1s, two 0s | 6 | 1 | 5 leaves, frozen at 0 |
| 0 | 6,7 give 0 1; four 1s, three 0s | 5 | 1 | result 0111 = 7 |

## The mask-and-set cell and one bit stage

`ms_cell` is the whole per-element logic, a few gates:

```
C  = M ? B : S
M' = M & ~(U ^ C)
S' = C
```

`median_stage` is one bit position. It holds W `ms_cell`s and one `maj_gate`.
The majority output u is fed back to every cell. The stage is
combinational. It brings the C bits out on `c` and takes the gate inputs on
`x`, so that a scan register can sit between them. A plain stage connects `x`
to `c`.

`maj_gate` returns 1 when at least (W+1)/2 of its inputs are 1. Its
`THRESHOLD` parameter turns it into a general equal-weight threshold gate;
the filters use the majority. It is written as a count of ones and a
compare. In the published design, the delay of this
gate does not depend on W. The gate is a divider of W inverters with their
outputs wired together, followed by an inverting buffer, and its threshold is
set by transistor sizing. That circuit has no RTL form. A synthesized
popcount gives the same function, with a delay that grows as log W.

## Bit slicing: skew and deskew

The N stages form a pipeline. The mask and set vectors computed by stage k
are registered and used by stage k+1 one clock later. Stage k+1 must
therefore work on the same window one clock after stage k did. This is
arranged as follows:

* The bit of each new sample destined for stage k (bit N-k) is delayed by
  k-1 cycles (skew) before it enters that stage's own window buffer.
* The median bit u produced by stage k is delayed by N-k cycles (deskew), so
  all N bits of a median arrive at the output together.

Each stage therefore has its own one-bit window buffer, plus one row of skew
delays and one row of deskew delays. Only single rows of delays are needed.
`delay_line` implements both rows.

**Timing.** Both filters take one word per clock and give one median per
clock. The median of the window whose newest sample is clocked in at edge t
is on the output after edge t+N. The latency is N cycles: k-1 skew, 1 window
register, N-k deskew, and 1 output register.

## The 3x3 image filter

`median_filter_2d` contains N copies of `image_bit_slice`, one per pixel bit,
MSB first. One slice contains, in order:

1. The skew delay for the pixel bit and for the shape control.
2. `window_buffer_2d`. This is three groups of three shift-register cells.
   The groups are joined by two `scan_line_buffer`s, each of LINE_WIDTH-3
   bits. Each group holds three neighbouring pixels of one line, and the
   three groups hold three consecutive lines.
3. `shaper`, which applies the selected window shape.
4. `median_stage`, with the scan register `c_scan_reg` between its M/S cells
   and its majority gate.
5. The register that passes M and S to the next slice.
6. The deskew delay.

`scan_line_buffer` is a circular buffer in a one-bit memory. It uses one
pointer, reads the oldest bit and writes the new bit into the same slot.

**Window positions.** Positions i = 1..9 run row by row from the top left.
Bit i-1 of a window vector is position i. Position 9 (bottom right) is the
newest pixel p. Position 5, the centre, is pixel p - LINE_WIDTH - 1.
`pix_out` is therefore the filtered value of the pixel one line and one
column behind the newest input.

**Image borders.** There is no border handling. Outputs whose window
straddles a line end, or the first two lines of a frame, are computed from
whatever pixels are in the buffers. Discard them, or pad the image.

### Window shapes

A shape drops some of the nine positions. Each dropped position is forced to
a constant: half of them to all ones and half to all zeros. Their effects on
the rank cancel, so the output is exactly the median of the positions that
are used.

```
square      cross       X           dot
* * *       1 * 1       * 1 *       1 1 1
* * *       * * *       1 * 0       1 * 0
* * *       0 * 0       * 0 *       0 0 0      (* = used)
```

There are two equivalent ways to apply a shape, chosen per pixel with
`by_ms`:

* **`by_ms = 0`:** the shaper in every slice replaces the dropped bits.
* **`by_ms = 1`:** the shapers pass the window unchanged. Instead, the MSB
  slice starts from M_1 = the shape's mask and S_1 = its forced values rather
  than all ones. The mask and set logic then carries the shape down through
  all the slices by itself.

Both ways give identical results, and the testbenches check this. The
shape, `by_ms` and `custom` travel through the skew delays together with the
pixel bits. A change therefore takes effect on exactly one output pixel, and
can be made at any pixel.

**Custom windows.** With `custom = 1` the MSB slice takes M_1 and S_1 from
the `m1` and `s1` inputs, which are given with each pixel. This allows any
window. Each position is either used (`m1` bit 1), counted as all ones
(`m1` bit 0, `s1` bit 1) or counted as all zeros (`m1` bit 0, `s1` bit 0).
The output is the median of the nine values after that substitution. To get
the median of just the used pixels, use an odd number of them, and force as
many positions to ones as to zeros. Other choices give other rank orders of
the used pixels.

### Scan path

The C bits between the mask-and-set cells and the majority gate cannot be
observed at the chip's pins. Each slice therefore has a 9-bit `c_scan_reg`,
and the N registers are chained: `scan_in` feeds slice 1 and `scan_out`
leaves slice N. The chain works as follows:

* **`test_mode = 0`.** The register is transparent to the data path, which
  runs normally.
* **`scan_en = 0`.** The register captures the C bits at every clock.
* **`scan_en = 1`.** The chain shifts by one bit per clock. The first bit out
  is bit 8 of slice N, followed by the rest of slice N, then slice N-1, and
  so on.
* **`test_mode = 1`.** Each majority gate sees its register instead of C.
  Shift a pattern in, drop `scan_en` for one cycle, and slice k's majority
  appears on `pix_out[N-k]` N-k+1 edges later.

The mask-and-set cells can be tested exhaustively with their 16 input
combinations. In normal use, tie `test_mode` and `scan_en` low.

## The one-dimensional filter

`median_filter_1d` uses the same stages. Each stage has a W-cell shift
register as its window buffer, and M_1 is all ones. `y_out` is the median of
the last W samples, N cycles after the newest of them. Its defaults (W = 9,
N = 4) are the sizes of the worked example above.

## Top level and parameters

`bsmf_top` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `img_pix_in` | in | N2D | image pixel, raster order, one per clock |
| `img_shape` | in | 2 | `bsmf_pkg::shape_e`: 0 square, 1 cross, 2 X, 3 dot |
| `img_by_ms` | in | 1 | shape applied through M_1/S_1 (1) or through the shapers (0) |
| `img_custom` | in | 1 | window taken from `img_m1` / `img_s1` instead of `img_shape` |
| `img_m1`, `img_s1` | in | 9 | custom M_1 and S_1, given with the pixel |
| `img_pix_out` | out | N2D | median centred on pixel p-LINE_WIDTH-1, N2D cycles after pixel p |
| `img_test_mode`, `img_scan_en`, `img_scan_in` | in | 1 | scan path control and data |
| `img_scan_out` | out | 1 | scan path output |
| `sig_x_in` | in | N1D | signal sample, one per clock |
| `sig_y_out` | out | N1D | median of the last W1D samples, N1D cycles after the newest |

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `N2D` | 8 | bits per pixel, which is also the number of bit slices |
| `LINE_WIDTH` | 512 | pixels per image line; must be at least 4 |
| `N1D` | 4 | bits per sample of the signal filter |
| `W1D` | 9 | window of the signal filter (odd) |

The 9-element window of the image filter is fixed by the 3x3 shape.

**Cost at the defaults.** Each image slice holds 2 x 509 bits of line buffer,
9 window cells, 9 scan cells and 18 M/S pipeline bits. The eight slices hold
about 8.1 kbit of memory in all. For W = 9, each stage has 9 three-gate cells
and one 9-input majority gate.

## Files

`rtl/` holds one module or package per file:

| file | role |
|------|------|
| `bsmf_pkg.sv` | window shape type, shape control struct, shape patterns |
| `bsmf_top.sv` | top level |
| `median_filter_2d.sv` | 3x3 image filter |
| `image_bit_slice.sv` | one bit slice of the image filter |
| `window_buffer_2d.sv` | one-bit 3x3 window buffer |
| `scan_line_buffer.sv` | one-bit scan line buffer |
| `shaper.sv` | window shaper |
| `median_filter_1d.sv` | one-dimensional filter |
| `median_stage.sv` | one bit stage of the median selection |
| `ms_cell.sv` | mask-and-set cell |
| `maj_gate.sv` | majority gate |
| `c_scan_reg.sv` | scan path register |
| `delay_line.sv` | skew and deskew delays |

`tb/` holds a self-checking testbench `tb_<module>.sv` for every module.
Each testbench prints `TB_RESULT checks=<n> failures=<n>`. The testbenches:

* compare every output against a reference median from sorting, at the exact
  latency;
* check the worked example above;
* check all window shapes in both shaping modes, and custom windows, with
  switching at any pixel;
* unload the scan chain and drive it.

`tb_bsmf_top` runs both filters end to end with short lines. It counts each
mechanism that occurs, and fails if one never occurs: each shape, each
shaping mode, custom windows, shape switches, impulses removed, scan capture and scan drive.
`tb_bsmf_full` runs one 512 x 512 frame through `bsmf_top` at its default
parameters and checks every output.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_bsmf_top \
    -y rtl -y tb +libext+.sv rtl/bsmf_pkg.sv tb/tb_bsmf_top.sv
obj_dir/Vtb_bsmf_top
```

Replace `tb_bsmf_top` with any other testbench name. For lint, run:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/bsmf_pkg.sv rtl/bsmf_top.sv
```

Lint reports unused clock and reset pins on zero-depth delay lines. This is
expected.

## Choices made here

These points are not fixed by the published description:

* **Pixel width and line width.** Pixels are 8 bits and lines are 512 pixels.
  Image size is not specified. Change `N2D` and `LINE_WIDTH` as needed.
* **Majority gate.** The gate is a popcount compare rather than the CMOS
  inverter divider, so the constant-delay property of that circuit does not
  carry over to synthesized logic.
* **Cross window.** Its pattern follows the shape drawing: corners forced
  1, 1 at the top and 0, 0 at the bottom, with the centre row and column
  used. A differently printed assignment would use only four positions, an
  even count, so it was not used.
* **Registers and latency.** Registers sit in the window buffer, between
  stages and at the output. This gives a latency of exactly N cycles.
  Reset is synchronous and active low. It clears all registers, but not the
  line-buffer memories.
* **Mapping of window positions.** The mapping of positions to time (newest
  pixel at the bottom right) is this design's choice. So is the encoding of
  the shape selector.
* **Shape control.** Both ways of applying a shape are built, and the choice
  between them is a run-time input. So is the custom window. The shape control is skewed with the
  data so that it can change at any pixel.
* **Scan path.** The published description only says that scan registers can
  be inserted between the M/S cells and the majority gate. Their control
  signals, shift order and chaining are this design's own.
* **Image borders.** Borders get no special handling.
* **Not included.** The bit-serial variant, in which one stage is reused for
  all N bits by feeding M' and S' back to itself, is not built. The
  transistor-level gate and its sizing are not built either.
