# Level-1 2D dual-tree complex wavelet transform on a data-split systolic array

This is synthesizable SystemVerilog for a processor that computes one level
of the two-dimensional dual-tree complex wavelet transform (DTCWT) of an 8-bit
image frame. The processor is meant to sit in front of an intra-prediction
coder that works in the complex wavelet domain. Such a coder needs 16 sub bands
per frame: 8 real and 8 imaginary. In each group, 2 are low pass and 6 are high
pass, one for each of six directional orientations.

A DTCWT runs two real wavelet trees side by side, "a" and "b", with filters
that are offset by one sample. Each tree decimates by two. One level in 2D
means a row pass and then a column pass:

* **Row pass.** Every row goes through the four filters La, Ha (tree a) and
  Lb, Hb (tree b). Each output is decimated by two.
* **Column pass.** Each tree's half of the row results goes through both
  filter pairs. This gives four separable trees: aa, ab, ba and bb.
* **Combining.** Sums and differences of the four trees give the real and
  imaginary sub bands.

All filters have 10 taps and small integer coefficients. The datapath is
exact integer arithmetic and nothing is rounded.

## The main idea: split every 10-tap product in two

A plain systolic array for 10 taps on 6 rows needs a 10 x 10 grid of cells.
This design splits each 10-tap inner product into two parts:

* an "MSB" part for taps 0..5;
* an "LSB" part for taps 6..9.

Each part is a multiply-accumulate (MAC) unit. The two MACs of one processing
element (`dtcwt_pe`) run in parallel over a six-cycle window:

| cycle (phase)   | 0   | 1   | 2   | 3   | 4   | 5   | 6 (E)     |
|-----------------|-----|-----|-----|-----|-----|-----|-----------|
| MSB MAC sample  | x0  | x1  | x2  | x3  | x4  | x5  |           |
| MSB coefficient | h0  | h1  | h2  | h3  | h4  | h5  |           |
| LSB MAC sample  | 0   | 0   | x6  | x7  | x8  | x9  |           |
| LSB coefficient | 0   | 0   | h6  | h7  | h8  | h9  |           |
| output register |     |     |     |     |     |     | Ra <= M+L |

* The LSB stream starts with two zero cycles, so both halves finish together.
* In the cycle after the sixth product, an adder combines the halves into the
  output register.
* The next window can start straight after the sixth product. Each processing
  element therefore gives one result every six cycles, using two multipliers.

`systolic_array` arranges these elements into `LANES` x `FILTERS` cells:

* **Lanes (6).** Six image lines are processed in parallel and share one
  control stream.
* **Array columns.** Each array column is one filter. Samples, window control
  and a tag move one register per array column. Filter *f* therefore answers
  one cycle after filter *f-1*.
* **Coefficients.** Each cell looks up its coefficients from the window phase
  that travels with the data. No coefficient bus is needed.

The row stage uses a 6 x 4 array: 48 multipliers, with the four filters one
cycle apart. Each column-stage unit uses a 6 x 2 array.

## Data flow and the window schedule

```
 pixels --> row_processor --------------------> row_output_memory --> column_processor --> subband_combiner --> results
  (valid/   tile_buffer (6 rows x N)             N rows x 2N words      4 x (6 x 2 array)     re = aa -/+ bb
   ready)   6 x 4 systolic array (La Ha Lb Hb)   La | Ha | Lb | Hb      aa ab ba bb           im = ab +/- ba
```

* **Tiles.** The frame (N x N, default 16) arrives in row-major order and is
  cut into tiles of six rows. With N = 16 the tiles hold 6, 6 and 4 rows. In the
  last tile, two lanes compute values that are thrown away.
* **Row-pass windows.** A tile is loaded into `tile_buffer`, then filtered. For
  each output position m = 0 .. N/2-1, the data control unit walks the six
  phases p. It reads sample 2m-4+p for the MSB half and sample 2m+p for the LSB
  half, in every row at once. Output m of a line is therefore

      y[m] = sum_{k=0..9} h[k] * x[ext(2m + k - 4)]

* **Boundary extension.** `ext()` is half-sample symmetric extension:
  x[-1] = x[0], x[-2] = x[1], and likewise past the right edge. It pads the
  frame with its own border pixels, carried on as far as a 10-tap window
  reaches. It is done by folding addresses; the padded frame is never stored.
* **Row output memory.** Row results go into `row_output_memory`. Each row is
  stored as La | Ha | Lb | Hb, with N/2 words in each section. Columns 0..N-1
  form the tree-a half and N..2N-1 the tree-b half.
* **Column pass.** `column_processor` reads this memory six columns at a
  time. It uses the same window schedule along the columns, with the same
  folding of row addresses. It does not wait for the whole frame (see below).
  There are four units, all running in lockstep:

  | unit | reads         | filter pair |
  |------|---------------|-------------|
  | aa   | tree-a half   | (La, Ha)    |
  | ab   | tree-a half   | (Lb, Hb)    |
  | ba   | tree-b half   | (La, Ha)    |
  | bb   | tree-b half   | (Lb, Hb)    |

  An assertion checks that the four units stay in lockstep.
* **Combining.** `subband_combiner` forms re1 = aa-bb, re2 = aa+bb,
  im1 = ab+ba and im2 = ab-ba. The 1/sqrt(2) normalisation is left to the
  consumer.

### Overlapping the row and column passes

The point of filtering six rows at once is that the column pass can start
early. Column window m reads rows 2m-4 .. 2m+5, folded at the frame edges, so
it only needs rows up to min(N-1, 2m+5). The first window needs rows 0..5,
which is exactly the first tile.

* **Counting complete rows.** The top keeps `rows_done`, the number of rows
  whose four row results are all in memory. It advances when a tile's last Hb
  result is written, which is the last filter of the last window.
* **Column loop order.** The column processor walks output rows m in its outer
  loop and column tiles in its inner loop. Before each window it waits
  (`wait_rows`) until `rows_done >= min(N, 2m+6)`.
* **Result.** The column pass starts as soon as the first tile has been
  filtered. It then follows the row pass down the frame, and most of it runs
  while later tiles are still being loaded and filtered.

### Filters

The table below gives the integer coefficients, tap 0 first. They are defined
once, in the `coef()` function of `dtcwt_pkg` (16-bit signed words), and
nowhere else.

| filter | taps 0..9                                    |
|--------|----------------------------------------------|
| La     | 0 -22 -22 178 178 22 -22 2 2 0                |
| Ha     | 0 -2 2 22 22 -178 178 -22 -22 0               |
| Lb     | 2 2 -22 22 178 178 22 -22 0 0                 |
| Hb     | 0 0 -22 -22 178 -178 22 22 2 -2               |

For every filter, the sum of |h| is 448. This sets the word widths:

| stage       | width          | worst case                  |
|-------------|----------------|-----------------------------|
| row result  | 18 bits signed | 448 x 255 = 114 240         |
| column result | 27 bits signed | 448 x 114 240            |
| combined    | 28 bits signed | sum or difference of two column results |

Note: La sums to 316 and Lb to 360. The two trees' low-pass gains are
therefore not equal. The values are kept as published; change `coef()` to use
a different set.

## Interfaces and timing (`dtcwt2d_top`, defaults N = 16, LANES = 6)

**Input.** Pixels come in on `pix_valid`, `pix_ready` and `pix_data[7:0]`, one
frame in row-major order. A pixel is taken on a rising edge where both valid
and ready are high. `pix_ready` is low at these times:

* while a tile is being filtered (3N cycles per tile);
* from the end of a frame's row pass until the column pass of that frame has
  finished. There is a single row output memory, so a new frame cannot enter
  while the previous one is still being read from it.

**Output.** There is one beat per column window, marked by `out_valid`:

* `out_high`: the column band (0 = low pass, 1 = high pass).
* `out_m`: the sub-band row.
* `out_col`: the first of six row-result columns. Lane *l* holds column
  c = `out_col` + *l*:
  * c < N/2 is the row low band, at sub-band column c;
  * N/2 <= c < N is the row high band, at sub-band column c - N/2;
  * lanes with c >= N are unused.
* `out_re1`, `out_re2`, `out_im1`, `out_im2`: the four values for each lane.

A frame gives 2 x ceil(N/6) x N/2 beats, which is 48 for N = 16. `frame_done`
pulses with the last beat.

With (row band, column band) = (L,L), (H,L), (L,H) and (H,H), the re/im pairs
make up the 2 low-pass and 6 directional sub bands of each of the real and
imaginary groups.

**Latency.** Measured from the first cycle of a window:

* Row filter *f* result: 7 + *f* cycles later.
* Column low-band result: 7 cycles later. High-band result: 8 cycles later.
* Combiner: one more cycle.

**Cycle budget for a 16 x 16 frame at one pixel per clock:**

| step                   | cycles                        |
|------------------------|-------------------------------|
| load three tiles       | 256                           |
| row filtering          | 3 x 48                        |
| column filtering       | 8 windows x 3 tiles x 6 = 144, mostly hidden behind the row pass |
| pipeline fill/drain    | about 10 at each stage change |

## Where this implementation departs from the published architecture

The descriptions this design follows are terse and partly inconsistent. These
are the points to know:

* **Latency.** The published design gives a first result after 10 cycles and
  the fourth filter's after 13. Here they come after 7 and 10. The one-cycle
  step between filters is the same; no padding cycles were added.
* **Throughput.** The published text claims 6 (and 24) outputs per clock. With
  six-cycle accumulation, which the same text describes, the true rate is 24
  results per six cycles for the 6 x 4 array. The RTL does the latter.
* **PE count.** One passage counts 36 + 16 processing elements (a 6 x 6 and a
  4 x 4 array). The built structure follows the more detailed description
  instead: two MACs per lane, 12 multipliers per filter, 48 for the row array.
* **Overlap granularity.** The column pass waits for whole tiles of rows,
  counted when the tile's last Hb result is written. It does not start within
  a few clocks of the first results.
* **Single buffers.** There is a single tile buffer and a single frame-sized
  row output memory, not a double-buffered pair of output registers.
* **Window alignment.** The window offset (-4) and the boundary rule
  (half-sample symmetric) are choices made here. The published design only
  pads the 16 x 16 image to 18 x 18 with its border pixels.
* **Last tile.** With N = 16 the last tile holds 4 rows and its two spare lanes
  idle. The published flow instead processes three full tiles of the padded
  18-row image.
* **Not included.** The intra-prediction coder that consumes the sub bands is
  not part of this RTL: mode search, sum-of-absolute-error decision,
  quantisation and entropy coding. The magnitude of real and imaginary parts
  that it uses is not included either.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference model
`tb/dtcwt_ref_pkg.sv` is written independently of the RTL: direct
convolutions with symmetric extension.

* `tb_dtcwt2d_top` sends three 16 x 16 frames (random, and a 0/255 pattern)
  with random input gaps, at default parameters. It checks every lane of every
  beat and the beat count per frame. It also counts that each mechanism
  happened at least once:
  * input stalls;
  * a frame waiting for the column pass;
  * column results produced while the row pass is still busy (overlap);
  * the column pass waiting for rows;
  * both frame edges;
  * both column bands;
  * the partial column tile.
* `tb_row_processor` and `tb_column_processor` check all results and the cycle
  timing above. The column test also releases rows slowly and checks that no
  window is issued before its rows are available.
* `tb_systolic_array` and `tb_dtcwt_pe` check results, tags and the 7 + f
  latency with back-to-back and gapped windows.
* `tb_mac_unit`, `tb_tile_buffer`, `tb_row_output_memory` and
  `tb_subband_combiner` cover the small blocks. The memory tests include the
  address folding.

All tests pass. To simulate one with Verilator (the two packages first):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dtcwt_pkg.sv tb/dtcwt_ref_pkg.sv rtl/*.sv tb/tb_dtcwt2d_top.sv \
    --top-module tb_dtcwt2d_top
./obj_dir/Vtb_dtcwt2d_top
```

## Changing it

* **Frame size.** Set `N` on `dtcwt2d_top`. It must be even and at least 8.
  Address folding handles any N of that kind. Tiles of 6 need not divide N.
* **Lanes.** Set `LANES` on `dtcwt2d_top` (2 or more). The end-to-end test has
  also been run with N = 8, 12 and 20 at 6 lanes, N = 16 at 2 and 4 lanes, and
  N = 32 at 8 lanes.
* **Filters.** Change `coef()` in `dtcwt_pkg`. If the sum of |h| grows beyond
  511, raise `GAIN_W` there.
* **Window.** The window split (6 + 4 taps, two lead-in zeros) and the window
  offset are constants in `dtcwt_pkg`.
