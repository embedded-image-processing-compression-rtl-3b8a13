# Processing unit for a 500 frame/s CMOS camera

A 1280 x 1024 sensor running at 500 frames per second delivers about 655 Mpixel/s:
ten 10-bit pixels on every edge of a 66 MHz clock. That is far more than a USB 2.0
link can carry (about 17 full frames per second), and more than common
single-pixel-per-clock compression cores can take. This RTL processes the stream
inside the FPGA, at its full width of ten pixels per clock, and without any frame
memory. It provides two independent chains on the same input:

* **Compression for long recordings.** A three-level one-dimensional 5/3 wavelet
  transform works on the rows, ten pixels per clock. The coefficients are put back
  into wavelet-line order and coded by one of two coders, selected with
  `comp_mode`. The first is threshold + run-length coding. The second is
  threshold + 8x8 quadtree block coding.
* **Real-time image analysis.** The image is binarised against a user threshold.
  Only the first and last column of every bright run of every row is sent.
  In parallel, a marker-extraction pipeline produces a binary image of small bright
  markers on a moving animal. It combines a region of interest found from the
  animal's right edge, the threshold image and a Sobel edge image, then applies an
  erosion.

Everything is in SystemVerilog-2017 and synthesizable. One module is in each file of
`rtl/`. Shared types and constants are in `rtl/hsc_pkg.sv`. There is a
self-checking testbench per module in `tb/`.

```
 px_data (10 x 10 bit) ──┬─> dwt3_pyramid ─> coef_fifo_bank ─> coef_serializer ─┬─> rle_coder   ─> rle_tok
 px_sof/sol/eol, valid   │    (3 x ls1d_10p,   (8 FIFOs)        (1 coef/clock)   └─> block_coder ─> bc_tok
                         │     approx_pack)
                         └─> marker_extract ──────────────────────────────────────────────────────> mk_bits
                              pixel_binarize ─ thr_bits ─> run_extract ───────────────────────────> run_evt
                              sobel_10p ─ edge_bits ─> roi_locator ─> ROI
                              (roi & thr & edge) ─> morph3x3 (erosion)
```

## Input stream

The top `hs_camera_top` receives one word of ten pixels per clock:

* `px_data[i]` is pixel `10*w + i` of the line, so lane 0 is the leftmost pixel.
* `px_valid` qualifies the word.
* `px_sol` and `px_eol` mark the first and last word of a line.
* `px_sof` marks the first word of a frame.

The input has no back-pressure, because a sensor cannot wait. Words may arrive
back-to-back, including across line and frame boundaries. Idle clocks between words
are also allowed.

`LINE_WORDS` (128) is the number of words per line. The image size, pixel width and
lane count are in `hsc_pkg` (`IMG_W=1280`, `IMG_H=1024`, `PIX_W=10`, `LANES=10`).
Coefficients are `COEF_W=16` bit signed.

## The wavelet transform at ten pixels per clock

### One level: `ls1d_10p`

The 5/3 (LeGall) wavelet splits a row into even and odd samples. Each odd sample
gives a detail coefficient, a prediction error against its two even neighbours.
Each even sample gives an approximation coefficient, a low-pass value. The lifting
form computes the approximation from the details. This RTL instead uses the
equivalent direct form, so that all ten lanes can be computed in the same clock
with no chain of dependencies:

```
d[k] = (2 x[2k+1] - x[2k] - x[2k+2]) >>> 1
s[k] = (-x[2k-2] + 2 x[2k-1] + 6 x[2k] + 2 x[2k+1] - x[2k+2]) >>> 3
```

One word holds ten samples, i.e. five even/odd pairs. The five detail filters
(predict) and the five approximation filters (update) are therefore five copies
each of two small adder trees. The filters reach at most two samples to each side,
so the outermost lanes need the neighbouring words:

* The module keeps the previous word in a register.
* It emits a word's coefficients only when the next word of the line has arrived.
* The last word of a line is flushed one clock after it arrives.

The output therefore lags the input by one word, plus one clock at the line end.
No idle clock is needed between lines. At the ends of a line the signal is mirrored
(`x[-1]=x[1]`, `x[N]=x[N-2]`). The division is an arithmetic shift of the full sum,
i.e. floor rounding.

Output: five details and five approximations per input word, with first/last flags.

### Three levels: `dwt3_pyramid` and `approx_pack`

Level 1 halves the data rate, and each further level halves it again. Each level
consumes full 10-sample words, so `approx_pack` joins two successive groups of five
approximations into one word: the first group goes to lanes 0–4 and the second to
lanes 5–9. The three levels are identical `ls1d_10p` instances. Because of the
packing, the line length must be a multiple of 40 pixels. 1280 is.

The pyramid has four outputs, each a group of five coefficients with
valid/first/last: detail levels 1, 2 and 3, and approximation level 3. They appear
at unrelated times. Level 1 produces a group on every input word, while level 3
produces one group every fourth word.

### Rebuilding the wavelet line: `coef_fifo_bank` and `coef_serializer`

A wavelet-transformed line is laid out as `A3 | D3 | D2 | D1`, that is 160 + 160 +
320 + 640 coefficients for 1280 pixels. The coders need this order, while the
pyramid produces the four bands interleaved in time. The bank therefore holds eight
FIFOs: one per band for even lines and one per band for odd lines. The write side
picks the FIFO set from the line parity, so line *n+1* can be written while line
*n* is read out. The depths hold one line of each band, in groups of five:

| band | depth (groups) |
|------|----------------|
| D1   | LINE_WORDS     |
| D2   | LINE_WORDS/2   |
| D3   | LINE_WORDS/4   |
| A3   | LINE_WORDS/4   |

A line counts as complete when its last A3 group has been written. A3 is the last
band to finish, because it comes out of the deepest level. `lines_ready` counts
complete lines. `overflow` is sticky and set when a group meets a full FIFO; that
group is lost.

`coef_serializer` waits for a complete line and reads it band by band in the order
A3, D3, D2, D1. It sends one coefficient per clock with its band (`out_band`) and an
end-of-line flag, over a valid/ready handshake. After the last coefficient it
releases the line.

### Run-length coder: `rle_coder`

Approximation coefficients pass unchanged as `RLE_APPROX` tokens. For detail
coefficients:

* A coefficient with `|c| < coef_thr` counts as zero.
* Consecutive zeros become one `RLE_RUN` token whose `value` is the run length.
* Any other detail is sent as `RLE_LIT`.

Runs stop at the end of a line. The last token of a line carries `eol`. When a
literal ends a run, two tokens are due, so the input is held for one clock. A token
is `rle_tok_t {kind, eol, value}`.

### Block coder: `block_coder`

Thresholded coefficients (any coefficient with `|c| < coef_thr` becomes 0, whatever its band) are
written into eight line memories of `LINE_LEN` = 1280 entries. Once eight lines are
stored, the coder walks the 160 windows of 8x8:

1. Load the window, one column per clock. Each clock reads the same address from
   all eight memories.
2. If all 64 values are equal, send `BC_U8` with the value.
3. Otherwise, for each 4x4 quadrant (TL, TR, BL, BR): send `BC_U4` if it is uniform.
   If not, visit its four 2x2 blocks: send `BC_U2` if a block is uniform, else four
   `BC_RAW` values in raster order.

While the window buffer is being coded, `in_ready` is low. The coefficient FIFOs in
front absorb what the sensor delivers in the meantime. Tokens are
`bc_tok_t {kind, value}`. The reader can rebuild the image from the token sequence
alone, because the quadtree order is fixed.

## Binarisation and run coding

`pixel_binarize` compares each pixel with `bin_thr`: `pixel >= thr` gives 1. It adds
one clock of latency.

`run_extract` codes each row of the binary image as the columns where runs of 1s
start and end:

1. For each word it forms a 21-bit mask: a start and an end bit per lane, plus
   "run open at end of row".
2. The left neighbour of lane 0 is the last bit of the previous word, and 0 at a
   row start.
3. Every word with at least one limit is written, with its row and word column,
   into one 512-deep FIFO, i.e. one block RAM.
4. A serializer behind the FIFO sends the limits one per clock, as
   `run_evt_t {is_end, x, y}`, in column order.

Only words with limits use FIFO space. A busy row can still fill the FIFO; `overflow`
(sticky) then reports lost words. The method is meant for images with few, large
bright regions.

## Marker extraction

`marker_extract` builds the marker image for tracking leg markers on a running
mouse:

1. **Threshold image.** `pixel_binarize` with `bin_thr`: the markers are bright.
2. **Edge image.** `sobel_10p` magnitude compared with `edge_thr`.
3. **Region of interest.** `roi_locator` looks for the rightmost edge pixel between
   rows `roi_y0` and `roi_y1` (the animal's nose). The ROI is the column range
   `[right - roi_len, right]` over those rows. The edge found in one frame sets the
   ROI of the next frame, so no frame store is needed. If a frame has no edge, the
   old ROI stays. `roi_x0/roi_x1` are outputs.
4. **Merge.** The three binary images are ANDed bit by bit: ROI, threshold, edge.
5. **Erosion.** `morph3x3` with `OP=0` removes isolated pixels.

Threshold and ROI bits are delayed to line up with the Sobel output. `mk_bits`
appears three clocks after the input word, without back-pressure. The 3x3 operators
refer to the window that ends at the current pixel, so the marker image is shifted
by one row and one column against the input. A host that wants centred coordinates
subtracts one from each.

### The parallel Sobel filter: `sobel_10p`

The two Sobel components are separable, and both factorise into first-order filters
on the raster stream. With `N` pixels per line:

```
g1 = F (1 + z^-1)^2 (1 - z^-2N)     horizontal smoothing, vertical difference
g2 = F (1 + z^-N)^2 (1 - z^-2)      vertical smoothing, horizontal difference
g  = |g1| + |g2|
```

The vertical terms need `f[i-N]`, `f[i-2N]` and `a[i-N]`, where `a = f + f z^-N`.
They come from three `line_delay` instances, each a circular buffer of
`LINE_WORDS` words of 100 bits (ten pixels). This replaces a textbook 3x3 window
with six line stores. The horizontal terms `z^-1` and `z^-2` need pixels one and
two positions to the left, so lanes 0 and 1 take lanes 8 and 9 of the previous word
of the same stream, which is kept in a register. Ten copies of the adder structure
produce ten magnitudes (13 bits) per clock, one clock after the input.

The stream is treated as one continuous raster: the window of the first column
reaches back into the end of the previous line, and line stores read zero until
they have been filled once after reset. Edge pixels in the first two columns and
rows of an image are therefore not meaningful. This matters only at the image
border.

`morph3x3` uses the same structure on one-bit pixels. Two line delays give the
three rows, and the previous word gives the two pixels on the left. It computes the
AND (erosion, `OP=0`) or OR (dilation, `OP=1`) of the 3x3 neighbourhood.

## Throughput and limits

| path | accepts | at 66 MHz |
|------|---------|-----------|
| wavelet (`dwt3_pyramid`), binarisation, Sobel, marker image | 10 pixels/clock, no gaps | 660 Mpixel/s, enough for 1280x1024 at 500 frames/s |
| `coef_serializer` → `rle_coder` | 1 coefficient/clock | 66 Mcoef/s |
| `coef_serializer` → `block_coder` | < 1 coefficient/clock (stalls while coding) | < 66 Mcoef/s |
| `run_extract` output | 1 event/clock | depends on image content |

The transform runs at the full sensor rate, but the coders are serial and take one
coefficient per clock. A full-size 500 frame/s stream therefore overflows the
coefficient FIFOs (`coef_overflow`). Full-rate compression needs one of these:

* a faster coder clock;
* several coders working on separate lines;
* a smaller image or a lower frame rate (about 50 full frames/s, or 500 frames/s
  on a tenth of the image).

Memory use at the default sizes is about 269 kbit in total:

| block | memory |
|-------|--------|
| block-coder line store | 8 x 1280 x 16 bits |
| coefficient FIFOs | 2 x 1280 x 16 bits |
| Sobel line stores | 3 x 128 x 100 bits |
| erosion line stores | 2 x 128 x 10 bits |
| run FIFO | 512 x 43 bits |

`comp_mode` should be changed only between frames, when the coefficient path is
empty. The inactive coder receives no data.

## Where this design makes its own choices

The structure follows the camera design it implements: ten-pixel parallel 5/3
wavelet with three cascaded levels, eight coefficient FIFOs, threshold + RLE and
threshold + 8/4/2 block coding, row-wise start/end run coding in one memory block,
a Sobel filter factorised into first-order filters with 100-bit line FIFOs, and
marker extraction by ROI + threshold + edges + erosion. The following are this
design's own choices:

* Rounding of the wavelet filters (floor of the direct-form sum) and mirror
  extension at line ends.
* Order of bands in the wavelet line (A3, D3, D2, D1), FIFO depths and the
  serial readout.
* All token formats (`rle_tok_t`, `bc_tok_t`, `run_evt_t`), the "`|c| < thr` is
  zero" rule, "uniform means all values equal", and the quadrant order.
* Block coder scheduling: single-buffered, with the input stalled while coding.
* The merge operator (AND), the 3x3 square structuring element, and the ROI rule
  (rightmost edge pixel in a user-given row band, ROI from the previous frame).
* Raster-stream treatment of image borders in Sobel and erosion.
* Sticky overflow flags instead of stopping the sensor.

Not included:

* The Huffman stage that follows the block coder. No code table is defined for it.
* The sub-pixel centre-of-gravity computation of the markers.
* The optional adaptive (Niblack) threshold.
* The sensor controller, the USB 2.0 interface and the board memories. The top
  brings their signals out as ports: the pixel stream in, and the token and event
  streams out with `ready` inputs.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops with
`$finish`. Each also has a watchdog. The reference models in `tb/hsc_ref_pkg.sv` are
written independently of the RTL: a plain 1D 5/3 transform, a direct 3x3 Sobel, a
direct 3x3 erosion, and so on. With Verilator 5:

```
F="rtl/hsc_pkg.sv tb/hsc_ref_pkg.sv $(ls rtl/*.sv | grep -v hsc_pkg) tb/hs_camera_tb_core.sv"
verilator --binary --timing --assert -Wno-fatal $F tb/tb_hs_camera_top.sv \
          --top-module tb_hs_camera_top -o sim && obj_dir/sim
```

Replace the last file and the top name for any other testbench, for example
`tb/tb_sobel_10p.sv` and `tb_sobel_10p`.

* `tb_<module>` tests one module against the reference model with random data,
  random idle cycles and random back-pressure where the module has `ready`. Small
  line lengths keep the runs short.
* `tb_hs_camera_top` runs the whole unit on 40-pixel lines of 24 rows for three
  frames:
  * an RLE frame;
  * a block-coded frame;
  * an RLE frame sent at the full input rate, so that the coefficient FIFOs
    overflow.

  In the first two frames the test waits before each line until the FIFO set it
  will write is free. It checks every output stream against the models, with random
  `ready` on the outputs. It counts the mechanisms: each token kind, run limits,
  marker pixels, ROI moves, the mode switch and the coefficient overflow. A
  mechanism that never happens counts as a failure.
* `tb_hs_camera_full` runs the same checks with the top at its default parameters
  (1280 x 1024, three frames, without the overflow frame). It takes about half a
  minute in Verilator.

`hs_camera_tb_core` holds the shared end-to-end test. Its parameters `LW` (words per
line), `ROWS`, `OVF_FRAME` and `WATCHDOG` set the size.
