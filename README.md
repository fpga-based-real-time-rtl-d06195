# Streaming Gaussian + Sobel image pipeline

This is a pixel-streaming FPGA pipeline for real-time edge detection on
grayscale video. Each frame is first smoothed with a 3x3 Gaussian filter to
suppress noise, then a 3x3 Sobel operator measures the edge strength of the
smoothed image. The pipeline takes one pixel per clock and needs no frame
buffer on chip: two rows of each image are kept in block RAM, and all other
state is a few registers. The host gets back both images, the smoothed one
and the edge map.

The target is 640x480 video at 60 frames/s on a 132 MHz clock. At one pixel
per clock a frame needs about 308,000 clocks, or 2.3 ms, so the pipeline has
about 7 times the headroom that frame rate requires.

```
 host memory                                                     host memory
 (read port)                                                     (write port)
     |                                                                ^
 dma_reader -> window_3x3 -> gaussian_3x3 -> window_3x3 -> sobel_3x3 -> dma_writer
   FIFO,        line buffer   4-stage         line buffer   4-stage     {edge, smooth}
   credits      + flush       pipeline        + flush       pipeline    per pixel
```

## Data formats

* Input pixels are 8-bit unsigned grayscale. One pixel sits at each host
  address, and a frame is stored in raster order.
* Each output pixel is one 16-bit word, `out_word_t = {grad, smooth}`. It is
  written at `dst_base + n` for input pixel `src_base + n`:
  * `grad` is the Sobel edge strength, `|Gx| + |Gy|` clipped to 255.
  * `smooth` is the Gaussian-smoothed pixel.
* Kernel arithmetic is done in 16-bit signed fixed point (`acc_t` in
  `img_pkg`). The largest intermediate values are 4080 (Gaussian sum) and
  ±1020 (each Sobel gradient), so 16 bits never overflow.

## The kernels

**Gaussian.** The kernel is `(1/16)·[1 2 1; 2 4 2; 1 2 1]`. Every weight is a
power of two, so all nine multiplications are wired shifts. The result is
rounded to the nearest integer, `(sum + 8) >> 4`. The pipeline has four
stages: weighting, the three row sums, the total, and normalisation.

**Sobel.** The masks are `Gx = [-1 0 1; -2 0 2; -1 0 1]` and
`Gy = [-1 -2 -1; 0 0 0; 1 2 1]`. The pipeline computes:

1. the weighted sums of the left and right columns, and of the top and bottom
   rows;
2. their differences, which are Gx and Gy;
3. the absolute values;
4. the sum of the absolute values, clipped to 255.

The magnitude is `|Gx|+|Gy|` rather than the square root of the sum of
squares. The output is the edge strength, not a thresholded binary map.

Both kernels are fully unrolled, so each takes one window per clock, with a
latency of 4 clocks.

## How the 3x3 window is formed (window_3x3, line_buffer)

This is the least obvious part of the design.

**Line buffer.** `line_buffer` is a delay line of `IMG_W` words in a simple
dual-port block RAM:

* Every pixel step writes one word and returns the word written `IMG_W` steps
  earlier, which is the pixel directly above.
* Each word holds two pixels, so a single memory gives both earlier rows. At
  each step the buffer returns `{row y-2, row y-1}` for the current column.
* The word written back is `{row y-1, incoming pixel}`.
* The read port is registered, and it always holds the oldest word in
  advance. On a step it already reads the next address. Read and write
  therefore never use the same address in one clock, and the data is ready
  before the step that uses it. This lets the input run at full rate with
  random gaps.

**Window registers.** The three taps are the two rows from the buffer and the
incoming pixel. They shift into the right-hand column of a 3x3 register
window. The window centre lags the input by `IMG_W + 1` pixels: one row and
one column.

**Flush.** At the end of a frame, `window_3x3` inserts `IMG_W + 1` flush steps
with zero pixels. It holds `in_ready` low while it does this. As a result:

* the last row of a frame comes out straight away, without waiting for the
  next frame;
* every frame of `IMG_W*IMG_H` pixels produces exactly `IMG_W*IMG_H` windows.

**Border.** A window whose centre is on the outermost row or column is flagged
`win_border`. Such a window reaches outside the image, and its contents are
whatever the buffer held. Both kernels output 0 for a flagged window. The
Sobel stage sees these zeros in the smoothed image, so it reports strong
edges one pixel inside the frame. This boundary artefact is expected.

**Stalls.** Only the reader side of the pipeline can stall. Everything after
the first window generator runs without back-pressure. The second window
generator also has to flush for `IMG_W + 1` clocks. That flush always fits in
the gap the first generator leaves between frames: it flushes for `IMG_W + 1`
clocks, and it then needs `IMG_W + 1` new pixels before it emits again. An
assertion in `img_proc_top` checks that no smoothed pixel ever arrives while
the Sobel window generator is flushing.

## DMA and host interface

`dma_reader` fetches pixels from host memory and `dma_writer` writes the
results back.

**Read port.** `rd_req` and `rd_addr` are held until `rd_gnt`. Read data
returns in request order on `rd_rvalid`/`rd_rdata`, with any latency.

**Reader flow control.** The reader has a FIFO of `FIFO_DEPTH` entries (4 by
default) and issues requests on credit. It never has more than `FIFO_DEPTH`
reads granted but not yet delivered to the pipeline. Read data in flight
therefore always has room, even while the window generator is flushing.
When the memory grants every cycle, the reader delivers one pixel per clock.

**Write port.** The writer emits `wr_en`/`wr_addr`/`wr_data` and assumes the
memory accepts one write per clock. It has no back-pressure input.

**Control.** To start, pulse `start` with `src_base`, `dst_base` and
`num_frames`. `busy` stays high while work remains. `done` pulses in the same
clock as the last write. One transfer may cover any number of back-to-back
frames.

## Timing

| quantity | value |
|---|---|
| throughput | 1 pixel/clock while the memory keeps up |
| window_3x3 | window is out 1 clock after the step that completes it |
| gaussian_3x3, sobel_3x3 | 4 clocks each |
| pixel n to its output word | 11 clocks after input pixel `n + 2*(IMG_W+1)` is accepted; 2*(IMG_W+1)+11 = 1,293 clocks at 640 wide and full rate |
| one 640x480 frame, start to done | 308,497 clocks = 2.34 ms at 132 MHz (up to 428 frames/s) |
| back-to-back frames | IMG_W*IMG_H + IMG_W + 1 clocks per frame |
| on-chip storage at 640 wide | 2 line buffers × 640 × 16 bits = 20,480 bits |

## Files

| file | contents |
|---|---|
| `rtl/img_pkg.sv` | pixel, accumulator, window and output-word types |
| `rtl/line_buffer.sv` | block-RAM row delay line |
| `rtl/window_3x3.sv` | 3x3 window generator with flush and border flag |
| `rtl/gaussian_3x3.sv` | Gaussian kernel pipeline |
| `rtl/sobel_3x3.sv` | Sobel kernel pipeline |
| `rtl/dma_reader.sv`, `rtl/dma_writer.sv` | DMA engines |
| `rtl/img_proc_top.sv` | the whole pipeline (parameters `IMG_W`=640, `IMG_H`=480, `ADDR_W`=32, `FIFO_DEPTH`=4) |
| `tb/host_mem_model.sv` | behavioural host memory: random grant refusals and read latencies |
| `tb/img_ref_pkg.sv` | integer reference model of both kernels and a test-picture generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_img_proc_top_full` and `tb_video_stream` at full size |

## Verification

Every testbench checks its outputs against values computed independently in
the testbench. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* **Unit tests** check the following:
  * `line_buffer` returns the word written exactly `DEPTH` steps earlier.
  * `window_3x3`: the raster order, the border flag, all nine pixels of each
    interior window, the latency in normal steps and in flush steps, and the
    flush length.
  * `gaussian_3x3` and `sobel_3x3` match the reference arithmetic, including
    clipping and border zeroing, with a latency of exactly 4.
  * `dma_reader`: one pixel per clock at full memory speed, data order under
    random refusals, random latencies and random sink back-pressure, and the
    credit rule.
  * `dma_writer`: write addresses, data and timing.
* **`tb_img_proc_top`** runs 16x12 frames end to end. It runs two frames at
  full memory speed, with a clock-count check, then three frames with 30%
  refused reads and latencies of 1–6 clocks. It compares every output word
  with the reference model. It fails if any of these never happened: the
  flush of either window generator, reader stalls, refused reads, border
  zeroing, or edge clipping.
* **`tb_img_proc_top_full`** runs one 640x480 frame at the default
  parameters. It checks all 307,200 words and the clock count, and confirms
  that the count gives at least 60 frames/s at 132 MHz. It runs in about one
  second.
* **`tb_video_stream`** runs three back-to-back 640x480 frames of a moving
  picture in one transfer. It checks every word of every frame. It also
  checks that the steady frame period is exactly `IMG_W*IMG_H + IMG_W + 1` =
  307,841 clocks, which is 429 frames/s at 132 MHz.

To simulate with Verilator (shown for the end-to-end test; the others are
analogous, and the unit tests of modules without package imports need no
package files):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/img_pkg.sv tb/img_ref_pkg.sv tb/tb_img_proc_top.sv \
    --top-module tb_img_proc_top -o sim
./obj_dir/sim
```

The simulator has two states. Memories and data registers are deliberately
not reset, and the design never reads them before writing them, except
inside windows that are masked as border.

## Where this design makes its own choices

The overall structure comes from the published design:

* Gaussian smoothing before Sobel edge detection;
* fully unrolled 3x3 kernels, with one pipeline stage per arithmetic
  operation;
* 16-bit fixed-point arithmetic;
* image rows held in block-RAM line buffers;
* DMA data movement;
* 640x480 frames;
* both the smoothed image and the edge image returned to the host.

The following choices are not specified there and were made here:

* **Gaussian weights and rounding.** The binomial weights were chosen because
  they are shift-only.
* **Sobel magnitude.** It is `|Gx| + |Gy|`, clipped at 255, with no threshold.
* **Image boundary.** Border outputs are zero. The published design also
  reports small differences at the image edges, but does not say what its
  border pixels contain.
* **Flush.** Each window generator appends a flush of `IMG_W + 1` steps at
  the end of every frame.
* **Memory ports.** The read port uses request/grant with in-order data, the
  write port always accepts, and the reader has a credit-limited FIFO. The
  control uses start/base/frame-count and done.
* **Word formats.** One address per pixel, and the output word is
  `{grad, smooth}`.

## Scope

These parts are outside the design:

* **Camera and host PC.** The camera capture and the host PC that stores and
  displays the frames are off-the-shelf parts. Their memory ports are
  brought out at the top instead.
* **Host link.** The physical link between the FPGA and the host (USB or
  otherwise) is not part of this RTL.
* **Per-frame latency.** The published 12 ms per frame includes transfers over
  that link. The figure for this RTL alone is 2.34 ms per frame at 132 MHz.
* **Resource figures.** The published resource use (23% of LUTs, 19% of
  flip-flops, 12% of block RAM on an Artix-7) cannot be compared, because the
  exact device is not stated.
