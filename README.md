# Streaming SIFT and image filters with domain-specific shortcuts

This RTL implements two image-processing accelerators as they are described in
the publication "Domain-Specific Optimisations for Image Processing on FPGAs":

* a **SIFT feature extractor**: it finds scale-space keypoints in a 1920x1080
  grayscale frame and emits a 128-element descriptor for each one;
* a **3x3 image filter engine**: box, Gaussian or Sobel, selectable per frame,
  for lines up to 3840 pixels.

Both are built with the three shortcuts the publication argues for:

* **Downsampling.** The image is halved with a 2x2 bilinear mean before the
  work starts.
* **Integer arithmetic.** No floating point is used anywhere.
* **Small kernels.** All kernels are 3x3.

The two accelerators share only the clock and reset. `dso_top` puts them side
by side and brings out both port sets, prefixed `sift_` and `filt_`.

The SystemVerilog is IEEE 1800-2017. It is synthesis-style RTL, and the
testbenches need nothing beyond Verilator.

## SIFT: two phases per frame

`sift_top` works on one frame at a time, in two phases.

1. **Streaming.** `in_ready` is high and one pixel is accepted per cycle.
   * `downsample2x` halves the frame (1920x1080 becomes 960x540). A chain of
     `downsample2x` instances then makes the input of each further octave.
   * Each octave (`sift_octave`) blurs its image at all scales, forms the
     difference-of-Gaussian (DoG) images, and looks for extrema.
   * Surviving keypoints go into a per-octave FIFO (`sync_fifo`).
   * In parallel, each octave computes the gradient magnitude and angle of
     every pixel and writes them into a frame-sized `gradient_store`.
2. **Descriptors.** `in_ready` is low.
   * After the last pixel, the design waits `DRAIN` (64) cycles so that every
     pipeline has emptied.
   * `descriptor_engine` then pops the keypoints, octave by octave. For each
     one it reads the 16x16 gradient window twice:
     * first to build the 36-bin orientation histogram;
     * then to build the 4x4x8 descriptor, relative to the dominant angle.
   * The 128 values leave on `desc_valid / desc_kp / desc_idx / desc_val /
     desc_last`.
   * `frame_done` pulses when every FIFO is empty. The next frame can then
     start.

Why two phases: detection is a raster stream, but a descriptor needs a window
around a point that may be found a few lines after the window began. Storing
the gradient image avoids a second pass over the input. The price is memory:
one word per octave pixel, 17 bits each (9-bit magnitude, 8-bit angle).

**Timing.**
* Streaming takes one cycle per input pixel.
* Each keypoint then takes about 3.3k cycles:
  * 2 x 256 window reads;
  * a 37-cycle peak search;
  * normalisation: 128 cycles of sum of squares, a bit-serial square root,
    then one 22-cycle division per element.
* A 1920x1080 frame with about 1000 keypoints therefore needs roughly
  2.1M + 3.3M cycles.

Keypoint format (`keypoint_t` in `dso_pkg`):
* `{octave[1:0], layer[1:0], y[11:0], x[11:0]}`;
* x and y are coordinates in the octave's own image.

`kp_count` is the running total of keypoints found since reset. `kp_overflow`
is sticky: it is set when any keypoint FIFO drops a keypoint.

### Scale space (`scale_space`, `line_buffer`)

One `line_buffer` holds K-1 rows and presents a KxK window per pixel. Every
scale is blurred from the same window in parallel; scales are not blurred one
after another. The blur is separable:

* 1-D integer taps are `round(256·g(i)/Σg)`, with the centre tap corrected so
  the taps sum to exactly 256.
* The 2-D weight of tap (i,j) is the product of the two 1-D taps.
* The sum is rounded and shifted right by 16.

The tap tables live in `dso_pkg::gauss_tap`. They cover K = 3 or 5 and up to
5 scales.

The scales use σ_s = 2^(s/3), s = 0..SCALES-1. This is not the usual
1.6·2^(s/(S-3)). With a 3x3 kernel, scales that close together round to the
same integer taps, and their DoG would be all zero.

DoG images are 9-bit signed differences of neighbouring scales.

Every windowed stage outputs only windows that lie wholly inside the image.
Each such stage therefore removes K/2 pixels at every border. The sof/sol
flags travel with the data, so coordinates stay consistent.

### Extremum, contrast and edge tests (`extrema_detector`)

A DoG pixel of layer 1 .. SCALES-3 is a candidate if it is ≥ all 26
neighbours, or ≤ all of them. The neighbours are 3x3 in its own layer and in
the layers above and below.

The test is deliberately non-strict:
* With 3x3 integer kernels, ties between neighbours are common.
* A strict test finds almost no keypoints.
* Even with the non-strict test, keypoints are sparse compared with float SIFT
  at larger kernels. A random frame gives a few hundred; a 4x4-block texture
  gives about 1000.

A candidate is then rejected in either of these cases:
* **Low contrast:** |D| ≤ `CONTRAST_TH` (3).
* **On an edge:** it fails the Hessian ratio test tr²·r < (r+1)²·det, with
  r = `EDGE_R` = 10. The test uses integer second differences; the products
  are scaled by 16 so that d_xy stays exact.

If a pixel passes in more than one layer, the lowest layer is reported.

Keypoints closer than 8 + K/2 + 1 pixels to an octave border are dropped.
This keeps their 16x16 window on valid gradients.

### Gradients (`gradient_unit`, `cordic_vector`)

Central differences are taken on the scale-1 Gaussian image of each octave:
* Lx = L(x+1,y) − L(x−1,y)
* Ly = L(x,y+1) − L(x,y−1)

A pipelined vectoring CORDIC turns (Lx, Ly) into magnitude and angle:
* 12 iterations;
* 4 fractional guard bits;
* gain compensation by a constant multiply;
* latency ITER+2 cycles.

Angles are 8 bits, 256 units per turn. Magnitudes are 9 bits.

### Orientation and descriptor (`orientation_histogram`, `descriptor_generator`)

Both use the same 16x16 window. Each sample is weighted by w[dx]·w[dy], where
w[i] = round(255·exp(−(i−7.5)²/128)).

**Orientation.**
* The histogram has 36 bins of 17 bits each.
* The dominant orientation is the centre of the fullest bin. There is no
  interpolation and no second peak.

**Descriptor.**
* It has 16 blocks of 4x4 samples, with 8 bins each, 14 bits wide.
* The bin is taken from (angle − dominant angle). The sampling grid is not
  rotated.
* The vector is normalised to d = floor(255·h / floor(√Σh²)). Σd² is
  therefore close to, and never above, 255².

## Filter engine (`image_filter`)

A KxK window, with optional 2x input downsampling, feeds one of three kernels:

| mode         | output |
|--------------|--------|
| `FILT_BOX`   | rounded mean of the window: one multiply by the rounded reciprocal of K², then a shift |
| `FILT_GAUSS` | binomial kernel C(K−1,i)·C(K−1,j) with a rounding shift (K=3: 1 2 1 / 2 4 2 / 1 2 1) |
| `FILT_SOBEL` | Gx, Gy from smoothing C(K−1,i) times derivative C(K−2,i)−C(K−2,i−1) (the standard Sobel at K=3); magnitude by the CORDIC, saturated to 255; angle on `out_ang` |

How it behaves:
* `mode` is sampled with the first pixel of a frame and carried down the
  pipeline. A change in the middle of a frame is ignored.
* Latency is ITER+4 cycles from the last pixel of a window.
* K is a parameter. The Gaussian's 64-bit coefficient arithmetic limits it to
  K ≤ 15. K must be odd.

## Parameters (defaults)

| module | parameter | default | meaning |
|---|---|---|---|
| `dso_top` | `SIFT_W`, `SIFT_H` | 1920, 1080 | SIFT input frame |
| `dso_top` | `FILT_W` | 3840 | longest filter line |
| `sift_top` | `OCTAVES`, `SCALES`, `KSIZE` | 2, 4, 3 | octave/scale configuration (4, 5 and K=5 are accepted) |
| `sift_top` | `DOWNSAMPLE` | 1 | halve the input before octave 0 |
| `sift_top` | `KP_DEPTH` | 16384 | keypoint FIFO entries per octave |
| `sift_top` | `CONTRAST_TH`, `EDGE_R` | 3, 10 | rejection thresholds |
| `sift_top` | `DRAIN` | 64 | cycles between the last pixel and the descriptor phase |
| `image_filter` | `K`, `DOWNSAMPLE`, `ITER` | 3, 0, 12 | kernel size, input halving, CORDIC iterations |

## Where this design goes beyond, or departs from, the publication

The publication describes the pipeline stages and the three optimisations.
It leaves most numeric details open. This design chooses the following:

* the σ schedule (see above);
* non-strict extremum comparison;
* the contrast threshold and edge ratio;
* CORDIC width and iteration count;
* histogram and descriptor weighting, and normalisation to 255;
* the 10-pixel keypoint border;
* the frame-sized gradient store, which stands in for the external memory the
  publication assumes;
* the two-phase schedule that stalls the input during descriptor generation.

In the gradient-magnitude formula, the squares that a magnitude needs are
assumed: m = √(Lx² + Ly²).

Not built:
* **The CNN accelerators (MobileNetV2, ResNet50).** The publication generates
  them with HLS and gives no hardware structure for them.
* **The larger baseline kernels it reports (box 50x50, Gaussian 31x31, Sobel
  7x7).** 50 is even and cannot be centred. A Gaussian above K=15 exceeds the
  coefficient arithmetic. K=7 Sobel can be set by parameter but was not
  simulated.
* **The (4,5) octave/scale configuration as a default.** The defaults build
  (2,4). Setting `OCTAVES=4, SCALES=5` works and is tested at 1024x768 (see
  below), but not at 1920x1080.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
a model written independently in the testbench and prints
`TB_RESULT checks=N failures=M`. Descriptor values are compared element by
element in the unit tests (`tb_descriptor_generator`, `tb_descriptor_engine`).
The top-level tests check keypoint positions exactly, and check the
descriptors for count and norm only.

* **`tb_sift_top`** runs two 256x192 frames back to back. Its model covers:
  * downsampling;
  * the blur and DoG;
  * the extremum, contrast, edge and border tests.

  It checks that exactly the expected keypoints get a descriptor, in order.
  It also checks:
  * each descriptor's norm;
  * that the second frame is held off during the descriptor phase;
  * `frame_done` and `kp_count`.
* **`tb_dso_top`** runs the same SIFT check at 256x192 while the filter runs
  one frame per mode. It counts the mechanisms, and each must occur:
  * downsampled pixels;
  * keypoints in both octaves;
  * contrast rejections;
  * descriptors;
  * input stalls;
  * each filter mode;
  * Sobel saturation;
  * a mode change that is ignored in the middle of a frame.

  Edge rejections are counted but not required at this size: they do not
  occur in these small frames. `tb_extrema_detector` covers that test.
* **`tb_sift_top_45`** repeats the `tb_sift_top` check with 4 octaves and
  5 scales on two 1024x768 frames. The frames are noise in 8x8 and 16x16
  blocks, so that every octave finds keypoints.
* **`tb_dso_top_full`** is the same test on `dso_top` with all defaults: two
  1920x1080 SIFT frames, about 1150 keypoints and descriptors, and 3840-wide
  filter frames. Here edge rejections also occur. It runs in well under a
  minute of simulation time after compilation.

To run one testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_dso_top \
    rtl/dso_pkg.sv $(ls rtl/*.sv | grep -v dso_pkg) tb/tb_dso_top.sv -o sim
./obj_dir/sim
```

Replace `tb_dso_top` with any other testbench name. `dso_pkg.sv` must come
first on the command line.
