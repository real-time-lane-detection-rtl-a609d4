# Lane detection and tracking accelerator

This is a hardware accelerator that finds the lane markings of a road in a
camera stream and follows them from frame to frame. A marking is modelled as
a straight line across a small region of interest (ROI) in front of the car.
The line is stored as just two numbers: the column where it crosses the first
ROI row (`x_top`) and the column where it crosses the last row (`x_bottom`).
Everything else works on this two-number state:

* **Detection** scatters random candidate lines over the ROI and keeps the
  one that covers the most bright pixels.
* **Tracking** is a particle filter. It moves the previous frame's lines
  slightly at random and weighs each moved line by two things: how much of
  the marking it covers and how close it stays to the previous best line.
* **A sanity check** rejects results that are not physically plausible. A
  rejected result triggers detection again.

The accelerator does the work that is the same for every candidate or
particle. A host processor does the parts that need all of them at once:
choosing the "good lines" after a detection and resampling the particles
after tracking. This is the usual split for this method.

## Frame flow

```
 RGB frame ─► preprocess ─────────────► roi_image_mem ─► lane_detect ──┐
 (1 px/clk)   roi_select → grayscale                    (candidates)   ├─► redetect_check ─► best_lines
              → sobel_filter → threshold_unit           lane_track ────┘
                                                        (particles)
        host: good lines / resampling ◄── cand_*, part_*      pw_* ──► particle memory
```

`lane_top` runs one frame at a time:

1. **Pre-processing.** The frame streams in at one RGB pixel per clock,
   with `in_sof` on the first pixel. Only pixels inside the ROI are used.
   Each one is converted to grayscale:
   `Y = ((66R + 129G + 25B + 128) >> 8) + 16`.
   A streaming 3×3 Sobel filter follows, computing `G = |Gx| + |Gy|`. The
   gradient is then thresholded to 0 or `MAX_VAL`. The resulting binary
   edge image goes into an on-chip buffer. Pixels of the frame below the ROI
   are consumed and dropped; detection or tracking already runs meanwhile.
2. **Detection or tracking.** Detection runs on the first frame after reset,
   and on any frame whose predecessor ended with a failed detection.
   Otherwise tracking runs, on the particles the host wrote for this frame.
3. **Check.** `redetect_check` tests the best lines.
   * If a *tracked* result fails, detection runs again on the same buffered
     image in the same frame (`frame_redetect`).
   * If a *detected* result fails, the frame is reported with
     `frame_ok = 0`, and the next frame starts with detection.
4. `frame_done` pulses. `best_lines`, `frame_detect`, `frame_redetect` and
   `frame_ok` are valid with it.

Between frames the host reads what it needs:

* After a detection it has every candidate line and its weight from `cand_*`.
  It picks the particles for the next frame from these.
* After tracking it has every moved particle and its importance weight from
  `part_*`, plus the per-lane sum of weights on `evidence`. It resamples
  from these.

It writes the new particle set through `pw_*` while `busy` is low.

## Line geometry in fixed point

Each line is described in ROI coordinates. The x position in row `R`
(0 … H−1) is

```
x_R = x_top + R · s,    s = (x_bottom − x_top) · (1/H)
```

`1/H` is the elaboration-time constant `round(2^16 / H)`, and the product is
rounded. The function `lane_pkg::line_x` holds the formula, so every unit
computes the same pixel for a given line and row. Coordinates are 12-bit
signed, which makes a line exactly three bytes. A line may start or end
outside the ROI. Pixels outside the ROI simply contribute nothing.

`line_weight` walks the rows of the ROI image, one row per clock. The buffer
delivers a whole row per read, so each clock can add the
`2·nbhd + 1` pixels `x_R − nbhd … x_R + nbhd` of one row. A line's weight is
ready `H + 2` clocks after `start`. `nbhd` is a run-time input of up to
`NB_MAX` (7), to match the width of the markings in the image.

## Detection

The ROI is divided into `LANES` equally wide regions, one marking expected
in each. For each region `lane_detect` draws `NLINES` candidates:

```
x_top = centre + round(z1 · sigma_sam),   x_bottom = centre + round(z2 · sigma_sam)
```

`z1`, `z2` are standard normal samples and `centre` is the middle of the
region. A useful `sigma_sam` is half the region width. It is a run-time
input because the best value depends on the ROI.

Each candidate is weighted, streamed out on `cand_*`, and compared with the
region's running maximum. The first candidate of the maximum weight becomes
the region's best line. With the default sizes there are 2 × 256
candidates, each taking about `H + 5` = 77 clocks.

The random numbers come from an MWC64X multiply-with-carry generator:

* state `(x, c)`, multiplier `A = 4294883355`
* output `x ^ c`

`gauss_rng` turns its output into normal samples. It uses Leva's
ratio-of-uniforms method in 16-bit fixed point:

* Each 32-bit word is split into `u` and `v`.
* Two quadratic bounds accept or reject most pairs directly.
* Pairs in the thin band between the bounds are decided by the exact test
  `v² ≤ −4u² ln u`. The logarithm comes from the leading-one position plus
  a quartic fit of `log2(1+m)`.
* An accepted pair gives the sample `z = v/u` (Q8.8).

About 75 % of the clocks deliver a sample. The band test matters: almost all
samples beyond ±3.4σ come from it, and dropping it cuts the distribution off
there.

Detection and tracking each have their own generator, and the two must not
produce overlapping sequences. After reset, `lane_top` derives both seeds
from one base state (`SEED`) by jumping ahead in the MWC64X stream:

* detection starts at substream 0, tracking at substream 1;
* each substream is 2^40 numbers long.

A jump works because one MWC64X step is a multiplication by `A` modulo
`M = A·2^32 − 1` on the number `v = x·A + c`. Jumping to substream `k` is
therefore `v · (A^(2^40))^k mod M`. `mwc64x_skip` computes this with one
shift-and-add modular multiplier and a restoring divider that splits the
result back into `(x, c)`. The constant `A^(2^40) mod M` is worked out at
elaboration. Seeding takes about 600 clocks after reset, and `in_ready` stays
low meanwhile.

## Tracking

`lane_track` holds `LANES × NPART` particles (lines) in an on-chip memory.
For each particle it does the following.

1. **Prediction.** Both end points move by `round(z · sigma_shift)`, with
   `z` standard normal. The moved particle is written back.
2. **Distance.** In one pass over the rows it accumulates two sums:
   * the intensity weight, exactly as in detection;
   * the distance `d = Σ_R |x_particle(R) − x_best(R)|` to the lane's best
     line of the previous frame. This is the area between the two lines.
3. **Gaussian likelihood.** `gauss_fit` forms
   `g = exp(−(d/H)² / (2σ_f²))`, with `σ_f = 15 %` of the ROI width. It
   computes this as `2^−e`: the integer part of `e` is a shift and the
   fraction goes through a cubic fit.
4. **Importance weight.** `(intensity weight × g) >> 16`.

Per lane, the unit keeps the sum of the weights (the evidence) and the
particle with the highest weight. That particle becomes the lane's new best
line. Normalising the weights and resampling are left to the host. A
particle takes about `H + 6` clocks.

Using the intensity weight in tracking is this design's reading of the
method. The tracking step is described as following the outline of the
detection kernel, and it has the pre-processed image available. A
distance-only weight would only reproduce the previous best line and could
not follow a moving marking.

## The sanity check

`redetect_check` accepts a set of best lines only if all of the following
hold:

* Neighbouring markings do not cross: both their `x_top` and their
  `x_bottom` values are in left-to-right order.
* Neighbouring markings are at least `min_dist` apart at both ends. A good
  choice is 20 % of the ROI width.
* Every marking lies inside the ROI (0 ≤ x_R < W) for at least `min_rows`
  of the H rows. A good choice is 30 % of H.

The check takes `H + 2` clocks.

## Sizes and parameters

| parameter | default | meaning |
|---|---|---|
| `FRAME_W × FRAME_H` | 640 × 480 | camera frame |
| `ROI_W × ROI_H` | 512 × 72 | region of interest, image buffer size |
| `LANES` | 2 | markings (regions) |
| `NLINES` | 256 | candidates per marking in detection (half the ROI width) |
| `NPART` | 64 | particles per marking in tracking |
| `NB_MAX` | 7 | largest run-time neighbourhood half-width |
| `MAX_VAL` | 255 | value of an edge pixel after thresholding |
| `SEED` | 64'h0000_0001_2345_6789 | base state `{c, x}` of the random stream |

Run-time inputs of `lane_top`:

* ROI position (`roi_x`, `roi_y`, sampled at `in_sof`)
* `threshold` (50 works well on road video)
* `sigma_sam`, `sigma_shift`, `nbhd`, `min_dist`, `min_rows`
* `n_lines` and `n_part`: how many candidates and particles per marking are
  used, up to `NLINES` and `NPART` (0 means the maximum). Particle `i` of
  marking `l` sits at address `l·NPART + i`, whatever `n_part` is.

At the defaults, a frame is limited by its 307,200 pixel beats.
Detection needs about 39,000 further clocks and tracking about 10,000; both
overlap with the part of the frame below the ROI. The ROI buffer holds
36,864 bytes. The particle memory holds 128 lines.

The following configurations need rebuilt parameters:

* A 96×512 or 144×1024 ROI needs a larger buffer. The 144×1024 ROI also
  needs a frame at least 1024 pixels wide.
* More than 64 particles per marking needs a larger `NPART`. Fewer are set
  at run time with `n_part`.

## Where this design departs from the method as published

* **Best lines.** The best line of a detection is chosen in hardware, as a
  running maximum. The published method chooses it on the host. All
  candidates still go out, so a host can make its own choice.
* **Importance weight.** It includes the intensity weight (see Tracking).
  The distance is divided by H before it is compared with σ_f. The Gaussian's
  constant factor is dropped, since it cancels in the normalisation.
* **Sequential processing.** Candidates and particles are handled one after
  another by a single weighting unit. The published method runs them as
  parallel work items on a GPU or FPGA. The datapath can be replicated for
  more throughput.
* **Random-number streams.** Only two substreams are used, one per
  generator. The published method runs thousands of parallel work items,
  each with its own substream.
* **Not built:**
  * the host's good-line selection and resampling
  * splitting particles over several accelerators
  * splitting the ROI horizontally into sub-regions for sharp bends
* **Border pixels.** The Sobel output is 0 on the one-pixel border of the
  ROI.

## Files

* `rtl/lane_pkg.sv`: shared types (`line_t`, `rgb_t`), widths, default
  sizes and the row-position function.
* Pre-processing: `roi_select`, `grayscale`, `sobel_filter`,
  `threshold_unit`, and `preprocess`, which chains them.
* `roi_image_mem`: the ROI image buffer (pixel write, row read).
* Random numbers: `mwc64x_rng`, `mwc64x_skip`, `gauss_rng`.
* Lines: `line_weight`, `lane_detect`, `gauss_fit`, `lane_track`,
  `redetect_check`.
* `lane_top`: the frame controller and the top level.
* `tb/`: one self-checking testbench per module, plus two end-to-end
  testbenches:
  * `tb_lane_top`: reduced sizes, ten frames. It covers detection,
    tracking, redetection, a failed detection and passing frames. It acts as
    the host, using top-N good-line selection and systematic resampling.
  * `tb_lane_top_full`: default sizes, four frames at 640×480.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if the design hangs. With Verilator 5, for example:

```
verilator --binary --timing -y rtl -y tb +libext+.sv -Irtl -Itb \
    --top-module tb_lane_top rtl/lane_pkg.sv tb/tb_lane_top.sv
./obj_dir/Vtb_lane_top +verilator+rand+reset+2
```

Replace `tb_lane_top` with any other testbench name. The full-size run
(`tb_lane_top_full`) takes about ten seconds. The ten-frame reduced run prints
each frame's best lines next to the drawn markings.

The end-to-end tests use synthetic frames: bright markings on a dark, lightly
noisy road. They show that the mechanisms work and that the lines land on the
markings (within 4 pixels on average in the reduced test, 8 in the full-size
test).

Detection samples with a spread of half a region width, so a candidate of
one region can land on the marking of the neighbouring region. The check then
rejects the result, and the next frame detects again. The full-size test
shows this on its first frame. They say nothing about accuracy on real road video.
