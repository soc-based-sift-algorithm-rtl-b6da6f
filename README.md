# SIFT featurepoint sorter for a palletizing cell

A camera looks at each object coming off a production line. The object can be
type A, type B, or a defective B. This design decides which one it is and then
drives the machinery that handles it: an orientation device for A, one or two
pneumatic cylinders for B, and a stop/error-stop signal.

The object is recognised with the front end of SIFT (Scale Invariant Feature
Transform):

- blur the image at several scales;
- subtract neighbouring scales (Difference of Gaussian, DoG);
- mark each point that is an extremum of its scale-space neighbourhood as a
  featurepoint.

The featurepoint map of the frame is compared with stored maps of the three
known objects. The closest map gives the class, and a small state machine
turns class, angle and pressure into actuator commands.

Everything is one streaming pipeline. The frame is read once, one pixel per
clock, and nothing is buffered except a few image lines. The class is known
7 clocks after the last pixel.

The structure follows the paper "SoC Based SIFT Algorithm for Identification
of the Quality Objects for Palletization Application":

- one octave with four Gaussian scales;
- three DoG images;
- a 26-neighbour max/min test whose results are OR-ed, plus a threshold;
- matching against stored featurepoints;
- the control flow of the palletizer.

The paper names these stages but gives few internal details. Kernel sizes,
sigmas, the threshold value, the way maps are compared, widths, timing and the
handshake are all choices made for this RTL. Each one is listed in
[Departures and choices](#departures-and-choices).

## Pipeline and frame geometry

```
pix (8b) ──► line_window 5x5 ──► gaussian_filter x4 ──► dog ──► line_window 3x3 ──► extrema ──► feature_matcher ──► pallet_ctrl ──► OD, PC1, PC2, stop
             (4 line buffers)     (sigma .7 1 1.4 2)    (3 sub)  (27-bit samples)   (26 cmp)    (3 ref maps)        (FSM + timers)
             └──────────────── gaussian_pyramid ─────┘           └──────── extrema_detector ──┘
```

The input is a 300 x 300 grayscale frame in raster order, with at most one
pixel per clock. No stage ever stalls. The stream may have idle cycles, and
every stage simply advances on `valid`.

No stage looks outside the frame. Each window stage drops the positions where
its window would stick out:

| stage | positions per frame | image coordinates covered |
|---|---|---|
| input | 300 x 300 | 0..299 |
| Gaussian scales, DoG | 296 x 296 | 2..297 |
| extrema / featurepoints | 294 x 294 = 86,436 | 3..296 |

Latency from a pixel to the last result that needs it:

| step | clocks |
|---|---|
| 5x5 window register | 1 |
| Gaussian filter | 1 |
| DoG subtract | 1 |
| 3x3 window register | 1 |
| extrema compare | 1 |
| matcher: reference read, then count and decide | 2 |
| **class after the last pixel of a frame** | **7** |

Frames may follow each other with no gap. Each line buffer's column and row
counters wrap at the end of a frame, and `feat_last` restarts the matcher.

## Line buffers (`line_window`)

Every neighbourhood in the design comes from the same module. It has K-1
memories of one image line each. When sample `x` of a line arrives:

1. Column `x` is read from every memory.
2. The new sample is put below that column, giving a K-tall column, and the
   column is shifted into a K x K register window from the right.
3. The memories shift down by one line at that column.

The window counts as valid once the sample position is at least K-1 in both x
and y.

`out_win[r][c]` is the sample at `(cx - K/2 + c, cy - K/2 + r)`, and row 0 is
the oldest line.

The module is used twice:

- K = 5 on 8-bit pixels, in front of the Gaussian filters;
- K = 3 on the three DoG samples packed into 27 bits, in front of the extrema
  test.

All four Gaussian scales share one line buffer, because they all blur the same
image.

## Scale space (`gaussian_filter`, `gaussian_pyramid`, `dog`)

Each scale is a 5 x 5 separable integer Gaussian. `KERN` holds five 1-D taps
that sum to 64. The 2-D weight is `KERN[r]*KERN[c]`, which totals 4096. The
filter first sums columns, then sums rows, adds 2048 and shifts right by 12.
A flat image therefore keeps its exact value.

The taps are `round(64 * exp(-i^2 / 2 sigma^2) / sum)` for i = -2..2:

| scale | sigma | taps |
|---|---|---|
| 0 | 0.7 | 1 13 36 13 1 |
| 1 | 1.0 | 3 16 26 16 3 |
| 2 | 1.4 | 7 15 20 15 7 |
| 3 | 2.0 | 10 14 16 14 10 |

The sigma ratio is about sqrt(2), the usual SIFT spacing. The sigmas are kept
small enough that each kernel fits in 5 x 5.

`dog` outputs `d[i] = g[i+1] - g[i]` (coarser minus finer) as signed 9-bit
values. These are the three DoG images of the octave.

## Extrema and featurepoints (`extrema_detector`)

There are only three DoG images, so only the middle one has a scale above and
below it. Every position of that image gets a full 3 x 3 x 3 block of scale
space from the 3 x 3 window of packed DoG samples. Its centre is then tested:

- **maximum**: strictly greater than all 26 neighbours (8 in its own image and
  9 in each of the two others);
- **minimum**: strictly smaller than all 26 neighbours;
- **featurepoint**: (maximum OR minimum) AND `|centre| >= THRESH`.

With strict comparison, a flat region never produces featurepoints. The
threshold is what keeps only the stable points: on real images most raw
extrema are low-contrast noise. On the synthetic test objects, about 400
raw extrema per frame are reduced to between 4 and 20 featurepoints. `THRESH` = 8 is
about 3 % of full scale, the usual SIFT contrast limit.

`feat_max` and `feat_min` are brought out next to `feat` so that the raw
extrema can be observed.

## Matching (`feature_matcher`)

The reference store is a memory with 86,436 entries of 3 bits, one entry per
featurepoint position in raster order:

- bit 0: the reference image of A has a featurepoint there;
- bit 1: the same for B;
- bit 2: the same for defective B.

The entry address for image position (x, y) is `(y-3)*294 + (x-3)`. The store
is loaded through `ref_we/ref_addr/ref_wdata`. In practice you fill it once
with the featurepoint maps of clean sample objects. The design computes those
maps itself when you stream the sample images through it and record `feat`.

During a frame, a position counter reads the store one clock ahead. For each
class, a counter then adds 1 whenever the frame's featurepoint bit differs
from that reference bit. The result is three Hamming distances.

At `feat_last` the class with the smallest distance is reported on a one-clock
`match_valid` pulse, together with the three distances. Ties go to A, then B.
A defect shows up as featurepoints that appear or disappear around the flaw,
which moves the distance towards the defective reference.

## Control flow of the cell (`pallet_ctrl`)

When a class arrives, the angle is sampled. The pressure S1 is watched
continuously.

| class | condition | action | ends in |
|---|---|---|---|
| A | angle < 45 | nothing | `stop` |
| A | angle > 55 | nothing | `err_stop` |
| A | 45 <= angle <= 55 | `od` on T1 clocks later, held until `s1 >= P1`, off T3 clocks after that | `stop` |
| B | – | `pc1` on T1 clocks later | `stop` |
| defective B | – | `pc1` on T1 clocks later, `pc2` on T2 clocks after that | `stop` |

`stop`, `err_stop`, `pc1` and `pc2` hold until the next object is accepted,
and accepting it clears them.

An object that arrives while a pass is running (`busy`) is ignored, and a
`dropped` pulse reports it. This happens only when the orientation device
waits a long time for S1, because a frame (90,000 clocks) is much longer than
the timers.

Assertions check three rules:

- OD never runs together with a cylinder;
- PC2 only follows PC1;
- `stop` and `err_stop` are never both set.

## Top level (`sift_pallet_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `pix_valid`, `pix` | in | 1, 8 | grayscale pixel stream, raster order |
| `angle` | in | 8 | object inclination in degrees, sampled when the class is decided |
| `s1` | in | 8 | pressure sensor of the orientation device |
| `ref_we`, `ref_addr`, `ref_wdata` | in | 1, 17, 3 | reference store write port |
| `feat_valid`, `feat`, `feat_max`, `feat_min`, `feat_x`, `feat_y`, `feat_last` | out | | featurepoint stream |
| `match_valid`, `match_class`, `match_dist[3]` | out | 1, 2, 17 | class (0 A, 1 B, 2 defective B) and Hamming distances |
| `od`, `pc1`, `pc2`, `stop`, `err_stop` | out | 1 | actuator commands |
| `busy`, `dropped` | out | 1 | controller state |

Parameters (defaults):

- `WIDTH` = `HEIGHT` = 300;
- `THRESH` = 8;
- `T1` = `T2` = `T3` = 16 clocks;
- `P1` = 128.

Shared types are in `sift_pkg`: pixel, DoG and class types, and the kernel
taps.

After synthesis the design is about 730 flip-flop bits plus 284,892 memory
bits, of which 259,308 are the reference store and the rest the line buffers.
The only arithmetic is 120 small constant multiplies, 26 x 2 comparators and a
few counters.

## Departures and choices

These points are settled here because the paper is silent or inconsistent.

- **OD angle band.** One sentence of the paper switches the orientation device
  on for angles *above* 55 degrees. Its simulation, however, turns OD on for
  an A at 50 degrees, and its flow chart has an error-stop exit at the
  55-degree test. This RTL uses OD from 45 to 55 degrees and an error stop
  above 55.
- **OD at the end.** The text switches OD off once S1 reaches P1, and this RTL
  does so. The reported simulation result for A at 50 degrees lists `OD=1` and
  `stop=1` together, which this RTL does not reproduce: OD is off when `stop`
  rises.
- **Timers.** The flow chart waits for times t1, t2, t3 before each actuation
  but gives no values. Here they are clock-cycle parameters. T1 is used for
  every first actuation.
- **Pressure limit.** P1 has no value in the paper; here it is 128 on an
  8-bit scale.
- **Scale space.** Four scales and one octave follow the paper. The 5x5
  kernel, the sigmas, integer rounding and the DoG sign are this design's.
- **Threshold.** The paper says a threshold selects the stable points but does
  not give it. The value 8 and the `|D| >= THRESH` form come from common SIFT
  practice.
- **Matching.** The paper compares extracted featurepoints with stored ones
  but does not say how. Bitmap Hamming distance with a minimum pick is this
  design's. Defective B has its own reference, not an "anything else" branch.
- **Borders.** Positions within 3 pixels of the image edge carry no
  featurepoints.
- **Left outside the RTL.** Preprocessing (resizing and grayscale conversion
  of the camera image) happens before the pixel stream enters. The mechanical
  devices and the pressure sensor are outside the chip; they appear only as
  ports.
- **No orientation stage.** There is no SIFT orientation or descriptor stage,
  so the object's angle is an input rather than a result of the pipeline.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_line_window` | window contents against the source values, window count, `out_last`, 1-clock latency, idle cycles |
| `tb_gaussian_filter` | flat, impulse and random windows against a full 5x5 reference sum, for sigma 0.7 and 2.0 |
| `tb_gaussian_pyramid` | all four scales at every position of random frames; blur order on a step edge |
| `tb_dog` | signed differences including the 0/255 extremes |
| `tb_extrema_detector` | max/min/featurepoint at every position against a 26-neighbour reference; planted strong and weak extrema |
| `tb_feature_matcher` | distances, class, ties, `match_valid` timing |
| `tb_pallet_ctrl` | every branch, the 45/55 boundaries, T1/T2/T3 in clocks, dropped objects |
| `tb_sift_pallet_top` | the whole design at full size, 300 x 300 (see below) |

`tb_sift_pallet_top` generates three synthetic objects:

- A: a bright bar tilted by 45 degrees;
- B: a textured disc;
- defective B: the same disc with a dark notch.

A software model of the blur, DoG and extrema stages computes each object's
featurepoint map, and the maps of the clean objects are loaded as references.
Eight frames then cover every branch of the control flow, including a dropped
object. Every featurepoint, distance and class is compared with the model.
The bench also requires that each mechanism (maxima, minima, threshold
rejection, each class, OD, PC1, PC2, stop, error stop, drop, stream gaps)
happens at least once.

Run it with plain Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl +libext+.sv rtl/sift_pkg.sv \
          tb/tb_sift_pallet_top.sv --top-module tb_sift_pallet_top -Mdir obj_top
./obj_top/Vtb_sift_pallet_top
```

It compiles in about 10 s and runs in about 1 s. The same command with another
testbench name runs any unit bench.

The model in `tb_sift_pallet_top` keeps its loop bounds in variables
(`hh`, `ww`) on purpose. With constant bounds, Verilator tries to unroll the
300 x 300 loops and takes minutes to compile.

## Changing it

- **Another frame size.** Set `WIDTH`/`HEIGHT` on the top. The reference store
  and address width follow as `(WIDTH-6)*(HEIGHT-6)`.
- **Other sigmas.** Edit `KERN_S0..S3` in `sift_pkg`. Keep each kernel's five
  taps summing to 64, or change the shift in `gaussian_filter`.
- **Another contrast limit.** Set `THRESH`.
- **More octaves.** Not built. An octave would need a 2:1 decimator on scale 2
  feeding another `gaussian_pyramid`, `dog` and `extrema_detector`, plus a
  matcher that combines the octaves' maps.
