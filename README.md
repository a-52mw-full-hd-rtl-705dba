# Object-level recognition for a wearable Full HD camera

This RTL describes a vision chip for a head-worn camera that recognises
objects in 1920x1080 video at 30 frames per second within a wearable power
budget. Two ideas carry the design:

* **Recognise objects, not features, most of the time.** Matching every SIFT
  feature of every frame against a database costs thousands of memory
  fetches. Here a full feature match runs only once every 30 frames. In the
  other 29 frames, each feature descriptor is mapped to one of 64 *visual
  words* by walking a binary vocabulary tree. The words of all features inside
  the object's window are counted into a 64-bin histogram. That one histogram
  is then compared with one stored histogram per known object. This is the job
  of the **visual vocabulary processor (VVP)**.
* **Keep the object in view cheaply, and from the side.** A camera-motion
  engine (**CMS**) estimates the global translation of the image from tracked
  features. Attention tracking (**AT**) finds the object windows by Hough
  voting in the first frame of a period. It then simply moves them by the
  camera motion. Object viewpoint prediction (**OVP**) resamples a window into
  five pose candidates across ±80°, so that features of an object seen from
  the side can still be matched.

SIFT detection and description, the all-feature matcher, DRAM and the system
buses are not part of this RTL. The top module exposes their connection points
as ports (see *Outside this RTL*).

## Block map

```
                 frame_start ──► frame sequencer (soc_top) ── mode_detect / fm_enable
                                        │
   feature motion vectors ──► CMS ──camera motion──► AT ──windows──┐
   matched points (frame 0) ───────────────────────► AT            │
   ROI pixels, theta ──────► OVP ──► 5 synthesized views (to SIFT) │
                                                                   ▼
   descriptors + positions ──► BTB classifier ──word──► ROI histogram ──► histogram comparator ──► object id
                               (6 stages, 6 banks)                         (data memory, 64 refs)
```

| Module | Role |
|---|---|
| `soc_top` | frame sequencer; wires HCD and VVP together |
| `hcd` | groups `cms`, `attention_tracking` and `ovp` |
| `cms` | 128 confidence-weighted feature motions, pipelined weighted mean |
| `attention_tracking` | 8 voting processors, 4 Hough tables, peak search, motion prediction |
| `ovp` | five transformation matrices applied in parallel to an ROI buffer |
| `vvp` | classifier, ROI histogram and comparator, with the end-of-frame handshake |
| `vvp_btb_classifier` | six `vvp_btb_stage`s and the `vvp_hier_mem` banks |
| `vvp_btb_stage` | address generator, 2 distance processors, accumulators, MIN, vector delay line |
| `vvp_distance_processor` | 16 squared-difference PEs and an adder tree |
| `vvp_hier_mem` | banks of 2, 4, 8, 16, 32 and 64 centroid words (126 in all) |
| `vvp_histogram` | votes features inside the window into 64 bins |
| `vvp_hist_comparator` | reference histograms and the L1 nearest-reference search |
| `vvp_pkg` | shared constants and types (`seg_t`, `hist_t`, `pos_t`, `window_t`) |

## The frame schedule

`soc_top` counts frames modulo `PERIOD` = 30. The first `frame_start` after
reset is frame 0.

* **Frame 0 (detection).** `mode_detect` and `fm_enable` are high. The external
  matcher compares all features with the database and feeds the matched points
  into AT. After `vote_end`, AT publishes up to four object windows. The VVP
  ignores `frame_end` in this frame.
* **Frames 1 to 29 (object level).** Each CMS result moves every window by the
  camera motion. The VVP clears its histogram at the frame start. It classifies
  every descriptor it receives and counts those inside the window of object
  `obj_sel`. After `frame_end`, it reports the closest reference object.

The sequencer passes `frame_start` to the engines one cycle late, so they
already see the new mode.

## Visual vocabulary processor

### Descending the vocabulary tree

The vocabulary is a complete binary tree of depth 6. Level *s* holds 2^*s*
centroid words, each a 128-dimension vector of 8-bit elements. The children of
node *p* at level *s* are words 2*p* and 2*p*+1 of bank *s*. A descriptor is
classified by choosing, at each level, the child nearer in squared Euclidean
distance. Ties go to the even child. After six levels the node index is the
visual word (0 to 63). That takes 12 distance computations instead of 64.

### One stage, one level

Each `vvp_btb_stage` handles one level and owns one memory bank. A vector
streams through it as 8 segments of 16 dimensions, one segment per cycle:

```
cycle   t       t+1            t+2              t+9                   t+10 .. t+17
        seg k   bank read of   PEs + adder      last partial sum:     vector leaves
        addr p  children 2p,   tree → psum0/1   MIN(acc0, acc1)       with the chosen
        in      2p+1 (seg k)   (registered)     → out_addr={p,bit}    child index
```

* The **address generator** is a segment counter. Together with the parent
  index it forms the bank row `{p, seg}`.
* The bank is split into an even-word and an odd-word array. Both children
  come back in the same cycle, one to each **distance processor**.
* Each distance processor has 16 PEs forming |a−b|² and a 4-level adder tree,
  registered once.
* Two **accumulators** add the 8 partial sums. On the last segment, **MIN**
  compares the two totals and registers the result.
* The **vector delay line** (10 registers) holds the vector until its result is
  known. The next stage then receives the vector and its parent index
  together.

A new vector can enter every 8 cycles. The stages form a pipeline, so the
classifier delivers one word every 8 cycles, 60 cycles after the first
segment. A `tag` (the feature's position) travels with the vector. It comes
out with the word, so the histogram can test it against the window.

### Histogram and comparison

`vvp_histogram` adds one count to the word's bin when the feature position is
inside the window (inclusive bounds). Bins are 8-bit and saturate.
`vvp_hist_comparator` keeps up to `NUM_REF` = 64 reference histograms in its
data memory. It reads one whole reference (64 bins) per cycle, computes the
L1 distance with 64 subtractors and an adder tree, and keeps the minimum (the
lower index wins a tie). `vvp` starts the comparison only once `frame_end` has
been seen and the classifier is empty (`busy` low, no word pending). A frame
may therefore end while descriptors are still in the tree. `obj_valid` rises
`n_ref`+1 clock edges after the comparison starts.

## Human-centered pre-processing

### CMS: weighted camera motion

Each of the 128 VPEs keeps a 4-bit confidence weight for one tracked feature
(reset value 8).

* A feature whose motion vector lies within `THRESH` = 16 pixels (L1) of the
  last camera-motion output gains 1, saturating at 15.
* A feature that disagrees loses 1, down to 0.
* An untracked feature (`fmv_ok` low) returns to 8 and does not vote.

Features on a moving object therefore fade out over a few frames, and the
estimate converges to the background motion. The pipeline has 14 registers:

* weight update (1)
* weight × vector (1)
* 7-level adder tree for Σw·x, Σw·y and Σw (7)
* weighted division, 2 quotient bits per stage (5)

The result (`cm_valid`, `cm_x`, `cm_y`) appears in the 14th cycle, counting
the input cycle. The quotient truncates toward zero, and a total weight of 0
gives zero motion. Only translation is estimated.

### AT: Hough voting, then prediction

In a detection frame, up to 8 matched points arrive per cycle. Each carries:

* its object (0 to 3)
* its position
* the model's offset from the feature to the object's reference point
* a scale ratio in Q4.4

Each processor computes the vote `position + scale·offset`. The vote goes to
that object's Hough table, a 30×17 grid of 64×64-pixel bins with 8-bit
saturating counts. Several processors may hit the same bin in the same cycle.

To allow that with single-port updates, every processor keeps its own copy of
all four tables in a small memory (2,048 entries of 8 bits). It does one
read-modify-write per cycle. The count of a bin is the sum of its 8 copies,
capped at 255. Each copy also stops at 255, so the result equals one shared
saturating counter. A valid bit per entry clears all tables in one cycle at the
start of a detection frame. These copies are the largest store in the design
after the vocabulary: 16 KB.

After `vote_end`, all four tables are scanned in parallel, one bin per cycle
(510 cycles). The peak bin's centre becomes the window centre. An object with
fewer than `MIN_VOTES` = 3 votes gets no window. `done` rises NBINS+3 clock
edges after `vote_end` is sampled.

In object-level frames, each `cm_valid` adds the camera motion to every centre,
clamped to the image. Windows are 256×256 around the centre, clipped at the
border.

### OVP: five viewpoints at once

On `start`, OVP latches the viewpoint estimate θ and forms five candidates,
θ + {−40, −20, 0, 20, 40}°, limited to ±80°. Each candidate gets the matrix
`M_k = [[cos θ_k, 0], [0, 1]]`, applied as an inverse map about the ROI
centre: `src_x = cx + floor((x − cx)·cos θ_k)`, with `src_y = y`. This undoes
the horizontal foreshortening of an object turned about its vertical axis.

The cosine comes from a 10-degree table in Q1.8, rounded to the nearest
entry: round(256·cos(10·i°)) = 256, 252, 241, 222, 196, 165, 128, 88, 44. The
32×32 ROI is swept in raster order, one position per cycle, and all five
views are produced in parallel.

## Outside this RTL

| Part | How it connects |
|---|---|
| SIFT keypoint detection and description | descriptors enter on `desc_valid/desc_seg/desc_pos` (8 segments per descriptor); OVP output `syn_*` feeds it |
| All-feature matcher with outlier rejection | enabled by `fm_enable`; its matched points enter on `mfp_*`, ending with `vote_end` |
| Feature tracking that yields motion vectors | `fmv_*` |
| Viewpoint estimation | `theta`; the original derives the viewpoint parameter alongside the camera motion, but how is not specified, so here it is an input |
| Shifting the image itself to stabilise the video | the camera motion is available on `cm_*` for that; this RTL only uses it to move the windows |
| DRAM, image and feature buses | replaced by point-to-point ports; the vocabulary (`voc_*`) and database (`ref_*`) are loaded through write ports |
| SRAM macros, pads | memories are plain arrays in the RTL |

## How far to trust it

These parts follow the published architecture:

* the stage, distance processor and hierarchical memory structure
* the 6 stages, 16 dimensions per cycle, 8 cycles per vector and 126 words
* the 128 VPEs with a tree accumulator and weighted division, and the
  14-cycle pipeline
* the 8 Hough processors and 4 tables, and the detect-then-predict split
* the 30-frame period
* the five parallel OVP matrices, and the ±80° range

These are this design's own choices, because the original leaves them open:

* all bit widths (8-bit descriptor elements, 10-bit motion vectors, 8-bit bins)
* the CMS weight rule and threshold
* the bin size, window size, vote format and vote threshold of AT, and its
  per-processor copies of the bin counts
* the OVP matrix form, angle step and ROI size
* the L1 metric and database size
* all handshakes, load ports and reset behaviour (asynchronous, active low)

A stated 343 GB/s memory bandwidth could not be reconciled with these widths:
6 stages × 2 × 16 bytes × 200 MHz = 38.4 GB/s. The recognition accuracy and
power of the chip depend on SIFT, training data and silicon, so they cannot be
judged from this RTL.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. `tb_soc_top` runs the whole design
at its default sizes through 32 frames. That covers:

* both detection frames and the period wrap
* 30 window predictions and 30 recognitions, each waiting for the classifier
  to drain
* one OVP pass
* features outside the window

It counts each of these mechanisms and fails if one never happens. It runs in
a few seconds.

`tb_vvp_fullhd_frame` streams one object-level frame of 1,500 descriptors
scattered over a 1920x1080 image through the VVP. It checks every word, the
histogram and the recognised object. It also checks that the frame takes 8
cycles per descriptor plus the fixed latencies: about 12k cycles, against the
6.67M cycles that one frame at 30 fps allows at 200 MHz.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/vvp_pkg.sv \
          tb/tb_soc_top.sv --top-module tb_soc_top
./obj_dir/Vtb_soc_top
```

Replace `tb_soc_top` with any other testbench name to test one block. The
package must come first on the command line. The testbenches compute their
expected values themselves: tree descent, squared distances, histograms, L1
search, weighted means, window arithmetic and resampling.

Sizes are parameters with these defaults: `PERIOD`, `NUM_FEAT`, `NPROC`,
`NOBJ`, `NVIEW`, `ROI_W/ROI_H`, `NUM_REF`, and the image size in
`attention_tracking`. The vocabulary geometry (`DIM`, `DIMS`, `STAGES`,
`ELEM_W`, `BIN_W`) lives in `vvp_pkg`.
