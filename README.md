# Random-forest object detector with a scrambled distributed integral-image memory

This is synthesizable SystemVerilog for the detection stage of the OpenTLD
long-term visual tracker, organised around one idea. A random-forest
classifier is limited by memory, not by arithmetic. Every feature of every
tree reads a few values from the integral image of the frame. Those reads
land at random points inside the current scanning window. To serve many of
them per cycle, the integral image is spread over 32 independent on-chip
memory blocks. The address is scrambled by reversing its bit order, so that
pixels near each other go to different blocks. Each block has its own
collision resolver. When several parallel queries hit the same block, the
resolver serves them in turn, two per cycle on the block's two read ports. The data come back out of order, each
word tagged with the label of its query, and the computation side puts each
batch back together.

The architecture follows the paper "A novel Embedded system for vision
tracking", which describes an FPGA prototype: a Virtex-6 detector core, and
a Zynq-7000 system that streams frames from an ARM host. The paper fixes
the block structure and the main numbers. It leaves many details open, and
this RTL fills them with its own choices, listed below. This code is an
independent implementation, not the authors' own.

## Dataflow

```
 pixels ──► integral_unit ──┐
             (2 line buffers) ├─► addr_scrambler ──► mem_block x32   (load phase)
 bus words ──────────────────┘                      (port 0 writes)

 loop_decoder ──16 addr──► memory_module ──64 labelled ports──► computation_module ──► result
  coeff_lut x4, fxp_mult x4   addr latches, scramblers x16,       data latches, comp_core x4,
  scale table, FSM            collision_resolver x32, mem_block    leaf_posterior_table, votes
```

The two phases take turns; they do not overlap.

* **Load.** The host streams an 8-bit grey frame in raster order. The
  `integral_unit` computes the integral value of every pixel as the pixel
  arrives. The value is written through the scrambler into one of the
  blocks, at one pixel per cycle. Streaming pixels rather than integral
  words sends 8 bits per pixel over the link instead of 27. Integral words
  computed elsewhere can instead be written over a plain data-bus port
  (`bus_we`, `bus_addr`, `bus_data`), one word per cycle at a linear
  address, through the same scrambler. The integral unit wins if both
  write in the same cycle.
* **Detect.** `det_start` makes the `loop_decoder` walk over every scale,
  every window position, every tree and every feature. Each feature becomes
  one batch of 16 integral-image addresses. The `memory_module` serves the
  batch, and the `computation_module` turns the data into feature bits,
  leaf indices, votes and finally the 32-bit result.

## Address scrambling and block layout

A pixel's linear address is `a = y*IMG_W + x`, 19 bits for 640x480.

* **Block.** The block is the top 5 bits of the bit-reversed address, that
  is, `a[0], a[1], a[2], a[3], a[4]` read MSB first. The scrambler
  (`addr_scrambler`) is only a permutation of wires, with no logic and no
  latency.
* **Word.** The word inside the block is `a >> 5`, with its bits in their
  original order. This keeps every block at exactly `640*480/32 = 9600`
  words of 27 bits, so 32 blocks hold the whole frame. Reversing these bits
  too would need 16384 words per block.

The same scrambler sits on the load path and on every query path, so
writes and reads always agree on where a pixel lives.

**What this mapping does for a feature.** Horizontal neighbours always fall
into different blocks. But 640 is a multiple of 32, so the block depends
only on `x mod 32`: all pixels of one column share a block. One feature
here reads 16 corners that lie in only three columns. Those are the 6, 4
and 6 queries that go to 3 blocks; with two reads per block and cycle,
every batch takes at least 3 cycles. The full-size end-to-end test
measures about 5.2 memory accesses per cycle (16 per batch at about 3.1
cycles per batch, the extra coming from column pairs that alias mod 32).
The paper reports 17.78 accesses per cycle with 32 dual-port blocks,
measured on access traces recorded from the original software. This RTL
does not reproduce that figure. Two things differ: the grouping of
queries into batches, and the feature geometry. The paper groups queries
from 5 inner-loop iterations, and does not say how. `stall_cycles` and
`det_cycles` on the top let you measure this for any workload.

| blocks | measured here (accesses/cycle) | paper (accesses/cycle) |
|---|---|---|
| 8 | 4.19 | 6.06 |
| 16 | 4.76 | 10.16 |
| 32 | 5.18 | 17.78 |
| 32, one read port per block | 2.59 | |

The paper's rates match `2 * blocks / average collisions` (for
example 64 / 3.6 = 17.78 at 32 blocks), which is why both ports of every
block read here.

## Collision resolution and labelled data (`memory_module`, `collision_resolver`)

A batch of 16 addresses is accepted in one cycle (`q_valid`/`q_ready`):

1. Each address goes through its own scrambler.
2. Its block row is kept in an address latch until the batch is done.
3. Every block's `collision_resolver` compares the 16 block numbers with
   its own, which gives the set of queries that collide on that block.
4. The resolver then issues those queries to the block's two read ports,
   up to two per cycle, lowest query index first and port 0 before port
   1. The selection is a ripple chain: a cascade of one-bit stages, each
   taking the next free port if its query is pending.

The blocks run independently, so a batch takes `ceil(L/2)` cycles, where
`L` is the largest number of its queries that share one block. Set
`RD_PORTS = 1` for one read per block and cycle (`L` cycles).

Timing:

* `q_ready` is high when no query will still be pending after the current
  cycle. The next batch therefore loads in the same cycle as the previous
  batch's last issue, and no cycles are lost between batches.
* Read data leave one cycle after issue, on the port of the block that
  read it: read port `p` of block `b` is output `b*RD_PORTS+p`
  (`d_valid`, `d_label`, `d_data`).
* The batch tag (`tag_valid`, `tag_out`) comes out in the same cycle as
  the batch's last word.
* Accepted in cycle `c`, a batch is complete in cycle `c+ceil(L/2)+1`.

On the receiving side (`computation_module`), each of the 16 queries has a
data latch. The latch catches whichever port carries its label. When all
16 latches and the tag are full, the batch is computed and the latches are
freed in the same cycle. The next batch's first word can arrive in that
same cycle: a cleared latch and a new word in one cycle resolve to "full".
Assertions check that no latch is ever overwritten before it is used, and
that no resolver is reloaded while it still has queries pending.

## Loop decoding and feature geometry (`loop_decoder`)

Four coefficient tables (`coeff_lut`) hold, for every (tree, feature), the
x offset, y offset, width and height of a feature box. Each value is an
unsigned Q0.8 fraction of the window size. The host draws them at random
once. Each table feeds one pipelined multiplier (`fxp_mult`), which scales
the fraction to the current window (`ww`, `wh`):

```
x  = wx + (cx*ww)>>8            y  = wy + (cy*wh)>>8
hw = max(1, ((cw*ww)>>8) / 2)   hh = max(1, ((ch*wh)>>8) / 2)
box = (x, y, 2hw, 2hh)
left = (x, y, hw, 2hh)   right  = (x+hw, y, hw, 2hh)
top  = (x, y, 2hw, hh)   bottom = (x, y+hh, 2hw, hh)
```

A box `(x, y, w, h)` is read at four corners:

* `A = I(x+w-1, y+h-1)`
* `B = I(x-1, y+h-1)`
* `C = I(x+w-1, y-1)`
* `D = I(x-1, y-1)`

Its pixel sum is `A - B - C + D`. Query `q = 4*rect + corner`, with
`rect` in the order left, right, top, bottom and `corner` in the order A,
B, C, D.

**Scan order.** The loop runs scale → window row → window column → tree →
feature, one feature per cycle. It advances through a pipeline: counters,
then the coefficient read, then the multipliers (`MUL_STAGES`), then
address generation, then the output register. The whole pipeline freezes
while a batch waits at the output. A change of scale costs two idle
cycles.

**Windows.** Windows start at (1,1) and keep one pixel clear of every frame
edge, so the `x-1` and `y-1` corners exist. A scale whose window does not
fit is clamped to `IMG_W-2` x `IMG_H-2`. The host must keep `cx+cw <= 256`
and `cy+ch <= 256` so that boxes stay inside their window.

**Tags.** Each batch carries a 3-bit tag (`batch_tag_t`): last feature of a
tree, last tree of a window, last window of the frame. Nothing else tells
the computation side where trees, windows and frames end.

## Classification (`computation_module`, `comp_core`, `leaf_posterior_table`)

1. **Feature bits.** Four `comp_core`s form the four box sums. The feature
   gives two bits, `left > right` and `top > bottom`.
2. **Leaf index.** The bits are shifted into the tree's leaf code. Seven
   features fill the 14-bit index.
3. **Posterior.** At the tree's last feature, the index reads the
   2^14 x 1 bit leaf posterior table. One table is shared by all trees.
   The host rewrites entries between frames through `post_we`. The write
   port is separate from the read port, so entries may also be written
   during a run; a tree read in the same cycle then sees the old value.
4. **Votes.** The posterior bits of a window's trees are summed. A window
   whose sum reaches `cfg_thresh` counts as a detection.
5. **Result.** At the last window, `result_valid` pulses with:
   * `result`: the 32-bit number of detected windows;
   * `vote_total`: all positive leaves.

The module never stalls. Its latency is one cycle from the last word to the
computed batch, one more for the table read and one more for the votes.

## Integral image unit (`integral_unit`)

`I(x,y) = i(x,y) + I(x-1,y) + I(x,y-1) - I(x-1,y-1)`, with `I = 0` outside
the frame.

* Two line buffers of `IMG_W` x 27 bits hold the current and the previous
  line. They swap roles at the end of each line.
* `I(x-1,y)` and `I(x-1,y-1)` are kept in registers.
* Each pixel needs one read of the previous line and one write of the
  current line.
* The 27-bit width holds the largest value, 640*480*255 = 78,336,000.
* One pixel per cycle. `loaded` rises after the last word is written.

## Top-level interface (`tld_top`)

| group | ports | use |
|---|---|---|
| frame load | `load_start`, `pix_valid`, `pix_ready`, `pix[7:0]`, `loaded` | stream a frame in raster order |
| bus load | `bus_we`, `bus_addr[18:0]`, `bus_data[26:0]` | write integral words directly (linear address `y*IMG_W+x`) |
| coefficients | `coef_we`, `coef_sel` (0 x, 1 y, 2 w, 3 h), `coef_addr` (= tree*7+feature), `coef_wdata` | feature box fractions |
| scales | `scale_we`, `scale_addr`, `scale_wdata` (`scale_t`: `ww`, `wh`, `sx`, `sy`) | window size and step per scale |
| posteriors | `post_we`, `post_waddr[13:0]`, `post_wdata` | leaf posterior bits |
| run | `cfg_nscales`, `cfg_ntrees` (1..15), `cfg_thresh`, `det_start`, `det_busy` | start detection on the stored frame |
| result | `result_valid`, `result[31:0]`, `vote_total[31:0]` | per-frame output |
| counters | `det_cycles`, `det_batches`, `stall_cycles` | performance of the last run |

Use it in this order:

1. Reset.
2. Write the coefficient, scale and posterior tables.
3. Pulse `load_start` and stream `IMG_W*IMG_H` pixels, then wait for
   `loaded`. Or write all `IMG_W*IMG_H` integral words over the bus port.
4. Do not load while detection runs.
5. Pulse `det_start` and wait for `result_valid`.
6. Between frames, rewrite a few posterior entries, then repeat from step 3.
   To rerun the stored frame, pulse `det_start` again.

The design has one clock and an asynchronous active-low reset.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `IMG_W`, `IMG_H` | 640, 480 | frame size; also the row pitch of the linear address |
| `NBLK` | 32 | memory blocks, power of two and at least 2 |
| `MAX_SCALES` | 16 | scale table entries |
| `MUL_STAGES` | 2 | multiplier pipeline depth |
| `RD_PORTS` | 2 | read ports per memory block (1 or 2) |

Fixed in `tld_pkg`:

* 16 queries per batch;
* 27-bit integral words;
* 14-bit leaf index, which gives 7 two-bit features per tree;
* at most 15 trees;
* Q0.8 coefficients.

## Where this departs from, or goes beyond, the paper

Taken from the paper:

* 640x480 frames with 27-bit integral values;
* 32 dual-port blocks of 9600 words;
* bit reversal as the 1-1 scrambler, used for both loading and queries;
* per-block collision detection and serialization, and labelled
  out-of-order data;
* a data-bus path that writes the blocks through the scrambler;
* 16 queries per loop iteration;
* four coefficient tables with four pipelined fixed-point multipliers;
* `A - B - C + D` computation cores;
* a 2^14 x 1 bit leaf posterior table;
* a 32-bit result word;
* on-the-fly integral computation with two line buffers;
* up to 15 trees.

Choices of this design:

* how the word inside a block is addressed;
* the feature type: two-bit box comparisons of box halves;
* loop order, window margins and clamping;
* the coefficient and scale formats;
* the batch tag;
* the vote threshold as the detection rule;
* the valid/ready handshakes, latencies and reset.

Not as in the paper:

* **Features per tree.** The paper says "more than 12 features" per tree,
  while its posterior table has a 14-bit index. This design follows the
  table: 7 features of 2 bits each.
* **Loop decoder FSM.** The paper's loop decoder has an 8-state FSM and
  decodes 5 inner-loop iterations per cycle. Neither the states nor the
  mapping is given. This FSM has 6 states and emits one feature per cycle.
* **Reads per block.** The paper's text says the serializer issues one
  access per cycle and speaks of 32 memory output ports, while its
  throughput table counts dual-port reads. This design follows the table:
  two reads per block and cycle, 64 output ports. `RD_PORTS = 1` gives the
  other reading.
* **Throughput.** It is about 5.2 accesses per cycle, not 17.78 (see
  above).
* **Clocking.** The paper's bus runs at 100 MHz and its detector at
  200 MHz. The clock-domain FIFOs belong to the host link and are not
  included.
* **Double buffering.** It is only discussed in the paper and is not built.

Not included, because they are host-side parts: the streaming link IP, the
ARM processor and bus, and the source image memory. Their signals are the
top's ports.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tld_top_tb rtl/tld_pkg.sv tb/tld_top_tb.sv
./obj_dir/Vtld_top_tb
```

* `tld_top_tb` runs the whole design at its default size, with no
  parameter overrides. It streams two random 640x480 frames and writes a
  third over the bus port, scans three scales with 10, 12 and 15 trees,
  and updates 300 posterior entries between runs. It checks every result
  against its own model, and checks that stalls, parallel and
  out-of-order returns, scale changes and clamping, detections and
  rejections, posterior changes and bus loads all occurred. It takes
  about 10 seconds of simulation.
* `tld_block_sweep_tb` runs the same 640x480 frame through three
  detectors with 8, 16 and 32 blocks. It checks each result against its
  own model and prints the accesses per cycle of each (the table
  above). A fourth detector with 32 single-read-port blocks gives the
  last row of that table.
* `tld_frame_workload_tb` runs one frame of the size of the published
  workload at default parameters: four scales and 10 trees give 429,800
  batches, 6.88 million memory accesses (the paper counts 6.81 million
  per frame). Detection takes 1,318,367 cycles, 6.59 ms at 200 MHz,
  against 1.92 ms in the paper. It checks the result against its own
  model.
* `tld_small_frame_tb` builds the detector for a 480x360 frame
  (`IMG_W = 480`, `IMG_H = 360`, 32 blocks of 5400 words), the size used
  on a smaller FPGA whose block RAM cannot hold a 640x480 integral image,
  and checks one frame end to end.
* The block testbenches check the following:
  * the scrambler exhaustively;
  * the memory block's two read ports;
  * the resolver's service order, port use and cycle count;
  * the memory module's data, ports, tags and the exact batch latency
    `ceil(L/2)+1`;
  * the loop decoder's addresses against an independent model, including
    a full-rate run at one batch per cycle;
  * the computation module against a software model with adversarial
    arrival orders;
  * the integral unit against a reference integral image at full size.
