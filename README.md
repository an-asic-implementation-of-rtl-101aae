# Zhang-Suen thinning processor for 160 x 192 fingerprint images

Minutiae-based fingerprint matching needs the ridges of a binarised
fingerprint reduced to one-pixel-wide lines (a skeleton) before ridge endings
and bifurcations can be found. In software, this thinning step is a large
share of the work: the same 3x3 neighbourhood test is repeated over every
pixel, and over the whole image many times. This design does the thinning in
hardware. A small host processor loads a binary image. The processor makes
one keep/erase decision per pixel per clock until the image stops changing,
then streams the skeleton back.

The default image is 160 columns x 192 rows with 1 bit per pixel
(1 = black ridge, 0 = white valley).

## The thinning rule (Zhang-Suen)

Each pixel is looked at together with its eight neighbours. In this design
they are numbered counter-clockwise from the north-east corner:

```
   P3 (NW)   P2 (N)   P1 (NE)
   P4 (W)    P        P8 (E)
   P5 (SW)   P6 (S)   P7 (SE)
```

* `N(P)` is the number of black neighbours.
* `S(P)` is the number of black-to-white changes met when walking once round
  P1, P2, ..., P8, P1.

One iteration has two sub-iterations (steps). In each step, every pixel is
decided from the image as it was at the start of that step, so the step is
parallel. A black pixel is erased when:

| condition | step 1            | step 2            |
|-----------|-------------------|-------------------|
| 1         | 2 <= N(P) <= 6    | 2 <= N(P) <= 6    |
| 2         | S(P) = 1          | S(P) = 1          |
| 3         | P2 * P6 * P8 = 0  | P2 * P4 * P8 = 0  |
| 4         | P4 * P6 * P8 = 0  | P2 * P4 * P6 = 0  |

Condition 1 keeps end points (one neighbour) and interior points (seven or
eight). Condition 2 keeps pixels whose removal would split a stroke. Step 1
peels the south and east sides of every stroke, and step 2 peels the north
and west sides, so the skeleton stays centred. Iterations repeat until a
whole iteration erases nothing.

With this numbering the four products are exactly those of the standard
Zhang-Suen formulation (which names the neighbours P2..P9 clockwise from
north). The mirror-image numbering, clockwise from the south-west corner,
would give identical results: `S(P)` does not depend on the direction of the
walk, and the products only swap among themselves.

## Architecture

```
             +-------------+  i, j
 clk, rstb ->| pixel_counter|------------------------------+
             +-------------+                               |
 image_in, we                                              v
   |      +-----------+  3 rows  +------------+  window  +-------------+
   +----->| Memory A  |--------->|            |--------->| thin_stage1 |--+
   |      | (pixel_   |          | window_gen |          +-------------+  |
   |      |  memory)  |  3 rows  |  (3x3)     |  window  +-------------+  |
   |      +-----------+    +---->|            |--------->| thin_stage2 |--+--> thin_image
   |            ^          |     +------------+          +-------------+  |
   |            |     +-----------+                                       |
   |            |     | Memory B  |<---------- step-1 result -------------+
   |            |     +-----------+                                       |
   |            +-------------------------- step-2 result ----------------+
   |
   +--> thin_ctrl (sequencer): counter enable, memory write enables,
        window source, convergence test, output scan
```

| module | role |
|---|---|
| `thinning_processor` | top level; wires the blocks below |
| `pixel_counter` | raster address (i = column, j = row) over the image |
| `pixel_memory` | 1-bit image store, 192 words of 160 bits. It has one pixel write port and three asynchronous row read ports. It is used twice, as Memory A and Memory B. |
| `window_gen` | drives row addresses j-1, j, j+1 to both memories. It selects A or B, cuts columns i-1..i+1 out of the three rows, and supplies white beyond the image edge. |
| `thin_stage1`, `thin_stage2` | combinational erase decision of step 1 / step 2 for one window |
| `thin_ctrl` | phase sequencer (below) |
| `thin_pkg` | image size, `window_t` (centre plus P1..P8), `state_t`, and the functions for `N(P)`, `S(P)` and conditions 1-2 |

### Why two memories

A step must read only the image as it stood before that step. Step 1 reads
Memory A and writes its result into Memory B at the same address. Step 2
reads Memory B and writes into Memory A. So neither step ever reads a pixel
it has already changed, and no line buffers or write-back delays are needed.
After step 2, Memory A holds the image after one full iteration.

### Phases and timing

`thin_ctrl` moves through four phases. The counter runs without a gap from
one scan to the next, so every phase after loading lasts exactly
W x H = 30,720 cycles.

1. **LOAD.** This is the idle state. Each cycle with `we = 1` writes
   `image_in` into Memory A at the counter address, then steps the counter.
   Pauses (`we = 0`) are allowed. The pixel order is row 0 from column 0 to
   159, then row 1, and so on. Thinning starts by itself after the last
   pixel.
2. **STEP1.** Memory A goes through `thin_stage1` into Memory B, one pixel
   per clock.
3. **STEP2.** Memory B goes through `thin_stage2` into Memory A. If either
   step of this iteration erased a pixel, the sequencer goes back to STEP1.
   Otherwise the image has converged.
4. **OUT.** Memory A is scanned once more through `thin_stage2`. On a
   converged image this erases nothing, so the stage output is the skeleton.
   The skeleton appears on `thin_image` with `thin_valid = 1` and its address
   on `pix_i` / `pix_j`. After the scan, `done` rises and stays high until
   the next frame starts loading.

Cycle budget per frame:
`30,720 (load) + iterations x 61,440 + 30,720 (output)`.
One iteration takes 61,440 cycles, which is 1.54 ms at 40 MHz. The critical
path runs from the counter, through a 192:1 row read and a 162:1 column
select, then the neighbour count and compare, to the memory write.

`we` is ignored while `busy` is high. `iter_count` reports how many
iterations the last frame took, including the final one that erased
nothing.

## Top-level interface (`thinning_processor`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rstb` | in | 1 | asynchronous reset, active low |
| `image_in` | in | 1 | pixel being loaded |
| `we` | in | 1 | `image_in` is valid (LOAD phase only) |
| `thin_image` | out | 1 | skeleton pixel |
| `thin_valid` | out | 1 | `thin_image`, `pix_i`, `pix_j` are valid |
| `pix_i`, `pix_j` | out | 8, 8 | column and row of the output pixel |
| `busy` | out | 1 | thinning or output in progress |
| `done` | out | 1 | last frame finished |
| `iter_count` | out | 8 | iterations used by the last frame |

Parameters: `W` (columns, default 160) and `H` (rows, default 192). Any size
from 2 x 2 upward works. The address widths follow as `$clog2(W)` and
`$clog2(H)`.

## What follows the original processor and what is this design's own

These parts follow the original thinning-processor design:

* The block structure: the counter, Memory A (loaded through
  `image_in` / `we`), Memory B, the shared 3x3 window generator, and two
  separate stage blocks.
* Step 1 writing into Memory B.
* The 160 x 192 size and the port names `clk`, `rstb`, `image_in` and `we`.
* The erase conditions.
* Steps 1 and 2 running as separate scans, at about 65,000 cycles per pair
  of steps. This design needs 61,440.

These parts are this design's own choices:

* Which of 160 and 192 is the width.
* The neighbour numbering. It is derived from the conditions, as explained
  above.
* Pixels outside the image read as white.
* `rstb` is asynchronous and active low.
* Stage 2 writes back into Memory A.
* The memory organisation: rows as words, with three row read ports.
* The stop rule: stop after an iteration that erases nothing.
* Thinning starts automatically after loading.
* The output scan, and the `busy`, `done`, `thin_valid`, `pix_i`, `pix_j`
  and `iter_count` outputs.

A thinning time of about 16 ms per image at 40 MHz, as quoted for the
original processor, corresponds to roughly ten iterations of this design. The number of iterations depends on
ridge width: the synthetic 160 x 192 test image in `tb/` needs 8.

Not included: the host processor, the fingerprint sensor, and the rest of
the fingerprint software around the thinning step (filtering, minutiae
extraction, matching). They sit outside the processor's ports.

## Memory and size

The two memories hold 2 x 30,720 bits. They are written as plain arrays with
one write port and three combinational read ports. A synthesis flow maps
them onto registers; that matches a register-based implementation on an
FPGA. To use SRAM macros instead, give each memory three banks or one
3-row-wide read port, and pipeline `window_gen` by one cycle. Add the same
one-cycle delay to the write address.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pixel_counter` | the address against a separate model over two full scans with random enable, the `last` flag, the W x H scan length, and asynchronous reset |
| `tb_pixel_memory` | a random image written with gaps and overwrites, every row read back through all three ports, white rows past the end, and write-to-read timing |
| `tb_window_gen` | every window of two random images and of an all-black image, against geometric neighbour offsets, including border masking |
| `tb_thin_stage1`, `tb_thin_stage2` | all 512 windows against the textbook (geometric) form of the rule, plus the end-point, interior-point, S = 2 and S = 3 cases by name |
| `tb_thin_ctrl` | the phase sequence, every control output per cycle, scan lengths, iteration count, convergence on an erasure at the last pixel, `we` ignored while busy, and `done` clearing |
| `tb_thinning_processor` | full size, default parameters. A synthetic 160 x 192 fingerprint (concentric 5-pixel ridges, noise, and a solid block at the corner) is thinned and compared pixel by pixel with a behavioural Zhang-Suen model. The iteration count and the exact thinning cycle count (iterations x 61,440) are checked. A second, already-thin frame must finish in one iteration. Each mechanism is counted: load pauses, ignored `we`, step-1 and step-2 erasures, a repeated iteration, first-iteration convergence, skeleton pixels on the border, and `done` clearing. |
| `tb_thinning_random` | 40 random frames (rectangles, discs and noise) at 24 x 20 against the same model |

Running one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl rtl/thin_pkg.sv \
          tb/tb_thinning_processor.sv --top-module tb_thinning_processor
./obj_dir/Vtb_thinning_processor
```

The full-size run takes a few seconds. The testbenches use only `$urandom`
and generate their images themselves; no data files are needed.

Not checked: timing after synthesis, and images from a real fingerprint
sensor. The tests use synthetic ridge patterns only.
