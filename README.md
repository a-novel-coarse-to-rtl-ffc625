# CBPS: a coarse-to-fine block-matching motion estimator with one processing element

Block-matching motion estimation finds, for each 16 x 16 block of the current
video frame, the displacement (u, v) within +-8 pixels at which the previous
frame looks most like the block. A full search scores all 17 x 17 = 289
displacements on all 256 pixels of the block. This design cuts that work
in two ways:

* **Candidate sub-sampling.** A *coarse* pass scores 77 displacements spread
  evenly over the whole window. A *fine* pass then scores the 8 displacements
  around the best coarse one. That makes 85 candidates instead of 289.
  Because the coarse points cover the whole window rather than homing in
  step by step, a local minimum near the centre does not trap the search the
  way it can in three-step-like searches.
* **Pixel sub-sampling.** Each candidate is scored on 64 of its 256 pixels,
  chosen in a *4-queen* pattern.

The score is the sub-sampled sum of absolute differences (SSAD). An optional
reduced-bit variant, RBSSAD, drops 1 to 4 least significant bits of every
pixel before comparing. The whole search runs on a single
subtract/absolute/accumulate processing element (PE) that handles one pixel
pair per clock. This gives 85 x 64 = 5440 pixel cycles plus 3 overhead
cycles, or **5443 cycles per block**. A CIF frame (288 x 352 pixels, 396
blocks) therefore takes 2,155,428 cycles, and 30 frames/s needs a 65 MHz
clock.

## The two search patterns

Coarse candidates (`#`) in the 17 x 17 window. Row index = u + 8 (vertical),
column index = v + 8 (horizontal):

```
u=-8  # . # . # . # . # . # . # . # . #     9 points, v even
u=-7  . . . . . . . . . . . . . . . . .
u=-6  . # . # . # . # . # . # . # . # .     8 points, v odd
u=-5  . . . . . . . . . . . . . . . . .
u=-4  # . # . # . # . # . # . # . # . #
 ...  rows repeat with period 4 ...
u= 8  # . # . # . # . # . # . # . # . #
```

Rows u = -8, -4, 0, 4, 8 hold 9 points each and rows u = -6, -2, 2, 6 hold 8,
which gives 77. The fine pass takes the 8 neighbours of the best coarse point.
None of them is a coarse point, so nothing is scored twice. The
fine result is the minimum over the coarse winner and its 8 neighbours.

4-queen pixel pattern inside the 16 x 16 block. In row i the selected
columns are j0 + 0, 4, 8, 12, with j0 = 1, 3, 0, 2 for i mod 4 = 0, 1, 2, 3.
Within each group of 4 rows and 4 columns there is one pixel per row and one
per column, like four non-attacking queens:

```
i=0   . X . .  . X . .  . X . .  . X . .
i=1   . . . X  . . . X  . . . X  . . . X
i=2   X . . .  X . . .  X . . .  X . . .
i=3   . . X .  . . X .  . . X .  . . X .
      (rows 4..15 repeat)
```

## Block diagram

```
           +-----------------------------+   u,v, phase, ok, first/last
           |  cbps_control (FSM)         |---------------------------------+
           |  cbps_uv_gen  (u,v)         |                                 |
           |  cbps_addr_gen (Cx,Cy,Sx,Sy)|                            pipeline reg
           +-----------------------------+                                 |
               | Sx,Sy          | Cx,Cy                                    v
               v                v                                   +--------------+
         +-----------+    +-----------+      +----------------+     | cbps_mv_calc |
         |  S-Mem    |    |  C-Mem    |      |    cbps_pe     | sum | min SSAD,    |--> mv_*
         | previous  |--->| current   |----->| |c-s|, 14-bit  |---->| coarse best  |
         | frame     | s  | frame     |  c   | accumulator    |     +--------------+
         +-----------+    +-----------+      +----------------+            |
                                                                           |
           best coarse (ctr_u, ctr_v)  <-----------------------------------+
```

| Module | Role |
|---|---|
| `cbps_pkg` | Constants (N = 16, p = 8, 77 + 8 candidates, widths), the 4-queen column function, the pipeline control word |
| `cbps_control` | FSM: LOAD, COARSE, BUBBLE, FINE, DRAIN per block; steps through all blocks of the frame |
| `cbps_uv_gen` | Produces (u, v): the coarse pattern row by row, then the 8 fine offsets around the best coarse point |
| `cbps_addr_gen` | Block counters x (0..17) and y (0..21), pixel counters i and m; Cx = 16x + i, Cy = 16y + j, Sx = Cx + u, Sy = Cy + v; checks that the displaced block is in the frame |
| `cbps_frame_mem` | One frame store, 288 x 352 bytes, synchronous read, write port for loading; used twice, as S-Mem and C-Mem |
| `cbps_pe` | 8-bit subtract, absolute value, 14-bit accumulate; RBSSAD truncation |
| `cbps_mv_calc` | Minimum SSAD and its (u, v). Also keeps the coarse-only minimum that centres the fine pass. Registers the result per block |
| `cbps_me` | Top level |

The address generator follows a published structure. A 5-bit block
counter is shifted left by 4 (times 16) and added to a 4-bit pixel counter
in a 9-bit adder, giving the current-frame coordinate. A 10-bit signed adder
then adds the 5-bit displacement to give the previous-frame coordinate. The
horizontal pixel counter counts the four pixels of a row (m = 0..3), and the
column is formed as j = 4m + j0(i mod 4).

## Timing: where the 5443 cycles go

The one subtle point is the dependency between the two passes: the fine
candidates cannot be addressed until the last coarse SSAD has been compared.
The pipeline is therefore kept short:

* **Cycle t.** The FSM issues a pixel. The counters give the coordinates
  combinationally, and both memories register their read.
* **Cycle t+1.** The PE computes `sum = (first ? 0 : acc) + |c - s|`
  combinationally. On a candidate's last pixel, that value is its SSAD.
  `cbps_mv_calc` compares it in the same cycle and updates its minima at the
  edge.

With this pipeline, one idle cycle between the passes (BUBBLE) is enough.
Each block then runs as follows:

| State | Cycles | What happens |
|---|---|---|
| LOAD | 1 | restart pixel counter and coarse sequence |
| COARSE | 77 x 64 = 4928 | one pixel pair read per cycle |
| BUBBLE | 1 | last coarse SSAD compared; best coarse point now registered |
| FINE | 8 x 64 = 512 | neighbours of the best coarse point |
| DRAIN | 1 | last fine SSAD compared, motion vector registered |
| **total** | **5443** | |

`mv_valid` for the first block is registered 5443 rising edges after the
edge that accepts `start`. The following blocks come exactly 5443 cycles
apart, and `done` pulses with the last one. The published total is 5443
cycles per block. The way the three overhead cycles are spent, as above, is
this implementation's choice.

## Interface of `cbps_me`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock (rising edge); asynchronous active-low reset |
| `c_we`, `c_wr_row`, `c_wr_col`, `c_wr_data` | in | 1, 9, 9, 8 | write one current-frame pixel |
| `s_we`, `s_wr_row`, `s_wr_col`, `s_wr_data` | in | 1, 9, 9, 8 | write one previous-frame pixel |
| `start` | in | 1 | start a frame (ignored while busy) |
| `trunc` | in | 3 | 0: SSAD; t = 1..4: RBSSAD with t LSBs dropped (RBSSAD7..RBSSAD4); sampled with `start` |
| `busy`, `done` | out | 1 | frame in progress; one-cycle pulse at the end |
| `mv_valid` | out | 1 | one block's result |
| `mv_x`, `mv_y` | out | 5 | block row and column |
| `mv_u`, `mv_v` | out | 5 signed | motion vector: the block matches previous-frame pixels (16x + i + u, 16y + j + v) |
| `mv_ssad` | out | 14 | SSAD (or RBSSAD) of that match |

Load both frames while the estimator is idle, one pixel per cycle per port,
then pulse `start`. Blocks are reported in raster order, block column
fastest. Parameters `ROWS` and `COLS` (default 288 and 352) set the frame
size; they must be multiples of 16 and at most 496 (31 blocks each way).
N = 16 and p = 8 are fixed, because the coarse pattern and the
4-queen pattern are defined for those values.

## Choices beyond the published description

These points are not specified by the architecture this RTL implements.
They were decided as follows:

* **Frame edges.** A candidate whose displaced block would leave the frame is
  skipped. It still uses its 64 cycles, so timing stays fixed, but its SSAD
  is not compared. A fine neighbour outside +-8 (the best coarse point lies
  on the window border) is treated the same way. The zero vector is always
  valid.
* **Ties.** The first candidate to reach the minimum wins. Candidates are
  scored in coarse order (u rising, then v rising), then in fine order
  (-1,-1), (-1,0), (-1,1), (0,-1), (0,1), (1,-1), (1,0), (1,1).
* **Frame stores** hold whole frames and are addressed by (row, column). They
  have a one-cycle synchronous read. They are loaded through a plain write
  port; there is no double buffering.
* **4-queen orientation.** The column rule used is j0 = 1, 3, 0, 2. The
  drawing of the pattern this design was built from shows the mirror image
  (2, 0, 3, 1). Both are 4-queen solutions, and the choice changes only
  which 64 pixels are sampled.
* **RBSSAD** shifts both pixels right by `trunc` before the subtraction, so
  SSAD values are in units of the reduced pixel. The run-time setting keeps
  the 8-bit subtractor. The parameter `PIX_BITS` of `cbps_me` and `cbps_pe`
  (default 8) builds the narrow hardware instead: only the `PIX_BITS` most
  significant bits of each pixel reach a `PIX_BITS`-bit subtractor.
  `PIX_BITS = 5` is a fixed RBSSAD5 with 62.5 % of the comparison width.
* **Control handshake**: a `start`/`busy`/`done` handshake with one result
  pulse per block.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_cbps_me` is the end-to-end test at full CIF size with default
  parameters. It builds a smooth random texture and a current frame in which
  every block is the previous frame displaced by its own random motion in
  -8..8, plus noise. It loads both frames and runs the frame five times: SSAD
  and RBSSAD7, 6, 5 and 4. It checks all 396 x 5 motion vectors and SSADs
  against a reference model of the search written in the testbench. It also
  checks the 5443-cycle spacing and the frame total. Finally, it checks that
  each mechanism occurs at least once: a coarse winner, a fine candidate
  beating the coarse best, fine neighbours outside the window, candidates
  leaving the frame, and RBSSAD changing the score. About 11 million cycles;
  about 10 seconds.
* `tb_cbps_addr_gen`: all 396 block positions. Full pixel walks with random
  displacements check coordinates, the 4-queen property and the in-frame
  flag.
* `tb_cbps_uv_gen`: the 77-point coarse order, and fine neighbours around
  centres that include the window corners.
* `tb_cbps_control`: per-block cycle count, read counts per pass, and the
  counter commands.
* `tb_cbps_pe`: random and extreme pixels with every truncation from 0 to 4,
  including the maximum SSAD of 16320.
* `tb_cbps_mv_calc`: minimum and coarse-centre tracking with frequent ties
  and unusable candidates.
* `tb_cbps_frame_mem`: read-back and read-during-write behaviour.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/cbps_pkg.sv \
          tb/tb_cbps_me.sv --top-module tb_cbps_me -o sim
./obj_dir/sim
```

On these random-texture frames the search returned the true motion for
351 to 354 of the 396 blocks (about 89 %) for every truncation setting. The
testbench also measures the motion-compensated prediction of the whole
frame:

| Criterion | PSNR of the prediction |
|---|---|
| full search, 289 candidates x 256 pixels (reference only, not built) | 28.75 dB |
| CBPS, SSAD | 28.67 dB |
| CBPS, RBSSAD7 / RBSSAD6 | 28.67 / 28.66 dB |
| CBPS, RBSSAD5 / RBSSAD4 | 28.59 / 28.59 dB |

The loss against full search is under 0.1 dB. The work is 85 x 64 pixel
comparisons instead of 289 x 256, i.e. 7.4 %. The testbench prints these
figures for information only. Its checks compare the hardware with the
reference search, not with the true motion.

## Limits

* The 65 MHz clock target has not been checked against any technology. The
  longest path is memory read, subtract, absolute value, 14-bit add, 14-bit
  compare, register. If needed it can be cut at the cost of more BUBBLE and
  DRAIN cycles.
* The published FPGA figures (226 slices, 249 flip-flops) cannot include
  frame-sized memories. This RTL includes two 101,376-byte frame stores.
* Video-quality results (PSNR on real sequences) depend on test sequences
  that are not part of this repository and have not been reproduced.
