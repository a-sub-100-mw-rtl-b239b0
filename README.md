# Integer-pel motion estimation core for H.264/AVC MBAFF encoding

This is synthesizable SystemVerilog for an integer-pel motion estimation (IME) processor core. It
targets H.264/AVC main profile with macroblock-adaptive frame/field (MBAFF) coding. The core
searches one 16x32 macroblock pair (MB pair) at a time against one reference frame. It supports
the block sizes 8x8, 16x8, 8x16, 16x16 and 16x32, in frame and field mode, and these kinds of
search:

* full search (FS) in snake order: +-4 for 8-wide blocks, +-4 or +-8 for 16-wide blocks;
* one-dimensional line search, horizontal or vertical, of up to 255 points;
* one-time block matching at an arbitrary vector;
* a hardware coarse search: complementally recursive cross search (CRCS), followed by an
  image analysis that chooses between the two fine searches.

The design target is 1920x1080 interlaced video at 30 fps with a +-128 x +-64 search range. One
core covers one reference frame at 100 MHz; two cores cover two reference frames.

## Structure

```
ime_core
 ├─ swram            search-window buffer, 320x160 pixels (409,600 bits), 8 banks x (left, right)
 │   └─ swram_col    one 100-word column of the array (one per bank-block and column slot)
 ├─ cross_path       8x8 transpose on demand (vertical line search)
 ├─ tb_buffer        template (current MB pair) register file, 32 x 16 pixels
 ├─ rrsa             reconfigurable ring-connected systolic array
 │   ├─ sbsa x 8     sub-block systolic array: 8x16 pixel chain = PU (8x8 PEs) + SRU (8x8)
 │   │   └─ pe x 64  absolute difference
 │   └─ reg_vs       next-line registers for vertical shifts
 ├─ mv_select        per-lane minimum SAD and its vector
 ├─ ime_ctrl         command sequencer (FS / LINE / POINT)
 ├─ crcs             coarse-search sequencer (initial vectors + two recursive cross searches)
 └─ image_analysis   FSMP / FSSB decision from the eight coarse vectors
```

`ime_pkg` holds the shared types: pixel rows and blocks, SAD widths, `mv_t`, block modes, the
array configuration and operation words, and the command format `ime_cmd_t`.

### Search-window buffer (`swram`)

The buffer returns any 8x8 rectangle in one cycle, whatever its alignment. It also returns 8x8
samples of a 16x8 area (horizontal 1/2 sub-sampling), of an 8x16 area (vertical 1/2 sub-sampling,
i.e. one field), or of a 16x16 area (both).

* Line n is stored in bank n mod 8, in the left block when (n/8) is even and the right block
  otherwise. Any 8 consecutive lines, and any 8 lines of one field within 16, therefore fall
  into 8 different bank-blocks.
* Inside a block, a line takes 10 word-line rows of 32 pixels. Pixel x is in row x/32, column
  slot x mod 32.
* Each of the 32 slots of each of the 16 bank-blocks gets its own row address. This models a
  global word line gated by a local select. Any 8 pixels at stride 1 or 2 then hit 8 different
  slots, so no access is ever split ("segmentation-free").
* Address decoding is direct arithmetic:
  * per bank-block: the rectangle line that falls into it, `(bank - y) mod 8` lines below the
    first (for a field read, that or 8 more);
  * per slot: the column that falls onto it.
* Reads are registered, with one cycle of latency. Pixels outside `rd_w x rd_h` return 0, and
  coordinates wrap at the window edges.
* The write port takes 8 consecutive pixels of one line per cycle. There is one read and one
  write port.

### Systolic array (`rrsa`, `sbsa`, `pe`, `reg_vs`)

Eight SBSAs form a grid 2 wide and 4 high, giving 16x32 processing elements. Each SBSA row is a
16-pixel chain:

* the 8 PU positions compute |SW − TB| against the template held in each PE;
* the 8 SRU positions buffer the search-window pixels that enter next.

The left SBSA of each grid row (even k) is mirrored, so the two PUs of a row sit side by side.
Per cycle the array takes one operation:

* a left, right or up shift of all SBSAs;
* a direct load of one chain half of one SBSA;
* a load of one half-row of REG_VS;
* a template load.

The array is reconfigured by `rr_cfg_t`:

* `ring_pair=0` closes every SBSA row into a 16-pixel ring. An 8-wide block can then slide over
  +-4 without losing pixels.
* `ring_pair=1` joins the two SBSAs of a grid row into a 32-pixel ring (SRU|PU|PU|SRU) for
  16-wide blocks, searched over +-8.
* The block mode selects which SBSAs are chained vertically: on an up shift, the top row of SBSA
  k+2 enters SBSA k. The mode also selects how the eight 8x8 SADs are added.
* In field mode, grid rows 0–1 hold the top-field template and rows 2–3 the bottom field, and no
  chain crosses between them.
* An SBSA at the bottom of a chain takes its new row from REG_VS.

SAD lanes per mode:

| Mode  | Lanes carrying a block SAD |
|---|---|
| 8x8   | k (all eight) |
| 16x8  | 0, 2, 4, 6 |
| 8x16  | 0, 1, 4, 5 |
| 16x16 | 0, 4 |
| 16x32 | 0 |

The SAD of an operation, together with the vector tag sent with it, comes out two cycles later.
`mv_select` keeps, per lane, the first minimum (strict less-than).

### Controller (`ime_ctrl`)

`ime_cmd_t` carries the following fields:

* `op`: one of
  * `OP_FS`: full search around `ctr[0]`;
  * `OP_LINE`: one-dimensional search of `npts` points from `ctr[k]`, with `vaxis` selecting
    horizontal or vertical;
  * `OP_POINT`: one point per lane at `ctr[k]`.
* `map`: one of
  * `MAP_TILE`: SBSA k matches tile (k%2, k/2) of the MB pair. In field mode, k<4 is the top
    field and `swpar_top`/`swpar_bot` pick the search-window field.
  * `MAP_COARSE`: SBSA k matches one of the eight field 16x8 blocks, horizontally sub-sampled to
    8x8 and searched in one window field. Vectors then count 2 pels horizontally and 1 field line
    vertically.
* `mode`, `field`, `range`: block mode, frame/field and FS range.
* `x0`, `y0`: window position of the MB pair.

Timing, with one cycle per operation:

* **FS:** 16 load cycles. Then 2R lines of max(2R, nv) cycles plus one up shift each, the last
  line of 2R shifts, and a 5-cycle drain (4 counted from after the accept edge).
  * nv is the number of REG_VS half-rows a line needs. REG_VS is filled from the buffer while
    the line is shifted.
  * Example: 16x16 frame mode, +-8, takes 16 + 16·17 + 16 + 5 = 309 cycles for 289 points of
    both 16x16 blocks.
* **LINE:** 16 load cycles and one cycle per further point. Every 8 points, the 8 SRU halves
  are reloaded (8 cycles, signalled on `reload`). A vertical line has the cross path transpose
  the window blocks and the template buffer return the template transposed, so only left shifts
  are needed.
* **POINT:** 8 load cycles plus the drain, 13 cycles in total.

`cmd_ready` is high when idle. `done` pulses when the last SAD has reached `mv_select`.
`best_sad`/`best_mv` then hold the per-lane results.

### Coarse search and analysis (`crcs`, `image_analysis`)

`crcs_start` runs the coarse search on the MB pair at (`crcs_x0`, `crcs_y0`). The sequencer
takes over the controller's command port and issues ten commands in `MAP_COARSE`:

1. four POINT commands at the host-supplied initial vectors `crcs_iv` (the best becomes the
   centre);
2. RCS(1): horizontal line ±40, vertical ±16, horizontal ±16;
3. RCS(2): vertical ±40, horizontal ±16, vertical ±16.

Each line is centred on the best point of its RCS so far. Per lane, the RCS with the smaller SAD
wins; RCS(1) wins a tie.

`image_analysis` compares the eight coarse vectors with the L1 distance against a threshold of 4:

* temporal conditions: (1) is upper TT vs upper BB; (2) is lower TT vs lower BB;
* spatial conditions: (3)–(6) are upper vs lower for TT, TB, BT and BB.

`fsmp=1` when all six hold; the fine search is then done on the MB pair as a whole. Otherwise
the small blocks are searched (FSSB). The lane order is U_TT, U_TB, U_BT, U_BB, L_TT, L_TB,
L_BT, L_BB.

## Using the core

1. Load the search window through `sw_wr_*` (8 pixels per cycle, 6400 cycles for a full window).
2. Load the template through `tb_wr_*` (8 pixels per cycle, 64 cycles).
3. Either run `crcs_start` and read `crcs_mv` and `fsmp`, or issue commands on `cmd`/`cmd_valid`.

The fine search is issued by the host as FS and POINT commands, in the order its encoder policy
chooses. `stall`, `reload` and `rr_op_mon` are observation outputs.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| ime_core | SW_W, SW_H | 320, 160 | search window (W a multiple of 32, H of 16) |
| ime_core | CRCS_LONG, CRCS_SHORT | 40, 16 | RCS line half-lengths |
| ime_core | THR_PATH | 4 | image-analysis threshold |

Synthesis of `ime_core` at the defaults (generic coarse synthesis) gives about 113k word-level
cells, 8.1k flip-flop bits and 422k memory bits. The memory bits are the 409,600-bit window (plus
72 bits of read registers), the 4,096-bit template buffer and the eight 1,024-bit PU template
registers. The systolic array accounts for about 104k of the cells (the 512 absolute-difference
units and their adder trees).

## Verification

Every module has a self-checking testbench in `tb/` (`<module>_tb`). Each uses random stimulus
and independent reference models, and prints a `TB_RESULT` line.

* `ime_core_tb` runs the complete core at its default parameters:
  * a textured 320x160 window and a template taken from it;
  * full searches in all five block modes, frame and field, at both ranges, each compared point
    for point with a reference SAD model (minimum and vector);
  * the 16x16 FS cycle count;
  * POINT and LINE searches, horizontal and vertical, frame and coarse;
  * two CRCS runs, one with uniform motion (expects FSMP) and one with the two MBs moving apart
    (expects FSSB).
* It counts each mechanism and fails if one never occurs: left, right and vertical shifts,
  paired rings, vertical chaining, REG_VS stalls, SRU reloads, cross-path rotation, field mode,
  every block mode, and both fine-search decisions.
* `ime_ctrl_tb` checks the snake order, that every FS point is evaluated once, and the FS,
  LINE and POINT cycle counts against the schedule above.
* `crcs_tb` checks the command sequence and the results against a reference CRCS on synthetic
  cost surfaces, and the fixed sequencing overhead: 1 cycle per command plus 2.

## Where this design departs from, or goes beyond, the published description

* **REG_VS stalls.** The published FS runs without pipeline stalls because the next line arrives
  during the horizontal shifts. Here REG_VS is filled at 8 pixels per cycle. Most configurations
  meet that. However, 8x8, 16x8, 8x16 and field-mode searches at +-4 need up to 16 half-rows per
  line against 8 shifts. In those cases the controller inserts stall cycles, visible on `stall`.
  A wider REG_VS write path, 16 pixels per cycle from a 2-row read, would remove them.
* **Sequential RCSs.** The two RCSs of the CRCS are described as running in parallel from the
  same start point. Here they run one after the other on the same array, which gives the same
  result and takes longer.
* **Vertical connections.** The vertical connection between SBSAs is described as 8x1 pixels.
  Here an up shift moves whole 16-pixel rows.
* **Equation (3) read as TT against TT.** Condition (3) of the image analysis is printed as upper
  TT against lower BB. It is implemented as upper TT against lower TT, matching the pattern of
  conditions (4)–(6).
* **Not built:**
  * the initial candidate vectors of the coarse search (the host supplies four);
  * the centre-point candidates of the fine search by small blocks;
  * the fine-search sequencing, which the host drives with FS/POINT commands;
  * the CPU and memory bus interfaces;
  * the fractional-pel stage;
  * the custom SRAM circuit. Its addressing and pixel mapping are modelled in `swram`, its
    transistor-level design is not.
* **Own choices.** These are this design's own, not taken from the description:
  * the command interface and the lane numbering;
  * the window size of 320x160, chosen to match 410 kb at 8 bits per pixel;
  * the bank line assignment and the per-slot row addressing;
  * the registered read latencies.
