# Low-cost streaming 2-D biorthogonal DWT

This RTL computes a three-level, separable 2-D discrete wavelet transform of
an N x N image of 8-bit pixels. Pixels enter one per clock in raster order.
There is no frame buffer. Four filters and a few line stores do all levels
while the image streams in. Images can follow each other with no gap, so
a new image can start every N² clocks. After the last image of a run, about
2N more clocks are needed to finish its bottom rows.

Two ideas keep the hardware small:

* **Symmetric filters.** A biorthogonal filter has symmetric coefficients
  (h0 = h4, h1 = h3 for five taps). Each filter adds the two samples that
  share a coefficient before multiplying. An L-tap filter therefore needs
  L/2 + 1 multipliers and L - 1 adders.
* **One schedule for all levels.** Level 1 keeps each column filter busy
  only every other cycle. Levels 2 and 3 are fitted into the idle cycles, so
  they need no filters and no buffers of their own. Only the row
  storage that every level needs anyway remains.

## Data flow

```
              G/H interleaved                      HH, HG (all levels)
 pixel ──► HF1 ───────────────┬─ H ─► VF1 ──────────────┬──────────────► out_h
                              │        ▲  ▲              │ HH of level 1,2
                              │        │  └─ storage HR  ▼
                              │        │            HF2 (levels 2,3)
                              │        └──── FIFO ◄── H ─┤
                              └─ G ─► VF2 ◄─── FIFO ◄─ G ┘
                                       ▲  └─ storage GR
                                       └──────────────────────────────► out_g
                                                   GH, GG (all levels)
```

Band names give the row filter first, then the column filter. H is the
lowpass filter and G the highpass filter. HG is therefore "lowpass along
rows, highpass along columns". Level l turns its HH input (the image at
level 1) into HH_l, HG_l, GH_l and GG_l, each N/2^l on a side. HH_l becomes
the input of level l+1. After three levels the result is HG, GH and GG of
levels 1 to 3, plus HH3.

| Unit | Module | Role |
|---|---|---|
| HF1 | `row_filter` (CTX = 1) | Row filter for level 1. It takes pixels directly. |
| HF2 | `row_filter` (CTX = LEVELS-1) | Row filter for levels 2 and up. It keeps one delay chain per level and shares one arithmetic unit. |
| VF1 | `column_filter` (BAND = 0) | Column filter for the lowpass-row band of every level. It emits HH and HG. |
| VF2 | `column_filter` (BAND = 1) | Column filter for the highpass-row band of every level. It emits GH and GG. |
| storage unit | `storage_unit` | Holds the previous L-1 rows of every band and level (banks HR and GR). |
| schedule | `vf_scheduler` (one per column filter) | Chooses the operation each column filter runs in each cycle. |
| filter arithmetic | `sym_filter_pe` | Symmetric pre-adders, multipliers and adder chain. |
| coefficient registers | `coef_bank` | One g and one h register per tap pair, shared by all four filters. |
| types | `dwt_pkg` | Widths, structs and the default coefficients. |

## How a filter produces decimated output

A wavelet level keeps every other lowpass output and every other highpass
output. The filters here never compute the outputs that would be thrown
away. Each row filter produces one output per input sample, and the
coefficient set alternates:

* centre column even: lowpass (h) coefficients, giving an H-band sample at
  column j/2;
* centre column odd: highpass (g) coefficients, giving a G-band sample.

A row of N pixels thus becomes N/2 H samples and N/2 G samples,
interleaved. H samples go to VF1 and G samples to VF2. Since the two
alternate, each column filter gets a level-1 sample at most every other
cycle.

The column filters work the same way in the vertical direction. An operation
on row r of a band uses the current sample together with rows r-1 to r-4
from the storage unit. Its centre is row r-2. If the centre row is even, the
filter uses lowpass coefficients and emits HH (VF1) or GH (VF2). If it is
odd, it uses highpass coefficients and emits HG or GG. The output row index
is (r-2)/2.

The coefficient choice comes from the centre sample's parity. It does not
come from a free-running toggle, so gaps in the input do not break it.

## The schedule (`vf_scheduler`)

This is the part that needs the most care. Each column filter runs at most
one operation per cycle. It takes the first available source in this fixed
order:

1. **Level 1 from HF1 (`direct`).** This source is never refused, so the
   pixel stream never stalls. It is busy at most every other cycle.
2. **Levels 2 and 3 from HF2, through a FIFO.** HH samples of level 1 leave
   VF1 and re-enter HF2 in context 0 (level 2). HH samples of level 2 enter
   context 1 (level 3). HF2's outputs are split by band into the FIFO in
   front of VF1 and the FIFO in front of VF2. These samples fill the cycles
   level 1 leaves idle. The FIFO only smooths collisions, and in practice it
   holds no more than a few entries. `error` would flag an overflow, and an
   assertion checks for it.
3. **Boundary pad rows.** A level's last real operation is row R-1,
   column C-1 of its band. Once it has been issued, the scheduler issues
   L/2 = 2 extra rows for that level (rows R and R+1, columns 0 to C-1).
   These rows carry no data. They move the column window past the bottom
   edge so the last two output rows of the band are produced. Pads of a
   lower level go first.

Within one level and band, operations on one column always arrive in row
order. The storage unit shifts per column, so this ordering is all the
filters need. Operations from different levels touch different storage
banks and different HF2 delay chains, so they can interleave freely.

The row filters handle the end of a row in a similar way. The last L/2
outputs of a row need samples beyond its right edge. They are produced when
the first samples of the next row are pushed. Each delay-chain stage carries
its row number and image parity, and taps from another row or image count as
zero. After the last row of a level, the owner pushes L/2 flush samples (only
at the end of a run; see below):

* HF1's flush is driven by the top's state machine.
* HF2's flush is driven by a per-level counter in `dwt2d_top`. It starts
  when the last HH sample of the level below has been pushed.

Ordering of the end of an image:

1. The last pixel, then the HF1 flush.
2. The last level-1 operations, then the level-1 pad rows.
3. The last HH1 rows, then HF2 level 2 and its flush.
4. Level 2 pads, then HH2.
5. Level 3 with its flush and pads.

`done` is a one-cycle pulse in the cycle after the pad rows of every level
have gone through both column filters.

### Back-to-back images

If a pixel arrives in the cycle after an image's last pixel, the next image
is chained to it. There is then no flush and no pad row for the first image.
Instead:

* Each sample, operation and coefficient carries a one-bit image parity
  (`img`). The row filters zero the taps that belong to the other image, so
  the first pixels of the new image act as the right-edge flush of the old
  one.
* In the column filters, rows r < L/2 of the new image compute the last
  L/2 rows of the previous image. Their centre row is row R + r - L/2 of the
  old image. All their taps come from the storage unit, which still holds
  the old image's last rows. The new row itself counts as zero. The output
  carries the old image's parity.
* Higher levels work the same way, because the HH rows of the new image
  follow those of the old one in the same order.

Only the last image of a run gets flush pushes and pad rows, and `done`
pulses once, at the end of the run.

## Storage unit

Bank t of the storage unit holds row r-1-t of every column of a band. An
operation reads all L-1 banks of its column combinationally. At the clock
edge it shifts the column: the new sample enters bank 0, and each bank takes
the value of the bank before it. This behaves as L-1 delay lines of one band
row each, stored as one word per column.

The current row is never stored before use. It goes straight into the
filter, so L-1 rows suffice where a plain delay line would keep L. Each
level's bands are N/2^l wide. The unit therefore holds
2(L-1)(N/2 + N/4 + N/8) words, which is 3584 words of 16 bits at N = 512.
That is just under the 2N(L-1) that a transform with an unlimited number of
levels would approach.

The storage contents are never reset. The column filter zeroes taps for rows
outside 0 to R-1, so stale data from an earlier image cannot leak into a
result.

## Arithmetic

* **Pixels** are unsigned 8-bit values. HF1 takes them zero-extended to
  9-bit signed. All other samples are 16-bit two's complement.
* **Coefficients** are 16-bit with FRAC = 8 fraction bits. They sit in
  run-time registers (`coef_bank`), so the multipliers are real 16-bit
  multipliers and not constant shifts. Reset loads the 5/3 biorthogonal
  pair, each written as a symmetric 5-tap filter, outer tap first:
  * lowpass h = (-1, 2, 6, 2, -1)/8, stored as `{-32, 64, 192}`;
  * highpass g = (0, -4, 8, -4, 0)/8, stored as `{0, -128, 256}`.
* **Each output** is Σ coefficient × sample, rounded as
  (sum + 2^(FRAC-1)) >>> FRAC, then saturated to 16 bits.
* **Edges:** the image is zero-extended at all four edges.
* **Range:** with 8-bit input, three levels of the 5/3 pair stay well inside
  16 bits (HH grows by at most 1.5 per filtering pass). Saturation never
  triggers on real images.

## Interface and timing (`dwt2d_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | Clock and asynchronous active-low reset. |
| `in_valid`, `in_ready`, `in_pixel[7:0]` | in/out/in | Pixel stream in raster order. A pixel is taken when `in_valid && in_ready`. A pixel in the cycle after an image's last pixel starts the next image directly. If no pixel comes, the run ends: `in_ready` drops and rises again with `done`. |
| `out_h` | out | `coef_out_t` from VF1: `valid`, `img` (image parity), `band` (HH/HG), `lvl` (1-based), `row`, `col`, `data`. |
| `out_g` | out | `coef_out_t` from VF2: GH and GG in the same format. |
| `coef_we`, `coef_sel_g`, `coef_idx`, `coef_wdata` | in | Writes one coefficient register: g when `coef_sel_g` is 1, h otherwise. `coef_idx` 0 is the outer tap pair. Write between runs. |
| `done` | out | One-cycle pulse after the last coefficient of a run. A new image may start in that cycle. |
| `error` | out | Sticky FIFO overflow flag. It should never rise. |

Ports and outputs:

* `out_h` and `out_g` can both be valid in the same cycle.
* `out_h` also carries the HH bands of levels 1 and 2, because they are VF1
  outputs. A user who wants only the final sub-bands ignores HH with
  `lvl < LEVELS`.
* Coefficients come out in schedule order, not raster order. Each one
  carries its own band, level, row and column.

Cycle counts:

* Back-to-back images start every N² cycles (262144 at N = 512).
* For the last image of a run, the cycles from its first pixel to `done`
  are N² + 1099 at N = 512 (263243 cycles) and N² + 79 at N = 32.
* Nearly all of that overhead is the boundary pad rows and their effect on
  the higher levels. Chained images do not pay it.
* Gaps in the input only stretch the schedule.

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 512 | Image side. Must be a multiple of 2^LEVELS and at most 2048 (`IDX_W` = 12 in `dwt_pkg`). |
| `L` | 5 | Filter length. Must be odd. |
| `LEVELS` | 3 | Number of resolution levels, at least 2. HF2 gets LEVELS-1 contexts. |
| `FRAC` | 8 | Number of coefficient fraction bits. |
| `FIFO_DEPTH` | 8 | Depth of the FIFO between HF2 and each column filter. |
| `H_COEF`, `G_COEF` | 5/3 pair | Reset values of the coefficient registers: L/2+1 each, outer tap first. |

Another 5-tap symmetric pair can be loaded at run time through the
coefficient port. A different length needs a new L together with L/2+1
reset values for each of `H_COEF` and `G_COEF`. The default 5/3 pair only
fits L = 5.

## What follows the architecture and what is this design's own

These parts follow the architecture:

* four filters (HF1, HF2, VF1, VF2) plus one storage unit;
* HF2 and the two column filters shared by all levels above level 1;
* HH fed back from VF1 to HF2;
* H/G interleaved row-filter output;
* symmetric five-tap filter arithmetic, with pre-adders ahead of three
  multipliers;
* storage of L-1 rows per band, the current row going to the filter
  directly;
* a narrow first-level filter and 16-bit data after it;
* three levels.

These parts are this design's own choices:

* **Schedule.** The original work fixes the interleaving in a table and
  reaches N² + 6 cycles for three levels. This RTL reaches the same "run
  when inputs are ready and the filter is idle" rule dynamically, with a
  fixed priority and a small FIFO. Chained images keep the period at N²;
  only the end of a run costs about 2N cycles more, because the boundary
  rows are computed explicitly.
* **Boundaries.** The design uses zero extension, pad rows and flush pushes.
  No boundary treatment was specified. Symmetric extension, as JPEG 2000
  uses, would need a mux per pre-adder input and is not built.
* **Coefficient selection.** A select input picks g or h per output. The
  original structure uses a two-entry g/h coefficient register that rotates.
  The coefficient write port is also this design's own.
* **Arithmetic details.** The coefficients, FRAC, rounding and saturation
  are all chosen here.
* **Control.** The valid/ready handshake, the `done` pulse, the image
  parity tag and the chaining of back-to-back images are chosen here.
* **Filter length.** Only odd lengths are built. The even-length variant
  would use half-sample-symmetric filters with L/2 multipliers, and it is
  not implemented.
* **HF1 width.** HF1's multipliers are 10 × 16 bits rather than 8 × 16,
  because the pixels are zero-extended to signed and then pre-added.

## Verification

Each testbench in `tb/` checks itself and prints
`TB_RESULT checks=<n> failures=<n>`. `tb/dwt_ref_pkg.sv` is the reference.
It is a plain array model of the whole multi-level transform: every row
first, then every column, with the same fixed-point rule.

| Testbench | What it checks |
|---|---|
| `tb_dwt2d_full` | The top with all defaults (N = 512). Two random images, chained with no gap. Every coefficient of both images is compared, all 2 × 344064 must appear exactly once, the period must be N², the last image must finish within N² + 3N cycles, and every schedule mechanism must occur. |
| `tb_dwt2d_top` | N = 32, three runs: one random image with random input gaps; three chained images (random, checkerboard, random) whose period must be exactly N²; then two images with gaps after a different coefficient pair has been loaded. Same checks as above. It also counts FIFO use, FIFO holding, row-end wrap, HF1 and HF2 flush, HF2 level switches, pad rows, chained images, rows completed by the next image, input gaps and coefficient reloads. |
| `tb_sym_filter_pe` | Random and saturating windows, with the 5/3 pair and with random coefficients, against a direct convolution sum. |
| `tb_coef_bank` | Reset values, random writes, and an ignored out-of-range index. |
| `tb_row_filter` | HF2 configuration with two contexts of different row lengths, randomly interleaved pushes and flush. Each output, including its image tag, is checked one cycle after its push. |
| `tb_storage_unit` | Random shift operations on both ports against a per-column history model. |
| `tb_column_filter` | Both bands, random level, row (including pad rows), column, image parity and chain flag. Checks the output's presence, image, band, position and value, including rows that complete the previous image. |
| `tb_vf_scheduler` | Priority order, FIFO order, pad-row order, timing and image tag, `all_done` and `clear`. |

To run a testbench with plain Verilator from the project root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dwt_pkg.sv rtl/coef_bank.sv rtl/sym_filter_pe.sv rtl/row_filter.sv \
  rtl/storage_unit.sv rtl/column_filter.sv rtl/vf_scheduler.sv rtl/dwt2d_top.sv \
  tb/dwt_ref_pkg.sv tb/tb_dwt2d_full.sv --top-module tb_dwt2d_full
./obj_dir/Vtb_dwt2d_full
```

Replace the last file and the top module to run another testbench. The
unit testbenches need only the package, the module under test and its
sub-modules. The full-size run takes a few seconds.

`tb_dwt2d_top` takes N and LEVELS from two local parameters at its top.
Besides the default (N = 32, three levels) it has also passed with N = 16
and 64 at two levels, N = 64 at four levels and N = 128 at three levels.
The HF2 level-switch count is skipped at two levels, where HF2 has only one
level.
