# Full-search integer motion estimator for HEVC, 32x32 CTU

This is a fully parallel SAD engine for HEVC integer motion estimation (IME).
It takes one 32x32 coding tree unit (CTU) of the current frame and compares
it with every position of a 64x64 search area in the reference frame, one
position per clock cycle. At each position it forms 1024 absolute
differences in parallel. A ten-stage adder tree reduces them to the 165
partition SADs that HEVC inter prediction can use inside a 32x32 CTU. A
comparator keeps, for every partition, the smallest SAD and the position
where it occurred.

One complete search takes **4140 clock cycles**: 4096 search positions,
plus the pipeline fill.

## What is computed: the 165 partitions

Inside a 32x32 CTU, every coding unit (CU) of size 32, 16 and 8 is
evaluated with each inter partition shape HEVC allows at that size:

| CU size | shapes                                                     | SADs |
|---------|------------------------------------------------------------|------|
| 32x32 (1 CU)  | 2Nx2N, 2NxN, Nx2N, NxN, nLx2N, nRx2N, 2NxnU, 2NxnD  | 17   |
| 16x16 (4 CUs) | the same eight shapes                               | 68   |
| 8x8 (16 CUs)  | 2Nx2N, 2NxN, Nx2N (no AMP, no 4x4 inter)            | 80   |

In the asymmetric shapes (AMP), the narrow part is a quarter of the CU. For
example, 2NxnU of a 32x32 CU is a 32x8 top part over a 32x24 bottom part.
Each part of each shape has its own SAD. NxN of a 32x32 CU is numerically
the same as the four 16x16 2Nx2N SADs, and NxN of a 16x16 CU is the same as
the 8x8 2Nx2N SADs. Both copies are output, so the count is 165.

The index of each partition in the 165-entry result vectors is given in
`rtl/ime_pkg.sv`, with named base indices such as `IDX_16_2NXNU`. CUs are
numbered in raster order. Parts are listed top before bottom and left
before right.

## Data path

```
             +----------------+  row or column   +-----------------+
 ref_wr_* -->| search_area_mem|----------------->| ref_shift_array |  32x32 candidate
             |  95x95 pixels  |   32 pixels/cyc  | (32 propagation |----------+
             +----------------+                  |   registers)    |          |
                    ^ read requests              +-----------------+          v
             +----------------+    shift command       ^               +-------------+
   start --->|   scan_ctrl    |------------------------+               | 32 x pu     |  1024 |c-r|
             |  (snake scan)  |--- position tag --+                    | (32 pe each)|----+
             +----------------+                   |   cur_ctu_mem ---->+-------------+    |
                                                  | (12-cycle delay)                       v
                                                  |                              +-------------+
                                                  |                              |  sad_tree   | 10 stages
                                                  v                              +-------------+
                                          +----------------+   165 SADs                |
                                          | sad_comparator |<--------------------------+
                                          +----------------+--> min_sad_o, best_x_o, best_y_o, done_o
```

### Snake scan and data reuse

Neighbouring candidate blocks share 31 of their 32 rows, or 31 of their 32
columns. The 32 propagation registers (`ref_shift_array`) therefore hold
the current candidate block, and each cycle they move it by one pixel. Only
one new 32-pixel row or column is read from memory per cycle.

The controller (`scan_ctrl`) walks the candidate positions in a snake
order:

- **A:** down the first column of positions: the rows move up and a new
  row enters at the bottom.
- **B:** one position right: every row moves left and a new column enters
  at the right.
- **C:** up the next column: the rows move down and a new row enters at the
  top.
- B again, then A, and so on until all 64 columns are done.

Before the first position, the array is filled with 32 downward row loads.
The controller emits a *tag* (valid, first, last, x, y) with every shift
command. The tag travels through a 12-stage delay that matches the data
path, so the comparator always knows which position a SAD vector belongs
to.

Row steps need a 32-pixel row segment, and the B step needs a 32-pixel
column segment, each in one cycle. `search_area_mem` therefore keeps the
reference area twice: once organised by rows and once by columns. Each copy
has one wide word per row (or column) with per-pixel write enables, which
is the usual block-RAM-with-byte-writes shape. A read registers the
addressed word. The 32-pixel segment at the requested offset is then
selected after that register.

### SAD tree (the hard part)

`sad_tree` replaces a separate adder tree per partition with one shared
reduction. Each stage adds neighbouring pairs of rows, or of columns, of
the previous stage's grid. Each partition SAD is tapped from the grid where
its shape first appears. Grid sizes below are blocks (rows x columns), and
each block is w x h pixels:

| stage | grid(s) produced                              | SADs tapped here |
|-------|-----------------------------------------------|------------------|
| 1–4   | 16x32 of 1x2 → 16x16 of 2x2 → 8x16 of 2x4 → 8x8 of 4x4 | – |
| 5     | 8x4 of 8x4, 4x8 of 4x8                        | 8x8 2NxN, 8x8 Nx2N |
| 6     | 4x4 of 8x8; quarter strips 8x2 of 16x4, 2x8 of 4x16 | 8x8 2Nx2N, 16x16 NxN |
| 7     | 4x2 of 16x8, 2x4 of 8x16                      | 16x16 2NxN, Nx2N, and all 16x16 AMP parts (1 or 3 strips) |
| 8     | 2x2 of 16x16; strips 4x1 of 32x8, 1x4 of 8x32 | 16x16 2Nx2N, 32x32 NxN |
| 9     | 2x1 of 32x16, 1x2 of 16x32                    | 32x32 2NxN, Nx2N, and all 32x32 AMP parts |
| 10    | 1x1 of 32x32                                  | 32x32 2Nx2N |

SADs finished early travel with the later stages in a registered 165-entry
vector, so all 165 results leave together, ten cycles after the
differences enter. The first four stages use narrow adders (9 to 12 bits).
From stage 5 on, every value is 18 bits, which holds the largest possible
32x32 SAD (1024 x 255).

### Latency

Cycles are counted from the clock edge that samples `start` to the edge
that raises `done_o`, both included:

| step | cycles |
|------|--------|
| read of the first reference row | 1 |
| 32 row loads into the propagation registers (31 preload + the row that completes the first candidate) | 32 |
| the remaining 64·64 − 1 positions, one per cycle | 4095 |
| PU (absolute differences, registered) | 1 |
| SAD tree | 10 |
| comparator (also raises `done_o`) | 1 |
| **total** | **4140** |

In general the total is SR·SR + 44 for an SR x SR search area. Once the
pipeline is full, a new set of 165 SADs is produced every cycle.

### Size

Coarse synthesis of `ime_top` at the default size gives about 40,000
flip-flop bits. About 10,600 are in the SAD tree, 8,192 in the propagation
registers, 8,192 in the current-CTU bank and 4,950 in the comparator. It
also gives 144,400 memory bits: the two 95x95x8 copies of the reference
area. The 1024 PEs are 8-bit subtract/compare units. Their results are
registered in the PUs, 8,192 bits.

## Interface (`ime_top`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the control state and valid bits |
| `cur_wr_en`, `cur_wr_row`, `cur_wr_data` | in | 1, 5, 32×8 | write one row of the current CTU |
| `ref_wr_en`, `ref_wr_x`, `ref_wr_y`, `ref_wr_pix` | in | 1, 7, 7, 8 | write one reference pixel (x, y in 0..94) |
| `start` | in | 1 | start a search; ignored while `busy_o` |
| `busy_o` | out | 1 | the controller is scanning |
| `done_o` | out | 1 | one-cycle pulse: the results are final |
| `min_sad_o` | out | 165×18 | minimum SAD per partition |
| `best_x_o`, `best_y_o` | out | 165×6 | position of that minimum |

Usage:

1. Load both memories.
2. Pulse `start`.
3. Wait for `done_o`. The results then hold until the next search.

Positions are the top-left offset of the best candidate inside the 95x95
reference area, 0..63 on each axis. If the CTU sits at the centre of the
area, the signed motion vector is the position minus 32. Among equal SADs,
the first position in scan order wins. Do not write the memories during a
search.

Parameters:

- `SR` (default 64) is the number of search positions per axis. The
  reference area is SR + 31 pixels on each side.
- The CTU size (32), the pixel width (8 bits) and the SAD width (18 bits)
  are constants in `ime_pkg`.
- The 165-partition structure of `sad_tree` is written for the 32x32 CTU
  only.

## Files

| file | block |
|------|-------|
| `rtl/ime_pkg.sv` | shared types, sizes, result order, shift-command encoding |
| `rtl/ime_top.sv` | top level: wiring, tag delay line |
| `rtl/scan_ctrl.sv` | snake-scan controller |
| `rtl/search_area_mem.sv` | reference memory, row and column read ports |
| `rtl/ref_shift_array.sv` | 32 propagation registers |
| `rtl/cur_ctu_mem.sv` | current CTU bank |
| `rtl/pu.sv`, `rtl/pe.sv` | processing unit and element |
| `rtl/sad_tree.sv` | ten-stage SAD tree |
| `rtl/sad_comparator.sv` | minimum SAD and position per partition |

## Simulation

Each block has a self-checking testbench in `tb/`, named `tb_<block>.sv`.
`tb/ime_ref_pkg.sv` is an independent reference model. It builds each
partition's rectangle from the HEVC shape definitions, not from the adder
tree, and runs a full search in snake order over an integral image. Each
testbench prints `TB_RESULT checks=N failures=M`.

- `tb_ime_top`: SR = 8. It runs three back-to-back searches: a noisy copy
  of a reference block, random pixels, and a flat image where every
  position ties. It checks all 165 results and the SR·SR + 44 latency. It
  also counts the preloads, the down, up and right moves, and the minimum
  replacements and ties in the comparator, and fails if any of them never
  happened.
- `tb_ime_full`: default size (SR = 64). One complete search, all 165
  results, and a latency of exactly 4140 cycles. It runs in well under a
  second.
- `tb_scan_ctrl`: plays the memory and the shift registers with pixel
  coordinates. It checks that every tagged window holds exactly the block
  at its position, for SR = 5 and SR = 8.
- `tb_sad_tree`, `tb_sad_comparator`, `tb_search_area_mem`,
  `tb_ref_shift_array`, `tb_cur_ctu_mem`, `tb_pu`, `tb_pe`: unit tests
  against behavioural models.

To run one testbench with Verilator (the example is the full-size test):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ime_pkg.sv tb/ime_ref_pkg.sv rtl/*.sv tb/scan_check.sv \
    tb/tb_ime_full.sv --top-module tb_ime_full -Mdir obj
./obj/Vtb_ime_full
```

## Where this design makes its own choices

The structure follows the published architecture: 32 PUs of 32 PEs, 32
propagation registers with a down/right/up snake scan, a ten-stage SAD
tree producing 165 SADs, and a one-cycle comparator. So do the stage
latencies and the 4140-cycle total. The following are choices of this
implementation:

- **Array size.** One block diagram of the original shows 64 PUs of 64
  PEs (a 64x64 array). The text and the 32x32-CTU configuration call for
  32 PUs of 32 PEs, and that is what is built.
- **Pixel width.** 8 bits, from a bus labelled 512 bits / 64 pixels.
- **Search area.** The "64x64 search area" is read as 64x64 candidate
  positions in a 95x95-pixel reference window. This fits the 4096 cycles
  of one position per cycle.
- **Memories.** The search area is stored twice, by rows and by columns,
  so that the rightward step can fetch a column in one cycle. The memory
  write ports, and how the memories are loaded, are this design's own.
  Loading time is not part of the 4140 cycles.
- **SAD tree details.** The order of the 165 results is this design's.
  So are the row/column order of the first four tree stages, and forming
  each AMP part from one or three quarter strips.
- **Comparator.** The tie rule (first position in scan order wins) is
  this design's. So are the reporting of positions as offsets and the
  reset behaviour.
- **Frame rates.** The original quotes 30 or 32 fps at 1080p and 15 or
  16 fps at 2K, at 140 MHz. That clock is an FPGA result, not something
  the RTL fixes. At 4140 cycles per CTU, one estimator at 140 MHz covers
  a 1920x1080 frame (2040 CTUs) in 8.45 M cycles, which is about
  16.6 fps. A 2048x1080 frame takes 9.0 M cycles, about 15.5 fps. So one
  instance reaches the 2K figure but only about half the 1080p figure.
