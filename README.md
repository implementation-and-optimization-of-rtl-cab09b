# 16×16 luma / 8×8 chroma intra prediction in SystemVerilog

An H.264-style intra predictor for 4:2:0 video. Each 16×16 luminance block
and each 8×8 Cb and Cr block is predicted from its already-coded neighbours
(the row above, the column to the left, the top-left corner) in four ways at
once: vertical, horizontal, DC and plane. The sum of absolute differences
(SAD) between each prediction and the original block is computed while the
predictions are generated. The mode with the smallest SAD wins, and its
prediction pixels are sent out.

The main idea is parallelism at the mode level. One counter walks the block
one pixel per clock. On every clock all four mode units produce their
prediction for that pixel and add its absolute error to their own SAD. After
N·N clocks all four SADs are ready at once. Three such units, for Y, Cb and
Cr, run side by side.

The RTL follows the architecture of the article *Implementation and
Optimization of 16×16 Luminance and 8×8 Chrominance Intra Prediction on
FPGA*. That article gives the mode equations, the SAD circuit, the block
structure and the port names of the prediction units. Everything it leaves
open is this design's own choice: handshake timing, memory organisation,
frame format, output format and frame size. Those choices are marked below
and in the file headers.

## Structure

```
Intra_Predictions_Control_Unit          top: frame in, predictions out
├── frame_memory                        main memory: Y, Cb, Cr planes of one frame
├── intra_block_path  (Y,  N=16)        one per component, all three run in parallel
│   ├── mb_feeder                       control-unit side: feeds block + neighbours, collects output
│   └── intra_nxn_modes                 the prediction unit (intra_Y_1616_modes)
│       ├── intra_mem_ctrl              block memory, neighbour registers, sequencing FSM
│       ├── pred_vertical   ─┐
│       ├── pred_horizontal  │ each with sad_accumulator → sad_abs_diff
│       ├── pred_dc          │
│       ├── pred_plane      ─┘
│       └── sad_comparator              minimum SAD, forwards the winner's pixels
├── intra_block_path  (Cb, N=8)         intra_cb_88_modes
└── intra_block_path  (Cr, N=8)         intra_cr_88_modes
intra_pkg                               mode/component enums, sad_width(), sat_u8()
```

The luma unit and the two chroma units are the same module, `intra_nxn_modes`,
with `N = 16` or `N = 8`. Only the constants of the plane mode differ between
the two sizes.

## The four modes

The notation is as follows. T0…T(N‑1) is the row above the block, L0…L(N‑1)
is the column to its left, and LT is the top-left corner pixel. Modes are
numbered 0 vertical, 1 horizontal, 2 DC and 3 plane, for both block sizes.

| mode | prediction | needs |
|---|---|---|
| 0 vertical | pred(x,y) = T[x] | top row |
| 1 horizontal | pred(x,y) = L[y] | left column |
| 2 DC | mean of the available neighbours, 128 if there are none | nothing |
| 3 plane | linear fit through the neighbours | top, left and corner |

A mode whose neighbours are missing is masked out of the comparison. DC is
always a candidate.

**DC.** With n = log2 N:

- both sides available: `(ΣT + ΣL + N) >> (n+1)`
- only the top: `(ΣT + N/2) >> n`
- only the left: `(ΣL + N/2) >> n`

The 8×8 chroma unit uses this same rule over its 8 + 8 neighbours. It
produces one DC value for the whole 8×8 block. This differs from the H.264
standard, which computes a separate chroma DC for each 4×4 quarter.

**Plane.** Let K = N/2 − 1, which is 7 for luma and 3 for chroma, and let
T[−1] = L[−1] = LT. Then:

```
H = Σ_{i=1..N/2} i·(T[K+i] − T[K−i])        V = Σ_{i=1..N/2} i·(L[K+i] − L[K−i])
luma:   b = (5·H + 32) >> 6    c = (5·V + 32) >> 6
chroma: b = (17·H + 16) >> 5   c = (17·V + 16) >> 5
a = 16·(T[N−1] + L[N−1])
pred(x,y) = clip255((a + 16 + b·(x−K) + c·(y−K)) >> 5)
```

All shifts of signed values are arithmetic, so they round towards −∞. For
chroma the plane is centred at x − 3, y − 3, as in H.264. This is where
`(H, V)` are measured.

How the plane unit avoids multipliers is the least obvious part of the
design:

- The constant products `i·d`, `5·H`, `17·H` and `K·b` are written as
  shift-and-add sums (`mul_const` in `pred_plane.sv`).
- No product is formed per pixel. On `scan_start` the unit registers b, c and
  the value at (0,0), which is `a + 16 − K·b − K·c`. After that a single
  accumulator follows the raster scan. It adds b for each step along a row.
  At the end of a row it adds c to a saved row-start value.
- The accumulator works only in raster order. This is why the unit must see
  `scan_start` again before its pixels are replayed for output.

**SAD.** `sad_abs_diff` widens C and R to 9 bits and adds C + ~R + 1. If bit 8
of the sum is set, the difference was negative and the sum is negated once
more. Each mode has its own `sad_accumulator`, which is 16 bits wide for 16×16
blocks (at most 256·255) and 14 bits for 8×8.

**Choice.** `sad_comparator` picks the available mode with the smallest SAD.
On a tie the lower mode number wins. The choice is registered. The
prediction pixels are not stored: the mode units replay their scan, and the
comparator forwards the winner's pixel on each clock.

## Prediction unit interface and timing (`intra_nxn_modes`)

The port names are those of the original units, without the
`Y16_`/`cb_`/`cr_` prefixes. Their protocol is this design's reading of those
names. Two rules cover most of the ports:

- A `*_bit_read` output paired with a data input acts as *ready*. A pixel
  moves on each clock where both valid and ready are high.
- A request that stays high (`neig_writeover`, `start_intra`,
  `pred_pi_write_over`, `end_intra`) is acknowledged by a one-clock
  `*_bit_read` pulse.

| phase | signals | clocks |
|---|---|---|
| load block | `curr_mb_pi`, `valid_currmb_pi` / `valid_currmb_pi_bit_read`, raster order; then a one-clock `curr_mbpi_writeover` pulse | N·N |
| load neighbours (in parallel with the block) | `curr_PI_AM`, `valid_neighbours_pi` / `valid_neighbours_pi_bit_read`, order LT, T0…T(N‑1), L0…L(N‑1); then `neig_writeover` until `neig_writeover_bit_read` | 2N+1 |
| start | `start_intra` with `valid_AD` (top row exists), `valid_IL` (left column exists) and `valid_M` (corner exists), until `start_intra_bit_read` | 1 |
| compute | internal: 1 setup clock, N·N scan clocks, 1 compare clock, 1 restart clock | N·N + 3 |
| output | `pred_out_pi`, `valid_pred_out` / `valid_pred_out_bit_read`; `best_mode` and `min_sad` are valid throughout | N·N |
| close | `pred_pi_write_over` → `pred_pi_writeover_bit_read`; `end_intra` until `end_intra_bit_read` | ≥ 2 |

`valid_pred_out` first rises exactly N·N + 3 clocks after the clock that
carries `start_intra_bit_read`: 259 clocks for luma and 67 for chroma. The
testbench checks this latency. `best_mode` and `min_sad` are additions to the
original port list.

## Frame-level unit (`Intra_Predictions_Control_Unit`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; active-low asynchronous reset (the reset is this design's addition) |
| `enable` | 1 | `din` holds a frame word |
| `din` | 16 | two pixels `{pixel 2k+1, pixel 2k}`: the whole Y plane, then Cb, then Cr |
| `Y_blk_size` | 5 | luma block size; only 16 is built, and an assertion checks it while a frame loads |
| `dout`, `data_out_enable` | 16, 1 | output words, see below |
| `next_frame` | 1 | one-clock pulse after the last macroblock; the next frame may then be sent |

The operation runs in three steps:

1. **Load.** A frame takes `FRAME_W·FRAME_H·3/4` words. The unit accepts one
   word on each clock where `enable` is high, so gaps are allowed.
2. **Predict.** The unit walks the macroblocks in raster order. For each
   macroblock it starts the Y, Cb and Cr feeders together. Each feeder reads
   its block and neighbours from its own read port of `frame_memory`.
   Neighbours outside the picture are marked unavailable.
3. **Output.** The three outputs are sent in the order Y, Cb, Cr. Each starts
   with a header word `{6'b0, comp, 6'b0, mode}`, where comp is 0 for Y, 1 for
   Cb and 2 for Cr. The prediction pixels follow, two per word, in the same
   packing as `din`. That is 129 + 33 + 33 words per macroblock.

The neighbours come from the original frame, not from reconstructed pixels,
because this unit has no transform and reconstruction loop. An encoder that
has such a loop would have to write reconstructed pixels back into
`frame_memory` or feed the prediction units directly.

Measured throughput is 945 clocks per macroblock after the frame is loaded.
A 176×144 frame needs 19,008 load words and then 93,556 clocks for its 99
macroblocks.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `Intra_Predictions_Control_Unit` | `FRAME_W`, `FRAME_H` | 176, 144 | multiples of 16. The frame size is not fixed by the source; QCIF is chosen. |
| `intra_nxn_modes` and the mode units | `N` | 16 | 16 for luma, 8 for chroma. `pred_plane` supports only these two. |
| | `SADW` | `2·log2(N)+8` | SAD accumulator width |
| `frame_memory` | `W`, `H` | 176, 144 | three arrays of 16-bit words. Read is asynchronous, as in LUT RAM. |

At the default size the frame memory is 38,016 bytes (307,200 bits), and the
rest of the design has about 1,200 flip-flops.

## Departures and open points

- **Chroma DC** is one value for the whole 8×8 block (see above). It is not
  H.264's per-4×4 chroma DC.
- **Chroma plane centre.** The equations in the source print `x−7`, `y−7` for
  8×8. This design uses `x−3`, `y−3`, which agrees with the chroma gradient
  definition and with H.264.
- **Mode numbers** are 0 V, 1 H, 2 DC, 3 plane for both sizes. H.264 numbers
  chroma modes differently (0 DC, 1 H, 2 V, 3 plane).
- **Mode enabling.** In the source, the control unit starts only the modes
  whose neighbours exist. Here all four units always run, and the comparator
  drops the unavailable ones. The outputs are the same; only the switching
  activity differs.
- **Neighbours** are original pixels. There are no slice boundaries: a
  neighbour is available when it lies inside the picture.
- **Not built:** the 4×4 luma predictor, and the RGB→YCbCr and YCbCr→RGB
  converters. They belong to the larger system around this unit, but the
  source does not describe them.
- **Protocol, output format, frame format and reset** are this design's own
  choices, as described above.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The expected values
come from `tb/intra_ref_pkg.sv`. That package writes the four modes with
ordinary integer multiplications and ignores the hardware's shift-and-add and
incremental structure.

| testbench | what it covers |
|---|---|
| `tb_sad_abs_diff` | all 65,536 pixel pairs |
| `tb_pred_vertical`, `tb_pred_horizontal`, `tb_pred_dc`, `tb_pred_plane` | both sizes, random and saturating neighbours, all availability cases, every pixel and the SAD, a stalled replay |
| `tb_sad_comparator` | random SADs, masks and ties; hold; pixel forwarding |
| `tb_intra_mem_ctrl` | neighbour registers, scan order, control pulses, stalled output, handshakes |
| `tb_intra_nxn_modes` | the whole unit at N=16 and N=8 under random handshake gaps; chosen mode, SAD, pixels, latency; fails if any mode is never chosen |
| `tb_frame_memory`, `tb_mb_feeder` | plane storage and read-back; feeder with a real unit over every block position |
| `tb_Intra_Predictions_Control_Unit` | two 48×32 frames end to end, with every output word checked. It counts each mode won for luma and for chroma, each availability case, load stalls and `next_frame`, and fails if any of them never happened. |
| `tb_Intra_Predictions_Control_Unit_full` | the same at the default 176×144 size, two frames (about 7 s) |

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/intra_pkg.sv tb/intra_ref_pkg.sv tb/tb_intra_nxn_modes.sv \
    --top-module tb_intra_nxn_modes -o sim
./obj_dir/sim
```

Other modules in `rtl/` and `tb/` are found through `-y rtl -y tb` or the
include paths, because each file holds one module named after it.
