# One Winograd engine for 2D and 3D convolution

This is a convolution accelerator that runs the 3x3 layers of 2D CNNs (such as
VGG16) and the 3x3x3 layers of 3D CNNs (such as C3D) on the same hardware. Both
use the Winograd minimal-filtering algorithm F(2,3). A 2D layer is computed as
F(2x2, 3x3): one 4x4 input window gives a 2x2 output tile with 16
multiplications instead of 36. A 3D layer is computed as F(2x2x2, 3x3x3): a
4x4x4 window gives a 2x2x2 output tile with 64 multiplications instead of 216.

The design rests on one observation. Every 2D and 3D Winograd transform is
separable: it is a 1D transform applied along columns, then rows, then (in 3D)
depth. So the whole engine is built from three small 1D templates (TX for
inputs, TW for filters, TM for outputs), one multiplier array, and
accumulators. A mode bit chooses whether the depth direction is used.

## Arithmetic: the three 1D templates

With `x` a 4-vector of inputs, `w` a 3-vector of weights and `s` a 4-vector of
products:

| unit | file | function | cost |
|---|---|---|---|
| TX | `trans_x.sv` | x0-x2, x1+x2, x2-x1, x1-x3 | 4 add/sub, +1 bit |
| TW | `trans_w.sv` | 2w0, w0+w1+w2, w0-w1+w2, 2w2 | 3 add/sub, +2 bits |
| TM | `trans_m.sv` | s0+s1+s2, s1-s2-s3 | 4 add/sub, +2 bits |

The textbook filter transform G has entries of 1/2. TW computes `2*G*w`
instead: it moves the binary point and drops no bits. Each dimension thus
carries a factor of 2, and the factor is removed once and exactly at the end:

- **In the PE**, the 2D output transform of a product plane is shifted right
  by 2. This is exact, because a 2D Winograd convolution of integer data with
  an integer (doubled) filter gives exactly 4 times the direct result.
- **In the ACCU**, a 3D tile is shifted right by 1 more bit after its depth
  combination.

The engine is therefore bit-exact against direct convolution. Every testbench
checks against direct convolution, not against a Winograd model.

Widths (`wino_pkg.sv`): the data is 16-bit signed fixed point. Transformed
inputs are 19 bits and transformed filters 22 bits. Products are 41 bits.
Everything after the PE is 48 bits. On the way out, a tile is rescaled to
16 bits by an arithmetic right shift (`cfg.out_shift`) with saturation.

## The PE: how a 3D tile goes through a 2D multiplier array

`wino_pe.sv` handles one input channel against one filter.

1. The **input transform** runs TX on the 4 columns and then on the 4 rows of
   every depth plane. In 3D mode it also runs TX on the 16 depth vectors of the
   rotated tile, giving 4x4x4 transformed values.
2. The **filter transform** does the same with TW. It runs on 3 columns and
   then 4 rows per plane, then in 3D on 16 depth vectors, giving 4x4x4 values.
3. The **EWMU** has only 16 multipliers, enough for one 4x4 plane.
   - A 2D tile takes one cycle.
   - A 3D tile is multiplied as four planes p = 0..3 on four consecutive
     cycles. The controller holds the window and steps `plane`.
4. Each product plane goes through the **2D output transform** (TM on the
   4 columns, then on the 2 rows) and the shift by 2.
   - In 2D, that result is the finished 2x2 output.
   - In 3D, the depth part of the output transform is still missing. It is
     linear, so the ACCU finishes it by adding and subtracting planes:
     `out_z0 = P0 + P1 + P2` and `out_z1 = P1 - P2 - P3`, then a shift by 1.

The PE is a 3-stage pipeline:

- stage 1 registers the selected transformed plane;
- stage 2 registers the EWMU products;
- stage 3 registers the output-transformed result.

It accepts a plane every cycle. The transforms are combinational on the held
window, so they are recomputed for each plane of a 3D tile. That costs area and
buys simplicity.

## Two levels of parallelism

`wino_accel_top.sv` instantiates `TO` PUs (`wino_pu.sv`), one per output
channel. Each PU holds `TI` PEs, one per input channel of the current group.

- The input buffer broadcasts each channel's window to the matching PE of
  every PU.
- The weight buffer gives every PE its own filter.
- Inside a PU, an adder tree sums the TI PE results of a plane. The ACCU
  (`accu.sv`) then does three things:
  - finishes the depth transform (3D);
  - adds the partial sum that the same tile position had after the previous
    input-channel groups. These sums are kept in a TILES-entry memory inside
    the ACCU;
  - writes the new sum back.
- On the last group the sum goes on to `post_proc.sv`. That unit rescales,
  applies ReLU, then max-pools the output tile or bypasses the pooling. The
  result goes into the output buffer.

Pooling choices: a 2D tile pools 2x2 to 1. A 3D tile pools 2x2 per depth plane
(1x2x2 pooling), or 2x2x2 to 1 when `pool_depth` is set. A pooled value is
stored at `[z][0][0]` of its tile word, and the other entries are zero.

Defaults: TI = 4 and TO = 64 (VGG16's configuration). The C3D configuration
uses TO = 32, so it runs on the same hardware with half the PUs idle.

## Buffers and how a window is read in one cycle

The engine works on an output tile of TZ x TR x TC (default 2 x 14 x 14, so
49 Winograd tiles per pass). It reads an input tile of (TZ+2) x (TR+2) x (TC+2)
per channel. A 3D window needs 64 values of every channel per cycle.
Splitting the buffer into single registers would give that bandwidth, but at
too high a cost. `input_buffer.sv` partitions it in steps instead:

1. every channel is split into `TZ+2` depth blocks;
2. within a block, the rows are split over two banks: even rows and odd rows;
3. each bank (`ibuf_bank.sv`) has two read ports, and one word is a whole row.

A window starts on an even row. Its four rows are rows r0 and r0+2 of the even
bank and rows r0+1 and r0+3 of the odd bank: one read per port. The depth
blocks and the 4 columns are selected after the bank registers. Each input
channel has its own 64-bit write port, so four ports load the buffer in
parallel.

The weight buffer (`weight_buffer.sv`) holds the TO x TI filters in registers,
because every PE reads its whole filter every cycle. Filters are written
64 bits (4 weights) at a time, in the order `k = z*9 + row*3 + col`. A 2D
filter uses only plane 0. The output buffer (`output_buffer.sv`) has one bank
per output channel and one 2x2x2 x 16-bit word per output tile.

## Control and timing

`engine_ctrl.sv` walks the tile positions: tz (3D only), then tr, then tc. It
gives each position one cycle in 2D and four cycles in 3D. A pass takes

- 2D: (TR/2)(TC/2) + 9 cycles, which is 58 at the defaults;
- 3D: 4(TZ/2)(TR/2)(TC/2) + 9 cycles, which is 205 at the defaults.

The 9 extra cycles are the latency of the pipeline:

| stage | cycles |
|---|---|
| input buffer | 1 |
| PE | 3 |
| ACCU | 1 |
| ReLU/POOL | 1 |
| output-buffer write, plus the `done` register | 3 |

A layer runs as ceil(M/TO) x ceil(N/TI) passes per spatial tile, for M output
and N input channels. For each pass:

1. Load the TI input-channel tiles and the TO x TI filters through the write
   ports.
2. Set `cfg`:
   - `mode3d`;
   - `first_group` and `last_group`, marking the first and last of the
     ceil(N/TI) input-channel groups;
   - `relu_en`, `pool_en`, `pool_depth` and `out_shift`.
3. Pulse `start` and wait for `done`. Hold `cfg` while the pass runs.
4. After the last group, read the output buffer.

`start` while busy is a protocol error, and an assertion checks it.

## What this RTL does not contain, and where it departs

- **External memory and the data mover are not built.** The DRAM, the
  256-bit burst transfers, and the choice between three tiling strategies
  (how much of a feature-map row or plane one transfer covers) are left to
  whoever drives the buffer ports. Loading and computing are not overlapped.
  The original scheme hides transfers behind computation, so its throughput
  figures depend on that overlap and cannot be reproduced with this RTL alone.
- **One run-time configurable design replaces two builds.** The reference
  implementation was built separately for 2D (TO = 64) and 3D (TO = 32). Here
  one RTL does both, with TO = 64.
- **Own choices:**
  - the tile sizes TZ = 2 and TR = TC = 14;
  - the accumulator width (48 bits) and where partial sums live (inside the
    ACCU);
  - the 16-multiplier EWMU with four cycles per 3D tile;
  - the rescale/saturate step;
  - the pooling options and the `relu_en` switch;
  - all pipeline registers;
  - the write-port formats.
- Only stride 1 and 3x3(x3) kernels are supported. Zero padding must already
  be in the loaded input tile. FC layers are not handled.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches use the shared reference
package `tb/wino_ref_pkg.sv`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/wino_pkg.sv tb/wino_ref_pkg.sv tb/tb_wino_accel_top.sv \
  --top-module tb_wino_accel_top
./obj_dir/Vtb_wino_accel_top
```

The two end-to-end testbenches share `tb/accel_tb_body.svh`:

- `tb_wino_accel_top` runs at reduced size: TO = 4 and a 2 x 4 x 6 output
  tile. It takes seconds.
- `tb_wino_accel_full` runs the default top (TI = 4, TO = 64, 2 x 14 x 14).

Both run four layers with two input-channel groups each:

1. 2D with ReLU and pooling;
2. 3D with pooling bypassed;
3. 3D with saturation and 2x2x2 pooling;
4. 2D with nothing after the convolution.

Each checks every output against direct convolution and every pass length
against the formula above. Each also counts the mechanisms it exercises (2D,
3D, group accumulation, ReLU clamping, saturation, pooling, depth pooling,
bypass), and a mechanism that never occurs counts as a failure.
