# Order-based low-power DCT processor

A multiply-accumulate DCT spends much of its power in the multiplier, and a
good part of that comes from bits toggling on the multiplier's cosine input
as one coefficient follows another. This processor computes the 8-point DCT
of an 8 x 8 pixel block, `C = E * D`, with one multiply-accumulate unit. Its
trick is to leave the datapath alone and change only the order in which each
row of the cosine matrix `E` is fed to the multiplier. The entries of every
row are reordered offline so that successive coefficients differ in few
bits. The default order is greedy minimum Hamming distance. Each entry is
stored together with the column it came from. That column is then used as
the pixel-memory address, so each coefficient still meets its own pixel.

A sum does not depend on the order of its terms, so every order gives exactly
the same coefficients. The order changes only the switching activity.

## The coefficient word and the pixel address

Each cosine ROM word is 12 bits wide:

| bits   | field | meaning |
|--------|-------|---------|
| 11:9   | `n`   | the column the coefficient had in the original matrix |
| 8:0    | `E`   | the coefficient, signed two's complement |

The pixel memory holds 64 pixels, and its 6-bit read address is
`{k, n}`:

- `k` comes from a 3-bit counter and is the pixel column being transformed.
- `n` is the tag of the ROM word currently on the ROM output.

A conventional design would need a 6-bit pixel address counter. Here only a
3-bit counter is needed, and on the address bus only the three tag bits
change from product to product.

Entry `{k, n}` of the pixel memory holds `D[n][k]`, the pixel in row `n` and
column `k` of the block. So the result is `C[x][k] = sum_n E[x][n] * D[n][k]`:
a one-dimensional DCT of each column of the block. No second pass over the
rows is built, so this is not a 2-D DCT.

## Schedule

`dct_control` runs three nested loops:

- `i` is the entry within a cosine row.
- `x` is the cosine row.
- `k` is the pixel column.

`i` is always the innermost loop. The `LOOP_ORDER` parameter chooses the
order of the other two:

- `LOOP_COL_OUTER` (default): `k` is the outermost loop. The counter steps
  after every 64 reads. All eight cosine rows are applied to one pixel
  column before moving on. Outputs come out in the order C[0][0], C[1][0],
  ..., C[7][0], C[0][1], ...
- `LOOP_COL_INNER`: `x` is the outermost loop. The counter steps after every
  8 reads, and each cosine row is applied to all eight columns in turn.
  Outputs come out in the order C[0][0], C[0][1], ...

Both orders compute the same matrix. They differ in output order and, a
little, in the toggling of the pixel bus.

The pipeline is two stages deep, and one product enters the accumulator on
every clock:

1. Issue: the control presents `{x, i}` to the cosine ROM, which registers
   the word.
2. MAC: the tag `n` and the counter value `k` (delayed one cycle to stay
   aligned with the ROM word) address the pixel memory, whose read is
   combinational. Then the Baugh-Wooley multiplier forms `E * D`, the
   Brent-Kung adder adds it to the register, and the register loads.

The accumulator is "cleared" without losing a cycle. On the first product of
each sum (`i = 0`), the register feedback into the adder is forced to zero.
In the cycle after the eighth product the register holds `C[x][k]`, and
`dct_valid` is raised for exactly that cycle.

A block takes 512 clocks. `done` and the 64th coefficient are visible after
the 513th clock edge that follows the edge sampling `start`. A new `start`
is accepted as soon as the last read of the previous block has been issued,
so blocks can run back to back.

## Multiply-accumulate unit

- `baugh_wooley_mult`: a signed 9 x 9 multiplier. The pixel is unsigned and
  gets a zero sign bit. The Baugh-Wooley form inverts the partial-product
  bits that hold exactly one sign bit, keeps the sign-times-sign bit
  positive, and adds the constant 2^8 + 2^8 + 2^17, all modulo 2^18. The
  rows of partial products are summed with `+`, and the synthesis tool
  chooses the adder structure for that sum.
- `brent_kung_adder`: a parameterised parallel-prefix adder. It has an
  up-sweep over spans of 2, 4, 8, ... bits and a down-sweep that fills in the
  remaining carries. It works for widths that are not a power of two.
- `acc_reg`: the 21-bit accumulator register. Its output is `dct_out`.

21 bits is enough: the largest row sum is 8 x 251 x 255 < 2^19, and one
guard bit is added on top.

## Cosine coefficients and the three ROM images

The coefficients are `round(512 * a(x) * cos((2c+1) x pi / 16))`, with
`a(0) = sqrt(1/8)` and `a(x) = 1/2` otherwise. The range is -251..251. The
scale 512 is the largest power of two whose values fit the 9-bit field.

`rtl/` holds the matrix in three orders, one hex word per line, row-major.
The `COEFF_FILE` parameter selects one:

| file | order within each row |
|------|-----------------------|
| `rtl/coeff_hamming.hex` (default) | start at column 0, then repeatedly take the unused entry nearest in Hamming distance (9-bit values) to the last one; ties go to the lower column |
| `rtl/coeff_ascending.hex` | ascending signed value; ties in column order |
| `rtl/coeff_conventional.hex` | unchanged, so tag = position; this behaves like a conventional DCT |

The greedy Hamming order is a heuristic, not an optimal tour. Any other
order can be used by writing a new image.

`tb/coeff_fig3.hex` holds a 4-point example matrix in a given order, for a
processor built with `LOG2N = 2`. The matrix has rows `64 64 64 64`,
`84 35 -35 -84`, `64 -64 -64 64` and `35 -84 84 -35`, scale 128. In that
order, row 1 is applied as 84*35, -35*29, -84*26, 35*32 to the pixel column
(35, 32, 29, 26).

## Interface of `dct_processor`

| port | dir | width | |
|------|-----|-------|-|
| `clock`, `reset` | in | 1 | reset is asynchronous, active high |
| `pixel_we`, `pixel_waddr`, `pixel` | in | 1, 6, 8 | write pixel `D[n][k]` at address `{k, n}`; only while `busy` is low (an assertion checks this) |
| `start` | in | 1 | begin transforming the loaded block |
| `busy` | out | 1 | high from the cycle after `start` to the `done` cycle |
| `dct_valid`, `dct_row`, `dct_col`, `dct_out` | out | 1, 3, 3, 21 | one finished coefficient `C[row][col]`, signed |
| `done` | out | 1 | marks the last coefficient of the block |

Parameters:

- `LOG2N` (3): sets the block size.
- `COEFF_FILE`: the ROM image. The path is relative to the directory the
  simulator runs in.
- `LOOP_ORDER`: see Schedule.

## Files

- `rtl/dct_pkg.sv`: widths and the `loop_order_e` type.
- `rtl/dct_processor.sv`: the top. It contains `dct_control` (with
  `pixel_addr_counter`), `coeff_rom`, `pixel_mem` and `mac_unit` (with
  `baugh_wooley_mult`, `brent_kung_adder` and `acc_reg`).
- `tb/`: one self-checking testbench per module. The expected values are
  computed with real arithmetic in `tb/tb_dct_ref_pkg.sv`, independently of
  the ROM images.
- `tb/tb_dct_processor.sv`: the end-to-end test at default parameters. It
  runs random, flat, striped and checkerboard blocks plus a back-to-back
  block. It checks all coefficients, their indices and the cycle counts.
- `tb/tb_dct_workloads.sv`: runs the three orders and the column-inner
  schedule side by side, checks the 4-point example, and prints toggle
  counts.

## Simulating

Run from the directory that holds `rtl/` and `tb/`, because the ROM images
are read by relative path:

    verilator --binary --timing --assert -Irtl -Itb --Mdir obj_dir \
        rtl/dct_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_dct_processor.sv \
        --top-module tb_dct_processor
    ./obj_dir/Vtb_dct_processor

Every testbench ends with `TB_RESULT checks=N failures=M`. Substitute any
other `tb_*.sv` and its module name. Each one builds without warnings and
runs in well under a second.

## Switching activity (simulated)

`tb_dct_workloads` feeds four synthetic 8 x 8-block scenes, 4 blocks each,
to each configuration. It counts bit toggles at the multiplier inputs:

| scene | order | cosine input | pixel input | product |
|-------|-------|-------------:|------------:|--------:|
| checkerboard | conventional | 8830 | 16128 | 18592 |
| checkerboard | ascending | 6785 | 11000 | 15896 |
| checkerboard | Hamming | 5694 | 11008 | 15584 |
| horizontal stripes | conventional | 8832 | 16384 | 19264 |
| horizontal stripes | Hamming | 5696 | 11264 | 16192 |
| smooth + noise | conventional | 8832 | 7188 | 18222 |
| smooth + noise | Hamming | 5696 | 7874 | 17354 |

With the Hamming order the cosine input toggles about 35% less than with the
conventional order; with the ascending order, about 23% less. The pixel
input and the product change too, depending on the image. These are toggle
counts, not power figures: no gate-level power estimate is part of this
RTL.

The same run also counts toggles on the 6-bit pixel-memory read address. Only
its three tag bits change from one product to the next. Over the same blocks
the address toggles 3640 times with the conventional order and 3960 times
with the Hamming order. Reordering thus costs a little activity on the
address side and saves much more at the multiplier.

## What is this design's own choice

The overall architecture is the one described for this scheme:

- a tagged, reordered coefficient ROM;
- the tag used as the low pixel address and a 3-bit column counter as the
  high one;
- a Baugh-Wooley multiplier, a Brent-Kung adder and an accumulator register.

The 12-bit word with its 3/9 split is also part of the scheme.

These points were not specified and were decided here:

- the coefficient scale (512);
- the 8-bit unsigned pixel and the 21-bit accumulator;
- the loading port, the start/busy/done handshake and the output strobe and
  indices;
- the one-cycle ROM and combinational pixel-memory read;
- clearing by gating the feedback;
- the reset style;
- the exact tie rule of the Hamming ordering.

The default loop order follows the algorithm's flowchart, which makes the
pixel column the outermost loop. The scheme's text instead describes the
column counter stepping every 8 accesses, which is what `LOOP_COL_INNER`
implements.

Not built:

- the reordering itself, which is done offline when the ROM image is made;
- a conventional 6-bit-address variant (the `coeff_conventional.hex` image
  on the same datapath stands in for it functionally);
- any 2-D (row-column) DCT around this 1-D core.
