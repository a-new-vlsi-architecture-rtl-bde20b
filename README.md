# 2-D IIR/FIR filter as a systolic array without global broadcast

A 2-D recursive (IIR) or non-recursive (FIR) filter of order N x N computes,
for an image arriving line by line,

    y(n,m) = sum_{i,j=0..N} a_ij x(n-i,m-j) + sum_{(i,j) != (0,0)} b_ij y(n-i,m-j)

Straightforward hardware for this equation sends the input pixel x(n,m), and
for the IIR filter also the new output y(n,m), to every multiplier at once.
That fan-out (a *global broadcast*) becomes the critical path as the filter
grows. This design rewrites the equation so that every signal travels only
from one register to the next: each register output drives one multiplier
and one further register, and the array can be clocked at one multiplier plus
two adder levels (FIR) or one multiplier plus three adder levels (IIR, N = 2),
with **zero latency**: the output of pixel (n,m) appears in the clock in which
x(n,m) is presented.

The RTL is generic in the order N, the image width M and the word width W.
Its defaults are the configuration worked out gate by gate: N = 2, a
512 x 512 image (M = 512), W = 4 bits everywhere, fixed-width 4 x 4
multipliers.

## The rewritten equation

In the z domain, with z1 the line delay and z2 the pixel delay, define the
row polynomials F(i) = sum_j a_ij z2^-j and G(i) = sum_j b_ij z2^-j. The
filter then nests as

    Y = [F(0) X + G(0) Y]
        + z1^-1 z2 ( [F(1) X1 + G(1) Y1]
        + z1^-1 z2 ( [F(2) X2 + G(2) Y2] + ... ))

    X1 = z2^-1 X,  Xk = z2^-1 X(k-1),   and likewise for Y.

Each bracket is one **systolic row**. Two things make it broadcast-free:

* Row i does not take X directly but X_i, a copy delayed by i pixels that
  is passed from row to row through one register per row.
* The extra pixel delay that X_i carries is taken back out of the path
  between rows: z1^-1 z2^+1. With row-wise scanning, z2^-1 is one clock and
  z1^-1 is M clocks, so the path between rows is a **shift register of
  M - 1 stages**, not M.

Counting the delay of term a_ij gives i(M-1) (line shift registers) + i
(input path) + j (row tap) = iM + j clocks. That is exactly pixel
(n-i, m-j) of a row-wise scan.

## Datapath

```
 x_in ──┬───────[D]── X_1 ──┬───────[D]── X_2 ──┐
        │                   │                   │
   ┌────▼────┐         ┌────▼────┐         ┌────▼────┐
   │  row 0  │◄─[SR]───┤  row 1  │◄─[SR]───┤  row 2  │   SR = M-1 stages
   └────┬────┘         └─────────┘         └─────────┘
        │ sum, shifted one bit left
        ▼
      y_out ──► (IIR only) [D] Y_1 ─► [D] Y_2, fed to rows 1, 2 like X;
                row 0 uses z^-1 Y and z^-2 Y from its own taps

 row i:  X_i ─► [D] ─► [D]          taps X_i, z^-1 X_i, z^-2 X_i
          │      │      │
         a_i0   a_i1   a_i2         one fixed-width multiplier per tap
          └──────┴──┬───┴── + partial sum from row i+1 (via SR)
                 adder tree ─► partial sum of row i
```

* `filt2d_row` is one row: an N-stage tap chain on X_i (and on Y_i for the
  IIR filter), one fixed-width multiplier per tap, and an adder tree that
  also adds the partial sum coming up from the row below. Row 0 has no
  b_00 tap (b_00 = 0 by definition, and it would be a combinational loop);
  row N has no partial-sum input.
* `shift_reg` is the (M-1)-stage line shift register between two rows.
* `add_tree` is a balanced tree: 4 operands (2 levels) in an FIR row of
  order 2, 7 operands (3 levels) in an IIR row.
* The row-0 sum is shifted one bit left (the *scaling* step, below) and is
  the output. In the IIR filter it is also the start of the output path
  Y_1, Y_2, ....

Resource counts at order N:

| | FIR (`IIR = 0`) | IIR (`IIR = 1`) |
|---|---|---|
| multipliers | (N+1)^2 = 9 | 2(N+1)^2 - 1 = 17 |
| delay elements (words) | N(N+1) + MN = 1030 | 2N(N+2) + N(M-1) = 1038 |
| critical path | T_mult + 2 T_add | T_mult + 3 T_add |
| latency | 0 | 0 |

The published delay count for this IIR arrangement, 3N(N+1)/2 + (M+1)N
(= 1035 for M = 512), is 3 words lower than this RTL's count. Sharing
registers between the X and Y paths would save those words, but the exact
arrangement is not reproduced here. The FIR count matches.

## Number format and the fixed-width multiplier

Pixels and coefficients are W-bit two's-complement fractions in [-1, 1).
Overflow is avoided by scaling, not by wider words: the sum of the absolute
values of all coefficients must be below one. Then no partial sum can leave
the range, and every adder and register stays W bits wide. Sums wrap modulo
2^W; there is no saturation. An assertion in `filt2d` reports any clock,
outside reset, in which the coefficient magnitudes add up to one or more.

`fw_mult` returns only the upper W bits of the 2W-bit product, with two
integer bits. The adders therefore work in a format with two integer bits,
and the final sum is shifted one bit left to return to the pixel format.

The multiplier works as follows. The partial products are formed
Baugh-Wooley style (sign-position products inverted, constants 2^W and
2^(2W-1) added). Columns W..2W-1 are summed as in a full multiplier. The
most significant dropped column, W-1, is also added, so its carry into the
kept part follows the operands. The columns below it are not built; a
constant bias replaces them. The bias is half an output LSB plus the mean
value of those columns, capped below one LSB so that a zero operand gives
exactly zero. For W = 4 the bias is 12 (in units of 2^-6).

At W = 4 the output LSB of a product is 1/4. A coefficient of 1/8 times any
pixel therefore rounds to zero; only coefficients of 2/8 or more have an
effect. This is a property of the 4-bit format, not of the array.

Over all 256 operand pairs at W = 4, the mean error is -0.03 output LSB,
against -0.41 LSB for plain truncation. The largest error is 17/16 LSB.

This compensation is this design's own choice. A fixed-width multiplier of
this class is specified only by function, so a different compensation
circuit can replace `fw_mult` without touching the rest.

## Line boundaries, frames and control

`row_ctrl` counts the column of the incoming pixel (0..M-1). It raises
**RST2** on the last column and forms **RST1 = RST | RST2**. RST1 clears
the row tap registers at the start of every line, so pixels at the end of
one line do not act as left neighbours of the next line. The image is thus
zero-padded at its left edge.

There is one subtlety. Because the path between rows is M-1 and not M,
row i runs i pixels ahead of row 0 in the line. Its clear is therefore RST2
delayed by i clocks, and `rst1` is a vector with one strobe per row.
The input and output paths X_i, Y_i and the line shift registers are never
cleared at line boundaries. At the right edge, rows already working on the
next input line still need them.

**RST** (synchronous, active high) clears every register. That zero-pads
the top edge, and a frame is the image that follows a reset. Pulse `rst`
between frames; otherwise the top lines of a frame see the bottom lines of
the previous one.

## Interface and timing (`filt2d`, `filt2d_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous reset and frame start |
| `x_in` | in, W | pixel, row-wise order, one per clock, no gaps |
| `a_coef`, `b_coef` | in, (N+1)x(N+1)xW | coefficients, hold stable during a frame; `b_coef[0][0]` ignored; all of `b_coef` ignored when `IIR = 0` |
| `y_out` | out, W | output of the pixel on `x_in` in this clock |
| `col` | out | column of that pixel |

The first pixel of a frame goes in the first clock in which `rst` is low.
There is no valid/enable signal. To pause, the source would need a clock
enable, which this design does not have.

`filt2d_top` places both filters of the design side by side with shared
`clk`/`rst`:
* `fir_*` is the 4-bit FIR filter, N = 2, M = 512.
* `iir_*` is the IIR filter of the same size and word width.

## Where this RTL departs from, or adds to, the published structure

* The multiplier compensation (above) is this design's own.
* The left-edge clearing with per-row delayed RST2, and the choice of which
  registers it clears, are this design's reading. The description only
  says that a counter produces RST2, and that RST1 = RST2 OR RST resets
  "some" flip-flops.
* Coefficients are input ports; no loading mechanism is described.
* The IIR word width is not given; the IIR filter uses W = 4 like the FIR
  filter. Four bits make a very coarse recursive filter. Raise `W` for
  real use, and keep the sum of |coefficients| below one.
* The IIR delay count is 3 words above the published figure (see the table).
* Only the 512 x 512, N = 2, 4-bit FIR configuration has published sizes.
  It is the default and is simulated at full size.

## Files

| file | content |
|---|---|
| `rtl/filt2d_pkg.sv` | default sizes N, M, W |
| `rtl/fw_mult.sv` | fixed-width multiplier |
| `rtl/add_tree.sv` | adder tree |
| `rtl/shift_reg.sv` | (M-1)-stage line shift register |
| `rtl/row_ctrl.sv` | column counter, RST2, per-row RST1 |
| `rtl/filt2d_row.sv` | one systolic row |
| `rtl/filt2d.sv` | the filter (FIR or IIR by parameter) |
| `rtl/filt2d_top.sv` | FIR and IIR filters side by side |
| `tb/tb_ref_pkg.sv` | reference arithmetic shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares the RTL with values it computes itself. For the
filters it evaluates the filter equation directly on image arrays, with the
multiplier modelled from the exact product (`tb_ref_pkg`). Each testbench
prints `TB_RESULT checks=<n> failures=<n>` and stops itself through a
watchdog.

* `tb_fw_mult` covers all operand pairs at W = 4 and W = 6, with error
  bounds and the mean error against truncation.
* `tb_add_tree`, `tb_shift_reg` (full 511 stages) and `tb_row_ctrl`
  (M = 8 and M = 512) test those blocks alone.
* `tb_filt2d_row` tests a middle IIR row, row 0 and an FIR last row, with
  random clears.
* `tb_filt2d` runs an IIR N = 2, an FIR N = 2 and an IIR N = 3 filter on
  8-pixel-wide frames.
* `tb_filt2d_top` runs both filters of the top at full size: two
  512 x 512 frames with a reset between them, fixed and then random
  coefficients. It checks all 524,288 outputs of each filter in their own
  clock (latency 0). It also counts line clears, left-border pixels, data
  through each line shift register, IIR feedback and frame restarts. It
  runs in about 10 s.

To simulate with Verilator, for example the full-size test:

```
verilator --binary --timing -Irtl -Itb rtl/filt2d_pkg.sv tb/tb_ref_pkg.sv \
    rtl/filt2d_top.sv tb/tb_filt2d_top.sv --top tb_filt2d_top
./obj_dir/Vtb_filt2d_top
```

The other testbenches build the same way with their own module at the end.
Pass `-y rtl` if Verilator does not find the submodules by itself.
