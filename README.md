# Baugh-Wooley signed multipliers

A two's-complement multiplier can't simply reuse an unsigned array
multiplier. The partial products that involve a sign bit carry negative
weight, and an array of half and full adders can only add. The Baugh-Wooley
construction rewrites every negative partial product as the addition of its
two's complement. After that the product is a sum of non-negative bits, plus a
few constant and correction bits, and an ordinary adder array can sum it with
no subtractors and no sign-extension logic.

This RTL has two parts:

* `mult4bw`: a 4 x 4 signed multiplier with an 8-bit product, built cell by
  cell from 3 half adders and 12 full adders;
* `bw_mult`: the same construction for any operand width `WIDTH`, with a
  `2*WIDTH`-bit product.

Both are purely combinational. There is no clock, no reset and no state.

## The bit matrix

Take N-bit two's-complement operands, for example N = 4:

    X = -x3*2^3 + sum(x_i*2^i, i<3)      Y = -y3*2^3 + sum(y_j*2^j, j<3)

The product X*Y expands into four groups:

* `x3*y3*2^6`: positive;
* `x_i*y_j*2^(i+j)` with i, j < 3: positive;
* `x_i*y3*2^(i+3)` with i < 3: negative;
* `x3*y_j*2^(j+3)` with j < 3: negative.

Each negative group is replaced by the addition of its two's complement, which
is its one's complement plus one. Take the first negative group. When y3 = 0
its complement is zero. When y3 = 1 it is `-2^3 + 1 + sum(~x_i*2^i)`, scaled
by 2^3. A single expression covers both cases:

    2^3 * ( -2^3 + y3 + ~y3*2^3 + sum(~x_i & y3) * 2^i )

The other negative group works the same way with x and y swapped. The two
constant terms of -2^6 add up to -2^7. Modulo 2^8 that is the same as +2^7, so
it becomes a constant one in the product's top bit. For general N the summed
bits are:

| bits                                   | weight         |
|----------------------------------------|----------------|
| `x[i] & y[j]`, i, j < N-1              | 2^(i+j)        |
| `x[N-1] & y[N-1]`                      | 2^(2N-2)       |
| `~x[i] & y[N-1]`, i < N-1              | 2^(i+N-1)      |
| `x[N-1] & ~y[j]`, j < N-1              | 2^(j+N-1)      |
| `x[N-1]`, `y[N-1]`                     | 2^(N-1)        |
| `~x[N-1]`, `~y[N-1]`                   | 2^(2N-2)       |
| constant 1                             | 2^(2N-1)       |

Any carry out of bit 2N-1 is dropped. The 2N-bit result is exact for every
operand pair. The largest result is (-2^(N-1))^2 = +2^(2N-2), which still fits
as a positive 2N-bit two's-complement number.

## The 4 x 4 array (`mult4bw`)

`mult4bw` reproduces a hand-drawn array. Cells are numbered HA1..HA3 and
FA1..FA12, and the internal nets are named t1..t23 in the RTL. Sums go down
one row and carries go one column to the left:

| row | cells                  | inputs besides array nets                      |
|-----|------------------------|------------------------------------------------|
| 1   | HA1, HA2, HA3          | x1y0, x0y1 / x2y0, x1y1 / x3~y0, x2y1          |
| 2   | FA1, FA2, FA5          | x0y2 / x1y2 / x3~y1, x2y2                      |
| 3   | FA3, FA6, FA8, FA10    | ~x0y3 / ~x1y3 / x3~y2, ~x2y3 / ~x3, ~y3, x3y3  |
| 4   | FA4, FA7, FA9, FA11, FA12 | x3, y3 at FA4; constant 1 at FA12           |

The outputs are produced as follows:

* p0 is x0y0.
* p1 and p2 come from HA1 and FA1.
* Row 4 is a ripple chain, FA4 → FA7 → FA9 → FA11 → FA12, that produces
  p3..p7.

The correction bits x3 and y3 (weight 2^3) enter at FA4. The bits ~x3, ~y3 and
x3y3 (weight 2^6) share FA10. The constant one (weight 2^7) is an input of
FA12. FA12's carry out, t23, has weight 2^8 and is left unconnected.

## The general-width multiplier (`bw_mult`)

`bw_mult` builds the bit matrix from the table above as `WIDTH + 2` rows of
`2*WIDTH` bits: `WIDTH` partial-product rows and two correction rows, one from
x and one from y. The rows are summed as follows:

* A chain of carry-save rows of full adders reduces them, one row per stage.
  Each stage shifts its carries one column left and drops the carry out of
  the top bit.
* A ripple-carry adder adds the last sum and carry vectors. It has a half
  adder in bit 0 and full adders above it.

Many of these adders have constant-zero inputs. Synthesis removes them, so the
source stays regular and easy to check. At `WIDTH = 4` the bit matrix is
exactly the one `mult4bw` sums, but the adders are arranged differently.

Parameter: `WIDTH` (default 4, must be at least 2).

## Top level (`bw_mult_top`)

`bw_mult_top` puts the two multipliers side by side, each with its own ports:

| port | dir | width            | meaning                          |
|------|-----|------------------|----------------------------------|
| x4   | in  | 4                | signed multiplicand, 4-bit array |
| y4   | in  | 4                | signed multiplier, 4-bit array   |
| p4   | out | 8                | signed product x4*y4             |
| xw   | in  | WIDE_WIDTH       | signed multiplicand, wide unit   |
| yw   | in  | WIDE_WIDTH       | signed multiplier, wide unit     |
| pw   | out | 2*WIDE_WIDTH     | signed product xw*yw             |

`WIDE_WIDTH` defaults to 32. The construction is intended to extend to
16 x 16 and 32 x 32 multipliers. A 32-bit instance covers both:

* For a 32 x 32 product, apply the operands directly.
* For a 16 x 16 product, sign-extend both operands to 32 bits and read
  `pw[31:0]`.

## Where this design makes its own choices

* **4-bit array:** the cells, their connections, the correction bits and the
  dropped final carry all follow the reference array.
* **General width:** the bit matrix is the reference derivation with bit 3
  replaced by bit N-1. The adder arrangement for arbitrary widths is not
  prescribed, so `bw_mult` uses a linear carry-save chain with a ripple adder
  at the end. That arrangement is chosen for simplicity, not speed. Its delay
  grows roughly as 3N full-adder delays. A Wallace or Dadda tree would reduce
  the same matrix faster.
* **Top level:** the top itself, the wide instance in it and the default
  width of 32 are this design's choices.
* **Timing:** everything is combinational. For pipelining, register the
  operands and products outside these modules.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog:

* `tb_half_adder`, `tb_full_adder`: all input combinations.
* `tb_mult4bw`: all 256 operand pairs, compared with integer multiplication
  of the operands' signed values.
* `tb_bw_mult`: widths 2, 3, 4 and 8 are tested exhaustively. Widths 16 and 32
  get all pairs of the corner values 0, 1, -1, the most negative value and the
  most positive value, then 5000 random pairs. The per-width driver is
  `tb/bw_mult_checker.sv`.
* `tb_bw_mult_top`: the top at its default parameters.
  * All 256 pairs go through the 4-bit array while the 32-bit unit gets
    corner values and random pairs.
  * A further 20000 random steps follow, then 2000 16 x 16 products run
    through the 32-bit unit by sign extension.
  * It counts how often each case occurred: the four operand-sign
    combinations, a zero operand, and the most negative operand squared. A
    case that never occurs counts as a failure.

All testbenches pass. Each one also fails when a single deliberate fault is
put in its module, for example a missing constant-one correction bit.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_bw_mult_top tb/tb_bw_mult_top.sv
    ./obj_dir/Vtb_bw_mult_top

To run another test, replace `tb_bw_mult_top` with its name. Verilator finds
the modules a testbench uses through `-Irtl -Itb`, because each file is named
after its module.

Lint warnings about unused signals are expected. They flag the final carries
that the design drops on purpose.
