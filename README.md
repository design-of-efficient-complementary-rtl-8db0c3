# Radix-4 Modified Booth Array Multiplier

A signed N x N multiplier (default 8 x 8 -> 16 bits) that recodes the
multiplier operand into radix-4 Booth digits, so that only N/2 partial-product
rows have to be added instead of N. The rows are summed in a regular linear
array of full adders, the layout favoured for full-custom designs because
every cell talks only to its neighbours, and a ripple-carry adder turns the
final sum and carry vectors into the product.

The architecture is that of a published low-power multiplier that was drawn
at transistor level in complementary pass-transistor logic (CPL): a 10-transistor
full adder and a pass-transistor Booth encoder/decoder. This RTL keeps the
architecture, the Booth encoder/decoder equations, the sign-correction and
negate-bit scheme and the idea of routing the late partial sum into the
full adder's fast carry-in pin. It does not (and cannot) model the
transistor circuits, whose advantages are area, power and delay, not logic.

```
   x (multiplier) ---+        y (multiplicand)
                     |              |
          +----------v--------------v-----------+
          |  N/2 x pp_row                       |  partial-product generator
          |   booth_encoder + (N+1) x           |
          |   booth_decoder_bit                 |
          +----+---------------+-----------+----+
               | pp[i][N:0]    | sc[i]     | neg[i]
          +----v---------------v-----------v----+
          |  pp_array: N/2-1 levels of          |  carry-save array
          |  full_adder, 2N columns each        |
          +----+-----------------------+--------+
               | sum_v                 | carry_v
          +----v-----------------------v--------+
          |  ripple_carry_adder (2N bits)       |  final adder
          +-----------------+-------------------+
                            v
                         p [2N-1:0]
```

Everything is combinational: there is no clock, reset or pipeline register.
Register the operands and product outside if the multiplier sits in a clocked
path.

## Booth recoding

The multiplier `x` is read in overlapping three-bit groups
`{x[2i+1], x[2i], x[2i-1]}` with `x[-1] = 0`; group `i` stands for the digit
`d_i = -2*x[2i+1] + x[2i] + x[2i-1]`, one of -2, -1, 0, +1, +2, and
`x = sum d_i * 4^i`. The product is therefore `sum (d_i * y) * 4^i`: N/2 rows,
each a cheap multiple of `y`.

`booth_encoder` does not produce the digit itself but four lines that let a
one-bit decoder pick the right multiple with a handful of gates:

| line   | equation              | meaning                                  |
|--------|-----------------------|------------------------------------------|
| `neg`  | `x[2i+1]`             | the digit is negative: invert `y`        |
| `x1_b` | `~(x[2i] ^ x[2i-1])`  | low when the row is +-1*y                |
| `z`    | `~(x[2i+1] ^ x[2i])`  | low (with `x2_b`) when the row is +-2*y  |
| `x2_b` | `x[2i] ^ x[2i-1]`     |                                          |

`booth_decoder_bit` then forms bit j of the row as

```
ppt_j = NAND( XNOR(y[j],   neg) | x1_b ,
              XNOR(y[j-1], neg) | z | x2_b )
      = (|d|==1 & (y[j] ^ neg)) | (|d|==2 & (y[j-1] ^ neg))
```

so +1 passes `y`, +2 passes `y` shifted left by one (via `y[j-1]`), and the
negative digits pass the one's complement of those. The four lines travel
together as the packed struct `mbe_pkg::booth_ctrl_t`.

## Making rows negative and keeping them short

This is the part of the design that is easiest to get wrong.

**Negate bit.** A decoder row for a negative digit is the one's complement of
`|d|*y`; the missing +1 is a separate bit, `neg_lsb`, added at the row's least
significant column (column `2i`). The group `111` is the digit -0: `neg` is 1
but neither `x1_b` nor the 2*y path is enabled, so every decoded bit is 0, and
adding `neg` there would give +1 instead of 0. The row therefore emits
`neg_lsb = x[2i+1] & ~(x[2i] & x[2i-1])`. The decoders still receive the
plain `neg = x[2i+1]`, which does no harm because nothing is selected.

**Row width.** Each row is N+1 bits (`ppt_0 .. ppt_N`), because 2*y needs one
bit more than y; `y[N]` is taken as `y[N-1]` and `y[-1]` as 0.
The value of row i is `signed(pp_i) + neg_lsb_i = d_i * y`.

**Sign correction.** Adding signed rows would normally require sign-extending
each one to 2N bits. Instead each row's sign `s_i = pp_i[N]` is replaced by
its complement `sc_i = ~s_i` (the sign-correction bit), which turns the row
into an unsigned number plus the constant `-2^(N+2i)`. The constants of all
rows are summed once and folded into the rows, which gives this bit layout in
the 2N-bit array (N = 8 shown, columns 15..0):

```
row 0 :             ~s0 s0  s0 p8 p7 p6 p5 p4 p3 p2 p1 p0
row 1 :           1 ~s1 p7 p6 p5 p4 p3 p2 p1 p0
row 2 :      1 ~s2 p7 ...  p0                                (shifted by 4)
row 3 : 1 ~s3 p7 ...  p0                                     (shifted by 6)
negate:               n3 . n2 . n1 . n0                      (columns 6,4,2,0)
```

Row 0 carries `s0, s0, ~s0` in columns N..N+2; every later row carries
`~s_i` in column 2i+N and a constant 1 in column 2i+N+1. Anything beyond
column 2N-1 is dropped: the result is exact modulo 2^2N, which is all a
signed N x N product needs.

## The full-adder array

`pp_array` lays the N/2 rows and the negate vector (N/2+1 vectors in all)
into 2N-bit columns and reduces them to two vectors with N/2-1 levels of
full adders, one level per extra row, exactly like a classic array
multiplier:

* level 1 adds row 0, row 1 and the negate vector;
* level k (k >= 2) adds row k to the sum and carry of level k-1.

Carries move one column left between levels; the carry out of column 2N-1
is discarded. For N = 8 this is three levels, the three rows of cells of
the original 8-bit array.

**Fast pin.** The full adder is written as `h = a ^ b`,
`sum = h ? ~cin : cin`, `cout = h ? cin : a`, the multiplexer form of small
pass-transistor adders. In that form a change on `a` or `b` passes two
stages to reach `sum` while a change on `cin` passes one. The array is wired
for the matching delay model: `a`/`b` to `sum` costs 2T, `cin` to `sum` costs
T, where T is one XOR delay.

A conventionally wired array feeds the partial sum from the level above into
`a` at every level. Its partial-product reduction then costs `(N/2-1) * 2T`.
Here the levels alternate:

| level            | partial sum from above | Booth row | carries from above | cost |
|------------------|------------------------|-----------|--------------------|------|
| 1                | (rows 0, 1 on `a`, `b`; negate bits on `cin`) | | | 2T |
| odd (3, 5, ...)  | `a`                    | `b`       | `cin`              | 2T   |
| even (2, 4, ...) | `cin`                  | `a`       | `b`                | T    |

That totals `(3N-4)/4 * T`, a saving of `(N-4)/4 * T` at no extra hardware:

| N  | conventional | this array |
|----|--------------|------------|
| 8  | 6T           | 5T         |
| 16 | 14T          | 11T        |
| 32 | 30T          | 23T        |
| 64 | 62T          | 47T        |

`pp_array` takes its per-level pin choice from `mbe_pkg::sum_on_cin()`,
and `mbe_pkg::array_delay(N)` counts the delay of that wiring; the
testbenches check it against the totals above. It is a count
under the model, not a timing analysis: carry-path delays are not part of the
model, pin assignment changes no logic, and real delays need synthesis with a
cell library and static timing. The original design states the totals and
shows the two cell pinnings, but not cell by cell which one is used where;
the alternation above is the wiring that yields exactly those totals.

Every level spans all 2N columns, and the final adder adds the full 2N-bit
vectors. Cells whose inputs are constant (the low columns, where the original
lets product bits bypass the final adder, and the columns past each row's top)
are reduced away by synthesis; the product is the same.

## Final adder

`ripple_carry_adder` is a chain of the same `full_adder` cell, WIDTH = 2N bits,
carry-in 0. The original design names a ripple-carry adder for this stage
and allows a carry-lookahead adder instead; swapping it for a faster adder
only requires replacing this module.

## Modules

| module               | role                                                     | parameters |
|----------------------|----------------------------------------------------------|------------|
| `mbe_pkg`            | `booth_ctrl_t`; array pin rule and delay count           |            |
| `booth_encoder`      | one group of x -> `booth_ctrl_t`                         |            |
| `booth_decoder_bit`  | one partial-product bit                                  |            |
| `pp_row`             | encoder + N+1 decoder bits + `sc` + `neg_lsb`            | N = 8      |
| `full_adder`         | 1-bit full adder, `cin` is the fast pin                  |            |
| `pp_array`           | carry-save array, N/2-1 levels                           | N = 8      |
| `ripple_carry_adder` | final carry-propagate adder                              | WIDTH = 16 |
| `mbe_multiplier`     | top: `x`, `y` (N bits, signed) -> `p` (2N bits, signed)  | N = 8      |

`N` must be even and at least 4 (an elaboration-time assertion checks this).
`x` is the operand that is Booth-recoded, `y` the one that is decoded; since
multiplication commutes, this only matters for which input sees the encoder.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
values it computes itself and prints `TB_RESULT checks=<n> failures=<n>`:

* `tb_booth_encoder`, `tb_booth_decoder_bit`, `tb_full_adder`: exhaustive.
* `tb_pp_row`: all 8 groups x all 256 multiplicands (N = 8); checks
  `signed(pp) + neg_lsb == d*y` and `sc == ~pp[N]`.
* `tb_pp_array`: 5000+ random rows (N = 8); checks
  `sum_v + carry_v == sum (signed(pp_i) + neg_i) * 4^i mod 2^16`, and
  `mbe_pkg::array_delay(N) == (3N-4)/4`.
* `tb_ripple_carry_adder`: corner cases and 2000 random 16-bit additions.
* `tb_mbe_multiplier`: the top at its defaults, all 65536 signed 8-bit
  operand pairs against `x*y`. It also counts every Booth digit class in
  every row (including the -0 group 111), negate bits, negative rows and the
  full-range product (-128)*(-128), and fails if one never occurred. It
  also checks the modelled array delay of 5T.
* `tb_mbe_sizes`: the top at N = 16, 32 and 64 (the other sizes the original
  evaluates for delay), on corner operands (0, +-1, most negative, most
  positive) and random ones, against a 128-bit reference, plus the modelled
  array delays 11T, 23T and 47T.

The multiplier has no latency in clock cycles: every testbench checks the
output in the same time step as it applies the inputs.

Run one with Verilator, for example:

```
verilator --binary --timing -Irtl rtl/mbe_pkg.sv tb/tb_mbe_multiplier.sv --top tb_mbe_multiplier
./obj_dir/Vtb_mbe_multiplier
```

The package file must come first on the command line; the other modules are
found through `-Irtl`.

## Where this RTL departs from the original design

* Only the logic function is modelled. The original's point is the circuit
  style (CPL cells, level-restoring output inverters, transistor counts,
  power at 5 V / 50 MHz); none of that is represented, and the area and
  power comparisons it reports cannot be reproduced from RTL.
* The interconnection that shortens the array delay is reduced to one rule
  per level (see the table above), chosen to reproduce the original's delay
  totals. Its exact per-cell pinning and its crossing of signals near the
  most significant columns are not reproduced. Delay is counted under the
  model, not measured.
* The negate bit is gated off for the group 111; the decoder's `neg` line
  is the plain `x[2i+1]`.
* The sign-correction layout above is this design's derivation; the original
  says only that a sign-extension corrector is used, with the sign bit of
  row 0 appearing in three consecutive columns, as it does here.
* The low product bits are not taken past the final adder; all 2N columns go
  through it.
* Half adders are not used as separate cells; full adders with a constant
  input take their place.
