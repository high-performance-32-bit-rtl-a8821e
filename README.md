# 32-bit logarithmic number system (LNS) arithmetic unit

A logarithmic number system stores a real number as its sign and the base-2
logarithm of its magnitude. Multiplication, division, square and square root
then become fixed-point addition, subtraction, doubling and halving of the
logarithms: exact apart from the rounding of the halved log, and as cheap as an integer adder. The
price is paid in addition and subtraction, which need the non-linear functions

    x + y:  log2(2^i + 2^j) = i + sb(r),  sb(r) = log2(1 + 2^r)
    x - y:  log2(2^i - 2^j) = i + db(r),  db(r) = log2(1 - 2^r)

with i >= j the two logs and r = j - i <= 0. `sb` is smooth and can be
interpolated from small tables. `db` has a singularity at r = 0 (subtracting
nearly equal numbers), where no practical interpolation table is accurate. This
unit evaluates `sb` and `db` by first-order Taylor interpolation with an
error-correction term over power-of-two partitioned tables. For -1 < r < 0 it
removes the singularity of `db` with a *double co-transformation*, which maps r
onto a point at or below -1 using three exact tables. The fixed-point
arithmetic uses a Ladner-Fisher prefix adder and a radix-4 Booth multiplier with
a Wallace tree.

The architecture follows a published 32-bit LNS design: a 1/8/23-bit word,
co-transformation over -1 < r < 0 with three tables F1/F2/F3 and 4 guard bits,
interpolation with the F/D/E/P table scheme, and a Ladner-Fisher adder and
Booth/Wallace multiplier. Some details are this implementation's own. These are
the exact table partitioning and sizes, the grid step of the co-transformation,
the zero code, exception handling and rounding, and the clocking. They are
listed in "Design choices" below.

## Number format

| bits  | field | meaning |
|-------|-------|---------|
| 31    | sign  | sign of the value |
| 30:23 | integer part of log2\|x\| | two's complement, with bits 22:0 |
| 22:0  | fraction of log2\|x\| | 23 bits, step 2^-23 |

The 31-bit log field covers magnitudes from about 2^-128 to 2^128. One log step
is a relative step of 2^-23 * ln 2, about 0.69 units of the last place of IEEE
single precision. The most negative log code, bits 30:0 = `0x4000_0000`, is
reserved for zero. Zero results are always returned with sign 0.

Inside the add/subtract path, function values carry 4 guard bits (27 fraction
bits). The sum is rounded to nearest at 23 bits at the end.

## Structure

```
lns_alu  (registered result, latency 1)
 |- lns_addsub          add / subtract
 |   |- sbdb_interp (sb) interpolation of sb, 0 <= -r < 32
 |   |- db_cotrans       co-transformation, -1 < r < 0  (tables F1, F2, F3)
 |   |- sbdb_interp (db) interpolation of db, 1 <= -r < 32
 |   |   \- booth_wallace_mult x2   (D*t and E*P(t))
 |   \- lf_adder         i +- function value (38 bits)
 \- lns_muldiv           multiply / divide / square / root
     \- lf_adder         i +- j, 2i, i/2 (34 bits)
```

`lns_pkg` holds the word type `lns_t`, the flag struct `lns_flags_t`, the
operation enums and the range constants.

## Interpolating sb and db (`sbdb_interp`)

The block works on z = -r >= 0 (5 integer and 27 fraction bits). It returns the
magnitude g = |sb(-z)| or |db(-z)|. Both functions flatten quickly as z grows, so
the range is cut into segments whose width doubles (*power-of-two
partitioning*):

    [0,1) [1,2) [2,4) [4,8) [8,16) [16,32)      (db uses [1,2) and up)

Each segment holds 2^LW equal intervals (LW = 7: 128 words). The interval
width h is therefore 2^-7 near zero and 2^-3 in the last segment. The
segment is found from the leading one of the integer part of z. The next LW
bits give the interval. The remaining bits, left-aligned, give the position
t in [0,1) inside the interval. Three tables are indexed by segment and
interval, and one by t:

| table | content at interval start x_k |
|-------|-------------------------------|
| F | g(x_k) |
| D | g'(x_k) * h (the slope scaled by the interval width) |
| E | g(x_k + h) - F - D: the error of the straight line at the interval end |
| P | P(t) = t^2, indexed by the top PB = 12 bits of t |

The result is

    g ~= F + D * t + E * P(t)

This is a first-order Taylor step. The error-correction term adds back the
error of that step, scaled from its value at the interval end, using the
error's quadratic shape. Both products use `booth_wallace_mult`. Storing D as
`g'*h` lets one multiplier width serve every segment, because t is always a
fraction of the interval. For z >= 32 both functions are below half a result
LSB, and the caller forces g = 0.

The tables are not data files. Each is a `localparam` array filled at
elaboration by a constant function that evaluates the closed forms
(`$ln`, `$pow`) and rounds to 27 fraction bits:

    sb: g(x) = log2(1 + 2^-x),   g'(x) = -2^-x / (1 + 2^-x)
    db: g(x) = -log2(1 - 2^-x),  g'(x) = -2^-x / (1 - 2^-x)

The measured interpolation error is at most 4.6 (sb) and 6.9 (db) units of
2^-27, below half a unit of the 23-bit result.

## Subtraction near r = 0: double co-transformation (`db_cotrans`)

For -1 < r < 0, write r = r1 + r2. Here r1 lies on a grid of step
D1 = 2^-11 and 0 < r2 <= D1. With x = 2^i and y = 2^j, subtract and add
z = x * 2^r1 (just below y):

    x - y = (x - z) - (y - z)
    log2(x - y) = i + db(r1) + db(r3),   r3 = r + db(-r2) - db(r1)

`db(-r2)` is large and negative because r2 is tiny. So r3 always lands at or
below -1, where ordinary db interpolation is accurate. The testbench checks
this over the whole range. The two exact db values come from tables indexed
directly by bit fields of z = -r (23 fraction bits, K = 12 low bits):

| table | region | holds | words |
|-------|--------|-------|-------|
| F1 | -D1 <= r < 0 | -db(-m * 2^-23), m = 1..4096 | 4096 |
| F2 | -0.5 < r1 <= -2*D1 | -db(r1) on the grid (first transformation) | 1024 |
| F3 | -1 <= r1 < -0.5 | -db(r1) on the grid (second transformation) | 1024 |

For a given z, let q = z >> K. The grid point is z1 = (q + 1) * D1, the
multiple of D1 just above z, and r2 = z1 - z, with r2 = D1 when z is on the
grid. F1 serves two uses. For -D1 <= r < 0 it gives db(r) outright (`direct`),
without interpolation. Otherwise it gives db(-r2). F2 or F3, chosen by
whether z >= 0.5, gives db(r1). The block outputs `base` = -db(r1) and
`z3` = z + F1[r2] - base. `lns_addsub` sends z3 to the db interpolator and
forms -db(r) = base + |db(r3)|.

The F1/F2/F3 regions and the use of a first-order style identity over the
whole of -1 < r < 0 follow the source architecture. The grid step D1 = 2^-11,
and with it the table sizes, is this implementation's choice. It balances F1
(2^K words) against F2 + F3 (2^(23-K) words).

## Add/subtract datapath (`lns_addsub`)

1. Flip the sign of b for subtraction. Order the operands by log: the larger
   gives i and the result sign.
2. Compute d = i - j >= 0 (23 fraction bits). Set `beyond` when d >= 32 and
   `near` when d < 1.
3. Take the function value from one of:
   - same effective sign: the sb interpolator
   - opposite signs, d >= 1: the db interpolator on d
   - opposite signs, d < 1: the co-transformation, then the db interpolator
     on z3 (or F1 alone on the direct path)
4. Compute i*16 +- g in a 38-bit Ladner-Fisher adder. Round to nearest at
   23 bits, then clamp to the range.

Special cases: if one operand is zero, the other is returned (negated for
0 - y). x - x gives exact zero. A result above the largest log saturates to
the largest magnitude with `overflow`. A result below the smallest log becomes
zero with `underflow`. Over 8,000 random operand pairs spread across every
region, the largest error against a double-precision model was 0.80 LSB of the
log (interpolation error plus the final rounding).

## Multiply, divide, square, root (`lns_muldiv`)

One 34-bit Ladner-Fisher adder computes:

| op | adder inputs | result log |
|----|--------------|------------|
| multiply | i, j | i + j |
| divide | i, ~j, carry in 1 | i - j |
| square | i, i | 2i |
| root | i, 0, carry in 1, then arithmetic shift right | round(i/2), ties up |

The sign is a XOR b for multiply and divide, and + otherwise. Exceptions:
- A zero operand gives zero.
- Dividing a non-zero number by zero gives the largest magnitude, and 0/0 gives zero; both set `div_zero`.
- The root of a negative number returns the root of its magnitude with `invalid`.
- Results out of range saturate (`overflow`) or flush to zero (`underflow`).

## Fixed-point building blocks

`lf_adder` is a Ladner-Fisher parallel-prefix adder (WIDTH = 32 by default,
any width allowed). It builds the minimum-depth prefix tree in clog2(WIDTH)
levels. At level l, the upper half of each 2^(l+1)-bit block merges in the
group generate/propagate of the top bit of its lower half. The carry in is
folded into bit 0's generate.

`booth_wallace_mult` is a signed AW x BW multiplier (32 x 32 by default). It
recodes the multiplier into radix-4 Booth digits {-2,-1,0,1,2}. That gives
ceil(BW/2) partial products, plus one row that collects the +1 of each negated
product. Wallace levels of 3:2 carry-save adders reduce the rows until two
remain, and an `lf_adder` sums those two. Each level is a generate block with its own rows,
so the tree has no false combinational loop.

## Interface and timing (`lns_alu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| in_valid | in | 1 | op, a, b are valid this cycle |
| op | in | 3 | `lns_op_e`: 0 add, 1 sub, 2 mul, 3 div, 4 square, 5 root (6, 7: zero + `invalid`) |
| a, b | in | 32 | `lns_t` operands (b unused by square and root) |
| out_valid | out | 1 | result of the operation issued one clock earlier |
| result | out | 32 | `lns_t` result |
| flags | out | 4 | `{overflow, underflow, invalid, div_zero}` |

All arithmetic is combinational between the input ports and the output
register. The latency is one clock and the unit accepts one operation per
clock. The result register holds its value while `in_valid` is low; an
assertion checks this. The add/subtract path (comparison, co-transformation,
two table reads and multiplies, two interpolations in series, final add) is
the critical path. Pipelining it is the obvious next step for a high clock rate.

## Design choices

These details are this implementation's own. They can be changed without
touching the structure:

- **Interpolation scheme.** Taylor with the E/P error correction, P(t) = t^2.
  The source architecture proposes a "hybrid" interpolation whose exact mix is
  not reproduced here.
- **Table sizes.** 128 intervals per segment (768 F/D/E words for sb, 640 for
  db) and a 4096-entry P table. The source compares schemes at 256 F and D
  words. That was not enough here to keep the interpolation error below half
  an LSB with this scheme, so the tables were enlarged (`LW`, `PB`).
- **Co-transformation step.** D1 = 2^-11 (`K` = 12).
- **Exceptions, clocking and codes.** The zero code, saturation/flush rules,
  flags, root rounding, the single output register and the operation encoding.

Total table storage is about 440 kbit (F1 128 kbit, F2 + F3 64 kbit,
interpolator tables the rest).

## Simulation

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Reference values come from the
double-precision model in `tb/lns_ref_pkg.sv`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
  rtl/lns_pkg.sv tb/lns_ref_pkg.sv tb/tb_lns_alu.sv \
  --top-module tb_lns_alu -o sim && ./obj_dir/sim
```

| testbench | checks |
|-----------|--------|
| `tb_lf_adder` | 32- and 13-bit sums against `+`, carry chains |
| `tb_booth_wallace_mult` | 32x32 and 30x27 signed products against `*` |
| `tb_lns_muldiv` | exact logs, signs, all flags |
| `tb_sbdb_interp` | sb and db against closed forms, tolerance 0.5 LSB; prints worst error |
| `tb_db_cotrans` | F1/F2/F3 values, z3 >= 1 and the identity, all three regions |
| `tb_lns_addsub` | every region of r, zero, cancellation, overflow, underflow; tolerance 1 LSB |
| `tb_lns_accuracy` | worst-case error sweep of add and subtract over -32 < r <= 0, densest near the singularity (worst seen: 0.67 LSB for -1 < r < 0, 0.77 for db interpolation, 0.61 for sb) |
| `tb_lns_alu` | end to end at the default configuration; checks the 1-cycle latency and idle hold, and counts every mechanism |

Elaboration computes about 14,000 table entries with real arithmetic. It
takes a few seconds in Verilator. Synthesis turns the tables into ROMs.
