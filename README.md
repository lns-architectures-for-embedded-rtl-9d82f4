# A 16-bit logarithmic-number-system ALU with a ROM-less, cotransformation adder

Model predictive control (MPC) solves a small optimization problem every
sample period. Moving it onto a chip calls for an arithmetic unit that is
small, fast and only as precise as the control problem needs. This ALU
keeps numbers in a **logarithmic number system (LNS)**. The number is stored
as a sign and the base-2 logarithm of its magnitude. In that form
multiplication and division become fixed-point addition and subtraction,
and square root becomes a one-bit shift. Those are the operations a
Householder-based MPC solver needs cheaply. Addition and subtraction become
the hard operations. This design computes them with **cotransformation**:
the troublesome subtraction function `d_b` is built from three small tables
(`F1`, `F2` and a bipartite `s_b` table), all synthesized to plain logic,
with no ROM macro. That adder/subtractor is pipelined over four stages.

The architecture follows the one published in "LNS Architectures for
Embedded Model Predictive Control Processors" (CASES 2004): a 16-bit LNS
format with 6 integer and 9 fraction bits, the block diagram of the
cotransformation adder/subtractor, and a four-stage adder pipeline. Table
sizes, guard bits, the zero code, the pipeline boundaries, the
handling of corner cases and the port protocol are this implementation's
own. They are listed in "Departures and choices" below.

## Number format

A word is 16 bits: `{S_X, x[14:0]}`.

| field | meaning |
|---|---|
| `S_X` (bit 15) | sign of the number |
| `x` (bits 14:0) | `log2 |X|`, two's complement, 6 integer bits (the top one its sign) and 9 fraction bits |

`X = (-1)^S_X * 2^x`. The most negative logarithm code, `x = 15'h4000`
(= -32), is reserved for **zero**. The canonical zero word is `16'h4000`.
Nonzero magnitudes therefore run from `2^(-32 + 2^-9)` to `2^(32 - 2^-9)`.
The relative spacing is `2^(2^-9) - 1`, about 0.135 %, similar to a float
with a 9-bit mantissa.

Examples: `16'h0000` = +1.0, `16'h8200` = -2.0 (x = 1.0 = 0x200),
`16'h7e00` = +0.5 (x = -1.0).

## Operations and timing (`lns_alu`)

| op (`lns_pkg::lns_op_e`) | result | unit |
|---|---|---|
| `OP_ADD` (0) | A + B | `lns_addsub`, 4 pipeline stages |
| `OP_SUB` (1) | A - B | `lns_addsub` |
| `OP_MUL` (2) | A * B: logs added, signs XORed | `lns_muldiv`, combinational |
| `OP_DIV` (3) | A / B: logs subtracted | `lns_muldiv` |
| `OP_SQRT` (4) | sqrt\|A\|: log shifted right by one | `lns_sqrt`, combinational |

Ports: `clk`, `rst_n` (synchronous, active low, clears only valid bits),
`in_valid`, `op`, `a`, `b` in; `out_valid`, `r` out.

One operation can be issued every cycle, with no backpressure. **Every**
operation returns exactly 4 cycles after issue, in issue order. The
single-cycle units feed a 4-deep delay line, so one result port serves all
operations and no two results ever collide. An assertion checks that the
adder pipeline and the delay line agree on which slot belongs to the adder.
A processor built around the ALU must wait 4 cycles before it uses a result
as an operand. MPC workloads are dominated by independent vector
operations (dot products, vector sums), so the pipeline can usually be kept full.

## The adder/subtractor (`lns_addsub`)

### The arithmetic

Let `x >= y` be the two logarithms and `z = y - x <= 0`. Then

- effective addition (same signs, after negating B for SUB): `r = x + s_b(z)`, with `s_b(z) = log2(1 + 2^z)`
- effective subtraction: `r = x + d_b(z)`, with `d_b(z) = log2(1 - 2^z)`

The result takes the sign of the larger magnitude. `s_b` is smooth and easy
to tabulate. `d_b` goes to minus infinity as `z -> 0`, which makes direct
tables or interpolation large. Cotransformation sidesteps that.

### Cotransformation

The difference `z`, clamped to `[-16, 0)` with 9 fraction bits (13 bits),
is split into a high part `z_h` (top 7 bits, a multiple of `delta_h = 1/8`)
and a low part `0 <= z_l < 1/8` (bottom 6 bits). Two tables hold

    F1(z_h) = log2(2^(-z_h - delta_h) - 1)      128 entries
    F2(z_l) = log2(1 - 2^(z_l - delta_h))        64 entries

and

    P      = z + F1(z_h)
    d_b(z) = P + s_b(F2(z_l) - P)

This is exact. `2^P = 2^(z_l - delta_h) - 2^z` and `2^F2 = 1 - 2^(z_l - delta_h)`,
so `2^P + 2^F2 = 1 - 2^z`. The `s_b` step adds the two terms in the log domain.
So subtraction costs two small tables and one more pass through the
`s_b` table that addition already needs.

Two details make it work over the whole range:

1. **`F2 - P` can be positive** (for `z` just below `-1/8`). The `s_b` unit
   therefore accepts any sign. For `w > 0` it computes `w + s_b(-w)`.
2. **The top `F1` entry is minus infinity.** This is `z_h = -1/8`, that is,
   `-1/8 <= z < 0`. The table holds -64 instead. Then `F2 - P` lies between +54 and +61, the
   fold returns it unchanged, and `P + (F2 - P) = F2(z_l)`. This equals
   `d_b(z)` exactly for this range, where `z = z_l - 1/8`. The near-cancellation
   region is thus handled by a direct table lookup, which is where accuracy matters most.

### Block structure and pipeline

The datapath is the published block diagram. Two subtractors compute
`x - y` and `y - x` in parallel. The sign of one picks `z` and the larger
operand. `F1` and `F2` read the high and low bits of `z`. One adder forms
`P = z + F1`, and a three-input adder forms `F2 - z - F1`. A multiplexer
feeds `s_b` with `z` (add) or `F2 - P` (subtract). Another passes `0` or `P`.
A final three-input adder sums the larger operand, `0`/`P` and `s_b`.

| stage | work |
|---|---|
| 1 | x-y, y-x, operand select, effective operation and result sign, zero/cancellation bypass, clamp of z |
| 2 | F1 and F2 lookup, P, F2 - P, s_b argument multiplexer |
| 3 | bipartite s_b lookup (`lns_sb_table`) |
| 4 | final addition, round to nearest, saturate/flush |

Internal values are signed 19-bit words: 8 integer bits and 11 fraction
bits. The 2 extra fraction bits are guard bits, and the result is rounded
to 9 fraction bits at the end.

### The `s_b` table (`lns_sb_table`)

`s_b` uses a multipartite table of the simplest kind, a bipartite table. The
15-bit magnitude index `a = -w` (4 integer and 11 fraction bits) is split
5/5/5 into `a0, a1, a2`:

    s_b(-a) ~ TIV(a0, a1) + TO(a0, a2)

`TIV` holds `s_b` at the centre of each `a2` interval. `TO` holds the
correction `s_b(a0, mid a1, a2) - s_b(a0, mid a1, mid a2)`. Each table has
1024 entries. For `a >= 16` the function is below half an ulp and the unit
returns 0. The measured worst-case error is 1.39 units of `2^-11`.

### Corner cases

- A zero operand bypasses the datapath: `A + 0 = A`, `0 - B = -B`.
- Exact cancellation (equal magnitudes under effective subtraction) returns zero.
- `|z| > 16` is clamped to 16. Both `s_b` and `d_b` are below half an ulp there.
- A result logarithm `>= 32` saturates to the largest code `{sign, 15'h3fff}`.
  One at or below -32 flushes to zero.

### Accuracy

The tables are computed at elaboration from their defining formulas, using
`$ln` and `$pow` in constant functions in `lns_pkg`, `lns_f1_table`,
`lns_f2_table` and `lns_sb_table`. No data files are involved. Over directed
sweeps of every `z` in the table domain, all near-cancellation cases around
one operand, and 20 000 random operations, the result logarithm is within
**0.84 ulp** (ulp = `2^-9`) of the exact value computed in double precision.

## Multiply, divide, square root

- `lns_muldiv`: one 16-bit adder/subtractor on the logarithms, with the signs XORed.
  Overflow saturates and underflow flushes to zero, as in the adder. A zero
  operand gives zero. Division by zero returns the largest magnitude with
  sign `S_A ^ S_B`. Results are exact: no rounding occurs.
- `lns_sqrt`: arithmetic right shift of the logarithm (truncating toward minus
  infinity). The sign is dropped, so a negative operand returns `sqrt|A|`.
  `sqrt(0) = 0`.

## Parameters

All modules take `K` (integer bits, default 6) and `F` (fraction bits,
default 9). The adder and its tables also take:

| parameter | default | meaning |
|---|---|---|
| `G` | 2 | guard fraction bits inside the adder |
| `ZI` | 4 | table domain `z` in `[-2^ZI, 0)` |
| `J` | 6 | low bits of `z` that index F2 (`delta_h = 2^(J-F)`) |
| `A0`, `A1` | 5, 5 | bipartite split (`lns_sb_table` only) |

The tables regenerate for any setting. Besides the defaults, the adder/subtractor was verified at `F = 10` (17-bit words), where its worst-case error is 0.98 ulp with the default bipartite split. For wider `F`, raise `A0` in `lns_sb_table`. `lns_addsub` instantiates the table with its default split. At
other sizes, choose `ZI` large enough that `2^-(2^ZI)` is below half an ulp,
and keep `K + 2` integer bits enough for the -2^K stand-in.

## Files

| file | content |
|---|---|
| `rtl/lns_pkg.sv` | format constants, `lns_op_e`, real-valued table functions |
| `rtl/lns_alu.sv` | top: operation dispatch, delay line, result mux |
| `rtl/lns_addsub.sv` | 4-stage cotransformation adder/subtractor |
| `rtl/lns_f1_table.sv`, `rtl/lns_f2_table.sv` | cotransformation tables |
| `rtl/lns_sb_table.sv` | bipartite `s_b` with sign folding |
| `rtl/lns_muldiv.sv`, `rtl/lns_sqrt.sv` | single-cycle units |
| `tb/lns_tb_pkg.sv` | double-precision reference model shared by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/lns_pkg.sv tb/lns_tb_pkg.sv \
      rtl/lns_f1_table.sv rtl/lns_f2_table.sv rtl/lns_sb_table.sv \
      rtl/lns_addsub.sv rtl/lns_muldiv.sv rtl/lns_sqrt.sv rtl/lns_alu.sv \
      tb/tb_lns_alu.sv --top-module tb_lns_alu -o sim
    ./obj_dir/sim

For a unit testbench, swap the last file and `--top-module`:
`tb_lns_addsub`, `tb_lns_sb_table`, `tb_lns_f1_table`, `tb_lns_f2_table`,
`tb_lns_muldiv`, `tb_lns_sqrt`, `tb_lns_addsub_f10` or `tb_lns_alu_matvec` (which, like
`tb_lns_alu`, needs all the `rtl/` files). Each runs in well under a second.

What the testbenches establish:

- `tb_lns_alu` runs the ALU at its default size. It issues 20 000 random
  mixed operations back to back and checks every result and its 4-cycle
  latency. It then runs small MPC-style kernels: nine-element dot products,
  a multiply burst followed by a chain of dependent additions, and 2-norms
  ending in a square root. It counts each mechanism (every operation,
  effective add/sub, zero bypass, exact and near cancellation, overflow,
  underflow, division by zero, back-to-back and dependent issue). If any of
  them never occurred, it reports a failure.
- `tb_lns_alu_matvec` computes 9 x 9 matrix-vector products the way a
  pipelined processor would schedule them. This is the size of a
  nine-actuator, nine-sensor state update or regulator step. It issues the
  81 products back to back, then 8 waves of 9 independent row additions.
  The dependency distance of 9 cycles exceeds the 4-cycle latency, so
  the run must take exactly 153 issue cycles + 4, with no stall. A 3-row
  variant must stall, and does (21 stall cycles per product).
- `tb_lns_addsub` runs the accuracy and latency sweeps described above.
- `tb_lns_addsub_f10` runs the same kind of sweep on the adder/subtractor
  regenerated at `F = 10`, using a reference model written for any `K` and `F`.
- `tb_lns_f1_table` and `tb_lns_f2_table` check every entry.
  `tb_lns_sqrt` checks all 65 536 inputs. `tb_lns_sb_table` sweeps every
  argument from -20 to +20 in steps of `2^-11`.

## Departures and choices

These points are this implementation's decisions. The published description
does not settle them.

- **Format.** The source describes the logarithm both as sign + K + F bits and
  as a 16-bit word with K = 6, F = 9 and "one sign bit". This design uses the
  16-bit reading: the two's-complement logarithm's sign is part of K. The
  base is 2. The zero code is the most negative logarithm.
- **Cotransformation details.** The split point (`J = 6`), the F1 stand-in
  for minus infinity, and the sign folding inside `s_b` are not specified in
  the source. They were derived here and verified against exact arithmetic.
- **Multipartite table.** The source uses a multipartite generator from a
  separate library. Here it is a bipartite table with the split chosen above.
- **Pipeline.** The four-stage depth follows the source's estimate. The
  stage boundaries, and the equal 4-cycle latency of the single-cycle
  operations, are choices made here.
- **Exceptions.** There are no flags. Results saturate or flush. Division by
  zero and square roots of negatives return the values listed above.
- **Not included.** The straight table-lookup adder with 8K-word ROM macros is
  a faster alternative the source only estimates. The vector processor core
  that would host the ALU is not described in enough detail to build. The
  floating-point ALU used for comparison is not part of this design.
- **Timing and area** (5 ns clock, gate counts) are not verified here. No
  technology library was used. The tables are synthesized as constant arrays.
