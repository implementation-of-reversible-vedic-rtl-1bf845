# Vedic multipliers: Urdhva Tiryakbhayam and Nikhilam in RTL

Urdhva Tiryakbhayam ("vertically and crosswise") is a way of multiplying in
which every digit of the result is the sum of the cross products whose indices
add up to that digit's position, plus the carry from the position below. For
two 4-bit numbers, result bit k collects every `a[i]·b[j]` with `i + j = k`:

```
bit 0:  a0b0
bit 1:  a0b1 + a1b0                       + carry
bit 2:  a0b2 + a1b1 + a2b0                + carries
bit 3:  a0b3 + a1b2 + a2b1 + a3b0         + carries
bit 4:  a1b3 + a2b2 + a3b1                + carries
bit 5:  a2b3 + a3b2                       + carries
bit 6:  a3b3                              + carries  -> bits 6 and 7
```

All sixteen partial products exist at once. There are no shifted partial-product
rows to add one after another. The remaining work is to reduce each column to
one bit, and that is where the designs below differ.

This RTL holds four combinational units, placed side by side in `vedic_top`:

| unit | module | what it computes |
|---|---|---|
| compressor UT multiplier (main design) | `ut_mul_4x4` | `c = a * b`, 4x4 bits |
| 2x2-block UT multiplier | `ut_mul_4x4_blk` | `c = a * b`, 4x4 bits |
| CI-CSKA carry skip adder | `ci_cska` | `{co, s} = a + b + ci`, 32 bits |
| Nikhilam multiplier | `nikhilam_mul` | `p = a * b` around base 100 |

None of them has a clock, a register or a reset. Each output is valid once the
logic has settled after its inputs change.

## The compressor multiplier (`ut_mul_4x4`)

One reduction cell sits on each column. It takes that column's partial
products and every carry coming out of the column below. It gives one result
bit, and its carries go up to the next column:

| bit | cell | partial products | carries in | carries out |
|---|---|---|---|---|
| 0 | AND | P00 | – | – |
| 1 | half adder | P01 P10 | – | 1 |
| 2 | CM4:2 | P11 P02 P20 | 1 | 2 |
| 3 | CM5:2 | P30 P03 P21 P12 | 2 | 3 |
| 4 | CM5:2 | P31 P13 P22 | 3 | 3 |
| 5 | CM4:2 | P32 P23 | 3 | 2 |
| 6 | CM3:2 | P33 | 2 | bit 7 |

`Pij = a[i] & b[j]`. The compressors are counters. Each one outputs the number
of ones at its inputs as one bit of the same weight plus several bits of twice
that weight:

- `compressor_3_2` (CM3:2) is a full adder. `x0+x1+x2 = sum + 2·carry`.
- `compressor_4_2` (CM4:2) is two full adders in a chain.
  `x0+x1+x2+x3+cin = sum + 2·(carry + cout)`. `cout` is the majority of
  `x0..x2` and does not depend on `cin`.
- `compressor_5_2` (CM5:2) is three full adders in a chain.
  `x0+…+x4+cin0+cin1 = sum + 2·(carry + cout0 + cout1)`. The couts do not
  depend on the carry inputs.

No carry is dropped anywhere, so the result is exact. Bit 6 holds at most 3
ones, so its carry is bit 7 of the product.

These choices are this implementation's own:

- The gate structure inside each compressor.
- Which carry goes to which compressor pin. Within a column this does not
  change the result.

Unused compressor inputs are tied to 0.

## The 2x2-block multiplier (`ut_mul_4x4_blk`)

This is the same product built hierarchically. Four `vedic_mul_2x2` cells
multiply the 2-bit halves:

```
q0 = aL·bL   q1 = aH·bL   q2 = aL·bH   q3 = aH·bH
c  = q0 + 4·(q1 + q2) + 16·q3
```

- `c[1:0] = q0[1:0]`.
- A 4-bit RCA adds `{00, q0[3:2]}` and `q1`.
- A second RCA adds `q2` and `q3` at their relative weight, `{00,q2} + {q3,00}`.
  That sum can reach 45, so this adder is 6 bits wide, not 4.
- A third, 6-bit RCA adds the two partial sums and gives `c[7:2]`.

The order of the four 2x2 products and the widths of the second and third
adders are this implementation's choices. `vedic_mul_2x2` is four ANDs and two
half adders: a vertical product, a crosswise sum, and a vertical product plus
carry.

## The CI-CSKA adder (`ci_cska`)

This is a carry skip adder with concatenation and incrementation. The 32-bit
operands are split into stages of `M = 4` bits, which gives `Q = 8` stages.

- **Stage 1** is a ripple carry adder (`rca`) with the external carry in.
- **Every later stage** has its own RCA with carry-in tied to 0. All stage RCAs
  therefore run at the same time, with no carry passed between them. Each RCA
  gives an intermediate sum `Z_j` and a carry `C_j`.
- **The incrementation block** (`cska_incrementer`, a chain of half adders)
  adds the previous stage's carry to `Z_j`, giving the final sum bits. Its own
  carry out is left unused.
- **The skip logic** gives the stage carry directly, without waiting for the
  incrementer: `CO_j = C_j | (P_j & CO_(j-1))`, where `P_j = &Z_j`. This is
  exact. `Z_j + 1` can only overflow when `Z_j` is all ones, and `C_j` is then 0.

Each stage's skip logic is a single inverting compound gate, so the carry
alternates polarity:

- Even stages (2, 4, …) use an AOI gate and pass on `~CO_j`.
- Odd stages (3, 5, …) use an OAI gate on the complemented carry and pass on
  `CO_j`.

A stage that receives a complemented carry inverts it once before its
incrementer. The final `co` is inverted once when `Q` is even.

The adder works for any `N` that is a multiple of `M`; the parameters are
`N` (32) and `M` (4). Stages are all the same size. A design that uses unequal
stage sizes to balance the skip path would need a per-stage size list. That is
not built here.

## The Nikhilam multiplier (`nikhilam_mul`)

Nikhilam ("all from 9 and the last from 10") multiplies numbers close to a base
by using how far each one is from the base. Take the deficits `da = BASE − a`
and `db = BASE − b`. Then:

```
rhs = da · db                 right-hand side
lhs = a − db  (= a + b − BASE) cross difference, left-hand side
p   = lhs · BASE + rhs
```

For 96 × 93 around 100: the deficits are 4 and 7, `rhs = 28`, `lhs = 89`, and
`p = 8928`. When `rhs < BASE`, the product is just lhs and rhs written side by
side.

- **Binary datapath.** The hardware works in binary with `BASE` as a parameter
  (default 100). Operands are `clog2(BASE)` bits wide (7 bits, 0…127).
- **Signed values.** Deficits, `lhs` and `rhs` are signed. A number above the
  base then gives a negative deficit (a surplus), and numbers far from the base
  give a negative `lhs` or an `rhs` larger than the base. The product is exact
  for every input.
- **Deficit product.** The product of the deficits uses a plain `*`.

## Top level (`vedic_top`)

| ports | unit |
|---|---|
| `ut_a[3:0]`, `ut_b[3:0]` → `ut_c[7:0]` | compressor UT multiplier |
| `blk_a[3:0]`, `blk_b[3:0]` → `blk_c[7:0]` | 2x2-block UT multiplier |
| `add_a`, `add_b` [CSKA_N-1:0], `add_ci` → `add_s`, `add_co` | CI-CSKA |
| `nik_a`, `nik_b` [NW-1:0] → `nik_lhs`, `nik_rhs`, `nik_p` | Nikhilam |

The parameters are `CSKA_N = 32`, `CSKA_M = 4` and `NIK_BASE = 100`.
`NW = clog2(NIK_BASE)` is derived from `NIK_BASE`. The units share no signals.

## How far to trust it, and where it departs

Every module has an exhaustive or randomised self-checking testbench in `tb/`.
Each compares its outputs with integer arithmetic that the testbench computes
itself:

- **Exhaustive:** the multipliers (all 256 pairs), the compressors (every input
  combination), the adders up to 6 bits, and the Nikhilam unit (all 128 × 128
  pairs, plus the 96 × 93 example).
- **Randomised:** the 32-bit CI-CSKA gets directed carry chains plus 20,000
  random additions. A 28-bit, 7-stage copy tests the other final polarity.

`tb_vedic_top` runs all four units together at the default parameters. It
counts the events that exercise each mechanism:

- a full bit-3 column;
- a product that uses bit 7;
- a skipped carry in an even stage and in an odd stage;
- an adder carry out;
- a Nikhilam `rhs` above the base, a negative `lhs`, and an operand above the
  base.

It fails if any of these never happens.

The multipliers are meant to be built from reversible gates, but no reversible
gate mapping is given here. All cells are ordinary irreversible logic. The
units are functionally correct. Nothing here measures or models power, delay
or reversible-gate cost.

Other choices this implementation made:

- the carry wiring between compressors, and the compressors' insides;
- the 6-bit widths of the second and third adders in the block multiplier;
- equal 4-bit stages and `N = 32` in the CI-CSKA;
- binary operands and signed surplus handling in the Nikhilam unit.

## Simulating

Everything is plain SystemVerilog-2017 and needs no external files. With
Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_vedic_top tb/tb_vedic_top.sv
./obj_dir/Vtb_vedic_top
```

Any `tb/tb_<module>.sv` works the same way. Each testbench prints one line of
the form `TB_RESULT checks=N failures=F` and stops. Each also has a watchdog
that counts a failure if the simulation hangs.

Some unused-signal lint warnings are expected, and each marks a deliberate
choice:

- the incrementer carry in `ci_cska`;
- the final carry of the block multiplier's last adder, which is always 0;
- the top bits of the Nikhilam working sum.

To change the adder size, set `N` and `M` on `ci_cska` (or `CSKA_N` and
`CSKA_M` on the top). `N` must be a multiple of `M`. To change the Nikhilam
base, set `BASE` (`NIK_BASE`). The operand width follows it.
