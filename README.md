# GF(D^M) multipliers built from Modified Guild Cells

This RTL multiplies two elements of an extension field GF(D^M), where D is a
prime, as used by elliptic-curve cryptography over fields with characteristic
greater than 2. The multiplier is a purely combinational array built almost
entirely from one repeated cell, the **Modified Guild Cell (MGC)**. The cell
computes `s = (a + b*c) mod D` on single GF(D) digits. Next to it sits a
handful of **F** cells, which compute `(-g) mod D`. The field polynomial is
an input, so one array serves every monic polynomial of degree M.

There are three ways to build the MGC itself, and the design provides all
three:

| `VARIANT`   | MGC built as                                         |
|-------------|------------------------------------------------------|
| `MGC_BOX`   | one Boolean function of its three digit inputs       |
| `MGC_MS`    | a digit multiplier (MUL) feeding a digit adder (SUM) |
| `MGC_GATES` | bit-level multiply-add cells plus a non-restoring division by D |

All three give the same result. They differ in structure and therefore in
the logic that synthesis produces. The top level, `gf_mult_top`, places one
GF(7^3) multiplier of each kind side by side.

## Number representation

* A **digit** of GF(D) is an unsigned binary code of `W = ceil(log2 D)` bits
  (1 bit for D = 2). Only the codes 0..D-1 are legal. Outputs for other
  codes are unspecified.
* A **field element** is a polynomial of degree < M with GF(D) coefficients.
  It is packed into `M*W` bits, with coefficient j in bits `[j*W +: W]`.
  For example, for GF(7^3) the element `3x^2 + 0x + 5` is `9'b011_000_101`.
* The **field polynomial** is monic, `P(x) = x^M + p_{M-1}x^{M-1} + ... + p_0`.
  Only `p_0..p_{M-1}` are given, on port `p`, packed like an element. For
  the result to be a field product, P must be irreducible over GF(D). The
  array computes `a*b mod P` for any monic P.
  For GF(7^3), `P = x^3 + 5` (that is, x^3 - 2) is irreducible, because 2 is
  not a cube mod 7; `p = 9'h005`.

## The multiplier array (`gf_mult`)

The array uses Horner's rule. It walks the digits of `a` from the highest
down. It keeps a running result `r` of M digits:

```
stage 0        r_j  = a_{M-1} * b_j                           M MGC
stage i=1..M-1 f    = F(r_{M-1}) = -r_{M-1} mod D              1 F
               u_j  = r_{j-1} + a_{M-1-i} * b_j   (r_{-1} = 0)  M MGC
               r_j  = u_j + f * p_j                            M MGC
```

The second line of each stage multiplies `r` by x and adds the next partial
product. The shift pushes the old top coefficient `t = r_{M-1}` onto `x^M`.
Because `x^M = -p(x) mod P`, adding `(-t)*p(x)` cancels it. That is the
third line, and it is the only job of the F cell. Every digit operation is
therefore one MGC of the form `addend + multiplier*multiplicand`.

Cell count: `M*(2M-1)` MGC and `M-1` F cells. GF(7^3) needs 15 MGC and 2 F.
The columns alternate: a partial-product column, then a reduction column,
with one F cell per reduction step. The critical path runs through `2M-1`
MGC cells. The first column has no addend, so its addend inputs are tied
to zero.

There is no clock and no reset. The result is valid one combinational delay
after the inputs settle.

## The Modified Guild Cell

`mgc_cell` selects the construction from `VARIANT`. All constructions share
the port list `a` (addend), `b` (multiplier), `c` (multiplicand) and `s`.

* **`mgc_box`**: a single expression `(a + b*c) mod D`. Synthesis sees it as
  one function of `3W` inputs and minimises it as a whole.
* **`mgc_ms`**: `gf_mul` forms `(b*c) mod D`, and `gf_sum` adds `a` to it
  modulo D. The two units are written from their functions, and synthesis
  derives their logic.
* **`mgc_gates`**: built from bit cells. This is the least obvious of the
  three, and it works in three steps:
  1. **Multiply-add, SMn cells (`smn_cell`).** W rows of AND + full-adder
     cells form the integer `n = a + b*c` in 2W bits. Row i adds `b[i]*c << i`
     to a running sum that starts at `a`. The largest value,
     `(D-1) + (D-1)^2`, always fits in 2W bits.
  2. **Non-restoring division by D, SMch cells (`smch_cell`) steered by Sn
     (`sn_ctl`).** There is one row per bit of n, most significant first.
     Each row shifts the partial remainder left and brings in the next bit
     of n. It then subtracts D if the previous remainder was non-negative,
     or adds D if it was negative. Sn turns that decision into the operand
     (`D` or `~D`) and the row's carry-in, so an SMch row is a plain
     full-adder chain. The remainder is kept in `W+2` two's-complement bits,
     enough for the range [-2D, 2D).
  3. **Correction, Rn (`rn_ctl`) and SUM_G (`sum_g`).** After the last row
     the remainder lies in [-D, D). If it is negative, Rn supplies D as an
     addend, and the ripple adder SUM_G adds it. Only the low W bits take
     part, because the final value is below D.

  For D = 7 a cell has 18 SMn, 30 SMch, 6 Sn, one Rn and one 3-bit SUM_G.

## Files

| file | contents |
|------|----------|
| `rtl/gf_pkg.sv` | `mgc_variant_e`, `digit_w()` |
| `rtl/gf_mult_top.sv` | three GF(7^3) multipliers, one per variant |
| `rtl/gf_mult.sv` | the MGC/F array for GF(D^M) |
| `rtl/mgc_cell.sv` | picks the MGC construction |
| `rtl/mgc_box.sv`, `rtl/mgc_ms.sv`, `rtl/mgc_gates.sv` | the three MGC constructions |
| `rtl/gf_sum.sv`, `rtl/gf_mul.sv`, `rtl/gf_neg.sv` | SUM, MUL and F digit units |
| `rtl/smn_cell.sv`, `rtl/smch_cell.sv`, `rtl/sn_ctl.sv`, `rtl/rn_ctl.sv`, `rtl/sum_g.sv` | bit-level parts of `mgc_gates` |
| `tb/gf_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the workload testbenches |

## Parameters and sizes

`gf_mult` has parameters `D` (prime, default 7), `M` (degree, default 3) and
`VARIANT` (default `MGC_MS`). `gf_mult_top` has `D` and `M`. The defaults
give the GF(7^3) example.

The fields used to compare hardware cost all have an order near 10^15:

| field | D | M | operand bits | MGC | F |
|-------|---|---|--------------|-----|---|
| GF(2^50)  | 2  | 50 | 50 | 4950 | 49 |
| GF(3^32)  | 3  | 32 | 64 | 2016 | 31 |
| GF(5^22)  | 5  | 22 | 66 | 946  | 21 |
| GF(7^18)  | 7  | 18 | 54 | 630  | 17 |
| GF(13^14) | 13 | 14 | 56 | 378  | 13 |

The defaults (GF(7^3)) do not hold these fields. Build them by setting `D`
and `M` on `gf_mult`, for example
`gf_mult #(.D(13), .M(14), .VARIANT(gf_pkg::MGC_GATES))`.

Because the circuit is purely combinational and every cell is a separate
instance, these large instances become large simulation models. With
Verilator, one gate-level multiplier of GF(3^32), GF(5^22), GF(7^18) or
GF(13^14) builds in 1 to 3 minutes and needs 1.5 to 2.6 GB. Gate-level
GF(2^50) is the exception (see Verification). All five gate-level fields in one model
did not build within 16 GB, so the workload testbenches keep one
gate-level field each.

## Verification

Every module has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=F` and has a time-out watchdog.

* Digit units and MGC variants: exhaustive over all legal inputs, for
  D = 2, 3, 5, 7 and 13.
* Bit cells, Sn, Rn and SUM_G: exhaustive.
* `tb_gf_mult`: random and structured products (`a*1`, `0*a`, `a*x`) for
  GF(7^3) and six other fields, covering every variant. Results are checked
  against a schoolbook reference in `gf_ref_pkg`. That reference forms the
  full product first and then reduces it, unlike the hardware.
* `tb_gf_mult_top`: the top at its default parameters. All 343 x 343
  products of GF(7^3) under `x^3 + 5` are checked for all three variants.
  The test also confirms that every non-zero element has exactly one
  inverse, and it runs 3000 random products with random polynomials. It
  counts how often reduction, a non-zero F output, and both outcomes of the
  Rn correction occur, and it requires each to happen.
* `tb_gf_workloads_box`, `tb_gf_workloads_ms`: all five fields in the table
  above, with random operands and polynomials.
  `tb_gf_workloads_gates` (GF(13^14)) and `tb_gf_workloads_gates_d3`,
  `_d5`, `_d7` (GF(3^32), GF(5^22), GF(7^18)) do the same with gate-level
  cells. `tb_gf_workloads_gates_d2` runs GF(2^32) instead of GF(2^50): the
  gate-level GF(2^50) model did not finish building in Verilator within
  8 minutes, while GF(2^32) builds in about 1.5 minutes.

Running a testbench with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/gf_pkg.sv tb/gf_ref_pkg.sv tb/tb_gf_mult_top.sv --top-module tb_gf_mult_top
./obj_dir/Vtb_gf_mult_top
```

The testbenches drive only two-state values and use `$urandom` for
stimulus.

## What is fixed by the method and what is this design's choice

Taken from the method:
* the cell function `a + b*c mod D` and the MUL-then-SUM structure of the
  second variant;
* the F cell `(-g) mod D`;
* the MGC/F matrix with M(2M-1) MGC and M-1 F cells for GF(D^M);
* the polynomial input;
* the names and roles of SMn, SMch, Sn, Rn and SUM_G in the gate-level cell;
* the field sizes in the table above.

Chosen here:
* the binary digit code and the packing order of coefficients;
* the Horner (highest digit first) order of the array;
* how the gate-level cell is assembled: bit granularity, the `W+2`
  remainder width, SUM_G as the correcting adder, and the split of work
  between Sn and SMch;
* no separate port for the zero addend of the first MGC column. The
  GF(7^3) schematic this array follows shows one extra 3-bit input whose
  purpose is not stated. Here that zero is generated inside `gf_mult`;
* writing MUL, SUM and the unified cell as arithmetic expressions. The
  method derives these units from truth tables and minimises their Boolean
  functions. Here synthesis does the minimisation.

Not covered:
* the VHDL generator software that produces such multipliers;
* normal-basis representation;
* pipelined versions.

LUT counts depend on the FPGA tools, so they are not reproduced.
