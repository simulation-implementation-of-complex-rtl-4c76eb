# Vedic complex multiplier (Nikhilam / Urdhva Tiryakbhyam)

This is a 16-bit complex multiplier,
`(xr + j·xi) · (yr + j·yi) = (xr·yr − xi·yi) + j·(xr·yi + xi·yr)`,
with unsigned operand parts. It builds each of its four real products from
two old rules of mental arithmetic:

* **Nikhilam** ("all from nine, last from ten"): a number close to a round
  base is written as *base ± small residue*. Multiplying two such numbers
  then needs shifts and additions, plus one product of the two *small*
  residues.
* **Urdhva Tiryakbhyam** ("vertically and crosswise"): a column-by-column
  multiplication scheme. It is used for that small residue product.

In binary the "round base" is a power of two. This makes all the scaling
free shifts. The design is fully combinational up to one output register.

## The Nikhilam product

Write each operand against its own power-of-two radix:

    X = 2^k1 ± Z1        Y = 2^k2 ± Z2        (k1 ≥ k2)

Then

    X·Y = 2^k2 · (X ± Z2·2^(k1−k2)) ± Z1·Z2

This is an exact identity for any radices. The radix choice only decides
how small Z1 and Z2 are. The hardware (`nikhilam_multiplier`) computes it
in the following order:

| step | block | produces |
|---|---|---|
| 1 | `radix_selection_unit` ×2 | radix 2^k1 for X, 2^k2 for Y |
| 2 | `residue_subtractor` ×2 | \|Z1\|, \|Z2\| and for each whether the operand is above or below its radix |
| 3 | `exponent_determinant` ×2 (on the radices) | k1, k2 |
| 4 | operand ordering | exchanges X and Y (with their residues) if k1 < k2 |
| 5 | `add_sub` (subtract) | d = k1 − k2 |
| 6 | `left_shifter` | Z2 · 2^d |
| 7 | `add_sub` | S = X + Z2·2^d if Y is above its radix, X − Z2·2^d if below |
| 8 | `urdhva_multiplier` | M = \|Z1\|·\|Z2\| |
| 9 | `left_shifter` | S · 2^k2 |
| 10 | `add_sub` | P = S·2^k2 + M if both residues lie on the same side, − M otherwise |

Residues travel as a magnitude plus a side flag (`vedic_pkg::res_side_e`:
`RES_ABOVE` or `RES_BELOW`). The side flags drive the add/subtract controls
in steps 7 and 10.

The intermediates are signed, 2N+3 bits wide. S can be negative, for
example X = 7 (radix 8) times Y = 0. The final 2N bits are always the exact
unsigned product.

Step 4 is not part of the original formula, which assumes k1 ≥ k2. It
exchanges the operands so that the shift distance d is never negative. The
`swapped` output reports when this happened.

## Choosing the radix: the RSU

An operand whose leading one is at bit k lies in [2^k, 2^(k+1)). The radix
selection unit picks whichever end of that interval is nearer:

* an `exponent_determinant` (priority encoder) finds k;
* an incrementer with its carry-in tied to 1 forms k+1;
* two `left_shifter`s shift an (N+1)-bit constant 1 to make 2^k and
  2^(k+1);
* a `mean_determinant` forms their mean, 3·2^(k−1);
* a `magnitude_comparator` tests X > mean;
* a multiplexer outputs 2^(k+1) if the test is true and 2^k otherwise.

An operand exactly at the mean gets the lower radix. Zero gets radix 1,
with a residue of 1 below it, and still multiplies correctly.

Because the nearer power of two is chosen, |Z| ≤ 2^(N−2). The residue
multiplier is therefore only (N−1)×(N−1) = 15×15 bits. The radix itself
needs N+1 bits, since 65535 rounds up to 2^16. For this reason the exponent
determinants in the multiplier are 17 bits wide.

## Vertically and crosswise: `urdhva_multiplier`

Column c of the product collects every bit product a[i]·b[j] with i+j = c
and adds the carry from column c−1. The LSB of that sum is product bit c.
The rest of the sum is the carry into column c+1. All bit products form in
parallel; only the column carry ripples. The carry left after the last
column is the top product bit.

## Complex multiplier top: `complex_multiplier`

Four Nikhilam multipliers form the partial products:

* o1 = xr·yr
* o2 = xi·yi
* o3 = xi·yr
* o4 = xr·yi

An `add_sub` in subtract mode gives the real part, `or_o = o1 − o2`. One in
add mode gives the imaginary part, `oi_o = o4 + o3`.

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low synchronous reset |
| `in_valid` | in | 1 | operands valid |
| `xr`, `xi`, `yr`, `yi` | in | N = 16 | unsigned operand parts |
| `out_valid` | out | 1 | result valid |
| `or_o`, `oi_o` | out | OUT_W = 49 | signed real and imaginary parts |

Timing:

* The multiplier is combinational into one register, so the result appears
  one clock after its operands.
* A new operand set can be presented every cycle.
* While `in_valid` is low the outputs hold their last value.
* Reset clears `out_valid` and both results.

The 49-bit output width matches the reference implementation. Only 33 bits
carry information. `or_o` is sign-extended above bit 32, and `oi_o`, which
is never negative, has constant zeros there.

Parameters:

* `N` is the operand width (default 16).
* `OUT_W` is the result width (default 49). It must be at least 2N+1;
  elaboration stops otherwise.

Defaults live in `vedic_pkg`.

## Where this departs from, or adds to, the original description

* Some points were not specified and are choices of this implementation:
  * the output register with `in_valid`/`out_valid`;
  * the reset;
  * the operand swap for k1 < k2;
  * the treatment of an operand equal to the mean;
  * zero operands;
  * all internal widths.
* The original text says in one place that both operands share X's radix.
  Its block diagram and its final formula give each operand its own radix,
  and this design follows those.
* The multiplier inside the Nikhilam datapath is taken to be the
  vertically-and-crosswise multiplier, since the design names it as the
  multiplier it uses.
* The reference reported a delay of about 4 ns on a Spartan-3E FPGA, 5,176
  LUTs and 81 mW. Nothing here reproduces or checks those figures.

## Files

`rtl/` holds one module or package per file:

* `vedic_pkg`
* `complex_multiplier` (the top)
* `nikhilam_multiplier`
* `radix_selection_unit`
* `exponent_determinant`
* `mean_determinant`
* `magnitude_comparator`
* `left_shifter`
* `residue_subtractor`
* `add_sub`
* `urdhva_multiplier`

`tb/` holds a self-checking testbench `tb_<module>.sv` for each module.
Each compares against plain integer arithmetic and ends by printing
`TB_RESULT checks=N failures=M`:

* The exponent determinant and RSU tests are exhaustive over all 16-bit
  inputs.
* The Nikhilam test covers corner values (powers of two, the radix means
  and their neighbours) and random operands. It also requires that the
  operand swap and both residue-side cases occur.
* `tb_complex_multiplier` runs the top at its default size:
  * the three reference operand sets, e.g.
    (11111 + j31245)·(2345 + j13467) = −394721120 + j222901362;
  * corners;
  * 3000 random cycles with idle cycles and a mid-run reset.

  It checks the one-cycle latency and counts each datapath event: swap,
  upper and lower radix, same and opposite residue sides, negative real
  part, idle cycle.

Simulating with Verilator 5, for example the top:

    verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
        rtl/vedic_pkg.sv tb/tb_complex_multiplier.sv \
        --top-module tb_complex_multiplier -o sim
    ./obj_dir/sim

Lint a module with
`verilator --lint-only -Wall -y rtl +libext+.sv rtl/vedic_pkg.sv rtl/<module>.sv`.
