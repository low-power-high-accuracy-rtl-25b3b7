# Two approximate 8-bit multipliers: high-order compressors and power-of-two rounding

Multipliers dominate the energy of DSP datapaths, and many of their users
(image, video and other perception-bound processing) tolerate small errors in
the product. This RTL contains two multipliers that trade a little accuracy for
less logic:

1. **A compressor-based 8 x 8 multiplier** (`hoc_multiplier`). It keeps the
   usual AND-array / reduction-tree / final-adder structure. The reduction tree
   is exact only in the high-order weights. The middle weights use *high-order
   approximate compressors*, which squeeze 5 to 8 bits of one weight into two
   bits with no carry chain and no XOR gates. The lowest weights are
   simply ORed together.
2. **A rounding-based multiplier, MRSA** (`mrsa_multiplier`). It rounds both
   operands to the nearest power of two and replaces the multiplication with
   three shifts, one addition and one power-of-two subtraction.

Both are purely combinational: no clock, no reset, no handshake. A product is
valid one propagation delay after the operands. The top level,
`approx_mult_top`, places the two side by side with separate ports. They share
no logic.

## 1. Compressor-based multiplier

### Partial-product matrix and its three bands

The 64 partial products `pp[i][j] = a[j] & b[i]` sit at weight `i+j`. The
matrix has 15 weights, with column heights 1,2,...,8,...,2,1. The weights are
split by significance:

| band   | weights (default) | column heights | reduction                          | exact? |
|--------|-------------------|----------------|------------------------------------|--------|
| higher | 8 .. 14           | 7,6,5,4,3,2,1  | accurate 4:2 compressors, 2 stages | yes    |
| middle | 4 .. 7            | 5,6,7,8        | one approximate n:2 compressor per weight, n = height | no |
| lower  | 0 .. 3            | 1,2,3,4        | OR-tree                            | no     |

`LOWER_W` (default 4, range 4..8) moves the lower/middle boundary upward. The
middle/higher boundary is fixed at weight 8.

**Lower band.** A column with more than two bits keeps one bit and replaces
all the others by their OR. Weight 3 ORs three bits and weight 2 ORs two. No
carry leaves the band.

**Middle band.** The approximate compressor of weight `w` takes all `w+1`
bits. Its Sum stays at `w` and its Carry moves to `w+1`. The Carry of weight 7
is one of the inputs of the exact compressors at weight 8. So the approximate
band feeds the exact band, but nothing flows back down.

**Higher band, stage 1.** Accurate 4:2 compressors chained Cout -> Cin. A
3-input slice with a Cin and only two bits is a full adder.

| weight | slices                                                | bits left after stage 1 |
|--------|-------------------------------------------------------|-------------------------|
| 8      | C8a = 3 pp + middle carry; C8b = 4 pp                  | 2 (both Sums)           |
| 9      | C9a = 4 pp, Cin from C8a; F9 = 2 pp + Cin from C8b     | 4                       |
| 10     | C10 = 4 pp, Cin from C9a; 1 pp passes                  | 4                       |
| 11     | F11 = 2 pp + Cin from C10; 2 pp pass                   | 4                       |
| 12     | 3 pp pass + Carry of F11                               | 4                       |
| 13, 14 | pass                                                   | 2, 1                    |

**Higher band, stage 2.** One accurate 4:2 compressor on each of weights
9..12, chained Cout -> Cin. The weight-12 compressor sends two bits (Carry and
Cout) to weight 13, which already holds two partial products. A full adder at
weight 13 therefore takes both of those bits plus one partial product. Every
weight then holds at most two bits. This closing full adder is this design's
addition: the published reduction map does not show where those two bits go.

**Final adder.** The two rows are added with a plain `+`. No adder
architecture is prescribed for this step, so synthesis picks one. The product
is 16 bits wide, modulo 2^16.

### The approximate n:2 compressor (`approx_compressor`)

**Carry.** The inputs are split into groups of three, `x0..x2`, `x3..x5`, ...,
with the remainder last. A group of three contributes its full-adder carry
(majority, `mod_full_adder`). A group of two contributes its half-adder carry
(AND, `mod_half_adder`). A second level takes the OR of each group and forms
the carry of those ORs. Carry is the OR of everything:

    n = 5: Cf(x0,x1,x2) | Ch(x3,x4) | Ch(x0|x1|x2, x3|x4)
    n = 6: Cf(x0,x1,x2) | Cf(x3,x4,x5) | Ch(x0|x1|x2, x3|x4|x5)
    n = 7: Cf(x0,x1,x2) | Cf(x3,x4,x5) | Cf(x0|x1|x2, x3|x4|x5, x6)
    n = 8: Cf(x0,x1,x2) | Cf(x3,x4,x5) | Ch(x6,x7) | Cf(x0|x1|x2, x3|x4|x5, x6|x7)

The n = 5 and n = 8 forms are the published ones. The n = 6 and n = 7 forms
extend the same grouping rule; they are this design's choice.

**Sum.** No XOR gates are used. Each block of four inputs becomes
`NOR(XNOR(x0,x1), XNOR(x2,x3))`, which is `(x0^x1)&(x2^x3)`. The block
outputs and any leftover inputs are ORed:

    n = 5: blk(x0..x3) | x4              n = 8: blk(x0..x3) | blk(x4..x7)
    n = 6: blk(x0..x3) | x4 | x5         n = 7: blk(x0..x3) | x4 | x5 | x6

The n = 5 form is the published one, and n = 8 follows the published
XNOR / NOR / OR level structure. The leftover handling for n = 6 and n = 7 is
this design's choice.

How often `2*Carry + Sum` equals the true number of ones (all inputs
enumerated): n = 5: 10 of 32, n = 6: 21 of 64, n = 7: 37 of 128,
n = 8: 53 of 256. The compressor is rough on its own. Its error is bounded
because it only affects weights 4..8.

### Accuracy (all 65536 operand pairs)

Error rate 94.6 %, mean relative error 3.84 %, largest absolute error 1172
(255 x 255 gives 63853 instead of 65025). When neither operand has a bit in
its low nibble, only the exact band is involved and the product is exact.

## 2. MRSA: rounding-based multiplier

### Idea

Let `Ar` and `Br` be `A` and `B` rounded to the nearest power of two. Then

    A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br

The first term is usually small, so it is dropped. Each of the other three
terms multiplies by a power of two, which is a shift. The approximate product
can land above the exact one (when one operand was rounded up and the other
down) or below it (when both were rounded the same way).

### Rounding rule (`mrsa_rounding`)

The output is one-hot. Bit `i` is set when either:

* `a[i]` is the leading one and `a[i-1]` is 0 (round down), or
* the leading one is at `i-1` and `a[i-2]` is also 1 (round up).

Values exactly halfway, `3 * 2^k`, therefore round up. The exception is 3,
which rounds down to 2: the three lowest output bits use shortened equations
(`ar[2] = a[2] & ~a[1]`, `ar[1] = a[1]`, `ar[0] = a[0]`, each ANDed with "no
higher bit set"). This matches the published bit equations of the rounding
block.

### Datapath (`mrsa_multiplier`)

    a, b -> sign detector -> |A|, |B|, sign
         -> rounding x2 -> Ar, Br (one-hot)
         -> shifters x3 -> Br*|A|, Ar*|B|, Ar*Br      (n-bit in, 2n-bit out)
         -> Kogge-Stone adder (2n bits): P = Ar*|B| + Br*|A|
         -> subtractor: |result| = P - Ar*Br          (Ar*Br is a power of two)
         -> sign set: negate if the signs differ

* **Shifter (`mrsa_shifter`).** An OR encoder turns the one-hot select into a
  shift amount. A logarithmic barrel shifter follows, with three stages for
  8-bit operands. A zero select (operand 0) gives 0.
* **Kogge-Stone adder (`kogge_stone_adder`).** A generic `W`-bit
  parallel-prefix adder with log2(W) levels.
* **Subtractor (`mrsa_subtractor`).** Subtracting a power of two needs no full
  subtractor. A borrow starts at the one bit of `Ar*Br`. It flips bits of P
  upward up to and including the first 1 it meets:
  `m[i] = z[i] | (m[i-1] & ~p[i-1])`, `d = p ^ m`. This particular circuit is
  this design's choice. The result is never negative.
* **Sign set (`mrsa_sign_set`).** Exact negation `~x + 1`, or approximate
  negation `~x`, which skips the increment.

### Variants (`VARIANT`, type `mrsa_pkg::mrsa_variant_e`)

| variant   | operands | negation            | notes                                  |
|-----------|----------|---------------------|----------------------------------------|
| `S_MRSA`  | signed   | exact `~x+1`        | default                                 |
| `AS_MRSA` | signed   | approximate `~x`    | a negative result is 1 too large in magnitude |
| `U_MRSA`  | unsigned | none                | no sign detector and no sign set        |

For signed operands the magnitude is at most 2^(N-1), so N bits hold it, and
so does the rounded value. The adder is 2N bits wide. For unsigned operands a
value with both top bits set rounds up to 2^N. `U_MRSA` therefore zero-extends
the operands by one bit and runs a 2N+1-bit datapath; this widening is this
design's choice. The result still fits in 2N bits: the largest 8-bit result
is 65024.

The most negative input, -2^(N-1), is handled: its magnitude 2^(N-1) fits in
the N-bit unsigned magnitude.

### Accuracy (all 65536 operand pairs, N = 8)

Mean relative error: S-MRSA 2.82 %, AS-MRSA 2.87 %, U-MRSA 2.86 %. Products of
two powers of two are exact.

## 3. Where this RTL departs from, or adds to, the published description

* Operand width of MRSA: N = 8 (a parameter). The width is not specified for
  MRSA; 8 matches the 8 x 8 scope of the compressor design.
* Compressor multiplier: only the lower/middle boundary (`LOWER_W`) is
  configurable. The band sizes are meant to be a design-time trade-off, but the
  exact-band compressor placement is only defined for the split shown above,
  so the higher band is fixed at weights 8..14.
* The closing full adder at weight 13 (section 1) and the full-adder reading
  of the two-bit slices in stage 1.
* Which bits of a column go into which compressor input or OR-tree: the bits
  are taken in order of rising `b` index (`pp[i][w-i]`, `i` rising). For the
  approximate parts this choice changes the numerical results.
* The approximate compressors for n = 6 and 7, as noted above.
* The internals of the exact 4:2 compressor (two full adders), the
  sign detector (`~x+1`), the shifter, the Kogge-Stone adder and the
  subtractor are standard constructions. Only their function is specified.
* The final adder of the compressor multiplier is left to synthesis.
* No timing, area or power figures are reproduced. The RTL has no pipeline
  registers.

## 4. Files

`rtl/` (one module or package per file):

| file                        | contents |
|-----------------------------|----------|
| `approx_mult_top.sv`        | top: both multipliers, separate ports |
| `hoc_pkg.sv`                | operand/product widths and the PP-matrix type of the compressor multiplier |
| `hoc_multiplier.sv`         | AND array + `ppm_reduction` + final adder |
| `ppm_reduction.sv`          | OR-trees, approximate compressors, two-stage exact reduction |
| `approx_compressor.sv`      | approximate n:2 compressor, n = 5..8 |
| `exact_compressor_4to2.sv`  | accurate 4:2 compressor (Cin/Cout) |
| `full_adder.sv`             | full adder |
| `mod_half_adder.sv`, `mod_full_adder.sv` | carry-only half / full adder |
| `mrsa_pkg.sv`               | `mrsa_variant_e` |
| `mrsa_multiplier.sv`        | MRSA datapath |
| `mrsa_sign_detector.sv`, `mrsa_rounding.sv`, `mrsa_shifter.sv`, `kogge_stone_adder.sv`, `mrsa_subtractor.sv`, `mrsa_sign_set.sv` | MRSA stages |

Top-level ports of `approx_mult_top`:

| port     | dir | width        | meaning |
|----------|-----|--------------|---------|
| `hoc_a`, `hoc_b` | in | 8   | unsigned operands of the compressor multiplier |
| `hoc_p`  | out | 16           | its approximate product |
| `mrsa_a`, `mrsa_b` | in | `MRSA_N` | MRSA operands (two's complement for S/AS-MRSA) |
| `mrsa_p` | out | 2*`MRSA_N`   | MRSA approximate product |

Parameters: `HOC_LOWER_W` (4), `MRSA_N` (8), `MRSA_VARIANT` (`S_MRSA`).

## 5. Verification and simulation

Every module has a self-checking testbench in `tb/`. The reference models in
`tb/mult_ref_pkg.sv` are written from the arithmetic definitions, not from
the RTL structure. Most tests are exhaustive:

* every compressor and carry cell over all its inputs;
* `ppm_reduction`, `hoc_multiplier` and all three MRSA variants over all
  65536 operand pairs;
* `tb_approx_mult_top`: both multipliers at their default parameters over all
  operand pairs. It also counts how often each mechanism occurs, and a
  mechanism that never occurs counts as a failure. The mechanisms are: a lossy
  OR-tree, an inexact approximate compressor, the middle carry entering the
  exact band, the exact Cout -> Cin chain, round up / down / exact, negation,
  a zero operand, the most negative operand, and results above and below the
  exact product.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/hoc_pkg.sv rtl/mrsa_pkg.sv tb/mult_ref_pkg.sv \
        tb/tb_approx_mult_top.sv --top-module tb_approx_mult_top
    ./obj_dir/Vtb_approx_mult_top

Replace the testbench name to run another. Each runs in well under a second.
