# IEEE-754 double precision floating point multiplier

This is a combinational binary64 multiplier with a registered output. It
multiplies two IEEE-754 double precision numbers by splitting the work
into three independent paths that run side by side:

* the **sign** of the product is the XOR of the operand signs;
* the **exponent** is `EA + EB - 1023`. A ripple carry adder adds the two
  biased exponents, then a ripple borrow subtractor removes one bias;
* the **significand** product `1.MA x 1.MB` comes from an unsigned array
  multiplier. Its partial products are AND gates and its carries pass
  diagonally down a carry-save array.

A normalization stage then joins the three results. It aligns the product
so that its leading one sits just left of the binary point, rounds it, and
checks the exponent for overflow and underflow. It also deals with zero,
subnormal, infinite and NaN operands before it assembles the 64-bit result.

```
 fp_a[63], fp_b[63] ──► sign_calc ─────────────────────────┐
 fp_a[62:52], fp_b[62:52] ──► exp_calc (rca + ripple_borrow_sub) ──┤
 {1,fp_a[51:0]}, {1,fp_b[51:0]} ──► mant_mult (53x53 array) ──┤
                                                          ▼
                 normalizer ─► rounder ─► exc_unit ─► output register ─► fp_z, flags, done
```

## Number format

| bits  | field    | notes |
|-------|----------|-------|
| 63    | sign     | 1 = negative |
| 62:52 | exponent | biased by 1023 |
| 51:0  | fraction | hidden leading one for normal numbers |

The widths are parameters: `EXP_W` (default 11) and `FRAC_W` (default 52).
The bias is always `2^(EXP_W-1) - 1`. Any format with `FRAC_W >= 2` can be
built from the same RTL. One example is the 16-bit format used below: an
11-bit exponent and a 4-bit fraction.

## Interface and timing (`fp_mul`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low; clears all outputs |
| `ce` | in | 1 | take the operands now |
| `fp_a`, `fp_b` | in | 64 | operands |
| `fp_z` | out | 64 | product |
| `done` | out | 1 | `fp_z` and the flags hold a new result |
| `overflow` | out | 1 | the result was too large and was replaced by ±infinity |
| `underflow` | out | 1 | the result was too small, or an operand was subnormal, and was replaced by ±zero |

There is no logic between the operand ports and the output register except
the combinational datapath. On a rising `clk` edge with `ce` high, the
product of the operands present at that moment is stored in `fp_z`,
`overflow` and `underflow`. `done` is then 1 for one cycle. This gives a
latency of one cycle and a throughput of one product per cycle. While `ce`
is low, `done` is 0 and the outputs keep their values. The multiplier
never stalls and has no handshake beyond `ce`/`done`.

The whole multiplication happens in the one combinational path: the 53-row
array plus its 53-bit ripple merge, then normalization and the checks. The
clock period must cover that path. No pipelining is provided.

## The exponent path

`exp_calc` keeps the carry out of the 11-bit addition as a twelfth bit.
Without it, an overflow in `EA + EB` would be lost before the bias is
subtracted. The 12-bit ripple borrow subtractor then subtracts 1023. Its
borrow out becomes the sign bit of a 13-bit two's complement intermediate
exponent. A negative value, or a value of 2047 or more, therefore stays
visible to the later checks.

## The significand array (`mant_mult`)

There is one row per multiplier bit `b[i]`. Row 0 holds just the partial
products `a & b[0]`. In every later row, cell `(i, j)` is a full adder. It
adds three values, all of weight `i + j`:

* the partial product `a[j] & b[i]`;
* the sum of cell `(i-1, j+1)`;
* the carry of cell `(i-1, j)`.

So a sum moves one column toward the LSB from row to row, and a carry moves
straight down: in the usual skewed drawing of the array, the carries run
diagonally. Row `i` delivers product bit `i` at column 0. The sums and
carries left after row 52 hold weights 53 to 105. A 53-bit ripple carry
adder, the same `rca` module the exponent path uses, merges them into the
top half of the 106-bit product.

Each row is written as vector equations, `s = pp ^ above ^ cin` and
`c = maj(pp, above, cin)`. This is the same netlist as 53 full-adder
instances per row, but a simulator handles it much faster.

## Normalization, rounding and exceptions

**Normalizer.** Both significands lie in [1, 2), so their product lies in
[1, 4). The leading one is therefore in bit 105 or bit 104, and one row of
2:1 multiplexers does all the shifting:

* If bit 105 is set, the product is read one place further left and the
  exponent goes up by one.
* Otherwise the product is read as it is.

The hidden one is then dropped and the next 52 bits form the fraction. The
normalizer also produces a round bit and a sticky bit (the OR of all lower
bits).

This exponent increment is why an intermediate exponent of exactly 0 can
still give a normal result. That happens when the significand product is
at least 2.

**Rounder** (`RND` parameter):

* `RND_TRUNC` (the default) simply drops the bits below the fraction. At
  this setting the rounder is just wires.
* `RND_NEAREST_EVEN` applies IEEE round-to-nearest, ties to even. If the
  increment carries out of the fraction, the significand has become 2.0:
  the fraction is set to zero and the exponent goes up by one. This second
  normalization can only happen once, so it is done in one step.

**Exception unit**, applied in this priority order:

| condition | `fp_z` | flag |
|-----------|--------|------|
| an operand is NaN, or infinity x (zero or subnormal) | `0x7FF8_0000_0000_0000` | none |
| an operand is infinite | ±infinity | none |
| an operand is subnormal | ±0 | `underflow` |
| an operand is zero | ±0 | none |
| final biased exponent ≥ 2047 | ±infinity | `overflow` |
| final biased exponent ≤ 0 | ±0 | `underflow` |
| otherwise | `{sign, exponent, fraction}` | none |

The sign of a zero or infinity result is always `sign_a ^ sign_b`.
Subnormal numbers are never produced: they are flushed to zero.

## Where this implementation makes its own choices

* **Hidden one included.** The significand multiplier is 53 x 53 bits with
  a 106-bit product. It is not 52 x 52 bits with 104, because the hidden
  one is needed for a correct product.
* **Truncation by default.** The reference worked example uses truncation,
  so that is the default rounding mode. Round-to-nearest-even is an
  option. The full 106-bit product is not brought out as a port.
* **Exponent limits.** Overflow and underflow use the binary64 limits:
  1 ≤ biased exponent ≤ 2046 is normal. They are checked after
  normalization and rounding.
* **Special operands.** Infinity and NaN operands, and the rule that a
  zero operand raises no flag, follow IEEE 754.
* **Added ports.** `rst_n` and the two flag outputs are additions. The
  other port names come from the reference schematic symbol, which draws
  32-bit buses. Here the buses are 64 bits.
* **Timing.** The one-cycle output register and the `ce`/`done` timing
  are this implementation's choice.
* **Worked example.** The 4-bit-fraction example multiplies
  `0 10000000000 1010` by `0 10000000011 0111`. Its product is 3.25 x 23 =
  74.75, and the arithmetic gives `0 10000000101 0010` (72, which is 74.75
  truncated). The RTL produces this value. The partial-product sum printed
  alongside that example does not match the arithmetic.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
Each one also has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_fp_mul` | Full-size binary64 with truncation, about 3,000 products. Three references: an integer model (`tb/fp_ref_pkg.sv`, whole 106-bit product, no use of the array structure); the simulator's own double product (truncated result must equal it or lie one ulp nearer zero); and the 16.33 x 27.44 ≈ 448.0952 example. Also checks `done` timing and holding while `ce` is low. Counts, and requires at least once, each of: normalization shift, no shift, overflow, underflow, an intermediate exponent of 0 compensated, subnormal operand, zero operand, infinity result, NaN result. |
| `tb_fp_mul_small` | 11-bit exponent, 4-bit fraction. Runs the worked example, plus 4,000 random products against the native double product truncated to 4 bits (exact, because these products fit a double). |
| `tb_mant_mult` | 53 x 53 at random and at the extremes; 5 x 5 exhaustively. |
| `tb_exp_calc`, `tb_rca`, `tb_ripple_borrow_sub`, `tb_sign_calc` | Grids, random values and small exhaustive instances. |
| `tb_normalizer`, `tb_rounder`, `tb_exc_unit` | Each rule driven directly, in both rounding modes for the rounder. |

One gap: round-to-nearest-even has been checked only in the rounder's own
testbench, not through the whole multiplier.

Simulating the whole multiplier in round-to-nearest-even mode failed. A
20-bit-fraction build was tested against the native double product. With
C++ optimisation turned off (`-CFLAGS -O0`) it passed. With the default
`-Os`, the compile did not finish within several minutes.

Run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/fp_mul_pkg.sv tb/fp_ref_pkg.sv tb/tb_fp_mul.sv --top-module tb_fp_mul
./obj_dir/Vtb_fp_mul
```

For the unit testbenches, leave out `tb/fp_ref_pkg.sv` and change the file
and top names.

## Files

* `rtl/fp_mul.sv`: top level.
* `rtl/fp_mul_pkg.sv`: default widths, the rounding-mode enum and a
  binary64 field struct.
* `rtl/sign_calc.sv`, `rtl/exp_calc.sv`, `rtl/mant_mult.sv`,
  `rtl/normalizer.sv`, `rtl/rounder.sv`, `rtl/exc_unit.sv`: the units
  described above.
* `rtl/rca.sv`, `rtl/ripple_borrow_sub.sv`, `rtl/half_adder.sv`,
  `rtl/full_adder.sv`, `rtl/full_subtractor.sv`: adder and subtractor
  cells.
* `tb/`: the testbenches, plus the reference model `fp_ref_pkg.sv`.
