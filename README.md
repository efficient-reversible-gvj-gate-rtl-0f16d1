# GVJ reversible adders and a single precision multiplier built from them

A reversible logic gate has as many outputs as inputs, and maps every input
pattern to a different output pattern, so no information is destroyed as it
computes. The GVJ gate is a 3-input, 3-output reversible gate. Depending on
what is fed to its third input, it works as a half adder or as most of a full
adder. This RTL builds the adder family from that gate: a half adder, a full
adder, an 8-bit ripple carry adder and a 24x24 Wallace tree multiplier. It
then uses them in an IEEE 754 single precision floating point multiplier. That
multiplier is the top module, `fp_mult`.

The RTL models the gates' logic functions. It does not model reversibility
itself. A synthesis tool maps it to ordinary irreversible gates. The garbage
outputs that a reversible implementation must carry are computed, though, and
brought out where the published design names them (the 8-bit adder).

## The GVJ gate (`gvj_gate`)

| A B C | P Q R |
|-------|-------|
| 0 0 0 | 1 0 0 |
| 0 0 1 | 0 0 0 |
| 0 1 0 | 0 0 1 |
| 0 1 1 | 1 1 1 |
| 1 0 0 | 1 0 1 |
| 1 0 1 | 0 1 1 |
| 1 1 0 | 0 1 0 |
| 1 1 1 | 1 1 0 |

In closed form:

- P = B xnor C
- Q = majority(A, B, C) = AB + BC + CA
- R = A xor B

The eight output patterns are all different, so the gate is reversible. Two
facts make it an adder:

- With C = 0, R = A xor B is the sum and Q = AB is the carry. The gate is then
  a half adder (`gvj_half_adder`), and P = not B is its only garbage output.
- With C = carry-in, Q is already the full-adder carry. R is the partial sum
  A xor B, which is still missing the carry-in.

## The full adder: GVJ plus Feynman (`gvj_full_adder`, `feynman_gate`)

A Feynman gate (controlled NOT: P = A, Q = A xor B) finishes the sum. Its
control input is the carry-in and its target input is the GVJ gate's R. Its Q
output is therefore a xor b xor cin.

Each full adder has two garbage outputs:

- the GVJ gate's P, which is b xnor cin;
- the Feynman gate's P, which is a copy of cin.

The carry-out comes straight from one gate (one gate delay). The sum goes
through two.

The published design does not say which Feynman input takes the carry-in.
Putting the carry-in on the control input reproduces its worked example: for
10101010 + 01010101 the seven Feynman garbage bits are all 0.

## The ripple carry adder (`gvj_cpa`)

`gvj_cpa` has a `WIDTH` parameter, 8 by default. Bit 0 has no carry-in, so it
is a GVJ half adder. Bits 1 to WIDTH-1 are GVJ full adders chained through
their carries. The garbage outputs are brought out as two vectors:

- `garbage_p`: WIDTH bits, the GVJ P outputs;
- `garbage_f`: WIDTH-1 bits, the Feynman copies of the carries.

That makes 2·WIDTH − 1 garbage bits, 15 for the 8-bit adder. This is the count
the published design gives for its 8-bit adder.

This design adds a `cout` output, which the exponent logic needs. The adder
has no carry-in. To add a constant such as −127, the constant is fed in as the
second operand.

The same module, at other widths, is used everywhere in the design where two
numbers are added:

| Where | Width | Job |
|-------|-------|-----|
| exponent | 8 | add the two biased exponents |
| exponent | 10 | subtract the bias |
| Wallace tree | 48 | add the final sum and carry rows |
| rounding | 24 | the rounding increment |
| rounding | 10 | the exponent increment |

## The Wallace tree multiplier (`wallace_mult`, `gvj_csa_row`)

`wallace_mult` multiplies two unsigned numbers, 24 bits each by default
(`A_W`, `B_W`), into a 48-bit product. It works in three stages.

1. **Partial products.** Row i is `a AND b[i]`, shifted left by i and
   zero-extended to 48 bits. There are 24 rows.
2. **Carry-save reduction.** Each level takes the rows in groups of three and
   passes each group through a `gvj_csa_row`. That is a row of 48 GVJ full
   adders, one per bit column. It turns three rows into two with the same sum:
   a row of sum bits, and a row of carry bits shifted left by one. Rows left
   over when the count is not a multiple of three go to the next level
   unchanged. So n rows become 2·⌊n/3⌋ + (n mod 3).
3. **Final addition.** A 48-bit `gvj_cpa` adds the last two rows.

For 24 rows there are 7 levels. The row counts go 24 → 16 → 11 → 8 → 6 → 4 →
3 → 2, using 22 carry-save rows (1056 GVJ full adders) in all.

The carry out of column 47 is dropped in every carry-save row. This is safe
because the sum of all rows is a·b < 2^48, so the arithmetic modulo 2^48 is
exact.

The published design says only that the mantissa multiplier is a Wallace tree
built from GVJ gates. Grouping whole rows at each level, instead of reducing
column by column, is this design's choice. So is applying full adders to the
always-zero edges of the rows. Synthesis removes those adders, but the
full-adder count above includes them. The garbage outputs of the adders inside
the multiplier are left unconnected.

The row counts per level are worked out by constant functions (`next_rows`,
`rows_at`, `num_levels`). Each level is a generate block whose `nxt` array
feeds the next level. The tree therefore re-shapes itself for any `B_W` ≥ 1.

## The floating point multiplier (`fp_mult`)

Both operands and the result are IEEE 754 single precision words: 1 sign bit,
an 8-bit exponent biased by 127, and a 23-bit fraction with a hidden leading 1.
The type `gvj_pkg::fp32_t` splits a word into these fields. The multiplier is
purely combinational: `c` follows `a` and `b` after the delay of the logic,
with no clock and no handshake.

The datapath has four parts:

1. **Exponent (`fp_exponent`).** It computes ea + eb − 127 as a 10-bit two's
   complement number, `exp_tent`. An 8-bit `gvj_cpa` adds the exponents,
   keeping the carry. A 10-bit `gvj_cpa` then adds 10'h381, which is −127.
   The value ranges over [−127, 383], so both underflow and overflow stay
   visible.
2. **Sign.** The xor of the two sign bits.
3. **Significand product.** `wallace_mult` multiplies {1, fraction a} by
   {1, fraction b}. The 48-bit product lies in [1, 4), with the binary point
   below bit 46.
4. **Normalization and rounding (`fp_norm_round`).**
   - If bit 47 is set, the product is read one place further left and the
     exponent is incremented (`norm_shift`).
   - The 24 bits from the leading 1 downward are kept.
   - With `ROUND_NEAREST_EVEN = 1` (the default), the guard bit and the sticky
     bit decide the rounding. The guard bit is the first bit dropped; the
     sticky bit is the OR of all bits below it.
   - `round_up = guard & (sticky | lsb)`. A 24-bit `gvj_cpa` adds this to the
     kept significand.
   - If the addition carries out (1.11…1 + 1 ulp = 10.0…0), the fraction is
     already all zeros and the exponent goes up once more (`round_carry`).
   - A 10-bit `gvj_cpa` adds both exponent increments. It adds 2 when a shifted
     product also carries.
   - With `ROUND_NEAREST_EVEN = 0`, the dropped bits are simply truncated.

The published design gives these steps for normal numbers only. The handling
of everything else is this design's own:

| Case | Result |
|------|--------|
| exponent field 0 (zero or subnormal operand) | treated as zero |
| NaN operand, or 0 × ∞ | quiet NaN `0x7FC00000` |
| ∞ × nonzero | ∞ with the product's sign |
| rounded exponent ≥ 255 (overflow) | ∞ with the product's sign |
| rounded exponent ≤ 0 (underflow) | zero with the product's sign |

The last row means subnormal results are flushed to zero. These cases are
tested in the priority order of the table. NaN comes first, and a zero operand
beats overflow and underflow.

Example: `0x40A14280 × 0x59D1402A` (5.0393677 × 7.3623524e15) gives
`0x5B03CFB6` (3.7101601e16).

## Files

| File | Contents |
|------|----------|
| `rtl/gvj_pkg.sv` | format constants, `fp32_t`, the quiet NaN pattern |
| `rtl/gvj_gate.sv` | the GVJ gate |
| `rtl/feynman_gate.sv` | the Feynman gate |
| `rtl/gvj_half_adder.sv` | GVJ half adder |
| `rtl/gvj_full_adder.sv` | GVJ + Feynman full adder |
| `rtl/gvj_cpa.sv` | ripple carry adder, `WIDTH` = 8 |
| `rtl/gvj_csa_row.sv` | one 3:2 carry-save row of GVJ full adders |
| `rtl/wallace_mult.sv` | 24x24 Wallace tree multiplier |
| `rtl/fp_exponent.sv` | ea + eb − 127 |
| `rtl/fp_norm_round.sv` | normalization and rounding |
| `rtl/fp_mult.sv` | top: single precision multiplier |

The hierarchy is:

- `fp_mult`
  - `fp_exponent`: two `gvj_cpa`
  - `wallace_mult`: `gvj_csa_row` ×22, then `gvj_cpa`
  - `fp_norm_round`: two `gvj_cpa`

Inside these, `gvj_cpa` is built from `gvj_half_adder` and `gvj_full_adder`,
and `gvj_csa_row` from `gvj_full_adder`. Those in turn are built from
`gvj_gate` and `feynman_gate`.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end. A watchdog ends the run with a
failure if it hangs.

- **Gates and one-bit adders** (`tb_gvj_gate`, `tb_feynman_gate`,
  `tb_gvj_half_adder`, `tb_gvj_full_adder`): all input patterns are checked.
  The GVJ gate is compared with its truth table and checked for reversibility.
  The adders' sums, carries and garbage outputs are all checked.
- **`tb_gvj_cpa`:** all 65536 pairs of 8-bit operands, and the garbage bits
  against a bit-by-bit ripple reference.
- **`tb_wallace_mult`:** 0xAAAAAA × 0xFFFFFF, corner cases and 20000 random
  pairs, against 64-bit multiplication.
- **`tb_fp_exponent`:** all 65536 exponent pairs.
- **`tb_fp_norm_round`:** both rounding modes, against a reference built on
  the integer remainder. The stimulus includes random and directed exact ties
  and round carries.
- **`tb_fp_mult`:** end to end at default parameters. It runs directed cases,
  including the example above, and 30000 random pairs drawn so that every
  operand class occurs.
  - Results are compared with an integer reference model that has the same
    special-value rules.
  - Normal results are also checked against the product computed in double
    precision: the error must be at most half an ulp.
  - It counts normalization shifts, round ups, round carries, overflows,
    underflows, zero, infinity and NaN operands, and negative results. It
    fails if any of these never happens.

To run a testbench with Verilator 5 (shown for the top):

```
verilator --binary --timing --assert -Irtl rtl/gvj_pkg.sv tb/tb_fp_mult.sv \
    --top-module tb_fp_mult -o sim
./obj_dir/sim
```

Use the same command for any other testbench, with its own name. The package
must come first on the command line. `-Irtl` lets Verilator find the other
modules by name. Every testbench finishes in well under a second.

## Limits and departures

- **Reversibility costs are not modelled.** Quantum cost and gate-level delay
  figures are properties of a reversible implementation, and nothing in the
  RTL accounts for them. When the RTL is synthesized for an FPGA or a standard
  cell library, the result is ordinary logic. The xor, majority and xnor of
  each gate survive, but nothing keeps the circuit reversible.
- **Garbage outputs are brought out only by `gvj_cpa` and the one-bit
  adders.** The multiplier and the floating point datapath leave them
  unconnected internally.
- **Subnormal numbers are neither accepted nor produced.** They are flushed to
  zero. All NaNs come out as the same quiet NaN, and no exception flags are
  produced.
- **Only two rounding modes are available:** round to nearest even (the
  default) and truncation, chosen at elaboration time. The other IEEE 754
  rounding modes are not provided.
- **Verilator lint warnings remain for unused signals.** These are the gates'
  garbage outputs and the top column carries of the carry-save rows. They are
  unused by construction.
