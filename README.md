# Single-precision floating-point multiplier with a Vedic significand multiplier

This is an IEEE 754 binary32 multiplier, `Z = A * B`. Most of its delay and area is in the
24x24-bit product of the two significands. That product comes from a hierarchical
"Urdhva Tiryakbhyam" (vertically and crosswise) multiplier. The basic cell is a 2x2-bit multiplier
that forms all of its partial products at once. Four of those make a 4x4 multiplier, four 4x4 make
an 8x8, and so on up to 32x32. At each level the four half-size products are added by carry save
adders. The rest of the multiplier is conventional: the sign is an XOR, the exponents are added and
re-biased, the product is normalised by at most one position, and overflow, underflow and the IEEE
special values get their own results.

## Data flow and timing

```
 fp_a, fp_b ──► [stage 1: operand registers]
                   │
                   ├─ fp_classify (A), fp_classify (B): sign, exponent, 32-bit significand, zero/inf/NaN
                   ├─ sign = sA ^ sB
                   ├─ fp_exponent_unit: exp_in = eA + eB - 127   (10-bit signed)
                   ├─ vedic_mantissa_unit: 32x32 Vedic product, bits 47..20 -> sig_in (28 bits)
                   └─ special-case summary (NaN / Inf / zero)
                ──► [stage 2 registers]
                   └─ fp_normalize_pack: shift by one if needed, overflow/underflow, pack Z
                ──► [stage 3 registers] ──► fp_z, flags, out_valid
```

- Everything is registered on the rising edge of `clk`. `rst_n` is an active-low synchronous reset.
- A pair on `fp_a`/`fp_b` with `in_valid` high is accepted on a rising edge. Its result appears on
  `fp_z` with `out_valid` high after the third rising edge, counting the one that accepted it.
  A new pair can be accepted on every clock. There is no back-pressure.
- `flags` is a `fp_flags_t` struct: `{invalid, overflow, underflow, inf, zero}`.
- The stage boundaries are this implementation's own choice. The critical path is the
  combinational 32x32 tree in stage 2. If a faster clock is needed, that is the place to add
  registers.

Top-level ports of `fpmul_vedic`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | `fp_a`/`fp_b` hold an operand pair |
| `fp_a`, `fp_b` | in | 32 | IEEE 754 single-precision operands |
| `out_valid` | out | 1 | `fp_z`/`flags` hold a result |
| `fp_z` | out | 32 | product |
| `flags` | out | 5 | `fp_flags_t` |

## The Vedic multiplier tree

### The 2x2 cell (`vedic_2x2`)

The product is built column by column. Every column takes the bit products whose indices add up to
that column, plus the carry from the column before:

```
q0      = a0·b0                   (vertical)
c1 q1   = a1·b0 + a0·b1           (crosswise)
c2 q2   = c1 + a1·b1              (vertical)
q3      = c2
```

All four AND terms are formed in parallel. Only two half adders lie in series. The same rule works
for wider operands. For 3-bit operands the columns are a0b0 | a1b0+a0b1 | a2b0+a1b1+a0b2 |
a2b1+a1b2 | a2b2, each with the previous carry added. Here it is used only at 2 bits.

### Building NxN from four (N/2)x(N/2) (`vedic_4x4` … `vedic_32x32`, `vedic_combine`)

Split each operand into halves, `A = {Ah, Al}` and `B = {Bh, Bl}`, each of H = N/2 bits. Four
sub-multipliers compute, in parallel:

```
LL = Al·Bl     LH = Al·Bh     HL = Ah·Bl     HH = Ah·Bh      (N bits each)
```

`vedic_combine` assembles the 2N-bit product without shifting any partial product:

```
Q[H-1:0]    = LL[H-1:0]
MID         = LH + HL + LL[N-1:H]          first carry save adder  (N+2 bits)
Q[N-1:H]    = MID[H-1:0]
TOP         = HH + MID[N+1:H]              second carry save adder
Q[2N-1:N]   = TOP[N-1:0]
```

For N = 32 this is `Q = (Q63..Q32) & (Q31..Q16) & (Q15..Q0)`. The first adder's upper part passed
to the second is `MID[N+1:H]`, which is H+2 bits (18 bits for N = 32). The two top bits hold the
carries of the three-operand sum. A version that passes only H bits (bits 31..16 at N = 32) drops
those carries and gives wrong products for large operands. The fault test of `vedic_combine` is
exactly that narrower wiring.

`csa_add3` is the carry save adder. A row of full adders reduces three operands to a sum vector and
a carry vector, with no carry moving between bit positions. One carry-propagate addition then
merges the two vectors. The second adder of each level has only two real operands, so its third
input is tied to zero.

The four sizes are separate modules (`vedic_4x4`, `vedic_8x8`, `vedic_16x16`, `vedic_32x32`)
rather than one recursive module. Each is the same twelve lines. All of them are purely
combinational.

## Floating-point handling

### Significand path

`fp_classify` restores the hidden 1 and zero-extends the significand to 32 bits. For 134.0625 that
gives `0x00861000`. The 32x32 tree multiplies the two significands. Bits 63..48 of its
64-bit result are always zero, because each input is below 2^24. Both significands lie in [1,2),
so their 48-bit product lies in [1,4) and its leading 1 is at bit 47 or bit 46. Bits 47..20 are
kept as the 28-bit `sig_in`.

`fp_normalize_pack` looks at bit 27 of `sig_in`, which is product bit 47:

- bit 27 set: shift right by one and add 1 to the exponent;
- bit 27 clear: leave the significand and exponent as they are.

After this step the hidden bit is at bit 26 and the fraction is bits 25..3. The lower bits are
discarded, so results are **truncated** (rounded toward zero), not rounded to nearest. A result
can therefore differ from an IEEE round-to-nearest multiplier by one unit in the last place.

### Exponent path

`exp_in = eA + eB - 127` is kept as a 10-bit two's-complement value, so out-of-range exponents
remain visible after normalisation. After the possible +1:

- `>= 255`: overflow. The result is a signed infinity, and `overflow` and `inf` are set.
- `<= 0`: underflow. The result is a signed zero, and `underflow` and `zero` are set. No subnormal
  results are produced.

### Special operands

| operands | result | flags |
|---|---|---|
| either is NaN, or 0 × ∞ | `0x7FC00000` (quiet NaN) | `invalid` |
| ∞ × non-zero (finite or ∞) | signed ∞ | `inf` |
| 0 × finite | signed 0 | `zero` |

A subnormal operand (exponent 0, fraction not zero) is treated as zero.

### Worked examples

| A | B | A_SIG / B_SIG | exp_in | sig_in | shift | Z |
|---|---|---|---|---|---|---|
| 134.0625 `0x43061000` | −2.25 `0xC0100000` | `00861000` / `00900000` | `0x87` | `4B69000` | no | `0xC396D200` = −301.640625 |
| −14.5 `0xC1680000` | −0.375 `0xBEC00000` | `00E80000` / `00C00000` | `0x80` | `AE00000` → `5700000` | yes, exp `0x81` | `0x40AE0000` = 5.4375 |

Both examples are checked in the end-to-end testbench, including the intermediate values.

## Departures from, and additions to, the original description

The original design was published as an FPGA implementation (Spartan-3E) without source. The
following points are this implementation's own and may differ from it:

- **Rounding:** truncation. No rounding scheme was specified, and both published examples are
  exact, so they cannot tell the schemes apart.
- **Subnormals:** flushed to zero on input and output. Overflow and underflow were only said to
  be "handled".
- **NaN / ∞ / 0 encodings and the `flags` output:** chosen here.
- **Pipeline:** three stages, plus the `in_valid`/`out_valid`/`rst_n` handshake. The original
  says only that all operations happen on the rising clock edge.
- **Carry between the two carry save adders:** carried at full width (see above), where the
  published block diagram labels that bus with the narrower 16-bit range.
- **Four sub-multipliers per level:** this follows the block diagram. A Karatsuba-style split with
  three sub-products was mentioned in passing but not described, and is not built.
- The board-level part of the original work (programming a Spartan-3E board) has no logic of its
  own and is not included. Neither is any timing claim: the published 4.788 ns worst-case delay
  belongs to that device and tool flow.

## Files

`rtl/`

| file | contents |
|---|---|
| `fpmul_pkg.sv` | widths, bias, `fp_unpacked_t`, `fp_special_t`, `fp_flags_t` |
| `fpmul_vedic.sv` | top: three-stage pipeline |
| `fp_classify.sv` | unpack one operand, zero/inf/NaN flags |
| `fp_exponent_unit.sv` | `eA + eB - 127` |
| `vedic_mantissa_unit.sv` | 32x32 Vedic product, bits 47..20 |
| `fp_normalize_pack.sv` | normalise, exceptions, pack |
| `vedic_2x2.sv` | Urdhva 2x2 cell |
| `vedic_4x4.sv` … `vedic_32x32.sv` | one level of the tree each |
| `vedic_combine.sv` | adds the four sub-products (two carry save adders) |
| `csa_add3.sv` | three-operand carry save adder, parameter `W` (default 32) |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. The 2x2, 4x4 and 8x8 multipliers
and the exponent unit are tested exhaustively. The wider multipliers, the adder and the combiner are
tested on corner operands and then random ones. `tb_fpmul_vedic` streams 25,000 operand pairs
through the top at its default configuration, back to back and with random idle cycles. It checks
every result and its flags against a reference model in the testbench, checks the 3-cycle latency
and the order of results, and checks the two worked examples. It counts how often each mechanism
occurs (normalisation shift, no shift, overflow, underflow, NaN, infinity, zero operand, subnormal
operand, negative result, idle cycle) and fails if any of them never happens.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fpmul_vedic rtl/fpmul_pkg.sv tb/tb_fpmul_vedic.sv
./obj_dir/Vtb_fpmul_vedic
```

Replace `tb_fpmul_vedic` with any other `tb_<module>` to test one block. The package file must
come first on the command line. For lint only:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv --top-module fpmul_vedic rtl/fpmul_pkg.sv rtl/fpmul_vedic.sv
```

The remaining lint warnings are intentional: unused package constants, the two always-zero top
bits of the second carry save adder, and the observation outputs `exp_o`/`sig_o` of the normaliser,
which the top does not use.
