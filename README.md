# Urdhva-Tiryagbhyam square circuit (2, 4, 8 and 16 bit)

This is a combinational binary squarer built on the Vedic *Urdhva-Tiryagbhyam*
rule, which means "vertically and crosswise". The same hardware multiplies any
two unsigned numbers. Feed one value on both operand ports and it returns the square.
The design is a hierarchy. A 2-bit cell made of AND gates and half adders is the leaf.
Four 2-bit cells and one adder stage make a 4-bit circuit. Four of those make an
8-bit circuit, and four 8-bit circuits make the 16-bit top, `vedic_mul16x16`.
All partial products are formed in parallel. Only the adder stages run in sequence.

## The rule, in decimal and in binary

To square 17, work column by column from the right. Carry into the next column each time:

| step | column | operation | digit | carry |
|---|---|---|---|---|
| 1 | units: vertical | 7 x 7 = 49 | 9 | 4 |
| 2 | tens: crosswise | 1 x 7 + 1 x 7 + 4 = 18 | 8 | 1 |
| 3 | hundreds: vertical | 1 x 1 + 1 = 2 | 2 | – |

The result is 289. The hardware applies the same three steps to *blocks* of bits
instead of decimal digits. Split each N-bit operand into halves of H = N/2 bits:
a = {aH, aL} and b = {bH, bL}. Then:

```
q0 = aL*bL            vertical, low      (weight 1)
q1 = aH*bL            crosswise          (weight 2^H)
q2 = aL*bH            crosswise          (weight 2^H)
q3 = aH*bH            vertical, high     (weight 2^N)
p  = q0 + (q1 + q2)*2^H + q3*2^N
```

Each of the four products is a half-size circuit of the same kind. The 2-bit cell
ends the recursion. It is the rule applied to single bits:

```
p[0]          = a0 b0                       (vertical)
p[1], c       = half_add(a1 b0, a0 b1)      (crosswise)
p[3], p[2]    = half_add(a1 b1, c)          (vertical + carry)
```

That is four AND gates and two half adders.

## The combining stage (`vedic_combine`)

This stage is the hardest part to follow. It is the only place where the block-level
carries are handled. With 2H-bit products q0..q3, it uses three 2H-bit ripple
adders:

```
{c1, s1} = q1 + q2                      crosswise sum
{c2, s2} = s1 + (q0 >> H)               add the carry-out of the low column
s3       = q3 + {c1 + c2, s2 >> H}      high column plus both carries
p        = {s3, s2[H-1:0], q0[H-1:0]}
```

- The low H bits of q0 pass straight through to p. This matches step 1 of the decimal example: the digit 9 is final.
- The crosswise carry c1 and the low carry c2 both have weight 2^(N+H). They enter the upper adder at bit H as the two-bit value c1 + c2.
- For real products, c1 and c2 cannot both be 1. Bit H+1 of that value is therefore always 0. It is wired anyway, so the stage never relies on that fact.
- The upper adder's carry-out is always 0, because an N x N product fits in 2N bits. It is left unconnected as `c3_unused`.

The adders are ripple-carry chains of full adders. Each full adder is two half
adders and an OR gate. Every gate in the design is therefore an AND, an OR, or a
half adder's XOR/AND pair.

## Modules

| module | width | contents |
|---|---|---|
| `vedic_mul16x16` (top) | 16 x 16 -> 32 | 4 x `vedic_mul8x8`, `vedic_combine #(H=8)` |
| `vedic_mul8x8` | 8 x 8 -> 16 | 4 x `vedic_mul4x4`, `vedic_combine #(H=4)` |
| `vedic_mul4x4` | 4 x 4 -> 8 | 4 x `vedic_mul2x2`, `vedic_combine #(H=2)` |
| `vedic_mul2x2` | 2 x 2 -> 4 | 4 AND gates, 2 `half_adder` |
| `vedic_combine #(H)` | four 2H-bit products -> 4H | 3 x `ripple_adder #(W=2H)`; H >= 2 |
| `ripple_adder #(W)` | W + W + cin -> W + cout | W x `full_adder` |
| `full_adder` | 1 bit | 2 x `half_adder`, OR |
| `half_adder` | 1 bit | XOR, AND |

The top's ports are `a[15:0]`, `b[15:0]` and `p[31:0]`, which is 64 I/O bits. To
square a value, drive it on both `a` and `b`. Each of the 2-, 4- and 8-bit circuits is
a complete squarer of its own width. Use it on its own where a smaller squarer is enough.

## Timing

There is no clock, no register and no reset. `p` is valid one propagation delay
after `a` and `b` settle. The critical path runs through the 2-bit cells and then
through three ripple adders per level: 4-bit, then 8-bit, then 16-bit adders. It
grows roughly linearly with the width. On small FPGAs, the routing delay of such a circuit
is known to dominate its logic delay at 8 and 16 bits. If timing matters, a carry-save or
carry-lookahead combining stage is the obvious upgrade. That would replace the
ripple adders in `vedic_combine` and leave the rest unchanged.

After coarse synthesis, the 16-bit top comes to 907 AND, 187 OR and 688 XOR one-bit cells.

## Where this RTL makes its own choices

- **Two operand ports.** The square circuit is built as a general multiplier with
  ports A, B and P, and it squares when A = B. A dedicated squarer could share the two
  crosswise products, because q1 = q2 when a = b. This one does not.
- **Block hierarchy.** The 2-bit cell (AND gates and half adders) is the one whose
  gate structure is defined. The 4-, 8- and 16-bit circuits are assumed to use the
  common four-quadrant form described above.
- **Adder type.** The circuit only needs "simple adders", so ripple-carry was chosen as the simplest kind.
- **Unsigned operands.** No sign handling.
- **Purely combinational.** There is no input or output register.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it applies |
|---|---|
| `half_adder_tb`, `full_adder_tb` | all input combinations |
| `ripple_adder_tb` | all 2^17 cases for W = 8; requires a full-length carry ripple |
| `vedic_mul2x2_tb`, `vedic_mul4x4_tb` | all operand pairs |
| `vedic_combine_tb` | H = 2, all pairs; H = 8, all squares plus 100 000 random pairs |
| `vedic_mul8x8_tb` | six reference squares (131² = 17161, 192², 48², 64², 24², 152²), then all 65 536 pairs |
| `vedic_mul16x16_tb` | six reference squares (15358² = 235868164, 444², 4445², 11360², 32102², 23409²), all 65 536 squares, 200 000 random pairs |

Expected values always come from the simulator's own `*` operator. The reference
squares are written out as constants.

The combining-stage testbenches also count how often each carry path fires:
the crosswise carry c1 and the low carry c2. A path that never fires counts as a
failure. The 16-bit testbench counts these carries at the top stage and inside the
8-bit circuit that forms aH*bH. It runs the top at its only size and finishes in a few seconds.

Running with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb tb/vedic_mul16x16_tb.sv \
          --top-module vedic_mul16x16_tb -Mdir obj
./obj/Vvedic_mul16x16_tb
```

Lint any module with `verilator --lint-only -Wall -Irtl rtl/<module>.sv`.
