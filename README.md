# RoBA: a rounding-based approximate multiplier

A multiplier spends most of its area, delay and power on partial-product
generation and reduction. RoBA (rounding-based approximate) multiplication
avoids this by rounding each operand to its nearest power of two. Write
`Ar`, `Br` for the rounded operands. Then

    A * B = Ar*B + Br*A - Ar*Br + (A - Ar)*(B - Br)

and RoBA drops the last term. `Ar` and `Br` are powers of two, so each of the
three remaining products is a shift. What is left of the multiplication is
three shifters and one add/subtract. The dropped term is the whole error. It is
zero when either operand is a power of two (or zero). Otherwise it is small,
because each rounding error is at most a third of its operand.

This repository gives synthesizable, purely combinational SystemVerilog for an
n x n RoBA multiplier (n = 8 by default) in its three architectures:

| MODE      | operands          | negation                                  |
|-----------|-------------------|-------------------------------------------|
| `S_ROBA`  | two's complement  | exact, `~X + 1` (default)                 |
| `AS_ROBA` | two's complement  | approximate, `~X` (the +1 is skipped)     |
| `U_ROBA`  | unsigned          | none: no sign detector, no sign set       |

## Accuracy

For unsigned 8-bit operands (URoBA), checked over all 65,025 non-zero pairs:

- The largest relative error is 1/9 (11.1 %).
- The mean relative error is 2.9 %.
- Products are too high in about half the cases, too low in the other half,
  and exact in 4,016 cases.

The bound of 1/9 holds at every width. Each relative rounding error
|A - Ar| / A is at most 1/3, so the dropped term is at most AB/9.

S-RoBA has the same error on magnitudes. AS-RoBA has further errors. Each
negative operand's magnitude comes out one too small. A negative result is one
too small as well, and a zero product with operands of opposite sign reads -1.

## The rounding rule

The rounding block (`roba_rounding`) holds most of the subtle logic. Let the
leading one of A be at bit k. The two candidate powers are 2^k and 2^(k+1), and
the bit just below the leading one chooses between them:

- If `A[k-1] = 0`, then A < 1.5 * 2^k and A rounds down to 2^k.
- If `A[k-1] = 1`, then A >= 1.5 * 2^k and A rounds up to 2^(k+1).

Values exactly halfway, 3 * 2^(k-1) (binary `110...0`), therefore round up.
This costs no extra logic. As a bit equation for each output position j:

    Ar[j] = lead[j] & ~A[j-1]  |  lead[j-1] & A[j-2]

Here `lead` is the one-hot output of a leading-one detector, and bits below
position 0 count as 0.

The output is one bit wider than the input. An unsigned `11x...x` rounds to
`10...0` with n+1 bits, which gives `Ar[n] = A[n-1] & A[n-2]`. Zero rounds to
zero, so a zero operand zeroes all three shifted terms, and the product is
exactly 0.

`Ar` is kept one-hot, never encoded as an exponent. A shifter is then just an
AND-OR multiplexer: each output bit ORs the input bits that each one-hot bit
would move onto it (`roba_shifter`).

## Datapath and widths

`roba_core` is the unsigned datapath, and on its own it is the URoBA
multiplier:

```
 A ──┬──────────────► rounding ──Ar (n+1, one-hot)──┬───────────────┐
     │                                              │               │
 B ──┼──┬───────────► rounding ──Br (n+1, one-hot)──┼──────┐        │
     │  │                                           │      │        │
     │  └── B ──► shifter (B << log2 Ar) ◄──────────┘      │        │
     └───── A ──► shifter (A << log2 Br) ◄─────────────────┤        │
          Ar ───► shifter (Ar << log2 Br) ◄────────────────┘        │
                       │ Ar*B, Br*A, Ar*Br (2n+1 bits)              │
                       ▼                                            │
              adder/subtractor  Ar*B + Br*A - Ar*Br ──► P[2n-1:0]
```

The internal products are 2n+1 bits wide. With unsigned operands `Ar` and `Br`
can both be 2^n, so `Ar*Br` reaches 2^(2n), one bit more than the product.
The result, A*B minus the dropped term, is always non-negative and below
2^(2n). The top bit of the sum is therefore always zero and is dropped. An
immediate assertion in `roba_core` checks this in simulation.

The signed architectures (`roba`, MODE `S_ROBA` or `AS_ROBA`) wrap the same core:

```
 x ─► sign detector ─ |x| ─┐                            ┌─► sign set ─► p
 y ─► sign detector ─ |y| ─┴─► roba_core (n bits) ─ |p| ┘       ▲
        sign(x) XOR sign(y) ────────────────────────────────────┘
```

The magnitude of -2^(n-1) is 2^(n-1), which still fits in n unsigned bits.
The core therefore runs at width n in every mode, and a signed product
magnitude never exceeds 2^(2n-2). Example: -2 * 11. Here |x| = 2 is a power of
two, so the result is exact: 8*2 + 2*11 - 8*2 = 22, negated to -22. AS-RoBA
gives -12 for the same operands (|x| becomes 1, and the negation of the result
is off by one).

## Files

| file | module | role |
|------|--------|------|
| `rtl/roba_pkg.sv` | `roba_pkg` | `roba_mode_e` (S_ROBA, AS_ROBA, U_ROBA) |
| `rtl/roba.sv` | `roba` | top: `x[N-1:0]`, `y[N-1:0]` → `p[2N-1:0]`, parameters `N`, `MODE` |
| `rtl/roba_core.sv` | `roba_core` | unsigned datapath (URoBA) |
| `rtl/roba_rounding.sv` | `roba_rounding` | nearest power of two, one-hot, W+1 bits |
| `rtl/roba_shifter.sv` | `roba_shifter` | word times one-hot power of two |
| `rtl/roba_addsub.sv` | `roba_addsub` | a + b - c |
| `rtl/roba_sign_detector.sv` | `roba_sign_detector` | sign and magnitude, exact or ones' complement |
| `rtl/roba_sign_set.sv` | `roba_sign_set` | applies the result sign, exact or ones' complement |

Everything is combinational, with no clock and no reset. To pipeline the
multiplier, register its ports, or cut between the rounding blocks and the
shifters.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/roba_ref_pkg.sv` holds
the arithmetic reference. It computes the nearest power of two by comparing
distances rather than with the bit rule, so the testbenches check the RTL
against an independent model.

| testbench | what it covers |
|-----------|----------------|
| `tb_roba_full` | the top at its defaults (8-bit S-RoBA): all 65,536 operand pairs, plus exactness for power-of-two operands |
| `tb_roba` | the top in all three modes, all pairs. Counts each mechanism (round down, round up, tie, the extra rounding bit, power-of-two operand, zero, result negation, AS-RoBA departing from S-RoBA) and fails if any never occurs |
| `tb_roba_image` | 3x3 smoothing and sharpening of a generated 32x32 image, every product through the multiplier. Prints the PSNR against exact products (about 32 dB and 21 dB) |
| `tb_roba_core`, `tb_roba_rounding`, `tb_roba_shifter`, `tb_roba_addsub`, `tb_roba_sign_detector`, `tb_roba_sign_set` | each block exhaustively or randomly, at two widths where that matters |

To run one with plain Verilator, name the two packages and the testbench. The
`-I` paths let Verilator find every module in its own `NAME.sv` file:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/roba_pkg.sv tb/roba_ref_pkg.sv tb/tb_roba_full.sv \
    --top-module tb_roba_full -o sim
./obj_dir/sim
```

`-Wno-fatal` keeps Verilator's width warnings about the testbenches' 32-bit to
64-bit integer arithmetic from stopping the build. Each testbench finishes in well under a second.

## Design choices and limits

Where the RoBA method fixes the behaviour, the RTL follows it: the rounding rule
(including `Ar[n] = A[n-1] & A[n-2]`), the n+1-bit rounded operands, the shift
and add/subtract structure, the exact and approximate negation, and the
unsigned variant without sign blocks. The rest is this design's own choice:

- **Default `S_ROBA`, 8 bits.** The reference 8 x 8 example, -2 * 11 = -22,
  needs exact negation.
- **Shifter width.** The shifters and the adder are 2n+1 bits wide rather than
  2n. In unsigned mode `Ar*Br` can reach 2^(2n), so the extra bit keeps the
  intermediate values exact. The 2n-bit output is unaffected.
- **One-hot shifters.** The shifters are one-hot multiplexers, so no exponent
  encoder is needed. The adder/subtractor is a plain `a + b - c`, and synthesis
  picks the adder architecture.
- **Ones' complement in both places.** In `AS_ROBA` it is used in both sign
  detectors and in the sign set.
- **Shared rounding block.** The signed modes use the same n+1-bit rounding
  block; its top bit is then always 0 and is removed by synthesis.
- **Combinational only.** There are no pipeline registers.

Not included:

- The conventional Vedic (Urdhva-Tiryagbhyam) 8 x 8 multiplier. It is the usual
  exact baseline for comparing delay and LUT count, and is not part of the RoBA
  design.
- An FIR filter built on the multiplier. Its order, coefficients and word widths
  are unspecified, so none is provided. `roba` can be dropped into any FIR tap
  in place of `*`.
