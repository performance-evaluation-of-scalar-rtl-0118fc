# K-233 scalar multiplier with Frobenius steps and an affine point adder

This RTL computes Q = k·P on the NIST Koblitz curve K-233,

    y² + xy = x³ + 1   over GF(2²³³),  f(x) = x²³³ + x⁷⁴ + 1.

On a Koblitz curve the Frobenius map φ(x, y) = (x², y²) acts on every
point like multiplication by a fixed complex number τ. If the scalar is
written in τ-adic form, k = Σ kᵢ τⁱ, then Horner's rule

    Q ← O
    for i = 232 downto 0:
        Q ← φ(Q)              two squarings
        if kᵢ = 1: Q ← Q + P  one point addition

evaluates k·P without ever doubling a point. A doubling would need its own
formulas and its own data path. A Frobenius step costs only two field
squarings, which are plain wiring plus an XOR network. So the whole
multiplier is one affine point adder, two squarers and a small loop
controller. The point adder has a register after every field operation.

Two field multipliers are built, and a parameter selects one:

* `MULT_INTERLEAVED` (default): bit-serial shift-and-add multiplier.
* `MULT_MONTGOMERY`: bit-serial Montgomery multiplier with M(x) = x²³³.

## Block hierarchy

```
top_k233_point_multiplication      pin wrapper: shared load bus, output select
└─ k233_point_multiplication       τ-adic Horner loop (the_comp)
   ├─ classic_squarer  ×2          Frobenius: x², y²
   └─ koblitz_point_adder          affine P1 + P2, registered data path
      ├─ gf_divider                λ = (y1+y2)/(x1+x2)
      ├─ classic_squarer           λ²
      └─ interleaved_multiplier    λ·(x1+x3)
         or montgomery_multiplier
gf233_pkg                          field constants, gf_t, mult_kind_e, ×x, ÷x, reduction
```

Every module starts with a comment that gives its interface and timing.

## Field arithmetic

Elements are `gf_t = logic [232:0]`, with bit i the coefficient of xⁱ
(polynomial basis). Because x²³³ ≡ x⁷⁴ + 1, multiplying by x is a one-bit
left shift. If bit 232 falls out, bits 0 and 74 are flipped. Dividing by x is
the mirror image: when bit 0 is 1, first add f (flip bits 0 and 74), then
shift right with the old bit 0 moving into bit 232. These two helpers,
`gf_mulx` and `gf_divx`, are used by every sequential unit.

**Squarer** (`classic_squarer`, combinational). Squaring a binary
polynomial only spreads its bits: aᵢ moves to position 2i. The 465-bit
result is then folded from the top: every set bit at position i ≥ 233 flips
bits i−233 and i−159. Synthesis flattens this into XOR trees, at about
422 cells.

**Interleaved multiplier** (233 cycles). The multiplier keeps D·xⁱ mod f
in a register. Each cycle it adds that register into the accumulator when
bit cᵢ is set, then multiplies the register by x. C is consumed least
significant bit first. This is the unrolled AND/XOR/"×x mod f" chain of the
classic interleaved multiplier, folded onto a single stage.

**Montgomery multiplier** (233 cycles). C sits in a right-shift register.
Each cycle computes T = E + c₀·D, then E ← (T + t₀·f)/x. After 233 steps,
E = C·D·x⁻²³³ mod f.

**Divider** (`gf_divider`, variable latency, at most 466 cycles). This is
the block that is hardest to follow. It computes num/den with a binary
extended-Euclid loop. The unit keeps four values:

* A, which starts at den;
* B, which starts at f (234 bits);
* U, which starts at num;
* V, which starts at 0.

Two invariants hold throughout: U ≡ q·A and V ≡ q·B (mod f), where q is
the quotient. Each cycle does exactly one of these steps:

* If A is even, halve A and halve U mod f.
* Otherwise, if B is even, halve B and halve V mod f.
* Otherwise, add the one with the smaller degree bound into the other,
  do the same with U and V, and halve the result.

The counters `da` and `db` are upper bounds on the degrees of A and B, not
exact degrees. Each step lowers one of them by one. So A or B reaches 1
within 2·233 − 1 steps. When A = 1 the quotient is U; when B = 1 it is V.
The cost is two 9-bit counters instead of a 234-bit leading-one compare.
An assertion checks the step bound. The denominator must be nonzero; the
point adder never starts the divider with den = 0.

## Point addition (`koblitz_point_adder`)

This is affine addition with a register after each operation:

| step | operation | register |
|---|---|---|
| 1 | sx = x1 + x2, sy = y1 + y2 (and keep x1, y1) | sx, sy |
| 2 | λ = sy / sx (divider) | lam |
| 3 | λ² (squarer) | lam2 |
| 4 | λ + sx + λ² | xsum |
| 5 | x3 = xsum + a (a = `A_COEF`, 0 for K-233) | x3 |
| 6 | x1 + x3 | x13 |
| 7 | λ·(x1 + x3) (multiplier) | prod |
| 8 | y3 = prod + x3 + y1 | y3 |

With the Montgomery multiplier, step 7 yields λ(x1+x3)·x⁻²³³. A second pass
through the same multiplier uses the constant x⁴⁶⁶ mod f = x¹⁴⁸ + 1
(`MONT_R2`, computed in the package). That pass turns the result back into
the plain product. It costs 233 more cycles per addition.

The affine formula fails when x1 = x2, so the adder checks for that case
before starting the divider:

* If y1 ≠ y2, the sum is the point at infinity, and `r_inf` is set.
* If y1 = y2, the sum would be a doubling. This data path cannot do that,
  so it sets `error` instead.

Latency: 8 control cycles, plus the divider, plus one multiplier pass
(interleaved) or two passes (Montgomery).

## Scalar loop (`k233_point_multiplication`)

The `k` input is the τ-adic digit string, not an integer. Bit i is digit kᵢ,
and digits must be 0 or 1. Converting an integer scalar to this form is not
part of the RTL.

The point at infinity is a flag, `q_inf`, not a coordinate. While Q = O,
the Frobenius step is skipped, and the first 1-digit simply loads P. Every
digit costs 2 cycles: a registered Frobenius step, then the digit test. A
1-digit adds one point-adder run once Q is finite. If an addition ever
meets Q = P, the run stops and `error` is set. None of the tested digit
strings hit this case. It is reported rather than handled.

Measured at the default parameters, from `start` to `done`:

| scalar (digits) | interleaved | Montgomery |
|---|---|---|
| 0x52 (1010010, base point G) | 1881 cycles | 2351 cycles |
| 0x34 (decimal 52) | 1886 cycles | 2356 cycles |
| 0 or a single 1-digit | 467 cycles | 467 cycles |

The divider's latency depends on the operands, so these counts change with
P and k. For comparison, the published design reports 1884 cycles and
21.805 µs at 86.4 MHz for k = 52 with the interleaved multiplier. Here,
0x52 takes 21.77 µs at that clock.

Result for k = 0x52 on the K-233 base point (both configurations):

    xQ = 1b730fc0b7b7ef0d29689c4d85a862495e15a3da57087ac3f7a2a905743
    yQ = 0b0aa78d64c3b847516504cb2bed15562b5b967b4873694f6796900a362

## Pins (`top_k233_point_multiplication`)

| pin | dir | width | use |
|---|---|---|---|
| clk, rst | in | 1 | clock, synchronous active-high reset |
| in_data | in | 233 | shared load bus |
| k_load, xp_load, yp_load | in | 1 | capture in_data into k, xP, yP |
| start | in | 1 | start a multiplication (ignored while one runs) |
| out_sel | in | 1 | out_data = xQ (0) or yQ (1) |
| out_data | out | 233 | selected coordinate |
| done | out | 1 | cleared by start, set when Q is ready, stays set |
| q_inf | out | 1 | Q is the point at infinity |
| error | out | 1 | a doubling was met |

To run a multiplication:

1. Load the three registers, one per cycle, in any order.
2. Pulse `start`.
3. Wait for `done`.
4. Read both coordinates by toggling `out_sel`.

The shared bus and the output multiplexer keep the pin count near 2 × 233.

## Where this RTL departs from the original architecture, and why

* **Frobenius loop, not repeated addition.** The original text describes
  k·P as P added k times. With only an affine adder, that would need a
  doubling at P + P. The τ-adic Horner loop uses exactly the components the
  original top level contains: one point adder and two squarers.
* **Affine, not Lopez-Dahab.** The original also lists a Lopez-Dahab
  projective ladder. Its drawn data path, however, is the affine adder with
  a divider, and that data path is what is built. The ladder and the τ-adic
  conversion are not implemented.
* **Constant in x3.** The original x3 data path adds a constant drawn as
  "1". The addition formula adds the curve coefficient a, which is 0 on
  K-233. This RTL follows the formula; `A_COEF` makes it settable.
* **Montgomery correction.** The Montgomery configuration corrects its
  x⁻²³³ factor with a second pass. How the original handles this factor is
  not stated.
* **Serial interleaved multiplier.** The interleaved multiplier is drawn as
  an unrolled chain; here it is one stage reused for 233 cycles.
* **Divider steps.** The steps and control of the divider are this design's
  own; only its role and start/done handshake are given.
* **Extra status pins.** `q_inf` and `error` are additions.
* **Reset and handshakes.** The synchronous reset and all start/done
  handshakes are this design's choices.
* **Original result not reproduced.** The result coordinates the original
  shows for its k = 52 run do not satisfy the curve equation as read, so
  they are not used as test values.

## Verification

Each block has a self-checking testbench in `tb/`. The reference arithmetic
lives in `tb_gf_ref_pkg`, which is written independently of the RTL:

* full carry-less products reduced by long division;
* inversion by Fermat (a^(2²³³−2));
* affine addition;
* the same Horner loop, in software.

It also holds a few values computed off-line with an independent model.

| testbench | what it checks |
|---|---|
| tb_classic_squarer | 308 squarings against a·a |
| tb_interleaved_multiplier, tb_montgomery_multiplier | 106 products each, exact 233-cycle latency |
| tb_gf_divider | 157 divisions, quo·den = num, latency ≤ 466 |
| tb_koblitz_point_adder | both multipliers; sums against the model and an off-line value, on-curve, P + (−P) = O, P + P flagged, latency bound |
| tb_k233_point_multiplication | both multipliers; k = 0x52 against an off-line value, random digit strings, k = 0, single digits, cycle bounds |
| tb_top_k233_point_multiplication | pin-level run at default parameters; counts that each mechanism happened (each load, Frobenius step, first-digit load, addition, both output selections, infinity result) |
| tb_workload_k52 | the evaluated operation through the top, both multipliers, k = 0x52 and 52; interleaved 0x52 within 1 % of the published 1884 cycles; prints cycles and time at 86.4/115.9/190/221 MHz |

Every testbench ends with `TB_RESULT checks=N failures=M` and has a cycle
watchdog. All of them pass. Each block's testbench also fails on a
deliberately broken copy of its block.

Simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/gf233_pkg.sv tb/tb_gf_ref_pkg.sv \
  rtl/classic_squarer.sv rtl/gf_divider.sv rtl/interleaved_multiplier.sv \
  rtl/montgomery_multiplier.sv rtl/koblitz_point_adder.sv \
  rtl/k233_point_multiplication.sv rtl/top_k233_point_multiplication.sv \
  tb/tb_top_k233_point_multiplication.sv \
  --top-module tb_top_k233_point_multiplication
./obj_dir/Vtb_top_k233_point_multiplication
```

All runs finish in about a second. The Montgomery configuration is built by
instantiating a block with `.MULT(gf233_pkg::MULT_MONTGOMERY)`.

Size after generic synthesis of the top, interleaved configuration: about
1550 word-level cells and 6350 flip-flop bits. Most of the flip-flops are
the 233-bit registers of the point adder, the divider and the loop.
