# GF(2^163) elliptic-curve scalar point multiplier

This RTL computes Q = kP on a binary elliptic curve y² + xy = x³ + ax² + b over
GF(2^163) in polynomial basis, with the NIST pentanomial
P(x) = x^163 + x^7 + x^6 + x^3 + 1. It is aimed at the NIST curves B-163 and
K-163. The input is a 163-bit scalar k and an affine point P = (x_P, y_P). The output
is the affine point (x3, y3).

The architecture spends its hardware where the time goes:

* **The ladder.** The scalar is scanned one bit at a time with the Lopez-Dahab form of
  the Montgomery ladder, in projective coordinates (X : Z). Each key bit needs six
  field multiplications. Three digit-serial multipliers with a large digit (G1 = 41)
  run them as two rounds of three. One key bit therefore costs about two
  multiplication times.
* **The conversion.** Projective-to-affine conversion runs once per operation, so it
  uses small, cheap multipliers (G2 = 11). It avoids the usual long serial chain by
  running three inverters in parallel, then three rounds on two multipliers.
* **Short critical paths.** Every squarer has its own fixed input. Partial products
  are summed with balanced XOR trees. Intermediate products are handed from one
  multiplication to the next through the multipliers' input sampling, not through
  extra registers.

At the default parameters, one operation takes **2321 clock cycles**, whatever the
value of k. All 163 key bits are always processed.

## Files

| file | contents |
|---|---|
| `rtl/gf163_pkg.sv` | field width, element type, pentanomial taps, the squaring function |
| `rtl/gf_reduce.sv` | one-fold reduction of a polynomial with EXT bits above degree 162 |
| `rtl/gf_digit_mult.sv` | 163-bit × G-bit carry-less product with XOR trees |
| `rtl/lsd_multiplier.sv` | digit-serial (least significant digit first) field multiplier |
| `rtl/gf_squarer.sv` | combinational squarer |
| `rtl/itmia_inverter.sv` | Itoh-Tsujii inverter: one multiplier, two squarers |
| `rtl/point_add_dbl.sv` | one ladder step: x-only addition and doubling on three multipliers |
| `rtl/ladder_unit.sv` | key shift register, ladder registers, swap multiplexers |
| `rtl/proj_to_affine.sv` | projective-to-affine conversion |
| `rtl/ecc_point_mult.sv` | top level |
| `tb/gf_ref_pkg.sv` | independent reference arithmetic for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Field arithmetic

**Addition** is a 163-bit XOR. No module exists for it.

**Reduction (`gf_reduce`).** The identity x^163 = x^7 + x^6 + x^3 + 1 is used directly.
Each coefficient d[163+i] above degree 162 is XORed onto bits i, i+3, i+6 and i+7.
That takes one level of XORs, as long as fewer than 157 bits sit above degree 162.

**Digit-serial multiplier (`lsd_multiplier`).** B is consumed G bits at a time, least
significant digit first, over NDIG = ceil(163/G) cycles (4 for G = 41, 15 for G = 11).
Each cycle does two things in parallel:

* `D ^= A · B_digit`. The product is unreduced and m+G-1 bits wide, and comes from
  `gf_digit_mult`.
* `A = A · x^G mod P`. This is a shift followed by a `gf_reduce` with EXT = G.

After the last digit, a second `gf_reduce` (EXT = G-1) reduces D to c. That last step
is combinational, so c follows the accumulator register directly.

In `gf_digit_mult`, output bit k is the XOR of up to G terms a[k-j]·b[j]. These terms
are combined pairwise, level by level, into a tree of depth ceil(log2 G). A linear
chain would have depth G-1.

Timing of the multiplier:

* `start` loads a and b and clears D.
* `done` is a one-cycle pulse NDIG clock edges later.
* c stays valid until the next `start`.
* a and b are sampled only at `start`. The units above rely on this.

**Squarer.** Squaring is linear in GF(2^m): bit i moves to bit 2i, and the 325-bit
result is reduced. Each value that needs squaring has its own squarer, so no squarer
sits behind a multiplexer.

## Inversion (`itmia_inverter`)

The inverse is a^(2^163-2). Write β_u = a^(2^u − 1). The unit builds β_162 along the
addition chain 1, 2, 4, 5, 10, 20, 40, 80, 81, 162, using β_(u+v) = (β_u)^(2^v) · β_v.
One last squaring then gives a^-1.

| step | u | squarings v | second factor |
|---|---|---|---|
| 1 | 2 | 1 | β_1 = a |
| 2 | 4 | 2 | β_2 |
| 3 | 5 | 1 | a |
| 4 | 10 | 5 | β_5 |
| 5 | 20 | 10 | β_10 |
| 6 | 40 | 20 | β_20 |
| 7 | 80 | 40 | β_40 |
| 8 | 81 | 1 | a |
| 9 | 162 | 81 | β_81 |
| final | – | 1 | – |

The two squarers split the work so that neither needs a 3-input multiplexer:

* **Squarer 1** does the single squarings: steps 1, 3, 8 and the final one. Its input
  is always the β register, and its output goes straight into the multiplier.
* **Squarer 2** does the runs of squarings, one per clock. It starts from β and then
  iterates on its own register. An 8-bit counter counts the squarings left.

Cost:

* Each multiplication costs NDIG+2 cycles.
* The runs add 2+5+10+20+40+81 = 158 cycles.
* `done` rises 9·(NDIG+2)+159 = **312** clock edges after `start` at G = 11.
* An input of 0 gives 0.

## One ladder step (`point_add_dbl`)

This is the hardest part to follow. The ladder keeps a pair P1 = (X1:Z1) and
P2 = (X2:Z2), with P2 − P1 = P always. For each key bit:

```
k_i = 1:  P1 <- P1 + P2,  P2 <- 2·P2
k_i = 0:  P2 <- P1 + P2,  P1 <- 2·P1
```

In x-only Lopez-Dahab coordinates:

```
addition : Z+ = (X1·Z2 + X2·Z1)²         X+ = x_P·Z+ + (X1·Z2)·(X2·Z1)
doubling : X2 = X⁴ + b·Z⁴                Z2 = X²·Z²
```

The unit has three multipliers, five squarers and two registers, and works in two
rounds:

| round | multiplier 1 | multiplier 2 | multiplier 3 | then |
|---|---|---|---|---|
| 1 | X1·Z2 | X2·Z1 | b·Z⁴ | t1 ← X1·Z2 + X2·Z1, t2 ← X⁴ + b·Z⁴ |
| 2 | x_P·t1² | (X1·Z2)·(X2·Z1) | X²·Z² | outputs valid |

Where the inputs and outputs come from:

* Squarers 1–4 form Z², Z⁴, X² and X⁴ of the point being doubled.
* Squarer 5 forms t1².
* Round 2's multiplier 2 takes the two round-1 products directly as its operands.
  This works because a multiplier samples its inputs at `start`, and at that moment
  its accumulator still holds the round-1 result. So only t1 and t2 are registers.
* Outputs: X+ = m1 ⊕ m2, Z+ = t1², X_dbl = t2, Z_dbl = m3.

The addition is symmetric in P1 and P2, so it never depends on the key bit. While
`init` is high, the four outputs show the ladder's starting values instead:

* sum: (x_P : 1)
* double: (1 : 0)

A step takes 2·NDIG+2 clock edges from `start` to `done`: 10 at G = 41.

## Key handling (`ladder_unit`)

Four registers hold X1, Z1, X2 and Z2. The key sits in a shift register, and its top
bit k_m is the current bit. k_m controls two things:

* which point is doubled: (X2, Z2) if k_m = 1, else (X1, Z1);
* four 2-to-1 multiplexers that route the sum and the double back into the registers.

When `start` is sampled, the registers load the `init` values through those same
multiplexers, with k_m forced to 0. This gives P1 = O = (1:0) and P2 = P = (x_P:1).
The first 1 bit of k then produces (P, 2P), which is the usual starting point of
the ladder.

A zero bit before the first 1 keeps (O, P) unchanged. The x-only formulas handle the
point at infinity correctly here. So k needs no normalisation, and the run time does
not depend on the number of leading zeros.

Each bit costs 2·NDIG+4 = 12 cycles, and the whole ladder takes 163·12 + 1 = 1957 edges.

At the end:

* X1/Z1 is x(kP).
* X2/Z2 is x((k+1)P).

## Conversion to affine (`proj_to_affine`)

```
x3 = X1/Z1
y3 = (x_P + X1/Z1)·[(X1/Z1 + x_P)(X2/Z2 + x_P) + x_P² + y_P]·x_P⁻¹ + y_P
```

Three inverters (G = 11) compute Z1⁻¹, Z2⁻¹ and x_P⁻¹ at the same time. Two
multipliers then run three rounds:

| round | multiplier a | multiplier b |
|---|---|---|
| A | X1·Z1⁻¹ | X2·Z2⁻¹ |
| B | (a+x_P)·(b+x_P) | (a+x_P)·x_P⁻¹ |
| C | (a + x_P² + y_P)·b | X1·Z1⁻¹ again |

After round C, y3 = a ⊕ y_P and x3 = b. Recomputing X1·Z1⁻¹ in round C, on a
multiplier that would otherwise sit idle, saves the register that would otherwise
hold x3. The unit needs five XOR adders and one squarer, for x_P². It takes 361 edges
in all.

## Top level (`ecc_point_mult`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, reset | in | 1 | clock; synchronous active-high reset |
| start | in | 1 | one-cycle pulse; samples k, xp, yp, b |
| k | in | KBITS | scalar |
| xp, yp | in | 163 | base point, affine; x_P ≠ 0 |
| b | in | 163 | curve coefficient b (a is not needed) |
| x3, y3 | out | 163 | kP, valid from `done` until the next `start` |
| done | out | 1 | one-cycle pulse |
| busy | out | 1 | high from `start` to `done` |

Parameters: `G1` = 41 (ladder digit), `G2` = 11 (conversion digit), `KBITS` = 163.

Latency:

```
KBITS·(2·N1+4) + 9·(N2+2)+159 + 3·(N2+1) + 5
```

Here N1 = ceil(163/G1) and N2 = ceil(163/G2). At the defaults this is
1956 + 312 + 48 + 5 = 2321 cycles.

Limits:

* The result is meaningless if kP or (k+1)P is the point at infinity, because Z1 or Z2
  is then 0. Keys 0 < k < n − 1, with n the group order, avoid this.
* The result is also meaningless if x_P = 0.

## How far it can be trusted, and where it departs from the original architecture

Verification covers each module on its own and the whole design at its default size:

* Every module has a self-checking testbench. The expected values come from a
  separate bit-serial reference model in `tb/gf_ref_pkg.sv`: shift-and-add
  multiplication, Fermat inversion, affine double-and-add on the curve.
* Every testbench also checks the latency.
* The end-to-end test runs at the default parameters on three base points: the NIST
  B-163 generator, a derived B-163 point and the K-163 generator. It uses keys 1, 2, 3,
  random full-length keys and keys with 80 leading zeros.
* The end-to-end test also counts that each mechanism was exercised: the initial load,
  steps with key bit 1 and 0, bit changes, leading-zero steps, single squarings and
  squaring runs in the inverters, and the round-C recomputation.

Known differences and readings:

* **Cycle count.** The original design reports 2993 cycles for one operation. Its
  per-part formulas, 326·⌈m/G1⌉ + 1304 for the ladder and 15·⌈m/G2⌉ + 214 for the
  conversion, add up to 3047 instead. This RTL takes 2321. Its ladder needs 2·NDIG+4
  cycles per bit, against 2·NDIG+8 in the original. Nothing describes what the
  original's extra cycles do.
* **Round assignment in the ladder step.** One description puts b·Z⁴ in the second
  round. This RTL computes it in the first round, so that t2 = X⁴ + b·Z⁴ can be
  registered after round 1, as the same description also requires.
* **Ladder registers.** The original key-handling block is drawn with six registers
  in front of the step unit. This RTL uses four, plus a multiplexer on the doubling
  input. The behaviour is the same.
* **Inverter wiring.** The use of the two squarers follows the original. The control
  (FSM, counter use, multiplexer selects) is this design's own.
* **Conversion rounds.** The split of the multiplications into rounds B and C is this
  design's reading of "five multiplications in three rounds on two multipliers, the
  first one repeated".
* **Not specified in the original, chosen here.** Start/done handshakes, synchronous
  reset, input capture registers in the top level, and the squarer's internal form.
* **Not modelled.** Timing and area on an FPGA. The original was built for a Xilinx
  Virtex-4 device at 251 MHz; this RTL is technology independent and has not been
  placed or timed.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and then finishes. To run the
full end-to-end test at the default parameters with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gf163_pkg.sv tb/gf_ref_pkg.sv tb/tb_ecc_point_mult.sv \
    --top-module tb_ecc_point_mult -o sim
./obj_dir/sim
```

The build takes about a minute and the run a few seconds. Any other `tb/tb_<module>.sv` runs the same way
with its own `--top-module`.

The simulator has only two states, so every register that is read is reset.

Notes for changing the design:

* The digit sizes are free parameters. The only limit is G ≤ 156, because the
  reduction uses a single fold.
* The testbenches' latency checks are written for the default digit sizes.
* `KBITS` sets the key length the ladder scans.
