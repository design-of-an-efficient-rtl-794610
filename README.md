# Residue-to-binary converter for the moduli set {2^2p, 2^4p+1, 2^2p+1, 2^p+1, 2^p-1}

A residue number system (RNS) stores a number X as its remainders modulo several
coprime moduli. Arithmetic on the remainders is short and carry-free, but getting
X back (reverse conversion) is normally the expensive step. This converter
handles the five-moduli set

| channel | modulus    | residue width | residue range   |
|---------|------------|---------------|-----------------|
| x1      | 2^{2p}     | 2p            | 0 .. 2^{2p}-1   |
| x2      | 2^{4p}+1   | 4p+1          | 0 .. 2^{4p}     |
| x3      | 2^{2p}+1   | 2p+1          | 0 .. 2^{2p}     |
| x4      | 2^p+1      | p+1           | 0 .. 2^p        |
| x5      | 2^p-1      | p             | 0 .. 2^p-2      |

and returns X as a 10p-bit binary number, 0 <= X < 2^{2p}(2^{8p}-1).

The set is chosen so that the four odd moduli multiply to a single Mersenne-type
number, (2^{4p}+1)(2^{2p}+1)(2^p+1)(2^p-1) = 2^{8p}-1, and so that every
multiplicative inverse the conversion needs is a power of two. Modulo 2^{8p}-1 a
multiplication by 2^k is a k-place rotation and a negation is a bitwise
inversion. The whole conversion then comes down to rotated and inverted copies
of the residues, added modulo 2^{8p}-1 by a carry-save tree and one
carry-propagate adder, all with end-around carry. There are no multipliers, ROMs
or lookup tables.

The word-length parameter `P` defaults to 3. That gives moduli 64, 4097, 65, 9
and 7, a 24-bit internal datapath and a 30-bit result. Any `P >= 2` works. It has
been simulated for p = 2, 3, 4, 5, 6, 7 and 10, which give dynamic ranges of 20,
30, 40, 50, 60, 70 and 100 bits.

## The conversion formula

With m1 = 2^{2p} taken as the first modulus, the New Chinese Remainder Theorem I
(CRT-I) gives

    X = x1 + 2^{2p} * M
    M = | k1 (x2 - x1) + k2 m2 (x3 - x2) + k3 m2 m3 (x4 - x3) + k4 m2 m3 m4 (x5 - x4) |  mod 2^{8p}-1

The inverses are:

    k1 = |m1^-1|          mod m2 m3 m4 m5 = 2^{8p}-1   ->  2^{6p}
    k2 = |(m1 m2)^-1|     mod m3 m4 m5    = 2^{4p}-1   ->  2^{2p-1}
    k3 = |(m1 m2 m3)^-1|  mod m4 m5       = 2^{2p}-1   ->  2^{2p-2}
    k4 = |(m1..m4)^-1|    mod m5          = 2^p-1      ->  2^{2p-3}

Each one follows from 2^{4p}+1 = 2 (mod 2^{4p}-1) and 2^{2p} = 1 (mod 2^{2p}-1),
and similar identities. Because X < 2^{2p}(2^{8p}-1), M fits in 8p bits and X is
just the concatenation `{M, x1}`.

## Operand preparation: the seven vectors H1..H7

This is the least obvious part of the design (`rtl/operand_prep.sv`). Multiply
out the CRT-I sum and group it by residue. Each coefficient modulo 2^{8p}-1 is
then a short signed sum of powers of two, and its copies of the residue never
overlap. So each residue gives one 8p-bit vector: non-inverted copies for the
positive powers and inverted copies for the negative powers, the whole word
rotated into place.

| vector | term                          | bit pattern (MSB..LSB), then rotated left by |
|--------|-------------------------------|----------------------------------------------|
| H1     | -k1 x1                        | `{~x1, 6p ones}`, no rotation                |
| H2     | k1 x2                         | x2 (4p+1 bits, zero-extended), by 6p         |
| H3     | -k2 m2 x2                     | `{~x2', ~x2'}`, by 2p-1                      |
| H4     | (k2 m2 - k3 m2 m3) x3         | `{~y3, x3, ~y3, x3}`, by 2p-2                |
| H5     | (k3 m2 m3 - k4 m2 m3 m4) x4   | `{x4, ~y4}` four times, by p-3 (mod 8p)      |
| H6     | k4 m2 m3 m4 x5                | x5 eight times, by 2p-3                      |
| H7     | constant                      | -(all-ones fields of H4 and H5) mod 2^{8p}-1 |

Some points need explaining:

* **Inversion is negation plus a constant.** Let a field hold `~v` instead of
  `-v`. Then the field holds `-v` plus the all-ones value of that field. H1 and
  H3 are arranged so that this surplus is zero modulo 2^{8p}-1: H1's surplus
  ones are part of the term itself, and H3's surplus is a multiple of 2^{8p}-1.
  The surplus of H4 and H5 is a fixed number. Its negative is computed at
  elaboration time (`calc_k7`) and added as the constant vector H7.
* **H3 only needs x2 modulo 2^{4p}-1.** k2 m2 (2^{4p}-1) is a multiple of 2^{8p}-1.
  So the value x2 = 2^{4p} can be replaced by 1: `x2' = x2[4p-1:0] | x2[4p]`.
* **Largest residue of a 2^k+1 channel.** x3 = 2^{2p} and x4 = 2^p have all their
  low bits zero. For those values the correct H4 or H5 is the all-zero word.
  `y3` and `y4` are the low bits ORed with the top bit, so the inverted fields
  `~y3` and `~y4` become zero exactly then. The non-inverted fields are already
  zero.
* **H5 for p = 2.** The rotation p-3 is negative for p = 2. It is reduced modulo
  8p (`rc_pkg::rot_amount`), so the same formula covers p = 2.

The logic is 9p inverters and a few OR gates. Everything else is wiring and
constants.

## Adder tree and final addition

```
 H1 H2 H3        H5 H6 H7
   CSA1            CSA2
  s1  c1  H4      s2   c2
    CSA3           |    |
   s3  c3 ---------+    |
    CSA4  (s3,c3,s2)    |
   s4  c4 --------------+
    CSA5  (s4,c4,c2)
   s5  c5
    CPA1 (end-around carry)  ->  M  ->  X = {M, x1}
```

* `csa_eac` is one full adder per bit. The carry vector is shifted left by one,
  and the carry out of bit 8p-1 goes into bit 0, because 2^{8p} = 1 modulo
  2^{8p}-1. Each CSA level costs one full-adder delay, whatever the width.
* `cpa_eac` adds its two inputs and adds the carry out back in at bit 0. A
  ripple-carry adder with its carry out wired to its carry in gives the same
  result with one adder's area and about twice its delay. That form is a
  combinational loop, so it is written here as two additions and left to
  synthesis.
* **Two codes for zero.** An end-around-carry adder can return all ones, which
  is also 0 modulo 2^{8p}-1. That happens whenever M = 0, i.e. X < 2^{2p}. With
  all ones, X would fall outside the dynamic range, so `reverse_converter` maps
  an all-ones M to zero before the concatenation. This costs an 8p-input AND and
  one row of AND gates.

## Interface and timing

`reverse_converter #(parameter int unsigned P = 3)`:

| port | dir | width  | meaning                 |
|------|-----|--------|-------------------------|
| x1   | in  | 2P     | residue mod 2^{2p}      |
| x2   | in  | 4P+1   | residue mod 2^{4p}+1    |
| x3   | in  | 2P+1   | residue mod 2^{2p}+1    |
| x4   | in  | P+1    | residue mod 2^p+1       |
| x5   | in  | P      | residue mod 2^p-1       |
| x    | out | 10P    | X                       |

The converter is purely combinational, with no clock and no reset. The critical
path is one inverter, four CSA levels (full adders) on the H1-H3 path, the
end-around-carry adder and the zero check. Add registers around it if it is to
sit in a pipeline.

The inputs must be valid residues. For example, x2 must not exceed 2^{4p}, and
when x2 = 2^{4p} its low bits must be zero. x5 = 2^p-1 is accepted as a second
code for zero. Invalid inputs are not detected.

## Files

| file                     | content |
|--------------------------|---------|
| `rtl/rc_pkg.sv`          | default `P`, width helpers, rotation-amount reduction |
| `rtl/operand_prep.sv`    | H1..H7 from the residues |
| `rtl/csa_eac.sv`         | carry-save adder modulo 2^N-1 |
| `rtl/cpa_eac.sv`         | carry-propagate adder modulo 2^N-1 |
| `rtl/reverse_converter.sv` | top: operand preparation, CSA tree, CPA, zero correction |
| `tb/tb_csa_eac.sv`, `tb/tb_cpa_eac.sv` | adder tests against 64-bit arithmetic |
| `tb/tb_operand_prep.sv`  | checks sum(H) mod 2^{8p}-1 = X >> 2p |
| `tb/tb_reverse_converter.sv` | end-to-end test at the default P = 3 |
| `tb/tb_rc_sweep.sv`, `tb/rc_sweep_lane.sv` | end-to-end tests at p = 2, 3, 4, 5, 6, 7, 10, exhaustive at p = 2 |

## Verification

Every testbench prints `TB_RESULT checks=N failures=F` and stops by itself. Each
has a watchdog that counts a failure if the test hangs.

* `tb_reverse_converter` tests at the default P = 3. It converts every X below
  2^{2p}, the last 64 numbers of the range, 2000 numbers of the form d*k-1, and
  100,000 random numbers. The d*k-1 numbers, with d = m2, m3, m4 and m2 m3 m4,
  give the largest residues 2^k in the 2^k+1 channels, one at a time and
  together. The test fails if any of these never happened: a top residue bit set
  in each 2^k+1 channel, x5 given as 2^p-1, an end-around carry in the final
  adder, the all-ones-to-zero correction. It reads the last two through
  hierarchical references into the design.
* `tb_rc_sweep` runs 2002 conversions at each of p = 2, 3, 4, 5, 6, 7 and 10. It
  works out the reference residues with 128-bit arithmetic. It also converts
  every number of the p = 2 range, all 1,048,560 of them, which takes about a
  second.
* The unit tests check the adders against integer arithmetic, and the
  operand-preparation vectors against the CRT-I relation.

To run one with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/rc_pkg.sv tb/tb_reverse_converter.sv --top-module tb_reverse_converter
./obj_dir/Vtb_reverse_converter
```

To run another test, replace the testbench file and the top module name. Every
test above passes. Each one was also run against a deliberately broken copy of
its module, and each failed there:

| broken copy | failed checks |
|-------------|---------------|
| CSA with the wrapped carry dropped | 2455 |
| CPA with no end-around carry | 2476 |
| `y3` without the top bit | 268 |
| no zero correction | 64 |

## What is taken from the published converter and what is not

The following come from the published converter description:

* the moduli set and the CRT-I formulation with m1 = 2^{2p}
* the power-of-two inverses
* the block structure: one operand preparation unit producing seven 8p-bit
  vectors, five 8p-bit CSAs with end-around carry, one 8p-bit end-around-carry
  CPA, and X formed from x1 and the CPA output with no further addition
* the CSA wiring of its block diagram
* the reference size p = 3

The following are this design's own:

* **The exact definition of H1..H7.** The description names seven vectors but
  does not spell them out. The split above follows the CRT-I terms. Its 9p
  inverters are close to the 9p+3 NOT gates the published gate count gives.
* **The choice of CSA2 output.** Which CSA2 output goes to CSA4 and which to
  CSA5 is not stated. Here CSA2's sum goes to CSA4 and its carry to CSA5. Either
  choice is correct.
* **The all-ones-to-zero correction** on M.
* **Top residue bits.** The handling of the top bits of the 2^k+1 residues
  (the `x2'`, `y3` and `y4` gating).
* **Combinational timing.** No registers are used.
* **Generic CSAs.** The published gate count lists different numbers of full
  adders and gates per CSA, because constant operand bits simplify some
  positions. Here every CSA is the same generic module, and synthesis removes
  the constant parts.

The published area and delay comparisons (65 nm synthesis; delay
t_NOT + (16p+4) t_FA) are not reproduced. Only the function and the structure
are.
