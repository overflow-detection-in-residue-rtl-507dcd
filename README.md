# Overflow detection for RNS addition, moduli set {2^n-1, 2^n, 2^n+1}

A residue number system (RNS) carries an integer as independent residues,
here modulo m3 = 2^n-1, m2 = 2^n and m1 = 2^n+1. Addition is carry-free across
channels, but that is also its weakness. When X + Y reaches the dynamic range
M = m1·m2·m3 = 2^3n − 2^n, the channel adders wrap silently and nothing in the
residues of the result shows it. This RTL detects that overflow for unsigned
operands without converting anything back to binary. It maps each number to a
*group*, adds the groups, and compares the sum with a constant. Every operation
is at most 2n bits wide, and most are n or n+1 bits wide.

The design is purely combinational. It has no clock, reset or handshake.

## The idea: groups of 2^n+1

Cut the range 0 … M−1 into 2^2n − 2^n groups of 2^n+1 consecutive numbers. The
group of X is

    G(X) = floor(X / (2^n+1))

It can be computed from residue differences alone. Write
X = G·(2^n+1) + x1, where x1 is the residue modulo 2^n+1. Then:

* modulo 2^n: x2 = x1 + G, so **B' = |x2 − x1| mod 2^n = G mod 2^n**;
* modulo 2^n−1: x3 = x1 + 2G, so **A' = |x3 − x1| mod 2^n−1 = 2G mod 2^n−1**.

Rotating an n-bit word right by one bit divides it by 2 modulo 2^n−1. So
**A'' = rotr(A') = G mod 2^n−1**. G is then rebuilt from its residues modulo 2^n
and 2^n−1. Because 2^n ≡ 1 (mod 2^n−1):

    G = B' + 2^n · |A'' − B'| mod 2^n−1  =  { δ', B' }     (δ' = |A'' − B'| mod 2^n−1)

The multiplication by 2^n and the addition of B' are only a concatenation.

## The overflow rule

Let I = 2^2n − 2^n − 1, one less than the number of groups, so M = (I+1)(2^n+1).
Each operand sits 0 … 2^n above the start of its group. Hence
X + Y = (G(X)+G(Y))·(2^n+1) + r with 0 ≤ r ≤ 2^(n+1). This gives three cases:

| G(X) + G(Y) | X + Y ≥ M ? | reason |
|---|---|---|
| > I | always | X + Y ≥ (I+1)(2^n+1) = M |
| < I | never | X + Y ≤ (I−1)(2^n+1) + 2^(n+1) = M − 2 |
| = I | iff r ≥ 2^n+1 | and then the wrapped sum Z = r − (2^n+1) ≤ 2^n − 1 lies in group 0 |

In the equal case, the sum Z = |X+Y|_M that the RNS adder really produces
settles it. If no overflow occurred, Z = X + Y is in group I, which is non-zero.
If it wrapped, Z is in group 0. So the rule is:

    ov = (S > I)  or  (S == I and G(Z) == 0),      S = G(X) + G(Y)

## Datapath

```
 X ──► grouping_unit ──G(X)──┐
                              ├─► group_adder ──S──┬─► indicator_comparator ──sign──┐
 Y ──► grouping_unit ──G(Y)──┘                     └─► eq_comparator (S == I) ──sel─┤
                                                                                    ├─► MUX ─► ov
 Z ──► grouping_unit ──G(Z)──► eq_comparator (G == 0) ─────────────────────────────┘
```

The MUX passes `~sign` (that is, S > I, because it is only read when S ≠ I) when
`sel` = 0. When `sel` = 1 it passes the G(Z) = 0 test. `rns_ovf_top` adds the
channel-wise RNS adder that produces Z from X and Y, so the top takes two
operands and returns their sum together with `ov`.

### Grouping unit (`grouping_unit`)

It uses three subtractors, each a parallel prefix adder computing a + ~b + 1:

1. A = x3 − x1, as n+1 bits in two's complement (range −2^n … 2^n−2).
   `mod_m3_corrector` then reduces it to A'.
2. B = x2 − x1, as n bits. Its low n bits are already B'.
3. A'' − B', as n+1 bits (range −(2^n−1) … 2^n−2). A second
   `mod_m3_corrector` then reduces it to δ'.

The output is `g = {δ', B'}`, 2n bits wide.

### Reduction modulo 2^n−1 (`mod_m3_corrector`)

A non-negative difference is already a residue. A negative one becomes a residue
when 2^n−1 is added. So the sign bit is ANDed into every bit of an offset, and
an (n+1)-bit adder forms d + offset, from which the low n bits are kept. One
input escapes this rule: d = −2^n (bit pattern 1 0…0). It would give the
all-ones word, which is the second code for zero modulo 2^n−1, rather than the
residue 2^n−2. A pattern detector (an AND tree over d[n] and the inverted lower
bits) drives a 2-input MUX that substitutes the constant 1…1 0.

That input happens only for x3 = 0 with x1 = 2^n, so only the A' unit needs the
MUX (`EXCEPTION_MUX = 1`). The δ' unit never sees −2^n and omits it
(`EXCEPTION_MUX = 0`).

### Group adder (`group_adder`)

This is a 2n-bit carry-select adder made of three n-bit PPAs. The low halves
are added once. The high halves are added twice, with carry-in 0 and with
carry-in 1, and the low carry-out picks which high result to use. The result
is 2n+1 bits.

### Comparing with the indicator without subtracting (`indicator_comparator`)

In 2n+2 bits, −I is `1 1 | 0…0 1 | 0…0 1`: two ones, then two n-bit blocks that
each hold the value 1. When −I is added to `0 S`, only the carries matter:

* The right block S[n−1:0] + 1 carries out when **α = &S[n−1:0]**.
* The left block S[2n−1:n] + 1 + α carries out when **β_n = &S[2n−1:n]** (for
  α = 0), or when **β_(n−1) = &S[2n−1:n+1]** (for α = 1).
* The sign bit of the sum is then **NOR(S[2n], carry)**.

β_n is formed as β_(n−1) AND S[n]. As a result, the comparator is one n-input
AND tree, one (n−1)-input AND tree, a 1-bit MUX and a NOR. `sign` = 1 means
S < I. This unit does not detect equality. A separate `eq_comparator` does
that.

### Gates and adders

* `and_tree`: a wide AND built only from 2-input ANDs in a balanced tree. The
  design is costed on the assumption that no gate has a fan-in above two. When
  a tree level has an odd count, its last node passes up unchanged.
* `eq_comparator`: a bitwise XNOR followed by an `and_tree`. It is used for
  S == I (2n+1 bits) and for G(Z) == 0 (2n bits, with `b` tied to 0).
* `ppa_adder`: a Kogge-Stone adder. The carry-in enters the prefix tree as an
  extra generate bit below bit 0. Every adder and subtractor above is one of
  these, except the channel adders of `rns_adder`.
* `rns_adder`: channel-wise modular addition. It adds, then subtracts the
  modulus once if the sum reached it.

## Interface

All modules take the width `n` as parameter `N`. The default is 16
(`rns_ovf_pkg::N_DEFAULT`), which gives M = 2^48 − 2^16. Any N ≥ 2 works.

| port | width | meaning |
|---|---|---|
| `x3`, `y3`, `z3` | N | residue modulo 2^n−1, must be 0 … 2^n−2 |
| `x2`, `y2`, `z2` | N | residue modulo 2^n |
| `x1`, `y1`, `z1` | N+1 | residue modulo 2^n+1, must be 0 … 2^n |
| `ov` | 1 | 1 when X + Y ≥ M (X + Y is not representable) |

In `rns_ovf_top`, `x*` and `y*` are inputs and `z*` and `ov` are outputs. In
`ovf_detector`, Z is an input as well, so the detector can sit beside an
existing RNS adder. Inputs outside the residue ranges (for example x3 = 2^n−1,
the redundant zero) are not supported. The method assumes canonical residues,
and the RTL does not check them.

## Design choices not fixed by the method

* **n = 16 by default.** The method is stated for general n. 16 makes the
  comparators' n-input ANDs 16-input trees.
* **Kogge-Stone** is used for the parallel prefix adders. The method assumes
  PPAs but does not prescribe a prefix network.
* **The δ' subtractor** (A'' − B') is an explicit (n+1)-bit PPA subtractor
  feeding the reduction unit. The method describes only the reduction.
* **The special input of the A' reduction** is taken as 1 0…0, with the
  substituted result 1…1 0. This follows from the arithmetic above and is what
  the testbenches check.
* **The offset MSB** is 0 in the A' unit and the sign bit in the δ' unit. It
  never reaches the n-bit output, so the choice has no functional effect.
* **The channel adder** (`rns_adder`) is the simplest correct form. It is not
  an optimised modulo-(2^n±1) adder.
* **Timing.** The design is fully combinational. The method's cost model is in
  unit gates (2-input AND/OR/NOR/NAND = 1 unit, XOR/XNOR = 2 units of delay and
  3 of area). For that model it estimates area ≈ 72n + 13.5·n·log2(n+1) + 10
  and delay ≈ 12·log2(n+1) + 21. Those figures are not reproduced here. Coarse
  word-level synthesis of `rns_ovf_top` at n = 16 gives about 2.5 k cells and no
  flip-flops.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench compares
the design against plain integer arithmetic in `tb/rns_ref_pkg.sv`: forward
conversion with `%`, the group as an integer division, and overflow as
X + Y ≥ M.

| testbench | coverage |
|---|---|
| `rns_ovf_top_tb` | n = 16 (defaults): ~120 k pairs, covering random pairs, pairs straddling M, pairs with G(X)+G(Y) = I, and operands that hit the special A' input. It counts each mechanism (above / below / equal-overflow / equal-no-overflow, A' special case, α = 1, both carry-select paths) and fails if one never occurred |
| `ovf_detector_tb` | every pair at n = 3; random and directed pairs at n = 4 and 16 |
| `grouping_unit_tb` | every X at n = 3 and 4; random and special cases at n = 16 |
| `mod_m3_corrector_tb` | both forms, full input range at n = 4, random at n = 16 |
| `indicator_comparator_tb` | every S at n = 2, 3, 4; random and near-I values at n = 16 |
| `group_adder_tb`, `rns_adder_tb`, `eq_comparator_tb`, `and_tree_tb`, `ppa_adder_tb` | exhaustive at small sizes, random at default sizes |

Each testbench ends with a line `TB_RESULT checks=<n> failures=<n>` and has a
time-out watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/rns_ovf_pkg.sv tb/rns_ref_pkg.sv tb/rns_ovf_top_tb.sv \
    --top-module rns_ovf_top_tb
./obj_dir/Vrns_ovf_top_tb
```

To run another testbench, replace the file and the top name with
`<module>_tb`. To change n, override `N` on the instance (or change
`N_DEFAULT`). The reference package uses 64-bit integers, which limits the
testbenches to n ≤ 20.

## Files

`rtl/`: `rns_ovf_pkg` (default width), `rns_ovf_top`, `ovf_detector`,
`grouping_unit`, `mod_m3_corrector`, `group_adder`, `indicator_comparator`,
`eq_comparator`, `and_tree`, `ppa_adder`, `rns_adder`. `tb/`: one `<module>_tb`
per module and `rns_ref_pkg`.
