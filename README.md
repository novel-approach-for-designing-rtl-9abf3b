# Residue-to-binary converter for {2^n, 2^(2n+1)-1, 2^n+1, 2^n-1} with HMPE and HRPX adders

A residue number system (RNS) stores an integer X as its remainders with
respect to a set of pairwise coprime moduli. Addition and multiplication then
run on each small residue independently, with no carries between them. The
expensive part is getting back to binary. This RTL is a combinational
reverse converter for the four-moduli set

| residue | modulus        | width  | n = 4     |
|---------|----------------|--------|-----------|
| `x1`    | 2^n            | n      | 16, 4 bit |
| `x2`    | 2^(2n+1) - 1   | 2n + 1 | 511, 9 bit|
| `x3`    | 2^n + 1        | n + 1  | 17, 5 bit |
| `x4`    | 2^n - 1        | n      | 15, 4 bit |

The dynamic range is M = 2^n (2^(2n+1)-1)(2^n+1)(2^n-1) < 2^(5n+1), so the
output `x` has 5n+1 bits. With the default n = 4, M = 2,084,880 and `x` has
21 bits. For example, the residues (11, 12, 9, 10) convert to 589195.

All moduli are 2^k or 2^k ± 1, so every constant multiplication in the
conversion is a bit rotation and every negation is a bitwise complement. The
cost is therefore almost entirely in the adders. The design uses two adder
types:

* **HMPE** (hybrid modular parallel-prefix excess-one adder): a modulo
  2^k−1 adder built as a prefix adder followed by a cheap ripple incrementer.
* **HRPX** (hybrid ripple / parallel-prefix subtractor): the wide final
  subtractor. Only its low half is a prefix adder, because the high half's
  second operand is the constant all-ones.

## Conversion algorithm

The conversion is mixed-radix, and it takes the modulus 2^n first:

    X = x1 + 2^n * Y,      0 <= Y < (2^(2n+1)-1)(2^(2n)-1) < 2^(4n+1)

The low n bits of X are `x1` unchanged. The remaining 4n+1 bits are Y, which
is rebuilt from two digits:

1. **kr = (x4 − x3) mod (2^n−1)**. This uses an n-bit HMPE. x3 can be 2^n,
   but then its low n bits are zero, so `x3 mod (2^n−1)` is the low n bits
   with bit n ORed into bit 0.
2. **Z = Y mod (2^(2n)−1) = (k·(2^n+1) + (x3 − x1)·2^n) mod (2^(2n)−1)**,
   with k = kr·2^(n−1) mod (2^n−1), which is kr rotated right by one. The
   three operands are:
   * `{k, k}`;
   * x3 rotated left by n;
   * `{~x1, 1…1}`.

   A 2n-bit end-around-carry CSA reduces them to two, and a 2n-bit HMPE adds
   those. The first two operands are the classical {2^n−1, 2^n+1} combination
   of x3 and x4. Multiplying by 2^n removes x1 (2^n is its own inverse modulo
   2^(2n)−1), and that multiplication leaves `{k,k}` unchanged.
3. **T = 2·(Z − (x2 − x1)·2^(n+1)) mod (2^(2n+1)−1)**. Here 2^(n+1) is the
   inverse of 2^n, and 2 is −(2^(2n)−1)^(−1), both modulo 2^(2n+1)−1. The
   three operands are:
   * `{Z, 0}`;
   * `~x2` rotated left by n+2;
   * `x1` rotated left by n+2.

   A (2n+1)-bit CSA and a (2n+1)-bit HMPE reduce them.
4. **Y = Z + (2^(2n)−1)·T = {T, Z} − T**. The (4n+1)-bit minuend is T
   written above Z, and the subtrahend is the (2n+1)-bit T. This is the HRPX.
5. **x = {Y, x1}**.

The critical path is: n-bit HMPE → CSA → 2n-bit HMPE → CSA → (2n+1)-bit
HMPE → HRPX.

## HMPE: modulo 2^k−1 addition with one zero

An end-around-carry adder computes (a + b) mod (2^k−1) by adding the carry
out back in as +1. That still leaves two codes for zero: 0 and all ones. The
HMPE takes two signals from the prefix network over the whole word:

* G[k−1:0], the carry out;
* P[k−1:0], "every bit propagates", which means the plain sum is all ones.

It then adds `G | P` to the plain sum:

    s = a + b + (G | P)   mod 2^k

* **If a+b ≥ 2^k**: G is set, and the +1 is the end-around carry.
* **If a+b = 2^k−1**: P is set, and the +1 turns the all-ones sum into 0.
* **Otherwise**: the sum is already correct.

The result is always in 0 … 2^k−2. The increment is done by the *modified
excess-one unit* (`excess_one`), a ripple chain of AND gates with one XOR per
bit. No second prefix pass recomputes carries with the end-around carry
folded in. Compared with a full modulo-(2^k−1) prefix adder, this saves the
second prefix tree. In exchange, the AND ripple adds delay.

Both operands all ones is the one input pair that breaks this: the result is
then all ones. An assertion in `hmpe` flags it. In the converter it cannot
happen, provided every residue is reduced into its range (see below).

## HRPX: the wide subtraction

In Y = P − T, P has 4n+1 bits and T only 2n+1 bits. Written as P + ~T + 1
with ~T widened to 4n+1 bits, the top 2n bits of the second operand are
always ones. The HRPX therefore has two parts:

* **Bits 0 … 2n**: a normal (2n+1)-bit Brent-Kung prefix adder. Its +1 is a
  carry-in, folded into the bit-0 generate as `g0 | p0`.
* **Bits 2n+1 … 4n**: full adders with one input tied to 1. Such an adder
  reduces to `sum = XNOR(p, c)` and `carry = p | c`, so this part is one
  XNOR per bit on an OR chain. The OR chain only has to carry a borrow
  through runs of zeros in P.

In the converter, P ≥ T always holds, so the final carry out is not used.

## Prefix network

`prefix_bk` is a Brent-Kung network of any width. An up-sweep combines
blocks of 2, 4, 8 … bits into the top bit of each block. A down-sweep then
fills in the bits between. It has about 2·log2(W) levels and fewer than 2W
operator nodes, and it serves the n-, 2n- and (2n+1)-bit adders.

## Interface and timing

```
module rns_reverse_converter #(parameter int unsigned N = 4) (
  input  logic [N-1:0] x1,   // X mod 2^n
  input  logic [2*N:0] x2,   // X mod 2^(2n+1)-1, at most 2^(2n+1)-2
  input  logic [N:0]   x3,   // X mod 2^n+1,      at most 2^n
  input  logic [N-1:0] x4,   // X mod 2^n-1,      at most 2^n-2
  output logic [5*N:0] x);   // X
```

The converter is purely combinational, with no clock or reset. To pipeline
it, register the stage boundaries listed in the algorithm above. Residues
must already be reduced:

* x2 = 2^(2n+1)−1 and x4 = 2^n−1 are the second codes for zero and are
  rejected;
* x3 ≤ 2^n.

Simulation assertions in the top module check these ranges. Any n ≥ 2 works.
The default is n = 4. Widths follow from n (`rc_pkg::result_width`,
`rc_pkg::hrpx_width`).

## Modules

| file | role |
|------|------|
| `rc_pkg.sv` | default word length, width helpers |
| `rns_reverse_converter.sv` | top: the datapath above |
| `opu1.sv` | operands of the n-bit HMPE, then the three 2n-bit operands of Z |
| `opu2.sv` | the three (2n+1)-bit operands of T |
| `opu3.sv` | HRPX operands `{T,Z}` and `~T` |
| `hmpe.sv` | modulo 2^W−1 adder: generate/propagate cells, `prefix_bk`, `excess_one` |
| `excess_one.sv` | conditional +1 when G or P is set: AND ripple, XOR per bit |
| `prefix_bk.sv` | Brent-Kung group generate / propagate |
| `csa_eac.sv` | 3:2 carry-save adder with end-around carry (modulo 2^W−1) |
| `hrpx.sv` | (4n+1)-bit subtractor: prefix low part, XNOR/OR high part |

The operand preparation units contain only wiring (rotations) and inverters.
They are kept as separate modules so that every arithmetic identity has one
place where it is stated and tested.

## Where this departs from the original description

The block structure (operand preparation units, HMPE and CSA stages, a final
HRPX, output `{S, x1}`) and the insides of the HMPE, excess-one unit and HRPX
follow the published design. The following points are this design's own:

* **Moduli and equations.** The moduli set was identified from the published
  test vectors. The equations in steps 1–5 were derived for this RTL. They
  reproduce all three published results (520, 589195 and 1961740 at n = 4).
* **Stage order and CSA count.** The published block diagram draws the two
  first HMPEs side by side and two CSAs before the last HMPE. Here the n-bit
  HMPE feeds the 2n-bit stage, as in the published synthesized netlist, and
  each of the two later stages needs only one CSA, because it has three
  operands.
* **Width of the third HMPE.** The last HMPE and its CSA are 2n+1 bits wide,
  since T is a residue modulo 2^(2n+1)−1. The diagram labels that stage 2n
  bits.
* **No separate excess-one cell after the HRPX.** The published netlist shows
  a separate excess-one cell after the subtractor and a separate inverter.
  Here the +1 of `P + ~T + 1` is the HRPX carry-in and the inversion is in
  `opu3`. No further correction is needed.
* **HRPX low/high split and gate type.** The split is 2n+1 prefix bits and
  2n ripple bits. The upper part uses XNOR, which is what the arithmetic
  requires for a constant-ones operand.
* **Prefix network type.** Brent-Kung was chosen for every adder, following
  the drawn prefix network. Any prefix network would do.
* **Not reproduced.** The published area and delay figures (124 LUTs and
  10.98 ns on a Zynq FPGA, against 163 LUTs and 11.17 ns for a converter
  built from end-around-carry ripple adders) come from FPGA synthesis. They
  are not reproduced here, and the ripple-adder baseline is not included.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

* `tb_rns_reverse_converter`: the top at n = 4 with default parameters. It
  first applies the three published vectors. It then walks X over all
  2,084,880 values of the range, forms the residues with `%`, and expects X
  back. It also counts how often each mechanism fires, using a separate
  integer model of the digits: HMPE increment by carry out and by all-ones
  sum at each of the three widths, end-around carry in each CSA, the borrow
  into the HRPX high part, and x3 = 2^n. Each must occur at least once.
  The run takes about a second.
* `tb_rns_reverse_converter_sizes`: n = 2 and 3 exhaustively; n = 5, 6 and 8
  with 100,000 random values each (through the `rc_sweep` driver).
* Unit tests:
  * `tb_hmpe`: exhaustive at 4, 8 and 9 bits;
  * `tb_prefix_bk`: exhaustive at 4, 8 and 9 bits, against the carries of
    a + b;
  * `tb_excess_one`: exhaustive;
  * `tb_csa_eac`: random;
  * `tb_hrpx`: every T against 600 P values;
  * `tb_opu1`, `tb_opu2`, `tb_opu3`: the modular identities of their outputs,
    exhaustive or near-exhaustive at n = 4.

To run one test with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/rc_pkg.sv tb/tb_rns_reverse_converter.sv --top-module tb_rns_reverse_converter
./obj_dir/Vtb_rns_reverse_converter
```

To change the word length, set `N` on `rns_reverse_converter`. Every width
inside follows from it.
