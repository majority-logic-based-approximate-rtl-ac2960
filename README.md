# Majority-logic approximate recoding adders for high-radix Booth multipliers

Radix-8 and radix-16 Booth recoding cut the number of partial products of an
n x n multiplier to about n/3 and n/4. The price is that the multiplier must
have odd multiples of the multiplicand A ready: 3A for radix 8, and 3A, 5A and
7A for radix 16. Those cannot be made by shifting. Each needs a full
carry-propagate addition (A + 2A, A + 4A, 8A - A), and that adder sits on the
critical path of the whole multiplier.

This design makes the odd multiples approximately. The low-order bits of each
sum are produced by small *approximate recoding adders* (ARAs). An ARA has no
carry chain at all: its carry out is one bit of A, and every sum bit is a
single 3-input majority vote. Only the upper bits, which carry most of the
value, go through an exact ripple-carry adder. All adders are built from
majority voters, `M(a,b,c) = ab + bc + ac`, and inverters, the native gates of
majority-logic nanotechnologies. This matters because cost in such technologies
is counted in voters, and delay in voters on the critical path.

The top level, `ml_ara_booth_top`, puts side by side a signed 16 x 16 radix-8
Booth multiplier (approximate 3A) and a signed 16 x 16 radix-16 Booth
multiplier (approximate 3A, 5A, 6A = 2 x 3A, and 7A). Everything is
combinational, with no clock and no reset.

## How an ARA approximates a slice of the sum

The exact sum of one slice is rewritten so that the slice's carry out becomes
one input bit. What remains is a set of brackets of the form `x + y - z`. Each
bracket can be -1, 0, 1 or 2, but must fit into one sum bit. It is rounded into
0..1, and that rounding is exactly a majority vote with one input inverted:

| x | y | z | x + y - z | M(x, y, ~z) | error |
|---|---|---|-----------|-------------|-------|
| 0 | 0 | 1 | -1        | 0           | +1    |
| 1 | 1 | 0 | 2         | 1           | -1    |
| other six |  |  | 0 or 1 | equal       | 0     |

So each bracket is wrong in 2 of its 8 input patterns, by one unit of its
weight, with errors of both signs, which partly cancel over many inputs.

**ara2 (3A = A + 2A).** A 2-bit slice at bit i adds `a_{i+1}+a_i` at weight
2^{i+1} and `a_i+a_{i-1}+cin` at weight 2^i. Its exact value is
`4a_i + 2a_{i+1} + (cin + a_{i-1} - a_i)`, hence

    cout = a_i      s_{i+1} = a_{i+1}      s_i = M(cin, a_{i-1}, ~a_i)

This is one voter and one voter delay. The slice is wrong in 4 of its 16 input
combinations, by +-2^i.

**ara3 (5A = A + 4A).** With `5a_i = 8a_i - 2a_i - a_i` the 3-bit slice is
`8a_i + 4a_{i+2} + 2(a_{i+1} + a_{i-1} - a_i) + (a_{i-2} + cin - a_i)`:

    cout = a_i   s_{i+2} = a_{i+2}   s_{i+1} = M(a_{i+1}, a_{i-1}, ~a_i)   s_i = M(a_{i-2}, cin, ~a_i)

This is two voters. The slice is wrong in 28 of 64 combinations: 4 of them by
+-3 x 2^i, 12 by +-2 x 2^i and 12 by +-2^i.

**ara4 (7A = 8A + ~A + 1).** The slice adds `~a_{i+3}+a_i`, `~a_{i+2}+a_{i-1}`,
`~a_{i+1}+a_{i-2}` and `~a_i+a_{i-3}+cin`. Borrowing one unit between
neighbouring weights puts every bracket into the `x + y - z` form:

    16a_i + 8(~a_{i+3} + a_{i-1} - a_i) + 4(~a_{i+2} + a_{i-2} - a_{i-1})
          + 2(~a_{i+1} + a_{i-3} - a_{i-2}) + (cin + ~a_i - a_{i-3})

This gives four voters and `cout = a_i`. The slice is wrong in 176 of 256
combinations. The module takes the true bits of A and does the inversion
inside.

## Odd-multiple generators: where the ARAs sit

Each generator has a parameter P, the number of ARA blocks, which sets the
approximate region. The ARAs are chained by their approximate carries:
`cin` of block k is `a_i` of block k-1. The first block's carry in comes from
the bits below it. The exact adder above them takes the last ARA's carry out.

| module     | width | exact low bits               | ARA bits (P blocks) | exact ripple adder      | default P |
|------------|-------|------------------------------|---------------------|-------------------------|-----------|
| `odd3_gen` | N+2   | bit 0 = a_0 (carry 0)        | 1 .. 2P             | N+1-2P bits of A + 2A   | 5         |
| `odd5_gen` | N+3   | bits 1..0 = a_1 a_0 (carry 0)| 2 .. 3P+1           | N+1-3P bits of A + 4A   | 3         |
| `odd7_gen` | N+3   | bits 2..0 of ~A+1, exact (3-bit majority-logic adder, carry in 1) | 3 .. 4P+2 | N-4P bits of ~A + 8A | 2 |

P = 0 gives the exact multiple. The allowed ranges are 0..N/2, 0..N/3 and
0..(N-1)/4, and each is checked by an elaboration-time assertion.

Compared with an exact majority-logic ripple adder (3 voters per bit, depth
m+1 for m bits), each ARA saves:

| ARA  | voters saved | voter delays saved | at N = 16, default P: voters x depth |
|------|--------------|--------------------|---------------------------------------|
| ara2 | 5            | 2                  | 3A: 26 x 8 = 208 against 51 x 18 = 918 (-77 %) |
| ara3 | 7            | 3                  | 5A: 30 x 9 = 270 against 918 (-71 %)           |
| ara4 | 8            | 4                  | 7A: 41 x 9 = 369                               |

## Accuracy

All 65536 16-bit multiplicands were simulated exhaustively. NMED is the mean
absolute error divided by m x 2^16 for the multiple mA. RMSE is in units of
the multiplicand's LSB.

| multiple | P | NMED       | RMSE   | published NMED / RMSE |
|----------|---|------------|--------|-----------------------|
| 3A       | 5 | 7.51e-4    | 247.32 | 7.51e-4 / 247.31      |
| 5A       | 3 | 6.35e-4    | 314.36 | 6.34e-4 / 314.36      |
| 7A       | 2 | 8.09e-4    | 522.55 | 1.2e-3 / 522.61       |

Each extra ARA block roughly quadruples the RMSE (3A: 1.0, 3.9, 15.5, 61.8,
247, 989 for P = 1..6). For this reason P = 5, 3 and 2 are the defaults.
`tb_ara_p_sweep` prints the full sweep.

The ARA error reaches a product only through digits that select an odd
multiple, or 6A. Over random operands the radix-8 product has an NMED of about
1.6e-4 and the radix-16 product about 4.9e-4, normalised by 2^30. A product
whose Booth digits are all in {0, +-1, +-2, +-4, +-8} is exact.

## Booth multipliers

`booth_r8_mult` recodes B (b_{-1} = 0, sign-extended) into ceil(N/3) digits
`d_k = -4b_{3k+2} + 2b_{3k+1} + b_{3k} + b_{3k-1}`, each in -4..4.
`booth_r16_mult` recodes into ceil(N/4) digits from five bits, each in -8..8.
Each digit is kept as a sign and a magnitude (`r8_digit_t`, `r16_digit_t` in
`ml_ara_pkg`). The magnitude selects the multiple, and a negative digit takes
the two's complement of it. The partial products are summed at weights 8^k or
16^k into a 2N-bit product. The radix-16 6A is the approximate 3A shifted
left by one.

## Where this RTL goes beyond or departs from the published design

- **Partial-product accumulation** is not designed here. Negation is exact
  two's complement, and the partial products are added with a plain `+` sum,
  left to synthesis. Only the odd-multiple generation is built from voters.
  The multipliers exist to show the generators in use. Do not read them as an
  optimised majority-logic multiplier.
- **3A in the radix-16 multiplier** uses the radix-8 setting, P3 = 5. No
  separate value is given for the radix-16 case.
- **Widths** of 5A and 7A (N+3 bits) are the smallest that hold the exact
  result.
- **7A low bits:** the three bits below the first ARA are formed by a 3-input
  majority-logic ripple adder with carry in 1 (the +1 of -A). The carry out of
  that adder is the first ARA's carry in.
- **7A figures:** the RMSE matches the published value to 0.01 %, but the
  published 7A NMED (1.2e-3) is not reproduced under the normalisation that
  matches the 3A and 5A figures. The published 55 % ADP reduction for 7A
  implies an exact baseline of about 60 voters and depth 21. That is larger
  than the 19-bit adder this structure would use without ARAs (57 voters,
  depth 20, giving -68 %). The per-block savings (8 voters, 4 delays) agree.
- The carry in of the lowest ARA is 0 for 3A and 5A. This is exact, because
  the bits below produce no carry there.

## Files

`rtl/`:
- `ml_ara_pkg.sv`: defaults (N = 16, P3 = 5, P5 = 3, P7 = 2), Booth digit types
- `maj3.sv`: majority voter
- `ml_full_adder.sv`: exact full adder, `cout = M(a,b,c)`, `s = M(~cout, M(a,b,~c), c)`
- `ml_rca.sv`: M-bit ripple-carry adder of those full adders
- `ara2.sv`, `ara3.sv`, `ara4.sv`: the approximate recoding adders
- `odd3_gen.sv`, `odd5_gen.sv`, `odd7_gen.sv`: the odd-multiple generators (parameters N, P)
- `booth_r8_mult.sv`, `booth_r16_mult.sv`: the multipliers (N, P3 [, P5, P7])
- `ml_ara_booth_top.sv`: both multipliers side by side, odd multiples brought out

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus the
following:
- `tb_ara_ref_pkg.sv`: an arithmetic reference model. It computes each odd
  multiple as the exact multiple plus the rounding error of every ARA bracket,
  and computes Booth products digit by digit.
- `tb_ara_p_sweep.sv`: the error sweep over P.
- `tb_ml_ara_booth_top.sv`: the end-to-end test at the default parameters. It
  also counts that every Booth digit value, every approximate multiple, and
  both inexact and exact products occur.

The ARA testbenches are exhaustive and check the error counts quoted above.
The generator testbenches are exhaustive over 16-bit A and check the published
NMED/RMSE. Each testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal --top-module tb_ml_ara_booth_top \
        -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ml_ara_pkg.sv tb/tb_ara_ref_pkg.sv \
        tb/tb_ml_ara_booth_top.sv
    ./obj_dir/Vtb_ml_ara_booth_top

Replace the top module and its file to run any other testbench. The leaf
testbenches (`tb_maj3`, `tb_ara2`, and so on) do not need `tb_ara_ref_pkg.sv`.
Each run takes well under a second of simulated work.

To try another operating point, change P3, P5 or P7 on `ml_ara_booth_top`, or
N. N must keep each P within its range. The testbenches' reference model takes
P as an argument, so only their localparams need to change. The published
NMED/RMSE checks in the generator testbenches apply to N = 16 and the default
P only.
