# Fast modulo 2^n − 1 adders with factored carries

A modulo 2^n − 1 adder computes |A + B| mod (2^n − 1). These adders are a
basic part of residue number systems, where they form the 2^n − 1 channel. They
are also used in checksums and in ciphers such as IDEA. The usual way to build
one is an ordinary n-bit adder whose carry-out is fed back to its carry-in
(the *end-around carry*):

    |A + B| mod (2^n − 1) = |A + B| mod 2^n + c_out

Wiring c_out straight back to c_in builds a combinational loop. A parallel-prefix adder
avoids the loop by computing every carry from all n generate/propagate pairs,
taken *cyclically*. The carry into bit i+1 is

    c*_i = (g_i,p_i) o (g_{i-1},p_{i-1}) o ... o (g_0,p_0) o (g_{n-1},p_{n-1}) o ... o (g_{i+1},p_{i+1})

where `o` is the usual prefix operator (g,p) o (g',p') = (g + p g', p p').
All bit indices in this README and in the RTL are taken modulo n.

This repository holds four adders of this kind, for n = 8, 16, 32 and 64.
Each one uses the organization that a design-space exploration found fastest
for its width. All four are built on one idea: **factor the carry as
c_i = D_i · F_i**. The factor D_i is cheap. F_i is a simplified carry that a
prefix tree can compute in fewer levels, or with simpler operators, than the
real carry.

## The factorization

The propagate is the OR form, p = a + b, so g_i implies p_i. Because of that,
terms can be pulled out of a carry equation.

* **1-term (Ling) factorization.** c_i = p_i · H_i, with
  H_i = g_i + g_{i-1} + p_{i-1} g_{i-2} + ...
  The first propagate disappears, so H is simpler than c.
* **3-term factorization.** c_i = D_i · F_i, with
  D_i = g_i + p_i g_{i-1} + p_i p_{i-1} p_{i-2}.
  Neighbouring bits are paired into Ling terms R_i = g_i + g_{i-1} and
  Q_i = p_i p_{i-1}:

      F_i = R_i + R_{i-2} + Q_{i-3} R_{i-4} + Q_{i-3} Q_{i-5} R_{i-6} + Q_{i-3} Q_{i-5} Q_{i-7} R_{i-8} + ...

  For n = 8 the four R terms cover all eight bits. F_i is then a single
  *simplified* valency-4 operator, one whose most significant propagate is
  the constant 1.

The same trick can be repeated at any prefix level. Suppose a level has group
terms (F^k, Q^k), and the carry at that level reads F^k_i + Q^k_j · F^k_{i-w} + ....
One more term can then be pulled into the factor:

    D^{k}_i = D^{k-1}_i · (F^k_i + Q^k_j)

What remains is a simpler equation for the next level. The price is a deeper
D tree. Every adder is therefore two trees that run in parallel:

* the **D tree**: the factors D, D^1, D^2, ...
* the **F tree**: the simplified carries F^1, F^2, ...

Each bit has one **summation cell**. Its inputs are the last level of each
tree and the half-sum h_i = a_i xor b_i:

    s_i = F_{i-1} ? (h_i xor D_{i-1}) : h_i        (a 2:1 mux)

This works because s_i = h_i xor c_{i-1} and c_{i-1} = D_{i-1} F_{i-1}. F is
the late signal and only drives the mux select. D must arrive at least one
XOR delay before F. That is the limit on how far the factoring can go: more
factoring makes the F tree shallower and the D tree deeper.

## The four organizations

The name M^{(a),(b),...}_{x,y,...} gives the number of terms factored at the
initial level and at each prefix level ("−" means none). The subscripts give
the operator valency at each prefix level.

| n  | organization              | initial level  | prefix levels (all valency 4)                                        |
|----|---------------------------|----------------|---------------------------------------------------------------------|
| 8  | M^{(3),(−)}               | h, R, Q, D     | F1 (simplified)                                                      |
| 16 | M^{(−),(1),(−)}_{4,4}     | h, p, g        | F1, Q1, D1 (1-term) → F2 (simplified)                                |
| 32 | M^{(3),(−),(−)}_{4,4}     | h, R, Q, D     | F1 (simplified), Q1 → F2 (full operator)                             |
| 64 | M^{(−),(1),(1),(−)}_{4,4,4} | h, p, g      | F1, Q1, D1 → F2 (simplified), Q2, D2 → F3 (simplified)               |

Equations, exactly as coded:

**n = 8** (`modadd8`)

    F_i  = R_i + R_{i-2} + Q_{i-3} R_{i-4} + Q_{i-3} Q_{i-5} R_{i-6}
    s_i  = F_{i-1} ? h_i ^ D_{i-1} : h_i

**n = 32** (`modadd32`)

    F1_i = R_i + R_{i-2} + Q_{i-3} R_{i-4} + Q_{i-3} Q_{i-5} R_{i-6}
    Q1_i = Q_i Q_{i-2} Q_{i-4} (R_{i-5} + Q_{i-6})
    F2_i = F1_i + Q1_{i-3} F1_{i-8} + Q1_{i-3} Q1_{i-11} F1_{i-16} + Q1_{i-3} Q1_{i-11} Q1_{i-19} F1_{i-24}
    s_i  = F2_{i-1} ? h_i ^ D_{i-1} : h_i

The factor (R_{i-5} + Q_{i-6}) in Q1 restores the propagate that the next
group's first Ling term dropped.

There is a variant that also factors level 1: D1_i = D_i (F1_i + Q1_{i-3}).
It makes level 2 a simplified operator, but it delays D1. It was measured to
be slower and is not built.

**n = 16** (`modadd16`)

    F1_i = g_i + g_{i-1} + p_{i-1} g_{i-2} + p_{i-1} p_{i-2} g_{i-3}
    Q1_i = p_i p_{i-1} p_{i-2} p_{i-3}
    D1_i = p_i (F1_i + Q1_{i-1})
    F2_i = F1_i + F1_{i-4} + Q1_{i-5} F1_{i-8} + Q1_{i-5} Q1_{i-9} F1_{i-12}
    s_i  = F2_{i-1} ? h_i ^ D1_{i-1} : h_i

**n = 64** (`modadd64`): levels 1 and 2 are as for n = 16, plus

    Q2_i = Q1_i Q1_{i-4} Q1_{i-8} (F1_{i-11} + Q1_{i-12})
    D2_i = D1_i (F2_i + Q2_{i-5})
    F3_i = F2_i + F2_{i-16} + Q2_{i-21} F2_{i-32} + Q2_{i-21} Q2_{i-37} F2_{i-48}
    s_i  = F3_{i-1} ? h_i ^ D2_{i-1} : h_i

### Parts of this design that are derived rather than taken

The organizations, the initial levels, F1, Q1, the final levels and the
summation cells follow the published description. Three details were worked
out here, using the factorization rule above:

* **D1 for n = 16 and n = 64.** The published equation for this factor is
  D1_i = p_i F1_i + p_{i-1} Q1_i. That equation lets a carry through that
  bit i−4 kills: with p_{i..i-3} = 1, p_{i-4} = 0 and g_{i-5} = 1 it still
  gives a carry at bit i. About 13 % of the 16-bit test vectors come out wrong
  with it. The RTL uses D1_i = p_i (F1_i + Q1_{i-1}) instead. This is
  the same pattern as the 32-bit variant's D1_i = D_i (F1_i + Q1_{i-3}), and
  it gives exact sums.
* **Level 2 of the 64-bit adder** (Q2, D2 and the use of F2) was derived by
  the same rule. The Q2 indices it produces are exactly the ones the
  published level-3 equation uses.
* **Summation** is written as the mux. Some printed forms of the sum
  equation omit the complement on the second F term.

Each of these is checked by simulation against plain end-around-carry
arithmetic (see below).

## Modules

| file | what it is |
|------|------------|
| `rtl/modadd_pkg.sv` | `wrap(i, n)`: the bit position i mod n, used at elaboration time for the cyclic indices |
| `rtl/pre_hpg_cell.sv` | plain preprocessing: h, p (OR), g |
| `rtl/pre_ling3_cell.sv` | 3-term preprocessing from bits i, i−1, i−2: h, R, Q, D |
| `rtl/prefix_op4.sv` | valency-4 operator, group generate only; tie `p[3]` to 1 for the simplified form |
| `rtl/sum_cell.sv` | the XOR + 2:1 mux summation cell |
| `rtl/modadd8.sv`, `modadd16.sv`, `modadd32.sv`, `modadd64.sv` | the four adders; combinational, ports `a`, `b`, `s` of width n |
| `rtl/modadd_top.sv` | the four adders side by side, each between input and output flip-flops |

The Q^k and D^k terms are written as plain AND/OR assignments inside the
adders. Each organization is tied to its width, so the widths are
localparams, not parameters. Making another width means writing another
organization.

The RTL writes Boolean equations in the structure of the trees. Mapping them
onto AOI/OAI compound gates, and sizing for delay, is left to synthesis. Gate-level
drawings of the cells with such compound gates exist; they are one possible
mapping, not a requirement.

### Behaviour at the edges

* Zero has two forms. All ones is the second zero: 0 + (2^n − 1) gives all
  ones, as in any end-around-carry adder. All ones + all ones also gives all
  ones. A following stage that needs a unique zero must map all ones to 0.
* `modadd_top`: operands present at rising edge k are captured at edge k. Their
  sums appear on `s8`/`s16`/`s32`/`s64` right after edge k+1. One new
  operation can start on every clock. The registers have no reset. They only
  carry data, so the first two outputs after power-up are meaningless.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* Cells: exhaustive. The expected values come from integer addition, not
  from the cell's equations.
* `tb_modadd8`: all 65 536 operand pairs.
* `tb_modadd16/32/64`: about 40 000 vectors each. They include the corner
  cases, and for every bit k the pair a = 2^k, b = all ones, whose carry
  travels the whole ring back to bit k − 1. They also include near-complement
  pairs, which give long propagate runs, and random pairs. The reference is
  (a + b) mod 2^n + carry-out, computed on an (n+1)-bit sum.
* `tb_modadd_top`: 6 000 cycles with the top at its defaults. It gives a new
  operand pair to each adder on every cycle and checks each sum exactly one
  edge after its operands were captured. It counts end-around carries,
  all-ones results and full-ring carries for every adder, and fails if any of
  them never happened.

Running one test with Verilator 5:

    verilator --binary --timing --assert -Mdir obj rtl/modadd_pkg.sv tb/tb_modadd_top.sv \
              -y rtl --top-module tb_modadd_top
    ./obj/Vtb_modadd_top

Put the package first and use `-y rtl` so the other modules are found by
name. Every test finishes in well under a second.

## What is not here

* **Timing, area and power.** The RTL does not model the technology-mapped
  design. The claim that these organizations are the fastest depends on a
  particular cell library. The published 32-nm results report delay savings
  of up to about 14 % against a traditional-carry design, and about 7 %
  against a Ling-carry design. On a different library, another member of
  the family may win. With `prefix_op4` and the factoring rule above, other
  organizations can be built the same way.
* The traditional-carry and Ling-carry adders that the results compare
  against, and the slower 32-bit variant, are not part of this design.
