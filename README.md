# Mirror-code arithmetic units

Two's complement writes an (n+1)-digit number with the weights

    {-2^n, +2^(n-1), ..., +2^1, +2^0}

Reverse every sign and you get the *mirror* weights

    {+2^n, -2^(n-1), ..., -2^1, -2^0}

A word read with the mirror weights has exactly the value minus the value it has in
two's complement. So the mirror code of x has the same bits as the ordinary code of
-x. Example with four digits: -3 is `1101` in ordinary code and `0011` in mirror code
(+0 - 0 - 2 - 1).

This fact alone is old. What it buys the designer is a second way to read the same
wires. Three situations make use of it:

* **Small digit groups.** Two ordinary digits hold {-2, -1, 0, 1}; two mirror digits
  hold {-1, 0, 1, 2}. A cell whose result lies in {-1 .. 2} can then give it as two
  bits with no third sign digit.
* **Carry-free adders.** A half adder with a mirror output (carry `u | v`, sum
  `u ^ v` of weight -1) leaves a sum digit of 0 or -1. That digit can absorb a
  positive carry from below without passing it on.
* **Variable mode numbers.** Add a mode bit that says which reading applies. Negation
  then flips one bit, never overflows, and costs nothing. Add and subtract keep the
  cost of an ordinary add/subtract unit.

This repository holds synthesizable SystemVerilog for these units. Each one is a
separate combinational circuit; a top module places them side by side. None of them
has a clock or a reset.

| module | what it computes |
|---|---|
| `vm_addsub` | (-1)^D x + (-1)^C y on variable mode numbers |
| `sign_flipper` | ordinary <-> mirror conversion (two's complement negation) |
| `mirror_cell` | one digit: x + y - r as two mirror digits |
| `xy_minus_r_adder` | s = x + y - r0 (mod 2^W) |
| `sd_adder_section` | N ranks of the carry-free signed-digit adder, transfers in and out |
| `sd_adder` | complete carry-free signed-digit adder, digits {-1, 0, 1}, three cell levels |
| `mirror_ha` | half adder with mirror output |
| `sd_out_adder` | binary operands, signed-digit result, two cell levels |
| `d_cell` | (-1)*u + v, in direct, mirror or variable mode code |
| `negabinary_adder` | binary operands, result in base -2 |
| `ha_array_adder` | binary adder made only of half adders |
| `pezaris_cell` | the three one-bit operators of a signed array multiplier |
| `pezaris_cell2` | two-bit multiplier cells, two one-bit operators in cascade |
| `mirror_arith_top` | all of the above, ports brought out with a prefix |
| `mirror_pkg` | `maj()`, the signed-digit code, the cell-kind enums |

## Variable mode numbers and `vm_addsub`

A variable mode number is a mode bit `M` and an (N+1)-digit word `w` (default N = 3,
so four digits):

    M = 0 (direct):  value =  tc(w)        tc = two's complement value, [-2^N, 2^N - 1]
    M = 1 (mirror):  value = -tc(w)                                    [-2^N + 1, 2^N]

Together the two modes cover [-2^N, +2^N], which is symmetric. Zero and every value
except +-2^N have two codes. Negating a number means flipping `M`. This works even
for -2^N, whose two's complement negation would overflow.

### How the sum is formed

Let A and B be the operands' modes. Negating an operand flips its mode, so the
unit starts by forming the effective modes `A' = A ^ neg_x` and `B' = B ^ neg_y`.

* **A' = B'.** Both words are read the same way. Their sum is the plain word sum
  `x + y`, read in that same mode.
* **A' != B'.** One value is +tc and the other is -tc. The result is either
  `tc(x) - tc(y)` read in x's mode, or `tc(y) - tc(x)` read in y's mode.

So every case is one ripple row of identical cells. The sum digit is always the same:

    s_i = x_i ^ y_i ^ r_i,   r_0 = 0

Only one input of the carry function is inverted, and only when `sub = A' ^ B'`:

    SOLUTION = 1:  r_(i+1) = maj(x_i ^ sub, y_i, r_i)    S = A'   (result keeps x's mode)
    SOLUTION = 2:  r_(i+1) = maj(x_i, y_i ^ sub, r_i)    S = B'   (result keeps y's mode)

When `sub` = 1, the ripple signal is a borrow: `maj(~x, y, b)` is the borrow of
x - y. The control costs one XOR more than an ordinary add/subtract unit, where `sub`
is simply the subtract command.

The four combinations of `neg_x`/`neg_y` give x + y, x - y, -x + y and -(x + y). The
last one (the *cosum*) is as cheap as the sum. In ordinary two's complement,
-x - y needs an extra incrementer or a forbidden case.

### Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `x_mode`, `y_mode` | in | 1 | A, B: 0 direct, 1 mirror |
| `x`, `y` | in | N+1 | words |
| `neg_x`, `neg_y` | in | 1 | D, C: use -x, -y |
| `s_mode` | out | 1 | S |
| `s` | out | N+1 | result word |
| `ovf` | out | 1 | the result does not fit in N+1 digits in mode S |

The unit is purely combinational, with a ripple path of N+1 majority gates. `ovf` is
the usual carry-into-sign XOR carry-out-of-sign test of the word operation. When it
is set, the true result lies outside the range of mode S. This design adds `ovf`; the
source does not discuss overflow of sums.

## Mirror cell, sign flipper and the x + y - r0 adder

`mirror_cell` is the one-digit building block of mirror arithmetic. It forms
x + y - r, a value in {-1, 0, 1, 2}, as `2*r1 - shat`:

    shat = x ^ y ^ r        r1 = maj(x, y, ~r)

This is a borrow cell with its inputs permuted. Its truth table maps -1 to `0 1` and
+2 to `1 0`.

`sign_flipper` converts a word between the two codes. In other words, it negates in
two's complement. It is a ripple of identical cells:

    xhat_i = x_i ^ r_i,   r_(i+1) = x_i | r_i,   r_0 = 0

Digits up to and including the lowest 1 pass through, and all digits above it are
inverted.

`xy_minus_r_adder` computes s = x + y - v(r0) modulo 2^W (default W = 4). Such an
adder serves, for example, addition modulo 2^k + 1. The parameter `STRUCTURE`
chooses one of three equivalent constructions:

| `STRUCTURE` | identity | hardware |
|---|---|---|
| `XR_FLIP_SUB` (default) | x - (-y) - r0 | `sign_flipper` on y, then a ripple-borrow subtractor row (`s = x ^ ny ^ b`, `b' = maj(~x, ny, b)`) with r0 as the borrow into the lowest cell |
| `XR_FLIP_ADD` | -[(-x) + (-y) + r0] | flippers on x and y, a ripple-carry adder with r0 as carry in, a flipper on the sum |
| `XR_ADD_DEC` | (x + y) - r0 | a ripple-carry adder with zero carry in, then a decrementer (`s = u ^ d`, `d' = ~u & d`, d_0 = r0) |

All three give the same `s`. `r_out` is the ripple signal that leaves the top of the
arithmetic row, so its meaning depends on the structure: the subtractor's borrow,
the adder's carry, or the decrementer's borrow. The default has two rows of W cells
on its longest path, and `XR_FLIP_ADD` has three.

**Departure.** The source also sketches a structure that repeats `mirror_cell` at
every rank and then converts the result with a `sign_flipper` row. Built as drawn,
that structure does not compute x + y - r0 beyond one digit. An exhaustive check of
the four-digit case gives the right result in only 64 of 512 input combinations. The
reason is a sign mismatch: the cell emits `r1` with weight +2, but the next rank
would have to take it with weight -1. This design therefore offers only the
three structures above. `mirror_cell` stays as a tested cell of its own.

## Carry-free signed-digit adder (`sd_adder`)

Operands have N digits in {-1, 0, 1} (default N = 3). Each rank passes through three
levels of cells, and each level sends one transfer, also in {-1, 0, 1}, to the next
rank:

| level | cell | input w | transfer out | digit kept |
|---|---|---|---|---|
| A | a | x'_i + y'_i in [-2, 2] | t' = sign(w): a transfer whenever possible | s' = w - 2t' |
| B | b | s'_i + t'_i in [-2, 2] | t'' = +-1 only for w = +-2: a transfer only when unavoidable | s'' = w - 2t'' |
| C | c | s''_i + t''_i | none | s_i |

Level C can never produce a carry. Both s''_i and t''_i lie in {-1, 0, 1}, so level
C could only fail if both were +1 (or both -1). Take the positive case:

1. t''_i = +1 needs s'_(i-1) + t'_(i-1) = 2, so s'_(i-1) = +1.
2. Level A leaves s' = +1 only when x'+y' = -1, and then it sends t'_i = -1.
3. With t'_i = -1, s''_i = +1 would need s'_i + t'_i = 1, i.e. s'_i = 2, which is
   impossible.

Hence s''_i + t''_i always stays in {-1, 0, 1}. The negative case is symmetric.

As a result, no signal travels more than two ranks, and the delay is three cells
whatever N is. `sd_adder_section` holds N ranks and brings out the two transfers entering its lowest
rank (t'_0, t''_0) and the two leaving its highest (t'_N, t''_N). Sections chain
directly, the outputs of one feeding the inputs of the next. A section then obeys
sum(s_i 2^i) + (t'_N + t''_N) 2^N = x + y + t'_0 + t''_0.

`sd_adder` is a complete adder. It is one section of N+1 ranks with zero transfers in.
Its top rank has zero operand digits and only collects t'_N and t''_N. The result
therefore has N+1 digits and is exact. An assertion in the
module checks that every level-C digit is in range.

**Digit code (this design's choice).** Each signed digit travels as two bits in two's
complement: `00` = 0, `01` = +1, `11` = -1. The pattern `10` never appears.
`mirror_pkg` names the three codes `SD_ZERO`, `SD_POS` and `SD_NEG`.

## Adders with binary inputs

Each of these three adders takes two unsigned N-bit operands (default N = 4).

### Half-adder array (`ha_array_adder`)

This is the plain reference: an adder made only of ordinary half adders
(carry `u & v`, sum `u ^ v`), arranged as a triangular array.

* Rank i has i+1 levels.
* Level 1 adds x_i and y_i.
* Each later level adds the digit from above and the carry of the previous level at
  the rank below.
* Rank i's result bit leaves level i+1.

### Signed-digit output (`sd_out_adder`)

This adder replaces the half adders by `mirror_ha` cells:

    x_i + y_i = 2 t_(i+1) - m_i,   t = x | y,   m = x ^ y

The transfer t is 0 or +1, and the kept digit -m is 0 or -1. The second level simply
forms s_i = t_i - m_i, which lies in {-1, 0, 1}, so nothing propagates. The result
has N+1 signed digits in the code above, after two cell delays.

### Base -2 output (`negabinary_adder`)

This adder uses the same triangular shape as the half-adder array. Its cells are
chosen so that every wire has a fixed sign:

| level | cell | input of weight -1 (u) | input of weight +1 (v) | carry out | digit out |
|---|---|---|---|---|---|
| 1 | `mirror_ha` (a) | - | x_i, y_i | `x|y`, +2 | `x^y`, -1 |
| even | `d_cell` D_DIRECT (d0) | digit from above | carry from below | `u&~v`, -2 | `u^v`, +1 |
| odd >= 3 | `d_cell` D_MIRROR (d1) | carry from below | digit from above | `~u&v`, +2 | `u^v`, -1 |

The digit leaving level k has sign (-1)^k, and rank i finishes at level i+1. Result
digit z_i therefore has weight -(-2)^i: -1, +2, -4, +8, ... So z is the base -2 code
of -(x + y), or equivalently x + y with alternating-sign weights.

The default uses M = N + 3 result digits. At that size, an exhaustive check at N = 4
and N = 6 finds that no carry ever leaves the top rank. The `cout` port shows those
carries so that this can be checked. The array has M(M+1)/2 cells and a depth of M
cells.

`d_cell` also has the variable mode code (`D_VARIABLE`). In that code the result
{-1, 0, 1} is a mode bit `u` plus the digit `u ^ v`, with carry 0. The base -2 array
does not use it; it is tested on its own.

## Multiplier cells (`pezaris_cell`, `pezaris_cell2`)

A cellular multiplier for signed numbers needs three one-bit operators:

    CELL_A:  x + y + r = 2 r1 + s       full adder
    CELL_B: -x + y + r = 2 r1 - s       mirror-code output
    CELL_C:  x - y - r = s - 2 r1       subtractor, r is a borrow

CELL_B's equation is CELL_C's multiplied by -1, so the two share the same gates
(`r1 = maj(~x, y, r)`). Only the reading of the outputs differs.

A two-bit cell chains two one-bit operators through their carry. `KIND_LO` sets
bit 0 and `KIND_HI` sets bit 1. There are three useful cells:

| `KIND_LO`, `KIND_HI` | cell | equation |
|---|---|---|
| A, A | ordinary two-bit adder | x + y + r = 4 r2 + s |
| B, B | mirror code two-bit adder | -x + y + r = 4 r2 - s |
| A, B | cascade of both types | x_0 - 2 x_1 + y + r = 4 r2 - 2 s_1 + s_0 |

The chain is exact only if the low cell hands its carry on with the weight the high
cell expects. A and B both give and take the carry with a positive sign, so they mix
freely; B then A works too. C gives and takes it with a negative sign, so it can only
follow C. The module stops elaboration with an error for any other pair.

The multiplier array itself is not part of this repository.

## Top level (`mirror_arith_top`)

The top module has no parameters. Every unit is instantiated at its default size,
and its ports are prefixed:

| prefix | unit |
|---|---|
| `vm_` | `vm_addsub` |
| `fl_` | `sign_flipper` |
| `mc_` | `mirror_cell` |
| `xr_` | `xy_minus_r_adder` |
| `sd_` | `sd_adder` |
| `so_` | `sd_out_adder` |
| `nb_` | `negabinary_adder` |
| `ha_` | `ha_array_adder` |
| `pa_`, `pb_`, `pc_` | the three one-bit multiplier cells; `{x, y, r}` in, `{r1, s}` out |
| `p2_` in; `p2a_`, `p2b_`, `p2m_` out | the three two-bit cells (A A, B B, A B) on shared inputs |

The units share no signals.

## What follows the source and what does not

The following are taken from the source article:

* the codes;
* the cell equations (mirror cell, sign flipper, `mirror_ha`, d0/d1, the
  variable-mode code table);
* the variable mode carry equations and the choice of result mode;
* the three-level signed-digit rules;
* the cell sequence of the base -2 adder.

The following are this design's own choices:

* the `ovf` output of `vm_addsub`;
* handling the sign controls C and D as mode flips of the operands;
* the two-bit signed-digit code;
* extending the drawn two- or three-column sections to N-digit triangular arrays,
  and M = N + 3 for the base -2 adder;
* the ports and parameter defaults where no size is drawn;
* the gate-level rows of the three-flipper and adder-plus-decrementer structures;
* building the two-bit multiplier cells from one-bit operators, and the bit order of
  the mixed (A, B) cell.

The following differ from the source:

* **x + y - r0.** The adder offers the flipper-plus-subtractor, three-flipper and
  adder-plus-decrementer structures, not the mirror-cell row (see above).
* **Conditional add/subtract in variable mode.** The result mode is taken as A ^ D
  (solution 1) or B ^ C (solution 2). The equation as printed gives S = B for the
  second solution, which cannot be right when y is subtracted.
* **One printed carry function disagrees.** For modes A B = 0 1 it reads
  maj(~x, ~y, r), while the final equations give maj(~x, y, r). The latter is the
  borrow of x - y, and it is the one used here.

Not included:

* the signed array multiplier (only its one- and two-bit cells are here).

## Simulating

Each `tb/tb_<module>.sv` is a self-checking testbench:

* It drives its unit exhaustively, in most cases at the default size and at one larger
  size.
* It compares the outputs with an arithmetic reference of its own.
* It ends by printing `TB_RESULT checks=<n> failures=<n>`.

`tb_mirror_arith_top` drives every unit through the top with 20,000 random vectors at
the default sizes. It also counts how often each mechanism occurred:

* subtraction through differing modes, negation through a mode flip, the cosum,
  overflow and mirror-mode results;
* negation of -2^n;
* mirror-cell outputs of -1 and +2;
* level-A and level-B transfers in the signed-digit adder;
* -1 output digits;
* base -2 digits of both signs;
* a full carry ripple through the half-adder array.

Any mechanism that never occurs counts as a failure.

With Verilator 5:

    verilator --binary --timing --assert -y rtl rtl/mirror_pkg.sv \
        tb/tb_mirror_arith_top.sv --top-module tb_mirror_arith_top
    ./obj_dir/Vtb_mirror_arith_top

Replace the testbench name to run another one. Every testbench finishes in well under
a second. To change a size, override the module's parameter (`N`, `W`, `M`,
`SOLUTION`, `KIND`, `CODE`). The testbenches show how at the larger sizes they use.
