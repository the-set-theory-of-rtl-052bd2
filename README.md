# Arithmetic circuits by decomposition: counters, adders and multipliers from three operators

Adders, parallel counters, carry-save adders, signed-digit adders and multiplier reduction
trees can all be written as one kind of equation. Outputs and inputs are sums of weighted
**digit sets**. The circuit that turns one side into the other is a sequence of small
rewrite rules, called **decomposition operators**. Each rule that is applied becomes one
small combinational cell, and where it is applied (the weight and the level) becomes that
cell's wiring. This repository holds synthesizable SystemVerilog for the operator library
and for the example circuits designed with it:

| Circuit | Equation (outputs <= inputs) | Module |
|---|---|---|
| radix-2 parallel counter, 11 inputs | 4<2^0> + 2<1^0> + <1^0> <= 11 x <1^0> | `par_counter11` |
| radix-3 parallel counter, 11 inputs | 9<1^0> + 3<2^0> + <2^0> <= 11 x <1^0> | `par_counter11_r3` |
| 3-bit carry-save adder | 8<1^0> + 4<2^0> + 2<2^0> + <2^0> <= CS word + 3-bit word + carry | `csa3` |
| radix-4 signed-digit adder, <4^2> digits | three equations per digit (below) | `sd_adder_r4` |
| radix-16 signed-digit adder, <20^10> digits | two equations per digit (below) | `sd_adder_r16` |
| 2-digit radix-2 redundant multiplier | 8<2^1> + 4<2^1> + 2<2^1> + <2^1> <= (2<2^1>+<2^1>)·(2<2^1>+<2^1>) | `red_mult_r2` |
| N-digit radix-2 redundant array multiplier | 2N digits <2^1> <= N digits · N digits | `red_mult_rn` |
| decimal digit adder | 10<1^0> + <9^0> <= <9^0> + <9^0> + <1^0> | `decimal_adder` |
| radix-4 super redundant carry generator | 4<2*> + <4*> <= <6*> + <6*> | `srcg12_6` |
| signed-digit adder for any even radix R, <R^(R/2)> digits | three equations per digit (below) | `sd_adder_even` |
| radix-R full adder | R<1^0> + <(R-1)^0> <= <(R-1)^0> + <(R-1)^0> + <1^0> | `full_adder_rn` |

Everything is combinational. There is no clock, reset or handshake. An output is valid a
few operator delays after its inputs change. `stad_top` places all the circuits side by
side, each with its own ports.

## Digit sets

A digit set `<d^w>` is the run of `d+1` consecutive integers from `-w` to `d-w`:

- `d` is the *diminished cardinality*: one less than the number of values.
- `w` is the *offset*: the magnitude of the smallest value.

So `<1^0>` = {0,1} is an ordinary bit, `<1^1>` = {-1,0} is a negative bit, `<2^0>` = {0,1,2}
is a carry-save digit, and `<2^1>` = {-1,0,1} is a binary signed digit. A weighted sum of
digit sets is again a digit set as long as each weight's digit covers the gap up to the
next weight. For example, `8<1^1> + 4<2^0> + 2<1^1> + <2^0>` spans exactly -10..10, so it
holds one `<20^10>` radix-16 digit on six wires.

Most circuits here use only the binary sets `<1^w>` and the ternary sets `<2^w>`. The
exceptions are the radix-3 counter, the radix-5 carry generator and the two radix-R modules
(`sd_adder_even`, `full_adder_rn`). Those carry larger digits as plain binary numbers.

### Formats: which wire pattern means which value

How values map to bits is a design decision, called the *format*. Here arithmetic zero is
always the all-zeros pattern.

| set | bits | patterns |
|---|---|---|
| `<1^0>` | 1 | 1 = +1 |
| `<1^1>` | 1 | 1 = -1 |
| `<2^0>` | g e | 00 = 0, 01 = 1, 10 = 2 (11 unused) |
| `<2^2>` | g e | 00 = 0, 01 = -1, 10 = -2 (11 unused) |
| `<2^1>` | g e | 00 = 0, 01 = +1, 11 = -1 (10 unused); e is the magnitude, g the sign |

A ternary field is always 2 bits wide and a binary digit is one wire. Composite digits are
packed structs in `stad_pkg`:

- `sd4_t` = {`h`:<1^1>·2, `l`:<2^0>}
- `sd16_t` = {`h1`:<1^1>·8, `l1`:<2^0>·4, `h0`:<1^1>·2, `l0`:<2^0>}
- `dec_t` = {`a`:<1^0>·4, `b`:<2^0>·2, `c`:<1^0>}

A decimal digit is therefore **not BCD**. It is the redundant 4-bit form
4<1^0> + 2<2^0> + <1^0>. For example, 4 may appear as `a=1` or as `b=2`.

Inside a generic operator, every field is turned into its *offset code* (value + w, an
unsigned number 0..d). Codes are added, the code sum is split between the outputs, and
the outputs are turned back into fields. Offsets are conserved across every operator, so
adding codes is exactly adding values. This is why one piece of logic serves every
offset variant.

## The operators

All radix-2 structures are built from three **diadic** operators, meaning each takes two
inputs of the same weight. The name gives the output's diminished cardinality, then the
largest input's:

| operator | equation | what it does |
|---|---|---|
| `pa21`  (PA2.1)  | `<2*>` <= `<1*>` + `<1*>` | partial adder: merges two bits into a ternary digit; no carry |
| `cg32`  (CG3.2)  | 2`<1*>` + `<1*>` <= `<2*>` + `<1*>` | carry generator: sum 0..3 to carry and bit; unique split |
| `rcg42` (RCG4.2) | 2`<1*>` + `<2*>` <= `<2*>` + `<2*>` | redundant carry generator: sum 0..4 to carry and ternary digit |

Each operator has offset parameters, written in the same order as the operator's name:
outputs from the highest weight down, then the inputs. So `RCG4.2(1011)` is
`rcg42 #(.O_C(1), .O_S(0), .O_A(1), .O_B(1))`, meaning 2<1^1> + <2^0> <= <2^1> + <2^1>.
An illegal combination (one that does not conserve offset) stops elaboration with
`$error`.

**Coupled don't cares.** The RCG4.2 output is redundant: a sum of 2 can leave as
carry 1 / digit 0 or as carry 0 / digit 2. Which one is chosen changes the logic of
several outputs at once. For the zero-offset RCG4.2 the gates come from minimising the
format-2 truth table with the choice "a ternary input holding 2 produces the carry":

```
c   = a.g | b.g
s.g = a.g & b.g | a.e & b.e
s.e = a.e ^ b.e
```

So 2+0 gives carry 1 / digit 0, but 1+1 gives carry 0 / digit 2. The other offset variants
(and CG3.2, PA2.1) use the generic code split, "carry when the code sum is 2 or more".

Built from these:

- `full_adder_r2`: the radix-2 full adder 2<1*> + <1*> <= <1*> + <1*> + <1*>, in any of its
  four signed variants, made from a PA2.1 followed by a CG3.2.
- `srcg12_6`: the radix-4 operator 4<2*> + <4*> <= <6*> + <6*>, rewritten at radix 2 as
  4<2*> + 2<1*> + <2*> <= (2<2*>+<2*>) + (2<2*>+<2*>). It is realised as two RCG4.2, then a
  CG3.2, then a PA2.1: a radix-4 operator made of radix-2 cells.
- `rop`: a generic radix-R operator R<DH^0> + <DL^0> <= <DA^0> + <DB^0> with plain binary
  digits. It covers the partial adder, carry generator, redundant and super carry generator
  forms at any radix. The radix-3 counter uses it.
- `full_adder_rn`: the non-redundant radix-R full adder R<1^0> + <(R-1)^0> <= <(R-1)^0> +
  <(R-1)^0> + <1^0>. It is two `rop` cells: the partial adder <(2R-2)^0> <= a + b, then the
  carry generator R<1^0> + <(R-1)^0> <= <(2R-2)^0> + cin. The default radix is 4.
- `r5_cg`: the radix-5 carry generator 5<1*> + 2<1*> + <2*> <= 4<1*> + 2<2*> + <1*>. It is the
  one non-binary cell that decimal arithmetic needs (10 = 2·5).
- `elem_mult`: the elementary multiplier <2^1> = <2^1>·<2^1>. It computes magnitude AND and
  sign XOR, and forces the sign to zero when the product is zero.

## Mythical inputs

Sometimes the output side can hold more values than the inputs can produce, so the
equation cannot be decomposed as written. A constant-zero **mythical input** is then added
to the input side until both sides have the same diminished cardinality and offset. In the
RTL it is a `localparam MYTH = 0` wired into an operator. It never changes a result, but
it is what makes the operator chain balance. Where each circuit uses one:

| circuit | mythical input |
|---|---|
| `red_mult_r2` | 4<2^1> + 2<2^1> |
| `par_counter11_r3` | 3<2^0> |
| `sd_adder_r4`, equation 2 | <2^1> at weight 1 |
| `sd_adder_r16`, stage 1 | 4<2^1> |
| `sd_adder_r16`, stage 2 | <2^1> |

The last three are chosen by the standard algorithm: use as much diminished cardinality
and offset as possible at as high a weight as possible.

Synthesis folds the constants away. What remains can look asymmetric: for example, an
RCG4.2 with a zero input becomes a re-encoder.

## The circuits

**Radix-2 parallel counter** (`par_counter11`). Eleven bits enter at weight 1. The count
0..11 leaves as `4*y4 + 2*y2 + y1`, where `y4` is a ternary digit. The circuit has seven
levels and fifteen operators:

- 8 partial adders;
- 7 carry generators (4 RCG4.2 and 3 CG3.2).

That is one carry generator for each bit of information removed: 11 input wires, 4 output
wires. The header of the file lists which operator sits at which level and weight.

**Radix-3 parallel counter** (`par_counter11_r3`). The same eleven bits go in, and the count
comes out as radix-3 digits `9*y9 + 3*y3 + y1`. It has five levels of radix-3 operators:
PA2.1, PA4.2 and PA3.2; a super carry generator SCG8.4; then CG5.3 and CG5.4.

**Carry-save adder** (`csa3`). The circuit has two levels:

1. A CG3.2 at each weight adds the accumulator digit and the addend bit.
2. A PA2.1 at each weight merges the bit that stays with the carry from below.

No carry travels more than one position.

**Radix-4 signed-digit adder** (`sd_adder_r4`, N digits, default 8). Each digit is in -2..2.
Per position:

1. `4<1^1> + 2<1^0> + <2^0> <= x + y`. The sum -4..4 becomes a transfer t ∈ {-1,0} and an
   interim digit 0..4.
2. `4<1^0> + 2<1^1> + <1^0> <= interim + t_in`, with a mythical input. The sum -1..4 becomes a
   second transfer t2 ∈ {0,1} and a remainder -2..1.
3. `2<1^1> + <2^0> <= remainder + t2_in`. The result is a digit in -2..2.

Transfers reach at most two positions, so the delay does not depend on N. The result is
`sum z[i]*4^i + 4^N*(t2_out - t_out)`. Nothing enters digit 0, so the top bit of digit 0's
ternary field is always 0.

**Radix-16 signed-digit adder** (`sd_adder_r16`, N digits, default 8). Digits are in
-10..10. That is more redundancy than radix 16 needs, and it buys a two-stage digit:

1. `16<2^1> + <16^8> <= x + y`. This gives a transfer in {-1,0,1} and an interim digit in
   -8..8. The interim digit is held as 8<1^1> + 4<1^0> + 2<1^0> + <2^0>.
2. `<20^10> <= interim + t_in`.

The result is `sum z[i]*16^i + 16^N * t_out`.

**Even-radix signed-digit adder** (`sd_adder_even`, radix R, N digits; defaults 4 and 8).
This is the general form that the radix-4 adder instantiates. Digits are in -R/2..R/2, and
each travels as its offset code `value + R/2` in unsigned binary. Per digit:

1. `R<1^1> + <R^0> <= x + y`. This gives a transfer t in {-1,0} and a remainder in 0..R.
2. `R<1^0> + <(R-1)^(R/2)> <= remainder + t_in + {<(R-2)^(R/2-1)>}`. This gives a transfer
   t2 in {0,1} and a digit in -R/2..R/2-1. The braced term is the mythical input. For
   R = 4 it is the <2^1> digit that `sd_adder_r4` uses.
3. `<R^(R/2)> <= digit + t2_in`.

Each equation is written as a small integer expression per digit, not as binary operators.
The point is to have one module that works for any even R. `stad_top` instantiates it at
radix 8 with 4 digits.

**Redundant multiplier** (`red_mult_r2`). Four `elem_mult` cells form the partial products.
Three levels of operators reduce them:

1. RCG4.2(1011) at weights 4 and 2.
2. CG3.2(0101) at weight 4 and RCG4.2(0101) at weight 2.
3. PA2.1(101) at weights 8 and 4.

Operands are -3..3 and the product is -9..9, held as four <2^1> digits.

**N-digit redundant array multiplier** (`red_mult_rn`, default N = 4). An N x N array of
`elem_mult` cells forms the partial products. Row i is `a * b[i]`, shifted by i. The rows
are then added one at a time into a 2N-digit accumulator. Each addition is a carry-free
radix-2 signed-digit addition. Per position it uses the same three operators as the
two-digit network:

1. RCG4.2(1011) turns accumulator digit + row digit into a transfer in {-1,0} and a digit
   0..2.
2. CG3.2(0101) adds the transfer from below, giving a transfer in {0,1} and a bit in {-1,0}.
3. PA2.1 adds the second transfer from below, giving the new digit -1..1.

Before row i is added, the accumulator is zero above position i+N-1. So nothing ever
leaves position 2N-1, and 2N digits hold every product (an assertion checks this). The
delay is a constant per row, so it grows linearly with N and never with a carry chain.

**Decimal digit adder** (`decimal_adder`). Its operators are:

- weight 1: PA2.1, then CG3.2 with the carry-in;
- weight 2: RCG4.2, then CG3.2;
- weight 4: two PA2.1 and an RCG4.2;
- then `r5_cg` produces the decimal carry and the upper result bits.

That is 4 binary carry generators, 3 partial adders and 1 radix-5 carry generator. This
is exactly the count the cost formula predicts: one carry generator per bit of
information lost (9 wires in, 5 out), and partial adders equal to that loss minus the
change in the number of ternary digits. Chain digits through `cin`/`cout` for a wider
adder.

## Where this RTL departs from, or adds to, the original description of the method

The method's original description gives the equations, the operator tables, and the
level-by-level operator lists for the counter, the carry-save adder and the multiplier.
It also gives gate equations for RCG4.2(0000) only. This RTL adds the following
choices of its own:

- **Wiring within a level.** The wiring of `par_counter11`, `red_mult_r2`, `csa3` and
  `srcg12_6` follows the published operator lists per level and weight. Which signals pair
  within a level is chosen here.
- **Own decompositions.** Only the equations of `sd_adder_r4`, `sd_adder_r16`,
  `decimal_adder` and `par_counter11_r3` are given. Their decompositions into operators are
  this design's. The decimal adder matches the published operator counts.
- **The mythical input of the radix-4 signed-digit adder** sits at weight 1 as a <2^1>
  digit, as the mythical-input algorithm gives. A <1^1> digit at weight 2 would not balance
  the offsets. The general even-radix equations give the same <2^1> term.
- **Odd radices.** The odd-radix signed-digit adder is not built. Its first equation,
  `r<1^1> + <(r+1)^0> <= <(r+1)^((r+1)/2)> + <(r+1)^((r+1)/2)>`, does not balance: the
  output side covers 2r+2 values, but the inputs span 2r+3.
- **Coupled don't cares.** Except in RCG4.2(0000), these are resolved by "largest carry
  that fits". `r5_cg` chooses p = 1 for a remainder of 2.
- **<2^1> encoding.** Reading the ternary <2^1> format as sign/magnitude is a choice made
  here.
- **Widths.** The word lengths of the signed-digit adders (8 digits, or 4 for
  `sd_adder_even` inside `stad_top`) are choices made here.
- **Not built.** `r5_cg`, `rop`, `full_adder_rn` and `srcg12_6` exist only in their
  zero-offset variants.
  The N-digit multiplier `red_mult_rn` uses a summation network of this design's own: the
  method lays out the network only for two digits.

## Verifying and simulating

Each module in `rtl/` has a self-checking testbench in `tb/tb_<module>.sv`. The
testbenches decode the outputs with their own value tables (`tb/tb_stad_pkg.sv`), not with
the design's conversion functions. The small operators and counters are checked
exhaustively, including every offset variant the circuits use. The signed-digit adders
are checked with 10,000 to 20,000 random operands plus all-maximum and all-minimum words.
`sd_adder_even` is checked at radix 4 and at radix 16.

`tb_stad_top` drives every circuit at its default size for 20,000 rounds. It also counts
how often each mechanism happened, and fails if one never did:

- a full-scale count;
- the radix-3 counter's weight-9 digit;
- each kind of transfer leaving a signed-digit word;
- multiplier products of ±9, and +225 from the four-digit multiplier;
- decimal and carry-save carry-outs;
- the RCG4.2 don't-care case;
- a super carry of 2;
- both transfers leaving the radix-8 even-radix adder;
- a carry out of the radix-4 full adder.

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/stad_pkg.sv tb/tb_stad_pkg.sv tb/tb_stad_top.sv --top-module tb_stad_top -o sim
./obj_dir/sim
```

Replace `tb_stad_top` with any other testbench name to run that one. Every run takes well
under a second.

## Changing it

- **A new structure.** Write its equation, balance it with a mythical input if needed,
  then apply operators weight by weight, lowest weight first. Instantiate one `pa21` /
  `cg32` / `rcg42` per step, with the offset parameters read off the digit sets.
  Elaboration rejects any operator whose offsets do not balance.
- **Another format.** Changing how values map to wires only touches `to_code` /
  `from_code` in `stad_pkg`. That does not apply to the hand-minimised RCG4.2(0000) branch
  in `rcg42` or to `elem_mult`, which assume format 2.
- **Word length.** The word length of the signed-digit adders is the `N` parameter. The
  adders stay carry-free at any N.
  `red_mult_rn` takes its operand length from `N`, which must be at least 2.
- **Radix.** `sd_adder_even` takes any even radix of at least 4 through `R`, and
  `full_adder_rn` takes any radix of at least 2. The digit widths follow from R.
