# Signed-digit multiplication and a library of adder and multiplier structures

Fast integer arithmetic comes from the number system as much as from the
gates. This RTL collects one worked example of that idea and a library of
the classic structures around it.

* **The example** is an 8-bit two's complement multiplier that computes
  internally in **radix-2 signed digits** (digits -1, 0 and +1). Each partial
  product is a signed-digit number, so adding two of them needs no carry
  chain. The only carry-propagating adder in the multiplier is the final
  converter back to two's complement.
* **The library** holds eleven two-operand adders, four multi-operand adders,
  a parallel multiplier built from a chosen partial product generator
  (PPG), partial product accumulator (PPA) and final stage adder (FSA), a
  constant-coefficient multiplier using canonic signed digits (CSD), and a
  multiply accumulator (MAC).

Everything is combinational. There is no clock, no register and no reset.
Each output is a pure function of the current inputs.

## Number representations

Nearly everything in the design follows from how numbers are represented
in wires. Package `arith_pkg` defines the representations.

| Name | Digit set | Weight of digit i | Wires per digit | Value |
|---|---|---|---|---|
| unsigned binary (UB) | {0,1} | 2^i | 1 | ordinary |
| two's complement (TC) | {0,1} | 2^i, MSB -2^(n-1) | 1 | ordinary |
| SD2,1 (`sd2_digit_t`) | {-1,0,1} | 2^i | 2: `p`, `n` | `p - n` |
| SD4,2 (`sd4_digit_t`) | {-2..2} | 4^i | 3: `s`, `d1`, `d0` | `(s ? -1 : 1) * (2*d1 + d0)` |

An SD2,1 number is therefore a pair of binary words: the positive bits
`Fp` and the negative bits `Fn`, with value `Fp - Fn`. `p = n = 1` is a
legal, redundant zero. In an SD4,2 (Booth) digit, `d1` and `d0` are one-hot
magnitude bits. Zero is always coded with `s = 0`.

The multi-operand adders reduce their operands to a **carry-save pair**
`(s, c)` whose sum, modulo 2^W, equals the sum of the operands. All word
arithmetic inside the trees is modulo 2^W: the carry out of the top bit is
dropped. The caller picks W large enough for the exact result. A
multiplier, for example, uses W = 2N. Negative partial products therefore
need no sign-extension tricks; two's complement wrap-around does the work.

## The 8-bit SD2,1 multiplier (`sd_mult`)

```
 X (8b TC) ──► booth_encoder ──► B: 4 radix-4 digits in {-2..2}
                                    │
 Y (8b TC) ──────────────────► sd_ppg ──► PP0..PP3: SD2,1 rows
                                    │      digits [8:0] [10:2] [12:4] [14:6]
                              sd_accumulator ──► F: SD2,1, digits [15:0]
                                    │      RBA0 = PP0+PP1, RBA1 = PP2+PP3, RBA2
                                  sd2tc ──► P (17b TC) = X * Y
```

`N` (default 8) may be any even number ≥ 4. The digit ranges then scale to
`PP[i]` over `[2i+N : 2i]`, F with 2N digits, and P with 2N+1 bits.

**Booth encoder.** Digit i is `-2*x[2i+1] + x[2i] + x[2i-1]` with
`x[-1] = 0`. This is standard radix-4 recoding, so `sum B{i}*4^i = X`.

**Partial product generator.** Row i is `B{i} * Y`. Each output digit is
chosen from one bit of Y: bit k when |B| = 1, bit k-1 when |B| = 2. Its sign
is the sign of B, flipped when the chosen bit is the MSB of Y (that bit has
negative weight in TC). Every product digit therefore lands in {-1,0,1}
without any addition. Row i has N+1 digits, weighted 2^(2i) to 2^(2i+N).
`sd_ppg` places each row in a 2N-digit frame, with zero digits outside its
range.

**Redundant-binary adder (`rba`, `digit_rba`).** This is the heart of the
design. Each digit slice contains two full adders:

```
stage 1:  2*c1 + s1 = x.p + y.p + ~x.n
stage 2:  2*c2 + s2 = s1 + ~y.n + c1_in           nc = ~c2
digit:    z = (p: s2, n: nc_in)
invariant: 2*c1 - 2*nc + z = x + y + c1_in - nc_in
```

`c1` is a positive carry, and depends only on the slice's own digits. `nc`
is a negative carry, and depends on those digits and on `c1_in`. `nc_in`
goes straight into the sum digit. No carry therefore moves more than one
digit. The adder has a depth of two full adders at any width, and its
result has one digit more than its operands. `rb_adder_tree` builds a
balanced tree of these adders.

**Accumulator.** Four rows are summed by three RBAs in two levels. F keeps
digits 0..2N-1 and drops the carry digit above them. That is exact modulo
2^(2N), and the product always fits 2N-bit two's complement: for N = 8 it
lies in [-16256, 16384].

**Converter (`sd2tc`).** The converter splits F into `Fp` and `Fn`,
inverts `Fn`, and adds `Fp + ~Fn + 1` in a ripple carry adder with
carry-in 1. The 2N-bit result is then sign-extended to the 17-bit P.

## Two-operand adders

All adders share one interface and one function, `{cout, s} = a + b + cin`,
with width `W` (default 64). `two_operand_adder` selects one through
`ALG` (`arith_pkg::adder_alg_e`).

| `ALG` | module | structure |
|---|---|---|
| `ADD_RCA` | `rca` | chain of `full_adder` |
| `ADD_CLA` | `cla_adder` | each carry as one flat sum of products of g/p |
| `ADD_RB_CLA` | `ripple_block_cla` | 4-bit `cla_adder` blocks, block carries ripple |
| `ADD_BLOCK_CLA` | `block_cla` | 4-bit blocks, second lookahead level over block G/P |
| `ADD_KS` | `kogge_stone_adder` | prefix, log2 W levels, span doubling at every position |
| `ADD_BK` | `brent_kung_adder` | prefix, up-sweep then down-sweep |
| `ADD_HC` | `han_carlson_adder` | Kogge-Stone on odd positions, one extra level for even ones |
| `ADD_CSEL` | `carry_select_adder` | 4-bit blocks computed for both carry-ins, then muxed |
| `ADD_CSUM` | `conditional_sum_adder` | conditional sums merged by recursive doubling |
| `ADD_CSKIP` | `carry_skip_adder` | 4-bit ripple blocks with a skip mux |
| `ADD_VCSKIP` | `var_carry_skip_adder` | skip blocks growing 2, 3, 4 … from both ends |

The prefix adders and lookahead adders are written as loops in
`always_comb` over generate/propagate vectors. The loop order fixes the
prefix network. The block sizes (4, and 2 for the first variable skip
block) are parameters.

## Multi-operand adders

Interface: `ops[N][W]` in, a carry-save pair `s`, `c` out. `csa` is a row of
full adders (3 → 2). `compressor42` is two full adders per bit, with the
lateral carry moving one bit left (4 → 2). `multi_operand_adder` selects a
tree through `ALG` (`arith_pkg::moa_alg_e`).

* `array_adder` chains N-2 CSAs in a line. It is the smallest and slowest.
* `wallace_tree` applies CSAs to groups of three, level by level. An
  elaboration-time function gives the operand count of each level, and a
  generate loop builds one level per iteration.
* `compressor42_tree` applies (4;2) compressors to groups of four. A
  remainder of three goes through one CSA. It is built the same way.
* `rb_addition_tree` turns each operand pair (a, b) into one signed-digit
  number with positive bits a and negative bits ~b, at no cost. The value
  of that number is a+b+1 (mod 2^W). An RB adder tree then sums these
  numbers. The outputs are `s = p` and `c = ~n`. A constant operand,
  `1 - pairs`, cancels the +1 of every pair and the -1 of the output
  pairing, and synthesis folds it away.

## Multipliers, constant multiplier, MAC

**`par_mult`**: `p = x * y`, 2N bits. The parts are selected by parameters:

* `SIGNED` (UB or TC operands);
* `BOOTH` (non-Booth or radix-4 Booth), chosen in `mult_ppg`;
* `PPA`, the tree;
* `FSA`, the final adder.

The default is 32 bits, unsigned, Booth, RB tree and carry lookahead. A
negative row is generated as `(~m) << k`, which lacks `2^k`. Those `2^k`
terms are constants or the Booth sign bits, and all of them go into one
extra correction row. For Booth, X is extended by two bits so that unsigned
operands need no special case. This costs one extra digit.

**`const_mult`**: `p = R * x` with `R` a signed constant of up to 32 bits
(default 299792458). R is recoded into CSD at elaboration by a function. No
two adjacent digits are non-zero, so at most about RW/2 rows exist. Each
non-zero digit contributes `x << k` or `(~x) << k`. The output is N+RW bits
of two's complement, enough for any R and x.

**`mac`**: `p = x0*y0 + x1 + x2`. The partial products of x0*y0 and the two
addends go through one PPA and one FSA. 2N bits are exactly enough: the
unsigned maximum is 2^(2N) - 1. The default is 32-bit unsigned, Booth,
Wallace tree and ripple carry.

## Top level (`arith_top`)

The units are independent and stand side by side, each with its own ports:

| ports | unit |
|---|---|
| `sdm_x`, `sdm_y` → `sdm_p[16:0]` | `sd_mult`, N = 8 |
| `add_a`, `add_b`, `add_cin` → `add_s[11][64]`, `add_cout[11]` | all eleven adders at 64 bits, index = `adder_alg_e` |
| `moa_ops[32][32]` → `moa_s[4][37]`, `moa_c[4][37]` | four 32-operand adders (index = `moa_alg_e`), operands zero-extended to 37 bits |
| `mul_x`, `mul_y` → `mul_p[63:0]` | `par_mult` defaults |
| `cm_x` → `cm_p[63:0]` | `const_mult` defaults |
| `mac_x0`, `mac_y0`, `mac_x1`, `mac_x2` → `mac_p[63:0]` | `mac` defaults |

## Where this departs from the reference description

* **Bit encodings of signed digits are this design's own.** The reference
  splits SD4,2 digits into three wires and SD2,1 digits into two, but it
  leaves the encoding to the target technology.
* **Internal structure of the RB digit slice.** The reference gives a slice
  with two carries in and two out. The two-full-adder realisation, with one
  positive and one negative carry, is this design's own.
* **Accumulator tree pairing.** The pairing (PP0+PP1, PP2+PP3) is read from
  the layout of the RBAs. The RBAs here span the whole frame with constant
  zero digits, instead of only the digits each row occupies.
* **Trees not built.** The Dadda, (7,3)-counter, overturned-stairs and
  balanced-delay trees are not built. The MAC default therefore uses a
  Wallace tree where the reference configuration has an overturned-stairs
  tree.
* **Constant multiplier accumulator.** The signed-weight accumulator that
  the reference pairs with CSD is not built. The CSD rows are summed by an
  ordinary carry-save tree, so the constant multiplier is functionally
  complete, but its structure differs.
* **Unstated choices.** Block sizes, the variable-skip size sequence, the
  default algorithms of the constant multiplier, and signed or unsigned
  defaults were not given and were chosen here.
* **Combinational only.** No pipelining or timing targets are modelled.
  Area and delay depend on the synthesis tool and library.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares against arithmetic computed by the simulator and prints
`TB_RESULT checks=N failures=M`. The coverage is:

* exhaustive for the full adder, the Booth digit, the PPG digit and the RB
  digit;
* all 65536 operand pairs for the 8-bit multiplier;
* random and corner-case operands elsewhere.

`tb_arith_top` runs the whole top at its built-in sizes. It also counts
that every mechanism occurred: each Booth digit value, negative signed
digits, negative products, carry-skip bypasses, carry-select blocks with
carry-in 1, and so on.

With plain Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/arith_pkg.sv \
          tb/tb_sd_mult.sv --top-module tb_sd_mult -o sim
./obj_dir/sim
```

Replace `tb_sd_mult` with any other testbench. `tb_arith_top` takes about
a minute, most of it compile time. The others take seconds.

Lint: `verilator --lint-only -Wall -y rtl rtl/arith_pkg.sv rtl/<module>.sv`.
The warnings that remain are about unused carry-outs and top digits.
These are dropped on purpose in the modulo-2^W arithmetic.

## Changing the design

* Width and algorithm are parameters: `two_operand_adder #(.W(32),
  .ALG(ADD_BK))`, or `par_mult #(.N(16), .SIGNED(1), .BOOTH(0),
  .PPA(MOA_C42), .FSA(ADD_HC))`.
* To add an adder, give it the common port list, add an enum value to
  `adder_alg_e`, and add a branch to `two_operand_adder`. Multi-operand
  trees work the same way through `moa_alg_e` and `multi_operand_adder`.
* `sd_mult #(.N(16))` builds a 16-bit signed-digit multiplier. N must be
  even.
