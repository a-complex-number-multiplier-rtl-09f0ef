# Radix-4 redundant binary complex multiplier-accumulator

A complex product `(A + jB)(C + jD) = R + jI` normally takes four real
multiplications. This design uses three:

```
m0 = (C - D) * B      m1 = (A - B) * C      m2 = (A + B) * D
R  = m1 + m0          I  = m2 + m0
```

Usually the cost of this trick is three extra carry-propagate additions in
front of the multipliers. Here those additions cost almost nothing. Each sum
or difference is never carried out in binary. It is written straight away as a
*redundant binary* (RB) number, which takes only inverters. A small recoder
then turns that RB number into radix-4 digits in {-2, -1, 0, +1, +2}. These are
the same digits a Booth recoder gives, so they drive an ordinary radix-4
multiplier array. All adding inside the multipliers and the accumulator is done
in RB form, with no carry chains. The single carry-propagate adder in each lane
is the 41-bit converter at the very end.

The RTL is a 16 x 16-bit complex multiply-accumulate unit with 41-bit results
and three pipeline stages. It accepts one operation per clock.

## Binary signed digits and their two-bit code

Each RB digit is a binary signed digit (BSD) in {-1, 0, +1}. It is stored as
two bits, a minus bit `n` and a plus bit `p`, and its value is `n + p - 1`:

| n p | value |
|-----|-------|
| 0 0 | -1    |
| 0 1 | 0     |
| 1 0 | 0     |
| 1 1 | +1    |

This code is what the whole design rests on. Take any two binary words, put one
in the `n` bits and the other in the `p` bits, and you have an RB number whose
value is their sum less a known constant. Invert one of the words and you get
their difference.

- **Sum and difference coder** (`rb_coder`). Let A and B be 16-bit two's
  complement numbers. Below the sign position, digit i is `(a_i, b_i)` for
  A + B and `(a_i, ~b_i)` for A - B. At the sign position the bits are
  `(~a_15, ~b_15)` for a sum and `(~a_15, b_15)` for a difference. A
  correction digit g of weight 1 completes the value: g = -1 for a sum,
  0 for a difference. So `A ± B = sum d_i 2^i + g` holds exactly.
- **Halving the partial products.** The same pairing joins two binary partial
  products into one RB number at no cost. The multiplier's adder tree therefore
  starts from half as many operands.
- **Conversion back to binary** (`rb_to_bin`). Modulo 2^W, an RB number equals
  `Nbits + Pbits + 1`. So one W-bit adder with carry-in 1 converts it. With
  carry-in 0 the same adder simply adds two binary words.

`cmac_pkg` defines the digit as `bsd_t` and a one-hot radix-4 digit as `r4_t`.

## Recoding an RB number into radix-4 digits

This is the part that needs the most care. Booth-style scanning of digit pairs
`2*x_{2k+1} + x_{2k}` does not work directly on an RB number: a pair can be
+3 or -3. The recoder first adds two constants whose sum is zero:

```
F = ...0(-1)0(-1)      (-1 at every even position)
G = ...0 1 0 1         (+1 at every even position)
Y = (X + F) + G        (same value as X)
```

Each addition is a two-step, carry-free RB addition, so neither one ripples.

1. **After adding F**, every even digit `w_2k` is -1 or 0, never +1. Step 1
   picks the sum and transfer digits for each position. For an even position
   whose digit is 0, the choice depends on whether the transfer arriving from
   the odd position below can be -1.
2. **After adding G**, every even digit `y_2k` is 0 or +1, never -1. Also,
   `y_{2k+1} = +1` can only happen together with `y_2k = 0`.

So `sigma_k = 2*y_{2k+1} + y_2k` is always in {-2..+2}.

In gates, both filtering steps reduce to a few signals per radix-4 position
(`bsd_recoder_cell`). Here `r_i = x_i^n XOR x_i^p` means "digit i is zero",
and `rn_i` is its complement:

```
p_{2k+1}   = (x_2k != -1)(x_{2k-1} != -1) + (x_2k == +1)     step-1 transfer out of 2k is 0
q_{2k+1}   = r_2k (x_{2k-1} == -1) + ~r_2k (x_{2k-1} == +1)
y_2k       = (r_2k XOR (x_{2k-1} != -1)) XOR (rn_{2k-1} p_{2k-1})      (0 or 1)
y_{2k+1}^n = rn_{2k+1} XOR p_{2k+1}
y_{2k+1}^p = p_{2k-1} q_{2k+1}
```

A cell reads three digits: 2k+1, 2k and 2k-1. It also takes `p_{2k-1}` and
`rn_{2k-1}` from the cell below and passes `p_{2k+1}` and `rn_{2k+1}` to the
cell above. The delay through the chain stays a few gates no matter how wide
the operand is. Each cell decodes its digit onto five one-hot lines.

`bsd_recoder` chains nine cells to cover a 16-digit operand. Filtering can move
weight up by one position, so a 16-digit operand needs 9 radix-4 digits, not 8.
The coder's correction digit g enters as the digit just below position 0, with
`p_{-1}` tied to 0. A -1 there produces exactly the -1 transfer into position 0
that the first filtering step would see. This is how the constant is absorbed
without an adder.

## Carry-free RB adder

`rb_adder_digit` adds two digits in two steps. First `x_i + y_i = 2*k_i + s_i`,
then `z_i = s_i + k_{i-1}`. For an odd sum (±1), the split into `k_i` and `s_i`
looks at a flag from the position below. The flag says whether that position's
transfer lies in {0, 1} or in {-1, 0}. With this split, `z_i` can never be ±2.

The transfer travels on one wire `c_i`, together with the flag `tn_i`, and
its value is `k_i = c_i - tn_i`. With this encoding the sum digit's plus bit
is just the incoming `c_{i-1}`:

```
tn_i  = ~((x^n | x^p) & (y^n | y^p))          a -1 is among the inputs
c_i   = odd ? ~tn_{i-1} : (x^n x^p) | (y^n y^p)
z_i^n = ~(odd XOR tn_{i-1})       z_i^p = c_{i-1}
```

Here `odd` is the XOR of the four input bits. `rba` is a row of these cells.
The transfer out of the top digit is dropped, so the result is exact modulo
2^W.

**Every RB adder in this design, and the final converter, works modulo 2^41.**
The binary result is therefore exact whenever it fits in 41 bits, and it
wraps otherwise.

## The real multipliers

`rb_multiplier` = `ppg` + a three-level RBA tree, with the stage-1 pipeline
register inside it.

- **Partial products** (`ppg`). Each of the 9 digits selects 0, ±M or ±2M
  of the binary multiplicand M. A negative row is produced as the bitwise
  inverse of the magnitude. Its missing +1 goes into the empty low bits of the
  next row, at bit 2k. The last row's +1 has no next row, so it goes into a
  tenth word `Z`. Z also holds the constant that cancels the +1 bias each
  n/p pairing introduces: `Z = neg_8 * 4^8 - 5 (mod 2^41)`. Z is one of two
  constants selected by `neg_8`, so it needs no adder. The ten words pair up
  into 5 RB numbers.
- **Tree.** Level 1 computes `pp0+pp1` and `pp2+pp3`. Level 2 adds those two
  sums. Then comes the pipeline register, which holds the level-2 sum and pp4.
  Level 3 adds them and gives the RB product.

## Accumulation, conversion and pipeline

`cmac_lane` is instantiated twice: one lane for R (`m1 + m0`) and one for I
(`m2 + m0`). It contains:

- the 4th-level RBA, which adds the two products;
- the Acc RBA, which adds the accumulator (or zero, for a direct
  multiplication);
- the accumulator register;
- a mux that selects either the accumulator or two binary operands;
- the 41-bit converter/adder;
- the output register.

| stage | logic                                                        | register at its end       |
|-------|--------------------------------------------------------------|---------------------------|
| 1     | coders, recoders, partial products, RBA levels 1-2           | pipeline registers        |
| 2     | RBA level 3, 4th-level RBA, Acc RBA                          | accumulator registers     |
| 3     | mux, 41-bit converter / adder                                | output registers          |

The accumulator loop is a single RB adder inside one stage. Back-to-back MACs
therefore never stall.

## Interface (`cmac_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst_n`     | in  | 1     | asynchronous active-low reset of every register |
| `in_valid`  | in  | 1     | an operation is presented in this cycle |
| `op`        | in  | `op_e` | `OP_MUL`, `OP_MAC` or `OP_ADD` |
| `a b c d`   | in  | 16    | two's complement operands, A + jB and C + jD |
| `out_valid` | out | 1     | `r` and `i` hold a result |
| `r`, `i`    | out | 41    | two's complement result, modulo 2^41 |

- `OP_MUL`: accumulator ← (A+jB)(C+jD). The output is that product.
- `OP_MAC`: accumulator ← accumulator + (A+jB)(C+jD). The output is the new
  accumulator.
- `OP_ADD`: output R = A + C and I = B + D, computed by the converter/adder.
  The accumulator is left unchanged.

**Timing.** An operation sampled at rising edge t appears on `r`/`i` with
`out_valid` after edge t+3. A new operation may be issued at every edge. Idle
slots (`in_valid = 0`) leave the accumulator alone.

Parameters: `N = 16` (operand width), `W = 41` (result width),
`ND = N/2 + 1` (radix-4 digits). Most modules take other sizes. The
multiplier's adder tree, however, is written for five RB numbers, so `N` must
be 14 or 16.

## What is specified and what is chosen here

These parts come from the source description of this multiplier:

- the three-multiplication equations and which operand pairs feed which
  multiplier;
- the digit code and the sum/difference coding;
- the F/G filtering and the recoder's p, q and y signals;
- the 9 radix-4 digits and the three-level tree;
- the 4th-level adder, the accumulation adder and the 41-bit converter;
- the three register stages and their positions.

These are this design's own choices:

- **Recoder equations.** The equations for `y_2k` and `y_{2k+1}^n`, and the
  five one-hot decodes, are written as derived here from the two filtering
  additions, and the derivation is verified exhaustively.
- **Correction digit g.** The recoder takes g in as digit -1 with
  `p_{-1} = 0`.
- **RB adder.** The logic of the adder digit, and the `c - tn` encoding of its
  transfer, were derived from the two-step rule and the adder's port names.
- **Booth decoders.** The neg-bit placement and the constant word Z are
  original to this design. The source only names the decoders.
- **Widths.** Every RB adder is 41 digits wide and works modulo 2^41. A
  silicon design would trim the lower tree levels to fewer digits.
- **Control.** The operation encoding, `in_valid`/`out_valid`, zero fed to
  the accumulation adder for a direct multiplication, and the reset are all
  choices made here.
- **`OP_ADD`.** The source shows the four operands wired into the mux in front
  of the converter, but does not say what that path computes. Here it is read
  as a complex addition. Each lane therefore uses only two of the four
  operands: A and C for R, B and D for I. The operands are delayed to
  stage 3 so that an ADD has the same three-cycle latency as a
  multiplication.
- **Overflow.** There is no saturation and no overflow flag. Results wrap
  modulo 2^41. The worst-case product magnitude is about 2^31, so at least
  512 worst-case products can be accumulated before a wrap.

The source also places this unit inside a complex-number DSP, which supplies
the operands and the operation. That processor is not described, so its
interface is simply the ports above. Transistor-level details (drivers, area,
clock rate of the original 1.2 µm chip) are not modelled.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it proves |
|-----------|----------------|
| `tb_rb_coder` | sum/difference + g equals A ± B exactly; exhaustive at 6 bits, random at 16 |
| `tb_bsd_recoder_cell` | all 4^5 digit codings against an integer model of both filtering additions |
| `tb_bsd_recoder` | sum of sigma_k 4^k = X + g, exactly one hot line per digit; exhaustive at 4 digits, random at 16; all five digit values occur |
| `tb_rb_adder_digit` | `x + y + k_in = 2 k_out + z` for all 64 input cases |
| `tb_rba` | random 41- and 6-digit additions modulo 2^W, plus a 16-step accumulation chain |
| `tb_ppg` | the 5 RB numbers sum to M × operand mod 2^41, including all-negative rows |
| `tb_rb_multiplier` | product one edge after the inputs, and not before |
| `tb_rb_to_bin` | conversion and binary-add modes |
| `tb_cmac_lane` | random MUL/MAC/ADD/idle stream against an integer model, two-edge latency |
| `tb_cmac_top` | end to end at full size, see below |

`tb_cmac_top` runs the full 16/41-bit design with default parameters. Its
reference is the plain four-multiplication formula `R = AC - BD`,
`I = AD + BC`. The test runs in three phases:

1. corner operands (±2^15 extremes);
2. about 6000 random MUL/MAC/ADD/idle slots;
3. 601 worst-case MACs, enough to wrap the accumulator.

It checks the three-edge latency on every slot. It counts direct
multiplications, accumulations, back-to-back MACs, ADDs, idle slots,
accumulator wraps, and, for each of the three recoders, multiplications whose
recoded operand contains each digit value -2..+2. Those digit counts come from
an integer model of the recoding inside the testbench, so the test touches
only the design's ports. Any of these that never occurs counts as a failure. The top-level
assertion `a_lanes_in_step` checks that the two lanes stay in lock step.

To simulate one testbench with Verilator 5, from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cmac_pkg.sv tb/tb_cmac_top.sv --top-module tb_cmac_top
./obj_dir/Vtb_cmac_top
```

Every testbench finishes within a few seconds.
