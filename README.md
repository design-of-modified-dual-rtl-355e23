# Modified dual-CLCG pseudorandom bit generator

A hardware pseudorandom bit generator that produces one bit on every clock
from four linear congruential generators (LCGs) arranged as two coupled pairs.

Each pair is compared: bit **B** says whether `x > y`, bit **C** whether
`p > q`. The classic *dual-CLCG* scheme keeps B only when C is 0. It therefore
emits bits at irregular times, and it needs a buffer and a controller to
smooth the output into a steady stream. This generator combines the two
bits with an XOR instead:

```
x(i+1) = (a1*x(i) + b1) mod 2^N        y(i+1) = (a2*y(i) + b2) mod 2^N
p(i+1) = (a3*p(i) + b3) mod 2^N        q(i+1) = (a4*q(i) + b4) mod 2^N
B(i) = x(i+1) > y(i+1)                 C(i) = p(i+1) > q(i+1)
Z(i) = B(i) xor C(i)
```

No bit is dropped, so the output rate is exactly one bit per clock. The first
bit appears one clock after the seeds are applied. Apart from the four N-bit
state registers, the design has no storage. The default width is N = 8.

## Block structure

```
           x0        y0              p0        q0
            |         |               |         |
         [ LCG x ] [ LCG y ]       [ LCG p ] [ LCG q ]     4 x (mux, shift, CSA, register)
            |  x      |  y            |  p      |  q
            +--[ COMP1: x > y ]       +--[ COMP2: p > q ]  N-bit tree comparators
                     | B                       | C
                     +---------( XOR )---------+
                                  |
                                  zi
```

| module               | role |
|----------------------|------|
| `modified_dual_clcg` | top: four LCGs, two comparators, the output XOR |
| `lcg`                | one shift-and-add LCG with a seed multiplexer and a state register |
| `csa3_adder`         | three-operand modulo-2^N carry-save adder |
| `full_adder`         | one-bit full adder, the only cell the adder uses |
| `mag_comparator`     | N-bit magnitude comparator, a tree of 2-bit cells |
| `comp2_cell`         | 2-bit magnitude comparator cell |

## The LCG without a multiplier

Each multiplier is restricted to `a = 2^R + 1`. Then
`a*x + b = (x << R) + x + b`, so the multiply costs only wiring (a fixed
left shift). The whole update is a single three-operand addition modulo
2^N. The LCG is made of four parts:

1. a 2:1 multiplexer that selects either the seed or the register's own
   output;
2. the shift by R;
3. the three-operand adder, which sums `x << R`, `x` and the constant `b`;
4. an N-bit register.

The shift is free, so the critical path is the multiplexer plus the adder.

### Three-operand carry-save adder

`csa3_adder` uses 2N-1 full adders arranged in two rows:

* **Carry-save row.** N full adders, one per bit. Each reduces the three
  operand bits at its position to a partial-sum bit and a carry bit. The
  carry bit has twice the weight of its position.
* **Ripple row.** N-1 full adders for bits 1 to N-1. Each adds the partial
  sum of its own bit and the carry from the bit below. The carry into bit 1
  is 0.

Bit 0 of the result is the partial sum of bit 0 directly. Every carry that
leaves bit N-1 is dropped, and this is the modulo-2^N reduction. The delay
is one full adder plus an (N-1)-stage ripple.

## The comparator tree

`mag_comparator` compares two N-bit unsigned numbers with N-1 copies of one
cell, `comp2_cell`. The cell compares two 2-bit numbers and raises `a_big`
(A > B) or `b_big` (A < B); both are low when A = B.

* **Leaves.** N/2 cells each compare one aligned bit pair of A with the
  same pair of B.
* **Merge levels.** The pair (`a_big`, `b_big`) is itself a valid 2-bit
  encoding of "greater, less or equal". So the same cell can merge two
  neighbouring results:
  * the more significant result drives the cell's bit-1 inputs;
  * the less significant result drives its bit-0 inputs.

  The high field decides unless its two halves are equal.

After log2(N) levels (three for N = 8), one cell gives the final result. The
generator uses only the A > B output.

If N is not a power of two, both operands are zero-extended to the next
power of two inside the comparator. The result does not change.

## Interface and timing

Ports of `modified_dual_clcg`:

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `clk`           | in  | 1     | clock; all four registers load on every rising edge |
| `start`         | in  | 1     | 0: iterate from the seeds; 1: run |
| `x0 y0 p0 q0`   | in  | N     | seeds |
| `zi`            | out | 1     | output bit |

The design has no reset.

* **Seeding.** While `start` is low, every LCG loads `f(seed)` on each
  clock. One clock after the seeds are presented, `zi` shows Z(0). Holding
  `start` low keeps `zi` at Z(0).
* **Running.** With `start` high, each clock advances all four LCGs, and
  `zi` shows Z(1), Z(2), and so on.
* **Restarting.** Dropping `start` for one clock restarts the sequence from
  whatever seeds are on the inputs.

`zi` is combinational from the four registers: it passes through a
comparator and one XOR. Register it downstream if it must leave the chip
cleanly.

Parameters:

| parameter     | default      | meaning |
|---------------|--------------|---------|
| `N`           | 8            | word width; the modulus is 2^N |
| `R1`..`R4`    | 2, 2, 2, 2   | `ak = 2^Rk + 1`, so every `ak` is 5 by default |
| `B1`..`B4`    | 5, 3, 1, 7   | the additive constants `bk` |

## Choosing constants, and the period

Each LCG reaches its full period of 2^N when two conditions hold:

* `bk` is odd, which makes it coprime to 2^N;
* `ak - 1` is divisible by 4, which means `Rk >= 2`.

The default constants meet both conditions for every N. With all four LCGs
at full period, the state of the whole generator repeats after 2^N clocks.
So the output repeats after 2^N bits, or after a divisor of 2^N. At N = 8,
the end-to-end test checks that the output period is exactly 256 bits for
five seed sets.

A 3-bit worked example fixes the arithmetic:

* constants: all `a = 5`; `b = 5, 3, 1, 7`;
* seeds: `(x0, y0, p0, q0) = (2, 7, 3, 4)`;
* expected output: `B = 10111000`, `C = 00110110`, so `Z = 10001110`.

`tb_example_n3` runs the generator at N = 3 and reproduces all three
sequences.

No constants chosen specifically for N = 8 are built in; the defaults are
the example's. Choose your own constants and seeds for any real use. Like every
LCG-based generator, this one is not a vetted cryptographic primitive.

## Where this RTL makes its own choices

These points are decisions of this implementation:

* **`start` polarity.** Low selects the seed, high selects feedback.
* **No reset.** The state is initialised by holding `start` low for at
  least one clock.
* **Default constants.** They are the worked example's values.
* **Tree wiring.** How the comparator tree feeds its upper levels, and the
  zero-extension for widths that are not a power of two.
* **Gate equations.** The 2-bit comparator cell and the full adder are
  written as standard equations, not as particular gate netlists.

The original dual-CLCG with its output buffer and memory is the scheme this
design replaces, and is not included.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<n>` and stops itself through a watchdog.

| testbench               | what it checks |
|-------------------------|----------------|
| `tb_full_adder`         | all 8 input combinations |
| `tb_comp2_cell`         | all 16 operand pairs |
| `tb_csa3_adder`         | N=8: all `a`,`b` pairs against 12 values of `c`; N=3: exhaustive |
| `tb_mag_comparator`     | N=8 exhaustive, N=3 exhaustive, N=16 random including one-bit differences |
| `tb_lcg`                | the four 3-bit example sequences; two 8-bit LCGs (a=5 and a=9) against `a*x+b mod 256` computed by multiplication, with full period 256; one-clock seeding latency, hold and mid-run restart |
| `tb_modified_dual_clcg` | default top (N=8) against an integer reference model over two periods for five seed sets, including a 256-bit output period, one-clock latency, hold and restart; all four (B, C) combinations into the XOR are counted |
| `tb_example_n3`         | the 3-bit worked example: B, C and Z for three periods |

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
          tb/tb_modified_dual_clcg.sv --top-module tb_modified_dual_clcg
./obj_dir/Vtb_modified_dual_clcg
```

Every testbench finishes in well under a second.

Lint reports four unused signals, all intentional:

* two in `csa3_adder`: the carries out of the top bit, which are dropped
  to reduce modulo 2^N;
* two in the top: the comparators' A < B outputs, which the generator does
  not use.
