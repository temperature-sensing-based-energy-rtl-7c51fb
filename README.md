# Anurupyena Shunyamanyat multiplier

A small clocked multiplier built on the Vedic rule *Anurupyena Shunyamanyat*
("proportionately"). The rule multiplies two numbers that lie near a
convenient base by working with their distances from that base, not with
the numbers themselves. A base such as 50, 60 or 200 is not a power of ten.
The rule treats it as a power of ten times a ratio (50 = 100 x 1/2) and
applies that ratio to one half of the result. The default build multiplies
two 6-bit operands around the base 50 and returns a 15-bit product one clock
later.

## The rule, on the standard example

Take 46 x 43 with working base W = 50, written as theoretical base T = 100
times the ratio 1/2.

| step | formula | value |
|------|---------|-------|
| deviations | a - W, b - W | -4, -7 |
| cross-sum | a + (b - W), which equals b + (a - W) | 39 |
| proportion | cross-sum x 1/2 | 19.5 |
| left part | whole part, in units of T | 19 |
| carried half | 0.5 x T = 50, moved to the right part | 50 |
| right part | carried half + (-4) x (-7) | 78 |
| product | 19 x 100 + 78 | **1978** |

The identity behind it is `a*b = (a + (b - W))*W + (a - W)*(b - W)`. The
rule's contribution is to write `W` as `T * NUM / DEN`. The left part then
only needs a small scaling by `NUM/DEN`. The right part needs only the
product of two small deviations.

## How the datapath does it (`anurupyena_core`)

The core is purely combinational. It works in signed arithmetic of width
`IW = 2*WIDTH_IN + 2*clog2(T*NUM+1) + 4`, which is 30 bits at the defaults:

```
a_dev     = a - W             b_dev = b - W
cross_sum = a + b_dev
scaled    = cross_sum * NUM
left      = floor(scaled / DEN)
rem       = scaled - left*DEN          (0 <= rem < DEN)
right     = rem * (T/DEN) + a_dev * b_dev
p         = left * T + right
```

Three details need care. The testbenches exercise each of them.

- **Carried fraction.** When `scaled` is not a multiple of `DEN` (an odd
  cross-sum for base 50), the fraction left over is not dropped. It goes
  into the right part as `rem * T/DEN`. This is the 50 in the example.
- **Carry and borrow of the right part.** In the pencil-and-paper form, the
  right part has as many digits as T has zeros. A deviation product of 100 or
  more carries into the left part. A negative deviation product, with one
  operand above the base and one below, borrows from it. Here the final
  `left*T + right` addition settles both cases, so the right part is kept as a
  wide signed number, not as digits.
- **Operands far from the base.** With 6-bit operands, the cross-sum goes
  negative when both operands are small (0 x 0 gives -50). Division in
  SystemVerilog truncates toward zero, so the core corrects the quotient to a
  floor and keeps the remainder non-negative. The result is therefore exact for
  every operand pair, not only for those near the base.

`left_part` and `right_part` are brought out as ports. They show the two
halves of the Vedic result and satisfy `p = left_part*T + right_part`.

The deviation product `a_dev * b_dev` uses the ordinary `*` operator. No
particular small multiplier is prescribed for it.

## Top level and timing (`anurupyena`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `A` | in | 6 | first operand |
| `B` | in | 6 | second operand |
| `clock` | in | 1 | rising-edge clock |
| `S` | out | 15 | `A*B`, zero-extended |

The top wraps the core and registers the product on the rising edge of
`clock`. A and B presented before an edge appear multiplied on `S` after that
edge. The latency is one clock and a new pair can be accepted every clock.
There is no reset, and `S` is undefined until the first edge. Example:
A = 46 (`101110`), B = 43 (`101011`) gives S = 1978 (`000011110111010`).

At the defaults, synthesis gives a 15-bit register plus a few adders and
multiply-accumulate cells. All the constants are fixed at elaboration.

## Parameters

Both modules take the same parameters. Their defaults live in
`anurupyena_pkg`.

| parameter | default | meaning |
|-----------|---------|---------|
| `WIDTH_IN` | 6 | operand width |
| `WIDTH_OUT` | 15 | product width, must be at least `2*WIDTH_IN` |
| `THEO_BASE` | 100 | theoretical base T, a power of ten |
| `RATIO_NUM` | 1 | working base W = T x NUM / DEN |
| `RATIO_DEN` | 2 | must divide T |

Other bases come from other settings. Base 60 is `T=10, NUM=6, DEN=1`, and
base 200 is `T=100, NUM=2, DEN=1`. Because the result is exact for any
operand, the choice of base changes only the split into left and right parts
and the sizes of the internal values, never the product.

## Where this departs from the source description, and what is assumed

- The operand width is 6 bits, as on the multiplier's symbol and in the
  example waveform. The same example is also quoted with operands written as
  8-bit literals. Setting `WIDTH_IN=8, WIDTH_OUT=16` gives that variant.
  Note that a full 8 x 8 product needs 16 bits, one more than the 15-bit `S`.
- The step-by-step arithmetic, the split of 50 into 100 x 1/2, the signed
  internal width and the floor division are this design's choices. The
  source gives only the rule's purpose, the symbol and one worked example.
- The single output register and the lack of a reset are also this design's
  choices. A clock input is shown, but its latency is not given.
- The original work is about power. It compares the same multiplier on 40 nm
  and 28 nm FPGAs, with LVCMOS12/15/25 I/O standards, at ambient
  temperatures of 50, 40 and 23.3 degrees C. None of that is logic. The I/O
  standard is a pin setting, and temperature is an operating condition: there
  is no temperature sensor in the design. Nothing here models power.

## Verification

| testbench | what it checks |
|-----------|----------------|
| `tb/anurupyena_core_tb.sv` | Every pair for base 50 (6-bit) and base 60 (6-bit), and every pair for base 200 (8-bit). It checks the product against a plain multiplication and checks that the left and right parts recombine. For base 50 it checks the left part against `floor((a+b-50)/2)`, and it checks the example's 19 and 78. It requires at least one carried half, one right-part carry and one right-part borrow. |
| `tb/anurupyena_tb.sv` | Default parameters. It runs the example, checks that S holds before the edge and is right after it, then streams all 4096 pairs at one per clock and checks each product one clock later. It counts the cases where both operands are below the base, both above, one on each side, a carried half, a carry and a borrow, and each must occur. |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

Run with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
  rtl/anurupyena_pkg.sv tb/anurupyena_tb.sv --top-module anurupyena_tb
./obj_dir/Vanurupyena_tb
```

Use `tb/anurupyena_core_tb.sv` and `--top-module anurupyena_core_tb` for the
core test. Both finish in well under a second.

## Files

- `rtl/anurupyena_pkg.sv`: default sizes and base constants
- `rtl/anurupyena_core.sv`: combinational datapath for the rule
- `rtl/anurupyena.sv`: top level, registered product
- `tb/anurupyena_core_tb.sv`, `tb/anurupyena_tb.sv`: self-checking testbenches
