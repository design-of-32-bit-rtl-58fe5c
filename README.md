# 32-bit complex multiply-accumulate unit (Dadda multipliers, CLA adders)

This unit multiplies two complex numbers on every clock edge and adds the
product to a running complex sum. It is the basic step of complex-valued signal
processing: FIR filters, correlators and FFT butterflies on I/Q data. Operands
are 32-bit fixed-point words. Results are kept in 64-bit accumulators, one for
the real part and one for the imaginary part:

    (P + jQ)(R + jS) = (P·R − Q·S) + j(P·S + Q·R)

    realp <= realp + (P·R − Q·S)
    imgp  <= imgp  + (P·S + Q·R)

The aim is a short critical path. The four real products are formed at the
same time by four Dadda tree multipliers. Every wide addition uses a carry
look-ahead adder (CLA) rather than a ripple adder. That covers the final adder
inside each multiplier, the adder or subtractor that combines two products, and
the adder in each accumulator loop.

A second form of the unit can be built with the parameter `FUSED = 1`. In
this form there is no separate accumulator adder. Instead, the previous
result is fed into one multiplier's Dadda tree as an extra partial-product
row (a "multiplier-cum-accumulator"). The time to accumulate then equals the
time of a multiplier. Both forms give identical results on every cycle.
`FUSED = 0`, the default, is the form with separate accumulator adders.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Every module has a
self-checking testbench.

## Datapath

```
        a=P   x=R      b=Q   y=S            b=Q   x=R      a=P   y=S
         |     |        |     |              |     |        |     |
     [sm_multiplier] [sm_multiplier]     [sm_multiplier] [sm_multiplier]
        (Dadda)         (Dadda)             (Dadda)         (Dadda)
            \             /                     \             /
         [cla64bit  a + ~b + 1]              [cla64bit  a + b]
                   |                                  |
         [accumulator: cla64bit + reg]      [accumulator: cla64bit + reg]
                   |                                  |
                 realp                               imgp
```

| module          | role                                                                 |
|-----------------|----------------------------------------------------------------------|
| `mac`           | top level: two lanes, ports `a b x y clock reset realp imgp`         |
| `cmac_lane`     | one lane: two products, add (`SUBTRACT=0`) or subtract (`SUBTRACT=1`), accumulate |
| `sm_mac`        | multiplier-cum-accumulator, `acc + x·y`, with `acc` added inside the Dadda tree (`FUSED = 1` only) |
| `sm_multiplier` | sign-magnitude multiplier: Dadda product of the magnitudes, sign, conversion to two's complement |
| `dadda_mult`    | unsigned N×N Dadda tree multiplier with a CLA final adder; optional extra addend row (`ACC_ROW`) |
| `accumulator`   | CLA adder plus a 64-bit register in a feedback loop                  |
| `cla64bit`      | carry look-ahead adder, `s = a + b + cin`, with carry out            |
| `cla_lcu4`      | 4-bit lookahead carry unit, the cell of the CLA tree                 |
| `mac_pkg`       | shared widths (`DATA_W = 32`, `ACC_W = 64`)                          |

The real lane is `cmac_lane #(.SUBTRACT(1))` with inputs (a0, b0, a1, b1) =
(P, R, Q, S). The imaginary lane is `cmac_lane #(.SUBTRACT(0))` with inputs
(P, S, Q, R). The diagram above shows the imaginary lane's two multipliers
in the other order. Since the lane adds its two products, the order makes no
difference to the default form.

## Multiplier-cum-accumulator form (`FUSED = 1`)

```
   a=P  x=R  realp            a=P  y=S  imgp
     |   |    |                 |   |    |
   [sm_mac: P·R + realp]      [sm_mac: P·S + imgp]    [sm_multiplier] Q·S, Q·R
              |                          |
   [cla64bit  − Q·S]          [cla64bit  + Q·R]
              |                          |
           [reg] -> realp             [reg] -> imgp
```

`sm_mac` computes `acc + x·y`. The magnitudes go into a `dadda_mult` built
with `ACC_ROW = 1`. That instance places a 64-bit addend as one more row in
the dot diagram, so column *c* starts with one extra bit. The tallest column
is then 33 bits, which still needs only eight Dadda stages. Let
`M = |x|·|y|`. When the product sign is negative, the addend is inverted
before entering the tree, and the tree's output is inverted again:

    acc − M = ~(M + ~acc)

So the signed product is added with XOR gates only, and no extra adder is
needed. The combining CLA then produces the new register value directly. The
operands fused into the trees are P·R (real) and P·S (imaginary).

## Number formats

- **Operands** `a`, `b`, `x`, `y` are sign-magnitude. Bit 31 is the sign and
  bits 30:0 are the magnitude, so the range is ±(2³¹ − 1). "Negative zero"
  (`32'h8000_0000`) is accepted and behaves as zero.
- **Products, terms and accumulators** are 64-bit two's complement. A product
  of two 31-bit magnitudes is below 2⁶², so one term P·R − Q·S or P·S + Q·R
  always fits. The accumulators wrap modulo 2⁶⁴. No overflow flag and no
  saturation are provided. Two full-scale terms of the same sign are enough
  to pass 2⁶³.

Inside `sm_multiplier` the two formats meet. The magnitudes, zero-extended to
32 bits, go into a 32×32 unsigned Dadda multiplier. The product sign is the XOR
of the two operand signs. The unsigned product is then negated when needed, as
`(prod ^ {64{neg}}) + neg`. The `+ neg` is the carry input of a CLA, so no
extra incrementer is needed. After this point every adder works on plain
two's complement numbers. Subtraction in the real lane is therefore
`a + ~b + 1`, using the same CLA with its carry input set.

## The Dadda tree (`dadda_mult`)

This is the largest and least obvious part of the design. Each of the four
instances holds 1024 AND gates, 899 full adders and 31 half adders, plus a
64-bit CLA.

1. **Partial products.** Bit `a[i] & b[j]` belongs to column `i + j`. Column
   *c* therefore starts with `min(c+1, 63−c)` bits: a triangle that is 32 bits
   tall in the middle.
2. **Reduction stages.** The Dadda height sequence is d₁ = 2 and
   dₖ₊₁ = ⌊1.5·dₖ⌋, which gives 2, 3, 4, 6, 9, 13, 19, 28, 42 and so on. For
   N = 32 the reduction uses the eight heights below 32, from 28 down to 2,
   one stage each. A stage works through the columns from the least
   significant upward. It reduces a column only as far as needed to reach the
   stage target, counting the carries that arrive from the column below. A
   full adder takes 3 bits and leaves 1 (a net removal of 2). A half adder
   takes 2 bits and leaves 1. Each carry goes to the next column in the next
   stage. Full and half adders per stage, for N = 32:

   | stage | target height | full adders | half adders |
   |-------|---------------|-------------|-------------|
   | 0     | 28            | 15          | 5           |
   | 1     | 19            | 153         | 9           |
   | 2     | 13            | 192         | 6           |
   | 3     | 9             | 168         | 4           |
   | 4     | 6             | 147         | 3           |
   | 5     | 4             | 108         | 2           |
   | 6     | 3             | 57          | 1           |
   | 7     | 2             | 59          | 1           |

3. **Final addition.** The two remaining rows are added by `cla64bit`.

The module does not hard-code this schedule. At elaboration the constant
function `make_plan()` runs the Dadda rule and packs three counts into the
localparam `PLAN`, for every stage and column: bits in, full adders and half
adders. Generate loops then build each stage from these counts. Within a
column, the bits leaving a stage are ordered as follows: the bits that pass
through untouched, then the full-adder sums, then the half-adder sums, then
the carries from the column below. Elaboration-time `$error` checks confirm
that the counts balance, and that at most two rows remain. Any N ≥ 3 works.
The testbench checks a 5×5 instance exhaustively as well as the 32×32 one.

## The carry look-ahead adder (`cla64bit`)

Each bit computes p = a ⊕ b and g = a·b. A radix-4 tree of `cla_lcu4` cells
computes the carries. For 64 bits there are three levels: 16, 4 and 1 cells.
On the way up, each cell combines four (p, g) pairs into a group pair. On the
way down, each cell turns the carry into its group into the carry for each of
its four children. The sum is s = p ⊕ c. A width that is not a power of four
is padded internally with bits that neither propagate nor generate. The 6-bit
instance in the testbench exercises that padding.

## Timing and control

- A single clock, `clock`, with rising-edge registers. The only state is the
  two 64-bit accumulator registers.
- `reset` is synchronous and active high. It clears both accumulators on the
  next rising edge. While it is held, the accumulators stay at zero.
- There is no enable. Every rising edge without reset adds the current
  operands' product. Hold the operands at zero to pause accumulation.
- Latency is one edge. Operands that are stable before edge *k* are included
  in `realp` and `imgp` right after edge *k*. The throughput is one complex
  MAC per clock.
- There are no pipeline registers. The clock period must cover a Dadda
  multiplier, the negation CLA, the combining CLA and the accumulator CLA.
  With `FUSED = 1` the critical path is shorter: the Dadda tree with its
  addend row, followed by the combining CLA.

Example: after reset, with a = x = 8 and b = y = 2, one edge gives
realp = 64 − 4 = 60 and imgp = 16 + 16 = 32. A second edge gives 120 and 64.

## What follows the source and what this design chose

These points come from the published unit:

- the four-multiplier datapath with Dadda multipliers and 64-bit CLA adders;
- a separate accumulating CLA and register for each lane (the default);
- feeding the previous result into the multiplier as a partial product
  (`FUSED = 1`), and which products are fused;
- the 32-bit operands and 64-bit results;
- the port names;
- the pairing of `a`/`b` with P/Q and of `x`/`y` with R/S, which the
  published example values confirm;
- the {sign, magnitude} operand notation.

These are this design's own choices:

- **Which product form.** The source also discusses a three-multiplier form,
  (P−Q)S + (R−S)P for the real part and (P−Q)S + Q(R+S) for the imaginary
  part. Its block diagram of the 32-bit unit, however, shows four multipliers
  and the direct P·R − Q·S / P·S + Q·R form. This RTL implements the
  four-multiplier form.
- **No pipeline.** The source mentions variants with and without
  pipelining, but gives no stage boundaries for the pipelined one. Only the
  unpipelined unit is provided.
- **Result format.** Results are two's complement, not sign-magnitude. Bit 63
  is the sign. Products are converted to two's complement inside
  `sm_multiplier`.
- **Which form is the default.** The source presents both forms as its
  proposal. Its block diagram of the 32-bit unit shows separate accumulator
  adders, so that form is the default here. In the fused form, the register
  that holds the result is this design's addition. The source does not draw
  it.
- **Sign handling in the fused tree.** Inverting the addend and the result is
  this design's own method. The source does not describe one.
- **Reset, enable and overflow.** The reset is synchronous and active high,
  accumulation happens on every edge, and the accumulators wrap on overflow.
- **Adder internals.** The inner structure of the CLA (a radix-4 tree) and
  the Dadda bit placement and schedule are standard textbook choices. The
  source names these blocks but does not detail them.

The area, delay and power figures reported for the original FPGA
implementation do not apply to this RTL and were not reproduced.

## Verification

Every testbench checks itself. Each prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. Each has a
watchdog that records a failure if the run stalls.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_cla64bit`      | carry chains across all 64 bits, 20 000 random sums against `a + b + cin`, and an exhaustive check of a 6-bit (padded) instance |
| `tb_dadda_mult`    | corner cases, 25 000 random 32×32 products, and an exhaustive 5×5 instance; the same with the addend row (`ACC_ROW = 1`) and random addends |
| `tb_sm_mac`        | `acc + x·y` for all sign combinations, negative zero, wrap-around, and 25 000 random cases |
| `tb_sm_multiplier` | all sign combinations, negative zero, full-scale magnitudes, and 20 000 random words |
| `tb_accumulator`   | reset, one-edge latency, wrap past 2⁶³ and 2⁶⁴, and reset held over several edges |
| `tb_cmac_lane`     | adding and subtracting lanes, in both forms, against a signed-integer model over 3000 cycles, with random resets |
| `tb_mac`           | the full unit at its default size: the 8/2/8/2 example, 5000 random cycles, and a check before every edge that the outputs have not changed early |
| `tb_mac_fused`     | the same as `tb_mac`, for `mac #(.FUSED(1))` |

`tb_mac` and `tb_mac_fused` also count how often each behaviour occurs. Each fails if any count
stays at zero. The counted behaviours are:

- accumulation onto a non-zero value;
- a negative operand;
- a negative-zero operand;
- a negative real term (the subtraction);
- a reset during accumulation;
- an accumulator wrap.

Each testbench runs in well under a second.

Simulating with Verilator 5, for example the full unit:

```
verilator --binary --timing --assert --top-module tb_mac \
    rtl/mac_pkg.sv rtl/cla_lcu4.sv rtl/cla64bit.sv rtl/dadda_mult.sv \
    rtl/sm_multiplier.sv rtl/sm_mac.sv rtl/accumulator.sv rtl/cmac_lane.sv rtl/mac.sv \
    tb/tb_mac.sv
./obj_dir/Vtb_mac
```

For any other testbench, replace `tb_mac` with its name. The same file list
can stay, or be cut down to the modules that testbench uses. Lint with
`verilator --lint-only -Wall` and the same files. The remaining lint warnings
fall into two groups. Some are carry-outs of CLA adders that are not used,
either because they are zero by construction or because the value wraps.
The others are the `addend` input of `dadda_mult`, which is ignored when
`ACC_ROW = 0`. Each case is commented in the code.

## Changing the design

- **Width.** `mac #(.N(n))` scales everything: operands become n bits (1 sign
  bit and n−1 magnitude bits) and results 2n bits. The Dadda schedule and the
  CLA tree adapt automatically. `mac_pkg::DATA_W` sets the default.
- **Accumulation form.** `mac #(.FUSED(1))` selects the
  multiplier-cum-accumulator form.
- **Accumulator headroom.** For `FUSED = 0`, give `accumulator` a larger
  `WIDTH` and sign-extend its `d` input in `cmac_lane`. The fused form would
  also need wider addend rows in the Dadda tree.
- **Pipelining.** The natural cut points are after `sm_multiplier` (between
  the Dadda tree and the combining CLA) and after the combining CLA. Each cut
  adds one cycle of latency but keeps one MAC per clock.
