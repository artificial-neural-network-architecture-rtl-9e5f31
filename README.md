# Neuron processing unit with a Vedic multiplier and square-root carry select adders

A neuron of a feed-forward neural network multiplies each input by a weight,
adds the products and passes the sum through an activation function. In
hardware that is a multiply-accumulate (MAC) unit followed by an activation
unit, and the MAC's multiplier and adders are most of the cost. This design
builds that neuron around two arithmetic ideas:

* a **Vedic multiplier** ("vertically and crosswise", Urdhva Tiryakbhyam):
  a 2x2-bit multiplier made of four AND gates and two half adders is
  replicated recursively. Each level splits both operands into halves,
  multiplies the four half-pairs in parallel and adds the partial products.
  All four sub-products are independent, so the multiplier is a wide,
  shallow array.
* a **square-root carry select adder** (SQRT-CSLA) for the partial-product
  and accumulator additions. Every bit group except the first prepares its
  result for both possible incoming carries in advance, and a group only
  makes a late selection when the real carry arrives. Here each group is a
  **reduced area-delay-power CSLA** block whose selection logic costs one
  AND-OR gate per bit.

The activation unit evaluates the sigmoid `y = 1/(1+e^-z)` with a
piecewise-linear, shift-and-add approximation. It also gives the binary
0/1 output of a threshold neuron.

All arithmetic is unsigned integer or fixed point. Everything is
synthesizable SystemVerilog-2017 with no vendor primitives.

## Hierarchy

```
ann_processing_unit            neuron: MAC -> subtract threshold -> sigmoid -> registers
├── mac                        product = a*b, acc += product
│   ├── vedic_16x16            (N = 16) four 8x8 products, three sqrt_csla adders
│   │   ├── vedic_8x8 (x4)     four 4x4 products, vedic_combine_rca
│   │   │   ├── vedic_4x4 (x4) four 2x2 products, vedic_combine_rca
│   │   │   │   └── vedic_2x2  AND gates + two half adders
│   │   │   └── vedic_combine_rca   three ripple carry adders (rca -> full_adder)
│   │   └── sqrt_csla (x3)
│   └── sqrt_csla              accumulator adder
├── sqrt_csla                  z = sum - threshold (inverted operand, carry in 1)
└── sigmoid_act                piecewise-linear sigmoid + fire bit

sqrt_csla groups, STYLE = ADDER_ADP (default):   adp_csla
    adp_csla = half_sum_gen -> carry_gen0 / carry_gen1 -> carry_select -> full_sum_gen
sqrt_csla groups, STYLE = ADDER_BEC:             rca (first group), csla_group_bec
    csla_group_bec = rca (carry in 0) -> bec (+1) -> 2:1 multiplexer
```

`ann_pkg` holds the `adder_style_e` enum and the constant functions that
compute the group boundaries.

## The Vedic multiplier

### 2x2 cell (`vedic_2x2`)

```
r[0]   = a0·b0
r[1]   = a1·b0 XOR a0·b1          half adder 1, carry k = a1·b0 · a0·b1
r[3:2] = a1·b1 + k                half adder 2
```

### Combining four half-size products (`vedic_combine_rca`)

With `a = {aH, aL}` and `b = {bH, bL}`, each half H bits wide:

```
q0 = aL·bL   q1 = aH·bL   q2 = aL·bH   q3 = aH·bH        (2H bits each)
a·b = q3·2^(2H) + (q1 + q2)·2^H + q0
```

The 4x4 and 8x8 multipliers add these with three 2H-bit ripple carry adders:

| adder | adds | result |
|---|---|---|
| 1 | `q1 + q2` | `{c1, t1}` |
| 2 | `t1 + {0, q0[2H-1:H]}` | `{c2, t2}` |
| 3 | `q3 + {0…0, c1 OR c2, t2[2H-1:H]}` | `p[4H-1:2H]` |

The low half of the product is `{t2[H-1:0], q0[H-1:0]}`. The carries `c1`
and `c2` both weigh `2^(3H)`. They can never both be 1, because
`q1 + q2 + q0/2^H < 2^(2H+1)`. So a single OR gate merges them. The usual
drawing of this structure leaves `c2` unconnected, which loses a carry for
some operands. Adder 3 never overflows.

### 16x16 with SQRT-CSLA (`vedic_16x16`)

The top-level multiplier forms its four 8x8 products with `vedic_8x8` and
adds them as a two-level tree of `sqrt_csla` adders:

```
left  (24 bit)  l       = {q3, 8'h00} + {8'h00, q2}
right (16 bit)  r       = q1 + {8'h00, q0[15:8]}
final (24 bit)  p[31:8] = l + r
                p[7:0]  = q0[7:0]
```

The left and right adders work in parallel. None of the three can overflow.
The final adder has to be 24 bits wide, because it produces `p[31:8]`.

## The square-root carry select adder

### Grouping

`sqrt_csla #(WIDTH, STYLE)` cuts the operands into groups of
2, 2, 3, 4, 5, … bits from the LSB. A 16-bit adder is therefore 2-2-3-4-5.
Wider adders keep growing the group size by one and clip the last group: the
24-bit adders are 2-2-3-4-5-6-2, and the 41-bit subtractor is
2-2-3-4-5-6-7-8-4. Group `g ≥ 1` starts at bit `2 + (g-1)(g+2)/2`
(`ann_pkg::csla_grp_lo`).

Group `g` receives the carry out of group `g-1`. The first group receives the
adder's `cin`. Every group computes its carry-independent part while the
carry is still rippling through the groups below it. The carry then passes
through only a short selection stage per group. Higher groups have more time
to spare, which is why they can be larger.

### Reduced area-delay-power group (`adp_csla`, default)

An n-bit group is five small units:

| unit | module | logic, bit i |
|---|---|---|
| half sum generation (HSG) | `half_sum_gen` | `s0[i] = a[i] ^ b[i]`, `c0[i] = a[i] & b[i]` |
| carry generation, cin = 0 (CG0) | `carry_gen0` | `c1_0[0] = c0[0]`; `c1_0[i] = c0[i] \| s0[i] & c1_0[i-1]` |
| carry generation, cin = 1 (CG1) | `carry_gen1` | `c1_1[0] = c0[0] \| s0[0]`; `c1_1[i] = c0[i] \| s0[i] & c1_1[i-1]` |
| carry selection (CS) | `carry_select` | `c[i] = c1_0[i] \| (c1_1[i] & cin)`; `cout = c[n-1]` |
| full sum generation (FSG) | `full_sum_gen` | `s[0] = s0[0] ^ cin`; `s[i] = s0[i] ^ c[i-1]` |

This is cheaper than a classic carry select group for two reasons. First,
both carry candidates share one set of half-sum gates. Second, the selection
is not a full multiplexer. A carry out of bit i with carry in 0 implies a
carry out with carry in 1 (`c1_0[i] → c1_1[i]`), so
`mux(cin, c1_0, c1_1)` reduces to `c1_0 | (c1_1 & cin)`. Only the CS and
FSG units wait for the incoming carry. HSG, CG0 and CG1 run in parallel with
the lower groups.

### BEC group (`csla_group_bec`, `STYLE = ADDER_BEC`)

The alternative group style is the classic BEC-based CSLA. An n-bit ripple
carry adder computes the result for carry in 0. An (n+1)-bit binary-to-excess-1
converter (`bec`, `y = x + 1`) derives the result for carry in 1, and a
`(2n+2):(n+1)` multiplexer picks one. At 16 bits this gives 2-bit RCA |
2-bit RCA, 3-bit BEC, Mux 6:3 | 3-bit RCA, 4-bit BEC, Mux 8:4 | 4-bit RCA,
5-bit BEC, Mux 10:5 | 5-bit RCA, 6-bit BEC, Mux 12:6. It is kept for
comparison and selected everywhere at once through the `STYLE` parameter of
`ann_processing_unit`, `mac`, `vedic_16x16` and `sqrt_csla`.

## The MAC (`mac`)

```
rst_n = 0        acc <= 0            (asynchronous)
en=1, clr=0      acc <= acc + a*b
en=1, clr=1      acc <= a*b          (first term of a new sum)
en=0, clr=1      acc <= 0
en=0, clr=0      acc holds
```

`product` is combinational, so it is valid in the same cycle as `a` and `b`.
`acc` is registered. `N` selects the multiplier: 4, 8 or 16. The module's
default is N = 8, with a 24-bit accumulator. With reset held, operands 205
and 3 give `product = 615`. After reset is released, `acc` steps through
615, 1230, 1845, … `ACC_W` defaults to `2N + 8`, which leaves room for 256
full-scale products, and the accumulator wraps beyond that.

## The neuron (`ann_processing_unit`)

### Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` | in | 1 | an (x, w) pair is presented this cycle |
| `in_first` | in | 1 | with `in_valid`: first pair of a vector (restarts the sum) |
| `in_last` | in | 1 | with `in_valid`: last pair of a vector |
| `x`, `w` | in | N | input and weight, unsigned Q(N/2).(N/2) |
| `threshold` | in | ACC_W | neuron threshold, same format as `sum` |
| `out_valid` | out | 1 | `y` and `fire` valid, one cycle per vector |
| `y` | out | YF+1 | sigmoid output, unsigned Q1.YF (1.0 = 2^YF) |
| `fire` | out | 1 | `sum >= threshold` |
| `sum` | out | ACC_W | running accumulator |

Defaults: N = 16, ACC_W = 40, YF = 8, STYLE = ADDER_ADP. With Q8.8
operands, products and `sum` carry 16 fractional bits.

### Timing

```
cycle      t-1        t          t+1        t+2
in_valid   1          1          0 or 1     …
in_last    0          1          …
sum        partial    partial    final      (next vector, if one started)
threshold  -          -          must be valid
out_valid  0          0          0          1      y, fire valid
```

The edge at the end of cycle t adds the last product into `sum`. During cycle
t+1 a `sqrt_csla` subtracts `threshold` (inverted operand, carry in 1) to
form the signed 41-bit `z = sum - threshold`, and `sigmoid_act` evaluates it.
The edge at the end of t+1 registers `y` and `fire`. A new vector may start
in cycle t+1, so vectors can stream back to back with one pair per cycle.
Idle cycles (`in_valid = 0`) inside a vector simply pause the sum.

### Sigmoid approximation (`sigmoid_act`)

```
|z| >= 5            f = 1
2.375 <= |z| < 5    f = |z|/32 + 0.84375
1 <= |z| < 2.375    f = |z|/8  + 0.625
0 <= |z| < 1        f = |z|/4  + 0.5
y = f(|z|) for z >= 0,  1 - f(|z|) for z < 0
```

The slopes are powers of two, so the unit needs only a magnitude, three
compares, shifted adds and one rounding step. The intermediate has
ZF + 5 fractional bits, so it is exact before the final round-half-up to
YF bits. The maximum error against the exact logistic function is below
0.02. `fire` is the sign of z, which is the same as `y >= 0.5`.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| ann_processing_unit | N | 16 | operand width (4, 8 or 16) |
| | ACC_W | 2N+8 = 40 | accumulator width |
| | YF | 8 | fractional bits of y |
| | STYLE | ADDER_ADP | carry select group style of every adder |
| mac | N / ACC_W / STYLE | 8 / 24 / ADDER_ADP | |
| sqrt_csla | WIDTH / STYLE | 16 / ADDER_ADP | WIDTH ≥ 2 |
| sigmoid_act | ZW / ZF / YF | 41 / 16 / 8 | needs ZF ≥ 3, ZW ≥ ZF+4, YF < ZF+5 |
| adp_csla and its units | N | 4 | group width when used inside sqrt_csla |
| rca | N | 16 | |
| bec | N | 6 | |

## How closely this follows the original design

The following come from the published design:

* the neuron as a MAC plus activation unit, with a sigmoid activation and a
  0/1 threshold output;
* the Vedic 2x2 cell and the recursive 4x4 and 8x8 multipliers;
* the three-adder partial-product arrangement;
* the 16x16 multiplier built from four 8x8 blocks and three SQRT-CSLA adders,
  with its operand layout;
* the 2-2-3-4-5 group sizes and the RCA/BEC/multiplexer widths of the 16-bit
  BEC adder;
* the gate-level HSG, CG0, CS and FSG units and how they connect;
* the 8-bit MAC behaviour: 205 x 3 = 615, then accumulation.

The following are this design's own choices or corrections:

* **Carry merging in `vedic_combine_rca`.** `c1 OR c2` feeds the third
  adder. Without it the carry of adder 2 would be lost whenever that adder
  overflows.
* **Adder widths in `vedic_16x16`.** The final adder is 24 bits, not 16,
  because the upper product bits are 24 bits wide. The left adder is also 24
  bits.
* **CG1 gate form.** It is the carry arithmetic with the carry in tied to 1.
* **SQRT-CSLA assembly.** The reduced-ADP adder reuses the BEC adder's group
  sizes, with one `adp_csla` block per group. Group sizes above 16 bits
  continue the sequence. The first group takes the adder's carry in rather
  than a constant 0, so the same adder also subtracts.
* **Neuron interface.** The streaming handshake, the `threshold` input, the
  subtractor and the two-cycle result latency.
* **MAC controls.** `clr`/`en`, the asynchronous active-low reset (a low
  reset clears, as in the original simulation) and the accumulator width.
* **Number formats.** All fixed-point formats.
* **Sigmoid method.** The PLAN-style sigmoid approximation. The original
  gives only the function.
* **MAC step size.** The accumulator grows by the product on every step
  (615, 1230, …). The original description of its simulation says it "adds
  205" on each step, which does not match a MAC; the product is used.

What is not included:

* **A multi-neuron network.** The source shows a small input/hidden/output
  network only as motivation. It gives no layer sizes, weights or schedule,
  so only the processing unit is built.
* **Booth/carry look-ahead reference MAC.** The original design was compared
  against this MAC, but it is not part of the design.
* **Dual-RCA carry select adder.** It is mentioned only as the form the BEC
  replaces.

The published FPGA results (about 717 LUTs, 397 slices and 19.1 ns for the
Vedic MAC against 764 LUTs, 402 slices and 19.114 ns for a Booth-based one)
are for an unnamed device and are not reproduced here.

## Verification

`ann_processing_unit` carries a concurrent assertion of its result timing
(`out_valid` exactly two cycles after the cycle that presented `in_last`),
checked in simulation with `--assert`.

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog ends a hung run.

| testbench | what it checks |
|---|---|
| `tb_half_sum_gen`, `tb_carry_gen0`, `tb_carry_gen1`, `tb_carry_select`, `tb_full_sum_gen` | exhaustive over small widths, against integer carries and sums |
| `tb_adp_csla`, `tb_rca` | exhaustive at 8 bits, random at 13 bits, both carry-in values |
| `tb_bec` | exhaustive, `y = x + 1` |
| `tb_sqrt_csla` | both styles at 16, 24 and 41 bits: a carry entering every group boundary, all-ones cases, random |
| `tb_vedic_2x2`, `tb_vedic_4x4`, `tb_vedic_8x8` | exhaustive |
| `tb_vedic_16x16` | both styles: corner values, every single-bit operand pair, 50 000 random |
| `tb_mac` | the 205 x 3 reset/accumulate sequence, then 20 000 random clr/en/operand cycles on 8- and 16-bit MACs against an integer model |
| `tb_sigmoid_act` | sweep of z over -8..8 in 1/256 steps, random and extreme values; exact match with a real-valued model of the approximation, within 0.022 of the exact logistic |
| `tb_ann_processing_unit` | full default size, 3000 vectors of 1–8 pairs: sum, y, fire and the exact result cycle; counts each sigmoid segment of each sign, both fire values, back-to-back vectors, idle gaps and one-element vectors, and fails if any never occurs |
| `tb_ann_pu_bec` | the same end-to-end test with `STYLE = ADDER_BEC` |

Run one testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl rtl/ann_pkg.sv tb/tb_ann_processing_unit.sv \
          --top-module tb_ann_processing_unit -Mdir obj_tb -o sim
./obj_tb/sim
```

Other modules are found through `-Irtl`, one module per file. To lint a
module:

```
verilator --lint-only -Wall -Irtl rtl/ann_pkg.sv rtl/ann_processing_unit.sv
```

Lint reports a few unused signals, which are deliberate. They are adder
carry outs that cannot be 1 (explained in each module header), the MAC's
`product` output, which the neuron does not need, and the rounding bits of
the sigmoid below the output LSB.
