# Twin-precision multiplier with clock pipelining, and a MAC built on it

An N x N multiplication can be split into four N/2 x N/2 multiplications
of the operand halves:

    a * b = LL + (LH + HL) * 2^(N/2) + HH * 2^N
    LL = a_lo*b_lo, LH = a_lo*b_hi, HL = a_hi*b_lo, HH = a_hi*b_hi

A direct implementation needs four N/2-bit multipliers. This design needs
two. Each N/2-bit multiplier core is used twice per clock cycle: it works on
one operand pair while the clock is high and on a second pair while the
clock is low ("clock pipelining"). Two cores therefore give all four
sub-products every cycle, and an adder combines them.

The same hardware has a second, narrower precision ("twin precision").
Many operands are far narrower than the multiplier. In twin mode only one
core runs. It returns two independent N/2 x N/2 products, `a_lo*b_lo` and
`a_hi*b_hi`, per cycle. The other core keeps its inputs still, so it does
not switch.

A multiply-accumulate unit (`top_mac`) wraps the multiplier. It uses
16-bit operands and a 32-bit accumulator.

## Hierarchy

```
top_mac                         MAC: multiplier stage + accumulator stage
└── twin_precision_multiplier   select decode (OR / AND), two cores, adder
    ├── dual_edge_mult  u_mult0 LL (clock high), HH (clock low)
    │   └── bw_multiplier       Baugh-Wooley array, 3:2 tree, ripple adder
    │       └── full_adder
    ├── dual_edge_mult  u_mult1 LH (clock high), HL (clock low)
    │   └── bw_multiplier
    └── pp_adder                combines the four sub-products
tp_pkg                          select encoding, signedness struct
```

## Select and modes

The 2-bit `sel` goes to an OR gate and an AND gate. The OR output enables
multiplier 0. The AND output enables multiplier 1.

| `sel` | OR | AND | running cores | `p` (2N bits)                  |
|-------|----|-----|---------------|--------------------------------|
| 00    | 0  | 0   | none          | holds; `valid` low             |
| 01    | 1  | 0   | multiplier 0  | `{a_hi*b_hi, a_lo*b_lo}`       |
| 10    | 1  | 0   | multiplier 0  | same as 01                     |
| 11    | 1  | 1   | both          | `a * b`                        |

`tc` = 1 treats operands as two's complement. In twin mode, each half is
then a signed N/2-bit number. `tc` = 0 treats everything as unsigned.

## The clock-pipelined core (`dual_edge_mult`)

This block is the hard part to follow. One `bw_multiplier` sits behind a
multiplexer that picks one of two operand registers:

```
            rising edge k           falling edge k          rising edge k+1
clk   ______/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______________________/‾‾‾‾‾
op regs     load (a1,b1),(a2,b2)
core        ── computes a1*b1 ──────│── computes a2*b2 ──────│
captures                            p1_half <= core         p1 <= p1_half, p2 <= core
valid                                                       1 (if en at edge k)
```

- Both operand pairs are loaded on the rising edge, and only when `en` is high.
- The falling edge captures the first product into a half-cycle register.
- The next rising edge captures the second product. The same edge moves the
  first product to the output, so `p1` and `p2` always change together.
- Latency is one cycle, and the core accepts a new operand set every cycle.

The multiplexer does not use the clock as its select. Its select is
`phase = tog_p ^ tog_n`:
- `tog_p` toggles on every rising edge;
- `tog_n` copies `tog_p` on every falling edge.

`phase` is therefore high from a rising edge to the next falling edge. Every
register samples flip-flop outputs only, which keeps simulation free of
races.

The critical path is one N/2 multiplication. It must fit in half a clock
period, because each phase holds one full multiplication. A timing-driven
implementation must constrain both edges.

With `en` low, the operand registers hold. The core then sees constant
inputs and does not toggle. The design uses this load enable in place of
clock gating, which would need a library integrated clock-gating cell.
Substituting such a cell on the operand registers does not change the
function.

## Signed multiplication: Baugh-Wooley (`bw_multiplier`)

Signed products use the modified Baugh-Wooley array. In an M x M array:
- the top bit of each partial-product row except the last is inverted;
- every bit of the last row except its top bit is inverted;
- a 1 is added in column M;
- the top bit of the result is inverted (added as a 1 in column 2M-1).

In full-precision mode the sub-products mix signedness: `LH` is unsigned x
signed and `HL` signed x unsigned. Each core therefore takes a signedness
flag per operand. It extends each operand by one bit (sign or zero) and runs
an (N/2+1)-bit Baugh-Wooley array. The result is read as signed when either
operand is signed. It always fits in N bits.

`pp_adder` extends the sub-products before summing:
- `LL` is zero-extended;
- `LH`, `HL` and `HH` are sign-extended when `tc` = 1.

The partial-product rows, plus one row of constants, go through a reduction
tree. Each level takes the rows three at a time. A row of full adders turns
each group of three into a sum row and a carry row, with the carry row
shifted one column left. One or two leftover rows pass through unchanged.
R rows become 2*(R/3) + R%3, so the tree is logarithmic in depth. For the
9-bit extended array of the 16-bit MAC it takes ten rows down to two in
five levels. A ripple-carry adder built from the same full adders forms the
final sum. The level count is worked out at elaboration by constant
functions, so any width elaborates without edits.

## The MAC (`top_mac`)

```
x, y ─► [operand regs inside the cores] ─► multiplier ─► [mult_out reg] ─► + ─► result
                                                                ▲          │
                                                          [acc reg] ◄──────┘
```

| event                                     | when             |
|-------------------------------------------|------------------|
| `x`, `y`, `sel`, `tc` sampled             | rising edge k    |
| product ready at the multiplier output    | after edge k+1   |
| `mult_out`, `mult_valid`                  | after edge k+2   |
| `result = mult_out + acc` (combinational) | after edge k+2   |
| `acc` updated with `result`               | after edge k+3   |

The unit accepts one operation per cycle. The accumulator changes only when
`mult_valid` is high, and an assertion checks this. The addend depends on
the mode:
- full mode adds the 32-bit product;
- twin mode adds the sum of the two half products, a two-element dot product
  `x_hi*y_hi + x_lo*y_lo`;
- `sel` = 00 adds nothing.

`overflow` is combinational and valid with `result`. It shows signed
overflow when `tc` = 1 and carry-out when `tc` = 0. The accumulator wraps.
`rst` is synchronous, active high, and clears every register, including
the accumulator.

## Parameters

| module                      | parameter | default | meaning                   |
|-----------------------------|-----------|---------|---------------------------|
| `top_mac`                   | `N`       | 16      | operand width             |
| `top_mac`                   | `ACC_W`   | 32      | accumulator width         |
| `twin_precision_multiplier` | `N`       | 8       | operand width (even)      |
| `pp_adder`                  | `N`       | 8       | operand width (even)      |
| `dual_edge_mult`            | `W`       | 4       | core operand width        |
| `bw_multiplier`             | `W`       | 4       | operand width             |

The 8-bit default of the multiplier matches the 8 x 8 Baugh-Wooley example
the design was described with. The MAC's 16/32 widths are those of its
description. Keep `ACC_W` >= 2N.

## What follows the original description and what does not

These parts follow the original description:
- four N/2 sub-products from two clock-pipelined N/2 multipliers, each with
  two operand pairs (one per clock phase), a select pin and two product
  outputs;
- the 2-bit select decoded by an OR and an AND gate, and the final adder;
- Baugh-Wooley signed arithmetic;
- the two-stage MAC with 16-bit operands, a 32-bit accumulator,
  `result = X*Y + ACC` and an overflow output.

These are this implementation's own choices:
- the meaning of each select code, with 00 as idle and 01 equal to 10;
- the `tc` input and the per-operand signedness of the cores;
- which sub-products each core forms;
- capturing both operand pairs on the rising edge and re-timing the outputs;
- the phase generator;
- load enables instead of gated clocks;
- the twin-mode dot product in the MAC;
- reset behaviour and overflow semantics.

These parts of the original are replaced by something simpler:
- The reduction tree was a High-Performance Multiplier (HPM) column
  compression tree. Here it is a Wallace-style tree of full-adder rows of
  similar, logarithmic depth, with none of HPM's regular layout.
- The final adder was a "hybrid adder". Here it is a ripple-carry adder in
  the core and a plain `+` in `pp_adder` and the accumulator.
- The original MAC description asks for multiply and accumulate in a single
  clock cycle. It also draws the MAC as a multiplier stage followed by an
  accumulator stage. This design follows the two-stage drawing. It keeps
  one operation per cycle, and a product reaches `acc` three cycles after
  its operands.
- The original MAC description names a modified Booth multiplier and an
  SPST adder. The twin-precision multiplier takes the Booth multiplier's
  place, and the SPST adder is not built.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against integer arithmetic worked out in the testbench:

| testbench                      | what it covers |
|--------------------------------|----------------|
| `tb_bw_multiplier`             | 4-bit exhaustive for all four signedness mixes; 8-bit random |
| `tb_pp_adder`                  | random sub-products in both modes, plus corner cases |
| `tb_dual_edge_mult`            | random operands and enables; one-cycle latency; outputs hold while disabled |
| `tb_twin_precision_multiplier` | random modes (each counted); every 8 x 8 pair in full precision, signed and unsigned, back to back |
| `tb_top_mac`                   | at default size: sum of squares 1..9 (285), signed then unsigned; random full/twin/idle operations; unsigned and signed overflow; reset in mid-run |

`tb_top_mac` uses a cycle-level reference model and checks `mult_out`,
`result`, `overflow` and `acc` every cycle. It also counts each mechanism
and fails if any never occurred. Every testbench ends with a line
`TB_RESULT checks=<n> failures=<m>`.

Example, with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/tp_pkg.sv tb/tb_top_mac.sv \
          --top-module tb_top_mac -Mdir obj_mac
./obj_mac/Vtb_top_mac
```

Use the same form for the other testbenches, naming `tb/<testbench>.sv` and
its top module. `tp_pkg.sv` must come first. `-y rtl` finds the rest.

Lint reports unused bits in `bw_multiplier`. These are the top two bits of
the extended array and the final carries, which the 2W-bit product does not
need. The code is synthesizable. It uses flip-flops on both clock edges
(`dual_edge_mult`) and no latches.
