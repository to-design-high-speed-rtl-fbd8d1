# A 4-bit ALU with Vedic (Urdhva Tiryagbhyam) multipliers

This is a small combinational ALU. Its multiplier is built by the Urdhva
Tiryagbhyam sutra of Vedic mathematics, which means "vertically and
crosswise". A shift-and-add multiplier produces one partial-product row after
another. Urdhva Tiryagbhyam instead forms every column of the product at the
same time: column *w* is the sum of all bit products `a[i] & b[j]` with
`i + j = w`, and the columns are then combined. The claimed payoff is a
shorter critical path and less switching than a Booth-recoded multiplier. The
published design reports 7.557 ns and 156.73 mW for its Vedic multiplier,
against 13.936 ns and 308.88 mW for Booth. Those numbers come from an FPGA
tool flow and a full-custom layout, and nothing in this RTL reproduces them.

The design has three parts:

* **`vedic_alu`**: a 4-bit ALU with twelve operations. The operands come from
  board switches and the result goes to a display, so the ALU has no clock.
* **`vedic_calculator`**: a stand-alone 4x4 Vedic multiplier in *column
  form*. It was drawn as a gate-level schematic and laid out as a
  full-custom cell.
* **`mac_unit`**: a multiply-accumulate unit on the same Vedic multiplier.
  The source names this unit but gives no details.

`vedic_alu_top` puts the three side by side.

## Hierarchy

```
vedic_alu_top
├── vedic_alu                 combinational ALU, 12 operations
│   ├── arith_unit            add / sub / mul / div, result select
│   │   ├── add_sub           adder/subtractor on one carry chain
│   │   │   └── fa_c #(4)     ripple adder of full_adder cells
│   │   ├── vedic_mul_nxn #(W)    block-form Vedic multiplier (default)
│   │   │   └── vedic_mul4x4  at W = 4 (larger W: four vedic_mul_nxn #(W/2))
│   │   │       ├── vedic_intermediate   four vedic_mul2x2 (each two half_adder)
│   │   │       ├── fa_c #(4)     "fa4_c"
│   │   │       └── fa_c #(6)     "fa6_c"
│   │   │   (or vedic_calculator when MUL_ARCH = MUL_COLUMN, W = 4 only)
│   │   └── divider           restoring division, unrolled
│   └── logic_unit            eight bitwise functions
├── mac_unit                  16-bit accumulator + vedic_mul_nxn
└── vedic_calculator          column-form Vedic multiplier
    ├── tgenerator            partial products t1..t15
    ├── fa5 x4                five-input column counters
    └── half_adder x3
```

`vedic_pkg` holds the operation codes and the shared widths.

## The two 4x4 Vedic multipliers

Both forms compute the same 8-bit product. They differ in how the columns are
summed. `vedic_alu` and `mac_unit` take a `MUL_ARCH` parameter that picks one
of them. The default is `MUL_BLOCK`, the form used in the FPGA build.

### Block form (`vedic_mul4x4`)

The sutra is applied one level up. Each operand is split into 2-bit halves,
and four 2x2 Vedic multipliers (`vedic_intermediate`) give

```
q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH        (4 bits each)
p  = q0 + 4*(q1 + q2) + 16*q3
```

The two crosswise products q1 and q2 have the same weight. A 4-bit ripple
adder (`fa4_c`) adds them into 5 bits. A 6-bit ripple adder (`fa6_c`) then
adds that sum to `{q3, q0[3:2]}`, which equals `4*q3 + q0[3:2]`. Its output is
`p[7:2]`, and `p[1:0]` is `q0[1:0]` unchanged. The largest value at the 6-bit
adder is 18 + 39 = 57, so its carry out is always 0 and stays unconnected.

`vedic_mul_nxn #(N)` repeats this construction for any power-of-two N. It
uses four (N/2)-bit Vedic multipliers, an N-bit adder for the crosswise pair
and a 3N/2-bit adder for the top. At N = 4 it is exactly `vedic_mul4x4`, and
at N = 8 it contains four of them. This gives the ALU its width parameter
`W` (default 4).

Each 2x2 block is the sutra in miniature:

* `p0 = a0b0` (the vertical product).
* A half adder sums the crosswise products `a1b0 + a0b1`, giving `p1` and a
  carry.
* A second half adder adds `a1b1` and that carry, giving `p2` and `p3`.

### Column form (`vedic_calculator`)

Here the sutra is applied to single bits. `tgenerator` forms the 15 bit
products other than a0b0 and numbers them t1..t15 column by column. No carry
ripples along a row. Each column is *counted* instead: bit 0 of the count is
the product bit, bit 1 moves to the next column and bit 2 to the one after.
This is a carry-save arrangement. The counter `fa5` takes up to five inputs
and gives a 3-bit count {v2, v1, y0}. Inside, it is two full adders and a
half adder.

| column (weight) | inputs                              | counter         | out |
|-----------------|-------------------------------------|-----------------|-----|
| 0 (1)           | a0b0                                | none            | p0  |
| 1 (2)           | t1 t2                               | half adder      | p1  |
| 2 (4)           | t3 t4 t5, carry of col 1            | fa5             | p2  |
| 3 (8)           | t6 t7 t8 t9, v1 of col 2            | fa5             | p3  |
| 4 (16)          | t10 t11 t12, v2 of col 2, v1 of col 3 | fa5           | p4  |
| 5 (32)          | t13 t14, v2 of col 3, v1 of col 4   | fa5             | p5  |
| 6 (64)          | t15, v2 of col 4, v1 of col 5       | two half adders | p6  |
| 7 (128)         | v2 of col 5, the two col-6 carries  | exclusive-or    | p7  |

Column 7 works with an exclusive-or because the product never exceeds
15 x 15 = 225. At most one of its three weight-128 bits can therefore be set.

The source fixes these parts of the column form: the block names
`tgenerator`, `fa5` and `h` (the half adder), their pin names (t1..t15,
in1..in5 / y0 v1 v2, a b / sum carry), the pins a3..a0, b3..b0 and p7..p0, and
the fact that a0b0 is formed outside `tgenerator`. The numbering of t1..t15,
the choice of counter input for each signal, and the handling of columns 6
and 7 are this design's own.

## ALU operations

`op[3]` selects the unit. The twelve functions are those of the source's ALU
block diagram. The numeric codes are this design's own.

Results are shown for W = 4. At width W the result has 2W bits, and the
carry/borrow sits in bit W.

| op | name | result[7:0]                               |
|----|------|-------------------------------------------|
| 0  | ADD  | `{000, carry, a+b}`                       |
| 1  | SUB  | `{000, borrow, (a-b) mod 16}`, borrow = a<b |
| 2  | MUL  | `a*b` (Vedic multiplier)                  |
| 3  | DIV  | `{a % b, a / b}`; b=0 gives `{a, 4'hF}` and `div_by_zero` |
| 4-7| -    | 0, with `op_valid` = 0                    |
| 8  | AND  | `a & b` in result[3:0]                    |
| 9  | OR   | `a \| b`                                  |
| 10 | NOR  | `~(a \| b)`                               |
| 11 | BUF  | `a`                                       |
| 12 | NAND | `~(a & b)`                                |
| 13 | XOR  | `a ^ b`                                   |
| 14 | XNOR | `~(a ^ b)`                                |
| 15 | INV  | `~a`                                      |

All units compute all the time, and the code only steers the output. Add and
subtract share one `fa_c` chain: subtraction is `a + ~b + 1`. The divider is
restoring long division unrolled into W compare-and-subtract stages.

## MAC unit

On each rising edge with `en` high, `acc <= acc + a*b`. The new sum is
visible one cycle after `en` is sampled. `clr` empties the accumulator and
the overflow flag, and it takes priority over `en`. `ovf` is sticky: it is
set by any accumulation that wraps past 2^ACC_W. `rst_n` is an asynchronous
active-low reset. `ACC_W` defaults to 16 bits, which holds 291 worst-case
products. All of these details are this design's choice.

## Top-level ports (`vedic_alu_top`)

The parameters are `W` (default 4) and `ACC_W` (default 16).

| port | dir | width | use |
|------|-----|-------|-----|
| `sw_a`, `sw_b`, `sw_op` | in | W, W, 4 | ALU operands and operation (switch inputs) |
| `alu_result`, `alu_div_by_zero`, `alu_op_valid` | out | 2W, 1, 1 | ALU outputs (towards the display) |
| `clk`, `rst_n`, `mac_en`, `mac_clr` | in | 1 each | MAC clock and controls; the MAC uses `sw_a`, `sw_b` |
| `mac_acc`, `mac_ovf` | out | ACC_W, 1 | accumulator and sticky overflow |
| `calc_a`, `calc_b` | in | 4, 4 | operands of the stand-alone Vedic calculator |
| `calc_p` | out | 8 | its product |

The ALU and the calculator are combinational paths. Only the MAC holds state.

## How far this follows the source, and where it departs

Taken from the source:

* a 4-bit ALU with an arithmetic unit and a logical unit;
* the twelve function names;
* the two Vedic multiplier structures: block form built from four 2x2
  blocks and 4- and 6-bit full-adder circuits, and column form built from
  `tgenerator`, `fa5` and `h`;
* a MAC unit and an adder/subtractor, named only.

This design's own decisions:

* **Operation set.** The prose counts three arithmetic and five logical
  operations (add, subtract, multiply; AND, OR, inverter among them). The
  block diagram shows twelve, including a divider, NOR, NAND, XOR, XNOR and a
  buffer. All twelve are built, so both lists are covered.
* **Size of the sub-multipliers.** The prose says the calculator's
  intermediate block holds four 4x4 multipliers. The schematic shows eight
  input switches and 4- and 6-bit adders, which fit only a 4x4 product made
  of 2x2 blocks. The RTL view also shows blocks labelled as 2x2. The 2x2
  reading is used.
* **Internal wiring.** The wiring inside both multiplier forms is derived
  from the arithmetic, not copied from a netlist.
* **Details the source leaves open.** These are all this design's choices:
  the opcode encoding, the result format, BUF and INV acting on `a`, the
  divide-by-zero result, the divider algorithm, and everything about the
  MAC except its existence.
* **Not in the RTL.** The switch inputs, the character LCD and its
  controller, the FPGA itself and the full-custom layout are not part of the
  RTL. The Booth multiplier the source compares against is not part of the
  design.
* **Operand width.** The introduction speaks of "NxN" arithmetic modules,
  but the design it presents is 4-bit. Here `W` defaults to 4. Other
  power-of-two widths use the recursive block-form multiplier. The
  column-form multiplier exists only at 4x4, and elaboration stops with an
  error if it is selected at another width.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. It ends by
printing `TB_RESULT checks=N failures=M`. Every combinational block is tested
exhaustively.

`tb_vedic_alu_top` runs the whole design at its default parameters:

* all 16 x 256 operation/operand combinations of the ALU, checked against
  the reference model in `tb/vedic_ref_pkg.sv`;
* every operand pair on the calculator;
* 3000 random MAC cycles, then worst-case products until the accumulator
  wraps.

It counts each mechanism (every operation, undefined codes, carry, borrow,
divide-by-zero, accumulate, hold, clear, overflow), and any mechanism that
never happens counts as a failure. Run it with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vedic_pkg.sv tb/vedic_ref_pkg.sv tb/tb_vedic_alu_top.sv \
    --top-module tb_vedic_alu_top -Mdir obj && ./obj/Vtb_vedic_alu_top
```

To run another testbench, replace the testbench file and the top name.
Verilator finds the other modules through `-Irtl`. The `tb_vedic_alu`,
`tb_arith_unit` and `tb_mac_unit` testbenches build both multiplier forms side
by side and check them against the same model.

## Changing it

* To use the column-form multiplier in the ALU and MAC, set
  `MUL_ARCH = vedic_pkg::MUL_COLUMN`.
* To change the accumulator width, set `ACC_W` on `vedic_alu_top` or
  `mac_unit`.
* To widen the ALU and MAC, set `W` on `vedic_alu_top` to a power of two.
  `alu_result` becomes 2W bits wide. `calc_*` stay 4x4. `tb_vedic_alu` runs
  an 8-bit instance, and `tb_vedic_mul_nxn` checks the multiplier at 2, 4, 8
  and 16 bits.
