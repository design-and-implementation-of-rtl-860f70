# Reversible 8-bit ALU with a Vedic multiplier

This is a small combinational arithmetic and logic unit in which every
function is built from *reversible* gates. A reversible gate has as many
outputs as inputs and maps input patterns one-to-one onto output patterns,
so no information is lost inside it. Such gates are the building blocks of
low-power adiabatic logic and of quantum circuits. The ALU takes two 8-bit operands and produces
all of these results at once:

| output      | width | value                                                  |
|-------------|-------|--------------------------------------------------------|
| `p`         | 16    | Vedic product of `a` (multiplicand) and `b` (multiplier) |
| `and_out`   | 8     | `a & b`                                                |
| `xor_out`   | 8     | `a ^ b` (all zero exactly when `a == b`)               |
| `gray_out`  | 8     | Gray code of `a`                                       |

There is no clock, no register, no reset and no opcode. The three units sit
side by side and all results are valid one combinational delay after the
operands change.

The multiplier is the unusual part. It is not a general 8×8 multiplier.
It uses a shortcut from Vedic mathematics that is exact only for operand
pairs of a particular form. The next section explains it.

## The multiplier: "equidistant from a base"

Split each operand into an upper and a lower 4-bit digit:
`a = {aH, aL}`, `b = {bH, bL}`. The multiplier always computes

```
p[7:0]  = aL * bL                (4x4 Vedic multiplier)
p[15:8] = aH * bH + aH           (4x4 Vedic multiplier, then 8-bit adder)
```

This is the mental-arithmetic rule for two numbers with the same leading
digit whose last digits add up to the base. In decimal, 24 × 26: the
leading digit times its successor is 2 × 3 = 6, and the last digits
multiplied give 4 × 6 = 24, so the product is 624. The hardware does exactly
this: it adds `aH` to `aH*bH` instead of forming `aH*(aH+1)` directly, and
it multiplies the lower digits vertically.

The product is correct only when the operand condition holds, and the unit
does **not** check it. There are two useful readings:

* **BCD operands** (`aH == bH`, `aL + bL == 10`, all digits 0–9). The
  decimal product is `100 * p[15:8] + p[7:0]`, where both halves are
  ordinary binary numbers. Example: `a = 8'h24`, `b = 8'h26` gives
  `p[15:8] = 8'h06` (6) and `p[7:0] = 8'h18` (24), that is 624.
* **Binary operands** (`aH == bH`, `aL + bL == 16`). Then `p` is the exact
  16-bit product, because
  `(16h + u)(16h + 16 − u) = 256·h(h+1) + u(16 − u)`.

For every other operand pair, `p` still follows the two equations above, but
it is not `a * b`. Since `aH*bH + aH ≤ 240`, `p[15]` is always 0.

### How the 4×4 and 2×2 multipliers are built

The Vedic "vertically and crosswise" (Urdhva Tiryagbhyam) rule forms each
column of a product from the digit pairs that meet in that column. The
rule is applied twice:

* `rev_vedic_mult2` multiplies two 2-bit numbers. It uses four AND gates
  for the partial products and two half adders: `p0 = a0b0`,
  `{c, p1} = a1b0 + a0b1`, `{p3, p2} = a1b1 + c`.
* `rev_vedic_mult4` splits the operands into 2-bit digits. It forms
  `q0 = aL*bL`, `q1 = aH*bL`, `q2 = aL*bH` and `q3 = aH*bH` with four
  `rev_vedic_mult2`. It then adds the crosswise pair with a 4-bit adder,
  `s = q1 + q2`. A 6-bit adder merges the rest:
  `p = {({q3, q0[3:2]} + s), q0[1:0]}`.

Every adder is a ripple chain of one-gate reversible full adders
(`rev_adder`, `rev_full_adder`). The 8-bit adder of the upper half adds
`hi_prod` (`aH*bH`) and `{4'b0, aH}`. It is eight HNG gates, each with the
carry on its third input and a constant 0 on its fourth.

## The gates

| module         | inputs     | outputs                                                                   |
|----------------|------------|---------------------------------------------------------------------------|
| `feynman_gate` | A B        | P = A, Q = A⊕B                                                            |
| `toffoli_gate` | A B C      | P = A, Q = B, R = AB⊕C                                                    |
| `peres_gate`   | A B C      | P = A, Q = A⊕B, R = AB⊕C                                                  |
| `tsg_gate`     | A B C D    | P = A, Q = A'C'⊕B', R = Q⊕D, S = QD⊕AB⊕C                                  |
| `hng_gate`     | A B C D    | P = A, Q = B, R = A⊕B⊕C, S = (A⊕B)C⊕AB⊕D                                  |

A single HNG gate with inputs `(A, B, Cin, 0)` is a full adder: R is the
sum and S the carry. So is a TSG gate with inputs `(A, B, 0, Cin)`.
A Peres or Toffoli gate with C = 0 gives `R = A & B`. Outputs that a
circuit does not use are called *garbage*. They exist only to keep each gate
reversible. Below the top level they are still brought out of the gate and
helper modules (`g_p`, `g_q`, `pp_out`, `hi_prod`), but the composite
blocks leave them unconnected. Lint reports these as empty pin
connections, and that is intended.

### Gate families of the multiplier

Two parameters of type `rev_pkg::sum_gate_e` / `rev_pkg::ppg_gate_e` pick
the gate family. They pass down from `rev_alu` through every multiplier
level:

* `SUM_GATE`: `SUM_HNG` (default) or `SUM_TSG`. This gate is used for every
  full and half adder. A half adder is the full adder with carry-in 0.
* `PPG_GATE`: `PPG_PERES` (default) or `PPG_TOFFOLI`. This gate is used for
  every partial-product AND.

All four combinations compute identical values and differ only in
reversible-gate cost. HNG adders with Peres partial products is the
lowest-quantum-cost combination, and it is the default.

## Logic unit and Gray converter

`rev_logic_unit` is one Peres gate per bit with `C = 0`. Its outputs are
`xor_out[i] = a[i]^b[i]`, `and_out[i] = a[i]&b[i]` and `pp_out[i] = a[i]`
(garbage). Test equality of the operands as `xor_out == 0`. No separate flag
is built.

`rev_bin2gray` is one Feynman gate per bit. Bit `i < 7` takes
`(a[i+1], a[i])` and outputs `gray[i] = a[i+1]^a[i]`. The top bit takes
`(a[7], 0)`, so `gray[7] = a[7]`. The result is the reflected binary code
`a ^ (a >> 1)`. The converter is fed from operand `a`.

## Where this implementation departs from the original design

* **Gate count of the multiplier.** The original 8×8 multiplier (HNG adders,
  Peres partial products) is reported as 60 gates, with quantum cost 288 and
  116 garbage outputs. The internal arrangement of its 4×4 multipliers is not
  published. Here each 4×4 multiplier is four 2×2 Vedic blocks plus a 4-bit
  and a 6-bit ripple adder, which is 34 gates. The 8×8 multiplier is
  therefore 76 gates (2 × 34 + 8). The function is the same, but the gate
  count and quantum cost are higher than the published numbers. Changing
  `rev_vedic_mult4` is the place to reduce them.
* **Bit order.** The original simulation displays some results with the
  halves of the byte exchanged. Here bit *i* of every output comes from
  bit *i* of the operands.
* **No operand check, no result multiplexer.** The published unit has
  neither. Flagging operands that break the equidistant condition, or
  selecting one result with an opcode, are left to the surrounding logic.
* **Timing.** The published work reports FPGA delays. Those apply to that
  implementation and are not claimed here. The critical path is
  `a[7:4]/b[7:4]` → 4×4 multiplier (a 2×2 block, then a 4-bit and a 6-bit
  ripple adder) → 8-bit ripple adder → `p[15:8]`.

## Files

`rtl/` holds one module or package per file:

* `rev_pkg`: the gate-family enums.
* Gates: `feynman_gate`, `toffoli_gate`, `peres_gate`, `tsg_gate`,
  `hng_gate`.
* Cells: `rev_full_adder`, `rev_pp_and`.
* `rev_adder`: N-bit ripple adder.
* `rev_vedic_mult2`, `rev_vedic_mult4`, `rev_vedic_mult8`: the multipliers.
* `rev_logic_unit`, `rev_bin2gray`: the logic unit and the Gray converter.
* `rev_alu`: the top level.

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
one prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

## Verification

Every testbench works out expected values on its own, not by copying the
RTL:

* The gates are tested on all input patterns. They are checked against
  their equations and checked to be one-to-one, which is reversibility.
* `rev_full_adder`, `rev_pp_and`, `rev_vedic_mult2` and `rev_vedic_mult4`
  are tested exhaustively in every gate family.
* `rev_adder` is tested on all 2¹⁷ operand and carry combinations, in the
  HNG and TSG forms.
* `rev_vedic_mult8` is tested on all 65536 operand pairs against its
  equations, with the default gates and with TSG/Toffoli. It is also tested
  on all 90 BCD equidistant pairs (decimal product) and all 240 binary
  equidistant pairs (exact product), plus the 24 × 26 example.
* `rev_logic_unit` and `rev_bin2gray` are tested exhaustively. The Gray
  output is decoded back to binary, and the test checks that successive
  codes differ in exactly one bit.
* `tb_rev_alu` runs the top at its default parameters on all 65536 operand
  pairs. It checks all four outputs and counts each mechanism: BCD and
  binary equidistant products, carries in the upper-half adder, and detected
  equalities. It fails if any mechanism is never exercised.

Run one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/rev_pkg.sv tb/tb_rev_alu.sv \
          --top-module tb_rev_alu -Mdir obj_tb_rev_alu
./obj_tb_rev_alu/Vtb_rev_alu
```

Substitute any other `tb_<module>` in both places. Each run takes well under a
second.
