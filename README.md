# 8x8 Urdhva Tiryakbhyam ("vertically and crosswise") multiplier

This is a purely combinational unsigned multiplier, `P[15:0] = A[7:0] * B[7:0]`,
built by the Urdhva Tiryakbhyam rule of Vedic arithmetic. The rule is divide and
conquer. Split each operand into halves. Form the two *vertical* products
(low x low, high x high) and the two *crosswise* products (high x low, low x high),
all at once. Then add them at their weights:

    a*b = (ah*bh) << 2H  +  (ah*bl + al*bh) << H  +  al*bl      (H = half width)

The 8x8 uses four 4x4 multipliers, each 4x4 uses four 2x2 multipliers, and the
2x2 is four AND gates and two half adders. All sub-products are computed in
parallel. The only carry chain is in the adder that joins the four
sub-products at each level. There is no clock, register or handshake: `p` is
valid once the inputs have settled.

## Hierarchy

    vedic_8x8                      top, 8x8 -> 16
    ├── vedic_4x4  x4              4x4 -> 8
    │   ├── vedic_2x2  x4          2x2 -> 4: 4 AND + 2 half_adder
    │   └── ut_quadrant_adder #(H=2)
    └── ut_quadrant_adder #(H=4)
            ├── carry_save_adder #(W=2H)      one row of full_adder
            └── ripple_carry_adder #(W=3H)    chain of full_adder

| file | role |
|---|---|
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | one-bit cells |
| `rtl/carry_save_adder.sv` | W full adders side by side (3:2 compressor), no carry propagation |
| `rtl/ripple_carry_adder.sv` | W-bit ripple-carry adder, used as the vector merging adder |
| `rtl/vedic_2x2.sv` | 2x2 multiplier |
| `rtl/ut_quadrant_adder.sv` | joins four 2H-bit sub-products into the 4H-bit product |
| `rtl/vedic_4x4.sv`, `rtl/vedic_8x8.sv` | the two recursive levels |

## The 2x2 cell

The partial products are `a0b0`, `a1b0`, `a0b1` and `a1b1`. `p[0] = a0b0`. The
first half adder adds the crosswise pair `a1b0 + a0b1`: its sum is `p[1]`. The
second half adder adds that carry to `a1b1`, giving `p[2]` and `p[3]`. The delay
is one AND gate plus two half adders.

## Joining the four sub-products (`ut_quadrant_adder`)

This block needs the most care. It is identical at both levels, with `H = 2`
inside the 4x4 and `H = 4` inside the 8x8. The four inputs are `q_ll = al*bl`,
`q_hl = ah*bl`, `q_lh = al*bh` and `q_hh = ah*bh`, each 2H bits wide.

1. `q_ll[H-1:0]` is already final: it becomes `p[H-1:0]`.
2. Everything above bit H is a sum of three operands, taken at weight 2^H:
   * `x = {q_hh, q_ll[2H-1:H]}` (3H bits),
   * `y = q_hl` and `z = q_lh`, each zero-padded from 2H to 3H bits.
3. A **carry-save row** of 2H full adders handles the 2H low positions, where
   all three operands have bits. It gives a sum vector `s` and a carry vector
   `c` in one full-adder delay, with `x + y + z = s + 2c` over those positions.
4. The **vector merging adder** is a 3H-bit ripple-carry adder. Its inputs are
   `{q_hh[2H-1:H], s}` and `c` shifted left by one, with zeros filling the rest.
   The zero padding gives both inputs the same width. The adder's sum is
   `p[4H-1:H]`.

The product always fits in 4H bits, so the merging adder can never carry out.
A deferred assertion (`a_no_overflow`) checks this in simulation.

For the 8x8, the critical path is one 4x4 multiplier, then one full adder, then
the 12-bit ripple. Inside each 4x4 it is one 2x2, then one full adder, then a
6-bit ripple.

## Where this RTL makes its own choices

* **Unsigned only.** Nothing handles signed operands. Signed or Q15/Q31
  fixed-point use needs sign handling and wider operands on top of this.
* **The 4x4 is recursive.** It is built from four 2x2 cells plus the quadrant
  adder, the same way the 8x8 is built from 4x4 blocks. A 4x4 can also be
  described column by column. Column k adds every `a[i]&b[k-i]` to the
  multi-bit carry from column k-1, and the LSB of that sum is product bit k.
  That column form is used here as an independent reference model in the
  8x8 testbench, not as hardware.
* **Adder widths and alignment** in the quadrant adder are this design's own.
  The architecture it follows asks for a carry-save stage, a ripple-carry
  vector merging adder and zero-padded adder inputs, but not for exact widths.
  The usual delay estimate for this architecture is one 4x4 multiplier, three
  full adders and an 8-bit ripple adder. This RTL has one full-adder row and a
  12-bit ripple instead. The function is the same; the gate-level delay is
  not.
* **No carry-skip logic.** The partial-product addition is carry-save plus
  ripple-carry only.
* `carry_save_adder` and `ripple_carry_adder` default to `W = 8`. The
  multipliers set W explicitly.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. For example, the full-size end-to-end test:

    verilator --binary --timing --assert -Irtl tb/tb_vedic_8x8.sv \
              --top-module tb_vedic_8x8 -Mdir obj_8x8 -o sim
    ./obj_8x8/sim

`tb_vedic_8x8` applies all 65,536 operand pairs to the top at its default
configuration. It compares `p` with `A*B` and with the column-wise reference.
It also counts how often these happened, and fails if any never did:

* a non-zero carry vector in the 8x8 carry-save row,
* a non-zero carry vector in a 4x4 carry-save row,
* a carry rippling from the carry-save region into the upper half of `ah*bh`,
* the maximum product 255 x 255.

The other testbenches are exhaustive where the input space is small (2x2, 4x4,
the one-bit cells, the 8-bit ripple-carry adder, the quadrant adder at H = 2).
They are random plus corner cases otherwise. All of them pass.

## Changing it

* A 16x16 multiplier follows the same pattern. Instantiate four `vedic_8x8`
  and one `ut_quadrant_adder #(.H(8))`.
* To pipeline the design, put registers between the sub-multipliers and
  `ut_quadrant_adder`. The quadrant adder itself holds no state.
