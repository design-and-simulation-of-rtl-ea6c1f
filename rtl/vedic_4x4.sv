// vedic_4x4: 4-bit by 4-bit unsigned Urdhva Tiryakbhyam multiplier.
//
// The operands are split into 2-bit halves. Four vedic_2x2 blocks form the
// vertical (al*bl, ah*bh) and crosswise (ah*bl, al*bh) sub-products in
// parallel; their AND gates are the only partial-product logic. A
// ut_quadrant_adder (a carry-save row plus a ripple-carry vector merging
// adder with zero-padded inputs) sums them into the 8-bit product. Building
// the 4x4 from 2x2 blocks mirrors how the 8x8 is built from 4x4 blocks.
//
// Interface: a, b unsigned operands, p = a * b. Purely combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q_ll, q_hl, q_lh, q_hh;

  vedic_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q_ll));
  vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q_hl));
  vedic_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q_lh));
  vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q_hh));

  ut_quadrant_adder #(.H(2)) u_add (
    .q_ll(q_ll),
    .q_hl(q_hl),
    .q_lh(q_lh),
    .q_hh(q_hh),
    .p   (p)
  );
endmodule
