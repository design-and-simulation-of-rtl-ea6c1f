// vedic_8x8: 8-bit by 8-bit unsigned Urdhva Tiryakbhyam multiplier, the top
// of the design.
//
// A[7:0] and B[7:0] are split into 4-bit halves. Four vedic_4x4 blocks
// compute the vertical (al*bl, ah*bh) and crosswise (ah*bl, al*bh)
// sub-products in parallel. A ut_quadrant_adder reduces the three operands
// that overlap at bit 4 with one carry-save row of full adders and merges
// the result with a ripple-carry adder whose inputs are zero-padded to a
// common width, giving P[15:0]. The critical path is one 4x4 multiplier,
// one full adder and the ripple-carry merging adder.
//
// Interface: a, b unsigned 8-bit operands, p = a * b (16 bits). Purely
// combinational: the product is valid as soon as the inputs settle, with no
// clock, register or handshake.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q_ll, q_hl, q_lh, q_hh;

  vedic_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q_ll));
  vedic_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q_hl));
  vedic_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q_lh));
  vedic_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q_hh));

  ut_quadrant_adder #(.H(4)) u_add (
    .q_ll(q_ll),
    .q_hl(q_hl),
    .q_lh(q_lh),
    .q_hh(q_hh),
    .p   (p)
  );
endmodule
