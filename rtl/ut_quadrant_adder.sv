// ut_quadrant_adder: the adder network that joins the four sub-products of
// a 2H x 2H Urdhva multiplier into its 4H-bit product.
//
// With a = {ah, al} and b = {bh, bl} split into H-bit halves, the product is
//   a*b = q_hh*2^(2H) + (q_hl + q_lh)*2^H + q_ll
// where q_ll = al*bl (vertical, low), q_hh = ah*bh (vertical, high) and
// q_hl = ah*bl, q_lh = al*bh (the crosswise pair). The low H bits of q_ll
// are final product bits. The rest is a three-operand sum at weight 2^H:
//   x = {q_hh, q_ll[2H-1:H]}   (3H bits)
//   y = q_hl, z = q_lh         (2H bits, zero-padded to 3H)
// A carry-save row of 2H full adders reduces x[2H-1:0], y and z to sum and
// carry vectors in one full-adder delay, and a 3H-bit ripple-carry adder
// merges them with the upper half of q_hh; zero padding gives every operand
// of that adder the same width. Only the split into a carry-save stage and
// a ripple-carry vector merging adder follows the described architecture;
// the exact operand alignment and adder widths are this design's choice.
//
// Interface: the four 2H-bit sub-products in, p = 4H-bit product out.
// Purely combinational. The merging adder can never carry out of bit 3H-1
// (the product fits in 4H bits); a deferred assertion checks that.
module ut_quadrant_adder #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] q_ll,
  input  logic [2*H-1:0] q_hl,
  input  logic [2*H-1:0] q_lh,
  input  logic [2*H-1:0] q_hh,
  output logic [4*H-1:0] p
);
  logic [2*H-1:0] csa_x;
  logic [2*H-1:0] csa_s;
  logic [2*H-1:0] csa_c;
  logic [3*H-1:0] vma_a;
  logic [3*H-1:0] vma_b;
  logic [3*H-1:0] vma_sum;
  logic           vma_cout;

  assign csa_x = {q_hh[H-1:0], q_ll[2*H-1:H]};

  carry_save_adder #(.W(2*H)) u_csa (
    .x(csa_x),
    .y(q_hl),
    .z(q_lh),
    .s(csa_s),
    .c(csa_c)
  );

  always_comb begin
    vma_a = {q_hh[2*H-1:H], csa_s};
    vma_b = '0;
    vma_b[2*H:1] = csa_c;
  end

  ripple_carry_adder #(.W(3*H)) u_vma (
    .a   (vma_a),
    .b   (vma_b),
    .cin (1'b0),
    .sum (vma_sum),
    .cout(vma_cout)
  );

  assign p = {vma_sum, q_ll[H-1:0]};

  always_comb begin
    a_no_overflow : assert final (!vma_cout)
      else $error("ut_quadrant_adder: merging adder carried out");
  end
endmodule
