// carry_save_adder: a row of W independent full adders (a 3:2 compressor).
//
// Reduces three W-bit operands x, y, z to a sum vector s and a carry vector
// c without propagating any carry along the row, so its delay is one full
// adder whatever W is. The value is preserved: x + y + z == s + 2*c, where
// c[i] carries weight 2^(i+1). A vector merging adder turns (s, c) into the
// final binary sum. Purely combinational.
module carry_save_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (z[i]),
      .sum (s[i]),
      .cout(c[i])
    );
  end
endmodule
