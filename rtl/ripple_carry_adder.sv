// ripple_carry_adder: W-bit ripple-carry adder built as a chain of full
// adders, used as the final vector merging adder of the multipliers.
//
// {cout, sum} = a + b + cin. The carry ripples from bit 0 to bit W-1, so
// the delay grows with W full-adder carry delays. Purely combinational.
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[W];
endmodule
