// half_adder: one-bit half adder, the basic cell of the 2x2 multiplier and
// of the first addition stage of the larger ones.
//
// sum = a xor b, carry = a and b. Purely combinational: one gate delay from
// any input to either output.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
