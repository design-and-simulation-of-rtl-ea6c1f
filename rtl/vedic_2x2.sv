// vedic_2x2: 2-bit by 2-bit unsigned multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") scheme.
//
// Four AND gates form the partial products all at once: the vertical ones
// a0b0 and a1b1 and the crosswise pair a1b0, a0b1. Two half adders add them:
// the first adds the crosswise pair (its sum is p[1]), the second adds the
// first one's carry to a1b1 (sum p[2], carry p[3]). The delay is one AND
// gate plus two half adders. The structure is the one the scheme prescribes
// for two bits; the port names are this design's own.
//
// Interface: a, b are the unsigned operands, p = a * b. Purely
// combinational, no clock.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  assign p[0] = a0b0;

  half_adder u_ha1 (.a(a1b0), .b(a0b1), .sum(p[1]), .carry(c1));
  half_adder u_ha2 (.a(a1b1), .b(c1),   .sum(p[2]), .carry(p[3]));
endmodule
