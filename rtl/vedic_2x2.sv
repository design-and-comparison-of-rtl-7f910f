// vedic_2x2: 2x2-bit multiplier by the Urdhva-Tiryagbhyam ("vertically and
// crosswise") rule, the leaf cell of the whole multiplier tree.
//
// Four AND gates form the bit products a0b0, a1b0, a0b1 and a1b1.
//   vertical  : s0      = a0b0
//   crosswise : {c1,s1} = a1b0 + a0b1          (first half adder)
//   vertical  : {c2,s2} = c1 + a1b1            (second half adder)
// The product is p = {c2, s2, s1, s0}. The structure (four AND gates, two
// half adders, and which bits each adder takes) follows the source design.
//
// Interface: a, b are 2-bit unsigned operands, p the 4-bit unsigned product.
// Purely combinational; the longest path is one AND gate and two half adders.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic a0b0, a1b0, a0b1, a1b1;
  logic s1, c1, s2, c2;

  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  half_adder u_ha_cross (.a(a1b0), .b(a0b1), .sum(s1), .carry(c1));
  half_adder u_ha_top   (.a(c1),   .b(a1b1), .sum(s2), .carry(c2));

  assign p = {c2, s2, s1, a0b0};

endmodule
