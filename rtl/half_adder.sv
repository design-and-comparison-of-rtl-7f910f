// half_adder: one-bit half adder, the adding cell of the 2x2 Vedic multiplier.
//
// sum is the exclusive OR of the two input bits and carry their AND, so
// {carry, sum} = a + b. Purely combinational, no clock.
//
// The use of half adders in the 2x2 multiplier follows the source design; the
// XOR/AND gate realisation is the textbook one.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  assign sum   = a ^ b;
  assign carry = a & b;

endmodule
