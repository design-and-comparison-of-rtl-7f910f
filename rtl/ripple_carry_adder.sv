// ripple_carry_adder: W-bit ripple-carry adder, the adder used to recombine
// partial products at every level of the Vedic multiplier (4-bit adders in the
// 4x4 stage, 8-bit in the 8x8 stage, ..., 128-bit in the 128x128 stage).
//
// Bit i is a full adder: sum[i] = a[i] ^ b[i] ^ c[i] and
// c[i+1] = a[i]b[i] | c[i](a[i] ^ b[i]), with c[0] = cin and cout = c[W].
// The carry ripples through all W cells, so the delay grows linearly with W.
//
// Interface: a, b, cin in; sum (W bits) and cout out. Purely combinational.
// The ripple-carry type and the widths come from the source design; the
// carry input (tied to 0 by every user in this design) is an addition that
// makes the block a general adder.
module ripple_carry_adder #(
  parameter int W = 128
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  always_comb begin
    logic c;
    c = cin;
    for (int i = 0; i < W; i++) begin
      sum[i] = a[i] ^ b[i] ^ c;
      c      = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
    end
    cout = c;
  end

endmodule
