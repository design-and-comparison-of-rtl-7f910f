// vedic_128x128: 128 x 128-bit unsigned Vedic (Urdhva-Tiryagbhyam) multiplier,
// the top of the design. Fully combinational: a 256-bit product for every pair
// of 128-bit operands, with no clock, registers or handshake.
//
// The operands are split into 64-bit halves, a = {aH, aL}, b = {bH, bL}. Four
// 64x64 Vedic multipliers (vedic_nxn, itself built recursively down to 2x2
// cells) compute
//   ll = aL*bL, hl = aH*bL, lh = aL*bH, hh = aH*bH      (128 bits each)
// and three 128-bit ripple-carry adders recombine them:
//   adder 1: {ca1, mid} = hl + lh
//   adder 2: {ca2, low} = mid + {64 zeros, ll[127:64]}
//   adder 3: {ca3, hi } = hh + {63 zeros, ca1 | ca2, low[127:64]}
//   p = {hi, low[63:0], ll[63:0]}
// The four 64x64 blocks, the three 128-bit ripple-carry adders and the way the
// product is assembled follow the source design. Routing ca2 into adder 3
// (ORed with ca1, the two are never 1 together) is this design's own choice,
// needed for a correct product; ca3 is always 0 and left unused.
//
// Interface: a, b (128 bits) in, p (256 bits) out. The delay is that of the
// deepest path through five levels of recursion plus three 128-bit carry
// ripples; there is no cycle latency.
module vedic_128x128 (
  input  logic [127:0] a,
  input  logic [127:0] b,
  output logic [255:0] p
);

  localparam int N = 128;
  localparam int H = N / 2;

  logic [N-1:0] ll, hl, lh, hh;
  logic [N-1:0] mid, low, hi;
  logic         ca1, ca2, ca3;

  vedic_nxn #(.N(H)) u_mul_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(ll));
  vedic_nxn #(.N(H)) u_mul_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(hl));
  vedic_nxn #(.N(H)) u_mul_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(lh));
  vedic_nxn #(.N(H)) u_mul_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(hh));

  ripple_carry_adder #(.W(N)) u_rca1 (
    .a(hl), .b(lh), .cin(1'b0), .sum(mid), .cout(ca1)
  );
  ripple_carry_adder #(.W(N)) u_rca2 (
    .a(mid), .b({{H{1'b0}}, ll[N-1:H]}), .cin(1'b0), .sum(low), .cout(ca2)
  );
  ripple_carry_adder #(.W(N)) u_rca3 (
    .a(hh), .b({{(H-1){1'b0}}, ca1 | ca2, low[N-1:H]}), .cin(1'b0),
    .sum(hi), .cout(ca3)
  );

  assign p = {hi, low[H-1:0], ll[H-1:0]};

endmodule
