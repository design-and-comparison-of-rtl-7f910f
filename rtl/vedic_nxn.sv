// vedic_nxn: N x N-bit unsigned Vedic (Urdhva-Tiryagbhyam) multiplier for N a
// power of two, N >= 2. With N = 4 it is the 4x4 module, with N = 8 the 8x8
// module, and with the default N = 64 the sub-multiplier of the 128x128 top.
//
// Each operand is split into halves of H = N/2 bits, a = {aH, aL} and
// b = {bH, bL}. Four H x H multipliers (this module again, down to the 2x2
// leaf cell) give the vertical and crosswise partial products
//   ll = aL*bL, hl = aH*bL, lh = aL*bH, hh = aH*bH      (each N bits)
// and three N-bit ripple-carry adders combine them:
//   adder 1: {ca1, mid} = hl + lh
//   adder 2: {ca2, low} = mid + {H zeros, ll[N-1:H]}
//   adder 3: {ca3, hi } = hh + {H-1 zeros, ca1 | ca2, low[N-1:H]}
//   p = {hi, low[H-1:0], ll[H-1:0]}
// The split, the four sub-multipliers, the three N-bit adders and their
// operands follow the source design. Both ca1 and ca2 carry weight 2^(N+H);
// they are never 1 together (hl + lh + (ll >> H) < 2^(N+1)), so their OR is
// their sum. Feeding ca2 into adder 3 this way is this design's own choice:
// the source leaves ca2 unconnected, which loses 2^(N+H) for some operands
// (4x4: 14*15). ca3 is always 0 because the product fits 2N bits.
//
// Interface: a, b in (N bits), p out (2N bits). Purely combinational; the
// critical path runs through the leaf cells and then three ripple chains per
// level.
//
// The module instantiates itself with N/2. Verilator's lint, when this module
// is its own top, does not expand those self-instances and so reports the
// sub-products as undriven and a, b as unused; every instantiated copy (in
// vedic_128x128 or a testbench) elaborates and simulates fully, so the
// warning stands. ca3 is unused on purpose (see above).
module vedic_nxn #(
  parameter int N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int H = N / 2;

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_width
    $error("vedic_nxn: N must be a power of two and at least 2");
  end

  if (N == 2) begin : g_leaf
    vedic_2x2 u_leaf (.a(a), .b(b), .p(p));
  end else begin : g_split
    logic [N-1:0] ll, hl, lh, hh;
    logic [N-1:0] mid, low, hi;
    logic         ca1, ca2, ca3;

    if (H == 2) begin : g_sub2
      vedic_2x2 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(ll));
      vedic_2x2 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(hl));
      vedic_2x2 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(lh));
      vedic_2x2 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(hh));
    end else begin : g_subn
      vedic_nxn #(.N(H)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(ll));
      vedic_nxn #(.N(H)) u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(hl));
      vedic_nxn #(.N(H)) u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(lh));
      vedic_nxn #(.N(H)) u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(hh));
    end

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
  end

endmodule
