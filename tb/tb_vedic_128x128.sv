// tb_vedic_128x128: end-to-end self-checking test of the 128 x 128-bit Vedic
// multiplier at its full size. It applies the worked example 252 * 846, zero,
// one and all-ones operands, two directed cases that make the top-level middle
// carry ca2 fire (a = {64 ones, 2} with b = all ones, and the same swapped),
// and random operands, comparing every 256-bit product with a widened
// multiplication done by the testbench. From the operands it works out how
// often each of the two top-level recombination carries (ca1 out of the first
// adder, ca2 out of the second) had to fire; a carry never exercised is a
// failure. The design is combinational: each result is checked one time step
// after the operands change. A watchdog ends the run with a failure.
module tb_vedic_128x128;
  logic [127:0] a, b;
  logic [255:0] p;
  int checks = 0, failures = 0;
  int ca1_seen = 0, ca2_seen = 0;

  vedic_128x128 dut (.a(a), .b(b), .p(p));

  task automatic apply(input logic [127:0] x, input logic [127:0] y);
    logic [255:0] expect_v;
    logic [128:0] hl, lh, ll, mid;
    a = x;
    b = y;
    #1;
    expect_v = 256'(x) * 256'(y);
    checks++;
    if (p != expect_v) begin
      failures++;
      $display("FAIL %h * %h\n  got      %h\n  expected %h", x, y, p, expect_v);
    end
    // Which top-level recombination carries these operands exercise, worked
    // out from the partial products: ca1 from hl + lh, ca2 from adding ll's
    // upper half to the low 128 bits of that sum.
    hl  = 129'(x[127:64]) * 129'(y[63:0]);
    lh  = 129'(x[63:0])   * 129'(y[127:64]);
    ll  = 129'(x[63:0])   * 129'(y[63:0]);
    mid = hl + lh;
    if (mid[128]) ca1_seen++;
    if ((129'(mid[127:0]) + (ll >> 64)) >= (129'(1) << 128)) ca2_seen++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(128'd252, 128'd846);
    checks++;
    if (p != 256'd213192) begin
      failures++;
      $display("FAIL 252 * 846 -> %0d", p);
    end
    apply('0, '0);
    apply(128'd1, '1);
    apply('1, '1);
    apply({{64{1'b1}}, 64'd2}, '1);
    apply('1, {{64{1'b1}}, 64'd2});
    apply({{64{1'b1}}, 64'd0}, {64'd0, {64{1'b1}}});
    for (int i = 0; i < 5000; i++) begin
      apply({$urandom, $urandom, $urandom, $urandom},
            {$urandom, $urandom, $urandom, $urandom});
    end
    checks += 2;
    if (ca1_seen == 0) begin
      failures++;
      $display("FAIL carry ca1 never set");
    end
    if (ca2_seen == 0) begin
      failures++;
      $display("FAIL carry ca2 never set");
    end
    $display("ca1 set on %0d vectors, ca2 on %0d", ca1_seen, ca2_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
