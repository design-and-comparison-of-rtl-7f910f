// tb_vedic_nxn: self-checking test of the generalised N x N Vedic multiplier
// at four sizes. N = 4 (the 4x4 module) and N = 8 (the 8x8 module) are tested
// exhaustively; N = 16 and the default N = 64 get corner cases and random
// operands. Every product is compared with a widened multiplication done by
// the testbench. Directed operands a = {all ones, 2}, b = all ones make the
// middle-adder carry ca2 fire at every size. For the 4x4 and 8x8 instances
// the testbench works out from the operands how many vectors exercise the
// first-adder carry ca1 and the second-adder carry ca2; a carry that is never
// exercised counts as a failure. The block is combinational: each result is
// checked one time step after the operands change. A watchdog ends the run
// with a failure.
module tb_vedic_nxn;
  logic [3:0]   a4, b4;
  logic [7:0]   p4;
  logic [7:0]   a8, b8;
  logic [15:0]  p8;
  logic [15:0]  a16, b16;
  logic [31:0]  p16;
  logic [63:0]  a64, b64;
  logic [127:0] p64;
  int checks = 0, failures = 0;
  int ca1_seen = 0, ca2_seen = 0;

  vedic_nxn #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  vedic_nxn #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_nxn #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  vedic_nxn           dut64 (.a(a64), .b(b64), .p(p64));

  task automatic check_wide();
    logic [31:0]  e16;
    logic [127:0] e64;
    #1;
    e16 = 32'(a16) * 32'(b16);
    e64 = 128'(a64) * 128'(b64);
    checks += 2;
    if (p16 != e16) begin
      failures++;
      $display("FAIL N=16 %h * %h -> %h (expected %h)", a16, b16, p16, e16);
    end
    if (p64 != e64) begin
      failures++;
      $display("FAIL N=64 %h * %h -> %h (expected %h)", a64, b64, p64, e64);
    end
  endtask

  // Works out, from the operands of an n x n multiply (n = 4 or 8), whether
  // the first adder (hl + lh) and the second adder (low n bits of that sum
  // plus the upper half of ll) produce a carry, and counts each.
  task automatic count_carries(input int n, input int x, input int y);
    int h, m, xl, xh, yl, yh, mid;
    h   = n / 2;
    m   = (1 << h) - 1;
    xl  = x & m;
    xh  = (x >> h) & m;
    yl  = y & m;
    yh  = (y >> h) & m;
    mid = xh * yl + xl * yh;
    if (mid >= (1 << n)) ca1_seen++;
    if ((mid % (1 << n)) + ((xl * yl) >> h) >= (1 << n)) ca2_seen++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; a64 = '0; b64 = '0;
    // 4x4 and 8x8: every operand pair, both sizes in the same loop.
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (p8 != 16'(i * j)) begin
          failures++;
          $display("FAIL N=8 %0d * %0d -> %0d", i, j, p8);
        end
        if (i < 16 && j < 16) begin
          checks++;
          if (p4 != 8'(i * j)) begin
            failures++;
            $display("FAIL N=4 %0d * %0d -> %0d", i, j, p4);
          end
          count_carries(4, i, j);
        end
        count_carries(8, i, j);
      end
    end
    // Corners: zero, one, largest operands, and the ca2 case.
    a16 = '0; b16 = '1; a64 = '0; b64 = '1; check_wide();
    a16 = 16'd1; b16 = '1; a64 = 64'd1; b64 = '1; check_wide();
    a16 = '1; b16 = '1; a64 = '1; b64 = '1; check_wide();
    a16 = {8'hff, 8'd2}; b16 = '1; a64 = {32'hffff_ffff, 32'd2}; b64 = '1;
    check_wide();
    for (int i = 0; i < 3000; i++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      a64 = {$urandom, $urandom};
      b64 = {$urandom, $urandom};
      check_wide();
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
    $display("ca1 set on %0d vectors, ca2 on %0d (4x4 and 8x8)", ca1_seen, ca2_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
