// tb_ripple_carry_adder: self-checking test of the ripple-carry adder at two
// widths. The 4-bit instance (the width of the 4x4 stage) is tested
// exhaustively over a, b and cin; the default 128-bit instance gets
// full-length carry ripples (all ones plus one) and random operands. Results
// are compared with a + b + cin computed one bit wider in the testbench.
// A watchdog ends the run with a failure.
module tb_ripple_carry_adder;
  logic [3:0]   a4, b4, s4;
  logic         cin4, co4;
  logic [127:0] a, b, s;
  logic         cin, co;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .sum(s4), .cout(co4));
  ripple_carry_adder          dut  (.a(a),  .b(b),  .cin(cin),  .sum(s),  .cout(co));

  task automatic check128();
    logic [128:0] expect_v;
    #1;
    expect_v = {1'b0, a} + {1'b0, b} + 129'(cin);
    checks++;
    if ({co, s} != expect_v) begin
      failures++;
      $display("FAIL %h + %h + %0b -> %h", a, b, cin, {co, s});
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; cin = 1'b0;
    for (int i = 0; i < 512; i++) begin
      {cin4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(cin4))) begin
        failures++;
        $display("FAIL W=4 %0d + %0d + %0b -> %0d", a4, b4, cin4, {co4, s4});
      end
    end
    a = '1; b = 128'd1; cin = 1'b0; check128();
    a = '1; b = '0;     cin = 1'b1; check128();
    a = '1; b = '1;     cin = 1'b1; check128();
    a = '0; b = '0;     cin = 1'b0; check128();
    for (int i = 0; i < 2000; i++) begin
      a   = {$urandom, $urandom, $urandom, $urandom};
      b   = {$urandom, $urandom, $urandom, $urandom};
      cin = 1'($urandom);
      check128();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
