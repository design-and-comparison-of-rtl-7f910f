// tb_half_adder: exhaustive self-checking test of the half adder. All four
// input pairs are applied and {carry, sum} is compared with the integer sum
// a + b. A watchdog ends the run with a failure if it does not finish.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
