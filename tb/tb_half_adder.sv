// tb_half_adder: exhaustive check that {carry, sum} equals a + b.
module tb_half_adder;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a, .b, .sum, .carry);

  initial begin
    for (int r = 0; r < 4; r++) begin
      {a, b} = 2'(r);
      #1;
      checks++;
      if (2 * int'(carry) + int'(sum) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b got c=%0b s=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
