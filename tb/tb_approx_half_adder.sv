// tb_approx_half_adder: checks the approximate half adder against its truth
// table (sum = A OR B, carry = A AND B) and checks that the signed error
// exact - approximate is 0 for three input rows and -1 for A = B = 1.
module tb_approx_half_adder;
  timeunit 1ns; timeprecision 1ps;

  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  // Truth table rows {a, b} -> {carry, sum}
  localparam logic [1:0] TABLE_CS [4] = '{2'b00, 2'b01, 2'b01, 2'b11};
  localparam int         TABLE_ERR[4] = '{0, 0, 0, -1};

  approx_half_adder dut (.a, .b, .sum, .carry);

  initial begin
    for (int r = 0; r < 4; r++) begin
      int exact, approx;
      {a, b} = 2'(r);
      #1;
      checks++;
      if ({carry, sum} !== TABLE_CS[r]) begin
        failures++;
        $display("FAIL a=%0b b=%0b got c=%0b s=%0b", a, b, carry, sum);
      end
      exact  = int'(a) + int'(b);
      approx = 2 * int'(carry) + int'(sum);
      checks++;
      if (exact - approx != TABLE_ERR[r]) begin
        failures++;
        $display("FAIL error a=%0b b=%0b err=%0d", a, b, exact - approx);
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
