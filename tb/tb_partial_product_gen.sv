// tb_partial_product_gen: exhaustive check of the four AND partial products
// of a 2x2 multiplication against products computed from integer bit
// extraction. 16 operand pairs, 4 checks each. Watchdog ends the run after
// 1 us of simulated time.
module tb_partial_product_gen;
  timeunit 1ns; timeprecision 1ps;

  logic [1:0] a, b;
  logic pp00, pp10, pp01, pp11;
  int checks = 0, failures = 0;

  partial_product_gen dut (.a, .b, .pp00, .pp10, .pp01, .pp11);

  task automatic expect_bit(string what, logic got, int exp);
    checks++;
    if (got !== exp[0]) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d got=%0b exp=%0d", what, a, b, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        expect_bit("a0b0", pp00, (i % 2) * (j % 2));
        expect_bit("a1b0", pp10, (i / 2) * (j % 2));
        expect_bit("a0b1", pp01, (i % 2) * (j / 2));
        expect_bit("a1b1", pp11, (i / 2) * (j / 2));
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
