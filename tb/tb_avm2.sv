// tb_avm2: exhaustive check of the 2x2 approximate Vedic multiplier.
//
// Reference: the exact product, except for 3 x 3, where two OR-based half
// adders turn 9 into 15 (the crosswise sum 1 + 1 reads as sum 1 carry 1, and
// the carry then ORs into a1b1). The bench also checks that exactly one of the
// 16 operand pairs differs from the exact product.
module tb_avm2;
  timeunit 1ns; timeprecision 1ps;

  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;
  int wrong = 0;

  avm2 dut (.a, .b, .p);

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        int exp;
        a = 2'(i); b = 2'(j);
        #1;
        exp = (i == 3 && j == 3) ? 15 : i * j;
        checks++;
        if (int'(p) != exp) begin
          failures++;
          $display("FAIL %0d x %0d got %0d exp %0d", i, j, p, exp);
        end
        if (int'(p) != i * j) wrong++;
      end
    end
    checks++;
    if (wrong != 1) begin
      failures++;
      $display("FAIL erroneous outputs %0d, expected 1", wrong);
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
