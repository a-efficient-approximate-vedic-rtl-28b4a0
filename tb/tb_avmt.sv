// tb_avmt: end-to-end, exhaustive test of the 4x4 approximate Vedic
// multiplier at its only configuration.
//
// All 256 operand pairs are applied. The reference is built from integers:
// each 2x2 sub-product is the exact product except 3 x 3 -> 15, and the four
// sub-products are weighted by 1, 4, 4 and 16 and summed modulo 256 (the
// product is 8 bits wide). On top of the bit-exact comparison the bench
// checks the accuracy figures of the design: exactly 49 of the 256 products
// differ from the exact product. It also counts how often each mechanism
// occurred and fails if one never did:
//   approx  - at least one AVM2 hit its 3 x 3 approximation
//   exact   - the product equals the true product
//   wrap    - the approximate sum exceeded 255 and wrapped
module tb_avmt;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] a, b;
  logic [7:0] z;
  int checks = 0, failures = 0;
  int n_approx = 0, n_exact = 0, n_wrap = 0, n_wrong = 0;

  avmt dut (.a, .b, .z);

  function automatic int sub_ref(int x, int y);
    return (x == 3 && y == 3) ? 15 : x * y;
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        int full, exp;
        a = 4'(i); b = 4'(j);
        #1;
        full = sub_ref(i % 4, j % 4)
             + 4  * sub_ref(i % 4, j / 4)
             + 4  * sub_ref(i / 4, j % 4)
             + 16 * sub_ref(i / 4, j / 4);
        exp = full % 256;
        checks++;
        if (int'(z) != exp) begin
          failures++;
          $display("FAIL %0d x %0d got %0d exp %0d", i, j, z, exp);
        end
        if (full != i * j) n_approx++;
        if (full > 255)    n_wrap++;
        if (int'(z) == i * j) n_exact++;
        else                  n_wrong++;
      end
    end
    checks++;
    if (n_wrong != 49) begin
      failures++;
      $display("FAIL %0d erroneous products, expected 49", n_wrong);
    end
    $display("mechanisms: approx=%0d exact=%0d wrap=%0d", n_approx, n_exact, n_wrap);
    $display("error rate: %0d/256 = %0.1f %%", n_wrong, 100.0 * n_wrong / 256.0);
    checks++;
    if (n_approx == 0 || n_exact == 0 || n_wrap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
