// tb_bin_par_adder: exhaustive check of the binary parallel adder at the two
// widths the multiplier uses, 4 bits (default) and 2 bits, with carry in 0
// and 1. Each result {cout, sum} is compared with integer addition.
module tb_bin_par_adder;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] a4, b4, s4;
  logic [1:0] a2, b2, s2;
  logic       cin, co4, co2;
  int checks = 0, failures = 0;

  bin_par_adder dut4 (.a(a4), .b(b4), .cin, .sum(s4), .cout(co4));
  bin_par_adder #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .cin, .sum(s2), .cout(co2));

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          a4 = 4'(i); b4 = 4'(j); a2 = 2'(i); b2 = 2'(j); cin = 1'(c);
          #1;
          checks++;
          if (int'({co4, s4}) != i + j + c) begin
            failures++;
            $display("FAIL w4 %0d+%0d+%0d got %0d", i, j, c, {co4, s4});
          end
          if (i < 4 && j < 4) begin
            checks++;
            if (int'({co2, s2}) != i + j + c) begin
              failures++;
              $display("FAIL w2 %0d+%0d+%0d got %0d", i, j, c, {co2, s2});
            end
          end
        end
      end
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
