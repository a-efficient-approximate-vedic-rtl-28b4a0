// partial_product_gen: the four partial product generators of a 2x2 Urdhva
// Tiryakbhyam (vertically and crosswise) multiplication.
//
// Each partial product is the AND of one multiplicand bit and one multiplier
// bit: the vertical products a0b0 (weight 1) and a1b1 (weight 4), and the two
// crosswise products a1b0 and a0b1 (both weight 2). Four AND gates, as in the
// AVM2 block diagram. Purely combinational; outputs follow the inputs after
// one gate delay.
//
// Ports:
//   a, b   2-bit operands a1a0 and b1b0
//   pp00   a0 & b0
//   pp10   a1 & b0
//   pp01   a0 & b1
//   pp11   a1 & b1
module partial_product_gen
  import avmt_pkg::*;
(
  input  sub_op_t a,
  input  sub_op_t b,
  output logic    pp00,
  output logic    pp10,
  output logic    pp01,
  output logic    pp11
);

  always_comb begin
    pp00 = a[0] & b[0];
    pp10 = a[1] & b[0];
    pp01 = a[0] & b[1];
    pp11 = a[1] & b[1];
  end

endmodule
