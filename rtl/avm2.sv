// avm2: 2x2-bit approximate Vedic multiplier.
//
// Urdhva Tiryakbhyam ("vertically and crosswise") for two 2-bit operands:
//   p0          = a0b0                         (vertical, right column)
//   {c1, p1}    = a1b0 + a0b1                  (crosswise, middle column)
//   {p3, p2}    = a1b1 + c1                    (vertical, left column, plus carry)
// Both additions use approximate half adders (sum = OR instead of XOR). The
// only input that sees an error is a = b = 3: the crosswise products are both
// 1, so p1 = 1 and c1 = 1, then p2 = 1 and p3 = 1, giving 15 instead of 9.
// All other 15 operand pairs give the exact product. Structure and gate count
// (four AND partial product generators, two approximate half adders) follow
// the AVM2 block diagram. Combinational.
//
// Ports:
//   a  multiplicand a1a0
//   b  multiplier   b1b0
//   p  approximate product p3p2p1p0
module avm2
  import avmt_pkg::*;
(
  input  sub_op_t   a,
  input  sub_op_t   b,
  output sub_prod_t p
);

  logic pp00, pp10, pp01, pp11;
  logic c1;

  partial_product_gen u_ppg (
    .a   (a),
    .b   (b),
    .pp00(pp00),
    .pp10(pp10),
    .pp01(pp01),
    .pp11(pp11)
  );

  assign p[0] = pp00;

  // Crosswise step: a1b0 + a0b1 gives p1 and the carry c1.
  approx_half_adder u_aha_cross (
    .a    (pp10),
    .b    (pp01),
    .sum  (p[1]),
    .carry(c1)
  );

  // Left vertical step: a1b1 + c1 gives p2 and p3.
  approx_half_adder u_aha_vert (
    .a    (pp11),
    .b    (c1),
    .sum  (p[2]),
    .carry(p[3])
  );

endmodule
