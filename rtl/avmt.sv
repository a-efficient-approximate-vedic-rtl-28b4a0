// avmt: 4x4-bit unsigned approximate Vedic multiplier (top).
//
// Stage 1 splits each operand into 2-bit halves and forms the four
// vertical/crosswise products with AVM2 approximate 2x2 multipliers:
//   q0 = aL*bL (weight 1)   q1 = aL*bH (weight 4)
//   q2 = aH*bL (weight 4)   q3 = aH*bH (weight 16)
// Stage 2 adds them with exact adders:
//   z[1:0]              = q0[1:0]
//   {c1, s1}            = q1 + q2                       (4-bit adder)
//   {c2, z[5:2]}        = s1 + {q3[1:0], q0[3:2]}       (4-bit adder)
//   {hc, hs}            = c1 + c2                       (half adder)
//   z[7:6]              = q3[3:2] + {hc, hs}            (2-bit adder)
// The 2-bit adder's carry-out is not part of the product, which is the 8-bit
// Z7..Z0. For exact sub-products it is always 0; with the approximate AVM2
// results it can be 1 (for example 15 x 15), and the product then wraps
// modulo 256. That carry is kept as the internal net top_carry and left
// unused on purpose, so a lint warning about an unused signal stands.
//
// The only approximation is inside the AVM2s (eight OR gates in place of
// eight XOR gates). An AVM2 is wrong only for 3 x 3, so the product is wrong
// exactly when both operands have a 2-bit half equal to 3: 7 x 7 = 49 of the
// 256 operand pairs (19 %).
//
// The block split, the adder widths and the output bit positions follow the
// 4-bit AVMT block diagram; which sum bits feed which adder input, the
// half adder on the two carries and the discarded top carry are this design's
// reading of that diagram. Fully combinational: no clock, no reset; the
// product is valid one combinational delay after a and b settle.
//
// Ports:
//   a  multiplicand a3..a0 (unsigned)
//   b  multiplier   b3..b0 (unsigned)
//   z  approximate product Z7..Z0
module avmt
  import avmt_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t z
);

  sub_prod_t q0, q1, q2, q3;
  logic [3:0] s1;
  logic       c1, c2;
  logic       hs, hc;
  logic       top_carry;  // carry out of the 2-bit adder, beyond Z7

  // ---- Stage 1: four AVM2 sub-multipliers ----
  avm2 u_avm2_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));
  avm2 u_avm2_lh (.a(a[1:0]), .b(b[3:2]), .p(q1));
  avm2 u_avm2_hl (.a(a[3:2]), .b(b[1:0]), .p(q2));
  avm2 u_avm2_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  // ---- Stage 2: exact binary parallel adders ----
  assign z[1:0] = q0[1:0];

  bin_par_adder #(.WIDTH(4)) u_add_cross (
    .a   (q1),
    .b   (q2),
    .cin (1'b0),
    .sum (s1),
    .cout(c1)
  );

  bin_par_adder #(.WIDTH(4)) u_add_mid (
    .a   (s1),
    .b   ({q3[1:0], q0[3:2]}),
    .cin (1'b0),
    .sum (z[5:2]),
    .cout(c2)
  );

  half_adder u_ha_carry (
    .a    (c1),
    .b    (c2),
    .sum  (hs),
    .carry(hc)
  );

  bin_par_adder #(.WIDTH(2)) u_add_top (
    .a   (q3[3:2]),
    .b   ({hc, hs}),
    .cin (1'b0),
    .sum (z[7:6]),
    .cout(top_carry)
  );

endmodule
