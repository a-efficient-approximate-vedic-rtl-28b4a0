// half_adder: exact half adder, sum = a ^ b, carry = a & b.
//
// Used once in the 4x4 multiplier's second stage to add the carry-outs of the
// two 4-bit binary parallel adders before they reach the 2-bit adder that
// forms the top product bits. Combinational.
//
// Ports: a, b inputs; sum, carry outputs.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end

endmodule
