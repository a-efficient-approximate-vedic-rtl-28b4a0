// approx_half_adder: half adder whose XOR sum is replaced by an OR.
//
// sum = a | b, carry = a & b. It agrees with an exact half adder except for
// a = b = 1, where it returns sum = 1, carry = 1 (value 3 instead of 2), an
// error of +1 in the result (exact minus approximate = -1). Trading the XOR
// for an OR is the approximation the whole multiplier is built on: each AVM2
// holds two of these, so the 4x4 multiplier replaces eight XOR gates.
// Combinational, one gate delay.
//
// Ports: a, b inputs; sum, carry outputs.
module approx_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  always_comb begin
    sum   = a | b;
    carry = a & b;
  end

endmodule
