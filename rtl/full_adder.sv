// full_adder: exact one-bit full adder, the cell of the binary parallel adder.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Combinational.
//
// Ports: a, b, cin inputs; sum, cout outputs.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
