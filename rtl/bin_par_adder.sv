// bin_par_adder: exact WIDTH-bit binary parallel adder with carry in and out.
//
// A chain of WIDTH full adders in which each stage's carry-out feeds the next
// stage's carry-in (ripple carry). The 4x4 approximate multiplier uses it at
// WIDTH = 4 (twice) and WIDTH = 2 (once) to add the AVM2 partial products;
// these adders are exact, the approximation lives only inside the AVM2s.
// The ripple-carry structure is this design's choice: the multiplier's
// description only names the adders "binary parallel adders".
// Combinational; the worst-case path runs from a[0]/b[0]/cin through all
// WIDTH carry stages to cout.
//
// Ports:
//   a, b  WIDTH-bit addends
//   cin   carry in (tie to 0 where unused)
//   sum   WIDTH-bit sum
//   cout  carry out of the most significant stage
module bin_par_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;
  assign cout     = carry[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

endmodule
