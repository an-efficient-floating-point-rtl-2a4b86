// exponent_addsub: exact exponent adder/subtractor.
//
// Computes a + b when sub = 0 and a - b (as a + ~b + 1) when sub = 1, with
// one exact_adder8. For a subtraction, cout = 1 means a >= b, which the
// floating point adder uses as the exponent comparison. The document asks
// for the exponent path to be an exact 8-bit adder because the exponent
// dominates the accuracy of the result. Purely combinational.
module exponent_addsub #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] s,
  output logic         cout
);
  exact_adder8 #(.N(N)) u_add (
    .a   (a),
    .b   (b ^ {N{sub}}),
    .cin (sub),
    .s   (s),
    .cout(cout)
  );
endmodule
