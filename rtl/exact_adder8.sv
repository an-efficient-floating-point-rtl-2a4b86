// exact_adder8: exact N-bit ripple carry adder (N = 8 by default).
//
// A chain of full adders from cin to cout. It forms the most significant
// byte of the significand adder and the exponent adder/subtractor, both of
// which the document requires to be exact; the ripple structure is this
// design's choice, the document only asks for an exact 8-bit adder.
// Purely combinational.
module exact_adder8 #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
  assign cout = c[N];
endmodule
