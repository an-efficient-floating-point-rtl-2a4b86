// full_adder: conventional 1-bit full adder, the exact cell of the design.
//
// s = a ^ b ^ cin and cout = a&b | cin&(a^b). It is used for the most
// significant bits of every 8-bit approximate block and for all bits of the
// exact 8-bit adders. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p;
  assign p    = a ^ b;
  assign s    = p ^ cin;
  assign cout = (a & b) | (cin & p);
endmodule
