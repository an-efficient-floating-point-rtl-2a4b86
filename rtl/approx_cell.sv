// approx_cell: one bit of the approximate (inexact) part of the adder.
//
// The carry is the OR of this bit's generate term and the incoming carry,
// cout = a&b | cin, so the carry no longer depends on the propagate term.
// The sum bit is simply the inverted carry, s = ~cout, which removes the
// XOR tree of a conventional full adder. Against an exact full adder this
// cell is wrong in three of the eight sum entries (inputs 000, 001, 111)
// and in one carry entry (input 001). Both equations and that error count
// follow the document; the cell is purely combinational.
module approx_cell (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign cout = (a & b) | cin;
  assign s    = ~cout;
endmodule
