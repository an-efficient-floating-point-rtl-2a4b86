// approx_adder8: the 8-bit approximate adder that is the building block of
// the approximate significand adder.
//
// The N = 8 bits are split into two halves. The W = 4 least significant
// bits are approx_cell instances chained from cin: each passes on
// carry = a&b | carry_in and outputs the inverted carry as its sum. The
// N-W = 4 most significant bits are exact full adders, rippling from the
// carry that leaves the approximate half. The carry out of the block does
// not wait for that ripple: a carry_gen over the generate and propagate
// terms of the most significant half produces it directly, ignoring any
// carry that enters that half. The critical path is therefore the 4-bit
// window rather than all 8 bits.
//
// The split, the cell equations and the carry generator follow the
// document. The document calls W both the width of the approximate low
// part and the width of the look-ahead window; with its value of 4 on an
// 8-bit block the two readings coincide, and here W sets the low part and
// the window spans the remaining N-W bits. Purely combinational.
module approx_adder8 #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;        // ripple carries; c[N] stays unused, cout comes from carry_gen
  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    if (i < W) begin : g_approx
      approx_cell u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
    end else begin : g_exact
      full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
    end
  end

  carry_gen #(.W(N - W)) u_cgen (
    .g   (a[N-1:W] & b[N-1:W]),
    .p   (a[N-1:W] ^ b[N-1:W]),
    .cout(cout)
  );
endmodule
