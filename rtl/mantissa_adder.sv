// mantissa_adder: the approximate significand adder.
//
// The significand is cut into bytes. The NUM_APPROX least significant
// bytes (two by default) are approx_adder8 blocks; the remaining byte is an
// exact_adder8. The bytes are chained through their carries: the carry
// leaving an approximate block is its look-ahead estimate, so an error can
// reach the exact byte only through that one carry. Three bytes give 24
// bits, which holds the 23 stored mantissa bits plus the hidden bit.
//
// The three-byte split with two approximate low bytes and an exact top
// byte follows the document. NUM_APPROX = 0 turns the whole adder exact,
// which the testbenches use as a reference. For subtraction the caller
// inverts b and sets cin. Purely combinational.
module mantissa_adder #(
  parameter int unsigned BLOCKS     = 3,
  parameter int unsigned NUM_APPROX = 2,
  parameter int unsigned W          = 4,
  localparam int unsigned N         = 8 * BLOCKS
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [BLOCKS:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < BLOCKS; k++) begin : g_byte
    if (k < NUM_APPROX) begin : g_approx
      approx_adder8 #(.N(8), .W(W)) u_add (
        .a(a[8*k +: 8]), .b(b[8*k +: 8]), .cin(c[k]), .s(s[8*k +: 8]), .cout(c[k+1]));
    end else begin : g_exact
      exact_adder8 #(.N(8)) u_add (
        .a(a[8*k +: 8]), .b(b[8*k +: 8]), .cin(c[k]), .s(s[8*k +: 8]), .cout(c[k+1]));
    end
  end
  assign cout = c[BLOCKS];
endmodule
