// carry_gen: look-ahead carry generator over a window of W bits.
//
// It computes only the first (approximate) segment of the split look-ahead
// carry equation: the carry out of the window is the OR, over every bit j
// of the window, of the generate term g[j] ANDed with the propagate terms of
// all bits above j. The carry entering the window is ignored, so the result
// is available after one two-level AND-OR rather than a ripple through the
// window. W = 4 is the window of the 8-bit approximate block. The generate
// and propagate terms (g = a&b, p = a^b) are formed by the caller.
// Purely combinational.
module carry_gen #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  output logic         cout
);
  always_comb begin
    logic term;
    cout = 1'b0;
    for (int unsigned j = 0; j < W; j++) begin
      term = g[j];
      for (int unsigned k = j + 1; k < W; k++) term = term & p[k];
      cout = cout | term;
    end
  end
endmodule
