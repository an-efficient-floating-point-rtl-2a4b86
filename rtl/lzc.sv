// lzc: leading zero counter used by normalization.
//
// Returns the number of zeros above the most significant '1' of x, and
// W when x is all zeros (the caller treats that as a zero result). It is a
// plain priority scan; the document only says that normalization shifts
// left by a count of leading zeros. Purely combinational.
module lzc #(
  parameter int unsigned W  = 27,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  output logic [CW-1:0] count,
  output logic          all_zero
);
  always_comb begin
    count = CW'(W);
    for (int i = 0; i < W; i++) begin
      if (x[i]) count = CW'(W - 1 - i);
    end
  end
  assign all_zero = (x == '0);
endmodule
