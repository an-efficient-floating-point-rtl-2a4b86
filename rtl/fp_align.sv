// fp_align: alignment shifter for the significand of the smaller operand.
//
// The 24-bit significand (hidden bit included) is shifted right by the
// exponent difference so that it lines up with the larger operand. Below
// the 24 result bits three more are kept: guard, round and a sticky bit
// that is the OR of everything shifted out past the round position. A
// shift of 27 or more leaves only the sticky bit. The document describes
// the alignment step; guard, round and sticky are this design's choice so
// that the result can be rounded to nearest. Purely combinational.
module fp_align
  import fp_pkg::*;
(
  input  logic [SIG_W-1:0] sig_in,
  input  logic [EXP_W-1:0] shift,
  output logic [SIG_W-1:0] sig_out,
  output logic [GRS_W-1:0] grs
);
  localparam int unsigned XW = SIG_W + GRS_W;   // 27

  logic [XW-1:0] ext, shifted, lost_mask;
  logic          lost;

  always_comb begin
    ext = {sig_in, {GRS_W{1'b0}}};
    if (shift >= EXP_W'(XW)) begin
      shifted   = '0;
      lost_mask = '1;
      lost      = |sig_in;
    end else begin
      shifted   = ext >> shift;
      lost_mask = (XW'(1) << shift) - XW'(1);
      lost      = |(ext & lost_mask);
    end
    sig_out = shifted[XW-1:GRS_W];
    grs     = {shifted[2], shifted[1], shifted[0] | lost};
  end
endmodule
