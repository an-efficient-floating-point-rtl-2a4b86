// fp_adder: single precision floating point adder with an approximate
// significand adder, for error-tolerant low-power datapaths.
//
// The flow is the conventional one: unpack both operands and restore the
// hidden bit; compare the exponents with the exact exponent subtractor and
// swap the operands so the larger magnitude comes first; subtract the
// exponents again to get the alignment distance and shift the smaller
// significand right by it; add (or, for operands of opposite sign,
// subtract) the significands; normalize with a leading zero count; round;
// and check the exponent range. NaN, infinity and zero operands are caught
// beforehand by fp_special and bypass the datapath. Only the carry of the
// comparing subtraction is used (its difference output stays open); the
// alignment distance comes from a second subtraction after the swap.
//
// What makes the adder approximate is the significand adder: of its three
// bytes the low two are approx_adder8 blocks and only the top byte is exact
// (NUM_APPROX = 2, window W = 4). The exponent path is exact throughout.
// Setting NUM_APPROX = 0 gives an exact IEEE-style adder (round to nearest
// even, subnormals flushed to zero) for reference.
//
// Interface: a, b and sum are IEEE-754 single precision words. nan is set
// for a NaN result, overflow when the rounded result was too large (sum is
// then infinity), underflow when it fell below the smallest normal number
// (sum is then zero). The block is purely combinational: the result is
// valid in the same cycle as the operands, and a caller that needs a clock
// registers the inputs or the outputs.
//
// Taken from the document: the overall steps, the three-byte significand
// adder with two approximate low bytes, and the exact exponent adder. This
// design's own choices: guard/round/sticky bits with round to nearest even,
// flushing subnormals to zero, the zero-operand bypass, the canonical NaN,
// and for an effective subtraction the significand difference taken as
// larger + ~smaller + 1 on the same adder.
module fp_adder
  import fp_pkg::*;
#(
  parameter int unsigned NUM_APPROX = 2,
  parameter int unsigned W          = 4
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] sum,
  output logic        nan,
  output logic        overflow,
  output logic        underflow
);
  float32_t fa, fb, op_l, op_s, spec_res;

  logic [EXP_W-1:0] ediff_ab, shift;
  logic             a_ge_b_exp, diff_cout, swap, eff_sub;
  logic [SIG_W-1:0] sig_l, sig_s, sig_al, sig_b;
  logic [GRS_W-1:0] grs, grs_eff;
  logic [SIG_W-1:0] msum;
  logic             mcout, carry;
  logic [MAN_W-1:0] man_n;
  logic [EXP_W-1:0] exp_n;
  logic             ovf, unf, zero;
  logic             is_special, spec_nan;

  assign fa = float32_t'(a);
  assign fb = float32_t'(b);

  // Exponent comparison: a.exp - b.exp on the exact exponent subtractor.
  exponent_addsub #(.N(EXP_W)) u_exp_cmp (
    .a(fa.exp), .b(fb.exp), .sub(1'b1), .s(ediff_ab), .cout(a_ge_b_exp));

  // Larger magnitude first; on equal exponents the mantissas decide.
  assign swap  = (fa.exp == fb.exp) ? (fb.man > fa.man) : ~a_ge_b_exp;
  assign op_l = swap ? fb : fa;
  assign op_s = swap ? fa : fb;

  // Alignment distance, never negative after the swap.
  exponent_addsub #(.N(EXP_W)) u_exp_diff (
    .a(op_l.exp), .b(op_s.exp), .sub(1'b1), .s(shift), .cout(diff_cout));

  assign sig_l = {1'b1, op_l.man};
  assign sig_s = {1'b1, op_s.man};

  fp_align u_align (.sig_in(sig_s), .shift(shift), .sig_out(sig_al), .grs(grs));

  // Effective operation. For a subtraction the bits below the adder are
  // negated on their own: 0 - grs leaves a borrow into the adder exactly
  // when grs is non-zero, so the adder's carry in is 1 only if grs == 0.
  assign eff_sub = fa.sign ^ fb.sign;
  assign sig_b   = eff_sub ? ~sig_al : sig_al;
  assign grs_eff = eff_sub ? (GRS_W'(0) - grs) : grs;

  mantissa_adder #(.BLOCKS(3), .NUM_APPROX(NUM_APPROX), .W(W)) u_mant (
    .a(sig_l), .b(sig_b), .cin(eff_sub & ~(|grs)), .s(msum), .cout(mcout));

  assign carry = ~eff_sub & mcout;

  fp_normalize_round u_norm (
    .sum(msum), .carry(carry), .grs(grs_eff), .exp_in(op_l.exp),
    .man_out(man_n), .exp_out(exp_n), .overflow(ovf), .underflow(unf),
    .zero(zero));

  fp_special u_special (
    .a(fa), .b(fb), .is_special(is_special), .result(spec_res), .nan(spec_nan));

  always_comb begin
    nan       = 1'b0;
    overflow  = 1'b0;
    underflow = 1'b0;
    if (is_special) begin
      sum = spec_res;
      nan = spec_nan;
    end else if (zero) begin
      sum = '0;                                  // exact cancellation gives +0
    end else if (ovf) begin
      sum       = {op_l.sign, EXP_MAX, {MAN_W{1'b0}}};
      overflow  = 1'b1;
    end else if (unf) begin
      sum       = {op_l.sign, {(EXP_W + MAN_W){1'b0}}};
      underflow = 1'b1;
    end else begin
      sum = {op_l.sign, exp_n, man_n};
    end
  end
endmodule
