// fp_normalize_round: normalization, rounding and range check of the raw
// significand sum.
//
// Input is the 24-bit sum from the significand adder, the carry out of an
// effective addition, the three guard/round/sticky bits and the biased
// exponent of the larger operand. If the carry is set the sum is shifted
// right by one and the exponent incremented. Otherwise a leading zero count
// over the 27 bits {sum, grs} gives the left shift, and the exponent is
// reduced by it. The normalized value is rounded to nearest, ties to even;
// a round that overflows the significand bumps the exponent again. A
// biased exponent that reaches 255 raises overflow, one that falls below 1
// raises underflow (the result is then flushed to zero by the caller), and
// an all-zero sum is reported as zero.
//
// The steps (leading zero based normalization, then rounding, then the
// overflow/underflow checks) are those of the conventional adder flow the
// document builds on. Round to nearest even and flush to zero are this
// design's choices. Purely combinational.
module fp_normalize_round
  import fp_pkg::*;
(
  input  logic [SIG_W-1:0] sum,
  input  logic             carry,
  input  logic [GRS_W-1:0] grs,
  input  logic [EXP_W-1:0] exp_in,
  output logic [MAN_W-1:0] man_out,
  output logic [EXP_W-1:0] exp_out,
  output logic             overflow,
  output logic             underflow,
  output logic             zero
);
  localparam int unsigned XW = SIG_W + GRS_W;     // 27
  localparam int unsigned CW = $clog2(XW + 1);

  logic [XW-1:0]    x, xs;
  logic [CW-1:0]    lz;
  logic             all_zero;
  logic [SIG_W-1:0] sig_n;
  logic             g, r, st, rnd;
  logic [SIG_W:0]   sig_r;
  logic signed [EXP_W+1:0] e;

  lzc #(.W(XW)) u_lzc (.x(x), .count(lz), .all_zero(all_zero));

  always_comb begin
    x  = {sum, grs};
    xs = x << lz;
    if (carry) begin
      sig_n = {1'b1, sum[SIG_W-1:1]};
      g     = sum[0];
      r     = grs[2];
      st    = |grs[1:0];
      e     = $signed({2'b00, exp_in}) + 10'sd1;
    end else begin
      sig_n = xs[XW-1:GRS_W];
      g     = xs[2];
      r     = xs[1];
      st    = xs[0];
      e     = $signed({2'b00, exp_in}) - $signed({{(EXP_W+2-CW){1'b0}}, lz});
    end
    rnd   = g & (r | st | sig_n[0]);
    sig_r = {1'b0, sig_n} + (SIG_W+1)'(rnd);
    if (sig_r[SIG_W]) begin
      e       = e + 10'sd1;
      man_out = '0;   // the significand became 1.000..0 one position up
    end else begin
      man_out = sig_r[MAN_W-1:0];
    end
    zero          = ~carry & all_zero;
    underflow     = ~zero & (e < 10'sd1);
    overflow      = ~zero & (e >= $signed({2'b00, EXP_MAX}));
    exp_out       = e[EXP_W-1:0];
  end
endmodule
