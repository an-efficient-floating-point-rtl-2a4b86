// fp_special: special operand detection of the floating point adder.
//
// Looks at both operands before the datapath and decides whether the
// result is fixed without any addition:
//   - a NaN operand, or infinities of opposite sign, gives the quiet NaN
//     0x7FC00000 and raises the nan flag;
//   - otherwise an infinite operand is returned as it is;
//   - a zero operand returns the other operand unchanged (two zeros give
//     -0 only if both are -0). Operands with a zero exponent field
//     (subnormals) count as zero.
// The zero bypass matters for the approximate adder: its inexact low bytes
// would otherwise corrupt x + 0. The document asks for not-a-number to be
// detected and flagged; the list of cases, the bypass and flushing
// subnormals are this design's choices. Purely combinational.
module fp_special
  import fp_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output logic     is_special,
  output float32_t result,
  output logic     nan
);
  logic a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;

  assign a_nan  = (a.exp == EXP_MAX) && (a.man != '0);
  assign b_nan  = (b.exp == EXP_MAX) && (b.man != '0);
  assign a_inf  = (a.exp == EXP_MAX) && (a.man == '0);
  assign b_inf  = (b.exp == EXP_MAX) && (b.man == '0);
  assign a_zero = (a.exp == '0);
  assign b_zero = (b.exp == '0);

  always_comb begin
    is_special = 1'b1;
    nan        = 1'b0;
    result     = a;
    if (a_nan || b_nan || (a_inf && b_inf && (a.sign != b.sign))) begin
      nan    = 1'b1;
      result = float32_t'(QNAN);
    end else if (a_inf) begin
      result = a;
    end else if (b_inf) begin
      result = b;
    end else if (a_zero && b_zero) begin
      result = '{sign: a.sign & b.sign, exp: '0, man: '0};
    end else if (a_zero) begin
      result = b;
    end else if (b_zero) begin
      result = a;
    end else begin
      is_special = 1'b0;
    end
  end
endmodule
