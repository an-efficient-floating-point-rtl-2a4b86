// fp_pkg: shared types and constants of the single precision approximate
// floating point adder.
//
// The field widths are those of the IEEE-754 single precision format
// (1 sign bit, 8 exponent bits, 23 stored mantissa bits, bias 127). The
// significand that goes through the adder is 24 bits wide: the 23 stored
// bits with the hidden '1' put back in front. Three bits below it (guard,
// round, sticky) carry what alignment shifts out; they are this design's
// choice for rounding and are not part of the three-byte significand adder.
package fp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned MAN_W  = 23;
  localparam int unsigned SIG_W  = MAN_W + 1;   // with the hidden bit
  localparam int unsigned GRS_W  = 3;           // guard, round, sticky
  localparam int unsigned BIAS   = 127;
  localparam logic [EXP_W-1:0] EXP_MAX = '1;    // infinity / NaN exponent

  // Canonical quiet NaN returned for invalid operations.
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } float32_t;

  // Exception flags raised next to the result.
  typedef struct packed {
    logic invalid;     // NaN operand or infinity minus infinity
    logic overflow;    // rounded result too large, infinity returned
    logic underflow;   // result below the smallest normal, zero returned
  } fp_flags_t;

endpackage
