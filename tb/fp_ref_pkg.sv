// fp_ref_pkg: reference models shared by the testbenches of the
// approximate floating point adder. Nothing here is synthesized.
//
// approx8_ref     one 8-bit approximate block, from the cell truth table
// sig_add_ref     the 24-bit significand adder, byte by byte
// fadd_exact_ref  correctly rounded single precision addition (round to
//                 nearest even, subnormal inputs and results flushed to
//                 zero), computed on wide integers with the smaller operand
//                 reduced to a sticky bit once it lies far below
// fadd_model_ref  the approximate adder's expected result: the same flow as
//                 the exact reference but with the significands combined by
//                 sig_add_ref on 24 bits plus three guard bits
package fp_ref_pkg;

  typedef struct {
    logic [31:0] sum;
    logic        nan;
    logic        overflow;
    logic        underflow;
    // what the flow went through, for coverage counting
    logic        special;      // decided by the special-case rules
    logic        swap;         // b had the larger magnitude
    logic        eff_sub;      // operands of opposite sign
    logic        shift_out;    // smaller significand shifted out entirely
    logic        right_norm;   // carry out of the significand addition
    logic        left_norm;    // leading one below the top position
    logic        round_up;     // rounding incremented the significand
    logic        cancel;       // significand result was exactly zero
  } fres_t;

  localparam fres_t FRES_INIT = '{sum: 32'h0, nan: 1'b0, overflow: 1'b0, underflow: 1'b0,
                                  special: 1'b0, swap: 1'b0, eff_sub: 1'b0, shift_out: 1'b0,
                                  right_norm: 1'b0, left_norm: 1'b0, round_up: 1'b0,
                                  cancel: 1'b0};

  localparam logic [7:0] SUM_TABLE   = 8'b0001_0101;  // index {a, b, cin}
  localparam logic [7:0] CARRY_TABLE = 8'b1110_1010;

  function automatic logic [8:0] approx8_ref(input logic [7:0] x, input logic [7:0] y,
                                             input logic ci);
    logic [3:0] lo;
    logic       c;
    int         hi;
    c = ci;
    for (int i = 0; i < 4; i++) begin
      lo[i] = SUM_TABLE[{x[i], y[i], c}];
      c     = CARRY_TABLE[{x[i], y[i], c}];
    end
    hi = int'(x[7:4]) + int'(y[7:4]);
    return {hi >= 16, 4'(hi + int'(c)), lo};
  endfunction

  function automatic logic [24:0] sig_add_ref(input logic [23:0] x, input logic [23:0] y,
                                              input logic ci, input int num_approx);
    logic [23:0] s;
    logic [8:0]  r;
    logic        c;
    c = ci;
    for (int k = 0; k < 3; k++) begin
      if (k < num_approx) r = approx8_ref(x[8*k +: 8], y[8*k +: 8], c);
      else                r = 9'(x[8*k +: 8]) + 9'(y[8*k +: 8]) + 9'(c);
      s[8*k +: 8] = r[7:0];
      c = r[8];
    end
    return {c, s};
  endfunction

  function automatic logic is_nan(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction
  function automatic logic is_inf(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] == 0);
  endfunction

  // Cases that do not reach the datapath; returns 1 when r was filled in.
  function automatic logic special_ref(input logic [31:0] a, input logic [31:0] b,
                                       output fres_t r);
    r = FRES_INIT;
    r.special = 1'b1;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b) && a[31] != b[31])) begin
      r.sum = 32'h7FC0_0000; r.nan = 1'b1; return 1'b1;
    end
    if (is_inf(a)) begin r.sum = a; return 1'b1; end
    if (is_inf(b)) begin r.sum = b; return 1'b1; end
    if (a[30:23] == 0 && b[30:23] == 0) begin r.sum = {a[31] & b[31], 31'h0}; return 1'b1; end
    if (a[30:23] == 0) begin r.sum = b; return 1'b1; end
    if (b[30:23] == 0) begin r.sum = a; return 1'b1; end
    r.special = 1'b0;
    return 1'b0;
  endfunction

  // Round a positive integer magnitude m (value m * 2^(e - bias - frac)) to
  // single precision. frac is the number of fraction bits in m.
  function automatic fres_t pack_ref(input logic sign, input logic [63:0] m, input int e,
                                     input int frac);
    fres_t r;
    int    msb, sh;
    logic [63:0] q, rem, half;
    r = FRES_INIT;
    if (m == 0) begin r.cancel = 1'b1; return r; end   // exact zero is +0
    msb = 63;
    while (!m[msb]) msb--;
    // keep 24 significant bits
    sh = msb - 23;
    e  = e + (msb - frac);
    if (sh > 0) begin
      q    = m >> sh;
      rem  = m & ((64'd1 << sh) - 64'd1);
      half = 64'd1 << (sh - 1);
      if (rem > half || (rem == half && q[0])) begin q++; r.round_up = 1'b1; end
      if (q[24]) begin q >>= 1; e++; end
    end else begin
      q = m << (-sh);
    end
    if (e >= 255) begin r.sum = {sign, 8'hFF, 23'h0}; r.overflow = 1'b1; end
    else if (e < 1) begin r.sum = {sign, 31'h0}; r.underflow = 1'b1; end
    else r.sum = {sign, 8'(e), q[22:0]};
    return r;
  endfunction

  function automatic fres_t fadd_exact_ref(input logic [31:0] a, input logic [31:0] b);
    fres_t r;
    logic [31:0] l, s;
    logic [63:0] ml, ms, lost;
    int d;
    if (special_ref(a, b, r)) return r;
    if (a[30:0] >= b[30:0]) begin l = a; s = b; end else begin l = b; s = a; end
    d  = int'(l[30:23]) - int'(s[30:23]);
    ml = {40'h0, 1'b1, l[22:0]} << 34;
    ms = {40'h0, 1'b1, s[22:0]} << 34;
    if (d > 36) begin ms = 64'd1; end           // far below: only a sticky bit
    else begin
      lost = ms & ((64'd1 << d) - 64'd1);
      ms   = (ms >> d) | 64'(lost != 0);
    end
    if (l[31] == s[31]) return pack_ref(l[31], ml + ms, int'(l[30:23]), 57);
    else                return pack_ref(l[31], ml - ms, int'(l[30:23]), 57);
  endfunction

  function automatic fres_t fadd_model_ref(input logic [31:0] a, input logic [31:0] b,
                                           input int num_approx);
    fres_t r;
    logic [31:0] l, s;
    logic [26:0] ext;
    logic [23:0] al;
    logic [2:0]  grs, low;
    logic [24:0] raw;
    logic [27:0] m;
    logic        sub;
    int d;
    if (special_ref(a, b, r)) return r;
    if (a[30:0] >= b[30:0]) begin l = a; s = b; end else begin l = b; s = a; end
    d   = int'(l[30:23]) - int'(s[30:23]);
    ext = {1'b1, s[22:0], 3'b000};
    if (d >= 27) begin al = 0; grs = 3'b001; end
    else begin
      al  = 24'(ext >> d >> 3);
      grs = 3'(ext >> d);
      for (int i = 0; i < d; i++) if (ext[i]) grs[0] = 1'b1;
    end
    sub = l[31] ^ s[31];
    if (!sub) begin
      raw = sig_add_ref({1'b1, l[22:0]}, al, 1'b0, num_approx);
      low = grs;
    end else begin
      raw = {1'b0, 24'(sig_add_ref({1'b1, l[22:0]}, ~al, grs == 0, num_approx))};
      low = 3'(4'd8 - 4'(grs));
    end
    m = {raw, low};                               // value m * 2^(e - bias - 26)
    r = pack_ref(l[31], 64'(m), int'(l[30:23]), 26);
    r.swap       = !(a[30:0] >= b[30:0]);
    r.eff_sub    = sub;
    r.shift_out  = d >= 27;
    r.right_norm = m[27];
    r.left_norm  = (m[27:26] == 2'b00) && (m != 0);
    return r;
  endfunction

endpackage
