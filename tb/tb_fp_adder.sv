// tb_fp_adder: end-to-end test of the approximate floating point adder at
// its default configuration (two approximate significand bytes, window 4).
//
// Random operand pairs, biased towards the corner regions, go through the
// adder one per clock cycle. Each result and its flags are compared with a
// model that follows the same flow on plain integers but combines the
// significands with a truth-table model of the approximate bytes. The same
// pairs also go through a correctly rounded reference, so that the
// testbench can report how far the approximate results stray: the share of
// results that differ and the mean and largest relative error, for
// effective additions and subtractions separately.
//
// Each mechanism of the adder is counted (from the model's view of the same
// operands, since the adder matched it bit for bit), and one that never
// happens is a failure: operand swap, effective subtraction, alignment past all
// significand bits (sticky only), carry normalization (right shift),
// left normalization, rounding up, exact cancellation to zero, overflow,
// underflow, NaN, infinity and zero bypass, and an approximate result that
// differs from the exact one. The adder is combinational, so the check also
// confirms a result in the same cycle as its operands.
module tb_fp_adder;
  import fp_ref_pkg::*;
  import fp_stim_pkg::*;
  logic [31:0] a, b, sum;
  logic        nan, overflow, underflow;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  fp_adder dut (.a(a), .b(b), .sum(sum), .nan(nan), .overflow(overflow), .underflow(underflow));

  always #5 clk = ~clk;

  localparam int N_VEC = 100000;

  initial begin
    repeat (N_VEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum int {
    M_SWAP, M_EFF_SUB, M_SHIFT_OUT, M_RIGHT_NORM, M_LEFT_NORM, M_ROUND_UP, M_CANCEL,
    M_OVERFLOW, M_UNDERFLOW, M_NAN, M_INF_BYPASS, M_ZERO_BYPASS, M_APPROX_DIFF, M_COUNT
  } mech_e;

  int    mech[M_COUNT];
  string mech_name[M_COUNT] = '{"swap", "effective subtraction", "shift out to sticky",
                               "carry normalization", "left normalization", "round up",
                               "exact cancellation", "overflow", "underflow", "nan",
                               "infinity bypass", "zero bypass", "approximate differs"};

  // value of a normal single precision word: (-1)^s * 1.man * 2^(exp - 127)
  function automatic real to_real(input logic [31:0] f);
    real v;
    int  e;
    v = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    for (int i = 0; i < e; i++)  v = v * 2.0;
    for (int i = 0; i < -e; i++) v = v * 0.5;
    return f[31] ? -v : v;
  endfunction

  initial begin
    fres_t  r, rx;
    automatic int     n_add = 0, n_sub = 0, d_add = 0, d_sub = 0, n_nc = 0;
    automatic real    sum_nc = 0.0, max_nc = 0.0;
    int     e_big;
    automatic real    err, sum_add = 0.0, sum_sub = 0.0, max_add = 0.0, max_sub = 0.0;
    logic   spec;
    for (int i = 0; i < M_COUNT; i++) mech[i] = 0;

    for (int k = 0; k < N_VEC; k++) begin
      @(negedge clk);
      pick_pair(a, b);
      @(posedge clk);
      r  = fadd_model_ref(a, b, 2);
      rx = fadd_exact_ref(a, b);
      checks++;
      if ({sum, nan, overflow, underflow} !== {r.sum, r.nan, r.overflow, r.underflow}) begin
        failures++;
        if (failures < 10)
          $display("mismatch %h + %h: got %h %b%b%b expected %h %b%b%b", a, b, sum, nan, overflow,
                   underflow, r.sum, r.nan, r.overflow, r.underflow);
      end

      spec = r.special;
      if (!spec) begin
        if (r.swap)        mech[M_SWAP]++;
        if (r.eff_sub)     mech[M_EFF_SUB]++;
        if (r.shift_out)   mech[M_SHIFT_OUT]++;
        if (r.right_norm)  mech[M_RIGHT_NORM]++;
        if (r.left_norm)   mech[M_LEFT_NORM]++;
        if (r.round_up)    mech[M_ROUND_UP]++;
        if (r.cancel)      mech[M_CANCEL]++;
        if (r.overflow)    mech[M_OVERFLOW]++;
        if (r.underflow)   mech[M_UNDERFLOW]++;
        if (sum != rx.sum) mech[M_APPROX_DIFF]++;
        // accuracy of ordinary results against the exact sum
        if (!overflow && !underflow && !rx.overflow && !rx.underflow && rx.sum[30:0] != 0) begin
          err = (to_real(sum) - to_real(rx.sum)) / to_real(rx.sum);
          if (err < 0.0) err = -err;
          if (r.eff_sub) begin
            n_sub++; sum_sub += err; if (err > max_sub) max_sub = err;
            if (sum != rx.sum) d_sub++;
            // subtractions that lose at most one leading bit to cancellation
            e_big = (a[30:23] > b[30:23]) ? int'(a[30:23]) : int'(b[30:23]);
            if (int'(rx.sum[30:23]) >= e_big - 1) begin
              n_nc++; sum_nc += err; if (err > max_nc) max_nc = err;
            end
          end else begin
            n_add++; sum_add += err; if (err > max_add) max_add = err;
            if (sum != rx.sum) d_add++;
          end
        end
      end else begin
        if (r.nan) mech[M_NAN]++;
        else if (is_inf(a) || is_inf(b)) mech[M_INF_BYPASS]++;
        else mech[M_ZERO_BYPASS]++;
      end
    end

    for (int i = 0; i < M_COUNT; i++) begin
      $display("  %-24s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) begin failures++; $display("mechanism never exercised: %s", mech_name[i]); end
    end
    $display("effective additions:    %0d, %0.1f%% inexact vs exact adder, mean rel. error %e, max %e",
             n_add, 100.0 * d_add / (n_add > 0 ? n_add : 1), sum_add / (n_add > 0 ? n_add : 1), max_add);
    $display("effective subtractions: %0d, %0.1f%% inexact vs exact adder, mean rel. error %e, max %e",
             n_sub, 100.0 * d_sub / (n_sub > 0 ? n_sub : 1), sum_sub / (n_sub > 0 ? n_sub : 1), max_sub);
    $display("  of which without cancellation: %0d, mean rel. error %e, max %e",
             n_nc, sum_nc / (n_nc > 0 ? n_nc : 1), max_nc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
