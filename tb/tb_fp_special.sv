// tb_fp_special: directed and random test of special operand handling.
//
// Operands are drawn from NaNs, infinities of both signs, zeros of both
// signs, subnormals and ordinary numbers. Whether the case is special, the
// returned word and the nan flag are compared with a reference written from
// the rules: NaN in or infinity minus infinity gives 0x7FC00000 with nan
// set, an infinity wins over a finite operand, a zero or subnormal operand
// returns the other operand, two zeros give -0 only if both are negative.
module tb_fp_special;
  import fp_ref_pkg::*;
  import fp_pkg::*;
  float32_t a, b, result;
  logic     is_special, nan;
  logic     clk = 1'b0;
  int       checks = 0, failures = 0;

  fp_special dut (.a(a), .b(b), .is_special(is_special), .result(result), .nan(nan));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick();
    logic s;
    s = 1'($urandom);
    case ($urandom_range(5))
      0: return {s, 8'hFF, 23'($urandom) | 23'h1};   // NaN
      1: return {s, 8'hFF, 23'h0};                   // infinity
      2: return {s, 31'h0};                          // zero
      3: return {s, 8'h00, 23'($urandom)};           // subnormal
      default: return {s, 8'($urandom_range(1, 254)), 23'($urandom)};
    endcase
  endfunction

  initial begin
    fres_t r;
    logic  spec;
    automatic int    n_spec = 0, n_plain = 0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      a = pick();
      b = pick();
      @(posedge clk);
      spec = special_ref(a, b, r);
      checks++;
      if (is_special !== spec) begin
        failures++; $display("is_special wrong for %h %h", a, b);
      end else if (spec) begin
        n_spec++;
        if (result !== r.sum || nan !== r.nan) begin
          failures++;
          $display("mismatch %h %h: got %h nan=%b expected %h nan=%b", a, b, result, nan, r.sum, r.nan);
        end
      end else n_plain++;
    end
    checks++;
    if (n_spec == 0 || n_plain == 0) begin failures++; $display("a class of cases was never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
