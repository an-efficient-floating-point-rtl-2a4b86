// tb_fp_adder_exact: the floating point adder built with an exact
// significand adder (NUM_APPROX = 0) against a correctly rounded reference.
//
// The reference adds the operands on 64-bit integers with the smaller one
// reduced to a sticky bit when it lies far below, then rounds to nearest
// even, with subnormal inputs and results flushed to zero. Matching it bit
// for bit shows that the alignment, guard bits, normalization, rounding and
// special cases around the significand adder are right, so that every
// difference of the default build comes from the approximate bytes alone.
module tb_fp_adder_exact;
  import fp_ref_pkg::*;
  import fp_stim_pkg::*;
  logic [31:0] a, b, sum;
  logic        nan, overflow, underflow;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  fp_adder #(.NUM_APPROX(0)) dut (
    .a(a), .b(b), .sum(sum), .nan(nan), .overflow(overflow), .underflow(underflow));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fres_t r;
    for (int k = 0; k < 200000; k++) begin
      @(negedge clk);
      pick_pair(a, b);
      @(posedge clk);
      r = fadd_exact_ref(a, b);
      checks++;
      if ({sum, nan, overflow, underflow} !== {r.sum, r.nan, r.overflow, r.underflow}) begin
        failures++;
        if (failures < 10)
          $display("mismatch %h + %h: got %h %b%b%b expected %h %b%b%b", a, b, sum, nan, overflow,
                   underflow, r.sum, r.nan, r.overflow, r.underflow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
