// tb_fp_normalize_round: random test of normalization and rounding.
//
// The inputs {carry, sum, grs} are read as one integer with 26 fraction
// bits at the exponent exp_in. The expected single precision fields come
// from a reference that finds the leading one on that integer, rounds the
// bits below the 24th significant bit to nearest even and applies the
// exponent range, independently of the block's shifter and counter.
// Inputs are biased towards few leading ones, ties and exponents near both
// ends of the range so that overflow, underflow and the rounding carry all
// occur.
module tb_fp_normalize_round;
  import fp_ref_pkg::*;
  logic [23:0] sum;
  logic        carry;
  logic [2:0]  grs;
  logic [7:0]  exp_in, exp_out;
  logic [22:0] man_out;
  logic        overflow, underflow, zero;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  fp_normalize_round dut (
    .sum(sum), .carry(carry), .grs(grs), .exp_in(exp_in), .man_out(man_out), .exp_out(exp_out),
    .overflow(overflow), .underflow(underflow), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fres_t r;
    automatic int n_ovf = 0, n_unf = 0, n_zero = 0, n_rcarry = 0;
    for (int k = 0; k < 40000; k++) begin
      @(negedge clk);
      carry = 1'($urandom);
      sum   = 24'($urandom) >> $urandom_range(24);
      if (k % 5 == 0) sum = 24'hFFFFFF;
      grs   = 3'($urandom);
      if (k % 400 == 0) begin sum = 0; grs = 0; carry = 0; end
      case ($urandom_range(3))
        0: exp_in = 8'($urandom_range(1, 30));
        1: exp_in = 8'($urandom_range(230, 254));
        default: exp_in = 8'($urandom_range(1, 254));
      endcase
      @(posedge clk);
      r = pack_ref(1'b0, {36'h0, carry, sum, grs}, int'(exp_in), 26);
      checks++;
      if ({carry, sum, grs} == 0) begin
        n_zero++;
        if (!zero || overflow || underflow) begin failures++; $display("zero not flagged"); end
      end else if (r.overflow) begin
        n_ovf++;
        if (!overflow) begin failures++; $display("overflow missed"); end
      end else if (r.underflow) begin
        n_unf++;
        if (!underflow) begin failures++; $display("underflow missed"); end
      end else begin
        if (r.sum[22:0] == 0 && sum == 24'hFFFFFF) n_rcarry++;
        if ({exp_out, man_out} !== r.sum[30:0] || zero || overflow || underflow) begin
          failures++;
          if (failures < 10) $display("mismatch c=%b sum=%h grs=%b e=%0d: got %h_%h expected %h",
                                      carry, sum, grs, exp_in, exp_out, man_out, r.sum[30:0]);
        end
      end
    end
    checks += 4;
    if (n_ovf == 0)    begin failures++; $display("no overflow case"); end
    if (n_unf == 0)    begin failures++; $display("no underflow case"); end
    if (n_zero == 0)   begin failures++; $display("no zero case"); end
    if (n_rcarry == 0) begin failures++; $display("no rounding carry case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
