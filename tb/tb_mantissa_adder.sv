// tb_mantissa_adder: random test of the three-byte significand adder.
//
// Two instances are driven with the same random operands: the default one
// (two approximate low bytes) and one with NUM_APPROX = 0. The first is
// compared with a byte-by-byte model built from the cell truth table, the
// second with plain integer addition. Operands include all-zero and
// all-one bytes so that carries cross the byte boundaries.
module tb_mantissa_adder;
  import fp_ref_pkg::*;
  logic [23:0] a, b, s, s_ex;
  logic        cin, cout, cout_ex;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  mantissa_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  mantissa_adder #(.NUM_APPROX(0)) dut_exact (.a(a), .b(b), .cin(cin), .s(s_ex), .cout(cout_ex));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pick_byte();
    case ($urandom_range(3))
      0: return 8'h00;
      1: return 8'hFF;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    automatic int diff_seen = 0;
    for (int k = 0; k < 50000; k++) begin
      @(negedge clk);
      a   = {pick_byte(), pick_byte(), pick_byte()};
      b   = {pick_byte(), pick_byte(), pick_byte()};
      cin = 1'($urandom);
      @(posedge clk);
      checks += 2;
      if ({cout, s} !== sig_add_ref(a, b, cin, 2)) begin
        failures++;
        if (failures < 10) $display("approx mismatch %h + %h + %b: got %b_%h expected %h",
                                    a, b, cin, cout, s, sig_add_ref(a, b, cin, 2));
      end
      if ({cout_ex, s_ex} !== 25'(a) + 25'(b) + 25'(cin)) begin
        failures++;
        if (failures < 10) $display("exact mismatch %h + %h + %b", a, b, cin);
      end
      if ({cout, s} != {cout_ex, s_ex}) diff_seen++;
    end
    // the approximate adder must actually differ from the exact one
    checks++;
    if (diff_seen == 0) begin failures++; $display("approximate adder never differed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
