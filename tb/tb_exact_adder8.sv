// tb_exact_adder8: exhaustive test of the exact 8-bit adder, all 256 x 256
// operand pairs with both carry-in values, against integer addition.
module tb_exact_adder8;
  logic [7:0] a, b, s;
  logic       cin, cout;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  exact_adder8 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < (1 << 17); k++) begin
      @(negedge clk);
      {cin, a, b} = 17'(k);
      @(posedge clk);
      checks++;
      if ({cout, s} !== 9'(a) + 9'(b) + 9'(cin)) begin
        failures++;
        if (failures < 10) $display("mismatch %h + %h + %b: got %b_%h", a, b, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
