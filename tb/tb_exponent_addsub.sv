// tb_exponent_addsub: exhaustive test of the exponent adder/subtractor.
//
// Every pair of 8-bit exponents is added and subtracted. The sum must equal
// the 9-bit integer sum; the difference must equal a - b modulo 256, with
// cout set exactly when a >= b (the exponent comparison).
module tb_exponent_addsub;
  logic [7:0] a, b, s;
  logic       sub, cout;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  exponent_addsub dut (.a(a), .b(b), .sub(sub), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] expect_v;
    for (int k = 0; k < (1 << 17); k++) begin
      @(negedge clk);
      {sub, a, b} = 17'(k);
      @(posedge clk);
      if (sub) expect_v = {(a >= b), 8'(int'(a) - int'(b))};
      else     expect_v = 9'(a) + 9'(b);
      checks++;
      if ({cout, s} !== expect_v) begin
        failures++;
        if (failures < 10) $display("mismatch a=%h b=%h sub=%b: got %b_%h", a, b, sub, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
