// tb_full_adder: exhaustive test of the exact 1-bit full adder against the
// integer sum a + b + cin.
module tb_full_adder;
  logic a, b, cin, s, cout;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      {a, b, cin} = 3'(k);
      @(posedge clk);
      checks++;
      if ({cout, s} !== 2'(a) + 2'(b) + 2'(cin)) begin
        failures++;
        $display("mismatch at %03b: got %b%b", k[2:0], cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
