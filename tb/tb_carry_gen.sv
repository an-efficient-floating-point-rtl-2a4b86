// tb_carry_gen: exhaustive test of the 4-bit look-ahead carry generator.
//
// For every combination of generate and propagate bits the expected carry
// is computed by the ripple recurrence c = g[j] | p[j] & c from the least
// significant bit upwards, starting with no carry in, and compared with the
// generator's two-level output.
module tb_carry_gen;
  localparam int unsigned W = 4;
  logic [W-1:0] g, p;
  logic         cout;
  logic         clk = 1'b0;
  int           checks = 0, failures = 0;

  carry_gen #(.W(W)) dut (.g(g), .p(p), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic c;
    for (int k = 0; k < (1 << (2 * W)); k++) begin
      @(negedge clk);
      {g, p} = (2 * W)'(k);
      @(posedge clk);
      c = 1'b0;
      for (int j = 0; j < W; j++) c = g[j] | (p[j] & c);
      checks++;
      if (cout !== c) begin
        failures++;
        $display("mismatch g=%b p=%b: got %b expected %b", g, p, cout, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
