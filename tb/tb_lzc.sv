// tb_lzc: test of the 27-bit leading zero counter. Each position of the
// leading one is tried with random bits below it, plus the all-zero word.
module tb_lzc;
  logic [26:0] x;
  logic [4:0]  count;
  logic        all_zero;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  lzc #(.W(27)) dut (.x(x), .count(count), .all_zero(all_zero));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = -1; k < 27 * 20; k++) begin
      int pos;
      pos = (k < 0) ? -1 : k % 27;
      @(negedge clk);
      if (pos < 0) x = '0;
      else x = (27'(1) << pos) | (27'($urandom) & ((27'(1) << pos) - 27'(1)));
      @(posedge clk);
      checks += 2;
      if (count !== 5'(26 - pos)) begin
        failures++;
        $display("mismatch x=%b: got %0d expected %0d", x, count, 26 - pos);
      end
      if (all_zero !== (pos < 0)) begin failures++; $display("all_zero wrong for %b", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
