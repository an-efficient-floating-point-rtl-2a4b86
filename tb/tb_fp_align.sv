// tb_fp_align: test of the alignment shifter.
//
// Every shift distance from 0 to 255 is applied with random significands
// (hidden bit set). The expected significand and guard/round/sticky bits are
// worked out on a 64-bit integer: the significand is placed high in the
// word, shifted, and everything that falls below the round bit is ORed into
// the sticky bit.
module tb_fp_align;
  logic [23:0] sig_in, sig_out;
  logic [7:0]  shift;
  logic [2:0]  grs;
  logic        clk = 1'b0;
  int          checks = 0, failures = 0;

  fp_align dut (.sig_in(sig_in), .shift(shift), .sig_out(sig_out), .grs(grs));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [279:0] w;
    logic [26:0]  e;
    for (int k = 0; k < 256 * 20; k++) begin
      @(negedge clk);
      shift  = 8'(k % 256);
      sig_in = {1'b1, 23'($urandom)};
      if (k % 7 == 0) sig_in = 24'h800000;
      @(posedge clk);
      w = {sig_in, 256'h0} >> shift;              // 24 + 256 bits
      e = w[279:253];
      e[0] = e[0] | (w[252:0] != 0);
      checks++;
      if ({sig_out, grs} !== e) begin
        failures++;
        if (failures < 10) $display("mismatch sig=%h shift=%0d: got %h_%b expected %h",
                                    sig_in, shift, sig_out, grs, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
