// tb_approx_adder8: exhaustive test and error analysis of the 8-bit
// approximate adder.
//
// All 256 x 256 operand pairs are applied with both carry-in values. The
// expected output comes from a model written independently of the RTL:
// the low four bits walk the cell truth table (sum 1,0,1,0,1,0,0,0 and
// carry 0,1,0,1,0,1,1,1 for a b cin = 000 .. 111), the high four bits are
// the integer sum of the high nibbles plus the carry from the low half,
// and the carry out is the carry of the high nibbles added without any
// carry in. Every output must match that model bit for bit.
//
// With cin = 0 (the 256 x 256 sweep of the error analysis) the testbench
// also measures the error distance |approximate - exact| of the 9-bit
// result, and prints its maximum, its mean and the error rate.
module tb_approx_adder8;
  logic [7:0] a, b, s;
  logic       cin, cout;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  approx_adder8 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] SUM_TABLE   = 8'b0001_0101;
  localparam logic [7:0] CARRY_TABLE = 8'b1110_1010;

  function automatic logic [8:0] model(input logic [7:0] x, input logic [7:0] y, input logic ci);
    logic [3:0] lo;
    logic       c;
    int         hi;
    c = ci;
    for (int i = 0; i < 4; i++) begin
      lo[i] = SUM_TABLE[{x[i], y[i], c}];
      c     = CARRY_TABLE[{x[i], y[i], c}];
    end
    hi = int'(x[7:4]) + int'(y[7:4]);
    return {hi >= 16, 4'(hi + int'(c)), lo};
  endfunction

  initial begin
    automatic longint ed_sum = 0;
    automatic int     ed_max = 0, ed, n_err = 0;
    for (int k = 0; k < (1 << 17); k++) begin
      @(negedge clk);
      {cin, a, b} = 17'(k);
      @(posedge clk);
      checks++;
      if ({cout, s} !== model(a, b, cin)) begin
        failures++;
        if (failures < 10) $display("mismatch %h + %h + %b: got %b_%h expected %h",
                                    a, b, cin, cout, s, model(a, b, cin));
      end
      if (!cin) begin
        ed = int'({cout, s}) - (int'(a) + int'(b));
        if (ed < 0) ed = -ed;
        ed_sum += longint'(ed);
        if (ed > ed_max) ed_max = ed;
        if (ed != 0) n_err++;
      end
    end
    $display("error analysis over 65536 pairs: max ED = %0d, MED = %0.3f, error rate = %0.2f%%",
             ed_max, real'(ed_sum) / 65536.0, 100.0 * real'(n_err) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
