// tb_approx_cell: exhaustive test of the 1-bit approximate cell.
//
// All eight input combinations are compared with the published truth table
// of the proposed cell (sum column 1,0,1,0,1,0,0,0 and carry column
// 0,1,0,1,0,1,1,1 for inputs a b cin = 000 .. 111). The testbench also
// counts the entries that differ from an exact full adder and expects three
// wrong sums and one wrong carry.
module tb_approx_cell;
  logic a, b, cin, s, cout;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  approx_cell dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] SUM_TABLE   = 8'b0001_0101;  // bit k = sum for input k (LSB = 000)
  localparam logic [7:0] CARRY_TABLE = 8'b1110_1010;

  initial begin
    automatic int sum_err = 0, carry_err = 0;
    logic [1:0] exact;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      {a, b, cin} = 3'(k);
      @(posedge clk);
      exact = 2'(a) + 2'(b) + 2'(cin);
      checks += 2;
      if (s !== SUM_TABLE[k])     begin failures++; $display("sum mismatch at %03b", k[2:0]); end
      if (cout !== CARRY_TABLE[k]) begin failures++; $display("carry mismatch at %03b", k[2:0]); end
      if (s != exact[0])    sum_err++;
      if (cout != exact[1]) carry_err++;
    end
    checks += 2;
    if (sum_err != 3)   begin failures++; $display("expected 3 sum errors, got %0d", sum_err); end
    if (carry_err != 1) begin failures++; $display("expected 1 carry error, got %0d", carry_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
