// fp_stim_pkg: random operand pairs for the floating point adder
// testbenches. Pairs are biased towards the interesting regions: equal and
// neighbouring exponents (cancellation, left normalization), distant
// exponents (sticky bit, shift-out), exponents near the top and bottom of
// the range (overflow, underflow) and special operands.
package fp_stim_pkg;

  function automatic logic [31:0] rand_normal(input int emin, input int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction

  task automatic pick_pair(output logic [31:0] a, output logic [31:0] b);
    int sel, e;
    sel = $urandom_range(99);
    a = rand_normal(1, 254);
    if (sel < 25) begin                            // same exponent
      b = rand_normal(1, 254); b[30:23] = a[30:23];
    end else if (sel < 40) begin                   // neighbouring exponent
      e = int'(a[30:23]) + $urandom_range(0, 2) - 1;
      if (e < 1) e = 1;
      if (e > 254) e = 254;
      b = rand_normal(e, e);
    end else if (sel < 45) begin                   // near cancellation
      b = a ^ 32'h8000_0000;
      b[7:0] = 8'($urandom);
    end else if (sel < 55) begin                   // large results
      a = rand_normal(250, 254); b = rand_normal(250, 254); b[31] = a[31];
    end else if (sel < 65) begin                   // tiny results
      a = rand_normal(1, 4); b = rand_normal(1, 4); b[31] = ~a[31];
    end else if (sel < 70) begin                   // special operands
      case ($urandom_range(3))
        0: b = {1'($urandom), 8'hFF, 23'($urandom)};
        1: b = {1'($urandom), 8'hFF, 23'h0};
        2: b = {1'($urandom), 31'h0};
        default: b = {1'($urandom), 8'h00, 23'($urandom)};
      endcase
      if ($urandom_range(1) != 0) begin logic [31:0] t; t = a; a = b; b = t; end
    end else if (sel < 75) begin                   // exact cancellation
      b = a ^ 32'h8000_0000;
    end else begin                                 // anything
      b = rand_normal(1, 254);
    end
  endtask

endpackage
