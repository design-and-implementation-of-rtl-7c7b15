// pair_detect_tb -- exhaustive check of the pair detectors, for a pair whose low
// wire is even and one whose low wire is odd, against costs computed from the
// voltage steps of the two wires.
module pair_detect_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;

  int checks = 0, failures = 0;
  logic x_lo, x_hi, y_lo, y_hi;
  pair_flags_t f_even_lo, f_odd_lo;

  pair_detect #(.LO_IS_ODD(1'b0)) dut_e (.x_lo, .x_hi, .y_lo, .y_hi, .flags(f_even_lo));
  pair_detect #(.LO_IS_ODD(1'b1)) dut_o (.x_lo, .x_hi, .y_lo, .y_hi, .flags(f_odd_lo));

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%b%b y=%b%b got %b exp %b", what, x_hi, x_lo, y_hi, y_lo, got, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int cur, prev, c0, c_lo, c_hi;
      {x_hi, x_lo, y_hi, y_lo} = 4'(v);
      #1;
      cur  = {x_hi, x_lo};
      prev = {y_hi, y_lo};
      c0   = pair_cost(prev, cur, 0);
      c_lo = pair_cost(prev, cur ^ 1, 0);   // low wire inverted
      c_hi = pair_cost(prev, cur ^ 2, 0);   // high wire inverted
      // low wire even: odd wire is the high one
      expect_bit("ty/evenlo", f_even_lo.ty, c_hi < c0);
      expect_bit("te/evenlo", f_even_lo.te, c_lo < c0);
      expect_bit("ty/oddlo",  f_odd_lo.ty,  c_lo < c0);
      expect_bit("te/oddlo",  f_odd_lo.te,  c_hi < c0);
      expect_bit("t2", f_even_lo.t2, c0 == 2);
      expect_bit("t4ss", f_even_lo.t4ss, (cur == prev) && (x_lo != x_hi));
      // the inverted pair always differs from the original by one unit
      checks++;
      if (!((c_lo - c0 == 1 || c0 - c_lo == 1) && (c_hi - c0 == 1 || c0 - c_hi == 1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
