// module_c_tb -- every combination of the four counts for 7 pairs, against the
// action that saves the most coupling (ties: odd, even, full, in that order).
module module_c_tb;
  import link_code_pkg::*;
  int checks = 0, failures = 0;
  logic [2:0] n_ty, n_te, n_t2, n_t4;
  inv_action_t action;
  int seen [4];

  module_c #(.NP(7)) dut (.n_ty, .n_te, .n_t2, .n_t4, .action);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int s[4];
      logic [1:0] exp;
      int best;
      {n_ty, n_te, n_t2, n_t4} = 12'(v);
      #1;
      s[0] = 0;
      s[1] = 2 * n_ty - 7;               // odd  -> 2'b10
      s[2] = 2 * n_te - 7;               // even -> 2'b01
      s[3] = 2 * n_t2 - 2 * n_t4;        // full -> 2'b11
      exp = 2'b00; best = 0;
      if (s[1] > best) begin best = s[1]; exp = 2'b10; end
      if (s[2] > best) begin best = s[2]; exp = 2'b01; end
      if (s[3] > best) begin best = s[3]; exp = 2'b11; end
      checks++;
      seen[exp]++;
      if (action !== exp) begin
        failures++;
        $display("FAIL ty=%0d te=%0d t2=%0d t4=%0d got %b exp %b", n_ty, n_te, n_t2, n_t4, action, exp);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
