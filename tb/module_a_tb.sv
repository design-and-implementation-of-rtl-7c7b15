// module_a_tb -- every combination of counts for 7 pairs. The expected action is
// found by comparing the coupling saved by half and by full inversion, with full
// inversion only allowed where the decoder's majority test will recognise it
// (driven here as an independent input, both values).
module module_a_tb;
  int checks = 0, failures = 0;
  logic [2:0] n_ty, n_t2, n_t4;
  logic half_inv, full_inv, full_ok;

  module_a #(.NP(7)) dut (.n_ty, .n_t2, .n_t4, .full_ok, .half_inv, .full_inv);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int ty = 0; ty < 8; ty++)
      for (int t2 = 0; t2 <= ty; t2++)          // Type II pairs are also Ty pairs
        for (int t4 = 0; t4 + ty <= 7; t4++)
        for (int ok = 0; ok < 2; ok++) begin  // T4** pairs are not Ty pairs
          int save_half, save_full;
          bit exp_full, exp_half, recognisable;
          n_ty = 3'(ty); n_t2 = 3'(t2); n_t4 = 3'(t4); full_ok = ok[0];
          #1;
          save_half    = ty - (7 - ty);
          save_full    = 2 * t2 - 2 * t4;
          recognisable = (ok == 1);
          exp_full     = recognisable && save_full > 0 && save_full > save_half;
          exp_half     = !exp_full && save_half > 0;
          checks++;
          if (full_inv !== exp_full || half_inv !== exp_half) begin
            failures++;
            $display("FAIL ty=%0d t2=%0d t4=%0d got h%b f%b", ty, t2, t4, half_inv, full_inv);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
