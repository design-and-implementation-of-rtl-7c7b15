// majority_voter_tb -- exhaustive check of 7- and 6-input majority voters.
module majority_voter_tb;
  int checks = 0, failures = 0;
  logic [6:0] a;
  logic [5:0] b;
  logic ma, mb;

  majority_voter #(.N(7)) dut_a (.in(a), .major(ma));
  majority_voter #(.N(6)) dut_b (.in(b), .major(mb));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 128; k++) begin
      a = 7'(k);
      b = 6'(k);
      #1;
      checks += 2;
      if (ma !== ($countones(a) >= 4)) begin failures++; $display("FAIL a=%b", a); end
      if (mb !== ($countones(b) >= 4)) begin failures++; $display("FAIL b=%b", b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
