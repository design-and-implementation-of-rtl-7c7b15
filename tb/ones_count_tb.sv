// ones_count_tb -- random and corner vectors through 7- and 13-input Ones blocks.
module ones_count_tb;
  int checks = 0, failures = 0;
  logic [6:0]  a;
  logic [12:0] b;
  logic [2:0]  ca;
  logic [3:0]  cb;

  ones_count #(.N(7))  dut_a (.in(a), .count(ca));
  ones_count #(.N(13)) dut_b (.in(b), .count(cb));

  function automatic int pop(logic [31:0] v);
    int s = 0;
    while (v != 0) begin v &= v - 1; s++; end
    return s;
  endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 300; k++) begin
      a = (k < 128) ? 7'(k) : 7'($urandom);
      b = (k == 0) ? '1 : 13'($urandom);
      #1;
      checks += 2;
      if (int'(ca) != pop(32'(a))) begin failures++; $display("FAIL a=%b c=%0d", a, ca); end
      if (int'(cb) != pop(32'(b))) begin failures++; $display("FAIL b=%b c=%0d", b, cb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
