// dec_s3_tb -- a stream built by the reference scheme III encoder is decoded; every
// body must come back and all four actions must occur and be reported.
module dec_s3_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;
  localparam int DW = 8;
  int checks = 0, failures = 0;
  logic [DW+1:0] z;
  logic [DW-1:0] x;
  inv_action_t   action;
  int seen [4];

  dec_s3 #(.DATA_W(DW)) dut (.z, .x, .action);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev;
    prev = 0;
    for (int k = 0; k < 4000; k++) begin
      int d, enc;
      logic [1:0] exp_act;
      d = (k % 3 == 0) ? ((k % 2) ? 'h55 : 'hAA) ^ $urandom_range(0, 7) : $urandom_range(0, 255);
      enc = enc3(d, prev, DW);
      z = (DW+2)'(enc);
      #1;
      // with DW even, wire DW marks even inversion and wire DW+1 odd inversion
      exp_act = {z[DW+1], z[DW]};
      checks += 2;
      seen[action]++;
      if (int'(x) != d) begin failures++; $display("FAIL z=%h x=%h exp %h", z, x, d); end
      if (action != exp_act) failures++;
      prev = enc;
    end
    for (int a = 0; a < 4; a++) begin
      checks++;
      if (seen[a] == 0) begin failures++; $display("FAIL action %0d never seen", a); end
    end
    $display("actions none=%0d even=%0d odd=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
