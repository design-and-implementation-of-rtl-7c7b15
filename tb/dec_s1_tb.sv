// dec_s1_tb -- words built by the reference scheme I encoder are decoded and must
// give back the original body; the inversion bit must be reported as the action.
module dec_s1_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;
  localparam int DW = 8;
  int checks = 0, failures = 0;
  logic [DW:0]   z;
  logic [DW-1:0] x;
  inv_action_t   action;
  int n_inv = 0;

  dec_s1 #(.DATA_W(DW)) dut (.z, .x, .action);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev;
    prev = 0;
    for (int k = 0; k < 2000; k++) begin
      int d;
      d = $urandom_range(0, 255);
      z = (DW+1)'(enc1(d, prev, DW));
      #1;
      checks += 2;
      n_inv += z[DW];
      if (int'(x) != d) begin failures++; $display("FAIL z=%h x=%h exp %h", z, x, d); end
      if (action != (z[DW] ? ACT_ODD : ACT_NONE)) begin failures++; $display("FAIL action z=%h", z); end
      prev = int'(z);
    end
    checks++;
    if (n_inv == 0 || n_inv == 2000) begin failures++; $display("FAIL n_inv=%0d", n_inv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
