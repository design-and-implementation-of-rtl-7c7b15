// dec_s2_tb -- a stream built by the reference scheme II encoder is decoded word by
// word against the previous word; every body must come back and every action (none,
// half, full) must be recognised. Runs of alternating patterns make full inversion
// frequent.
module dec_s2_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;
  localparam int DW = 8;
  int checks = 0, failures = 0;
  logic [DW:0]   z, r;
  logic [DW-1:0] x;
  inv_action_t   action;
  int seen [4];

  dec_s2 #(.DATA_W(DW)) dut (.z, .r, .x, .action);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev;
    prev = 0;
    for (int k = 0; k < 4000; k++) begin
      int d, enc, all;
      bit inv, full;
      d = (k % 3 == 0) ? ((k % 2) ? 'h55 : 'hAA) ^ $urandom_range(0, 7) : $urandom_range(0, 255);
      enc = enc2(d, prev, DW);
      z = (DW+1)'(enc);
      r = (DW+1)'(prev);
      #1;
      all  = (1 << DW) - 1;
      inv  = z[DW];
      full = inv && ((enc & all) == (d ^ all));
      checks += 2;
      seen[action]++;
      if (int'(x) != d) begin failures++; $display("FAIL z=%h r=%h x=%h exp %h", z, r, x, d); end
      if (action != (!inv ? ACT_NONE : (full ? ACT_FULL : ACT_ODD))) failures++;
      prev = enc;
    end
    for (int a = 0; a < 4; a++) if (a != 1) begin
      checks++;
      if (seen[a] == 0) begin failures++; $display("FAIL action %0d never seen", a); end
    end
    $display("actions none=%0d odd=%0d full=%0d", seen[0], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
