// enc_s3_tb -- random flits and previous link words through the scheme 3 block E
// (8-bit body), compared with the reference encoder that tries every inversion the
// scheme allows; also counts how often each action was taken.
module enc_s3_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;
  localparam int DW = 8;
  localparam int LW = DW + 2;
  int checks = 0, failures = 0;
  logic [DW-1:0] x;
  logic [LW-1:0] y, z;
  inv_action_t   action;
  int seen [4];

  enc_s3 #(.DATA_W(DW)) dut (.x, .y, .z, .action);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int k = 0; k < 4000; k++) begin
      int exp;
      x = DW'($urandom);
      y = LW'($urandom);
      if (k % 4 == 1) x = DW'(k[0] ? 8'h55 : 8'hAA) ^ DW'($urandom_range(0, 3));
      if (k % 4 == 2) y = {(LW-DW)'(0), ~x};
      #1;
      exp = enc3(int'(x), int'(y), DW);
      checks++;
      seen[action]++;
      if (int'(z) != exp) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h exp %h", x, y, z, exp);
      end
    end
    $display("actions none=%0d even=%0d odd=%0d full=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
