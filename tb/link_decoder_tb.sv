// link_decoder_tb -- reference-encoded streams, with idle cycles, into the decoder
// of each scheme. The scheme II decoder depends on the previous received word, so
// idle cycles (register must hold) matter there. Every valid word must decode to
// the flit that was encoded, in the same cycle.
module link_decoder_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;
  localparam int DW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, lv = 0;
  logic [DW:0]   l1, l2;
  logic [DW+1:0] l3;
  logic [DW-1:0] d1, d2, d3;
  logic v1, v2, v3;
  inv_action_t a1, a2, a3;
  int prev [3];
  int n_full2 = 0;

  always #5 clk = ~clk;

  link_decoder #(.SCHEME(1), .DATA_W(DW)) u1 (.clk, .rst_n, .link_valid(lv), .link(l1), .data(d1), .data_valid(v1), .action(a1));
  link_decoder #(.SCHEME(2), .DATA_W(DW)) u2 (.clk, .rst_n, .link_valid(lv), .link(l2), .data(d2), .data_valid(v2), .action(a2));
  link_decoder #(.SCHEME(3), .DATA_W(DW)) u3 (.clk, .rst_n, .link_valid(lv), .link(l3), .data(d3), .data_valid(v3), .action(a3));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int d;
    l1 = '0; l2 = '0; l3 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prev = '{0, 0, 0};
    for (int k = 0; k < 3000; k++) begin
      lv = ($urandom_range(0, 4) != 0);
      d  = (k % 3 == 0) ? ((k % 2) ? 'h55 : 'hAA) ^ $urandom_range(0, 7) : $urandom_range(0, 255);
      if (lv) begin
        l1 = (DW+1)'(enc1(d, prev[0], DW));
        l2 = (DW+1)'(enc2(d, prev[1], DW));
        l3 = (DW+2)'(enc3(d, prev[2], DW));
      end else begin
        // idle: the wires carry garbage that must not enter the register
        l1 = (DW+1)'($urandom); l2 = (DW+1)'($urandom); l3 = (DW+2)'($urandom);
      end
      #1;
      if (lv) begin
        check("s1", int'(d1), d);
        check("s2", int'(d2), d);
        check("s3", int'(d3), d);
        check("valid", int'({v1, v2, v3}), 7);
        n_full2 += (a2 == ACT_FULL);
      end
      @(posedge clk);
      if (lv) prev = '{int'(l1), int'(l2), int'(l3)};
      #1;
    end
    checks++;
    if (n_full2 == 0) begin failures++; $display("FAIL no full inversion in scheme II"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
