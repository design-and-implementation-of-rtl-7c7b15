// link_width_tb -- encoder-to-decoder loopback of all three schemes at body widths
// 5 (odd: the inversion wires swap roles) and 16, with idle cycles. Every flit must
// come back, every link word must match the reference encoder, and every decoder
// must report the action its encoder took.
module link_width_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [4:0]  d5;
  logic [15:0] d16;

  always #5 clk = ~clk;

  // body width 5
  logic [5:0]  l5_1, l5_2;
  logic [6:0]  l5_3;
  logic [4:0]  o5_1, o5_2, o5_3;
  inv_action_t e5 [3], r5 [3];
  logic [2:0]  lv5, dv5;
  link_encoder #(.SCHEME(1), .DATA_W(5)) e51 (.clk, .rst_n, .valid, .data(d5), .link(l5_1), .link_valid(lv5[0]), .action(e5[0]));
  link_encoder #(.SCHEME(2), .DATA_W(5)) e52 (.clk, .rst_n, .valid, .data(d5), .link(l5_2), .link_valid(lv5[1]), .action(e5[1]));
  link_encoder #(.SCHEME(3), .DATA_W(5)) e53 (.clk, .rst_n, .valid, .data(d5), .link(l5_3), .link_valid(lv5[2]), .action(e5[2]));
  link_decoder #(.SCHEME(1), .DATA_W(5)) d51 (.clk, .rst_n, .link_valid(lv5[0]), .link(l5_1), .data(o5_1), .data_valid(dv5[0]), .action(r5[0]));
  link_decoder #(.SCHEME(2), .DATA_W(5)) d52 (.clk, .rst_n, .link_valid(lv5[1]), .link(l5_2), .data(o5_2), .data_valid(dv5[1]), .action(r5[1]));
  link_decoder #(.SCHEME(3), .DATA_W(5)) d53 (.clk, .rst_n, .link_valid(lv5[2]), .link(l5_3), .data(o5_3), .data_valid(dv5[2]), .action(r5[2]));

  // body width 16
  logic [16:0] l16_1, l16_2;
  logic [17:0] l16_3;
  logic [15:0] o16_1, o16_2, o16_3;
  inv_action_t e16 [3], r16 [3];
  logic [2:0]  lv16, dv16;
  link_encoder #(.SCHEME(1), .DATA_W(16)) e161 (.clk, .rst_n, .valid, .data(d16), .link(l16_1), .link_valid(lv16[0]), .action(e16[0]));
  link_encoder #(.SCHEME(2), .DATA_W(16)) e162 (.clk, .rst_n, .valid, .data(d16), .link(l16_2), .link_valid(lv16[1]), .action(e16[1]));
  link_encoder #(.SCHEME(3), .DATA_W(16)) e163 (.clk, .rst_n, .valid, .data(d16), .link(l16_3), .link_valid(lv16[2]), .action(e16[2]));
  link_decoder #(.SCHEME(1), .DATA_W(16)) d161 (.clk, .rst_n, .link_valid(lv16[0]), .link(l16_1), .data(o16_1), .data_valid(dv16[0]), .action(r16[0]));
  link_decoder #(.SCHEME(2), .DATA_W(16)) d162 (.clk, .rst_n, .link_valid(lv16[1]), .link(l16_2), .data(o16_2), .data_valid(dv16[1]), .action(r16[1]));
  link_decoder #(.SCHEME(3), .DATA_W(16)) d163 (.clk, .rst_n, .link_valid(lv16[2]), .link(l16_3), .data(o16_3), .data_valid(dv16[2]), .action(r16[2]));

  int p5 [3], p16 [3];
  int seen5 [4], seen16 [4];
  int n_full2_5 = 0, n_full2_16 = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d5 = '0; d16 = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    p5 = '{0, 0, 0}; p16 = '{0, 0, 0};
    for (int k = 0; k < 4000; k++) begin
      valid = ($urandom_range(0, 5) != 0);
      d5    = (k % 3 == 0) ? (k[1] ? 5'h15 : 5'h0A) ^ 5'($urandom_range(0, 3)) : 5'($urandom);
      d16   = (k % 3 == 0) ? (k[1] ? 16'h5555 : 16'hAAAA) ^ 16'(1 << $urandom_range(0, 15)) : 16'($urandom);
      #1;
      if (valid) begin
        check("w5 s1 link", int'(l5_1), enc1(int'(d5), p5[0], 5));
        check("w5 s2 link", int'(l5_2), enc2(int'(d5), p5[1], 5));
        check("w5 s3 link", int'(l5_3), enc3(int'(d5), p5[2], 5));
        check("w16 s1 link", int'(l16_1), enc1(int'(d16), p16[0], 16));
        check("w16 s2 link", int'(l16_2), enc2(int'(d16), p16[1], 16));
        check("w16 s3 link", int'(l16_3), enc3(int'(d16), p16[2], 16));
        check("w5 s1 data", int'(o5_1), int'(d5));
        check("w5 s2 data", int'(o5_2), int'(d5));
        check("w5 s3 data", int'(o5_3), int'(d5));
        check("w16 s1 data", int'(o16_1), int'(d16));
        check("w16 s2 data", int'(o16_2), int'(d16));
        check("w16 s3 data", int'(o16_3), int'(d16));
        for (int s = 0; s < 3; s++) begin
          check("w5 action", int'(r5[s]), int'(e5[s]));
          check("w16 action", int'(r16[s]), int'(e16[s]));
        end
        check("valid", int'({dv5, dv16}), 63);
        seen5[e5[2]]++; seen16[e16[2]]++;
        n_full2_5  += (e5[1] == ACT_FULL);
        n_full2_16 += (e16[1] == ACT_FULL);
      end
      @(posedge clk);
      if (valid) begin
        p5  = '{int'(l5_1), int'(l5_2), int'(l5_3)};
        p16 = '{int'(l16_1), int'(l16_2), int'(l16_3)};
      end
      #1;
    end
    for (int a = 0; a < 4; a++) begin
      checks += 2;
      if (seen5[a] == 0)  begin failures++; $display("FAIL width 5 scheme III action %0d never seen", a); end
      if (seen16[a] == 0) begin failures++; $display("FAIL width 16 scheme III action %0d never seen", a); end
    end
    $display("scheme II full inversions: width 5 %0d, width 16 %0d", n_full2_5, n_full2_16);
    checks += 2;
    if (n_full2_5 == 0)  begin failures++; $display("FAIL width 5 scheme II never fully inverted"); end
    if (n_full2_16 == 0) begin failures++; $display("FAIL width 16 scheme II never fully inverted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
