// link_encoder_tb -- streams of flits, with idle cycles in between, through the
// encoder of each scheme. Each link word must match the reference encoder applied
// to the flit and to the last word sent (so the previous-word register, its hold
// on idle cycles and its reset are checked too), in the same cycle as valid.
module link_encoder_tb;
  import link_code_pkg::*;
  import link_ref_pkg::*;
  localparam int DW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, valid = 0;
  logic [DW-1:0] data;
  logic [DW:0]   l1, l2;
  logic [DW+1:0] l3;
  logic v1, v2, v3;
  inv_action_t a1, a2, a3;
  int prev [3];
  int n_idle = 0;

  always #5 clk = ~clk;

  link_encoder #(.SCHEME(1), .DATA_W(DW)) u1 (.clk, .rst_n, .valid, .data, .link(l1), .link_valid(v1), .action(a1));
  link_encoder #(.SCHEME(2), .DATA_W(DW)) u2 (.clk, .rst_n, .valid, .data, .link(l2), .link_valid(v2), .action(a2));
  link_encoder #(.SCHEME(3), .DATA_W(DW)) u3 (.clk, .rst_n, .valid, .data, .link(l3), .link_valid(v3), .action(a3));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    prev = '{0, 0, 0};
    for (int k = 0; k < 3000; k++) begin
      valid = ($urandom_range(0, 4) != 0);
      data  = (k % 5 == 0) ? DW'(k[1] ? 8'h55 : 8'hAA) : DW'($urandom);
      if (k == 1500) rst_n = 0;               // mid-stream reset
      #1;
      if (valid) begin
        check("s1", int'(l1), enc1(int'(data), prev[0], DW));
        check("s2", int'(l2), enc2(int'(data), prev[1], DW));
        check("s3", int'(l3), enc3(int'(data), prev[2], DW));
        check("valid", int'({v1, v2, v3}), 7);
      end else n_idle++;
      @(posedge clk);
      if (!rst_n) prev = '{0, 0, 0};
      else if (valid) prev = '{int'(l1), int'(l2), int'(l3)};
      #1 rst_n = 1;
    end
    checks++;
    if (n_idle == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
