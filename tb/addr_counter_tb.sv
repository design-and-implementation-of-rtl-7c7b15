// addr_counter_tb -- counts with a random enable, checks hold, wrap-around and reset.
module addr_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] addr;
  logic wrap;
  int model = 0, n_wrap = 0;

  always #5 clk = ~clk;

  addr_counter #(.AW(8)) dut (.clk, .rst_n, .en, .addr, .wrap);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      en = ($urandom_range(0, 3) != 0);
      if (k == 1234) rst_n = 0;
      #1;
      checks += 2;
      if (int'(addr) != model) begin failures++; $display("FAIL addr %0d exp %0d", addr, model); end
      if (wrap != (en && model == 255 && rst_n)) begin
        if (rst_n) begin failures++; $display("FAIL wrap"); end
      end
      n_wrap += wrap && rst_n;
      @(posedge clk);
      if (!rst_n) model = 0;
      else if (en) model = (model + 1) % 256;
      #1 rst_n = 1;
    end
    checks++;
    if (n_wrap < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
