// flit_sram_tb -- reads every word of the start-up contents (hash of the address,
// recomputed here), then writes random words and reads them back, with the one
// cycle read latency.
module flit_sram_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [7:0] rd_addr, wr_addr, rd_data, wr_data;
  logic [7:0] model [256];

  always #5 clk = ~clk;

  flit_sram #(.AW(8), .DW(8)) dut (.clk, .rst_n, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  function automatic logic [7:0] hash(int a);
    longint unsigned p;
    p = (longint'(a) * 64'h9E3779B1) & 64'hFFFF_FFFF;
    return 8'(p >> 24) ^ 8'(p >> 8);
  endfunction

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int a = 0; a < 256; a++) model[a] = hash(a);
    @(posedge clk); #1;
    checks++;
    if (rd_data != 0) failures++;           // cleared by reset
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data != model[a]) begin failures++; $display("FAIL init %0d: %h exp %h", a, rd_data, model[a]); end
    end
    for (int k = 0; k < 1000; k++) begin
      wr_en   = $urandom_range(0, 1);
      wr_addr = 8'($urandom);
      wr_data = 8'($urandom);
      rd_addr = 8'($urandom_range(0, 15));
      @(posedge clk); #1;
      checks++;
      if (rd_data != model[rd_addr]) begin failures++; $display("FAIL rd %0d: %h exp %h", rd_addr, rd_data, model[rd_addr]); end
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
