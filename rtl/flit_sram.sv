// flit_sram -- memory that holds the flit bodies sent over the link.
//
// 2**AW words of DW bits, one synchronous read port (rd_data is registered, one
// cycle of latency, cleared by the active-low reset) and one synchronous write port.
// The reference top names an SRAM with addr, clk and rst inputs and an 8-bit out;
// its contents are not given, so at start-up word a holds init_word(a), a fixed
// scrambling of the address (multiply by the 32-bit golden-ratio constant
// 0x9E3779B1 and XOR bytes 3 and 1), and the write port lets a user load other data.
module flit_sram #(
  parameter int unsigned AW = 8,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data
);

  logic [DW-1:0] mem [2**AW];

  function automatic logic [DW-1:0] init_word(int unsigned a);
    logic [31:0] h;
    h = a * 32'h9E37_79B1;
    return DW'(h[31:24] ^ h[15:8]);
  endfunction

  initial begin
    for (int unsigned a = 0; a < 2**AW; a++) mem[a] = init_word(a);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rd_data <= '0;
    else        rd_data <= mem[rd_addr];
  end

endmodule
