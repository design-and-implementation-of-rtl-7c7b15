// addr_counter -- address counter that walks the flit memory.
//
// An AW-bit register with synchronous active-low reset to 0 that adds 1 on every
// clock with `en` high and wraps from all-ones to 0. The reference top shows an
// 8-bit adder (addr + 1) feeding a clock-enabled register; the rest is this
// design's choice.
module addr_counter #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [AW-1:0] addr,
  output logic          wrap     // high on the count that goes from all-ones to 0
);

  always_ff @(posedge clk) begin
    if (!rst_n)  addr <= '0;
    else if (en) addr <= addr + 1'b1;
  end

  assign wrap = en && (addr == '1);

endmodule
