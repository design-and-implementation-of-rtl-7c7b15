// dec_s3 -- block D of the scheme III decoder.
//
// The two inversion wires of the scheme III link (DATA_W and DATA_W+1) carry the
// encoder's action directly: the odd-numbered one is set by odd inversion, the
// even-numbered one by even inversion, both by full inversion. The decoder XORs
// the odd body wires with the first and the even body wires with the second.
// The description motivates two inversion bits by the smaller decoder they allow;
// its single-bit decoder drawing, which tells odd from even with a Ty majority
// voter, cannot also recognise a full inversion, so this design decodes from the
// two bits. Combinational.
module dec_s3
  import link_code_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned LW = DATA_W + 2
) (
  input  logic [LW-1:0]     z,
  output logic [DATA_W-1:0] x,
  output inv_action_t       action
);

  localparam logic [DATA_W-1:0] ODD_M  = DATA_W'(parity_mask(DATA_W, 1'b1));
  localparam logic [DATA_W-1:0] EVEN_M = DATA_W'(parity_mask(DATA_W, 1'b0));

  logic odd_inv, even_inv;

  // wire DATA_W is even when DATA_W is even
  assign odd_inv  = (DATA_W % 2 == 1) ? z[DATA_W] : z[DATA_W+1];
  assign even_inv = (DATA_W % 2 == 1) ? z[DATA_W+1] : z[DATA_W];

  assign x = z[DATA_W-1:0] ^ (ODD_M & {DATA_W{odd_inv}}) ^ (EVEN_M & {DATA_W{even_inv}});
  assign action = inv_action_t'({odd_inv, even_inv});

endmodule
