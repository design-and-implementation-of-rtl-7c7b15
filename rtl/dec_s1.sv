// dec_s1 -- block D of the scheme I decoder.
//
// The encoder only ever inverts the odd body wires, and says so on the inversion
// wire z[DATA_W]. The decoder therefore XORs the odd wires with that bit and drops
// it, as the description states. Combinational.
module dec_s1
  import link_code_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned LW = DATA_W + 1
) (
  input  logic [LW-1:0]     z,       // received link word
  output logic [DATA_W-1:0] x,       // recovered body
  output inv_action_t       action   // action the encoder took
);

  localparam logic [DATA_W-1:0] ODD_M = DATA_W'(parity_mask(DATA_W, 1'b1));

  assign x      = z[DATA_W-1:0] ^ (ODD_M & {DATA_W{z[DATA_W]}});
  assign action = z[DATA_W] ? ACT_ODD : ACT_NONE;

endmodule
