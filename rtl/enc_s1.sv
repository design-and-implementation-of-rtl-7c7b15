// enc_s1 -- block E of the scheme I encoder (odd inversion only).
//
// For each of the DATA_W-1 pairs of neighbouring body wires a Ty detector compares
// the new body x with the previous link word y and flags the pair when inverting
// its odd wire would save coupling energy. Since that inversion changes every pair
// by exactly one unit, it pays off when more than half of the pairs are flagged:
// a majority voter takes that decision. The odd body wires (1, 3, 5, ...) are then
// XORed with the decision and the decision itself becomes the inversion wire
// z[DATA_W] (the flit's inv bit, 0 before encoding). Even wires pass unchanged.
// Structure as in the description; the inv wire's own pair is left out of the vote
// (this design's choice, see the README). Purely combinational.
module enc_s1
  import link_code_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned LW = DATA_W + 1
) (
  input  logic [DATA_W-1:0] x,      // body of the flit to send
  input  logic [LW-1:0]     y,      // previous word sent on the link
  output logic [LW-1:0]     z,      // encoded word, z[DATA_W] = inv
  output inv_action_t       action  // ACT_ODD or ACT_NONE
);

  localparam int unsigned NP = DATA_W - 1;
  localparam logic [DATA_W-1:0] ODD_M = DATA_W'(parity_mask(DATA_W, 1'b1));

  logic [NP-1:0] ty;
  logic          inv;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    pair_flags_t f;
    pair_detect #(.LO_IS_ODD(i % 2 == 1)) u_det (
      .x_lo(x[i]), .x_hi(x[i+1]), .y_lo(y[i]), .y_hi(y[i+1]), .flags(f));
    assign ty[i] = f.ty;
  end

  majority_voter #(.N(NP)) u_maj (.in(ty), .major(inv));

  assign z      = {inv, x ^ (ODD_M & {DATA_W{inv}})};
  assign action = inv ? ACT_ODD : ACT_NONE;

endmodule
