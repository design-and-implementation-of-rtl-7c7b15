// dec_s2 -- block D of the scheme II decoder.
//
// The single inversion wire z[DATA_W] says whether the body was inverted, not how.
// The decoder runs Ty detectors on the received word z against the previous
// received word r and a majority voter over them. A half inversion always leaves a
// minority of flagged pairs (it turns every saving pair into a costly one and back),
// and the encoder only uses full inversion when it leaves a majority, so:
//   voter 0 and inv 1 -> half inversion: invert the odd wires back
//   voter 1 and inv 1 -> full inversion: invert every body wire back
// Structure (Ty row, majority voter, inverter and two AND gates, XOR row) as in the
// description. Combinational.
module dec_s2
  import link_code_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned LW = DATA_W + 1
) (
  input  logic [LW-1:0]     z,       // received link word
  input  logic [LW-1:0]     r,       // previous received link word
  output logic [DATA_W-1:0] x,
  output inv_action_t       action
);

  localparam int unsigned NP = DATA_W - 1;
  localparam logic [DATA_W-1:0] ODD_M = DATA_W'(parity_mask(DATA_W, 1'b1));

  logic [NP-1:0] ty;
  logic          major, half_inv, full_inv;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    pair_flags_t f;
    pair_detect #(.LO_IS_ODD(i % 2 == 1)) u_det (
      .x_lo(z[i]), .x_hi(z[i+1]), .y_lo(r[i]), .y_hi(r[i+1]), .flags(f));
    assign ty[i] = f.ty;
  end

  majority_voter #(.N(NP)) u_maj (.in(ty), .major(major));

  assign half_inv = z[DATA_W] & ~major;
  assign full_inv = z[DATA_W] &  major;
  assign x = z[DATA_W-1:0] ^ ({DATA_W{full_inv}} | (ODD_M & {DATA_W{half_inv}}));
  assign action = full_inv ? ACT_FULL : (half_inv ? ACT_ODD : ACT_NONE);

endmodule
