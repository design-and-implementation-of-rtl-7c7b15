// module_a -- decision logic of the scheme II encoder ("Module A").
//
// Inputs are the counts of the three Ones blocks over the NP body wire pairs:
// n_ty (pairs whose odd-wire inversion saves coupling), n_t2 (Type II pairs) and
// n_t4 (T4** pairs). With coupling weights 1 (Type I) and 2 (Type II):
//   gain of odd ("half") inversion  go = 2*n_ty - NP   (every pair changes by +-1)
//   gain of full inversion          gf = 2*(n_t2 - n_t4)
// The action with the larger positive gain is taken; a tie goes to the half
// inversion, and no gain above zero gives no inversion (both outputs 0).
// Full inversion is further allowed only when full_ok is high: the Ty majority
// taken on the fully inverted flit, i.e. the very test the decoder will run on the
// received word. A half inversion always leaves a minority there, so the decoder
// can always tell the two apart; this condition is this design's, chosen so that
// decoding is always exact with the single inversion bit.
// Combinational, built from adders and comparators as the description suggests.
module module_a #(
  parameter int unsigned NP = 7,
  localparam int unsigned CW = $clog2(NP + 1)
) (
  input  logic [CW-1:0] n_ty,
  input  logic [CW-1:0] n_t2,
  input  logic [CW-1:0] n_t4,
  input  logic          full_ok,   // decoder would recognise a full inversion
  output logic          half_inv,
  output logic          full_inv
);

  int go, gf;

  always_comb begin
    go       = 2 * int'(n_ty) - int'(NP);
    gf       = 2 * (int'(n_t2) - int'(n_t4));
    full_inv = full_ok && (gf > 0) && (gf > go);
    half_inv = !full_inv && (go > 0);
  end

endmodule
