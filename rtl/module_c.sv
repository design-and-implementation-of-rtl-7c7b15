// module_c -- decision logic of the scheme III encoder ("Module C").
//
// Inputs are the counts of the four Ones blocks over the NP body wire pairs:
// n_ty (odd-wire inversion saves), n_te (even-wire inversion saves), n_t2 (Type II)
// and n_t4 (T4**). Gains in coupling weight:
//   odd  go = 2*n_ty - NP,  even ge = 2*n_te - NP,  full gf = 2*(n_t2 - n_t4)
// The output is the action with the largest positive gain, coded {odd, even}:
// 10 odd, 01 even, 11 full, 00 none, as in the description. Ties are broken in the
// order odd, even, full (this design's choice). Combinational.
module module_c
  import link_code_pkg::*;
#(
  parameter int unsigned NP = 7,
  localparam int unsigned CW = $clog2(NP + 1)
) (
  input  logic [CW-1:0] n_ty,
  input  logic [CW-1:0] n_te,
  input  logic [CW-1:0] n_t2,
  input  logic [CW-1:0] n_t4,
  output inv_action_t   action
);

  int go, ge, gf, best;

  always_comb begin
    go     = 2 * int'(n_ty) - int'(NP);
    ge     = 2 * int'(n_te) - int'(NP);
    gf     = 2 * (int'(n_t2) - int'(n_t4));
    best   = 0;
    action = ACT_NONE;
    if (go > best) begin best = go; action = ACT_ODD;  end
    if (ge > best) begin best = ge; action = ACT_EVEN; end
    if (gf > best) begin best = gf; action = ACT_FULL; end
  end

endmodule
