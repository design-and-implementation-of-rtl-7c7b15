// enc_s3 -- block E of the scheme III encoder (odd, even or full inversion).
//
// Four rows of detectors per pair of neighbouring body wires (Ty, Te, T2, T4**),
// four Ones blocks and Module C, which returns {odd_invert, even_invert}. The link
// is DATA_W+2 wires: the body, then two inversion wires that enter as 0. Odd
// inversion flips every odd wire and even inversion every even wire, the two
// inversion wires included, so of the two inversion wires the odd one ends up
// carrying odd_invert and the even one even_invert; full inversion sets both.
// Two inversion wires follow the encoder drawing of the description (X_{w-1} = 0,
// X_w = 0); leaving their own pair out of the cost is this design's choice.
// Combinational.
module enc_s3
  import link_code_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned LW = DATA_W + 2
) (
  input  logic [DATA_W-1:0] x,
  input  logic [LW-1:0]     y,
  output logic [LW-1:0]     z,
  output inv_action_t       action
);

  localparam int unsigned NP = DATA_W - 1;
  localparam int unsigned CW = $clog2(NP + 1);
  localparam logic [LW-1:0] ODD_M  = LW'(parity_mask(LW, 1'b1));
  localparam logic [LW-1:0] EVEN_M = LW'(parity_mask(LW, 1'b0));

  logic [NP-1:0] ty, te, t2, t4;
  logic [CW-1:0] n_ty, n_te, n_t2, n_t4;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    pair_flags_t f;
    pair_detect #(.LO_IS_ODD(i % 2 == 1)) u_det (
      .x_lo(x[i]), .x_hi(x[i+1]), .y_lo(y[i]), .y_hi(y[i+1]), .flags(f));
    assign ty[i] = f.ty;
    assign te[i] = f.te;
    assign t2[i] = f.t2;
    assign t4[i] = f.t4ss;
  end

  ones_count #(.N(NP)) u_cnt_ty (.in(ty), .count(n_ty));
  ones_count #(.N(NP)) u_cnt_te (.in(te), .count(n_te));
  ones_count #(.N(NP)) u_cnt_t2 (.in(t2), .count(n_t2));
  ones_count #(.N(NP)) u_cnt_t4 (.in(t4), .count(n_t4));

  module_c #(.NP(NP)) u_mod_c (
    .n_ty(n_ty), .n_te(n_te), .n_t2(n_t2), .n_t4(n_t4), .action(action));

  assign z = {2'b00, x} ^ (ODD_M & {LW{action[1]}}) ^ (EVEN_M & {LW{action[0]}});

endmodule
