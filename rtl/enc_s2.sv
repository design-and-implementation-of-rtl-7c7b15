// enc_s2 -- block E of the scheme II encoder (odd or full inversion).
//
// Three rows of detectors look at each pair of neighbouring body wires: Ty (odd
// inversion saves), T2 (Type II, which full inversion removes) and T4** (stable pair
// with unequal wires, which full inversion would turn into Type II). Three Ones
// blocks count each row and Module A picks half (odd) inversion, full inversion or
// none. A fourth row of Ty detectors with a majority voter looks at the fully
// inverted flit: it is the decoder's own test, and Module A may only choose full
// inversion when it passes (this row is this design's addition). Even wires are XORed with the full-invert signal, odd wires with half OR
// full, and the inversion wire z[DATA_W] is half OR full. Structure as in the
// description; Module A's exact rule is this design's (see module_a). Combinational.
module enc_s2
  import link_code_pkg::*;
#(
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  localparam int unsigned LW = DATA_W + 1
) (
  input  logic [DATA_W-1:0] x,
  input  logic [LW-1:0]     y,
  output logic [LW-1:0]     z,
  output inv_action_t       action  // ACT_NONE, ACT_ODD (half) or ACT_FULL
);

  localparam int unsigned NP = DATA_W - 1;
  localparam int unsigned CW = $clog2(NP + 1);
  localparam logic [DATA_W-1:0] ODD_M = DATA_W'(parity_mask(DATA_W, 1'b1));

  logic [NP-1:0] ty, t2, t4, ty_full;
  logic [DATA_W-1:0] x_full;
  logic          full_ok;
  logic [CW-1:0] n_ty, n_t2, n_t4;
  logic          half_inv, full_inv;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    pair_flags_t f;
    pair_detect #(.LO_IS_ODD(i % 2 == 1)) u_det (
      .x_lo(x[i]), .x_hi(x[i+1]), .y_lo(y[i]), .y_hi(y[i+1]), .flags(f));
    assign ty[i] = f.ty;
    assign t2[i] = f.t2;
    assign t4[i] = f.t4ss;
    pair_flags_t g;
    pair_detect #(.LO_IS_ODD(i % 2 == 1)) u_det_full (
      .x_lo(x_full[i]), .x_hi(x_full[i+1]), .y_lo(y[i]), .y_hi(y[i+1]), .flags(g));
    assign ty_full[i] = g.ty;
  end

  assign x_full = ~x;
  majority_voter #(.N(NP)) u_maj_full (.in(ty_full), .major(full_ok));

  ones_count #(.N(NP)) u_cnt_ty (.in(ty), .count(n_ty));
  ones_count #(.N(NP)) u_cnt_t2 (.in(t2), .count(n_t2));
  ones_count #(.N(NP)) u_cnt_t4 (.in(t4), .count(n_t4));

  module_a #(.NP(NP)) u_mod_a (
    .n_ty(n_ty), .n_t2(n_t2), .n_t4(n_t4), .full_ok(full_ok), .half_inv(half_inv), .full_inv(full_inv));

  assign z = {half_inv | full_inv,
              x ^ ({DATA_W{full_inv}} | (ODD_M & {DATA_W{half_inv}}))};
  assign action = full_inv ? ACT_FULL : (half_inv ? ACT_ODD : ACT_NONE);

endmodule
