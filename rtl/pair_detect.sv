// pair_detect -- transition-type detectors (Ty, Te, T2, T4**) of one pair of
// neighbouring link wires.
//
// The pair is wires i (lo) and i+1 (hi). x_* is the current, not yet inverted flit,
// y_* the previous flit as it was sent on the link. Outputs, all combinational:
//   ty   - Ty block: the pair is Type II, or Type I of the kinds T1* / T1** whose
//          inversion of the odd wire removes the coupling event (Table 1 of the
//          design description); inverting the odd wire always changes the weight by
//          exactly one, so ty says the change is a saving.
//   te   - Te block: the same for inverting the even wire (even inversion, Table 2).
//   t2   - T2 block: the pair is Type II.
//   t4ss - T4** block: the pair is Type IV with unequal wires (01->01 or 10->10);
//          a full inversion would turn it into Type II.
// Which wire of the pair is odd depends on i and is set by LO_IS_ODD. The detector
// names follow the description; expressing Ty and Te as "the inversion lowers the
// weight" is this design's compact form of the type lists.
module pair_detect
  import link_code_pkg::*;
#(
  parameter bit LO_IS_ODD = 1'b0   // 1 when wire i is odd (i odd)
) (
  input  logic        x_lo,
  input  logic        x_hi,
  input  logic        y_lo,
  input  logic        y_hi,
  output pair_flags_t flags
);

  trans_t     t_now, t_odd, t_even;
  logic [1:0] w_now, w_odd, w_even;

  always_comb begin
    t_now  = pair_type(y_lo, y_hi, x_lo, x_hi);
    // invert the odd wire of the pair
    t_odd  = LO_IS_ODD ? pair_type(y_lo, y_hi, ~x_lo, x_hi)
                       : pair_type(y_lo, y_hi, x_lo, ~x_hi);
    // invert the even wire of the pair
    t_even = LO_IS_ODD ? pair_type(y_lo, y_hi, x_lo, ~x_hi)
                       : pair_type(y_lo, y_hi, ~x_lo, x_hi);
    w_now  = coupling_weight(t_now);
    w_odd  = coupling_weight(t_odd);
    w_even = coupling_weight(t_even);

    flags.ty   = (w_odd < w_now);
    flags.te   = (w_even < w_now);
    flags.t2   = (t_now == TR_II);
    flags.t4ss = (t_now == TR_IV) && (x_lo != x_hi);
  end

endmodule
