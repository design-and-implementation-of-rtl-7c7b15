// link_code_pkg -- types and functions shared by the low-power link encoders.
//
// A network-on-chip link is a bundle of parallel wires. Between two consecutive flits
// every pair of neighbouring wires makes one of four transition types:
//   Type I   : exactly one of the two wires toggles
//   Type II  : both toggle in opposite directions (01->10, 10->01)
//   Type III : both toggle in the same direction (00->11, 11->00)
//   Type IV  : neither toggles
// The coupling energy of a pair is weighted 1 for Type I, 2 for Type II and 0 for
// Types III and IV; the encoders pick the inversion of the flit that lowers the sum
// of these weights over the pairs. The four types, the weights 1 and 2, and the
// action codes odd=10, even=01, full=11, none=00 follow the design description;
// ignoring the self (wire-to-ground) energy in the decision is this design's reading
// of it, since the description counts coupling transitions only.
//
// Wire numbering: wire 0 is the least significant bit. "Odd" wires are 1, 3, 5, ...
// "even" wires are 0, 2, 4, ...
package link_code_pkg;

  // Width of the flit body on the link (8 bits in the reference design).
  parameter int unsigned DEFAULT_DATA_W = 8;

  typedef enum logic [1:0] {
    TR_IV  = 2'd0,   // no toggle
    TR_I   = 2'd1,   // one wire toggles
    TR_II  = 2'd2,   // opposite toggles
    TR_III = 2'd3    // same-direction toggles
  } trans_t;

  // Inversion action of an encoder, coded as {odd_invert, even_invert}.
  typedef enum logic [1:0] {
    ACT_NONE = 2'b00,
    ACT_EVEN = 2'b01,
    ACT_ODD  = 2'b10,
    ACT_FULL = 2'b11
  } inv_action_t;

  // Outputs of the detectors of one wire pair.
  typedef struct packed {
    logic ty;    // inverting the odd wire of the pair lowers its coupling weight
    logic te;    // inverting the even wire of the pair lowers its coupling weight
    logic t2;    // Type II: inverting both wires removes its weight of 2
    logic t4ss;  // Type IV with unequal wires (01->01, 10->10): full inversion makes it Type II
  } pair_flags_t;

  // Transition type of a pair, from its previous (p_*) and current (c_*) values.
  function automatic trans_t pair_type(logic p_lo, logic p_hi, logic c_lo, logic c_hi);
    logic tog_lo, tog_hi;
    tog_lo = p_lo ^ c_lo;
    tog_hi = p_hi ^ c_hi;
    if (!tog_lo && !tog_hi) return TR_IV;
    if (tog_lo ^ tog_hi)    return TR_I;
    if (c_lo != c_hi)       return TR_II;
    return TR_III;
  endfunction

  function automatic logic [1:0] coupling_weight(trans_t t);
    case (t)
      TR_I:    return 2'd1;
      TR_II:   return 2'd2;
      default: return 2'd0;
    endcase
  endfunction

  // Mask with a 1 on every wire of the given parity, for a bus of width n (n <= 64).
  function automatic logic [63:0] parity_mask(int unsigned n, bit odd);
    logic [63:0] m;
    m = '0;
    for (int unsigned i = 0; i < n; i++) m[i] = (i[0] == odd);
    return m;
  endfunction

endpackage
