// link_ref_pkg -- reference model of the link codes, for the testbenches only.
//
// Works on link words of up to 16 wires held in plain ints. The coupling cost of a
// pair of neighbouring wires is computed from the voltage steps of the two wires,
// |dv_i - dv_{i+1}| with dv in {-1, 0, +1}: one wire moving costs 1, opposite moves
// cost 2, same-direction moves and no move cost 0. Only the np pairs of the body
// (wires 0..np) are counted, matching the encoders. The encoders are modelled by
// trying every allowed inversion and keeping the cheapest.
package link_ref_pkg;

  function automatic int bitv(int v, int i);
    return (v >> i) & 1;
  endfunction

  function automatic int pair_cost(int prev, int cur, int i);
    int d0, d1, d;
    d0 = bitv(cur, i)   - bitv(prev, i);
    d1 = bitv(cur, i+1) - bitv(prev, i+1);
    d  = d0 - d1;
    return (d < 0) ? -d : d;
  endfunction

  function automatic int cost(int prev, int cur, int np);
    int s = 0;
    for (int i = 0; i < np; i++) s += pair_cost(prev, cur, i);
    return s;
  endfunction

  function automatic int odd_mask(int n);
    int m = 0;
    for (int i = 1; i < n; i += 2) m |= (1 << i);
    return m;
  endfunction

  function automatic int even_mask(int n);
    int m = 0;
    for (int i = 0; i < n; i += 2) m |= (1 << i);
    return m;
  endfunction

  // Per-pair counts used by the scheme II rule.
  function automatic int n_odd_saving(int prev, int cur, int np);
    int s = 0;
    int f = cur ^ odd_mask(np + 1);
    for (int i = 0; i < np; i++) s += (pair_cost(prev, f, i) < pair_cost(prev, cur, i));
    return s;
  endfunction

  function automatic int n_even_saving(int prev, int cur, int np);
    int s = 0;
    int f = cur ^ even_mask(np + 1);
    for (int i = 0; i < np; i++) s += (pair_cost(prev, f, i) < pair_cost(prev, cur, i));
    return s;
  endfunction

  function automatic int n_type2(int prev, int cur, int np);
    int s = 0;
    for (int i = 0; i < np; i++) s += (pair_cost(prev, cur, i) == 2);
    return s;
  endfunction

  function automatic int n_type4ss(int prev, int cur, int np);
    int s = 0;
    for (int i = 0; i < np; i++)
      s += (bitv(prev, i) == bitv(cur, i)) && (bitv(prev, i+1) == bitv(cur, i+1)) &&
           (bitv(cur, i) != bitv(cur, i+1));
    return s;
  endfunction

  // Scheme I: returns the link word (dw body bits + inv at bit dw).
  function automatic int enc1(int x, int y, int dw);
    int np = dw - 1;
    int xo = x ^ odd_mask(dw);
    if (cost(y, xo, np) < cost(y, x, np)) return xo | (1 << dw);
    return x;
  endfunction

  // Scheme II.
  function automatic int enc2(int x, int y, int dw);
    int np = dw - 1;
    int all = (1 << dw) - 1;
    int c0 = cost(y, x, np);
    int go = c0 - cost(y, x ^ odd_mask(dw), np);
    int gf = c0 - cost(y, x ^ all, np);
    // full inversion only where the decoder's majority test will recognise it
    int ok = 2 * n_odd_saving(y, x ^ all, np) > np;
    if (ok && gf > 0 && gf > go) return (x ^ all) | (1 << dw);
    if (go > 0) return (x ^ odd_mask(dw)) | (1 << dw);
    return x;
  endfunction

  // Scheme III: two inversion wires at dw and dw+1; the odd one of them marks odd
  // inversion, the even one even inversion.
  function automatic int enc3(int x, int y, int dw);
    int np = dw - 1;
    int lw = dw + 2;
    int c0 = cost(y, x, np);
    int best = 0;
    int r = x;
    int cand[3];
    cand[0] = x ^ odd_mask(lw);
    cand[1] = x ^ even_mask(lw);
    cand[2] = x ^ odd_mask(lw) ^ even_mask(lw);
    for (int k = 0; k < 3; k++)
      if (c0 - cost(y, cand[k], np) > best) begin
        best = c0 - cost(y, cand[k], np);
        r = cand[k];
      end
    return r;
  endfunction

endpackage
