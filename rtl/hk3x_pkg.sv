// hk3x_pkg: types and operators shared by the H/K based 3X generators.
//
// The 3X = 2X + X addition is carried by two carry-like signals, H and K.
// Over groups of four input bits each signal has a generate/propagate pair:
//   H_{4j+2} = gh_j + ph_j * H_{4j-2}          (an ordinary carry recurrence)
//   K_{4j+2} = gk_j * (pk_j + K_{4j-2})        (its AND/OR dual)
// hk_gp_t holds one such pair. hk_op_h and hk_op_k combine two adjacent spans
// (left = more significant) into one, which is what both the look-ahead
// units and the prefix trees build on. Both operators are associative.
// Purely combinational; nothing here is clocked.
package hk3x_pkg;

  typedef struct packed {
    logic g;   // group generate
    logic p;   // group propagate
  } hk_gp_t;

  // H span operator: (g, p) o (g', p') = (g + p g', p p')
  function automatic hk_gp_t hk_op_h(hk_gp_t hi, hk_gp_t lo);
    hk_gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // K span operator: (g, p) . (g', p') = (g (p + g'), p + p')
  function automatic hk_gp_t hk_op_k(hk_gp_t hi, hk_gp_t lo);
    hk_gp_t r;
    r.g = hi.g & (hi.p | lo.g);
    r.p = hi.p | lo.p;
    return r;
  endfunction

  // Number of H/K group positions 4j+2 that lie at or below bit N-2.
  function automatic int unsigned hk_groups(int unsigned n);
    return n / 4;
  endfunction

endpackage
