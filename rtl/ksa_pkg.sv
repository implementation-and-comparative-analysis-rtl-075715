// Shared constants and types of the Kogge-Stone carry select adder.
//
// KSA_WIDTH is the operand width of the adder (8 bits, as in the design this
// RTL follows). gp_t is one (generate, propagate) pair, the value that the
// Kogge-Stone prefix tree moves between its levels; dot() is the prefix
// ("dot") operator that merges an upper group with the group just below it:
//   (G, P) = (G_hi + P_hi . G_lo, P_hi . P_lo).
package ksa_pkg;

  parameter int unsigned KSA_WIDTH = 8;

  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate
  } gp_t;

  function automatic gp_t dot(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  // Number of prefix levels of an n-bit Kogge-Stone tree: ceil(log2(n)).
  function automatic int unsigned prefix_levels(int unsigned n);
    return (n <= 1) ? 0 : $clog2(n);
  endfunction

endpackage
