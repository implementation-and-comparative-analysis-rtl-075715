// Carry generate cell: one node of the Kogge-Stone prefix tree (the "dot"
// operator). It merges the (generate, propagate) pair of an upper bit group
// with that of the group directly below it:
//
//   gen = g_hi + p_hi . g_lo   (group generate)
//   pro = p_hi . p_lo          (group propagate)
//
// Purely combinational. The equations and the pro/gen output names follow
// the design; the original builds the cell from adiabatic gates, here it is
// plain logic with the same Boolean function.
module carry_gen_cell
  import ksa_pkg::*;
(
  input  logic p_hi,
  input  logic g_hi,
  input  logic p_lo,
  input  logic g_lo,
  output logic pro,
  output logic gen
);

  gp_t r;

  always_comb begin
    r   = dot('{g: g_hi, p: p_hi}, '{g: g_lo, p: p_lo});
    pro = r.p;
    gen = r.g;
  end

endmodule
