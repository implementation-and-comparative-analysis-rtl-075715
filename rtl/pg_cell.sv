// Propagate and generate cell: the pre-processing step of the Kogge-Stone
// adder for one bit pair.
//
//   pro = a xor b   (bit propagate P_i)
//   gen = a and b   (bit generate  G_i)
//
// Purely combinational; outputs follow the inputs after the gate delay. The
// two equations and the port names pro/gen follow the design; in the original
// the cell is built from dual-rail adiabatic gates, here it is plain logic
// with the same Boolean function.
module pg_cell (
  input  logic a,
  input  logic b,
  output logic pro,
  output logic gen
);

  always_comb begin
    pro = a ^ b;
    gen = a & b;
  end

endmodule
