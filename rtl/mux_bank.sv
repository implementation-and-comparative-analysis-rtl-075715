// Row of W 2:1 multiplexers with a common select.
//
//   y = sel ? d1 : d0
//
// In the carry select adder d1 is the latched carry-in = 1 result, d0 the
// live carry-in = 0 result, and sel the selection line (the carry into the
// adder). Purely combinational. The multiplexer row follows the design; its
// width W = N + 1 and the polarity of sel are this design's own choice.
module mux_bank #(
  parameter int unsigned W = ksa_pkg::KSA_WIDTH + 1
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y
);

  always_comb y = sel ? d1 : d0;

endmodule
