// Bank of W level-sensitive D-latches sharing one enable.
//
// While en is 1 every latch is transparent (q follows d); when en falls the
// value present at that moment is held until en rises again. In the carry
// select adder en is the enable clock: the latches take the carry-in = 1
// result of the Kogge-Stone adder while en = 1 and keep it through en = 0.
// There is no reset: the latches are meaningful only after the first en = 1
// phase. Latches rather than flip-flops follow the design, which replaces
// the second ripple adder of a classic carry select adder with a row of
// D-latches clocked by the enable; the latches are therefore intended.
// Using W = N + 1 (sum and carry out) is this design's own choice.
module dlatch_bank #(
  parameter int unsigned W = ksa_pkg::KSA_WIDTH + 1
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_latch begin
    if (en) q = d;
  end

endmodule
