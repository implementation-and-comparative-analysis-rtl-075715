// Carry select adder built from one Kogge-Stone adder and a row of latches.
//
// A classic carry select adder computes a + b twice, with carry in 0 and 1,
// in two adders and picks one result with the real carry in. Here one N-bit
// Kogge-Stone adder does both jobs one after the other: its carry in is the
// enable clock en. While en = 1 it adds with cin = 1 and the D-latch bank,
// transparent, takes that result; when en falls the latches hold it and the
// adder recomputes with cin = 0. A row of 2:1 multiplexers then gives
//   {cout, sum} = sel ? latched (a + b + 1) : live (a + b).
//
// Interface: a, b operands; en the enable clock; sel the selection line
// (the carry in of the whole adder); sum, cout the result.
// Timing: a and b must be stable for one full en period, high phase first.
// The result is valid during the en = 0 phase that follows; during en = 1
// both multiplexer inputs carry the cin = 1 result. The scheme (adder carry
// in = latch enable = clock, latches for the cin = 1 result, multiplexer row
// for the choice) follows the design; latching the carry out as well as the
// sum bits, and sel = 1 choosing the latched value, are this design's own
// choices. The latches are intended (see dlatch_bank).
module csa_ksa
  import ksa_pkg::*;
#(
  parameter int unsigned N = KSA_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         en,
  input  logic         sel,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] ksa_sum;
  logic         ksa_cout;
  logic [N:0]   held;   // cin = 1 result kept by the latches
  logic [N:0]   chosen;

  ksa #(.N(N)) u_ksa (
    .a(a), .b(b), .cin(en), .sum(ksa_sum), .cout(ksa_cout)
  );

  dlatch_bank #(.W(N + 1)) u_latch (
    .en(en), .d({ksa_cout, ksa_sum}), .q(held)
  );

  mux_bank #(.W(N + 1)) u_mux (
    .sel(sel), .d0({ksa_cout, ksa_sum}), .d1(held), .y(chosen)
  );

  assign {cout, sum} = chosen;

endmodule
