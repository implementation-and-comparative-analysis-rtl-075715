// N-bit Kogge-Stone parallel prefix adder with carry in.
//
// The addition runs in three steps:
//  1. Pre-processing: one pg_cell per bit forms P_i = a_i xor b_i and
//     G_i = a_i . b_i. The carry in is folded into bit 0 by one extra
//     carry_gen_cell, so that G_0 becomes a_0 b_0 + P_0 cin.
//  2. Prefix: ceil(log2 N) levels of carry_gen_cells. At level l a bit i
//     with i >= 2^l merges its group with the group 2^l bits below it; bits
//     below 2^l pass their pair on unchanged. After the last level G[i] is
//     the carry out of bit i (C_i = G[i:0]). For N = 8 that is three levels
//     with spans 1, 2 and 4, every cell driving at most two others.
//  3. Post-processing: S_i = P_i xor C_(i-1), with C_(-1) = cin; the final
//     carry C_out is C_(N-1).
//
// Interface: a, b, cin in; sum, cout out. Purely combinational, logic depth
// 1 + 1 + log2(N) + 1 cells. The three-step structure, the equations and the
// 8-bit width follow the design; folding cin into bit 0 is this design's own
// choice, since the original does not show where cin enters the tree.
module ksa
  import ksa_pkg::*;
#(
  parameter int unsigned N = KSA_WIDTH
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned L = prefix_levels(N);

  // bit propagate / generate from the pre-processing cells
  logic [N-1:0] p_bit, g_bit;
  // (G, P) at the input of each prefix level; level L is the tree output
  logic [N-1:0] g_lvl [L+1];
  logic [N-1:0] p_lvl [L+1];
  // carry out of each bit
  logic [N-1:0] c;
  // carry into each bit: {C_(N-2) .. C_0, cin}
  logic [N:0]   c_in;

  // ---- pre-processing ----
  for (genvar i = 0; i < N; i++) begin : g_pre
    pg_cell u_pg (.a(a[i]), .b(b[i]), .pro(p_bit[i]), .gen(g_bit[i]));
  end

  // carry in folded into bit 0: (G_0, P_0) o (cin, 0)
  carry_gen_cell u_cin (
    .p_hi(p_bit[0]), .g_hi(g_bit[0]),
    .p_lo(1'b0),     .g_lo(cin),
    .pro (p_lvl[0][0]), .gen(g_lvl[0][0])
  );

  if (N > 1) begin : g_lvl0
    assign g_lvl[0][N-1:1] = g_bit[N-1:1];
    assign p_lvl[0][N-1:1] = p_bit[N-1:1];
  end

  // ---- prefix tree ----
  for (genvar l = 0; l < L; l++) begin : g_prefix
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_bit_node
      if (i >= D) begin : g_cell
        carry_gen_cell u_cg (
          .p_hi(p_lvl[l][i]),   .g_hi(g_lvl[l][i]),
          .p_lo(p_lvl[l][i-D]), .g_lo(g_lvl[l][i-D]),
          .pro (p_lvl[l+1][i]), .gen (g_lvl[l+1][i])
        );
      end else begin : g_pass
        assign p_lvl[l+1][i] = p_lvl[l][i];
        assign g_lvl[l+1][i] = g_lvl[l][i];
      end
    end
  end

  assign c    = g_lvl[L];
  assign c_in = {c, cin};

  // ---- post-processing ----
  always_comb begin
    sum  = p_bit ^ c_in[N-1:0];
    cout = c_in[N];
  end

endmodule
