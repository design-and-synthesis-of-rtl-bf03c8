// mlg_prefix_cell: generate/propagate combining cell of the prefix adder,
// made of majority gates.
//
// Merges a high group (g_hi, p_hi) with the adjacent lower group
// (g_lo, p_lo):
//   g = g_hi | (p_hi & g_lo) = M(g_hi, M(p_hi, g_lo, 0), 1)
//   p = p_hi & p_lo          = M(p_hi, p_lo, 0)
// using that a majority gate with one input at 0 is an AND and with one
// input at 1 is an OR. Purely combinational.
module mlg_prefix_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g,
  output logic p
);

  logic pg;

  mlg_maj3 u_and_pg (.a(p_hi), .b(g_lo), .c(1'b0), .y(pg));
  mlg_maj3 u_or_g   (.a(g_hi), .b(pg),   .c(1'b1), .y(g));
  mlg_maj3 u_and_p  (.a(p_hi), .b(p_lo), .c(1'b0), .y(p));

endmodule
