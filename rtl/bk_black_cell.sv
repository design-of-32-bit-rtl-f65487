// Black cell of the Brent-Kung prefix tree.
//
// Merges the generate/propagate pair of an upper span (i:k) with that of
// the adjacent lower span (k-1:j) into the pair of the whole span (i:j):
//   G(i:j) = G(i:k) | P(i:k) & G(k-1:j)
//   P(i:j) = P(i:k) & P(k-1:j)
// built, as the cell is described, from two AND gates and one OR gate, each
// a GDI gate. Combinational, no timing.
module bk_black_cell
  import csla_pkg::*;
(
  input  gp_t hi,
  input  gp_t lo,
  output gp_t out
);

  logic pg;

  gdi_gate #(.FUNC(GDI_AND)) u_and_g (.a(hi.p), .b(lo.g), .c(1'b0), .y(pg));
  gdi_gate #(.FUNC(GDI_OR))  u_or_g  (.a(hi.g), .b(pg),   .c(1'b0), .y(out.g));
  gdi_gate #(.FUNC(GDI_AND)) u_and_p (.a(hi.p), .b(lo.p), .c(1'b0), .y(out.p));

endmodule
