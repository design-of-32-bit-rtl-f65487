// Gray cell of the Brent-Kung prefix tree.
//
// Produces only the group generate of a span whose lower part already
// reaches the carry-in, i.e. a carry:  G = G(hi) | P(hi) & G(lo).
// One AND and one OR GDI gate, as the cell is described. Combinational,
// no timing.
module bk_gray_cell
  import csla_pkg::*;
(
  input  gp_t  hi,     // (G,P) of the upper span
  input  logic g_lo,   // generate of the lower span, a carry
  output logic g
);

  logic pg;

  gdi_gate #(.FUNC(GDI_AND)) u_and (.a(hi.p), .b(g_lo), .c(1'b0), .y(pg));
  gdi_gate #(.FUNC(GDI_OR))  u_or  (.a(hi.g), .b(pg),   .c(1'b0), .y(g));

endmodule
