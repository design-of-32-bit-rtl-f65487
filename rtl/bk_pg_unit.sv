// Initial processing stage of the Brent-Kung adder.
//
// For every bit i it forms the generate Gi = ai & bi and the propagate
// Pi = ai ^ bi, each with one GDI gate (the AND and XOR rows of the GDI
// table). The pairs feed the prefix carry stage; the propagates are used
// again by the final processing stage. WIDTH defaults to the 4 bits of one
// carry-select group. Combinational, no timing.
module bk_pg_unit
  import csla_pkg::*;
#(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output gp_t  [WIDTH-1:0] gp
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gdi_gate #(.FUNC(GDI_AND)) u_g (.a(a[i]), .b(b[i]), .c(1'b0), .y(gp[i].g));
    gdi_gate #(.FUNC(GDI_XOR)) u_p (.a(a[i]), .b(b[i]), .c(1'b0), .y(gp[i].p));
  end

endmodule
