// 2:1 multiplexer, Y = A & ~S | B & S, one GDI cell per bit.
//
// The GDI MUX needs a single cell: S on the common gate, A on the PMOS
// input (passed while S = 0) and B on the NMOS input (passed while S = 1).
// WIDTH copies share one select, which is how the carry-select adder picks
// a whole group result at once. The enable input that a block symbol of the
// multiplexer shows is not part of the multiplexer's equation or schematic
// and is left out. Combinational, no timing.
module mux2x1
  import csla_pkg::*;
#(
  parameter int WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,   // chosen when s = 0
  input  logic [WIDTH-1:0] b,   // chosen when s = 1
  input  logic             s,
  output logic [WIDTH-1:0] y
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gdi_gate #(.FUNC(GDI_MUX)) u_mux (.a(s), .b(a[i]), .c(b[i]), .y(y[i]));
  end

endmodule
