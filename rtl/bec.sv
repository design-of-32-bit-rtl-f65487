// Binary to excess-1 converter (BEC): x = b + 1, wrapping at 2^WIDTH.
//
// Built from GDI gates as the usual BEC is drawn: the lowest output bit is
// the inverse of b0, and every higher bit is bi XORed with the AND of all
// the bits below it, the ANDs forming a chain:
//   x0 = ~b0,  xi = bi ^ (b(i-1) & ... & b0)
// For 4 bits this reproduces the whole excess-1 table (0000 -> 0001, ...,
// 1111 -> 0000). In the carry-select adder it is 5 bits wide, the 4-bit
// group sum plus its carry, and gives the result the group would have for
// a carry-in of 1. Combinational, no timing.
module bec
  import csla_pkg::*;
#(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] x
);

  // all_ones[i] = b(i-1) & ... & b0.
  logic [WIDTH-1:1] all_ones;

  gdi_gate #(.FUNC(GDI_NOT)) u_not (.a(b[0]), .b(1'b0), .c(1'b0), .y(x[0]));

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    if (i == 1) begin : g_first
      assign all_ones[1] = b[0];
    end else begin : g_chain
      gdi_gate #(.FUNC(GDI_AND)) u_and (.a(b[i-1]), .b(all_ones[i-1]), .c(1'b0),
                                        .y(all_ones[i]));
    end
    gdi_gate #(.FUNC(GDI_XOR)) u_xor (.a(b[i]), .b(all_ones[i]), .c(1'b0), .y(x[i]));
  end

endmodule
