// Final processing stage of the Brent-Kung adder.
//
// Each sum bit is the propagate of its bit XORed with the carry into it:
//   S0 = Cin ^ P0,  Si = C(i-1) ^ Pi
// where c[i] is the carry out of bit i from the prefix carry stage. One
// GDI XOR gate per bit. Combinational, no timing.
module bk_final_sum
  import csla_pkg::*;
#(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,
  input  logic             cin,
  output logic [WIDTH-1:0] sum
);

  logic [WIDTH-1:0] c_into;

  // Carry into bit i.
  assign c_into = {c[WIDTH-2:0], cin};

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    gdi_gate #(.FUNC(GDI_XOR)) u_x (.a(c_into[i]), .b(p[i]), .c(1'b0), .y(sum[i]));
  end

endmodule
