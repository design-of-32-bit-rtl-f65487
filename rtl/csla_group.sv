// One carry-select group: Brent-Kung adder, BEC and 2:1 multiplexers.
//
// The group adds its slices of A and B in a Brent-Kung adder with the
// carry-in tied to 0, giving a GROUP-bit sum and a carry, GROUP+1 bits in
// all. A (GROUP+1)-bit binary-to-excess-1 converter adds one to that
// result, which is exactly what the group would give for a carry-in of 1,
// without a second adder. When the carry from the group below arrives on
// sel, GROUP+1 multiplexers pick the carry-0 result (sel = 0) or the BEC
// result (sel = 1); the picked carry goes on to the next group. The only
// path from sel to the outputs is one multiplexer, which is the point of
// the structure.
//
// Ports: a, b slices, sel incoming carry; sum, cout selected results.
// Combinational, no timing.
module csla_group
  import csla_pkg::*;
#(
  parameter int GROUP = 4
) (
  input  logic [GROUP-1:0] a,
  input  logic [GROUP-1:0] b,
  input  logic             sel,
  output logic [GROUP-1:0] sum,
  output logic             cout
);

  logic [GROUP:0] r0;   // {carry, sum} for carry-in 0
  logic [GROUP:0] r1;   // {carry, sum} for carry-in 1

  bk_adder #(.WIDTH(GROUP)) u_bk (
    .a(a), .b(b), .cin(1'b0), .sum(r0[GROUP-1:0]), .cout(r0[GROUP])
  );

  bec #(.WIDTH(GROUP + 1)) u_bec (.b(r0), .x(r1));

  mux2x1 #(.WIDTH(GROUP + 1)) u_mux (.a(r0), .b(r1), .s(sel), .y({cout, sum}));

endmodule
