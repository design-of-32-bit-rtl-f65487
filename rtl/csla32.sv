// 32-bit carry-select adder (CSLA) built from Brent-Kung adders,
// binary-to-excess-1 converters and 2:1 multiplexers, every gate a Gate
// Diffusion Input (GDI) cell.
//
// The operands are cut into WIDTH/GROUP groups of GROUP bits (8 groups of
// 4 by default). Group 0 is a plain Brent-Kung adder fed by cin. Each higher
// group computes both of its possible results at once, the carry-in-0 one
// with a Brent-Kung adder and the carry-in-1 one with a BEC, and lets the
// carry of the group below select between them. The carry therefore ripples
// only through one multiplexer per group instead of through every bit.
// cout is the selected carry of the top group.
//
// Ports: a, b (WIDTH bits), cin; sum (WIDTH bits), cout. Purely
// combinational, no clock and no reset. WIDTH must be a multiple of GROUP,
// and GROUP a power of two.
module csla32
  import csla_pkg::*;
#(
  parameter int WIDTH = 32,
  parameter int GROUP = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int NGROUP = WIDTH / GROUP;

  if (WIDTH % GROUP != 0 || WIDTH < 2 * GROUP) begin : g_bad_size
    $error("csla32: WIDTH must be a multiple of GROUP and hold at least two groups");
  end

  // carry[k] is the carry out of group k.
  logic [NGROUP-1:0] carry;

  bk_adder #(.WIDTH(GROUP)) u_group0 (
    .a(a[GROUP-1:0]), .b(b[GROUP-1:0]), .cin(cin),
    .sum(sum[GROUP-1:0]), .cout(carry[0])
  );

  for (genvar k = 1; k < NGROUP; k++) begin : g_group
    csla_group #(.GROUP(GROUP)) u_group (
      .a  (a[k*GROUP +: GROUP]),
      .b  (b[k*GROUP +: GROUP]),
      .sel(carry[k-1]),
      .sum(sum[k*GROUP +: GROUP]),
      .cout(carry[k])
    );
  end

  assign cout = carry[NGROUP-1];

endmodule
