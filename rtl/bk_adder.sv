// Brent-Kung parallel-prefix adder with carry-in.
//
// Three stages, as in the Brent-Kung cell of the adder: the initial
// processing stage forms Gi = ai & bi and Pi = ai ^ bi; the prefix carry
// stage combines them with black and gray cells into the carry out of every
// bit; the final processing stage XORs each propagate with the carry into
// its bit. Every gate is a GDI gate. WIDTH defaults to 4, the size used in
// each carry-select group; any power of two from 2 up works.
//
// Ports: a, b addends, cin carry-in; sum and cout (carry out of the top
// bit, C3 for 4 bits). Combinational, no timing.
module bk_adder
  import csla_pkg::*;
#(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  gp_t  [WIDTH-1:0] gp;
  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] c;

  bk_pg_unit #(.WIDTH(WIDTH)) u_pg (.a(a), .b(b), .gp(gp));

  bk_prefix_carry #(.WIDTH(WIDTH)) u_prefix (.gp(gp), .cin(cin), .c(c));

  for (genvar i = 0; i < WIDTH; i++) begin : g_p
    assign p[i] = gp[i].p;
  end

  bk_final_sum #(.WIDTH(WIDTH)) u_sum (.p(p), .c(c), .cin(cin), .sum(sum));

  assign cout = c[WIDTH-1];

endmodule
