// Shared types of the FS-GDI carry-select adder.
//
// gdi_func_t names the logic functions a single Gate Diffusion Input cell
// can realise by the choice of what is tied to its N, P and G terminals
// (the rows of the GDI function table). gp_t is the generate/propagate pair
// that travels through the Brent-Kung prefix tree. Nothing here has timing;
// the whole adder is combinational.
package csla_pkg;

  // Functions of one GDI cell, with G = A:
  //   GDI_F1  : N=0,  P=B,  out = ~A & B
  //   GDI_F2  : N=B,  P=1,  out = ~A | B
  //   GDI_OR  : N=1,  P=B,  out =  A | B
  //   GDI_AND : N=B,  P=0,  out =  A & B
  //   GDI_XOR : N=~B, P=B,  out =  A ^ B   (~B from a GDI inverter)
  //   GDI_MUX : N=C,  P=B,  out = ~A & B | A & C
  //   GDI_NOT : N=0,  P=1,  out = ~A
  typedef enum logic [2:0] {
    GDI_F1,
    GDI_F2,
    GDI_OR,
    GDI_AND,
    GDI_XOR,
    GDI_MUX,
    GDI_NOT
  } gdi_func_t;

  // Group generate and propagate of a span of bits.
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

endpackage
