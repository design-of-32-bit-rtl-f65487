// Basic Gate Diffusion Input (GDI) cell, at logic level.
//
// The cell is one PMOS and one NMOS transistor with a shared gate G and a
// shared drain Out; the PMOS source is the P terminal and the NMOS source
// the N terminal. With G low the PMOS conducts and Out follows P; with G
// high the NMOS conducts and Out follows N. Logically the cell is therefore
// a 2:1 multiplexer steered by G, and every function of the GDI table
// comes from tying N and P to inputs or to the rails.
//
// Plain GDI loses part of the output swing to threshold drops; the
// full-swing variant adds a restoring buffer. Both are analog effects: this
// model assumes full logic levels everywhere. Combinational, no timing.
module gdi_cell (
  input  logic g,    // common gate
  input  logic p,    // PMOS diffusion input, passed when g = 0
  input  logic n,    // NMOS diffusion input, passed when g = 1
  output logic out
);

  always_comb begin
    if (g) out = n;
    else   out = p;
  end

endmodule
