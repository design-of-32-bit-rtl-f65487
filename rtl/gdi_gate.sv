// One logic gate built from GDI cells, selected by the FUNC parameter.
//
// Each function of the GDI table is a GDI cell whose G terminal takes input
// A and whose N and P terminals are tied to B, C or a rail (see gdi_func_t
// in csla_pkg for the wiring of each row). XOR needs the inverse of B on N;
// that inverse comes from a second GDI cell wired as an inverter (N = 0,
// P = 1, G = B), the usual two-cell GDI XOR. The function table prints the
// XOR row as N = B, P = B, which would only pass B; the inverter form is
// what is built here.
//
// Ports: a, b, c inputs (c is used only by GDI_MUX), y output.
// Combinational, no timing.
module gdi_gate
  import csla_pkg::*;
#(
  parameter gdi_func_t FUNC = GDI_AND
) (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  logic n_in, p_in;

  generate
    if (FUNC == GDI_XOR) begin : g_xor
      logic b_n;
      // GDI inverter: G = B, N = 0, P = 1.
      gdi_cell u_inv (.g(b), .p(1'b1), .n(1'b0), .out(b_n));
      assign n_in = b_n;
      assign p_in = b;
    end else begin : g_single
      always_comb begin
        unique case (FUNC)
          GDI_F1:  begin n_in = 1'b0; p_in = b;    end
          GDI_F2:  begin n_in = b;    p_in = 1'b1; end
          GDI_OR:  begin n_in = 1'b1; p_in = b;    end
          GDI_AND: begin n_in = b;    p_in = 1'b0; end
          GDI_MUX: begin n_in = c;    p_in = b;    end
          default: begin n_in = 1'b0; p_in = 1'b1; end  // GDI_NOT
        endcase
      end
    end
  endgenerate

  gdi_cell u_cell (.g(a), .p(p_in), .n(n_in), .out(y));

endmodule
