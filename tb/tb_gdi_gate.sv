// Exhaustive test of every row of the GDI function table: one gdi_gate per
// function, all eight (a, b, c) combinations, outputs compared with the
// Boolean function each row names.
module tb_gdi_gate;
  import csla_pkg::*;
  logic a, b, c;
  logic y_f1, y_f2, y_or, y_and, y_xor, y_mux, y_not;
  int checks = 0, failures = 0;

  gdi_gate #(.FUNC(GDI_F1))  u_f1  (.a(a), .b(b), .c(c), .y(y_f1));
  gdi_gate #(.FUNC(GDI_F2))  u_f2  (.a(a), .b(b), .c(c), .y(y_f2));
  gdi_gate #(.FUNC(GDI_OR))  u_or  (.a(a), .b(b), .c(c), .y(y_or));
  gdi_gate #(.FUNC(GDI_AND)) u_and (.a(a), .b(b), .c(c), .y(y_and));
  gdi_gate #(.FUNC(GDI_XOR)) u_xor (.a(a), .b(b), .c(c), .y(y_xor));
  gdi_gate #(.FUNC(GDI_MUX)) u_mux (.a(a), .b(b), .c(c), .y(y_mux));
  gdi_gate #(.FUNC(GDI_NOT)) u_not (.a(a), .b(b), .c(c), .y(y_not));

  task automatic check(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%b b=%b c=%b got=%b exp=%b", name, a, b, c, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check("F1",  y_f1,  ~a & b);
      check("F2",  y_f2,  ~a | b);
      check("OR",  y_or,  a | b);
      check("AND", y_and, a & b);
      check("XOR", y_xor, a ^ b);
      check("MUX", y_mux, (~a & b) | (a & c));
      check("NOT", y_not, ~a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
