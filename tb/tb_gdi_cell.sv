// Exhaustive test of the GDI cell: out must follow P when G = 0 and N when
// G = 1, for all eight input combinations.
module tb_gdi_cell;
  logic g, p, n, out;
  int checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1;
      checks++;
      if (out !== (g ? n : p)) begin
        failures++;
        $display("FAIL g=%b p=%b n=%b out=%b", g, p, n, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
