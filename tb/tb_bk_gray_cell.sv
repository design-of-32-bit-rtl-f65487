// Exhaustive test of the gray cell: G = Ghi | Phi & Glo.
module tb_bk_gray_cell;
  import csla_pkg::*;
  gp_t  hi;
  logic g_lo, g;
  int checks = 0, failures = 0;

  bk_gray_cell dut (.hi(hi), .g_lo(g_lo), .g(g));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {hi, g_lo} = 3'(v);
      #1;
      checks++;
      if (g !== (hi.g | (hi.p & g_lo))) begin
        failures++;
        $display("FAIL hi=%b g_lo=%b g=%b", hi, g_lo, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
