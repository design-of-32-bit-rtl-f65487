// Exhaustive test of the black cell: G = Ghi | Phi & Glo, P = Phi & Plo.
module tb_bk_black_cell;
  import csla_pkg::*;
  gp_t hi, lo, out;
  int checks = 0, failures = 0;

  bk_black_cell dut (.hi(hi), .lo(lo), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {hi, lo} = 4'(v);
      #1;
      checks++;
      if (out.g !== (hi.g | (hi.p & lo.g)) || out.p !== (hi.p & lo.p)) begin
        failures++;
        $display("FAIL hi=%b lo=%b out=%b", hi, lo, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
