// Exhaustive test of the initial processing stage at 4 bits: Gi = ai & bi,
// Pi = ai ^ bi for all 256 operand pairs.
module tb_bk_pg_unit;
  import csla_pkg::*;
  localparam int W = 4;
  logic [W-1:0] a, b;
  gp_t  [W-1:0] gp;
  int checks = 0, failures = 0;

  bk_pg_unit dut (.a(a), .b(b), .gp(gp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {a, b} = 8'(v);
      #1;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (gp[i].g !== (a[i] & b[i]) || gp[i].p !== (a[i] ^ b[i])) begin
          failures++;
          $display("FAIL a=%h b=%h bit %0d g=%b p=%b", a, b, i, gp[i].g, gp[i].p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
