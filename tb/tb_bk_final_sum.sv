// Exhaustive test of the final processing stage at 4 bits:
// S0 = Cin ^ P0, Si = C(i-1) ^ Pi.
module tb_bk_final_sum;
  localparam int W = 4;
  logic [W-1:0] p, c, sum, exp;
  logic cin;
  int checks = 0, failures = 0;

  bk_final_sum dut (.p(p), .c(c), .cin(cin), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {p, c, cin} = 9'(v);
      #1;
      exp[0] = cin ^ p[0];
      for (int i = 1; i < W; i++) exp[i] = c[i-1] ^ p[i];
      checks++;
      if (sum !== exp) begin
        failures++;
        $display("FAIL p=%b c=%b cin=%b sum=%b exp=%b", p, c, cin, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
