// Test of the Brent-Kung adder against integer addition: all 512 inputs of
// the default 4-bit adder, all inputs of an 8-bit one and random ones of a
// 16-bit one.
module tb_bk_adder;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic        cin, co4, co8, co16;

  bk_adder               dut4  (.a(a4),  .b(b4),  .cin(cin), .sum(s4),  .cout(co4));
  bk_adder #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(co8));
  bk_adder #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));

  task automatic check(int w, logic [16:0] got, logic [16:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL w=%0d got=%h exp=%h", w, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    for (int v = 0; v < 512; v++) begin
      {a4, b4, cin} = 9'(v);
      #1;
      check(4, 17'({co4, s4}), 17'(a4) + 17'(b4) + 17'(cin));
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {a8, b8, cin} = 17'(v);
      #1;
      check(8, 17'({co8, s8}), 17'(a8) + 17'(b8) + 17'(cin));
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom);
      b16 = n[1] ? ~a16 : 16'($urandom);
      cin = 1'($urandom);
      #1;
      check(16, {co16, s16}, 17'(a16) + 17'(b16) + 17'(cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
