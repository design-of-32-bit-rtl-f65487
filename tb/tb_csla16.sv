// The carry-select adder rebuilt at 16 bits (four 4-bit groups), the
// smaller configuration it is compared with, checked against integer
// addition on random and propagate-heavy operands.
module tb_csla16;
  localparam int W = 16;
  int checks = 0, failures = 0;
  int carried = 0;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;

  csla32 #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 100000; n++) begin
      a = 16'($urandom);
      b = n[0] ? ~a : 16'($urandom);
      cin = 1'($urandom);
      #1;
      checks++;
      if ({cout, sum} !== 17'(a) + 17'(b) + 17'(cin)) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b got=%b_%h", a, b, cin, cout, sum);
      end
      if (cout) carried++;
    end
    checks++;
    if (carried == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
