// Test of the 2:1 multiplexer, Y = A & ~S | B & S: all eight inputs of the
// default 1-bit multiplexer (including the two waveform cases A=0, B=1,
// S=0 -> 0 and A=1, B=1, S=1 -> 1), and random words through a 5-bit one.
module tb_mux2x1;
  int checks = 0, failures = 0;

  logic       a1, b1, s, y1;
  logic [4:0] a5, b5, y5;

  mux2x1              dut1 (.a(a1), .b(b1), .s(s), .y(y1));
  mux2x1 #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .s(s), .y(y5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a5 = '0; b5 = '0;
    for (int v = 0; v < 8; v++) begin
      {a1, b1, s} = 3'(v);
      #1;
      checks++;
      if (y1 !== ((a1 & ~s) | (b1 & s))) begin
        failures++;
        $display("FAIL a=%b b=%b s=%b y=%b", a1, b1, s, y1);
      end
    end
    for (int n = 0; n < 200; n++) begin
      a5 = 5'($urandom);
      b5 = 5'($urandom);
      s  = 1'(n);
      #1;
      checks++;
      if (y5 !== (s ? b5 : a5)) begin
        failures++;
        $display("FAIL 5-bit a=%b b=%b s=%b y=%b", a5, b5, s, y5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
