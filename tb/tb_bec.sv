// Test of the binary-to-excess-1 converter. The default 4-bit converter is
// checked row by row against the excess-1 table, written out here as
// constants (0000 -> 0001 ... 1110 -> 1111, 1111 -> 0000), including the
// two cases shown in its waveform (B = 0001 -> 0010, B = 0111 -> 1000, bit
// order B3..B0). The 5-bit converter used in the adder is checked
// exhaustively against b + 1 mod 32.
module tb_bec;
  int checks = 0, failures = 0;

  logic [3:0] b4, x4;
  logic [4:0] b5, x5;

  // Excess-1 table, entry i is the output for input i.
  localparam logic [3:0] TABLE [16] = '{
    4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111, 4'b1000,
    4'b1001, 4'b1010, 4'b1011, 4'b1100, 4'b1101, 4'b1110, 4'b1111, 4'b0000
  };

  bec              dut4 (.b(b4), .x(x4));
  bec #(.WIDTH(5)) dut5 (.b(b5), .x(x5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b5 = '0;
    for (int v = 0; v < 16; v++) begin
      b4 = 4'(v);
      #1;
      checks++;
      if (x4 !== TABLE[v]) begin
        failures++;
        $display("FAIL 4-bit b=%b x=%b exp=%b", b4, x4, TABLE[v]);
      end
    end
    b4 = 4'b0001; #1; checks++;
    if (x4 !== 4'b0010) begin failures++; $display("FAIL waveform case 1"); end
    b4 = 4'b0111; #1; checks++;
    if (x4 !== 4'b1000) begin failures++; $display("FAIL waveform case 2"); end
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v);
      #1;
      checks++;
      if (x5 !== 5'(v + 1)) begin
        failures++;
        $display("FAIL 5-bit b=%b x=%b", b5, x5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
