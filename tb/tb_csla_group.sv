// Exhaustive test of one 4-bit carry-select group: for every a, b and
// incoming carry, {cout, sum} must equal a + b + sel. Counts how often the
// multiplexers took the carry-0 (adder) result and the carry-1 (BEC) result,
// and fails if either never happened.
module tb_csla_group;
  int checks = 0, failures = 0;
  int took_adder = 0, took_bec = 0;

  logic [3:0] a, b, sum;
  logic       sel, cout;

  csla_group dut (.a(a), .b(b), .sel(sel), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {a, b, sel} = 9'(v);
      #1;
      checks++;
      if ({cout, sum} !== 5'(a) + 5'(b) + 5'(sel)) begin
        failures++;
        $display("FAIL a=%h b=%h sel=%b got=%h", a, b, sel, {cout, sum});
      end
      if (sel) took_bec++;
      else     took_adder++;
    end
    checks++;
    if (took_adder == 0 || took_bec == 0) failures++;
    $display("adder path %0d, BEC path %0d", took_adder, took_bec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
