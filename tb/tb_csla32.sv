// End-to-end test of the 32-bit carry-select adder at its default size.
//
// Every result is compared with integer addition of the operands. Directed
// cases come first: zero, the all-ones operand with carry-in 1 (a carry that
// must pass through every group), the largest sum with carry out, and a
// carry-in-0 case whose carry out is 1. Random operands follow, half of
// them built so that whole 4-bit groups propagate.
//
// For the mechanisms of the carry-select structure, the test counts, per
// upper group, how often the incoming carry selected the adder result
// (carry 0) and the BEC result (carry 1), how often the BEC itself produced
// the group carry (group sum 1111 with carry-in 1), how often a carry passed
// through all eight groups, and how often cout was 1. The expected group
// carries are worked out from integer addition, not read from the design.
// Any count left at zero is a failure.
module tb_csla32;
  localparam int W = 32;
  localparam int G = 4;
  localparam int NG = W / G;

  int checks = 0, failures = 0;
  int sel_adder [NG], sel_bec [NG];
  int bec_carry = 0, full_ripple = 0, cout_one = 0;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;

  csla32 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(logic [W-1:0] aa, logic [W-1:0] bb, logic ci);
    logic [W:0] exp;
    logic [W:0] low;
    logic       cin_k;
    logic       all_prop;
    a = aa; b = bb; cin = ci;
    #1;
    exp = (W+1)'(aa) + (W+1)'(bb) + (W+1)'(ci);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got=%b_%h exp=%h", aa, bb, ci, cout, sum, exp);
    end
    all_prop = 1'b1;
    for (int k = 0; k < NG; k++) begin
      // Carry into group k, from the integer sum of the bits below it.
      if (k == 0) cin_k = ci;
      else begin
        low = (W+1)'(aa & ((W'(1) << (k*G)) - 1)) + (W+1)'(bb & ((W'(1) << (k*G)) - 1))
            + (W+1)'(ci);
        cin_k = low[k*G];
      end
      if ((aa[k*G +: G] ^ bb[k*G +: G]) != '1) all_prop = 1'b0;
      if (k > 0) begin
        if (cin_k) sel_bec[k]++;
        else       sel_adder[k]++;
        // Group sum 1111 with carry-in 1: the carry out comes from the BEC.
        if (cin_k && (5'(aa[k*G +: G]) + 5'(bb[k*G +: G]) == 5'd15))
          bec_carry++;
      end
    end
    if (all_prop && ci) full_ripple++;
    if (cout) cout_one++;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ra, rb, mask;
    for (int k = 0; k < NG; k++) begin sel_adder[k] = 0; sel_bec[k] = 0; end

    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);                  // carry through every group
    apply(32'h0F0F_0F0F, 32'hF0F0_F0F0, 1'b1);
    apply('1, '1, 1'b1);                  // largest sum
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);  // cout = 1 with cin = 0
    apply(32'h1234_5678, 32'hFEDC_BA98, 1'b0);

    for (int n = 0; n < 200000; n++) begin
      ra = $urandom;
      rb = $urandom;
      if (n[0]) begin
        // Make the groups selected by mask propagate: b = ~a there.
        mask = $urandom;
        for (int k = 0; k < NG; k++)
          if (mask[k] | mask[k+8]) rb[k*G +: G] = ~ra[k*G +: G];
      end
      apply(ra, rb, 1'($urandom));
    end

    for (int k = 1; k < NG; k++) begin
      $display("group %0d: adder result %0d, BEC result %0d", k, sel_adder[k], sel_bec[k]);
      checks++;
      if (sel_adder[k] == 0 || sel_bec[k] == 0) failures++;
    end
    $display("carry made by a BEC %0d, carry through all groups %0d, cout=1 %0d",
             bec_carry, full_ripple, cout_one);
    checks++;
    if (bec_carry == 0 || full_ripple == 0 || cout_one == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
