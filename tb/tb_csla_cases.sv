// The input/output cases used to demonstrate the adder's building blocks,
// replayed at logic level: the FS-GDI XOR, AND and OR gates, the 4-bit
// binary-to-excess-1 converter, the 2:1 multiplexer, and a 32-bit addition
// with carry-in 0 that produces carry-out 1. Expected values are the
// truth-table values of each case, written out as constants.
module tb_csla_cases;
  import csla_pkg::*;
  int checks = 0, failures = 0;

  logic ga, gb, y_xor, y_and, y_or;
  logic [3:0] bb, bx;
  logic ma, mb, ms, my;
  logic [31:0] a, b, sum;
  logic cin, cout;

  gdi_gate #(.FUNC(GDI_XOR)) u_xor (.a(ga), .b(gb), .c(1'b0), .y(y_xor));
  gdi_gate #(.FUNC(GDI_AND)) u_and (.a(ga), .b(gb), .c(1'b0), .y(y_and));
  gdi_gate #(.FUNC(GDI_OR))  u_or  (.a(ga), .b(gb), .c(1'b0), .y(y_or));
  bec    u_bec (.b(bb), .x(bx));
  mux2x1 u_mux (.a(ma), .b(mb), .s(ms), .y(my));
  csla32 u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic check(string what, logic [32:0] got, logic [32:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bb = '0; ma = 0; mb = 0; ms = 0; a = '0; b = '0; cin = 0;
    // Gates: (a, b) = (0, 1) and (1, 1).
    ga = 0; gb = 1; #1;
    check("xor 0,1", 33'(y_xor), 33'd1);
    check("and 0,1", 33'(y_and), 33'd0);
    check("or 0,1",  33'(y_or),  33'd1);
    ga = 1; gb = 1; #1;
    check("xor 1,1", 33'(y_xor), 33'd0);
    check("and 1,1", 33'(y_and), 33'd1);
    check("or 1,1",  33'(y_or),  33'd1);
    // BEC: B3..B0 = 0001 -> 0010 and 0111 -> 1000.
    bb = 4'b0001; #1; check("bec 0001", 33'(bx), 33'b0010);
    bb = 4'b0111; #1; check("bec 0111", 33'(bx), 33'b1000);
    // MUX: A=0, B=1, S=0 -> 0 and A=1, B=1, S=1 -> 1.
    ma = 0; mb = 1; ms = 0; #1; check("mux 0,1,0", 33'(my), 33'd0);
    ma = 1; mb = 1; ms = 1; #1; check("mux 1,1,1", 33'(my), 33'd1);
    // 32-bit addition, cin = 0, cout = 1.
    a = 32'hC0FF_EE11; b = 32'h9ABC_DEF0; cin = 0; #1;
    check("add", {cout, sum}, 33'h1_5BBC_CD01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
