// Test of the Brent-Kung prefix carry stage. The carries are compared with
// a bit-serial reference, c[-1] = cin, c[i] = G[i] | P[i] & c[i-1], at the
// default 4 bits (all 512 inputs), at 8 bits (all 131072 inputs) and at
// 16 bits (random inputs), so that deeper trees are covered too.
module tb_bk_prefix_carry;
  import csla_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  g4, p4, c4;
  logic [7:0]  g8, p8, c8;
  logic [15:0] g16, p16, c16;
  logic        cin;
  gp_t  [3:0]  gp4;
  gp_t  [7:0]  gp8;
  gp_t  [15:0] gp16;

  for (genvar i = 0; i < 16; i++) begin : g_pack
    if (i < 4) begin : g4b
      assign gp4[i] = '{g: g4[i], p: p4[i]};
    end
    if (i < 8) begin : g8b
      assign gp8[i] = '{g: g8[i], p: p8[i]};
    end
    assign gp16[i] = '{g: g16[i], p: p16[i]};
  end

  bk_prefix_carry               dut4  (.gp(gp4),  .cin(cin), .c(c4));
  bk_prefix_carry #(.WIDTH(8))  dut8  (.gp(gp8),  .cin(cin), .c(c8));
  bk_prefix_carry #(.WIDTH(16)) dut16 (.gp(gp16), .cin(cin), .c(c16));

  function automatic logic [15:0] ref_carry(logic [15:0] g, logic [15:0] p,
                                            logic ci, int w);
    logic [15:0] r = '0;
    logic k = ci;
    for (int i = 0; i < w; i++) begin
      k = g[i] | (p[i] & k);
      r[i] = k;
    end
    return r;
  endfunction

  task automatic check(int w, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL w=%0d cin=%b got=%h exp=%h", w, cin, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    g16 = '0; p16 = '0; g8 = '0; p8 = '0;
    for (int v = 0; v < 512; v++) begin
      {g4, p4, cin} = 9'(v);
      #1;
      check(4, 16'(c4), ref_carry(16'(g4), 16'(p4), cin, 4));
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {g8, p8, cin} = 17'(v);
      #1;
      check(8, 16'(c8), ref_carry(16'(g8), 16'(p8), cin, 8));
    end
    for (int n = 0; n < 20000; n++) begin
      p16 = 16'($urandom) | 16'($urandom);   // long propagate runs
      g16 = 16'($urandom) & 16'($urandom);
      cin = 1'($urandom);
      #1;
      check(16, c16, ref_carry(g16, p16, cin, 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
