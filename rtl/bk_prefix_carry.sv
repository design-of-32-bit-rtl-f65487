// Prefix carry stage of the Brent-Kung adder.
//
// Turns the per-bit generate/propagate pairs and the carry-in into the
// carry out of every bit, c[i] = G(i:0) with the carry-in counted as the
// generate below bit 0. The tree is the Brent-Kung one:
//   * bit 0 first absorbs the carry-in in a gray cell, so c[0] = G0 | P0 & cin;
//   * up-sweep, level l (span 2^l): bit i with (i+1) a multiple of 2^(l+1)
//     merges with bit i-2^l; a merge whose span reaches bit 0 is a carry and
//     uses a gray cell, every other merge a black cell;
//   * down-sweep, level l from the second-highest down to 0: bits
//     k*2^(l+1) + 2^l - 1 (k >= 1) take the carry of bit i-2^l in a gray cell.
// Positions not merged at a level are carried over unchanged (the buffer
// cells of the tree, wires here). For WIDTH = 4 this is: C0 gray, (1:0)
// gray = C1, (3:2) black, C3 = gray of (3:2) and C1, C2 = gray of bit 2 and
// C1. WIDTH must be a power of two, at least 2. Combinational, no timing.
module bk_prefix_carry
  import csla_pkg::*;
#(
  parameter int WIDTH = 4
) (
  input  gp_t  [WIDTH-1:0] gp,
  input  logic             cin,
  output logic [WIDTH-1:0] c
);

  localparam int L = $clog2(WIDTH);
  localparam int NSTAGE = 2 * L;   // stage 0, L up-sweep, L-1 down-sweep

  if (WIDTH < 2 || (1 << L) != WIDTH) begin : g_bad_width
    $error("bk_prefix_carry: WIDTH must be a power of two, at least 2");
  end

  // Stage t reads the (G,P) pairs left by stage t-1 (stage 0 reads gp) and
  // leaves its own in v. The P of a span that reaches bit 0 is never used
  // and is driven 0.
  for (genvar t = 0; t < NSTAGE; t++) begin : g_st
    gp_t [WIDTH-1:0] in;
    gp_t [WIDTH-1:0] v;

    if (t == 0) begin : g_src
      assign in = gp;
    end else begin : g_src
      assign in = g_st[t-1].v;
    end

    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (t == 0) begin : g_node
        // Fold the carry-in into bit 0.
        if (i == 0) begin : g_cin
          bk_gray_cell u_gray (.hi(in[0]), .g_lo(cin), .g(v[0].g));
          assign v[0].p = 1'b0;
        end else begin : g_pass
          assign v[i] = in[i];
        end
      end else if (t <= L) begin : g_node
        // Up-sweep level t-1.
        localparam int STEP = 1 << (t - 1);
        if (((i + 1) % (2 * STEP)) == 0 && i + 1 == 2 * STEP) begin : g_gray
          bk_gray_cell u_gray (.hi(in[i]), .g_lo(in[i-STEP].g), .g(v[i].g));
          assign v[i].p = 1'b0;
        end else if (((i + 1) % (2 * STEP)) == 0) begin : g_black
          bk_black_cell u_black (.hi(in[i]), .lo(in[i-STEP]), .out(v[i]));
        end else begin : g_pass
          assign v[i] = in[i];
        end
      end else begin : g_node
        // Down-sweep level 2L-1-t.
        localparam int STEP = 1 << (2 * L - 1 - t);
        if (i >= 2 * STEP && ((i + 1 - STEP) % (2 * STEP)) == 0) begin : g_gray
          bk_gray_cell u_gray (.hi(in[i]), .g_lo(in[i-STEP].g), .g(v[i].g));
          assign v[i].p = 1'b0;
        end else begin : g_pass
          assign v[i] = in[i];
        end
      end
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_out
    assign c[i] = g_st[NSTAGE-1].v[i].g;
  end

endmodule
