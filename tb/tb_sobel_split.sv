// Sobel edge detection on the ICS-split fabric (33% DPs). The operator
//   out = min(|gx| + |gy|, 255),
//   gx = (p2 + 2 p5 + p8) - (p0 + 2 p3 + p6), gy = (p6 + 2 p7 + p8) - (p0 + 2 p1 + p2)
// is placed by hand, level by level, in the 9 stripes of the left fabric: the
// 23 operations in the ALU columns (0, 1, 3, 4, 6, 7), and the three values
// that skip a stripe carried by dedicated pass gates (columns 2 and 5), so no
// ALU is spent on a pass. The right fabric stays idle, as the Sobel kernel needs no second
// fabric. Pixels come in from the side on inputs 0..8 and the result leaves
// through the early exit of the last stripe. A random 10x10 8-bit image is
// filtered and each result compared with the operator computed directly.
module tb_sobel_split;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int NN = 26, IMG = 10, KONST = -100;
  int checks = 0, failures = 0;

  word_t     in_v [NIN];
  cell_cfg_t cl [9][8], cr [9][4];
  out_cfg_t  ocfg [NOUT];
  word_t     out_v [NOUT];

  cgra_split u_dut (.in_i(in_v), .cfg_l_i(cl), .cfg_r_i(cr), .ocfg_i(ocfg), .out_o(out_v));

  op_e   g_op [NN];
  int    g_a [NN], g_b [NN], g_s [NN], g_r [NN], g_c [NN];
  word_t g_k [NN];

  task automatic node(input int n, input int r, input int c, input op_e op, input int a, input int b,
                      input int s = -1, input word_t k = '0);
    g_op[n] = op; g_a[n] = a; g_b[n] = b; g_s[n] = s; g_k[n] = k; g_r[n] = r; g_c[n] = c;
  endtask

  function automatic int P(input int j); return -(j + 1); endfunction

  function automatic opnd_cfg_t src(input int v, input int r, input int c);
    if (v == KONST) return kon();
    if (v < 0) return side(-v - 1);
    if (g_r[v] != r - 1) begin failures++; $display("FAIL placement: node %0d is not in the stripe above row %0d", v, r); end
    return win(widx(c, g_c[v], 8, 8));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned img [IMG][IMG];
    node(0,  0, 0, OP_SHL, P(5), KONST, -1, 16'd1);
    node(3,  0, 1, OP_SHL, P(3), KONST, -1, 16'd1);
    node(7,  0, 3, OP_SHL, P(7), KONST, -1, 16'd1);
    node(10, 0, 4, OP_SHL, P(1), KONST, -1, 16'd1);
    node(1,  1, 0, OP_ADD, P(2), 0);
    node(4,  1, 1, OP_ADD, P(0), 3);
    node(8,  1, 3, OP_ADD, P(6), 7);
    node(11, 1, 4, OP_ADD, P(0), 10);
    node(2,  2, 0, OP_ADD, 1, P(8));
    node(5,  2, 1, OP_ADD, 4, P(6));
    node(9,  2, 3, OP_ADD, 8, P(8));
    node(12, 2, 4, OP_ADD, 11, P(2));
    node(6,  3, 0, OP_SUB, 2, 5);                    // gx
    node(13, 3, 1, OP_SUB, 9, 12);                   // gy
    node(14, 4, 0, OP_SUB, KONST, 6, -1, 16'd0);
    node(15, 4, 1, OP_LT,  6, KONST, -1, 16'd0);
    node(17, 4, 3, OP_SUB, KONST, 13, -1, 16'd0);
    node(18, 4, 4, OP_LT,  13, KONST, -1, 16'd0);
    node(23, 4, 5, OP_PASS, 6, KONST);               // DP carries gx
    node(24, 4, 2, OP_PASS, 13, KONST);              // DP carries gy
    node(16, 5, 0, OP_MUX, 14, 23, 15);              // |gx|
    node(19, 5, 1, OP_MUX, 17, 24, 18);              // |gy|
    node(20, 6, 0, OP_ADD, 16, 19);
    node(21, 7, 0, OP_LT,  KONST, 20, -1, 16'd255);
    node(25, 7, 2, OP_PASS, 20, KONST);              // DP carries m
    node(22, 8, 0, OP_MUX, KONST, 25, 21, 16'd255);
    foreach (cl[r, c]) cl[r][c] = CELL_IDLE;
    foreach (cr[r, c]) cr[r][c] = CELL_IDLE;
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (g_c[n] % 3 == 2 && g_op[n] != OP_PASS) begin failures++; $display("FAIL node %0d is no pass but sits on a DP", n); end
      cl[g_r[n]][g_c[n]] = mkc(g_op[n], src(g_a[n], g_r[n], g_c[n]), src(g_b[n], g_r[n], g_c[n]),
                               (g_s[n] >= 0) ? src(g_s[n], g_r[n], g_c[n]) : side(0), g_k[n]);
    end
    foreach (ocfg[n]) ocfg[n] = oc(0, 0);
    ocfg[0] = oc(8, 0, 1'b1);
    foreach (in_v[j]) in_v[j] = '0;
    foreach (img[y, x]) img[y][x] = byte'($urandom);
    for (int y = 1; y < IMG - 1; y++)
      for (int x = 1; x < IMG - 1; x++) begin
        int p [9], gx, gy, m;
        for (int j = 0; j < 9; j++) p[j] = img[y - 1 + j / 3][x - 1 + j % 3];
        foreach (p[j]) in_v[j] = word_t'(p[j]);
        gx = (p[2] + 2 * p[5] + p[8]) - (p[0] + 2 * p[3] + p[6]);
        gy = (p[6] + 2 * p[7] + p[8]) - (p[0] + 2 * p[1] + p[2]);
        m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        if (m > 255) m = 255;
        #1;
        checks++;
        if (out_v[0] !== word_t'(m)) begin failures++; $display("FAIL (%0d,%0d) got %0d exp %0d", y, x, out_v[0], m); end
      end
    $display("sobel: %0d pixels, 23 ALUs and 3 DPs of the left fabric", (IMG - 2) * (IMG - 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
