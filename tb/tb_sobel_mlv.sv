// Sobel edge detection on the fabric with multi-level vertical links. The
// operator is the one of tb_sobel_split,
//   out = min(|gx| + |gy|, 255),
// placed by hand in 4 columns and stripes 1..9, with stripe 0 left idle so the
// result lands on an exit row (every second row). Values that skip a stripe
// travel over the grandparent link of their column instead of through pass
// ALUs, so the mapping needs no pass ALU at all. Every other operand comes from
// the 5:1 window of the stripe above, from the side or from the ALU's
// constant. A random 10x10 8-bit image is filtered and each result compared
// with the operator computed directly.
module tb_sobel_mlv;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int NN = 23, IMG = 10, KONST = -100, GP = 1000;
  int checks = 0, failures = 0;

  word_t     in_v [NIN];
  cell_cfg_t cfg [18][8];
  out_cfg_t  ocfg [NOUT];
  word_t     out_v [NOUT];

  cgra_mlv u_dut (.in_i(in_v), .cfg_i(cfg), .ocfg_i(ocfg), .out_o(out_v));

  op_e   g_op [NN];
  int    g_a [NN], g_b [NN], g_s [NN], g_r [NN], g_c [NN];
  word_t g_k [NN];

  task automatic node(input int n, input int r, input int c, input op_e op, input int a, input int b,
                      input int s = -1, input word_t k = '0);
    g_op[n] = op; g_a[n] = a; g_b[n] = b; g_s[n] = s; g_k[n] = k; g_r[n] = r; g_c[n] = c;
  endtask

  function automatic int P(input int j); return -(j + 1); endfunction

  // Operand source of node v as seen by the ALU in (r, c): a fabric input, the
  // constant, the grandparent link (v >= GP) or the 5:1 window.
  function automatic opnd_cfg_t src(input int v, input int r, input int c);
    if (v == KONST) return kon();
    if (v < 0) return side(-v - 1);
    if (v >= GP) begin
      if (g_r[v - GP] != r - 2 || g_c[v - GP] != c)
        begin failures++; $display("FAIL placement: node %0d is not the grandparent of (%0d,%0d)", v - GP, r, c); end
      return x1();
    end
    if (g_r[v] != r - 1 || widx(c, g_c[v], 5, 8) >= 5)
      begin failures++; $display("FAIL placement: node %0d is outside the window of (%0d,%0d)", v, r, c); end
    return win(widx(c, g_c[v], 5, 8));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned img [IMG][IMG];
    int used;
    node(0,  1, 0, OP_SHL, P(5), KONST, -1, 16'd1);
    node(3,  1, 1, OP_SHL, P(3), KONST, -1, 16'd1);
    node(7,  1, 2, OP_SHL, P(7), KONST, -1, 16'd1);
    node(10, 1, 3, OP_SHL, P(1), KONST, -1, 16'd1);
    node(1,  2, 0, OP_ADD, P(2), 0);
    node(4,  2, 1, OP_ADD, P(0), 3);
    node(8,  2, 2, OP_ADD, P(6), 7);
    node(11, 2, 3, OP_ADD, P(0), 10);
    node(2,  3, 0, OP_ADD, 1, P(8));
    node(5,  3, 1, OP_ADD, 4, P(6));
    node(9,  3, 2, OP_ADD, 8, P(8));
    node(12, 3, 3, OP_ADD, 11, P(2));
    node(6,  4, 0, OP_SUB, 2, 5);                    // gx
    node(13, 4, 2, OP_SUB, 9, 12);                   // gy
    node(14, 5, 0, OP_SUB, KONST, 6, -1, 16'd0);
    node(15, 5, 1, OP_LT,  6, KONST, -1, 16'd0);
    node(17, 5, 2, OP_SUB, KONST, 13, -1, 16'd0);
    node(18, 5, 3, OP_LT,  13, KONST, -1, 16'd0);
    node(16, 6, 0, OP_MUX, 14, GP + 6, 15);          // |gx|, gx over the grandparent link
    node(19, 6, 2, OP_MUX, 17, GP + 13, 18);         // |gy|
    node(20, 7, 0, OP_ADD, 16, 19);
    node(21, 8, 0, OP_LT,  KONST, 20, -1, 16'd255);
    node(22, 9, 0, OP_MUX, KONST, GP + 20, 21, 16'd255);
    foreach (cfg[r, c]) cfg[r][c] = CELL_IDLE;
    used = 0;
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (cfg[g_r[n]][g_c[n]] != CELL_IDLE) begin failures++; $display("FAIL two nodes on one ALU"); end
      cfg[g_r[n]][g_c[n]] = mkc(g_op[n], src(g_a[n], g_r[n], g_c[n]), src(g_b[n], g_r[n], g_c[n]),
                                (g_s[n] >= 0) ? src(g_s[n], g_r[n], g_c[n]) : side(0), g_k[n]);
      if (g_r[n] + 1 > used) used = g_r[n] + 1;
    end
    foreach (ocfg[n]) ocfg[n] = oc(1, 0);
    ocfg[0] = oc(9, 0);
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
    $display("sobel: %0d pixels, %0d ALUs in 4 columns x %0d stripes, no pass ALU", (IMG - 2) * (IMG - 2), NN, used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
