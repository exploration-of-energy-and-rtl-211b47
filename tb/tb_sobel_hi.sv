// Sobel edge detection on the fabric with horizontal interconnect. The
// operator is the one of tb_sobel_split,
//   out = min(|gx| + |gy|, 255),
// placed by hand so that chains of dependent operations run along a stripe
// over the left and right neighbour links: each of the four weighted column
// sums (shift, add, add) sits in three neighbouring ALUs of one stripe. The
// whole operator then needs 5 stripes and no pass ALU. Other operands come
// from the 8:1 window of the stripe above, from the side or from the ALU's
// constant. A random 10x10 8-bit image is filtered and each result compared
// with the operator computed directly.
module tb_sobel_hi;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int NN = 23, IMG = 10, KONST = -100, LN = 2000, RN = 3000;
  int checks = 0, failures = 0;

  word_t     in_v [NIN];
  cell_cfg_t cfg [9][11];
  out_cfg_t  ocfg [NOUT];
  word_t     out_v [NOUT];

  cgra_hi u_dut (.in_i(in_v), .cfg_i(cfg), .ocfg_i(ocfg), .out_o(out_v));

  op_e   g_op [NN];
  int    g_a [NN], g_b [NN], g_s [NN], g_r [NN], g_c [NN];
  word_t g_k [NN];

  task automatic node(input int n, input int r, input int c, input op_e op, input int a, input int b,
                      input int s = -1, input word_t k = '0);
    g_op[n] = op; g_a[n] = a; g_b[n] = b; g_s[n] = s; g_k[n] = k; g_r[n] = r; g_c[n] = c;
  endtask

  function automatic int P(input int j); return -(j + 1); endfunction

  // Operand source of node v as seen by the ALU in (r, c): a fabric input, the
  // constant, the left (v >= LN) or right (v >= RN) neighbour, or the 8:1
  // window.
  function automatic opnd_cfg_t src(input int v, input int r, input int c);
    if (v == KONST) return kon();
    if (v < 0) return side(-v - 1);
    if (v >= RN) begin
      if (g_r[v - RN] != r || g_c[v - RN] != c + 1)
        begin failures++; $display("FAIL placement: node %0d is not the right neighbour of (%0d,%0d)", v - RN, r, c); end
      return x2();
    end
    if (v >= LN) begin
      if (g_r[v - LN] != r || g_c[v - LN] != c - 1)
        begin failures++; $display("FAIL placement: node %0d is not the left neighbour of (%0d,%0d)", v - LN, r, c); end
      return x1();
    end
    if (g_r[v] != r - 1 || widx(c, g_c[v], 8, 11) >= 8)
      begin failures++; $display("FAIL placement: node %0d is outside the window of (%0d,%0d)", v, r, c); end
    return win(widx(c, g_c[v], 8, 11));
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
    node(0,  0, 0,  OP_SHL, P(5), KONST, -1, 16'd1);
    node(1,  0, 1,  OP_ADD, P(2), LN + 0);
    node(2,  0, 2,  OP_ADD, LN + 1, P(8));
    node(3,  0, 3,  OP_SHL, P(3), KONST, -1, 16'd1);
    node(4,  0, 4,  OP_ADD, P(0), LN + 3);
    node(5,  0, 5,  OP_ADD, LN + 4, P(6));
    node(10, 1, 0,  OP_SHL, P(1), KONST, -1, 16'd1);
    node(11, 1, 1,  OP_ADD, P(0), LN + 10);
    node(12, 1, 2,  OP_ADD, LN + 11, P(2));
    node(6,  1, 5,  OP_SUB, 2, 5);                   // gx
    node(14, 1, 4,  OP_SUB, KONST, RN + 6, -1, 16'd0);
    node(15, 1, 6,  OP_LT,  LN + 6, KONST, -1, 16'd0);
    node(7,  1, 8,  OP_SHL, P(7), KONST, -1, 16'd1);
    node(8,  1, 9,  OP_ADD, P(6), LN + 7);
    node(9,  1, 10, OP_ADD, LN + 8, P(8));
    node(13, 2, 1,  OP_SUB, 9, 12);                  // gy
    node(17, 2, 0,  OP_SUB, KONST, RN + 13, -1, 16'd0);
    node(18, 2, 2,  OP_LT,  LN + 13, KONST, -1, 16'd0);
    node(16, 2, 5,  OP_MUX, 14, 6, 15);              // |gx|
    node(19, 3, 1,  OP_MUX, 17, 13, 18);             // |gy|
    node(20, 3, 2,  OP_ADD, LN + 19, 16);
    node(21, 3, 3,  OP_LT,  KONST, LN + 20, -1, 16'd255);
    node(22, 4, 2,  OP_MUX, KONST, 20, 21, 16'd255);
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
    ocfg[0] = oc(4, 2);
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
    $display("sobel: %0d pixels, %0d ALUs in %0d stripes, no pass ALU", (IMG - 2) * (IMG - 2), NN, used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
