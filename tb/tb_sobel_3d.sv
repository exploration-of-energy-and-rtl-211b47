// Sobel edge detection on the 4x4x4 three-dimensional fabric. The operator is
// the one of tb_sobel_split,
//   out = min(|gx| + |gy|, 255),
// as a 23-node data-flow graph. The test first learns, for every ALU and
// every candidate entry, which ALU the entry reaches: all ALUs output their
// own tag and each ALU in turn passes one entry through the bottom exit face.
// A greedy placer then walks the graph in topological order and puts each
// node on the first free ALU (lowest layer first) whose candidate list reaches
// the ALUs of all its operand nodes, over the layer-above interconnect or a
// hopping link. Pixels come from the side, constants from the ALUs. A random
// 10x10 8-bit image is filtered and each result, read through the bottom exit
// face, compared with the operator computed directly.
module tb_sobel_3d;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 4, NC = 64, NN = 23, IMG = 10, KONST = -100;
  int checks = 0, failures = 0;

  word_t      in_v [NIN];
  cell_cfg_t  cfg [NC];
  logic [1:0] xs [3][N][N];
  logic [5:0] os [NOUT];
  word_t      out_v [NOUT];

  cgra_3d u_dut (.in_i(in_v), .cfg_i(cfg), .xsel_i(xs), .osel_i(os), .out_o(out_v));

  op_e   g_op [NN];
  int    g_a [NN], g_b [NN], g_s [NN], g_cell [NN];
  word_t g_k [NN];
  int    reach [NC][32];     // ALU reached by entry k of ALU i, -1 for none or a fabric input

  task automatic node(input int n, input op_e op, input int a, input int b,
                      input int s = -1, input word_t k = '0);
    g_op[n] = op; g_a[n] = a; g_b[n] = b; g_s[n] = s; g_k[n] = k; g_cell[n] = -1;
  endtask

  function automatic int P(input int j); return -(j + 1); endfunction

  // entry of ALU i that reaches the ALU holding node v, -1 if none
  function automatic int entry(input int i, input int v);
    for (int k = 0; k < 32; k++) if (reach[i][k] == g_cell[v]) return k;
    return -1;
  endfunction

  function automatic bit fits(input int i, input int n);
    int ops [3];
    ops[0] = g_a[n]; ops[1] = g_b[n]; ops[2] = g_s[n];
    foreach (ops[o]) if (ops[o] >= 0 && entry(i, ops[o]) < 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic opnd_cfg_t src(input int v, input int i);
    if (v == KONST) return kon();
    if (v < 0) return side(-v - 1);
    return win(entry(i, v));
  endfunction

  task automatic read_bottom(input int i);
    xs[2][i % 4][(i / 4) % 4] = 2'(i / 16);
    os[0] = 6'(32 + (i % 4) * 4 + (i / 4) % 4);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned img [IMG][IMG];
    int order [NN] = '{0, 3, 7, 10, 1, 4, 8, 11, 2, 5, 9, 12, 6, 13, 14, 15, 17, 18, 16, 19, 20, 21, 22};
    bit busy [NC];
    int layers;
    node(0,  OP_SHL, P(5), KONST, -1, 16'd1);
    node(3,  OP_SHL, P(3), KONST, -1, 16'd1);
    node(7,  OP_SHL, P(7), KONST, -1, 16'd1);
    node(10, OP_SHL, P(1), KONST, -1, 16'd1);
    node(1,  OP_ADD, P(2), 0);
    node(4,  OP_ADD, P(0), 3);
    node(8,  OP_ADD, P(6), 7);
    node(11, OP_ADD, P(0), 10);
    node(2,  OP_ADD, 1, P(8));
    node(5,  OP_ADD, 4, P(6));
    node(9,  OP_ADD, 8, P(8));
    node(12, OP_ADD, 11, P(2));
    node(6,  OP_SUB, 2, 5);                          // gx
    node(13, OP_SUB, 9, 12);                         // gy
    node(14, OP_SUB, KONST, 6, -1, 16'd0);
    node(15, OP_LT,  6, KONST, -1, 16'd0);
    node(17, OP_SUB, KONST, 13, -1, 16'd0);
    node(18, OP_LT,  13, KONST, -1, 16'd0);
    node(16, OP_MUX, 14, 6, 15);                     // |gx|
    node(19, OP_MUX, 17, 13, 18);                    // |gy|
    node(20, OP_ADD, 16, 19);
    node(21, OP_LT,  KONST, 20, -1, 16'd255);
    node(22, OP_MUX, KONST, 20, 21, 16'd255);

    // learn the candidate lists
    foreach (in_v[j]) in_v[j] = '0;
    foreach (xs[f, a, b]) xs[f][a][b] = '0;
    foreach (os[n]) os[n] = '0;
    foreach (cfg[i]) cfg[i] = mkc(OP_PASS, kon(), kon(), , word_t'(16'h1000 + i));
    for (int i = 0; i < NC; i++) begin
      read_bottom(i);
      for (int k = 0; k < 32; k++) begin
        int j;
        cfg[i] = mkc(OP_PASS, win(k), kon());
        #1;
        j = int'(out_v[0]) - 16'h1000;
        reach[i][k] = (j >= 0 && j < NC && j != i) ? j : -1;
      end
      cfg[i] = mkc(OP_PASS, kon(), kon(), , word_t'(16'h1000 + i));
    end

    // place
    foreach (cfg[i]) cfg[i] = CELL_IDLE;
    foreach (busy[i]) busy[i] = 1'b0;
    layers = 0;
    foreach (order[m]) begin
      int n;
      n = order[m];
      for (int i = 0; i < NC && g_cell[n] < 0; i++)
        if (!busy[i] && fits(i, n)) begin
          g_cell[n] = i;
          busy[i] = 1'b1;
          cfg[i] = mkc(g_op[n], src(g_a[n], i), src(g_b[n], i),
                       (g_s[n] >= 0) ? src(g_s[n], i) : side(0), g_k[n]);
          if (i / 16 + 1 > layers) layers = i / 16 + 1;
        end
      checks++;
      if (g_cell[n] < 0) begin failures++; $display("FAIL node %0d has no place", n); end
    end
    if (g_cell[22] >= 0) read_bottom(g_cell[22]);

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
    $display("sobel: %0d pixels, %0d ALUs placed in %0d layers", (IMG - 2) * (IMG - 2), NN, layers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
