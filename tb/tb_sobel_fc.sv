// Sobel edge detection on the fully connected fabrics, homogeneous and
// heterogeneous. The 3x3 Sobel operator
//   gx = (p2 + 2 p5 + p8) - (p0 + 2 p3 + p6)
//   gy = (p6 + 2 p7 + p8) - (p0 + 2 p1 + p2)
//   out = min(|gx| + |gy|, 255)
// is written as a 23-node data-flow graph. On the homogeneous fabric the
// nodes are scattered over the 64 ALUs; on the heterogeneous fabric each node
// is placed in a row that supports its operation. The eight neighbours come
// in from the side on inputs 0..8 (p4 unused). A random 10x10 8-bit image is
// filtered pixel by pixel and every result is compared with the operator
// computed directly.
module tb_sobel_fc;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int NN = 23;
  localparam int IMG = 10;
  int checks = 0, failures = 0;

  word_t      in_v [NIN];
  cell_cfg_t  ch [64], ce [64];
  logic [2:0] xrh [8], xch [8], xre [8], xce [8];
  logic [3:0] osh [NOUT], ose [NOUT];
  word_t      oh [NOUT], oe [NOUT];

  cgra_fc #(.HETERO(1'b0)) u_hom (.in_i(in_v), .cfg_i(ch), .xrow_sel_i(xrh), .xcol_sel_i(xch), .osel_i(osh), .out_o(oh));
  cgra_fc #(.HETERO(1'b1)) u_het (.in_i(in_v), .cfg_i(ce), .xrow_sel_i(xre), .xcol_sel_i(xce), .osel_i(ose), .out_o(oe));

  // operand of a graph node: node n (>= 0), input -(j+1), or constant (-100)
  localparam int KONST = -100;
  op_e g_op [NN];
  int  g_a [NN], g_b [NN], g_s [NN];
  word_t g_k [NN];

  task automatic node(input int n, input op_e op, input int a, input int b, input int s = -1, input word_t k = '0);
    g_op[n] = op; g_a[n] = a; g_b[n] = b; g_s[n] = s; g_k[n] = k;
  endtask

  function automatic int P(input int j); return -(j + 1); endfunction

  task automatic build_graph();
    node(0,  OP_SHL, P(5), KONST, -1, 16'd1);
    node(1,  OP_ADD, P(2), 0);
    node(2,  OP_ADD, 1, P(8));
    node(3,  OP_SHL, P(3), KONST, -1, 16'd1);
    node(4,  OP_ADD, P(0), 3);
    node(5,  OP_ADD, 4, P(6));
    node(6,  OP_SUB, 2, 5);                      // gx
    node(7,  OP_SHL, P(7), KONST, -1, 16'd1);
    node(8,  OP_ADD, P(6), 7);
    node(9,  OP_ADD, 8, P(8));
    node(10, OP_SHL, P(1), KONST, -1, 16'd1);
    node(11, OP_ADD, P(0), 10);
    node(12, OP_ADD, 11, P(2));
    node(13, OP_SUB, 9, 12);                     // gy
    node(14, OP_SUB, KONST, 6, -1, 16'd0);       // -gx
    node(15, OP_LT,  6, KONST, -1, 16'd0);       // gx < 0
    node(16, OP_MUX, 14, 6, 15);                 // |gx|
    node(17, OP_SUB, KONST, 13, -1, 16'd0);
    node(18, OP_LT,  13, KONST, -1, 16'd0);
    node(19, OP_MUX, 17, 13, 18);                // |gy|
    node(20, OP_ADD, 16, 19);
    node(21, OP_LT,  KONST, 20, -1, 16'd255);    // 255 < m
    node(22, OP_MUX, KONST, 20, 21, 16'd255);    // min(m, 255)
  endtask

  function automatic opnd_cfg_t src(input int v, input int place[NN]);
    if (v == KONST) return kon();
    if (v < 0) return side(-v - 1);
    return win(place[v]);
  endfunction

  task automatic load(input int place[NN], output cell_cfg_t cfg[64]);
    foreach (cfg[i]) cfg[i] = CELL_IDLE;
    for (int n = 0; n < NN; n++)
      cfg[place[n]] = mkc(g_op[n], src(g_a[n], place), src(g_b[n], place),
                          (g_s[n] >= 0) ? src(g_s[n], place) : side(0), g_k[n]);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ph [NN], pe_ [NN];
    int used [64];
    byte unsigned img [IMG][IMG];
    build_graph();
    // homogeneous: scatter the nodes
    for (int n = 0; n < NN; n++) ph[n] = (n * 37 + 11) % 64;
    // heterogeneous: first free ALU in a row that supports the operation
    foreach (used[i]) used[i] = 0;
    for (int n = 0; n < NN; n++) begin
      pe_[n] = -1;
      for (int i = 0; i < 64 && pe_[n] < 0; i++)
        if (!used[i] && hetero_mask(i / 8)[g_op[n]]) begin pe_[n] = i; used[i] = 1; end
      if (pe_[n] < 0) begin failures++; $display("FAIL no heterogeneous ALU for node %0d", n); end
    end
    load(ph, ch);
    load(pe_, ce);
    // result node 22 through the exit row of its column
    foreach (xrh[i]) begin xrh[i] = '0; xch[i] = '0; xre[i] = '0; xce[i] = '0; end
    foreach (osh[n]) begin osh[n] = '0; ose[n] = '0; end
    xrh[ph[22] % 8] = 3'(ph[22] / 8);  osh[0] = 4'(ph[22] % 8);
    xre[pe_[22] % 8] = 3'(pe_[22] / 8); ose[0] = 4'(pe_[22] % 8);
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
        checks += 2;
        if (oh[0] !== word_t'(m)) begin failures++; $display("FAIL hom (%0d,%0d) got %0d exp %0d", y, x, oh[0], m); end
        if (oe[0] !== word_t'(m)) begin failures++; $display("FAIL het (%0d,%0d) got %0d exp %0d", y, x, oe[0], m); end
      end
    $display("sobel: %0d pixels on 23 ALUs of each 8x8 fabric", (IMG - 2) * (IMG - 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
