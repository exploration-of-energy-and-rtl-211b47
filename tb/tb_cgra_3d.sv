// Self-checking test of the 3D fabric.
// 1. Reach: every ALU is set to output its own tag through its constant; for
//    each cell the test walks all 32 candidate entries and checks that
//    entries 0..3 reach the row of the layer above (or the fabric inputs on
//    the first layer) and that the other entries reach exactly the cells
//    that share a straight line of four with it, each once. Collinearity is
//    worked out here from coordinate differences.
// 2. A layer-to-layer graph, y = (in0 + in1) * 3 - in2, over three layers,
//    read through each of the three exit faces.
module tb_cgra_3d;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 4, NC = 64;
  int checks = 0, failures = 0, n_layer = 0, n_hop = 0, n_face [3];
  word_t      in_v [NIN];
  cell_cfg_t  cfg [NC];
  logic [1:0] xs [3][N][N];
  logic [5:0] os [NOUT];
  word_t      out_v [NOUT];

  cgra_3d u_dut (.in_i(in_v), .cfg_i(cfg), .xsel_i(xs), .osel_i(os), .out_o(out_v));

  function automatic int idx(input int x, input int y, input int z);
    return z * 16 + y * 4 + x;
  endfunction

  function automatic bit collinear(input int i, input int j);
    int p[3], q[3], d[3], m, cnt, ok;
    p[0] = i % 4; p[1] = (i / 4) % 4; p[2] = i / 16;
    q[0] = j % 4; q[1] = (j / 4) % 4; q[2] = j / 16;
    m = 0;
    for (int a = 0; a < 3; a++) begin
      d[a] = q[a] - p[a];
      if (d[a] != 0) begin
        if (m == 0) m = (d[a] < 0) ? -d[a] : d[a];
        else if (((d[a] < 0) ? -d[a] : d[a]) != m) return 1'b0;
      end
    end
    if (m == 0) return 1'b0;
    for (int a = 0; a < 3; a++) d[a] = d[a] / m;
    cnt = 0;
    for (int s = -3; s <= 3; s++) begin
      ok = 1;
      for (int a = 0; a < 3; a++) if (p[a] + s * d[a] < 0 || p[a] + s * d[a] > 3) ok = 0;
      cnt += ok;
    end
    return cnt == 4;
  endfunction

  // read cell i through the bottom (+z) face
  task automatic read_bottom(input int i);
    xs[2][i % 4][(i / 4) % 4] = 2'(i / 16);
    os[0] = 6'(32 + (i % 4) * 4 + (i / 4) % 4);
  endtask

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (in_v[j]) in_v[j] = word_t'(16'h4000 + j);
    foreach (xs[f, a, b]) xs[f][a][b] = '0;
    foreach (os[n]) os[n] = '0;
    // 1. reach
    foreach (cfg[i]) cfg[i] = mkc(OP_PASS, kon(), kon(), , word_t'(16'h1000 + i));
    for (int i = 0; i < NC; i++) begin
      int seen [NC];
      foreach (seen[j]) seen[j] = 0;
      read_bottom(i);
      for (int k = 0; k < 32; k++) begin
        word_t v;
        cfg[i] = mkc(OP_PASS, win(k), kon());
        #1;
        v = out_v[0];
        if (k < 4) begin
          chk($sformatf("layer link %0d/%0d", i, k), v,
              (i / 16 == 0) ? in_v[k] : word_t'(16'h1000 + idx(k, (i / 4) % 4, i / 16 - 1)));
          n_layer++;
        end else if (v != 0) begin
          int j;
          j = int'(v) - 16'h1000;
          checks++;
          if (j < 0 || j >= NC || !collinear(i, j) || seen[j] != 0) begin
            failures++; $display("FAIL cell %0d entry %0d reaches %0d", i, k, j);
          end else seen[j] = 1;
          n_hop++;
        end
      end
      for (int j = 0; j < NC; j++) begin
        checks++;
        if (collinear(i, j) && seen[j] == 0) begin failures++; $display("FAIL cell %0d misses %0d", i, j); end
      end
      cfg[i] = mkc(OP_PASS, kon(), kon(), , word_t'(16'h1000 + i));
    end
    // 2. layer-to-layer graph
    foreach (cfg[i]) cfg[i] = CELL_IDLE;
    cfg[idx(0, 0, 0)] = mkc(OP_ADD, side(0), side(1));
    cfg[idx(2, 0, 1)] = mkc(OP_MUL, win(0), kon(), , 16'd3);    // layer above, row 0, x = 0
    cfg[idx(1, 0, 2)] = mkc(OP_SUB, win(2), side(2));           // layer above, row 0, x = 2
    xs[0][0][2] = 2'd1;  os[1] = 6'(0 * 16 + 0 * 4 + 2);        // +x face, (y=0, z=2)
    xs[1][1][2] = 2'd0;  os[2] = 6'(1 * 16 + 1 * 4 + 2);        // +y face, (x=1, z=2)
    xs[2][2][0] = 2'd1;  os[3] = 6'(2 * 16 + 2 * 4 + 0);        // bottom face, (x=2, y=0)
    for (int t = 0; t < 20; t++) begin
      word_t s;
      foreach (in_v[j]) in_v[j] = word_t'($urandom);
      s = word_t'(in_v[0] + in_v[1]);
      #1;
      chk("face x", out_v[1], word_t'(s * 3 - in_v[2])); n_face[0]++;
      chk("face y", out_v[2], word_t'(s * 3 - in_v[2])); n_face[1]++;
      chk("face z", out_v[3], word_t'(s * 3));           n_face[2]++;
    end
    $display("mechanisms: layer=%0d hop=%0d faces=%0d/%0d/%0d", n_layer, n_hop, n_face[0], n_face[1], n_face[2]);
    if (n_layer == 0 || n_hop == 0 || n_face[0] == 0 || n_face[1] == 0 || n_face[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
