// End-to-end test of all fabrics at their default sizes, through the top.
// One graph per fabric, each using the mechanism its architecture adds:
//   split : left-to-right link, dedicated pass gates, exits from both fabrics
//   fold  : two execution cycles through the fold register
//   mlv   : grandparent and great-grandparent links
//   hi    : left and right neighbour links
//   fch   : zig-zag across the all-to-all multiplexers, exit row and column
//   fce   : same graph on the heterogeneous rows, unsupported operation
//   f3d   : layer-to-layer link, a hopping link along the cube diagonal,
//           the three exit faces
// Inputs from the side, ALU constants and early exits are used throughout.
// Every mechanism is counted and one that never happened is a failure.
module tb_cgra_top;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  typedef enum int {M_ICS, M_CONST, M_EXIT, M_DP, M_SPLIT, M_FOLD, M_GP, M_GGP, M_LEFT, M_RIGHT,
                    M_ZIGZAG, M_XROW, M_XCOL, M_UNSUP, M_LAYER, M_HOP, M_FACE, M_NUM} mech_e;
  int mech [M_NUM];

  logic clk = 0, rst_n = 0;
  word_t     in_v [NIN];
  cell_cfg_t split_l [9][8], split_r [9][4];
  out_cfg_t  split_oc [NOUT];
  word_t     split_o [NOUT];
  logic      fold_start = 0, fold_busy, fold_done;
  cell_cfg_t fold_c [9][9];
  logic [8:0] fold_sel;
  out_cfg_t  fold_oc [NOUT];
  word_t     fold_o [NOUT];
  cell_cfg_t mlv_c [18][8];
  out_cfg_t  mlv_oc [NOUT];
  word_t     mlv_o [NOUT];
  cell_cfg_t hi_c [9][11];
  out_cfg_t  hi_oc [NOUT];
  word_t     hi_o [NOUT];
  cell_cfg_t fch_c [64], fce_c [64], f3d_c [64];
  logic [2:0] fch_xr [8], fch_xc [8], fce_xr [8], fce_xc [8];
  logic [3:0] fch_os [NOUT], fce_os [NOUT];
  word_t     fch_o [NOUT], fce_o [NOUT], f3d_o [NOUT];
  logic [1:0] f3d_xs [3][4][4];
  logic [5:0] f3d_os [NOUT];

  cgra_top u_dut (
    .clk(clk), .rst_n(rst_n), .in_i(in_v),
    .split_cfg_l_i(split_l), .split_cfg_r_i(split_r), .split_ocfg_i(split_oc), .split_out_o(split_o),
    .fold_start_i(fold_start), .fold_cfg_i(fold_c), .fold_sel_i(fold_sel), .fold_ocfg_i(fold_oc),
    .fold_busy_o(fold_busy), .fold_done_o(fold_done), .fold_out_o(fold_o),
    .mlv_cfg_i(mlv_c), .mlv_ocfg_i(mlv_oc), .mlv_out_o(mlv_o),
    .hi_cfg_i(hi_c), .hi_ocfg_i(hi_oc), .hi_out_o(hi_o),
    .fch_cfg_i(fch_c), .fch_xrow_i(fch_xr), .fch_xcol_i(fch_xc), .fch_osel_i(fch_os), .fch_out_o(fch_o),
    .fce_cfg_i(fce_c), .fce_xrow_i(fce_xr), .fce_xcol_i(fce_xc), .fce_osel_i(fce_os), .fce_out_o(fce_o),
    .f3d_cfg_i(f3d_c), .f3d_xsel_i(f3d_xs), .f3d_osel_i(f3d_os), .f3d_out_o(f3d_o)
  );

  always #5 clk = ~clk;

  task automatic chk(input string what, input word_t got, input word_t exp, input mech_e m1, input mech_e m2 = M_NUM);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
    else begin
      mech[m1]++;
      if (m2 != M_NUM) mech[m2]++;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hop_k;

  initial begin
    foreach (split_l[r, c]) split_l[r][c] = CELL_IDLE;
    foreach (split_r[r, c]) split_r[r][c] = CELL_IDLE;
    foreach (fold_c[r, c]) fold_c[r][c] = CELL_IDLE;
    foreach (mlv_c[r, c]) mlv_c[r][c] = CELL_IDLE;
    foreach (hi_c[r, c]) hi_c[r][c] = CELL_IDLE;
    foreach (fch_c[i]) fch_c[i] = CELL_IDLE;
    foreach (fce_c[i]) fce_c[i] = CELL_IDLE;
    foreach (f3d_c[i]) f3d_c[i] = CELL_IDLE;
    foreach (split_oc[n]) begin split_oc[n] = oc(0, 0); fold_oc[n] = oc(0, 0); mlv_oc[n] = oc(0, 0); hi_oc[n] = oc(0, 0); end
    foreach (fch_xr[i]) begin fch_xr[i] = '0; fch_xc[i] = '0; fce_xr[i] = '0; fce_xc[i] = '0; end
    foreach (fch_os[n]) begin fch_os[n] = '0; fce_os[n] = '0; f3d_os[n] = '0; end
    foreach (f3d_xs[f, a, b]) f3d_xs[f][a][b] = '0;
    foreach (in_v[j]) in_v[j] = '0;
    fold_sel = 9'b1;

    // split: (in0 + in1 + 36) * 3 - in2, in2 carried by DPs
    split_l[0][0] = mkc(OP_ADD, side(0), side(1));
    for (int r = 1; r < 9; r++) split_l[r][0] = mkc(OP_ADD, win(widx(0, 0, 8, 8)), kon(), , word_t'(r));
    for (int r = 0; r < 9; r++) split_l[r][2] = mkc(OP_PASS, win(4), kon());
    split_r[0][1] = mkc(OP_MUL, win(widx(1, 0, 8, 8)), kon(), , 16'd3);
    split_r[1][0] = mkc(OP_SUB, win(widx(0, 1, 8, 4)), side(2));
    split_r[0][2] = mkc(OP_PASS, win(4), kon());
    split_r[1][2] = mkc(OP_PASS, win(4), kon());
    split_oc[0] = oc(1, 0, 1'b0);
    split_oc[1] = oc(4, 0, 1'b1);
    split_oc[2] = oc(1, 2, 1'b0);

    // fold: s = in0 + in1 + 36 in cycle 0, s * 5 - in2 in cycle 1
    fold_c[0][0] = mkc(OP_ADD, side(0), side(1), , '0, 1'b0);
    for (int r = 1; r < 9; r++) fold_c[r][0] = mkc(OP_ADD, win(widx(0, 0, 8, 9)), kon(), , word_t'(r), 1'b0);
    fold_c[0][2] = mkc(OP_MUL, win(widx(2, 0, 8, 9)), kon(), , 16'd5, 1'b1);
    fold_c[1][2] = mkc(OP_SUB, win(widx(2, 2, 8, 9)), side(2), , '0, 1'b1);
    fold_oc[0] = oc(1, 2, 1'b1);
    fold_oc[1] = oc(4, 0, 1'b0);

    // multi-level vertical: ((r0 * 3) - r0) ^ r0
    mlv_c[0][3] = mkc(OP_ADD, side(0), side(1));
    mlv_c[1][3] = mkc(OP_MUL, win(widx(3, 3, 5, 8)), kon(), , 16'd3);
    mlv_c[2][3] = mkc(OP_SUB, win(widx(3, 3, 5, 8)), x1());
    mlv_c[3][3] = mkc(OP_XOR, win(widx(3, 3, 5, 8)), x2());
    mlv_oc[0] = oc(3, 3);

    // horizontal: chain inside stripe 1
    hi_c[0][5] = mkc(OP_ADD, side(0), side(1));
    hi_c[0][6] = mkc(OP_MUL, x1(), kon(), , 16'd3);
    hi_c[0][7] = mkc(OP_SUB, x1(), side(2));
    hi_c[0][4] = mkc(OP_XOR, x2(), kon(), , 16'h00ff);
    hi_c[1][7] = mkc(OP_PASS, win(widx(7, 7, 8, 11)), kon());
    hi_c[1][4] = mkc(OP_PASS, win(widx(4, 4, 8, 11)), kon());
    hi_oc[0] = oc(1, 7);
    hi_oc[1] = oc(1, 4);

    // fully connected homogeneous: ALU 63 -> 0 -> 10
    fch_c[63] = mkc(OP_ADD, side(0), side(1));
    fch_c[0]  = mkc(OP_MUL, win(63), kon(), , 16'd3);
    fch_c[10] = mkc(OP_SUB, win(0), side(2));
    fch_xr[2] = 3'd1; fch_os[0] = 4'd2;   // exit row, column 2 -> ALU 10
    fch_xc[0] = 3'd0; fch_os[1] = 4'd8;   // exit column, row 0 -> ALU 0
    // heterogeneous: ALU 0 (ADD) -> 9 (MUL) -> 2 (SUB); ALU 5 asks for MUL in row 0
    fce_c[0] = mkc(OP_ADD, side(0), side(1));
    fce_c[9] = mkc(OP_MUL, win(0), kon(), , 16'd3);
    fce_c[2] = mkc(OP_SUB, win(9), side(2));
    fce_c[5] = mkc(OP_MUL, side(0), side(1));
    fce_xr[2] = 3'd0; fce_os[0] = 4'd2;
    fce_xc[0] = 3'd5; fce_os[1] = 4'd8;

    // 3D: (0,0,0) = in0 + in1; (2,0,1) = 3 * that (layer link);
    // (1,0,2) = that - in2 (layer link); (3,3,3) = (0,0,0) + 1 via the cube diagonal
    f3d_c[0]  = mkc(OP_ADD, side(0), side(1));
    f3d_c[18] = mkc(OP_MUL, win(0), kon(), , 16'd3);
    f3d_c[33] = mkc(OP_SUB, win(2), side(2));
    f3d_xs[0][0][2] = 2'd1; f3d_os[0] = 6'd2;                    // +x face
    f3d_xs[1][1][2] = 2'd0; f3d_os[1] = 6'(16 + 4 + 2);          // +y face
    f3d_xs[2][2][0] = 2'd1; f3d_os[2] = 6'(32 + 8);              // bottom face
    f3d_xs[2][3][3] = 2'd3; f3d_os[3] = 6'(32 + 15);             // bottom face, (3,3,3)

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // find which candidate entry of (3,3,3) is the hopping link to (0,0,0)
    in_v[0] = 16'h1234; in_v[1] = 16'h0001;
    hop_k = -1;
    for (int k = 4; k < 32 && hop_k < 0; k++) begin
      f3d_c[63] = mkc(OP_PASS, win(k), kon());
      #1;
      if (f3d_o[3] == 16'h1235) hop_k = k;
    end
    checks++;
    if (hop_k < 0) begin failures++; $display("FAIL no hopping link from (3,3,3) to (0,0,0)"); end
    else f3d_c[63] = mkc(OP_ADD, win(hop_k), kon(), , 16'd1);

    for (int t = 0; t < 10; t++) begin
      word_t s;
      int lat;
      @(negedge clk);
      foreach (in_v[j]) in_v[j] = word_t'($urandom);
      s = word_t'(in_v[0] + in_v[1]);
      fold_start = 1'b1;
      #1;
      chk("split y", split_o[0], word_t'((s + 36) * 3 - in_v[2]), M_SPLIT, M_ICS);
      chk("split left exit", split_o[1], word_t'(s + 10), M_EXIT, M_CONST);
      chk("split dp", split_o[2], in_v[2], M_DP);
      chk("mlv", mlv_o[0], word_t'((s * 3 - s) ^ s), M_GP, M_GGP);
      chk("hi left", hi_o[0], word_t'(s * 3 - in_v[2]), M_LEFT);
      chk("hi right", hi_o[1], s ^ 16'h00ff, M_RIGHT);
      chk("fch y", fch_o[0], word_t'(s * 3 - in_v[2]), M_ZIGZAG, M_XROW);
      chk("fch xcol", fch_o[1], word_t'(s * 3), M_XCOL);
      chk("fce y", fce_o[0], word_t'(s * 3 - in_v[2]), M_ZIGZAG);
      chk("fce unsupported", fce_o[1], '0, M_UNSUP);
      chk("3d face x", f3d_o[0], word_t'(s * 3 - in_v[2]), M_LAYER, M_FACE);
      chk("3d face y", f3d_o[1], word_t'(s * 3 - in_v[2]), M_FACE);
      chk("3d face z", f3d_o[2], word_t'(s * 3), M_FACE);
      chk("3d hop", f3d_o[3], word_t'(s + 1), M_HOP);
      @(negedge clk);
      fold_start = 1'b0;
      lat = 0;
      while (!fold_done) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("FAIL fold latency %0d", lat); end
      chk("fold y", fold_o[0], word_t'((s + 36) * 5 - in_v[2]), M_FOLD);
      chk("fold exit", fold_o[1], word_t'(s + 10), M_EXIT);
    end
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_e'(m)); end
    end
    $display("mechanisms: ics=%0d const=%0d exit=%0d dp=%0d split=%0d fold=%0d gp=%0d ggp=%0d left=%0d right=%0d",
             mech[M_ICS], mech[M_CONST], mech[M_EXIT], mech[M_DP], mech[M_SPLIT], mech[M_FOLD],
             mech[M_GP], mech[M_GGP], mech[M_LEFT], mech[M_RIGHT]);
    $display("mechanisms: zigzag=%0d xrow=%0d xcol=%0d unsupported=%0d layer=%0d hop=%0d face=%0d",
             mech[M_ZIGZAG], mech[M_XROW], mech[M_XCOL], mech[M_UNSUP], mech[M_LAYER], mech[M_HOP], mech[M_FACE]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
