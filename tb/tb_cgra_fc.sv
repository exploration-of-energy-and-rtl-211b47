// Self-checking test of the fully connected fabric, homogeneous and
// heterogeneous instances side by side. A zig-zag graph
// y = (in0 + in1) * 3 - in2 is mapped onto ALUs in far-apart positions,
// read through the exit row and the exit column; an ALU that selects its own
// index reads zero; in the heterogeneous fabric an operation that its row
// does not support gives zero.
module tb_cgra_fc;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0, n_zigzag = 0, n_xrow = 0, n_xcol = 0, n_unsup = 0;
  word_t     in_v [NIN];
  cell_cfg_t ch [64], ce [64];
  logic [2:0] xr [8], xc [8];
  logic [3:0] os [NOUT];
  word_t     oh [NOUT], oe [NOUT];

  cgra_fc #(.HETERO(1'b0)) u_hom (.in_i(in_v), .cfg_i(ch), .xrow_sel_i(xr), .xcol_sel_i(xc), .osel_i(os), .out_o(oh));
  cgra_fc #(.HETERO(1'b1)) u_het (.in_i(in_v), .cfg_i(ce), .xrow_sel_i(xr), .xcol_sel_i(xc), .osel_i(os), .out_o(oe));

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ch[i]) ch[i] = CELL_IDLE;
    foreach (ce[i]) ce[i] = CELL_IDLE;
    foreach (xr[i]) xr[i] = '0;
    foreach (xc[i]) xc[i] = '0;
    foreach (os[i]) os[i] = '0;
    // homogeneous: ALU 63 -> ALU 0 -> ALU 10 (bottom right, top left, row 1)
    ch[63] = mkc(OP_ADD, side(0), side(1));
    ch[0]  = mkc(OP_MUL, win(63), kon(), , 16'd3);
    ch[10] = mkc(OP_SUB, win(0), side(2));
    ch[5]  = mkc(OP_PASS, win(5), kon());          // own index: zero
    // heterogeneous: row 0 {ADD,SUB}, row 1 {ADD,MUL}
    ce[0]  = mkc(OP_ADD, side(0), side(1));
    ce[9]  = mkc(OP_MUL, win(0), kon(), , 16'd3);
    ce[2]  = mkc(OP_SUB, win(9), side(2));
    ce[5]  = mkc(OP_MUL, side(0), side(1));         // row 0 has no MUL
    xr[2] = 3'd1;      // exit row entry 2: column 2, row 1 (ALU 10)
    xr[7] = 3'd7;      // exit row entry 7: ALU 63
    xc[0] = 3'd0;      // exit column entry 0: row 0, column 0 (ALU 0)
    xc[1] = 3'd5;      // exit column entry 1: row 0 ... unused
    os[0] = 4'd2;      // homogeneous y via exit row
    os[1] = 4'd8;      // exit column entry 0
    os[2] = 4'd7;      // ALU 63
    os[3] = 4'd13;     // exit column entry 5: row 5, column 0
    for (int t = 0; t < 20; t++) begin
      word_t s;
      foreach (in_v[j]) in_v[j] = word_t'($urandom);
      s = word_t'(in_v[0] + in_v[1]);
      xc[5] = 3'd0; xc[3] = 3'd0;
      #1;
      chk("hom y", oh[0], word_t'(s * 3 - in_v[2])); n_zigzag++; n_xrow++;
      chk("hom xcol", oh[1], word_t'(s * 3));        n_xcol++;
      chk("hom 63", oh[2], s);
      chk("hom row5", oh[3], '0);
      chk("het xcol", oe[1], s);
      // heterogeneous result: ALU 2 is at row 0 column 2 -> exit row entry 2 with row 0
      xr[2] = 3'd0; xc[0] = 3'd5;
      #1;
      chk("het y", oe[0], word_t'(s * 3 - in_v[2]));
      chk("het unsupported", oe[1], '0); n_unsup++;
      chk("hom self", oh[1], '0);
      xr[2] = 3'd1; xc[0] = 3'd0;
    end
    $display("mechanisms: zigzag=%0d exit_row=%0d exit_col=%0d unsupported_op=%0d", n_zigzag, n_xrow, n_xcol, n_unsup);
    if (n_zigzag == 0 || n_xrow == 0 || n_xcol == 0 || n_unsup == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
