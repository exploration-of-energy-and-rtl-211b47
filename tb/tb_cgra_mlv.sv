// Self-checking test of the multi-level vertical interconnect fabric:
// r0 = in0 + in1, r1 = r0 * 3, r2 = r1 - r0 (grandparent link),
// r3 = r2 ^ r0 (great-grandparent link), read through the early exit of row 4;
// links above the first stripe read zero; even (1-based odd) rows are not exits.
module tb_cgra_mlv;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, H = 18;
  int checks = 0, failures = 0, n_gp = 0, n_ggp = 0;
  word_t     in_v [NIN];
  cell_cfg_t cfg [H][W];
  out_cfg_t  ocfg [NOUT];
  word_t     out_v [NOUT];

  cgra_mlv u_dut (.in_i(in_v), .cfg_i(cfg), .ocfg_i(ocfg), .out_o(out_v));

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
    foreach (cfg[r, c]) cfg[r][c] = CELL_IDLE;
    foreach (ocfg[n]) ocfg[n] = oc(0, 0);
    cfg[0][3] = mkc(OP_ADD, side(0), side(1));
    cfg[1][3] = mkc(OP_MUL, win(widx(3, 3, 5, W)), kon(), , 16'd3);
    cfg[2][3] = mkc(OP_SUB, win(widx(3, 3, 5, W)), x1());
    cfg[3][3] = mkc(OP_XOR, win(widx(3, 3, 5, W)), x2());
    cfg[1][4] = mkc(OP_OR, x1(), x2(), , '0);         // no grandparent in row 2
    cfg[1][5] = mkc(OP_ADD, x2(), kon(), , 16'd9);    // no great-grandparent in row 2
    cfg[17][7] = mkc(OP_ADD, side(3), kon(), , 16'd1); // last row
    ocfg[0] = oc(3, 3);
    ocfg[1] = oc(1, 4);
    ocfg[2] = oc(2, 3);   // row 3 (1-based): not an exit row
    ocfg[3] = oc(1, 5);
    ocfg[4] = oc(17, 7);
    ocfg[5] = oc(1, 3);
    for (int t = 0; t < 20; t++) begin
      word_t r0;
      foreach (in_v[j]) in_v[j] = word_t'($urandom);
      r0 = word_t'(in_v[0] + in_v[1]);
      #1;
      chk("chain", out_v[0], word_t'((r0 * 3 - r0) ^ r0)); n_gp++; n_ggp++;
      chk("no gp", out_v[1], '0);
      chk("not exit", out_v[2], '0);
      chk("no ggp", out_v[3], 16'd9);
      chk("last", out_v[4], word_t'(in_v[3] + 1));
      chk("row2", out_v[5], word_t'(r0 * 3));
    end
    $display("mechanisms: grandparent=%0d great_grandparent=%0d", n_gp, n_ggp);
    if (n_gp == 0 || n_ggp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
