// Self-checking test of the horizontal interconnect fabric: a dependent chain
// inside the first stripe, c5 = in0 + in1, c6 = c5 * 3 (left link),
// c7 = c6 - in2 (left link), c4 = c5 ^ 0x00ff (right link), read through
// pass ALUs of the second stripe; the end ALUs see zero from the missing side.
module tb_cgra_hi;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 11, H = 9;
  int checks = 0, failures = 0, n_left = 0, n_right = 0;
  word_t     in_v [NIN];
  cell_cfg_t cfg [H][W];
  out_cfg_t  ocfg [NOUT];
  word_t     out_v [NOUT];

  cgra_hi u_dut (.in_i(in_v), .cfg_i(cfg), .ocfg_i(ocfg), .out_o(out_v));

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
    cfg[0][5] = mkc(OP_ADD, side(0), side(1));
    cfg[0][6] = mkc(OP_MUL, x1(), kon(), , 16'd3);
    cfg[0][7] = mkc(OP_SUB, x1(), side(2));
    cfg[0][4] = mkc(OP_XOR, x2(), kon(), , 16'h00ff);
    cfg[1][7] = mkc(OP_PASS, win(widx(7, 7, 8, W)), kon());
    cfg[1][4] = mkc(OP_PASS, win(widx(4, 4, 8, W)), kon());
    cfg[1][0] = mkc(OP_ADD, x1(), kon(), , 16'd4);    // no left neighbour
    cfg[1][10] = mkc(OP_ADD, x2(), kon(), , 16'd6);   // no right neighbour
    ocfg[0] = oc(1, 7);
    ocfg[1] = oc(1, 4);
    ocfg[2] = oc(1, 0);
    ocfg[3] = oc(1, 10);
    for (int t = 0; t < 20; t++) begin
      word_t c5;
      foreach (in_v[j]) in_v[j] = word_t'($urandom);
      c5 = word_t'(in_v[0] + in_v[1]);
      #1;
      chk("left chain", out_v[0], word_t'(c5 * 3 - in_v[2])); n_left++;
      chk("right link", out_v[1], c5 ^ 16'h00ff);              n_right++;
      chk("left end", out_v[2], 16'd4);
      chk("right end", out_v[3], 16'd6);
    end
    $display("mechanisms: left=%0d right=%0d", n_left, n_right);
    if (n_left == 0 || n_right == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
