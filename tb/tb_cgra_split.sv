// Self-checking test of the ICS-split fabric: a graph that starts in the left
// fabric and finishes in the right one, y = (in0 + in1 + 36) * 3 - in2, a value
// carried by dedicated pass gates through both fabrics, and early exits from
// each fabric. Twenty random input sets.
module tb_cgra_split;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int WL = 8, HL = 9, WR = 4, HR = 9;
  int checks = 0, failures = 0;
  int n_link = 0, n_dp = 0, n_exit_l = 0, n_exit_r = 0;
  word_t     in_v [NIN];
  cell_cfg_t cl [HL][WL];
  cell_cfg_t cr [HR][WR];
  out_cfg_t  ocfg [NOUT];
  word_t     out_v [NOUT];

  cgra_split u_dut (.in_i(in_v), .cfg_l_i(cl), .cfg_r_i(cr), .ocfg_i(ocfg), .out_o(out_v));

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
    foreach (cl[r, c]) cl[r][c] = CELL_IDLE;
    foreach (cr[r, c]) cr[r][c] = CELL_IDLE;
    foreach (ocfg[n]) ocfg[n] = oc(0, 0);
    // left: in0 + in1 in column 0; stripe r adds r on the way down (+36 in all)
    cl[0][0] = mkc(OP_ADD, side(0), side(1));
    for (int r = 1; r < HL; r++) cl[r][0] = mkc(OP_ADD, win(widx(0, 0, 8, WL)), kon(), , word_t'(r));
    // left column 2 is a DP column: carry top[2] = in2 down
    for (int r = 0; r < HL; r++) cl[r][2] = mkc(OP_PASS, win(4), kon());
    // right: multiply the left result by 3, then subtract in2 from the side
    cr[0][1] = mkc(OP_MUL, win(widx(1, 0, 8, WL)), kon(), , 16'd3);
    cr[1][0] = mkc(OP_SUB, win(widx(0, 1, 8, WR)), side(2));
    cr[0][2] = mkc(OP_PASS, win(4), kon());   // DP
    cr[1][2] = mkc(OP_PASS, win(4), kon());   // DP
    ocfg[0] = oc(1, 0, 1'b0);   // right fabric, row 2
    ocfg[1] = oc(4, 0, 1'b1);   // left fabric, early exit at row 5
    ocfg[2] = oc(1, 2, 1'b0);   // value carried by 11 DPs
    ocfg[3] = oc(0, 1, 1'b0);   // first row: not an exit
    for (int t = 0; t < 20; t++) begin
      foreach (in_v[j]) in_v[j] = word_t'($urandom);
      #1;
      chk("y", out_v[0], word_t'((in_v[0] + in_v[1] + 36) * 3 - in_v[2])); n_link++; n_exit_r++;
      chk("left exit", out_v[1], word_t'(in_v[0] + in_v[1] + 10));          n_exit_l++;
      chk("dp chain", out_v[2], in_v[2]);                               n_dp++;
      chk("row0", out_v[3], '0);
    end
    $display("mechanisms: link=%0d dp=%0d exit_left=%0d exit_right=%0d", n_link, n_dp, n_exit_l, n_exit_r);
    if (n_link == 0 || n_dp == 0 || n_exit_l == 0 || n_exit_r == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
