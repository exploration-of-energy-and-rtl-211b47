// Self-checking test of the stripe fabric (ICS, 8:1 interconnect, 33% DPs,
// early exits). First a hand-mapped graph, y = (in0 + in1) * 7 - in2 with a
// value carried down by dedicated pass gates, and an ALU result moved down a
// stripe by a dedicated pass gate; then random configurations
// against a behavioural model of the fabric that evaluates stripe by stripe.
module tb_stripe_fabric;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 8, H = 9, WIN = 8, DP_N = 3, WTOP = 8;
  int checks = 0, failures = 0;
  int dp_used = 0, ics_used = 0, exit_used = 0;

  word_t     top [WTOP];
  word_t     in_v [NIN];
  cell_cfg_t cfg [H][W];
  out_cfg_t  ocfg [NOUT];
  word_t     res [H][W];
  word_t     out_v [NOUT];

  stripe_fabric #(.W(W), .H(H), .WIN(WIN), .DP_N(DP_N), .WTOP(WTOP), .EXIT_STRIDE(1)) u_dut (
    .top_i(top), .side_i(in_v), .cfg_i(cfg), .ocfg_i(ocfg), .res_o(res), .out_o(out_v)
  );

  // behavioural model
  word_t m [H][W];
  function automatic word_t msrc(input opnd_cfg_t o, input int r, input int c, input word_t k);
    int wp, p;
    wp = (r == 0) ? WTOP : W;
    case (o.src)
      SRC_WIN: begin
        if (o.idx >= WIN) return '0;
        p = (c + o.idx + wp * WIN - WIN / 2) % wp;
        return (r == 0) ? top[p] : m[r-1][p];
      end
      SRC_SIDE:  return in_v[o.side];
      SRC_CONST: return k;
      default:   return '0;
    endcase
  endfunction
  task automatic model();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        if (c % DP_N == DP_N - 1)
          m[r][c] = (cfg[r][c].op == OP_NOP) ? '0 : msrc(win(cfg[r][c].a.idx), r, c, '0);
        else
          m[r][c] = ref_alu(cfg[r][c].op, msrc(cfg[r][c].a, r, c, cfg[r][c].k),
                            msrc(cfg[r][c].b, r, c, cfg[r][c].k), msrc(cfg[r][c].s, r, c, cfg[r][c].k));
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
    foreach (cfg[r, c]) cfg[r][c] = CELL_IDLE;
    foreach (ocfg[n]) ocfg[n] = oc(0, 0);
    foreach (in_v[j]) in_v[j] = word_t'(j * 3 + 1);
    foreach (top[j]) top[j] = word_t'(1000 + j);
    // hand mapping
    cfg[0][0] = mkc(OP_ADD, side(0), side(1));                          ics_used++;
    cfg[0][1] = mkc(OP_PASS, side(2), side(0));
    cfg[1][0] = mkc(OP_MUL, win(widx(0, 0, WIN, W)), kon(), , 16'd7);
    cfg[1][1] = mkc(OP_PASS, win(widx(1, 1, WIN, W)), kon());
    cfg[2][0] = mkc(OP_SUB, win(widx(0, 0, WIN, W)), win(widx(0, 1, WIN, W)));
    cfg[0][2] = mkc(OP_PASS, win(4), side(0));    // DP: element above
    cfg[1][2] = mkc(OP_PASS, win(4), side(0));    // DP: element above
    ocfg[0] = oc(2, 0);   // early exit at row 3
    ocfg[1] = oc(1, 2);   // value carried by two DPs
    ocfg[2] = oc(0, 0);   // first row is not an exit row
    #1;
    chk("dfg", out_v[0], word_t'((in_v[0] + in_v[1]) * 7 - in_v[2])); exit_used++;
    chk("dp",  out_v[1], top[2]); dp_used++;
    chk("row0", out_v[2], '0);
    cfg[1][2] = CELL_IDLE;
    #1;
    chk("dp idle", out_v[1], '0);
    // a DP moves an ALU result down a stripe: (in0 + in1) from (0, 0) through
    // the DP at (1, 5) to the ALU at (2, 4)
    cfg[1][5] = mkc(OP_PASS, win(widx(5, 0, WIN, W)), kon());
    cfg[2][4] = mkc(OP_SUB, win(widx(4, 5, WIN, W)), side(3));
    ocfg[3] = oc(2, 4);
    #1;
    chk("dp carries alu", out_v[3], word_t'(in_v[0] + in_v[1] - in_v[3])); dp_used++;

    // random configurations
    for (int t = 0; t < 300; t++) begin
      foreach (in_v[j]) in_v[j] = word_t'($urandom);
      foreach (top[j]) top[j] = word_t'($urandom);
      foreach (cfg[r, c]) begin
        cfg[r][c].op = op_e'($urandom_range(0, 14));
        cfg[r][c].a = '{src_e'($urandom_range(0, 2)), 6'($urandom_range(0, 8)), 5'($urandom)};
        cfg[r][c].b = '{src_e'($urandom_range(0, 2)), 6'($urandom_range(0, 8)), 5'($urandom)};
        cfg[r][c].s = '{src_e'($urandom_range(0, 2)), 6'($urandom_range(0, 8)), 5'($urandom)};
        cfg[r][c].k = word_t'($urandom);
        cfg[r][c].phase = 1'b0;
      end
      foreach (ocfg[n]) ocfg[n] = oc($urandom_range(0, H), $urandom_range(0, W));
      #1;
      model();
      foreach (res[r, c]) chk($sformatf("res[%0d][%0d]", r, c), res[r][c], m[r][c]);
      foreach (ocfg[n]) chk("out", out_v[n],
        (ocfg[n].row >= 1 && ocfg[n].row < H && ocfg[n].col < W) ? m[ocfg[n].row][ocfg[n].col] : '0);
    end
    if (dp_used == 0 || ics_used == 0 || exit_used == 0) failures++;
    $display("mechanisms: dp=%0d ics=%0d early_exit=%0d", dp_used, ics_used, exit_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
