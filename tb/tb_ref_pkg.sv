// Reference models and configuration helpers for the fabric testbenches.
//
// ref_alu is a behavioural restatement of the ALU's operation table, written
// from the operation list rather than from the RTL. The opnd/cell helpers
// build configuration words so that a testbench reads like a mapping of a
// data-flow graph: mkc(op, a, b, s, k).
package tb_ref_pkg;
  import cgra_pkg::*;

  function automatic word_t ref_alu(input int op, input word_t a, input word_t b, input word_t s);
    int sh;
    sh = b % 16;
    case (op)
      1:  return a;
      2:  return word_t'(a + b);
      3:  return word_t'(a - b);
      4:  return word_t'(32'(a) * 32'(b));
      5:  return a & b;
      6:  return a | b;
      7:  return a ^ b;
      8:  return ~a;
      9:  return word_t'(32'(a) << sh);
      10: return a >> sh;
      11: return word_t'(32'($signed(a)) >>> sh);
      12: return ($signed(a) < $signed(b)) ? 16'd1 : 16'd0;
      13: return (a == b) ? 16'd1 : 16'd0;
      14: return (s != 0) ? a : b;
      default: return 16'd0;
    endcase
  endfunction

  function automatic opnd_cfg_t win(input int idx);
    return '{src: SRC_WIN, idx: 6'(idx), side: 5'd0};
  endfunction
  function automatic opnd_cfg_t side(input int n);
    return '{src: SRC_SIDE, idx: 6'd0, side: 5'(n)};
  endfunction
  function automatic opnd_cfg_t kon();
    return '{src: SRC_CONST, idx: 6'd0, side: 5'd0};
  endfunction
  function automatic opnd_cfg_t x1();
    return '{src: SRC_X1, idx: 6'd0, side: 5'd0};
  endfunction
  function automatic opnd_cfg_t x2();
    return '{src: SRC_X2, idx: 6'd0, side: 5'd0};
  endfunction

  function automatic cell_cfg_t mkc(input op_e op, input opnd_cfg_t a, input opnd_cfg_t b,
                                     input opnd_cfg_t s = '{SRC_SIDE, 6'd0, 5'd0},
                                     input word_t k = '0, input logic phase = 1'b0);
    cell_cfg_t c;
    c.op = op; c.a = a; c.b = b; c.s = s; c.k = k; c.phase = phase;
    return c;
  endfunction

  function automatic out_cfg_t oc(input int row, input int col, input logic sel = 1'b0);
    return '{row: 5'(row), col: 5'(col), sel: sel};
  endfunction

  // Window index that makes ALU column c read parent column p through a
  // WIN:1 window over a parent stripe WP wide.
  function automatic int widx(input int c, input int p, input int win_n, input int wp);
    for (int k = 0; k < win_n; k++)
      if (((c + k + wp * win_n - win_n / 2) % wp) == p) return k;
    return -1;
  endfunction

endpackage
