// Self-checking test of the processing element: random operations with every
// operand source (window entry, side input, constant, both extra links,
// out-of-range window index) against the reference ALU.
module tb_pe;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int WIN = 5;
  int checks = 0, failures = 0;
  cell_cfg_t cfg;
  word_t win_v [WIN];
  word_t side_v [NIN];
  word_t x1v, x2v, y;

  pe #(.WIN(WIN)) u_dut (.cfg_i(cfg), .win_i(win_v), .side_i(side_v), .x1_i(x1v), .x2_i(x2v), .y_o(y));

  function automatic word_t src_val(input opnd_cfg_t c);
    case (c.src)
      SRC_WIN:   return (c.idx < WIN) ? win_v[c.idx] : '0;
      SRC_SIDE:  return side_v[c.side];
      SRC_CONST: return cfg.k;
      SRC_X1:    return x1v;
      SRC_X2:    return x2v;
      default:   return '0;
    endcase
  endfunction

  function automatic opnd_cfg_t rnd_opnd();
    opnd_cfg_t c;
    c.src  = src_e'($urandom_range(0, 4));
    c.idx  = 6'($urandom_range(0, WIN));   // WIN itself is out of range
    c.side = 5'($urandom);
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      foreach (win_v[j]) win_v[j] = word_t'($urandom);
      foreach (side_v[j]) side_v[j] = word_t'($urandom);
      x1v = word_t'($urandom); x2v = word_t'($urandom);
      cfg.op = op_e'($urandom_range(0, 14));
      cfg.a = rnd_opnd(); cfg.b = rnd_opnd(); cfg.s = rnd_opnd();
      cfg.k = word_t'($urandom); cfg.phase = 1'b0;
      #1;
      checks++;
      if (y !== ref_alu(cfg.op, src_val(cfg.a), src_val(cfg.b), src_val(cfg.s))) begin
        failures++;
        $display("FAIL i=%0d op=%0d y=%h", i, cfg.op, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
