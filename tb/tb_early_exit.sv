// Self-checking test of the early exit network: every (row, column) pair is
// read through every port; exit rows must return the ALU's value, other rows
// and columns past the fabric zero. Both exit-row spacings are tested.
module tb_early_exit;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 5, H = 8;
  int checks = 0, failures = 0;
  word_t    res [H][W];
  out_cfg_t ocfg [NOUT];
  word_t    o1 [NOUT], o2 [NOUT];

  early_exit #(.W(W), .H(H), .EXIT_STRIDE(1)) u_s1 (.res_i(res), .ocfg_i(ocfg), .out_o(o1));
  early_exit #(.W(W), .H(H), .EXIT_STRIDE(2)) u_s2 (.res_i(res), .ocfg_i(ocfg), .out_o(o2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) res[r][c] = word_t'(100 * (r + 1) + c);
    for (int r = 0; r < 10; r++) begin
      for (int c = 0; c < W + 2; c++) begin
        for (int n = 0; n < NOUT; n++) ocfg[n] = oc(r, (c + n) % (W + 2));
        #1;
        for (int n = 0; n < NOUT; n++) begin
          int cc;
          word_t e1, e2;
          cc = (c + n) % (W + 2);
          // stride 1: rows 2..H (1-based); stride 2: rows 2,4,6,8 (1-based)
          e1 = (r >= 1 && r < H && cc < W) ? word_t'(100 * (r + 1) + cc) : '0;
          e2 = (r < H && cc < W && (r % 2 == 1)) ? word_t'(100 * (r + 1) + cc) : '0;
          checks += 2;
          if (o1[n] !== e1) begin failures++; $display("FAIL s1 r=%0d c=%0d got %0d exp %0d", r, cc, o1[n], e1); end
          if (o2[n] !== e2) begin failures++; $display("FAIL s2 r=%0d c=%0d got %0d exp %0d", r, cc, o2[n], e2); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
