// Self-checking test of the ICS-fold fabric: an 11-stripe-deep graph on a
// 9-stripe fabric. Cycle 0 computes s = in0 + in1 + 1 + 2 + ... + 8 down
// column 0 to the last stripe; cycle 1 takes it back through the fold multiplexer and computes
// (in0 + in1) * 5 - in2 in stripes 1 and 2. Checks the values, that idle
// elements of the other cycle give zero, the two-cycle latency, and that
// start is ignored while busy.
module tb_cgra_fold;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  localparam int W = 9, H = 9;
  int checks = 0, failures = 0, n_fold = 0, n_exit0 = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  word_t     in_v [NIN];
  cell_cfg_t cfg [H][W];
  logic [W-1:0] fsel;
  out_cfg_t  ocfg [NOUT];
  word_t     out_v [NOUT];

  cgra_fold u_dut (.clk(clk), .rst_n(rst_n), .start_i(start), .in_i(in_v), .cfg_i(cfg),
                   .fold_sel_i(fsel), .ocfg_i(ocfg), .busy_o(busy), .done_o(done), .out_o(out_v));

  always #5 clk = ~clk;

  task automatic chk(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%h exp=%h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    foreach (cfg[r, c]) cfg[r][c] = CELL_IDLE;
    foreach (ocfg[n]) ocfg[n] = oc(0, 0);
    foreach (in_v[j]) in_v[j] = '0;
    fsel = '0;
    fsel[0] = 1'b1;
    // cycle 0: column 0 (columns 1, 3, 5, 7 are DPs)
    cfg[0][0] = mkc(OP_ADD, side(0), side(1), , '0, 1'b0);
    for (int r = 1; r < H; r++) cfg[r][0] = mkc(OP_ADD, win(widx(0, 0, 8, W)), kon(), , word_t'(r), 1'b0);
    // cycle 1: column 2 reads the fold register (top column 0)
    cfg[0][2] = mkc(OP_MUL, win(widx(2, 0, 8, W)), kon(), , 16'd5, 1'b1);
    cfg[1][2] = mkc(OP_SUB, win(widx(2, 2, 8, W)), side(2), , '0, 1'b1);
    ocfg[0] = oc(1, 2, 1'b1);   // final result, captured in cycle 1
    ocfg[1] = oc(4, 0, 1'b0);   // early exit during cycle 0
    ocfg[2] = oc(8, 0, 1'b1);   // column 0 is idle during cycle 1
    ocfg[3] = oc(1, 2, 1'b0);   // column 2 is idle during cycle 0
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      foreach (in_v[j]) in_v[j] = word_t'($urandom);
      start = 1'b1;
      @(negedge clk);            // start was taken at the rising edge
      lat = 0;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy not set"); end
      // start stays high: it must be ignored while busy
      while (!done) begin @(negedge clk); lat++; end
      start = 1'b0;
      checks++;
      if (lat != 2) begin failures++; $display("FAIL latency %0d", lat); end
      chk("y", out_v[0], word_t'((in_v[0] + in_v[1] + 36) * 5 - in_v[2])); n_fold++;
      chk("exit c0", out_v[1], word_t'(in_v[0] + in_v[1] + 10));           n_exit0++;
      chk("idle c1", out_v[2], '0);
      chk("idle c0", out_v[3], '0);
      @(negedge clk);
      checks++;
      if (busy || done) begin failures++; $display("FAIL fabric still busy"); end
    end
    $display("mechanisms: fold=%0d exit_cycle0=%0d", n_fold, n_exit0);
    if (n_fold == 0 || n_exit0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
