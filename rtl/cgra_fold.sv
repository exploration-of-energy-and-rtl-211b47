// ICS-fold fabric.
//
// A tall mapping is cut in two and its lower half is placed in the idle ALUs
// of the upper half, so a W x H fabric runs a graph about 2H stripes deep in
// two execution cycles. Every ALU (and dedicated pass gate) is assigned to one
// cycle by the phase bit of its configuration and is idle (NOP) in the other.
// Cycle 0: the phase-0 elements compute from the fabric inputs; the last
// stripe is captured in the fold register. Cycle 1: the fold multiplexers at
// the top of the first stripe (fold_sel_i[c] = 1) hand the captured values to
// the first stripe, and the phase-1 elements compute. Output port n captures
// its early-exit value at the end of cycle ocfg_i[n].sel.
// Interface: start_i is accepted when busy_o is low; out_o is valid when
// done_o pulses, two clock cycles after start_i. Between runs every element is
// idle. Asynchronous active-low reset.
// Defaults: the document's ICS-fold fabric with 50% DPs (9x9). The fold
// register, the per-element phase bit and the start/done handshake are this
// design's choices; the document gives the two cycles and the fold
// multiplexers.
module cgra_fold
  import cgra_pkg::*;
#(
  parameter int unsigned W    = 9,
  parameter int unsigned H    = 9,
  parameter int unsigned DP_N = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start_i,
  input  word_t     in_i       [NIN],
  input  cell_cfg_t cfg_i      [H][W],
  input  logic      [W-1:0] fold_sel_i,
  input  out_cfg_t  ocfg_i     [NOUT],
  output logic      busy_o,
  output logic      done_o,
  output word_t     out_o      [NOUT]
);

  logic      phase_q;
  word_t     fb_q   [W];
  word_t     top    [W];
  cell_cfg_t cfg_eff[H][W];
  word_t     res    [H][W];
  word_t     xout   [NOUT];

  // Only the elements of the running cycle are active.
  always_comb
    for (int r = 0; r < int'(H); r++)
      for (int c = 0; c < int'(W); c++)
        cfg_eff[r][c] = (busy_o && cfg_i[r][c].phase == phase_q) ? cfg_i[r][c] : CELL_IDLE;

  // Fold multiplexers at the top of the first stripe.
  always_comb
    for (int c = 0; c < int'(W); c++) top[c] = fold_sel_i[c] ? fb_q[c] : in_i[c % NIN];

  stripe_fabric #(.W(W), .H(H), .WIN(8), .DP_N(DP_N), .WTOP(W), .EXIT_STRIDE(1)) u_fab (
    .top_i(top), .side_i(in_i), .cfg_i(cfg_eff), .ocfg_i(ocfg_i),
    .res_o(res), .out_o(xout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_o  <= 1'b0;
      done_o  <= 1'b0;
      phase_q <= 1'b0;
      for (int c = 0; c < int'(W); c++) fb_q[c] <= '0;
      for (int n = 0; n < NOUT; n++) out_o[n] <= '0;
    end else begin
      done_o <= 1'b0;
      if (!busy_o) begin
        if (start_i) begin
          busy_o  <= 1'b1;
          phase_q <= 1'b0;
        end
      end else begin
        for (int n = 0; n < NOUT; n++)
          if (ocfg_i[n].sel == phase_q) out_o[n] <= xout[n];
        if (!phase_q) begin
          for (int c = 0; c < int'(W); c++) fb_q[c] <= res[H-1][c];
          phase_q <= 1'b1;
        end else begin
          phase_q <= 1'b0;
          busy_o  <= 1'b0;
          done_o  <= 1'b1;
        end
      end
    end
  end

endmodule
