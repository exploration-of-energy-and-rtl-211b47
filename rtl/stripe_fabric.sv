// Stripe-based fabric with inputs coming from the side (ICS).
//
// H computational stripes of W elements each. Between two stripes an
// interconnection stripe gives every operand of every ALU an 8:1 (WIN:1)
// choice among the results of the stripe above: operand window index k of the
// ALU in column c reads parent column (c + k - WIN/2) mod WP, WP being the
// width of the stripe above. The first stripe's parent is top_i (WTOP wide).
// Operands can also come straight from the fabric inputs (side_i, the ICS
// idea) or from the ALU's constant, so inputs and constants need no pass
// ALUs. With DP_N > 0 the last column of every group of DP_N is a dedicated
// pass gate: it forwards one result of the stripe above, chosen through the
// same 8:1 window by the a.idx field of its configuration (entry WIN/2 is the
// element straight above), so an ALU result can be moved down a stripe
// without spending an ALU. DP_N = 2, 3, 4 are the 50%, 33% and 25% DP
// variants, 0 means none. A DP is active when its configuration's op is not
// NOP; an idle DP outputs zero. Final outputs leave through early exit rows.
// All ALU results are also brought out on res_o, for the split and fold
// fabrics. Purely combinational: one pass through the fabric per evaluation.
// Stripes, interconnect, ICS, DPs and early exits follow the document; the
// window alignment and modulo wrap are this design's choices.
module stripe_fabric
  import cgra_pkg::*;
#(
  parameter int unsigned W           = 8,
  parameter int unsigned H           = 9,
  parameter int unsigned WIN         = 8,
  parameter int unsigned DP_N        = 3,
  parameter int unsigned WTOP        = 8,
  parameter int unsigned EXIT_STRIDE = 1
) (
  input  word_t     top_i  [WTOP],
  input  word_t     side_i [NIN],
  input  cell_cfg_t cfg_i  [H][W],
  input  out_cfg_t  ocfg_i [NOUT],
  output word_t     res_o  [H][W],
  output word_t     out_o  [NOUT]
);

  for (genvar r = 0; r < H; r++) begin : g_row
    localparam int unsigned WP = (r == 0) ? WTOP : W;
    word_t par [WP];
    word_t y   [W];   // this stripe's results

    always_comb res_o[r] = y;

    if (r == 0) begin : g_top
      always_comb par = top_i;
    end else begin : g_mid
      always_comb for (int j = 0; j < int'(WP); j++) par[j] = g_row[r-1].y[j];
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      word_t win [WIN];
      for (genvar k = 0; k < WIN; k++) begin : g_win
        localparam int unsigned IDX = (c + k + WP * WIN - WIN / 2) % WP;
        assign win[k] = par[IDX];
      end
      if (DP_N != 0 && (c % DP_N) == DP_N - 1) begin : g_dp
        // the DP's single input is window entry a.idx of its configuration
        localparam int unsigned IW = (WIN > 1) ? $clog2(WIN) : 1;
        word_t d;
        always_comb
          d = (int'(cfg_i[r][c].a.idx) < int'(WIN)) ? win[cfg_i[r][c].a.idx[IW-1:0]] : '0;
        dp_gate u_dp (
          .d_i(d), .idle_i(cfg_i[r][c].op == OP_NOP), .q_o(y[c])
        );
      end else begin : g_alu
        pe #(.WIN(WIN)) u_pe (
          .cfg_i(cfg_i[r][c]), .win_i(win), .side_i(side_i),
          .x1_i('0), .x2_i('0), .y_o(y[c])
        );
      end
    end
  end

  early_exit #(.W(W), .H(H), .EXIT_STRIDE(EXIT_STRIDE)) u_exit (
    .res_i(res_o), .ocfg_i(ocfg_i), .out_o(out_o)
  );

endmodule
