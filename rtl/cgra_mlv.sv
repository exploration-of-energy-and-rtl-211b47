// Fabric with multi-level vertical interconnect.
//
// A result that is consumed two or three stripes below its producer would
// otherwise need ALUs as pass gates. Here every operand of an ALU has a 4:1
// multiplexer choosing among
//   - the stripe above, through a 5:1 interconnect (parent columns c-2 .. c+2,
//     modulo W), operand source SRC_WIN with idx 0..4,
//   - an input coming from the side (SRC_SIDE) or the ALU's constant,
//   - the grandparent ALU of the same column (SRC_X1),
//   - the great-grandparent ALU of the same column (SRC_X2),
// so an operand can reach 7 ALUs and one fabric input. The first stripe's
// parents are the first W fabric inputs; links above the first stripe read
// zero. Early exits on every second row (2, 4, ... 18). No dedicated pass
// gates. Combinational.
// Defaults: W x H = 8 x 18 as in the document; exit-row spacing, window
// alignment and wrap are this design's choices.
module cgra_mlv
  import cgra_pkg::*;
#(
  parameter int unsigned W           = 8,
  parameter int unsigned H           = 18,
  parameter int unsigned WIN         = 5,
  parameter int unsigned EXIT_STRIDE = 2
) (
  input  word_t     in_i   [NIN],
  input  cell_cfg_t cfg_i  [H][W],
  input  out_cfg_t  ocfg_i [NOUT],
  output word_t     out_o  [NOUT]
);

  word_t res [H][W];

  for (genvar r = 0; r < H; r++) begin : g_row
    word_t par [W];
    word_t y   [W];

    always_comb res[r] = y;

    if (r == 0) begin : g_top
      always_comb for (int j = 0; j < int'(W); j++) par[j] = in_i[j % NIN];
    end else begin : g_mid
      always_comb par = g_row[r-1].y;
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      word_t win [WIN];
      word_t gp, ggp;
      for (genvar k = 0; k < WIN; k++) begin : g_win
        localparam int unsigned IDX = (c + k + W * WIN - WIN / 2) % W;
        assign win[k] = par[IDX];
      end
      if (r >= 2) begin : g_gp
        assign gp = g_row[r-2].y[c];
      end else begin : g_nogp
        assign gp = '0;
      end
      if (r >= 3) begin : g_ggp
        assign ggp = g_row[r-3].y[c];
      end else begin : g_noggp
        assign ggp = '0;
      end
      pe #(.WIN(WIN)) u_pe (
        .cfg_i(cfg_i[r][c]), .win_i(win), .side_i(in_i),
        .x1_i(gp), .x2_i(ggp), .y_o(y[c])
      );
    end
  end

  early_exit #(.W(W), .H(H), .EXIT_STRIDE(EXIT_STRIDE)) u_exit (
    .res_i(res), .ocfg_i(ocfg_i), .out_o(out_o)
  );

endmodule
