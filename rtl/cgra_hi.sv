// Fabric with horizontal interconnect.
//
// Besides the stripe above, an ALU can take an operand from its left or right
// neighbour in the same stripe, so a short chain of dependent operations can
// sit in one stripe and the fabric gets shorter. Every operand has a 4:1
// multiplexer choosing among
//   - the stripe above through an 8:1 interconnect (parent columns c-4 .. c+3,
//     modulo W), operand source SRC_WIN,
//   - an input coming from the side (SRC_SIDE) or the ALU's constant,
//   - the left neighbour (SRC_X1) and the right neighbour (SRC_X2);
// the selector operand of the multiplexer operation has the same choice.
// The end ALUs of a stripe read zero from the missing neighbour. The first
// stripe's parents are the first W fabric inputs. Early exits on every row but
// the first. Combinational.
// Circuit note: neighbour links form structural combinational loops along
// each stripe (c -> c+1 -> c). They are inherent to the architecture; a valid
// configuration, the mapping of an acyclic data-flow graph, never closes one.
// Defaults: W x H = 11 x 9 as in the document; exit rows, window alignment and
// the non-wrapping ends are this design's choices.
module cgra_hi
  import cgra_pkg::*;
#(
  parameter int unsigned W           = 11,
  parameter int unsigned H           = 9,
  parameter int unsigned WIN         = 8,
  parameter int unsigned EXIT_STRIDE = 1
) (
  input  word_t     in_i   [NIN],
  input  cell_cfg_t cfg_i  [H][W],
  input  out_cfg_t  ocfg_i [NOUT],
  output word_t     out_o  [NOUT]
);

  word_t res [H][W];

  for (genvar r = 0; r < H; r++) begin : g_row
    word_t par [W];

    if (r == 0) begin : g_top
      always_comb for (int j = 0; j < int'(W); j++) par[j] = in_i[j % NIN];
    end else begin : g_mid
      for (genvar j = 0; j < W; j++) begin : g_par
        assign par[j] = g_row[r-1].g_col[j].y;
      end
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      word_t win [WIN];
      word_t left, right, y;
      for (genvar k = 0; k < WIN; k++) begin : g_win
        localparam int unsigned IDX = (c + k + W * WIN - WIN / 2) % W;
        assign win[k] = par[IDX];
      end
      if (c > 0) begin : g_l
        assign left = g_col[c-1].y;
      end else begin : g_nol
        assign left = '0;
      end
      if (c < W - 1) begin : g_r
        assign right = g_col[c+1].y;
      end else begin : g_nor
        assign right = '0;
      end
      pe #(.WIN(WIN)) u_pe (
        .cfg_i(cfg_i[r][c]), .win_i(win), .side_i(in_i),
        .x1_i(left), .x2_i(right), .y_o(y)
      );
      assign res[r][c] = y;
    end
  end

  early_exit #(.W(W), .H(H), .EXIT_STRIDE(EXIT_STRIDE)) u_exit (
    .res_i(res), .ocfg_i(ocfg_i), .out_o(out_o)
  );

endmodule
