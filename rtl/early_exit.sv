// Early exit rows and the final output ports of a stripe fabric.
//
// Rather than passing a finished result down the remaining stripes with ALUs
// used as pass gates, selected stripes ("early exit rows") are wired to the
// final output ports. Port n reads the ALU at (ocfg_i[n].row, ocfg_i[n].col);
// it reads zero unless that row is an exit row and the column exists.
// Exit rows (0-based r): the last row, and every r >= 1 with
// (r+1) % EXIT_STRIDE == 0. EXIT_STRIDE = 2 gives the alternate rows
// 2, 4, 6 ... of an 18-high fabric, EXIT_STRIDE = 1 every row but the first,
// as the document describes for its 18-high and 9-high fabrics.
// Combinational.
module early_exit
  import cgra_pkg::*;
#(
  parameter int unsigned W           = 8,
  parameter int unsigned H           = 9,
  parameter int unsigned EXIT_STRIDE = 1
) (
  input  word_t    res_i  [H][W],
  input  out_cfg_t ocfg_i [NOUT],
  output word_t    out_o  [NOUT]
);

  function automatic logic is_exit(input int unsigned r);
    return (r == H - 1) || (r >= 1 && ((r + 1) % EXIT_STRIDE) == 0);
  endfunction

  always_comb begin
    for (int n = 0; n < NOUT; n++) begin
      out_o[n] = '0;
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          if (is_exit(r) && int'(ocfg_i[n].row) == r && int'(ocfg_i[n].col) == c)
            out_o[n] = res_i[r][c];
        end
      end
    end
  end

endmodule
