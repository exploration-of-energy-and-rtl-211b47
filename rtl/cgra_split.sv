// ICS-split fabric.
//
// Data-flow graphs of the target domain are wide in the middle and narrow at
// the ends, so a single W x H fabric leaves many ALUs idle. The split fabric
// replaces it with two smaller stripe fabrics that work together: a left
// fabric (WL x HL) that takes the fabric inputs, and a narrower right fabric
// (WR x HR) whose first stripe reads the left fabric's last stripe through an
// 8:1 interconnection stripe. Both fabrics have inputs coming from the side,
// 1-in-DP_N dedicated pass gates and early exit rows on every row but the
// first. Output port n takes its early-exit value from the left fabric when
// ocfg_i[n].sel is 1 and from the right fabric otherwise.
// Combinational, one pass per evaluation.
// The defaults are the document's ICS-split fabric with 33% DPs (8x9 and
// 4x9); the link from the left's last stripe and the per-port fabric choice
// are this design's reading of how the two fabrics are joined.
module cgra_split
  import cgra_pkg::*;
#(
  parameter int unsigned WL   = 8,
  parameter int unsigned HL   = 9,
  parameter int unsigned WR   = 4,
  parameter int unsigned HR   = 9,
  parameter int unsigned DP_N = 3
) (
  input  word_t     in_i    [NIN],
  input  cell_cfg_t cfg_l_i [HL][WL],
  input  cell_cfg_t cfg_r_i [HR][WR],
  input  out_cfg_t  ocfg_i  [NOUT],
  output word_t     out_o   [NOUT]
);

  word_t top_l [WL];
  word_t res_l [HL][WL];
  word_t res_r [HR][WR];
  word_t out_l [NOUT];
  word_t out_r [NOUT];

  always_comb for (int j = 0; j < int'(WL); j++) top_l[j] = in_i[j % NIN];

  stripe_fabric #(.W(WL), .H(HL), .WIN(8), .DP_N(DP_N), .WTOP(WL), .EXIT_STRIDE(1)) u_left (
    .top_i(top_l), .side_i(in_i), .cfg_i(cfg_l_i), .ocfg_i(ocfg_i),
    .res_o(res_l), .out_o(out_l)
  );

  stripe_fabric #(.W(WR), .H(HR), .WIN(8), .DP_N(DP_N), .WTOP(WL), .EXIT_STRIDE(1)) u_right (
    .top_i(res_l[HL-1]), .side_i(in_i), .cfg_i(cfg_r_i), .ocfg_i(ocfg_i),
    .res_o(res_r), .out_o(out_r)
  );

  always_comb
    for (int n = 0; n < NOUT; n++) out_o[n] = ocfg_i[n].sel ? out_l[n] : out_r[n];

endmodule
