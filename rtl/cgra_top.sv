// Collection of the fabric architectures, side by side.
//
// The energy/area exploration proposes several coarse-grained fabric
// organisations that are alternatives to one another rather than parts of one
// chip. This top instantiates each at its default size, with its own ports:
//   split_* : ICS-split fabric, 33% dedicated pass gates, 8x9 + 4x9
//   fold_*  : ICS-fold fabric, 50% dedicated pass gates, 9x9, two cycles
//   mlv_*   : multi-level vertical interconnect, 8x18
//   hi_*    : horizontal interconnect, 11x9
//   fch_*   : fully connected homogeneous, 8x8
//   fce_*   : fully connected heterogeneous, 8x8
//   f3d_*   : three-dimensional, 4x4x4
// All fabrics share the fabric inputs in_i; each has its own configuration
// and outputs. Only the fold fabric is clocked (clk, rst_n, fold_start_i,
// fold_busy_o, fold_done_o); the others are combinational.
module cgra_top
  import cgra_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  word_t     in_i         [NIN],
  // split
  input  cell_cfg_t split_cfg_l_i [9][8],
  input  cell_cfg_t split_cfg_r_i [9][4],
  input  out_cfg_t  split_ocfg_i  [NOUT],
  output word_t     split_out_o   [NOUT],
  // fold
  input  logic      fold_start_i,
  input  cell_cfg_t fold_cfg_i    [9][9],
  input  logic [8:0] fold_sel_i,
  input  out_cfg_t  fold_ocfg_i   [NOUT],
  output logic      fold_busy_o,
  output logic      fold_done_o,
  output word_t     fold_out_o    [NOUT],
  // multi-level vertical interconnect
  input  cell_cfg_t mlv_cfg_i     [18][8],
  input  out_cfg_t  mlv_ocfg_i    [NOUT],
  output word_t     mlv_out_o     [NOUT],
  // horizontal interconnect
  input  cell_cfg_t hi_cfg_i      [9][11],
  input  out_cfg_t  hi_ocfg_i     [NOUT],
  output word_t     hi_out_o      [NOUT],
  // fully connected homogeneous
  input  cell_cfg_t   fch_cfg_i   [64],
  input  logic [2:0]  fch_xrow_i  [8],
  input  logic [2:0]  fch_xcol_i  [8],
  input  logic [3:0]  fch_osel_i  [NOUT],
  output word_t       fch_out_o   [NOUT],
  // fully connected heterogeneous
  input  cell_cfg_t   fce_cfg_i   [64],
  input  logic [2:0]  fce_xrow_i  [8],
  input  logic [2:0]  fce_xcol_i  [8],
  input  logic [3:0]  fce_osel_i  [NOUT],
  output word_t       fce_out_o   [NOUT],
  // three-dimensional
  input  cell_cfg_t   f3d_cfg_i   [64],
  input  logic [1:0]  f3d_xsel_i  [3][4][4],
  input  logic [5:0]  f3d_osel_i  [NOUT],
  output word_t       f3d_out_o   [NOUT]
);

  cgra_split u_split (
    .in_i(in_i), .cfg_l_i(split_cfg_l_i), .cfg_r_i(split_cfg_r_i),
    .ocfg_i(split_ocfg_i), .out_o(split_out_o)
  );

  cgra_fold u_fold (
    .clk(clk), .rst_n(rst_n), .start_i(fold_start_i), .in_i(in_i),
    .cfg_i(fold_cfg_i), .fold_sel_i(fold_sel_i), .ocfg_i(fold_ocfg_i),
    .busy_o(fold_busy_o), .done_o(fold_done_o), .out_o(fold_out_o)
  );

  cgra_mlv u_mlv (
    .in_i(in_i), .cfg_i(mlv_cfg_i), .ocfg_i(mlv_ocfg_i), .out_o(mlv_out_o)
  );

  cgra_hi u_hi (
    .in_i(in_i), .cfg_i(hi_cfg_i), .ocfg_i(hi_ocfg_i), .out_o(hi_out_o)
  );

  cgra_fc #(.HETERO(1'b0)) u_fch (
    .in_i(in_i), .cfg_i(fch_cfg_i), .xrow_sel_i(fch_xrow_i),
    .xcol_sel_i(fch_xcol_i), .osel_i(fch_osel_i), .out_o(fch_out_o)
  );

  cgra_fc #(.HETERO(1'b1)) u_fce (
    .in_i(in_i), .cfg_i(fce_cfg_i), .xrow_sel_i(fce_xrow_i),
    .xcol_sel_i(fce_xcol_i), .osel_i(fce_osel_i), .out_o(fce_out_o)
  );

  cgra_3d u_3d (
    .in_i(in_i), .cfg_i(f3d_cfg_i), .xsel_i(f3d_xsel_i),
    .osel_i(f3d_osel_i), .out_o(f3d_out_o)
  );

endmodule
