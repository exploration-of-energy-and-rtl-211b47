// Fully connected fabric (homogeneous or heterogeneous).
//
// The W x H ALUs are placed in a square but are not organised in stripes:
// every operand of every ALU has a 64:1 multiplexer over the other W*H-1 ALUs
// plus one input coming from the side, so data can follow any zig-zag path and
// no ALU is ever spent as a pass gate. ALU i = r*W + c. With operand source
// SRC_WIN, idx selects the producing ALU; idx = i (an ALU cannot use its own
// result) and idx >= W*H read zero. The side input of the multiplexer is
// operand source SRC_SIDE; the ALU constant remains available too.
// HETERO = 0: every ALU has all 15 operations. HETERO = 1: the ALUs of row r
// implement only the two operations of cgra_pkg::hetero_mask(r) plus NOP,
// trading operations per ALU for interconnect; an unsupported operation
// yields zero.
// Early exits: exit-row entry c takes the ALU in column c and row
// xrow_sel_i[c]; exit-column entry r takes the ALU in row r and column
// xcol_sel_i[r]. Final port n reads exit-row entry osel_i[n] when
// osel_i[n] < W, else exit-column entry osel_i[n]-W.
// Combinational. Circuit note: the all-to-all multiplexers are structural
// combinational loops by construction; a configuration (an acyclic data-flow
// graph) must not close one.
// Defaults: 8 x 8 and the 64:1 multiplexers are the document's; the operation
// pairs of the heterogeneous rows and the exit-port encoding are this design's
// choices.
module cgra_fc
  import cgra_pkg::*;
#(
  parameter int unsigned W      = 8,
  parameter int unsigned H      = 8,
  parameter bit          HETERO = 1'b0
) (
  input  word_t                 in_i       [NIN],
  input  cell_cfg_t             cfg_i      [H*W],
  input  logic [$clog2(H)-1:0]  xrow_sel_i [W],
  input  logic [$clog2(W)-1:0]  xcol_sel_i [H],
  input  logic [$clog2(W+H)-1:0] osel_i    [NOUT],
  output word_t                 out_o      [NOUT]
);

  localparam int unsigned N = W * H;

  for (genvar i = 0; i < N; i++) begin : g_alu
    localparam int unsigned ROW = i / W;
    localparam logic [NOPS-1:0] MASK = HETERO ? hetero_mask(ROW) : OPMASK_ALL;
    word_t win [N];
    word_t y;
    for (genvar j = 0; j < N; j++) begin : g_src
      if (j == i) begin : g_self
        assign win[j] = '0;
      end else begin : g_other
        assign win[j] = g_alu[j].y;
      end
    end
    pe #(.WIN(N), .OP_MASK(MASK)) u_pe (
      .cfg_i(cfg_i[i]), .win_i(win), .side_i(in_i),
      .x1_i('0), .x2_i('0), .y_o(y)
    );
  end

  word_t xrow [W];
  word_t xcol [H];

  for (genvar c = 0; c < W; c++) begin : g_xrow
    word_t colv [H];
    for (genvar r = 0; r < H; r++) begin : g_r
      assign colv[r] = g_alu[r*W+c].y;
    end
    assign xrow[c] = colv[xrow_sel_i[c]];
  end

  for (genvar r = 0; r < H; r++) begin : g_xcol
    word_t rowv [W];
    for (genvar c = 0; c < W; c++) begin : g_c
      assign rowv[c] = g_alu[r*W+c].y;
    end
    assign xcol[r] = rowv[xcol_sel_i[r]];
  end

  always_comb
    for (int n = 0; n < NOUT; n++)
      out_o[n] = (int'(osel_i[n]) < W) ? xrow[int'(osel_i[n]) % W] : xcol[(int'(osel_i[n]) - W) % H];

endmodule
