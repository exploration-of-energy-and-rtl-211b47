// Processing element: one ALU with its three operand multiplexers.
//
// Each operand (left a, right b, selector s) has its own multiplexer that picks
//   SRC_WIN   - input idx of the interconnect window win_i (the 8:1 or 5:1
//               interconnect from the stripe above, the 64:1 multiplexer of the
//               fully connected fabric, or the 3D candidate list),
//   SRC_SIDE  - fabric input side_i[side] (inputs coming from the side, ICS),
//   SRC_CONST - the constant k held in this ALU's configuration,
//   SRC_X1/X2 - two extra links whose meaning depends on the fabric
//               (grandparent/great-grandparent, or left/right neighbour).
// A window index past WIN reads zero. Combinational; an ALU configured NOP
// outputs zero whatever its operands.
// Circuit note: in the horizontal, fully connected and 3D fabrics an ALU's
// result can reach its own operand multiplexers through other ALUs, so tools
// report combinational loops through the operand signals a, b and s. Those
// loops belong to those fabrics' interconnect, and a configuration that maps an
// acyclic data-flow graph never closes one.
// The operand sources follow the document's interconnect descriptions; the
// encoding of the configuration is this design's own.
module pe
  import cgra_pkg::*;
#(
  parameter int unsigned     WIN     = 8,
  parameter logic [NOPS-1:0] OP_MASK = OPMASK_ALL
) (
  input  cell_cfg_t cfg_i,
  input  word_t     win_i  [WIN],
  input  word_t     side_i [NIN],
  input  word_t     x1_i,
  input  word_t     x2_i,
  output word_t     y_o
);

  localparam int unsigned IW = (WIN > 1) ? $clog2(WIN) : 1;

  function automatic word_t pick(input opnd_cfg_t c, input word_t win[WIN],
                                 input word_t side[NIN], input word_t k,
                                 input word_t x1, input word_t x2);
    word_t v;
    v = '0;
    unique case (c.src)
      SRC_WIN:   if (int'(c.idx) < WIN) v = win[c.idx[IW-1:0]];
      SRC_SIDE:  v = side[c.side];
      SRC_CONST: v = k;
      SRC_X1:    v = x1;
      SRC_X2:    v = x2;
      default:   v = '0;
    endcase
    return v;
  endfunction

  word_t a, b, s;

  always_comb begin
    a = pick(cfg_i.a, win_i, side_i, cfg_i.k, x1_i, x2_i);
    b = pick(cfg_i.b, win_i, side_i, cfg_i.k, x1_i, x2_i);
    s = pick(cfg_i.s, win_i, side_i, cfg_i.k, x1_i, x2_i);
  end

  alu #(.OP_MASK(OP_MASK)) u_alu (
    .op_i(cfg_i.op), .a_i(a), .b_i(b), .s_i(s), .y_o(y_o)
  );

endmodule
