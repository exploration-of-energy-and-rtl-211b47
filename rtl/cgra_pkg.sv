// Shared types and constants of the coarse-grained reconfigurable fabrics.
//
// Every fabric in this library is built from the same processing element: a
// 16-bit ALU with 15 operations (NOP included) whose three operands (left,
// right and the selector used by the multiplexer operation) each come from a
// configurable source. The per-ALU configuration word is cell_cfg_t; the
// per-output-port configuration of the stripe fabrics is out_cfg_t.
// The operation set, the data width and the field widths are this design's
// choices; the document gives the number of operations (15), the operand
// multiplexers and the inputs-from-the-side (ICS) and constant-in-ALU ideas.
package cgra_pkg;

  localparam int unsigned DW   = 16;  // datapath width
  localparam int unsigned NIN  = 32;  // fabric (side) inputs
  localparam int unsigned NOUT = 8;   // final output ports
  localparam int unsigned NOPS = 15;  // operations of the full ALU

  typedef logic [DW-1:0] word_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,   // idle, drives zero
    OP_PASS = 4'd1,   // pass-gate use of an ALU: y = a
    OP_ADD  = 4'd2,
    OP_SUB  = 4'd3,
    OP_MUL  = 4'd4,   // low DW bits of a*b
    OP_AND  = 4'd5,
    OP_OR   = 4'd6,
    OP_XOR  = 4'd7,
    OP_NOT  = 4'd8,
    OP_SHL  = 4'd9,   // a << b[3:0]
    OP_SHR  = 4'd10,  // logical right shift
    OP_SRA  = 4'd11,  // arithmetic right shift
    OP_LT   = 4'd12,  // signed a < b, result 0/1
    OP_EQ   = 4'd13,  // a == b, result 0/1
    OP_MUX  = 4'd14   // s != 0 ? a : b
  } op_e;

  // Operand source. SRC_WIN is the interconnect (8:1, 5:1, 64:1 or the 3D
  // candidate list), SRC_SIDE an input coming from the side, SRC_CONST the
  // ALU's own constant, SRC_X1/SRC_X2 the two extra links of the multi-level
  // vertical (grandparent / great-grandparent) and horizontal (left / right
  // neighbour) fabrics.
  typedef enum logic [2:0] {
    SRC_WIN   = 3'd0,
    SRC_SIDE  = 3'd1,
    SRC_CONST = 3'd2,
    SRC_X1    = 3'd3,
    SRC_X2    = 3'd4
  } src_e;

  typedef struct packed {
    src_e       src;
    logic [5:0] idx;   // interconnect input
    logic [4:0] side;  // which fabric input, for SRC_SIDE
  } opnd_cfg_t;

  typedef struct packed {
    op_e       op;
    opnd_cfg_t a;
    opnd_cfg_t b;
    opnd_cfg_t s;
    logic      phase;  // fold fabric: execution cycle in which this ALU works
    word_t     k;      // constant held in the ALU
  } cell_cfg_t;

  // Output port of a stripe fabric: which ALU of an early exit row it reads.
  typedef struct packed {
    logic [4:0] row;
    logic [4:0] col;
    logic       sel;   // split: 1 = left fabric; fold: capture cycle
  } out_cfg_t;

  localparam logic [NOPS-1:0] OPMASK_ALL = '1;

  // Operation subsets of the heterogeneous fully connected fabric: every row
  // holds ALUs with two operations plus NOP, a different pair per row.
  function automatic logic [NOPS-1:0] hetero_mask(input int unsigned row);
    logic [NOPS-1:0] m;
    m = '0;
    m[OP_NOP] = 1'b1;
    case (row % 8)
      0: begin m[OP_ADD] = 1'b1; m[OP_SUB] = 1'b1; end
      1: begin m[OP_ADD] = 1'b1; m[OP_MUL] = 1'b1; end
      2: begin m[OP_AND] = 1'b1; m[OP_OR]  = 1'b1; end
      3: begin m[OP_SHL] = 1'b1; m[OP_SRA] = 1'b1; end
      4: begin m[OP_SHR] = 1'b1; m[OP_XOR] = 1'b1; end
      5: begin m[OP_LT]  = 1'b1; m[OP_EQ]  = 1'b1; end
      6: begin m[OP_MUX] = 1'b1; m[OP_PASS] = 1'b1; end
      default: begin m[OP_NOT] = 1'b1; m[OP_SUB] = 1'b1; end
    endcase
    return m;
  endfunction

  // An idle configuration word.
  localparam cell_cfg_t CELL_IDLE = '{op: OP_NOP, a: '{SRC_SIDE, 6'd0, 5'd0},
                                      b: '{SRC_SIDE, 6'd0, 5'd0},
                                      s: '{SRC_SIDE, 6'd0, 5'd0},
                                      phase: 1'b0, k: '0};

endpackage
