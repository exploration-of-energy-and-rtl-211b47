// ALU of the reconfigurable fabric.
//
// Combinational 15-operation ALU (NOP, PASS, ADD, SUB, MUL, AND, OR, XOR,
// NOT, SHL, SHR, SRA, LT, EQ, MUX). The operation is chosen by the ALU's
// configuration; one operation is active at a time. a_i and b_i are the left
// and right operands, s_i the selector of the multiplexer operation.
// OP_MASK lists the operations this instance implements (bit n = op_e value
// n): the full ALU of the stripe fabrics has all 15, the ALUs of the
// heterogeneous fabric two plus NOP. An operation outside the mask, or NOP,
// gives zero, so an idle ALU does not disturb what it feeds; synthesis removes
// the masked operators.
// The count of 15 operations and the reduced heterogeneous ALUs follow the
// document; the list of operations, their exact semantics and the 16-bit
// width are this design's choices.
module alu
  import cgra_pkg::*;
#(
  parameter logic [NOPS-1:0] OP_MASK = OPMASK_ALL
) (
  input  op_e   op_i,
  input  word_t a_i,
  input  word_t b_i,
  input  word_t s_i,
  output word_t y_o
);

  always_comb begin
    y_o = '0;
    if (int'(op_i) < NOPS && OP_MASK[op_i]) begin
      unique case (op_i)
        OP_PASS: y_o = a_i;
        OP_ADD:  y_o = a_i + b_i;
        OP_SUB:  y_o = a_i - b_i;
        OP_MUL:  y_o = a_i * b_i;
        OP_AND:  y_o = a_i & b_i;
        OP_OR:   y_o = a_i | b_i;
        OP_XOR:  y_o = a_i ^ b_i;
        OP_NOT:  y_o = ~a_i;
        OP_SHL:  y_o = a_i << b_i[3:0];
        OP_SHR:  y_o = a_i >> b_i[3:0];
        OP_SRA:  y_o = word_t'($signed(a_i) >>> b_i[3:0]);
        OP_LT:   y_o = word_t'($signed(a_i) < $signed(b_i));
        OP_EQ:   y_o = word_t'(a_i == b_i);
        OP_MUX:  y_o = (s_i != '0) ? a_i : b_i;
        default: y_o = '0;
      endcase
    end
  end

endmodule
