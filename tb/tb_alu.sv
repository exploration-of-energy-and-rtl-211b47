// Self-checking test of the ALU: every operation on random and corner
// operands against the reference table, for the full ALU and for a reduced
// (heterogeneous) ALU whose masked operations must give zero.
module tb_alu;
  import cgra_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  op_e   op;
  word_t a, b, s, y_full, y_het;

  localparam logic [NOPS-1:0] HMASK = hetero_mask(1);  // ADD, MUL, NOP

  alu u_full (.op_i(op), .a_i(a), .b_i(b), .s_i(s), .y_o(y_full));
  alu #(.OP_MASK(HMASK)) u_het (.op_i(op), .a_i(a), .b_i(b), .s_i(s), .y_o(y_het));

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%0d a=%h b=%h s=%h got=%h exp=%h", what, op, a, b, s, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corner [6] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'h7fff, 16'h00f3};
    for (int o = 0; o < 16; o++) begin
      for (int i = 0; i < 60; i++) begin
        op = op_e'(o);
        a = (i < 36) ? corner[i % 6] : word_t'($urandom);
        b = (i < 36) ? corner[i / 6] : word_t'($urandom);
        s = (i % 3 == 0) ? '0 : word_t'($urandom);
        #1;
        check("full", y_full, ref_alu(o, a, b, s));
        check("het", y_het, (o == 2 || o == 4) ? ref_alu(o, a, b, s) : '0);
      end
    end
    // a few hand values
    op = OP_SRA; a = 16'h8000; b = 16'd4; s = '0; #1; check("sra", y_full, 16'hf800);
    op = OP_SHR; #1; check("shr", y_full, 16'h0800);
    op = OP_LT;  a = 16'hffff; b = 16'd1; #1; check("lt", y_full, 16'd1);
    op = OP_MUL; a = 16'd300; b = 16'd300; #1; check("mul", y_full, 16'(90000));
    op = OP_MUX; a = 16'd5; b = 16'd9; s = 16'd2; #1; check("mux1", y_full, 16'd5);
    s = '0; #1; check("mux0", y_full, 16'd9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
