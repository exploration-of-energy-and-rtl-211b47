// Self-checking test of the dedicated pass gate: active it forwards its input,
// idle it drives zero.
module tb_dp_gate;
  import cgra_pkg::*;

  int checks = 0, failures = 0;
  word_t d, q;
  logic  idle;

  dp_gate u_dut (.d_i(d), .idle_i(idle), .q_o(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d = word_t'($urandom);
      if (i == 0) d = 16'hffff;
      idle = i[0];
      #1;
      checks++;
      if (q !== (idle ? 16'h0 : d)) begin
        failures++;
        $display("FAIL d=%h idle=%b q=%h", d, idle, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
