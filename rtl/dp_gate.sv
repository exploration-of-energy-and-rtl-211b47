// Dedicated pass gate.
//
// A dedicated pass gate (DP) takes the place of an ALU in one column out of
// DP_N of a stripe fabric and only moves a value straight down, from the
// element above it to the next stripe, so that ALUs are not spent on routing.
// When unused it is set idle and drives zero, so the wire below stays quiet.
// Purely combinational: q_o = idle_i ? 0 : d_i.
// Function and idle state follow the document; driving zero when idle is this
// design's choice.
module dp_gate
  import cgra_pkg::*;
(
  input  word_t d_i,
  input  logic  idle_i,
  output word_t q_o
);

  always_comb q_o = idle_i ? '0 : d_i;

endmodule
