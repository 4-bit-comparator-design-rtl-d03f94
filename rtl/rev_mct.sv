// rev_mct: N-bit controlled NOT (multiple-control Toffoli) gate.
//
// N_CTRL control lines pass through unchanged; the target line is inverted when all
// controls are 1 and passes unchanged otherwise: q = t xor (c_1 c_2 ... c_N).
// With one control it is the Feynman (CNOT) gate, with two the Toffoli gate. The
// gate is its own inverse. Purely combinational. The publication gives the function;
// the parameter name and its default of 2 controls are this design's own choice.
module rev_mct #(
  parameter int unsigned N_CTRL = 2
) (
  input  logic [N_CTRL-1:0] c,    // control lines in
  input  logic              t,    // target line in
  output logic [N_CTRL-1:0] c_o,  // control lines out, equal to c
  output logic              q     // target line out
);

  assign c_o = c;
  assign q   = t ^ (&c);

endmodule
