// rev_not: the 1x1 reversible NOT gate, A -> A'.
//
// One input line, one output line; the output is the inverse of the input, so the
// mapping is its own inverse. Purely combinational, no clock. The publication
// counts its quantum cost as zero.
module rev_not (
  input  logic a,    // line in
  output logic a_n   // line out, A'
);

  assign a_n = ~a;

endmodule
