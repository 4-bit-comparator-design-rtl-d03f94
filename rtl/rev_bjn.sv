// rev_bjn: the 3x3 reversible BJN gate.
//
//   P = A
//   Q = B
//   R = (A + B) xor C       (+ is OR)
// Three lines in, three out, one-to-one. With C tied to 1 the R output is the NOR of
// A and B, which the comparator uses to derive A<B from A=B and A>B. Purely
// combinational. The function is the publication's (quantum cost 5); its quantum
// realisation is not modelled.
module rev_bjn (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,  // A
  output logic q,  // B
  output logic r   // (A | B) xor C
);

  assign p = a;
  assign q = b;
  assign r = (a | b) ^ c;

endmodule
