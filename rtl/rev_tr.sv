// rev_tr: the 3x3 reversible TR gate.
//
//   P = A
//   Q = A xor B
//   R = (A B') xor C
// Three lines in, three out, one-to-one. With C tied to 0 it yields A xor B and the
// "A greater in this bit" product A B' from one gate, which is how the comparator
// uses it. Purely combinational. The function is the publication's; its quantum
// realisation from V/V+ primitives (quantum cost 4) has no Boolean counterpart and
// is not modelled.
module rev_tr (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,  // A
  output logic q,  // A xor B
  output logic r   // A B' xor C
);

  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;

endmodule
