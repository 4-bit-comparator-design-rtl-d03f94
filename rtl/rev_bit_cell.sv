// rev_bit_cell: per-bit front end of the reversible comparator.
//
// A TR gate takes operand bits A_i, B_i and a constant line; a NOT gate on its Q
// output turns A_i xor B_i into the bit-equality term x_i = A_i B_i + A_i' B_i'.
// With the constant line at 0 the R output is A_i B_i', the "A larger in this bit"
// term. Outputs:
//   p = A_i, x = (A_i xor B_i)', r = A_i B_i' xor c
// Two reversible gates, three lines, one-to-one. Purely combinational. The cell
// follows the publication's construction exactly.
module rev_bit_cell (
  input  logic a,  // A_i
  input  logic b,  // B_i
  input  logic c,  // constant line, 0 in the comparator
  output logic p,  // A_i (garbage)
  output logic x,  // x_i
  output logic r   // A_i B_i' when c = 0
);

  logic q;

  rev_tr u_tr (
    .a (a),
    .b (b),
    .c (c),
    .p (p),
    .q (q),
    .r (r)
  );

  rev_not u_not (
    .a   (q),
    .a_n (x)
  );

endmodule
