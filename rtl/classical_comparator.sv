// classical_comparator: irreversible gate-level WIDTH-bit magnitude comparator.
//
// The conventional circuit the reversible design is derived from:
//   x_i = A_i B_i + A_i' B_i'                (an XNOR per bit)
//   A=B = AND of all x_i
//   A>B = OR over i of ( x_(W-1) ... x_(i+1) A_i B_i' )
//   A<B = NOR of A=B and A>B
// A<B is formed from the other two outputs as in the publication, not from its own
// sum of products. Purely combinational. The equations are the publication's; the
// WIDTH parameter (default 4, the publication's size) is this design's generalisation.
module classical_comparator
  import comparator_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output cmp_result_t      res
);

  logic [WIDTH-1:0] x;        // bit equality
  logic [WIDTH-1:0] a_gt_b;   // A_i B_i'
  logic [WIDTH-1:0] gt_term;  // x_(W-1)..x_(i+1) A_i B_i'
  logic [WIDTH:0]   eq_above; // eq_above[i] = AND of x above and including bit i

  always_comb begin
    x           = ~(a ^ b);
    a_gt_b      = a & ~b;
    eq_above[WIDTH] = 1'b1;
    for (int i = WIDTH - 1; i >= 0; i--) begin
      eq_above[i] = eq_above[i+1] & x[i];
      gt_term[i]  = eq_above[i+1] & a_gt_b[i];
    end
    res.eq = eq_above[0];
    res.gt = |gt_term;
    res.lt = ~(res.eq | res.gt);
  end

endmodule
