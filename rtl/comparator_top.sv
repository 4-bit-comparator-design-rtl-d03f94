// comparator_top: the 4-bit reversible comparator with its constant lines tied off,
// next to the classical comparator it is derived from.
//
// rev_*: the reversible comparator. Operands a, b go onto the operand lines; the
// constant lines get 0, except the BJN gate's, which gets 1. rev_res carries A=B,
// A>B, A<B taken from the three useful output lines; rev_garbage carries the other
// 3*WIDTH-1 output lines (A_i, x_i and A_i B_i' of the lower bits), which a reversible circuit must still deliver. Its low WIDTH
// bits are rev_a unchanged, since the TR gates pass their A input through.
// cls_*: the classical (irreversible) comparator of the same width, with its own
// operands and result, standing beside the reversible one.
// Both are purely combinational: outputs follow the operands with gate delay only.
// WIDTH defaults to the publication's 4.
module comparator_top
  import comparator_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]         rev_a,
  input  logic [WIDTH-1:0]         rev_b,
  output cmp_result_t              rev_res,
  output logic [3*WIDTH-2:0]       rev_garbage,
  input  logic [WIDTH-1:0]         cls_a,
  input  logic [WIDTH-1:0]         cls_b,
  output cmp_result_t              cls_res
);

  localparam int unsigned LINES = 3 * WIDTH + 2;

  logic [LINES-1:0] lines_in, lines_out;

  // Operand lines, then the constant lines: 0 for every TR gate and for the A=B
  // line, 1 for the BJN gate (line_lt is the top line).
  assign lines_in = {1'b1, {(WIDTH + 1){1'b0}}, rev_b, rev_a};

  rev_comparator #(.WIDTH(WIDTH)) u_rev (
    .lines_in  (lines_in),
    .lines_out (lines_out)
  );

  assign rev_res.eq = lines_out[line_eq(WIDTH)];
  assign rev_res.gt = lines_out[line_gt(WIDTH)];
  assign rev_res.lt = lines_out[line_lt(WIDTH)];

  // Everything below line_gt (3W-1); line_eq (3W) and line_lt (3W+1) are the top.
  assign rev_garbage = lines_out[3*WIDTH-2:0];

  classical_comparator #(.WIDTH(WIDTH)) u_cls (
    .a   (cls_a),
    .b   (cls_b),
    .res (cls_res)
  );

endmodule
