// comparator_pkg: types and line numbering shared by the reversible comparator,
// its wrapper and the testbenches.
//
// A reversible circuit has as many output lines as input lines; every line keeps
// its position from input to output. For a WIDTH-bit comparator the cascade uses
// 3*WIDTH+2 lines, numbered here:
//   a_i   : line i            operand bit A_i                -> A_i (garbage)
//   b_i   : line WIDTH+i      operand bit B_i                -> x_i (garbage)
//   r_i   : line 2*WIDTH+i    constant 0 of bit i's TR gate  -> A_i B_i' (garbage),
//                             except r_(WIDTH-1), which collects A>B
//   eq    : line 3*WIDTH      constant 0                     -> A=B
//   lt    : line 3*WIDTH+1    constant 1 of the BJN gate     -> A<B
// The line order is this design's own; the publication fixes the gate types and
// the functions, not a line numbering.
package comparator_pkg;

  // Result of one magnitude comparison. Exactly one field is 1.
  typedef struct packed {
    logic eq;  // A = B
    logic gt;  // A > B
    logic lt;  // A < B
  } cmp_result_t;

  function automatic int unsigned num_lines(int unsigned width);
    return 3 * width + 2;
  endfunction

  function automatic int unsigned line_a(int unsigned i);
    return i;
  endfunction

  function automatic int unsigned line_b(int unsigned width, int unsigned i);
    return width + i;
  endfunction

  function automatic int unsigned line_r(int unsigned width, int unsigned i);
    return 2 * width + i;
  endfunction

  function automatic int unsigned line_eq(int unsigned width);
    return 3 * width;
  endfunction

  function automatic int unsigned line_gt(int unsigned width);
    return 3 * width - 1;
  endfunction

  function automatic int unsigned line_lt(int unsigned width);
    return 3 * width + 1;
  endfunction

endpackage
