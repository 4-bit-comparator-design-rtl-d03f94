// rev_comparator: WIDTH-bit magnitude comparator built only from reversible gates.
//
// It evaluates the classical comparator equations
//   x_i   = A_i B_i + A_i' B_i'
//   A=B   = x_(W-1) ... x_1 x_0
//   A>B   = A_(W-1) B_(W-1)' + x_(W-1) A_(W-2) B_(W-2)' + ... + x_(W-1)...x_1 A_0 B_0'
//   A<B   = (A=B + A>B)'
// as a cascade of reversible gates, in this order:
//   1. one bit cell per bit (TR gate with constant 0, NOT on its Q output) gives
//      x_i on line b_i and A_i B_i' on line r_i;
//   2. one WIDTH-control NOT gate with controls x_(W-1)..x_0 sets the constant-0
//      line eq to A=B;
//   3. for each lower bit i, a NOT gate controlled by x_(W-1)..x_(i+1) and r_i adds
//      the term x_(W-1)...x_(i+1) A_i B_i' onto line r_(W-1), which starts as
//      A_(W-1) B_(W-1)'. The gates compute an exclusive-or, which equals the OR of
//      the equation because the terms exclude each other: each one requires the
//      bits above to be equal and its own bit to differ. The line ends as A>B;
//   4. a BJN gate with constant 1 on C gives (A=B + A>B) xor 1 = A<B.
// No line fans out: every gate passes its control lines on, and each step's line
// vector is the previous one with only the gate's own lines replaced.
//
// Interface: 3*WIDTH+2 lines in and out, numbered as in comparator_pkg. For a
// comparison drive the operand lines, 1 on line lt and 0 on every other constant
// line; A=B, A>B, A<B are then on lines line_eq, line_gt, line_lt and the other
// 3*WIDTH-1 lines are garbage. For any other constant values the circuit is still
// a one-to-one map of the line vector. Purely combinational.
//
// From the publication: the gate types (TR, NOT, N-bit controlled NOT, BJN), the
// bit cell, the equations, A=B from one gate controlled by all x_i, and A<B derived
// from A=B and A>B by a BJN gate last. This design's own: the controls and target
// of each A>B gate and the line order. For WIDTH = 4 it uses 14 lines, 6 constant
// inputs, 11 garbage outputs and 13 gates; the publication reports 10 constant
// inputs, 15 garbage outputs and 18 gates for its arrangement.
module rev_comparator
  import comparator_pkg::*;
#(
  parameter int unsigned WIDTH = 4
) (
  input  logic [3*WIDTH+1:0] lines_in,
  output logic [3*WIDTH+1:0] lines_out
);

  localparam int unsigned LINES = 3 * WIDTH + 2;

  initial begin
    assert (WIDTH >= 2) else $fatal(1, "rev_comparator needs WIDTH >= 2");
  end

  // Step 1: bit cells, one per bit, on disjoint lines, so they share one step.
  logic [WIDTH-1:0] cell_p, cell_x, cell_r;
  logic [LINES-1:0] st_cells;  // all lines after step 1

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    rev_bit_cell u_cell (
      .a (lines_in[line_a(i)]),
      .b (lines_in[line_b(WIDTH, i)]),
      .c (lines_in[line_r(WIDTH, i)]),
      .p (cell_p[i]),
      .x (cell_x[i]),
      .r (cell_r[i])
    );
  end

  // Operand lines now hold A_i and x_i, TR constant lines A_i B_i'; the eq and
  // lt lines are untouched.
  assign st_cells = {lines_in[LINES-1:3*WIDTH], cell_r, cell_x, cell_p};

  // Step 2: A=B = x_(W-1) ... x_0 onto the eq line.
  logic [LINES-1:0] st_eq;
  logic [WIDTH-1:0] eq_c_o;
  logic             eq_q;

  rev_mct #(.N_CTRL(WIDTH)) u_eq (
    .c   (st_cells[2*WIDTH-1:WIDTH]),
    .t   (st_cells[line_eq(WIDTH)]),
    .c_o (eq_c_o),
    .q   (eq_q)
  );

  always_comb begin
    st_eq                 = st_cells;
    st_eq[2*WIDTH-1:WIDTH] = eq_c_o;
    st_eq[line_eq(WIDTH)] = eq_q;
  end

  // Steps 3 ..: one gate per lower bit I, most significant first, adding
  // x_(W-1)...x_(I+1) A_I B_I' onto line r_(W-1). Controls: the x lines of bits
  // I+1 .. W-1, then r_I.
  for (genvar k = 0; k < WIDTH - 1; k++) begin : g_greater
    localparam int unsigned I      = WIDTH - 2 - k;
    localparam int unsigned N_CTRL = WIDTH - I;     // (W-1-I) x lines + r_I
    localparam int unsigned TGT    = line_gt(WIDTH);

    logic [LINES-1:0]  s_in, s_out;
    logic [N_CTRL-1:0] c, c_o;
    logic              q;

    if (k == 0) begin : g_src
      assign s_in = st_eq;
    end else begin : g_src
      assign s_in = g_greater[k-1].s_out;
    end

    // c[0] = r_I, c[j] = x_(I+j) for j = 1 .. N_CTRL-1
    always_comb begin
      c[0] = s_in[line_r(WIDTH, I)];
      for (int unsigned j = 1; j < N_CTRL; j++) c[j] = s_in[line_b(WIDTH, I + j)];
    end

    rev_mct #(.N_CTRL(N_CTRL)) u_mct (
      .c   (c),
      .t   (s_in[TGT]),
      .c_o (c_o),
      .q   (q)
    );

    always_comb begin
      s_out = s_in;
      s_out[line_r(WIDTH, I)] = c_o[0];
      for (int unsigned j = 1; j < N_CTRL; j++) s_out[line_b(WIDTH, I + j)] = c_o[j];
      s_out[TGT] = q;
    end
  end

  // Last step: BJN gate, A = (A=B) line, B = (A>B) line, C = constant 1 line.
  logic [LINES-1:0] st_bjn_in;
  logic             bjn_p, bjn_q, bjn_r;

  assign st_bjn_in = g_greater[WIDTH-2].s_out;

  rev_bjn u_bjn (
    .a (st_bjn_in[line_eq(WIDTH)]),
    .b (st_bjn_in[line_gt(WIDTH)]),
    .c (st_bjn_in[line_lt(WIDTH)]),
    .p (bjn_p),
    .q (bjn_q),
    .r (bjn_r)
  );

  always_comb begin
    lines_out                 = st_bjn_in;
    lines_out[line_eq(WIDTH)] = bjn_p;
    lines_out[line_gt(WIDTH)] = bjn_q;
    lines_out[line_lt(WIDTH)] = bjn_r;
  end

endmodule
