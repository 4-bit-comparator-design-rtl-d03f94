// tb_comparator_top: end-to-end test of the comparator top at its default size
// (4 bits), all 256 operand pairs on the reversible comparator and, with the pair
// order reversed, on the classical one beside it.
// Expected results come from integer comparison. It also counts how often each
// outcome (A=B, A>B, A<B) occurred and at which bit the comparison was decided
// (the most significant differing bit, i.e. which product term of the A>B / A<B
// sums fired); a case that never occurs counts as a failure. The circuit is
// combinational, so results are sampled 1 time unit after the operands change.
module tb_comparator_top;
  import comparator_pkg::*;

  localparam int W = 4;

  int checks = 0;
  int failures = 0;

  logic [W-1:0] rev_a, rev_b, cls_a, cls_b;
  cmp_result_t  rev_res, cls_res;
  logic [3*W-2:0] rev_garbage;

  int n_eq = 0;
  int n_gt = 0;
  int n_lt = 0;
  int decided_gt [W];
  int decided_lt [W];

  comparator_top dut (
    .rev_a       (rev_a),
    .rev_b       (rev_b),
    .rev_res     (rev_res),
    .rev_garbage (rev_garbage),
    .cls_a       (cls_a),
    .cls_b       (cls_b),
    .cls_res     (cls_res)
  );

  function automatic cmp_result_t expect_cmp(int unsigned x, int unsigned y);
    cmp_result_t e;
    e.eq = (x == y);
    e.gt = (x > y);
    e.lt = (x < y);
    return e;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      decided_gt[i] = 0;
      decided_lt[i] = 0;
    end
    for (int unsigned x = 0; x < 2**W; x++) begin
      for (int unsigned y = 0; y < 2**W; y++) begin
        rev_a = W'(x); rev_b = W'(y);
        cls_a = W'(y); cls_b = W'(x);
        #1;
        checks++;
        if (rev_res !== expect_cmp(x, y)) begin
          failures++;
          $display("FAIL reversible a=%0d b=%0d got eq,gt,lt=%03b", x, y, rev_res);
        end
        checks++;
        if (cls_res !== expect_cmp(y, x)) begin
          failures++;
          $display("FAIL classical a=%0d b=%0d got eq,gt,lt=%03b", y, x, cls_res);
        end
        // garbage: A_i on the low W bits, x_i on the next W, then A_i B_i' of
        // the W-1 lower bits
        checks++;
        if (rev_garbage[W-1:0] !== W'(x) || rev_garbage[2*W-1:W] !== ~W'(x ^ y) ||
            rev_garbage[3*W-2:2*W] !== (W-1)'(x & ~y)) begin
          failures++;
          $display("FAIL garbage a=%0d b=%0d got %b", x, y, rev_garbage);
        end
        // coverage of outcomes and of the deciding bit
        n_eq += int'(rev_res.eq);
        n_gt += int'(rev_res.gt);
        n_lt += int'(rev_res.lt);
        for (int i = W - 1; i >= 0; i--) begin
          if (x[i] != y[i]) begin
            if (rev_res.gt) decided_gt[i]++;
            if (rev_res.lt) decided_lt[i]++;
            break;
          end
        end
      end
    end
    $display("outcomes: eq=%0d gt=%0d lt=%0d", n_eq, n_gt, n_lt);
    checks++;
    if (n_eq == 0 || n_gt == 0 || n_lt == 0) begin
      failures++;
      $display("FAIL an outcome never occurred");
    end
    for (int i = 0; i < W; i++) begin
      $display("decided at bit %0d: gt=%0d lt=%0d", i, decided_gt[i], decided_lt[i]);
      checks++;
      if (decided_gt[i] == 0 || decided_lt[i] == 0) begin
        failures++;
        $display("FAIL no comparison decided at bit %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
