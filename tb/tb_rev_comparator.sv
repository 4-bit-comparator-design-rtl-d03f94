// tb_rev_comparator: checks the reversible comparator cascade.
//  1. WIDTH = 4, all 2^14 line vectors: every output vector must occur exactly once,
//     so the cascade is a one-to-one map whatever the constant lines hold.
//  2. WIDTH = 4 and WIDTH = 5, constant lines at their working values, all operand
//     pairs: A=B, A>B, A<B lines against the integer comparison, and every garbage
//     line against its formula (A_i; x_i; A_i B_i').
module tb_rev_comparator;
  import comparator_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [13:0] in4, out4;
  logic [16:0] in5, out5;

  rev_comparator                 dut4 (.lines_in(in4), .lines_out(out4));
  rev_comparator #(.WIDTH(5))    dut5 (.lines_in(in5), .lines_out(out5));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0b exp=%0b", what, got, exp);
    end
  endtask

  // Working-value check of one comparison at width w on output vector o.
  task automatic check_cmp(input int w, input int unsigned x, input int unsigned y,
                           input logic [16:0] o);
    check($sformatf("W%0d eq a=%0d b=%0d", w, x, y), o[line_eq(w)], x == y);
    check($sformatf("W%0d gt a=%0d b=%0d", w, x, y), o[line_gt(w)], x > y);
    check($sformatf("W%0d lt a=%0d b=%0d", w, x, y), o[line_lt(w)], x < y);
    for (int i = w - 1; i >= 0; i--) begin
      check($sformatf("W%0d a line %0d", w, i), o[line_a(i)], x[i]);
      check($sformatf("W%0d x line %0d", w, i), o[line_b(w, i)], x[i] == y[i]);
      if (i < w - 1)
        check($sformatf("W%0d r line %0d", w, i), o[line_r(w, i)], x[i] & ~y[i]);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [16384];
    int missing;
    // 1. one-to-one over the whole line space
    for (int v = 0; v < 16384; v++) begin
      in4 = 14'(v);
      in5 = '0;
      #1;
      seen[out4] = 1'b1;
    end
    missing = 0;
    for (int v = 0; v < 16384; v++) if (!seen[v]) missing++;
    checks++;
    if (missing != 0) begin
      failures++;
      $display("FAIL W4 not one-to-one: %0d output vectors never produced", missing);
    end
    // 2. working values, width 4 and 5
    for (int unsigned x = 0; x < 32; x++) begin
      for (int unsigned y = 0; y < 32; y++) begin
        in4 = '0;
        in4[line_lt(4)] = 1'b1;
        in4[3:0] = 4'(x);
        in4[7:4] = 4'(y);
        in5 = '0;
        in5[line_lt(5)] = 1'b1;
        in5[4:0] = 5'(x);
        in5[9:5] = 5'(y);
        #1;
        if (x < 16 && y < 16) check_cmp(4, x, y, {3'b0, out4});
        check_cmp(5, x, y, out5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
