// tb_rev_bit_cell: exhaustive check of the comparator's per-bit cell.
// For all eight inputs: p = A_i, x = 1 exactly when A_i equals B_i, r = A_i B_i'
// xor c; the eight output words must be all distinct (one-to-one).
module tb_rev_bit_cell;

  int   checks = 0;
  int   failures = 0;
  logic a, b, c, p, x, r;

  rev_bit_cell dut (.a(a), .b(b), .c(c), .p(p), .x(x), .r(r));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%0b b=%0b c=%0b got=%0b exp=%0b", what, a, b, c, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [8];
    for (int v = 0; v < 8; v++) begin
      {c, b, a} = v[2:0];
      #1;
      check("p", p, a);
      check("x", x, (a == b));
      check("r", r, (a && !b) != c);
      seen[{r, x, p}] = 1'b1;
    end
    for (int v = 0; v < 8; v++) check("one-to-one", seen[v], 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
