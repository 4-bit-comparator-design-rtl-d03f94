// tb_rev_bjn: exhaustive check of the BJN gate (P=A, Q=B, R=(A+B) xor C).
// All eight inputs are applied; each output is compared with the formula evaluated
// in the testbench, and the eight output words must be all distinct (one-to-one).
module tb_rev_bjn;

  int   checks = 0;
  int   failures = 0;
  logic a, b, c, p, q, r;

  rev_bjn dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      check("P", p, v[0]);
      check("Q", q, v[1]);
      check("R", r, (v[0] | v[1]) ^ v[2]);
      seen[{r, q, p}] = 1'b1;
    end
    for (int v = 0; v < 8; v++) check("one-to-one", seen[v], 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
