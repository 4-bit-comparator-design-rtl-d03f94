// tb_rev_not: exhaustive check of the reversible NOT gate.
// Both input values are applied; the output must be the inverse, and the two
// outputs must differ (one-to-one map).
module tb_rev_not;

  int   checks = 0;
  int   failures = 0;
  logic a, a_n;
  logic [1:0] seen;

  rev_not dut (.a(a), .a_n(a_n));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 2; v++) begin
      a = v[0];
      #1;
      checks++;
      if (a_n !== !v[0]) begin
        failures++;
        $display("FAIL a=%0b a_n=%0b", a, a_n);
      end
      seen[a_n] = 1'b1;
    end
    checks++;
    if (seen != 2'b11) begin
      failures++;
      $display("FAIL not one-to-one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
