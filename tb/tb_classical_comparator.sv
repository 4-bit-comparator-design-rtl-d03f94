// tb_classical_comparator: exhaustive check of the classical comparator at 4 bits
// (all 256 operand pairs) and at 3 bits (all 64). The expected result is the
// integer comparison of the operands; exactly one output must be 1.
module tb_classical_comparator;
  import comparator_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4, b4;
  logic [2:0]  a3, b3;
  cmp_result_t r4, r3;

  classical_comparator               dut4 (.a(a4), .b(b4), .res(r4));
  classical_comparator #(.WIDTH(3))  dut3 (.a(a3), .b(b3), .res(r3));

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
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        a3 = 3'(x); b3 = 3'(y);
        #1;
        checks++;
        if (r4 !== expect_cmp(x, y)) begin
          failures++;
          $display("FAIL W=4 a=%0d b=%0d got=%03b", x, y, r4);
        end
        if (x < 8 && y < 8) begin
          checks++;
          if (r3 !== expect_cmp(x, y)) begin
            failures++;
            $display("FAIL W=3 a=%0d b=%0d got=%03b", x, y, r3);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
