// tb_rev_mct: exhaustive check of the N-bit controlled NOT gate with 1, 2, 3 and
// 4 controls. For every input the controls must pass unchanged and the target must
// be inverted exactly when all controls are 1; the outputs over all inputs must be
// all distinct (one-to-one), and applying the gate twice must restore the input.
module tb_rev_mct;

  int checks = 0;
  int failures = 0;

  logic [0:0] c1, c1_o;
  logic [1:0] c2, c2_o;
  logic [2:0] c3, c3_o;
  logic [3:0] c4, c4_o;
  logic       t1, t2, t3, t4, q1, q2, q3, q4;
  logic [1:0] c2_oo;
  logic       q2_o;

  rev_mct #(.N_CTRL(1)) dut1 (.c(c1), .t(t1), .c_o(c1_o), .q(q1));
  rev_mct               dut2 (.c(c2), .t(t2), .c_o(c2_o), .q(q2));
  rev_mct #(.N_CTRL(3)) dut3 (.c(c3), .t(t3), .c_o(c3_o), .q(q3));
  rev_mct #(.N_CTRL(4)) dut4 (.c(c4), .t(t4), .c_o(c4_o), .q(q4));
  // second copy of the default gate fed by the first: must undo it
  rev_mct               dut2b (.c(c2_o), .t(q2), .c_o(c2_oo), .q(q2_o));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen1 [4];
    bit seen2 [8];
    bit seen3 [16];
    bit seen4 [32];
    for (int v = 0; v < 32; v++) begin
      c1 = v[0:0];  t1 = v[1];
      c2 = v[1:0];  t2 = v[2];
      c3 = v[2:0];  t3 = v[3];
      c4 = v[3:0];  t4 = v[4];
      #1;
      if (v < 4) begin
        check("1c ctrl", c1_o[0], v[0]);
        check("1c tgt", q1, v[1] ^ v[0]);
        seen1[{q1, c1_o}] = 1'b1;
      end
      if (v < 8) begin
        check("2c ctrl", c2_o == v[1:0], 1'b1);
        check("2c tgt", q2, v[2] ^ (v[0] & v[1]));
        check("2c self-inverse", {q2_o, c2_oo} == v[2:0], 1'b1);
        seen2[{q2, c2_o}] = 1'b1;
      end
      if (v < 16) begin
        check("3c ctrl", c3_o == v[2:0], 1'b1);
        check("3c tgt", q3, v[3] ^ (v[0] & v[1] & v[2]));
        seen3[{q3, c3_o}] = 1'b1;
      end
      check("4c ctrl", c4_o == v[3:0], 1'b1);
      check("4c tgt", q4, v[4] ^ (v[0] & v[1] & v[2] & v[3]));
      seen4[{q4, c4_o}] = 1'b1;
    end
    for (int v = 0; v < 4; v++)  check("1c one-to-one", seen1[v], 1'b1);
    for (int v = 0; v < 8; v++)  check("2c one-to-one", seen2[v], 1'b1);
    for (int v = 0; v < 16; v++) check("3c one-to-one", seen3[v], 1'b1);
    for (int v = 0; v < 32; v++) check("4c one-to-one", seen4[v], 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
