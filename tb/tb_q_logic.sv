// tb_q_logic: exhaustive check of the quotient-bit logic.
//
// Applies all eight combinations of S[0], B[0] and A[i] and compares q with
// (S[0] + A[i]*B[0]) mod 2 computed with integer arithmetic.
module tb_q_logic;

  logic s0, b0, a_i, q;
  int   checks = 0, failures = 0;

  q_logic dut (.s0, .b0, .a_i, .q);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_q;
      {a_i, b0, s0} = 3'(v);
      #1;
      exp_q = (int'(s0) + int'(a_i) * int'(b0)) % 2;
      checks++;
      if (int'(q) != exp_q) begin
        failures++;
        $display("FAIL s0=%0d b0=%0d a_i=%0d q=%0d expected %0d", s0, b0, a_i, q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
