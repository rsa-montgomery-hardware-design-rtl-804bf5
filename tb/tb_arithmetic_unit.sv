// tb_arithmetic_unit: checks the two-level adder against 64-bit integer sums.
//
// Runs at K = 32 so that S + M1 + M2 fits a longint. Random operands plus the
// all-ones corner case, which exercises the carries into the top bits.
module tb_arithmetic_unit;

  localparam int unsigned K = 32;

  logic [K+1:0] s;
  logic [K:0]   m1;
  logic [K-1:0] m2;
  logic [K+2:0] sum;
  int checks = 0, failures = 0;

  arithmetic_unit #(.K(K)) dut (.s, .m1, .m2, .sum);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint unsigned exp_sum;
    #1;
    exp_sum = longint'(s) + longint'(m1) + longint'(m2);
    checks++;
    if (longint'(sum) != exp_sum) begin
      failures++;
      $display("FAIL s=%h m1=%h m2=%h sum=%h expected %h", s, m1, m2, sum, exp_sum);
    end
  endtask

  initial begin
    s = '1; m1 = '1; m2 = '1;
    check_one();
    s = '0; m1 = '0; m2 = '0;
    check_one();
    for (int t = 0; t < 500; t++) begin
      s  = {2'($urandom), $urandom};
      m1 = {1'($urandom), $urandom};
      m2 = $urandom;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
