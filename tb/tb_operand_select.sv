// tb_operand_select: checks multiplexers M1 and M2.
//
// For random B and N and all four select combinations, M1 must equal B when
// A[i] is 1 and zero otherwise, and M2 must equal N when q is 1 and zero
// otherwise. Runs at K = 32.
module tb_operand_select;

  localparam int unsigned K = 32;

  logic         a_i, q;
  logic [K:0]   b, m1;
  logic [K-1:0] n, m2;
  int checks = 0, failures = 0;

  operand_select #(.K(K)) dut (.a_i, .q, .b, .n, .m1, .m2);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      b   = {1'($urandom), $urandom};
      n   = $urandom | 32'h1;
      a_i = t[0];
      q   = t[1];
      #1;
      checks++;
      if (m1 !== (a_i ? b : '0)) begin
        failures++;
        $display("FAIL m1=%h a_i=%0d b=%h", m1, a_i, b);
      end
      checks++;
      if (m2 !== (q ? n : '0)) begin
        failures++;
        $display("FAIL m2=%h q=%0d n=%h", m2, q, n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
