// tb_operand_regs: checks the A, B and N input registers.
//
// After a load, a_i must present A[0], A[1], ..., A[K+1] on successive shifts
// while B and N keep their loaded values; a second load replaces all three.
// Runs at K = 32.
module tb_operand_regs;

  localparam int unsigned K = 32;

  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [K+1:0] a_in = '0;
  logic [K:0]   b_in = '0, b;
  logic [K-1:0] n_in = '0, n;
  logic         a_i;
  int checks = 0, failures = 0;

  operand_regs #(.K(K)) dut (.clk, .rst_n, .load, .shift, .a_in, .b_in, .n_in, .a_i, .b, .n);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [K+1:0] a_ref;
    logic [K:0]   b_ref;
    logic [K-1:0] n_ref;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 10; op++) begin
      @(negedge clk);
      a_ref = {2'($urandom), $urandom};
      b_ref = {1'($urandom), $urandom};
      n_ref = $urandom;
      a_in = a_ref; b_in = b_ref; n_in = n_ref;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      a_in = '0; b_in = '0; n_in = '0;
      for (int i = 0; i < int'(K) + 2; i++) begin
        // hold one cycle without shifting now and then
        if (i % 7 == 3) begin
          shift = 1'b0;
          @(negedge clk);
        end
        checks++;
        if (a_i !== a_ref[i] || b !== b_ref || n !== n_ref) begin
          failures++;
          $display("FAIL op=%0d i=%0d a_i=%0d expected %0d", op, i, a_i, a_ref[i]);
        end
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
