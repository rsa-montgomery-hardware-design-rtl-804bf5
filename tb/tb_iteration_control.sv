// tb_iteration_control: checks the loop sequencer at the default K = 1024.
//
// For each operation it counts the cycles with iter high (must be K+2 = 1026,
// contiguous, right after load), checks that END follows for exactly one
// cycle, that busy covers RUN and END, and that a start pulse while busy is
// ignored.
module tb_iteration_control;

  localparam int unsigned K = mont_pkg::DEFAULT_K;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic load, iter, end_o, busy;
  int checks = 0, failures = 0;

  iteration_control dut (.clk, .rst_n, .start, .load, .iter, .end_o, .busy);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int n_iter;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int op = 0; op < 5; op++) begin
      @(negedge clk);
      expect_true(!busy && !iter && !end_o, "idle before start");
      start = 1'b1;
      #1;
      expect_true(load, "load with start in idle");
      @(negedge clk);
      start = 1'b0;
      n_iter = 0;
      while (iter) begin
        expect_true(busy && !end_o && !load, "busy during iterations");
        if (n_iter == 100) begin
          start = 1'b1;  // must be ignored
          #1;
          expect_true(!load, "start ignored while busy");
        end
        n_iter++;
        @(negedge clk);
        start = 1'b0;
      end
      checks++;
      if (n_iter != int'(K) + 2) begin
        failures++;
        $display("FAIL iteration count %0d, expected %0d", n_iter, K + 2);
      end
      expect_true(end_o && busy, "END after last iteration");
      @(negedge clk);
      expect_true(!end_o && !busy, "END lasts one cycle");
      repeat (op) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
