// tb_result_reg: checks the output register R.
//
// R must take the low K+1 bits of S on a cycle with END high and hold them
// otherwise, and done must pulse exactly once per END. Runs at K = 32.
module tb_result_reg;

  localparam int unsigned K = 32;

  logic         clk = 1'b0, rst_n = 1'b0, end_i = 1'b0;
  logic [K+1:0] s = '0;
  logic [K:0]   r, r_ref = '0;
  logic         done, done_ref = 1'b0;
  int checks = 0, failures = 0;

  result_reg #(.K(K)) dut (.clk, .rst_n, .end_i, .s, .r, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      s     = {1'b0, 1'($urandom), $urandom};
      end_i = ($urandom % 4) == 0;
      done_ref = end_i;
      if (end_i) r_ref = s[K:0];
      @(posedge clk);
      #1;
      checks++;
      if (r !== r_ref || done !== done_ref) begin
        failures++;
        $display("FAIL t=%0d r=%h done=%0d expected %h %0d", t, r, done, r_ref, done_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
