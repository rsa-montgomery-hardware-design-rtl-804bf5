// tb_mont_mul_small: randomized regression of the Montgomery multiplier at a
// reduced size, K = 16, where thousands of operations run quickly.
//
// Drives back-to-back operations (each start in the cycle done is high) with random
// odd moduli of K bits and random operands below 2N, and compares each result
// with the closed-form reference of mont_ref_pkg and with the 2N bound.
module tb_mont_mul_small;

  import mont_ref_pkg::*;

  localparam int unsigned K = 16;
  typedef mont_ref #(K) ref_t;
  typedef ref_t::wide_t wide_t;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K+1:0] a = '0;
  logic [K:0]   b = '0;
  logic [K-1:0] n = '0;
  logic         busy, done;
  logic [K:0]   r;
  int checks = 0, failures = 0;

  mont_mul #(.K(K)) dut (.clk, .rst_n, .start, .a, .b, .n, .busy, .done, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t nv, av, bv, exp_r;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      nv = ref_t::rand_modulus();
      av = ref_t::rand_operand(nv);
      bv = ref_t::rand_operand(nv);
      if (t == 0) @(negedge clk);  // later operations start in the done cycle
      a = (K+2)'(av); b = (K+1)'(bv); n = K'(nv);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      exp_r = ref_t::product(av, bv, nv);
      checks++;
      if (wide_t'(r) != exp_r || wide_t'(r) >= 2 * nv) begin
        failures++;
        $display("FAIL a=%h b=%h n=%h r=%h expected %h", av, bv, nv, r, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
