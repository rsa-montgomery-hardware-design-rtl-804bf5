// tb_mont_mul: end-to-end test of the Montgomery multiplier at its default
// size, K = 1024 (RSA-1024).
//
// Runs corner cases (zero operands, operands at 2N-1, the smallest and the
// largest modulus) and random multiplications, including chains that feed the
// result back as an operand, as repeated multiplication in RSA does. Each
// result is compared with the closed-form reference of mont_ref_pkg, and is
// also checked to be below 2N. It checks the timing: exactly K+2 = 1026
// iteration cycles per operation and done K+4 cycles after start. It counts
// how often each routing case of multiplexers M1/M2 occurs (0, B, N, B+N), the
// END signal, and a start pulse ignored while busy, and fails if any never
// happened.
module tb_mont_mul;

  import mont_ref_pkg::*;

  localparam int unsigned K = mont_pkg::DEFAULT_K;
  typedef mont_ref #(K) ref_t;
  typedef ref_t::wide_t wide_t;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K+1:0] a = '0;
  logic [K:0]   b = '0;
  logic [K-1:0] n = '0;
  logic         busy, done;
  logic [K:0]   r;

  int checks = 0, failures = 0;
  int route_cnt [4];           // index {A[i], q_i}
  int end_cnt = 0, ignored_start_cnt = 0, iter_cycles = 0;

  mont_mul dut (.clk, .rst_n, .start, .a, .b, .n, .busy, .done, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled from the datapath.
  always @(posedge clk) if (rst_n) begin
    if (dut.iter) begin
      route_cnt[{dut.a_i, dut.q}]++;
      iter_cycles++;
    end
    if (dut.end_sig) end_cnt++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One multiplication; returns the result.
  task automatic run_op(input wide_t av, input wide_t bv, input wide_t nv,
                        input bit poke_start, output wide_t res);
    wide_t exp_r;
    int    lat, it0;
    @(negedge clk);
    a = (K+2)'(av); b = (K+1)'(bv); n = K'(nv);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    it0 = iter_cycles;
    lat = 1;
    while (!done) begin
      if (poke_start && lat == 10) begin
        start = 1'b1;          // must be ignored: busy
        a = '0;
        @(negedge clk);
        start = 1'b0;
        ignored_start_cnt++;
      end else begin
        @(negedge clk);
      end
      lat++;
    end
    res   = wide_t'(r);
    exp_r = ref_t::product(av, bv, nv);
    check(res == exp_r, $sformatf("result mismatch\n a=%h\n b=%h\n n=%h\n r=%h\n exp=%h",
                                  av, bv, nv, res, exp_r));
    check(res < 2 * nv, "result below 2N");
    check(iter_cycles - it0 == int'(K) + 2,
          $sformatf("iteration cycles %0d, expected %0d", iter_cycles - it0, K + 2));
    check(lat == int'(K) + 4, $sformatf("latency %0d, expected %0d", lat, K + 4));
    @(negedge clk);
    check(!done && !busy, "done is a single pulse");
  endtask

  initial begin
    wide_t nv, av, bv, res;
    wide_t one;
    one = wide_t'(1);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Corner cases.
    nv = (one << K) - one;                 // largest modulus
    run_op('0, '0, nv, 1'b0, res);
    run_op(2 * nv - one, 2 * nv - one, nv, 1'b0, res);
    nv = (one << (K - 1)) | one;           // smallest modulus with top bit set
    run_op(2 * nv - one, 2 * nv - one, nv, 1'b0, res);
    run_op(one, 2 * nv - one, nv, 1'b1, res);

    // Random operands.
    for (int t = 0; t < 100; t++) begin
      nv = ref_t::rand_modulus();
      av = ref_t::rand_operand(nv);
      bv = ref_t::rand_operand(nv);
      run_op(av, bv, nv, t == 3, res);
    end

    // Chained multiplications: results fed back as operands.
    nv = ref_t::rand_modulus();
    av = ref_t::rand_operand(nv);
    bv = ref_t::rand_operand(nv);
    for (int t = 0; t < 6; t++) begin
      run_op(av, bv, nv, 1'b0, res);
      if (t[0]) bv = res;
      else      av = res;
    end

    for (int c = 0; c < 4; c++) begin
      $display("routing case A[i]=%0d q=%0d: %0d cycles", c >> 1, c & 1, route_cnt[c]);
      check(route_cnt[c] > 0, $sformatf("routing case %0d never happened", c));
    end
    $display("END: %0d, ignored start: %0d, iteration cycles per operation: %0d",
             end_cnt, ignored_start_cnt, iter_cycles / end_cnt);
    check(end_cnt > 0, "END never happened");
    check(ignored_start_cnt > 0, "no start while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
