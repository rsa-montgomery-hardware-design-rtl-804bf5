// mont_mul: low-area bit-serial radix-2 Montgomery multiplier.
//
// Computes R = A * B * 2^-(K+2) mod N (Walter's variant of Montgomery
// multiplication): K+2 iterations of
//     q_i    = (S[0] + A[i]*B[0]) mod 2
//     S[i+1] = (S[i] + A[i]*B + q_i*N) / 2
// starting from S = 0, with no final subtraction. For an odd modulus
// N < 2^K and inputs A, B < 2N the result is below 2N, so it can be fed back
// as an input of the next multiplication (repeated multiplication in RSA).
//
// Structure (the published one): registers A, B and N hold the inputs; the
// Q_logic derives q_i from the LSBs; multiplexer M1 passes B or 0 (select
// A[i]) and M2 passes N or 0 (select q_i); a two-level adder forms
// S + M1 + M2; the S shift register stores that sum shifted right by one;
// after the last iteration END registers S into the output R. The controller,
// the handshake and the register widths are this design's choices.
//
// Interface: pulse start for one cycle while busy is low, with a, b, n
// valid in that cycle. Timing: load in cycle 0, iterations in cycles
// 1 .. K+2 (1026 for K = 1024), END in cycle K+3, done pulses in cycle K+4 with
// r valid from then until the next END. start is ignored while busy.
//
// Assertions check that N is odd and A, B < 2N at load, and that every
// iteration sum is even. Lint notes rst_n as used both asynchronously and
// synchronously: the synchronous use is only the assertions' disable iff.
module mont_mul #(
  parameter int unsigned K = mont_pkg::DEFAULT_K  // modulus length in bits
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         start,
  input  logic [K+1:0] a,      // A < 2N
  input  logic [K:0]   b,      // B < 2N
  input  logic [K-1:0] n,      // odd modulus, N < 2^K
  output logic         busy,
  output logic         done,
  output logic [K:0]   r       // Montgomery product, below 2N
);

  logic         load, iter, end_sig;
  logic         a_i, q;
  logic [K:0]   b_q;
  logic [K-1:0] n_q;
  logic [K:0]   m1;
  logic [K-1:0] m2;
  logic [K+1:0] s;
  logic [K+2:0] sum;

  iteration_control #(.K(K)) u_ctrl (
    .clk, .rst_n, .start,
    .load, .iter, .end_o(end_sig), .busy
  );

  operand_regs #(.K(K)) u_regs (
    .clk, .rst_n, .load, .shift(iter),
    .a_in(a), .b_in(b), .n_in(n),
    .a_i, .b(b_q), .n(n_q)
  );

  q_logic u_q (
    .s0(s[0]), .b0(b_q[0]), .a_i, .q
  );

  operand_select #(.K(K)) u_mux (
    .a_i, .q, .b(b_q), .n(n_q), .m1, .m2
  );

  arithmetic_unit #(.K(K)) u_au (
    .s, .m1, .m2, .sum
  );

  s_shift_reg #(.K(K)) u_s (
    .clk, .rst_n, .clr(load), .en(iter), .d(sum), .s
  );

  result_reg #(.K(K)) u_r (
    .clk, .rst_n, .end_i(end_sig), .s, .r, .done
  );

  // The quotient bit makes every sum even, so the shift loses nothing.
  a_even_sum: assert property (@(posedge clk) disable iff (!rst_n)
    iter |-> !sum[0]);

  // The algorithm needs an odd modulus.
  a_odd_modulus: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> n[0]);

  // Inputs must lie below 2N for the result to stay below 2N.
  a_operand_range: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (a < {1'b0, n, 1'b0}) && (b < {n, 1'b0}));

endmodule
