// q_logic: quotient-bit logic of the radix-2 Montgomery loop.
//
// Computes q_i = (S[0] + A[i]*B[0]) mod 2, the bit that decides whether N is
// added in this iteration so that the sum becomes even. Only the LSBs matter,
// so the function reduces to a 2:1 multiplexer selected by A[i]: it passes
// S[0] when A[i] = 0 and S[0] xor B[0] when A[i] = 1. The multiplexer form and
// the three input bits follow the published simplified Q_logic circuit; the
// function is the one of the algorithm's quotient step.
//
// Interface: three single-bit inputs, one output. Purely combinational.
module q_logic (
  input  logic s0,   // LSB of the partial sum S[i]
  input  logic b0,   // LSB of operand B
  input  logic a_i,  // current multiplier bit A[i]
  output logic q     // quotient bit q_i
);

  logic sum_odd;     // parity of S[0] + B[0]

  always_comb begin
    sum_odd = s0 ^ b0;
    q       = a_i ? sum_odd : s0;
  end

endmodule
