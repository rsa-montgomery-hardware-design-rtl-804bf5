// operand_select: multiplexers M1 and M2 in front of the two-level adder.
//
// M1 routes B when the current multiplier bit A[i] is 1 and zero otherwise;
// M2 routes the modulus N when the quotient bit q_i is 1 and zero otherwise.
// Together they form the terms A[i]*B and q_i*N of the loop body
// S[i+1] = (S[i] + A[i]*B + q_i*N) / 2. Which bit selects which multiplexer
// follows the description of the architecture.
//
// Interface: B is K+1 bits wide (B < 2N), N is K bits wide. Combinational.
module operand_select #(
  parameter int unsigned K = mont_pkg::DEFAULT_K  // modulus length in bits
) (
  input  logic         a_i,  // select of M1
  input  logic         q,    // select of M2
  input  logic [K:0]   b,    // operand B
  input  logic [K-1:0] n,    // modulus N
  output logic [K:0]   m1,   // A[i] ? B : 0
  output logic [K-1:0] m2    // q_i  ? N : 0
);

  always_comb begin
    m1 = a_i ? b : '0;
    m2 = q   ? n : '0;
  end

endmodule
