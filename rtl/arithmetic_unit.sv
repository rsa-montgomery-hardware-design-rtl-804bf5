// arithmetic_unit: two-level adder of the Montgomery multiplier.
//
// Adds the three operands of one loop iteration with two cascaded adders:
// the first adds the partial sum S and the output of M1, the second adds the
// output of M2 to that result. The sum is returned in full; the division by
// two is done by the S shift register that captures it. The two-adder
// arrangement is the published one; the adder widths are derived here from
// the operand ranges: with A, B < 2N and N < 2^K the partial sum stays below
// 3N (K+2 bits) and S + B + N stays below 6N (K+3 bits), so nothing overflows.
//
// Interface: S is K+2 bits, M1 K+1 bits, M2 K bits, sum K+3 bits.
// Combinational.
module arithmetic_unit #(
  parameter int unsigned K = mont_pkg::DEFAULT_K  // modulus length in bits
) (
  input  logic [K+1:0] s,    // partial sum S[i]
  input  logic [K:0]   m1,   // A[i]*B
  input  logic [K-1:0] m2,   // q_i*N
  output logic [K+2:0] sum   // S[i] + A[i]*B + q_i*N
);

  logic [K+2:0] level1;      // first adder: S + M1

  always_comb begin
    level1 = {1'b0, s} + {2'b00, m1};
    sum    = level1 + {3'b000, m2};
  end

endmodule
