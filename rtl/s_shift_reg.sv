// s_shift_reg: partial-sum register S of the Montgomery multiplier.
//
// On every iteration it captures the adder result shifted right by one bit,
// which performs the division by two of the loop body (the adder result is
// always even there, because q_i was chosen to make it so). It is cleared
// when an operation starts (S[0] = 0). Capturing the shifted sum is the
// published arrangement; clear and reset behaviour are this design's choice.
//
// Interface: clr has priority over en. The stored value is K+2 bits. Bit 0
// of d is zero in every iteration and is dropped by the shift (lint reports
// it as unused).
// Timing: one iteration per clock edge with en high.
module s_shift_reg #(
  parameter int unsigned K = mont_pkg::DEFAULT_K  // modulus length in bits
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         clr,    // S <= 0
  input  logic         en,     // S <= d >> 1
  input  logic [K+2:0] d,      // adder result
  output logic [K+1:0] s       // partial sum
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   s <= '0;
    else if (clr) s <= '0;
    else if (en)  s <= d[K+2:1];
  end

endmodule
