// result_reg: output register R of the Montgomery multiplier.
//
// When END is high it captures the final partial sum S, which the loop leaves
// below 2N, so only the low K+1 bits are kept. It holds R otherwise, and
// pulses done for one cycle after each capture. R gated by END is the
// published arrangement; the done pulse is this design's choice.
//
// Interface: S in K+2 bits, R out K+1 bits; the top bit of S is always zero
// at END and is therefore not stored (lint reports it as unused).
// Timing: R and done change on the clock edge that ends the END cycle.
module result_reg #(
  parameter int unsigned K = mont_pkg::DEFAULT_K  // modulus length in bits
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         end_i,  // END
  input  logic [K+1:0] s,      // final partial sum, below 2N
  output logic [K:0]   r,      // result R
  output logic         done    // R updated in the previous edge
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r    <= '0;
      done <= 1'b0;
    end else begin
      done <= end_i;
      if (end_i) r <= s[K:0];
    end
  end

endmodule
