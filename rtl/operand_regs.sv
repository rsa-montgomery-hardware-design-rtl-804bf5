// operand_regs: input registers A, B and N of the Montgomery multiplier.
//
// All three are captured together on load. B and N then hold still for the
// whole operation. A is a right-shift register: its LSB is the current bit
// A[i], and each iteration shifts it by one place so that the loop sees
// A[0], A[1], ..., A[K+1] in turn. Registers A, B and N are the published
// ones; the shift-register form of A is this design's choice.
//
// Interface: A is K+2 bits (the loop runs i = 0 .. K+1), B is K+1 bits
// (B < 2N), N is K bits. load has priority over shift.
module operand_regs #(
  parameter int unsigned K = mont_pkg::DEFAULT_K  // modulus length in bits
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         load,   // capture a_in, b_in, n_in
  input  logic         shift,  // advance A by one bit
  input  logic [K+1:0] a_in,
  input  logic [K:0]   b_in,
  input  logic [K-1:0] n_in,
  output logic         a_i,    // current bit A[i]
  output logic [K:0]   b,
  output logic [K-1:0] n
);

  logic [K+1:0] a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b   <= '0;
      n   <= '0;
    end else if (load) begin
      a_q <= a_in;
      b   <= b_in;
      n   <= n_in;
    end else if (shift) begin
      a_q <= {1'b0, a_q[K+1:1]};
    end
  end

  assign a_i = a_q[0];

endmodule
