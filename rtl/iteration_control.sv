// iteration_control: sequencer of the bit-serial Montgomery loop.
//
// A three-state machine. In IDLE a start pulse raises load for one cycle (the
// operand registers capture their inputs and S is cleared) and moves to RUN.
// RUN lasts exactly K+2 cycles, one per loop iteration i = 0 .. K+1, with iter
// high; a counter tracks the iteration index. Then one END cycle raises end_o,
// which registers the final partial sum into R, and the machine returns to
// IDLE. The END signal and the K+2 iteration count are the published ones
// (1026 cycles for K = 1024); the state machine, the counter and the
// start/busy handshake are this design's choice.
//
// Timing: start sampled in cycle 0 (IDLE), iter high in cycles 1 .. K+2,
// end_o high in cycle K+3. start is ignored while busy.
module iteration_control #(
  parameter int unsigned K = mont_pkg::DEFAULT_K  // modulus length in bits
) (
  input  logic clk,
  input  logic rst_n,   // asynchronous, active low
  input  logic start,   // request an operation
  output logic load,    // capture operands, clear S
  output logic iter,    // one loop iteration this cycle
  output logic end_o,   // END: register S into R
  output logic busy     // RUN or END
);

  import mont_pkg::*;

  localparam int unsigned ITERS = K + 2;
  localparam int unsigned CW    = $clog2(ITERS);

  ctrl_state_e     state, state_n;
  logic [CW-1:0]   cnt;
  logic            last;

  assign last = (cnt == CW'(ITERS - 1));

  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE: if (start) state_n = ST_RUN;
      ST_RUN:  if (last)  state_n = ST_END;
      ST_END:             state_n = ST_IDLE;
      default:            state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      state <= state_n;
      if (state == ST_RUN) cnt <= last ? '0 : cnt + 1'b1;
      else                 cnt <= '0;
    end
  end

  assign load  = (state == ST_IDLE) && start;
  assign iter  = (state == ST_RUN);
  assign end_o = (state == ST_END);
  assign busy  = (state != ST_IDLE);

endmodule
