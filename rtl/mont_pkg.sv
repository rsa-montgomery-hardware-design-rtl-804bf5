// mont_pkg: constants and types shared by the radix-2 Montgomery multiplier.
//
// DEFAULT_K is the modulus length in bits, 1024 as in the evaluated RSA key
// size. The controller state type lives here so that testbenches can name the
// states. The encoding is this design's own choice.
package mont_pkg;

  // Modulus length in bits (RSA-1024).
  parameter int unsigned DEFAULT_K = 1024;

  // Iteration controller states: wait for start, run the K+2 iterations of
  // the loop, then one END cycle that registers the result.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_RUN  = 2'd1,
    ST_END  = 2'd2
  } ctrl_state_e;

endpackage
