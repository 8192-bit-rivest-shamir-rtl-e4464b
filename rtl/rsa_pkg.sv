// rsa_pkg: constants and types shared by the RSA exponentiation core.
//
// KEY_BITS_DEFAULT is the key size the core is built for by default (8192
// bits, the size this accelerator targets); every module takes its own
// width parameter so that smaller keys (128, 1024 bits) can be built from the
// same source. modexp_state_e names the states of the algorithmic state
// machine in rsa_modexp; the state sequence is this design's own.
package rsa_pkg;

  localparam int unsigned KEY_BITS_DEFAULT = 8192;

  typedef enum logic [2:0] {
    ME_IDLE,      // waiting for start
    ME_R2,        // computing R^2 mod M
    ME_TO_MONT,   // X*R mod M and 1*R mod M, both multipliers
    ME_LOOP_ISSUE,// issue one square (and multiply) step
    ME_LOOP_WAIT, // wait for the step to finish
    ME_FROM_MONT  // result*1 to leave the Montgomery domain
  } modexp_state_e;

endpackage
