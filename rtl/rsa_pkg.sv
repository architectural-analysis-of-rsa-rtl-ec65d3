// rsa_pkg: types and constants shared by the RSA transceiver.
//
// The transceiver can be built in four architectural cases, picked by two
// parameters of the top level:
//   * exp_alg_e  - how modular exponentiation (encryption and decryption) is
//                  done: right-to-left square and multiply, or Montgomery
//                  exponentiation built on a bit-serial Montgomery product.
//   * ee_sched_e - how the extended Euclid step of private key generation is
//                  scheduled: three multiplier/subtractor lanes working in the
//                  same cycle, or one shared lane used three times in turn.
// Case 1 = (square-multiply, parallel), case 2 = (square-multiply, sequential),
// case 3 = (Montgomery, parallel), case 4 = (Montgomery, sequential).
package rsa_pkg;

  typedef enum logic {
    EXP_SQUARE_MULTIPLY = 1'b0,
    EXP_MONTGOMERY      = 1'b1
  } exp_alg_e;

  typedef enum logic {
    EE_PARALLEL   = 1'b0,
    EE_SEQUENTIAL = 1'b1
  } ee_sched_e;

  // Default key length in bits: width of the modulus n, of phi(n) and of the
  // exponents e and d. Each prime p, q is KEY_BITS/2 bits wide.
  localparam int unsigned DEFAULT_KEY_BITS = 8;

endpackage
