// xgcd_pkg: shared definitions of the XGCD modular inverse processor.
//
// The controller of the processor walks through eight states. Their names
// follow the state diagram published with the design (set_reset, div,
// modular, mult, reset1, set1, sign_test, output); the work done in each
// state and the order in which they are visited are this implementation's
// own reading of the extended Euclidean algorithm, described in xgcd.sv.
package xgcd_pkg;

  typedef enum logic [2:0] {
    ST_SET_RESET = 3'd0,  // idle: wait for Enable, load the operands
    ST_DIV       = 3'd1,  // start the division r / r1
    ST_MODULAR   = 3'd2,  // wait for quotient and remainder r mod r1
    ST_MULT      = 3'd3,  // form quotient * s1
    ST_RESET1    = 3'd4,  // shift the (r, r1) and (s, s1) pairs
    ST_SET1      = 3'd5,  // loop test: r1 != 0
    ST_SIGN_TEST = 3'd6,  // invertibility test and sign correction
    ST_OUTPUT    = 3'd7   // hold the result with Ready high
  } xgcd_state_e;

endpackage
