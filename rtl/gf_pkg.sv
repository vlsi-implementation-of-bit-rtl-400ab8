// gf_pkg: constants and types shared by the GF(2^m) multiplier modules.
//
// The default field is GF(2^8) with the reduction polynomial
// Q(x) = x^8 + x^4 + x^3 + x + 1, the example field used throughout this
// design. A polynomial is passed to the hardware as its lower m
// coefficients q[m-1:0] (the x^m term is implicit), so this Q(x) is 8'h1B.
// The digit size of the digit-serial multiplier defaults to 8 bits, the
// eight reduction/AND lanes of its product generator.
package gf_pkg;

  // Field degree m of the default configuration.
  localparam int unsigned GF_M = 8;

  // Digit size w of the digit-serial multiplier.
  localparam int unsigned GF_W = 8;

  // Lower coefficients of x^8 + x^4 + x^3 + x + 1.
  localparam logic [7:0] GF_Q_DEFAULT = 8'h1B;

  // Sequencing state shared by both multiplier controllers.
  typedef enum logic {
    ST_IDLE = 1'b0,   // result (if any) held in the accumulator
    ST_RUN  = 1'b1    // one bit or digit of B consumed per enabled cycle
  } gf_state_e;

endpackage
