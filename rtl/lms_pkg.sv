// lms_pkg: types and constants shared by the LMS adaptive equalizer.
//
// The equalizer adapts its tap weights with plain LMS or with one of the
// three reduced-complexity sign variants:
//   LMS          w(n+1) = w(n) + mu * e(n) * x(n)
//   sign-data    w(n+1) = w(n) + mu * e(n) * sign(x(n))
//   sign-error   w(n+1) = w(n) + mu * sign(e(n)) * x(n)
//   sign-sign    w(n+1) = w(n) + mu * sign(e(n)) * sign(x(n))
// The four variants follow the original architecture; selecting them at run time
// through one 2-bit mode input, and the encoding below, are this design's
// own choice. Bit 0 of the code means "use sign(x)", bit 1 "use sign(e)".
//
// All numbers are two's-complement fixed point of W bits with FRAC
// fraction bits. sign(v) is +1 for v >= 0 and -1 for v < 0 (the sign bit).
package lms_pkg;

  typedef enum logic [1:0] {
    MODE_LMS        = 2'b00,
    MODE_SIGN_DATA  = 2'b01,
    MODE_SIGN_ERROR = 2'b10,
    MODE_SIGN_SIGN  = 2'b11
  } lms_mode_e;

  // Default word length and number of fraction bits.
  localparam int unsigned LMS_W    = 18;
  localparam int unsigned LMS_FRAC = 14;
  // Default number of taps.
  localparam int unsigned LMS_NTAPS = 2;

  // Mode bit that selects sign(x) and mode bit that selects sign(e).
  localparam int unsigned MODE_BIT_SIGN_DATA  = 0;
  localparam int unsigned MODE_BIT_SIGN_ERROR = 1;

endpackage
