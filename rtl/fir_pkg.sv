// fir_pkg: sizes and coefficient set shared by every FIR structure in this design.
//
// The design is a 6-tap FIR filter with constant, symmetric coefficients, built in
// several structures that all compute the same output. The tap count (6) and the
// symmetry h(1)=h(6), h(2)=h(5), h(3)=h(4) follow the filter this RTL documents.
// The sample width, the coefficient width and the coefficient values are this
// design's own choice: 8-bit two's-complement samples and 8-bit two's-complement
// coefficients {-4, 9, 27, 27, 9, -4}, a small low-pass whose taps sum to 64, so
// a step of height A settles at 64*A.
//
// Coefficients travel as one packed vector, tap k in bits [k*COEF_W +: COEF_W],
// so that every module can take them as an ordinary parameter.
package fir_pkg;

  localparam int TAPS   = 6;
  localparam int IN_W   = 8;
  localparam int COEF_W = 8;

  // Full-precision output width: product width plus growth of a TAPS-term sum.
  localparam int OUT_W  = IN_W + COEF_W + $clog2(TAPS);

  // Tap 0 (multiplies the newest sample) sits in the least significant byte.
  localparam logic [TAPS*COEF_W-1:0] COEFS = {
    8'hFC,  // h(6) = -4
    8'h09,  // h(5) =  9
    8'h1B,  // h(4) = 27
    8'h1B,  // h(3) = 27
    8'h09,  // h(2) =  9
    8'hFC   // h(1) = -4
  };

endpackage
