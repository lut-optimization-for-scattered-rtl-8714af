// lms_pkg: constants shared by the distributed-arithmetic (DA) LMS adaptive
// filter. The filter has N_TAPS = 4 weights (the four-point structure) and
// L_BITS = 16 bit input samples and weights (the 16-bit data ports of the
// filter). DA-table words and the carry-save accumulator are L_BITS+2 bits
// wide, enough for the sum of four samples. The step size is mu = 1/N, so the
// error is scaled by a right shift of log2(N_TAPS) = 2 places.
package lms_pkg;
  parameter int unsigned N_TAPS = 4;
  parameter int unsigned L_BITS = 16;
  // guard bits of a DA-table word: ceil(log2(N_TAPS))
  parameter int unsigned GUARD = $clog2(N_TAPS);
endpackage
