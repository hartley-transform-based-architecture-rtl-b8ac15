// smht_pkg -- shared constants and constant functions of the Hartley-transform
// S-method analyzer and time-varying filter.
//
// Number format: samples, HT values and products are signed Q15 words (15
// fractional bits). The cos/sin coefficients of the recursive Hartley channels
// are Q15 values held in COEF_W = 17 bits so that +1.0 and -1.0 are exact.
// S-method sums carry guard bits above the Q15 word (see sm_width).
package smht_pkg;

  localparam int unsigned QF     = 15;  // fractional bits of every Q15 quantity
  localparam int unsigned COEF_W = 17;  // coefficient width, Q15 plus one integer bit

  localparam real PI = 3.14159265358979323846;

  // Q15 value of cos(2*pi*k/n), rounded to nearest.
  function automatic int cos_q15(int k, int n);
    return int'($cos(2.0 * PI * real'(k) / real'(n)) * real'(1 << QF));
  endfunction

  // Q15 value of sin(2*pi*k/n), rounded to nearest.
  function automatic int sin_q15(int k, int n);
    return int'($sin(2.0 * PI * real'(k) / real'(n)) * real'(1 << QF));
  endfunction

  // Width of an S-method value: the Q15 word plus enough integer bits for
  // HT^2 + 2*sum of LD products (|sum| <= 2*LD+1) and one more for the
  // average of two such sums before its one-bit right shift.
  function automatic int unsigned sm_width(int unsigned w, int unsigned ld);
    return w + $clog2(2 * ld + 1) + 1;
  endfunction

endpackage
