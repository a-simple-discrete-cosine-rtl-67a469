// dct_pkg: types and constants shared by the DCT systolic array.
//
// The array computes an N-point DCT through the modified DFT (MDFT)
//   Z(k) = sum_n x(n) U^(nk),  U = exp(j*pi/N),
// so every twiddle factor and every output weight is a cosine or sine of a
// multiple of pi/N or pi/2N. These constants are fixed when the design is
// elaborated; the helper functions below work them out from N so that no
// table has to be typed in by hand.
//
// tok_t is the control token that travels through the array together with
// each sample: 'valid' marks a real sample, 'first' clears the accumulator
// of a PE (the E pin of the one-PE chip) and 'last' makes the PE capture its
// finished result (the clk2 strobe of Latch#3).
package dct_pkg;

  localparam real PI = 3.14159265358979323846;

  // Default sizes: a 4-point transform with 12-bit internal accuracy.
  localparam int N_DEFAULT  = 4;
  localparam int W_DEFAULT  = 12;
  // Width of the post-multiplier's coefficients (two integer bits: sign and
  // the value 1.0, the rest fraction).
  localparam int CW_DEFAULT = 12;

  typedef struct packed {
    logic valid;
    logic first;
    logic last;
  } tok_t;

  localparam tok_t TOK_IDLE = '{valid: 1'b0, first: 1'b0, last: 1'b0};

  // Twiddle of PE k: U^-k = cos(k*pi/N) - j sin(k*pi/N).
  function automatic real twiddle_cos(int k, int n);
    return $cos(real'(k) * PI / real'(n));
  endfunction

  function automatic real twiddle_sin(int k, int n);
    return $sin(real'(k) * PI / real'(n));
  endfunction

  // Output weight of eq. (4) with the (-1)^k sign of the array folded in:
  //   Y(k) = Re{ (-1)^k C(k) exp(j k pi / 2N) * A(k) },  A(k) = (-1)^k Z(k)
  // Returns the real part (im = 0) or the imaginary part (im = 1).
  function automatic real out_weight(int k, int n, bit im);
    real ck, sgn, ang;
    ck  = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    sgn = (k % 2 == 1) ? -1.0 : 1.0;
    ang = real'(k) * PI / (2.0 * real'(n));
    return sgn * ck * (im ? $sin(ang) : $cos(ang));
  endfunction

endpackage
