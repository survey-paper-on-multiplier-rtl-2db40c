// dwt97_pkg: shared constants of the multiplier-less 9/7 DWT filter pair.
//
// The filter coefficients are the 9/7 wavelet coefficients scaled by 128
// and rounded to 7-bit unsigned integers (all of them are taken as
// positive). Each table is packed with index 0 holding the coefficient
// that multiplies the outermost symmetric tap pair, index 1 the next pair
// inward, and the last index the centre tap:
//   high pass: g0=71, g1=38, g2=4,  g3=6           (7 taps,  r1..r4)
//   low pass : h0=77, h1=34, h2=10, h3=2,  h4=3    (9 taps,  r1..r5)
// The high-pass pairing (g0 with Y(n)+Y(n-6) ... g3 with Y(n-3)) is the
// published one; the low-pass pairing follows the same ordering and is
// this design's choice. Reorder a table to pair them differently.
package dwt97_pkg;

  // Width of one scaled coefficient (coefficients are scaled by 128).
  localparam int COEF_W = 7;

  // Distinct coefficients, i.e. inputs of each distributed-arithmetic unit.
  localparam int HP_N = 4;
  localparam int LP_N = 5;

  // Taps held by the delay line (Y(n-1) .. Y(n-8)).
  localparam int DELAY_TAPS = 8;

  typedef logic [COEF_W-1:0] coef_t;

  localparam coef_t [HP_N-1:0] HP_COEFS = {7'd6, 7'd4, 7'd38, 7'd71};
  localparam coef_t [LP_N-1:0] LP_COEFS = {7'd3, 7'd2, 7'd10, 7'd34, 7'd77};

endpackage
